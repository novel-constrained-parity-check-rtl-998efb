// tb_bd_pc_top: end-to-end test of the read channel back end at its
// default sizes (N = 406, 7-tap target, survivor depth 48, 4 candidates
// per matched filter), plus the encoder parity unit.
//
// The testbench plays the encoder and the channel: it builds zero-parity
// d=1 codewords, and for most of them picks one or two dominant error
// events and displaces the channel samples 60 % of the way towards the
// erroneous sequence (plus small noise). The Viterbi detector therefore
// decides for the erroneous bits, the parity check flags the codeword, and
// the post-processor must restore it. Checks: every corrected codeword
// equals the transmitted one; the syndrome flag and the number of events
// corrected match what was injected; each bit comes out exactly
// DEPTH + D + 1 clocks after its sample went in; the encoder parity unit's
// output for the first 390 bits of each codeword equals the parity of that
// codeword's last 16 bits, which is the condition the PRC codeword meets.
// Counted mechanisms, each of which must occur: clean codeword, parity
// violation, single-event correction, double-event correction.
module tb_bd_pc_top;
  import tb_pc_ref_pkg::*;

  localparam int N = 406, NCW = 20, DEPTH = 48, D = N + 13 + 136 + 8, PRE = 2;
  localparam int LAT = D + DEPTH + 1;
  localparam int I1 = 390;
  localparam taps_t H = '{4, 8, 12, 16, 12, 8, 4};

  logic clk = 1'b0, rst_n = 1'b0;
  logic rx_valid = 1'b0, rx_sof = 1'b0;
  logic signed [7:0] rx_y = '0;
  logic dec_in_valid, dec_in_sof, dec_in_bit;
  logic pc_syn_valid, pc_syn_err, pp_dec_valid, pp_dec_fail;
  logic [3:0] pc_syn;
  logic [1:0] pp_dec_nev;
  logic nc_valid = 1'b0, nc_sof = 1'b0, nc_bit = 1'b0;
  logic prc_par_valid;
  logic [3:0] prc_par;
  int checks = 0, failures = 0;
  int cycle = 0;

  bd_pc_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat ((NCW + 4) * N + 2 * LAT) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit tru[], det[];
  int yv[];
  int n_tries = 0;

  // Channel samples for one codeword: the true signal displaced 60 % of
  // the way towards the erroneous sequence, plus noise of -1, 0 or +1
  // (none in the first 8 samples, which the previous codeword's reference
  // already used).
  function automatic void make_samples(int base);
    for (int k = base; k < base + N + 8; k++) begin
      int yt, ye;
      yt = ref_channel(H, tru, k);
      ye = ref_channel(H, det, k);
      yv[k] = yt + (6 * (ye - yt) + (ye > yt ? 5 : -5)) / 10;
      if (k >= base + 8 && k < base + N) yv[k] += int'($urandom_range(0, 2)) - 1;
    end
  endfunction

  // Reduction of the squared distance to the samples when error event
  // (t, m) is undone in det; 'ok' tells whether the event is admissible.
  function automatic int reduction(int base, int t, int m, output bit ok);
    bit c[];
    int r;
    ok = (m >= base) && (m + 2 * t <= base + N - 1);
    if (!ok) return 0;
    for (int j = 2; j < 2 * t + 1; j += 2)
      if (det[m+j] == det[m+j-2]) ok = 0;
    if (!ok) return 0;
    c = new[det.size()](det);
    apply_event(c, t, m);
    ok = d1_ok(c, m - 2, m + 2 * t + 2);
    r = 0;
    for (int k = m; k < m + 2 * t + 1 + 6; k++) begin
      int a, b;
      a = yv[k] - ref_channel(H, det, k);
      b = yv[k] - ref_channel(H, c, k);
      r += a * a - b * b;
    end
    return r;
  endfunction

  function automatic logic [3:0] ev_syn(int base, int t, int m);
    logic [3:0] s;
    s = '0;
    for (int j = 0; j < 2 * t + 1; j += 2) s ^= ref_xpow((N - 1 - (m + j - base) + 4) % 15);
    return s;
  endfunction

  // True when the injected events are the unique minimum-distance choice
  // among all admissible single events and separated pairs whose syndrome
  // equals the codeword's, and each injected event ranks within the four
  // best of its type.
  function automatic bit ml_choice_is(int base, int t1, int m1, int t2, int m2);
    int ct[$], cm[$], cr[$];
    logic [3:0] cs[$];
    logic [3:0] sw;
    int best, second, bi, bj, ti1, ti2;
    sw = ref_parity(det, base, N, 0);
    for (int t = 0; t < 4; t++)
      for (int m = base; m < base + N; m++) begin
        bit ok;
        int r;
        r = reduction(base, t, m, ok);
        if (ok) begin
          ct.push_back(t); cm.push_back(m); cr.push_back(r); cs.push_back(ev_syn(base, t, m));
        end
      end
    ti1 = -1; ti2 = -1;
    foreach (ct[i]) begin
      if (ct[i] == t1 && cm[i] == m1) ti1 = i;
      if (ct[i] == t2 && cm[i] == m2) ti2 = i;
    end
    if (ti1 < 0 || (m2 >= 0 && ti2 < 0)) return 0;
    begin
      int above1, above2;
      above1 = 0; above2 = 0;
      foreach (ct[i]) begin
        if (ct[i] == t1 && cr[i] >= cr[ti1] && i != ti1) above1++;
        if (m2 >= 0 && ct[i] == t2 && cr[i] >= cr[ti2] && i != ti2) above2++;
      end
      if (above1 >= 3 || above2 >= 3) return 0;
    end
    best = -(1 << 30); second = -(1 << 30); bi = -1; bj = -1;
    foreach (ct[i]) begin
      if (cs[i] == sw) begin
        if (cr[i] > best) begin second = best; best = cr[i]; bi = i; bj = i; end
        else if (cr[i] > second) second = cr[i];
      end
      for (int j = i + 1; j < ct.size(); j++) begin
        int lo, hi;
        lo = (cm[i] <= cm[j]) ? i : j;
        hi = (cm[i] <= cm[j]) ? j : i;
        if ((cs[i] ^ cs[j]) == sw && cm[hi] - cm[lo] - (2 * ct[lo] + 1) > 6) begin
          int r;
          r = cr[i] + cr[j];
          if (r > best) begin second = best; best = r; bi = i; bj = j; end
          else if (r > second) second = r;
        end
      end
    end
    if (best <= second) return 0;
    if (m2 < 0) return bi == ti1 && bj == ti1;
    return (bi == ti1 && bj == ti2) || (bi == ti2 && bj == ti1);
  endfunction
  int in_cycle[];
  int nev_q [$], synerr_q [$];
  logic [3:0] par_q [$];
  int n_clean = 0, n_viol = 0, n_single = 0, n_double = 0, n_vd_err = 0;
  int oc = -1, opos = 0, bad_lat = 0, cw_bad = 0, n_par = 0;

  always @(posedge clk) begin
    if (rst_n && pc_syn_valid) begin
      int e;
      e = synerr_q.pop_front();
      checks++;
      if (int'(pc_syn_err) != e) begin
        failures++;
        $display("parity check flag %0d, expected %0d", pc_syn_err, e);
      end
      if (pc_syn_err) n_viol++;
    end
    if (rst_n && pp_dec_valid) begin
      int e;
      e = nev_q.pop_front();
      checks++;
      if (int'(pp_dec_nev) != e || pp_dec_fail) begin
        failures++;
        $display("post-processor corrected %0d events, expected %0d", pp_dec_nev, e);
      end else begin
        if (e == 0) n_clean++;
        if (e == 1) n_single++;
        if (e == 2) n_double++;
      end
    end
    if (rst_n && prc_par_valid) begin
      logic [3:0] e;
      e = par_q.pop_front();
      n_par++;
      checks++;
      if (prc_par !== e) begin
        failures++;
        $display("encoder parity %h, expected %h", prc_par, e);
      end
    end
    if (rst_n && dec_in_valid) begin
      if (dec_in_sof) begin
        if (oc >= 0) begin
          checks++;
          if (cw_bad != 0) begin
            failures++;
            $display("codeword %0d: %0d wrong bits", oc, cw_bad);
          end
        end
        oc++;
        opos = 0;
        cw_bad = 0;
      end
      if (oc >= 0 && oc < NCW) begin
        int k;
        k = PRE + oc * N + opos;
        if (dec_in_bit !== tru[k]) cw_bad++;
        if (cycle - in_cycle[k] != LAT) bad_lat++;
        opos++;
      end
    end
  end

  initial begin
    bit q[$];
    int total;
    q.push_back(1'b0); q.push_back(1'b0);
    for (int c = 0; c < NCW; c++) gen_codeword(q, N);
    total = q.size() + LAT + 20;
    tru = new[total];
    foreach (q[i]) tru[i] = q[i];
    for (int i = q.size(); i < total; i++) tru[i] = tru[q.size() - 1];
    det = new[total](tru);
    yv = new[total];
    for (int k = 0; k < total; k++) yv[k] = ref_channel(H, tru, k);
    for (int c = 0; c < NCW; c++) begin
      int base, mode, tries;
      base = PRE + c * N;
      mode = (c % 5 == 4) ? 0 : (c % 2 == 0) ? 1 : 2;
      tries = 0;
      forever begin
        int t1, t2, m1, m2;
        tries++;
        for (int i = base; i < base + N; i++) det[i] = tru[i];
        if (mode == 0) break;
        t1 = $urandom_range(0, 3);
        m1 = base + $urandom_range(8, N / 2);
        if (!event_ok(tru, t1, m1)) continue;
        apply_event(det, t1, m1);
        t2 = 0;
        m2 = -1;
        if (mode == 2) begin
          t2 = $urandom_range(0, 3);
          m2 = m1 + 2 * t1 + 1 + 10 + $urandom_range(0, 80);
          if (m2 + 2 * t2 + 10 > base + N - 1 || !event_ok(tru, t2, m2)) continue;
          apply_event(det, t2, m2);
        end
        if (ref_parity(det, base, N, 0) == 0) continue;
        make_samples(base);
        if (ml_choice_is(base, t1, m1, t2, m2)) break;
      end
      n_tries += tries;
      nev_q.push_back(mode);
      synerr_q.push_back(mode != 0);
      par_q.push_back(ref_parity(tru, base + I1, N - I1, 0));
      checks++;
      if (ref_parity(tru, base, I1, N - I1) != ref_parity(tru, base + I1, N - I1, 0)) begin
        failures++;
        $display("reference codeword %0d breaks the parity condition", c);
      end
    end
    for (int i = 0; i < total; i++) if (det[i] != tru[i]) n_vd_err++;
    in_cycle = new[total];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int k = 0; k < total; k++) begin
      int y, cpos;
      y = yv[k];
      cpos = k - PRE;
      rx_valid <= 1'b1;
      rx_sof   <= (cpos >= 0) && (cpos < NCW * N) && (cpos % N == 0);
      rx_y     <= 8'(y);
      // encoder side: the NC part of the same codewords
      nc_valid <= (cpos >= 0) && (cpos < NCW * N) && (cpos % N < I1);
      nc_sof   <= (cpos >= 0) && (cpos < NCW * N) && (cpos % N == 0);
      nc_bit   <= tru[k];
      @(posedge clk);
      in_cycle[k] = cycle;
    end
    rx_valid <= 1'b0;
    nc_valid <= 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (cw_bad != 0) begin
      failures++;
      $display("last codeword: %0d wrong bits", cw_bad);
    end
    checks++;
    if (bad_lat != 0) begin
      failures++;
      $display("%0d bits left with the wrong latency", bad_lat);
    end
    checks++;
    if (oc != NCW - 1 || n_par != NCW || nev_q.size() != 0 || synerr_q.size() != 0) begin
      failures++;
      $display("missing outputs: codewords %0d, parity words %0d", oc + 1, n_par);
    end
    checks++;
    if (n_clean == 0 || n_viol == 0 || n_single == 0 || n_double == 0 || n_vd_err == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    $display("injection attempts %0d", n_tries);
    $display("detector bit errors %0d; clean %0d, parity violations %0d, single-event corrections %0d, double-event corrections %0d",
             n_vd_err, n_clean, n_viol, n_single, n_double);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
