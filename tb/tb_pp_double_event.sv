// tb_pp_double_event: self-checking test of the double-error-event
// post-processor.
//
// Builds a stream of zero-parity d=1 codewords (N = 406), the detector input
// samples of the reference PR channel with small noise, and "detected" bits
// with dominant error events injected: none, one, or two separated by more
// than the channel memory, in rotation. The syndrome of each detected
// codeword is delivered one clock after its last bit, as the parity check
// does. Checks: every output codeword equals the transmitted one; the
// decision reports the injected number of events and the right syndrome
// status; each bit leaves exactly D+1 clocks after it entered
// (D = N + 13 + 136 + 8). Each mechanism (clean codeword, single-event
// correction, double-event correction) must occur.
module tb_pp_double_event;
  import tb_pc_ref_pkg::*;

  localparam int N = 406, NCW = 16, D = N + 13 + 136 + 8, PRE = 2;
  localparam taps_t H = '{4, 8, 12, 16, 12, 8, 4};

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_sof = 1'b0, in_bit = 1'b0;
  logic signed [7:0] in_y = '0;
  logic syn_valid = 1'b0;
  logic [3:0] syn = '0;
  logic out_valid, out_sof, out_bit;
  logic dec_valid, dec_syn_err, dec_fail;
  logic [1:0] dec_nev;
  logic [1:0] dec_type [2];
  logic [8:0] dec_pos [2];
  int checks = 0, failures = 0;
  int cycle = 0;

  pp_double_event dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat ((NCW + 4) * N + 4 * D) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit tru[], det[];
  int in_cycle[];
  int nev_q [$];
  int n_clean = 0, n_single = 0, n_double = 0;
  int oc = -1, opos = 0, bad_bits = 0, bad_lat = 0, cw_bad = 0;

  // decision monitor
  always @(posedge clk) begin
    if (rst_n && dec_valid) begin
      int e;
      e = nev_q.pop_front();
      checks++;
      if (int'(dec_nev) != e || dec_fail || dec_syn_err != (e != 0)) begin
        failures++;
        $display("decision: nev %0d exp %0d fail %0d syn_err %0d", dec_nev, e, dec_fail, dec_syn_err);
      end else begin
        if (e == 0) n_clean++;
        if (e == 1) n_single++;
        if (e == 2) n_double++;
      end
    end
  end

  // output monitor
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (out_sof) begin
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
        if (out_bit !== tru[k]) cw_bad++;
        if (cycle - in_cycle[k] != D + 1) bad_lat++;
        opos++;
      end
    end
  end

  initial begin
    bit q[$];
    int total;
    q.push_back(1'b0); q.push_back(1'b0);
    for (int c = 0; c < NCW; c++) gen_codeword(q, N);
    total = q.size() + D + 20;
    tru = new[total];
    foreach (q[i]) tru[i] = q[i];
    for (int i = q.size(); i < total; i++) tru[i] = tru[q.size() - 1];
    det = new[total](tru);
    // inject events
    for (int c = 0; c < NCW; c++) begin
      int base, mode, nev;
      base = PRE + c * N;
      mode = (c % 4 == 3) ? $urandom_range(0, 2) : c % 4;
      nev = 0;
      forever begin
        int t1, t2, m1, m2;
        for (int i = base; i < base + N; i++) det[i] = tru[i];
        if (mode == 0) break;
        t1 = $urandom_range(0, 3);
        m1 = base + $urandom_range(3, N / 2);
        if (!event_ok(tru, t1, m1)) continue;
        apply_event(det, t1, m1);
        if (mode == 2) begin
          t2 = $urandom_range(0, 3);
          m2 = m1 + 2 * t1 + 1 + 7 + $urandom_range(0, 60);
          if (m2 + 2 * t2 + 4 > base + N - 1 || !event_ok(tru, t2, m2)) continue;
          apply_event(det, t2, m2);
        end
        if (ref_parity(det, base, N, 0) != 0) break;
      end
      nev_q.push_back(mode);
    end
    in_cycle = new[total];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int k = 0; k < total; k++) begin
      int y;
      y = ref_channel(H, tru, k) + int'($urandom_range(0, 4)) - 2;
      in_valid  <= 1'b1;
      in_sof    <= (k >= PRE) && (k < PRE + NCW * N) && ((k - PRE) % N == 0);
      in_bit    <= det[k];
      in_y      <= 8'(y);
      syn_valid <= 1'b0;
      if (k > PRE && k <= PRE + NCW * N && (k - PRE) % N == 0) begin
        syn_valid <= 1'b1;
        syn       <= ref_parity(det, k - N, N, 0);
      end
      @(posedge clk);
      in_cycle[k] = cycle;
    end
    in_valid <= 1'b0;
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
    if (oc < NCW - 1) begin
      failures++;
      $display("only %0d codewords came out", oc + 1);
    end
    checks++;
    if (n_clean == 0 || n_single == 0 || n_double == 0 || nev_q.size() != 0) begin
      failures++;
      $display("mechanism missing or decisions missing");
    end
    $display("clean %0d, single-event corrections %0d, double-event corrections %0d",
             n_clean, n_single, n_double);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
