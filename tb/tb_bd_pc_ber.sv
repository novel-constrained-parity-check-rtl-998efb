// tb_bd_pc_ber: bit-error-rate run of the full receive chain with random
// noise, the kind of experiment the code was designed for.
//
// 180 zero-parity d=1 codewords of 406 bits are sent through the reference
// PR channel (default 7-tap target) with additive white Gaussian noise, in
// three segments of 60 codewords with standard deviations 9, 8 and 7 sample
// units (the smallest error event has a Euclidean distance of about 53).
// The Viterbi decisions are observed inside the top to count the
// detector's errors. Checks, per codeword: the parity
// flag equals whether the detected codeword breaks the parity; a codeword
// the detector got right comes out unchanged. Overall: the post-processor
// leaves fewer wrong bits and fewer wrong codewords than the detector did,
// in every segment and in total, and parity violations and corrections both
// occur. The bit error rates before and after post-processing are printed
// per noise level.
//
// A second post-processor limited to one event per codeword (MAX_EV = 1)
// runs on the same detector stream, as the single-event scheme the
// double-event one improves on. Check: the double-event post-processor
// leaves no more wrong codewords than the single-event one, in total.
module tb_bd_pc_ber;
  import tb_pc_ref_pkg::*;

  localparam int N = 406, NSEG = 3, SEGCW = 60, NCW = NSEG * SEGCW, DEPTH = 48, D = N + 13 + 136 + 8, PRE = 2;
  localparam int LAT = D + DEPTH + 1;
  localparam real SIGMA [NSEG] = '{9.0, 8.0, 7.0};
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

  bd_pc_top dut (.*);

  // single-event post-processor on the detector stream inside the top
  logic s_out_valid, s_out_sof, s_out_bit;
  logic s_dec_valid, s_dec_syn_err, s_dec_fail;
  logic [1:0] s_dec_nev;
  logic [1:0] s_dec_type [2];
  logic [8:0] s_dec_pos [2];

  pp_double_event #(.MAX_EV(1)) u_single (
    .clk, .rst_n,
    .in_valid   (dut.vd_valid),
    .in_sof     (dut.vd_sof),
    .in_bit     (dut.vd_bit),
    .in_y       (dut.vd_y),
    .syn_valid  (dut.pc_syn_valid),
    .syn        (dut.pc_syn),
    .out_valid  (s_out_valid),
    .out_sof    (s_out_sof),
    .out_bit    (s_out_bit),
    .dec_valid  (s_dec_valid),
    .dec_syn_err(s_dec_syn_err),
    .dec_nev    (s_dec_nev),
    .dec_fail   (s_dec_fail),
    .dec_type   (s_dec_type),
    .dec_pos    (s_dec_pos)
  );

  always #5 clk = ~clk;

  initial begin
    repeat ((NCW + 4) * N + 2 * LAT) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1, 1000000))) / 1000000.0;
    u2 = (real'($urandom_range(0, 999999))) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  bit tru[];
  bit vd[];
  int n_vd_bits = 0, n_vd_cw = 0, n_pp_bits = 0, n_pp_cw = 0;
  int s_vd_bits [NSEG], s_vd_cw [NSEG], s_pp_bits [NSEG], s_pp_cw [NSEG];
  int s_sp_bits [NSEG], s_sp_cw [NSEG];
  int n_sp_bits = 0, n_sp_cw = 0, n_sp_pair = 0;
  int n_viol = 0, n_corr = 0, n_fail = 0;
  int sc = -1, spos = 0, sw_bad = 0;
  int vdk = -(DEPTH - 1);
  int syn_cw = 0;
  int oc = -1, opos = 0, cw_bad = 0;

  // detector decisions, observed inside the top
  always @(posedge clk) begin
    if (rst_n && dut.vd_valid) begin
      if (vdk >= 0 && vdk < vd.size()) vd[vdk] = dut.vd_bit;
      vdk++;
    end
  end

  // parity flag against the detected codeword
  always @(posedge clk) begin
    if (rst_n && pc_syn_valid) begin
      int base;
      bit exp_err;
      base = PRE + syn_cw * N;
      exp_err = ref_parity(vd, base, N, 0) != 0;
      checks++;
      if (pc_syn_err != exp_err) begin
        failures++;
        $display("codeword %0d: parity flag %0d, expected %0d", syn_cw, pc_syn_err, exp_err);
      end
      if (pc_syn_err) n_viol++;
      syn_cw++;
    end
    if (rst_n && pp_dec_valid) begin
      if (pp_dec_nev != 0) n_corr++;
      if (pp_dec_fail) n_fail++;
    end
    if (rst_n && s_dec_valid && s_dec_nev == 2'd2) n_sp_pair++;
  end

  task automatic close_codeword(int c);
    int base, e;
    base = PRE + c * N;
    e = 0;
    for (int i = base; i < base + N; i++) if (vd[i] != tru[i]) e++;
    n_vd_bits += e;
    if (e != 0) n_vd_cw++;
    n_pp_bits += cw_bad;
    if (cw_bad != 0) n_pp_cw++;
    s_vd_bits[c / SEGCW] += e;
    if (e != 0) s_vd_cw[c / SEGCW]++;
    s_pp_bits[c / SEGCW] += cw_bad;
    if (cw_bad != 0) s_pp_cw[c / SEGCW]++;
    if (e == 0) begin
      checks++;
      if (cw_bad != 0) begin
        failures++;
        $display("codeword %0d: detected correctly but changed by the post-processor", c);
      end
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && dec_in_valid) begin
      if (dec_in_sof) begin
        if (oc >= 0 && oc < NCW) close_codeword(oc);
        oc++;
        opos = 0;
        cw_bad = 0;
      end
      if (oc >= 0 && oc < NCW) begin
        if (dec_in_bit !== tru[PRE + oc * N + opos]) cw_bad++;
        opos++;
      end
    end
  end

  task automatic close_single(int c);
    n_sp_bits += sw_bad;
    if (sw_bad != 0) n_sp_cw++;
    s_sp_bits[c / SEGCW] += sw_bad;
    if (sw_bad != 0) s_sp_cw[c / SEGCW]++;
  endtask

  always @(posedge clk) begin
    if (rst_n && s_out_valid) begin
      if (s_out_sof) begin
        if (sc >= 0 && sc < NCW) close_single(sc);
        sc++;
        spos = 0;
        sw_bad = 0;
      end
      if (sc >= 0 && sc < NCW) begin
        if (s_out_bit !== tru[PRE + sc * N + spos]) sw_bad++;
        spos++;
      end
    end
  end

  initial begin
    bit q[$];
    int total;
    for (int i = 0; i < NSEG; i++) begin
      s_vd_bits[i] = 0; s_vd_cw[i] = 0; s_pp_bits[i] = 0; s_pp_cw[i] = 0;
      s_sp_bits[i] = 0; s_sp_cw[i] = 0;
    end
    q.push_back(1'b0); q.push_back(1'b0);
    for (int c = 0; c < NCW; c++) gen_codeword(q, N);
    total = q.size() + LAT + 20;
    tru = new[total];
    vd  = new[total];
    foreach (q[i]) tru[i] = q[i];
    for (int i = q.size(); i < total; i++) tru[i] = tru[q.size() - 1];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int k = 0; k < total; k++) begin
      int y, cpos, seg;
      seg = (k - PRE) / (SEGCW * N);
      if (seg < 0) seg = 0;
      if (seg >= NSEG) seg = NSEG - 1;
      y = ref_channel(H, tru, k) + int'($rtoi(SIGMA[seg] * gauss() + 1000.5)) - 1000;
      if (y > 127) y = 127;
      if (y < -128) y = -128;
      cpos = k - PRE;
      rx_valid <= 1'b1;
      rx_sof   <= (cpos >= 0) && (cpos < NCW * N) && (cpos % N == 0);
      rx_y     <= 8'(y);
      @(posedge clk);
    end
    rx_valid <= 1'b0;
    repeat (5) @(posedge clk);
    if (oc == NCW - 1) close_codeword(oc);
    if (sc == NCW - 1) close_single(sc);
    checks++;
    if (oc != NCW - 1 || syn_cw != NCW) begin
      failures++;
      $display("missing outputs: %0d codewords, %0d syndromes", oc + 1, syn_cw);
    end
    checks++;
    if (n_pp_bits >= n_vd_bits || n_pp_cw >= n_vd_cw) begin
      failures++;
      $display("post-processing did not reduce the errors");
    end
    for (int i = 0; i < NSEG; i++) begin
      checks++;
      if (s_pp_bits[i] > s_vd_bits[i] || s_pp_cw[i] > s_vd_cw[i]) begin
        failures++;
        $display("sigma %0.1f: post-processing increased the errors", SIGMA[i]);
      end
      $display("sigma %0.1f: %0d bits; detector %0d bit errors (BER %e) in %0d codewords; after post-processing %0d bit errors (BER %e) in %0d codewords",
               SIGMA[i], SEGCW * N, s_vd_bits[i], real'(s_vd_bits[i]) / real'(SEGCW * N), s_vd_cw[i],
               s_pp_bits[i], real'(s_pp_bits[i]) / real'(SEGCW * N), s_pp_cw[i]);
      $display("sigma %0.1f: single-event post-processor %0d bit errors (BER %e) in %0d codewords",
               SIGMA[i], s_sp_bits[i], real'(s_sp_bits[i]) / real'(SEGCW * N), s_sp_cw[i]);
    end
    checks++;
    if (sc != NCW - 1 || n_sp_pair != 0) begin
      failures++;
      $display("single-event post-processor: %0d codewords out, %0d pair corrections", sc + 1, n_sp_pair);
    end
    checks++;
    if (n_pp_cw > n_sp_cw) begin
      failures++;
      $display("double-event post-processor left more wrong codewords than the single-event one");
    end
    checks++;
    if (n_viol == 0 || n_corr == 0) begin
      failures++;
      $display("no parity violation or no correction happened");
    end
    $display("total: detector %0d bit errors in %0d codewords; after post-processing %0d bit errors in %0d codewords; single-event only %0d bit errors in %0d codewords",
             n_vd_bits, n_vd_cw, n_pp_bits, n_pp_cw, n_sp_bits, n_sp_cw);
    $display("parity violations %0d, codewords corrected %0d, no matching candidates %0d",
             n_viol, n_corr, n_fail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
