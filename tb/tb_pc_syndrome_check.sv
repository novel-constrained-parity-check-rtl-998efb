// tb_pc_syndrome_check: self-checking test of the receiver parity check.
//
// Sends full-length (N = 406) codewords: random ones, zero-parity d=1 ones
// from the reference generator, and zero-parity ones with a single bit or a
// dominant error event added. Valid has random gaps. Each syndrome is
// compared with the reference computed position by position, and syn_valid
// must come exactly one clock after the last bit of its codeword.
module tb_pc_syndrome_check;
  import tb_pc_ref_pkg::*;

  localparam int N = 406;
  localparam int NCW = 24;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_sof = 1'b0, in_bit = 1'b0;
  logic syn_valid, syn_err;
  logic [3:0] syn;
  int checks = 0, failures = 0;
  int n_zero = 0, n_err = 0;

  pc_syndrome_check dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] exp_q [$];
  int last_bit_cycle = -1, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // checker
  always @(posedge clk) begin
    if (rst_n && syn_valid) begin
      logic [3:0] e;
      checks++;
      e = exp_q.pop_front();
      if (syn !== e || syn_err !== (e != 0)) begin
        failures++;
        $display("syndrome mismatch: got %h exp %h", syn, e);
      end
      checks++;
      if (cycle != last_bit_cycle + 1) begin
        failures++;
        $display("syndrome latency wrong: %0d vs %0d", cycle, last_bit_cycle);
      end
    end
  end

  initial begin
    bit q[$];
    bit cw[];
    q.push_back(1'b0); q.push_back(1'b0);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NCW; c++) begin
      int base;
      base = q.size();
      if (c % 3 == 0) begin
        for (int i = 0; i < N; i++) q.push_back(1'($urandom_range(0, 1)));
      end else begin
        gen_codeword(q, N);
      end
      cw = new[q.size()];
      foreach (q[i]) cw[i] = q[i];
      if (c % 3 == 2) begin
        int t, m;
        t = $urandom_range(0, 3);
        m = base + $urandom_range(0, N - 8);
        apply_event(cw, t, m);
        if (c % 6 == 5) cw[base + $urandom_range(0, N - 1)] ^= 1'b1;
      end
      exp_q.push_back(ref_parity(cw, base, N, 0));
      if (ref_parity(cw, base, N, 0) == 0) n_zero++; else n_err++;
      for (int i = 0; i < N; i++) begin
        while ($urandom_range(0, 3) == 0) begin
          in_valid <= 1'b0;
          @(posedge clk);
        end
        in_valid <= 1'b1;
        in_sof   <= (i == 0);
        in_bit   <= cw[base + i];
        @(posedge clk);
        if (i == N - 1) last_bit_cycle = cycle;
      end
      in_valid <= 1'b0;
      in_sof   <= 1'b0;
      @(posedge clk);
    end
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || n_zero == 0 || n_err == 0) begin
      failures++;
      $display("missing syndromes (%0d) or case not covered (zero %0d, err %0d)",
               exp_q.size(), n_zero, n_err);
    end
    $display("codewords with zero syndrome %0d, with nonzero syndrome %0d", n_zero, n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
