// tb_pc_encoder_parity: self-checking test of the encoder parity-check unit.
//
// Feeds segments of K*13 = 390 NC bits (random bits, valid with random gaps)
// and compares the parity with the reference for the bits followed by 16
// zeros. It then checks the property the PRC encoder relies on: a 16-bit
// word u2 chosen (by search in the testbench) to have the same parity on
// its own completes the 406-bit sequence [u1 | u2] to zero parity. The
// parity must appear one clock after the last NC bit.
module tb_pc_encoder_parity;
  import tb_pc_ref_pkg::*;

  localparam int I1 = 390, I2 = 16, NSEG = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_sof = 1'b0, in_bit = 1'b0;
  logic par_valid;
  logic [3:0] par;
  int checks = 0, failures = 0;
  int cycle = 0, last_bit_cycle = -10;
  logic [3:0] exp_q [$];
  int got = 0;

  pc_encoder_parity dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && par_valid) begin
      logic [3:0] e;
      got++;
      e = exp_q.pop_front();
      checks++;
      if (par !== e) begin
        failures++;
        $display("parity mismatch: got %h exp %h", par, e);
      end
      checks++;
      if (cycle != last_bit_cycle + 1) begin
        failures++;
        $display("parity latency wrong");
      end
    end
  end

  initial begin
    bit seg[];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < NSEG; s++) begin
      logic [3:0] p1;
      seg = new[I1 + I2];
      for (int i = 0; i < I1; i++) seg[i] = 1'($urandom_range(0, 1));
      for (int i = I1; i < I1 + I2; i++) seg[i] = 1'b0;
      p1 = ref_parity(seg, 0, I1 + I2, 0);
      exp_q.push_back(p1);
      // a PRC word with the same parity closes the codeword
      begin
        bit found;
        found = 0;
        for (int w = 0; w < (1 << I2) && !found; w++) begin
          for (int i = 0; i < I2; i++) seg[I1+i] = 1'((w >> (I2 - 1 - i)) & 1);
          if (ref_parity(seg, I1, I2, 0) == p1) found = 1;
        end
        checks++;
        if (!found || ref_parity(seg, 0, I1 + I2, 0) != 0) begin
          failures++;
          $display("combined codeword does not have zero parity");
        end
      end
      for (int i = 0; i < I1; i++) begin
        while ($urandom_range(0, 4) == 0) begin
          in_valid <= 1'b0;
          @(posedge clk);
        end
        in_valid <= 1'b1;
        in_sof   <= (i == 0);
        in_bit   <= seg[i];
        @(posedge clk);
        if (i == I1 - 1) last_bit_cycle = cycle;
      end
      in_valid <= 1'b0;
      in_sof   <= 1'b0;
      repeat ($urandom_range(1, 4)) @(posedge clk);
    end
    repeat (5) @(posedge clk);
    checks++;
    if (got != NSEG) begin
      failures++;
      $display("expected %0d parity words, got %0d", NSEG, got);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
