// tb_pr_viterbi: self-checking test of the d=1 PR Viterbi detector.
//
// A random NRZ stream with runs of two to six bits goes through the
// reference PR channel (default 7-tap target) with small uniform noise; the
// detector must return every bit after exactly DEPTH-1 samples, with the
// side-channel tag (the sample index) delayed by the same amount. A second
// part gives the input a deliberate displacement towards a single
// dominant error event (60 % of the way) and checks that the detector then
// decides for the erroneous sequence, as a maximum-likelihood detector must.
module tb_pr_viterbi;
  import tb_pc_ref_pkg::*;

  localparam int DEPTH = 48;
  localparam int NB    = 4000;
  localparam taps_t H  = '{4, 8, 12, 16, 12, 8, 4};

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [7:0] in_y = '0;
  logic [8:0] in_tag = '0;
  logic out_valid, out_bit;
  logic [8:0] out_tag;
  int checks = 0, failures = 0;

  pr_viterbi dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3 * NB) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit tru[], ref_bits[];
  int nsent = 0, nout = 0, bit_err = 0, tag_err = 0, ev_seen = 0, ev_made = 0;
  int ev_pos [$];

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int k;
      k = nout - (DEPTH - 1);
      if (k >= 0 && k < NB) begin
        checks += 2;
        if (out_bit !== ref_bits[k]) begin
          bit_err++;
          failures++;
        end
        if (out_tag !== 9'(k)) begin
          tag_err++;
          failures++;
        end
      end
      nout++;
    end
  end

  initial begin
    bit q[$];
    q.push_back(1'b0); q.push_back(1'b0);
    while (q.size() < NB) gen_codeword(q, 50);
    tru = new[NB];
    for (int i = 0; i < NB; i++) tru[i] = q[i];
    ref_bits = new[NB](tru);
    // second half: events with the input pushed 60 % towards them
    for (int m = NB / 2; m < NB - 40; m += 37 + $urandom_range(0, 20)) begin
      int t;
      t = $urandom_range(0, 3);
      for (int mm = m; mm < m + 20; mm++)
        if (event_ok(tru, t, mm)) begin
          apply_event(ref_bits, t, mm);
          ev_made++;
          break;
        end
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NB + DEPTH; k++) begin
      int y;
      if (k < NB) begin
        int yt, ye;
        yt = ref_channel(H, tru, k);
        ye = ref_channel(H, ref_bits, k);
        if (k < NB / 2) y = yt + int'($urandom_range(0, 6)) - 3;
        else            y = yt + (6 * (ye - yt) + (ye > yt ? 5 : -5)) / 10 + int'($urandom_range(0, 2)) - 1;
      end else y = -64;
      in_valid <= 1'b1;
      in_y     <= 8'(y);
      in_tag   <= 9'(k);
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (3) @(posedge clk);
    if (bit_err != 0) $display("%0d wrong decisions", bit_err);
    if (tag_err != 0) $display("%0d misaligned tags", tag_err);
    checks++;
    if (nout != NB + DEPTH) begin
      failures++;
      $display("%0d outputs, expected %0d", nout, NB + DEPTH);
    end
    checks++;
    if (ev_made < 10) begin
      failures++;
      $display("too few events injected: %0d", ev_made);
    end
    $display("events injected %0d, outputs %0d", ev_made, nout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
