// pc_syndrome_check: receiver-side parity check of the constrained
// parity-check code.
//
// The detected NRZ bits of each N-bit codeword are shifted, first bit
// first, through a 4-bit division register for g(x) = 1 + x + x^4. After the
// last bit of the codeword the register holds the remainder of r(x)*x^4
// modulo g(x), which equals the syndrome of the received codeword; a nonzero
// value means the parity-check constraint is violated. The polynomial, the
// codeword length and the use of the syndrome follow the design
// description; the streaming interface and the framing by a start-of-
// codeword flag are this design's own.
//
// Interface: one bit per cycle when in_valid is high; in_sof marks the
// first bit of a codeword. Timing: syn_valid pulses for one cycle, one clock
// after the last (N-th) bit was accepted, with syn and syn_err (= syn != 0).
module pc_syndrome_check
  import pc_pkg::*;
#(
  parameter int unsigned N = CW_BITS
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic                   in_sof,
  input  logic                   in_bit,
  output logic                   syn_valid,
  output logic [PARITY_BITS-1:0] syn,
  output logic                   syn_err
);

  localparam int unsigned PW = $clog2(N + 1);

  logic [PARITY_BITS-1:0] rem_q, rem_d;
  logic [PW-1:0]          pos_q;
  logic                   framed_q;

  always_comb rem_d = crc_step(in_sof ? '0 : rem_q, in_bit);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem_q     <= '0;
      pos_q     <= '0;
      framed_q  <= 1'b0;
      syn_valid <= 1'b0;
      syn       <= '0;
      syn_err   <= 1'b0;
    end else begin
      syn_valid <= 1'b0;
      if (in_valid) begin
        rem_q <= rem_d;
        if (in_sof) begin
          pos_q    <= PW'(1);
          framed_q <= 1'b1;
        end else if (framed_q) begin
          pos_q <= pos_q + 1'b1;
        end
        // last bit of the codeword
        if ((in_sof && N == 1) || (!in_sof && framed_q && pos_q == PW'(N - 1))) begin
          syn_valid <= 1'b1;
          syn       <= rem_d;
          syn_err   <= |rem_d;
          framed_q  <= 1'b0;
        end
      end
    end
  end

endmodule
