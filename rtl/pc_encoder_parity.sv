// pc_encoder_parity: the encoder's parity-check unit.
//
// During encoding the K normal-constrained (NC) codewords are produced
// first; this unit computes the parity bits of their concatenation u1
// appended with i2 zeros, where i2 is the length of the parity-related
// (PRC) codeword that follows. The PRC encoder then picks a PRC codeword
// u2 whose parity bits, with i1 leading zeros, are the same, so that
// [u1 | u2] has all-zero parity (a codeword of the code generated by
// g(x) = 1 + x + x^4). The leading zeros do not change a remainder, so the
// PRC side's parity is simply that of u2 on its own.
//
// The NC bits are divided by g(x) as they arrive (first bit first); the i2
// trailing zeros are applied at the end in one step as a multiplication by
// x^i2 modulo g(x). The function is the one the design description gives;
// the streaming interface is this design's own.
//
// Interface: NC bits one per cycle with in_valid, in_sof marking the first
// bit of the first NC codeword. Timing: par_valid pulses one clock after the
// i1-th bit (i1 = K * 13 by default), with the 4 parity bits in par.
module pc_encoder_parity
  import pc_pkg::*;
#(
  parameter int unsigned I1 = NC_WORDS * NC_BITS,  // NC bits per segment
  parameter int unsigned I2 = PRC_BITS             // PRC codeword length
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic                   in_sof,
  input  logic                   in_bit,
  output logic                   par_valid,
  output logic [PARITY_BITS-1:0] par
);

  localparam int unsigned PW = $clog2(I1 + 1);

  logic [PARITY_BITS-1:0] rem_q, rem_d;
  logic [PW-1:0]          pos_q;
  logic                   framed_q;

  always_comb rem_d = crc_step(in_sof ? '0 : rem_q, in_bit);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem_q     <= '0;
      pos_q     <= '0;
      framed_q  <= 1'b0;
      par_valid <= 1'b0;
      par       <= '0;
    end else begin
      par_valid <= 1'b0;
      if (in_valid) begin
        rem_q <= rem_d;
        if (in_sof) begin
          pos_q    <= PW'(1);
          framed_q <= 1'b1;
        end else if (framed_q) begin
          pos_q <= pos_q + 1'b1;
        end
        if ((in_sof && I1 == 1) || (!in_sof && framed_q && pos_q == PW'(I1 - 1))) begin
          par_valid <= 1'b1;
          par       <= mul_xpow(rem_d, I2);
          framed_q  <= 1'b0;
        end
      end
    end
  end

endmodule
