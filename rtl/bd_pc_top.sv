// bd_pc_top: read channel back end and encoder parity unit for a d=1
// constrained parity-check (PC) code on a blue-laser disc.
//
// Receive side (left to right):
//   equalized samples -> pr_viterbi (7-tap PR target, d=1 trellis)
//                     -> pc_syndrome_check (g(x) = 1 + x + x^4 over each
//                        N-bit codeword)
//                     -> pp_double_event (matched-filter post-processor
//                        correcting up to two error events per codeword,
//                        using the decisions, the aligned detector input
//                        samples and the syndrome)
//                     -> corrected NRZ codeword bits (to the constrained
//                        decoder, which is not part of this RTL).
// The Viterbi detector carries each sample and its start-of-codeword flag
// through a delay line of its own decision delay, so the parity check and
// the post-processor see decisions and samples aligned.
//
// Transmit side: pc_encoder_parity computes the parity bits of the K
// normal-constrained codewords (with the PRC codeword's length of trailing
// zeros) for the parity-related constrained encoder. The NC and PRC encoders
// themselves are not part of this RTL, so the unit's input and output are
// ports of the top.
//
// The block structure follows the design description's block diagrams;
// the framing by start-of-codeword flags and all widths are this design's
// own. Timing: an input sample leaves as a corrected bit
// (DEPTH - 1) + 1 + D_PP samples later, where D_PP = N + 13 + 136 + 8 for
// the default sizes; the stream must keep flowing to push the last codeword
// out.
module bd_pc_top
  import pc_pkg::*;
#(
  parameter int unsigned N     = CW_BITS,
  parameter int unsigned Y_W   = 8,
  parameter taps_t       TAPS  = DEF_TAPS,
  parameter int unsigned DEPTH = 48,
  parameter int unsigned NCAND = 4,
  parameter int unsigned MAX_EV = 2,
  parameter int unsigned I1    = NC_WORDS * NC_BITS,
  parameter int unsigned I2    = PRC_BITS
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // equalized read-back samples
  input  logic                   rx_valid,
  input  logic                   rx_sof,
  input  logic signed [Y_W-1:0]  rx_y,
  // corrected codeword bits, to the constrained decoder
  output logic                   dec_in_valid,
  output logic                   dec_in_sof,
  output logic                   dec_in_bit,
  // per-codeword status
  output logic                   pc_syn_valid,
  output logic [PARITY_BITS-1:0] pc_syn,
  output logic                   pc_syn_err,
  output logic                   pp_dec_valid,
  output logic [1:0]             pp_dec_nev,
  output logic                   pp_dec_fail,
  // encoder side: NC codeword bits in, parity bits out to the PRC encoder
  input  logic                   nc_valid,
  input  logic                   nc_sof,
  input  logic                   nc_bit,
  output logic                   prc_par_valid,
  output logic [PARITY_BITS-1:0] prc_par
);

  localparam int unsigned TAG_W = Y_W + 1;

  logic                  vd_valid, vd_bit;
  logic [TAG_W-1:0]      vd_tag;
  logic                  vd_sof;
  logic signed [Y_W-1:0] vd_y;
  logic                  pp_syn_err;
  logic [1:0]            pp_type [2];
  logic [$clog2(N)-1:0]  pp_pos  [2];

  pr_viterbi #(
    .Y_W(Y_W), .TAPS(TAPS), .DEPTH(DEPTH), .TAG_W(TAG_W)
  ) u_viterbi (
    .clk, .rst_n,
    .in_valid (rx_valid),
    .in_y     (rx_y),
    .in_tag   ({rx_sof, rx_y}),
    .out_valid(vd_valid),
    .out_bit  (vd_bit),
    .out_tag  (vd_tag)
  );

  assign vd_sof = vd_tag[TAG_W-1];
  assign vd_y   = vd_tag[Y_W-1:0];

  pc_syndrome_check #(.N(N)) u_parity (
    .clk, .rst_n,
    .in_valid (vd_valid),
    .in_sof   (vd_sof),
    .in_bit   (vd_bit),
    .syn_valid(pc_syn_valid),
    .syn      (pc_syn),
    .syn_err  (pc_syn_err)
  );

  pp_double_event #(
    .N(N), .Y_W(Y_W), .TAPS(TAPS), .NCAND(NCAND), .MAX_EV(MAX_EV)
  ) u_post (
    .clk, .rst_n,
    .in_valid   (vd_valid),
    .in_sof     (vd_sof),
    .in_bit     (vd_bit),
    .in_y       (vd_y),
    .syn_valid  (pc_syn_valid),
    .syn        (pc_syn),
    .out_valid  (dec_in_valid),
    .out_sof    (dec_in_sof),
    .out_bit    (dec_in_bit),
    .dec_valid  (pp_dec_valid),
    .dec_syn_err(pp_syn_err),
    .dec_nev    (pp_dec_nev),
    .dec_fail   (pp_dec_fail),
    .dec_type   (pp_type),
    .dec_pos    (pp_pos)
  );

  pc_encoder_parity #(.I1(I1), .I2(I2)) u_enc_parity (
    .clk, .rst_n,
    .in_valid (nc_valid),
    .in_sof   (nc_sof),
    .in_bit   (nc_bit),
    .par_valid(prc_par_valid),
    .par      (prc_par)
  );

endmodule
