// pr_viterbi: Viterbi bit detector for a 7-tap partial-response (PR)
// target with the d=1 run-length constraint.
//
// Recorded bits are NRZ, b in {0,1}, mapped to bipolar symbols +1/-1. The
// noiseless equalized read-back sample is y_k = sum_i h_i * s_{k-i},
// i = 0..6. The trellis state holds the last six bits (64 states); bit 0 of
// a state is the most recent one. In NRZ form the d=1 constraint means that
// every run of equal bits is at least two long, so states with an isolated
// bit inside them are unreachable and transitions into such states are
// removed. Each sample, every state adds the squared error (y - expected)^2
// to the metric of each of its two predecessors and keeps the smaller sum
// (add-compare-select). Path metrics wrap around; they are compared through
// the sign of their difference, which is exact as long as the spread of the
// metrics stays below 2^(PMW-1).
//
// Survivors are kept by register exchange, DEPTH bits per state. The output
// is the oldest survivor bit of the state with the smallest metric, so the
// decision on sample k is given when sample k+DEPTH-1 has been accepted.
// A side channel (in_tag, TAG_W bits) is delayed by the same number of
// samples so that the caller receives the detector input sample and framing
// aligned with each decision.
//
// That the detector is matched to a 7-tap PR target and works on d=1 data
// follows the design description. The tap values, the metric width, the
// survivor depth and the wrap-around metric arithmetic are this design's
// own choices.
//
// Interface: one sample per cycle when in_valid is high. Timing: out_valid
// is high in the cycle after each accepted sample; out_bit / out_tag then
// belong to the sample accepted DEPTH-1 samples earlier.
module pr_viterbi
  import pc_pkg::*;
#(
  parameter int unsigned Y_W   = 8,          // sample width, two's complement
  parameter taps_t       TAPS  = DEF_TAPS,   // PR target h_0 .. h_6
  parameter int unsigned DEPTH = 48,         // survivor length (decision delay + 1)
  parameter int unsigned PMW   = 24,         // path metric width
  parameter int unsigned TAG_W = 9           // side-channel width
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [Y_W-1:0]   in_y,
  input  logic [TAG_W-1:0]        in_tag,
  output logic                    out_valid,
  output logic                    out_bit,
  output logic [TAG_W-1:0]        out_tag
);

  localparam int unsigned NS = 1 << MEM;  // 64 states
  localparam int unsigned DW = Y_W + 8;   // width of a sample difference

  typedef logic [MEM-1:0] state_t;

  // a state is valid when no bit in positions 1..MEM-2 is isolated
  function automatic logic state_ok(input state_t s);
    logic ok;
    ok = 1'b1;
    for (int j = 1; j <= MEM - 2; j++)
      if (s[j] != s[j-1] && s[j] != s[j+1]) ok = 1'b0;
    return ok;
  endfunction

  // expected sample when bit u follows state p
  function automatic int expected(input state_t p, input logic u);
    int e;
    e = u ? TAPS[0] : -TAPS[0];
    for (int i = 1; i < NTAPS; i++) e += p[i-1] ? TAPS[i] : -TAPS[i];
    return e;
  endfunction

  logic [PMW-1:0]   pm_q   [NS];
  logic [PMW-1:0]   pm_d   [NS];
  logic [DEPTH-1:0] surv_q [NS];
  logic [DEPTH-1:0] surv_d [NS];
  logic [TAG_W-1:0] tag_q  [DEPTH];
  logic [$clog2(NS)-1:0] best;

  // add-compare-select
  always_comb begin
    for (int s = 0; s < NS; s++) begin
      state_t sv, p0, p1;
      logic signed [DW-1:0] d0, d1;
      logic [PMW-1:0] m0, m1;
      logic take1;
      sv = state_t'(s);
      p0 = {1'b0, sv[MEM-1:1]};
      p1 = {1'b1, sv[MEM-1:1]};
      d0 = DW'(in_y) - DW'(expected(p0, sv[0]));
      d1 = DW'(in_y) - DW'(expected(p1, sv[0]));
      m0 = pm_q[p0] + PMW'(d0) * PMW'(d0);
      m1 = pm_q[p1] + PMW'(d1) * PMW'(d1);
      if (!state_ok(p0))      take1 = 1'b1;
      else if (!state_ok(p1)) take1 = 1'b0;
      else                    take1 = $signed(m1 - m0) < 0;
      pm_d[s]   = take1 ? m1 : m0;
      surv_d[s] = {(take1 ? surv_q[p1][DEPTH-2:0] : surv_q[p0][DEPTH-2:0]), sv[0]};
    end
  end

  // state with the smallest metric among the reachable ones
  always_comb begin
    best = '0;
    for (int s = 1; s < NS; s++)
      if (state_ok(state_t'(s)) && $signed(pm_q[s] - pm_q[best]) < 0) best = ($clog2(NS))'(s);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NS; s++) begin
        pm_q[s]   <= '0;
        surv_q[s] <= '0;
      end
      for (int i = 0; i < DEPTH; i++) tag_q[i] <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int s = 0; s < NS; s++) begin
          pm_q[s]   <= pm_d[s];
          surv_q[s] <= surv_d[s];
        end
        tag_q[0] <= in_tag;
        for (int i = 1; i < DEPTH; i++) tag_q[i] <= tag_q[i-1];
      end
    end
  end

  assign out_bit = surv_q[best][DEPTH-1];
  assign out_tag = tag_q[DEPTH-1];

endmodule
