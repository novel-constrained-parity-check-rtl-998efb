// pp_double_event: multiple-error-event correction post-processor for the
// constrained parity-check code, correcting up to MAX_EV (2 by default, or
// 1) error events per codeword.
//
// The post-processor takes the Viterbi decisions b_k (NRZ 0/1), the
// detector input samples y_k aligned with them, and, once per codeword, the
// 4-bit syndrome from the parity check. When the syndrome is nonzero it
// looks for the most likely error event or pair of error events that
// explains it, and flips those bits.
//
// How it works:
//  1. Residual. r_k = y_k - sum_i h_i s_{k-i}, with s = +1/-1 for b = 1/0:
//     the difference between the input and the sample rebuilt from the
//     decisions.
//  2. Matched filters. For each dominant error type t (+-{2}, +-{2,0,-2},
//     +-{2,0,-2,0,2}, +-{2,0,-2,0,2,0,-2}) and each start position m, the
//     filter correlates r with g_t = h * p_t (target convolved with the
//     event pattern). Because the event polarity is fixed by the decided
//     bit b_m, the reduction of the squared Euclidean distance obtained by
//     undoing the event is 4*lambda with
//        lambda_t(m) = -s_m * sum_k r_{m+k} g_t(k)  -  sum_k g_t(k)^2 .
//     A candidate is admitted only if the decided bits agree with the event
//     polarity, the corrected bits still satisfy d=1 (no run of length one)
//     and the event lies inside the codeword.
//  3. Candidate lists. Per filter the NCAND largest lambda values of the
//     codeword are kept in a sorted list, together with the position and
//     the event's syndrome (XOR of x^(N+3-p) mod g(x) over the flipped
//     positions p).
//  4. Search. At the end of a codeword the lists are frozen and, one pair
//     per clock, every single candidate and every pair of candidates is
//     tested: its syndrome must equal the parity-check result, and the two
//     events of a pair must be separated by more than MEM (the channel
//     memory) error-free bits. The admissible single event or pair with the
//     largest total lambda (smallest Euclidean distance) is selected. With
//     MAX_EV = 1 pairs are never admitted, which gives the single-event
//     post-processor the double-event one is compared against. Since
//     the filtered events of a pair do not overlap, the pair's distance
//     reduction is exactly the sum of the two lambdas.
//  5. Correction. The decided bits pass through a delay line of D samples;
//     on the way out the bits of the selected events are inverted.
//
// Following the design description: matched filtering of the four dominant
// events, sorting of the filter outputs, d=1 screening, single and double
// event sets matched against the syndrome, the separation rule, and the
// minimum-distance choice. This design's own choices: NCAND, the word
// widths, the lambda form of the distance, pair-serial search, doing
// nothing when the syndrome is zero or when no candidate matches it, and
// the fixed-delay streaming interface.
//
// Interface: one bit/sample per cycle with in_valid, in_sof on the first bit
// of each N-bit codeword. syn_valid/syn deliver the codeword's syndrome
// before the last window position of that codeword (SPAN-1 samples after
// its last bit) is reached. Timing: output bit k leaves D samples after
// input bit k (out_valid in the cycle after the accepted input sample), so
// the stream must keep flowing (flush samples at the end). dec_valid pulses
// when a codeword's search is finished. The scheme needs N > D - N, i.e.
// N >= SPAN + NPAIRS + 8.
module pp_double_event
  import pc_pkg::*;
#(
  parameter int unsigned N     = CW_BITS,   // codeword length
  parameter int unsigned Y_W   = 8,         // sample width
  parameter taps_t       TAPS  = DEF_TAPS,  // PR target
  parameter int unsigned NCAND = 4,         // candidates kept per matched filter
  parameter int unsigned MW    = 24,        // metric width
  parameter int unsigned MAX_EV = 2         // events per codeword: 1 or 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // detector stream
  input  logic                   in_valid,
  input  logic                   in_sof,
  input  logic                   in_bit,
  input  logic signed [Y_W-1:0]  in_y,
  // parity-check result
  input  logic                   syn_valid,
  input  logic [PARITY_BITS-1:0] syn,
  // corrected stream
  output logic                   out_valid,
  output logic                   out_sof,
  output logic                   out_bit,
  // per-codeword decision
  output logic                   dec_valid,
  output logic                   dec_syn_err,   // syndrome was nonzero
  output logic [1:0]             dec_nev,       // events corrected: 0, 1 or 2
  output logic                   dec_fail,      // nonzero syndrome, no match
  output logic [1:0]             dec_type [2],
  output logic [$clog2(N)-1:0]   dec_pos  [2]
);

  localparam int unsigned PW     = $clog2(N);
  localparam int unsigned NC     = NTYPES * NCAND;          // candidates in total
  localparam int unsigned NPAIRS = NC * (NC + 1) / 2;       // singles + pairs
  localparam int unsigned D      = N + SPAN + NPAIRS + 8;   // output delay in samples
  localparam int unsigned AW     = $clog2(D + 1);
  localparam int unsigned DM     = 1 << AW;
  localparam int unsigned HB     = SPAN + 2;                // bit history
  localparam int unsigned RW     = Y_W + 8;                 // residual width
  localparam int unsigned CI     = $clog2(NC);
  localparam int unsigned EW     = $clog2(G_PERIOD);
  localparam int unsigned MI     = SPAN - 1;                // history index of m

  typedef struct packed {
    logic                    v;
    logic signed [MW-1:0]    metric;
    logic [PW-1:0]           pos;
    logic [PARITY_BITS-1:0]  syn;
  } cand_t;

  typedef struct packed {
    logic                    syn_err;
    logic                    fail;
    logic [1:0]              nev;
    logic [1:0][1:0]         typ;
    logic [1:0][PW-1:0]      pos;
  } dec_t;

  // matched-filter coefficients and energies
  function automatic int gcoef(input int unsigned t, input int unsigned k);
    return ev_sig(TAPS, t, k);
  endfunction

  // ------------------------------------------------------------------
  // input framing and histories
  // ------------------------------------------------------------------
  logic [PW-1:0]          pos_q;     // position of the next input bit
  logic                   framed_q;
  logic [EW-1:0]          exp_q;     // (N+3-pos) mod 15 for the next bit

  logic                   bh  [HB];  // decided bits, [0] = newest
  logic signed [RW-1:0]   rh  [SPAN];// residuals
  logic                   pvh [SPAN];// position valid
  logic [PW-1:0]          ph  [SPAN];// position in codeword
  logic [EW-1:0]          eh  [SPAN];// syndrome exponent of that position
  logic                   win_new;

  logic [PW-1:0]          cur_pos;
  logic                   cur_pv;
  logic [EW-1:0]          cur_exp;
  logic signed [RW-1:0]   r_new;

  always_comb begin
    int acc;
    if (in_sof) begin
      cur_pos = '0;
      cur_pv  = 1'b1;
      cur_exp = EW'((N + 3) % G_PERIOD);
    end else begin
      cur_pos = pos_q;
      cur_pv  = framed_q;
      cur_exp = exp_q;
    end
    acc = in_bit ? TAPS[0] : -TAPS[0];
    for (int i = 1; i < NTAPS; i++) acc += bh[i-1] ? TAPS[i] : -TAPS[i];
    r_new = RW'(in_y) - RW'(acc);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos_q    <= '0;
      framed_q <= 1'b0;
      exp_q    <= '0;
      win_new  <= 1'b0;
      for (int i = 0; i < HB; i++) bh[i] <= 1'b0;
      for (int i = 0; i < SPAN; i++) begin
        rh[i]  <= '0;
        pvh[i] <= 1'b0;
        ph[i]  <= '0;
        eh[i]  <= '0;
      end
    end else begin
      win_new <= in_valid;
      if (in_valid) begin
        bh[0]  <= in_bit;
        rh[0]  <= r_new;
        pvh[0] <= cur_pv;
        ph[0]  <= cur_pos;
        eh[0]  <= cur_exp;
        for (int i = 1; i < HB; i++) bh[i] <= bh[i-1];
        for (int i = 1; i < SPAN; i++) begin
          rh[i]  <= rh[i-1];
          pvh[i] <= pvh[i-1];
          ph[i]  <= ph[i-1];
          eh[i]  <= eh[i-1];
        end
        if (cur_pv && cur_pos != PW'(N - 1)) begin
          pos_q    <= cur_pos + 1'b1;
          framed_q <= 1'b1;
        end else begin
          pos_q    <= '0;
          framed_q <= 1'b0;
        end
        exp_q <= (cur_exp == '0) ? EW'(G_PERIOD - 1) : cur_exp - 1'b1;
      end
    end
  end

  // ------------------------------------------------------------------
  // matched filters at window position m (history index MI)
  // ------------------------------------------------------------------
  cand_t cand [NTYPES];

  always_comb begin
    for (int t = 0; t < NTYPES; t++) begin
      logic signed [MW-1:0] c;
      logic ok;
      logic [PARITY_BITS-1:0] sv;
      logic cb [HB];
      int unsigned len;
      len = ev_len(t);
      c  = '0;
      for (int k = 0; k < SPAN; k++)
        c += MW'(rh[MI-k]) * MW'(gcoef(t, k));
      ok = pvh[MI] && (int'(ph[MI]) + len <= N);
      sv = '0;
      for (int i = 0; i < HB; i++) cb[i] = bh[i];
      for (int j = 0; j < LMAX; j += 2) begin
        if (j < len) begin
          // decided bit must carry the event's polarity
          if (bh[MI-j] != (bh[MI] ^ (ev_pat(t, j) < 0))) ok = 1'b0;
          cb[MI-j] = ~bh[MI-j];
          sv ^= xpow((int'(eh[MI]) + G_PERIOD - j) % G_PERIOD);
        end
      end
      // corrected bits around the event: no run of length one
      for (int k = -1; k <= int'(LMAX); k++) begin
        if (k <= int'(len)) begin
          if (cb[MI-k] != cb[MI-k+1] && cb[MI-k] != cb[MI-k-1]) ok = 1'b0;
        end
      end
      cand[t].v      = ok;
      cand[t].metric = (bh[MI] ? -c : c) - MW'(ev_energy(TAPS, t));
      cand[t].pos    = ph[MI];
      cand[t].syn    = sv;
    end
  end

  // ------------------------------------------------------------------
  // per-filter sorted candidate lists
  // ------------------------------------------------------------------
  cand_t lst_q [NTYPES][NCAND];
  cand_t lst_d [NTYPES][NCAND];
  logic  cw_end;

  function automatic logic better(input cand_t a, input cand_t b);
    return a.v && (!b.v || a.metric > b.metric);
  endfunction

  always_comb begin
    for (int t = 0; t < NTYPES; t++) begin
      for (int i = 0; i < NCAND; i++) begin
        if (!better(cand[t], lst_q[t][i]))            lst_d[t][i] = lst_q[t][i];
        else if (i == 0 || !better(cand[t], lst_q[t][i-1])) lst_d[t][i] = cand[t];
        else                                          lst_d[t][i] = lst_q[t][i-1];
      end
    end
  end

  assign cw_end = win_new && pvh[MI] && ph[MI] == PW'(N - 1);

  // ------------------------------------------------------------------
  // search over single events and pairs
  // ------------------------------------------------------------------
  cand_t                   bank [NC];
  logic [PARITY_BITS-1:0]  syn_hold, bank_syn;
  logic                    busy;
  logic [CI-1:0]           si, sj;
  logic                    best_v;
  logic signed [MW:0]      best_score;
  logic [CI-1:0]           best_i, best_j;
  dec_t                    pend, act;

  function automatic logic [PW+1:0] ev_end(input cand_t a, input logic [CI-1:0] idx);
    // first error-free position after the event
    return (PW+2)'(a.pos) + (PW+2)'(ev_len(int'(idx) / NCAND));
  endfunction

  logic                    pair_ok;
  logic signed [MW:0]      pair_score;

  always_comb begin
    cand_t a, b;
    a = bank[si];
    b = bank[sj];
    if (si == sj) begin
      pair_ok    = a.v && a.syn == bank_syn;
      pair_score = (MW+1)'(a.metric);
    end else begin
      pair_ok = MAX_EV >= 2 && a.v && b.v && ((a.syn ^ b.syn) == bank_syn);
      if (a.pos <= b.pos) begin
        if ((PW+2)'(b.pos) <= ev_end(a, si) + (PW+2)'(MEM)) pair_ok = 1'b0;
      end else begin
        if ((PW+2)'(a.pos) <= ev_end(b, sj) + (PW+2)'(MEM)) pair_ok = 1'b0;
      end
      pair_score = (MW+1)'(a.metric) + (MW+1)'(b.metric);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < NTYPES; t++)
        for (int i = 0; i < NCAND; i++) lst_q[t][i] <= '0;
      for (int i = 0; i < NC; i++) bank[i] <= '0;
      syn_hold    <= '0;
      bank_syn    <= '0;
      busy        <= 1'b0;
      si          <= '0;
      sj          <= '0;
      best_v      <= 1'b0;
      best_score  <= '0;
      best_i      <= '0;
      best_j      <= '0;
      pend        <= '0;
      dec_valid   <= 1'b0;
    end else begin
      dec_valid <= 1'b0;
      if (syn_valid) syn_hold <= syn;
      if (win_new) begin
        if (cw_end) begin
          for (int t = 0; t < NTYPES; t++)
            for (int i = 0; i < NCAND; i++) begin
              bank[t*NCAND+i] <= lst_d[t][i];
              lst_q[t][i]     <= '0;
            end
          bank_syn   <= syn_hold;
          si         <= '0;
          sj         <= '0;
          best_v     <= 1'b0;
          best_score <= '0;
          if (syn_hold != '0) begin
            busy <= 1'b1;
          end else begin
            pend      <= '0;
            dec_valid <= 1'b1;
          end
        end else begin
          lst_q <= lst_d;
        end
      end
      if (busy) begin
        if (pair_ok && (!best_v || pair_score > best_score)) begin
          best_v     <= 1'b1;
          best_score <= pair_score;
          best_i     <= si;
          best_j     <= sj;
        end
        if (sj == CI'(NC - 1)) begin
          if (si == CI'(NC - 1)) begin
            busy <= 1'b0;
          end else begin
            si <= si + 1'b1;
            sj <= si + 1'b1;
          end
        end else begin
          sj <= sj + 1'b1;
        end
      end
      // search finished: publish the decision
      if (busy && si == CI'(NC - 1) && sj == CI'(NC - 1)) begin
        logic            fv;
        logic [CI-1:0]   fi, fj;
        fv = best_v;
        fi = best_i;
        fj = best_j;
        if (pair_ok && (!best_v || pair_score > best_score)) begin
          fv = 1'b1;
          fi = si;
          fj = sj;
        end
        pend.syn_err <= 1'b1;
        pend.fail    <= !fv;
        pend.nev     <= !fv ? 2'd0 : (fi == fj) ? 2'd1 : 2'd2;
        pend.typ[0]  <= 2'(int'(fi) / NCAND);
        pend.pos[0]  <= bank[fi].pos;
        pend.typ[1]  <= 2'(int'(fj) / NCAND);
        pend.pos[1]  <= bank[fj].pos;
        dec_valid    <= 1'b1;
      end
    end
  end

  // the decision of a codeword is not overwritten before it is used
  property p_no_overrun;
    @(posedge clk) disable iff (!rst_n) cw_end |-> !busy;
  endproperty
  a_no_overrun: assert property (p_no_overrun);

  assign dec_syn_err = pend.syn_err;
  assign dec_nev     = pend.nev;
  assign dec_fail    = pend.fail;
  assign dec_type[0] = pend.typ[0];
  assign dec_type[1] = pend.typ[1];
  assign dec_pos[0]  = pend.pos[0];
  assign dec_pos[1]  = pend.pos[1];

  // ------------------------------------------------------------------
  // delay line and correction
  // ------------------------------------------------------------------
  logic [1:0]    dmem [DM];   // {sof, bit}
  logic [AW-1:0] wptr;
  logic [AW-1:0] fill;
  logic          filled;
  logic [1:0]    rd;
  logic [PW-1:0] opos_q, opos;
  dec_t          cur_dec;

  assign filled  = (fill == AW'(D));
  assign rd      = dmem[wptr - AW'(D)];
  assign opos    = rd[1] ? '0 : opos_q;
  assign cur_dec = rd[1] ? pend : act;

  function automatic logic flip_at(input dec_t d, input logic [PW-1:0] p);
    logic f;
    f = 1'b0;
    for (int e = 0; e < 2; e++) begin
      if (e < int'(d.nev) && p >= d.pos[e]) begin
        logic [PW-1:0] off;
        off = p - d.pos[e];
        if (int'(off) < int'(ev_len(int'(d.typ[e]))) && !off[0]) f = 1'b1;
      end
    end
    return f;
  endfunction

  always_ff @(posedge clk) begin
    if (in_valid) dmem[wptr] <= {in_sof, in_bit};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr      <= '0;
      fill      <= '0;
      opos_q    <= '0;
      act       <= '0;
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      out_bit   <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      if (in_valid) begin
        wptr <= wptr + 1'b1;
        if (!filled) fill <= fill + 1'b1;
        if (filled) begin
          out_valid <= 1'b1;
          out_sof   <= rd[1];
          out_bit   <= rd[0] ^ flip_at(cur_dec, opos);
          opos_q    <= opos + 1'b1;
          if (rd[1]) act <= pend;
        end
      end
    end
  end

endmodule
