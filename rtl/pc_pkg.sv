// pc_pkg: constants and helper functions shared by the constrained
// parity-check (PC) receiver and encoder blocks.
//
// The parity-check code is defined by the generator polynomial
// g(x) = 1 + x + x^4 (4 parity bits, taken from the design description).
// Codeword bits are processed first-bit-first; the first bit of an N-bit
// codeword carries the highest power of x. The "parity bits" of a bit
// sequence u are the remainder of u(x)*x^4 divided by g(x), i.e. the check
// bits a systematic encoder of the code would append. A valid codeword
// (NC codewords followed by the PRC codeword) has all-zero parity bits.
//
// Default sizes follow the document: N = 406 channel bits per codeword,
// K = 30 normal-constrained (NC) codewords of 13 bits and one 16-bit
// parity-related (PRC) codeword. The 7-tap PR target coefficients are not
// given in the document; DEF_TAPS is this design's own symmetric choice.
package pc_pkg;

  localparam int unsigned PARITY_BITS = 4;
  // g(x) without its x^4 term: 1 + x  ->  bit0 = 1, bit1 = 1
  localparam logic [PARITY_BITS-1:0] G_LOW = 4'b0011;
  // g(x) is primitive, so x has multiplicative order 15 modulo g(x)
  localparam int unsigned G_PERIOD = 15;

  localparam int unsigned CW_BITS   = 406;  // N
  localparam int unsigned NC_BITS   = 13;   // NC codeword length (rate 9/13)
  localparam int unsigned PRC_BITS  = 16;   // PRC codeword length (rate 7/16)
  localparam int unsigned NC_WORDS  = 30;   // K = (406 - 16) / 13

  // PR target: 7 taps
  localparam int unsigned NTAPS = 7;
  localparam int unsigned MEM   = NTAPS - 1;  // channel memory in bits
  typedef int taps_t [NTAPS];
  localparam taps_t DEF_TAPS = '{4, 8, 12, 16, 12, 8, 4};

  // Dominant error events in bipolar NRZ terms: +-{2}, +-{2,0,-2},
  // +-{2,0,-2,0,2}, +-{2,0,-2,0,2,0,-2}. Type t has length 2t+1 and
  // nonzero entries at the even offsets with alternating sign.
  localparam int unsigned NTYPES = 4;
  localparam int unsigned LMAX   = 2 * NTYPES - 1;  // 7
  localparam int unsigned SPAN   = LMAX + MEM;      // 13: longest filtered event

  function automatic int unsigned ev_len(input int unsigned t);
    return 2 * t + 1;
  endfunction

  // sign (+1, 0, -1) of error-event type t at offset j
  function automatic int ev_pat(input int unsigned t, input int unsigned j);
    if (j >= ev_len(t) || (j % 2) != 0) return 0;
    return ((j / 2) % 2 == 0) ? 1 : -1;
  endfunction

  // One step of the parity LFSR: shift in bit b.
  function automatic logic [PARITY_BITS-1:0] crc_step(input logic [PARITY_BITS-1:0] r,
                                                       input logic b);
    logic fb;
    fb = b ^ r[PARITY_BITS-1];
    return {r[PARITY_BITS-2:0], 1'b0} ^ (fb ? G_LOW : '0);
  endfunction

  // x^e mod g(x) as a 4-bit vector (bit i = coefficient of x^i)
  function automatic logic [PARITY_BITS-1:0] xpow(input int unsigned e);
    logic [PARITY_BITS-1:0] v;
    v = 4'b0001;
    for (int unsigned i = 0; i < G_PERIOD; i++)
      if (i < (e % G_PERIOD)) v = {v[PARITY_BITS-2:0], 1'b0} ^ (v[PARITY_BITS-1] ? G_LOW : '0);
    return v;
  endfunction

  // multiply a remainder by x^t modulo g(x): t zero bits shifted in
  function automatic logic [PARITY_BITS-1:0] mul_xpow(input logic [PARITY_BITS-1:0] r,
                                                       input int unsigned t);
    logic [PARITY_BITS-1:0] v;
    v = r;
    for (int unsigned i = 0; i < G_PERIOD; i++)
      if (i < (t % G_PERIOD)) v = crc_step(v, 1'b0);
    return v;
  endfunction

  // convolution of the target with the error pattern of type t, entry k
  function automatic int ev_sig(input taps_t h, input int unsigned t, input int unsigned k);
    int s;
    s = 0;
    for (int unsigned i = 0; i < NTAPS; i++)
      if (k >= i) s += h[i] * ev_pat(t, k - i);
    return s;
  endfunction

  // energy sum_k ev_sig(t,k)^2
  function automatic int ev_energy(input taps_t h, input int unsigned t);
    int e;
    e = 0;
    for (int unsigned k = 0; k < SPAN; k++) e += ev_sig(h, t, k) * ev_sig(h, t, k);
    return e;
  endfunction

endpackage
