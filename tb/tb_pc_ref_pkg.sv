// tb_pc_ref_pkg: reference models shared by the testbenches.
//
// - ref_xpow / ref_parity: parity bits of a bit sequence for
//   g(x) = 1 + x + x^4, computed position by position as the XOR of
//   x^(len-1-p+4) mod g(x) over the set bits p (a different method from the
//   shift-register division in the RTL).
// - d=1 sequence generation: NRZ bit streams whose runs are at least two
//   long, and codewords of that kind with all-zero parity, standing in for
//   the output of the constrained parity-check encoder.
// - ref_channel: noiseless PR channel, y_k = sum_i h_i s_{k-i}.
// - error-event helpers for the dominant events +-{2}, +-{2,0,-2}, ...
package tb_pc_ref_pkg;

  typedef int taps_t [7];

  function automatic logic [3:0] ref_xpow(input int e);
    int v;
    v = 1;
    for (int i = 0; i < e; i++) begin
      v = v << 1;
      if ((v & 16) != 0) v = v ^ 19;  // x^4 = x + 1
    end
    return 4'(v);
  endfunction

  // parity of bits[first .. first+len-1], followed by 'tail' zeros
  function automatic logic [3:0] ref_parity(input bit bits[], input int first, input int len,
                                            input int tail);
    logic [3:0] s;
    s = '0;
    for (int p = 0; p < len; p++)
      if (bits[first+p]) s ^= ref_xpow((len - 1 - p + tail + 4) % 15);
    return s;
  endfunction

  // true when bits[lo..hi] contain no run of length one (checked inside)
  function automatic bit d1_ok(input bit bits[], input int lo, input int hi);
    for (int k = lo + 1; k < hi; k++)
      if (bits[k] != bits[k-1] && bits[k] != bits[k+1]) return 0;
    return 1;
  endfunction

  // Append one N-bit codeword with zero parity and d=1 runs to 'bits'
  // (which already holds at least two bits ending in a run of >= 2).
  function automatic void gen_codeword(ref bit bits[$], input int n);
    bit w[];
    int runlen, target;
    bit cur;
    w = new[n + 1];
    forever begin
      cur = bits[$];
      w[0] = cur;
      runlen = 2;
      target = 2 + $urandom_range(0, 4);
      for (int i = 1; i <= n - 2; i++) begin
        if (runlen >= target) begin
          cur = !cur;
          runlen = 0;
          target = 2 + $urandom_range(0, 4);
        end
        w[i] = cur;
        runlen++;
      end
      // last two bits continue the current run or form a run of two
      if (runlen >= 2 && $urandom_range(0, 1) == 1) cur = !cur;
      w[n-1] = cur;
      w[n]   = cur;
      if (d1_ok(w, 0, n) && ref_parity(w, 1, n, 0) == 4'd0) begin
        for (int i = 1; i <= n; i++) bits.push_back(w[i]);
        return;
      end
    end
  endfunction

  function automatic int ref_channel(input taps_t h, input bit bits[], input int k);
    int y;
    y = 0;
    for (int i = 0; i < 7; i++)
      y += (k - i < 0) ? -h[i] : (bits[k-i] ? h[i] : -h[i]);
    return y;
  endfunction

  // Flip error event of type t (length 2t+1) at stream index m in 'bits'.
  function automatic void apply_event(ref bit bits[], input int t, input int m);
    for (int j = 0; j < 2 * t + 1; j += 2) bits[m+j] = !bits[m+j];
  endfunction

  // An event of type t at m is one a detector can make on 'tru': the true
  // bits it touches alternate, and both the true and the erroneous
  // sequences keep runs of at least two around it.
  function automatic bit event_ok(input bit tru[], input int t, input int m);
    bit e[];
    if (m < 3 || m + 2 * t + 4 >= tru.size()) return 0;
    for (int j = 2; j < 2 * t + 1; j += 2)
      if (tru[m+j] == tru[m+j-2]) return 0;
    e = new[tru.size()](tru);
    apply_event(e, t, m);
    return d1_ok(e, m - 2, m + 2 * t + 2);
  endfunction

endpackage
