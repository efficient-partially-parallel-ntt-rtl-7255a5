// ntt_pkg: shared constants and elaboration-time helper functions for the
// partially-parallel NTT processor.
//
// The default configuration is the 8-parallel, 512-point transform over
// Z_q with q = 12289 and the 512th root of unity W = 3.  The functions below
// are only evaluated while parameters are elaborated (twiddle tables, lane
// permutations); none of them becomes hardware on its own.
//
// Index conventions used throughout the design (n = log2 N, p = log2 P):
//   * a "position" is where a sample sits in one frame: cycle t (0..N/P-1)
//     and lane l (0..P-1).  Lane l = 2k+u feeds PE k; u = 0 is the butterfly's
//     upper input, u = 1 its lower input.
//   * stages s = 1..n; stage s pairs samples whose flow-graph indices differ
//     only in bit n-s.
//   * the first m = n-p+1 stages form P/2 independent 2-parallel MDC
//     pipelines; MDC k holds the indices i with i mod (P/2) = k.
package ntt_pkg;

  localparam int unsigned NTT_N  = 512;    // transform length
  localparam int unsigned NTT_P  = 8;      // parallel factor (samples per cycle)
  localparam int unsigned NTT_Q  = 12289;  // prime modulus, q = 1 mod 2N
  localparam int unsigned NTT_W  = 3;      // primitive N-th root of unity mod q
  localparam int unsigned NTT_DW = 14;     // coefficient width, ceil(log2 q)
  localparam int unsigned NTT_PSI = 1321;  // primitive 2N-th root, PSI^2 = W mod q

  // b^e mod q, evaluated at elaboration time.
  function automatic int unsigned modpow(input int unsigned b, input int unsigned e,
                                         input int unsigned q);
    longint unsigned r, x;
    int unsigned     k;
    r = 1;
    x = longint'(b) % longint'(q);
    k = e;
    while (k != 0) begin
      if (k[0]) r = (r * x) % longint'(q);
      x = (x * x) % longint'(q);
      k = k >> 1;
    end
    return int'(r);
  endfunction

  // a*b mod q, evaluated at elaboration time.
  function automatic int unsigned mulmod(input int unsigned a, input int unsigned b,
                                         input int unsigned q);
    return int'((longint'(a) * longint'(b)) % longint'(q));
  endfunction

  // Insert bit value v at bit position pos of x (bits at and above pos move up).
  function automatic int unsigned insert_bit(input int unsigned x, input int unsigned pos,
                                             input bit v);
    int unsigned lo_mask;
    lo_mask = (32'd1 << pos) - 1;
    return ((x & ~lo_mask) << 1) | (int'(v) << pos) | (x & lo_mask);
  endfunction

  // Remove bit position pos of x (bits above pos move down).
  function automatic int unsigned remove_bit(input int unsigned x, input int unsigned pos);
    int unsigned lo_mask;
    lo_mask = (32'd1 << pos) - 1;
    return ((x >> (pos + 1)) << pos) | (x & lo_mask);
  endfunction

  // Flow-graph index of the sample that enters stage s at cycle t on lane
  // 2k+u (see the conventions above).
  function automatic int unsigned stage_index(input int unsigned logn, input int unsigned logp,
                                              input int unsigned s, input int unsigned t,
                                              input int unsigned k, input bit u);
    int unsigned m, j, low;
    m = logn - logp + 1;
    if (s <= m) begin
      // front part: 2-parallel MDC k works on sub-index j, pair bit m-s of j
      j = insert_bit(t, m - s, u);
      return j * (1 << (logp - 1)) + k;
    end else begin
      // rear part: cycle t carries indices t*P .. t*P+P-1
      low = insert_bit(k, logn - s, u);
      return t * (1 << logp) + low;
    end
  endfunction

  // Twiddle exponent of the PE k in stage s at cycle t (DIF, radix 2):
  // (i mod 2^(n-s)) * 2^(s-1) for the upper index i of the pair.
  function automatic int unsigned twiddle_exp(input int unsigned logn, input int unsigned logp,
                                              input int unsigned s, input int unsigned t,
                                              input int unsigned k);
    int unsigned i;
    i = stage_index(logn, logp, s, t, k, 1'b0);
    return (i & ((1 << (logn - s)) - 1)) << (s - 1);
  endfunction

  // Destination lane of the delay-free shuffle between rear stages s and
  // s+1, where stage s pairs on index bit d = n-s (d < p).
  function automatic int unsigned shuffle_dest(input int unsigned d, input int unsigned lane);
    int unsigned low;
    low = insert_bit(lane >> 1, d, lane[0]);
    return 2 * remove_bit(low, d - 1) + ((low >> (d - 1)) & 1);
  endfunction

endpackage
