// viterbi_pkg: trellis conventions shared by the decoder blocks and their testbenches.
//
// A trellis state is the last K-1 information bits with the newest bit in bit 0, so a
// step with input u moves state s to {s[K-3:0], u}. Read backwards this is the
// traceback rule of the pre-traceback scheme: the predecessor of state s, given its
// decision bit d, is {d, s >> 1}. The coder window of one step is {d, s}: bit k holds
// the information bit k steps old. A generator polynomial is written in the usual
// octal form whose most significant bit taps the newest bit, so tap k of the window
// uses polynomial bit K-1-k. The polynomials themselves are not fixed here; the
// decoder defaults are the common rate-1/2 codes (133, 171 octal for K = 7).
package viterbi_pkg;

  // Predecessor of state s (M bits wide, M = K-1) given its decision bit d.
  function automatic int unsigned pred_state(int unsigned s, bit d, int unsigned m);
    return (int'(d) << (m - 1)) | (s >> 1);
  endfunction

  // Parity of (window & reversed polynomial): one coded bit of the branch whose
  // window is w (bit 0 = newest information bit) for generator g of length k.
  function automatic bit code_bit(int unsigned w, int unsigned g, int unsigned k);
    bit p = 1'b0;
    for (int unsigned t = 0; t < k; t++)
      p ^= bit'((w >> t) & 1) & bit'((g >> (k - 1 - t)) & 1);
    return p;
  endfunction

  // Two-bit branch label {c1, c0} of the branch from predecessor {d, s>>1} into s.
  function automatic logic [1:0] branch_label(int unsigned s, bit d, int unsigned k,
                                              int unsigned g0, int unsigned g1);
    int unsigned w = (int'(d) << (k - 1)) | s;
    return {code_bit(w, g1, k), code_bit(w, g0, k)};
  endfunction

endpackage
