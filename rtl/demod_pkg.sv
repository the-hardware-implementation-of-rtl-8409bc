// demod_pkg: types and constant functions shared by the demodulators.
//
// The demodulators that decide on a whole code combination (phase-shift
// keying "in toto") weight each of the K stored quadrature responses by a
// code element a_mk = +1 or -1. code_neg() tells, at elaboration time,
// whether a_mk is -1, for the two code families used:
//   WALSH : Walsh-Hadamard words in natural order, a_mk = (-1)^popcount(m & k).
//   MSEQ  : word 0 is a maximal-length sequence of length K = 2^d - 1 from the
//           recurrence a[t+d] = a[t+c] xor a[t] (primitive trinomial
//           x^d + x^c + 1, c chosen per d below); word m is that sequence
//           cyclically shifted by m*floor(K/2). Bit 1 stands for a_mk = -1.
// Index k = 0 is the most recent code element (y(i)), k = K-1 the oldest.
// The choice of M-sequence polynomials and of the cyclic shift between the
// words is this design's own; the published description only says "M-sequences".
package demod_pkg;

  typedef enum logic [0:0] {
    WALSH = 1'b0,
    MSEQ  = 1'b1
  } code_kind_e;

  // Feedback tap c of the primitive trinomial x^d + x^c + 1 for degree d.
  function automatic int unsigned mseq_tap(int unsigned d);
    case (d)
      2:       return 1;
      3:       return 2;
      4:       return 3;
      5:       return 3;
      6:       return 5;
      7:       return 6;
      default: return 1;
    endcase
  endfunction

  // Element t (0 <= t < K) of the M-sequence of length K, started from the
  // state a[0] = 1, a[1..d-1] = 0.
  function automatic bit mseq_bit(int unsigned K, int unsigned t);
    bit          a [128];
    int unsigned d;
    int unsigned c;
    d = $clog2(K + 1);
    c = mseq_tap(d);
    for (int unsigned i = 0; i < 128; i++) a[i] = 1'b0;
    a[0] = 1'b1;
    for (int unsigned i = 0; i + d < 128; i++) a[i + d] = a[i + c] ^ a[i];
    return a[t % K];
  endfunction

  // 1 when code element a_mk of word m is -1.
  function automatic bit code_neg(code_kind_e kind, int unsigned K,
                                  int unsigned m, int unsigned k);
    if (kind == WALSH) return ^(m[7:0] & k[7:0]);
    else               return mseq_bit(K, (k + m * (K / 2)) % K);
  endfunction

endpackage
