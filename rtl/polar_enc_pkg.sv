// polar_enc_pkg: constants and small elaboration-time helpers shared by the
// folded polar encoder.
//
// The encoder processes a length-N message as N/P words of P bits. The first
// log2(P) butterfly stages combine bits of the same word ("intra" stages); the
// remaining log2(N/P) stages combine bits that are 2^m words apart (m = 0, 1,
// ...) and are built as folded stages with a delay-switch-delay network. The
// functions below give the sizes that follow from N and P, so that every
// module derives them the same way.
package polar_enc_pkg;

  // Number of intra-word stages, log2(P).
  function automatic int unsigned intra_stages(int unsigned p);
    return $clog2(p);
  endfunction

  // Number of folded (inter-word) stages, log2(N/P).
  function automatic int unsigned fold_stages(int unsigned n, int unsigned p);
    return $clog2(n / p);
  endfunction

  // Word distance D of folded stage m (m = 0 is the first folded stage).
  function automatic int unsigned fold_distance(int unsigned m);
    return 1 << m;
  endfunction

  // Cycles between a word entering the encoder and the same word's data
  // entering folded stage m: the sum of the distances of the stages before
  // it. With m = fold_stages(N,P) this is the latency of the whole encoder.
  function automatic int unsigned fold_entry_delay(int unsigned m);
    return (1 << m) - 1;
  endfunction

endpackage
