// fir_fold_pkg: constants and small helpers shared by the folded FIR filter.
//
// The filter folds a chain of L = K*N bit-level "operations" (one coefficient
// bit times one input word, added to a running sum) onto K processing rows,
// each row executing N operations in turn. Position p of an operation in the
// chain maps to row s = p / N and time slot r = p % N. With coefficient length
// mc, the same position is bit i = p % mc of coefficient j = p / mc.
//
// The default sizes below are this design's own choice; the method places no
// numeric limits other than mc >= N and K*N = kc*mc.
package fir_fold_pkg;

  // Default number of processing rows (folding sets), k.
  localparam int unsigned K_DEF  = 4;
  // Default folding factor N: operations time-multiplexed onto one row.
  localparam int unsigned N_DEF  = 4;
  // Default input data word width.
  localparam int unsigned W_DEF  = 8;
  // Coefficient length selected at reset.
  localparam int unsigned MC_DEF = 8;

  // $clog2 that never returns 0, so that a one-entry index still has one bit.
  function automatic int unsigned clog2_min1(input int unsigned v);
    return (v <= 2) ? 1 : $clog2(v);
  endfunction

  // True when mc is a legal coefficient length for a K x N array:
  // mc must divide L = K*N and be at least N (the retiming then never
  // needs a positive value, so every row reads an input word already seen).
  function automatic logic mc_legal(input int unsigned mc,
                                    input int unsigned k,
                                    input int unsigned n);
    logic ok;
    ok = 1'b0;
    for (int unsigned q = 1; q <= k; q++)
      if (q * mc == k * n && mc >= n) ok = 1'b1;
    return ok;
  endfunction

endpackage
