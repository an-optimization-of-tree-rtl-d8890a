// trsa_pkg: constants and sizing functions shared by the TRSA modules.
//
// A TRSA tree with l levels has 2^l - 1 processor elements (PEs) in its full
// form and 2l - 1 in its optimized form, where every level except the root
// keeps only two PEs: one for the "all-A" branch and one for the branch that
// carries B. The coordinator splits the exponent over n_p = 2^l inputs.
package trsa_pkg;

  // Default RSA key length in bits and default number of tree levels.
  localparam int unsigned KEY_BITS_DEFAULT = 1024;
  localparam int unsigned LEVELS_DEFAULT   = 3;

  // Number of PEs working at tree stage s (s = 0 are the leaves, s = levels-1
  // the root).
  function automatic int unsigned pes_at_stage(int unsigned levels, bit optimized,
                                               int unsigned s);
    if (s == levels - 1) return 1;
    if (optimized) return 2;
    return 1 << (levels - 1 - s);
  endfunction

  // Width of the widest stage: the leaves.
  function automatic int unsigned max_stage_pes(int unsigned levels, bit optimized);
    return pes_at_stage(levels, optimized, 0);
  endfunction

  // Total PEs of the tree (coordinator not counted).
  function automatic int unsigned total_pes(int unsigned levels, bit optimized);
    return optimized ? 2 * levels - 1 : (1 << levels) - 1;
  endfunction

endpackage
