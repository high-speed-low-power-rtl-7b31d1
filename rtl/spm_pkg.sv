// Shared trellis definitions for the surviving-path memory (SPM) units.
//
// The decoder has N = 2**v states. A state at time t is the v most recent
// input bits, newest bit in the MSB. The add-compare-select unit delivers
// one decision bit per state and decoding cycle; the decision is the bit
// that leaves the state register, so the predecessor of state s is
// {s[v-2:0], d}. This convention is the one that reproduces the worked
// example of the exchange-register states and look-up tables the design
// is built on; the paper itself does not state it in words.
package spm_pkg;

  // Predecessor at time t-1 of node s at time t, given s's decision bit d.
  function automatic int unsigned pred_node(int unsigned s, logic d, int unsigned v);
    return ((s << 1) | int'(d)) & ((32'd1 << v) - 1);
  endfunction

endpackage
