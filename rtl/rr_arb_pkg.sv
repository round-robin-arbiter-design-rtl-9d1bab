// rr_arb_pkg -- shared types and helpers for the hierarchic round-robin
// arbiter.
//
// The hierarchy is described by a list of leaf-group sizes, lowest-numbered
// candidates first. A list has room for MAX_LEAVES groups; unused entries are
// zero. span() adds up a run of entries and is used at elaboration time to
// place each group's candidates in the flat request vector and to size the
// ports. MAX_LEAVES is a choice of this implementation; the largest
// configuration described has four leaf groups.
package rr_arb_pkg;

  localparam int unsigned MAX_LEAVES = 8;

  typedef int unsigned size_list_t [MAX_LEAVES];

  // Sum of sizes[first] .. sizes[first+count-1].
  function automatic int unsigned span(size_list_t sizes, int unsigned first,
                                       int unsigned count);
    int unsigned total = 0;
    for (int unsigned j = 0; j < count; j++) total += sizes[first + j];
    return total;
  endfunction

endpackage
