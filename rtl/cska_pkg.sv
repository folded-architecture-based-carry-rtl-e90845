// cska_pkg: types shared by the carry-skip adder modules.
//
// The carry of the concatenation-incrementation carry-skip adder travels
// through compound gates of alternating type: an AND-OR-INVERT gate takes
// the carry in true polarity and hands on its complement, the next stage's
// OR-AND-INVERT gate takes that complement and hands on the true carry.
// skip_kind_e names the two gate types; skip_kind_of() gives the type of
// stage number j (stages are numbered from 0, so even stages use AOI and
// produce the complemented carry).
package cska_pkg;

  typedef enum logic {
    SKIP_AOI = 1'b0,  // in: P, C, G      out: NOT Cout
    SKIP_OAI = 1'b1   // in: ~P, ~C, ~G   out: Cout
  } skip_kind_e;

  function automatic skip_kind_e skip_kind_of(input int unsigned j);
    return (j % 2 == 0) ? SKIP_AOI : SKIP_OAI;
  endfunction

endpackage
