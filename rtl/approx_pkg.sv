// approx_pkg: types shared by the approximate-arithmetic cells and datapaths.
//
// fa_mode_e names the full-adder variant a cell is built as. FA_ACCURATE is
// the exact full adder (realised by the 9T cell); FA_APPROX1 .. FA_APPROX5 are
// the five simplified mirror-adder cells whose truth tables are fixed by the
// design (see approx_fa). The choice is made at elaboration, since each
// variant is a different circuit, not a run-time mode.
package approx_pkg;

  typedef enum logic [2:0] {
    FA_ACCURATE = 3'd0,
    FA_APPROX1  = 3'd1,
    FA_APPROX2  = 3'd2,
    FA_APPROX3  = 3'd3,
    FA_APPROX4  = 3'd4,
    FA_APPROX5  = 3'd5
  } fa_mode_e;

endpackage
