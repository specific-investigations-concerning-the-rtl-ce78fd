// bcse_pkg: types and constants shared by the BCSE constant multiplier.
//
// adder_kind_e names the three adder structures an adder of the multiplier can
// be built from: the buffer based ripple carry adder, the same adder mapped to
// 2-input NAND gates, and the area-reduced carry select adder that replaces the
// second ripple chain of a classic carry select adder by an incrementer.
// The defaults below are the 16-bit input and 16-bit coefficient of the
// design and its worst-case coefficient, all bits set.
package bcse_pkg;

  typedef enum logic [1:0] {
    ADD_BUF_RCA  = 2'd0,  // ripple carry adder of buffer based full adders
    ADD_NAND_RCA = 2'd1,  // same, every cell built of 2-input NAND gates
    ADD_MOD_CSA  = 2'd2   // half adder + ripple chain + incrementer + muxes
  } adder_kind_e;

  localparam int unsigned WY_DEF    = 16;        // width of the input Y
  localparam int unsigned WK_DEF    = 16;        // width of the coefficient K
  localparam logic [15:0] COEFF_DEF = 16'hFFFF;  // worst case: all bits non-zero

  // Number of G-bit groups a WK-bit coefficient splits into.
  function automatic int unsigned num_groups(int unsigned wk, int unsigned g);
    return (wk + g - 1) / g;
  endfunction

endpackage
