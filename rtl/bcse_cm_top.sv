// bcse_cm_top: the 2-bit and the 3-bit BCSE constant multipliers side by
// side, both multiplying the same input y by the same constant COEFF.
//
// p2 comes from the 2-bit algorithm (eight groups, one shared adder, seven
// adder steps for a 16-bit coefficient); p3 from the 3-bit algorithm (six
// groups, three shared adders, five adder steps). Both equal y * COEFF
// exactly; read with WK fraction bits they are y * K for K = COEFF / 2^WK.
// PP_ADDER and ACC_ADDER select the adder structure used inside both
// multipliers (buffer based RCA by default, NAND based RCA, or the
// area-reduced carry select adder). Purely combinational. Both multipliers
// are the design's own; placing them side by side on one input is a choice
// made here so that both can be built and compared together.
module bcse_cm_top
  import bcse_pkg::*;
#(
  parameter int unsigned WY        = WY_DEF,
  parameter int unsigned WK        = WK_DEF,
  parameter logic [WK-1:0] COEFF   = COEFF_DEF,
  parameter adder_kind_e PP_ADDER  = ADD_BUF_RCA,
  parameter adder_kind_e ACC_ADDER = ADD_BUF_RCA
) (
  input  logic [WY-1:0]    y,
  output logic [WY+WK-1:0] p2,
  output logic [WY+WK-1:0] p3
);
  bcse2_const_mult #(
    .WY(WY), .WK(WK), .COEFF(COEFF), .PP_ADDER(PP_ADDER), .ACC_ADDER(ACC_ADDER)
  ) u_m2 (.y(y), .p(p2));

  bcse3_const_mult #(
    .WY(WY), .WK(WK), .COEFF(COEFF), .PP_ADDER(PP_ADDER), .ACC_ADDER(ACC_ADDER)
  ) u_m3 (.y(y), .p(p3));
endmodule
