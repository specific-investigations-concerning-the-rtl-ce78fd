// bcse3_const_mult: constant multiplier by the 3-bit BCSE algorithm.
//
// Computes the exact product of the unsigned WY-bit input y and the WK-bit
// constant COEFF: p = y * COEFF, WY+WK bits. Read COEFF as the fraction
// K = COEFF / 2^WK (0 <= K < 1) and p holds y*K with WK fraction bits; the
// integer part is p[WY+WK-1:WK].
// The coefficient is split into 3-bit groups. bcse3_ppg turns each group
// into one partial product, sharing the common subexpressions between the
// groups, and shift_add_acc adds the partial products, each shifted by its
// group position. Groups of the constant that are all zero give constant-zero
// partial products that synthesis removes together with their logic.
// PP_ADDER and ACC_ADDER choose the adder structure of the partial product
// unit and of the adder steps; the buffer based ripple carry adder is the
// default for both. Purely combinational, no clock: the longest path is the
// partial product unit followed by the chain of adder steps.
module bcse3_const_mult
  import bcse_pkg::*;
#(
  parameter int unsigned WY        = WY_DEF,
  parameter int unsigned WK        = WK_DEF,
  parameter logic [WK-1:0] COEFF   = COEFF_DEF,
  parameter adder_kind_e PP_ADDER  = ADD_BUF_RCA,
  parameter adder_kind_e ACC_ADDER = ADD_BUF_RCA,
  localparam int unsigned G        = 3,
  localparam int unsigned NG       = num_groups(WK, G),
  localparam int unsigned PAD      = NG * G - WK
) (
  input  logic [WY-1:0]    y,
  output logic [WY+WK-1:0] p
);
  logic [NG-1:0][WY+G-1:0] pp;
  logic [WY+G*NG-1:0]      p_pad;  // y * (COEFF << PAD)

  bcse3_ppg #(.WY(WY), .WK(WK), .COEFF(COEFF), .ADDER(PP_ADDER)) u_ppg (
    .y(y), .pp(pp)
  );

  shift_add_acc #(.WY(WY), .G(G), .NG(NG), .ADDER(ACC_ADDER)) u_acc (
    .pp(pp), .p(p_pad)
  );

  // The PAD low bits of p_pad are zero: the padding of the coefficient.
  assign p = p_pad[WY+G*NG-1:PAD];
endmodule
