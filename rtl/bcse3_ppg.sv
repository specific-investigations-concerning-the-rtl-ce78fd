// bcse3_ppg: partial product unit of the 3-bit BCSE constant multiplier.
//
// The WK-bit constant COEFF is cut into 3-bit groups, the lowest group
// padded with zeros on the right (16 bits give six groups, the last holding
// one coefficient bit). A group pattern g selects the multiple g*y:
//   000 -> 0     001 -> y     010 -> 2y    100 -> 4y      (shifts only)
//   011 -> 3y  = 2y + y                                    (adder 1)
//   110 -> 6y  = 3y << 1                                   (shift of adder 1)
//   101 -> 5y  = 4y + y                                    (adder 2)
//   111 -> 7y  = 4y + 3y                                   (adder 3)
// In the fractional view of the design (100 = Y) these are Y/4, Y/2, Y,
// C/2, C = Y + Y/2, A = Y + Y/4 and Y + C/2: the common subexpression C
// serves both 011 and 110, so three adders replace the five a direct
// implementation needs. Adder 3 reuses adder 1's output, so the unit is two
// adder delays deep. The adders are of kind ADDER.
// Interface: pp[j] (WY+3 bits) is the partial product of group j, j = 0 the
// least significant group. Purely combinational.
module bcse3_ppg
  import bcse_pkg::*;
#(
  parameter int unsigned WY      = WY_DEF,
  parameter int unsigned WK      = WK_DEF,
  parameter logic [WK-1:0] COEFF = COEFF_DEF,
  parameter adder_kind_e ADDER   = ADD_BUF_RCA,
  localparam int unsigned G      = 3,
  localparam int unsigned NG     = num_groups(WK, G),
  localparam int unsigned PAD    = NG * G - WK,
  localparam int unsigned WPP    = WY + G
) (
  input  logic [WY-1:0]          y,
  output logic [NG-1:0][WPP-1:0] pp
);
  localparam logic [NG*G-1:0] KP = (NG*G)'(COEFF) << PAD;

  logic [WY+1:0]  c_lo, a_lo, d_lo;  // low WY+2 bits of 3y, 5y, 7y
  logic           c_hi, a_hi, d_hi;  // carries out
  logic [WPP-1:0] m [8];             // m[g] = g * y

  // Adder 1: 3y = 2y + y (C/2 in the fractional view).
  cm_adder #(.W(WY+2), .KIND(ADDER)) u_c (
    .a({1'b0, y, 1'b0}), .b({2'b00, y}), .sum(c_lo), .cout(c_hi)
  );
  // Adder 2: 5y = 4y + y (A = Y + Y/4).
  cm_adder #(.W(WY+2), .KIND(ADDER)) u_a (
    .a({y, 2'b00}), .b({2'b00, y}), .sum(a_lo), .cout(a_hi)
  );
  // Adder 3: 7y = 4y + 3y (Y + C/2).
  cm_adder #(.W(WY+2), .KIND(ADDER)) u_d (
    .a({y, 2'b00}), .b(c_lo), .sum(d_lo), .cout(d_hi)
  );

  // 3y < 2^(WY+2), so the carry of adder 1 is always zero; it is kept as
  // the top bit of the multiple all the same.
  assign m[0] = '0;
  assign m[1] = WPP'(y);
  assign m[2] = WPP'({y, 1'b0});
  assign m[3] = {c_hi, c_lo};
  assign m[4] = WPP'({y, 2'b00});
  assign m[5] = {a_hi, a_lo};
  assign m[6] = {c_lo, 1'b0};
  assign m[7] = {d_hi, d_lo};

  for (genvar j = 0; j < NG; j++) begin : g_grp
    localparam logic [G-1:0] CODE = KP[G*j +: G];
    assign pp[j] = m[CODE];
  end
endmodule
