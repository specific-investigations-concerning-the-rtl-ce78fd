// bcse2_ppg: partial product unit of the 2-bit BCSE constant multiplier.
//
// The WK-bit constant COEFF is read as a fraction K = COEFF / 2^WK and cut
// into 2-bit groups, the lowest group padded with zeros on the right if WK
// is odd. A group pattern selects one multiple of the input y:
//   00 -> 0,  01 -> y,  10 -> 2y,  11 -> 3y = 2y + y.
// In the fractional view of the design these are 0, Y/2, Y and Y + Y/2: the
// factor two between the views is a shift that the adder steps apply.
// 3y is the only common subexpression; one adder (of kind ADDER, WY+1 bits)
// forms it once and every 11 group reuses it. The selection is fixed by the
// constant at elaboration, so each partial product is plain wiring.
// Interface: pp[j] (WY+2 bits) is the partial product of group j, j = 0 the
// least significant group. Purely combinational: one adder delay.
module bcse2_ppg
  import bcse_pkg::*;
#(
  parameter int unsigned WY      = WY_DEF,
  parameter int unsigned WK      = WK_DEF,
  parameter logic [WK-1:0] COEFF = COEFF_DEF,
  parameter adder_kind_e ADDER   = ADD_BUF_RCA,
  localparam int unsigned G      = 2,
  localparam int unsigned NG     = num_groups(WK, G),
  localparam int unsigned PAD    = NG * G - WK,
  localparam int unsigned WPP    = WY + G
) (
  input  logic [WY-1:0]          y,
  output logic [NG-1:0][WPP-1:0] pp
);
  localparam logic [NG*G-1:0] KP = (NG*G)'(COEFF) << PAD;

  logic [WY:0]    y3_lo;   // low WY+1 bits of 3y
  logic           y3_hi;   // top bit of 3y
  logic [WPP-1:0] m [4];   // m[g] = g * y

  // The one shared adder: 3y = (y << 1) + y.
  cm_adder #(.W(WY+1), .KIND(ADDER)) u_x (
    .a({y, 1'b0}), .b({1'b0, y}), .sum(y3_lo), .cout(y3_hi)
  );

  assign m[0] = '0;
  assign m[1] = WPP'(y);
  assign m[2] = WPP'({y, 1'b0});
  assign m[3] = {y3_hi, y3_lo};

  for (genvar j = 0; j < NG; j++) begin : g_grp
    localparam logic [G-1:0] CODE = KP[G*j +: G];
    assign pp[j] = m[CODE];
  end
endmodule
