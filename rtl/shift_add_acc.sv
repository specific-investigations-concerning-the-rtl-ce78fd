// shift_add_acc: the adder steps of the constant multiplier. It adds NG
// partial products, group j weighted by 2^(G*j), into one exact product:
//   p = sum_j pp[j] << (G*j).
// The adders form a chain from the least significant group upwards. After
// step j-1 the running sum is below 2^(WY + G*j); its low G*j bits are final
// and pass by, and only its upper WY bits meet pp[j] in a (WY+G)-bit adder of
// kind ADDER. The sum of that adder is below 2^(WY+G), so its carry out is
// always zero and is left unused. NG groups take NG-1 adders: seven for the
// 2-bit and five for the 3-bit algorithm with a 16-bit coefficient.
// Purely combinational; the delay is NG-1 adders in series. The count of
// adders follows the original design; arranging them as a chain of narrow
// adders rather than a tree is this design's own choice.
module shift_add_acc
  import bcse_pkg::*;
#(
  parameter int unsigned WY    = WY_DEF,
  parameter int unsigned G     = 2,
  parameter int unsigned NG    = 8,
  parameter adder_kind_e ADDER = ADD_BUF_RCA,
  localparam int unsigned WPP  = WY + G,
  localparam int unsigned WP   = WY + G * NG
) (
  input  logic [NG-1:0][WPP-1:0] pp,
  output logic [WP-1:0]          p
);
  logic [NG-1:0][WP-1:0] acc;  // acc[j]: sum of groups 0..j

  assign acc[0] = WP'(pp[0]);

  for (genvar j = 1; j < NG; j++) begin : g_step
    logic [WPP-1:0] s;
    logic           unused_cy;
    cm_adder #(.W(WPP), .KIND(ADDER)) u_add (
      .a(WPP'(acc[j-1][G*j +: WY])), .b(pp[j]), .sum(s), .cout(unused_cy)
    );
    if (WPP + G*j < WP) begin : g_ext
      assign acc[j] = {{(WP-WPP-G*j){1'b0}}, s, acc[j-1][G*j-1:0]};
    end else begin : g_full
      assign acc[j] = {s, acc[j-1][G*j-1:0]};
    end
  end

  assign p = acc[NG-1];
endmodule
