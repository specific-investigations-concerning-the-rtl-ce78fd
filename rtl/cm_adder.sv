// cm_adder: one W-bit adder of the constant multiplier, sum + (cout << W)
// = a + b, built from the adder structure named by KIND:
//   ADD_BUF_RCA  - buffer based ripple carry adder (buf_rca), the default,
//   ADD_NAND_RCA - the same adder in NAND gates only (nand_rca),
//   ADD_MOD_CSA  - area-reduced carry select adder (mod_csa).
// The multiplier's additions have no carry input, so the ripple adders get
// carry-in zero. Purely combinational.
module cm_adder
  import bcse_pkg::*;
#(
  parameter int unsigned W    = 16,
  parameter adder_kind_e KIND = ADD_BUF_RCA
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum,
  output logic         cout
);
  if (KIND == ADD_NAND_RCA) begin : g_nand
    nand_rca #(.W(W)) u_add (.a(a), .b(b), .cin(1'b0), .sum(sum), .cout(cout));
  end else if (KIND == ADD_MOD_CSA) begin : g_csa
    mod_csa #(.W(W)) u_add (.a(a), .b(b), .sum(sum), .cout(cout));
  end else begin : g_buf
    buf_rca #(.W(W)) u_add (.a(a), .b(b), .cin(1'b0), .sum(sum), .cout(cout));
  end
endmodule
