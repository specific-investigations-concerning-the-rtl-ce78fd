// nand_rca: W-bit ripple carry adder made of NAND-only buffer based full
// adders (nand_buf_full_adder).
//
// sum + (cout << W) = a + b + cin. The carry leaves each cell through one
// NAND (nand(n1, m1)), so the ripple path costs fewer gate levels per bit
// than the sum path. Purely combinational. W defaults to 16 bits.
module nand_rca #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] cy;  // cy[i] is the carry into bit i

  assign cy[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    nand_buf_full_adder u_fa (.a(a[i]), .b(b[i]), .c(cy[i]), .sum(sum[i]), .cout(cy[i+1]));
  end

  assign cout = cy[W];
endmodule
