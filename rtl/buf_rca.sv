// buf_rca: W-bit ripple carry adder made of buffer based full adders.
//
// sum + (cout << W) = a + b + cin. Bit i adds a[i], b[i] and the carry of
// bit i-1; the b operand enters the cell's XOR select together with the
// carry, so a cell whose b and carry agree lets a through without using
// its incrementer. Purely combinational; delay grows linearly with W.
// W defaults to the 16-bit adders of the design.
module buf_rca #(
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
    buf_full_adder u_fa (.a(a[i]), .b(b[i]), .c(cy[i]), .sum(sum[i]), .cout(cy[i+1]));
  end

  assign cout = cy[W];
endmodule
