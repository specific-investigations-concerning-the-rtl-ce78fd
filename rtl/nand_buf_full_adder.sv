// nand_buf_full_adder: the buffer based full adder mapped to nine 2-input
// NAND gates.
//
// The XOR select of buf_full_adder becomes the usual four-NAND XOR
// (n1..n3, sel). The sum selector "sel ? ~a : a" is a XOR of a and sel, so
// the incrementer's inverter is folded into a second four-NAND XOR (m1..m3,
// sum). The carry selector "sel ? a : b" is built as nand(n1, m1): when
// sel = 0 the first input gives b & c, which equals b because b == c, and
// when sel = 1 the second gives a. No separate NOT gate is left, which is
// the elimination of redundant inverters the design calls for.
// Worst-case path: 6 NAND levels (b/c -> n1 -> n2 -> sel -> m1 -> m2 -> sum).
// Purely combinational.
module nand_buf_full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic cout
);
  logic n1, n2, n3, sel;  // XOR(b, c)
  logic m1, m2, m3;       // XOR(a, sel)

  nand2_gate g_n1  (.a(b),   .b(c),   .y(n1));
  nand2_gate g_n2  (.a(b),   .b(n1),  .y(n2));
  nand2_gate g_n3  (.a(c),   .b(n1),  .y(n3));
  nand2_gate g_sel (.a(n2),  .b(n3),  .y(sel));
  nand2_gate g_m1  (.a(a),   .b(sel), .y(m1));
  nand2_gate g_m2  (.a(a),   .b(m1),  .y(m2));
  nand2_gate g_m3  (.a(sel), .b(m1),  .y(m3));
  nand2_gate g_sum (.a(m2),  .b(m3),  .y(sum));
  nand2_gate g_cy  (.a(n1),  .b(m1),  .y(cout));
endmodule
