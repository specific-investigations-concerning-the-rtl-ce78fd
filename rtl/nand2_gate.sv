// nand2_gate: a single 2-input NAND gate, the only cell of the NAND-mapped
// full adder. y = ~(a & b), combinational.
module nand2_gate (
  input  logic a,
  input  logic b,
  output logic y
);
  assign y = ~(a & b);
endmodule
