// bec_incrementer: W-bit incrementer (binary to excess-one converter).
//
// q + (cout << W) = d + 1. Bit 0 is an inverter; bit i flips when every
// lower bit is one, the "all ones below" term rippling through an AND
// chain. It needs no full adders, which is why it replaces the second
// ripple carry chain of the modified carry select adder. Combinational.
// Only its role is given by the original design; the AND-chain form is the
// simplest incrementer and this design's own choice.
module bec_incrementer #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic         cout
);
  logic [W:0] ones;  // ones[i]: d[i-1:0] are all one

  assign ones[0] = 1'b1;

  for (genvar i = 0; i < W; i++) begin : g_bit
    assign q[i]      = d[i] ^ ones[i];
    assign ones[i+1] = d[i] & ones[i];
  end

  assign cout = ones[W];
endmodule
