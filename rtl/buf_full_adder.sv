// buf_full_adder: one-bit full adder built around an XOR-driven selector.
//
// sel = b ^ c decides which of two paths drives the outputs:
//   sel = 0 (b == c): the incrementer is skipped; sum = a, cout = b.
//   sel = 1 (b != c): a is incremented by one bit (sum = ~a, cout = a).
// Both cases equal the full adder sum a^b^c and carry maj(a,b,c), because
// with b == c the carry is b, and with b != c the carry is a.
// Purely combinational. The structure (XOR select, incrementer, two
// selectors) follows the buffer based full adder of the design; the
// incrementer is written as its one-bit form (sum ~a, carry a).
module buf_full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic cout
);
  logic sel;      // XOR of b and c: selector of both multiplexers
  logic inc_sum;  // incrementer: a + 1, sum bit
  logic inc_cy;   // incrementer: a + 1, carry bit

  always_comb begin
    sel     = b ^ c;
    inc_sum = ~a;
    inc_cy  = a;
    sum     = sel ? inc_sum : a;
    cout    = sel ? inc_cy  : b;
  end
endmodule
