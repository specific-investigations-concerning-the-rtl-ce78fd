// mod_csa: area-reduced carry select adder, sum + (cout << W) = a + b.
//
// Bit 0 is a half adder. Its sum is sum[0]; its carry does not ripple into
// the upper bits but selects the upper result. Bits W-1..1 are added once,
// with carry-in zero, by a ripple chain of buffer based full adders. An
// incrementer (bec_incrementer) forms the same upper sum plus one; its
// lowest bit is the inverse of the chain's lowest sum bit. A row of 2:1
// multiplexers, selected by the half adder carry, picks the plain or the
// incremented upper sum, and the chain's (or the incrementer's) carry out.
// A classic carry select adder would need a second ripple chain with
// carry-in one; the incrementer takes its place, saving area for a small
// delay cost. Purely combinational; there is no carry input.
// The half adder, the incrementer and the carry-selected multiplexers follow
// the original description. Its text also has the half adder carry "fed as
// input carry" to the chain; this design uses it only as the select, since
// feeding it into the chain would leave nothing to select.
module mod_csa #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic         ha_cy;     // half adder carry = multiplexer select
  logic [W-1:1] up0;       // upper sum, carry-in 0
  logic         up0_cy;
  logic [W-1:0] up1;       // {carry, upper sum} + 1
  logic         up1_cy;    // never set: the upper sum is at most 2^W - 2

  assign sum[0] = a[0] ^ b[0];
  assign ha_cy  = a[0] & b[0];

  buf_rca #(.W(W-1)) u_chain (
    .a(a[W-1:1]), .b(b[W-1:1]), .cin(1'b0), .sum(up0), .cout(up0_cy)
  );

  bec_incrementer #(.W(W)) u_inc (.d({up0_cy, up0}), .q(up1), .cout(up1_cy));

  always_comb begin
    if (ha_cy) begin
      sum[W-1:1] = up1[W-2:0];
      cout       = up1[W-1];
    end else begin
      sum[W-1:1] = up0;
      cout       = up0_cy;
    end
  end
endmodule
