// tb_buf_rca: self-checking test of the 16-bit buf ripple carry adder.
// Applies corner operands (all ones plus one, full carry ripple, zero) and
// 5000 random operand pairs with random carry-in, and compares
// {cout, sum} with a + b + cin computed in 17-bit arithmetic. A 4-bit
// instance is also tested on all 512 input combinations.
module tb_buf_rca;
  logic [15:0] a, b, sum;
  logic        cin, cout;
  logic [3:0]  a4, b4, s4;
  logic        ci4, co4;
  logic clk = 1'b0;
  int checks = 0, failures = 0, n_ripple = 0;

  buf_rca dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
  buf_rca #(.W(4)) dut4 (.a(a4), .b(b4), .cin(ci4), .sum(s4), .cout(co4));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(input logic [15:0] x, input logic [15:0] z, input logic ci);
    logic [16:0] exp;
    a = x; b = z; cin = ci;
    #1;
    exp = 17'(x) + 17'(z) + 17'(ci);
    checks++;
    if ({cout, sum} !== exp) begin
      failures++;
      $display("FAIL %h + %h + %b = %h, expected %h", x, z, ci, {cout, sum}, exp);
    end
    if ((x ^ z) == 16'hFFFF && ci) n_ripple++;
  endtask

  initial begin
    check16(16'hFFFF, 16'h0000, 1'b1);
    check16(16'h0001, 16'hFFFF, 1'b0);
    check16(16'hFFFF, 16'hFFFF, 1'b1);
    check16(16'h0000, 16'h0000, 1'b0);
    check16(16'h8000, 16'h8000, 1'b0);
    check16(16'h5555, 16'hAAAA, 1'b1);
    for (int i = 0; i < 5000; i++) check16(16'($urandom), 16'($urandom), 1'($urandom));
    for (int v = 0; v < 512; v++) begin
      {a4, b4, ci4} = 9'(v);
      #1;
      checks++;
      if ({co4, s4} !== 5'(a4) + 5'(b4) + 5'(ci4)) begin
        failures++;
        $display("FAIL W=4 %h + %h + %b = %h", a4, b4, ci4, {co4, s4});
      end
    end
    checks++;
    if (n_ripple == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
