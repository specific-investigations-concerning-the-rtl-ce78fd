// tb_mod_csa: self-checking test of the area-reduced carry select adder.
// The 16-bit default instance gets corner operands and 5000 random pairs;
// a 4-bit instance gets all 256 operand pairs. {cout, sum} is compared
// with a + b. Both settings of the multiplexer select (the bit-0 half adder
// carry) are counted and must each occur.
module tb_mod_csa;
  logic [15:0] a, b, sum;
  logic        cout;
  logic [3:0]  a4, b4, s4;
  logic        co4;
  logic clk = 1'b0;
  int checks = 0, failures = 0, n_sel0 = 0, n_sel1 = 0;

  mod_csa dut (.a(a), .b(b), .sum(sum), .cout(cout));
  mod_csa #(.W(4)) dut4 (.a(a4), .b(b4), .sum(s4), .cout(co4));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(input logic [15:0] x, input logic [15:0] z);
    a = x; b = z;
    #1;
    checks++;
    if ({cout, sum} !== 17'(x) + 17'(z)) begin
      failures++;
      $display("FAIL %h + %h = %h", x, z, {cout, sum});
    end
    if (x[0] & z[0]) n_sel1++; else n_sel0++;
  endtask

  initial begin
    check16(16'hFFFF, 16'h0001);
    check16(16'hFFFF, 16'hFFFF);
    check16(16'h7FFF, 16'h0001);
    check16(16'h0000, 16'h0000);
    check16(16'hFFFE, 16'h0001);
    for (int i = 0; i < 5000; i++) check16(16'($urandom), 16'($urandom));
    for (int v = 0; v < 256; v++) begin
      {a4, b4} = 8'(v);
      #1;
      checks++;
      if ({co4, s4} !== 5'(a4) + 5'(b4)) begin
        failures++;
        $display("FAIL W=4 %h + %h = %h", a4, b4, {co4, s4});
      end
    end
    checks++;
    if (n_sel0 == 0 || n_sel1 == 0) failures++;
    $display("select=0 %0d, select=1 %0d", n_sel0, n_sel1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
