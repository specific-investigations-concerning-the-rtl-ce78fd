// tb_cm_adder: tests the adder wrapper in all three adder kinds at 19 bits
// (the width of the 3-bit multiplier's adder steps). Every instance gets
// the same corner and 3000 random operand pairs and must return a + b.
module tb_cm_adder;
  import bcse_pkg::*;
  localparam int unsigned W = 19;
  logic [W-1:0] a, b, s_buf, s_nand, s_csa;
  logic         c_buf, c_nand, c_csa;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  cm_adder #(.W(W), .KIND(ADD_BUF_RCA))  u_buf  (.a(a), .b(b), .sum(s_buf),  .cout(c_buf));
  cm_adder #(.W(W), .KIND(ADD_NAND_RCA)) u_nand (.a(a), .b(b), .sum(s_nand), .cout(c_nand));
  cm_adder #(.W(W), .KIND(ADD_MOD_CSA))  u_csa  (.a(a), .b(b), .sum(s_csa),  .cout(c_csa));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] x, input logic [W-1:0] z);
    logic [W:0] exp;
    a = x; b = z;
    #1;
    exp = (W+1)'(x) + (W+1)'(z);
    checks += 3;
    if ({c_buf, s_buf} !== exp)   begin failures++; $display("FAIL buf  %h+%h", x, z); end
    if ({c_nand, s_nand} !== exp) begin failures++; $display("FAIL nand %h+%h", x, z); end
    if ({c_csa, s_csa} !== exp)   begin failures++; $display("FAIL csa  %h+%h", x, z); end
  endtask

  initial begin
    check('1, W'(1));
    check('1, '1);
    check('0, '0);
    for (int i = 0; i < 3000; i++) check(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
