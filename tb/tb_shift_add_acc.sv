// tb_shift_add_acc: self-checking test of the adder steps for both group
// sizes of the multiplier: G = 2 with eight groups and G = 3 with six.
// Each partial product is code_j * y for a random input y and random group
// codes (the only values the partial product units produce), with the
// extreme case of all codes maximal and y all ones included. The output must
// be sum_j pp[j] << (G*j), worked out here in 64-bit arithmetic.
module tb_shift_add_acc;
  logic [7:0][17:0] pp2;
  logic [5:0][18:0] pp3;
  logic [31:0] p2;
  logic [33:0] p3;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  shift_add_acc #(.WY(16), .G(2), .NG(8)) u2 (.pp(pp2), .p(p2));
  shift_add_acc #(.WY(16), .G(3), .NG(6)) u3 (.pp(pp3), .p(p3));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [15:0] y, input bit maxed);
    longint e2 = 0, e3 = 0;
    for (int j = 0; j < 8; j++) begin
      int c = maxed ? 3 : int'($urandom_range(3));
      pp2[j] = 18'(c * int'(y));
      e2 += longint'(pp2[j]) << (2*j);
    end
    for (int j = 0; j < 6; j++) begin
      int c = maxed ? 7 : int'($urandom_range(7));
      pp3[j] = 19'(c * int'(y));
      e3 += longint'(pp3[j]) << (3*j);
    end
    #1;
    checks += 2;
    if (longint'(p2) != e2) begin failures++; $display("FAIL G=2 y=%h p=%h exp=%h", y, p2, e2); end
    if (longint'(p3) != e3) begin failures++; $display("FAIL G=3 y=%h p=%h exp=%h", y, p3, e3); end
  endtask

  initial begin
    apply(16'hFFFF, 1'b1);
    apply(16'h0001, 1'b1);
    apply(16'h0000, 1'b0);
    for (int n = 0; n < 5000; n++) apply(16'($urandom), 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
