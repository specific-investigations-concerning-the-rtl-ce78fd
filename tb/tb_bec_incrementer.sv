// tb_bec_incrementer: exhaustive test of the 16-bit incrementer. Every
// input d is applied and {cout, q} is compared with d + 1; the wrap from
// all ones, which sets cout, is among them.
module tb_bec_incrementer;
  logic [15:0] d, q;
  logic        cout;
  logic clk = 1'b0;
  int checks = 0, failures = 0, n_wrap = 0;

  bec_incrementer dut (.d(d), .q(q), .cout(cout));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      d = 16'(v);
      #1;
      checks++;
      if ({cout, q} !== 17'(v) + 17'd1) begin
        failures++;
        if (failures < 10) $display("FAIL d=%h q=%h cout=%b", d, q, cout);
      end
      if (cout) n_wrap++;
    end
    checks++;
    if (n_wrap != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
