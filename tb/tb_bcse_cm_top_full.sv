// tb_bcse_cm_top_full: the design at its default size and constant (16-bit
// input, worst-case coefficient 16'hFFFF, buffer based RCA adders) through
// every one of its 65536 inputs. Both the 2-bit and the 3-bit multiplier
// output must equal y * 16'hFFFF.
module tb_bcse_cm_top_full;
  logic [15:0] y;
  logic [31:0] p2, p3;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  bcse_cm_top dut (.y(y), .p2(p2), .p3(p3));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp;
    for (int v = 0; v < 65536; v++) begin
      exp = 32'(v) * 32'hFFFF;
      y = 16'(v);
      #1;
      checks += 2;
      if (p2 !== exp) begin failures++; if (failures < 20) $display("FAIL p2 y=%h %h", y, p2); end
      if (p3 !== exp) begin failures++; if (failures < 20) $display("FAIL p3 y=%h %h", y, p3); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
