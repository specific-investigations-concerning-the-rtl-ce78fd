// tb_bcse_workloads: the evaluated configurations of the design, a 16-bit
// input times the worst-case 16-bit coefficient 16'hFFFF, with each adder
// structure the design offers: buffer based RCA, NAND buffer based RCA and
// the area-reduced carry select adder, in both the 2-bit and the 3-bit
// multiplier. All 65536 inputs are applied; every output must equal
// y * 16'hFFFF.
module tb_bcse_workloads;
  import bcse_pkg::*;
  logic [15:0] y;
  logic [31:0] p2 [3];
  logic [31:0] p3 [3];
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  bcse_cm_top #(.PP_ADDER(ADD_BUF_RCA),  .ACC_ADDER(ADD_BUF_RCA))  u_buf  (.y(y), .p2(p2[0]), .p3(p3[0]));
  bcse_cm_top #(.PP_ADDER(ADD_NAND_RCA), .ACC_ADDER(ADD_NAND_RCA)) u_nand (.y(y), .p2(p2[1]), .p3(p3[1]));
  bcse_cm_top #(.PP_ADDER(ADD_MOD_CSA),  .ACC_ADDER(ADD_MOD_CSA))  u_csa  (.y(y), .p2(p2[2]), .p3(p3[2]));

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
      for (int i = 0; i < 3; i++) begin
        checks += 2;
        if (p2[i] !== exp) begin failures++; if (failures < 20) $display("FAIL p2 kind %0d y=%h", i, y); end
        if (p3[i] !== exp) begin failures++; if (failures < 20) $display("FAIL p3 kind %0d y=%h", i, y); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
