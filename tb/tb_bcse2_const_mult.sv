// tb_bcse2_const_mult: self-checking test of the 2-bit BCSE constant
// multiplier. The worst-case constant 16'hFFFF (default adders) is checked
// for every 16-bit input. Further instances hold other constants and the
// other adder kinds: the NAND ripple carry adder, the area-reduced carry
// select adder, a single set bit at either end, a zero constant. These get
// corner and random inputs. Every output must equal y * COEFF exactly.
module tb_bcse2_const_mult;
  import bcse_pkg::*;
  localparam int NI = 6;
  localparam logic [15:0] K [NI] = '{16'hFFFF, 16'hA5C3, 16'h4471, 16'h8000, 16'h0001, 16'h0000};

  logic [15:0] y;
  logic [31:0] p [NI];
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  bcse2_const_mult                                                   u0 (.y(y), .p(p[0]));
  bcse2_const_mult #(.COEFF(K[1]), .PP_ADDER(ADD_NAND_RCA), .ACC_ADDER(ADD_NAND_RCA)) u1 (.y(y), .p(p[1]));
  bcse2_const_mult #(.COEFF(K[2]), .PP_ADDER(ADD_MOD_CSA), .ACC_ADDER(ADD_MOD_CSA))   u2 (.y(y), .p(p[2]));
  bcse2_const_mult #(.COEFF(K[3]), .ACC_ADDER(ADD_MOD_CSA))                           u3 (.y(y), .p(p[3]));
  bcse2_const_mult #(.COEFF(K[4]), .PP_ADDER(ADD_MOD_CSA))                            u4 (.y(y), .p(p[4]));
  bcse2_const_mult #(.COEFF(K[5]))                                                    u5 (.y(y), .p(p[5]));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int i, input logic [15:0] v);
    logic [31:0] exp = 32'(v) * 32'(K[i]);
    checks++;
    if (p[i] !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL K=%h y=%h p=%h exp=%h", K[i], v, p[i], exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 65536; v++) begin
      y = 16'(v);
      #1;
      check(0, y);
      if (v < 16 || v > 65519 || v % 16 == 7) for (int i = 1; i < NI; i++) check(i, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
