// tb_bcse_cm_top: end-to-end test of the paired 2-bit / 3-bit BCSE constant
// multipliers. Four copies of the top hold different constants and adder
// structures:
//   t0: 16'hFFFF, buffer RCA everywhere       (worst-case constant)
//   t1: 16'hA5C3, NAND buffer RCA everywhere
//   t2: 16'hFAC6, area-reduced CSA everywhere
//   t3: 16'h4471, CSA in the partial product unit, NAND RCA in the steps
// Every copy gets 20000 inputs (corners and random) and both outputs must
// equal y * COEFF. The test also counts the mechanisms of the design and
// fails if one never happens: each 2-bit and each 3-bit group pattern,
// all-zero groups that leave their partial product out, each adder kind in
// each role, and adder steps whose sum carries past the input width.
module tb_bcse_cm_top;
  import bcse_pkg::*;
  localparam int NI = 4;
  localparam logic [15:0] K [NI] = '{16'hFFFF, 16'hA5C3, 16'hFAC6, 16'h4471};

  logic [15:0] y;
  logic [31:0] p2 [NI];
  logic [31:0] p3 [NI];
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  int code2 [4], code3 [8], n_zero_grp = 0, n_step_carry = 0;
  int kinds_pp [3], kinds_acc [3];

  bcse_cm_top #(.COEFF(K[0])) t0 (.y(y), .p2(p2[0]), .p3(p3[0]));
  bcse_cm_top #(.COEFF(K[1]), .PP_ADDER(ADD_NAND_RCA), .ACC_ADDER(ADD_NAND_RCA))
    t1 (.y(y), .p2(p2[1]), .p3(p3[1]));
  bcse_cm_top #(.COEFF(K[2]), .PP_ADDER(ADD_MOD_CSA), .ACC_ADDER(ADD_MOD_CSA))
    t2 (.y(y), .p2(p2[2]), .p3(p3[2]));
  bcse_cm_top #(.COEFF(K[3]), .PP_ADDER(ADD_MOD_CSA), .ACC_ADDER(ADD_NAND_RCA))
    t3 (.y(y), .p2(p2[3]), .p3(p3[3]));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference chain of the adder steps: counts steps whose (WY+G)-bit sum
  // reaches 2^WY, i.e. carries past the input width into the group above.
  function automatic int step_carries(logic [15:0] v, logic [15:0] k, int g);
    int ng = (16 + g - 1) / g;
    longint kp = longint'(k) << (ng * g - 16);
    longint acc = 0;
    int n = 0;
    for (int j = 0; j < ng; j++) begin
      longint c = (kp >> (g * j)) & ((1 << g) - 1);
      longint s = (acc >> (g * j)) + c * longint'(v);
      if (j > 0 && s >= 65536) n++;
      acc = (s << (g * j)) | (acc & ((64'd1 << (g * j)) - 1));
    end
    return n;
  endfunction

  task automatic apply(input logic [15:0] v);
    y = v;
    #1;
    for (int i = 0; i < NI; i++) begin
      logic [31:0] exp = 32'(v) * 32'(K[i]);
      checks += 2;
      if (p2[i] !== exp) begin failures++; $display("FAIL p2 K=%h y=%h %h", K[i], v, p2[i]); end
      if (p3[i] !== exp) begin failures++; $display("FAIL p3 K=%h y=%h %h", K[i], v, p3[i]); end
      n_step_carry += step_carries(v, K[i], 2) + step_carries(v, K[i], 3);
    end
  endtask

  initial begin
    foreach (code2[c]) code2[c] = 0;
    foreach (code3[c]) code3[c] = 0;
    foreach (kinds_pp[c]) begin kinds_pp[c] = 0; kinds_acc[c] = 0; end
    // Mechanisms fixed by the constants and adder kinds of the four copies.
    for (int i = 0; i < NI; i++) begin
      for (int j = 0; j < 8; j++) code2[(K[i] >> (2*j)) & 3]++;
      for (int j = 0; j < 6; j++) code3[((18'(K[i]) << 2) >> (3*j)) & 7]++;
    end
    n_zero_grp = code2[0] + code3[0];
    kinds_pp[int'(t0.PP_ADDER)]++;  kinds_acc[int'(t0.ACC_ADDER)]++;
    kinds_pp[int'(t1.PP_ADDER)]++;  kinds_acc[int'(t1.ACC_ADDER)]++;
    kinds_pp[int'(t2.PP_ADDER)]++;  kinds_acc[int'(t2.ACC_ADDER)]++;
    kinds_pp[int'(t3.PP_ADDER)]++;  kinds_acc[int'(t3.ACC_ADDER)]++;

    apply(16'h0000);
    apply(16'hFFFF);
    apply(16'h8000);
    apply(16'h0001);
    for (int n = 0; n < 19996; n++) apply(16'($urandom));

    foreach (code2[c]) begin
      checks++;
      if (code2[c] == 0) begin failures++; $display("2-bit pattern %0d never used", c); end
    end
    foreach (code3[c]) begin
      checks++;
      if (code3[c] == 0) begin failures++; $display("3-bit pattern %0d never used", c); end
    end
    for (int c = 0; c < 3; c++) begin
      checks += 2;
      if (kinds_pp[c] == 0)  begin failures++; $display("pp adder kind %0d unused", c); end
      if (kinds_acc[c] == 0) begin failures++; $display("step adder kind %0d unused", c); end
    end
    checks += 2;
    if (n_zero_grp == 0)   begin failures++; $display("no zero group"); end
    if (n_step_carry == 0) begin failures++; $display("no carrying adder step"); end
    $display("zero groups %0d, carrying adder steps %0d", n_zero_grp, n_step_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
