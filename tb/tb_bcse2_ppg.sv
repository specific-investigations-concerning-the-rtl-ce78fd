// tb_bcse2_ppg: self-checking test of the 2-bit BCSE partial product unit.
// Three instances hold the constants 16'hFFFF, 16'hA5C3 and 16'h1E4B, which together
// contain each of the codes 00, 01, 10 and 11. For the input values 0, 1, all ones and 3000 random
// ones, every partial product pp[j] must equal code_j * y, where code_j is
// the j-th 2-bit group of the constant (group 0 the least significant,
// the constant padded with zeros on the right to whole groups).
module tb_bcse2_ppg;
  localparam int G   = 2;
  localparam int NG  = 8;
  localparam int PAD = NG * G - 16;
  localparam logic [15:0] K [3] = '{16'hFFFF, 16'hA5C3, 16'h1E4B};

  logic [15:0] y;
  logic [NG-1:0][15+G:0] pp [3];
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  int seen [2**G];

  bcse2_ppg #(.COEFF(K[0])) u0 (.y(y), .pp(pp[0]));
  bcse2_ppg #(.COEFF(K[1])) u1 (.y(y), .pp(pp[1]));
  bcse2_ppg #(.COEFF(K[2])) u2 (.y(y), .pp(pp[2]));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int code(logic [15:0] k, int j);
    logic [NG*G-1:0] kp = (NG*G)'(k) << PAD;
    return int'((kp >> (G*j)) & ((1 << G) - 1));
  endfunction

  task automatic apply(input logic [15:0] v);
    y = v;
    #1;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < NG; j++) begin
        checks++;
        seen[code(K[i], j)]++;
        if (pp[i][j] !== (16+G)'(code(K[i], j) * int'(v))) begin
          failures++;
          $display("FAIL K=%h group %0d y=%h pp=%h", K[i], j, v, pp[i][j]);
        end
      end
  endtask

  initial begin
    foreach (seen[c]) seen[c] = 0;
    apply(16'h0000);
    apply(16'h0001);
    apply(16'hFFFF);
    for (int n = 0; n < 3000; n++) apply(16'($urandom));
    for (int c = 0; c < 2**G; c++) begin
      checks++;
      if (seen[c] == 0) begin failures++; $display("code %0d never used", c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
