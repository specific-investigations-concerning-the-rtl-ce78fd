// tb_buf_full_adder: exhaustive test of the buffer based full adder.
// All eight input patterns are applied; sum and carry are compared with
// a ^ b ^ c and the majority of a, b, c. Both paths of the cell, the
// incrementer skip (b == c) and the increment (b != c), are counted and
// must each be taken.
module tb_buf_full_adder;
  logic a, b, c, sum, cout;
  logic clk = 1'b0;
  int checks = 0, failures = 0, n_skip = 0, n_inc = 0;

  buf_full_adder dut (.a(a), .b(b), .c(c), .sum(sum), .cout(cout));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (sum !== (a ^ b ^ c) || cout !== ((a & b) | (a & c) | (b & c))) begin
        failures++;
        $display("FAIL a=%b b=%b c=%b sum=%b cout=%b", a, b, c, sum, cout);
      end
      if (b == c) n_skip++; else n_inc++;
    end
    checks++;
    if (n_skip == 0 || n_inc == 0) failures++;
    $display("skip path %0d, increment path %0d", n_skip, n_inc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
