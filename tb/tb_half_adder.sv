// tb_half_adder: exhaustive check of the one-bit half adder.
// All four input combinations are applied; {cout, sum} must equal a + b.
module tb_half_adder;

  logic clk = 1'b0;
  logic a, b, sum, cout;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  half_adder dut (.a(a), .b(b), .sum(sum), .cout(cout));

  initial begin
    for (int v = 0; v < 4; v++) begin
      @(negedge clk);
      {a, b} = 2'(v);
      @(posedge clk);
      checks++;
      if ({cout, sum} != 2'(int'(a) + int'(b))) begin
        failures++;
        $display("FAIL a=%0d b=%0d -> cout=%0d sum=%0d", a, b, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
