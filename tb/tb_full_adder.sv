// tb_full_adder: exhaustive check of the one-bit full adder.
// All eight input combinations are applied; {cout, sum} must equal the
// integer sum a + b + cin. A watchdog ends the run if it stalls.
module tb_full_adder;

  logic clk = 1'b0;
  logic a, b, cin, sum, cout;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  full_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    for (int v = 0; v < 8; v++) begin
      @(negedge clk);
      {a, b, cin} = 3'(v);
      @(posedge clk);
      checks++;
      if ({cout, sum} != 2'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0d -> cout=%0d sum=%0d", a, b, cin, cout, sum);
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
