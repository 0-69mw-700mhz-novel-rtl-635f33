// tb_cla4: exhaustive check of the 4-bit carry-lookahead adder.
// All 512 combinations of a, b and cin; {cout, sum} must equal a + b + cin.
module tb_cla4;

  logic       clk = 1'b0;
  logic [3:0] a, b, sum;
  logic       cin, cout;
  int         checks = 0;
  int         failures = 0;

  always #5 clk = ~clk;

  cla4 dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    for (int v = 0; v < 512; v++) begin
      @(negedge clk);
      {cin, a, b} = 9'(v);
      @(posedge clk);
      checks++;
      if ({cout, sum} != 5'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0d -> %0d", a, b, cin, {cout, sum});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
