// tb_cla16: check of the 16-bit adder built from four 4-bit CLA blocks.
// Corner cases (carries rippling through every block boundary) and random
// operands; {cout, sum} must equal a + b. The test also counts how often a
// carry crosses each of the three block boundaries and fails if one never
// does.
module tb_cla16;

  logic        clk = 1'b0;
  logic [15:0] a, b, sum;
  logic        cout;
  int          checks = 0;
  int          failures = 0;
  int          boundary_carries [3] = '{0, 0, 0};

  always #5 clk = ~clk;

  cla16 dut (.a(a), .b(b), .sum(sum), .cout(cout));

  task automatic apply(logic [15:0] va, logic [15:0] vb);
    int exp_sum;
    @(negedge clk);
    a = va; b = vb;
    @(posedge clk);
    exp_sum = int'(a) + int'(b);
    checks++;
    if ({cout, sum} != 17'(exp_sum)) begin
      failures++;
      $display("FAIL a=%h b=%h -> %h expected %h", a, b, {cout, sum}, exp_sum);
    end
    // carry into block k = carry out of the low 4k bits
    for (int k = 1; k < 4; k++)
      if (((int'(a) & ((1 << 4*k) - 1)) + (int'(b) & ((1 << 4*k) - 1))) >> (4*k) != 0)
        boundary_carries[k-1]++;
  endtask

  initial begin
    apply(16'h0000, 16'h0000);
    apply(16'hFFFF, 16'h0001);
    apply(16'hFFFF, 16'hFFFF);
    apply(16'h000F, 16'h0001);
    apply(16'h00FF, 16'h0001);
    apply(16'h0FFF, 16'h0001);
    apply(16'h8000, 16'h8000);
    for (int i = 0; i < 5000; i++)
      apply(16'($urandom), 16'($urandom));
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (boundary_carries[k] == 0) begin
        failures++;
        $display("FAIL no carry crossed block boundary %0d", k + 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
