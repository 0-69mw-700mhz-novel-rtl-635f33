// tb_and_generator: exhaustive check of the AND generator.
// For every operand pair, every AND term of the four groups is compared with
// x_i & y_j taken straight from the operands (1-based index i = 2a+2 for the
// even half, 2a+1 for the odd half), and the weighted sum of all 64 terms
// must equal x * y.
module tb_and_generator;
  import mult_pkg::*;

  logic       clk = 1'b0;
  logic [7:0] x, y;
  pp_groups_t pp;
  int         checks = 0;
  int         failures = 0;

  always #5 clk = ~clk;

  and_generator dut (.x(x), .y(y), .pp(pp));

  // 1-based operand bit i of v
  function automatic bit obit(logic [7:0] v, int i);
    return v[i-1];
  endfunction

  task automatic check_pair();
    int total = 0;
    int bad = 0;
    for (int a = 0; a < 4; a++) begin
      for (int b = 0; b < 4; b++) begin
        int ie = 2*a + 2, io = 2*a + 1, je = 2*b + 2, jo = 2*b + 1;
        if (pp.ee[a][b] != (obit(x, ie) & obit(y, je))) bad++;
        if (pp.eo[a][b] != (obit(x, ie) & obit(y, jo))) bad++;
        if (pp.oe[a][b] != (obit(x, io) & obit(y, je))) bad++;
        if (pp.oo[a][b] != (obit(x, io) & obit(y, jo))) bad++;
        total += int'(pp.ee[a][b]) << (ie + je - 2);
        total += int'(pp.eo[a][b]) << (ie + jo - 2);
        total += int'(pp.oe[a][b]) << (io + je - 2);
        total += int'(pp.oo[a][b]) << (io + jo - 2);
      end
    end
    checks += 2;
    if (bad != 0) begin
      failures++;
      $display("FAIL x=%02h y=%02h: %0d wrong AND terms", x, y, bad);
    end
    if (total != int'(x) * int'(y)) begin
      failures++;
      $display("FAIL x=%02h y=%02h: weighted sum %0d", x, y, total);
    end
  endtask

  initial begin
    for (int v = 0; v < 65536; v++) begin
      @(negedge clk);
      {x, y} = 16'(v);
      @(posedge clk);
      check_pair();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
