// tb_adder_level1: exhaustive check of the 1st adder level.
// The testbench builds the AND terms itself from every operand pair and
// checks, group by group, that the partial product plus its spare bit at the
// spare's weight equals the group's true product (x_e*y_e, x_e*y_o, x_o*y_e,
// x_o*y_o as integers), that each spare bit is the expected term (x2y8,
// x2y7, x7y2, x7y1), and that the zero/carry pattern leaves no bit below
// the group's lowest weight set.
module tb_adder_level1;
  import mult_pkg::*;

  logic        clk = 1'b0;
  logic [7:0]  x, y;
  pp_groups_t  pp;
  logic [15:0] p_ee, p_eo, p_oe, p_oo;
  logic [3:0]  spare;
  int          checks = 0;
  int          failures = 0;

  always #5 clk = ~clk;

  adder_level1 dut (
    .pp(pp), .p_ee(p_ee), .p_eo(p_eo), .p_oe(p_oe), .p_oo(p_oo), .spare(spare)
  );

  function automatic int half_val(logic [7:0] v, bit odd);
    int r = 0;
    for (int i = 0; i < 8; i++)
      if ((i % 2 == 0) == odd) r += int'(v[i]) << i;
    return r;
  endfunction

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL x=%02h y=%02h %s: got %0d expected %0d", x, y, what, got, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 65536; v++) begin
      @(negedge clk);
      {x, y} = 16'(v);
      for (int a = 0; a < 4; a++)
        for (int b = 0; b < 4; b++) begin
          pp.ee[a][b] = x[2*a+1] & y[2*b+1];
          pp.eo[a][b] = x[2*a+1] & y[2*b];
          pp.oe[a][b] = x[2*a]   & y[2*b+1];
          pp.oo[a][b] = x[2*a]   & y[2*b];
        end
      @(posedge clk);
      expect_eq("Pee", int'(p_ee) + (int'(spare[3]) << 8), half_val(x, 0) * half_val(y, 0));
      expect_eq("Peo", int'(p_eo) + (int'(spare[2]) << 7), half_val(x, 0) * half_val(y, 1));
      expect_eq("Poe", int'(p_oe) + (int'(spare[1]) << 7), half_val(x, 1) * half_val(y, 0));
      expect_eq("Poo", int'(p_oo) + (int'(spare[0]) << 6), half_val(x, 1) * half_val(y, 1));
      expect_eq("spare", int'(spare),
                int'({x[1] & y[7], x[1] & y[6], x[6] & y[1], x[6] & y[0]}));
      expect_eq("low bits", int'({p_ee[1:0], p_eo[0], p_oe[0]}), 0);
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
