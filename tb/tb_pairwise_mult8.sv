// tb_pairwise_mult8: end-to-end test of the 8x8 pair-wise multiplier at its
// only size.
//
// Three phases, each comparing p with the integer product x * y:
//   1. 50 hand-picked patterns: all pairs of 00, 01, 55, AA, 7F, 80, FE,
//      then FF x FF, the worst-case carry path of the multiplier;
//   2. 350 random patterns;
//   3. every one of the 65536 operand pairs.
// One operand pair is applied per clock period; the multiplier itself is
// combinational, so the result is checked in the same period.
// The test also counts how often each mechanism of the design is exercised
// and fails if one never is: each of the four spare bits (x7y1, x2y7, x7y2,
// x2y8) set, the numbers M and N non-zero, the delayed word D non-zero when
// it enters the 4th level, and a carry crossing the two upper boundaries
// between the 4-bit CLA blocks of the final adder. The low four bits of G
// and H never add up to more than 15, so the lowest block never carries;
// that count is printed only.
module tb_pairwise_mult8;

  logic        clk = 1'b0;
  logic [7:0]  x, y;
  logic [15:0] p;
  int          checks = 0;
  int          failures = 0;
  int          spare_seen [4] = '{0, 0, 0, 0};
  int          m_seen = 0, n_seen = 0, d_seen = 0;
  int          cla_carry_seen [3] = '{0, 0, 0};
  bit          ff_ok = 1'b0;

  always #5 clk = ~clk;

  pairwise_mult8 dut (.x(x), .y(y), .p(p));

  task automatic apply(logic [7:0] vx, logic [7:0] vy);
    @(negedge clk);
    x = vx; y = vy;
    @(posedge clk);
    checks++;
    if (int'(p) != int'(x) * int'(y)) begin
      failures++;
      if (failures < 10) $display("FAIL %02h x %02h -> %04h, expected %04h", x, y, p, int'(x) * int'(y));
    end
    for (int k = 0; k < 4; k++) if (dut.spare[k]) spare_seen[k]++;
    if (dut.m_num != '0) m_seen++;
    if (dut.n_num != '0) n_seen++;
    if (dut.d_num != '0) d_seen++;
    for (int k = 1; k < 4; k++) if (dut.u_cla.c[k]) cla_carry_seen[k-1]++;
  endtask

  task automatic require(string what, int count);
    checks++;
    $display("  %-28s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  localparam logic [7:0] PICKS [7] = '{8'h00, 8'h01, 8'h55, 8'hAA, 8'h7F, 8'h80, 8'hFE};

  initial begin
    // phase 1: intentional patterns
    foreach (PICKS[i]) foreach (PICKS[j]) apply(PICKS[i], PICKS[j]);
    apply(8'hFF, 8'hFF);
    ff_ok = (p == 16'hFE01);
    // phase 2: random patterns
    for (int i = 0; i < 350; i++) apply(8'($urandom), 8'($urandom));
    // phase 3: exhaustive
    for (int v = 0; v < 65536; v++) apply(v[15:8], v[7:0]);

    $display("mechanism counts:");
    require("spare bit x7y1 (M, 2^6)", spare_seen[0]);
    require("spare bit x7y2 (N, 2^7)", spare_seen[1]);
    require("spare bit x2y7 (M, 2^7)", spare_seen[2]);
    require("spare bit x2y8 (M, 2^8)", spare_seen[3]);
    require("M non-zero", m_seen);
    require("N non-zero", n_seen);
    require("D non-zero at 4th level", d_seen);
    // The 3:2 rows leave at most one bit in each of the four lowest
    // columns, so the lowest CLA block never produces a carry: reported only.
    $display("  %-28s %0d (never expected)", "CLA carry into bits 7:4", cla_carry_seen[0]);
    require("CLA carry into bits 11:8", cla_carry_seen[1]);
    require("CLA carry into bits 15:12", cla_carry_seen[2]);
    checks++;
    if (!ff_ok) begin
      failures++;
      $display("FAIL FF x FF");
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
