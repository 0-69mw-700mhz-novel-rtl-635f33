// tb_csa_row: check of one 16-bit three-to-two row.
// Random and corner-case triples are applied; the row must keep the total,
// s + cy + cout * 2^16 = a + b + c, produce s = a ^ b ^ c bit by bit, and
// keep cy[0] = 0. The row is used at its default width of 16 bits.
module tb_csa_row;

  localparam int unsigned W = 16;

  logic         clk = 1'b0;
  logic [W-1:0] a, b, c, s, cy;
  logic         cout;
  int           checks = 0;
  int           failures = 0;

  always #5 clk = ~clk;

  csa_row dut (.a(a), .b(b), .c(c), .s(s), .cy(cy), .cout(cout));

  task automatic apply(logic [W-1:0] va, logic [W-1:0] vb, logic [W-1:0] vc);
    longint exp_total;
    longint got_total;
    @(negedge clk);
    a = va; b = vb; c = vc;
    @(posedge clk);
    exp_total = longint'(a) + longint'(b) + longint'(c);
    got_total = longint'(s) + longint'(cy) + (longint'(cout) << W);
    checks += 3;
    if (got_total != exp_total) begin
      failures++;
      $display("FAIL total a=%h b=%h c=%h -> s=%h cy=%h cout=%0d", a, b, c, s, cy, cout);
    end
    if (s != (a ^ b ^ c)) begin
      failures++;
      $display("FAIL sum word a=%h b=%h c=%h -> s=%h", a, b, c, s);
    end
    if (cy[0] != 1'b0) begin
      failures++;
      $display("FAIL cy[0] set");
    end
  endtask

  initial begin
    apply('0, '0, '0);
    apply('1, '1, '1);
    apply('1, '0, '0);
    apply(16'h8000, 16'h8000, 16'h0000);
    apply(16'h5555, 16'hAAAA, 16'hFFFF);
    for (int i = 0; i < 5000; i++)
      apply(W'($urandom), W'($urandom), W'($urandom));
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
