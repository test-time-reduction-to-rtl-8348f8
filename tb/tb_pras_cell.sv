// tb_pras_cell: random phi1 / phi2 / row select / write stimulus on one PRAS cell, compared
// cycle by cycle with a reference model of the two latches: within a cycle a phi1 pulse acts
// before a phi2 pulse, and a sense-line write reaches L1 only with its row selected and phi1 low.
// Also checks explicitly that a value written into L1 does not reach L2 until phi2 (the hold
// property a two-pattern test relies on).
module tb_pras_cell;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic phi1, phi2, d, row_sel, wr_en, wr_data;
  logic l1, q;
  logic m1, m2, n1;

  pras_cell dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%0b exp=%0b", what, got, exp);
    end
  endtask

  initial begin
    {phi1, phi2, d, row_sel, wr_en, wr_data} = '0;
    m1 = 0; m2 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Directed: write 1 into L1 in PRAS mode, L2 keeps 0 until phi2.
    @(negedge clk); row_sel = 1; wr_en = 1; wr_data = 1;
    @(negedge clk); row_sel = 0; wr_en = 0;
    check(l1, 1'b1, "directed L1 written");
    check(q,  1'b0, "directed L2 held");
    @(negedge clk); phi2 = 1;
    @(negedge clk); phi2 = 0;
    check(q, 1'b1, "directed L2 after phi2");
    m1 = 1; m2 = 1;
    // Random.
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      check(l1, m1, "L1");
      check(q,  m2, "L2");
      {phi1, phi2, d, row_sel, wr_en, wr_data} = 6'($urandom);
      if ($urandom_range(3) != 0) {phi1, phi2} = 2'b00;
      n1 = phi1 ? d : ((row_sel && wr_en) ? wr_data : m1);
      if (phi2) m2 = n1;
      m1 = n1;
    end
    @(negedge clk);
    check(l1, m1, "L1 final");
    check(q,  m2, "L2 final");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
