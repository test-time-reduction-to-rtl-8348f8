// tb_pras_rw_unit: drives the column read/write unit with random select, read/write, row
// activity, scan-in and sense values and compares every output with a reference model written
// here: a write drives the line only with the column selected, a read passes the sensed value
// and scan_out keeps the value of the last read cycle.
module tb_pras_rw_unit;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic col_sel, rw, row_act, scan_in, sense;
  logic wr_en, wr_data, rd_data, scan_out;
  logic exp_hold;

  pras_rw_unit dut (.*);

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
      $display("FAIL %s got=%0b exp=%0b (sel=%0b rw=%0b act=%0b si=%0b sense=%0b)",
               what, got, exp, col_sel, rw, row_act, scan_in, sense);
    end
  endtask

  initial begin
    {col_sel, rw, row_act, scan_in, sense} = '0;
    exp_hold = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      {col_sel, rw, row_act, scan_in, sense} = 5'($urandom);
      #1;
      check(wr_en,   rw & col_sel,            "wr_en");
      check(wr_data, scan_in,                 "wr_data");
      check(rd_data, ~rw & row_act & sense,   "rd_data");
      check(scan_out, exp_hold,               "scan_out");
      if (!rw && row_act) exp_hold = sense;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
