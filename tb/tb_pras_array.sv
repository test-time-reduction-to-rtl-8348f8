// tb_pras_array: random reads, single-flip-flop writes, phi1, phi2 and normal-mode (both
// phases) cycles on a 3 x 5 PRAS array, compared with a reference model of the L1 and L2 bits
// kept here. Checks the row read value in the read cycle, the held scan_out, every data-out
// line, and that a write touches exactly the addressed flip-flop.
module tb_pras_array;
  localparam int NR = 3, NC = 5, NF = NR * NC;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic phi1, phi2, row_en, col_en, rw, scan_in;
  logic [1:0] row_addr;
  logic [2:0] col_addr;
  logic [NF-1:0] d, q;
  logic [NC-1:0] rd_data, scan_out;

  logic [NF-1:0] m1, m2, n1;
  logic [NC-1:0] mhold, mrow;
  int reads = 0, writes = 0;

  pras_array #(.N_ROW(NR), .N_COL(NC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [NF-1:0] got, input logic [NF-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    {phi1, phi2, row_en, col_en, rw, scan_in} = '0;
    row_addr = '0; col_addr = '0; d = '0;
    m1 = '0; m2 = '0; mhold = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int op;
      @(negedge clk);
      check(q, m2, "data-out (L2)");
      check(NF'(scan_out), NF'(mhold), "scan_out");
      {phi1, phi2, row_en, col_en, rw, scan_in} = '0;
      d = NF'({$urandom, $urandom});
      row_addr = 2'($urandom_range(NR - 1));
      col_addr = 3'($urandom_range(NC - 1));
      scan_in  = 1'($urandom);
      op = $urandom_range(5);
      n1 = m1;
      unique case (op)
        0: begin row_en = 1; rw = 0; end                     // row read
        1, 2: begin row_en = 1; col_en = 1; rw = 1; end      // write one flip-flop
        3: phi1 = 1;
        4: phi2 = 1;
        default: begin phi1 = 1; phi2 = 1; end                // normal mode cycle
      endcase
      #1;
      if (op == 0) begin
        for (int c = 0; c < NC; c++) mrow[c] = m1[int'(row_addr)*NC+c];
        check(NF'(rd_data), NF'(mrow), "row read data");
        mhold = mrow;
        reads++;
      end
      if (op == 1 || op == 2) begin
        n1[int'(row_addr)*NC+int'(col_addr)] = scan_in;
        writes++;
      end
      if (phi1) n1 = d;
      if (phi2) m2 = n1;
      m1 = n1;
    end
    @(negedge clk);
    check(q, m2, "data-out final");
    checks++;
    if (reads == 0 || writes == 0) failures++;
    $display("reads=%0d writes=%0d", reads, writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
