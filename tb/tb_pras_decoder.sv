// tb_pras_decoder: exhaustive check of the select-line decoder at its default size (16 lines)
// and at a size that is not a power of two (5 lines, so addresses 5..7 select nothing).
// Expected lines are computed here as 1 << addr with an explicit range check.
module tb_pras_decoder;
  int checks = 0, failures = 0;

  logic        en16, en5;
  logic [3:0]  a16;
  logic [2:0]  a5;
  logic [15:0] s16;
  logic [4:0]  s5;

  pras_decoder                  dut16 (.en(en16), .addr(a16), .sel(s16));
  pras_decoder #(.N(5), .AW(3)) dut5  (.en(en5),  .addr(a5),  .sel(s5));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int a = 0; a < 16; a++) begin
        logic [15:0] exp16;
        en16 = e[0];
        a16  = 4'(a);
        #1;
        exp16 = e[0] ? (16'd1 << a) : 16'd0;
        checks++;
        if (s16 !== exp16) begin
          failures++;
          $display("FAIL N=16 en=%0d addr=%0d sel=%h exp=%h", e, a, s16, exp16);
        end
      end
      for (int a = 0; a < 8; a++) begin
        logic [4:0] exp5;
        en5 = e[0];
        a5  = 3'(a);
        #1;
        exp5 = (e[0] && a < 5) ? 5'(1 << a) : 5'd0;
        checks++;
        if (s5 !== exp5) begin
          failures++;
          $display("FAIL N=5 en=%0d addr=%0d sel=%b exp=%b", e, a, s5, exp5);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
