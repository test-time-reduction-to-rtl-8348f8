// tb_pras_s27_example: the worked example of the PRAS path-delay test scheme on the three
// flip-flops of the ISCAS'89 circuit s27, arranged as one row of three cells.
//
// Six state vectors and the next states they produce (primary inputs held fixed) are:
//   v1 010 -> 010   v2 011 -> 011   v3 000 -> 100
//   v4 110 -> 001   v5 010 -> 010   v6 110 -> 001
// The logic is modelled here by exactly this lookup. Before each scenario the flip-flops are
// set to 101 through one normal-mode clock, so that the first test must write all three bits
// (the "unknown start" of the example).
//   A. Independent tests 1 = (v1,v2), 2 = (v3,v4), 3 = (v5,v6) in the order 1, 3, 2:
//      writes per test 4, 2, 2 (total 8); test 2 loads P (HD(P,J) = 1 < HD(I,J) = 2).
//   B. The same tests in the order 1, 2, 3: writes 4, 3, 3 (total 10).
//   C. Five linked tests over v1..v6: 10 writes in all, a write rate of 10 / (5 * 3) = 67 %.
// For A and B the testbench also checks the clock cycle count: the reference count of the
// scheme, sum(n_WI + n_WJ) + (n_ROW + 2) * S + n_ROW, plus one cycle per test for the Q-latch
// pulse and one per P load, which this implementation spends in cycles of their own.
module tb_pras_s27_example;
  import pras_pkg::*;
  localparam int NR = 1, NC = 3, NF = 3;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic func_mode;
  logic cmd_valid, cmd_ready;
  pras_cmd_kind_e cmd_kind;
  logic [NF-1:0] cmd_i, cmd_i_care, cmd_j, cmd_j_care, cmd_resp;
  logic [NF-1:0] cut_q, cut_d;
  logic obs_valid;
  logic [0:0] obs_row;
  logic [NC-1:0] obs_data, scan_out;
  logic busy, done;
  pras_stats_t stats;
  logic          force_en;
  logic [NF-1:0] force_val;

  pras_top #(.N_ROW(NR), .N_COL(NC)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [NF-1:0] s27_next(input logic [NF-1:0] x);
    unique case (x)
      3'b010:  return 3'b010;
      3'b011:  return 3'b011;
      3'b000:  return 3'b100;
      3'b110:  return 3'b001;
      default: return x;
    endcase
  endfunction
  assign cut_d = force_en ? force_val : s27_next(cut_q);

  localparam logic [NF-1:0] V[1:6] = '{3'b010, 3'b011, 3'b000, 3'b110, 3'b010, 3'b110};

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  longint busy_cycles = 0;
  int sum_w = 0, sum_pl = 0, n_done = 0;
  int w_log[$];
  always @(posedge clk) if (rst_n && busy) busy_cycles++;
  always @(negedge clk) if (rst_n && done) begin
    sum_w  += int'(stats.n_wi) + int'(stats.n_wj);
    sum_pl += int'(stats.p_loaded);
    if (!(stats.n_read != 0 && stats.n_wi == 0 && stats.n_wj == 0 && stats.cycles == NR))
      w_log.push_back(int'(stats.n_wi) + int'(stats.n_wj));
    n_done++;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input pras_cmd_kind_e k, input logic [NF-1:0] i, input logic [NF-1:0] j,
                      input logic [NF-1:0] resp);
    cmd_kind = k; cmd_i = i; cmd_j = j; cmd_resp = resp;
    cmd_i_care = '1; cmd_j_care = '1;
    cmd_valid = 1;
    #1;
    while (!cmd_ready) begin
      @(negedge clk);
      #1;
    end
    @(posedge clk);
    #1;
  endtask

  task automatic finish_session();
    send(CMD_UNLOAD, '0, '0, '0);
    @(negedge clk);
    cmd_valid = 0;
    while (busy || done) @(negedge clk);
  endtask

  task automatic precondition();
    busy_cycles = 0; sum_w = 0; sum_pl = 0; w_log.delete();
    force_en = 1; force_val = 3'b101; func_mode = 1;
    @(negedge clk);
    force_en = 0; func_mode = 0;
    checks++;
    if (cut_q !== 3'b101) begin failures++; $display("FAIL precondition"); end
  endtask

  task automatic indep(input int t);   // test t = (v(2t-1), v(2t))
    send(CMD_INDEP, V[2*t-1], V[2*t], s27_next(V[2*t-1]));
  endtask

  initial begin
    cmd_valid = 0; func_mode = 0; force_en = 0; force_val = '0;
    cmd_kind = CMD_INDEP; cmd_i = '0; cmd_j = '0; cmd_i_care = '0; cmd_j_care = '0; cmd_resp = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // A: order 1, 3, 2
    precondition();
    indep(1); indep(3); indep(2);
    finish_session();
    check(w_log.size(), 3, "A tests");
    if (w_log.size() == 3) begin
      check(w_log[0], 4, "A cost X->1");
      check(w_log[1], 2, "A cost 1->3");
      check(w_log[2], 2, "A cost 3->2");
    end
    check(sum_w, 8, "A total writes");
    check(sum_pl, 1, "A P loads");
    check(busy_cycles, 8 + (NR + 2) * 3 + NR + 3 + 1, "A cycles");
    $display("A: writes=%0d cycles=%0d (reference count %0d, serial scan %0d)",
             sum_w, busy_cycles, sum_w + (NR + 2) * 3 + NR, (2 * NF + 1) * 3 + NF);

    // B: order 1, 2, 3
    precondition();
    indep(1); indep(2); indep(3);
    finish_session();
    check(w_log.size(), 3, "B tests");
    if (w_log.size() == 3) begin
      check(w_log[0], 4, "B cost X->1");
      check(w_log[1], 3, "B cost 1->2");
      check(w_log[2], 3, "B cost 2->3");
    end
    check(sum_w, 10, "B total writes");
    check(busy_cycles, 10 + (NR + 2) * 3 + NR + 3 + sum_pl, "B cycles");

    // C: five linked tests
    precondition();
    send(CMD_INDEP, V[1], V[2], s27_next(V[1]));
    for (int t = 3; t <= 6; t++) send(CMD_LINK, '0, V[t], s27_next(V[t-1]));
    finish_session();
    check(w_log.size(), 5, "C tests");
    check(sum_w, 10, "C total writes");
    check((100 * sum_w + (5 * NF) / 2) / (5 * NF), 67, "C write rate percent");
    // 1st test: read, 3 I writes, I apply, 1 J write, J apply, Q latch; then n_WJ + 2 per test.
    check(busy_cycles, (NR + 3 + 1 + 1 + 2) + (2 + 2) + (1 + 2) + (2 + 2) + (1 + 2) + NR, "C cycles");
    $display("C: writes=%0d cycles=%0d serial scan %0d", sum_w, busy_cycles, (NF + 1) * 5 + 2 * NF);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
