// tb_pras_top: end-to-end test of the PRAS path-delay test design at its default size
// (15 x 16 = 240 flip-flops, no parameter overrides).
//
// The circuit's combinational logic is modelled here by a fixed function f of the flip-flop
// outputs (cut_d = f(cut_q)). The run goes through:
//   1. normal mode: q follows f(q) every cycle;
//   2. a back-to-back session of independent and linked tests ending with an unload;
//   3. normal mode again, then one more independent test and unload from that state.
// Each command's expected outcome is computed at the level of whole test steps (see
// tb_pras_test_sequencer): write counts, P-load decision, row reads, cycle count, the vector
// applied to the logic (cut_q) after the command and the L1 content seen by later reads. Every
// observed row is compared. The number of cycles the sequencer is busy must equal the sum of the
// per-command cycle counts, and a command may wait in idle only after an unload or normal mode.
// Counted mechanisms, each required at least once: normal-mode cycles, row reads, I writes,
// don't-care bits left unwritten, P loads, J writes, rows skipped during J writes, tests with no
// J write, linked tests, unloads, commands accepted in the last cycle of the previous test.
module tb_pras_top;
  import pras_pkg::*;
  localparam int NR = 15, NC = 16, NF = NR * NC;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic func_mode;
  logic cmd_valid, cmd_ready;
  pras_cmd_kind_e cmd_kind;
  logic [NF-1:0] cmd_i, cmd_i_care, cmd_j, cmd_j_care, cmd_resp;
  logic [NF-1:0] cut_q, cut_d;
  logic obs_valid;
  logic [3:0] obs_row;
  logic [NC-1:0] obs_data, scan_out;
  logic busy, done;
  pras_stats_t stats;

  pras_top dut (.*);

  always #5 clk = ~clk;

  function automatic logic [NF-1:0] f_cut(input logic [NF-1:0] x);
    return {x[NF-8:0], x[NF-1:NF-7]} ^ (x & {x[1:0], x[NF-1:2]}) ^ {(NF/8){8'h96}};
  endfunction
  assign cut_d = f_cut(cut_q);

  function automatic logic [NF-1:0] rvec();
    logic [NF-1:0] v;
    for (int k = 0; k < NF; k += 32) v[k +: 32] = $urandom;
    return v;
  endfunction

  function automatic int hd(input logic [NF-1:0] a, input logic [NF-1:0] b, input logic [NF-1:0] m);
    return $countones((a ^ b) & m);
  endfunction

  function automatic int rows_hit(input logic [NF-1:0] m);
    int n = 0;
    for (int r = 0; r < NR; r++) if (m[r*NC +: NC] != '0) n++;
    return n;
  endfunction

  task automatic check(input logic [NF-1:0] got, input logic [NF-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  typedef struct {
    pras_stats_t   st;
    logic [NF-1:0] l2;
  } exp_t;
  exp_t expq[$];
  logic [NC-1:0] obsq[$];

  // mechanism counters
  int m_normal = 0, m_read = 0, m_wi = 0, m_xskip = 0, m_pload = 0, m_wj = 0, m_rowskip = 0;
  int m_nowj = 0, m_link = 0, m_unload = 0, m_b2b = 0;
  longint busy_cycles = 0, exp_busy = 0;
  int idle_accepts = 0, exp_idle_accepts = 0;

  always @(posedge clk) if (rst_n) begin
    if (busy) busy_cycles++;
    if (cmd_valid && cmd_ready && !busy) idle_accepts++;
    if (cmd_valid && cmd_ready && busy) m_b2b++;
  end

  always @(negedge clk) if (rst_n) begin
    if (obs_valid) begin
      logic [NC-1:0] e;
      e = (obsq.size() > 0) ? obsq.pop_front() : ~obs_data;
      check(NF'(obs_data), NF'(e), "observed row");
      m_read++;
    end
    if (done) begin
      exp_t e;
      e = expq.pop_front();
      check(NF'(stats.n_wi), NF'(e.st.n_wi), "n_WI");
      check(NF'(stats.n_wj), NF'(e.st.n_wj), "n_WJ");
      check(NF'(stats.n_read), NF'(e.st.n_read), "row reads");
      check(NF'(stats.p_loaded), NF'(e.st.p_loaded), "P loaded");
      check(NF'(stats.cycles), NF'(e.st.cycles), "cycles");
      check(cut_q, e.l2, "vector applied to the logic");
    end
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [NF-1:0] g1, g2;   // golden L1 and L2

  // Offer one command; the expected outcome is queued. kind 0 = indep, 1 = linked, 2 = unload.
  task automatic issue(input int kind, input int flavour);
    exp_t e;
    logic [NF-1:0] i, ic, j, jc, l1a, p, base, l1b;
    e.st = '0;
    i  = rvec();
    ic = rvec() | rvec() | rvec();          // about 1 bit in 8 is a don't-care
    jc = rvec() | rvec() | rvec();
    j  = '0;
    if (kind == 0) begin
      for (int r = 0; r < NR; r++) obsq.push_back(g1[r*NC +: NC]);
      l1a = (g1 & ~ic) | (i & ic);
      p   = f_cut(l1a);
      // J differs from I (or from P) in a few bits only, as a path-delay test does.
      j = l1a;
      if (flavour == 1) j = p;
      if (flavour != 2) for (int k = 0; k < 1 + $urandom_range(6); k++) j[$urandom_range(NF - 1)] ^= 1'b1;
      e.st.n_wi = 16'(hd(g1, i, ic));
      e.st.p_loaded = hd(p, j, jc) < hd(l1a, j, jc);
      base = e.st.p_loaded ? p : l1a;
      e.st.n_wj = 16'(hd(base, j, jc));
      e.st.n_read = 16'(NR);
      e.st.cycles = 32'(NR) + 32'(e.st.n_wi) + 1 + 32'(e.st.p_loaded) + 32'(e.st.n_wj) + 2;
      if (((g1 ^ i) & ~ic) != '0) m_xskip++;
      if (e.st.p_loaded) m_pload++;
      if (e.st.n_wi != 0) m_wi++;
      if (rows_hit(jc & (base ^ j)) > 0 && rows_hit(jc & (base ^ j)) < NR) m_rowskip++;
      l1b = (base & ~jc) | (j & jc);
      g2 = l1b;
      g1 = f_cut(l1b);
      cmd_kind = CMD_INDEP;
      cmd_resp = p;
    end else if (kind == 1) begin
      j = g1;
      for (int k = 0; k < $urandom_range(5); k++) j[$urandom_range(NF - 1)] ^= 1'b1;
      e.st.n_wj = 16'(hd(g1, j, jc));
      e.st.cycles = 32'(e.st.n_wj) + 2;
      if (rows_hit(jc & (g1 ^ j)) > 0 && rows_hit(jc & (g1 ^ j)) < NR) m_rowskip++;
      cmd_resp = g1;
      l1b = (g1 & ~jc) | (j & jc);
      g2 = l1b;
      g1 = f_cut(l1b);
      cmd_kind = CMD_LINK;
      m_link++;
    end else begin
      for (int r = 0; r < NR; r++) obsq.push_back(g1[r*NC +: NC]);
      e.st.n_read = 16'(NR);
      e.st.cycles = 32'(NR);
      cmd_kind = CMD_UNLOAD;
      m_unload++;
    end
    if (kind != 2 && e.st.n_wj == 0) m_nowj++;
    if (e.st.n_wj != 0) m_wj++;
    e.l2 = g2;
    expq.push_back(e);
    exp_busy += e.st.cycles;
    cmd_i = i; cmd_i_care = ic; cmd_j = j; cmd_j_care = jc;
    cmd_valid = 1;
    #1;
    while (!cmd_ready) begin
      @(negedge clk);
      #1;
    end
    @(posedge clk);
    #1;
  endtask

  task automatic wait_idle();
    @(negedge clk);
    cmd_valid = 0;
    while (busy || expq.size() > 0) @(negedge clk);
  endtask

  task automatic run_normal(input int n);
    func_mode = 1;
    for (int k = 0; k < n; k++) begin
      logic [NF-1:0] q_prev;
      q_prev = cut_q;
      @(negedge clk);
      check(cut_q, f_cut(q_prev), "normal-mode next state");
      g1 = cut_q; g2 = cut_q;     // L1 and L2 both hold the state
      m_normal++;
    end
    func_mode = 0;
  endtask

  initial begin
    func_mode = 0; cmd_valid = 0; cmd_kind = CMD_INDEP;
    cmd_i = '0; cmd_i_care = '0; cmd_j = '0; cmd_j_care = '0; cmd_resp = '0;
    g1 = '0; g2 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // 1. normal mode
    run_normal(20);
    // 2. test session, back to back
    exp_idle_accepts++;
    issue(0, 0);
    for (int n = 0; n < 60; n++) begin
      int k;
      k = $urandom_range(9);
      if (k < 5)      issue(0, k % 3);
      else            issue(1, 0);
    end
    issue(2, 0);
    wait_idle();
    // 3. normal mode, then one more test from the new state
    run_normal(10);
    exp_idle_accepts++;
    issue(0, 1);
    issue(1, 0);
    issue(2, 0);
    wait_idle();
    repeat (2) @(negedge clk);

    check(NF'(busy_cycles), NF'(exp_busy), "busy cycles = sum of per-command cycles");
    check(NF'(idle_accepts), NF'(exp_idle_accepts), "commands that waited in idle");
    $display("mechanisms: normal=%0d reads=%0d I-writes=%0d X-skips=%0d P-loads=%0d J-writes=%0d row-skips=%0d no-J-write=%0d linked=%0d unloads=%0d back-to-back=%0d",
             m_normal, m_read, m_wi, m_xskip, m_pload, m_wj, m_rowskip, m_nowj, m_link, m_unload, m_b2b);
    if (m_normal == 0) begin failures++; $display("FAIL no normal-mode cycle"); end
    if (m_read == 0)   begin failures++; $display("FAIL no row read"); end
    if (m_wi == 0)     begin failures++; $display("FAIL no I write"); end
    if (m_xskip == 0)  begin failures++; $display("FAIL no don't-care skip"); end
    if (m_pload == 0)  begin failures++; $display("FAIL no P load"); end
    if (m_wj == 0)     begin failures++; $display("FAIL no J write"); end
    if (m_rowskip == 0) begin failures++; $display("FAIL no row skipped in J writes"); end
    if (m_nowj == 0)   begin failures++; $display("FAIL no test without J writes"); end
    if (m_link == 0)   begin failures++; $display("FAIL no linked test"); end
    if (m_unload == 0) begin failures++; $display("FAIL no unload"); end
    if (m_b2b == 0)    begin failures++; $display("FAIL no back-to-back accept"); end
    checks += 11;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
