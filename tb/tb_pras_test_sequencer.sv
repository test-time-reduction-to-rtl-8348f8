// tb_pras_test_sequencer: runs random independent, linked and unload commands through the
// sequencer, back to back, against a cycle-level model of a 4 x 5 PRAS array and a made-up
// combinational logic function kept in this testbench.
//
// For every command the expected result is computed here at the level of whole test steps,
// independently of the sequencer's cycle-by-cycle behaviour:
//   INDEP : n_WI = specified bits of I that differ from L1, L1a = L1 with I written,
//           P = f(L1a), P loaded iff HD(P,J) < HD(L1a,J) over specified bits of J,
//           n_WJ = specified bits of J that differ from the template, L2 = J applied,
//           L1 = f(L2) captured; cycles = N_ROW + n_WI + 1 + loaded + n_WJ + 2.
//   LINK  : n_WJ against the current L1, cycles = n_WJ + 2.
//   UNLOAD: N_ROW reads, nothing written.
// The statistics (including the cycle count of every command), the final L1 / L2 contents and
// every observed row are compared. Commands other than unload are offered back to back.
module tb_pras_test_sequencer;
  import pras_pkg::*;
  localparam int NR = 4, NC = 5, NF = NR * NC;
  localparam int NCMD = 400;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic cmd_valid, cmd_ready;
  pras_cmd_kind_e cmd_kind;
  logic [NF-1:0] cmd_i, cmd_i_care, cmd_j, cmd_j_care, cmd_resp;
  logic phi1, phi2, row_en, col_en, rw, scan_in;
  logic [1:0] row_addr;
  logic [2:0] col_addr;
  logic [NC-1:0] rd_data;
  logic obs_valid;
  logic [1:0] obs_row;
  logic [NC-1:0] obs_data;
  logic busy, done;
  pras_stats_t stats;

  pras_test_sequencer #(.N_ROW(NR), .N_COL(NC)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [NF-1:0] f_cut(input logic [NF-1:0] x);
    return {x[NF-4:0], x[NF-1:NF-3]} ^ (x & {x[0], x[NF-1:1]}) ^ NF'(32'h5a3c9);
  endfunction

  function automatic int hd(input logic [NF-1:0] a, input logic [NF-1:0] b, input logic [NF-1:0] m);
    return $countones((a ^ b) & m);
  endfunction

  // Cycle-level model of the array the sequencer drives.
  logic [NF-1:0] al1, al2;
  always_comb for (int c = 0; c < NC; c++) rd_data[c] = (row_en && !rw) ? al1[int'(row_addr)*NC+c] : 1'b0;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      al1 <= '0; al2 <= '0;
    end else begin
      logic [NF-1:0] n1;
      n1 = al1;
      if (phi1) n1 = f_cut(al2);
      else if (row_en && col_en && rw) n1[int'(row_addr)*NC+int'(col_addr)] = scan_in;
      al1 <= n1;
      if (phi2) al2 <= n1;
    end
  end

  typedef struct {
    pras_stats_t   st;
    logic [NF-1:0] l1, l2;
  } exp_t;
  exp_t expq[$];
  logic [NC-1:0] obsq[$];

  task automatic check(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%0h exp=%0h", what, got, exp);
    end
  endtask

  // Observation and completion monitor.
  int n_done = 0, n_pload = 0, n_link = 0, n_unload = 0, n_skip = 0;
  always @(negedge clk) if (rst_n) begin
    if (obs_valid) begin
      logic [NC-1:0] e;
      e = (obsq.size() > 0) ? obsq.pop_front() : '1;
      check(64'(obs_data), 64'(e), "observed row");
    end
    if (done) begin
      exp_t e;
      e = expq.pop_front();
      check(64'(stats.n_wi), 64'(e.st.n_wi), "n_WI");
      check(64'(stats.n_wj), 64'(e.st.n_wj), "n_WJ");
      check(64'(stats.n_read), 64'(e.st.n_read), "row reads");
      check(64'(stats.p_loaded), 64'(e.st.p_loaded), "P loaded");
      check(64'(stats.cycles), 64'(e.st.cycles), "cycles");
      check(64'(al1), 64'(e.l1), "L1 after command");
      check(64'(al2), 64'(e.l2), "L2 after command");
      n_done++;
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NF-1:0] g1, g2;  // golden L1 / L2
    cmd_valid = 0; cmd_kind = CMD_INDEP;
    cmd_i = '0; cmd_i_care = '0; cmd_j = '0; cmd_j_care = '0; cmd_resp = '0;
    g1 = '0; g2 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < NCMD; n++) begin
      exp_t e;
      logic [NF-1:0] i, ic, j, jc, l1a, p, base, l1b;
      int k;
      k = (n == NCMD - 1) ? 2 : ((n == 0) ? 0 : $urandom_range(9));
      e.st = '0;
      i  = NF'({$urandom, $urandom});
      ic = NF'({$urandom, $urandom}) | NF'({$urandom, $urandom});
      j  = NF'({$urandom, $urandom});
      jc = NF'({$urandom, $urandom}) | NF'({$urandom, $urandom});
      if (k <= 5) begin                          // independent test
        for (int r = 0; r < NR; r++) obsq.push_back(g1[r*NC +: NC]);
        l1a = (g1 & ~ic) | (i & ic);
        p   = f_cut(l1a);
        if (k >= 3) j = p ^ NF'(1 << $urandom_range(NF - 1));   // J close to P
        if (k == 5) j = (l1a & ~jc) | (j & jc);                 // J equal to I: no J writes
        e.st.n_wi = 16'(hd(g1, i, ic));
        e.st.p_loaded = hd(p, j, jc) < hd(l1a, j, jc);
        base = e.st.p_loaded ? p : l1a;
        e.st.n_wj = 16'(hd(base, j, jc));
        e.st.n_read = 16'(NR);
        l1b = (base & ~jc) | (j & jc);
        g2 = l1b;
        g1 = f_cut(l1b);
        e.st.cycles = 32'(NR) + 32'(e.st.n_wi) + 1 + 32'(e.st.p_loaded) + 32'(e.st.n_wj) + 2;
        cmd_kind = CMD_INDEP;
        cmd_resp = p;
        if (e.st.p_loaded) n_pload++;
      end else if (k <= 8) begin                 // linked continuation
        e.st.n_wj = 16'(hd(g1, j, jc));
        cmd_resp = g1;
        l1b = (g1 & ~jc) | (j & jc);
        g2 = l1b;
        g1 = f_cut(l1b);
        e.st.cycles = 32'(e.st.n_wj) + 2;
        cmd_kind = CMD_LINK;
        n_link++;
      end else begin                             // unload
        for (int r = 0; r < NR; r++) obsq.push_back(g1[r*NC +: NC]);
        e.st.n_read = 16'(NR);
        e.st.cycles = 32'(NR);
        cmd_kind = CMD_UNLOAD;
        n_unload++;
      end
      if (e.st.n_wj == 0 && cmd_kind != CMD_UNLOAD) n_skip++;
      e.l1 = g1; e.l2 = g2;
      expq.push_back(e);
      cmd_i = i; cmd_i_care = ic; cmd_j = j; cmd_j_care = jc;
      cmd_valid = 1;
      #1;
      while (!cmd_ready) begin
        @(negedge clk);
        #1;
      end
      @(posedge clk);
      if (cmd_kind == CMD_UNLOAD) begin
        // wait for it to complete so the next command starts from idle
        @(negedge clk);
        cmd_valid = 0;
        while (busy) @(negedge clk);
      end
      #1;
    end
    @(negedge clk);
    cmd_valid = 0;
    while (busy || expq.size() > 0) @(negedge clk);
    repeat (2) @(negedge clk);
    check(64'(n_done), 64'(NCMD), "commands completed");
    $display("indep P-loads=%0d linked=%0d unloads=%0d no-J-write tests=%0d", n_pload, n_link, n_unload, n_skip);
    checks++; if (n_pload == 0 || n_link == 0 || n_unload == 0 || n_skip == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
