// pras_test_sequencer: applies two-pattern path-delay tests to a PRAS flip-flop array.
//
// A test is a vector pair (I, J): I initializes the combinational logic, J launches the
// transitions, and the response Q is captured one clock period after J is applied. The
// sequencer takes one command per test through a valid/ready handshake and drives the array's
// phi1, phi2, row/column select, read/write and scan-in lines. The procedure for an
// independent test (CMD_INDEP) is:
//   Step 1  R/W : for every row, one read cycle (the row's L1 values, the previous result Q,
//                 appear on obs_data), then one write cycle for each flip-flop whose read value
//                 differs from a specified bit of I. Bits of I whose care bit is 0 are not written.
//   Step 2a IA  : one cycle with phi2: L2 <= L1 applies I; the logic produces P.
//   Step 2b PL  : only if HD(P, J) < HD(L1, J) over the specified bits of J: one cycle with phi1
//                 loads P into L1 so that fewer writes are needed for J. P is the expected
//                 response to I, supplied by the tester on cmd_resp.
//   Step 3  JW  : one write cycle for each flip-flop whose L1 value differs from a specified
//                 bit of J. Rows without writes cost nothing.
//   Step 4  JA  : one cycle with phi2: L2 <= L1 applies J (launch).
//   Step 5  QL  : one cycle with phi1: L1 <= Q (capture), exactly one clock period after launch.
// CMD_LINK continues a linked test set: only Steps 3-5, with cmd_resp giving the expected L1
// content left by the previous test (its response Q). CMD_UNLOAD reads every row, writing
// nothing, to observe the last result.
//
// Cycle counts per command (one cycle per read, write, phi1 or phi2 pulse):
//   INDEP  : N_ROW + n_WI + 1 + (P loaded ? 1 : 0) + n_WJ + 2
//   LINK   : n_WJ + 2
//   UNLOAD : N_ROW
// The step order, the write-only-differing-bits rule, the row skipping and the P-load rule
// follow the test procedure this design implements. Its own choices are: Step 2b and Step 5
// take a cycle of their own (a phi1 pulse needs its own edge after the phi2 pulse in a
// single-clock model), the tester supplies P, the expected L1 content for linked tests, and
// care masks for don't-care bits, and one flip-flop is written per cycle in row-major order.
// A new command is accepted in the Q-latch cycle of the previous one, so tests run back to back.
// done pulses for one cycle after a command ends, with its statistics on stats.
module pras_test_sequencer
  import pras_pkg::*;
#(
  parameter int unsigned N_ROW = 15,
  parameter int unsigned N_COL = 16,
  parameter int unsigned N_FF  = N_ROW * N_COL,
  parameter int unsigned RAW   = (N_ROW > 1) ? $clog2(N_ROW) : 1,
  parameter int unsigned CAW   = (N_COL > 1) ? $clog2(N_COL) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // command from the tester
  input  logic             cmd_valid,
  output logic             cmd_ready,
  input  pras_cmd_kind_e   cmd_kind,
  input  logic [N_FF-1:0]  cmd_i,       // initializing vector I
  input  logic [N_FF-1:0]  cmd_i_care,  // 1 = bit of I is specified
  input  logic [N_FF-1:0]  cmd_j,       // transition vector J
  input  logic [N_FF-1:0]  cmd_j_care,  // 1 = bit of J is specified
  input  logic [N_FF-1:0]  cmd_resp,    // INDEP: expected P; LINK: expected L1 content
  // array control
  output logic             phi1,
  output logic             phi2,
  output logic             row_en,
  output logic [RAW-1:0]   row_addr,
  output logic             col_en,
  output logic [CAW-1:0]   col_addr,
  output logic             rw,
  output logic             scan_in,
  input  logic [N_COL-1:0] rd_data,
  // observation of row reads
  output logic             obs_valid,
  output logic [RAW-1:0]   obs_row,
  output logic [N_COL-1:0] obs_data,
  // status
  output logic             busy,
  output logic             done,
  output pras_stats_t      stats
);

  typedef enum logic [2:0] {
    ST_IDLE, ST_READ, ST_WRITE_I, ST_IA, ST_PL, ST_WRITE_J, ST_JA, ST_QL
  } state_e;

  state_e          state_q, state_n;
  pras_cmd_kind_e  kind_q, kind_n;
  logic [N_FF-1:0] i_q, i_n, ic_q, ic_n, j_q, j_n, jc_q, jc_n, resp_q, resp_n;
  logic [N_FF-1:0] shadow_q, shadow_n;   // the sequencer's copy of the L1 latches
  logic [N_FF-1:0] wpend_q, wpend_n;     // flip-flops still to be written
  logic [RAW-1:0]  row_q, row_n;
  pras_stats_t     cnt_q, cnt_n, stats_n;
  logic            done_n, finish, accept;

  // First pending write in row-major order.
  logic            pend_found;
  logic [RAW-1:0]  pend_row;
  logic [CAW-1:0]  pend_col;
  logic [N_FF-1:0] pend_onehot;

  always_comb begin
    pend_found  = 1'b0;
    pend_row    = '0;
    pend_col    = '0;
    pend_onehot = '0;
    for (int unsigned r = 0; r < N_ROW; r++) begin
      for (int unsigned c = 0; c < N_COL; c++) begin
        if (!pend_found && wpend_q[r*N_COL+c]) begin
          pend_found            = 1'b1;
          pend_row              = RAW'(r);
          pend_col              = CAW'(c);
          pend_onehot[r*N_COL+c] = 1'b1;
        end
      end
    end
  end

  // Step 2b decision: compare HD(L1, J) with HD(P, J) over the specified bits of J.
  logic [15:0] d_ij, d_pj;
  logic        p_better;
  always_comb begin
    d_ij = '0;
    d_pj = '0;
    for (int unsigned f = 0; f < N_FF; f++) begin
      if (jc_q[f] && (shadow_q[f] != j_q[f])) d_ij = d_ij + 16'd1;
      if (jc_q[f] && (resp_q[f] != j_q[f]))   d_pj = d_pj + 16'd1;
    end
    p_better = d_pj < d_ij;
  end

  // Row read: difference mask of the row being read against I.
  logic [N_COL-1:0] row_i, row_ic, row_diff;
  always_comb begin
    for (int unsigned c = 0; c < N_COL; c++) begin
      row_i[c]  = i_q[32'(row_q)*N_COL+c];
      row_ic[c] = ic_q[32'(row_q)*N_COL+c];
    end
    row_diff = row_ic & (rd_data ^ row_i);
  end

  logic [N_FF-1:0] wpend_left, base;
  assign wpend_left = wpend_q & ~pend_onehot;
  assign base       = p_better ? resp_q : shadow_q;

  always_comb begin
    state_n  = state_q;
    kind_n   = kind_q;
    i_n      = i_q;
    ic_n     = ic_q;
    j_n      = j_q;
    jc_n     = jc_q;
    resp_n   = resp_q;
    shadow_n = shadow_q;
    wpend_n  = wpend_q;
    row_n    = row_q;
    cnt_n    = cnt_q;
    finish   = 1'b0;

    phi1     = 1'b0;
    phi2     = 1'b0;
    row_en   = 1'b0;
    row_addr = '0;
    col_en   = 1'b0;
    col_addr = '0;
    rw       = 1'b0;
    scan_in  = 1'b0;
    obs_valid = 1'b0;

    if (state_q != ST_IDLE) cnt_n.cycles = cnt_q.cycles + 32'd1;

    unique case (state_q)
      ST_IDLE: ;

      ST_READ: begin
        row_en    = 1'b1;
        row_addr  = row_q;
        obs_valid = 1'b1;
        cnt_n.n_read = cnt_q.n_read + 16'd1;
        for (int unsigned c = 0; c < N_COL; c++) begin
          shadow_n[32'(row_q)*N_COL+c] = rd_data[c];
          wpend_n[32'(row_q)*N_COL+c]  = row_diff[c];
        end
        if (row_diff != '0) begin
          state_n = ST_WRITE_I;
        end else if (32'(row_q) == N_ROW - 1) begin
          if (kind_q == CMD_UNLOAD) begin
            finish  = 1'b1;
            state_n = ST_IDLE;
          end else begin
            state_n = ST_IA;
          end
        end else begin
          row_n = row_q + RAW'(1);
        end
      end

      ST_WRITE_I, ST_WRITE_J: begin
        row_en   = 1'b1;
        row_addr = pend_row;
        col_en   = 1'b1;
        col_addr = pend_col;
        rw       = 1'b1;
        scan_in  = |(pend_onehot & ((state_q == ST_WRITE_I) ? i_q : j_q));
        shadow_n = (shadow_q & ~pend_onehot) | (pend_onehot & ((state_q == ST_WRITE_I) ? i_q : j_q));
        wpend_n  = wpend_left;
        if (state_q == ST_WRITE_I) begin
          cnt_n.n_wi = cnt_q.n_wi + 16'd1;
          if (wpend_left == '0) begin
            if (32'(row_q) == N_ROW - 1) begin
              state_n = ST_IA;
            end else begin
              row_n   = row_q + RAW'(1);
              state_n = ST_READ;
            end
          end
        end else begin
          cnt_n.n_wj = cnt_q.n_wj + 16'd1;
          if (wpend_left == '0) state_n = ST_JA;
        end
      end

      ST_IA: begin
        phi2     = 1'b1;
        shadow_n = base;
        wpend_n  = jc_q & (base ^ j_q);
        if (p_better) begin
          cnt_n.p_loaded = 1'b1;
          state_n        = ST_PL;
        end else begin
          state_n = ((jc_q & (base ^ j_q)) != '0) ? ST_WRITE_J : ST_JA;
        end
      end

      ST_PL: begin
        phi1    = 1'b1;
        state_n = (wpend_q != '0) ? ST_WRITE_J : ST_JA;
      end

      ST_JA: begin
        phi2    = 1'b1;
        state_n = ST_QL;
      end

      ST_QL: begin
        phi1    = 1'b1;
        finish  = 1'b1;
        state_n = ST_IDLE;
      end

      default: state_n = ST_IDLE;
    endcase

    // Accept a command when idle or in the last cycle of a test.
    cmd_ready = (state_q == ST_IDLE) || (state_q == ST_QL);
    accept    = cmd_valid && cmd_ready;
    stats_n   = cnt_n;
    done_n    = finish;
    if (accept) begin
      kind_n = cmd_kind;
      i_n    = cmd_i;
      ic_n   = (cmd_kind == CMD_INDEP) ? cmd_i_care : '0;
      j_n    = cmd_j;
      jc_n   = (cmd_kind == CMD_UNLOAD) ? '0 : cmd_j_care;
      resp_n = cmd_resp;
      row_n  = '0;
      cnt_n  = '0;
      if (cmd_kind == CMD_LINK) begin
        shadow_n = cmd_resp;
        wpend_n  = cmd_j_care & (cmd_resp ^ cmd_j);
        state_n  = ((cmd_j_care & (cmd_resp ^ cmd_j)) != '0) ? ST_WRITE_J : ST_JA;
      end else begin
        wpend_n  = '0;
        state_n  = ST_READ;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= ST_IDLE;
      kind_q   <= CMD_INDEP;
      i_q      <= '0;
      ic_q     <= '0;
      j_q      <= '0;
      jc_q     <= '0;
      resp_q   <= '0;
      shadow_q <= '0;
      wpend_q  <= '0;
      row_q    <= '0;
      cnt_q    <= '0;
      stats    <= '0;
      done     <= 1'b0;
    end else begin
      state_q  <= state_n;
      kind_q   <= kind_n;
      i_q      <= i_n;
      ic_q     <= ic_n;
      j_q      <= j_n;
      jc_q     <= jc_n;
      resp_q   <= resp_n;
      shadow_q <= shadow_n;
      wpend_q  <= wpend_n;
      row_q    <= row_n;
      cnt_q    <= cnt_n;
      done     <= done_n;
      if (done_n) stats <= stats_n;
    end
  end

  assign busy     = (state_q != ST_IDLE);
  assign obs_row  = row_q;
  assign obs_data = rd_data;

  // Array control rules: a write always has its row selected; phi pulses never coincide with
  // row accesses; the two phases are never pulsed together in test mode.
  a_write_has_row: assert property (@(posedge clk) col_en |-> (rw && row_en));
  a_phi_no_access: assert property (@(posedge clk) (phi1 || phi2) |-> !row_en);
  a_phi_exclusive: assert property (@(posedge clk) !(phi1 && phi2));
  // Handshake: a command offered but not taken stays offered.
  a_cmd_hold: assert property (@(posedge clk)
                               (cmd_valid && !cmd_ready) |=> cmd_valid);

endmodule
