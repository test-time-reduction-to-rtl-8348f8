// pras_top: a circuit's scanned flip-flops as a progressive random-access scan (PRAS) array,
// with a sequencer that applies two-pattern path-delay tests to it.
//
// The flip-flops of the circuit under test sit in a pras_array of N_ROW x N_COL enhanced RAS
// cells. The circuit's combinational logic stays outside: it reads the flip-flop outputs on
// cut_q and returns its next-state values on cut_d. Two modes share the array:
//  * normal mode (func_mode = 1 while no test runs): phi1 and phi2 are pulsed in every cycle
//    and the cells act as ordinary master-slave flip-flops, q <= d;
//  * PRAS mode (a test command is running): pras_test_sequencer owns phi1, phi2 and the row,
//    column, read/write and scan-in lines, and applies independent tests, linked tests and
//    the final unload read (see pras_test_sequencer for the steps and their cycle counts).
// Row reads appear on obs_valid / obs_row / obs_data in the cycle of the read; scan_out keeps the
// last row read. One clock cycle stands for one read, one write or one normal clock period.
// The mode selection by func_mode and the tester-side command interface are this design's
// choices; the array and the test procedure follow the PRAS path-delay test scheme.
module pras_top
  import pras_pkg::*;
#(
  parameter int unsigned N_ROW = 15,
  parameter int unsigned N_COL = 16,
  parameter int unsigned N_FF  = N_ROW * N_COL,
  parameter int unsigned RAW   = (N_ROW > 1) ? $clog2(N_ROW) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             func_mode,   // run the circuit in normal mode while no test runs
  // test commands
  input  logic             cmd_valid,
  output logic             cmd_ready,
  input  pras_cmd_kind_e   cmd_kind,
  input  logic [N_FF-1:0]  cmd_i,
  input  logic [N_FF-1:0]  cmd_i_care,
  input  logic [N_FF-1:0]  cmd_j,
  input  logic [N_FF-1:0]  cmd_j_care,
  input  logic [N_FF-1:0]  cmd_resp,
  // combinational logic of the circuit under test
  output logic [N_FF-1:0]  cut_q,       // flip-flop data-out, to the logic
  input  logic [N_FF-1:0]  cut_d,       // logic outputs, flip-flop data-in
  // observation
  output logic             obs_valid,
  output logic [RAW-1:0]   obs_row,
  output logic [N_COL-1:0] obs_data,
  output logic [N_COL-1:0] scan_out,
  output logic             busy,
  output logic             done,
  output pras_stats_t      stats
);

  localparam int unsigned CAW = (N_COL > 1) ? $clog2(N_COL) : 1;

  logic             s_phi1, s_phi2, row_en, col_en, rw, scan_in;
  logic [RAW-1:0]   row_addr;
  logic [CAW-1:0]   col_addr;
  logic [N_COL-1:0] rd_data;
  logic             normal, phi1, phi2;

  pras_test_sequencer #(.N_ROW(N_ROW), .N_COL(N_COL), .N_FF(N_FF), .RAW(RAW), .CAW(CAW)) u_seq (
    .clk       (clk),
    .rst_n     (rst_n),
    .cmd_valid (cmd_valid),
    .cmd_ready (cmd_ready),
    .cmd_kind  (cmd_kind),
    .cmd_i     (cmd_i),
    .cmd_i_care(cmd_i_care),
    .cmd_j     (cmd_j),
    .cmd_j_care(cmd_j_care),
    .cmd_resp  (cmd_resp),
    .phi1      (s_phi1),
    .phi2      (s_phi2),
    .row_en    (row_en),
    .row_addr  (row_addr),
    .col_en    (col_en),
    .col_addr  (col_addr),
    .rw        (rw),
    .scan_in   (scan_in),
    .rd_data   (rd_data),
    .obs_valid (obs_valid),
    .obs_row   (obs_row),
    .obs_data  (obs_data),
    .busy      (busy),
    .done      (done),
    .stats     (stats)
  );

  // Normal mode: both phases every cycle, only while the sequencer is idle and takes no command.
  assign normal = func_mode && !busy && !cmd_valid;
  assign phi1   = normal || s_phi1;
  assign phi2   = normal || s_phi2;

  pras_array #(.N_ROW(N_ROW), .N_COL(N_COL), .N_FF(N_FF), .RAW(RAW), .CAW(CAW)) u_array (
    .clk     (clk),
    .rst_n   (rst_n),
    .phi1    (phi1),
    .phi2    (phi2),
    .row_en  (row_en),
    .row_addr(row_addr),
    .col_en  (col_en),
    .col_addr(col_addr),
    .rw      (rw),
    .scan_in (scan_in),
    .d       (cut_d),
    .q       (cut_q),
    .rd_data (rd_data),
    .scan_out(scan_out)
  );

endmodule
