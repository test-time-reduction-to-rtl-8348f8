// pras_array: the progressive random-access scan (PRAS) flip-flop array.
//
// All scanned flip-flops of the circuit are arranged as N_ROW rows by N_COL columns of
// pras_cell. Flip-flop f = r*N_COL + c sits in row r, column c; its data-in is d[f] and its
// data-out (L2) is q[f]. A row decoder raises one row select line, a column decoder one column
// select line, and every column has a pras_rw_unit on its sense line.
//
//  * Read (rw = 0, row_en = 1): all L1 latches of row row_addr put their values on the column
//    sense lines; rd_data shows the row in the same cycle and scan_out holds it afterwards.
//  * Write (rw = 1, row_en = 1, col_en = 1): the flip-flop at (row_addr, col_addr) takes scan_in
//    into L1 at the clock edge. One flip-flop is written per cycle.
//  * phi1 / phi2: applied to every cell at once (see pras_cell for their timing). Normal mode
//    asserts both in every cycle; PRAS mode keeps both low while rows are read and written.
// The sense lines are modelled as an OR of the selected row's L1 values, since only one row is
// selected at a time. The array organisation, the row and column select lines and the per-column
// read/write units follow the PRAS architecture; the decoders and the OR sense lines are this
// design's choices. Defaults: 15 x 16 cells, enough for 228 flip-flops with about sqrt(n_FF) rows.
module pras_array #(
  parameter int unsigned N_ROW = 15,
  parameter int unsigned N_COL = 16,
  parameter int unsigned N_FF  = N_ROW * N_COL,
  parameter int unsigned RAW   = (N_ROW > 1) ? $clog2(N_ROW) : 1,
  parameter int unsigned CAW   = (N_COL > 1) ? $clog2(N_COL) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             phi1,
  input  logic             phi2,
  input  logic             row_en,
  input  logic [RAW-1:0]   row_addr,
  input  logic             col_en,
  input  logic [CAW-1:0]   col_addr,
  input  logic             rw,        // 0 = read, 1 = write
  input  logic             scan_in,
  input  logic [N_FF-1:0]  d,         // data-in lines from the combinational logic
  output logic [N_FF-1:0]  q,         // data-out lines to the combinational logic
  output logic [N_COL-1:0] rd_data,   // row being read, same cycle
  output logic [N_COL-1:0] scan_out   // last row read
);

  logic [N_ROW-1:0] row_sel;
  logic [N_COL-1:0] col_sel;
  logic [N_FF-1:0]  l1;
  logic [N_COL-1:0] sense, wr_en, wr_data;

  pras_decoder #(.N(N_ROW), .AW(RAW)) u_row_dec (.en(row_en), .addr(row_addr), .sel(row_sel));
  pras_decoder #(.N(N_COL), .AW(CAW)) u_col_dec (.en(col_en), .addr(col_addr), .sel(col_sel));

  for (genvar r = 0; r < N_ROW; r++) begin : g_row
    for (genvar c = 0; c < N_COL; c++) begin : g_col
      pras_cell u_cell (
        .clk    (clk),
        .rst_n  (rst_n),
        .phi1   (phi1),
        .phi2   (phi2),
        .d      (d[r*N_COL+c]),
        .row_sel(row_sel[r]),
        .wr_en  (wr_en[c]),
        .wr_data(wr_data[c]),
        .l1     (l1[r*N_COL+c]),
        .q      (q[r*N_COL+c])
      );
    end
  end

  // Column sense lines: the L1 latch of the selected row drives its column.
  always_comb begin
    sense = '0;
    for (int unsigned r = 0; r < N_ROW; r++) begin
      for (int unsigned c = 0; c < N_COL; c++) begin
        sense[c] = sense[c] | (row_sel[r] & l1[r*N_COL+c]);
      end
    end
  end

  for (genvar c = 0; c < N_COL; c++) begin : g_rw
    pras_rw_unit u_rw (
      .clk     (clk),
      .rst_n   (rst_n),
      .col_sel (col_sel[c]),
      .rw      (rw),
      .row_act (row_en),
      .scan_in (scan_in),
      .sense   (sense[c]),
      .wr_en   (wr_en[c]),
      .wr_data (wr_data[c]),
      .rd_data (rd_data[c]),
      .scan_out(scan_out[c])
    );
  end

endmodule
