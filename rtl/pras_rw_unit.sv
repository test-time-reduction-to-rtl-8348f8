// pras_rw_unit: read/write unit of one column of the PRAS flip-flop array.
//
// Each column of the array has one such unit on its sense line. With rw low (read) the unit
// senses the line, onto which the L1 latch of the selected row puts its value, presents it
// at rd_data in the same cycle and keeps it in its scan_out register at the clock edge, so the
// tester can collect a whole row after the read. With rw high (write) and its column select
// line high, the unit drives the sense line with the scan-in datum (wr_en, wr_data) so that the
// L1 latch of the selected row takes it at the clock edge. The split into a combinational read
// path and a held scan_out value is this design's choice; the read/write behaviour follows the
// PRAS architecture (read = low, write = high).
module pras_rw_unit (
  input  logic clk,
  input  logic rst_n,
  input  logic col_sel,   // column select line
  input  logic rw,        // read (0) / write (1)
  input  logic row_act,   // some row select line is high
  input  logic scan_in,   // datum to write
  input  logic sense,     // column sense line as driven by the selected L1 latch
  output logic wr_en,     // the unit drives the sense line (write to the selected row)
  output logic wr_data,   // value driven on the sense line
  output logic rd_data,   // sensed value, valid in a read cycle
  output logic scan_out   // last value read from this column
);

  assign wr_en   = rw && col_sel;
  assign wr_data = scan_in;
  assign rd_data = !rw && row_act && sense;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              scan_out <= 1'b0;
    else if (!rw && row_act) scan_out <= sense;
  end

endmodule
