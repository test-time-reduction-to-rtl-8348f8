// pras_cell: one enhanced random-access scan flip-flop.
//
// The cell holds two latches. L1 is loaded from the data-in line (the output of the
// combinational logic) by a phi1 pulse, or, in PRAS mode with both phases low, from the column
// sense line when its row is selected and the column's read/write unit writes. L2 is loaded
// from L1 by a phi2 pulse and drives data-out into the combinational logic. Because phi1 and
// phi2 are separately controllable, a new value can sit in L1 while L2 still applies the old
// one, which is what a two-pattern test needs.
//
// Timing model (this design's choice): the two-phase latches are modelled as one clock edge
// per phase period. Within the cycle ending at an edge, a phi1 pulse acts first and a phi2
// pulse second: phi1 alone gives L1 <= d, phi2 alone gives L2 <= L1, and both together (normal
// mode) give L1 <= d and L2 <= d, a master-slave flip-flop. A write (row_sel and wr_en) takes
// effect only when phi1 is low. L1 is presented on l1 for the column sense line. Reset clears
// both latches; the reset is this design's choice.
module pras_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic phi1,
  input  logic phi2,
  input  logic d,        // data-in from the combinational logic
  input  logic row_sel,  // row select line
  input  logic wr_en,    // column's read/write unit drives the sense line
  input  logic wr_data,  // value on the sense line
  output logic l1,       // L1 latch, read onto the sense line when row_sel is high
  output logic q         // L2 latch, data-out to the combinational logic
);

  logic l1_next;

  always_comb begin
    l1_next = l1;
    if (phi1)                    l1_next = d;
    else if (row_sel && wr_en)   l1_next = wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l1 <= 1'b0;
      q  <= 1'b0;
    end else begin
      l1 <= l1_next;
      if (phi2) q <= l1_next;
    end
  end

endmodule
