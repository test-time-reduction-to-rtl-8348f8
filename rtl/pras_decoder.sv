// pras_decoder: binary address to one-hot select-line decoder.
//
// In the PRAS array a flip-flop is reached, as a RAM cell is, by raising its row select line
// and, for a write, its column select line. This decoder produces those lines from a binary
// address: sel[addr] is high while en is high, every other line is low, and no line is high
// when en is low or addr is out of range. It is purely combinational. The address decoding is
// this design's choice; the select lines themselves follow the PRAS architecture.
module pras_decoder #(
  parameter int unsigned N  = 16,
  parameter int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          en,
  input  logic [AW-1:0] addr,
  output logic [N-1:0]  sel
);

  always_comb begin
    sel = '0;
    for (int unsigned i = 0; i < N; i++) begin
      sel[i] = en && (addr == AW'(i));
    end
  end

endmodule
