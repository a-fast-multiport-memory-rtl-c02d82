// bin_decoder: decoder/selector that drives the bin select lines of one column.
//
// Turns an N0-bit bin index into 2**N0 one-hot select lines, one per bin of the
// column; the selected bin sees its port's select input s (or s') asserted.
// The document shows the decoder/selector only as a block; this is the plain
// one-hot decoder that does its job. Purely combinational.
module bin_decoder #(
  parameter int unsigned N0 = 2
) (
  input  logic [N0-1:0]      idx,
  output logic [2**N0-1:0]   sel
);

  always_comb begin
    sel = '0;
    sel[idx] = 1'b1;
  end

endmodule
