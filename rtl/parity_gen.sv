// parity_gen: parity bit generator used on every write.
//
// Every word is stored with one extra bit chosen so that the stored word has an odd
// number of 1 bits (odd parity, the example the document uses). parity = XNOR of
// the data bits. Interface: data (DW bits) in, parity out; combinational.
module parity_gen #(
  parameter int unsigned DW = 3
) (
  input  logic [DW-1:0] data,
  output logic          parity
);

  assign parity = ~(^data);

endmodule
