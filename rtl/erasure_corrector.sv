// erasure_corrector: single-erasure correction of a word read from the memory.
//
// A stored word of W bits (W-1 data bits and one parity bit) always has odd parity.
// When a read conflict drops one column, that bit's position is known from the
// column's erasure flag. The corrector recomputes the parity of the bits that were
// read and fills the erased position with the value that makes the total odd:
//     fill = NOT (XOR of all non-erased bits)
// This is the scheme the document describes. With no erasure the data bits pass
// unchanged. More than one erasure cannot occur in this memory (unit-overlap
// principle); the memory top asserts that.
//
// Interface: word and erase (W bits each) in; data (W-1 bits, the corrected word
// without its parity bit) and corrected (an erased bit was filled) out.
// Combinational.
module erasure_corrector #(
  parameter int unsigned W = 4   // stored word width, parity bit included
) (
  input  logic [W-1:0] word,
  input  logic [W-1:0] erase,
  output logic [W-2:0] data,
  output logic         corrected
);

  logic fill;

  always_comb begin
    fill      = ~(^(word & ~erase));
    data      = (word[W-2:0] & ~erase[W-2:0]) | ({(W-1){fill}} & erase[W-2:0]);
    corrected = |erase;
  end

endmodule
