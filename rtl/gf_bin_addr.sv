// gf_bin_addr: bin-address generator of one memory column.
//
// Computes the index of the bin that holds bit y of the word at address x = {x0, x1}:
//     B(x0, x1, y) = x0 (+) (x1 (*) y)
// with (+) and (*) taken in GF(2^N0). Read as a function of y this is a line with
// intercept x0 and slope x1, so two distinct addresses give the same bin in at most
// one column (the unit-overlap principle). The offset x1 (N1 <= N0 bits) becomes a
// field element by appending N0-N1 zero bits below it; the column index Y is a
// constant, so the multiplier is a fixed XOR network and the adder is N0 XOR gates.
// Both follow the document; the field polynomial is this design's choice (mpmem_pkg).
//
// Interface: x0 (N0 bits), x1 (N1 bits) in, bin (N0 bits) out. Purely combinational.
module gf_bin_addr
  import mpmem_pkg::*;
#(
  parameter int unsigned N0 = 2,  // bits of the bin index
  parameter int unsigned N1 = 2,  // bits of the offset within a bin
  parameter int unsigned Y  = 1   // this column's index, a field element (< 2**N0)
) (
  input  logic [N0-1:0] x0,
  input  logic [N1-1:0] x1,
  output logic [N0-1:0] bin
);

  if (N1 > N0) begin : g_bad_n1
    $error("gf_bin_addr: N1 must not exceed N0");
  end
  if (N0 > GF_MAX_M) begin : g_bad_n0
    $error("gf_bin_addr: N0 above the supported field size");
  end
  if (Y >= (1 << N0)) begin : g_bad_y
    $error("gf_bin_addr: column index does not fit in GF(2^N0)");
  end

  logic [N0-1:0] slope;
  logic [N0-1:0] prod;

  always_comb begin
    slope = N0'(x1) << (N0 - N1);
    prod  = N0'(gf_mul(32'(slope), 32'(Y), N0));
    bin   = x0 ^ prod;
  end

endmodule
