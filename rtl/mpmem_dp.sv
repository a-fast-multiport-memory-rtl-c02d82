// mpmem_dp: dual-port RAM built from single-port memory cells.
//
// The memory holds 2**(N0+N1) words of B-1 data bits. Each word is stored with an
// odd-parity bit as B bits, one per column (bit plane). Column y is split into
// 2**N0 single-port bins of 2**N1 bits. Bit y of the word at address x = {x0, x1}
// sits at offset x1 of bin
//     B(x0, x1, y) = x0 (+) x1 (*) y        (arithmetic in GF(2^N0)),
// so two distinct addresses share a bin in at most one column. When both ports hit
// the same bin, the bin serves one port and flags an erasure for the other; since
// that happens in at most one column, the losing port's word has at most one
// missing bit, in a known position, which its erasure corrector restores from the
// parity. Both ports therefore read correct data every cycle with a fixed latency.
//
// Rules of use: at most one port writes in a cycle (an assertion checks this). A
// bin gives priority to port A, except that a writing port B wins over a reading
// port A, so a write is never lost and every stored word keeps correct parity.
// Both ports reading one address always succeed; a read of the address the other
// port is writing returns the new data.
//
// Interface, per port (a_*, b_*): addr (N0+N1 bits, x0 in the upper N0 bits), rw_n
// (1 = read, 0 = write), wdata (B-1 bits), rdata (B-1 bits) and corrected (the
// word read had an erased bit that was filled from the parity).
// Timing: requests are taken at every rising clk edge. A write is done at that edge.
// rdata and corrected belong to the request of the previous edge (read latency one
// cycle) and are meaningful for reads. rst_n is synchronous, active low, and sets
// every word to zero (parity bit one).
//
// Following the document: the bin organisation, the Galois-field bin addressing,
// one parity bit with odd parity, erasure correction, at most one writer per cycle
// and writer priority. This design's own choices: the clocked timing, the separate
// read and write data buses, an erasure corrector on port A as well (needed once
// port B may write), the field polynomial, the column order (data bit i in column
// i, the parity bit in column B-1) and the reset contents.
module mpmem_dp #(
  parameter int unsigned N0 = 2,  // bin-index bits (x0): 2**N0 bins per column
  parameter int unsigned N1 = 2,  // offset bits (x1): 2**N1 bits per bin
  parameter int unsigned B  = 4   // stored word width, parity included (columns)
) (
  input  logic             clk,
  input  logic             rst_n,
  // port A
  input  logic [N0+N1-1:0] a_addr,
  input  logic             a_rw_n,
  input  logic [B-2:0]     a_wdata,
  output logic [B-2:0]     a_rdata,
  output logic             a_corrected,
  // port B
  input  logic [N0+N1-1:0] b_addr,
  input  logic             b_rw_n,
  input  logic [B-2:0]     b_wdata,
  output logic [B-2:0]     b_rdata,
  output logic             b_corrected
);

  if (N1 > N0) begin : g_bad_n1
    $error("mpmem_dp: N1 must not exceed N0");
  end
  if (B > 2 ** N0) begin : g_bad_b
    $error("mpmem_dp: B columns need B distinct elements of GF(2^N0)");
  end
  if (B < 2) begin : g_bad_w
    $error("mpmem_dp: B must be at least 2 (one data bit and the parity bit)");
  end

  logic         a_par, b_par;
  logic [B-1:0] a_word_w, b_word_w;   // words to be written, parity on top
  logic [B-1:0] a_word_r, b_word_r;   // words read, before correction
  logic [B-1:0] a_era, b_era;         // per-column erasure flags

  parity_gen #(.DW(B-1)) u_par_a (.data(a_wdata), .parity(a_par));
  parity_gen #(.DW(B-1)) u_par_b (.data(b_wdata), .parity(b_par));

  assign a_word_w = {a_par, a_wdata};
  assign b_word_w = {b_par, b_wdata};

  for (genvar y = 0; y < B; y++) begin : g_col
    mem_column #(
      .N0  (N0),
      .N1  (N1),
      .Y   (y),
      .INIT(y == B - 1)   // zero data with odd parity
    ) u_col (
      .clk   (clk),
      .rst_n (rst_n),
      .addr_a(a_addr),
      .rw_n_a(a_rw_n),
      .wbit_a(a_word_w[y]),
      .rbit_a(a_word_r[y]),
      .era_a (a_era[y]),
      .addr_b(b_addr),
      .rw_n_b(b_rw_n),
      .wbit_b(b_word_w[y]),
      .rbit_b(b_word_r[y]),
      .era_b (b_era[y])
    );
  end

  erasure_corrector #(.W(B)) u_cor_a (
    .word     (a_word_r),
    .erase    (a_era),
    .data     (a_rdata),
    .corrected(a_corrected)
  );

  erasure_corrector #(.W(B)) u_cor_b (
    .word     (b_word_r),
    .erase    (b_era),
    .data     (b_rdata),
    .corrected(b_corrected)
  );

  // At most one port may write in a cycle.
  a_single_writer : assert property (@(posedge clk) disable iff (!rst_n) a_rw_n || b_rw_n)
    else $error("mpmem_dp: both ports write in the same cycle");

  // Unit-overlap principle: a port never loses more than one column.
  a_one_erasure : assert property (@(posedge clk) disable iff (!rst_n)
                                   $onehot0(a_era) && $onehot0(b_era))
    else $error("mpmem_dp: more than one erased column on a port");

endmodule
