// dp_bin: restricted dual-port bin built from a single-port cell array.
//
// The bin stores 2**N1 bits in a single-port array: on each clock at most one cell
// is accessed. Each port has a select (s_a / s_b), an offset (x1_a / x1_b), a
// read/write line (rw_n_*: 1 = read, 0 = write) and a data bit. A gating
// multiplexer feeds the owning port's offset, R/W and write bit to the array.
//
// Ownership, when both ports select the bin in the same cycle:
//   * port A owns the bin, except that
//   * port B owns it when port B writes and port A reads (the writing port wins).
// If both ports name the same cell and at most one of them writes, the single
// access serves both: a reader then receives the bit being written (write-through)
// or the bit being read. Otherwise the other port's request is dropped and its
// erasure output goes high for one cycle: e for a dropped port-B request (the
// erasure output of the document) and e_a for a dropped port-A request, which
// only happens under the writer-priority rule.
//
// Timing: requests are sampled at the rising edge of clk; writes take effect at
// that edge; rd_a / rd_b / e_a / e are registered and valid in the next cycle.
// A read-data output is 0 when its port did not read this bin, so the bins of a
// column can be combined with an OR. rst_n (synchronous, active low) clears the
// outputs and fills every cell with INIT.
//
// From the document: the select/offset/R/W/data connections of each port, port A
// priority, the erasure output, writer priority on a conflict, and the gating of
// the offset. This design's own choices: the clocked timing, the split of the
// bidirectional data line into write and read bits, the shared-cell rule, the
// extra e_a output and the reset fill.
module dp_bin #(
  parameter int unsigned N1   = 2,     // offset bits; the bin holds 2**N1 bits
  parameter bit          INIT = 1'b0   // value of every cell after reset
) (
  input  logic          clk,
  input  logic          rst_n,
  // port A
  input  logic          s_a,
  input  logic [N1-1:0] x1_a,
  input  logic          rw_n_a,
  input  logic          wd_a,
  output logic          rd_a,
  output logic          e_a,
  // port B
  input  logic          s_b,
  input  logic [N1-1:0] x1_b,
  input  logic          rw_n_b,
  input  logic          wd_b,
  output logic          rd_b,
  output logic          e
);

  localparam int unsigned DEPTH = 2 ** N1;

  logic [DEPTH-1:0] cells;

  logic          both;      // both ports select this bin
  logic          share;     // one access can serve both ports
  logic          use_b;     // port B owns the single-port array this cycle
  logic          acc_en;
  logic          acc_wr;
  logic          acc_wd;
  logic [N1-1:0] acc_off;
  logic          acc_bit;   // bit returned by the access (write-through on a write)
  logic          drop_a;
  logic          drop_b;

  always_comb begin
    both    = s_a & s_b;
    share   = both & (x1_a == x1_b) & (rw_n_a | rw_n_b);
    use_b   = s_b & (~s_a | (~rw_n_b & rw_n_a));
    acc_en  = s_a | s_b;
    acc_off = use_b ? x1_b : x1_a;
    acc_wr  = acc_en & (use_b ? ~rw_n_b : ~rw_n_a);
    acc_wd  = use_b ? wd_b : wd_a;
    acc_bit = acc_wr ? acc_wd : cells[acc_off];
    drop_a  = both & ~share & use_b;
    drop_b  = both & ~share & ~use_b;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cells <= {DEPTH{INIT}};
      rd_a  <= 1'b0;
      rd_b  <= 1'b0;
      e_a   <= 1'b0;
      e     <= 1'b0;
    end else begin
      if (acc_wr) cells[acc_off] <= acc_wd;
      rd_a <= s_a & ~drop_a & acc_bit;
      rd_b <= s_b & ~drop_b & acc_bit;
      e_a  <= drop_a;
      e    <= drop_b;
    end
  end

endmodule
