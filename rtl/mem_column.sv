// mem_column: one bit plane (column) of the dual-port memory.
//
// Column Y stores bit Y of every stored word in 2**N0 dual-port bins of 2**N1 bits.
// For each port the column computes its own bin index B(x0, x1, Y) = x0 (+) x1 (*) Y
// in GF(2^N0) (gf_bin_addr), decodes it to bin selects (bin_decoder), and sends the
// offset x1, R/W and write bit to every bin; only the selected bin acts. Because the
// bin index depends on the column, a word's bits sit in different bins in different
// columns, and two distinct words share a bin in at most one column.
//
// The bins' read bits are ORed into the column's read bit per port (an unselected
// bin drives 0), and their erasure outputs are ORed into the column's erasure flag
// per port, telling the port's corrector that this column's bit was not read.
//
// Interface: per port an N0+N1-bit address {x0, x1}, rw_n (1 = read, 0 = write) and
// a write bit; per port a registered read bit and erasure flag, valid the cycle
// after the request (the bins' timing). Structure and addressing follow the
// document; the OR combining of bin outputs is this design's choice.
module mem_column #(
  parameter int unsigned N0   = 2,
  parameter int unsigned N1   = 2,
  parameter int unsigned Y    = 0,     // column index, used as a GF(2^N0) element
  parameter bit          INIT = 1'b0   // reset value of every bit in this column
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N0+N1-1:0] addr_a,
  input  logic             rw_n_a,
  input  logic             wbit_a,
  output logic             rbit_a,
  output logic             era_a,
  input  logic [N0+N1-1:0] addr_b,
  input  logic             rw_n_b,
  input  logic             wbit_b,
  output logic             rbit_b,
  output logic             era_b
);

  localparam int unsigned ROWS = 2 ** N0;

  logic [N0-1:0]   bin_a, bin_b;
  logic [ROWS-1:0] sel_a, sel_b;
  logic [ROWS-1:0] rd_a, rd_b, e_a, e_b;

  gf_bin_addr #(.N0(N0), .N1(N1), .Y(Y)) u_addr_a (
    .x0 (addr_a[N0+N1-1:N1]),
    .x1 (addr_a[N1-1:0]),
    .bin(bin_a)
  );

  gf_bin_addr #(.N0(N0), .N1(N1), .Y(Y)) u_addr_b (
    .x0 (addr_b[N0+N1-1:N1]),
    .x1 (addr_b[N1-1:0]),
    .bin(bin_b)
  );

  bin_decoder #(.N0(N0)) u_dec_a (.idx(bin_a), .sel(sel_a));
  bin_decoder #(.N0(N0)) u_dec_b (.idx(bin_b), .sel(sel_b));

  for (genvar r = 0; r < ROWS; r++) begin : g_bin
    dp_bin #(.N1(N1), .INIT(INIT)) u_bin (
      .clk   (clk),
      .rst_n (rst_n),
      .s_a   (sel_a[r]),
      .x1_a  (addr_a[N1-1:0]),
      .rw_n_a(rw_n_a),
      .wd_a  (wbit_a),
      .rd_a  (rd_a[r]),
      .e_a   (e_a[r]),
      .s_b   (sel_b[r]),
      .x1_b  (addr_b[N1-1:0]),
      .rw_n_b(rw_n_b),
      .wd_b  (wbit_b),
      .rd_b  (rd_b[r]),
      .e     (e_b[r])
    );
  end

  assign rbit_a = |rd_a;
  assign rbit_b = |rd_b;
  assign era_a  = |e_a;
  assign era_b  = |e_b;

endmodule
