// tb_mpmem_dp: end-to-end test of the dual-port memory at its default size
// (16 words of 3 data bits, 4 columns, 4 bins of 4 bits per column).
//
// Phases:
//   1. after reset every word reads as zero on both ports;
//   2. port A writes every word, then both ports read every pair of distinct
//      addresses at once (including the example pair 1001 / 0111), so every
//      bin conflict the addressing can produce is exercised on port B;
//   3. random traffic: each cycle at most one port writes, both ports access,
//      often the same address.
// A word-level model gives the expected read data; a read of the address the other
// port writes in the same cycle expects the new word. The testbench predicts,
// with its own Galois-field reference, whether a port's word loses a column and
// checks the corrected flags. All read data is checked exactly one cycle after the
// request (the read latency), and is checked to stay unchanged until the next clock
// edge after the following request is applied. Mechanisms counted, each required at least once:
// port-B erasure corrected, port-A erasure corrected (port B writing wins a bin),
// reads without conflict on both ports, same-address double read, read of the word
// being written by the other port, writes through port A and through port B.
module tb_mpmem_dp;
  import tb_ref_pkg::*;
  localparam int unsigned N0 = 2;
  localparam int unsigned N1 = 2;
  localparam int unsigned B  = 4;
  localparam int unsigned N  = N0 + N1;
  localparam int unsigned DW = B - 1;
  localparam int unsigned WORDS = 2 ** N;
  localparam int RANDOM_CYCLES = 20000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [N-1:0]  a_addr, b_addr;
  logic          a_rw_n, b_rw_n;
  logic [DW-1:0] a_wdata, b_wdata, a_rdata, b_rdata;
  logic          a_corrected, b_corrected;

  always #5 clk = ~clk;

  mpmem_dp dut (.*);

  int checks = 0;
  int failures = 0;
  int n_corr_a = 0, n_corr_b = 0, n_clean = 0, n_same_rd = 0, n_wthru = 0;
  int n_wr_a = 0, n_wr_b = 0;
  logic [DW-1:0] model [WORDS];
  // previous read results, which must stay on the outputs until the next clock edge
  logic          prev_a_rd = 1'b0, prev_b_rd = 1'b0;
  logic [DW-1:0] prev_a, prev_b;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%0h exp=%0h at %0t", what, got, exp, $time);
    end
  endtask

  // Does a distinct pair of addresses meet in a bin of some column?
  function automatic bit meets(int unsigned xa, int unsigned xb);
    bit m;
    m = 1'b0;
    for (int unsigned y = 0; y < B; y++)
      if (ref_bin(xa >> N1, xa % (1 << N1), y, N0, N1) ==
          ref_bin(xb >> N1, xb % (1 << N1), y, N0, N1)) m = 1'b1;
    return m;
  endfunction

  // One memory cycle: apply at the falling edge, check one cycle later.
  task automatic access(input logic [N-1:0] aa, input logic arw, input logic [DW-1:0] awd,
                        input logic [N-1:0] ba, input logic brw, input logic [DW-1:0] bwd);
    logic [DW-1:0] xa, xb;
    logic ca, cb;
    a_addr = aa; a_rw_n = arw; a_wdata = awd;
    b_addr = ba; b_rw_n = brw; b_wdata = bwd;
    #1;
    // the new request must not reach the outputs before the clock edge
    if (prev_a_rd) check("a_rdata held", 32'(a_rdata), 32'(prev_a));
    if (prev_b_rd) check("b_rdata held", 32'(b_rdata), 32'(prev_b));
    ca = 1'b0;
    cb = 1'b0;
    if (aa != ba && meets(aa, ba)) begin
      if (!brw && arw) ca = 1'b1;
      else cb = 1'b1;
    end
    if (!arw) begin model[aa] = awd; n_wr_a++; end
    if (!brw) begin model[ba] = bwd; n_wr_b++; end
    xa = model[aa];
    xb = model[ba];
    if (aa == ba && arw && brw) n_same_rd++;
    if (aa == ba && (arw != brw)) n_wthru++;
    @(negedge clk);
    if (arw) begin
      check("a_rdata", 32'(a_rdata), 32'(xa));
      check("a_corrected", 32'(a_corrected), 32'(ca));
      if (a_corrected) n_corr_a++;
    end
    if (brw) begin
      check("b_rdata", 32'(b_rdata), 32'(xb));
      check("b_corrected", 32'(b_corrected), 32'(cb));
      if (b_corrected) n_corr_b++;
    end
    if (arw && brw && aa != ba && !ca && !cb) n_clean++;
    prev_a_rd = arw;
    prev_b_rd = brw;
    prev_a = xa;
    prev_b = xb;
  endtask

  initial begin
    repeat (RANDOM_CYCLES + 4 * WORDS * WORDS + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_addr = '0; b_addr = '0; a_rw_n = 1'b1; b_rw_n = 1'b1; a_wdata = '0; b_wdata = '0;
    for (int i = 0; i < int'(WORDS); i++) model[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1. reset contents
    for (int i = 0; i < int'(WORDS); i++)
      access(N'(i), 1'b1, '0, N'(WORDS - 1 - i), 1'b1, '0);

    // 2. fill through port A, then read every distinct pair
    for (int i = 0; i < int'(WORDS); i++)
      access(N'(i), 1'b0, DW'($urandom), N'(i + 1), 1'b1, '0);
    if (N == 4) access(N'(4'b1001), 1'b1, '0, N'(4'b0111), 1'b1, '0);
    for (int i = 0; i < int'(WORDS); i++)
      for (int j = 0; j < int'(WORDS); j++)
        if (i != j) access(N'(i), 1'b1, '0, N'(j), 1'b1, '0);

    // 3. random traffic, at most one writer per cycle
    for (int it = 0; it < RANDOM_CYCLES; it++) begin
      logic [N-1:0] aa, ba;
      logic arw, brw;
      aa = N'($urandom);
      ba = ($urandom % 6 == 0) ? aa : N'($urandom);
      case ($urandom % 4)
        0:       begin arw = 1'b0; brw = 1'b1; end
        1:       begin arw = 1'b1; brw = 1'b0; end
        default: begin arw = 1'b1; brw = 1'b1; end
      endcase
      access(aa, arw, DW'($urandom), ba, brw, DW'($urandom));
    end

    $display("corrected_a=%0d corrected_b=%0d clean_pairs=%0d same_addr_reads=%0d",
             n_corr_a, n_corr_b, n_clean, n_same_rd);
    $display("read_of_word_being_written=%0d writes_a=%0d writes_b=%0d",
             n_wthru, n_wr_a, n_wr_b);
    checks++;
    if (n_corr_a == 0 || n_corr_b == 0 || n_clean == 0 || n_same_rd == 0 ||
        n_wthru == 0 || n_wr_a == 0 || n_wr_b == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
