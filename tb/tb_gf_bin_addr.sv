// tb_gf_bin_addr: checks the bin-address generator in two sizes.
// For every column of a full set of columns and every address it compares the
// bin index with an independent GF(2^m) reference, and it checks the
// unit-overlap principle: any two distinct addresses share a bin in at most one
// column.
module tb_gf_bin_addr;
  import tb_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  // Size 1: N0 = N1 = 2 (4 columns). Size 2: N0 = 3, N1 = 2 (8 columns).
  localparam int unsigned P0 = 2, Q0 = 2, C0 = 4;
  localparam int unsigned P1 = 3, Q1 = 2, C1 = 8;

  logic [P0-1:0] x0_s;
  logic [Q0-1:0] x1_s;
  logic [P0-1:0] bin_s [C0];
  logic [P1-1:0] x0_l;
  logic [Q1-1:0] x1_l;
  logic [P1-1:0] bin_l [C1];

  for (genvar y = 0; y < C0; y++) begin : g_s
    gf_bin_addr #(.N0(P0), .N1(Q0), .Y(y)) dut (.x0(x0_s), .x1(x1_s), .bin(bin_s[y]));
  end
  for (genvar y = 0; y < C1; y++) begin : g_l
    gf_bin_addr #(.N0(P1), .N1(Q1), .Y(y)) dut (.x0(x0_l), .x1(x1_l), .bin(bin_l[y]));
  end

  int unsigned tab_s [2**(P0+Q0)][C0];
  int unsigned tab_l [2**(P1+Q1)][C1];

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // exhaustive comparison against the reference
    for (int a = 0; a < 2**(P0+Q0); a++) begin
      {x0_s, x1_s} = (P0+Q0)'(a);
      #1;
      for (int y = 0; y < C0; y++) begin
        checks++;
        tab_s[a][y] = bin_s[y];
        if (bin_s[y] != P0'(ref_bin(a >> Q0, a % (1 << Q0), y, P0, Q0))) begin
          failures++;
          $display("FAIL small addr=%0d y=%0d bin=%0d", a, y, bin_s[y]);
        end
      end
    end
    for (int a = 0; a < 2**(P1+Q1); a++) begin
      {x0_l, x1_l} = (P1+Q1)'(a);
      #1;
      for (int y = 0; y < C1; y++) begin
        checks++;
        tab_l[a][y] = bin_l[y];
        if (bin_l[y] != P1'(ref_bin(a >> Q1, a % (1 << Q1), y, P1, Q1))) begin
          failures++;
          $display("FAIL large addr=%0d y=%0d bin=%0d", a, y, bin_l[y]);
        end
      end
    end
    // unit-overlap principle on what the RTL produced
    for (int a = 0; a < 2**(P0+Q0); a++)
      for (int b = a + 1; b < 2**(P0+Q0); b++) begin
        int shared;
        shared = 0;
        for (int y = 0; y < C0; y++) if (tab_s[a][y] == tab_s[b][y]) shared++;
        checks++;
        if (shared > 1) begin
          failures++;
          $display("FAIL small overlap a=%0d b=%0d shared=%0d", a, b, shared);
        end
      end
    for (int a = 0; a < 2**(P1+Q1); a++)
      for (int b = a + 1; b < 2**(P1+Q1); b++) begin
        int shared;
        shared = 0;
        for (int y = 0; y < C1; y++) if (tab_l[a][y] == tab_l[b][y]) shared++;
        checks++;
        if (shared > 1) begin
          failures++;
          $display("FAIL large overlap a=%0d b=%0d shared=%0d", a, b, shared);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
