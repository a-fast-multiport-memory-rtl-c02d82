// tb_dp_bin: random requests on both ports of one bin (N1 = 2), checked against a
// reference model of the bin's cells and of the ownership rules:
//   one port selects              -> that port is served;
//   both, same cell, <= 1 writer  -> both served, a reader sees the written bit;
//   both, otherwise               -> port B wins if it writes while A reads, else
//                                    port A wins; the loser's erasure output rises.
// Outputs are compared one cycle after the request. Each case is counted and must
// occur at least once.
module tb_dp_bin;
  localparam int unsigned N1 = 2;
  localparam int unsigned DEPTH = 2 ** N1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic s_a, rw_n_a, wd_a, rd_a, e_a;
  logic s_b, rw_n_b, wd_b, rd_b, e;
  logic [N1-1:0] x1_a, x1_b;

  always #5 clk = ~clk;

  dp_bin #(.N1(N1), .INIT(1'b1)) dut (.*);

  int checks = 0;
  int failures = 0;
  int n_only_a = 0, n_only_b = 0, n_share = 0, n_a_wins = 0, n_b_wins = 0, n_wthru = 0;
  bit model [DEPTH];

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%b exp=%b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic xa, xb, ea, eb;
    {s_a, rw_n_a, wd_a, s_b, rw_n_b, wd_b} = '0;
    x1_a = '0;
    x1_b = '0;
    for (int i = 0; i < int'(DEPTH); i++) model[i] = 1'b1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // after reset every cell holds INIT
    for (int i = 0; i < int'(DEPTH); i++) begin
      s_a = 1'b1; rw_n_a = 1'b1; x1_a = N1'(i); s_b = 1'b0;
      @(negedge clk);
      check("reset value", rd_a, 1'b1);
    end
    for (int it = 0; it < 4000; it++) begin
      s_a    = ($urandom % 4) != 0;
      s_b    = ($urandom % 4) != 0;
      rw_n_a = ($urandom % 2) != 0;
      rw_n_b = ($urandom % 2) != 0;
      wd_a   = 1'($urandom);
      wd_b   = 1'($urandom);
      x1_a   = N1'($urandom);
      x1_b   = ($urandom % 3 == 0) ? x1_a : N1'($urandom);
      // reference
      xa = 1'b0; xb = 1'b0; ea = 1'b0; eb = 1'b0;
      if (s_a && !s_b) begin
        n_only_a++;
        xa = rw_n_a ? model[x1_a] : wd_a;
        if (!rw_n_a) model[x1_a] = wd_a;
      end else if (s_b && !s_a) begin
        n_only_b++;
        xb = rw_n_b ? model[x1_b] : wd_b;
        if (!rw_n_b) model[x1_b] = wd_b;
      end else if (s_a && s_b && x1_a == x1_b && (rw_n_a || rw_n_b)) begin
        n_share++;
        if (!rw_n_a) begin
          n_wthru++;
          model[x1_a] = wd_a;
        end else if (!rw_n_b) begin
          n_wthru++;
          model[x1_b] = wd_b;
        end
        xa = model[x1_a];
        xb = xa;
      end else if (s_a && s_b) begin
        if (!rw_n_b && rw_n_a) begin
          n_b_wins++;
          ea = 1'b1;
          xb = wd_b;
          model[x1_b] = wd_b;
        end else begin
          n_a_wins++;
          eb = 1'b1;
          xa = rw_n_a ? model[x1_a] : wd_a;
          if (!rw_n_a) model[x1_a] = wd_a;
        end
      end
      @(negedge clk);
      if (s_a && rw_n_a) check("rd_a", rd_a, xa);
      if (s_b && rw_n_b) check("rd_b", rd_b, xb);
      if (!s_a || ea) check("rd_a idle", rd_a, 1'b0);
      if (!s_b || eb) check("rd_b idle", rd_b, 1'b0);
      check("e_a", e_a, ea);
      check("e", e, eb);
    end
    // final read-back of every cell through port B
    s_a = 1'b0;
    for (int i = 0; i < int'(DEPTH); i++) begin
      s_b = 1'b1; rw_n_b = 1'b1; x1_b = N1'(i);
      @(negedge clk);
      check("readback", rd_b, model[i]);
    end
    $display("only_a=%0d only_b=%0d share=%0d write_through=%0d a_wins=%0d b_wins=%0d",
             n_only_a, n_only_b, n_share, n_wthru, n_a_wins, n_b_wins);
    checks++;
    if (n_only_a == 0 || n_only_b == 0 || n_share == 0 || n_wthru == 0 ||
        n_a_wins == 0 || n_b_wins == 0) begin
      failures++;
      $display("FAIL a case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
