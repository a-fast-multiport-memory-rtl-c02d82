// tb_mem_column: random traffic on one column (N0 = 3, N1 = 2, column index 5),
// checked against a bit-per-address model. The testbench computes each port's bin
// with its own GF(2^3) reference, so it predicts when the two ports meet in a bin
// and which port's bit is erased. Read bits and erasure flags are compared one
// cycle after the request.
module tb_mem_column;
  import tb_ref_pkg::*;
  localparam int unsigned N0 = 3;
  localparam int unsigned N1 = 2;
  localparam int unsigned Y  = 5;
  localparam int unsigned N  = N0 + N1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [N-1:0] addr_a, addr_b;
  logic rw_n_a, wbit_a, rbit_a, era_a;
  logic rw_n_b, wbit_b, rbit_b, era_b;

  always #5 clk = ~clk;

  mem_column #(.N0(N0), .N1(N1), .Y(Y), .INIT(1'b0)) dut (.*);

  int checks = 0;
  int failures = 0;
  int n_conf_a = 0, n_conf_b = 0, n_same = 0, n_free = 0;
  bit model [2**N];

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%b exp=%b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned ba, bb;
    logic xa, xb, ea, eb;
    addr_a = '0; addr_b = '0;
    {rw_n_a, wbit_a, rw_n_b, wbit_b} = 4'b1010;
    for (int i = 0; i < 2**N; i++) model[i] = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 20000; it++) begin
      addr_a = N'($urandom);
      addr_b = ($urandom % 8 == 0) ? addr_a : N'($urandom);
      case ($urandom % 3)
        0: begin rw_n_a = 1'b1; rw_n_b = 1'b1; end
        1: begin rw_n_a = 1'b0; rw_n_b = 1'b1; end
        default: begin rw_n_a = 1'b1; rw_n_b = 1'b0; end
      endcase
      wbit_a = 1'($urandom);
      wbit_b = 1'($urandom);
      ba = ref_bin(addr_a >> N1, addr_a % (1 << N1), Y, N0, N1);
      bb = ref_bin(addr_b >> N1, addr_b % (1 << N1), Y, N0, N1);
      ea = 1'b0; eb = 1'b0;
      if (addr_a == addr_b) begin
        n_same++;
        if (!rw_n_a) model[addr_a] = wbit_a;
        if (!rw_n_b) model[addr_b] = wbit_b;
        xa = model[addr_a];
        xb = xa;
      end else if (ba == bb) begin
        if (!rw_n_b && rw_n_a) begin
          n_conf_a++;
          ea = 1'b1;
          model[addr_b] = wbit_b;
        end else begin
          n_conf_b++;
          eb = 1'b1;
          if (!rw_n_a) model[addr_a] = wbit_a;
        end
        xa = ea ? 1'b0 : model[addr_a];
        xb = eb ? 1'b0 : model[addr_b];
      end else begin
        n_free++;
        if (!rw_n_a) model[addr_a] = wbit_a;
        if (!rw_n_b) model[addr_b] = wbit_b;
        xa = model[addr_a];
        xb = model[addr_b];
      end
      @(negedge clk);
      if (rw_n_a) check("rbit_a", rbit_a, xa);
      if (rw_n_b) check("rbit_b", rbit_b, xb);
      check("era_a", era_a, ea);
      check("era_b", era_b, eb);
    end
    $display("same_addr=%0d conflicts_b_erased=%0d conflicts_a_erased=%0d no_conflict=%0d",
             n_same, n_conf_b, n_conf_a, n_free);
    checks++;
    if (n_same == 0 || n_conf_a == 0 || n_conf_b == 0 || n_free == 0) begin
      failures++;
      $display("FAIL a case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
