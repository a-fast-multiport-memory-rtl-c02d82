// tb_bin_decoder: exhaustive check of the one-hot bin decoder (N0 = 3).
module tb_bin_decoder;
  localparam int unsigned N0 = 3;
  logic [N0-1:0]    idx;
  logic [2**N0-1:0] sel;
  int checks = 0;
  int failures = 0;

  bin_decoder #(.N0(N0)) dut (.idx(idx), .sel(sel));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2**N0; i++) begin
      idx = N0'(i);
      #1;
      for (int r = 0; r < 2**N0; r++) begin
        checks++;
        if (sel[r] != (r == i)) begin
          failures++;
          $display("FAIL idx=%0d sel=%b", i, sel);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
