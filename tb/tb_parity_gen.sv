// tb_parity_gen: exhaustive check that data plus generated parity has an odd
// number of ones (DW = 8), counting ones in a loop as the reference.
module tb_parity_gen;
  localparam int unsigned DW = 8;
  logic [DW-1:0] data;
  logic          parity;
  int checks = 0;
  int failures = 0;

  parity_gen #(.DW(DW)) dut (.data(data), .parity(parity));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2**DW; v++) begin
      int ones;
      data = DW'(v);
      #1;
      ones = int'(parity);
      for (int i = 0; i < int'(DW); i++) ones += (v >> i) & 1;
      checks++;
      if (ones % 2 != 1) begin
        failures++;
        $display("FAIL data=%h parity=%b", data, parity);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
