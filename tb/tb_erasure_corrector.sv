// tb_erasure_corrector: checks single-erasure correction for a 9-bit stored word
// (8 data bits and parity): the worked example 01?110100 (erased bit must be 1),
// and every odd-parity word with every erased position and a random garbage value
// in the erased position, plus words with no erasure.
module tb_erasure_corrector;
  localparam int unsigned W = 9;
  logic [W-1:0] word;
  logic [W-1:0] erase;
  logic [W-2:0] data;
  logic         corrected;
  int checks = 0;
  int failures = 0;

  erasure_corrector #(.W(W)) dut (.word(word), .erase(erase), .data(data),
                                  .corrected(corrected));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Worked example, leftmost character is bit 8: 0 1 ? 1 1 0 1 0 0, '?' at bit 6.
    word  = 9'b010110100;
    erase = 9'b001000000;
    #1;
    checks++;
    if (data != 8'b11110100 || !corrected) begin
      failures++;
      $display("FAIL example data=%b", data);
    end
    for (int v = 0; v < 2**(W-1); v++) begin
      logic [W-1:0] good;
      good = {~(^v[W-2:0]), v[W-2:0]};   // odd parity
      word  = good;
      erase = '0;
      #1;
      checks++;
      if (data != good[W-2:0] || corrected) begin
        failures++;
        $display("FAIL clean v=%h data=%h", v, data);
      end
      for (int p = 0; p < int'(W); p++) begin
        word = good;
        word[p] = 1'($urandom);
        erase = '0;
        erase[p] = 1'b1;
        #1;
        checks++;
        if (data != good[W-2:0] || !corrected) begin
          failures++;
          $display("FAIL v=%h erased=%0d data=%h", v, p, data);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
