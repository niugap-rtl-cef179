// niugap_bin2gray_tb: checks the 4-bit converter against the printed 16-entry
// binary/Gray table, and a 12-bit converter for the single-bit-change and
// uniqueness properties over all 4096 codes.
module niugap_bin2gray_tb;
  logic [3:0]  b4, g4;
  logic [11:0] b12, g12, prev12;
  niugap_bin2gray #(.W(4))  u4  (.bin(b4),  .gray(g4));
  niugap_bin2gray #(.W(12)) u12 (.bin(b12), .gray(g12));

  int checks = 0, failures = 0;
  // Gray column of the 4-bit conversion table, decimal digit 0..15
  logic [3:0] table4 [16] = '{4'b0000, 4'b0001, 4'b0011, 4'b0010, 4'b0110, 4'b0111,
                              4'b0101, 4'b0100, 4'b1100, 4'b1101, 4'b1111, 4'b1110,
                              4'b1010, 4'b1011, 4'b1001, 4'b1000};
  bit seen [4096];

  initial begin
    for (int i = 0; i < 16; i++) begin
      b4 = 4'(i); #1;
      checks++;
      if (g4 !== table4[i]) begin failures++; $display("FAIL bin %0d -> %b, expected %b", i, g4, table4[i]); end
    end
    for (int i = 0; i < 4096; i++) begin
      b12 = 12'(i); #1;
      checks++;
      if (seen[g12]) begin failures++; $display("FAIL code %h repeated", g12); end
      seen[g12] = 1;
      checks++;
      if (i > 0 && $countones(g12 ^ prev12) != 1) begin failures++; $display("FAIL %0d not a single bit change", i); end
      prev12 = g12;
    end
    checks++;
    if ($countones(g12 ^ 12'h000) != 1) begin failures++; $display("FAIL no cyclic wrap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
