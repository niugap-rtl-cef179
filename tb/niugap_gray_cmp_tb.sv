// niugap_gray_cmp_tb: for every pair of 4-bit codes, the successor check is
// compared with the printed 4-bit Gray table (cyclic), the Hamming-distance
// output with a bit count; then random 12-bit pairs are checked against a
// reference that converts the codes to binary and adds one.
module niugap_gray_cmp_tb;
  logic [3:0]  p4, c4, n4;
  logic [11:0] p12, c12, n12;
  logic        hd4, nx4, hd12, nx12;
  niugap_gray_cmp #(.W(4)) u4  (.prev(p4),  .cand(c4),  .hd1(hd4),  .is_next(nx4),  .next_code(n4));
  niugap_gray_cmp          u12 (.prev(p12), .cand(c12), .hd1(hd12), .is_next(nx12), .next_code(n12));

  int checks = 0, failures = 0, n_hd1_not_next = 0;
  logic [3:0] table4 [16] = '{4'b0000, 4'b0001, 4'b0011, 4'b0010, 4'b0110, 4'b0111,
                              4'b0101, 4'b0100, 4'b1100, 4'b1101, 4'b1111, 4'b1110,
                              4'b1010, 4'b1011, 4'b1001, 4'b1000};
  function automatic int g2b(logic [11:0] g);
    int b = 0;
    for (int i = 11; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  initial begin
    for (int a = 0; a < 16; a++)
      for (int c = 0; c < 16; c++) begin
        p4 = table4[a]; c4 = table4[c]; #1;
        checks++;
        if (nx4 !== (c == (a + 1) % 16)) begin failures++; $display("FAIL is_next %b %b", p4, c4); end
        checks++;
        if (hd4 !== ($countones(p4 ^ c4) == 1)) begin failures++; $display("FAIL hd1 %b %b", p4, c4); end
        checks++;
        if (n4 !== table4[(a + 1) % 16]) begin failures++; $display("FAIL next_code %b", p4); end
        if (hd4 && !nx4) n_hd1_not_next++;
      end
    for (int i = 0; i < 3000; i++) begin
      p12 = 12'($urandom);
      case (i % 3)
        0: c12 = p12 ^ (12'd1 << $urandom_range(11));  // distance 1
        1: c12 = 12'((g2b(p12) + 1) ^ ((g2b(p12) + 1) >> 1));  // successor
        default: c12 = 12'($urandom);
      endcase
      #1;
      checks++;
      if (nx12 !== (g2b(c12) == (g2b(p12) + 1) % 4096)) begin failures++; $display("FAIL 12-bit %h %h", p12, c12); end
      checks++;
      if (g2b(n12) != (g2b(p12) + 1) % 4096) begin failures++; $display("FAIL 12-bit next_code %h", p12); end
    end
    checks++;
    if (n_hd1_not_next == 0) begin failures++; $display("FAIL no distance-1 non-successor seen"); end
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
