// niugap_bs_in_pool_tb: feeds 400 random words with random gaps and random
// backpressure on the payload side; every four words must come out as one
// 64-bit payload, first word in the most significant bits. Also checks that
// in_ready falls while a full payload waits (the stall happens).
`timescale 1ns/1ps
module niugap_bs_in_pool_tb;
  import niugap_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready;
  word_t in_word;
  payload_t out_payload;
  niugap_bs_in_pool dut (.*);

  localparam int N = 400;
  word_t words [N];
  int checks = 0, failures = 0, nin = 0, nout = 0, n_stall = 0;

  initial begin
    for (int i = 0; i < N; i++) words[i] = word_t'($urandom);
    in_valid = 0; in_word = '0; out_ready = 0;
    #22 rst_n = 1;
  end

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) nin++;
    if (in_valid && !in_ready) n_stall++;
    if (out_valid && out_ready) begin
      checks++;
      if (out_payload !== {words[4*nout], words[4*nout+1], words[4*nout+2], words[4*nout+3]}) begin
        failures++; $display("FAIL payload %0d: %h", nout, out_payload);
      end
      nout++;
    end
    in_valid  <= (nin < N) && ($urandom_range(4) != 0);
    in_word   <= words[nin % N];
    out_ready <= $urandom_range(2) != 0;
    if (nout == N / 4) begin
      checks++;
      if (n_stall == 0) begin failures++; $display("FAIL no stall seen"); end
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
