// niugap_bs_out_pool_tb: 200 random word groups loaded with random gaps; the
// output must give each group's four words one at a time, index 3 (first
// word) first, under random backpressure. With a ready consumer and a
// waiting producer, 40 words must leave in 40 consecutive clocks (no gap
// between payloads).
`timescale 1ns/1ps
module niugap_bs_out_pool_tb;
  import niugap_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready;
  words_t in_words;
  word_t out_word;
  niugap_bs_out_pool dut (.*);

  localparam int N = 200;
  word_t exp_q [$];
  int checks = 0, failures = 0, nin = 0, nout = 0, burst = 0, max_burst = 0;

  initial begin
    in_valid = 0; in_words = '0; out_ready = 0;
    #22 rst_n = 1;
  end

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      for (int i = 3; i >= 0; i--) exp_q.push_back(in_words[i]);
      nin++;
    end
    if (out_valid && out_ready) begin
      checks++;
      if (out_word !== exp_q[0]) begin failures++; $display("FAIL word %0d", nout); end
      void'(exp_q.pop_front());
      nout++;
      burst++;
      if (burst > max_burst) max_burst = burst;
    end else burst = 0;
    // first 10 payloads back to back, then random traffic
    in_valid  <= (nin + (in_valid && in_ready) < N) && (nin < 10 || $urandom_range(2) != 0);
    in_words  <= {$urandom, $urandom};
    out_ready <= (nout < 40) || ($urandom_range(3) != 0);
    if (nout == 4 * N) begin
      checks++;
      if (max_burst < 39) begin failures++; $display("FAIL longest burst %0d words", max_burst); end
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
