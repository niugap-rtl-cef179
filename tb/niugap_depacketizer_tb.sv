// niugap_depacketizer_tb: 300 random packets with random gaps and output
// backpressure; the output word array must hold the payload split in four,
// first word (index 3) from the most significant bits, header removed.
// Checks the one-clock latency on the first packet.
`timescale 1ns/1ps
module niugap_depacketizer_tb;
  import niugap_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready;
  packet_t in_pkt;
  words_t out_words;
  niugap_depacketizer dut (.*);

  localparam int N = 300;
  payload_t exp_q [$];
  int checks = 0, failures = 0, nin = 0, nout = 0;
  bit first = 0;

  initial begin
    in_valid = 0; in_pkt = '0; out_ready = 0;
    #22 rst_n = 1;
  end

  always @(posedge clk) if (rst_n) begin
    if (first) begin
      checks++; first = 0;
      if (!out_valid) begin failures++; $display("FAIL latency"); end
    end
    if (in_valid && in_ready) begin
      exp_q.push_back(in_pkt.payload);
      if (nin == 0) first = 1;
      nin++;
    end
    if (out_valid && out_ready) begin
      checks++;
      if (out_words[3] !== exp_q[0][63:48] || out_words[2] !== exp_q[0][47:32] ||
          out_words[1] !== exp_q[0][31:16] || out_words[0] !== exp_q[0][15:0]) begin
        failures++; $display("FAIL packet %0d", nout);
      end
      void'(exp_q.pop_front());
      nout++;
    end
    in_valid  <= (nin + (in_valid && in_ready) < N) && ($urandom_range(3) != 0);
    in_pkt    <= {$urandom, $urandom, $urandom};
    out_ready <= (nout < 2) || ($urandom_range(3) != 0);
    if (nout == N) begin
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
