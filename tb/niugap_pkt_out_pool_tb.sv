// niugap_pkt_out_pool_tb: 200 random packets enter with random gaps; a switch
// model answers req with acq after a random delay and drops acq a random
// time after req falls. Checks packet order and values, that pkt is stable
// while req is high, that req never rises while acq is still high, that the
// pool fills (in_ready low), and the four-clock minimum per packet.
`timescale 1ns/1ps
module niugap_pkt_out_pool_tb;
  import niugap_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, req, acq;
  packet_t in_pkt, pkt;
  niugap_pkt_out_pool dut (.*);

  localparam int N = 200;
  packet_t exp_q [$];
  int checks = 0, failures = 0, nin = 0, nout = 0, n_full = 0, wait_cnt = 0;
  logic req_d = 0;
  packet_t pkt_d;
  int t_first = -1, cyc = 0;

  initial begin
    in_valid = 0; in_pkt = '0; acq = 0;
    #22 rst_n = 1;
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (in_valid && in_ready) begin exp_q.push_back(in_pkt); nin++; end
    if (in_valid && !in_ready) n_full++;
    if (req && req_d) begin
      checks++;
      if (pkt !== pkt_d) begin failures++; $display("FAIL pkt changed while req high"); end
    end
    if (req && !req_d && acq) begin checks++; failures++; $display("FAIL req rose while acq high"); end
    // switch model
    if (req && !acq) begin
      if (wait_cnt == 0) begin
        acq <= 1;
        checks++;
        if (pkt !== exp_q[0]) begin failures++; $display("FAIL packet %0d", nout); end
        void'(exp_q.pop_front());
        nout++;
        if (nout == 1) t_first = cyc;
        if (nout == 11) begin
          checks++;
          if (cyc - t_first < 40) begin failures++; $display("FAIL ten packets in %0d clocks", cyc - t_first); end
        end
        wait_cnt <= $urandom_range(3);
      end else wait_cnt <= wait_cnt - 1;
    end else if (!req && acq) acq <= 0;
    req_d <= req; pkt_d <= pkt;
    in_valid <= (nin + (in_valid && in_ready) < N) && ($urandom_range(1) == 0);
    in_pkt   <= {$urandom, $urandom, $urandom};
    if (nout == N) begin
      checks++;
      if (n_full == 0) begin failures++; $display("FAIL pool never full"); end
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
