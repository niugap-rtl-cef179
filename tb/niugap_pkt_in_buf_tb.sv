// niugap_pkt_in_buf_tb: a switch model offers 200 random packets with the
// four-phase req/acq handshake (random gaps); the output side takes them with
// random backpressure. Checks order and values, that acq only rises while req
// is high and falls after req falls, and that the buffer fills so that acq is
// held back (stall).
`timescale 1ns/1ps
module niugap_pkt_in_buf_tb;
  import niugap_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req, acq, out_valid, out_ready;
  packet_t pkt, out_pkt;
  niugap_pkt_in_buf dut (.*);

  localparam int N = 200;
  packet_t sent [N];
  int checks = 0, failures = 0, nsent = 0, nout = 0, n_stall = 0, hold = 0, cyc = 0;
  logic acq_d = 0, req_d = 0;

  initial begin
    for (int i = 0; i < N; i++) sent[i] = {$urandom, $urandom, $urandom};
    req = 0; pkt = '0; out_ready = 0;
    #22 rst_n = 1;
  end

  always @(posedge clk) if (rst_n) begin
    if (acq && !acq_d && !req_d) begin checks++; failures++; $display("FAIL acq rose without req"); end
    if (acq_d && !req_d && acq) begin checks++; failures++; $display("FAIL acq held after req fell"); end
    if (req && !acq) begin
      hold++;
      if (hold > 2) n_stall++;
    end else hold = 0;
    // switch model: four phases
    if (!req && !acq && nsent < N && $urandom_range(2) == 0) begin
      req <= 1; pkt <= sent[nsent];
    end else if (req && acq) begin
      req <= 0; nsent++;
    end
    if (out_valid && out_ready) begin
      checks++;
      if (out_pkt !== sent[nout]) begin failures++; $display("FAIL packet %0d", nout); end
      nout++;
    end
    cyc++;
    out_ready <= (cyc > 200 && cyc < 260) ? 1'b0 : ($urandom_range(2) != 0);
    acq_d <= acq; req_d <= req;
    if (nout == N) begin
      checks++;
      if (n_stall == 0) begin failures++; $display("FAIL buffer never full"); end
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
