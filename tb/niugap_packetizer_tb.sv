// niugap_packetizer_tb: sends 4100 payloads (one more than a full 12-bit
// sequence cycle) with random header inputs and backpressure. Packet k must
// carry sequence tag gray(k mod 4096), time tag gray(k div 4096), the header
// bits sampled with its payload, and the payload. Also checks that a packet
// is offered one clock after its payload is taken.
`timescale 1ns/1ps
module niugap_packetizer_tb;
  import niugap_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready;
  payload_t in_payload;
  addr_t src_addr, dst_addr;
  ctrl_t ctrl_bits;
  packet_t out_pkt;
  niugap_packetizer dut (.*);

  localparam int N = 4100;
  packet_t exp_q [$];
  int checks = 0, failures = 0, nin = 0, nout = 0, n_time = 0;
  bit first_taken = 0;

  function automatic int gray(int v); return v ^ (v >> 1); endfunction

  initial begin
    in_valid = 0; in_payload = '0; out_ready = 0; src_addr = 0; dst_addr = 0; ctrl_bits = 0;
    #22 rst_n = 1;
  end

  always @(posedge clk) if (rst_n) begin
    if (first_taken) begin
      checks++;
      if (!out_valid) begin failures++; $display("FAIL packet not offered one clock after its payload"); end
      first_taken = 0;
    end
    if (in_valid && in_ready) begin
      packet_t p;
      p.time_tag = time_tag_t'(gray(nin / 4096));
      p.seq_tag  = seq_tag_t'(gray(nin % 4096));
      p.src = src_addr; p.dst = dst_addr; p.ctrl = ctrl_bits; p.payload = in_payload;
      exp_q.push_back(p);
      if (nin == 0) first_taken = 1;
      nin++;
    end
    if (out_valid && out_ready) begin
      checks++;
      if (out_pkt !== exp_q[0]) begin
        failures++; $display("FAIL packet %0d: %h expected %h", nout, out_pkt, exp_q[0]);
      end
      if (out_pkt.time_tag != 0) n_time++;
      void'(exp_q.pop_front());
      nout++;
    end
    in_valid   <= (nin + (in_valid && in_ready) < N) && ($urandom_range(3) != 0);
    in_payload <= {$urandom, $urandom};
    src_addr   <= addr_t'($urandom); dst_addr <= addr_t'($urandom); ctrl_bits <= ctrl_t'($urandom);
    out_ready  <= (nout < 5) ? 1'b1 : ($urandom_range(3) != 0);
    if (nout == N) begin
      checks++;
      if (n_time == 0) begin failures++; $display("FAIL time tag never advanced"); end
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    #500000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
