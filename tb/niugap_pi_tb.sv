// niugap_pi_tb: packet-in module on its own. A switch model sends N = 300
// packets with consecutive Gray tags, shuffled four at a time, and loses
// packet 100; the module must request it by tag after its timing threshold,
// take it from acq_retrans/retrans_pkt, and the processor (random pauses)
// must read every payload word once, in order.
`timescale 1ns/1ps
module niugap_pi_tb;
  import niugap_pkg::*;
  localparam int N = 300;
  localparam int LOST = 100;
  logic proc_clk = 0, niu_clk = 0, proc_rst_n = 0, niu_rst_n = 0;
  always #5    proc_clk = ~proc_clk;
  always #10.7 niu_clk  = ~niu_clk;
  logic pkt_in_req, pkt_in_acq, req_retrans, acq_retrans, dup_drop, rx_req, rx_ack;
  packet_t pkt_in, retrans_pkt;
  tag_t retrans_tag;
  word_t rx_data;
  niugap_pi dut (.*);

  packet_t pk [N];
  int checks = 0, failures = 0, nw = 0, n_ooo = 0, n_req = 0;

  function automatic packet_t mk(int k);
    packet_t p;
    p.time_tag = '0;
    p.seq_tag  = seq_tag_t'(k ^ (k >> 1));
    p.src = 3'd1; p.dst = 3'd0; p.ctrl = '0;
    p.payload = {$urandom, $urandom};
    return p;
  endfunction

  always @(posedge proc_clk) begin
    if (!proc_rst_n) rx_ack <= 0;
    else begin
      if (rx_req && rx_ack) begin
        checks++;
        if (rx_data !== pk[nw / 4].payload[16 * (3 - nw % 4) +: 16]) begin
          failures++; $display("FAIL word %0d", nw);
        end
        nw++;
      end
      rx_ack <= $urandom_range(3) != 0;
    end
  end

  initial begin
    int chunk [4];
    int r, t;
    for (int k = 0; k < N; k++) pk[k] = mk(k);
    pkt_in_req = 0; pkt_in = '0;
    #100 proc_rst_n = 1; niu_rst_n = 1;
    for (int b = 0; b < N; b += 4) begin
      for (int j = 0; j < 4; j++) chunk[j] = b + j;
      for (int j = 3; j > 0; j--) begin
        r = $urandom_range(j); t = chunk[j]; chunk[j] = chunk[r]; chunk[r] = t;
      end
      for (int j = 0; j < 4; j++) begin
        if (chunk[j] == LOST) continue;
        if (chunk[j] != b + j) n_ooo++;
        @(posedge niu_clk); #1;
        pkt_in = pk[chunk[j]]; pkt_in_req = 1;
        do @(posedge niu_clk); while (!pkt_in_acq);
        #1 pkt_in_req = 0;
        do @(posedge niu_clk); while (pkt_in_acq);
      end
    end
  end

  initial begin
    acq_retrans = 0; retrans_pkt = '0;
    forever begin
      @(posedge niu_clk); #1;
      if (req_retrans) begin
        n_req++;
        checks++;
        if (retrans_tag != {3'b000, pk[LOST].seq_tag}) begin
          failures++; $display("FAIL retransmission tag %h", retrans_tag);
        end
        repeat (2) @(posedge niu_clk);
        #1 acq_retrans = 1; retrans_pkt = pk[LOST];
        @(posedge niu_clk); #1 acq_retrans = 0;
      end
    end
  end

  initial begin
    wait (nw == 4 * N);
    repeat (100) @(posedge proc_clk);
    checks += 3;
    if (rx_req)     begin failures++; $display("FAIL extra word"); end
    if (n_req != 1) begin failures++; $display("FAIL %0d retransmission requests", n_req); end
    if (n_ooo == 0) begin failures++; $display("FAIL no out-of-order packet"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("FAIL watchdog: %0d words", nw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
