// niugap_tagw_bench: one NIUGAP built with a given time tag width and
// sequence tag width, with its own processor and switch models. The processor
// writes N payloads of four random words; the switch swaps each pair of
// packets on the way back and loses every 37th packet, which comes back only
// through a retransmission. Where the whole tag space is small (7 bits), the
// run goes twice round it, so the time tag wraps back to zero; n_wrap counts
// those wraps. The processor must read every word once, in order, the tags
// on the packets must follow the Gray count with the time tag stepping each
// time the sequence tag wraps, and no packet may be dropped as a duplicate
// (none is sent twice here, even when its tag repeats a retransmitted one). N covers more than one full
// cycle of the sequence tag. done goes high with the check counts when the
// run is over.
`timescale 1ns/1ps
module niugap_tagw_bench #(
  parameter int TIME_W = 3,
  parameter int SEQ_W  = 12
) (
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_retrans,
  output int   n_time,
  output int   n_wrap
);
  import niugap_pkg::*;

  localparam int TAG_BITS = TIME_W + SEQ_W;
  localparam int PW       = TAG_BITS + HDR_PAY_W;
  localparam int SEQ_N    = 1 << SEQ_W;
  localparam int TAG_N    = 1 << TAG_BITS;
  // at least one and a half sequence cycles; where the whole tag space is
  // small, two full turns of it so the time tag wraps too
  localparam int N        = (TAG_N < 1024) ? 2 * TAG_N + 60 : SEQ_N + SEQ_N / 2 + 50;

  logic proc_clk = 0, niu_clk = 0, proc_rst_n = 0, niu_rst_n = 0;
  always #5    proc_clk = ~proc_clk;
  always #10.7 niu_clk  = ~niu_clk;

  addr_t   src_addr = 3'd1, dst_addr = 3'd4;
  ctrl_t   ctrl_bits = 3'd3;
  logic    tx_req, tx_ack, rx_req, rx_ack;
  word_t   tx_data, rx_data;
  logic    pkt_out_req, pkt_out_acq, pkt_in_req, pkt_in_acq;
  logic    [PW-1:0] pkt_out, pkt_in, retrans_pkt;
  logic    req_retrans, acq_retrans, dup_drop;
  logic    [TAG_BITS-1:0] retrans_tag;

  niugap #(.TIME_W(TIME_W), .SEQ_W(SEQ_W)) dut (.*);

  word_t           words [4*N];
  logic [PW-1:0]   store [N];
  bit              got [N];
  int              nrx_pkt = 0, nrx_word = 0, ntx = 0, n_dup = 0;

  function automatic int ungray(logic [31:0] g);
    int b = 0;
    for (int i = 31; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction
  function automatic logic [31:0] gray(int b);
    return 32'(b ^ (b >> 1));
  endfunction
  // index of the most recent packet sent with tag t
  function automatic int tag_index(logic [TAG_BITS-1:0] t);
    int m, k;
    m = ungray(32'(t >> SEQ_W)) * SEQ_N + ungray(32'(t[SEQ_W-1:0]));
    k = nrx_pkt - 1 - (((nrx_pkt - 1 - m) % TAG_N + TAG_N) % TAG_N);
    return k;
  endfunction
  function automatic bit lost(int k);
    return k % 37 == 18;
  endfunction
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL [%0d+%0d] %s", TIME_W, SEQ_W, msg); end
  endtask

  initial begin
    done = 0; checks = 0; failures = 0; n_retrans = 0; n_time = 0; n_wrap = 0;
    for (int i = 0; i < 4 * N; i++) words[i] = word_t'($urandom);
  end

  // processor write side
  always @(posedge proc_clk) begin
    if (!proc_rst_n) begin
      tx_req <= 0; tx_data <= '0;
    end else begin
      if (tx_req && tx_ack) ntx++;
      tx_req  <= (ntx < 4 * N) && ($urandom_range(3) != 0);
      tx_data <= words[ntx % (4 * N)];
    end
  end

  // processor read side
  always @(posedge proc_clk) begin
    if (!proc_rst_n) rx_ack <= 0;
    else begin
      if (rx_req && rx_ack) begin
        if (nrx_word < 4 * N) chk(rx_data === words[nrx_word], $sformatf("word %0d", nrx_word));
        else chk(0, "extra word");
        nrx_word++;
      end
      rx_ack <= $urandom_range(3) != 0;
    end
  end

  // switch: take packets and check their tags and contents
  always @(posedge niu_clk) begin
    if (!niu_rst_n) pkt_out_acq <= 0;
    else if (pkt_out_req && !pkt_out_acq) begin
      if (nrx_pkt < N) begin
        chk(pkt_out[PW-1 -: TAG_BITS] ==
            TAG_BITS'({TIME_W'(gray((nrx_pkt / SEQ_N) % (1 << TIME_W))), SEQ_W'(gray(nrx_pkt % SEQ_N))}),
            $sformatf("tags of packet %0d", nrx_pkt));
        chk(pkt_out[HDR_PAY_W-1:0] ==
            {src_addr, dst_addr, ctrl_bits,
             words[4*nrx_pkt], words[4*nrx_pkt+1], words[4*nrx_pkt+2], words[4*nrx_pkt+3]},
            $sformatf("header and payload of packet %0d", nrx_pkt));
        if (pkt_out[PW-1 -: TIME_W] != 0) n_time++;
        if (nrx_pkt > 0 && nrx_pkt % TAG_N == 0) n_wrap++;
        store[nrx_pkt] = pkt_out;
        got[nrx_pkt] = 1;
      end else chk(0, "extra packet");
      nrx_pkt++;
      pkt_out_acq <= 1;
    end else if (!pkt_out_req) pkt_out_acq <= 0;
  end

  // switch: deliver each pair swapped, lost packets left out
  task automatic send(int k);
    pkt_in = store[k];
    pkt_in_req = 1;
    do @(posedge niu_clk); while (!pkt_in_acq);
    #1 pkt_in_req = 0;
    do @(posedge niu_clk); while (pkt_in_acq);
    #1;
  endtask

  initial begin
    int nxt;
    pkt_in_req = 0; pkt_in = '0; nxt = 0;
    #100 proc_rst_n = 1; niu_rst_n = 1;
    while (nxt < N) begin
      if (nrx_pkt >= nxt + 2) begin
        if (!lost(nxt + 1)) send(nxt + 1);
        if (!lost(nxt)) send(nxt);
        nxt += 2;
      end else if (nrx_pkt == N && nxt == N - 1) begin
        if (!lost(nxt)) send(nxt);
        nxt++;
      end else @(posedge niu_clk);
    end
  end

  always @(posedge niu_clk) if (niu_rst_n && dup_drop) n_dup++;

  // retransmission responder
  initial begin
    int k;
    acq_retrans = 0; retrans_pkt = '0;
    forever begin
      @(posedge niu_clk); #1;
      if (req_retrans) begin
        k = tag_index(retrans_tag);
        n_retrans++;
        chk(k >= 0 && k < N && got[k] && lost(k), $sformatf("retransmission request for %0d", k));
        if (k < 0) k = 0;
        repeat ($urandom_range(1, 4)) @(posedge niu_clk);
        #1 acq_retrans = 1; retrans_pkt = store[k % N];
        @(posedge niu_clk); #1 acq_retrans = 0;
      end
    end
  end

  initial begin
    wait (nrx_word == 4 * N);
    repeat (200) @(posedge niu_clk);
    chk(!rx_req, "no extra words");
    chk(n_retrans == (N + 18) / 37, "one retransmission per lost packet");
    chk(n_time > 0, "time tag advanced");
    chk(n_dup == 0, "no packet dropped as a duplicate");
    done = 1;
  end
endmodule
