// niugap_tb: end-to-end test of the NIUGAP network interface at its default
// parameters. The processor (proc_clk, 100 MHz) writes N payloads of four
// random 16-bit words into the packet-out side. A switch model (niu_clk,
// 46.7 MHz) takes the packets with the four-phase handshake, keeps a copy of
// each for retransmission, and hands them to the packet-in side of the same
// NIU in locally shuffled order. Some are lost: type A is recovered only by
// retransmission; type B is retransmitted and its original then arrives late
// (must be dropped); type C arrives late while its retransmission request is
// pending (must take the bypass path). The processor reads the words back
// with random pauses and every word must arrive once, in order. N is more
// than one full cycle of the 12-bit sequence tag, so the time tag advances.
// Each mechanism is counted and a failure is counted for any that never
// happens: processor stall, packet out pool full, out-of-order arrival,
// incoming buffer stall, retransmission, late bypass, duplicate drop, time
// tag advance.
`timescale 1ns/1ps
module niugap_tb;
  import niugap_pkg::*;

  localparam int N = 4200;

  logic proc_clk = 0, niu_clk = 0, proc_rst_n = 0, niu_rst_n = 0;
  always #5    proc_clk = ~proc_clk;
  always #10.7 niu_clk  = ~niu_clk;

  addr_t   src_addr = 3'd5, dst_addr = 3'd2;
  ctrl_t   ctrl_bits = 3'd6;
  logic    tx_req, tx_ack, rx_req, rx_ack;
  word_t   tx_data, rx_data;
  logic    pkt_out_req, pkt_out_acq, pkt_in_req, pkt_in_acq;
  packet_t pkt_out, pkt_in, retrans_pkt;
  logic    req_retrans, acq_retrans, dup_drop;
  tag_t    retrans_tag;

  niugap dut (.*);

  int checks = 0, failures = 0;
  int n_tx_stall = 0, n_po_full = 0, n_ooo = 0, n_in_stall = 0, n_retrans = 0;
  int n_late_bypass = 0, n_dup = 0, n_time = 0, n_overflow = 0;

  word_t   words [4*N];
  packet_t store [N];
  bit      got [N];
  bit      late_done [N];
  int      nrx_pkt = 0;      // packets taken from the packet-out side
  int      nrx_word = 0;     // words read by the processor
  int      sent_next = 0;

  function automatic int ungray(logic [15:0] g);
    int b = 0;
    for (int i = 15; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction
  function automatic int tag_index(logic [2:0] t, logic [11:0] s);
    return ungray({13'b0, t}) * 4096 + ungray({4'b0, s});
  endfunction
  function automatic int ltype(int k);  // 0 none, 1 A, 2 B, 3 C
    if (k % 97 == 50) return 1;
    if (k % 97 == 20) return 2;
    if (k % 97 == 80) return 3;
    return 0;
  endfunction
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ---------------- processor: write side
  int ntx = 0;
  initial for (int i = 0; i < 4 * N; i++) words[i] = word_t'($urandom);
  always @(posedge proc_clk) begin
    if (!proc_rst_n) begin
      tx_req <= 0; tx_data <= '0;
    end else begin
      if (tx_req && tx_ack) ntx++;
      if (tx_req && !tx_ack) n_tx_stall++;
      tx_req  <= (ntx < 4 * N) && ($urandom_range(7) != 0);
      tx_data <= words[ntx % (4 * N)];
    end
  end

  // ---------------- processor: read side
  // it pauses for 3000 clocks once, so the whole packet-in side backs up
  int pcyc = 0;
  always @(posedge proc_clk) begin
    if (!proc_rst_n) rx_ack <= 0;
    else begin
      pcyc++;
      if (rx_req && rx_ack) begin
        if (nrx_word < 4 * N) chk(rx_data === words[nrx_word], $sformatf("word %0d", nrx_word));
        else chk(0, "extra word");
        nrx_word++;
      end
      rx_ack <= (pcyc > 20000 && pcyc < 23000) ? 1'b0 : ($urandom_range(5) != 0);
    end
  end

  // ---------------- switch model: take packets from the packet-out side
  always @(posedge niu_clk) begin
    if (!niu_rst_n) pkt_out_acq <= 0;
    else begin
      if (dut.u_po.u_out_pool.full) n_po_full++;
      if (pkt_out_req && !pkt_out_acq && $urandom_range(3) != 0) begin
        chk({pkt_out.time_tag, pkt_out.seq_tag} ==
            {time_tag_t'((nrx_pkt / 4096) ^ (nrx_pkt / 8192)), seq_tag_t'((nrx_pkt % 4096) ^ ((nrx_pkt % 4096) >> 1))},
            $sformatf("tags of packet %0d", nrx_pkt));
        chk(pkt_out.src == src_addr && pkt_out.dst == dst_addr && pkt_out.ctrl == ctrl_bits,
            $sformatf("header of packet %0d", nrx_pkt));
        chk(pkt_out.payload == {words[4*nrx_pkt], words[4*nrx_pkt+1], words[4*nrx_pkt+2], words[4*nrx_pkt+3]},
            $sformatf("payload of packet %0d", nrx_pkt));
        if (pkt_out.time_tag != 0) n_time++;
        store[nrx_pkt] = pkt_out;
        got[nrx_pkt] = 1;
        nrx_pkt++;
        pkt_out_acq <= 1;
      end else if (!pkt_out_req) pkt_out_acq <= 0;
    end
  end

  // ---------------- switch model: deliver to the packet-in side
  int order [$];
  int late_q [$];

  task automatic send(int k);
    int w;
    pkt_in = store[k];
    pkt_in_req = 1;
    w = 0;
    do begin @(posedge niu_clk); w++; end while (!pkt_in_acq);
    if (w > 2) n_in_stall++;
    if (k != sent_next) n_ooo++;
    if (k >= sent_next) sent_next = k + 1;
    #1 pkt_in_req = 0;
    do @(posedge niu_clk); while (pkt_in_acq);
    #1;
  endtask

  initial begin
    int chunk [4];
    int nxt, cnt, r, t, hold_k, hold_cnt;
    pkt_in_req = 0; pkt_in = '0;
    nxt = 0; hold_k = -1; hold_cnt = -1;
    #100 proc_rst_n = 1; niu_rst_n = 1;
    while (nrx_word < 4 * N) begin
      // move packets from the packet-out side into the send order, shuffled
      // four at a time, the lost ones left out and type C marked
      if (order.size() == 0 && (nrx_pkt >= nxt + 4 || (nrx_pkt == N && nxt < N))) begin
        cnt = (N - nxt < 4) ? N - nxt : 4;
        for (int j = 0; j < cnt; j++) chunk[j] = nxt + j;
        for (int j = cnt - 1; j > 0; j--) begin
          r = $urandom_range(j); t = chunk[j]; chunk[j] = chunk[r]; chunk[r] = t;
        end
        for (int j = 0; j < cnt; j++) begin
          if (ltype(chunk[j]) == 0) order.push_back(chunk[j]);
          if (ltype(chunk[j]) == 3) order.push_back(-chunk[j] - 1);
        end
        nxt += cnt;
      end
      if (order.size() > 0 && order[0] < 0) begin
        hold_k = -order.pop_front() - 1; hold_cnt = 3;
      end
      if (late_q.size() > 0) send(late_q.pop_front());
      else if (hold_cnt == 0 && !late_done[hold_k]) @(posedge niu_clk);
      else if (order.size() > 0) begin
        if (hold_cnt > 0 && order[0] > hold_k) hold_cnt--;
        send(order.pop_front());
      end else @(posedge niu_clk);
    end
  end

  // ---------------- retransmission responder
  initial begin
    int k;
    acq_retrans = 0; retrans_pkt = '0;
    forever begin
      @(posedge niu_clk); #1;
      if (req_retrans) begin
        k = tag_index(retrans_tag[14:12], retrans_tag[11:0]);
        n_retrans++;
        chk(k < N && got[k], $sformatf("retransmission request for %0d", k));
        if (ltype(k) == 0) n_overflow++;
        if (ltype(k) == 3 && !late_done[k]) begin
          late_done[k] = 1;
          late_q.push_back(k);
          while (req_retrans) @(posedge niu_clk);
          #1 n_late_bypass++;
        end else begin
          if (ltype(k) == 3) late_done[k] = 1;
          repeat ($urandom_range(1, 4)) @(posedge niu_clk);
          #1 acq_retrans = 1; retrans_pkt = store[k];
          @(posedge niu_clk); #1 acq_retrans = 0;
          if (ltype(k) == 2) fork
            automatic int kk = k;
            begin repeat (60) @(posedge niu_clk); #1 late_q.push_back(kk); end
          join_none
        end
      end
    end
  end

  always @(posedge niu_clk) if (niu_rst_n && dup_drop) n_dup++;

  // ---------------- end
  initial begin
    wait (nrx_word == 4 * N);
    repeat (200) @(posedge niu_clk);
    chk(!rx_req, "no extra words");
    chk(n_tx_stall > 0,    "processor stall happened");
    chk(n_po_full > 0,     "packet out pool filled");
    chk(n_ooo > 0,         "out-of-order arrival happened");
    chk(n_in_stall > 0,    "incoming buffer stall happened");
    chk(n_retrans > 0,     "retransmission happened");
    chk(n_late_bypass > 0, "late original took the bypass path");
    chk(n_dup > 0,         "duplicate dropped");
    chk(n_time > 0,        "time tag advanced");
    $display("tx_stall=%0d po_full=%0d ooo=%0d in_stall=%0d retrans=%0d (overflow %0d) late_bypass=%0d dup=%0d time_adv=%0d",
             n_tx_stall, n_po_full, n_ooo, n_in_stall, n_retrans, n_overflow, n_late_bypass, n_dup, n_time);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("FAIL watchdog: %0d packets out, %0d words back", nrx_pkt, nrx_word);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
