// niugap_reorder_ctrl_tb: self-checking test of the Gray code reorder
// controller. N packets with consecutive {time, seq} tags (time tag advances
// when the 12-bit sequence tag rolls over) are sent in locally shuffled order.
// Some are lost: type A is recovered only by retransmission, type B is
// retransmitted and its original then arrives late (must be dropped), type C
// arrives late while its retransmission request is pending (must take the
// bypass path). The checker expects every packet exactly once, in tag order,
// with its payload, and checks the latency of a packet through the idle
// block (2 clocks). It counts each mechanism and fails if one never occurs.
`timescale 1ns/1ps
module niugap_reorder_ctrl_tb;
  import niugap_pkg::*;

  localparam int N      = 4200;
  localparam int THRESH = 32;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic    in_valid, in_ready, out_valid, out_ready;
  packet_t in_pkt, out_pkt, retrans_pkt;
  logic    req_retrans, acq_retrans, dup_drop;
  tag_t    retrans_tag;

  niugap_reorder_ctrl #(.THRESH(THRESH)) dut (.*);

  int checks = 0, failures = 0;
  int n_overflow = 0, n_ooo = 0, n_retrans = 0, n_late_bypass = 0, n_dup = 0, n_wrap = 0, n_full = 0;

  function automatic logic [11:0] g12(int v); return 12'(v ^ (v >> 1)); endfunction
  function automatic logic [2:0]  g3(int v);  return 3'(v ^ (v >> 1)); endfunction
  function automatic int ungray(logic [15:0] g);
    int b = 0;
    for (int i = 15; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction
  function automatic int tag_index(tag_t t);
    return ungray({13'b0, t[14:12]}) * 4096 + ungray({4'b0, t[11:0]});
  endfunction

  payload_t pl [N];
  function automatic packet_t mk(int k);
    packet_t p;
    p.time_tag = g3(k / 4096);
    p.seq_tag  = g12(k % 4096);
    p.src = 3'd1; p.dst = 3'd2; p.ctrl = 3'(k);
    p.payload = pl[k];
    return p;
  endfunction
  function automatic int ltype(int k);  // 0 none, 1 A, 2 B, 3 C
    if (k % 97 == 50) return 1;
    if (k % 97 == 20) return 2;
    if (k % 97 == 80) return 3;
    return 0;
  endfunction

  bit late_done [N];
  int order [$];
  int late_q [$];
  int next_out = 0;
  int sent_next = 0;  // lowest index not yet seen on the input in order

  // ---------------- sender
  initial begin
    int chunk [4];
    int r, t, lat;
    int hold_k = -1, hold_cnt = -1;
    for (int k = 0; k < N; k++) pl[k] = {$urandom, $urandom};
    order.push_back(0);
    for (int b = 1; b < N; b += 4) begin
      for (int j = 0; j < 4; j++) chunk[j] = (b + j < N) ? b + j : -1;
      for (int j = 3; j > 0; j--) begin
        r = $urandom_range(j); t = chunk[j]; chunk[j] = chunk[r]; chunk[r] = t;
      end
      for (int j = 0; j < 4; j++) begin
        if (chunk[j] >= 0 && ltype(chunk[j]) == 0) order.push_back(chunk[j]);
        if (chunk[j] >= 0 && ltype(chunk[j]) == 3) order.push_back(-chunk[j] - 1);  // marker
      end
    end
    in_valid = 0; in_pkt = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    // latency of the first packet through the idle block
    in_valid = 1; in_pkt = mk(order.pop_front());
    @(posedge clk); #1; in_valid = 0;
    begin
      lat = 0;
      while (!out_valid) begin @(posedge clk); #1; lat++; end
      checks++;
      if (lat != 1) begin failures++; $display("FAIL latency: offered %0d clocks after take, expected 2", lat + 1); end
    end
    while (order.size() > 0 || late_q.size() > 0 || next_out < N) begin
      // after the place of a type C loss, send three more packets, then wait
      // so that the pool has room when the late original comes
      if (order.size() > 0 && order[0] < 0) begin
        hold_k = -order.pop_front() - 1; hold_cnt = 3;
      end
      if (late_q.size() > 0) begin
        in_pkt = mk(late_q.pop_front()); in_valid = 1;
      end else if (hold_cnt == 0 && next_out <= hold_k) begin
        in_valid = 0;
      end else if (order.size() > 0 && order[0] >= 0 && $urandom_range(3) != 0) begin
        if (hold_cnt > 0 && order[0] > hold_k) hold_cnt--;
        in_pkt = mk(order.pop_front()); in_valid = 1;
      end else in_valid = 0;
      @(posedge clk);
      while (in_valid && !in_ready) begin n_full++; @(posedge clk); end
      #1 in_valid = 0;
    end
  end

  // ---------------- retransmission responder
  initial begin
    int k;
    acq_retrans = 0; retrans_pkt = '0;
    forever begin
      @(posedge clk); #1;
      if (req_retrans) begin
        k = tag_index(retrans_tag);
        n_retrans++;
        checks++;
        if (k != next_out + dut.u_order.count) begin
          failures++; $display("FAIL retransmission request for %0d, expected %0d", k, next_out + dut.u_order.count);
        end
        // a request for a packet that was not lost means the pool overflowed
        if (ltype(k) == 0) n_overflow++;
        if (ltype(k) == 3 && !late_done[k]) begin
          late_done[k] = 1;
          late_q.push_back(k);
          while (req_retrans) @(posedge clk);
          #1 n_late_bypass++;
        end else begin
          repeat ($urandom_range(1, 4)) @(posedge clk);
          #1 acq_retrans = 1; retrans_pkt = mk(k);
          @(posedge clk); #1 acq_retrans = 0;
          if (ltype(k) == 2) fork
            automatic int kk = k;
            begin repeat (40) @(posedge clk); #1 late_q.push_back(kk); end
          join_none
        end
      end
    end
  end

  // ---------------- checker
  logic [2:0] prev_time = 3'd0;
  always @(posedge clk) begin
    if (rst_n && dup_drop) n_dup++;
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (out_pkt !== mk(next_out)) begin
        failures++;
        $display("FAIL out %0d: got tag %h, expected %h", next_out,
                 {out_pkt.time_tag, out_pkt.seq_tag}, {mk(next_out).time_tag, mk(next_out).seq_tag});
      end
      if (out_pkt.time_tag != prev_time) n_wrap++;
      prev_time = out_pkt.time_tag;
      next_out++;
    end
    if (rst_n && in_valid && in_ready) begin
      if (tag_index({in_pkt.time_tag, in_pkt.seq_tag}) != sent_next) n_ooo++;
      if (tag_index({in_pkt.time_tag, in_pkt.seq_tag}) >= sent_next)
        sent_next = tag_index({in_pkt.time_tag, in_pkt.seq_tag}) + 1;
    end
    out_ready <= ($urandom_range(7) != 0);
  end

  initial begin
    wait (next_out == N);
    repeat (50) @(posedge clk);
    checks++; if (out_valid) begin failures++; $display("FAIL extra output"); end
    checks += 5;
    if (n_ooo == 0)         begin failures++; $display("FAIL no out-of-order arrival"); end
    if (n_retrans == 0)     begin failures++; $display("FAIL no retransmission request"); end
    if (n_late_bypass == 0) begin failures++; $display("FAIL no late original on bypass"); end
    if (n_dup == 0)         begin failures++; $display("FAIL no duplicate dropped"); end
    if (n_wrap == 0)        begin failures++; $display("FAIL time tag never advanced"); end
    $display("overflow_recoveries=%0d ooo=%0d retrans=%0d late_bypass=%0d dup=%0d time_wraps=%0d pool_full_stalls=%0d",
             n_overflow, n_ooo, n_retrans, n_late_bypass, n_dup, n_wrap, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog, %0d of %0d delivered", next_out, N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
