// niugap_po_tb: packet-out module on its own. The processor writes 4 x 300
// random words (100 MHz); a switch model on niu_clk (46.7 MHz) takes packets
// with the four-phase handshake after random delays. Packet k must carry
// sequence tag gray(k), time tag 0, the configured header and the four words
// in order. Counts processor stalls and a full packet pool.
`timescale 1ns/1ps
module niugap_po_tb;
  import niugap_pkg::*;
  localparam int N = 300;
  logic proc_clk = 0, niu_clk = 0, proc_rst_n = 0, niu_rst_n = 0;
  always #5    proc_clk = ~proc_clk;
  always #10.7 niu_clk  = ~niu_clk;
  logic tx_req, tx_ack, pkt_out_req, pkt_out_acq;
  word_t tx_data;
  addr_t src_addr = 3'd3, dst_addr = 3'd4;
  ctrl_t ctrl_bits = 3'd1;
  packet_t pkt_out;
  niugap_po dut (.*);

  word_t words [4*N];
  int checks = 0, failures = 0, ntx = 0, npk = 0, n_stall = 0, n_full = 0, dly = 0;

  initial begin
    for (int i = 0; i < 4 * N; i++) words[i] = word_t'($urandom);
    #100 proc_rst_n = 1; niu_rst_n = 1;
  end

  always @(posedge proc_clk) begin
    if (!proc_rst_n) begin tx_req <= 0; tx_data <= '0; end
    else begin
      if (tx_req && tx_ack) ntx++;
      if (tx_req && !tx_ack) n_stall++;
      tx_req  <= (ntx < 4 * N) && ($urandom_range(3) != 0);
      tx_data <= words[ntx % (4 * N)];
    end
  end

  always @(posedge niu_clk) begin
    if (!niu_rst_n) pkt_out_acq <= 0;
    else begin
      if (dut.u_out_pool.full) n_full++;
      if (pkt_out_req && !pkt_out_acq) begin
        if (dly == 0) begin
          checks++;
          if (pkt_out.seq_tag != seq_tag_t'(npk ^ (npk >> 1)) || pkt_out.time_tag != '0 ||
              pkt_out.src != src_addr || pkt_out.dst != dst_addr || pkt_out.ctrl != ctrl_bits ||
              pkt_out.payload != {words[4*npk], words[4*npk+1], words[4*npk+2], words[4*npk+3]}) begin
            failures++; $display("FAIL packet %0d", npk);
          end
          npk++;
          pkt_out_acq <= 1;
          dly <= (npk > 100 && npk < 120) ? 20 : $urandom_range(2);
        end else dly <= dly - 1;
      end else if (!pkt_out_req) pkt_out_acq <= 0;
      if (npk == N) begin
        checks += 2;
        if (n_stall == 0) begin failures++; $display("FAIL no processor stall"); end
        if (n_full == 0)  begin failures++; $display("FAIL packet pool never full"); end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    #2ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
