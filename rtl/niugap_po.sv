// niugap_po: NIUGAP packet-out module, processor to on-chip switch.
// Chain: asynchronous FIFO (processor clock to NIU clock) -> incoming data
// bit-stream buffer pool and scheduler (four 16-bit words make a 64-bit
// payload) -> packetizer (adds Gray time tag, Gray sequence tag, SRC, DST,
// control bits) -> outgoing packet buffer pool and packet out scheduler
// (four-phase req/acq towards the switch).
// Processor side: tx_req/tx_ack/tx_data, a word moves on a proc_clk edge with
// tx_req and tx_ack both high. Switch side: pkt_out_req/pkt_out_acq/pkt_out.
// The chain follows the NIUGAP block diagram; the widths of the words and
// the handshake details are this design's choices.
// TIME_W, SEQ_W and pkt_t set the tag widths and the packet type; they are
// passed on unchanged to the blocks that handle tags.
module niugap_po
  import niugap_pkg::*;
#(
  parameter int  TIME_W   = niugap_pkg::DEFAULT_TIME_W,
  parameter int  SEQ_W    = niugap_pkg::DEFAULT_SEQ_W,
  parameter type pkt_t    = niugap_pkg::packet_t,
  parameter int  FIFO_AW  = 3,
  parameter int  PKT_BUFS = 4
) (
  input  logic    proc_clk,
  input  logic    proc_rst_n,
  input  logic    niu_clk,
  input  logic    niu_rst_n,
  input  logic    tx_req,
  output logic    tx_ack,
  input  word_t   tx_data,
  input  addr_t   src_addr,
  input  addr_t   dst_addr,
  input  ctrl_t   ctrl_bits,
  output logic    pkt_out_req,
  input  logic    pkt_out_acq,
  output pkt_t    pkt_out
);
  logic     w_valid, w_ready;
  word_t    w_word;
  logic     p_valid, p_ready;
  payload_t p_payload;
  logic     k_valid, k_ready;
  pkt_t     k_pkt;

  niugap_async_fifo #(.W(WORD_W), .AW(FIFO_AW)) u_afifo (
    .wclk(proc_clk), .wrst_n(proc_rst_n), .w_req(tx_req), .w_ack(tx_ack), .w_data(tx_data),
    .rclk(niu_clk), .rrst_n(niu_rst_n), .r_req(w_valid), .r_ack(w_ready), .r_data(w_word));

  niugap_bs_in_pool u_bs_in (
    .clk(niu_clk), .rst_n(niu_rst_n),
    .in_valid(w_valid), .in_ready(w_ready), .in_word(w_word),
    .out_valid(p_valid), .out_ready(p_ready), .out_payload(p_payload));

  niugap_packetizer #(.TIME_W(TIME_W), .SEQ_W(SEQ_W), .pkt_t(pkt_t)) u_pktz (
    .clk(niu_clk), .rst_n(niu_rst_n),
    .in_valid(p_valid), .in_ready(p_ready), .in_payload(p_payload),
    .src_addr(src_addr), .dst_addr(dst_addr), .ctrl_bits(ctrl_bits),
    .out_valid(k_valid), .out_ready(k_ready), .out_pkt(k_pkt));

  niugap_pkt_out_pool #(.NBUF(PKT_BUFS), .pkt_t(pkt_t)) u_out_pool (
    .clk(niu_clk), .rst_n(niu_rst_n),
    .in_valid(k_valid), .in_ready(k_ready), .in_pkt(k_pkt),
    .req(pkt_out_req), .acq(pkt_out_acq), .pkt(pkt_out));
endmodule
