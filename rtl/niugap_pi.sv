// niugap_pi: NIUGAP packet-in module, on-chip switch to processor.
// Chain: incoming packet buffer and packet in scheduler (four-phase
// req/acq from the switch) -> Gray code packet reorder controller (restores
// tag order, asks for retransmission after a timing threshold, bypass path)
// -> depacketizer (drops the header, splits the payload) -> outgoing data
// bit-stream buffer pool and scheduler -> asynchronous FIFO (NIU clock to
// processor clock). Processor side: rx_req/rx_ack/rx_data, a word moves on a
// proc_clk edge with rx_req and rx_ack both high, word 0 of each payload
// first. The chain follows the NIUGAP block diagram; sizes and handshake
// details are this design's choices.
// TIME_W, SEQ_W and pkt_t set the tag widths and the packet type; they are
// passed on unchanged to the blocks that handle tags.
module niugap_pi
  import niugap_pkg::*;
#(
  parameter int  TIME_W   = niugap_pkg::DEFAULT_TIME_W,
  parameter int  SEQ_W    = niugap_pkg::DEFAULT_SEQ_W,
  parameter type pkt_t    = niugap_pkg::packet_t,
  parameter int  FIFO_AW  = 3,
  parameter int  PKT_BUFS = 4,
  parameter int  POOL     = 6,
  parameter int  THRESH   = 32
) (
  input  logic    proc_clk,
  input  logic    proc_rst_n,
  input  logic    niu_clk,
  input  logic    niu_rst_n,
  input  logic    pkt_in_req,
  output logic    pkt_in_acq,
  input  pkt_t    pkt_in,
  output logic    req_retrans,
  output logic [TIME_W+SEQ_W-1:0] retrans_tag,
  input  logic    acq_retrans,
  input  pkt_t    retrans_pkt,
  output logic    dup_drop,
  output logic    rx_req,
  input  logic    rx_ack,
  output word_t   rx_data
);
  logic    b_valid, b_ready;
  pkt_t    b_pkt;
  logic    o_valid, o_ready;
  pkt_t    o_pkt;
  logic    d_valid, d_ready;
  words_t  d_words;
  logic    s_valid, s_ready;
  word_t   s_word;

  niugap_pkt_in_buf #(.NBUF(PKT_BUFS), .pkt_t(pkt_t)) u_in_buf (
    .clk(niu_clk), .rst_n(niu_rst_n),
    .req(pkt_in_req), .acq(pkt_in_acq), .pkt(pkt_in),
    .out_valid(b_valid), .out_ready(b_ready), .out_pkt(b_pkt));

  niugap_reorder_ctrl #(
    .TIME_W(TIME_W), .SEQ_W(SEQ_W), .pkt_t(pkt_t), .POOL(POOL), .THRESH(THRESH)
  ) u_reorder (
    .clk(niu_clk), .rst_n(niu_rst_n),
    .in_valid(b_valid), .in_ready(b_ready), .in_pkt(b_pkt),
    .req_retrans(req_retrans), .retrans_tag(retrans_tag),
    .acq_retrans(acq_retrans), .retrans_pkt(retrans_pkt),
    .out_valid(o_valid), .out_ready(o_ready), .out_pkt(o_pkt),
    .dup_drop(dup_drop));

  niugap_depacketizer #(.pkt_t(pkt_t)) u_depkt (
    .clk(niu_clk), .rst_n(niu_rst_n),
    .in_valid(o_valid), .in_ready(o_ready), .in_pkt(o_pkt),
    .out_valid(d_valid), .out_ready(d_ready), .out_words(d_words));

  niugap_bs_out_pool u_bs_out (
    .clk(niu_clk), .rst_n(niu_rst_n),
    .in_valid(d_valid), .in_ready(d_ready), .in_words(d_words),
    .out_valid(s_valid), .out_ready(s_ready), .out_word(s_word));

  niugap_async_fifo #(.W(WORD_W), .AW(FIFO_AW)) u_afifo (
    .wclk(niu_clk), .wrst_n(niu_rst_n), .w_req(s_valid), .w_ack(s_ready), .w_data(s_word),
    .rclk(proc_clk), .rrst_n(proc_rst_n), .r_req(rx_req), .r_ack(rx_ack), .r_data(rx_data));
endmodule
