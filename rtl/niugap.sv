// niugap: NIUGAP network interface unit between one processor and one port of
// an on-chip switch. The packet-out module turns the processor's 16-bit word
// stream into 88-bit packets carrying a Gray-coded time tag and sequence tag;
// the packet-in module takes packets from the switch in any order, restores
// the order by comparing Gray tags, asks for a retransmission when the next
// packet does not come within a timing threshold, and hands the payload words
// back to the processor. Two clocks: proc_clk for the processor side,
// niu_clk for the packet side, each with an active-low asynchronous reset.
// Ports are plain signals; the processor and the switch are outside this
// module. The retransmission request and the retransmitted packet are brought
// out as ports (how they travel through the network is this design's
// assumption: the responder returns the packet on retrans_pkt with
// acq_retrans for one niu_clk). Packet ports are flat vectors laid out as
// niugap_pkg::packet_t (time tag in the top bits, payload in the bottom bits);
// TIME_W and SEQ_W set the tag widths, 3 and 12 bits by default.
module niugap
  import niugap_pkg::*;
#(
  parameter int TIME_W   = niugap_pkg::DEFAULT_TIME_W,
  parameter int SEQ_W    = niugap_pkg::DEFAULT_SEQ_W,
  parameter int FIFO_AW  = 3,
  parameter int PKT_BUFS = 4,
  parameter int POOL     = 6,
  parameter int THRESH   = 32
) (
  input  logic    proc_clk,
  input  logic    proc_rst_n,
  input  logic    niu_clk,
  input  logic    niu_rst_n,
  // header configuration
  input  addr_t   src_addr,
  input  addr_t   dst_addr,
  input  ctrl_t   ctrl_bits,
  // processor bit-stream out (into the NIU)
  input  logic    tx_req,
  output logic    tx_ack,
  input  word_t   tx_data,
  // packets to the switch
  output logic    pkt_out_req,
  input  logic    pkt_out_acq,
  output logic [TIME_W+SEQ_W+HDR_PAY_W-1:0] pkt_out,
  // packets from the switch
  input  logic    pkt_in_req,
  output logic    pkt_in_acq,
  input  logic [TIME_W+SEQ_W+HDR_PAY_W-1:0] pkt_in,
  // retransmission
  output logic    req_retrans,
  output logic [TIME_W+SEQ_W-1:0]           retrans_tag,
  input  logic    acq_retrans,
  input  logic [TIME_W+SEQ_W+HDR_PAY_W-1:0] retrans_pkt,
  output logic    dup_drop,
  // processor bit-stream in (out of the NIU)
  output logic    rx_req,
  input  logic    rx_ack,
  output word_t   rx_data
);
  typedef struct packed {
    logic [TIME_W-1:0] time_tag;
    logic [SEQ_W-1:0]  seq_tag;
    addr_t             src;
    addr_t             dst;
    ctrl_t             ctrl;
    payload_t          payload;
  } pkt_t;

  pkt_t po_pkt, pi_pkt, rt_pkt;

  assign pkt_out = po_pkt;
  assign pi_pkt  = pkt_in;
  assign rt_pkt  = retrans_pkt;

  niugap_po #(
    .TIME_W(TIME_W), .SEQ_W(SEQ_W), .pkt_t(pkt_t), .FIFO_AW(FIFO_AW), .PKT_BUFS(PKT_BUFS)
  ) u_po (
    .proc_clk(proc_clk), .proc_rst_n(proc_rst_n), .niu_clk(niu_clk), .niu_rst_n(niu_rst_n),
    .tx_req(tx_req), .tx_ack(tx_ack), .tx_data(tx_data),
    .src_addr(src_addr), .dst_addr(dst_addr), .ctrl_bits(ctrl_bits),
    .pkt_out_req(pkt_out_req), .pkt_out_acq(pkt_out_acq), .pkt_out(po_pkt));

  niugap_pi #(
    .TIME_W(TIME_W), .SEQ_W(SEQ_W), .pkt_t(pkt_t),
    .FIFO_AW(FIFO_AW), .PKT_BUFS(PKT_BUFS), .POOL(POOL), .THRESH(THRESH)
  ) u_pi (
    .proc_clk(proc_clk), .proc_rst_n(proc_rst_n), .niu_clk(niu_clk), .niu_rst_n(niu_rst_n),
    .pkt_in_req(pkt_in_req), .pkt_in_acq(pkt_in_acq), .pkt_in(pi_pkt),
    .req_retrans(req_retrans), .retrans_tag(retrans_tag),
    .acq_retrans(acq_retrans), .retrans_pkt(rt_pkt), .dup_drop(dup_drop),
    .rx_req(rx_req), .rx_ack(rx_ack), .rx_data(rx_data));
endmodule
