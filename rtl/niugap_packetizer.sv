// niugap_packetizer: builds NIUGAP packets from payloads.
// Each payload taken from the bit-stream pool gets a header: the current
// Gray time tag and Gray sequence tag, then source address, destination
// address and control bits (sampled from the ports with the payload). The
// sequence tag comes from a SEQ_W-bit Gray counter that advances once per
// packet; when it rolls over from its last code to zero, a TIME_W-bit Gray
// counter (the time tag offset) advances, so the sequence codes are reused
// with a new time tag. Both counters start at zero after reset.
// Handshakes are valid/ready. The packet is registered: it is offered the
// clock after the payload is taken, and a new payload is taken in the same
// cycle the previous packet leaves, so one packet per clock is possible.
// Field widths and order follow the NIUGAP packet format; where the header
// addresses come from is this design's choice. TIME_W and SEQ_W default to
// the 3 and 12 bits of the format; pkt_t must be a packed struct with the
// fields of niugap_pkg::packet_t and tags of those widths.
module niugap_packetizer
  import niugap_pkg::*;
#(
  parameter int  TIME_W = niugap_pkg::DEFAULT_TIME_W,
  parameter int  SEQ_W  = niugap_pkg::DEFAULT_SEQ_W,
  parameter type pkt_t  = niugap_pkg::packet_t
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  output logic     in_ready,
  input  payload_t in_payload,
  input  addr_t    src_addr,
  input  addr_t    dst_addr,
  input  ctrl_t    ctrl_bits,
  output logic     out_valid,
  input  logic     out_ready,
  output pkt_t     out_pkt
);
  logic [SEQ_W-1:0]  seq;
  logic [TIME_W-1:0] tt;
  logic      seq_last, tt_last;
  logic      take;

  assign in_ready = !out_valid || out_ready;
  assign take     = in_valid && in_ready;

  niugap_gray_counter #(.W(SEQ_W)) u_seq (
    .clk(clk), .clear_n(rst_n), .enable(take), .gray(seq), .at_last(seq_last));

  niugap_gray_counter #(.W(TIME_W)) u_time (
    .clk(clk), .clear_n(rst_n), .enable(take && seq_last), .gray(tt), .at_last(tt_last));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
    end else if (take) begin
      out_valid <= 1'b1;
    end else if (out_ready) begin
      out_valid <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (take) begin
      out_pkt.time_tag <= tt;
      out_pkt.seq_tag  <= seq;
      out_pkt.src      <= src_addr;
      out_pkt.dst      <= dst_addr;
      out_pkt.ctrl     <= ctrl_bits;
      out_pkt.payload  <= in_payload;
    end
  end

  logic unused;
  assign unused = tt_last;
endmodule
