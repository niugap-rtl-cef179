// niugap_depacketizer: packet to bit-stream converter (NIUGAP packet-in side).
// Takes an in-order packet, drops its header (time tag, sequence tag,
// addresses, control bits) and registers its payload split into NWORDS words,
// word 0 being the most significant bits. Valid/ready on both sides; the
// words are offered the clock after the packet is taken, and a new packet may
// be taken in the clock the previous words leave. Dropping the header rather
// than passing it to the processor is this design's choice.
module niugap_depacketizer
  import niugap_pkg::*;
#(
  parameter type pkt_t = niugap_pkg::packet_t
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  pkt_t    in_pkt,
  output logic    out_valid,
  input  logic    out_ready,
  output words_t  out_words
);
  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  out_valid <= 1'b0;
    else if (in_valid && in_ready) out_valid <= 1'b1;
    else if (out_ready)          out_valid <= 1'b0;
  end

  // words_t index NWORDS-1 holds word 0 (most significant payload bits)
  always_ff @(posedge clk) begin
    if (in_valid && in_ready) out_words <= words_t'(in_pkt.payload);
  end
endmodule
