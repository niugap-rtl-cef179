// niugap_bs_in_pool: incoming data bit-stream buffer pool with its bit-stream
// in scheduler (NIUGAP packet-out side). Words arriving from the processor's
// asynchronous FIFO are written into NBUF word buffers in turn, buffer 0
// first; when all are filled the multiplexer presents them together as one
// payload, buffer 0 in the most significant position. The payload waits there
// (out_valid) until the packetizer takes it (out_ready); then the buffers are
// filled again. in_ready is low while a full payload waits.
// Handshakes are valid/ready: a transfer happens on a clock edge where both
// are high. Latency: the payload is offered the clock after its last word.
// Four 16-bit buffers (64-bit payload) is this design's reading of the
// drawing; the fill order is this design's choice.
module niugap_bs_in_pool
  import niugap_pkg::*;
#(
  parameter int NBUF = niugap_pkg::NWORDS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  word_t                    in_word,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [NBUF*WORD_W-1:0]   out_payload
);
  localparam int IW = (NBUF > 1) ? $clog2(NBUF) : 1;

  word_t         buffers [NBUF];
  logic [IW-1:0] fill;      // buffer the scheduler writes next
  logic          complete;  // all buffers hold a word of the same payload

  assign in_ready  = !complete;
  assign out_valid = complete;

  always_comb begin
    for (int i = 0; i < NBUF; i++)
      out_payload[(NBUF-1-i)*WORD_W +: WORD_W] = buffers[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill     <= '0;
      complete <= 1'b0;
    end else if (complete) begin
      if (out_ready) complete <= 1'b0;
    end else if (in_valid) begin
      if (fill == IW'(NBUF - 1)) begin
        fill     <= '0;
        complete <= 1'b1;
      end else begin
        fill <= fill + IW'(1);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) buffers[fill] <= in_word;
  end
endmodule
