// niugap_pkt_out_pool: outgoing packet buffer pool with the packet out
// scheduler (NIUGAP packet-out side, towards the on-chip switch).
// Finished packets are held in NBUF buffers in arrival order. The scheduler
// sends the oldest one to the switch with a four-phase req/acq handshake:
//   1. it drives pkt and raises req;
//   2. the switch raises acq once it has taken pkt;
//   3. the scheduler drops req and frees the buffer;
//   4. the switch drops acq, and the next packet may start.
// pkt is stable while req is high. A transfer therefore takes at least four
// NIU clocks. The input is valid/ready (in_ready = a buffer is free).
// The req/acq names follow the NIUGAP design; the four phases, the buffer
// count and first-in first-out scheduling are this design's choices.
module niugap_pkt_out_pool
  import niugap_pkg::*;
#(
  parameter int  NBUF  = 4,
  parameter type pkt_t = niugap_pkg::packet_t
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  pkt_t    in_pkt,
  output logic    req,
  input  logic    acq,
  output pkt_t    pkt
);
  typedef enum logic [1:0] {IDLE, REQ, RELEASE} state_t;
  state_t state;
  logic   empty, full, pop;

  niugap_sync_fifo #(.T(pkt_t), .DEPTH(NBUF)) u_pool (
    .clk(clk), .rst_n(rst_n),
    .push(in_valid && !full), .din(in_pkt),
    .pop(pop), .dout(pkt),
    .empty(empty), .full(full), .count());

  assign in_ready = !full;
  assign req      = (state == REQ);
  assign pop      = (state == REQ) && acq;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= IDLE;
    else begin
      unique case (state)
        IDLE:    if (!empty && !acq) state <= REQ;
        REQ:     if (acq) state <= RELEASE;
        RELEASE: if (!acq) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  // the packet must not change while it is offered
  property p_stable;
    @(posedge clk) disable iff (!rst_n) (req && !acq) |=> $stable(pkt);
  endproperty
  assert property (p_stable);
endmodule
