// niugap_pkt_in_buf: incoming packet buffer with the packet in scheduler
// (NIUGAP packet-in side, from the on-chip switch).
// The switch offers a packet with a four-phase req/acq handshake: it drives
// pkt and raises req; when a buffer is free the scheduler stores pkt and
// raises acq; the switch drops req; the scheduler drops acq. Stored packets
// leave in arrival order towards the reorder controller through a
// valid/ready output. One packet costs at least four NIU clocks on the
// switch side; a stored packet is offered on the clock after acq rises.
// The buffer depth and the four phases are this design's choices.
module niugap_pkt_in_buf
  import niugap_pkg::*;
#(
  parameter int  NBUF  = 4,
  parameter type pkt_t = niugap_pkg::packet_t
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    req,
  output logic    acq,
  input  pkt_t    pkt,
  output logic    out_valid,
  input  logic    out_ready,
  output pkt_t    out_pkt
);
  logic empty, full, store;

  assign store = req && !acq && !full;

  niugap_sync_fifo #(.T(pkt_t), .DEPTH(NBUF)) u_buf (
    .clk(clk), .rst_n(rst_n),
    .push(store), .din(pkt),
    .pop(out_ready && !empty), .dout(out_pkt),
    .empty(empty), .full(full), .count());

  assign out_valid = !empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      acq <= 1'b0;
    else if (store)  acq <= 1'b1;
    else if (!req)   acq <= 1'b0;
  end
endmodule
