// niugap_async_fifo: dual-clock FIFO between the processor clock and the NIU
// clock. NIUGAP crosses the clock boundary with an asynchronous FIFO on each
// side of the NIU; its insides are this design's choice: a 2^AW-entry memory
// with binary pointers in each domain, whose Gray-coded copies cross to the
// other domain through two-flop synchronizers. Full and empty are decided on
// the Gray pointers, so they are conservative and never wrong.
// Both sides use req/ack: a word moves on a clock edge where req and ack are
// both high. On the write side the producer drives w_req and w_ack = not full;
// on the read side r_req = not empty and r_data is the head word.
// Latency: a written word is visible at the read side 2-3 read clocks later.
// Each side has its own active-low asynchronous reset; assert both together.
module niugap_async_fifo #(
  parameter int W  = 16,
  parameter int AW = 3
) (
  input  logic         wclk,
  input  logic         wrst_n,
  input  logic         w_req,
  output logic         w_ack,
  input  logic [W-1:0] w_data,
  input  logic         rclk,
  input  logic         rrst_n,
  output logic         r_req,
  input  logic         r_ack,
  output logic [W-1:0] r_data
);
  localparam int DEPTH = 1 << AW;

  logic [W-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, wbin_nxt, wgray_nxt;
  logic [AW:0] rbin, rgray, rbin_nxt, rgray_nxt;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer in write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer in read domain

  // ---------------- write domain
  logic do_write;
  assign do_write = w_req && w_ack;
  assign wbin_nxt = wbin + (AW+1)'(do_write);
  niugap_bin2gray #(.W(AW+1)) u_wg (.bin(wbin_nxt), .gray(wgray_nxt));

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
      w_ack    <= 1'b0;
    end else begin
      wbin     <= wbin_nxt;
      wgray    <= wgray_nxt;
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      // full when the next write pointer equals the read pointer with the
      // two top bits inverted
      w_ack    <= !(wgray_nxt == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
    end
  end

  always_ff @(posedge wclk) begin
    if (do_write) mem[wbin[AW-1:0]] <= w_data;
  end

  // ---------------- read domain
  logic do_read;
  assign do_read  = r_req && r_ack;
  assign rbin_nxt = rbin + (AW+1)'(do_read);
  niugap_bin2gray #(.W(AW+1)) u_rg (.bin(rbin_nxt), .gray(rgray_nxt));

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
      r_req    <= 1'b0;
    end else begin
      rbin     <= rbin_nxt;
      rgray    <= rgray_nxt;
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      r_req    <= !(rgray_nxt == wgray_r2);
    end
  end

  assign r_data = mem[rbin[AW-1:0]];

endmodule
