// niugap_gray_counter: W-bit recursive Gray code counter.
// Structure as in the NIUGAP counter: a binary counter of toggle flip-flops
// X0..X(W-1), where flip-flop i toggles when Enable and X0..X(i-1) are all 1
// (an AND chain), followed by an XOR stage Y(i) = X(i) ^ X(i+1) with the MSB
// passed through. Enable = 0 holds the count; clear_n = 0 clears every
// flip-flop, so counting starts from code 0. After the last code (1 followed
// by zeros) the counter rolls over to 0, one bit change, so the code can be
// reused cyclically.
// Timing: gray changes one clock after an enabled edge. at_last is high while
// the counter holds its last code (all X bits 1); it is an addition of this
// design so a user can chain a second counter on roll-over. Clear is taken as
// asynchronous and active low (this design's choice).
module niugap_gray_counter #(
  parameter int W = 12
) (
  input  logic         clk,
  input  logic         clear_n,
  input  logic         enable,
  output logic [W-1:0] gray,
  output logic         at_last
);
  logic [W-1:0] x;  // toggle flip-flop outputs (binary count)
  logic [W-1:0] t;  // toggle inputs from the AND chain

  assign t[0] = enable;
  for (genvar i = 1; i < W; i++) begin : g_and
    assign t[i] = t[i-1] & x[i-1];
  end

  always_ff @(posedge clk or negedge clear_n) begin
    if (!clear_n) x <= '0;
    else          x <= x ^ t;
  end

  niugap_bin2gray #(.W(W)) u_xor (.bin(x), .gray(gray));

  assign at_last = &x;
endmodule
