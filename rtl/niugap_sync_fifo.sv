// niugap_sync_fifo: single-clock first-in first-out buffer of DEPTH entries of
// type T, used for the packet buffers inside the NIU. push writes din when not
// full; pop removes the head (dout) when not empty; both may happen in the
// same cycle. dout shows the head combinationally; empty/full/count update one
// clock after push or pop. Active-low asynchronous reset empties it.
module niugap_sync_fifo #(
  parameter type T     = logic [7:0],
  parameter int  DEPTH = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  T                         din,
  input  logic                     pop,
  output T                         dout,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T                mem [DEPTH];
  logic [PW-1:0]   rd, wr;
  logic            do_push, do_pop;

  assign empty   = (count == '0);
  assign full    = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rd];

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + PW'(1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd    <= '0;
      wr    <= '0;
      count <= '0;
    end else begin
      if (do_push) wr <= inc(wr);
      if (do_pop)  rd <= inc(rd);
      count <= count + ($clog2(DEPTH+1))'(do_push) - ($clog2(DEPTH+1))'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr] <= din;
  end

  // a push on a full FIFO or a pop on an empty one is a caller error
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(push && full))  else $error("niugap_sync_fifo: push while full");
      assert (!(pop && empty))  else $error("niugap_sync_fifo: pop while empty");
    end
  end
endmodule
