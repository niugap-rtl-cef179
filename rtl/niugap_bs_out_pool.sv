// niugap_bs_out_pool: outgoing data bit-stream buffer pool with its bit-stream
// out scheduler (NIUGAP packet-in side, towards the processor).
// A payload's NWORDS words are loaded into the word buffers at once; the
// scheduler then steers them through the multiplexer one per clock, word 0
// (the most significant payload bits) first, into the asynchronous FIFO.
// The next payload is loaded in the clock its last word leaves, so words can
// stream without a gap. Valid/ready on both sides. The fixed word order is
// this design's choice.
module niugap_bs_out_pool
  import niugap_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  words_t in_words,
  output logic   out_valid,
  input  logic   out_ready,
  output word_t  out_word
);
  localparam int IW = (NWORDS > 1) ? $clog2(NWORDS) : 1;

  word_t         buffers [NWORDS];
  logic [IW-1:0] sel;     // buffer the scheduler sends next
  logic          loaded;
  logic          last_out;

  assign out_valid = loaded;
  assign out_word  = buffers[sel];
  assign last_out  = loaded && out_ready && (sel == IW'(NWORDS - 1));
  assign in_ready  = !loaded || last_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      loaded <= 1'b0;
      sel    <= '0;
    end else if (in_valid && in_ready) begin
      loaded <= 1'b1;
      sel    <= '0;
    end else if (last_out) begin
      loaded <= 1'b0;
      sel    <= '0;
    end else if (loaded && out_ready) begin
      sel <= sel + IW'(1);
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready)
      for (int i = 0; i < NWORDS; i++) buffers[i] <= in_words[NWORDS-1-i];
  end
endmodule
