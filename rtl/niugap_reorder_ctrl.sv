// niugap_reorder_ctrl: Gray code packet reorder controller (NIUGAP packet-in
// side). Packets from the incoming packet buffer may arrive out of order; this
// block releases them in the order of their {time tag, sequence tag}.
//
// How it works:
//  * Out-of-order packet buffer pool: POOL slots; an arriving packet takes the
//    lowest free slot (in_ready = some slot is free).
//  * In-order selector: per slot, two Gray comparators check the slot's tags
//    against the last released tag L: the sequence tag must be L's successor
//    (XOR distance 1 plus the reflected-code pattern) and the time tag must
//    be unchanged, or, when L's sequence tag is the last code and the
//    sequence rolls over to 0, the time tag must be L's successor. The lowest
//    matching slot is moved to the reordered (in-order) FIFO each clock. The
//    first expected tag after reset is {0, 0}.
//  * Timing threshold: while packets wait and none is the successor, a timer
//    counts; after THRESH clocks req_retrans rises with retrans_tag = the
//    expected tag and stays high until either acq_retrans brings the packet
//    (retrans_pkt, same clock) or the original arrives late on in_pkt. Either
//    way that packet takes the bypass path: straight into the bypass FIFO,
//    past the pool and the reordered FIFO, even when the pool is full.
//    Slots are not released while the request is pending.
//  * The tags of the last REC retransmitted packets are remembered; an
//    original that arrives after its retransmission was taken is dropped
//    from the pool (dup_drop pulses for one clock). A remembered tag is
//    forgotten after 2^(TIME_W+SEQ_W-1) further packets have been released,
//    half the tag space: a late original must come within that window, and
//    the next packet that reuses the tag, almost a full turn later, passes
//    normally. A full pool with the expected packet stuck behind it
//    upstream is resolved the same way: the timer expires, the packet is
//    retransmitted, the original is dropped.
//  * Output multiplexer: a one-bit order FIFO, written by the selector with
//    every packet it releases, selects the reordered or the bypass FIFO, so
//    packets leave strictly in tag order.
// Output is valid/ready. Latency of an in-order packet through an idle block:
// pool write (1 clock) then selector (1 clock), offered 2 clocks after it is
// taken. The block structure (pool, XOR comparison, selector with timing
// threshold, req_retrans/acq_retrans, bypass and reordered FIFOs, output
// multiplexer) follows NIUGAP; the release rules, the threshold value, the
// sizes and the drop of duplicates are this design's choices. TIME_W and
// SEQ_W give the tag widths (3 and 12 by default) and pkt_t the packet type,
// a packed struct laid out as niugap_pkg::packet_t with tags of those widths.
module niugap_reorder_ctrl
  import niugap_pkg::*;
#(
  parameter int  TIME_W   = niugap_pkg::DEFAULT_TIME_W,
  parameter int  SEQ_W    = niugap_pkg::DEFAULT_SEQ_W,
  parameter type pkt_t    = niugap_pkg::packet_t,
  parameter int POOL     = 6,
  parameter int THRESH   = 32,
  parameter int RF_DEPTH = 4,
  parameter int BF_DEPTH = 2,
  parameter int REC      = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  // from the incoming packet buffer
  input  logic    in_valid,
  output logic    in_ready,
  input  pkt_t in_pkt,
  // retransmission
  output logic    req_retrans,
  output logic [TIME_W+SEQ_W-1:0] retrans_tag,
  input  logic    acq_retrans,
  input  pkt_t retrans_pkt,
  // in-order packets
  output logic    out_valid,
  input  logic    out_ready,
  output pkt_t out_pkt,
  output logic    dup_drop
);
  localparam int SW = (POOL > 1) ? $clog2(POOL) : 1;
  localparam int OF_DEPTH = RF_DEPTH + BF_DEPTH;
  localparam int TW = $clog2(THRESH + 1);
  typedef logic [TIME_W-1:0]       tt_t;
  typedef logic [SEQ_W-1:0]        sq_t;
  typedef logic [TIME_W+SEQ_W-1:0] tg_t;
  // tag preceding {0,0}: the last code of both Gray sequences
  localparam tt_t TIME_LAST = tt_t'(1) << (TIME_W - 1);
  localparam sq_t  SEQ_LAST  = sq_t'(1) << (SEQ_W - 1);

  pkt_t       slot_pkt [POOL];
  logic [POOL-1:0] slot_v;

  tt_t last_time;
  sq_t  last_seq;
  logic      pending;
  logic [TW-1:0] timer;
  logic [REC-1:0] rec_v;     // tags recovered by retransmission whose
  tg_t      rec_tag [REC];  // originals have not been seen yet
  logic [$clog2(REC)-1:0] rec_wp;
  // releases since each tag was recovered; a tag is forgotten after half
  // the tag space, so the next packet that reuses it is not taken for a
  // late original
  localparam int AGE_W = TIME_W + SEQ_W - 1;
  logic [AGE_W-1:0] rec_age [REC];

  // ---------------- comparators, one pair per slot
  logic [POOL-1:0] match, stale;
  sq_t  seq_next  [POOL];
  tt_t time_next [POOL];
  logic      seq_wrap;
  assign seq_wrap = (last_seq == SEQ_LAST);

  for (genvar i = 0; i < POOL; i++) begin : g_cmp
    logic s_hd1, s_next, t_hd1, t_next;
    niugap_gray_cmp #(.W(SEQ_W)) u_seq (
      .prev(last_seq), .cand(slot_pkt[i].seq_tag),
      .hd1(s_hd1), .is_next(s_next), .next_code(seq_next[i]));
    niugap_gray_cmp #(.W(TIME_W)) u_time (
      .prev(last_time), .cand(slot_pkt[i].time_tag),
      .hd1(t_hd1), .is_next(t_next), .next_code(time_next[i]));
    // XOR check (distance 1) and transition pattern for each tag field
    assign match[i] = slot_v[i] && s_hd1 && s_next &&
                      (seq_wrap ? (t_hd1 && t_next) : (slot_pkt[i].time_tag == last_time));
    logic [REC-1:0] hit;
    for (genvar j = 0; j < REC; j++) begin : g_rec
      assign hit[j] = rec_v[j] && ({slot_pkt[i].time_tag, slot_pkt[i].seq_tag} == rec_tag[j]);
    end
    assign stale[i] = slot_v[i] && (hit != '0);
  end

  tg_t exp_tag;
  assign exp_tag     = {seq_wrap ? time_next[0] : last_time, seq_next[0]};
  assign retrans_tag = exp_tag;
  assign req_retrans = pending;

  // lowest matching, stale and free slots
  logic          sel_found, stale_found, free_found;
  logic [SW-1:0] sel_idx, stale_idx, free_idx;
  always_comb begin
    sel_found = 1'b0;   sel_idx   = '0;
    stale_found = 1'b0; stale_idx = '0;
    free_found = 1'b0;  free_idx  = '0;
    for (int i = POOL - 1; i >= 0; i--) begin
      if (match[i])   begin sel_found   = 1'b1; sel_idx   = SW'(i); end
      if (stale[i])   begin stale_found = 1'b1; stale_idx = SW'(i); end
      if (!slot_v[i]) begin free_found  = 1'b1; free_idx  = SW'(i); end
    end
  end

  // ---------------- FIFOs
  logic    rf_push, rf_pop, rf_empty, rf_full;
  logic    bf_push, bf_pop, bf_empty, bf_full;
  logic    of_push, of_pop, of_empty, of_full, of_din, of_head;
  pkt_t rf_dout, bf_dout, bf_din;

  niugap_sync_fifo #(.T(pkt_t), .DEPTH(RF_DEPTH)) u_reordered (
    .clk(clk), .rst_n(rst_n), .push(rf_push), .din(slot_pkt[sel_idx]),
    .pop(rf_pop), .dout(rf_dout), .empty(rf_empty), .full(rf_full), .count());
  niugap_sync_fifo #(.T(pkt_t), .DEPTH(BF_DEPTH)) u_bypass (
    .clk(clk), .rst_n(rst_n), .push(bf_push), .din(bf_din),
    .pop(bf_pop), .dout(bf_dout), .empty(bf_empty), .full(bf_full), .count());
  niugap_sync_fifo #(.T(logic), .DEPTH(OF_DEPTH)) u_order (
    .clk(clk), .rst_n(rst_n), .push(of_push), .din(of_din),
    .pop(of_pop), .dout(of_head), .empty(of_empty), .full(of_full), .count());

  // ---------------- selector
  logic take_retrans, take_late, take_slot, raise, in_late;
  assign in_late = in_valid && pending && ({in_pkt.time_tag, in_pkt.seq_tag} == exp_tag);
  always_comb begin
    take_retrans = pending && acq_retrans;
    // the expected original arriving while its retransmission is pending
    // skips the pool and goes straight to the bypass FIFO
    take_late    = !take_retrans && in_late;
    take_slot    = !pending && sel_found && !rf_full && !of_full;
    // a request reserves one entry of the bypass and the order FIFOs
    raise        = !pending && !take_slot && (slot_v != '0) &&
                   (timer >= TW'(THRESH - 1)) && !bf_full && !of_full;
    rf_push      = take_slot;
    bf_push      = take_retrans || take_late;
    bf_din       = take_retrans ? retrans_pkt : in_pkt;
    of_push      = rf_push || bf_push;
    of_din       = bf_push;
  end

  // ---------------- output multiplexer
  assign out_valid = !of_empty && (of_head ? !bf_empty : !rf_empty);
  assign out_pkt   = of_head ? bf_dout : rf_dout;
  assign of_pop    = out_valid && out_ready;
  assign rf_pop    = of_pop && !of_head;
  assign bf_pop    = of_pop && of_head;

  // ---------------- state
  logic accept, release_one;
  assign release_one = take_retrans || take_late || take_slot;
  assign in_ready = take_late || (free_found && !(in_late && take_retrans));
  assign accept   = in_valid && in_ready && !take_late;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_v    <= '0;
      last_time <= TIME_LAST;
      last_seq  <= SEQ_LAST;
      pending   <= 1'b0;
      timer     <= '0;
      rec_v     <= '0;
      rec_wp    <= '0;
      dup_drop  <= 1'b0;
      for (int j = 0; j < REC; j++) rec_age[j] <= '0;
    end else begin
      dup_drop <= 1'b0;
      if (release_one)
        for (int j = 0; j < REC; j++) begin
          rec_age[j] <= rec_age[j] + 1'b1;
          if (rec_age[j] == '1) rec_v[j] <= 1'b0;
        end
      if (accept) slot_v[free_idx] <= 1'b1;
      if (take_slot) slot_v[sel_idx] <= 1'b0;
      if (stale_found && !(take_slot && sel_idx == stale_idx)) begin
        slot_v[stale_idx] <= 1'b0;
        dup_drop          <= 1'b1;
        for (int j = 0; j < REC; j++)
          if (rec_v[j] && {slot_pkt[stale_idx].time_tag, slot_pkt[stale_idx].seq_tag} == rec_tag[j])
            rec_v[j] <= 1'b0;
      end

      if (take_retrans) begin
        {last_time, last_seq} <= exp_tag;
        pending <= 1'b0;
        rec_v[rec_wp] <= 1'b1;
        rec_age[rec_wp] <= '0;
        rec_wp  <= rec_wp + 1'b1;
        timer   <= '0;
      end else if (take_late) begin
        {last_time, last_seq} <= exp_tag;
        pending <= 1'b0;
        timer   <= '0;
      end else if (take_slot) begin
        last_time <= slot_pkt[sel_idx].time_tag;
        last_seq  <= slot_pkt[sel_idx].seq_tag;
        timer     <= '0;
      end else if (raise) begin
        pending <= 1'b1;
        timer   <= '0;
      end else if (!pending && slot_v != '0 && !sel_found) begin
        timer <= timer + TW'(1);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (accept) slot_pkt[free_idx] <= in_pkt;
    if (take_retrans) rec_tag[rec_wp] <= exp_tag;
  end

  // the retransmitted packet must carry the requested tag
  property p_retrans_tag;
    @(posedge clk) disable iff (!rst_n)
      (pending && acq_retrans) |-> ({retrans_pkt.time_tag, retrans_pkt.seq_tag} == retrans_tag);
  endproperty
  assert property (p_retrans_tag);
endmodule
