// sifter_scheduler: inversion-free programmable packet scheduler built from a small
// sorted mini-PIFO and a large FIFO-based rotating calendar queue (RCQ).
//
// Ranks: a smaller rank leaves first. The mini-PIFO always holds the descriptors
// with the smallest ranks in the scheduler and the RCQ holds the rest, each RCQ
// FIFO covering BUCKET_W consecutive ranks. The sentinel register s separates the
// two: every descriptor in the mini-PIFO has rank <= s and every descriptor in the
// RCQ has rank >= s (outside a sifting pass, see below).
//
//  * Enqueue: rank <= s goes into the mini-PIFO, rank > s is appended to the RCQ
//    FIFO of its rank range. Ranks beyond the last range the calendar can hold go to
//    its last FIFO and are re-filed when that FIFO is sifted (own choice; the
//    published design does not say what happens to them).
//  * Dequeue: the head of the mini-PIFO (smallest rank) leaves.
//  * Sifting: when the mini-PIFO holds fewer than SIFT_TH (Th_S) descriptors and the
//    RCQ is not empty, the earliest non-empty FIFO (in ring order from the FIFO that
//    holds s) is traversed once, one descriptor per clock. At the start of the pass
//    s is raised to the top rank of that FIFO's range, so every descriptor of the
//    FIFO moves into the mini-PIFO.
//  * Full mini-PIFO: inserting into a full mini-PIFO pushes its largest descriptor
//    back into the RCQ, and s becomes that descriptor's rank. A descriptor met during
//    sifting whose rank is then above s goes back to the tail of its FIFO.
//
// The published Sifter design states the inversion-free condition as Th_S * K >=
// S_F and S_P >= 2 * Th_S (K: descriptors moved per packet time). This design adds
// its own safety rule: during a pass a dequeue is held unless the mini-PIFO head is
// below the lowest rank of the FIFO being sifted, so the order is kept even when
// the condition is not met; when it is met the hold does not occur.
//
// Timing and handshakes (own choices): one clock per descriptor moved. Enqueue is a
// valid/ready handshake; enq_ready is low during a pass and in the cycle a pass
// starts. Dequeue is valid/ready; deq_* show the mini-PIFO head combinationally. A
// descriptor that meets a full RCQ FIFO is dropped and reported on drop_*; the published
// design does not describe overflow. Reset is synchronous, active low, and leaves
// the scheduler empty with s = 0.
module sifter_scheduler #(
  parameter int unsigned RANK_W    = 32,
  parameter int unsigned DATA_W    = 32,
  parameter int unsigned PIFO_SIZE = 6,    // S_P
  parameter int unsigned SIFT_TH   = 3,    // Th_S
  parameter int unsigned NUM_FIFOS = 10,
  parameter int unsigned FIFO_SIZE = 6,    // S_F
  parameter int unsigned BUCKET_W  = 10,
  localparam int unsigned PCW = $clog2(PIFO_SIZE+1),
  localparam int unsigned TW  = $clog2(NUM_FIFOS*FIFO_SIZE+1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // enqueue
  input  logic              enq_valid,
  output logic              enq_ready,
  input  logic [RANK_W-1:0] enq_rank,
  input  logic [DATA_W-1:0] enq_data,
  // dequeue
  output logic              deq_valid,
  input  logic              deq_ready,
  output logic [RANK_W-1:0] deq_rank,
  output logic [DATA_W-1:0] deq_data,
  // overflow report (one-cycle pulse)
  output logic              drop,
  output logic [RANK_W-1:0] drop_rank,
  output logic [DATA_W-1:0] drop_data,
  // status and event pulses
  output logic [RANK_W-1:0] sentinel,
  output logic [PCW-1:0]    pifo_count,
  output logic [TW-1:0]     rcq_count,
  output logic              sifting,
  output logic              ev_sift_start,
  output logic              ev_evict,
  output logic              ev_reject,
  output logic              ev_deq_hold
);

  localparam int unsigned FW  = (NUM_FIFOS > 1) ? $clog2(NUM_FIFOS) : 1;
  localparam int unsigned FCW = $clog2(FIFO_SIZE+1);

  typedef enum logic {S_IDLE, S_SIFT} state_e;

  state_e            state_q;
  logic [RANK_W-1:0] s_q;          // sentinel
  logic [FW-1:0]     sift_fifo_q;  // FIFO under traversal
  logic [FCW-1:0]    sift_rem_q;   // descriptors left in this pass
  logic [RANK_W-1:0] sift_lo_q;    // lowest rank of that FIFO's range

  // mini-PIFO
  logic              p_push, p_pop, p_evict, p_empty, p_full;
  logic [RANK_W-1:0] p_push_rank, p_head_rank, p_ev_rank;
  logic [DATA_W-1:0] p_push_data, p_head_data, p_ev_data;
  logic [PCW-1:0]    p_count;

  // RCQ
  logic              r_push, r_push_ok, r_pop, r_found;
  logic [FW-1:0]     r_push_fifo, r_found_fifo, r_cur;
  logic [RANK_W-1:0] r_push_rank, r_pop_rank;
  logic [DATA_W-1:0] r_push_data, r_pop_data;
  logic [FCW-1:0]    r_fifo_count;
  logic [TW-1:0]     r_total;

  // control
  logic              start_sift, enq_fire, deq_fire, in_sift, sift_to_pifo, enq_to_pifo;
  logic [RANK_W-1:0] s_blk, start_lo;

  // Calendar FIFO of a rank above the sentinel: its range number modulo NUM_FIFOS,
  // limited to the last range the calendar currently covers.
  function automatic logic [FW-1:0] fifo_of(input logic [RANK_W-1:0] rank,
                                           input logic [RANK_W-1:0] blk_s);
    logic [RANK_W-1:0] blk;
    blk = rank / RANK_W'(BUCKET_W);
    if (blk > blk_s + RANK_W'(NUM_FIFOS - 1)) blk = blk_s + RANK_W'(NUM_FIFOS - 1);
    return FW'(blk % RANK_W'(NUM_FIFOS));
  endfunction

  assign s_blk = s_q / RANK_W'(BUCKET_W);
  assign r_cur = FW'(s_blk % RANK_W'(NUM_FIFOS));

  // Range covered by the FIFO chosen for a new pass.
  always_comb begin
    logic [FW-1:0] off;
    if (r_found_fifo >= r_cur) off = r_found_fifo - r_cur;
    else                       off = FW'(NUM_FIFOS) - r_cur + r_found_fifo;
    start_lo = (s_blk + RANK_W'(off)) * RANK_W'(BUCKET_W);
  end

  assign in_sift     = (state_q == S_SIFT);
  assign start_sift  = (state_q == S_IDLE) && (p_count < PCW'(SIFT_TH)) && (r_total != '0);
  assign enq_ready   = (state_q == S_IDLE) && !start_sift;
  assign enq_fire    = enq_valid && enq_ready;
  assign enq_to_pifo = (enq_rank <= s_q);
  assign sift_to_pifo = (r_pop_rank <= s_q);

  assign deq_valid = !p_empty && (!in_sift || p_head_rank < sift_lo_q);
  assign deq_fire  = deq_valid && deq_ready;
  assign deq_rank  = p_head_rank;
  assign deq_data  = p_head_data;

  // mini-PIFO inputs: at most one insert per cycle, from enqueue or from sifting.
  assign p_pop       = deq_fire;
  assign p_push      = (enq_fire && enq_to_pifo) || (in_sift && sift_to_pifo);
  assign p_push_rank = in_sift ? r_pop_rank : enq_rank;
  assign p_push_data = in_sift ? r_pop_data : enq_data;

  // RCQ inputs: at most one write per cycle (eviction, enqueue above s, or a
  // descriptor sent back during sifting) and one read (sifting).
  assign r_pop = in_sift;
  always_comb begin
    r_push      = 1'b0;
    r_push_fifo = '0;
    r_push_rank = enq_rank;
    r_push_data = enq_data;
    if (p_evict) begin
      r_push      = 1'b1;
      r_push_rank = p_ev_rank;
      r_push_data = p_ev_data;
      r_push_fifo = fifo_of(p_ev_rank, p_ev_rank / RANK_W'(BUCKET_W));
    end else if (in_sift && !sift_to_pifo) begin
      r_push      = 1'b1;
      r_push_rank = r_pop_rank;
      r_push_data = r_pop_data;
      r_push_fifo = fifo_of(r_pop_rank, s_blk);
    end else if (enq_fire && !enq_to_pifo) begin
      r_push      = 1'b1;
      r_push_fifo = fifo_of(enq_rank, s_blk);
    end
  end

  assign drop      = r_push && !r_push_ok;
  assign drop_rank = r_push_rank;
  assign drop_data = r_push_data;

  mini_pifo #(.DEPTH(PIFO_SIZE), .RANK_W(RANK_W), .DATA_W(DATA_W)) u_pifo (
    .clk, .rst_n,
    .push(p_push), .push_rank(p_push_rank), .push_data(p_push_data),
    .pop(p_pop), .head_rank(p_head_rank), .head_data(p_head_data),
    .evict(p_evict), .evict_rank(p_ev_rank), .evict_data(p_ev_data),
    .count(p_count), .empty(p_empty), .full(p_full)
  );

  rcq #(.NUM_FIFOS(NUM_FIFOS), .FIFO_SIZE(FIFO_SIZE), .RANK_W(RANK_W), .DATA_W(DATA_W)) u_rcq (
    .clk, .rst_n,
    .push(r_push), .push_fifo(r_push_fifo), .push_rank(r_push_rank), .push_data(r_push_data),
    .push_ok(r_push_ok),
    .pop(r_pop), .pop_fifo(sift_fifo_q), .pop_rank(r_pop_rank), .pop_data(r_pop_data),
    .cnt_fifo(r_found_fifo), .fifo_count(r_fifo_count), .total_count(r_total),
    .search_start(r_cur), .found(r_found), .found_fifo(r_found_fifo)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      s_q         <= '0;
      sift_fifo_q <= '0;
      sift_rem_q  <= '0;
      sift_lo_q   <= '0;
    end else begin
      if (start_sift && r_found) begin
        state_q     <= S_SIFT;
        sift_fifo_q <= r_found_fifo;
        sift_rem_q  <= r_fifo_count;
        sift_lo_q   <= start_lo;
        s_q         <= start_lo + RANK_W'(BUCKET_W - 1);
      end else if (in_sift) begin
        sift_rem_q <= sift_rem_q - 1'b1;
        if (sift_rem_q <= FCW'(1)) state_q <= S_IDLE;
      end
      if (p_evict) s_q <= p_ev_rank;
    end
  end

  assign sentinel      = s_q;
  assign pifo_count    = p_count;
  assign rcq_count     = r_total;
  assign sifting       = in_sift;
  assign ev_sift_start = start_sift && r_found;
  assign ev_evict      = p_evict;
  assign ev_reject     = in_sift && !sift_to_pifo;
  assign ev_deq_hold   = !p_empty && !deq_valid;

  // The mini-PIFO overflows only when it is full and not popped.
  assert property (@(posedge clk) disable iff (!rst_n) p_evict |-> (p_full && !p_pop));
  // Only one descriptor may enter the mini-PIFO per cycle.
  assert property (@(posedge clk) disable iff (!rst_n) !(enq_fire && in_sift));
  // A traversal never reads an empty FIFO.
  assert property (@(posedge clk) disable iff (!rst_n) in_sift |-> sift_rem_q != '0);

endmodule
