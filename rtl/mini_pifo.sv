// mini_pifo: small push-in first-out queue that always presents its smallest rank.
//
// The mini-PIFO of Sifter keeps the descriptors with the smallest ranks in the
// scheduler, fully sorted, so that the head is always the next descriptor to send.
// Here it is a sorted register array (entry 0 = smallest rank). In one clock cycle
// it can remove the head (pop) and insert one descriptor (push) together. A pushed
// descriptor goes behind every stored descriptor of equal or smaller rank, so equal
// ranks leave in arrival order.
//
// When the array is full and a push arrives without a pop, the largest of the
// DEPTH+1 descriptors is pushed out on the evict_* outputs in the same cycle (it may
// be the pushed descriptor itself). The scheduler returns that descriptor to the
// calendar queue and lowers its sentinel to the evicted rank; this eviction is how
// the published worked example lowers the sentinel while the mini-PIFO is full.
//
// Interface: push/pop are single-cycle strobes; head_*, max_* and evict_* are
// combinational from the stored state and the strobes; count updates on the next
// clock edge. A pop of an empty queue is ignored. Sorting by shifting registers is
// this design's own choice; the published design gives only the function.
module mini_pifo #(
  parameter int unsigned DEPTH  = 6,   // S_P
  parameter int unsigned RANK_W = 32,
  parameter int unsigned DATA_W = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  logic [RANK_W-1:0]        push_rank,
  input  logic [DATA_W-1:0]        push_data,
  input  logic                     pop,
  output logic [RANK_W-1:0]        head_rank,
  output logic [DATA_W-1:0]        head_data,
  output logic                     evict,
  output logic [RANK_W-1:0]        evict_rank,
  output logic [DATA_W-1:0]        evict_data,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                     empty,
  output logic                     full
);

  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [RANK_W-1:0] rank_q [DEPTH];
  logic [DATA_W-1:0] data_q [DEPTH];
  logic [CW-1:0]     cnt_q;

  // State after the optional pop.
  logic [RANK_W-1:0] rank_a [DEPTH];
  logic [DATA_W-1:0] data_a [DEPTH];
  logic [CW-1:0]     cnt_a;
  logic              do_pop;
  // Insertion point: number of remaining entries with rank <= push_rank.
  logic [CW-1:0]     pos;
  logic [RANK_W-1:0] rank_d [DEPTH];
  logic [DATA_W-1:0] data_d [DEPTH];
  logic [CW-1:0]     cnt_d;

  assign empty     = (cnt_q == '0);
  assign full      = (cnt_q == CW'(DEPTH));
  assign count     = cnt_q;
  assign head_rank = rank_q[0];
  assign head_data = data_q[0];
  assign do_pop    = pop && !empty;

  always_comb begin
    for (int i = 0; i < DEPTH; i++) begin
      if (do_pop && i < DEPTH - 1) begin
        rank_a[i] = rank_q[i+1];
        data_a[i] = data_q[i+1];
      end else begin
        rank_a[i] = rank_q[i];
        data_a[i] = data_q[i];
      end
    end
    cnt_a = do_pop ? cnt_q - 1'b1 : cnt_q;

    pos = '0;
    for (int i = 0; i < DEPTH; i++)
      if (CW'(i) < cnt_a && rank_a[i] <= push_rank) pos = pos + 1'b1;

    for (int i = 0; i < DEPTH; i++) begin
      if (!push || CW'(i) < pos) begin
        rank_d[i] = rank_a[i];
        data_d[i] = data_a[i];
      end else if (CW'(i) == pos) begin
        rank_d[i] = push_rank;
        data_d[i] = push_data;
      end else begin
        rank_d[i] = rank_a[(i == 0) ? 0 : i-1];
        data_d[i] = data_a[(i == 0) ? 0 : i-1];
      end
    end

    evict      = push && (cnt_a == CW'(DEPTH));
    evict_rank = (pos == CW'(DEPTH)) ? push_rank : rank_a[DEPTH-1];
    evict_data = (pos == CW'(DEPTH)) ? push_data : data_a[DEPTH-1];
    cnt_d      = (push && !evict) ? cnt_a + 1'b1 : cnt_a;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt_q <= '0;
      for (int i = 0; i < DEPTH; i++) begin
        rank_q[i] <= '0;
        data_q[i] <= '0;
      end
    end else begin
      cnt_q <= cnt_d;
      for (int i = 0; i < DEPTH; i++) begin
        rank_q[i] <= rank_d[i];
        data_q[i] <= data_d[i];
      end
    end
  end

endmodule
