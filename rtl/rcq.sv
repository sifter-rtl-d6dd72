// rcq: storage of the rotating calendar queue (RCQ) - NUM_FIFOS FIFOs of FIFO_SIZE
// descriptors each.
//
// Each FIFO holds the descriptors of one range of ranks, as in a calendar queue.
// The scheduler chooses the FIFO (push_fifo) from the rank and its sentinel; this
// block only stores descriptors and keeps one head/tail pointer and an occupancy
// count per FIFO. The FIFOs are used as a ring ("rotating"): once the FIFO of the
// lowest range has been emptied it is reused for the range that follows the highest
// one. To support that, the block finds the first non-empty FIFO at or after a
// given start FIFO, in ring order (search_start -> found/found_fifo).
//
// Per cycle it accepts one push and one pop, to the same FIFO or to different ones.
// A push to a full FIFO is accepted only when the same FIFO is popped in the same
// cycle; otherwise push_ok is low and the descriptor is not stored. The head of the
// popped FIFO (pop_fifo) is read combinationally, so a pop takes effect in the same
// cycle in which its data is used. All storage is one array addressed by FIFO *
// FIFO_SIZE + pointer. The published Sifter design gives the function of the RCQ
// only; the pointer organisation is this design's own.
module rcq #(
  parameter int unsigned NUM_FIFOS = 10,
  parameter int unsigned FIFO_SIZE = 6,    // S_F
  parameter int unsigned RANK_W    = 32,
  parameter int unsigned DATA_W    = 32,
  localparam int unsigned FW = (NUM_FIFOS > 1) ? $clog2(NUM_FIFOS) : 1,
  localparam int unsigned PW = (FIFO_SIZE > 1) ? $clog2(FIFO_SIZE) : 1,
  localparam int unsigned CW = $clog2(FIFO_SIZE+1),
  localparam int unsigned TW = $clog2(NUM_FIFOS*FIFO_SIZE+1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // push
  input  logic              push,
  input  logic [FW-1:0]     push_fifo,
  input  logic [RANK_W-1:0] push_rank,
  input  logic [DATA_W-1:0] push_data,
  output logic              push_ok,
  // pop (head of pop_fifo is always visible)
  input  logic              pop,
  input  logic [FW-1:0]     pop_fifo,
  output logic [RANK_W-1:0] pop_rank,
  output logic [DATA_W-1:0] pop_data,
  // occupancy
  input  logic [FW-1:0]     cnt_fifo,
  output logic [CW-1:0]     fifo_count,
  output logic [TW-1:0]     total_count,
  // ring search for the first non-empty FIFO
  input  logic [FW-1:0]     search_start,
  output logic              found,
  output logic [FW-1:0]     found_fifo
);

  localparam int unsigned ENTRIES = NUM_FIFOS * FIFO_SIZE;
  localparam int unsigned AW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  logic [RANK_W-1:0] rank_mem [ENTRIES];
  logic [DATA_W-1:0] data_mem [ENTRIES];
  logic [PW-1:0]     head_q [NUM_FIFOS];
  logic [PW-1:0]     tail_q [NUM_FIFOS];
  logic [CW-1:0]     cnt_q  [NUM_FIFOS];
  logic [TW-1:0]     total_q;

  logic do_pop, do_push;
  logic [AW-1:0] rd_addr, wr_addr;

  function automatic logic [PW-1:0] ptr_inc(input logic [PW-1:0] p);
    return (p == PW'(FIFO_SIZE - 1)) ? '0 : p + 1'b1;
  endfunction

  assign do_pop  = pop && (cnt_q[pop_fifo] != '0);
  assign push_ok = (cnt_q[push_fifo] != CW'(FIFO_SIZE)) || (do_pop && pop_fifo == push_fifo);
  assign do_push = push && push_ok;

  assign rd_addr  = AW'(pop_fifo)  * AW'(FIFO_SIZE) + AW'(head_q[pop_fifo]);
  assign wr_addr  = AW'(push_fifo) * AW'(FIFO_SIZE) + AW'(tail_q[push_fifo]);
  assign pop_rank = rank_mem[rd_addr];
  assign pop_data = data_mem[rd_addr];

  assign fifo_count  = cnt_q[cnt_fifo];
  assign total_count = total_q;

  // First non-empty FIFO in ring order from search_start.
  always_comb begin
    found      = 1'b0;
    found_fifo = search_start;
    for (int k = NUM_FIFOS - 1; k >= 0; k--) begin
      logic [FW-1:0] idx;
      idx = FW'((int'(search_start) + k) % NUM_FIFOS);
      if (cnt_q[idx] != '0) begin
        found      = 1'b1;
        found_fifo = idx;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) begin
      rank_mem[wr_addr] <= push_rank;
      data_mem[wr_addr] <= push_data;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int f = 0; f < NUM_FIFOS; f++) begin
        head_q[f] <= '0;
        tail_q[f] <= '0;
        cnt_q[f]  <= '0;
      end
      total_q <= '0;
    end else begin
      if (do_pop)  head_q[pop_fifo]  <= ptr_inc(head_q[pop_fifo]);
      if (do_push) tail_q[push_fifo] <= ptr_inc(tail_q[push_fifo]);
      for (int f = 0; f < NUM_FIFOS; f++) begin
        case ({do_push && push_fifo == FW'(f), do_pop && pop_fifo == FW'(f)})
          2'b10:   cnt_q[f] <= cnt_q[f] + 1'b1;
          2'b01:   cnt_q[f] <= cnt_q[f] - 1'b1;
          default: ;
        endcase
      end
      case ({do_push, do_pop})
        2'b10:   total_q <= total_q + 1'b1;
        2'b01:   total_q <= total_q - 1'b1;
        default: ;
      endcase
    end
  end

  // Pointers must stay inside their FIFO's slice of the array.
  assert property (@(posedge clk) disable iff (!rst_n) int'(push_fifo) < NUM_FIFOS || !push);
  assert property (@(posedge clk) disable iff (!rst_n) int'(pop_fifo) < NUM_FIFOS || !pop);

endmodule
