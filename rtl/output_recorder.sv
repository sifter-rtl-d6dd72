// output_recorder: records the descriptors leaving the scheduler, in departure
// order, for the host to read back, and counts rank decreases.
//
// Every descriptor presented on in_valid is taken (in_ready is always high). The
// first DEPTH of them are written to a memory in order; rec_count counts them all.
// A descriptor whose rank is below that of the one recorded before it increments
// order_drops; for an inversion-free scheduler fed by STFQ this stays near zero (a
// packet ranked just before a dequeue moved the virtual time can legitimately come
// out below it). The host reads entry rd_addr on rd_data, combinationally. The
// published Sifter design names the output recorder and shows the recorded rank
// sequence; depth, counters and read port are this design's own choices.
// Synchronous active-low reset clears the counters.
module output_recorder #(
  parameter int unsigned WIDTH  = 64,
  parameter int unsigned RANK_W = 32,   // rank = top RANK_W bits of a descriptor
  parameter int unsigned DEPTH  = 16384,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data,
  output logic [31:0]      rec_count,
  output logic [31:0]      order_drops,
  output logic [RANK_W-1:0] last_rank
);

  logic [WIDTH-1:0]  mem [DEPTH];
  logic [RANK_W-1:0] rank;

  assign in_ready = 1'b1;
  assign rank     = in_data[WIDTH-1 -: RANK_W];
  assign rd_data  = mem[rd_addr];

  always_ff @(posedge clk) begin
    if (in_valid && rec_count < 32'(DEPTH)) mem[AW'(rec_count)] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rec_count   <= '0;
      order_drops <= '0;
      last_rank   <= '0;
    end else if (in_valid) begin
      rec_count <= rec_count + 1'b1;
      last_rank <= rank;
      if (rec_count != '0 && rank < last_rank) order_drops <= order_drops + 1'b1;
    end
  end

endmodule
