// sifter_testbed_top: the FPGA testbed datapath around the Sifter scheduler.
//
//   host -> input buffer -> rate ctrl -> STFQ rank -> Sifter -> rate ctrl -> output recorder -> host
//
// The host (over PCIe, not part of this RTL) loads packet descriptors (flow,
// length) into the input buffer and raises `run`. With `in_burst` high the input
// side is not paced, so descriptors arrive faster than the line drains them (a
// burst, as when many inputs converge on one output); this switch is this design's
// own addition. The input rate controller releases them at the line rate, STFQ
// gives each one its rank, and the Sifter scheduler holds and orders them. The
// output rate controller takes the scheduler's head descriptor whenever the line is
// free, so the scheduler is drained at the line rate too, and the output recorder
// keeps the departure order for the host to read back. The dequeued rank is fed
// back to STFQ as its virtual time.
//
// The chain of blocks follows the testbed diagram; the interfaces between them are
// this design's own (valid/ready everywhere). Both rate controllers use the
// testbed's 100 Gb/s line rate at its 322 MHz clock. The top also counts scheduler
// events (drops, sifting passes, evictions, held dequeues) for the host. All ports
// are synchronous to clk; reset is synchronous and active low.
module sifter_testbed_top
  import sifter_pkg::*;
#(
  parameter int unsigned PIFO_SIZE_P = sifter_pkg::PIFO_SIZE,  // S_P
  parameter int unsigned SIFT_TH_P   = sifter_pkg::SIFT_TH,    // Th_S
  parameter int unsigned NUM_FIFOS_P = sifter_pkg::NUM_FIFOS,
  parameter int unsigned FIFO_SIZE_P = sifter_pkg::FIFO_SIZE,  // S_F
  parameter int unsigned BUCKET_W_P  = sifter_pkg::BUCKET_W,
  parameter int unsigned IN_DEPTH    = 16384,
  parameter int unsigned REC_DEPTH   = 16384,
  parameter int unsigned NUM_FLOWS   = 8,
  parameter int unsigned LEN_SHIFT   = 5,
  parameter int unsigned RATE_MBPS   = 100000,
  parameter int unsigned CLK_MHZ     = 322,
  localparam int unsigned RAW = (REC_DEPTH > 1) ? $clog2(REC_DEPTH) : 1,
  localparam int unsigned ICW = $clog2(IN_DEPTH+1),
  localparam int unsigned PCW = $clog2(PIFO_SIZE_P+1),
  localparam int unsigned TW  = $clog2(NUM_FIFOS_P*FIFO_SIZE_P+1)
) (
  input  logic            clk,
  input  logic            rst_n,
  // descriptor load from the host
  input  logic            host_in_valid,
  output logic            host_in_ready,
  input  pkt_info_t       host_in_info,
  output logic [ICW-1:0]  in_buf_count,
  input  logic            run,
  input  logic            in_burst,   // 1: release the trace unpaced
  // recorded departure order, read by the host
  input  logic [RAW-1:0]  rec_rd_addr,
  output desc_t           rec_rd_data,
  output logic [31:0]     rec_count,
  output logic [31:0]     rec_order_drops,
  output logic [RANK_W-1:0] rec_last_rank,
  // scheduler statistics
  output logic [31:0]     stat_drops,
  output logic [31:0]     stat_sift_passes,
  output logic [31:0]     stat_evictions,
  output logic [31:0]     stat_deq_holds,
  output logic [31:0]     stat_send_backs,
  output desc_t           last_drop,
  // scheduler state
  output logic [RANK_W-1:0] sentinel,
  output logic [PCW-1:0]  pifo_count,
  output logic [TW-1:0]   rcq_count,
  output logic            sifting,
  output logic [RANK_W-1:0] vtime
);

  // input buffer -> input rate control
  logic      buf_valid, buf_ready;
  pkt_info_t buf_info;
  // input rate control -> STFQ
  logic      arr_valid, arr_ready;
  pkt_info_t arr_info;
  // STFQ -> scheduler
  logic              enq_valid, enq_ready;
  logic [RANK_W-1:0] enq_rank;
  pkt_info_t         enq_info;
  // scheduler -> output rate control
  logic              deq_valid, deq_ready;
  logic [RANK_W-1:0] deq_rank;
  pkt_info_t         deq_info;
  desc_t             deq_desc;
  // output rate control -> recorder
  logic              tx_valid, tx_ready;
  desc_t             tx_desc;

  logic              drop, ev_sift_start, ev_evict, ev_reject, ev_deq_hold;
  logic [RANK_W-1:0] drop_rank;
  pkt_info_t         drop_info;

  desc_fifo #(.WIDTH($bits(pkt_info_t)), .DEPTH(IN_DEPTH)) u_in_buf (
    .clk, .rst_n,
    .in_valid(host_in_valid), .in_ready(host_in_ready), .in_data(host_in_info),
    .out_valid(buf_valid), .out_ready(buf_ready), .out_data(buf_info),
    .count(in_buf_count)
  );

  rate_ctrl #(.WIDTH($bits(pkt_info_t)), .RATE_MBPS(RATE_MBPS), .CLK_MHZ(CLK_MHZ)) u_in_rate (
    .clk, .rst_n, .enable(run), .bypass(in_burst),
    .in_valid(buf_valid), .in_ready(buf_ready), .in_data(buf_info), .pkt_len(buf_info.len),
    .out_valid(arr_valid), .out_ready(arr_ready), .out_data(arr_info)
  );

  stfq_rank #(.RANK_W(RANK_W), .NUM_FLOWS(NUM_FLOWS), .LEN_SHIFT(LEN_SHIFT)) u_stfq (
    .clk, .rst_n,
    .in_valid(arr_valid), .in_ready(arr_ready), .in_info(arr_info),
    .out_valid(enq_valid), .out_ready(enq_ready), .out_rank(enq_rank), .out_info(enq_info),
    .vt_valid(deq_valid && deq_ready), .vt_rank(deq_rank), .vtime(vtime)
  );

  sifter_scheduler #(
    .RANK_W(RANK_W), .DATA_W($bits(pkt_info_t)),
    .PIFO_SIZE(PIFO_SIZE_P), .SIFT_TH(SIFT_TH_P),
    .NUM_FIFOS(NUM_FIFOS_P), .FIFO_SIZE(FIFO_SIZE_P), .BUCKET_W(BUCKET_W_P)
  ) u_sched (
    .clk, .rst_n,
    .enq_valid, .enq_ready, .enq_rank, .enq_data(enq_info),
    .deq_valid, .deq_ready, .deq_rank, .deq_data(deq_info),
    .drop, .drop_rank, .drop_data(drop_info),
    .sentinel, .pifo_count, .rcq_count, .sifting,
    .ev_sift_start, .ev_evict, .ev_reject, .ev_deq_hold
  );

  assign deq_desc = '{rank: deq_rank, info: deq_info};

  rate_ctrl #(.WIDTH($bits(desc_t)), .RATE_MBPS(RATE_MBPS), .CLK_MHZ(CLK_MHZ)) u_out_rate (
    .clk, .rst_n, .enable(1'b1), .bypass(1'b0),
    .in_valid(deq_valid), .in_ready(deq_ready), .in_data(deq_desc), .pkt_len(deq_info.len),
    .out_valid(tx_valid), .out_ready(tx_ready), .out_data(tx_desc)
  );

  output_recorder #(.WIDTH($bits(desc_t)), .RANK_W(RANK_W), .DEPTH(REC_DEPTH)) u_rec (
    .clk, .rst_n,
    .in_valid(tx_valid), .in_ready(tx_ready), .in_data(tx_desc),
    .rd_addr(rec_rd_addr), .rd_data(rec_rd_data),
    .rec_count, .order_drops(rec_order_drops), .last_rank(rec_last_rank)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      stat_drops       <= '0;
      stat_sift_passes <= '0;
      stat_evictions   <= '0;
      stat_deq_holds   <= '0;
      stat_send_backs  <= '0;
      last_drop        <= '0;
    end else begin
      if (drop)          last_drop        <= '{rank: drop_rank, info: drop_info};
      if (ev_reject)     stat_send_backs  <= stat_send_backs + 1'b1;
      if (drop)          stat_drops       <= stat_drops + 1'b1;
      if (ev_sift_start) stat_sift_passes <= stat_sift_passes + 1'b1;
      if (ev_evict)      stat_evictions   <= stat_evictions + 1'b1;
      if (ev_deq_hold && deq_ready) stat_deq_holds <= stat_deq_holds + 1'b1;
    end
  end

endmodule
