// stfq_rank: rank computation for start-time fair queueing (STFQ), the scheduling
// algorithm the testbed runs on Sifter.
//
// STFQ gives each packet a start tag S = max(V, F[flow]), where V is the system
// virtual time and F[flow] the finish tag of the flow's previous packet, and then
// sets F[flow] = S + cost(packet). The start tag is the packet's rank, so the
// scheduler serves packets in start-tag order. V is the start tag of the packet
// most recently dequeued (vt_valid/vt_rank) and never moves backwards.
//
// The published Sifter design only names STFQ. The formulas are the usual STFQ
// ones; equal weights, the cost unit of 2^LEN_SHIFT bytes, the 8-flow table and the
// one-clock latency are this design's own choices (with 32-byte units a trace of
// ~14,000 370-byte packets over 8 flows reaches ranks of about 2*10^4). Handshake:
// in_valid/in_ready in, out_valid/out_ready out, one register stage; a new packet
// is accepted whenever the output stage is empty or being emptied. Synchronous
// active-low reset clears all tags.
module stfq_rank #(
  parameter int unsigned RANK_W    = 32,
  parameter int unsigned NUM_FLOWS = 8,
  parameter int unsigned LEN_SHIFT = 5,
  localparam int unsigned FLW = (NUM_FLOWS > 1) ? $clog2(NUM_FLOWS) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  sifter_pkg::pkt_info_t  in_info,
  output logic                   out_valid,
  input  logic                   out_ready,
  output logic [RANK_W-1:0]      out_rank,
  output sifter_pkg::pkt_info_t  out_info,
  input  logic                   vt_valid,
  input  logic [RANK_W-1:0]      vt_rank,
  output logic [RANK_W-1:0]      vtime
);

  logic [RANK_W-1:0] finish_q [NUM_FLOWS];
  logic [RANK_W-1:0] v_q, start, cost;
  logic [FLW-1:0]    flow;
  logic              fire;

  assign flow     = FLW'(in_info.flow % 16'(NUM_FLOWS));
  assign start    = (finish_q[flow] > v_q) ? finish_q[flow] : v_q;
  assign cost     = (in_info.len >> LEN_SHIFT) == '0 ? RANK_W'(1) : RANK_W'(in_info.len >> LEN_SHIFT);
  assign in_ready = !out_valid || out_ready;
  assign fire     = in_valid && in_ready;
  assign vtime    = v_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_q       <= '0;
      out_valid <= 1'b0;
      out_rank  <= '0;
      out_info  <= '0;
      for (int f = 0; f < NUM_FLOWS; f++) finish_q[f] <= '0;
    end else begin
      if (vt_valid && vt_rank > v_q) v_q <= vt_rank;
      if (fire) begin
        out_valid      <= 1'b1;
        out_rank       <= start;
        out_info       <= in_info;
        finish_q[flow] <= start + cost;
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

endmodule
