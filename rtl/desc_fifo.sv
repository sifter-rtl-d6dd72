// desc_fifo: first-word-fall-through FIFO used as the testbed's input buffer for
// packet descriptors.
//
// The host loads a descriptor trace into this buffer; the input rate controller
// then replays it. Storage is one array with read and write pointers and an
// occupancy counter; the head word is read combinationally, so out_data is valid
// whenever out_valid is high. Both sides use a valid/ready handshake, one word per
// clock each, and a push and a pop may happen in the same clock. The published
// Sifter design only names the input buffer; the depth (enough for a trace of some
// 14,000 descriptors) and the organisation are this design's own choices.
// Synchronous active-low reset empties the buffer.
module desc_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 16384,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW = $clog2(DEPTH+1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data,
  output logic [CW-1:0]    count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rd_q, wr_q;
  logic [CW-1:0]    cnt_q;
  logic             do_push, do_pop;

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign in_ready  = (cnt_q != CW'(DEPTH));
  assign out_valid = (cnt_q != '0);
  assign out_data  = mem[rd_q];
  assign count     = cnt_q;
  assign do_push   = in_valid && in_ready;
  assign do_pop    = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_q] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (do_push) wr_q <= inc(wr_q);
      if (do_pop)  rd_q <= inc(rd_q);
      case ({do_push, do_pop})
        2'b10:   cnt_q <= cnt_q + 1'b1;
        2'b01:   cnt_q <= cnt_q - 1'b1;
        default: ;
      endcase
    end
  end

endmodule
