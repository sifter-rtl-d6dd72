// rate_ctrl: paces a stream of packet descriptors to a line rate.
//
// Each descriptor stands for a packet of pkt_len bytes. The block lets a descriptor
// pass only when the packets already passed have had their time on the wire at
// RATE_MBPS, for a clock of CLK_MHZ. It keeps a debt, in bits with FRAC_BITS
// fraction bits: a passing descriptor adds 8 * pkt_len bits, and every clock pays
// off the bits the line carries in one clock period (RATE_MBPS / CLK_MHZ). A
// descriptor may pass while the debt is below one clock's worth, so back-to-back
// packets leave at exactly the line rate on average and no remainder is lost. The
// debt never goes below zero, so an idle line builds no credit.
//
// The defaults are the testbed's: 100 Gb/s line rate and a 322 MHz clock, which
// gives about 9.5 clocks per 370-byte packet. The testbed places one such block in
// front of the scheduler and one behind it; the published design names the blocks
// and the rates, the debt-counter scheme is this design's own. Pass-through
// valid/ready handshake; `enable` low holds all descriptors, and `bypass` high lets
// them through unpaced (used by the testbed to emulate several inputs converging on
// one output). in_ready does not depend on in_valid. Synchronous active-low reset
// clears the debt.
module rate_ctrl #(
  parameter int unsigned WIDTH     = 64,
  parameter int unsigned RATE_MBPS = 100000,
  parameter int unsigned CLK_MHZ   = 322,
  parameter int unsigned FRAC_BITS = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic             bypass,    // pass without pacing (burst arrivals)
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  input  logic [15:0]      pkt_len,   // length of the packet in_data describes, bytes
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data
);

  // Bits carried per clock, in units of 2^-FRAC_BITS bit.
  localparam longint unsigned STEP = (longint'(RATE_MBPS) << FRAC_BITS) / longint'(CLK_MHZ);
  localparam int unsigned DW = 20 + FRAC_BITS + 1;   // 8 * 65535 bits plus headroom

  logic [DW-1:0] debt_q, debt_add, debt_sum;
  logic          allowed, fire;

  assign allowed   = enable && (bypass || debt_q < DW'(STEP));
  assign in_ready  = allowed && out_ready;
  assign out_valid = allowed && in_valid;
  assign out_data  = in_data;
  assign fire      = in_valid && in_ready;

  assign debt_add = (fire && !bypass) ? (DW'(pkt_len) << (3 + FRAC_BITS)) : '0;
  assign debt_sum = debt_q + debt_add;

  always_ff @(posedge clk) begin
    if (!rst_n) debt_q <= '0;
    else        debt_q <= (debt_sum > DW'(STEP)) ? debt_sum - DW'(STEP) : '0;
  end

endmodule
