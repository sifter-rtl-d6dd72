// sifter_pkg: widths, default sizes and the packet-descriptor layout shared by the
// Sifter scheduler and the testbed blocks around it.
//
// A descriptor is 8 bytes (64 bits), the metadata size used in the speed-up
// calculation: a 32-bit rank followed by 32 bits of packet information (flow
// number and packet length in bytes). How the 64 bits are split is this design's
// own choice. The default scheduler sizes are those of the worked example of the
// architecture: a 6-entry mini-PIFO with a sifting threshold of 3, and a rotating
// calendar queue of 10 FIFOs of 6 entries, each FIFO covering 10 consecutive ranks.
package sifter_pkg;

  localparam int unsigned RANK_W   = 32;  // rank width
  localparam int unsigned INFO_W   = 32;  // packet information carried with the rank

  localparam int unsigned PIFO_SIZE   = 6;   // S_P
  localparam int unsigned SIFT_TH     = 3;   // Th_S
  localparam int unsigned NUM_FIFOS   = 10;  // calendar FIFOs (ranks 0-9 ... 90-99)
  localparam int unsigned FIFO_SIZE   = 6;   // S_F
  localparam int unsigned BUCKET_W    = 10;  // ranks per calendar FIFO

  // Packet information field of a descriptor.
  typedef struct packed {
    logic [INFO_W/2-1:0] flow;  // flow number
    logic [INFO_W/2-1:0] len;   // packet length in bytes
  } pkt_info_t;

  // Full descriptor as handed to and returned by the scheduler.
  typedef struct packed {
    logic [RANK_W-1:0] rank;
    pkt_info_t         info;
  } desc_t;

endpackage
