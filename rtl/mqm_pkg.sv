// mqm_pkg: types and constants shared by the Message Queues Memory (MQM).
//
// The MQM keeps packets of several priority levels as linked lists of
// 16-word blocks inside one shared main memory. Every block carries 16
// link bits, one in the 33rd bit of each of its words: a first-block flag,
// a last-block flag and the address of the next block of the same queue.
// The block size (16 words of 32 bits), the 33rd bit, the 16-bit link and
// the three priority levels follow the architecture; the order of the link
// bits and the encodings below are this design's own choices.
package mqm_pkg;

  // Width of the in-block word address: 16 words per block.
  localparam int unsigned INBLK_W     = 4;
  // Data word width, without the 33rd (link) bit.
  localparam int unsigned WORD_W      = 32;
  // Link field: one bit per word of a block.
  localparam int unsigned LINK_W      = 16;

  // Packet discarding policies applied when a packet arrives.
  typedef enum logic [1:0] {
    DISCARD_UNCONDITIONAL = 2'd0,  // drop only when the packet does not fit
    DISCARD_PROPORTIONAL  = 2'd1,  // level p may hold (p+1)/sum(1..P) of memory
    DISCARD_UNIFORM       = 2'd2   // every level may hold 1/P of memory
  } discard_mode_e;

  // Link bits of a block, sent MSB first, one per word (word 0 carries
  // bit 15). Flags sit in the top two bits, the next-block address below.
  // The block address field is 14 bits wide in the default configuration;
  // with fewer address bits the unused upper bits of next_blk are zero.
  typedef struct packed {
    logic        first;     // block is the first of its packet
    logic        last;      // block is the last of its packet
    logic [13:0] next_blk;  // address of the next block in the same queue
  } link_t;

endpackage
