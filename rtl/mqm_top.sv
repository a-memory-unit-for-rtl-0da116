// mqm_top: Message Queues Memory (MQM), a packet buffer with priority
// queues for a flow-through IPSec accelerator.
//
// Packets of NUM_PRIO priority levels share one main memory. The memory is
// cut into 16-word blocks; a queue is a linked list of blocks, the link to
// the next block being stored serially in a 33rd bit of the block's words.
// Free blocks live in a LIFO of addresses (AM), so any block can serve any
// queue and no queue has a fixed share of the memory. Data path:
//   message -> padder -> write_unit -> main_memory -> read_unit -> hasher
// with address_memory supplying and taking back block addresses,
// block_counters holding N_p (blocks queued per level), discard_policy
// (inside write_unit) dropping packets when memory is scarce, and
// priority_manager choosing the queue to read with a proportional round
// robin. The hasher (HMAC-SHA2) is outside: its block interface is the
// out_* / hash_req ports.
//
// Interface:
//   msg_*   message words, valid/ready; msg_len (words) and msg_prio are
//           sampled with each message's first word.
//   mode    discard policy (mqm_pkg::discard_mode_e).
//   hash_req  the hasher can take a 16-word block at one word per clock.
//   out_*   block words towards the hasher; out_first_blk / out_last_blk
//           are valid with out_eob (word 15).
//   status  ready (initial phase over), pkt_stored / pkt_dropped pulses
//           with pkt_prio, n_cnt (N registers) and free_cnt (free blocks).
// Reset is synchronous and active low. After reset the write side takes
// NUM_PRIO clocks to give every queue its first block.
//
// The organisation (blocks, 33rd-bit links, W/R/N registers, AM as LIFO,
// PM) is that of the architecture; the SHA-256 padding, handshakes and
// cycle timing are this design's choices, described in each module.
module mqm_top
  import mqm_pkg::*;
#(
  parameter int unsigned BLK_AW    = 14,  // 2^14 blocks of 16 words
  parameter int unsigned NUM_PRIO  = 3,   // priority levels
  parameter int unsigned SLOT_BASE = 10,  // round-robin quota 10*(p+1)
  parameter int unsigned LEN_W     = 16,  // message length field (words)
  localparam int unsigned PRIO_W   = (NUM_PRIO > 1) ? $clog2(NUM_PRIO) : 1,
  localparam int unsigned NB_W     = LEN_W - 3
) (
  input  logic               clk,
  input  logic               rst_n,
  input  discard_mode_e      mode,
  // messages in
  input  logic               msg_valid,
  output logic               msg_ready,
  input  logic [WORD_W-1:0]  msg_data,
  input  logic [LEN_W-1:0]   msg_len,
  input  logic [PRIO_W-1:0]  msg_prio,
  // blocks out, towards the hasher
  input  logic               hash_req,
  output logic               out_valid,
  output logic [WORD_W-1:0]  out_data,
  output logic [INBLK_W-1:0] out_word,
  output logic               out_eob,
  output logic               out_first_blk,
  output logic               out_last_blk,
  output logic [PRIO_W-1:0]  out_prio,
  // status
  output logic               ready,
  output logic               pkt_stored,
  output logic               pkt_dropped,
  output logic [PRIO_W-1:0]  pkt_prio,
  output logic [BLK_AW:0]    n_cnt [NUM_PRIO],
  output logic [BLK_AW:0]    free_cnt
);

  // padder -> write unit
  logic               b_valid, b_ready, b_first, b_last;
  logic [WORD_W-1:0]  b_data;
  logic [INBLK_W-1:0] b_word;
  logic [PRIO_W-1:0]  b_prio;
  logic [NB_W-1:0]    b_nb;
  // address memory
  logic [BLK_AW-1:0]  am_head, am_push_addr;
  logic               am_head_valid, am_pop, am_push;
  // main memory
  logic               mm_wr_en, mm_wr_link, mm_wr_eob;
  logic [BLK_AW-1:0]  mm_wr_blk, mm_rd_blk;
  logic [WORD_W-1:0]  mm_wr_data, mm_rd_data;
  logic [INBLK_W-1:0] mm_wr_word, mm_rd_word;
  logic               mm_rd_en, mm_rd_eob, mm_rd_valid, mm_rd_link;
  // N registers and priority manager
  logic               add_en;
  logic [PRIO_W-1:0]  add_prio, grant_prio;
  logic [NB_W-1:0]    add_nb;
  logic [NUM_PRIO-1:0] dec, nonempty;
  logic               pm_req, grant_valid, blk_done, blk_last, round_switch;
  // initial phase
  logic               init_done;
  logic [BLK_AW-1:0]  w_init [NUM_PRIO];
  logic               ready_q;
  logic               unused_ok;

  padder #(.LEN_W(LEN_W), .PRIO_W(PRIO_W), .NB_W(NB_W)) u_padder (
    .clk, .rst_n,
    .msg_valid, .msg_ready, .msg_data, .msg_len, .msg_prio,
    .blk_valid (b_valid), .blk_ready (b_ready), .blk_data (b_data),
    .blk_word  (b_word),  .blk_first (b_first), .blk_last (b_last),
    .blk_prio  (b_prio),  .blk_nb    (b_nb)
  );

  write_unit #(.BLK_AW(BLK_AW), .NUM_PRIO(NUM_PRIO), .PRIO_W(PRIO_W), .NB_W(NB_W)) u_write (
    .clk, .rst_n, .mode,
    .blk_valid (b_valid), .blk_ready (b_ready), .blk_data (b_data),
    .blk_word  (b_word),  .blk_first (b_first), .blk_last (b_last),
    .blk_prio  (b_prio),  .blk_nb    (b_nb),
    .am_head, .am_head_valid, .am_pop, .am_free (free_cnt),
    .mm_wr_en, .mm_wr_blk, .mm_wr_data, .mm_wr_link, .mm_wr_eob,
    .cnt (n_cnt), .add_en, .add_prio, .add_nb,
    .init_done, .w_init,
    .pkt_stored, .pkt_dropped, .pkt_prio
  );

  address_memory #(.BLK_AW(BLK_AW)) u_am (
    .clk, .rst_n,
    .head (am_head), .head_valid (am_head_valid), .pop (am_pop),
    .push (am_push), .push_addr (am_push_addr), .free_cnt
  );

  main_memory #(.BLK_AW(BLK_AW)) u_mm (
    .clk, .rst_n,
    .wr_en (mm_wr_en), .wr_blk (mm_wr_blk), .wr_data (mm_wr_data),
    .wr_link (mm_wr_link), .wr_word (mm_wr_word), .wr_eob (mm_wr_eob),
    .rd_en (mm_rd_en), .rd_blk (mm_rd_blk), .rd_word (mm_rd_word),
    .rd_eob (mm_rd_eob), .rd_valid (mm_rd_valid), .rd_data (mm_rd_data),
    .rd_link (mm_rd_link)
  );

  block_counters #(.BLK_AW(BLK_AW), .NUM_PRIO(NUM_PRIO), .PRIO_W(PRIO_W), .NB_W(NB_W)) u_n (
    .clk, .rst_n,
    .add_en, .add_prio, .add_nb, .dec,
    .cnt (n_cnt), .nonempty
  );

  priority_manager #(.NUM_PRIO(NUM_PRIO), .PRIO_W(PRIO_W), .SLOT_BASE(SLOT_BASE)) u_pm (
    .clk, .rst_n,
    .nonempty, .req (pm_req), .grant_valid, .grant_prio, .dec,
    .blk_done, .blk_last, .round_switch
  );

  read_unit #(.BLK_AW(BLK_AW), .NUM_PRIO(NUM_PRIO), .PRIO_W(PRIO_W)) u_read (
    .clk, .rst_n,
    .init_done, .w_init,
    .pm_req, .grant_valid, .grant_prio, .blk_done, .blk_last,
    .mm_rd_en, .mm_rd_blk, .mm_rd_eob, .mm_rd_valid, .mm_rd_data, .mm_rd_link,
    .am_push, .am_push_addr,
    .hash_req, .out_valid, .out_data, .out_word, .out_eob,
    .out_first_blk, .out_last_blk, .out_prio
  );

  always_ff @(posedge clk) begin
    if (!rst_n)         ready_q <= 1'b0;
    else if (init_done) ready_q <= 1'b1;
  end
  assign ready = ready_q;

  // word indices are kept inside MM; the units track them on their own
  assign unused_ok = ^{mm_wr_word, mm_rd_word, round_switch};

endmodule
