// main_memory: the MQM Main Memory (MM), 2^BLK_AW blocks of 16 words.
//
// Every word holds 32 data bits plus a 33rd bit that carries one bit of the
// block's link field (see mqm_pkg::link_t). A word is addressed by
// {block address, in-block address}; the block address comes from a W or
// R register outside, while the in-block address x3..x0 is produced here by
// one 4-bit counter per port, stepped by each access and wrapping from 1111
// to 0000. The wrap is the end-of-block signal (wr_eob / rd_eob).
//
// Ports: one write port and one read port, usable in the same cycle, so a
// block can be stored while another is read.
//   write: wr_en writes {wr_link, wr_data} at {wr_blk, wr_word}; wr_eob is
//          high during the write of word 15.
//   read:  rd_en reads {rd_blk, rd_word}; the word appears on rd_data and
//          rd_link one clock later with rd_valid. rd_eob is high during the
//          cycle that issues the read of word 15.
// Reset (synchronous, active low) clears only the two word counters.
//
// The block organisation, the 33rd bit and the in-block counters follow
// the architecture; the dual-port arrangement and the one-cycle read latency
// are this design's choices.
module main_memory
  import mqm_pkg::*;
#(
  parameter int unsigned BLK_AW = 14  // block address width: 2^14 blocks
) (
  input  logic               clk,
  input  logic               rst_n,
  // write port
  input  logic               wr_en,
  input  logic [BLK_AW-1:0]  wr_blk,
  input  logic [WORD_W-1:0]  wr_data,
  input  logic               wr_link,
  output logic [INBLK_W-1:0] wr_word,
  output logic               wr_eob,
  // read port
  input  logic               rd_en,
  input  logic [BLK_AW-1:0]  rd_blk,
  output logic [INBLK_W-1:0] rd_word,
  output logic               rd_eob,
  output logic               rd_valid,
  output logic [WORD_W-1:0]  rd_data,
  output logic               rd_link
);

  localparam int unsigned AW = BLK_AW + INBLK_W;

  logic [WORD_W:0]    mem [2**AW];
  logic [INBLK_W-1:0] wcnt_q, rcnt_q;

  assign wr_word = wcnt_q;
  assign rd_word = rcnt_q;
  assign wr_eob  = wr_en && (wcnt_q == '1);
  assign rd_eob  = rd_en && (rcnt_q == '1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wcnt_q <= '0;
      rcnt_q <= '0;
    end else begin
      if (wr_en) wcnt_q <= wcnt_q + 1'b1;
      if (rd_en) rcnt_q <= rcnt_q + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[{wr_blk, wcnt_q}] <= {wr_link, wr_data};
  end

  always_ff @(posedge clk) begin
    if (rd_en) {rd_link, rd_data} <= mem[{rd_blk, rcnt_q}];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) rd_valid <= 1'b0;
    else        rd_valid <= rd_en;
  end

endmodule
