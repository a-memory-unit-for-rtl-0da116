// padder: cuts an incoming message into 16-word blocks for the MQM.
//
// A message arrives as a stream of 32-bit words. Its first word comes with
// the message length in words (msg_len, at least 1) and its priority (msg_prio). The
// padder forwards the message words and then appends SHA-256 style padding
// so that the stream ends on a block boundary: one word 32'h8000_0000, zero
// words, and the 64-bit message length in bits in the last two words of the
// last block. The number of blocks is therefore
//     nb = floor((msg_len + 18) / 16)  ( = ceil((msg_len + 3) / 16) ).
// nb, the priority and per-block first/last flags are presented with every
// output word, so the write side can decide on the packet before storing.
//
// Both sides use valid/ready handshakes; a word moves when valid and ready
// are high at a clock edge. While the message words pass, msg_ready is
// blk_ready; during padding msg_ready is low. No cycle is lost between the
// message and its padding. Reset is synchronous and active low.
//
// That the message is padded into 16 x 32-bit blocks and that nb and P_in
// leave this unit follows the architecture; the SHA-256 padding format, the
// word granularity of messages and the handshakes are this design's choice.
module padder
  import mqm_pkg::*;
#(
  parameter int unsigned LEN_W  = 16,  // width of the length in words
  parameter int unsigned PRIO_W = 2,   // width of the priority index
  parameter int unsigned NB_W   = 13   // width of nb (blocks per packet)
) (
  input  logic              clk,
  input  logic              rst_n,
  // message side
  input  logic              msg_valid,
  output logic              msg_ready,
  input  logic [WORD_W-1:0] msg_data,
  input  logic [LEN_W-1:0]  msg_len,   // words; sampled with the first word
  input  logic [PRIO_W-1:0] msg_prio,  // sampled with the first word
  // block side
  output logic              blk_valid,
  input  logic              blk_ready,
  output logic [WORD_W-1:0] blk_data,
  output logic [INBLK_W-1:0] blk_word,  // word index inside the block
  output logic              blk_first,  // current block is the packet's first
  output logic              blk_last,   // current block is the packet's last
  output logic [PRIO_W-1:0] blk_prio,   // P_in
  output logic [NB_W-1:0]   blk_nb      // packet length in blocks
);

  typedef enum logic [1:0] {S_IDLE, S_MSG, S_PAD} state_e;

  localparam int unsigned CNT_W = NB_W + INBLK_W;

  state_e            state_q;
  logic [LEN_W-1:0]  len_q;
  logic [PRIO_W-1:0] prio_q;
  logic [NB_W-1:0]   nb_q;
  logic [CNT_W-1:0]  cnt_q;      // words sent so far in this packet
  logic [CNT_W-1:0]  total;      // 16 * nb
  logic [NB_W-1:0]   nb_new;
  logic [LEN_W-1:0]  len_cur;
  logic [NB_W-1:0]   nb_cur;
  logic [PRIO_W-1:0] prio_cur;
  logic [CNT_W-1:0]  pos;
  logic              fire;
  logic [63:0]       len_bits;

  // nb for the length presented now (used on the first word)
  always_comb begin
    logic [LEN_W+1:0] sum;
    sum    = {2'b00, msg_len} + (LEN_W + 2)'(18);
    nb_new = NB_W'(sum >> INBLK_W);
  end

  // In S_IDLE the stream starts with the message's first word.
  assign len_cur  = (state_q == S_IDLE) ? msg_len  : len_q;
  assign nb_cur   = (state_q == S_IDLE) ? nb_new   : nb_q;
  assign prio_cur = (state_q == S_IDLE) ? msg_prio : prio_q;
  assign pos      = (state_q == S_IDLE) ? '0       : cnt_q;
  assign total    = {nb_cur, {INBLK_W{1'b0}}};
  assign len_bits = 64'(len_cur) << 5;

  always_comb begin
    blk_valid = 1'b0;
    msg_ready = 1'b0;
    blk_data  = '0;
    if (state_q == S_PAD) begin
      blk_valid = 1'b1;
      if (pos == CNT_W'(len_cur))  blk_data = 32'h8000_0000;
      else if (pos == total - 2)   blk_data = len_bits[63:32];
      else if (pos == total - 1)   blk_data = len_bits[31:0];
    end else begin
      blk_valid = msg_valid;
      msg_ready = blk_ready;
      blk_data  = msg_data;
    end
  end

  assign blk_word  = pos[INBLK_W-1:0];
  assign blk_first = (pos[CNT_W-1:INBLK_W] == '0);
  assign blk_last  = (pos[CNT_W-1:INBLK_W] == nb_cur - 1'b1);
  assign blk_prio  = prio_cur;
  assign blk_nb    = nb_cur;
  assign fire      = blk_valid && blk_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      len_q   <= '0;
      prio_q  <= '0;
      nb_q    <= '0;
      cnt_q   <= '0;
    end else if (fire) begin
      if (state_q == S_IDLE) begin
        len_q  <= msg_len;
        prio_q <= msg_prio;
        nb_q   <= nb_new;
      end
      if (pos == total - 1) begin
        state_q <= S_IDLE;
        cnt_q   <= '0;
      end else begin
        cnt_q   <= pos + 1'b1;
        state_q <= (pos + 1'b1 < CNT_W'(len_cur)) ? S_MSG : S_PAD;
      end
    end
  end

  // Messages carry at least one word (an IP header at the very least).
  a_len_nonzero: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == S_IDLE && msg_valid) |-> (msg_len != '0));

endmodule
