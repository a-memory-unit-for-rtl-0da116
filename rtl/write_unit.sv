// write_unit: the write side of the MQM (registers W0..W{P-1} and W').
//
// W_p always holds the address of the block that the next block of queue p
// will be written to; that block is already reserved. Storing a block of
// priority p (P_in = p) takes one load cycle and sixteen write cycles:
//   load:  the next free address is popped from AM into W' together with
//          the block's first/last flags, W' = {first, last, next address};
//   write: word k goes to MM at {W_p, k} with bit 15 of W' as its 33rd
//          bit, and W' rotates left by one, so that after 16 words every
//          link bit has been stored and W' holds its loaded value again;
//          on the last word W' (its address part) is copied into W_p.
// When the packet's last block is in MM, nb is added to N_p.
//
// Before the first block of a packet is loaded, discard_policy decides
// whether the packet is kept; a dropped packet is read from the padder and
// thrown away. After reset an initial phase pops one address per queue
// from AM into W_0..W_{P-1} and then pulses init_done, with the addresses
// on w_init, so that the read side can load R_p = W_p.
//
// Timing: 17 clocks per stored block when the padder is never stalled;
// a dropped block takes 16. Reset is synchronous, active low.
//
// The roles of W_p and W', the rotation through W', the initial phase and
// the update N_p += nb follow the architecture. The separate load cycle,
// the handshakes and the moment N_p is updated are this design's choices.
module write_unit
  import mqm_pkg::*;
#(
  parameter int unsigned BLK_AW   = 14,
  parameter int unsigned NUM_PRIO = 3,
  parameter int unsigned PRIO_W   = 2,
  parameter int unsigned NB_W     = 13
) (
  input  logic               clk,
  input  logic               rst_n,
  input  discard_mode_e      mode,
  // from the padder
  input  logic               blk_valid,
  output logic               blk_ready,
  input  logic [WORD_W-1:0]  blk_data,
  input  logic [INBLK_W-1:0] blk_word,
  input  logic               blk_first,
  input  logic               blk_last,
  input  logic [PRIO_W-1:0]  blk_prio,
  input  logic [NB_W-1:0]    blk_nb,
  // address memory
  input  logic [BLK_AW-1:0]  am_head,
  input  logic               am_head_valid,
  output logic               am_pop,
  input  logic [BLK_AW:0]    am_free,
  // main memory write port
  output logic               mm_wr_en,
  output logic [BLK_AW-1:0]  mm_wr_blk,
  output logic [WORD_W-1:0]  mm_wr_data,
  output logic               mm_wr_link,
  input  logic               mm_wr_eob,
  // N registers
  input  logic [BLK_AW:0]    cnt [NUM_PRIO],
  output logic               add_en,
  output logic [PRIO_W-1:0]  add_prio,
  output logic [NB_W-1:0]    add_nb,
  // initial phase
  output logic               init_done,
  output logic [BLK_AW-1:0]  w_init [NUM_PRIO],
  // packet events
  output logic               pkt_stored,
  output logic               pkt_dropped,
  output logic [PRIO_W-1:0]  pkt_prio
);

  typedef enum logic [2:0] {S_INIT, S_IDLE, S_LOAD, S_WRITE, S_DROP} state_e;

  state_e            state_q;
  logic [PRIO_W-1:0] init_q;
  logic [BLK_AW-1:0] w_q [NUM_PRIO];
  link_t             wp_q;           // W'
  link_t             wp_rot;
  logic [PRIO_W-1:0] prio_q;
  logic [NB_W-1:0]   nb_q;
  logic              accept;
  logic              fits;
  logic              load;
  logic              fire;
  logic              unused_fits;

  discard_policy #(
    .BLK_AW(BLK_AW), .NUM_PRIO(NUM_PRIO), .PRIO_W(PRIO_W), .NB_W(NB_W)
  ) u_policy (
    .mode     (mode),
    .prio     (blk_prio),
    .nb       (blk_nb),
    .cnt      (cnt),
    .free_cnt (am_free),
    .fits     (fits),
    .accept   (accept)
  );
  assign unused_fits = fits;

  assign wp_rot = {wp_q[LINK_W-2:0], wp_q[LINK_W-1]};

  always_comb begin
    load = 1'b0;
    if (state_q == S_IDLE) load = blk_valid && accept;
    if (state_q == S_LOAD) load = blk_valid;
    am_pop     = load || (state_q == S_INIT);
    blk_ready  = (state_q == S_WRITE) || (state_q == S_DROP);
    fire       = blk_valid && blk_ready;
    mm_wr_en   = (state_q == S_WRITE) && blk_valid;
    mm_wr_blk  = w_q[prio_q];
    mm_wr_data = blk_data;
    mm_wr_link = wp_q[LINK_W-1];
    add_en     = (state_q == S_WRITE) && mm_wr_eob && blk_last;
    add_prio   = prio_q;
    add_nb     = nb_q;
    pkt_stored = add_en;
    pkt_dropped = (state_q == S_IDLE) && blk_valid && !accept;
    pkt_prio   = (state_q == S_IDLE) ? blk_prio : prio_q;
    init_done  = (state_q == S_INIT) && (init_q == PRIO_W'(NUM_PRIO - 1));
    w_init     = w_q;
    // during the last init cycle the address being popped is not yet in w_q
    if (init_done) w_init[NUM_PRIO-1] = am_head;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= S_INIT;
      init_q  <= '0;
      prio_q  <= '0;
      nb_q    <= '0;
      wp_q    <= '0;
      for (int p = 0; p < NUM_PRIO; p++) w_q[p] <= '0;
    end else begin
      case (state_q)
        S_INIT: begin
          w_q[init_q] <= am_head;
          init_q      <= init_q + 1'b1;
          if (init_done) state_q <= S_IDLE;
        end
        S_IDLE: begin
          if (blk_valid) begin
            prio_q  <= blk_prio;
            nb_q    <= blk_nb;
            state_q <= accept ? S_WRITE : S_DROP;
          end
        end
        S_LOAD: if (blk_valid) state_q <= S_WRITE;
        S_WRITE: begin
          if (fire) begin
            wp_q <= wp_rot;
            if (mm_wr_eob) begin
              w_q[prio_q] <= BLK_AW'(wp_rot.next_blk);
              state_q     <= blk_last ? S_IDLE : S_LOAD;
            end
          end
        end
        S_DROP: begin
          if (fire && blk_word == '1 && blk_last) state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
      if (load) wp_q <= '{first: blk_first, last: blk_last, next_blk: 14'(am_head)};
    end
  end

  a_pop_valid: assert property (@(posedge clk) disable iff (!rst_n)
    am_pop |-> am_head_valid);
  a_word_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    mm_wr_en |-> (mm_wr_eob == (blk_word == '1)));
  a_pkt_start: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == S_IDLE && blk_valid) |-> (blk_first && blk_word == '0));

endmodule
