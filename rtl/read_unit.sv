// read_unit: the read side of the MQM (registers R0..R{P-1} and R').
//
// R_p holds the address of the oldest unread block of queue p; each queue
// is read in FIFO order. After reset R_p is loaded from W_p when the write
// side ends its initial phase (init_done). Reading one block of queue p:
//   - when the hasher asks for a block (hash_req) the priority manager is
//     asked (pm_req); on its grant the block of queue grant_prio is read;
//   - R_p addresses MM for 16 clocks while the in-block counter in MM
//     steps through words 0..15;
//   - the 33rd bit of each word that comes back is shifted into R' from
//     the right, so after word 15 R' holds {first, last, next address};
//   - then R_p takes the next address from R', the address of the block
//     just read goes back to AM (am_push), and the priority manager is told
//     the block is done and whether it was its packet's last block.
// The 16 words go to the hasher one per clock (out_valid, out_data,
// out_word); with the last word (out_eob) come the block's first/last
// flags. The oldest bit of R' simply falls out on each shift, as only the
// last 16 bits matter. A block takes 18 clocks from grant to the next grant. Reset is
// synchronous, active low.
//
// R_p, R', the serial collection of the link bits and the return of the
// address to AM follow the architecture; the block-level request from the
// hasher and the cycle timing are this design's choices.
module read_unit
  import mqm_pkg::*;
#(
  parameter int unsigned BLK_AW   = 14,
  parameter int unsigned NUM_PRIO = 3,
  parameter int unsigned PRIO_W   = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  // initial phase
  input  logic               init_done,
  input  logic [BLK_AW-1:0]  w_init [NUM_PRIO],
  // priority manager
  output logic               pm_req,
  input  logic               grant_valid,
  input  logic [PRIO_W-1:0]  grant_prio,
  output logic               blk_done,
  output logic               blk_last,
  // main memory read port
  output logic               mm_rd_en,
  output logic [BLK_AW-1:0]  mm_rd_blk,
  input  logic               mm_rd_eob,
  input  logic               mm_rd_valid,
  input  logic [WORD_W-1:0]  mm_rd_data,
  input  logic               mm_rd_link,
  // address memory
  output logic               am_push,
  output logic [BLK_AW-1:0]  am_push_addr,
  // hasher
  input  logic               hash_req,
  output logic               out_valid,
  output logic [WORD_W-1:0]  out_data,
  output logic [INBLK_W-1:0] out_word,
  output logic               out_eob,
  output logic               out_first_blk,
  output logic               out_last_blk,
  output logic [PRIO_W-1:0]  out_prio
);

  typedef enum logic [1:0] {S_WAIT_INIT, S_IDLE, S_READ, S_TAIL} state_e;

  state_e             state_q;
  logic [BLK_AW-1:0]  r_q [NUM_PRIO];
  link_t              rp_q;            // R'
  link_t              rp_next;
  logic [PRIO_W-1:0]  sel_q;
  logic [INBLK_W-1:0] oword_q;
  logic               last_word;

  assign rp_next   = {rp_q[LINK_W-2:0], mm_rd_link};
  assign last_word = mm_rd_valid && (oword_q == '1);

  always_comb begin
    pm_req        = (state_q == S_IDLE) && hash_req;
    mm_rd_en      = (state_q == S_READ);
    mm_rd_blk     = r_q[sel_q];
    out_valid     = mm_rd_valid;
    out_data      = mm_rd_data;
    out_word      = oword_q;
    out_eob       = last_word;
    out_first_blk = rp_next.first;
    out_last_blk  = rp_next.last;
    out_prio      = sel_q;
    blk_done      = (state_q == S_TAIL) && last_word;
    blk_last      = rp_next.last;
    am_push       = blk_done;
    am_push_addr  = r_q[sel_q];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= S_WAIT_INIT;
      sel_q   <= '0;
      rp_q    <= '0;
      oword_q <= '0;
      for (int p = 0; p < NUM_PRIO; p++) r_q[p] <= '0;
    end else begin
      if (mm_rd_valid) begin
        rp_q    <= rp_next;
        oword_q <= oword_q + 1'b1;
      end
      case (state_q)
        S_WAIT_INIT: begin
          if (init_done) begin
            r_q     <= w_init;
            state_q <= S_IDLE;
          end
        end
        S_IDLE: begin
          if (pm_req && grant_valid) begin
            sel_q   <= grant_prio;
            state_q <= S_READ;
          end
        end
        S_READ: if (mm_rd_eob) state_q <= S_TAIL;
        S_TAIL: begin
          if (last_word) begin
            r_q[sel_q] <= BLK_AW'(rp_next.next_blk);
            state_q    <= S_IDLE;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  a_eob_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    mm_rd_valid |-> ((oword_q == '1) == (state_q == S_TAIL)));

endmodule
