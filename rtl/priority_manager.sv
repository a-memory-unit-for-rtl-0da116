// priority_manager: the MQM Priority Manager (PM).
//
// PM decides which queue the read side serves next, with a proportional
// round robin: in each round queue p may send up to SLOT_BASE * (p + 1)
// blocks (10, 20 and 30 blocks for p = 0, 1, 2 with the defaults). Queues
// are visited from the highest level down (P-1, ..., 1, 0, then P-1 again).
// PM leaves a queue when its slots are used up or it has nothing stored,
// and skips empty queues, so no slot is wasted while another queue has
// blocks. PM changes queue only between packets: once the first block of a
// packet has been granted, the remaining blocks of that packet follow from
// the same queue, even past the slot budget, so the hasher receives every
// packet as one run of blocks.
//
// Interface: the read side raises req when it can start a block. PM answers
// in the same cycle with grant_valid / grant_prio; start = req & grant_valid
// takes the grant, and PM then pulses dec[grant_prio] to subtract that
// block from its N register. When the block has been read the read side
// reports blk_done with blk_last (it was the packet's last block).
// Reset (synchronous, active low) starts a fresh round at level P-1.
//
// The proportional round robin and its 10*(p+1) quota follow the
// architecture's read function; the visiting order, the skipping of empty
// queues and the packet-boundary rule are this design's choices.
module priority_manager #(
  parameter int unsigned NUM_PRIO  = 3,
  parameter int unsigned PRIO_W    = 2,
  parameter int unsigned SLOT_BASE = 10,  // quota per round = SLOT_BASE*(p+1)
  parameter int unsigned SLOT_W    = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [NUM_PRIO-1:0] nonempty,
  input  logic                req,
  output logic                grant_valid,
  output logic [PRIO_W-1:0]   grant_prio,
  output logic [NUM_PRIO-1:0] dec,
  input  logic                blk_done,
  input  logic                blk_last,
  output logic                round_switch  // a new queue was entered
);

  logic [PRIO_W-1:0] cur_q;
  logic [SLOT_W-1:0] slots_q;
  logic              in_pkt_q;
  logic              stay;
  logic              found;
  logic [PRIO_W-1:0] next_p;
  logic              start;

  // next non-empty queue after cur in descending round-robin order,
  // wrapping around to cur itself last
  always_comb begin
    logic [PRIO_W-1:0] c;
    found  = 1'b0;
    next_p = cur_q;
    for (int unsigned k = 1; k <= NUM_PRIO; k++) begin
      c = PRIO_W'((int'(cur_q) + NUM_PRIO - k) % NUM_PRIO);
      if (!found && nonempty[c]) begin
        found  = 1'b1;
        next_p = c;
      end
    end
  end

  always_comb begin
    stay        = in_pkt_q || (nonempty[cur_q] && slots_q != '0);
    grant_valid = stay ? nonempty[cur_q] : found;
    grant_prio  = stay ? cur_q : next_p;
    start       = req && grant_valid;
    dec         = '0;
    if (start) dec[grant_prio] = 1'b1;
    round_switch = start && !stay;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cur_q    <= '0;
      slots_q  <= '0;
      in_pkt_q <= 1'b0;
    end else begin
      if (start) begin
        in_pkt_q <= 1'b1;
        cur_q    <= grant_prio;
        if (!stay)
          slots_q <= SLOT_W'(SLOT_BASE * (int'(grant_prio) + 1) - 1);
        else if (slots_q != '0)
          slots_q <= slots_q - 1'b1;
      end
      if (blk_done && blk_last) in_pkt_q <= 1'b0;
    end
  end

  a_pkt_continues: assert property (@(posedge clk) disable iff (!rst_n)
    (in_pkt_q && req) |-> nonempty[cur_q]);

endmodule
