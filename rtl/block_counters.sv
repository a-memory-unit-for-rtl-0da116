// block_counters: the N registers of the MQM, one per priority queue.
//
// N_p holds the number of blocks stored in queue p and not yet read. When
// a packet has been completely stored its length in blocks nb is added to
// the register of its priority (add_en, add_prio, add_nb); the priority
// manager subtracts one when it starts reading a block (dec, one bit per
// queue). Both may happen to the same register in one cycle. nonempty has
// one bit per queue. Reset (synchronous, active low) clears all registers.
//
// The +nb / -1 behaviour follows the architecture; adding nb only once the
// whole packet is in memory (so that a queue never advertises a block that
// is still being written) is this design's choice.
module block_counters #(
  parameter int unsigned BLK_AW   = 14,
  parameter int unsigned NUM_PRIO = 3,
  parameter int unsigned PRIO_W   = 2,
  parameter int unsigned NB_W     = 13
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                add_en,
  input  logic [PRIO_W-1:0]   add_prio,
  input  logic [NB_W-1:0]     add_nb,
  input  logic [NUM_PRIO-1:0] dec,
  output logic [BLK_AW:0]     cnt [NUM_PRIO],
  output logic [NUM_PRIO-1:0] nonempty
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int p = 0; p < NUM_PRIO; p++) cnt[p] <= '0;
    end else begin
      for (int p = 0; p < NUM_PRIO; p++) begin
        cnt[p] <= cnt[p]
                  + ((add_en && add_prio == PRIO_W'(p)) ? (BLK_AW + 1)'(add_nb) : '0)
                  - (BLK_AW + 1)'(dec[p]);
      end
    end
  end

  always_comb begin
    for (int p = 0; p < NUM_PRIO; p++) nonempty[p] = (cnt[p] != '0);
  end

  for (genvar p = 0; p < NUM_PRIO; p++) begin : g_chk
    a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
      dec[p] |-> (cnt[p] != '0));
  end

endmodule
