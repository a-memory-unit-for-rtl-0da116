// address_memory: the MQM Address Memory (AM), the pool of free blocks.
//
// AM holds the addresses of all main-memory blocks that are not in use. It
// is a LIFO: a single up-down counter ptr serves as the pair of pointers,
// the output pointer O = ptr (the head, the next address handed out) and
// the input pointer I = ptr - 1 (the first free cell below the head). A pop
// reads cell ptr and moves both pointers up; a push writes the released
// address into cell ptr - 1 and moves both down. O is inactive when no free
// address is left (ptr = DEPTH); I is inactive when AM is full (ptr = 0).
// A pop and a push in the same cycle write the released address into the
// cell just emptied and leave ptr where it is.
//
// After reset AM is full and cell i holds address i, so the addresses come
// out as 0, 1, 2, ... The array is not cleared: a register hw marks the
// cells that have ever been written; a cell at or above hw still holds its
// reset value i, which is returned instead of the array contents.
//
// Interface: head / head_valid present the next free address
// combinationally; pop takes it at the clock edge. push with push_addr
// returns an address. free_cnt is the number of free addresses.
//
// The LIFO order, the single up-down counter and the pointer rules follow
// the architecture; the same-cycle pop/push rule and the lazy
// initialisation through hw are this design's own.
module address_memory #(
  parameter int unsigned BLK_AW = 14  // 2^14 block addresses
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic [BLK_AW-1:0] head,
  output logic              head_valid,
  input  logic              pop,
  input  logic              push,
  input  logic [BLK_AW-1:0] push_addr,
  output logic [BLK_AW:0]   free_cnt
);

  localparam int unsigned DEPTH = 2 ** BLK_AW;

  logic [BLK_AW-1:0] mem [DEPTH];
  logic [BLK_AW:0]   ptr_q;   // number of addresses handed out
  logic [BLK_AW:0]   hw_q;    // cells below hw_q have been written
  logic              wr_en;
  logic [BLK_AW:0]   widx;

  assign head_valid = (ptr_q != (BLK_AW + 1)'(DEPTH));
  assign head       = (ptr_q < hw_q) ? mem[ptr_q[BLK_AW-1:0]] : ptr_q[BLK_AW-1:0];
  assign free_cnt   = (BLK_AW + 1)'(DEPTH) - ptr_q;

  always_comb begin
    wr_en = push;
    widx  = (pop && push) ? ptr_q : ptr_q - 1'b1;
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[widx[BLK_AW-1:0]] <= push_addr;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ptr_q <= '0;
      hw_q  <= '0;
    end else begin
      if (pop && !push)      ptr_q <= ptr_q + 1'b1;
      else if (push && !pop) ptr_q <= ptr_q - 1'b1;
      if (wr_en && (widx >= hw_q)) hw_q <= widx + 1'b1;
    end
  end

  a_no_pop_empty: assert property (@(posedge clk) disable iff (!rst_n)
    pop |-> head_valid);
  a_no_push_full: assert property (@(posedge clk) disable iff (!rst_n)
    (push && !pop) |-> (ptr_q != '0));

endmodule
