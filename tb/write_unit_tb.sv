// write_unit_tb: self-checking test of the write side (W registers, W').
//
// The testbench models the free-address pool (a queue handing out 64
// addresses in a scrambled order), the block stream from the padder and
// the N registers. It checks:
//   - the initial phase takes the first three free addresses into W0..W2
//     and reports them on w_init with init_done;
//   - each block of priority p is written to the address W_p held, its
//     16 link bits (one per word, first word = bit 15) equal
//     {first, last, address popped for the next block}, and the next block
//     of queue p goes to that address;
//   - N_p receives nb once the packet's last block is written;
//   - a packet refused by the proportional policy (N_p set above its
//     limit) is swallowed without a write or a pop;
//   - a block takes 17 clocks when the stream never stalls.
module write_unit_tb;
  import mqm_pkg::*;
  localparam int unsigned AW = 6;

  logic               clk = 1'b0;
  logic               rst_n;
  discard_mode_e      mode;
  logic               blk_valid, blk_ready, blk_first, blk_last;
  logic [WORD_W-1:0]  blk_data;
  logic [INBLK_W-1:0] blk_word;
  logic [1:0]         blk_prio;
  logic [12:0]        blk_nb;
  logic [AW-1:0]      am_head;
  logic               am_head_valid, am_pop;
  logic [AW:0]        am_free;
  logic               mm_wr_en, mm_wr_link, mm_wr_eob;
  logic [AW-1:0]      mm_wr_blk;
  logic [WORD_W-1:0]  mm_wr_data;
  logic [AW:0]        cnt [3];
  logic               add_en;
  logic [1:0]         add_prio;
  logic [12:0]        add_nb;
  logic               init_done;
  logic [AW-1:0]      w_init [3];
  logic               pkt_stored, pkt_dropped;
  logic [1:0]         pkt_prio;

  int                 checks = 0, failures = 0;
  logic [AW-1:0]      free_q[$];
  logic [AW-1:0]      popped[$];       // addresses handed out, in order
  logic [AW-1:0]      tail [3];        // expected W_p
  int                 mm_word = 0;
  logic [15:0]        link_acc;
  logic [WORD_W-1:0]  exp_data[$];
  int                 adds = 0, drops = 0;
  bit                 expect_add;
  int                 exp_add_nb;
  logic [1:0]         exp_add_prio;

  // small main memory word counter, as in main_memory
  logic [3:0]         wcnt;
  assign mm_wr_eob = mm_wr_en && wcnt == 4'hf;
  always_ff @(posedge clk) if (!rst_n) wcnt <= '0; else if (mm_wr_en) wcnt <= wcnt + 1'b1;

  assign am_head       = free_q.size() ? free_q[0] : '0;
  assign am_head_valid = free_q.size() != 0;
  assign am_free       = (AW + 1)'(free_q.size());
  always @(posedge clk) if (rst_n && am_pop) popped.push_back(free_q.pop_front());

  write_unit #(.BLK_AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // watch the MM write port
  always @(posedge clk) begin
    if (rst_n && mm_wr_en) begin
      check("write data", exp_data.size() != 0 && mm_wr_data == exp_data[0]);
      if (exp_data.size() != 0) void'(exp_data.pop_front());
      link_acc = {link_acc[14:0], mm_wr_link};
      mm_word++;
    end
    if (rst_n && add_en) begin
      adds++;
      check("N update expected", expect_add);
      check("N update prio", add_prio == exp_add_prio);
      check("N update nb", int'(add_nb) == exp_add_nb);
      expect_add = 0;
    end
    if (rst_n && pkt_dropped) drops++;
  end

  // send one packet of nb blocks at priority p
  task automatic send_packet(logic [1:0] p, int nb, bit expect_keep, bit timed);
    logic [AW-1:0] blk_addr, nxt;
    longint t0;
    for (int b = 0; b < nb; b++) begin
      blk_addr = tail[p];
      t0 = $time;
      for (int w = 0; w < 16; w++) begin
        blk_valid = 1; blk_data = $urandom; blk_word = 4'(w);
        blk_first = (b == 0); blk_last = (b == nb - 1); blk_prio = p; blk_nb = 13'(nb);
        if (expect_keep) exp_data.push_back(blk_data);
        #1;
        while (!blk_ready) begin
          @(posedge clk); #1;
        end
        if (expect_keep) check($sformatf("block address %0d exp %0d", mm_wr_blk, blk_addr),
                               mm_wr_en && mm_wr_blk == blk_addr);
        else check("dropped: no write", !mm_wr_en);
        if (expect_keep && b == nb - 1 && w == 15) begin
          expect_add = 1; exp_add_nb = nb; exp_add_prio = p;
        end
        @(posedge clk); #1;
        blk_valid = 0;
        if (!timed && $urandom_range(0, 3) == 0) repeat ($urandom_range(1, 3)) @(posedge clk);
        #0;
      end
      if (expect_keep) begin
        nxt = popped[$];
        check($sformatf("link bits %h", link_acc), link_acc == {b == 0, b == nb - 1, 14'(nxt)});
        tail[p] = nxt;
        if (timed) check($sformatf("17 clocks per block, got %0d", ($time - t0) / 10),
                         ($time - t0) / 10 == 17);
      end
    end
    @(posedge clk); #1;
  endtask

  initial begin
    int nb_sent, kept;
    mode = DISCARD_UNCONDITIONAL;
    blk_valid = 0; blk_data = '0; blk_word = '0; blk_first = 0; blk_last = 0;
    blk_prio = '0; blk_nb = '0; expect_add = 0;
    for (int i = 0; i < 3; i++) cnt[i] = '0;
    for (int i = 0; i < 2**AW; i++) free_q.push_back(AW'(i * 37 + 5));
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    wait (init_done);
    #1;
    for (int p = 0; p < 3; p++) begin
      check("init: w_init from AM", w_init[p] == AW'(p * 37 + 5));
      tail[p] = w_init[p];
    end
    @(posedge clk); #1;
    check("init: three pops", popped.size() == 3);
    // stored packets of every level; keep the pool from running dry by
    // giving back nothing: 61 free addresses allow 61 blocks
    kept = 0;
    while (kept < 50) begin
      logic [1:0] p;
      p = 2'($urandom_range(0, 2));
      nb_sent = $urandom_range(1, 3);
      send_packet(p, nb_sent, 1, 0);
      kept += nb_sent;
    end
    // timed packet
    send_packet(2'd1, 2, 1, 1);
    // proportional policy: level 0 over its limit (64/6 = 10.7 blocks)
    mode = DISCARD_PROPORTIONAL;
    cnt[0] = 7'd11;
    send_packet(2'd0, 2, 0, 0);
    check("one drop", drops == 1);
    cnt[0] = 7'd10;
    send_packet(2'd0, 1, 1, 0);
    // too big for what is left in the pool
    mode = DISCARD_UNCONDITIONAL;
    send_packet(2'd2, free_q.size() + 1, 0, 0);
    check("two drops", drops == 2);
    check("all writes seen", exp_data.size() == 0);
    check("N updates seen", adds > 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
