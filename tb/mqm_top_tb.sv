// mqm_top_tb: end-to-end test of the Message Queues Memory.
//
// Runs the whole design with a 128-block main memory (BLK_AW = 7) and the
// default round-robin quota. Random messages (1..60 words, levels 0..2)
// are sent while the hasher side asks for blocks only part of the time, so
// the memory fills up and packets are dropped. The test goes through the
// three discarding policies in turn, then lets the memory drain. A
// scoreboard follows every packet: each one the design reports as stored
// must come out of its level's queue, in order, as its padded block
// stream (message, 32'h8000_0000, zeros, bit length) with correct
// first/last flags; at the end all queues are empty and every block except
// the three reserved queue heads is free again. Counted mechanisms, each
// of which must occur: drops under each policy, drops of packets that fit
// (policy limit), multi-block packets, a change of the level being read,
// a nearly empty free pool, block addresses being used more than once
// (more blocks stored in total than the memory has), a pop and a push of
// the free-address stack in the same clock, a block being written while
// another is read, and the read side leaving a non-empty queue because its
// round-robin quota is used up.
module mqm_top_tb;
  import mqm_pkg::*;
  localparam int unsigned AW = 7;
  localparam int unsigned NBLK = 1 << AW;

  logic               clk = 1'b0;
  logic               rst_n;
  discard_mode_e      mode;
  logic               msg_valid, msg_ready;
  logic [WORD_W-1:0]  msg_data;
  logic [15:0]        msg_len;
  logic [1:0]         msg_prio;
  logic               hash_req, out_valid, out_eob, out_first_blk, out_last_blk;
  logic [WORD_W-1:0]  out_data;
  logic [INBLK_W-1:0] out_word;
  logic [1:0]         out_prio;
  logic               ready, pkt_stored, pkt_dropped;
  logic [1:0]         pkt_prio;
  logic [AW:0]        n_cnt [3];
  logic [AW:0]        free_cnt;

  typedef struct {
    logic [1:0] prio;
    int         len;
    logic [31:0] base;
  } pkt_t;

  pkt_t        sent_q[$];        // sent, decision not yet seen
  pkt_t        exp_q [3][$];     // stored, waiting to be read
  int          checks = 0, failures = 0;
  int          drops [3];        // per policy
  int          stored = 0, stored_blocks = 0, delivered = 0;
  int          multi_blk = 0, level_changes = 0, low_pool = 0, fit_drops = 0;
  int          pop_push = 0, rw_overlap = 0, quota_switch = 0;
  int          rd_pos = 0;       // word position inside the packet being read
  int          last_out_prio = -1;
  bit          rd_active = 0;
  pkt_t        rd_pkt;
  int          hreq_pct = 30;

  mqm_top #(.BLK_AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
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

  function automatic int nblocks(int len);
    return (len + 3 + 15) / 16;
  endfunction

  function automatic logic [31:0] padded_word(pkt_t p, int w);
    int nb = nblocks(p.len);
    if (w < p.len)           return p.base + 32'(w);
    if (w == p.len)          return 32'h8000_0000;
    if (w == 16 * nb - 1)    return 32'(p.len * 32);
    return 32'h0;
  endfunction

  // decisions of the write side, in packet order
  always @(posedge clk) begin
    if (rst_n && (pkt_stored || pkt_dropped)) begin
      pkt_t p;
      if (sent_q.size() == 0) check("decision without packet", 0);
      else begin
        p = sent_q.pop_front();
        check("decision level", pkt_prio == p.prio);
        if (pkt_stored) begin
          exp_q[p.prio].push_back(p);
          stored++;
          stored_blocks += nblocks(p.len);
          if (nblocks(p.len) > 1) multi_blk++;
        end else begin
          drops[mode]++;
          if (int'(free_cnt) >= nblocks(p.len)) fit_drops++;
        end
      end
    end
    if (rst_n && ready && free_cnt < 8) low_pool++;
    // mechanisms inside the design, observed through the hierarchy
    if (rst_n && dut.u_am.pop && dut.u_am.push) pop_push++;
    if (rst_n && dut.mm_wr_en && dut.mm_rd_en) rw_overlap++;
    if (rst_n && dut.u_pm.round_switch && dut.u_pm.nonempty[dut.u_pm.cur_q]
        && dut.u_pm.grant_prio != dut.u_pm.cur_q) quota_switch++;
  end

  // hasher side: random block requests, check every word
  always @(negedge clk) hash_req <= ($urandom_range(0, 99) < hreq_pct);

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (!rd_active) begin
        if (exp_q[out_prio].size() == 0) check("output from an empty queue", 0);
        else begin
          rd_pkt = exp_q[out_prio].pop_front();
          rd_active = 1;
          rd_pos = 0;
          if (last_out_prio != -1 && last_out_prio != int'(out_prio)) level_changes++;
          last_out_prio = out_prio;
        end
      end
      if (rd_active) begin
        check("level of word", out_prio == rd_pkt.prio);
        check($sformatf("word %0d of packet: %h exp %h", rd_pos, out_data, padded_word(rd_pkt, rd_pos)),
              out_data == padded_word(rd_pkt, rd_pos));
        check("word index", int'(out_word) == rd_pos % 16);
        if (out_eob) begin
          check("first flag", out_first_blk == (rd_pos / 16 == 0));
          check("last flag", out_last_blk == (rd_pos / 16 == nblocks(rd_pkt.len) - 1));
        end
        rd_pos++;
        if (rd_pos == 16 * nblocks(rd_pkt.len)) begin
          rd_active = 0;
          delivered++;
        end
      end
    end
  end

  task automatic send(int len, logic [1:0] prio);
    pkt_t p;
    p.prio = prio; p.len = len; p.base = $urandom;
    sent_q.push_back(p);
    for (int w = 0; w < len; w++) begin
      msg_valid = 1; msg_data = p.base + 32'(w); msg_len = 16'(len); msg_prio = prio;
      do @(posedge clk); while (!msg_ready);
      #1 msg_valid = 0;
    end
  endtask

  initial begin
    msg_valid = 0; msg_data = '0; msg_len = '0; msg_prio = '0;
    mode = DISCARD_UNCONDITIONAL;
    drops = '{0, 0, 0};
    rst_n = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (ready);
    for (int ph = 0; ph < 3; ph++) begin
      // change policy only between packets
      wait (sent_q.size() == 0);
      @(posedge clk); #1;
      mode = discard_mode_e'(ph);
      hreq_pct = (ph == 0) ? 3 : 25;
      for (int n = 0; n < 150; n++) send($urandom_range(1, 60), 2'($urandom_range(0, 2)));
    end
    // drain
    hreq_pct = 100;
    wait (sent_q.size() == 0);
    wait (exp_q[0].size() + exp_q[1].size() + exp_q[2].size() == 0 && !rd_active);
    repeat (40) @(posedge clk);
    #1;
    check("all queues empty", n_cnt[0] == 0 && n_cnt[1] == 0 && n_cnt[2] == 0);
    check($sformatf("free pool back to %0d (got %0d)", NBLK - 3, free_cnt), free_cnt == (AW + 1)'(NBLK - 3));
    check("every stored packet delivered", delivered == stored);
    $display("stored %0d (%0d blocks) delivered %0d drops uncond %0d prop %0d unif %0d (policy %0d)",
             stored, stored_blocks, delivered, drops[0], drops[1], drops[2], fit_drops);
    $display("multi-block %0d level changes %0d low-pool cycles %0d", multi_blk, level_changes, low_pool);
    check("drops, unconditional policy", drops[0] > 0);
    check("drops, proportional policy", drops[1] > 0);
    check("drops, uniform policy", drops[2] > 0);
    check("drops by a policy limit", fit_drops > 0);
    check("multi-block packets", multi_blk > 0);
    check("level changes on the read side", level_changes > 0);
    check("free pool nearly empty", low_pool > 0);
    check("blocks reused", stored_blocks > int'(NBLK));
    check("free-address pop and push in one clock", pop_push > 0);
    check("block write and block read in one clock", rw_overlap > 0);
    check("queue left because its quota was used up", quota_switch > 0);
    $display("pop+push %0d, write/read overlap %0d, quota switches %0d", pop_push, rw_overlap, quota_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
