// read_unit_tb: self-checking test of the read side (R registers, R').
//
// A 64-block main memory is first filled through its write port with three
// linked queues of packets (random data; link bits {first, last, next}
// written one per word, first word = bit 15) on scrambled block addresses.
// The read unit is then started with R_p = head of queue p, and the
// testbench, acting as priority manager and hasher, grants random queues
// at packet boundaries. Checks every output word and its level, the
// first/last flags with the last word, that the address of each block read
// is given back to the free pool, that blk_done / blk_last come with the
// last word, that a new block is only started on hash_req, and that a
// block takes 18 clocks from grant to the next grant.
module read_unit_tb;
  import mqm_pkg::*;
  localparam int unsigned AW = 6;

  logic               clk = 1'b0;
  logic               rst_n;
  logic               init_done;
  logic [AW-1:0]      w_init [3];
  logic               pm_req, grant_valid, blk_done, blk_last;
  logic [1:0]         grant_prio;
  logic               mm_rd_en, mm_rd_eob, mm_rd_valid, mm_rd_link;
  logic [AW-1:0]      mm_rd_blk;
  logic [WORD_W-1:0]  mm_rd_data;
  logic               am_push;
  logic [AW-1:0]      am_push_addr;
  logic               hash_req, out_valid, out_eob, out_first_blk, out_last_blk;
  logic [WORD_W-1:0]  out_data;
  logic [INBLK_W-1:0] out_word;
  logic [1:0]         out_prio;
  // write port of the memory, used to preload it
  logic               wr_en, wr_link, wr_eob;
  logic [AW-1:0]      wr_blk;
  logic [WORD_W-1:0]  wr_data;
  logic [INBLK_W-1:0] wr_word, rd_word_unused;

  typedef struct {
    logic [AW-1:0] addr;
    logic [31:0]   data [16];
    bit            first, last;
  } blk_t;
  blk_t            q [3][$];          // blocks of each queue, in order
  int              checks = 0, failures = 0;
  int              last_grant = -1000, gap_checked = 0;

  main_memory #(.BLK_AW(AW)) u_mm (
    .clk, .rst_n, .wr_en, .wr_blk, .wr_data, .wr_link, .wr_word, .wr_eob,
    .rd_en (mm_rd_en), .rd_blk (mm_rd_blk), .rd_word (rd_word_unused), .rd_eob (mm_rd_eob),
    .rd_valid (mm_rd_valid), .rd_data (mm_rd_data), .rd_link (mm_rd_link)
  );

  read_unit #(.BLK_AW(AW)) dut (.*);

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

  initial begin
    logic [AW-1:0] addrs[$];
    logic [15:0]   link;
    int            np, nb, p, k, prev_grant;
    blk_t          b;
    init_done = 0; grant_valid = 0; grant_prio = '0; hash_req = 0;
    wr_en = 0; wr_blk = '0; wr_data = '0; wr_link = 0;
    for (int i = 0; i < 3; i++) w_init[i] = '0;
    rst_n = 0;
    for (int i = 0; i < 2**AW; i++) addrs.push_back(AW'(i));
    addrs.shuffle();
    // build queues: 5 packets of 1..4 blocks per level, plus the empty tail
    for (p = 0; p < 3; p++) begin
      for (np = 0; np < 5; np++) begin
        nb = $urandom_range(1, 4);
        for (k = 0; k < nb; k++) begin
          b.addr = addrs.pop_front();
          b.first = (k == 0); b.last = (k == nb - 1);
          foreach (b.data[w]) b.data[w] = $urandom;
          q[p].push_back(b);
        end
      end
      b.addr = addrs.pop_front();       // reserved block behind the queue
      b.first = 0; b.last = 0;
      q[p].push_back(b);
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // preload
    for (p = 0; p < 3; p++) begin
      for (k = 0; k < q[p].size() - 1; k++) begin
        link = {q[p][k].first, q[p][k].last, 14'(q[p][k+1].addr)};
        for (int w = 0; w < 16; w++) begin
          wr_en = 1; wr_blk = q[p][k].addr; wr_data = q[p][k].data[w]; wr_link = link[15 - w];
          @(posedge clk); #1;
        end
      end
    end
    wr_en = 0;
    // initial phase
    for (p = 0; p < 3; p++) w_init[p] = q[p][0].addr;
    init_done = 1;
    @(posedge clk); #1;
    init_done = 0;
    // read every packet
    prev_grant = -1;
    p = 0;
    while (q[0].size() + q[1].size() + q[2].size() > 3) begin
      bit more;
      // choose a non-empty queue at a packet boundary
      do p = $urandom_range(0, 2); while (q[p].size() == 1);
      more = 1;
      while (more) begin
        hash_req = 0;
        repeat ($urandom_range(0, 2)) begin
          @(posedge clk); #1;
          check("no request without hash_req", !pm_req);
        end
        hash_req = 1; grant_valid = 1; grant_prio = 2'(p);
        #1;
        check("pm_req when idle and asked", pm_req);
        @(posedge clk); #1;
        hash_req = 0; grant_valid = 0;
        b = q[p].pop_front();
        for (int w = 0; w < 16; w++) begin
          while (!out_valid) begin
            @(posedge clk); #1;
          end
          check($sformatf("word %0d of block %0d", w, b.addr), out_data == b.data[w]);
          check("word index", out_word == 4'(w));
          check("level", out_prio == 2'(p));
          check("eob", out_eob == (w == 15));
          if (w == 15) begin
            check("first flag", out_first_blk == b.first);
            check("last flag", out_last_blk == b.last);
            check("blk_done with last word", blk_done && blk_last == b.last);
            check($sformatf("address %0d back to AM", am_push_addr), am_push && am_push_addr == b.addr);
          end else begin
            check("no push mid-block", !am_push && !blk_done);
          end
          @(posedge clk); #1;
        end
        more = !b.last;
      end
    end
    check("test done reading", q[0].size() == 1);
    check("a grant 18 clocks after the previous one", gap_checked > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 18 clocks between grants when hash_req is held
  always @(posedge clk) begin
    if (rst_n && pm_req && grant_valid) begin
      if ($time / 10 - last_grant < 30) begin
        check($sformatf("grant spacing %0d", $time / 10 - last_grant), $time / 10 - last_grant >= 18);
        if ($time / 10 - last_grant == 18) gap_checked++;
      end
      last_grant = int'($time / 10);
    end
  end
endmodule
