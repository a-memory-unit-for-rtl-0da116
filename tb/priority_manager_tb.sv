// priority_manager_tb: self-checking test of the proportional round robin.
//
// The testbench plays the read side: it keeps a list of queued packets (in
// blocks) per level, raises req, takes grants, decrements its own block
// counts, and reports each block done with its last-block flag a few
// clocks later. Checks:
//   1. all three queues backlogged with one-block packets: the grants come
//      in runs of 30, 20, 10 blocks for levels 2, 1, 0, round after round;
//   2. only levels 0 and 2 backlogged: runs of 30 and 10, level 1 skipped;
//   3. four-block packets: a packet is never split, so runs of whole
//      packets that may exceed the quota by less than one packet;
//   4. every grant goes to a non-empty queue and dec matches the grant.
module priority_manager_tb;
  logic       clk = 1'b0;
  logic       rst_n;
  logic [2:0] nonempty, dec;
  logic       req, grant_valid, blk_done, blk_last, round_switch;
  logic [1:0] grant_prio;
  int         checks = 0, failures = 0;
  int         pkts [3][$];     // queued packets, length in blocks
  int         blocks [3];
  int         switches = 0;

  priority_manager dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  always_comb for (int p = 0; p < 3; p++) nonempty[p] = (blocks[p] != 0);

  // read nblk blocks and return the granted level of each
  task automatic run(int nblk, output int seq[$]);
    int p, left;
    seq = {};
    left = 0;
    for (int n = 0; n < nblk; n++) begin
      req = 1;
      #1;
      while (!grant_valid) begin
        @(posedge clk); #1;
      end
      p = grant_prio;
      check("grant to non-empty queue", blocks[p] != 0);
      check("dec follows grant", dec == 3'(1 << p));
      if (round_switch) switches++;
      @(posedge clk);
      #1 req = 0;
      blocks[p]--;
      if (left == 0) left = pkts[p][0];
      left--;
      seq.push_back(p);
      repeat ($urandom_range(0, 3)) @(posedge clk);
      #1 blk_done = 1; blk_last = (left == 0);
      if (left == 0) void'(pkts[p].pop_front());
      @(posedge clk);
      #1 blk_done = 0;
    end
  endtask

  task automatic fill(int p, int npk, int len);
    repeat (npk) begin
      pkts[p].push_back(len);
      blocks[p] += len;
    end
  endtask

  // runs of equal levels
  function automatic void runs(int seq[$], output int lv[$], output int ln[$]);
    lv = {}; ln = {};
    foreach (seq[i]) begin
      if (lv.size() != 0 && lv[$] == seq[i]) ln[$]++;
      else begin
        lv.push_back(seq[i]);
        ln.push_back(1);
      end
    end
  endfunction

  initial begin
    int seq[$], lv[$], ln[$];
    req = 0; blk_done = 0; blk_last = 0;
    blocks = '{0, 0, 0};
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // 1. all backlogged, one-block packets
    for (int p = 0; p < 3; p++) fill(p, 200, 1);
    run(120, seq);
    runs(seq, lv, ln);
    check($sformatf("case 1: %0d runs", lv.size()), lv.size() == 6);
    for (int i = 0; i < lv.size() && i < 6; i++) begin
      check($sformatf("case 1 run %0d level %0d", i, lv[i]), lv[i] == 2 - (i % 3));
      check($sformatf("case 1 run %0d length %0d", i, ln[i]), ln[i] == 10 * (lv[i] + 1));
    end
    // drain, then 2. level 1 empty
    for (int p = 0; p < 3; p++) begin
      pkts[p] = {};
      blocks[p] = 0;
    end
    @(posedge clk);
    fill(0, 100, 1); fill(2, 100, 1);
    run(120, seq);
    runs(seq, lv, ln);
    check("case 2: no level 1", !(1 inside {seq}));
    for (int i = 1; i < lv.size() - 1; i++)
      check($sformatf("case 2 run %0d len %0d", i, ln[i]), ln[i] == 10 * (lv[i] + 1));
    for (int p = 0; p < 3; p++) begin
      pkts[p] = {};
      blocks[p] = 0;
    end
    @(posedge clk);
    // 3. four-block packets: runs are whole packets, quota + less than 4
    for (int p = 0; p < 3; p++) fill(p, 60, 4);
    run(400, seq);
    runs(seq, lv, ln);
    for (int i = 1; i < lv.size() - 1; i++) begin
      check($sformatf("case 3 run %0d whole packets (%0d)", i, ln[i]), ln[i] % 4 == 0);
      check($sformatf("case 3 run %0d near quota (%0d)", i, ln[i]),
            ln[i] >= 10 * (lv[i] + 1) && ln[i] < 10 * (lv[i] + 1) + 4);
    end
    check("queue switches seen", switches > 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
