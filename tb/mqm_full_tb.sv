// mqm_full_tb: the Message Queues Memory at its full default size.
//
// mqm_top with every parameter at its default: 2^14 blocks of 16 words
// (1 MiB of data), three levels, quota 10*(p+1). With the hasher idle, long
// messages (1000..4000 words) of random levels are sent until the memory
// is full and packets are dropped by the unconditional policy; then the
// hasher asks for blocks continuously and everything stored is read back
// and compared word by word with its padded stream. At the end every queue
// is empty and all blocks but the three reserved queue heads are free.
module mqm_full_tb;
  import mqm_pkg::*;
  localparam int unsigned NBLK = 1 << 14;

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
  logic [14:0]        n_cnt [3];
  logic [14:0]        free_cnt;

  typedef struct {
    logic [1:0]  prio;
    int          len;
    logic [31:0] base;
  } pkt_t;

  pkt_t exp_q [3][$];
  pkt_t sent_q[$];
  pkt_t rd_pkt;
  int   checks = 0, failures = 0;
  int   stored = 0, dropped = 0, delivered = 0, stored_blocks = 0, min_free = NBLK;
  int   rd_pos = 0;
  bit   rd_active = 0;

  mqm_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
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
    if (w < p.len)        return p.base + 32'(w);
    if (w == p.len)       return 32'h8000_0000;
    if (w == 16 * nb - 1) return 32'(p.len * 32);
    return 32'h0;
  endfunction

  always @(posedge clk) begin
    if (rst_n && (pkt_stored || pkt_dropped)) begin
      pkt_t p;
      p = sent_q.pop_front();
      if (pkt_stored) begin
        exp_q[p.prio].push_back(p);
        stored++;
        stored_blocks += nblocks(p.len);
      end else begin
        dropped++;
        check("dropped only when it does not fit", int'(free_cnt) < nblocks(p.len));
      end
    end
    if (rst_n && ready && int'(free_cnt) < min_free) min_free = int'(free_cnt);
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (!rd_active) begin
        rd_pkt = exp_q[out_prio].pop_front();
        rd_active = 1;
        rd_pos = 0;
      end
      check("word", out_data == padded_word(rd_pkt, rd_pos));
      if (out_eob) check("last flag", out_last_blk == (rd_pos / 16 == nblocks(rd_pkt.len) - 1));
      rd_pos++;
      if (rd_pos == 16 * nblocks(rd_pkt.len)) begin
        rd_active = 0;
        delivered++;
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
    hash_req = 0;
    rst_n = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (ready);
    #1 check("all but three blocks free", free_cnt == 15'(NBLK - 3));
    while (dropped < 3) send($urandom_range(1000, 4000), 2'($urandom_range(0, 2)));
    wait (sent_q.size() == 0);
    $display("filled: %0d packets (%0d blocks) stored, %0d dropped, %0d blocks free",
             stored, stored_blocks, dropped, free_cnt);
    check("memory nearly full", min_free < 260);
    hash_req = 1;
    wait (exp_q[0].size() + exp_q[1].size() + exp_q[2].size() == 0 && !rd_active);
    repeat (40) @(posedge clk);
    #1;
    check("all queues empty", n_cnt[0] == 0 && n_cnt[1] == 0 && n_cnt[2] == 0);
    check("all blocks free again", free_cnt == 15'(NBLK - 3));
    check("all stored packets delivered", delivered == stored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
