// mqm_trace_tb: the artificial-trace workload under the three discarding
// policies.
//
// Equal-size packets (60 words, 4 blocks each) arrive back to back with
// their priorities assigned cyclically (0, 1, 2, 0, ...), faster than the
// hasher takes blocks: the hasher asks for a block only every 40 clocks,
// while the input delivers one every 17. The memory is kept small
// (256 blocks) so that it saturates quickly. For each policy the design is
// reset, 2700 packets are sent, and the blocks delivered per level are
// counted over the last third of the run (steady state). Every delivered
// word is also checked against its packet. Expected, as the throughput
// curves of this architecture show:
//   - unconditional: the memory fills with low-level blocks, so each level
//     gets about the same throughput (within 25 %);
//   - proportional and uniform: throughput grows with the level.
module mqm_trace_tb;
  import mqm_pkg::*;
  localparam int unsigned AW = 8;

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
    logic [1:0]  prio;
    logic [31:0] base;
  } pkt_t;

  localparam int LEN = 60;
  localparam int NB  = (LEN + 3 + 15) / 16;

  pkt_t sent_q[$];
  pkt_t exp_q [3][$];
  pkt_t rd_pkt;
  int   checks = 0, failures = 0;
  int   rd_pos = 0;
  bit   rd_active = 0;
  bit   measuring = 0;
  int   got [3];
  int   dropped [3];
  int   req_timer = 0;

  mqm_top #(.BLK_AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
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

  function automatic logic [31:0] padded_word(pkt_t p, int w);
    if (w < LEN)          return p.base + 32'(w);
    if (w == LEN)         return 32'h8000_0000;
    if (w == 16 * NB - 1) return 32'(LEN * 32);
    return 32'h0;
  endfunction

  // hasher: one block request every 40 clocks
  always @(negedge clk) begin
    req_timer <= (req_timer == 39) ? 0 : req_timer + 1;
    hash_req  <= (req_timer == 0);
  end

  always @(posedge clk) begin
    if (rst_n && (pkt_stored || pkt_dropped)) begin
      pkt_t p;
      p = sent_q.pop_front();
      check("decision level", pkt_prio == p.prio);
      if (pkt_stored) exp_q[p.prio].push_back(p);
      else if (measuring) dropped[p.prio]++;
    end
    if (rst_n && out_valid) begin
      if (!rd_active) begin
        rd_pkt = exp_q[out_prio].pop_front();
        rd_active = 1;
        rd_pos = 0;
      end
      check("word", out_data == padded_word(rd_pkt, rd_pos));
      if (out_eob && measuring) got[out_prio]++;
      rd_pos++;
      if (rd_pos == 16 * NB) rd_active = 0;
    end
  end

  task automatic send(logic [1:0] prio);
    pkt_t p;
    p.prio = prio; p.base = $urandom;
    sent_q.push_back(p);
    for (int w = 0; w < LEN; w++) begin
      msg_valid = 1; msg_data = p.base + 32'(w); msg_len = 16'(LEN); msg_prio = prio;
      do @(posedge clk); while (!msg_ready);
      #1 msg_valid = 0;
    end
  endtask

  initial begin
    msg_valid = 0; msg_data = '0; msg_len = '0; msg_prio = '0;
    for (int m = 0; m < 3; m++) begin
      mode = discard_mode_e'(m);
      rst_n = 0;
      sent_q = {};
      for (int p = 0; p < 3; p++) exp_q[p] = {};
      rd_active = 0;
      got = '{0, 0, 0};
      dropped = '{0, 0, 0};
      measuring = 0;
      repeat (3) @(posedge clk);
      #1 rst_n = 1;
      wait (ready);
      #1;
      for (int n = 0; n < 2700; n++) begin
        if (n == 1800) measuring = 1;
        send(2'(n % 3));
      end
      measuring = 0;
      $display("policy %0d: blocks delivered per level %0d %0d %0d, packets dropped %0d %0d %0d",
               m, got[0], got[1], got[2], dropped[0], dropped[1], dropped[2]);
      check("congested: packets dropped", dropped[0] + dropped[1] + dropped[2] > 0);
      if (mode == DISCARD_UNCONDITIONAL) begin
        for (int p = 0; p < 3; p++)
          for (int q = 0; q < 3; q++)
            check($sformatf("unconditional: level %0d and %0d alike", p, q), 4 * got[p] <= 5 * got[q]);
      end else begin
        check("throughput level 1 > level 0", got[1] > got[0]);
        check("throughput level 2 > level 1", got[2] > got[1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
