// padder_tb: self-checking test of the message padder.
//
// Sends 300 messages of random length (1..70 words) and priority, with
// random gaps on both handshakes, and checks every output word against the
// expected stream: the message words, 32'h8000_0000, zero words, and the
// 64-bit length in bits in the last two words of the last block. Also
// checks the in-block index, the first/last block flags, P_in and
// nb = ceil((len + 3) / 16). One message is sent with no stalls to check
// that it leaves in exactly 16 * nb clocks.
module padder_tb;
  import mqm_pkg::*;

  logic               clk = 1'b0;
  logic               rst_n;
  logic               msg_valid, msg_ready;
  logic [WORD_W-1:0]  msg_data;
  logic [15:0]        msg_len;
  logic [1:0]         msg_prio;
  logic               blk_valid, blk_ready;
  logic [WORD_W-1:0]  blk_data;
  logic [INBLK_W-1:0] blk_word;
  logic               blk_first, blk_last;
  logic [1:0]         blk_prio;
  logic [12:0]        blk_nb;
  int                 checks = 0, failures = 0;
  bit                 stall_in = 1, stall_out = 1;

  // expected output, one entry per word
  typedef struct {
    logic [31:0] data;
    int          word, nb;
    bit          first, last;
    logic [1:0]  prio;
  } exp_t;
  exp_t exp_q[$];

  padder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  // build the expected stream for a message
  function automatic void expect_msg(int len, logic [1:0] prio, logic [31:0] base);
    int nb = (len + 3 + 15) / 16;
    for (int w = 0; w < 16 * nb; w++) begin
      exp_t e;
      if (w < len)              e.data = base + 32'(w);
      else if (w == len)        e.data = 32'h8000_0000;
      else if (w == 16*nb - 1)  e.data = 32'(len * 32);
      else                      e.data = 32'h0;
      e.word  = w % 16;
      e.nb    = nb;
      e.first = (w / 16 == 0);
      e.last  = (w / 16 == nb - 1);
      e.prio  = prio;
      exp_q.push_back(e);
    end
  endfunction

  task automatic send(int len, logic [1:0] prio, logic [31:0] base);
    expect_msg(len, prio, base);
    for (int w = 0; w < len; w++) begin
      while (stall_in && $urandom_range(0, 3) == 0) begin
        msg_valid = 0;
        @(posedge clk); #1;
      end
      msg_valid = 1; msg_data = base + 32'(w);
      msg_len = 16'(len); msg_prio = prio;
      do @(posedge clk); while (!msg_ready);
      #1;
      msg_valid = 0;
    end
  endtask

  // output side: random ready, compare every transferred word
  always @(posedge clk) begin
    if (rst_n && blk_valid && blk_ready) begin
      if (exp_q.size() == 0) check("unexpected word", 0);
      else begin
        exp_t e;
        e = exp_q.pop_front();
        check($sformatf("data %h exp %h", blk_data, e.data), blk_data == e.data);
        check("word index", int'(blk_word) == e.word);
        check("first flag", blk_first == e.first);
        check("last flag", blk_last == e.last);
        check("prio", blk_prio == e.prio);
        check("nb", int'(blk_nb) == e.nb);
      end
    end
  end
  always @(negedge clk) blk_ready <= !stall_out || ($urandom_range(0, 3) != 0);

  initial begin
    msg_valid = 0; msg_data = '0; msg_len = '0; msg_prio = '0; blk_ready = 0;
    rst_n = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int m = 0; m < 300; m++)
      send($urandom_range(1, 70), 2'($urandom_range(0, 2)), $urandom);
    wait (exp_q.size() == 0);
    // rate: 20 words -> nb = 2 -> 32 clocks with no stalls
    stall_in = 0; stall_out = 0;
    @(posedge clk); #1;
    begin
      longint t0;
      t0 = $time;
      send(20, 2'd1, 32'h1000);
      wait (exp_q.size() == 0);
      @(posedge clk);
      check($sformatf("32 clocks for 2 blocks, got %0d", ($time - t0) / 10),
            ($time - t0) / 10 == 32);
    end
    check("all words seen", exp_q.size() == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
