// main_memory_tb: self-checking test of the block-organised main memory.
//
// A 16-block memory (BLK_AW = 4). Writes every block in a shuffled order,
// 16 consecutive words each, with random data and link bits, checking that
// the internal word counter steps 0..15 and flags end-of-block on word 15.
// Then reads random blocks (while rewriting others through the write port
// in the same cycles) and checks each word, its 33rd bit, the one-clock
// read latency and the read end-of-block flag against a model array.
module main_memory_tb;
  import mqm_pkg::*;
  localparam int unsigned AW = 4;

  logic               clk = 1'b0;
  logic               rst_n;
  logic               wr_en, wr_link, rd_en;
  logic [AW-1:0]      wr_blk, rd_blk;
  logic [WORD_W-1:0]  wr_data, rd_data;
  logic [INBLK_W-1:0] wr_word, rd_word;
  logic               wr_eob, rd_eob, rd_valid, rd_link;
  logic [WORD_W:0]    model [2**AW][16];
  int                 checks = 0, failures = 0;

  main_memory #(.BLK_AW(AW)) dut (.*);

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

  // write one block (16 clocks)
  task automatic write_block(logic [AW-1:0] b);
    for (int w = 0; w < 16; w++) begin
      wr_en = 1; wr_blk = b; wr_data = $urandom; wr_link = 1'($urandom);
      #1;
      check("write word counter", wr_word == 4'(w));
      check("write eob", wr_eob == (w == 15));
      model[b][w] = {wr_link, wr_data};
      @(posedge clk); #1;
    end
    wr_en = 0;
  endtask

  initial begin
    logic [AW-1:0] order[$];
    logic [AW-1:0] rb, wb;
    wr_en = 0; rd_en = 0; wr_blk = '0; rd_blk = '0; wr_data = '0; wr_link = 0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int b = 0; b < 2**AW; b++) order.push_back(AW'(b));
    order.shuffle();
    foreach (order[i]) write_block(order[i]);
    // read random blocks while rewriting a different block
    for (int n = 0; n < 40; n++) begin
      rb = AW'($urandom);
      wb = rb + AW'($urandom_range(1, 2**AW - 1));
      for (int w = 0; w <= 16; w++) begin
        rd_en = (w < 16); rd_blk = rb;
        wr_en = (w < 16); wr_blk = wb; wr_data = $urandom; wr_link = 1'($urandom);
        #1;
        if (w < 16) begin
          check("read word counter", rd_word == 4'(w));
          check("read eob", rd_eob == (w == 15));
        end
        @(posedge clk);
        if (w < 16) model[wb][w] = {wr_link, wr_data};
        #1;
        if (w < 16) begin
          check("rd_valid after read", rd_valid);
          check($sformatf("data blk %0d word %0d", rb, w), {rd_link, rd_data} == model[rb][w]);
        end else begin
          check("rd_valid low", rd_valid == (w < 16));
        end
      end
      rd_en = 0; wr_en = 0;
      @(posedge clk); #1;
      check("idle: no rd_valid", !rd_valid);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
