// address_memory_tb: self-checking test of the free-address LIFO.
//
// Uses a 16-address AM (BLK_AW = 4). First replays the pointer example of
// the free-address table: from a full AM, 0000 and 0001 are handed out,
// then 0000 and 0001 are returned; then the AM is emptied completely (the
// output pointer goes inactive) and refilled. Then it runs 3000 cycles of
// random pops, pushes and simultaneous pop+push against a queue model in
// which the front is the next address handed out.
module address_memory_tb;
  localparam int unsigned AW    = 4;
  localparam int unsigned DEPTH = 1 << AW;

  logic          clk = 1'b0;
  logic          rst_n;
  logic [AW-1:0] head, push_addr;
  logic          head_valid, pop, push;
  logic [AW:0]   free_cnt;
  int            checks = 0, failures = 0;
  logic [AW-1:0] model[$];
  logic [AW-1:0] out_list[$];   // addresses currently handed out

  address_memory #(.BLK_AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic compare();
    check("free_cnt", free_cnt == ($bits(free_cnt))'(model.size()));
    check("head_valid", head_valid == (model.size() != 0));
    if (model.size() != 0) check($sformatf("head %0d exp %0d", head, model[0]), head == model[0]);
  endtask

  // one clock with the given request; the model follows
  task automatic step(logic do_pop, logic do_push, logic [AW-1:0] a);
    pop = do_pop; push = do_push; push_addr = a;
    #1 compare();
    @(posedge clk);
    if (do_pop && do_push) begin
      out_list.push_back(model[0]);
      model[0] = a;
    end else if (do_pop) begin
      out_list.push_back(model.pop_front());
    end else if (do_push) begin
      model.push_front(a);
    end
    #1;
    pop = 0; push = 0;
  endtask

  task automatic release_addr(logic [AW-1:0] a);
    foreach (out_list[i]) if (out_list[i] == a) begin
      out_list.delete(i);
      break;
    end
    step(1'b0, 1'b1, a);
  endtask

  initial begin
    pop = 0; push = 0; push_addr = '0;
    rst_n = 0;
    for (int i = 0; i < DEPTH; i++) model.push_back(AW'(i));
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    compare();
    // table example: columns b, c (output 0000, 0001), d, e (return them)
    check("first out is 0000", head == 4'b0000);
    step(1, 0, '0);
    check("second out is 0001", head == 4'b0001);
    step(1, 0, '0);
    release_addr(4'b0000);
    check("LIFO returns 0000 next", head == 4'b0000);
    release_addr(4'b0001);
    check("full again", free_cnt == 5'(DEPTH));
    // empty the AM: output pointer inactive
    for (int i = 0; i < DEPTH; i++) step(1, 0, '0);
    check("empty: O inactive", !head_valid && free_cnt == 0);
    // refill in a scrambled order
    out_list.shuffle();
    while (out_list.size() != 0) release_addr(out_list[0]);
    check("refilled", free_cnt == 5'(DEPTH));
    // random traffic
    for (int n = 0; n < 3000; n++) begin
      int r, k;
      logic [AW-1:0] a;
      r = $urandom_range(0, 2);
      if (r == 0 && model.size() != 0) step(1, 0, '0);
      else if (r == 1 && out_list.size() != 0) begin
        k = $urandom_range(0, out_list.size() - 1);
        release_addr(out_list[k]);
      end else if (model.size() != 0 && out_list.size() != 0) begin
        k = $urandom_range(0, out_list.size() - 1);
        a = out_list[k];
        out_list.delete(k);
        step(1, 1, a);
      end else begin
        @(posedge clk); #1;
      end
    end
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
