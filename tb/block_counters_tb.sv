// block_counters_tb: self-checking test of the per-queue block counters.
//
// Three queues. Adds random packet lengths nb to random queues and
// subtracts single blocks from non-empty queues, including both on the
// same queue in one clock, for 3000 clocks, checking every counter and its
// non-empty flag against a model.
module block_counters_tb;
  localparam int unsigned AW = 14;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        add_en;
  logic [1:0]  add_prio;
  logic [12:0] add_nb;
  logic [2:0]  dec, nonempty;
  logic [AW:0] cnt [3];
  int          model [3];
  int          checks = 0, failures = 0;

  block_counters dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
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
    add_en = 0; add_prio = '0; add_nb = '0; dec = '0;
    model = '{0, 0, 0};
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      add_en   = ($urandom_range(0, 3) == 0);
      add_prio = 2'($urandom_range(0, 2));
      add_nb   = 13'($urandom_range(1, 8));
      for (int p = 0; p < 3; p++) dec[p] = (model[p] > 0) && $urandom_range(0, 1);
      @(posedge clk);
      if (add_en) model[add_prio] += int'(add_nb);
      for (int p = 0; p < 3; p++) model[p] -= int'(dec[p]);
      #1;
      for (int p = 0; p < 3; p++) begin
        check($sformatf("N%0d = %0d exp %0d", p, cnt[p], model[p]), int'(cnt[p]) == model[p]);
        check("nonempty", nonempty[p] == (model[p] != 0));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
