// ppe_fifo_tb -- self-checking test of the token queue at its full depth of
// 256 entries: fills it to full against a reference queue, checks that a
// push into a full queue and a pop from an empty one change nothing, mixes
// random pushes and pops, and checks the synchronous clear.
module ppe_fifo_tb;
  localparam int DEPTH = 256;
  logic        clk = 0, rst_n = 0, clr = 0, push = 0, pop = 0;
  logic [31:0] wdata = 0, rdata;
  logic        empty, full;
  logic [8:0]  count;
  logic [31:0] ref_q [$];
  int checks = 0, failures = 0;

  ppe_fifo #(.WIDTH(32), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic step(input bit do_push, input bit do_pop, input logic [31:0] d);
    push = do_push; pop = do_pop; wdata = d;
    @(posedge clk); #1;
    push = 0; pop = 0;
  endtask

  // compare the DUT against the reference after every operation
  task automatic compare();
    check(empty == (ref_q.size() == 0), "empty flag");
    check(full == (ref_q.size() == DEPTH), "full flag");
    check(count == 9'(ref_q.size()), "count");
    if (ref_q.size() != 0) check(rdata == ref_q[0], "head data");
  endtask

  task automatic op(input bit do_push, input bit do_pop);
    logic [31:0] d;
    bit was_full;
    d = $urandom;
    // reference: a push is refused when the queue was full at the clock edge
    was_full = (ref_q.size() == DEPTH);
    if (do_pop && ref_q.size() != 0) void'(ref_q.pop_front());
    if (do_push && !was_full) ref_q.push_back(d);
    step(do_push, do_pop, d);
    compare();
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1 compare();
    // pop from empty: no change
    op(0, 1);
    // fill to full
    for (int i = 0; i < DEPTH; i++) op(1, 0);
    check(full, "queue full after 256 pushes");
    // push into full queue is ignored
    begin
      logic [31:0] head;
      head = rdata;
      step(1, 0, 32'hDEAD_BEEF);
      check(count == 9'(DEPTH) && rdata == head, "push into full queue ignored");
    end
    // drain half, then random traffic
    for (int i = 0; i < DEPTH / 2; i++) op(0, 1);
    for (int i = 0; i < 2000; i++) op($urandom_range(0, 1) == 1, $urandom_range(0, 1) == 1);
    // clear
    clr = 1; @(posedge clk); #1 clr = 0;
    ref_q.delete();
    compare();
    check(empty, "empty after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
