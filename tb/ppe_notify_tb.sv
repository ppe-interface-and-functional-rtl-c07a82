// ppe_notify_tb -- self-checking test of the notification engine.
// First replays the posting example of the list-head table: entry 3 points
// at the empty object D (0x00F00128) with token word 0xdeadbeef, and the
// notification block queue holds A (0x00F00000), B (0x00F00032) and C
// (0x00F00064). Posting type-specific words 0x00090045, 0x00000169,
// 0x00001024 on list 3 must fill D, link D.next to A, move entry 3 to A,
// take A off the block queue and, because enqueue (bit 0 of 0xdeadbeef) is
// set, push the token 0x6f56df77 on the NQR. The next field must be the
// last write to the object. Then two sources post at once (round robin,
// one with metadata, one on a list whose enqueue bit is clear), and a post
// waits while the block queue is empty and while the NQR is full.
module ppe_notify_tb;
  import ppe_pkg::*;
  logic             clk = 0, rst_n = 0;
  logic [31:0]      nlhr = 32'h0000_8000;
  logic [1:0]       note_valid = '0;
  note_req_t [1:0]  note_req = '0;
  logic [1:0]       note_ready;
  mem_req_t         nr_req, nw_req;
  mem_rsp_t         nr_rsp, nw_rsp;
  logic             nbqr_pop, nqr_push, busy;
  logic [31:0]      nbqr_data, nqr_data;
  logic             nbqr_empty, nqr_full;
  logic [31:0]      nbq [$];
  logic [31:0]      nq [$];
  int               nq_limit = 256;
  int checks = 0, failures = 0;

  ppe_notify dut (.*);
  tb_host_mem #(.LAT(1)) u_ram  (.clk, .req(nr_req), .rsp(nr_rsp));
  tb_host_mem #(.LAT(3)) u_host (.clk, .req(nw_req), .rsp(nw_rsp));

  // behavioural NBQR / NQR
  // (status is refreshed on every falling edge, so it is stable at the
  // rising edge where the engine samples it)
  always @(negedge clk) begin
    nbqr_empty <= (nbq.size() == 0);
    nbqr_data  <= (nbq.size() == 0) ? 32'h0 : nbq[0];
    nqr_full   <= (nq.size() >= nq_limit);
  end
  always @(posedge clk) begin
    if (nbqr_pop && nbq.size() != 0) void'(nbq.pop_front());
    if (nqr_push) nq.push_back(nqr_data);
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic post(input int src, input note_req_t r);
    note_req[src]   = r;
    note_valid[src] = 1'b1;
    do @(posedge clk); while (!note_ready[src]);
    #1 note_valid[src] = 1'b0;
  endtask

  function automatic note_req_t mk(input logic [15:0] idx, input logic [31:0] w0,
                                   input logic [31:0] w1, input logic [31:0] w2,
                                   input bit m);
    note_req_t r;
    r = '0;
    r.note_index = idx; r.w0 = w0; r.w1 = w1; r.w2 = w2; r.has_meta = m;
    for (int i = 0; i < 4; i++) r.meta[i] = 32'hA0 + i;
    return r;
  endfunction

  initial begin
    // list-head table: entries 0..3 as in the example, entry 5 without enqueue
    u_ram.poke(32'h8000 + 0*8, 32'h00F0_0256); u_ram.poke(32'h8000 + 0*8 + 4, 32'h0);
    u_ram.poke(32'h8000 + 1*8, 32'h00F0_0512); u_ram.poke(32'h8000 + 1*8 + 4, 32'h0);
    u_ram.poke(32'h8000 + 2*8, 32'h00F0_1024); u_ram.poke(32'h8000 + 2*8 + 4, 32'h0);
    u_ram.poke(32'h8000 + 3*8, 32'h00F0_0128); u_ram.poke(32'h8000 + 3*8 + 4, 32'hDEAD_BEEF);
    u_ram.poke(32'h8000 + 5*8, 32'h0010_0000); u_ram.poke(32'h8000 + 5*8 + 4, 32'h0000_0AAA);
    nbq.push_back(32'h00F0_0000);
    nbq.push_back(32'h00F0_0032);
    nbq.push_back(32'h00F0_0064);
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    post(1, mk(16'd3, 32'h0009_0045, 32'h0000_0169, 32'h0000_1024, 1'b0));
    check(u_host.peek(32'h00F0_0128) == 32'h0009_0045, "D word 0");
    check(u_host.peek(32'h00F0_012C) == 32'h0000_0169, "D word 1");
    check(u_host.peek(32'h00F0_0130) == 32'h0000_1024, "D word 2");
    check(u_host.peek(32'h00F0_0134) == 32'h00F0_0000, "D.next points at A");
    check(u_host.wlog.size() == 4 && u_host.wlog[3] == 32'h00F0_0134, "next written last");
    check(u_ram.peek(32'h8000 + 3*8) == 32'h00F0_0000, "entry 3 now points at A");
    check(u_ram.peek(32'h8000 + 3*8 + 4) == 32'hDEAD_BEEF, "token word untouched");
    check(nbq.size() == 2 && nbq[0] == 32'h00F0_0032, "A taken off the block queue");
    check(nq.size() == 1 && nq[0] == 32'h6F56_DF77, "token pushed on NQR");
    check(u_host.peek(32'h00F0_0000) == 32'h0 && u_host.peek(32'h00F0_000C) == 32'h0,
          "A left empty");
    // two sources at once
    u_host.wlog.delete();
    fork
      post(0, mk(16'd5, 32'h1, 32'h2, 32'h3, 1'b1));
      post(1, mk(16'd3, 32'h4, 32'h5, 32'h6, 1'b0));
    join
    check(u_host.peek(32'h0010_0000) == 32'h1 && u_host.peek(32'h0010_0010) == 32'hA0 &&
          u_host.peek(32'h0010_001C) == 32'hA3, "list 5 object with metadata");
    check(u_host.peek(32'h0010_000C) == 32'h00F0_0032 || u_host.peek(32'h0010_000C) == 32'h00F0_0064,
          "list 5 next from block queue");
    check(u_host.peek(32'h00F0_0000) == 32'h4 && u_host.peek(32'h00F0_000C) != 32'h0,
          "second notification on list 3 lands in A");
    check(nq.size() == 2, "enqueue clear: no token for list 5");
    check(u_host.wlog.size() == 12, "4 + 8 host writes");
    // empty block queue: the engine waits
    fork
      post(0, mk(16'd5, 32'h7, 32'h8, 32'h9, 1'b0));
      begin
        repeat (40) @(posedge clk);
        check(busy && note_ready == 2'b00, "waits for an empty object");
        nbq.push_back(32'h0020_0000);
      end
    join
    check(u_ram.peek(32'h8000 + 5*8) == 32'h0020_0000, "entry 5 advanced after refill");
    // full NQR: the engine waits, never drops
    nq_limit = nq.size();
    nbq.push_back(32'h0030_0000);
    fork
      post(1, mk(16'd3, 32'hA, 32'hB, 32'hC, 1'b0));
      begin
        repeat (60) @(posedge clk);
        check(busy && nq.size() == nq_limit, "waits on full NQR");
        nq_limit = 256;
      end
    join
    check(nq.size() == 3 && nq[2] == 32'h6F56_DF77, "token pushed once NQR has room");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
