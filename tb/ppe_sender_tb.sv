// ppe_sender_tb -- self-checking test of the packetizer.
// After reset every status2 must read done. Three descriptors are started
// together: 0 = DMA message of 40 words with metadata and notify (two
// packets, 32 + 8 words), 1 = DIO message of 5 words from XMT_RAM, 2 = a
// control packet (header only whatever msg_size); descriptor 3 has go set
// but done still set and must never inject. Nothing may be sent while
// enable is clear. The packets must come out round robin (0, 1, 2, 0), with
// headers, metadata (first packet only), payload and trailer exactly as the
// test builds them, use_msg_size/use_msg_offset only in the first packet and
// remote_offset advancing. Afterwards msg_address, control0, bytes_to_go and
// status2 must be updated and one completion notification (9-bit note_index)
// requested. Then a two-packet message is stalled by the fabric while the
// host clears go: the first packet completes with stalled set and busy/done
// clear, nothing more is sent until go is set again, and the rest follows.
module ppe_sender_tb;
  import ppe_pkg::*;
  logic        clk = 0, rst_n = 0, enable = 0;
  logic [15:0] local_node_num = 16'h0012;
  logic [3:0]  go_set = '0;
  mem_req_t    xb_req, hm_req;
  mem_rsp_t    xb_rsp, hm_rsp;
  logic        tx_valid, tx_last, tx_ready = 0;
  logic [31:0] tx_data;
  logic        note_valid, note_ready = 0, init_done, busy;
  note_req_t   note_req;
  logic [32:0] got [$];
  logic [32:0] expq [$];
  note_req_t   notes [$];
  int          rand_ready = 1, hold_ready = 0;
  int          busy_seen = 0, pkts = 0;
  int checks = 0, failures = 0;

  ppe_sender dut (.*);
  tb_host_mem #(.LAT(1)) u_xmt  (.clk, .req(xb_req), .rsp(xb_rsp));
  tb_host_mem #(.LAT(3)) u_host (.clk, .req(hm_req), .rsp(hm_rsp));

  always #5 clk = ~clk;

  logic first_word = 1;
  always @(posedge clk) begin
    if (rst_n && tx_valid && tx_ready) begin
      got.push_back({tx_last, tx_data});
      // busy must be set in status2 while the packet is injected
      if (first_word && u_xmt.peek(32'(dut.cur) * 64 + 24) == 32'h8000_0000) busy_seen++;
      first_word = tx_last;
      if (tx_last) pkts++;
    end
    note_ready <= 1'b0;
    if (note_valid && !note_ready) begin
      notes.push_back(note_req);
      note_ready <= 1'b1;
    end
  end
  always @(negedge clk) tx_ready <= hold_ready ? 1'b0 : (rand_ready ? ($urandom_range(0, 3) != 0) : 1'b1);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [31:0] sd(input int d, input int w);
    return 32'(d * 64 + w * 4);
  endfunction

  task automatic desc(input int d, input logic [31:0] addr, input logic [11:0] dst_node,
                      input logic [15:0] slot, input logic [15:0] nidx, input logic [31:0] ctl0,
                      input logic [31:0] ctl1);
    u_xmt.poke(sd(d, 0), addr);
    u_xmt.poke(sd(d, 1), {4'h3, dst_node, 16'h5A5A});
    u_xmt.poke(sd(d, 2), {slot, nidx});
    u_xmt.poke(sd(d, 3), ctl0);
    u_xmt.poke(sd(d, 5), ctl1);
    for (int i = 0; i < 4; i++) u_xmt.poke(sd(d, 8 + i), 32'hEE00 + 32'(d * 16 + i));
  endtask

  task automatic exp_pkt(input int d, input logic [31:0] c0, input logic [31:0] c1h,
                         input bit meta, input logic [31:0] src, input bit dio, input int nw);
    logic [31:0] a0, a1;
    a0 = u_xmt.peek(sd(d, 1));
    a1 = {u_xmt.peek(sd(d, 2))[31:16], 12'h012, 4'h0};
    expq.push_back({1'b0, a0});
    expq.push_back({1'b0, a1});
    expq.push_back({1'b0, c0});
    expq.push_back({1'b0, c1h});
    expq.push_back({1'b0, 32'h0});
    if (meta) for (int i = 0; i < 4; i++) expq.push_back({1'b0, 32'hEE00 + 32'(d * 16 + i)});
    for (int i = 0; i < nw; i++)
      expq.push_back({1'b0, dio ? u_xmt.peek(src + 4*i) : u_host.peek(src + 4*i)});
    expq.push_back({1'b1, 32'h0});
  endtask

  task automatic wait_pkts(input int n);
    while (pkts < n) @(posedge clk);
    repeat (30) @(posedge clk);
    #1;
  endtask

  task automatic compare(input string what);
    check(got.size() == expq.size(), {what, ": word count"});
    for (int i = 0; i < got.size() && i < expq.size(); i++)
      if (got[i] != expq[i]) begin
        check(0, $sformatf("%s: word %0d got %h expected %h", what, i, got[i], expq[i]));
        break;
      end
    checks++;
    got.delete(); expq.delete();
  endtask

  initial begin
    for (int i = 0; i < 64; i++) u_host.poke(32'h2000 + 4*i, 32'h4000_0000 + i);
    for (int i = 0; i < 8; i++)  u_xmt.poke(32'h0400 + 4*i, 32'h5000_0000 + i);
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (init_done);
    #1;
    for (int d = 0; d < 4; d++) check(u_xmt.peek(sd(d, 6)) == 32'h2000_0000, "status2 done after reset");
    // descriptors
    desc(0, 32'h2000, 12'h034, 16'd7, 16'h0205, {1'b1, 1'b1, 1'b0, 1'b0, 4'h5, 24'h100},
         {1'b0, 1'b0, 1'b1, 1'b1, 1'b1, 3'd4, 24'd160});
    desc(1, 32'h0400, 12'h035, 16'd8, 16'h0003, {1'b1, 1'b1, 1'b0, 1'b0, 4'h5, 24'h0},
         {1'b1, 1'b0, 1'b0, 1'b1, 1'b0, 3'd0, 24'd20});
    desc(2, 32'h0000, 12'h036, 16'd9, 16'h0004, {1'b1, 1'b0, 1'b0, 1'b0, 4'h5, 24'h0},
         {1'b0, 1'b1, 1'b0, 1'b1, 1'b0, 3'd0, 24'h001000});
    desc(3, 32'h2000, 12'h037, 16'd10, 16'h0004, 32'h0, {1'b0, 1'b0, 1'b0, 1'b1, 1'b0, 3'd0, 24'd64});
    go_set = 4'b0111;
    @(posedge clk); #1 go_set = '0;
    repeat (200) @(posedge clk);
    check(got.size() == 0, "nothing sent while enable is clear");
    check(u_xmt.peek(sd(0, 4)) == 32'd160 && u_xmt.peek(sd(0, 6)) == 32'h0,
          "go loads bytes_to_go and clears done");
    enable = 1;
    // expected traffic, round robin 0,1,2,0
    exp_pkt(0, {1'b1, 1'b1, 1'b0, 1'b0, 4'h5, 24'h100}, {4'h0, 1'b1, 3'd4, 24'd160}, 1, 32'h2000, 0, 32);
    exp_pkt(1, {1'b1, 1'b1, 1'b0, 1'b0, 4'h5, 24'h0},   {4'h0, 1'b0, 3'd0, 24'd20},  0, 32'h0400, 1, 5);
    exp_pkt(2, {1'b1, 1'b0, 1'b0, 1'b0, 4'h5, 24'h0},   {4'h0, 1'b0, 3'd0, 24'h1000}, 0, 32'h0, 0, 0);
    exp_pkt(0, {1'b0, 1'b0, 1'b0, 1'b0, 4'h5, 24'h180}, {4'h0, 1'b0, 3'd4, 24'd160}, 0, 32'h2080, 0, 8);
    wait_pkts(4);
    compare("round-robin traffic");
    check(pkts == 4, "descriptor 3 (done) never injects");
    check(busy_seen == 4, "busy set during every packet");
    check(u_xmt.peek(sd(0, 0)) == 32'h20A0, "msg_address advanced");
    check(u_xmt.peek(sd(0, 3)) == {8'h05, 24'h1A0}, "control0: offset advanced, use bits cleared");
    check(u_xmt.peek(sd(0, 4)) == 32'h0 && u_xmt.peek(sd(0, 6)) == 32'h2000_0000, "descriptor 0 done");
    check(u_xmt.peek(sd(1, 6)) == 32'h2000_0000 && u_xmt.peek(sd(2, 6)) == 32'h2000_0000,
          "descriptors 1 and 2 done");
    check(u_xmt.peek(sd(2, 4)) == 32'h0, "control packet leaves nothing to go");
    check(notes.size() == 1 && notes[0].note_index == 16'h0005, "one completion notification, 9-bit index");
    // ---- stall with go reset by the host
    notes.delete();
    pkts = 0;
    desc(0, 32'h2000, 12'h034, 16'd7, 16'h0001, {1'b1, 1'b1, 1'b0, 1'b0, 4'h5, 24'h0},
         {1'b0, 1'b0, 1'b1, 1'b1, 1'b0, 3'd0, 24'd256});
    hold_ready = 1;
    go_set = 4'b0001;
    @(posedge clk); #1 go_set = '0;
    repeat (100) @(posedge clk);
    // host clears go while the packet is stalled
    u_xmt.poke(sd(0, 5), {1'b0, 1'b0, 1'b1, 1'b0, 1'b0, 3'd0, 24'd256});
    hold_ready = 0;
    rand_ready = 0;
    wait_pkts(1);
    repeat (300) @(posedge clk);
    check(pkts == 1, "no further packet while go is clear");
    check(u_xmt.peek(sd(0, 6)) == 32'h4000_0000, "stalled set as busy is reset");
    check(u_xmt.peek(sd(0, 4)) == 32'd128, "progress state: 128 bytes to go");
    // resume: the host restarts with the remaining size
    got.delete();
    u_xmt.poke(sd(0, 5), {1'b0, 1'b0, 1'b1, 1'b1, 1'b0, 3'd0, 24'd128});
    go_set = 4'b0001;
    @(posedge clk); #1 go_set = '0;
    exp_pkt(0, {1'b0, 1'b0, 1'b0, 1'b0, 4'h5, 24'd128}, {4'h0, 1'b0, 3'd0, 24'd128}, 0, 32'h2080, 0, 32);
    wait_pkts(2);
    compare("resumed transfer");
    check(u_xmt.peek(sd(0, 6)) == 32'h2000_0000, "resumed message done, stalled clear");
    check(notes.size() == 1 && notes[0].note_index == 16'h0001, "completion notification after resume");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
