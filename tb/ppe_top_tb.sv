// ppe_top_tb -- end-to-end test of the PPE at its default sizes.
// The testbench plays the host (register accesses on hs_*, host memory on
// hm_*) and the fabric (tx_* looped back to rx_* with random back-pressure,
// so the node sends packets to itself). It programs the notification list
// heads table and two rslots through the PRR pointer, fills the NBQR, copies
// a DIO message into XMT_RAM through PXR_MEM_INC, and starts four send
// descriptors through the descriptor page: a 160-byte DMA message with
// metadata and notify (two packets), a 20-byte DIO message, an ack packet and
// a control packet addressed to another node (an error packet on arrival).
// It then checks the reassembled data in host memory, the notification
// objects on every list, the NQR tokens, the AQR entry, the interrupt bits,
// the send descriptor status, and that PCSR0.reset brings the PPE back to
// ready with empty queues. A second phase holds the fabric, starts a
// three-packet DMA message, clears go while the second packet is stalled and
// checks the saved progress (stalled set, bytes_to_go, msg_address, control0)
// and that nothing more is sent; it then resumes the message with the
// remaining size while the NBQR is empty, so both notifications must wait
// for software to refill it. A third phase uses the ends of the default
// tables: rslot 1023 with list head 1023, rslot 1024 (out of range) and a send
// note_index above 9 bits. Each mechanism must be seen at least once.
module ppe_top_tb;
  import ppe_pkg::*;
  logic        clk = 0, rst_n = 0;
  mem_req_t    hs_req = '0;
  mem_rsp_t    hs_rsp;
  logic        irq;
  mem_req_t    hm_req;
  mem_rsp_t    hm_rsp;
  logic        tx_valid, tx_last, tx_ready, rx_valid, rx_last, rx_ready;
  logic [31:0] tx_data, rx_data;
  int checks = 0, failures = 0;

  ppe_top dut (.*);
  tb_host_mem #(.LAT(2)) u_host (.clk, .req(hm_req), .rsp(hm_rsp));

  // fabric: loop back with random back-pressure
  logic fab_gate = 1, fab_hold = 0;
  always @(negedge clk) fab_gate <= ($urandom_range(0, 4) != 0) && !fab_hold;
  assign rx_valid = tx_valid && fab_gate;
  assign rx_data  = tx_data;
  assign rx_last  = tx_last;
  assign tx_ready = rx_ready && fab_gate;

  always #5 clk = ~clk;

  // ------------------------------------------------------- mechanism counters
  int n_pkts = 0, n_fab_stall = 0, n_sd_switch = 0, n_dma = 0, n_dio = 0;
  int n_ctl = 0, n_ack = 0, n_err = 0, n_meta = 0, n_aqr = 0, n_nqr = 0;
  int n_sender_wait = 0, n_nbqr_wait = 0, n_stalled = 0, n_resume = 0;
  logic [1:0] last_sd = 2'd0;
  logic       sop = 1;
  always @(posedge clk) if (rst_n) begin
    if (tx_valid && !tx_ready) n_fab_stall++;
    if (dut.u_sender.tx_valid && !dut.u_sender.tx_ready) n_sender_wait++;
    if (tx_valid && tx_ready) begin
      if (sop) begin
        n_pkts++;
        if (dut.u_sender.cur != last_sd) n_sd_switch++;
      end
      sop = tx_last;
    end
    if (dut.u_sender.st == dut.u_sender.S_TRL && dut.u_sender.tx_ready) begin
      last_sd = dut.u_sender.cur;
      if (dut.u_sender.ctl1.control_pkt) n_ctl++;
      else if (dut.u_sender.ctl1.direct_io) n_dio++;
      else n_dma++;
      if (dut.u_sender.send_meta) n_meta++;
    end
    if (dut.u_copy.st == dut.u_copy.C_NOTE && dut.u_copy.note_ready) begin
      if (dut.u_copy.nkind == dut.u_copy.N_ACK) n_ack++;
      if (dut.u_copy.nkind == dut.u_copy.N_ERR) n_err++;
    end
    if (dut.aqr_push) n_aqr++;
    if (dut.nqr_push) n_nqr++;
    if (dut.u_notify.st == dut.u_notify.N_POP && dut.nbqr_empty) n_nbqr_wait++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic hacc(input bit we, input logic [9:0] a, input logic [31:0] d,
                      output logic [31:0] r);
    hs_req = '{1'b1, we, 32'(a), d};
    do @(posedge clk); while (!hs_rsp.ack);
    r = hs_rsp.rdata;
    #1 hs_req = '0;
    @(posedge clk); #1;
  endtask
  task automatic hwr(input logic [9:0] a, input logic [31:0] d);
    logic [31:0] r;
    hacc(1, a, d, r);
  endtask
  task automatic hrd(input logic [9:0] a, output logic [31:0] r);
    hacc(0, a, 32'h0, r);
  endtask

  localparam logic [31:0] NOTE_BASE = 32'h0010_0000;  // empty object of list i: +0x100*i
  localparam logic [31:0] FREE_BASE = 32'h0030_0000;  // NBQR objects: +0x40*k
  localparam logic [31:0] BUF7      = 32'h0020_0000;
  localparam logic [31:0] BUF8      = 32'h0028_0000;
  localparam logic [31:0] MSG       = 32'h0001_0000;
  localparam logic [31:0] MSG2      = 32'h0002_0000;
  localparam logic [31:0] BUF7B     = 32'h0024_0000;
  localparam logic [31:0] BUF_HI    = 32'h0026_0000;

  task automatic rslot_n(input int slot, input logic [31:0] base, input bit do_acks,
                         input logic [15:0] nidx);
    hwr(10'h080, 32'(slot) * 32);
    hwr(10'h088, base);
    hwr(10'h088, 32'd4096);
    hwr(10'h088, {nidx, 1'b1, 1'b0, do_acks, 1'b1, 12'h0});
    hwr(10'h088, 32'h0);
    hwr(10'h088, 32'h0);
    hwr(10'h088, 32'h0);
    hwr(10'h088, {16'd11, 16'h0});
    hwr(10'h088, 32'h0);
  endtask
  task automatic rslot(input int slot, input logic [31:0] base, input bit do_acks);
    rslot_n(slot, base, do_acks, 16'd9);
  endtask

  task automatic sdesc(input int d, input logic [31:0] addr, input logic [11:0] node,
                       input logic [15:0] slot, input logic [15:0] nidx,
                       input logic [31:0] c0, input logic [31:0] c1);
    logic [9:0] b;
    b = 10'h100 + 10'(d * 64);
    hwr(b + 10'h00, addr);
    hwr(b + 10'h04, {4'h0, node, 16'h0});
    hwr(b + 10'h08, {slot, nidx});
    hwr(b + 10'h0C, c0);
    for (int i = 0; i < 4; i++) hwr(b + 10'h20 + 10'(4*i), 32'hC0DE_0000 + 32'(i));
    hwr(b + 10'h14, c1);             // control1 last: sets go
  endtask

  // walk list i from its first object; returns the number of filled objects
  function automatic int list_len(input int i);
    logic [31:0] p;
    int n;
    p = NOTE_BASE + 32'(i) * 32'h100;
    n = 0;
    while (u_host.peek(p + 12) != 32'h0 && n < 20) begin
      p = u_host.peek(p + 12);
      n++;
    end
    return n;
  endfunction

  logic [31:0] r, r2;
  pcsr1_t      p1;
  int          tokens [int];
  int          timeout;

  initial begin
    for (int i = 0; i < 40; i++) u_host.poke(MSG + 4*i, 32'hAB00_0000 + i);
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1;
    do begin hrd(10'h004, r); p1 = r; end while (!p1.ready);
    check(p1.send_desc_cnt == 4 && p1.idle && p1.nbqr_empty, "PCSR1 after reset");
    hrd(10'h100 + 10'h18, r);
    check(r == 32'h2000_0000, "send descriptor done after reset");
    // configuration
    hwr(10'h008, 32'h0000_8000);                 // NLHR
    hwr(10'h080, 32'h0000_8000);
    for (int i = 0; i < 12; i++) begin
      hwr(10'h088, NOTE_BASE + 32'(i) * 32'h100);
      hwr(10'h088, (32'(i + 1) << 1) | 32'h1);   // token i+1, enqueue
    end
    rslot(7, BUF7, 1);
    rslot(8, BUF8, 0);
    for (int k = 0; k < 16; k++) hwr(10'h01C, FREE_BASE + 32'(k) * 32'h40);
    // DIO body into XMT_RAM at 0x400
    hwr(10'h040, 32'h0000_0400);
    for (int i = 0; i < 5; i++) hwr(10'h048, 32'hD10D_0000 + 32'(i));
    hwr(10'h000, 32'h4005_0012);                 // enable, incarnation 5, node 0x12
    // four send descriptors
    sdesc(0, MSG, 12'h012, 16'd7, 16'd5, {1'b1, 1'b1, 1'b0, 1'b0, 4'h5, 24'h0},
          {1'b0, 1'b0, 1'b1, 1'b1, 1'b1, 3'd4, 24'd160});
    sdesc(1, 32'h400, 12'h012, 16'd8, 16'd5, {1'b1, 1'b1, 1'b0, 1'b0, 4'h5, 24'h0},
          {1'b1, 1'b0, 1'b0, 1'b1, 1'b0, 3'd0, 24'd20});
    sdesc(2, 32'h0, 12'h012, 16'd7, 16'd5, {1'b0, 1'b0, 1'b1, 1'b0, 4'h5, 24'h000ABC},
          {1'b0, 1'b1, 1'b0, 1'b1, 1'b0, 3'd0, 24'h000077});
    sdesc(3, 32'h0, 12'h099, 16'd7, 16'd5, {1'b1, 1'b0, 1'b0, 1'b0, 4'h5, 24'h0},
          {1'b0, 1'b1, 1'b0, 1'b1, 1'b0, 3'd0, 24'd0});
    // wait for the PPE to go quiet
    timeout = 0;
    do begin
      repeat (50) @(posedge clk);
      hrd(10'h004, r); p1 = r;
      timeout++;
    end while (!(p1.idle && list_len(9) >= 2 && list_len(0) >= 1 && list_len(11) >= 1) &&
               timeout < 400);
    repeat (200) @(posedge clk);
    // received data
    for (int i = 0; i < 40; i++)
      check(u_host.peek(BUF7 + 4*i) == 32'hAB00_0000 + 32'(i), $sformatf("DMA message word %0d", i));
    for (int i = 0; i < 5; i++)
      check(u_host.peek(BUF8 + 4*i) == 32'hD10D_0000 + 32'(i), $sformatf("DIO message word %0d", i));
    // notification lists
    check(list_len(5) == 1, "one transmission-completion notification (list 5)");
    check(list_len(9) == 2, "two message-received notifications (list 9)");
    check(list_len(11) == 1, "one ack notification (list 11)");
    check(list_len(0) == 1, "one error notification (list 0)");
    begin
      logic [31:0] o;
      // receive notifications: find the one for slot 7
      o = NOTE_BASE + 32'h900;
      if (u_host.peek(o)[31:16] != 16'd7) o = u_host.peek(o + 12);
      check(u_host.peek(o) == {16'd7, 12'h012, 4'h0}, "rx notification word 0");
      check(u_host.peek(o + 4) == {4'h0, 4'h5, 24'h0}, "rx notification msg_offset");
      check(u_host.peek(o + 8)[23:0] == 24'd160, "rx notification msg_size");
      o = NOTE_BASE + 32'hB00;
      check(u_host.peek(o + 4) == {4'b0010, 4'h5, 24'h000ABC} &&
            u_host.peek(o + 8)[23:0] == 24'h77, "ack notification fields");
      o = NOTE_BASE;
      check(u_host.peek(o) == {16'd7, 16'h2000} &&
            u_host.peek(o + 8) == {16'h0099, 16'h0012}, "error notification: bad dst_node");
    end
    // queues and interrupts
    hrd(10'h004, r); p1 = r;
    check(p1.int_hi && p1.int_lo && irq, "int_hi and int_lo raised");
    hrd(10'h018, r); check(r == 32'd7, "AQR holds rslot 7");
    hrd(10'h018, r); check(r == 32'd0, "AQR then empty");
    for (int k = 0; k < 8; k++) begin
      hrd(10'h014, r);
      if (r != 0) tokens[int'(r)] = (tokens.exists(int'(r)) ? tokens[int'(r)] : 0) + 1;
    end
    check(tokens.size() == 4 && tokens[1] == 1 && tokens[6] == 1 && tokens[10] == 2 &&
          tokens[12] == 1, "NQR tokens of lists 0, 5, 9 (twice) and 11");
    hwr(10'h004, 32'h0);
    hrd(10'h004, r); p1 = r;
    check(!p1.int_hi && !p1.int_lo, "interrupt bits cleared by software");
    for (int d = 0; d < 4; d++) begin
      hrd(10'h100 + 10'(d * 64) + 10'h18, r);
      check(r == 32'h2000_0000, $sformatf("descriptor %0d done", d));
    end
    // mechanisms
    check(n_pkts == 5, "five packets injected");
    check(n_dma == 2 && n_dio == 1 && n_ctl == 2, "DMA, DIO and control packets");
    check(n_meta == 1, "metadata sent once");
    check(n_ack == 1 && n_err == 1, "ack and error packets handled");
    check(n_sd_switch >= 3, "round-robin between descriptors");
    check(n_fab_stall > 0, "fabric back-pressure seen");
    check(n_aqr == 1 && n_nqr == 5, "AQR and NQR pushes");
    // soft reset
    hwr(10'h000, 32'hC005_0012);
    hrd(10'h004, r); p1 = r;
    check(!p1.ready, "not ready during reset");
    hwr(10'h000, 32'h4005_0012);
    do begin hrd(10'h004, r); p1 = r; end while (!p1.ready);
    check(p1.nbqr_empty, "queues empty after soft reset");
    hrd(10'h100 + 10'h18, r);
    check(r == 32'h2000_0000, "descriptor done after soft reset");
    // ---- interrupted and resumed DMA transfer, notification waiting for NBQR
    check(irq, "irq raised while the NBQR is empty");
    for (int i = 0; i < 96; i++) u_host.poke(MSG2 + 4*i, 32'h5A00_0000 + i);
    rslot(7, BUF7B, 0);
    fab_hold = 1;
    sdesc(0, MSG2, 12'h012, 16'd7, 16'd5, {1'b1, 1'b1, 1'b0, 1'b0, 4'h5, 24'h0},
          {1'b0, 1'b0, 1'b1, 1'b1, 1'b0, 3'd0, 24'd384});
    // second packet in progress and held by the fabric: software clears go
    timeout = 0;
    do begin
      hrd(10'h100 + 10'h10, r);
      hrd(10'h100 + 10'h18, r2);
      timeout++;
    end while (!(r == 32'd256 && r2[31]) && timeout < 2000);
    check(timeout < 2000, "second packet of the long message started");
    hwr(10'h100 + 10'h14, {1'b0, 1'b0, 1'b1, 1'b0, 1'b0, 3'd0, 24'd384});
    repeat (300) @(posedge clk);
    #1 fab_hold = 0;
    timeout = 0;
    do begin hrd(10'h100 + 10'h18, r); timeout++; end while (r[31] && timeout < 2000);
    repeat (400) @(posedge clk);
    hrd(10'h100 + 10'h18, r);
    check(r == 32'h4000_0000, "status2: stalled set, busy and done clear after go reset");
    if (r[30]) n_stalled++;
    hrd(10'h100 + 10'h10, r);
    check(r == 32'd128, "bytes_to_go holds the untransmitted 128 bytes");
    hrd(10'h100 + 10'h00, r);
    check(r == MSG2 + 256, "msg_address advanced by two packets");
    hrd(10'h100 + 10'h0C, r);
    check(r == {4'b0000, 4'h5, 24'd256}, "control0: offset advanced, use bits cleared");
    check(u_host.peek(BUF7B + 4*64) == 32'h0, "no third packet while go is clear");
    // resume with the remaining size; the completion waits for an NBQR object
    hwr(10'h100 + 10'h14, {1'b0, 1'b0, 1'b1, 1'b1, 1'b0, 3'd0, 24'd128});
    n_resume++;
    timeout = 0;
    do begin @(posedge clk); timeout++; end while (n_nbqr_wait < 200 && timeout < 20000);
    check(n_nbqr_wait >= 200, "notification engine waits on an empty NBQR");
    check(list_len(9) == 2 && list_len(5) == 1, "nothing posted while the NBQR is empty");
    for (int k = 0; k < 4; k++) hwr(10'h01C, FREE_BASE + 32'h1000 + 32'(k) * 32'h40);
    timeout = 0;
    do begin
      repeat (50) @(posedge clk);
      hrd(10'h004, r); p1 = r;
      timeout++;
    end while (!(p1.idle && list_len(9) == 3 && list_len(5) == 2) && timeout < 400);
    check(list_len(9) == 3, "message-received notification after the NBQR refill");
    check(list_len(5) == 2, "transmission-completion notification after the NBQR refill");
    begin
      int bad = 0;
      for (int i = 0; i < 96; i++)
        if (u_host.peek(BUF7B + 4*i) != 32'h5A00_0000 + 32'(i)) bad++;
      check(bad == 0, "resumed message reassembled in host memory");
    end
    hrd(10'h100 + 10'h18, r);
    check(r == 32'h2000_0000, "status2 done, stalled cleared by go");
    hrd(10'h100 + 10'h10, r);
    check(r == 32'd0, "bytes_to_go zero at the end");
    check(n_stalled == 1 && n_resume == 1, "stalled and resume seen");
    // ---- table extremes at the default sizes: last rslot, last list head,
    // first out-of-range rslot, and a send note_index cut to 9 bits
    rslot_n(1023, BUF_HI, 0, 16'd1023);
    hwr(10'h080, 32'h0000_8000 + 32'd8 * 1023);
    hwr(10'h088, NOTE_BASE + 32'd1023 * 32'h100);
    hwr(10'h088, (32'd1024 << 1) | 32'h1);
    for (int k = 0; k < 4; k++) hwr(10'h01C, FREE_BASE + 32'h2000 + 32'(k) * 32'h40);
    sdesc(1, 32'h400, 12'h012, 16'd1023, 16'h0205, {1'b1, 1'b1, 1'b0, 1'b0, 4'h5, 24'h0},
          {1'b1, 1'b0, 1'b1, 1'b1, 1'b0, 3'd0, 24'd8});
    sdesc(2, 32'h0, 12'h012, 16'd1024, 16'd5, {1'b1, 1'b0, 1'b0, 1'b0, 4'h5, 24'h0},
          {1'b0, 1'b1, 1'b0, 1'b1, 1'b0, 3'd0, 24'd0});
    timeout = 0;
    do begin
      repeat (50) @(posedge clk);
      hrd(10'h004, r); p1 = r;
      timeout++;
    end while (!(p1.idle && list_len(1023) == 1 && list_len(0) == 2 && list_len(5) == 3) &&
               timeout < 400);
    check(u_host.peek(BUF_HI) == 32'hD10D_0000 && u_host.peek(BUF_HI + 4) == 32'hD10D_0001,
          "message delivered through rslot 1023");
    check(list_len(1023) == 1, "notification on the last list head (1023)");
    check(list_len(5) == 3, "send note_index 0x205 posted on list 5 (9-bit index)");
    check(list_len(0) == 2, "rslot 1024 rejected on list 0");
    begin
      logic [31:0] o;
      o = u_host.peek(NOTE_BASE + 12);
      check(u_host.peek(o) == {16'd1024, 16'h4000}, "error notification: rslot_range");
    end
    $display("mechanisms: nbqr_wait=%0d stalled=%0d resume=%0d", n_nbqr_wait, n_stalled, n_resume);
    $display("mechanisms: pkts=%0d dma=%0d dio=%0d ctl=%0d meta=%0d ack=%0d err=%0d rr=%0d stall=%0d aqr=%0d nqr=%0d",
             n_pkts, n_dma, n_dio, n_ctl, n_meta, n_ack, n_err, n_sd_switch, n_fab_stall, n_aqr, n_nqr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
