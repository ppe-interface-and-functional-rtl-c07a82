// ppe_regs_tb -- self-checking test of the host register window.
// Checks PCSR0/NLHR read-back, the PCSR1 fields, NQR/AQR draining by reads
// (empty reads return zero), int_lo/int_hi setting on the empty->non-empty
// transition and clearing by a host write, NBQR pushes and the full limit,
// the static, auto-increment and paged XMT_RAM/RCV_RAM access paths with
// their effective addresses, the send descriptor page, the go_set pulse,
// the soft reset of the queues, and the two-cycle register access latency.
module ppe_regs_tb;
  import ppe_pkg::*;
  logic        clk = 0, rst_n = 0;
  mem_req_t    hs_req = '0;
  mem_rsp_t    hs_rsp;
  logic        irq;
  pcsr0_t      pcsr0;
  logic [31:0] nlhr;
  logic [3:0]  go_set;
  logic        ready = 1, idle = 1;
  mem_req_t    xa_req, ra_req;
  mem_rsp_t    xa_rsp, ra_rsp;
  logic        nqr_push = 0, aqr_push = 0, nbqr_pop = 0;
  logic [31:0] nqr_data = 0, aqr_data = 0, nbqr_data;
  logic        nqr_full, aqr_full, nbqr_empty;
  int checks = 0, failures = 0;
  int go_pulses [4] = '{0, 0, 0, 0};

  ppe_regs dut (.*);
  tb_host_mem #(.LAT(1)) u_xmt (.clk, .req(xa_req), .rsp(xa_rsp));
  tb_host_mem #(.LAT(1)) u_rcv (.clk, .req(ra_req), .rsp(ra_rsp));

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) for (int i = 0; i < 4; i++) if (go_set[i]) go_pulses[i]++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int lat;
  task automatic hacc(input bit we, input logic [9:0] a, input logic [31:0] d,
                      output logic [31:0] r);
    hs_req = '{1'b1, we, 32'(a), d};
    lat = 0;
    do begin
      @(posedge clk); #1;
      lat++;
    end while (!hs_rsp.ack);
    r = hs_rsp.rdata;
    hs_req = '0;
    @(posedge clk); #1;
  endtask

  task automatic hwr(input logic [9:0] a, input logic [31:0] d);
    logic [31:0] r;
    hacc(1, a, d, r);
  endtask

  task automatic hrd(input logic [9:0] a, output logic [31:0] r);
    hacc(0, a, 32'h0, r);
  endtask

  logic [31:0] r;
  pcsr1_t      p1;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    // PCSR0 / NLHR
    hwr(10'h000, 32'h4005_1234);
    check(lat == 1, "register write acknowledged in the next cycle");
    hrd(10'h000, r);
    check(r == 32'h4005_1234 && pcsr0.enable && pcsr0.incarnation == 4'h5 &&
          pcsr0.local_node_num == 16'h1234, "PCSR0 fields");
    hwr(10'h008, 32'h0000_8000);
    hrd(10'h008, r);
    check(r == 32'h8000 && nlhr == 32'h8000, "NLHR");
    // PCSR1 at rest: ready, idle, NBQR empty, 4 send descriptors
    hrd(10'h004, r);
    p1 = r;
    check(p1.ready && p1.idle && p1.nbqr_empty && !p1.nbqr_full && p1.send_desc_cnt == 4 &&
          !p1.int_hi && !p1.int_lo, "PCSR1 at rest");
    check(irq, "irq while NBQR is empty");
    // NBQR pushes
    hwr(10'h01C, 32'h00F0_0000);
    hwr(10'h01C, 32'h00F0_0032);
    check(!nbqr_empty && nbqr_data == 32'h00F0_0000, "NBQR head");
    nbqr_pop = 1; @(posedge clk); #1 nbqr_pop = 0;
    check(nbqr_data == 32'h00F0_0032, "NBQR pop");
    // NQR: empty read returns zero
    hrd(10'h014, r);
    check(r == 32'h0, "empty NQR reads zero");
    // PPE pushes two tokens: int_lo set on the first
    nqr_data = 32'h111; nqr_push = 1; @(posedge clk); #1;
    nqr_data = 32'h222; @(posedge clk); #1 nqr_push = 0;
    hrd(10'h004, r); p1 = r;
    check(p1.int_lo && !p1.int_hi, "int_lo set by NQR transition");
    hrd(10'h014, r); check(r == 32'h111, "NQR first token");
    hrd(10'h014, r); check(r == 32'h222, "NQR second token");
    hrd(10'h014, r); check(r == 32'h0, "NQR drained");
    hwr(10'h004, 32'h0);
    hrd(10'h004, r); p1 = r;
    check(!p1.int_lo, "int_lo cleared by host write");
    // AQR and int_hi
    aqr_data = 32'h7; aqr_push = 1; @(posedge clk); #1 aqr_push = 0;
    hrd(10'h004, r); p1 = r;
    check(p1.int_hi, "int_hi set by AQR transition");
    hrd(10'h018, r); check(r == 32'h7, "AQR token");
    // XMT_RAM via PXR pointer
    hwr(10'h040, 32'h0000_0400);
    hwr(10'h044, 32'hAAAA_0001);
    check(u_xmt.peek(32'h400) == 32'hAAAA_0001, "PXR_MEM static write");
    hwr(10'h048, 32'hAAAA_0002);
    hwr(10'h048, 32'hAAAA_0003);
    check(u_xmt.peek(32'h400) == 32'hAAAA_0002 && u_xmt.peek(32'h404) == 32'hAAAA_0003,
          "PXR_MEM_INC writes");
    hrd(10'h040, r); check(r == 32'h408, "PXR pointer advanced by 8");
    check(lat == 1, "pointer read latency");
    hrd(10'h044, r);
    check(lat == 3 && r == 32'h0, "RAM read through static register (unwritten word)");
    // paged access: pointer 0x1234 -> page 0x12, host offset 0x2A8 -> 0x12A8
    hwr(10'h040, 32'h0000_1234);
    hwr(10'h2A8, 32'hBEEF_0001);
    check(u_xmt.peek(32'h12A8) == 32'hBEEF_0001, "XMT paged write address");
    hrd(10'h2A8, r); check(r == 32'hBEEF_0001, "XMT paged read");
    // send descriptor page: 0x1D4 -> XMT 0x00D4 = descriptor 3 word 5 (control1)
    hwr(10'h1D4, 32'h1000_0040);
    check(u_xmt.peek(32'h00D4) == 32'h1000_0040, "send descriptor page address");
    hwr(10'h154, 32'h0000_0040);   // descriptor 1 control1 without go
    hwr(10'h158, 32'h1000_0040);   // descriptor 1 status2: not control1
    check(go_pulses[3] == 1 && go_pulses[1] == 0 && go_pulses[0] == 0, "go_set pulse");
    // RCV_RAM via PRR pointer and paging
    hwr(10'h080, 32'h0000_F000);
    hwr(10'h088, 32'h5555_0001);
    hwr(10'h088, 32'h5555_0002);
    check(u_rcv.peek(32'hF000) == 32'h5555_0001 && u_rcv.peek(32'hF004) == 32'h5555_0002,
          "PRR_MEM_INC writes");
    hrd(10'h084, r); check(r == 32'h0, "PRR_MEM reads the word at the pointer");
    hwr(10'h3FC, 32'h6666_0000);
    check(u_rcv.peek(32'hF0FC) == 32'h6666_0000, "RCV paged address");
    // NBQR full limit: 255 more entries fit (one is already queued)
    for (int i = 0; i < 256; i++) hwr(10'h01C, 32'h100 + i);
    hrd(10'h004, r); p1 = r;
    check(p1.nbqr_full, "NBQR full after 256 entries");
    check(nbqr_data == 32'h00F0_0032, "write to full NBQR ignored");
    // soft reset empties the queues and clears interrupt bits
    aqr_data = 32'h9; aqr_push = 1; @(posedge clk); #1 aqr_push = 0;
    hwr(10'h000, 32'hC005_1234);
    hwr(10'h000, 32'h4005_1234);
    hrd(10'h004, r); p1 = r;
    check(p1.nbqr_empty && !p1.int_hi && !p1.int_lo, "soft reset clears queues");
    hrd(10'h018, r); check(r == 32'h0, "AQR empty after soft reset");
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
