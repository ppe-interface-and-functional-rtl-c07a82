// ppe_rcv_pkt_tb -- self-checking test of the receive packet writer.
// Packets with checksums made by a byte-wise reference CRC16 are streamed in
// with random gaps. For each, the test checks the header words stored at
// 0xFF00, the metadata at 0xFF10 (when flagged), the payload at 0xFF80, the
// header/metadata/word count presented to the copy engine and both checksum
// verdicts; then packets with a corrupted header checksum, a corrupted body
// and a 34-word payload (too long), and that no packet is accepted while
// enable is clear or while the previous one is still held.
module ppe_rcv_pkt_tb;
  import ppe_pkg::*;
  import tb_crc_pkg::*;
  logic             clk = 0, rst_n = 0, enable = 1;
  logic             rx_valid = 0, rx_last = 0, rx_ready;
  logic [31:0]      rx_data = 0;
  mem_req_t         rp_req;
  mem_rsp_t         rp_rsp;
  logic             pkt_valid, pkt_hdr_ok, pkt_body_ok, pkt_too_long, busy;
  logic [3:0][31:0] pkt_hdr, pkt_meta;
  logic [5:0]       pkt_words;
  logic             pkt_done = 0;
  int checks = 0, failures = 0;

  ppe_rcv_pkt dut (.*);
  tb_host_mem #(.LAT(1)) u_ram (.clk, .req(rp_req), .rsp(rp_rsp));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [31:0] w [$];
  logic [31:0] hdr [4];
  logic [31:0] meta [4];
  logic [31:0] pay [$];

  // build a packet: corrupt = 1 breaks hdr checksum, 2 breaks the body
  task automatic build(input bit with_meta, input int npay, input int corrupt);
    logic [31:0] h [$];
    logic [31:0] b [$];
    w.delete(); pay.delete();
    for (int i = 0; i < 4; i++) hdr[i] = $urandom;
    hdr[3][27] = with_meta;
    for (int i = 0; i < 4; i++) begin h.push_back(hdr[i]); w.push_back(hdr[i]); end
    w.push_back({ref_crc(h) ^ (corrupt == 1 ? 16'h0100 : 16'h0), 16'h0});
    if (with_meta) for (int i = 0; i < 4; i++) begin
      meta[i] = $urandom; w.push_back(meta[i]); b.push_back(meta[i]);
    end
    for (int i = 0; i < npay; i++) begin
      pay.push_back($urandom); w.push_back(pay[i]); b.push_back(pay[i]);
    end
    w.push_back({ref_crc(b), 16'h0});
    if (corrupt == 2) w[w.size() - 2] ^= 32'h0000_0010;
  endtask

  task automatic stream();
    foreach (w[i]) begin
      while ($urandom_range(0, 3) == 0) begin @(posedge clk); #1; end
      rx_valid = 1; rx_data = w[i]; rx_last = (i == w.size() - 1);
      do @(posedge clk); while (!rx_ready);
      #1 rx_valid = 0; rx_last = 0;
    end
  endtask

  task automatic finish_pkt();
    while (!pkt_valid) begin @(posedge clk); #1; end
  endtask

  task automatic release_pkt();
    pkt_done = 1; @(posedge clk); #1 pkt_done = 0;
  endtask

  task automatic run(input bit with_meta, input int npay);
    build(with_meta, npay, 0);
    stream();
    finish_pkt();
    check(pkt_hdr_ok && pkt_body_ok && !pkt_too_long, $sformatf("checksums ok (meta=%0d n=%0d)", with_meta, npay));
    check(pkt_words == 6'(npay), "payload word count");
    for (int i = 0; i < 4; i++) begin
      check(pkt_hdr[i] == hdr[i] && u_ram.peek(32'hFF00 + 4*i) == hdr[i], "header word stored");
      if (with_meta)
        check(pkt_meta[i] == meta[i] && u_ram.peek(32'hFF10 + 4*i) == meta[i], "metadata stored");
    end
    foreach (pay[i]) check(u_ram.peek(32'hFF80 + 4*i) == pay[i], "payload stored");
    check(u_ram.peek(32'hFF80 + 4*npay) != w[w.size()-1] || npay == 32, "trailer not stored");
    release_pkt();
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    run(0, 8);
    run(1, 32);
    run(0, 0);
    run(1, 0);
    run(0, 1);
    for (int n = 0; n < 10; n++) run($urandom_range(0, 1) == 1, $urandom_range(0, 32));
    // bad header checksum
    build(0, 4, 1); stream(); finish_pkt();
    check(!pkt_hdr_ok && pkt_body_ok, "bad header checksum detected");
    release_pkt();
    // bad body
    build(1, 4, 2); stream(); finish_pkt();
    check(pkt_hdr_ok && !pkt_body_ok, "bad body checksum detected");
    release_pkt();
    // too long
    build(0, 34, 0); stream(); finish_pkt();
    check(pkt_too_long && pkt_words == 6'd32, "payload over 32 words flagged");
    // held packet blocks the next one
    rx_valid = 1; rx_data = 32'h1; rx_last = 0;
    repeat (5) @(posedge clk);
    check(!rx_ready, "no new packet while the buffer is held");
    rx_valid = 0;
    release_pkt();
    // disabled: nothing accepted
    enable = 0;
    @(posedge clk); #1;
    rx_valid = 1;
    repeat (5) @(posedge clk);
    check(!rx_ready, "no packet accepted while disabled");
    rx_valid = 0;
    enable = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
