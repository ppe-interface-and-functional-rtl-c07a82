// ppe_copy_tb -- self-checking test of receive validation and reassembly.
// A 48-byte message arrives as two packets (32 + 16 bytes, the first with
// use_msg_size/use_msg_offset) for rslot 7: the payload must land in host
// memory at buffer_base_phys + remote_offset, bytes_to_go must go 16 -> 0
// and be written back, msg_size/msg_offset stored, and on completion the
// rslot index pushed on the AQR and a message-received notification posted
// on the rslot's note_index. An ack packet must post on ack_note_index with
// ack_pkt set and leave the rslot alone. Then one packet per error kind must
// post an error notification on index 0 with exactly that status bit, the
// slot, dst_node and src_node, and must write nothing to host memory.
module ppe_copy_tb;
  import ppe_pkg::*;
  logic             clk = 0, rst_n = 0;
  logic [15:0]      local_node_num = 16'h0012;
  logic [3:0]       incarnation = 4'h5;
  logic             pkt_valid = 0, pkt_hdr_ok = 1, pkt_body_ok = 1, pkt_too_long = 0;
  logic [3:0][31:0] pkt_hdr = '0, pkt_meta = '0;
  logic [5:0]       pkt_words = 0;
  logic             pkt_done;
  mem_req_t         cr_req, hw_req;
  mem_rsp_t         cr_rsp, hw_rsp;
  logic             aqr_push, aqr_full = 0;
  logic [31:0]      aqr_data;
  logic             note_valid, note_ready = 0, busy;
  note_req_t        note_req;
  logic [31:0]      aqr [$];
  note_req_t        notes [$];
  int checks = 0, failures = 0;

  ppe_copy dut (.*);
  tb_host_mem #(.LAT(1)) u_ram  (.clk, .req(cr_req), .rsp(cr_rsp));
  tb_host_mem #(.LAT(2)) u_host (.clk, .req(hw_req), .rsp(hw_rsp));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (aqr_push) aqr.push_back(aqr_data);
    note_ready <= 1'b0;
    if (note_valid && !note_ready) begin
      notes.push_back(note_req);
      note_ready <= 1'b1;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  localparam logic [31:0] BASE = 32'h0001_0000;

  task automatic rslot(input int slot, input logic [31:0] size, input bit valid);
    logic [31:0] a;
    a = 32'(slot) * 32;
    u_ram.poke(a + 0, BASE);
    u_ram.poke(a + 4, size);
    u_ram.poke(a + 8, {16'd9, valid, 1'b0, 1'b1, 1'b1, 12'h0});  // do_acks, notify
    u_ram.poke(a + 12, 32'h0);
    u_ram.poke(a + 16, 32'h0);
    u_ram.poke(a + 20, 32'h0);
    u_ram.poke(a + 24, {16'd11, 16'h0});
  endtask

  task automatic send(input logic [11:0] dst_node, input logic [15:0] slot, input bit ums,
                      input bit umo, input bit ack, input logic [3:0] inc,
                      input logic [23:0] off, input logic [23:0] msz, input int nw);
    pkt_hdr[0] = {4'h0, dst_node, 16'h0};
    pkt_hdr[1] = {slot, 12'h345, 4'h0};
    pkt_hdr[2] = {ums, umo, ack, 1'b0, inc, off};
    pkt_hdr[3] = {4'h0, 1'b0, 3'h0, msz};
    pkt_words  = 6'(nw);
    for (int i = 0; i < nw; i++) u_ram.poke(32'hFF80 + 4*i, 32'hD000 + 32'(off) + 4*i);
    pkt_valid = 1;
    do @(posedge clk); while (!pkt_done);
    #1 pkt_valid = 0;
  endtask

  task automatic expect_error(input string what, input logic [15:0] slot, input int bitpos);
    check(notes.size() == 1, {what, ": one notification"});
    if (notes.size() == 1) begin
      check(notes[0].note_index == 16'h0, {what, ": index 0"});
      check(notes[0].w0 == {slot, 16'h1 << bitpos}, {what, ": status word"});
      check(notes[0].w2 == {4'h0, pkt_hdr[0][27:16], 4'h0, 12'h345}, {what, ": node words"});
    end
    check(u_host.wlog.size() == 0, {what, ": nothing copied"});
    notes.delete();
    u_host.wlog.delete();
  endtask

  initial begin
    rslot(7, 256, 1);
    rslot(8, 256, 0);
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    // ---- two-packet message
    send(12'h012, 16'd7, 1, 1, 0, 4'h5, 24'd0, 24'd48, 8);
    for (int i = 0; i < 8; i++)
      check(u_host.peek(BASE + 4*i) == 32'hD000 + 4*i, "packet 1 payload in host memory");
    check(u_ram.peek(7*32 + 12) == 32'd16, "bytes_to_go 48 - 32");
    check(u_ram.peek(7*32 + 16) == 32'd48, "msg_size stored");
    check(notes.size() == 0 && aqr.size() == 0, "no completion after packet 1");
    send(12'h012, 16'd7, 0, 0, 0, 4'h5, 24'd32, 24'd48, 4);
    for (int i = 0; i < 4; i++)
      check(u_host.peek(BASE + 32 + 4*i) == 32'hD020 + 4*i, "packet 2 payload in host memory");
    check(u_ram.peek(7*32 + 12) == 32'd0, "bytes_to_go written back as zero");
    check(aqr.size() == 1 && aqr[0] == 32'd7, "rslot index on AQR");
    check(notes.size() == 1 && notes[0].note_index == 16'd9 &&
          notes[0].w0 == {16'd7, 12'h345, 4'h0} &&
          notes[0].w1 == {4'h0, 4'h5, 24'd0} &&
          notes[0].w2 == {8'h0, 24'd48}, "message-received notification");
    notes.delete(); aqr.delete(); u_host.wlog.delete();
    // ---- ack packet
    send(12'h012, 16'd7, 0, 0, 1, 4'h5, 24'h00ABCD, 24'h000123, 0);
    check(notes.size() == 1 && notes[0].note_index == 16'd11 &&
          notes[0].w1 == {4'b0010, 4'h5, 24'h00ABCD} &&
          notes[0].w2 == {8'h0, 24'h000123}, "ack notification");
    check(u_ram.peek(7*32 + 12) == 32'd0 && u_ram.peek(7*32 + 16) == 32'd48,
          "ack leaves the rslot alone");
    check(aqr.size() == 0 && u_host.wlog.size() == 0, "ack: no AQR entry, no copy");
    notes.delete();
    // ---- error packets
    pkt_hdr_ok = 0;
    send(12'h012, 16'd7, 0, 0, 0, 4'h5, 24'd0, 24'd0, 2);
    expect_error("bad header checksum", 16'd7, 10);
    pkt_hdr_ok = 1; pkt_body_ok = 0;
    send(12'h012, 16'd7, 0, 0, 0, 4'h5, 24'd0, 24'd0, 2);
    expect_error("bad body checksum", 16'd7, 9);
    pkt_body_ok = 1;
    send(12'h013, 16'd7, 0, 0, 0, 4'h5, 24'd0, 24'd0, 2);
    expect_error("bad dst_node", 16'd7, 13);
    send(12'h012, 16'd1024, 0, 0, 0, 4'h5, 24'd0, 24'd0, 2);
    expect_error("rslot range", 16'd1024, 14);
    send(12'h012, 16'd8, 0, 0, 0, 4'h5, 24'd0, 24'd0, 2);
    expect_error("invalid rslot", 16'd8, 15);
    send(12'h012, 16'd7, 0, 0, 0, 4'h6, 24'd0, 24'd0, 2);
    expect_error("bad incarnation", 16'd7, 8);
    send(12'h012, 16'd7, 0, 0, 0, 4'h5, 24'd260, 24'd0, 2);
    expect_error("bad offset", 16'd7, 12);
    send(12'h012, 16'd7, 0, 0, 0, 4'h5, 24'd240, 24'd0, 8);
    expect_error("bad size", 16'd7, 11);
    pkt_too_long = 1;
    send(12'h012, 16'd7, 0, 0, 0, 4'h5, 24'd0, 24'd0, 32);
    expect_error("too long", 16'd7, 11);
    pkt_too_long = 0;
    check(u_ram.peek(7*32 + 12) == 32'd0, "error packets leave the rslot alone");
    // ---- AQR full: the engine waits
    aqr_full = 1;
    fork
      send(12'h012, 16'd7, 1, 1, 0, 4'h5, 24'd0, 24'd4, 1);
      begin
        repeat (40) @(posedge clk);
        check(busy && aqr.size() == 0, "waits while the AQR is full");
        aqr_full = 0;
      end
    join
    check(aqr.size() == 1, "AQR push after room");
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
