// ppe_sync_fifo_crc_tb -- self-checking test of the transmit FIFO with CRC16
// insertion. Random packets (five header words, 0..36 further words, a
// trailer) are streamed in with random gaps while the output side applies
// random back-pressure. Every output packet must equal its input except for
// bits 31:16 of control2 (CRC16 of header words 0..3) and of the trailer
// (CRC16 of the words between them), both worked out by a byte-wise
// reference. With no back-pressure a word must come out one cycle after it
// goes in, at one word per cycle; a full FIFO must hold the input off.
module ppe_sync_fifo_crc_tb;
  import ppe_pkg::*;
  import tb_crc_pkg::*;
  localparam int DEPTH = 64;
  logic        clk = 0, rst_n = 0, clr = 0;
  logic        s_valid = 0, s_last = 0, s_ready;
  logic [31:0] s_data = 0;
  logic        m_valid, m_last, m_ready = 0;
  logic [31:0] m_data;
  logic [32:0] exp_q [$];
  int          rand_ready = 1;
  int checks = 0, failures = 0;
  int npkts_out = 0;

  ppe_sync_fifo_crc #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // expected output of one packet
  task automatic send_pkt(input int nbody, input int gap_pct);
    logic [31:0] w [$];
    logic [31:0] hdr [$];
    logic [31:0] body [$];
    for (int i = 0; i < 5 + nbody + 1; i++) w.push_back($urandom);
    for (int i = 0; i < 4; i++) hdr.push_back(w[i]);
    for (int i = 5; i < 5 + nbody; i++) body.push_back(w[i]);
    foreach (w[i]) begin
      logic [31:0] e;
      e = w[i];
      if (i == 4) e[31:16] = ref_crc(hdr);
      if (i == w.size() - 1) e[31:16] = ref_crc(body);
      exp_q.push_back({i == w.size() - 1, e});
    end
    foreach (w[i]) begin
      while ($urandom_range(0, 99) < gap_pct) begin @(posedge clk); #1; end
      s_valid = 1; s_data = w[i]; s_last = (i == w.size() - 1);
      do @(posedge clk); while (!s_ready);
      #1 s_valid = 0; s_last = 0;
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && m_valid && m_ready) begin
      if (exp_q.size() == 0) check(0, "unexpected output word");
      else begin
        check({m_last, m_data} == exp_q[0], $sformatf("output word %h vs %h", {m_last, m_data}, exp_q[0]));
        void'(exp_q.pop_front());
      end
      if (m_last) npkts_out++;
    end
  end
  always @(negedge clk) m_ready <= rand_ready ? ($urandom_range(0, 3) != 0) : 1'b1;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int p = 0; p < 60; p++) send_pkt($urandom_range(0, 36), 30);
    wait (exp_q.size() == 0);
    check(npkts_out == 60, "all packets out");
    // latency and rate with the output always ready
    rand_ready = 0;
    @(posedge clk); #1;
    s_valid = 1; s_data = 32'h1234_0000; s_last = 0;
    exp_q.push_back({1'b0, 32'h1234_0000});
    @(posedge clk); #1;
    check(m_valid && m_data == 32'h1234_0000, "one-cycle latency");
    s_valid = 0;
    // finish that packet properly
    begin
      logic [31:0] h [$];
      logic [31:0] nb [$];
      h.push_back(32'h1234_0000);
      for (int i = 1; i < 4; i++) begin
        s_valid = 1; s_data = i; exp_q.push_back({1'b0, 32'(i)}); h.push_back(i);
        @(posedge clk); #1;
      end
      s_data = 0; exp_q.push_back({1'b0, ref_crc(h), 16'h0}); @(posedge clk); #1;
      s_data = 0; s_last = 1; exp_q.push_back({1'b1, ref_crc(nb), 16'h0}); @(posedge clk); #1;
      s_valid = 0; s_last = 0;
    end
    repeat (3) @(posedge clk);
    check(exp_q.size() == 0, "one word per cycle");
    // fill the FIFO with the output stalled: input must be held off
    rand_ready = 2;
    force m_ready = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      s_valid = 1; s_data = i; s_last = (i == DEPTH - 1);
      @(posedge clk); #1;
    end
    check(!s_ready, "full FIFO holds the input off");
    s_valid = 0;
    clr = 1; @(posedge clk); #1 clr = 0;
    check(!m_valid && s_ready, "clear empties the FIFO");
    release m_ready;
    exp_q.delete();
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
