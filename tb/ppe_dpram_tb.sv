// ppe_dpram_tb -- self-checking test of the dual-port RAM at the XMT_RAM size
// (8192 words). Both ports run independent random reads and writes against
// a reference array; every ack must come exactly one cycle after the request
// is raised, and read data must match the reference. Ports use disjoint
// halves of the address space so the reference is exact.
module ppe_dpram_tb;
  import ppe_pkg::*;
  localparam int WORDS = 8192;
  logic     clk = 0, rst_n = 0;
  mem_req_t a_req = '0, b_req = '0;
  mem_rsp_t a_rsp, b_rsp;
  logic [31:0] refm [WORDS];
  int checks = 0, failures = 0;

  ppe_dpram #(.WORDS(WORDS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic access_a(input bit we, input int idx, input logic [31:0] d);
    a_req = '{1'b1, we, 32'(idx) << 2, d};
    @(posedge clk); #1;
    check(a_rsp.ack, "port A ack one cycle after request");
    if (we) refm[idx] = d;
    else check(a_rsp.rdata == refm[idx], $sformatf("port A read %0d", idx));
    a_req = '0;
    @(posedge clk); #1;
    check(!a_rsp.ack, "port A single ack");
  endtask

  task automatic access_b(input bit we, input int idx, input logic [31:0] d);
    b_req = '{1'b1, we, 32'(idx) << 2, d};
    @(posedge clk); #1;
    check(b_rsp.ack, "port B ack one cycle after request");
    if (we) refm[idx] = d;
    else check(b_rsp.rdata == refm[idx], $sformatf("port B read %0d", idx));
    b_req = '0;
    @(posedge clk); #1;
  endtask

  initial begin
    for (int i = 0; i < WORDS; i++) refm[i] = 32'h0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    // initialise the words the test will read
    for (int i = 0; i < 64; i++) begin
      fork
        access_a(1, i, $urandom);
        access_b(1, WORDS - 1 - i, $urandom);
      join
    end
    for (int n = 0; n < 400; n++) begin
      fork
        access_a($urandom_range(0, 1) == 1, $urandom_range(0, 63), $urandom);
        access_b($urandom_range(0, 1) == 1, WORDS - 1 - $urandom_range(0, 63), $urandom);
      join
    end
    // a word written by one port is read back by the other
    access_a(1, 100, 32'hCAFE_F00D);
    access_b(0, 100, 0);
    access_b(1, 5000, 32'h1234_5678);
    access_a(0, 5000, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
