// tb_host_mem -- behavioural memory answering the PPE req/ack bundle, used by
// the testbenches as host main memory or as a stand-in for a PPE RAM.
// Storage is sparse (an associative array keyed by byte address); unwritten
// words read as zero. A request is acknowledged LAT cycles after it appears
// (LAT >= 1). Every write address is appended to wlog so tests can check the
// order of writes. poke/peek give the testbench direct access.
module tb_host_mem
  import ppe_pkg::*;
#(
  parameter int LAT = 2
) (
  input  logic     clk,
  input  mem_req_t req,
  output mem_rsp_t rsp
);
  logic [31:0] mem [logic [31:0]];
  logic [31:0] wlog [$];
  int          cnt;
  int          nreads;

  initial begin
    rsp    = '0;
    cnt    = 0;
    nreads = 0;
  end

  always @(posedge clk) begin
    rsp.ack <= 1'b0;
    if (req.req && !rsp.ack) begin
      if (cnt + 1 >= LAT) begin
        cnt     <= 0;
        rsp.ack <= 1'b1;
        if (req.we) begin
          mem[req.addr] = req.wdata;
          wlog.push_back(req.addr);
        end else nreads <= nreads + 1;
        rsp.rdata <= mem.exists(req.addr) ? mem[req.addr] : 32'h0;
      end else cnt <= cnt + 1;
    end
  end

  function automatic void poke(input logic [31:0] a, input logic [31:0] d);
    mem[a] = d;
  endfunction

  function automatic logic [31:0] peek(input logic [31:0] a);
    return mem.exists(a) ? mem[a] : 32'h0;
  endfunction
endmodule
