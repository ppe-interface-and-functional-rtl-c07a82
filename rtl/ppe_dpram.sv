// ppe_dpram -- true dual-port word RAM with the req/ack access bundle.
//
// Used twice: as the sender dual-port RAM (XMT_RAM, 32 KB: send descriptors
// at 0x0000-0x00FC, DIO buffers above) and as the receiver dual-port RAM
// (RCV_RAM, 64 KB: rslots, notification list heads table and the received
// packet buffer at 0xFF00-0xFFFC). Port A serves the host register interface,
// port B the PPE's engines. Each port takes a request held on req and
// answers one cycle later with ack; for a read, rdata is valid in that ack
// cycle. A port therefore completes one access every two cycles. Addresses
// are byte addresses; bits above the RAM size are ignored. When both ports
// write the same word in the same cycle, port B wins. The sizes come from the
// specification's memory maps; the access timing is this design's own.
module ppe_dpram
  import ppe_pkg::*;
#(
  parameter int unsigned WORDS = 8192
) (
  input  logic     clk,
  input  logic     rst_n,
  input  mem_req_t a_req,
  output mem_rsp_t a_rsp,
  input  mem_req_t b_req,
  output mem_rsp_t b_rsp
);
  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0]   mem [WORDS];
  logic [AW-1:0] a_idx, b_idx;
  logic          a_go, b_go;
  logic          a_ack, b_ack;
  logic [31:0]   a_rd, b_rd;

  assign a_rsp = '{ack: a_ack, rdata: a_rd};
  assign b_rsp = '{ack: b_ack, rdata: b_rd};

  assign a_idx = a_req.addr[AW+1:2];
  assign b_idx = b_req.addr[AW+1:2];
  assign a_go  = a_req.req && !a_ack;
  assign b_go  = b_req.req && !b_ack;

  always_ff @(posedge clk) begin
    if (a_go && a_req.we) mem[a_idx] <= a_req.wdata;
    if (b_go && b_req.we) mem[b_idx] <= b_req.wdata;
    if (a_go) a_rd <= mem[a_idx];
    if (b_go) b_rd <= mem[b_idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_ack <= 1'b0;
      b_ack <= 1'b0;
    end else begin
      a_ack <= a_go;
      b_ack <= b_go;
    end
  end
endmodule
