// ppe_mem_arb -- round-robin arbiter that shares one req/ack target among N
// requesters.
//
// Used in front of the receiver RAM's engine port (packet writer, copy
// engine, notification engine) and in front of the host-memory master port
// (sender DMA reads, copy engine writes, notification writes). The arbiter
// picks the next requesting client after the one served last, forwards its
// request unchanged and locks onto it until the target acks; the ack and
// read data are routed back to that client only. A target that acks in the
// same cycle is also handled. The specification asks only for fairness
// between send descriptors; this arbiter's policy is this design's choice.
module ppe_mem_arb
  import ppe_pkg::*;
#(
  parameter int unsigned N = 3
) (
  input  logic               clk,
  input  logic               rst_n,
  input  mem_req_t [N-1:0]   c_req,
  output mem_rsp_t [N-1:0]   c_rsp,
  output mem_req_t           m_req,
  input  mem_rsp_t           m_rsp
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last, owner, pick, cur;
  logic          locked, found;
  int unsigned   idx;

  always_comb begin
    pick  = last;
    found = 1'b0;
    for (int unsigned k = 1; k <= N; k++) begin
      idx = int'(last) + k;
      if (idx >= N) idx = idx - N;
      if (!found && c_req[idx].req) begin
        pick  = IW'(idx);
        found = 1'b1;
      end
    end
    cur   = locked ? owner : pick;
    m_req = '0;
    if (locked || found) m_req = c_req[cur];
    for (int unsigned i = 0; i < N; i++) begin
      c_rsp[i].ack   = m_rsp.ack && (locked || found) && (cur == IW'(i));
      c_rsp[i].rdata = m_rsp.rdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked <= 1'b0;
      owner  <= '0;
      last   <= IW'(N - 1);
    end else if (m_rsp.ack) begin
      locked <= 1'b0;
      last   <= cur;
    end else if (m_req.req && !locked) begin
      locked <= 1'b1;
      owner  <= cur;
    end
  end
endmodule
