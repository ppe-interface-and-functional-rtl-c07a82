// ppe_notify -- notification engine.
//
// Posts one notification object per request. Requests come from NREQ
// sources (the sender's transmission-completion requests and the receive
// engine's message, ack and error requests); a requester holds note_valid
// and its note_req until note_ready pulses, and the sources are served round
// robin. Posting a notification with index i:
//   1. read the list-head table entry at NLHR + 8*i in the receiver RAM:
//      word 0 is head (the empty object at the end of list i), word 1 holds
//      token (bits 31:1) and enqueue (bit 0);
//   2. take a fresh empty object from the NBQR (waiting while it is empty);
//   3. write the three type-specific words to head+0, head+4, head+8 and,
//      when the request carries metadata, the four metadata words to
//      head+16..head+28, all in host memory;
//   4. write the fresh object's address into head+12 (the next field) --
//      always last, because software treats a non-zero next as "this
//      notification is complete";
//   5. write the fresh object's address back as the table entry's head;
//   6. when enqueue is set, push the token on the NQR (waiting while it is
//      full; entries are never dropped).
// This keeps every table entry pointing at an empty object at the tail of
// its list. The procedure is the specification's; the table entry layout
// (head first, then token/enqueue) follows its C structure. The token is
// pushed as the 31-bit token value, zero-extended; that is this design's
// reading of a 31-bit token in a 32-bit queue. Host writes are single words.
module ppe_notify
  import ppe_pkg::*;
#(
  parameter int unsigned NREQ = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [31:0]          nlhr,
  input  logic [NREQ-1:0]      note_valid,
  input  note_req_t [NREQ-1:0] note_req,
  output logic [NREQ-1:0]      note_ready,
  // receiver RAM port (note table)
  output mem_req_t             nr_req,
  input  mem_rsp_t             nr_rsp,
  // host memory write port
  output mem_req_t             nw_req,
  input  mem_rsp_t             nw_rsp,
  // NBQR (pop) and NQR (push)
  output logic                 nbqr_pop,
  input  logic [31:0]          nbqr_data,
  input  logic                 nbqr_empty,
  output logic                 nqr_push,
  output logic [31:0]          nqr_data,
  input  logic                 nqr_full,
  output logic                 busy
);
  localparam int unsigned IW = (NREQ > 1) ? $clog2(NREQ) : 1;

  typedef enum logic [3:0] {
    N_IDLE, N_RD_HEAD, N_RD_TOK, N_POP, N_W0, N_W1, N_W2, N_META,
    N_NEXT, N_WB_HEAD, N_NQR, N_ACK
  } state_e;

  state_e      st;
  logic [IW-1:0] src, last;
  note_req_t   rq;
  logic [31:0] head, tok, fresh;
  logic [1:0]  mi;
  logic [31:0] ent_addr;

  assign ent_addr = nlhr + (32'(rq.note_index) << 3);

  // round-robin choice among waiting sources
  logic [IW-1:0] pick;
  logic          found;
  int unsigned   idx;
  always_comb begin
    pick  = last;
    found = 1'b0;
    for (int unsigned k = 1; k <= NREQ; k++) begin
      idx = int'(last) + k;
      if (idx >= NREQ) idx = idx - NREQ;
      if (!found && note_valid[idx]) begin
        pick  = IW'(idx);
        found = 1'b1;
      end
    end
  end

  always_comb begin
    nr_req = '0;
    nw_req = '0;
    unique case (st)
      N_RD_HEAD: nr_req = '{1'b1, 1'b0, ent_addr, 32'h0};
      N_RD_TOK:  nr_req = '{1'b1, 1'b0, ent_addr + 32'd4, 32'h0};
      N_W0:      nw_req = '{1'b1, 1'b1, head, rq.w0};
      N_W1:      nw_req = '{1'b1, 1'b1, head + 32'd4, rq.w1};
      N_W2:      nw_req = '{1'b1, 1'b1, head + 32'd8, rq.w2};
      N_META:    nw_req = '{1'b1, 1'b1, head + 32'd16 + (32'(mi) << 2), rq.meta[mi]};
      N_NEXT:    nw_req = '{1'b1, 1'b1, head + 32'd12, fresh};
      N_WB_HEAD: nr_req = '{1'b1, 1'b1, ent_addr, fresh};
      default: ;
    endcase
  end

  assign nbqr_pop = (st == N_POP) && !nbqr_empty;
  assign nqr_push = (st == N_NQR) && !nqr_full;
  assign nqr_data = {1'b0, tok[31:1]};
  assign busy     = (st != N_IDLE);

  always_comb begin
    note_ready = '0;
    if (st == N_ACK) note_ready[src] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= N_IDLE;
      src   <= '0;
      last  <= IW'(NREQ - 1);
      rq    <= '0;
      head  <= '0;
      tok   <= '0;
      fresh <= '0;
      mi    <= '0;
    end else begin
      unique case (st)
        N_IDLE: if (found) begin
          src <= pick;
          rq  <= note_req[pick];
          st  <= N_RD_HEAD;
        end
        N_RD_HEAD: if (nr_rsp.ack) begin head <= nr_rsp.rdata; st <= N_RD_TOK; end
        N_RD_TOK:  if (nr_rsp.ack) begin tok  <= nr_rsp.rdata; st <= N_POP; end
        N_POP: if (!nbqr_empty) begin
          fresh <= nbqr_data;
          st    <= N_W0;
        end
        N_W0: if (nw_rsp.ack) st <= N_W1;
        N_W1: if (nw_rsp.ack) st <= N_W2;
        N_W2: if (nw_rsp.ack) begin
          mi <= '0;
          st <= rq.has_meta ? N_META : N_NEXT;
        end
        N_META: if (nw_rsp.ack) begin
          mi <= mi + 1'b1;
          if (mi == 2'd3) st <= N_NEXT;
        end
        N_NEXT:    if (nw_rsp.ack) st <= N_WB_HEAD;
        N_WB_HEAD: if (nr_rsp.ack) st <= tok[0] ? N_NQR : N_ACK;
        N_NQR:     if (!nqr_full) st <= N_ACK;
        N_ACK: begin
          last <= src;
          st   <= N_IDLE;
        end
        default: st <= N_IDLE;
      endcase
    end
  end

  // A request is acknowledged only to the source that is being served.
  a_ready_onehot: assert property (@(posedge clk) disable iff (!rst_n)
                                   $onehot0(note_ready) && ((note_ready & ~note_valid) == '0));
endmodule
