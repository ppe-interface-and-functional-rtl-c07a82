// ppe_copy -- receive-side validation, reassembly copy and message completion
// ("Copy (reassy)").
//
// For each packet presented by ppe_rcv_pkt the engine runs the
// specification's packet-reception checks in order and stops at the first
// that fails, which makes the packet an error packet:
//   header checksum, body checksum, dst_node == PCSR0.local_node_num (12 bits),
//   dst_slot < NUM_RSLOTS, then it reads the 8-word rslot at dst_slot*32 of
//   the receiver RAM and checks rslot.valid and incarnation == PCSR0.incarnation.
// An ack packet (ack_pkt set) then posts a message-received notification on
// the rslot's ack_note_index with the header's remote_offset and msg_size
// and ack_pkt = 1, and leaves the rslot untouched. Any other packet is range
// checked (remote_offset > buffer_size, remote_offset + packet bytes >
// buffer_size), its payload is copied word by word from the packet buffer to
// host memory at buffer_base_phys + remote_offset, and the rslot is updated:
// use_msg_size stores msg_size and adds it to bytes_to_go, use_msg_offset
// stores remote_offset as msg_offset, and bytes_to_go is reduced by the
// packet's bytes and always written back. When bytes_to_go reaches zero the
// message is complete: with do_acks the rslot index is pushed on the AQR
// (stalling while it is full), with notify a message-received notification
// (Figure 11 layout, ack_pkt = 0) is posted on the rslot's note_index. An
// error packet posts an error notification (Figure 12 layout) on note_index 0.
//
// Choices of this design: the checks stop at the first failure and set one
// error bit; the ack_pkt flag of a notification sits in bit 29 of its control0
// word, where the packet header keeps it; the metadata of a message reaches
// its notification only when it arrived in the packet that completes the
// message (the rslot has no room to keep it); a packet too long for the
// buffer counts as bad_size. pkt_done is pulsed for one cycle when the engine
// is finished with the packet buffer.
module ppe_copy
  import ppe_pkg::*;
#(
  parameter int unsigned NUM_RSLOTS = 1024
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [15:0]      local_node_num,
  input  logic [3:0]       incarnation,
  // packet from ppe_rcv_pkt
  input  logic             pkt_valid,
  input  logic [3:0][31:0] pkt_hdr,
  input  logic [3:0][31:0] pkt_meta,
  input  logic [5:0]       pkt_words,
  input  logic             pkt_hdr_ok,
  input  logic             pkt_body_ok,
  input  logic             pkt_too_long,
  output logic             pkt_done,
  // receiver RAM port
  output mem_req_t         cr_req,
  input  mem_rsp_t         cr_rsp,
  // host memory write port
  output mem_req_t         hw_req,
  input  mem_rsp_t         hw_rsp,
  // AQR
  output logic             aqr_push,
  output logic [31:0]      aqr_data,
  input  logic             aqr_full,
  // notification request
  output logic             note_valid,
  output note_req_t        note_req,
  input  logic             note_ready,
  output logic             busy
);
  typedef enum logic [3:0] {
    C_IDLE, C_CHECK, C_RD_RS, C_RS_CHECK, C_CRD, C_HWR,
    C_WB_BTG, C_WB_SIZE, C_WB_OFF, C_AQR, C_NOTE, C_DONE
  } state_e;

  state_e         st;
  logic [2:0]     ri;
  logic [5:0]     pi;
  logic [31:0]    rs [8];
  logic [31:0]    word_q;
  err_status_t    err;
  logic [31:0]    new_btg, new_size, new_off;
  logic           complete;

  pkt_addr0_t     a0;
  pkt_addr1_t     a1;
  pkt_ctl0_t      c0;
  pkt_ctl1_t      c1;
  rs_note_ctl_t   nc;
  logic [31:0]    rs_addr;
  logic [31:0]    nbytes;

  assign a0      = pkt_hdr[0];
  assign a1      = pkt_hdr[1];
  assign c0      = pkt_hdr[2];
  assign c1      = pkt_hdr[3];
  assign nc      = rs[RS_NOTE_CTL];
  assign rs_addr = 32'(a1.dst_slot) << 5;
  assign nbytes  = 32'(pkt_words) << 2;

  // ---------------------------------------------------------------- requests
  always_comb begin
    cr_req = '0;
    hw_req = '0;
    unique case (st)
      C_RD_RS:   cr_req = '{1'b1, 1'b0, rs_addr | (32'(ri) << 2), 32'h0};
      C_CRD:     cr_req = '{1'b1, 1'b0, {16'h0, RCV_PKT_PAY} + (32'(pi) << 2), 32'h0};
      C_HWR:     hw_req = '{1'b1, 1'b1, rs[RS_BASE] + 32'(c0.remote_offset) + (32'(pi) << 2),
                            word_q};
      C_WB_BTG:  cr_req = '{1'b1, 1'b1, rs_addr | (32'(RS_BTG) << 2), new_btg};
      C_WB_SIZE: cr_req = '{1'b1, 1'b1, rs_addr | (32'(RS_MSG_SIZE) << 2), new_size};
      C_WB_OFF:  cr_req = '{1'b1, 1'b1, rs_addr | (32'(RS_MSG_OFF) << 2), new_off};
      default: ;
    endcase
  end

  // rslot update values
  always_comb begin
    new_size = c0.use_msg_size   ? 32'(c1.msg_size)      : rs[RS_MSG_SIZE];
    new_off  = c0.use_msg_offset ? 32'(c0.remote_offset) : rs[RS_MSG_OFF];
    new_btg  = rs[RS_BTG] + (c0.use_msg_size ? 32'(c1.msg_size) : 32'h0) - nbytes;
  end

  // ------------------------------------------------------- notification words
  typedef enum logic [1:0] {N_MSG, N_ACK, N_ERR} nkind_e;
  nkind_e nkind;
  always_comb begin
    note_req          = '0;
    note_req.has_meta = 1'b0;
    unique case (nkind)
      N_MSG: begin
        note_req.note_index = nc.note_index;
        note_req.w0 = {a1.dst_slot, a1.src_node, 4'h0};
        note_req.w1 = {4'h0, c0.incarnation, rs[RS_MSG_OFF][23:0]};
        note_req.w2 = {4'h0, c1.meta_data_flag, c1.meta_len, rs[RS_MSG_SIZE][23:0]};
        note_req.has_meta = c1.meta_data_flag;
        note_req.meta     = pkt_meta;
      end
      N_ACK: begin
        note_req.note_index = rs[RS_ACK_NOTE][31:16];
        note_req.w0 = {a1.dst_slot, a1.src_node, 4'h0};
        note_req.w1 = {4'b0010, c0.incarnation, c0.remote_offset};
        note_req.w2 = {4'h0, c1.meta_data_flag, c1.meta_len, c1.msg_size};
        note_req.has_meta = c1.meta_data_flag;
        note_req.meta     = pkt_meta;
      end
      default: begin
        note_req.note_index = 16'h0;
        note_req.w0 = {a1.dst_slot, err};
        note_req.w1 = 32'h0;
        note_req.w2 = {4'h0, a0.dst_node, 4'h0, a1.src_node};
      end
    endcase
  end

  assign note_valid = (st == C_NOTE);
  assign aqr_push   = (st == C_AQR) && !aqr_full;
  assign aqr_data   = 32'(a1.dst_slot);
  assign busy       = (st != C_IDLE);

  // ------------------------------------------------------------------- FSM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= C_IDLE;
      ri       <= '0;
      pi       <= '0;
      word_q   <= '0;
      err      <= '0;
      nkind    <= N_MSG;
      complete <= 1'b0;
      pkt_done <= 1'b0;
      for (int i = 0; i < 8; i++) rs[i] <= '0;
    end else begin
      pkt_done <= 1'b0;
      unique case (st)
        C_IDLE: if (pkt_valid && !pkt_done) st <= C_CHECK;
        C_CHECK: begin
          err   <= '0;
          nkind <= N_ERR;
          ri    <= '0;
          if (!pkt_hdr_ok)                          begin err.bad_hdr_chksum  <= 1'b1; st <= C_NOTE; end
          else if (!pkt_body_ok)                    begin err.bad_body_chksum <= 1'b1; st <= C_NOTE; end
          else if (a0.dst_node != local_node_num[11:0]) begin err.bad_dst_node <= 1'b1; st <= C_NOTE; end
          else if (32'(a1.dst_slot) >= NUM_RSLOTS)  begin err.rslot_range     <= 1'b1; st <= C_NOTE; end
          else st <= C_RD_RS;
        end
        C_RD_RS: if (cr_rsp.ack) begin
          rs[ri] <= cr_rsp.rdata;
          ri     <= ri + 1'b1;
          if (ri == 3'd7) st <= C_RS_CHECK;
        end
        C_RS_CHECK: begin
          pi <= '0;
          if (!nc.valid)                        begin err.invalid_rslot   <= 1'b1; st <= C_NOTE; end
          else if (c0.incarnation != incarnation) begin err.bad_incarnation <= 1'b1; st <= C_NOTE; end
          else if (c0.ack_pkt)                  begin nkind <= N_ACK; st <= C_NOTE; end
          else if (32'(c0.remote_offset) > rs[RS_SIZE]) begin err.bad_offset <= 1'b1; st <= C_NOTE; end
          else if (pkt_too_long ||
                   32'(c0.remote_offset) + nbytes > rs[RS_SIZE]) begin err.bad_size <= 1'b1; st <= C_NOTE; end
          else st <= (pkt_words != '0) ? C_CRD : C_WB_BTG;
        end
        C_CRD: if (cr_rsp.ack) begin
          word_q <= cr_rsp.rdata;
          st     <= C_HWR;
        end
        C_HWR: if (hw_rsp.ack) begin
          if (pi == pkt_words - 1'b1) st <= C_WB_BTG;
          else begin
            pi <= pi + 1'b1;
            st <= C_CRD;
          end
        end
        C_WB_BTG: if (cr_rsp.ack) begin
          rs[RS_BTG] <= new_btg;
          complete   <= (new_btg == 32'h0);
          st         <= C_WB_SIZE;
        end
        C_WB_SIZE: if (cr_rsp.ack) begin
          rs[RS_MSG_SIZE] <= new_size;
          st              <= C_WB_OFF;
        end
        C_WB_OFF: if (cr_rsp.ack) begin
          rs[RS_MSG_OFF] <= new_off;
          nkind          <= N_MSG;
          if (!complete)       st <= C_DONE;
          else if (nc.do_acks) st <= C_AQR;
          else if (nc.notify)  st <= C_NOTE;
          else                 st <= C_DONE;
        end
        C_AQR: if (!aqr_full) st <= nc.notify ? C_NOTE : C_DONE;
        C_NOTE: if (note_ready) st <= C_DONE;
        C_DONE: begin
          pkt_done <= 1'b1;
          st       <= C_IDLE;
        end
        default: st <= C_IDLE;
      endcase
    end
  end
endmodule
