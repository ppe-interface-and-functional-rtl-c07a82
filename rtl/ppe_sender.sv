// ppe_sender -- packetizer that serves the send descriptor sets.
//
// The send descriptors live in XMT_RAM (16 words each, descriptor d at byte
// 0x40*d). The sender visits them round robin and injects at most one packet
// per active descriptor per visit, which gives each active descriptor a fair
// share of the fabric. A descriptor is active when go is set and done is
// clear in its control1/status2 words.
//
// One packet: read msg_address, address0, address1, control0 and status1;
// write status2 with busy set and stalled clear; stream the header
// (address0, address1 with src_node spliced in, control0, control1, and a
// control2 word whose checksum half is filled in downstream), then the four
// metadata words if meta_data is set and this is the first packet of the
// message, then up to MAX_PKT_WORDS payload words, then the trailer word
// whose checksum half is also filled in downstream. Payload words come from
// XMT_RAM in DIO mode (direct_io set) or from host memory through the
// host-memory master port in DMA mode, from monotonically increasing
// addresses. A control packet (control_pkt) carries no payload whatever its
// msg_size. After the trailer the sender writes back msg_address (+bytes
// sent), control0 (offset +bytes sent, use_msg_size/use_msg_offset cleared),
// status1.bytes_to_go (-bytes sent) and status2 (busy clear, done when
// nothing is left or for a control packet, stalled when the packet had to
// wait for the fabric and the message is not done). When done is set and
// notify was set, a transmission-completion notification is requested with
// the descriptor's note_index cut to 9 bits. A transmission-completion object
// carries no type-specific information, so its three words (and the unused
// metadata fields of the request) are constant zero.
//
// go_set[d] (from the register block, when the host sets go) makes the sender
// load bytes_to_go from msg_size and clear busy, stalled and done in that
// descriptor before it is next visited; this reload is this design's way of
// starting a message. After reset (or PCSR0.reset) the sender first writes
// every status2 to done (busy and stalled clear) and then raises init_done.
// No new packet is started while enable is low; a packet under way is
// finished. A packet's first word is its header; the sender treats the
// message as on its first packet when bytes_to_go equals msg_size.
module ppe_sender
  import ppe_pkg::*;
#(
  parameter int unsigned NUM_SD        = 4,
  parameter int unsigned MAX_PKT_WORDS = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  logic [15:0]       local_node_num,
  input  logic [NUM_SD-1:0] go_set,
  // XMT_RAM engine port
  output mem_req_t          xb_req,
  input  mem_rsp_t          xb_rsp,
  // host memory (DMA read) port
  output mem_req_t          hm_req,
  input  mem_rsp_t          hm_rsp,
  // packet stream towards the sync FIFO
  output logic              tx_valid,
  output logic [31:0]       tx_data,
  output logic              tx_last,
  input  logic              tx_ready,
  // transmission completion notification request
  output logic              note_valid,
  output note_req_t         note_req,
  input  logic              note_ready,
  output logic              init_done,
  output logic              busy
);
  localparam int unsigned DW = (NUM_SD > 1) ? $clog2(NUM_SD) : 1;
  localparam logic [23:0] MAX_BYTES = 24'(MAX_PKT_WORDS * 4);

  typedef enum logic [4:0] {
    S_INIT, S_SCAN, S_GO_RD, S_GO_W1, S_GO_W2,
    S_RD_CTL1, S_RD_ST2, S_RD_DESC, S_RD_META, S_SET_BUSY,
    S_HDR, S_META, S_FETCH, S_PUSH, S_TRL,
    S_WB_ADDR, S_WB_CTL0, S_WB_ST1, S_WB_ST2, S_NOTE, S_NEXT
  } state_e;

  state_e         st;
  logic [DW-1:0]  cur, go_d;
  logic [NUM_SD-1:0] go_pend;
  logic [3:0]     widx;            // word index inside a multi-word access
  logic [5:0]     pidx;            // payload word index
  logic [2:0]     hidx;            // header word index

  // descriptor copy
  logic [31:0]    msg_addr;
  pkt_addr0_t     addr0;
  sd_addr1_t      addr1;
  pkt_ctl0_t      ctl0;
  sd_status1_t    st1;
  sd_ctl1_t       ctl1;
  logic [3:0][31:0] meta;
  logic           send_meta;
  logic [23:0]    nbytes;
  logic [5:0]     nwords;
  logic [31:0]    pay_word;
  logic           stall_seen;
  logic           done_now;

  logic [31:0]    sd_base;
  sd_ctl1_t       rd_ctl1;
  sd_status1_t    rd_st1;
  sd_status2_t    rd_st2;
  assign rd_ctl1 = xb_rsp.rdata;
  assign rd_st1  = xb_rsp.rdata;
  assign rd_st2  = xb_rsp.rdata;
  assign sd_base = 32'(cur) << 6;

  function automatic logic [31:0] sd_word(input logic [DW-1:0] d, input logic [3:0] w);
    return (32'(d) << 6) | (32'(w) << 2);
  endfunction

  // current header word
  logic [31:0] hdr_word;
  always_comb begin
    pkt_addr1_t a1;
    pkt_ctl1_t  c1;
    a1 = '{dst_slot: addr1.dst_slot, src_node: local_node_num[11:0], reserved: 4'h0};
    c1 = '{reserved: 4'h0, meta_data_flag: send_meta, meta_len: ctl1.meta_cnt,
           msg_size: ctl1.msg_size};
    unique case (hidx)
      3'd0:    hdr_word = addr0;
      3'd1:    hdr_word = a1;
      3'd2:    hdr_word = ctl0;
      3'd3:    hdr_word = c1;
      default: hdr_word = 32'h0;          // control2: checksum inserted downstream
    endcase
  end

  // RAM / host requests and stream outputs
  always_comb begin
    xb_req   = '0;
    hm_req   = '0;
    tx_valid = 1'b0;
    tx_data  = '0;
    tx_last  = 1'b0;
    unique case (st)
      S_INIT:    xb_req = '{1'b1, 1'b1, sd_word(cur, SD_STATUS2), 32'h2000_0000};
      S_GO_RD:   xb_req = '{1'b1, 1'b0, sd_word(go_d, SD_CTL1), 32'h0};
      S_GO_W1:   xb_req = '{1'b1, 1'b1, sd_word(go_d, SD_STATUS1), {8'h0, ctl1.msg_size}};
      S_GO_W2:   xb_req = '{1'b1, 1'b1, sd_word(go_d, SD_STATUS2), 32'h0};
      S_RD_CTL1: xb_req = '{1'b1, 1'b0, sd_word(cur, SD_CTL1), 32'h0};
      S_RD_ST2:  xb_req = '{1'b1, 1'b0, sd_word(cur, SD_STATUS2), 32'h0};
      S_RD_DESC: xb_req = '{1'b1, 1'b0, sd_base | (32'(widx) << 2), 32'h0};
      S_RD_META: xb_req = '{1'b1, 1'b0, sd_base | (32'(SD_META + widx) << 2), 32'h0};
      S_SET_BUSY: xb_req = '{1'b1, 1'b1, sd_word(cur, SD_STATUS2), 32'h8000_0000};
      S_HDR: begin
        tx_valid = 1'b1;
        tx_data  = hdr_word;
      end
      S_META: begin
        tx_valid = 1'b1;
        tx_data  = meta[widx[1:0]];
      end
      S_FETCH: begin
        if (ctl1.direct_io) xb_req = '{1'b1, 1'b0, msg_addr + (32'(pidx) << 2), 32'h0};
        else                hm_req = '{1'b1, 1'b0, msg_addr + (32'(pidx) << 2), 32'h0};
      end
      S_PUSH: begin
        tx_valid = 1'b1;
        tx_data  = pay_word;
      end
      S_TRL: begin
        tx_valid = 1'b1;
        tx_last  = 1'b1;
      end
      S_WB_ADDR: xb_req = '{1'b1, 1'b1, sd_word(cur, SD_MSG_ADDR), msg_addr + 32'(nbytes)};
      S_WB_CTL0: xb_req = '{1'b1, 1'b1, sd_word(cur, SD_CTL0),
                            {2'b00, ctl0.ack_pkt, ctl0.reserved, ctl0.incarnation,
                             ctl0.remote_offset + nbytes}};
      S_WB_ST1:  xb_req = '{1'b1, 1'b1, sd_word(cur, SD_STATUS1),
                            {8'h0, ctl1.control_pkt ? 24'h0 : st1.bytes_to_go - nbytes}};
      S_WB_ST2:  xb_req = '{1'b1, 1'b1, sd_word(cur, SD_STATUS2),
                            {1'b0, stall_seen && !done_now, done_now, 29'h0}};
      default: ;
    endcase
  end

  assign done_now   = ctl1.control_pkt || (st1.bytes_to_go == nbytes);
  assign note_valid = (st == S_NOTE);
  assign note_req   = '{note_index: {7'h0, addr1.note_index[8:0]}, w0: 32'h0, w1: 32'h0,
                        w2: 32'h0, has_meta: 1'b0, meta: '0};
  assign busy       = !(st == S_SCAN || st == S_RD_CTL1 || st == S_RD_ST2 ||
                        st == S_INIT || st == S_NEXT);

  // index of the lowest pending go event
  logic [DW-1:0] go_first;
  always_comb begin
    go_first = '0;
    for (int i = NUM_SD - 1; i >= 0; i--)
      if (go_pend[i]) go_first = DW'(i);
  end

  logic [NUM_SD-1:0] go_clr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) go_pend <= '0;
    else        go_pend <= (go_pend & ~go_clr) | go_set;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= S_INIT;
      cur        <= '0;
      go_d       <= '0;
      widx       <= '0;
      pidx       <= '0;
      hidx       <= '0;
      msg_addr   <= '0;
      addr0      <= '0;
      addr1      <= '0;
      ctl0       <= '0;
      st1        <= '0;
      ctl1       <= '0;
      meta       <= '0;
      send_meta  <= 1'b0;
      nbytes     <= '0;
      nwords     <= '0;
      pay_word   <= '0;
      stall_seen <= 1'b0;
      init_done  <= 1'b0;
      go_clr     <= '0;
    end else begin
      go_clr <= '0;
      if (tx_valid && !tx_ready) stall_seen <= 1'b1;
      unique case (st)
        S_INIT: if (xb_rsp.ack) begin
          if (32'(cur) == NUM_SD - 1) begin
            cur       <= '0;
            init_done <= 1'b1;
            st        <= S_SCAN;
          end else cur <= cur + 1'b1;
        end
        S_SCAN: begin
          if (|(go_pend & ~go_clr)) begin
            go_d   <= go_first;
            go_clr <= NUM_SD'(1) << go_first;
            st     <= S_GO_RD;
          end else if (enable) st <= S_RD_CTL1;
        end
        S_GO_RD: if (xb_rsp.ack) begin
          ctl1 <= xb_rsp.rdata;
          st   <= S_GO_W1;
        end
        S_GO_W1: if (xb_rsp.ack) st <= S_GO_W2;
        S_GO_W2: if (xb_rsp.ack) st <= S_SCAN;
        S_RD_CTL1: if (xb_rsp.ack) begin
          ctl1 <= xb_rsp.rdata;
          st   <= rd_ctl1.go ? S_RD_ST2 : S_NEXT;
        end
        S_RD_ST2: if (xb_rsp.ack) begin
          widx <= '0;
          st   <= rd_st2.done ? S_NEXT : S_RD_DESC;
        end
        S_RD_DESC: if (xb_rsp.ack) begin
          unique case (widx)
            4'd0: msg_addr <= xb_rsp.rdata;
            4'd1: addr0    <= xb_rsp.rdata;
            4'd2: addr1    <= xb_rsp.rdata;
            4'd3: ctl0     <= xb_rsp.rdata;
            default: st1   <= xb_rsp.rdata;
          endcase
          if (widx == 4'd4) begin
            widx <= '0;
            // first packet of the message carries the metadata
            send_meta <= ctl1.meta_data &&
                         (rd_st1.bytes_to_go == ctl1.msg_size);
            if (ctl1.control_pkt) nbytes <= 24'h0;
            else if (rd_st1.bytes_to_go > MAX_BYTES) nbytes <= MAX_BYTES;
            else nbytes <= {rd_st1.bytes_to_go[23:2], 2'b00};
            st <= (ctl1.meta_data &&
                   rd_st1.bytes_to_go == ctl1.msg_size) ? S_RD_META
                                                                               : S_SET_BUSY;
          end else widx <= widx + 1'b1;
        end
        S_RD_META: if (xb_rsp.ack) begin
          meta[widx[1:0]] <= xb_rsp.rdata;
          if (widx == 4'd3) begin
            widx <= '0;
            st   <= S_SET_BUSY;
          end else widx <= widx + 1'b1;
        end
        S_SET_BUSY: if (xb_rsp.ack) begin
          nwords     <= nbytes[7:2];
          hidx       <= '0;
          pidx       <= '0;
          widx       <= '0;
          stall_seen <= 1'b0;
          st         <= S_HDR;
        end
        S_HDR: if (tx_ready) begin
          if (hidx == 3'd4) begin
            hidx <= '0;
            if (send_meta)          st <= S_META;
            else if (nwords != '0)  st <= S_FETCH;
            else                    st <= S_TRL;
          end else hidx <= hidx + 1'b1;
        end
        S_META: if (tx_ready) begin
          if (widx == 4'd3) begin
            widx <= '0;
            st   <= (nwords != '0) ? S_FETCH : S_TRL;
          end else widx <= widx + 1'b1;
        end
        S_FETCH: if (ctl1.direct_io ? xb_rsp.ack : hm_rsp.ack) begin
          pay_word <= ctl1.direct_io ? xb_rsp.rdata : hm_rsp.rdata;
          st       <= S_PUSH;
        end
        S_PUSH: if (tx_ready) begin
          if (pidx == nwords - 1'b1) st <= S_TRL;
          else begin
            pidx <= pidx + 1'b1;
            st   <= S_FETCH;
          end
        end
        S_TRL:     if (tx_ready) st <= S_WB_ADDR;
        S_WB_ADDR: if (xb_rsp.ack) st <= S_WB_CTL0;
        S_WB_CTL0: if (xb_rsp.ack) st <= S_WB_ST1;
        S_WB_ST1:  if (xb_rsp.ack) st <= S_WB_ST2;
        S_WB_ST2:  if (xb_rsp.ack) st <= (done_now && ctl1.notify) ? S_NOTE : S_NEXT;
        S_NOTE:    if (note_ready) st <= S_NEXT;
        S_NEXT: begin
          cur <= (32'(cur) == NUM_SD - 1) ? '0 : cur + 1'b1;
          st  <= S_SCAN;
        end
        default: st <= S_SCAN;
      endcase
    end
  end

  // A stream word, once offered, stays until the fabric side takes it.
  a_tx_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                tx_valid && !tx_ready |=> tx_valid && $stable(tx_data));
endmodule
