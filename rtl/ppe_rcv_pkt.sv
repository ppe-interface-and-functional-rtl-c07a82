// ppe_rcv_pkt -- receive packet writer ("RCV Pkt").
//
// Accepts one packet at a time from the fabric receive stream (valid/ready,
// last on the trailer word) and deposits it in the receiver RAM packet
// buffer: header words address0..control1 at 0xFF00-0xFF0C, the four
// metadata words (when control1.meta_data_flag is set) at 0xFF10-0xFF1C and
// the payload at 0xFF80-0xFFFC (at most 32 words). control2 and the trailer
// are not stored. While the packet streams in, the block recomputes the
// header CRC16 (over header words 0..3) and the body CRC16 (over everything
// between control2 and the trailer) and compares them with hdr_checksum and
// pkt_checksum. When the trailer has arrived it presents the header, the
// metadata, the payload word count and the check results on pkt_* and holds
// them until the copy engine pulses pkt_done; only then is the next packet
// accepted. A payload longer than 32 words sets too_long and the excess is
// not stored. A new packet is accepted only while enable is set; one under
// way is finished. Each stored word costs one receiver RAM write, so the
// stream is throttled to the RAM's pace. Buffer addresses come from the
// specification's receiver memory map; the stream framing is this design's.
module ppe_rcv_pkt
  import ppe_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  // fabric receive stream
  input  logic             rx_valid,
  input  logic [31:0]      rx_data,
  input  logic             rx_last,
  output logic             rx_ready,
  // receiver RAM port
  output mem_req_t         rp_req,
  input  mem_rsp_t         rp_rsp,
  // packet to the copy engine
  output logic             pkt_valid,
  output logic [3:0][31:0] pkt_hdr,
  output logic [3:0][31:0] pkt_meta,
  output logic [5:0]       pkt_words,
  output logic             pkt_hdr_ok,
  output logic             pkt_body_ok,
  output logic             pkt_too_long,
  input  logic             pkt_done,
  output logic             busy
);
  typedef enum logic [1:0] {R_WAIT, R_WR, R_FULL} state_e;

  state_e      st;
  logic [4:0]  widx;          // saturates at 9: "past header and metadata"
  logic [15:0] hcrc, dcrc;
  logic [31:0] held;
  logic        held_v;
  logic        in_pkt;
  logic        wr_last;
  logic [31:0] wr_addr, wr_data;
  logic        has_meta;

  assign rx_ready  = (st == R_WAIT) && (in_pkt || enable);
  assign rp_req    = '{req: st == R_WR, we: 1'b1, addr: wr_addr, wdata: wr_data};
  assign pkt_valid = (st == R_FULL);
  assign busy      = in_pkt || (st != R_WAIT);
  assign has_meta  = pkt_hdr[3][27];   // control1.meta_data_flag

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st           <= R_WAIT;
      widx         <= '0;
      hcrc         <= CRC16_INIT;
      dcrc         <= CRC16_INIT;
      held         <= '0;
      held_v       <= 1'b0;
      in_pkt       <= 1'b0;
      wr_last      <= 1'b0;
      wr_addr      <= '0;
      wr_data      <= '0;
      pkt_hdr      <= '0;
      pkt_meta     <= '0;
      pkt_words    <= '0;
      pkt_hdr_ok   <= 1'b0;
      pkt_body_ok  <= 1'b0;
      pkt_too_long <= 1'b0;
    end else begin
      unique case (st)
        R_WAIT: if (rx_valid && rx_ready) begin
          in_pkt  <= !rx_last;
          wr_last <= rx_last;
          if (!in_pkt) begin
            pkt_words    <= '0;
            pkt_too_long <= 1'b0;
            held_v       <= 1'b0;
            pkt_hdr_ok   <= 1'b0;
            pkt_body_ok  <= 1'b0;
          end
          if (rx_last) begin
            // trailer: body checksum, then flush the held payload word
            pkt_body_ok <= (rx_data[31:16] == dcrc);
            widx <= '0;
            hcrc <= CRC16_INIT;
            dcrc <= CRC16_INIT;
            if (held_v && pkt_words < 6'(PKT_MAX_PAYLOAD)) begin
              wr_addr <= {16'h0, RCV_PKT_PAY} + (32'(pkt_words) << 2);
              wr_data <= held;
              st      <= R_WR;
            end else begin
              if (held_v) pkt_too_long <= 1'b1;
              st <= R_FULL;
            end
          end else begin
            if (widx != 5'd9) widx <= widx + 1'b1;
            if (widx < 5'd4) begin
              hcrc          <= crc16_word(hcrc, rx_data);
              pkt_hdr[widx] <= rx_data;
              wr_addr       <= {16'h0, RCV_PKT_HDR} + (32'(widx) << 2);
              wr_data       <= rx_data;
              st            <= R_WR;
            end else if (widx == 5'd4) begin
              pkt_hdr_ok <= (rx_data[31:16] == hcrc);
              if (!has_meta) widx <= 5'd9;
            end else begin
              dcrc <= crc16_word(dcrc, rx_data);
              if (widx < 5'd9) begin
                pkt_meta[widx - 5'd5] <= rx_data;
                wr_addr <= {16'h0, RCV_PKT_META} + (32'(widx - 5'd5) << 2);
                wr_data <= rx_data;
                st      <= R_WR;
              end else begin
                // payload: store the previous word, hold this one, so the
                // trailer never reaches the buffer
                held   <= rx_data;
                held_v <= 1'b1;
                if (held_v) begin
                  if (pkt_words < 6'(PKT_MAX_PAYLOAD)) begin
                    wr_addr <= {16'h0, RCV_PKT_PAY} + (32'(pkt_words) << 2);
                    wr_data <= held;
                    st      <= R_WR;
                  end else pkt_too_long <= 1'b1;
                end
              end
            end
          end
        end
        R_WR: if (rp_rsp.ack) begin
          if (wr_addr[15:7] == RCV_PKT_PAY[15:7]) pkt_words <= pkt_words + 1'b1;
          st <= wr_last ? R_FULL : R_WAIT;
        end
        R_FULL: if (pkt_done) st <= R_WAIT;
        default: st <= R_WAIT;
      endcase
    end
  end
endmodule
