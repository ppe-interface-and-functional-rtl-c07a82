// ppe_sync_fifo_crc -- transmit speed-matching FIFO that fills in the CRC16
// checksums of each outgoing packet.
//
// The sender streams a packet as 32-bit words with a last flag: five header
// words (address0, address1, control0, control1, control2), optional
// metadata, payload, and a trailer word. As each word is accepted this block
// updates two CRC16 values (see ppe_pkg for the polynomial): the header CRC
// over header words 0..3, written into bits 31:16 of control2 (hdr_checksum),
// and the body CRC over every word between control2 and the trailer
// (metadata and payload), written into bits 31:16 of the trailer
// (pkt_checksum; bits 15:0 are padding). Words then enter a DEPTH-entry FIFO
// whose output is the fabric transmit stream (valid/ready/last). The
// specification places the CRC generation in this FIFO block and gives it the
// speed-matching role; the FIFO depth, the single clock and which words each
// checksum covers are this design's choices. One word per cycle in and out.
module ppe_sync_fifo_crc
  import ppe_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  logic        s_valid,
  input  logic [31:0] s_data,
  input  logic        s_last,
  output logic        s_ready,
  output logic        m_valid,
  output logic [31:0] m_data,
  output logic        m_last,
  input  logic        m_ready
);
  logic [15:0] hcrc, dcrc;
  logic [2:0]  widx;         // saturates at 5: "past the header"
  logic        full, empty, accept;
  logic [31:0] wdata;
  logic [32:0] head;

  assign s_ready = !full;
  assign accept  = s_valid && s_ready;

  always_comb begin
    wdata = s_data;
    if (s_last)             wdata = {dcrc, s_data[15:0]};
    else if (widx == 3'd4)  wdata = {hcrc, s_data[15:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      widx <= '0;
      hcrc <= CRC16_INIT;
      dcrc <= CRC16_INIT;
    end else if (clr) begin
      widx <= '0;
      hcrc <= CRC16_INIT;
      dcrc <= CRC16_INIT;
    end else if (accept) begin
      if (s_last) begin
        widx <= '0;
        hcrc <= CRC16_INIT;
        dcrc <= CRC16_INIT;
      end else begin
        if (widx < 3'd4)  hcrc <= crc16_word(hcrc, s_data);
        if (widx == 3'd5) dcrc <= crc16_word(dcrc, s_data);
        if (widx != 3'd5) widx <= widx + 1'b1;
      end
    end
  end

  ppe_fifo #(.WIDTH(33), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n, .clr, .push(accept), .wdata({s_last, wdata}),
    .pop(m_ready && !empty), .rdata(head), .empty, .full, .count());

  assign m_valid = !empty;
  assign m_data  = head[31:0];
  assign m_last  = head[32];
endmodule
