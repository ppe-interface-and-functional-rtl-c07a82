// ppe_top -- Protocol Processing Engine (PPE) for a workstation-cluster
// network interface.
//
// The PPE offloads a sender-based message protocol from the host. The host
// programs send descriptors, rslots (receive slots) and a notification table
// through a small register window; the PPE then packetizes outgoing messages,
// validates and reassembles incoming ones straight into host memory, and
// reports events by appending notification objects to lists in host memory
// and pushing tokens on interrupt queues.
//
// Structure (the functional partition of the specification's prototype):
//   ppe_regs           host register window, NQR/AQR/NBQR token queues, irq
//   ppe_dpram (XMT)    sender dual-port RAM: send descriptors + DIO buffers
//   ppe_dpram (RCV)    receiver dual-port RAM: rslots, note table, packet buffer
//   ppe_sender         round-robin packetizer over the send descriptors
//   ppe_sync_fifo_crc  transmit FIFO to the fabric, inserts the CRC16s
//   ppe_rcv_pkt        receive packet writer, checks the CRC16s
//   ppe_copy           validation, copy to host memory, rslot bookkeeping
//   ppe_notify         posts notification objects, feeds NQR
//   ppe_mem_arb (x2)   shares the receiver RAM engine port and the host
//                      memory master port among the engines
// The host bus bridge (an HP proprietary ASIC in the original) and the
// interconnect fabric are outside: hs_* is the host's access to the PPE's
// registers, hm_* is the PPE's own access to host memory (DMA reads of
// message bodies, writes of received data and notifications), tx_*/rx_* are
// the fabric's word streams (valid/ready, last marks a packet's final word).
// All bundles use the req/ack protocol of ppe_pkg.
//
// PCSR0.reset holds the sender, receiver, notification engine, transmit FIFO
// and token queues in reset; when it is cleared the sender marks every send
// descriptor done and PCSR1.ready rises. PCSR1.idle is set when no packet is
// being injected or ejected.
module ppe_top
  import ppe_pkg::*;
#(
  parameter int unsigned NUM_SD        = 4,
  parameter int unsigned QUEUE_DEPTH   = 256,
  parameter int unsigned XMT_WORDS     = 8192,
  parameter int unsigned RCV_WORDS     = 16384,
  parameter int unsigned NUM_RSLOTS    = 1024,
  parameter int unsigned MAX_PKT_WORDS = 32,
  parameter int unsigned TX_FIFO_DEPTH = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  // host access to PPE registers
  input  mem_req_t    hs_req,
  output mem_rsp_t    hs_rsp,
  output logic        irq,
  // PPE access to host memory
  output mem_req_t    hm_req,
  input  mem_rsp_t    hm_rsp,
  // fabric transmit stream
  output logic        tx_valid,
  output logic [31:0] tx_data,
  output logic        tx_last,
  input  logic        tx_ready,
  // fabric receive stream
  input  logic        rx_valid,
  input  logic [31:0] rx_data,
  input  logic        rx_last,
  output logic        rx_ready
);
  pcsr0_t            pcsr0;
  logic [31:0]       nlhr;
  logic [NUM_SD-1:0] go_set;
  logic              eng_rst_n;
  logic              init_done, ready, idle;
  logic              snd_busy, rcv_busy, copy_busy, note_busy;

  mem_req_t xa_req, xb_req, ra_req, rb_req;
  mem_rsp_t xa_rsp, xb_rsp, ra_rsp, rb_rsp;
  mem_req_t [2:0] rcv_c_req, host_c_req;
  mem_rsp_t [2:0] rcv_c_rsp, host_c_rsp;

  logic        nqr_push, nqr_full, aqr_push, aqr_full, nbqr_pop, nbqr_empty;
  logic [31:0] nqr_data, aqr_data, nbqr_data;

  assign eng_rst_n = rst_n & ~pcsr0.reset;
  assign ready     = init_done & ~pcsr0.reset;
  assign idle      = ~snd_busy & ~rcv_busy & ~copy_busy & ~note_busy;

  ppe_regs #(.NUM_SD(NUM_SD), .QUEUE_DEPTH(QUEUE_DEPTH)) u_regs (
    .clk, .rst_n, .hs_req, .hs_rsp, .irq, .pcsr0, .nlhr, .go_set, .ready, .idle,
    .xa_req, .xa_rsp, .ra_req, .ra_rsp,
    .nqr_push, .nqr_data, .nqr_full, .aqr_push, .aqr_data, .aqr_full,
    .nbqr_pop, .nbqr_data, .nbqr_empty);

  ppe_dpram #(.WORDS(XMT_WORDS)) u_xmt_ram (
    .clk, .rst_n, .a_req(xa_req), .a_rsp(xa_rsp), .b_req(xb_req), .b_rsp(xb_rsp));

  ppe_dpram #(.WORDS(RCV_WORDS)) u_rcv_ram (
    .clk, .rst_n, .a_req(ra_req), .a_rsp(ra_rsp), .b_req(rb_req), .b_rsp(rb_rsp));

  ppe_mem_arb #(.N(3)) u_rcv_arb (
    .clk, .rst_n(eng_rst_n), .c_req(rcv_c_req), .c_rsp(rcv_c_rsp),
    .m_req(rb_req), .m_rsp(rb_rsp));

  ppe_mem_arb #(.N(3)) u_host_arb (
    .clk, .rst_n(eng_rst_n), .c_req(host_c_req), .c_rsp(host_c_rsp),
    .m_req(hm_req), .m_rsp(hm_rsp));

  // ------------------------------------------------------------ transmit side
  logic        s_valid, s_last, s_ready;
  logic [31:0] s_data;
  logic        snd_note_valid, snd_note_ready;
  note_req_t   snd_note_req;

  ppe_sender #(.NUM_SD(NUM_SD), .MAX_PKT_WORDS(MAX_PKT_WORDS)) u_sender (
    .clk, .rst_n(eng_rst_n), .enable(pcsr0.enable),
    .local_node_num(pcsr0.local_node_num), .go_set,
    .xb_req, .xb_rsp, .hm_req(host_c_req[0]), .hm_rsp(host_c_rsp[0]),
    .tx_valid(s_valid), .tx_data(s_data), .tx_last(s_last), .tx_ready(s_ready),
    .note_valid(snd_note_valid), .note_req(snd_note_req), .note_ready(snd_note_ready),
    .init_done, .busy(snd_busy));

  ppe_sync_fifo_crc #(.DEPTH(TX_FIFO_DEPTH)) u_txfifo (
    .clk, .rst_n, .clr(pcsr0.reset),
    .s_valid, .s_data, .s_last, .s_ready,
    .m_valid(tx_valid), .m_data(tx_data), .m_last(tx_last), .m_ready(tx_ready));

  // ------------------------------------------------------------- receive side
  logic             pkt_valid, pkt_hdr_ok, pkt_body_ok, pkt_too_long, pkt_done;
  logic [3:0][31:0] pkt_hdr, pkt_meta;
  logic [5:0]       pkt_words;
  logic             rcv_note_valid, rcv_note_ready;
  note_req_t        rcv_note_req;

  ppe_rcv_pkt u_rcv_pkt (
    .clk, .rst_n(eng_rst_n), .enable(pcsr0.enable),
    .rx_valid, .rx_data, .rx_last, .rx_ready,
    .rp_req(rcv_c_req[0]), .rp_rsp(rcv_c_rsp[0]),
    .pkt_valid, .pkt_hdr, .pkt_meta, .pkt_words, .pkt_hdr_ok, .pkt_body_ok,
    .pkt_too_long, .pkt_done, .busy(rcv_busy));

  ppe_copy #(.NUM_RSLOTS(NUM_RSLOTS)) u_copy (
    .clk, .rst_n(eng_rst_n),
    .local_node_num(pcsr0.local_node_num), .incarnation(pcsr0.incarnation),
    .pkt_valid, .pkt_hdr, .pkt_meta, .pkt_words, .pkt_hdr_ok, .pkt_body_ok,
    .pkt_too_long, .pkt_done,
    .cr_req(rcv_c_req[1]), .cr_rsp(rcv_c_rsp[1]),
    .hw_req(host_c_req[1]), .hw_rsp(host_c_rsp[1]),
    .aqr_push, .aqr_data, .aqr_full,
    .note_valid(rcv_note_valid), .note_req(rcv_note_req), .note_ready(rcv_note_ready),
    .busy(copy_busy));

  // ------------------------------------------------------------- notification
  logic [1:0] nv, nrdy;
  assign nv             = {rcv_note_valid, snd_note_valid};
  assign snd_note_ready = nrdy[0];
  assign rcv_note_ready = nrdy[1];

  ppe_notify #(.NREQ(2)) u_notify (
    .clk, .rst_n(eng_rst_n), .nlhr,
    .note_valid(nv), .note_req({rcv_note_req, snd_note_req}), .note_ready(nrdy),
    .nr_req(rcv_c_req[2]), .nr_rsp(rcv_c_rsp[2]),
    .nw_req(host_c_req[2]), .nw_rsp(host_c_rsp[2]),
    .nbqr_pop, .nbqr_data, .nbqr_empty, .nqr_push, .nqr_data, .nqr_full,
    .busy(note_busy));
endmodule
