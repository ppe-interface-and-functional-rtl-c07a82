// ppe_pkg -- shared types and constants of the Protocol Processing Engine (PPE).
//
// The register, packet, send-descriptor, rslot and notification layouts below
// follow the C structures of the specification. Those structures are written
// for a big-endian host, so the first field of each structure is the most
// significant bit of its 32-bit word; every struct here is declared in the
// same order so that a packed struct maps field for field onto a memory word.
//
// The internal memory-access bundle (mem_req_t / mem_rsp_t) is this design's
// own choice: a requester holds req (with we, addr, wdata) steady until the
// target answers with a one-cycle ack; read data is valid in the ack cycle.
// All addresses on it are byte addresses; the low two bits are ignored.
//
// CRC16: the specification names CRC16 for the header and body checksums but
// gives no polynomial. This design uses CRC-16-CCITT (x^16+x^12+x^5+1,
// 0x1021), initial value 0xFFFF, 32-bit words fed most significant bit first.
package ppe_pkg;

  // ---------------------------------------------------------------- bus bundle
  typedef struct packed {
    logic        req;
    logic        we;
    logic [31:0] addr;
    logic [31:0] wdata;
  } mem_req_t;

  typedef struct packed {
    logic        ack;
    logic [31:0] rdata;
  } mem_rsp_t;

  // ---------------------------------------------------------- global registers
  typedef struct packed {
    logic        reset;
    logic        enable;
    logic [9:0]  reserved;
    logic [3:0]  incarnation;
    logic [15:0] local_node_num;
  } pcsr0_t;

  typedef struct packed {
    logic        ready;
    logic        int_hi;
    logic        int_lo;
    logic        idle;
    logic        nbqr_empty;
    logic        nbqr_full;
    logic [5:0]  reserved_1;
    logic [3:0]  send_desc_cnt;
    logic [15:0] reserved_2;
  } pcsr1_t;

  // Host register offsets (byte offsets into the PPE's 1 KB register window)
  localparam logic [9:0] REG_PCSR0       = 10'h000;
  localparam logic [9:0] REG_PCSR1       = 10'h004;
  localparam logic [9:0] REG_NLHR        = 10'h008;
  localparam logic [9:0] REG_NQR         = 10'h014;
  localparam logic [9:0] REG_AQR         = 10'h018;
  localparam logic [9:0] REG_NBQR        = 10'h01C;
  localparam logic [9:0] REG_PXR_PTR     = 10'h040;
  localparam logic [9:0] REG_PXR_MEM     = 10'h044;
  localparam logic [9:0] REG_PXR_MEM_INC = 10'h048;
  localparam logic [9:0] REG_PRR_PTR     = 10'h080;
  localparam logic [9:0] REG_PRR_MEM     = 10'h084;
  localparam logic [9:0] REG_PRR_MEM_INC = 10'h088;

  // ------------------------------------------------------------- packet header
  typedef struct packed {
    logic [3:0]  fab_bits;
    logic [11:0] dst_node;
    logic [15:0] more_fab_bits;
  } pkt_addr0_t;

  typedef struct packed {
    logic [15:0] dst_slot;
    logic [11:0] src_node;
    logic [3:0]  reserved;
  } pkt_addr1_t;

  typedef struct packed {
    logic        use_msg_size;
    logic        use_msg_offset;
    logic        ack_pkt;
    logic        reserved;
    logic [3:0]  incarnation;
    logic [23:0] remote_offset;
  } pkt_ctl0_t;

  typedef struct packed {
    logic [3:0]  reserved;
    logic        meta_data_flag;
    logic [2:0]  meta_len;
    logic [23:0] msg_size;
  } pkt_ctl1_t;

  // Number of header words in front of the optional metadata:
  // address0, address1, control0, control1, control2 (hdr_checksum).
  localparam int unsigned PKT_HDR_WORDS   = 5;
  localparam int unsigned PKT_META_WORDS  = 4;
  localparam int unsigned PKT_MAX_PAYLOAD = 32;   // words (RCV_PKT_PAYLOAD)

  // ----------------------------------------------------------- send descriptor
  // Word offsets inside one 16-word send descriptor set (Figure 9 order).
  localparam logic [3:0] SD_MSG_ADDR = 4'd0;
  localparam logic [3:0] SD_ADDR0    = 4'd1;
  localparam logic [3:0] SD_ADDR1    = 4'd2;
  localparam logic [3:0] SD_CTL0     = 4'd3;
  localparam logic [3:0] SD_STATUS1  = 4'd4;
  localparam logic [3:0] SD_CTL1     = 4'd5;
  localparam logic [3:0] SD_STATUS2  = 4'd6;
  localparam logic [3:0] SD_META     = 4'd8;

  typedef struct packed {
    logic [15:0] dst_slot;
    logic [15:0] note_index;
  } sd_addr1_t;

  typedef struct packed {
    logic        direct_io;
    logic        control_pkt;
    logic        notify;
    logic        go;
    logic        meta_data;
    logic [2:0]  meta_cnt;
    logic [23:0] msg_size;
  } sd_ctl1_t;

  typedef struct packed {
    logic [7:0]  reserved;
    logic [23:0] bytes_to_go;
  } sd_status1_t;

  typedef struct packed {
    logic        busy;
    logic        stalled;
    logic        done;
    logic [28:0] reserved;
  } sd_status2_t;

  // ---------------------------------------------------------------- rslot
  // Eight words per rslot (32 bytes, Figure 13); word offsets:
  localparam logic [2:0] RS_BASE      = 3'd0;  // buffer_base_phys
  localparam logic [2:0] RS_SIZE      = 3'd1;  // buffer_size
  localparam logic [2:0] RS_NOTE_CTL  = 3'd2;  // note_index, control
  localparam logic [2:0] RS_BTG       = 3'd3;  // bytes_to_go (signed)
  localparam logic [2:0] RS_MSG_SIZE  = 3'd4;
  localparam logic [2:0] RS_MSG_OFF   = 3'd5;
  localparam logic [2:0] RS_ACK_NOTE  = 3'd6;  // ack_note_index in the upper half

  typedef struct packed {
    logic [15:0] note_index;
    logic        valid;
    logic        indirect;
    logic        do_acks;
    logic        notify;
    logic [11:0] reserve;
  } rs_note_ctl_t;

  // Receiver RAM layout (byte addresses)
  localparam logic [15:0] RCV_PKT_HDR  = 16'hFF00;
  localparam logic [15:0] RCV_PKT_META = 16'hFF10;
  localparam logic [15:0] RCV_PKT_PAY  = 16'hFF80;

  // -------------------------------------------------------------- notification
  // Error status half-word of an error notification (Figure 12).
  typedef struct packed {
    logic       invalid_rslot;
    logic       rslot_range;
    logic       bad_dst_node;
    logic       bad_offset;
    logic       bad_size;
    logic       bad_hdr_chksum;
    logic       bad_body_chksum;
    logic       bad_incarnation;
    logic [7:0] reserved;
  } err_status_t;

  // A request to post one notification object. w0..w2 are the three
  // type-specific words (object words 0..2); the next pointer is object
  // word 3 and the optional metadata words 4..7.
  typedef struct packed {
    logic [15:0]      note_index;
    logic [31:0]      w0;
    logic [31:0]      w1;
    logic [31:0]      w2;
    logic             has_meta;
    logic [3:0][31:0] meta;
  } note_req_t;

  // ---------------------------------------------------------------- CRC16
  localparam logic [15:0] CRC16_INIT = 16'hFFFF;

  function automatic logic [15:0] crc16_word(input logic [15:0] crc_in,
                                             input logic [31:0] data);
    logic [15:0] c;
    logic        fb;
    c = crc_in;
    for (int i = 31; i >= 0; i--) begin
      fb = c[15] ^ data[i];
      c  = {c[14:0], 1'b0};
      if (fb) c = c ^ 16'h1021;
    end
    return c;
  endfunction

endpackage
