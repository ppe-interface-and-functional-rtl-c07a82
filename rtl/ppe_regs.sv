// ppe_regs -- host-visible register window of the PPE.
//
// Decodes host accesses to the PPE's 1 KB register window (word offsets
// 0x000-0x3FC) and implements:
//   * PCSR0 (0x000): reset, enable, incarnation, local_node_num; written by
//     the host, read-only to the PPE.
//   * PCSR1 (0x004): ready, int_hi, int_lo, idle, nbqr_empty, nbqr_full and
//     send_desc_cnt. int_hi is set when the AQR goes from empty to non-empty,
//     int_lo when the NQR does; a host write loads both bits from the written
//     value, so software clears them by writing 0 (the specification only says
//     software clears them; writing the value is this design's choice).
//   * NLHR (0x008): base of the notification list heads table in RCV_RAM.
//   * NQR (0x014) and AQR (0x018): a read pops the head token; an empty queue
//     reads as zero and is left unchanged.
//   * NBQR (0x01C): a write pushes an empty notification object address;
//     writes to a full NBQR are ignored.
//   * PXR_Ptr / PXR_MEM / PXR_MEM_INC (0x040/0x044/0x048) and the PRR
//     equivalents (0x080/0x084/0x088): pointer, static and auto-increment
//     (+4 after each access) access to XMT_RAM and RCV_RAM.
//   * 0x100-0x1FC: the send descriptor page, XMT_RAM 0x0000-0x00FC.
//   * 0x200-0x2FC / 0x300-0x3FC: paged access; the effective address is
//     pointer bits 15:8 spliced with the low byte of the host offset.
// The three 256-entry token queues live here. A host write that sets go in a
// send descriptor's control1 word, through any of the access paths, pulses
// go_set for that descriptor so the sender can clear stalled and done.
// irq is the level int_hi | int_lo | nbqr_empty.
//
// Host timing: a request held on hs_req is answered with a one-cycle ack, in
// the cycle after the request for a register and two cycles later than that
// for a RAM word (one more cycle for every cycle the RAM takes). The soft reset input
// (PCSR0.reset as seen by the rest of the PPE) empties the queues and clears
// the interrupt bits; the registers themselves keep their values. Unlisted
// offsets read as zero and ignore writes.
module ppe_regs
  import ppe_pkg::*;
#(
  parameter int unsigned NUM_SD      = 4,
  parameter int unsigned QUEUE_DEPTH = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  // host slave access
  input  mem_req_t          hs_req,
  output mem_rsp_t          hs_rsp,
  output logic              irq,
  // configuration towards the engines
  output pcsr0_t            pcsr0,
  output logic [31:0]       nlhr,
  output logic [NUM_SD-1:0] go_set,
  input  logic              ready,
  input  logic              idle,
  // RAM host ports
  output mem_req_t          xa_req,
  input  mem_rsp_t          xa_rsp,
  output mem_req_t          ra_req,
  input  mem_rsp_t          ra_rsp,
  // token queues
  input  logic              nqr_push,
  input  logic [31:0]       nqr_data,
  output logic              nqr_full,
  input  logic              aqr_push,
  input  logic [31:0]       aqr_data,
  output logic              aqr_full,
  input  logic              nbqr_pop,
  output logic [31:0]       nbqr_data,
  output logic              nbqr_empty
);
  typedef enum logic [1:0] {H_IDLE, H_XMT, H_RCV, H_ACK} hstate_e;

  hstate_e     st;
  logic [31:0] pxr_ptr, prr_ptr;
  logic        int_hi, int_lo;
  logic [31:0] rdata_q;
  logic [31:0] ram_addr;
  logic        ram_inc;
  logic        ram_we;
  logic [31:0] ram_wdata;
  logic [9:0]  off;
  logic        hs_new;

  // queues
  logic        nqr_empty, aqr_empty, nbqr_full;
  logic [31:0] nqr_head, aqr_head;
  logic        nqr_pop, aqr_pop, nbqr_push;
  logic        soft_rst;

  assign soft_rst = pcsr0.reset;
  assign off      = {hs_req.addr[9:2], 2'b00};
  assign hs_new   = hs_req.req && (st == H_IDLE);

  ppe_fifo #(.WIDTH(32), .DEPTH(QUEUE_DEPTH)) u_nqr (
    .clk, .rst_n, .clr(soft_rst), .push(nqr_push), .wdata(nqr_data),
    .pop(nqr_pop), .rdata(nqr_head), .empty(nqr_empty), .full(nqr_full), .count());
  ppe_fifo #(.WIDTH(32), .DEPTH(QUEUE_DEPTH)) u_aqr (
    .clk, .rst_n, .clr(soft_rst), .push(aqr_push), .wdata(aqr_data),
    .pop(aqr_pop), .rdata(aqr_head), .empty(aqr_empty), .full(aqr_full), .count());
  ppe_fifo #(.WIDTH(32), .DEPTH(QUEUE_DEPTH)) u_nbqr (
    .clk, .rst_n, .clr(soft_rst), .push(nbqr_push), .wdata(hs_req.wdata),
    .pop(nbqr_pop), .rdata(nbqr_data), .empty(nbqr_empty), .full(nbqr_full), .count());

  assign nqr_pop   = hs_new && !hs_req.we && off == REG_NQR;
  assign aqr_pop   = hs_new && !hs_req.we && off == REG_AQR;
  assign nbqr_push = hs_new &&  hs_req.we && off == REG_NBQR;

  pcsr1_t pcsr1;
  always_comb begin
    pcsr1               = '0;
    pcsr1.ready         = ready;
    pcsr1.int_hi        = int_hi;
    pcsr1.int_lo        = int_lo;
    pcsr1.idle          = idle;
    pcsr1.nbqr_empty    = nbqr_empty;
    pcsr1.nbqr_full     = nbqr_full;
    pcsr1.send_desc_cnt = 4'(NUM_SD);
  end

  assign irq = int_hi | int_lo | nbqr_empty;

  // RAM request decode for the current host access
  logic        is_xmt, is_rcv, inc_ptr;
  logic [31:0] eff_addr;
  always_comb begin
    is_xmt   = 1'b0;
    is_rcv   = 1'b0;
    inc_ptr  = 1'b0;
    eff_addr = '0;
    unique casez (off)
      REG_PXR_MEM:     begin is_xmt = 1'b1; eff_addr = pxr_ptr; end
      REG_PXR_MEM_INC: begin is_xmt = 1'b1; eff_addr = pxr_ptr; inc_ptr = 1'b1; end
      REG_PRR_MEM:     begin is_rcv = 1'b1; eff_addr = prr_ptr; end
      REG_PRR_MEM_INC: begin is_rcv = 1'b1; eff_addr = prr_ptr; inc_ptr = 1'b1; end
      10'b01????????:  begin is_xmt = 1'b1; eff_addr = {24'h0, off[7:0]}; end
      10'b10????????:  begin is_xmt = 1'b1; eff_addr = {16'h0, pxr_ptr[15:8], off[7:0]}; end
      10'b11????????:  begin is_rcv = 1'b1; eff_addr = {16'h0, prr_ptr[15:8], off[7:0]}; end
      default: ;
    endcase
  end

  assign xa_req = '{req: st == H_XMT, we: ram_we, addr: ram_addr, wdata: ram_wdata};
  assign ra_req = '{req: st == H_RCV, we: ram_we, addr: ram_addr, wdata: ram_wdata};
  assign hs_rsp = '{ack: st == H_ACK, rdata: rdata_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= H_IDLE;
      pcsr0     <= '0;
      nlhr      <= '0;
      pxr_ptr   <= '0;
      prr_ptr   <= '0;
      rdata_q   <= '0;
      ram_addr  <= '0;
      ram_we    <= 1'b0;
      ram_wdata <= '0;
      ram_inc   <= 1'b0;
      go_set    <= '0;
    end else begin
      go_set <= '0;
      unique case (st)
        H_IDLE: if (hs_req.req) begin
          rdata_q   <= '0;
          ram_addr  <= eff_addr;
          ram_we    <= hs_req.we;
          ram_wdata <= hs_req.wdata;
          ram_inc   <= inc_ptr;
          if (is_xmt)      st <= H_XMT;
          else if (is_rcv) st <= H_RCV;
          else begin
            st <= H_ACK;
            unique case (off)
              REG_PCSR0:   if (hs_req.we) pcsr0 <= hs_req.wdata; else rdata_q <= pcsr0;
              REG_PCSR1:   if (!hs_req.we) rdata_q <= pcsr1;
              REG_NLHR:    if (hs_req.we) nlhr <= hs_req.wdata; else rdata_q <= nlhr;
              REG_NQR:     if (!hs_req.we && !nqr_empty) rdata_q <= nqr_head;
              REG_AQR:     if (!hs_req.we && !aqr_empty) rdata_q <= aqr_head;
              REG_PXR_PTR: if (hs_req.we) pxr_ptr <= hs_req.wdata; else rdata_q <= pxr_ptr;
              REG_PRR_PTR: if (hs_req.we) prr_ptr <= hs_req.wdata; else rdata_q <= prr_ptr;
              default: ;
            endcase
          end
        end
        H_XMT: if (xa_rsp.ack) begin
          rdata_q <= xa_rsp.rdata;
          st      <= H_ACK;
          if (ram_inc) pxr_ptr <= pxr_ptr + 32'd4;
          // snoop: host sets go in a send descriptor's control1 word
          if (ram_we && ram_addr[14:8] == '0 && ram_addr[5:2] == SD_CTL1 &&
              ram_wdata[28] && 32'(ram_addr[7:6]) < NUM_SD)
            go_set[ram_addr[7:6]] <= 1'b1;
        end
        H_RCV: if (ra_rsp.ack) begin
          rdata_q <= ra_rsp.rdata;
          st      <= H_ACK;
          if (ram_inc) prr_ptr <= prr_ptr + 32'd4;
        end
        H_ACK: st <= H_IDLE;
        default: st <= H_IDLE;
      endcase
    end
  end

  // interrupt bits: set on an empty -> non-empty transition, written by host
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      int_hi <= 1'b0;
      int_lo <= 1'b0;
    end else if (soft_rst) begin
      int_hi <= 1'b0;
      int_lo <= 1'b0;
    end else begin
      if (hs_new && hs_req.we && off == REG_PCSR1) begin
        int_hi <= hs_req.wdata[30];
        int_lo <= hs_req.wdata[29];
      end
      if (aqr_push && aqr_empty) int_hi <= 1'b1;
      if (nqr_push && nqr_empty) int_lo <= 1'b1;
    end
  end

  // The PPE may stall on a full NQR/AQR but must never drop an entry.
  property p_no_push_full(push, full);
    @(posedge clk) disable iff (!rst_n) push |-> !full;
  endproperty
  a_nqr_no_drop: assert property (p_no_push_full(nqr_push, nqr_full));
  a_aqr_no_drop: assert property (p_no_push_full(aqr_push, aqr_full));
endmodule
