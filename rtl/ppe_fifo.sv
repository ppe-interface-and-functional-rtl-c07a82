// ppe_fifo -- synchronous first-word-fall-through queue.
//
// Backs the three PPE-maintained token queues (NQR, AQR: 256 entries each,
// filled by the PPE and drained by host reads; NBQR: 256 entries, filled by
// host writes and drained by the notification engine) and the transmit
// speed-matching FIFO. The head entry is always visible on rdata; pop removes
// it. A push into a full queue and a pop from an empty queue are ignored, so
// the owner decides whether to stall (NQR/AQR) or drop (NBQR). clr empties the
// queue synchronously (the PCSR0 reset bit). Storage is a plain array with
// read and write pointers one bit wider than the index to tell full from
// empty. Depth 256 is the specification's size; the storage type and the
// pointer scheme are this design's choice. DEPTH must be a power of two.
module ppe_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clr,
  input  logic                     push,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     pop,
  output logic [WIDTH-1:0]         rdata,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;
  logic             do_push, do_pop;

  assign count   = wptr - rptr;
  assign empty   = (wptr == rptr);
  assign full    = (wptr[AW] != rptr[AW]) && (wptr[AW-1:0] == rptr[AW-1:0]);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign rdata   = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr[AW-1:0]] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else if (clr) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_push) wptr <= wptr + 1'b1;
      if (do_pop)  rptr <= rptr + 1'b1;
    end
  end

  // the pointer arithmetic needs a power-of-two depth
  if (DEPTH < 2 || (DEPTH & (DEPTH - 1)) != 0) begin : g_bad_depth
    $error("ppe_fifo: DEPTH must be a power of two");
  end
endmodule
