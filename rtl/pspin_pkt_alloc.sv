// pspin_pkt_alloc: packet buffer allocator of the FPsPIN ingress path.
//
// The L2 packet buffer is cut in two halves. The lower half holds fixed
// 128-byte slots for short packets, the upper half fixed 1536-byte slots
// for packets up to the Ethernet MTU, matching the bimodal size mix of
// real traffic. Each half keeps its free slots in a FIFO
// (pspin_slot_pool); allocating pops the FIFO chosen by the packet length,
// freeing pushes the slot back into the FIFO chosen by its address.
//
// Interface: metadata from the matching engine enters on in_*, leaves on
// out_* with the slot address added. When the right FIFO is empty (or the
// packet is longer than a large slot) the record still leaves, flagged
// drop, so that the ingress DMA discards the buffered data; the dropped
// counter then counts up. feedback_* returns a slot once PsPIN has
// finished with the packet in it. small_free/large_free report how many
// slots of each class are free.
// Timing: zero cycles. out_valid/in_ready and the address are
// combinational; the FIFO state changes on the handshake edge.
//
// Follows the design description: two halves, 128/1536-byte slots, two
// FIFOs, feedback-driven free, one drop counter. Own choices: which half is
// which, the drop flag, and a packet never falling back to the other class.
module pspin_pkt_alloc
  import pspin_pkg::*;
#(
  parameter logic [31:0] BUF_BASE    = 32'h0,
  parameter int unsigned BUF_BYTES   = 512 * 1024,
  parameter int unsigned SMALL_BYTES = 128,
  parameter int unsigned LARGE_BYTES = 1536
) (
  input  logic        clk,
  input  logic        rstn,

  input  pkt_meta_t   in_data,
  input  logic        in_valid,
  output logic        in_ready,

  output alloc_meta_t out_data,
  output logic        out_valid,
  input  logic        out_ready,

  input  logic        feedback_valid,
  input  logic [31:0] feedback_addr,

  output logic [31:0] dropped,
  output logic [$clog2(BUF_BYTES/2/SMALL_BYTES+1)-1:0] small_free,
  output logic [$clog2(BUF_BYTES/2/LARGE_BYTES+1)-1:0] large_free
);

  localparam int unsigned HALF         = BUF_BYTES / 2;
  localparam int unsigned SMALL_SLOTS  = HALF / SMALL_BYTES;
  localparam int unsigned LARGE_SLOTS  = HALF / LARGE_BYTES;
  localparam logic [31:0] LARGE_BASE   = BUF_BASE + 32'(HALF);

  logic        s_avail, l_avail, s_pop, l_pop, s_push, l_push;
  logic [31:0] s_addr, l_addr;
  logic        want_small, want_large, drop;
  logic        fire;

  pspin_slot_pool #(.NSLOTS(SMALL_SLOTS), .SLOT_BYTES(SMALL_BYTES), .BASE(BUF_BASE)) u_small (
    .clk, .rstn, .pop(s_pop), .avail(s_avail), .addr(s_addr),
    .push(s_push), .push_addr(feedback_addr), .free_count(small_free));
  pspin_slot_pool #(.NSLOTS(LARGE_SLOTS), .SLOT_BYTES(LARGE_BYTES), .BASE(LARGE_BASE)) u_large (
    .clk, .rstn, .pop(l_pop), .avail(l_avail), .addr(l_addr),
    .push(l_push), .push_addr(feedback_addr), .free_count(large_free));

  assign want_small = (32'(in_data.len) <= SMALL_BYTES);
  assign want_large = !want_small && (32'(in_data.len) <= LARGE_BYTES);
  assign drop       = want_small ? !s_avail : (want_large ? !l_avail : 1'b1);

  assign out_valid     = in_valid;
  assign in_ready      = out_ready;
  assign fire          = in_valid && out_ready;
  assign out_data.meta = in_data;
  assign out_data.drop = drop;
  assign out_data.addr = drop ? 32'h0 : (want_small ? s_addr : l_addr);

  assign s_pop  = fire && want_small && !drop;
  assign l_pop  = fire && want_large && !drop;
  assign s_push = feedback_valid && (feedback_addr <  LARGE_BASE);
  assign l_push = feedback_valid && (feedback_addr >= LARGE_BASE);

  always_ff @(posedge clk) begin
    if (!rstn)             dropped <= '0;
    else if (fire && drop) dropped <= dropped + 1'b1;
  end

endmodule
