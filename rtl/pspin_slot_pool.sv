// pspin_slot_pool: one class of fixed-size packet buffer slots.
//
// Holds the free slots of one half of the L2 packet buffer. A slot is
// taken with pop (its address is on addr in the same cycle, valid while
// avail is high) and returned with push. The pool behaves like a FIFO that
// starts full with the slots in address order: slots never handed out yet
// come from a counter, slots that were returned come from a FIFO RAM. This
// gives the same allocation behaviour as pre-filling a FIFO, without the
// fill time after reset.
//
// Interface: pop/avail/addr form a zero-latency take port, push/push_addr a
// return port; both may act in the same cycle. Returning an address that is
// not a slot of this pool, or returning a slot twice, is not detected.
// Timing: addr is combinational from state; updates are registered.
module pspin_slot_pool #(
  parameter int unsigned NSLOTS     = 2048,
  parameter int unsigned SLOT_BYTES = 128,
  parameter logic [31:0] BASE       = 32'h0
) (
  input  logic        clk,
  input  logic        rstn,
  input  logic        pop,
  output logic        avail,
  output logic [31:0] addr,
  input  logic        push,
  input  logic [31:0] push_addr,
  output logic [$clog2(NSLOTS+1)-1:0] free_count
);

  localparam int unsigned IW = $clog2(NSLOTS);
  localparam int unsigned CW = $clog2(NSLOTS + 1);

  logic [CW-1:0] fresh;          // slots [fresh, NSLOTS) never handed out
  logic [IW-1:0] fifo_mem [NSLOTS];
  logic [IW-1:0] rd_ptr, wr_ptr;
  logic [CW-1:0] fifo_cnt;

  logic          from_fresh;
  logic [IW-1:0] slot_idx;
  logic [IW-1:0] push_idx;

  assign from_fresh = (fresh != CW'(NSLOTS));
  assign avail      = from_fresh || (fifo_cnt != 0);
  assign slot_idx   = from_fresh ? IW'(fresh) : fifo_mem[rd_ptr];
  assign addr       = BASE + 32'(slot_idx) * SLOT_BYTES;
  assign push_idx   = IW'((push_addr - BASE) / SLOT_BYTES);
  assign free_count = CW'(NSLOTS) - fresh + fifo_cnt;

  logic do_pop_fifo;
  assign do_pop_fifo = pop && avail && !from_fresh;

  always_ff @(posedge clk) begin
    if (!rstn) begin
      fresh    <= '0;
      rd_ptr   <= '0;
      wr_ptr   <= '0;
      fifo_cnt <= '0;
    end else begin
      if (pop && avail && from_fresh) fresh <= fresh + 1'b1;
      if (do_pop_fifo) rd_ptr <= (rd_ptr == IW'(NSLOTS - 1)) ? '0 : rd_ptr + 1'b1;
      if (push)        wr_ptr <= (wr_ptr == IW'(NSLOTS - 1)) ? '0 : wr_ptr + 1'b1;
      fifo_cnt <= fifo_cnt + CW'(push) - CW'(do_pop_fifo);
    end
  end

  always_ff @(posedge clk) begin
    if (push) fifo_mem[wr_ptr] <= push_idx;
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rstn)
    push |-> (free_count < CW'(NSLOTS)) || (pop && avail));

endmodule
