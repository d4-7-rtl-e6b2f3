// apb_stdout: standard-output collector for the PsPIN cores.
//
// Handler code calls putchar, which stores the character to this APB
// slave. Every core uses its own word address (core c writes to byte
// offset 4*c), so the module knows which core printed each character. It
// queues the character together with the core ID in a FIFO, which the host
// drains through the stdout register of pspin_ctrl_regs and demultiplexes
// into one log per core.
//
// Interface: APB slave (always ready, no wait states, never an error;
// reads return the number of queued entries). FIFO read side: rd_valid
// when an entry is queued, rd_data = {16'b0, core ID, character}, rd_pop
// takes it. When the FIFO is full new characters are lost and counted in
// lost.
// Timing: a write is queued in the cycle of the APB access phase and can
// be read in the next cycle.
//
// Follows the design description: per-core addresses, core ID tagging, the
// FIFO read by the control registers. Own choices: the address stride, the
// entry format, the FIFO depth and the loss counter.
//
// Lint notes: only the core-select bits of paddr are decoded; the byte
// offset bits and the bits above the core field are unused on purpose,
// and only the low byte of pwdata carries the character.
module apb_stdout #(
  parameter int unsigned NUM_CORES = 16,
  parameter int unsigned DEPTH     = 1024
) (
  input  logic        clk,
  input  logic        rstn,

  input  logic [31:0] paddr,
  input  logic        psel,
  input  logic        penable,
  input  logic        pwrite,
  input  logic [31:0] pwdata,
  output logic        pready,
  output logic [31:0] prdata,
  output logic        pslverr,

  output logic        rd_valid,
  output logic [31:0] rd_data,
  input  logic        rd_pop,

  output logic [31:0] lost
);

  localparam int unsigned CW = $clog2(NUM_CORES);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [CW+7:0] mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic [AW:0]   count;
  logic          wr, push, pop;

  assign wr       = psel && penable && pwrite;
  assign push     = wr && (count != (AW+1)'(DEPTH));
  assign pop      = rd_pop && rd_valid;
  assign rd_valid = (count != 0);
  assign rd_data  = 32'(mem[rd_ptr]);

  assign pready  = 1'b1;
  assign pslverr = 1'b0;
  assign prdata  = 32'(count);

  always_ff @(posedge clk) begin
    if (!rstn) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
      lost   <= '0;
    end else begin
      if (push) wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (pop)  rd_ptr <= (rd_ptr == AW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
      if (wr && !push) lost <= lost + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= {paddr[2 +: CW], pwdata[7:0]};
  end

endmodule
