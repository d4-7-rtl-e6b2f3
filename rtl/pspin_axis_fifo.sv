// pspin_axis_fifo: synchronous AXI-Stream FIFO (data, keep, last).
//
// A RAM-based ring buffer of DEPTH beats. s_tready is high while there is
// room; m_tvalid is high while the FIFO holds a beat, and the head beat is
// shown on m_* combinationally from the RAM. A beat written in one cycle can
// be read in the next. This is the small buffer the ingress DMA uses to
// hold a frame until its metadata arrives.
module pspin_axis_fifo #(
  parameter int unsigned DATA_W = 512,
  parameter int unsigned DEPTH  = 32
) (
  input  logic                clk,
  input  logic                rstn,
  input  logic [DATA_W-1:0]   s_tdata,
  input  logic [DATA_W/8-1:0] s_tkeep,
  input  logic                s_tlast,
  input  logic                s_tvalid,
  output logic                s_tready,
  output logic [DATA_W-1:0]   m_tdata,
  output logic [DATA_W/8-1:0] m_tkeep,
  output logic                m_tlast,
  output logic                m_tvalid,
  input  logic                m_tready
);

  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned EW = DATA_W + DATA_W / 8 + 1;

  logic [EW-1:0] mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic [AW:0]   count;
  logic          push, pop;

  assign s_tready = (count != (AW+1)'(DEPTH));
  assign m_tvalid = (count != 0);
  assign push     = s_tvalid && s_tready;
  assign pop      = m_tvalid && m_tready;
  assign {m_tlast, m_tkeep, m_tdata} = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (!rstn) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (pop)  rd_ptr <= (rd_ptr == AW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= {s_tlast, s_tkeep, s_tdata};
  end

endmodule
