// pspin_ingress_dma: writes matched frames into their L2 packet buffer slot.
//
// The matching engine knows a frame's length, and so the allocator its
// slot, only after the last beat has passed. This module therefore first
// collects the frame data in a small AXI-Stream FIFO, then waits for the
// slot metadata, and only then writes the data over an AXI4 write master
// to PsPIN's NIC inbound memory port. When the write response of the last
// burst is back, the metadata (now meaning "packet is in L2") is passed on
// to the HER generator: PsPIN must never be scheduled on a packet that is
// not fully in memory. A record flagged drop makes the module discard the
// frame from the FIFO without writing it.
//
// Bursts are INCR, full width (64 bytes per beat) and split at 4 KiB
// boundaries as AXI4 requires; one burst is in flight at a time (a simple
// state machine, no pipelining). Frames must fit in the FIFO (FIFO_DEPTH
// beats, 2 KiB by default) or the path stalls.
//
// Timing, per frame after the metadata is taken: 1 cycle address, one cycle
// per beat (when the memory is ready), the write response, 1 cycle output:
// len/64 + 4 cycles for a slot that does not cross 4 KiB.
//
// Follows the design description: FIFO to reverse the data/metadata
// order, write before HER. Own choices: the FIFO depth, the AXI4 details
// and the drop handling.
//
// Lint notes: bresp is ignored; PsPIN's packet memory does not return
// write errors and a frame cannot be retried anyway.
module pspin_ingress_dma
  import pspin_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 32
) (
  input  logic                   clk,
  input  logic                   rstn,

  // frame data from the matching engine
  input  logic [AXIS_DATA_W-1:0] s_axis_tdata,
  input  logic [AXIS_KEEP_W-1:0] s_axis_tkeep,
  input  logic                   s_axis_tvalid,
  output logic                   s_axis_tready,
  input  logic                   s_axis_tlast,

  // slot metadata from the allocator
  input  alloc_meta_t            meta_in_data,
  input  logic                   meta_in_valid,
  output logic                   meta_in_ready,

  // to the HER generator
  output l2_meta_t               meta_out_data,
  output logic                   meta_out_valid,
  input  logic                   meta_out_ready,

  // AXI4 write master to the PsPIN NIC inbound port
  output logic [31:0]            m_axi_awaddr,
  output logic [7:0]             m_axi_awlen,
  output logic [2:0]             m_axi_awsize,
  output logic [1:0]             m_axi_awburst,
  output logic                   m_axi_awvalid,
  input  logic                   m_axi_awready,
  output logic [AXIS_DATA_W-1:0] m_axi_wdata,
  output logic [AXIS_KEEP_W-1:0] m_axi_wstrb,
  output logic                   m_axi_wlast,
  output logic                   m_axi_wvalid,
  input  logic                   m_axi_wready,
  input  logic [1:0]             m_axi_bresp,      // not checked
  input  logic                   m_axi_bvalid,
  output logic                   m_axi_bready
);

  localparam int unsigned BEAT = AXIS_KEEP_W;                 // bytes per beat
  localparam int unsigned BW   = $clog2(BEAT);

  typedef enum logic [2:0] {S_IDLE, S_DISCARD, S_AW, S_W, S_B, S_OUT} state_e;
  state_e state;

  logic [AXIS_DATA_W-1:0] f_tdata;
  logic [AXIS_KEEP_W-1:0] f_tkeep;
  logic                   f_tlast, f_tvalid, f_tready;

  pspin_axis_fifo #(.DATA_W(AXIS_DATA_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rstn,
    .s_tdata(s_axis_tdata), .s_tkeep(s_axis_tkeep), .s_tlast(s_axis_tlast),
    .s_tvalid(s_axis_tvalid), .s_tready(s_axis_tready),
    .m_tdata(f_tdata), .m_tkeep(f_tkeep), .m_tlast(f_tlast),
    .m_tvalid(f_tvalid), .m_tready(f_tready));

  l2_meta_t    meta;
  logic [31:0] addr;        // next burst address
  logic [15:0] remaining;   // beats still to write
  logic [8:0]  burst;       // beats of the current burst
  logic [8:0]  beat_cnt;    // beats left in the current burst

  // beats up to the next 4 KiB boundary, at most 256
  function automatic logic [8:0] burst_beats(input logic [11:0] a, input logic [15:0] rem);
    logic [12:0] to_4k;
    to_4k = 13'(13'd4096 - {1'b0, a}) >> BW;
    if (32'(rem) < 32'(to_4k)) to_4k = 13'(rem);
    if (to_4k > 13'd256) to_4k = 13'd256;
    return 9'(to_4k);
  endfunction

  assign meta_in_ready  = (state == S_IDLE);
  assign meta_out_valid = (state == S_OUT);
  assign meta_out_data  = meta;

  assign m_axi_awaddr  = addr;
  assign m_axi_awlen   = 8'(burst - 9'd1);
  assign m_axi_awsize  = 3'(BW);
  assign m_axi_awburst = 2'b01;                 // INCR
  assign m_axi_awvalid = (state == S_AW);
  assign m_axi_wdata   = f_tdata;
  assign m_axi_wstrb   = f_tkeep;
  assign m_axi_wlast   = (beat_cnt == 9'd1);
  assign m_axi_wvalid  = (state == S_W) && f_tvalid;
  assign m_axi_bready  = (state == S_B);

  assign f_tready = (state == S_DISCARD) || ((state == S_W) && m_axi_wready);

  always_ff @(posedge clk) begin
    if (!rstn) begin
      state     <= S_IDLE;
      meta      <= '0;
      addr      <= '0;
      remaining <= '0;
      burst     <= '0;
      beat_cnt  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (meta_in_valid) begin
          meta.meta <= meta_in_data.meta;
          meta.addr <= meta_in_data.addr;
          addr      <= meta_in_data.addr;
          remaining <= 16'((32'(meta_in_data.meta.len) + BEAT - 1) >> BW);
          burst     <= burst_beats(meta_in_data.addr[11:0],
                                   16'((32'(meta_in_data.meta.len) + BEAT - 1) >> BW));
          state     <= meta_in_data.drop ? S_DISCARD : S_AW;
        end
        S_DISCARD: if (f_tvalid && f_tlast) state <= S_IDLE;
        S_AW: if (m_axi_awready) begin
          beat_cnt  <= burst;
          remaining <= remaining - 16'(burst);
          state     <= S_W;
        end
        S_W: if (m_axi_wvalid && m_axi_wready) begin
          beat_cnt <= beat_cnt - 9'd1;
          addr     <= addr + BEAT;
          if (beat_cnt == 9'd1) state <= S_B;
        end
        S_B: if (m_axi_bvalid) begin
          burst <= burst_beats(addr[11:0], remaining);
          state <= (remaining == 0) ? S_OUT : S_AW;
        end
        S_OUT: if (meta_out_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // the frame's last beat must be the last beat of the last burst
  a_len_consistent: assert property (@(posedge clk) disable iff (!rstn)
    (m_axi_wvalid && m_axi_wready) |-> (f_tlast == (m_axi_wlast && remaining == 0)));

endmodule
