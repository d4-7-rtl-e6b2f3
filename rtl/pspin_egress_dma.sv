// pspin_egress_dma: sends a frame prepared by PsPIN out to the network.
//
// A handler that wants to transmit leaves the frame in PsPIN memory and
// issues an egress command (source address, length, command ID). This
// module reads the frame over an AXI4 read master and turns the read data
// into an AXI-Stream frame: full keep on every beat but the last, whose
// keep is trimmed to the frame length, and tlast on that beat. When the
// frame has left, a completion carrying the command ID is offered on
// done_*, so that the handler may reuse the buffer.
//
// Bursts are INCR and full width, split at 4 KiB boundaries, one burst at
// a time. Read data is forwarded without buffering: rready follows the
// stream's tready. The source address must be 64-byte aligned.
//
// Timing per frame: 1 cycle command, per burst 1 address cycle plus one
// cycle per beat (memory latency not counted), 1 cycle completion.
//
// Follows the design description: DMA read from PsPIN memory into an
// AXI-Stream towards the arbiter. Own choices: the command and completion
// format, the aligned-source restriction and the unbuffered data path.
//
// Lint notes: rresp is ignored (PsPIN memory does not return errors) and
// rlast is not needed because the beat count is known from the length;
// the command ID is only copied to the completion.
module pspin_egress_dma
  import pspin_pkg::*;
(
  input  logic                   clk,
  input  logic                   rstn,

  input  egress_cmd_t            cmd_data,
  input  logic                   cmd_valid,
  output logic                   cmd_ready,

  output logic [7:0]             done_id,
  output logic                   done_valid,
  input  logic                   done_ready,

  // AXI4 read master into PsPIN memory
  output logic [31:0]            m_axi_araddr,
  output logic [7:0]             m_axi_arlen,
  output logic [2:0]             m_axi_arsize,
  output logic [1:0]             m_axi_arburst,
  output logic                   m_axi_arvalid,
  input  logic                   m_axi_arready,
  input  logic [AXIS_DATA_W-1:0] m_axi_rdata,
  input  logic [1:0]             m_axi_rresp,      // not checked
  input  logic                   m_axi_rlast,      // burst length is known; not used
  input  logic                   m_axi_rvalid,
  output logic                   m_axi_rready,

  // frame out
  output logic [AXIS_DATA_W-1:0] m_axis_tdata,
  output logic [AXIS_KEEP_W-1:0] m_axis_tkeep,
  output logic                   m_axis_tvalid,
  input  logic                   m_axis_tready,
  output logic                   m_axis_tlast
);

  localparam int unsigned BEAT = AXIS_KEEP_W;
  localparam int unsigned BW   = $clog2(BEAT);

  typedef enum logic [1:0] {S_IDLE, S_AR, S_R, S_DONE} state_e;
  state_e state;

  egress_cmd_t cmd;
  logic [31:0] addr;
  logic [15:0] remaining;   // beats not yet requested
  logic [15:0] left;        // beats of the frame not yet sent
  logic [8:0]  burst, beat_cnt;

  function automatic logic [8:0] burst_beats(input logic [11:0] a, input logic [15:0] rem);
    logic [12:0] to_4k;
    to_4k = 13'(13'd4096 - {1'b0, a}) >> BW;
    if (32'(rem) < 32'(to_4k)) to_4k = 13'(rem);
    if (to_4k > 13'd256) to_4k = 13'd256;
    return 9'(to_4k);
  endfunction

  logic [15:0] cmd_beats;
  assign cmd_beats = 16'((32'(cmd_data.len) + BEAT - 1) >> BW);

  assign cmd_ready     = (state == S_IDLE);
  assign done_valid    = (state == S_DONE);
  assign done_id       = cmd.id;

  assign m_axi_araddr  = addr;
  assign m_axi_arlen   = 8'(burst - 9'd1);
  assign m_axi_arsize  = 3'(BW);
  assign m_axi_arburst = 2'b01;
  assign m_axi_arvalid = (state == S_AR);
  assign m_axi_rready  = (state == S_R) && m_axis_tready;

  assign m_axis_tdata  = m_axi_rdata;
  assign m_axis_tvalid = (state == S_R) && m_axi_rvalid;
  assign m_axis_tlast  = (left == 16'd1);
  assign m_axis_tkeep  = (left == 16'd1) ? keep_mask(cmd.len[BW-1:0]) : '1;

  always_ff @(posedge clk) begin
    if (!rstn) begin
      state     <= S_IDLE;
      cmd       <= '0;
      addr      <= '0;
      remaining <= '0;
      left      <= '0;
      burst     <= '0;
      beat_cnt  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          cmd       <= cmd_data;
          addr      <= cmd_data.addr;
          remaining <= cmd_beats;
          left      <= cmd_beats;
          burst     <= burst_beats(cmd_data.addr[11:0], cmd_beats);
          state     <= (cmd_beats == 0) ? S_DONE : S_AR;
        end
        S_AR: if (m_axi_arready) begin
          beat_cnt  <= burst;
          remaining <= remaining - 16'(burst);
          addr      <= addr + 32'(burst) * BEAT;
          state     <= S_R;
        end
        S_R: if (m_axi_rvalid && m_axi_rready) begin
          beat_cnt <= beat_cnt - 9'd1;
          left     <= left - 16'd1;
          if (beat_cnt == 9'd1) begin
            burst <= burst_beats(addr[11:0], remaining);
            state <= (remaining == 0) ? S_DONE : S_AR;
          end
        end
        S_DONE: if (done_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  a_aligned: assert property (@(posedge clk) disable iff (!rstn)
    (cmd_valid && cmd_ready) |-> (cmd_data.addr[BW-1:0] == '0));
  a_hold: assert property (@(posedge clk) disable iff (!rstn)
    (m_axis_tvalid && !m_axis_tready) |=> m_axis_tvalid);

endmodule
