// pspin_axis_arb_mux: two-input AXI-Stream arbiter for the NIC transmit path.
//
// Merges the frames PsPIN sends (input 0) with the frames the host sends
// (input 1) into the one transmit stream. Arbitration is per frame: once an
// input is granted, it keeps the output until the beat with tlast has been
// accepted. With rr_en low, PsPIN wins whenever both inputs wait, for the
// highest PsPIN throughput. With rr_en high the winner alternates, so that
// host and PsPIN share the link fairly.
//
// Interface: s0_*/s1_* in, m_* out; grants counts the frames granted per
// input and contended counts frames granted while the other input waited.
// Timing: one idle cycle to grant, then one beat per cycle; the output is
// combinational from the granted input.
//
// Follows the design description: PsPIN priority by default, optional
// round-robin. Own choices: frame-level locking and the counters.
module pspin_axis_arb_mux #(
  parameter int unsigned DATA_W = 512
) (
  input  logic                clk,
  input  logic                rstn,
  input  logic                rr_en,

  input  logic [DATA_W-1:0]   s0_tdata,
  input  logic [DATA_W/8-1:0] s0_tkeep,
  input  logic                s0_tvalid,
  output logic                s0_tready,
  input  logic                s0_tlast,

  input  logic [DATA_W-1:0]   s1_tdata,
  input  logic [DATA_W/8-1:0] s1_tkeep,
  input  logic                s1_tvalid,
  output logic                s1_tready,
  input  logic                s1_tlast,

  output logic [DATA_W-1:0]   m_tdata,
  output logic [DATA_W/8-1:0] m_tkeep,
  output logic                m_tvalid,
  input  logic                m_tready,
  output logic                m_tlast,

  output logic [31:0]         grants0,
  output logic [31:0]         grants1,
  output logic [31:0]         contended
);

  logic busy;       // a frame is in progress
  logic sel;        // granted input
  logic last_sel;   // input granted last, for round-robin
  logic pick;

  always_comb begin
    if (s0_tvalid && s1_tvalid) pick = rr_en ? ~last_sel : 1'b0;
    else                        pick = s1_tvalid;
  end

  assign m_tdata   = sel ? s1_tdata  : s0_tdata;
  assign m_tkeep   = sel ? s1_tkeep  : s0_tkeep;
  assign m_tlast   = sel ? s1_tlast  : s0_tlast;
  assign m_tvalid  = busy && (sel ? s1_tvalid : s0_tvalid);
  assign s0_tready = busy && !sel && m_tready;
  assign s1_tready = busy &&  sel && m_tready;

  always_ff @(posedge clk) begin
    if (!rstn) begin
      busy      <= 1'b0;
      sel       <= 1'b0;
      last_sel  <= 1'b1;
      grants0   <= '0;
      grants1   <= '0;
      contended <= '0;
    end else if (!busy) begin
      if (s0_tvalid || s1_tvalid) begin
        busy     <= 1'b1;
        sel      <= pick;
        last_sel <= pick;
        if (pick) grants1 <= grants1 + 1'b1;
        else      grants0 <= grants0 + 1'b1;
        if (s0_tvalid && s1_tvalid) contended <= contended + 1'b1;
      end
    end else if (m_tvalid && m_tready && m_tlast) begin
      busy <= 1'b0;
    end
  end

endmodule
