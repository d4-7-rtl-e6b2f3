// pspin_egress_datapath: the FPsPIN transmit path.
//
// PsPIN egress commands are served by pspin_egress_dma, which reads the
// frame from PsPIN memory and streams it out; pspin_axis_arb_mux then
// merges that stream with the host's transmit stream from the NIC into the
// stream that goes to the Ethernet MAC. rr_en selects round-robin instead
// of PsPIN-first arbitration.
//
// Timing: see the two sub-modules; the arbiter adds one grant cycle per
// frame and no per-beat latency.
module pspin_egress_datapath
  import pspin_pkg::*;
(
  input  logic                   clk,
  input  logic                   rstn,
  input  logic                   rr_en,

  // egress commands from PsPIN
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
  input  logic [1:0]             m_axi_rresp,
  input  logic                   m_axi_rlast,
  input  logic                   m_axi_rvalid,
  output logic                   m_axi_rready,

  // host transmit stream from the NIC
  input  logic [AXIS_DATA_W-1:0] s_axis_host_tdata,
  input  logic [AXIS_KEEP_W-1:0] s_axis_host_tkeep,
  input  logic                   s_axis_host_tvalid,
  output logic                   s_axis_host_tready,
  input  logic                   s_axis_host_tlast,

  // merged transmit stream to the MAC
  output logic [AXIS_DATA_W-1:0] m_axis_tx_tdata,
  output logic [AXIS_KEEP_W-1:0] m_axis_tx_tkeep,
  output logic                   m_axis_tx_tvalid,
  input  logic                   m_axis_tx_tready,
  output logic                   m_axis_tx_tlast,

  output logic [31:0]            grants_pspin,
  output logic [31:0]            grants_host,
  output logic [31:0]            contended
);

  logic [AXIS_DATA_W-1:0] e_tdata;
  logic [AXIS_KEEP_W-1:0] e_tkeep;
  logic                   e_tvalid, e_tready, e_tlast;

  pspin_egress_dma u_dma (
    .clk, .rstn,
    .cmd_data, .cmd_valid, .cmd_ready, .done_id, .done_valid, .done_ready,
    .m_axi_araddr, .m_axi_arlen, .m_axi_arsize, .m_axi_arburst, .m_axi_arvalid, .m_axi_arready,
    .m_axi_rdata, .m_axi_rresp, .m_axi_rlast, .m_axi_rvalid, .m_axi_rready,
    .m_axis_tdata(e_tdata), .m_axis_tkeep(e_tkeep), .m_axis_tvalid(e_tvalid),
    .m_axis_tready(e_tready), .m_axis_tlast(e_tlast));

  pspin_axis_arb_mux #(.DATA_W(AXIS_DATA_W)) u_arb (
    .clk, .rstn, .rr_en,
    .s0_tdata(e_tdata), .s0_tkeep(e_tkeep), .s0_tvalid(e_tvalid), .s0_tready(e_tready), .s0_tlast(e_tlast),
    .s1_tdata(s_axis_host_tdata), .s1_tkeep(s_axis_host_tkeep), .s1_tvalid(s_axis_host_tvalid),
    .s1_tready(s_axis_host_tready), .s1_tlast(s_axis_host_tlast),
    .m_tdata(m_axis_tx_tdata), .m_tkeep(m_axis_tx_tkeep), .m_tvalid(m_axis_tx_tvalid),
    .m_tready(m_axis_tx_tready), .m_tlast(m_axis_tx_tlast),
    .grants0(grants_pspin), .grants1(grants_host), .contended);

endmodule
