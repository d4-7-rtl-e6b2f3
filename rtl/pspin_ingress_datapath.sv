// pspin_ingress_datapath: the FPsPIN ingress path in one module.
//
// Chains the four ingress stages and adds no logic of its own:
//   pspin_pkt_match  -> steers frames to PsPIN or back to the NIC,
//   pspin_pkt_alloc  -> picks an L2 packet-buffer slot (or drops),
//   pspin_ingress_dma-> writes the frame into the slot over AXI4,
//   pspin_her_gen    -> issues the Handler Execution Request.
// Frame data flows match -> ingress DMA; metadata flows match -> alloc ->
// ingress DMA -> HER generator. The shared parameters are set here once so
// that the stages agree on buffer layout and sizes.
//
// Timing: 4 cycles of matching for the head beat, the frame itself, 0
// cycles allocation, len/64 + 4 cycles of DMA, 0 cycles HER generation.
module pspin_ingress_datapath
  import pspin_pkg::*;
#(
  parameter logic [31:0] BUF_BASE   = 32'h0,
  parameter int unsigned BUF_BYTES  = 512 * 1024,
  parameter int unsigned FIFO_DEPTH = 32
) (
  input  logic                          clk,
  input  logic                          rstn,

  // configuration
  input  logic                          match_valid,
  input  ruleset_t [NUM_RULESETS-1:0]   rulesets,
  input  logic                          her_gen_en,
  input  exec_ctx_t [NUM_RULESETS-1:0]  ctx,

  // NIC receive stream in, unmatched frames out
  input  logic [AXIS_DATA_W-1:0]        s_axis_nic_tdata,
  input  logic [AXIS_KEEP_W-1:0]        s_axis_nic_tkeep,
  input  logic                          s_axis_nic_tvalid,
  output logic                          s_axis_nic_tready,
  input  logic                          s_axis_nic_tlast,
  output logic [AXIS_DATA_W-1:0]        m_axis_nic_tdata,
  output logic [AXIS_KEEP_W-1:0]        m_axis_nic_tkeep,
  output logic                          m_axis_nic_tvalid,
  input  logic                          m_axis_nic_tready,
  output logic                          m_axis_nic_tlast,

  // AXI4 write master to PsPIN NIC inbound memory
  output logic [31:0]                   m_axi_awaddr,
  output logic [7:0]                    m_axi_awlen,
  output logic [2:0]                    m_axi_awsize,
  output logic [1:0]                    m_axi_awburst,
  output logic                          m_axi_awvalid,
  input  logic                          m_axi_awready,
  output logic [AXIS_DATA_W-1:0]        m_axi_wdata,
  output logic [AXIS_KEEP_W-1:0]        m_axi_wstrb,
  output logic                          m_axi_wlast,
  output logic                          m_axi_wvalid,
  input  logic                          m_axi_wready,
  input  logic [1:0]                    m_axi_bresp,
  input  logic                          m_axi_bvalid,
  output logic                          m_axi_bready,

  // HER to the PsPIN scheduler, feedback (slot free) from it
  output her_t                          her_data,
  output logic                          her_valid,
  input  logic                          her_ready,
  input  logic                          feedback_valid,
  input  logic [31:0]                   feedback_addr,

  // statistics
  output logic [31:0]                   alloc_dropped,
  output logic [$clog2(BUF_BYTES/2/128+1)-1:0]  small_free,
  output logic [$clog2(BUF_BYTES/2/1536+1)-1:0] large_free
);

  logic [AXIS_DATA_W-1:0] p_tdata;
  logic [AXIS_KEEP_W-1:0] p_tkeep;
  logic                   p_tvalid, p_tready, p_tlast;

  pkt_meta_t   m_data;
  logic        m_valid, m_ready;
  alloc_meta_t a_data;
  logic        a_valid, a_ready;
  l2_meta_t    l_data;
  logic        l_valid, l_ready;

  pspin_pkt_match u_match (
    .clk, .rstn, .match_valid, .rulesets,
    .s_axis_nic_tdata, .s_axis_nic_tkeep, .s_axis_nic_tvalid, .s_axis_nic_tready, .s_axis_nic_tlast,
    .m_axis_nic_tdata, .m_axis_nic_tkeep, .m_axis_nic_tvalid, .m_axis_nic_tready, .m_axis_nic_tlast,
    .m_axis_pspin_tdata(p_tdata), .m_axis_pspin_tkeep(p_tkeep), .m_axis_pspin_tvalid(p_tvalid),
    .m_axis_pspin_tready(p_tready), .m_axis_pspin_tlast(p_tlast),
    .meta_data(m_data), .meta_valid(m_valid), .meta_ready(m_ready));

  pspin_pkt_alloc #(.BUF_BASE(BUF_BASE), .BUF_BYTES(BUF_BYTES)) u_alloc (
    .clk, .rstn,
    .in_data(m_data), .in_valid(m_valid), .in_ready(m_ready),
    .out_data(a_data), .out_valid(a_valid), .out_ready(a_ready),
    .feedback_valid, .feedback_addr,
    .dropped(alloc_dropped), .small_free, .large_free);

  pspin_ingress_dma #(.FIFO_DEPTH(FIFO_DEPTH)) u_dma (
    .clk, .rstn,
    .s_axis_tdata(p_tdata), .s_axis_tkeep(p_tkeep), .s_axis_tvalid(p_tvalid),
    .s_axis_tready(p_tready), .s_axis_tlast(p_tlast),
    .meta_in_data(a_data), .meta_in_valid(a_valid), .meta_in_ready(a_ready),
    .meta_out_data(l_data), .meta_out_valid(l_valid), .meta_out_ready(l_ready),
    .m_axi_awaddr, .m_axi_awlen, .m_axi_awsize, .m_axi_awburst, .m_axi_awvalid, .m_axi_awready,
    .m_axi_wdata, .m_axi_wstrb, .m_axi_wlast, .m_axi_wvalid, .m_axi_wready,
    .m_axi_bresp, .m_axi_bvalid, .m_axi_bready);

  pspin_her_gen u_her (
    .her_gen_en, .ctx,
    .in_data(l_data), .in_valid(l_valid), .in_ready(l_ready),
    .her_data, .her_valid, .her_ready);

endmodule
