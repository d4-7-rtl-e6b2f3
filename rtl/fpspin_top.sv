// fpspin_top: FPsPIN application block, the glue between a NIC and PsPIN.
//
// PsPIN is a RISC-V packet-processing cluster implementing the sPIN
// model: for every packet, handler code runs on one of the cluster's cores.
// On its own it cannot receive or send packets, cannot be configured by
// the host and cannot reach host memory. This block adds those three paths
// between the NIC (at its per-interface AXI-Stream attach point and its
// application control and DMA ports) and the cluster:
//
//   control path  pspin_app_addr_map splits the host's 24-bit control
//                 space into PsPIN handler/program memory and registers;
//                 pspin_ctrl_regs holds the configuration; apb_stdout
//                 collects the cores' printed characters for the host.
//   ingress path  pspin_ingress_datapath: match, allocate an L2 slot, DMA
//                 the frame into L2, issue the HER; non-matching frames go
//                 back to the NIC unchanged.
//   egress path   pspin_egress_datapath: DMA a frame out of PsPIN memory
//                 and merge it with the host's transmit stream.
//   host DMA      pspin_hostmem_dma: PsPIN's AXI4 host-memory master to
//                 the NIC's descriptor-based PCIe DMA engine.
//
// The PsPIN cluster, the NIC and clock-domain crossing are outside; their
// connections are the ports of this module. The control register aux_rst
// resets the data path (and is exported to reset PsPIN). All logic runs
// on one clock.
//
// Follows the design description for the block structure and the
// connections between the blocks; the interfaces of each block are
// documented in its own file.
module fpspin_top
  import pspin_pkg::*;
#(
  parameter logic [31:0] PKT_BUF_BASE  = 32'h0,
  parameter int unsigned PKT_BUF_BYTES = 512 * 1024,
  parameter int unsigned HOST_ID_W     = 6
) (
  input  logic                   clk,
  input  logic                   rstn,

  // ---- NIC application control port (AXI-Lite, 24-bit address)
  input  logic [23:0]            s_ctrl_awaddr,
  input  logic                   s_ctrl_awvalid,
  output logic                   s_ctrl_awready,
  input  logic [31:0]            s_ctrl_wdata,
  input  logic [3:0]             s_ctrl_wstrb,
  input  logic                   s_ctrl_wvalid,
  output logic                   s_ctrl_wready,
  output logic [1:0]             s_ctrl_bresp,
  output logic                   s_ctrl_bvalid,
  input  logic                   s_ctrl_bready,
  input  logic [23:0]            s_ctrl_araddr,
  input  logic                   s_ctrl_arvalid,
  output logic                   s_ctrl_arready,
  output logic [31:0]            s_ctrl_rdata,
  output logic [1:0]             s_ctrl_rresp,
  output logic                   s_ctrl_rvalid,
  input  logic                   s_ctrl_rready,

  // ---- PsPIN host slave port (code/data download), AXI-Lite
  output logic [31:0]            m_host_awaddr,
  output logic                   m_host_awvalid,
  input  logic                   m_host_awready,
  output logic [31:0]            m_host_wdata,
  output logic [3:0]             m_host_wstrb,
  output logic                   m_host_wvalid,
  input  logic                   m_host_wready,
  input  logic [1:0]             m_host_bresp,
  input  logic                   m_host_bvalid,
  output logic                   m_host_bready,
  output logic [31:0]            m_host_araddr,
  output logic                   m_host_arvalid,
  input  logic                   m_host_arready,
  input  logic [31:0]            m_host_rdata,
  input  logic [1:0]             m_host_rresp,
  input  logic                   m_host_rvalid,
  output logic                   m_host_rready,

  // ---- NIC receive stream (interface attach point) and pass-through
  input  logic [AXIS_DATA_W-1:0] s_axis_rx_tdata,
  input  logic [AXIS_KEEP_W-1:0] s_axis_rx_tkeep,
  input  logic                   s_axis_rx_tvalid,
  output logic                   s_axis_rx_tready,
  input  logic                   s_axis_rx_tlast,
  output logic [AXIS_DATA_W-1:0] m_axis_rx_tdata,
  output logic [AXIS_KEEP_W-1:0] m_axis_rx_tkeep,
  output logic                   m_axis_rx_tvalid,
  input  logic                   m_axis_rx_tready,
  output logic                   m_axis_rx_tlast,

  // ---- NIC transmit: host stream in, merged stream out
  input  logic [AXIS_DATA_W-1:0] s_axis_host_tx_tdata,
  input  logic [AXIS_KEEP_W-1:0] s_axis_host_tx_tkeep,
  input  logic                   s_axis_host_tx_tvalid,
  output logic                   s_axis_host_tx_tready,
  input  logic                   s_axis_host_tx_tlast,
  output logic [AXIS_DATA_W-1:0] m_axis_tx_tdata,
  output logic [AXIS_KEEP_W-1:0] m_axis_tx_tkeep,
  output logic                   m_axis_tx_tvalid,
  input  logic                   m_axis_tx_tready,
  output logic                   m_axis_tx_tlast,

  // ---- PsPIN cluster control and status
  output logic [NUM_CLUSTERS-1:0] cl_fetch_en,
  output logic                   aux_rst,
  input  logic [NUM_CLUSTERS-1:0] cl_busy,
  input  logic [NUM_MPQ-1:0]     mpq_full,

  // ---- PsPIN scheduler: HER out, feedback in
  output her_t                   her_data,
  output logic                   her_valid,
  input  logic                   her_ready,
  input  logic                   feedback_valid,
  input  logic [31:0]            feedback_addr,

  // ---- PsPIN NIC inbound memory port (AXI4 write)
  output logic [31:0]            m_nic_axi_awaddr,
  output logic [7:0]             m_nic_axi_awlen,
  output logic [2:0]             m_nic_axi_awsize,
  output logic [1:0]             m_nic_axi_awburst,
  output logic                   m_nic_axi_awvalid,
  input  logic                   m_nic_axi_awready,
  output logic [AXIS_DATA_W-1:0] m_nic_axi_wdata,
  output logic [AXIS_KEEP_W-1:0] m_nic_axi_wstrb,
  output logic                   m_nic_axi_wlast,
  output logic                   m_nic_axi_wvalid,
  input  logic                   m_nic_axi_wready,
  input  logic [1:0]             m_nic_axi_bresp,
  input  logic                   m_nic_axi_bvalid,
  output logic                   m_nic_axi_bready,

  // ---- PsPIN egress commands and egress memory reads (AXI4 read)
  input  egress_cmd_t            egress_cmd_data,
  input  logic                   egress_cmd_valid,
  output logic                   egress_cmd_ready,
  output logic [7:0]             egress_done_id,
  output logic                   egress_done_valid,
  input  logic                   egress_done_ready,
  output logic [31:0]            m_egr_axi_araddr,
  output logic [7:0]             m_egr_axi_arlen,
  output logic [2:0]             m_egr_axi_arsize,
  output logic [1:0]             m_egr_axi_arburst,
  output logic                   m_egr_axi_arvalid,
  input  logic                   m_egr_axi_arready,
  input  logic [AXIS_DATA_W-1:0] m_egr_axi_rdata,
  input  logic [1:0]             m_egr_axi_rresp,
  input  logic                   m_egr_axi_rlast,
  input  logic                   m_egr_axi_rvalid,
  output logic                   m_egr_axi_rready,

  // ---- PsPIN host-memory master (AXI4) -> host DMA
  input  logic [HOST_ID_W-1:0]   s_hm_axi_awid,
  input  logic [63:0]            s_hm_axi_awaddr,
  input  logic [7:0]             s_hm_axi_awlen,
  input  logic [2:0]             s_hm_axi_awsize,
  input  logic [1:0]             s_hm_axi_awburst,
  input  logic                   s_hm_axi_awvalid,
  output logic                   s_hm_axi_awready,
  input  logic [AXIS_DATA_W-1:0] s_hm_axi_wdata,
  input  logic [AXIS_KEEP_W-1:0] s_hm_axi_wstrb,
  input  logic                   s_hm_axi_wlast,
  input  logic                   s_hm_axi_wvalid,
  output logic                   s_hm_axi_wready,
  output logic [HOST_ID_W-1:0]   s_hm_axi_bid,
  output logic [1:0]             s_hm_axi_bresp,
  output logic                   s_hm_axi_bvalid,
  input  logic                   s_hm_axi_bready,
  input  logic [HOST_ID_W-1:0]   s_hm_axi_arid,
  input  logic [63:0]            s_hm_axi_araddr,
  input  logic [7:0]             s_hm_axi_arlen,
  input  logic [2:0]             s_hm_axi_arsize,
  input  logic [1:0]             s_hm_axi_arburst,
  input  logic                   s_hm_axi_arvalid,
  output logic                   s_hm_axi_arready,
  output logic [HOST_ID_W-1:0]   s_hm_axi_rid,
  output logic [AXIS_DATA_W-1:0] s_hm_axi_rdata,
  output logic [1:0]             s_hm_axi_rresp,
  output logic                   s_hm_axi_rlast,
  output logic                   s_hm_axi_rvalid,
  input  logic                   s_hm_axi_rready,

  // ---- NIC PCIe DMA engine: descriptors, completions, buffer RAM
  output logic [63:0]            wr_desc_dma_addr,
  output logic [13:0]            wr_desc_ram_addr,
  output logic [15:0]            wr_desc_len,
  output logic                   wr_desc_valid,
  input  logic                   wr_desc_ready,
  input  logic [3:0]             wr_desc_status_error,
  input  logic                   wr_desc_status_valid,
  output logic [63:0]            rd_desc_dma_addr,
  output logic [13:0]            rd_desc_ram_addr,
  output logic [15:0]            rd_desc_len,
  output logic                   rd_desc_valid,
  input  logic                   rd_desc_ready,
  input  logic [3:0]             rd_desc_status_error,
  input  logic                   rd_desc_status_valid,
  input  logic                   dma_ram_en,
  input  logic                   dma_ram_we,
  input  logic [AXIS_KEEP_W-1:0] dma_ram_be,
  input  logic [7:0]             dma_ram_addr,
  input  logic [AXIS_DATA_W-1:0] dma_ram_wdata,
  output logic [AXIS_DATA_W-1:0] dma_ram_rdata,

  // ---- APB stdout port from the PsPIN cores
  input  logic [31:0]            apb_paddr,
  input  logic                   apb_psel,
  input  logic                   apb_penable,
  input  logic                   apb_pwrite,
  input  logic [31:0]            apb_pwdata,
  output logic                   apb_pready,
  output logic [31:0]            apb_prdata,
  output logic                   apb_pslverr
);

  // data path reset: global reset or the aux_rst register
  logic dp_rstn;
  assign dp_rstn = rstn && !aux_rst;

  // ------------------------------------------------------ control path
  logic [15:0] r_awaddr, r_araddr;
  logic        r_awvalid, r_awready, r_wvalid, r_wready, r_bvalid, r_bready;
  logic        r_arvalid, r_arready, r_rvalid, r_rready;
  logic [31:0] r_wdata, r_rdata;
  logic [3:0]  r_wstrb;
  logic [1:0]  r_bresp, r_rresp;

  pspin_app_addr_map u_addr_map (
    .clk, .rstn,
    .s_awaddr(s_ctrl_awaddr), .s_awvalid(s_ctrl_awvalid), .s_awready(s_ctrl_awready),
    .s_wdata(s_ctrl_wdata), .s_wstrb(s_ctrl_wstrb), .s_wvalid(s_ctrl_wvalid), .s_wready(s_ctrl_wready),
    .s_bresp(s_ctrl_bresp), .s_bvalid(s_ctrl_bvalid), .s_bready(s_ctrl_bready),
    .s_araddr(s_ctrl_araddr), .s_arvalid(s_ctrl_arvalid), .s_arready(s_ctrl_arready),
    .s_rdata(s_ctrl_rdata), .s_rresp(s_ctrl_rresp), .s_rvalid(s_ctrl_rvalid), .s_rready(s_ctrl_rready),
    .m_host_awaddr, .m_host_awvalid, .m_host_awready, .m_host_wdata, .m_host_wstrb,
    .m_host_wvalid, .m_host_wready, .m_host_bresp, .m_host_bvalid, .m_host_bready,
    .m_host_araddr, .m_host_arvalid, .m_host_arready, .m_host_rdata, .m_host_rresp,
    .m_host_rvalid, .m_host_rready,
    .m_reg_awaddr(r_awaddr), .m_reg_awvalid(r_awvalid), .m_reg_awready(r_awready),
    .m_reg_wdata(r_wdata), .m_reg_wstrb(r_wstrb), .m_reg_wvalid(r_wvalid), .m_reg_wready(r_wready),
    .m_reg_bresp(r_bresp), .m_reg_bvalid(r_bvalid), .m_reg_bready(r_bready),
    .m_reg_araddr(r_araddr), .m_reg_arvalid(r_arvalid), .m_reg_arready(r_arready),
    .m_reg_rdata(r_rdata), .m_reg_rresp(r_rresp), .m_reg_rvalid(r_rvalid), .m_reg_rready(r_rready));

  logic                        match_valid, her_gen_en, egress_rr_en;
  ruleset_t [NUM_RULESETS-1:0] rulesets;
  exec_ctx_t [NUM_RULESETS-1:0] ctx;
  logic                        so_valid, so_pop;
  logic [31:0]                 so_data, so_lost;
  logic [31:0]                 st_dropped, st_egr_pspin, st_egr_host, st_egr_cont;
  logic [$clog2(PKT_BUF_BYTES/2/128+1)-1:0]  st_small_free;
  logic [$clog2(PKT_BUF_BYTES/2/1536+1)-1:0] st_large_free;

  pspin_ctrl_regs u_regs (
    .clk, .rstn,
    .s_awaddr(r_awaddr), .s_awvalid(r_awvalid), .s_awready(r_awready),
    .s_wdata(r_wdata), .s_wstrb(r_wstrb), .s_wvalid(r_wvalid), .s_wready(r_wready),
    .s_bresp(r_bresp), .s_bvalid(r_bvalid), .s_bready(r_bready),
    .s_araddr(r_araddr), .s_arvalid(r_arvalid), .s_arready(r_arready),
    .s_rdata(r_rdata), .s_rresp(r_rresp), .s_rvalid(r_rvalid), .s_rready(r_rready),
    .cl_fetch_en, .aux_rst, .cl_busy, .mpq_full,
    .match_valid, .match_rulesets(rulesets),
    .her_gen_en, .her_gen_ctx(ctx),
    .stdout_valid(so_valid), .stdout_data(so_data), .stdout_pop(so_pop), .stdout_lost(so_lost),
    .stat_dropped(st_dropped), .stat_small_free(32'(st_small_free)),
    .stat_large_free(32'(st_large_free)),
    .stat_egress_pspin(st_egr_pspin), .stat_egress_host(st_egr_host),
    .stat_egress_contended(st_egr_cont), .egress_rr_en);

  apb_stdout #(.NUM_CORES(NUM_HPUS)) u_stdout (
    .clk, .rstn,
    .paddr(apb_paddr), .psel(apb_psel), .penable(apb_penable), .pwrite(apb_pwrite),
    .pwdata(apb_pwdata), .pready(apb_pready), .prdata(apb_prdata), .pslverr(apb_pslverr),
    .rd_valid(so_valid), .rd_data(so_data), .rd_pop(so_pop), .lost(so_lost));

  // ------------------------------------------------------ ingress path
  pspin_ingress_datapath #(.BUF_BASE(PKT_BUF_BASE), .BUF_BYTES(PKT_BUF_BYTES)) u_ingress (
    .clk, .rstn(dp_rstn),
    .match_valid, .rulesets, .her_gen_en, .ctx,
    .s_axis_nic_tdata(s_axis_rx_tdata), .s_axis_nic_tkeep(s_axis_rx_tkeep),
    .s_axis_nic_tvalid(s_axis_rx_tvalid), .s_axis_nic_tready(s_axis_rx_tready),
    .s_axis_nic_tlast(s_axis_rx_tlast),
    .m_axis_nic_tdata(m_axis_rx_tdata), .m_axis_nic_tkeep(m_axis_rx_tkeep),
    .m_axis_nic_tvalid(m_axis_rx_tvalid), .m_axis_nic_tready(m_axis_rx_tready),
    .m_axis_nic_tlast(m_axis_rx_tlast),
    .m_axi_awaddr(m_nic_axi_awaddr), .m_axi_awlen(m_nic_axi_awlen), .m_axi_awsize(m_nic_axi_awsize),
    .m_axi_awburst(m_nic_axi_awburst), .m_axi_awvalid(m_nic_axi_awvalid),
    .m_axi_awready(m_nic_axi_awready), .m_axi_wdata(m_nic_axi_wdata), .m_axi_wstrb(m_nic_axi_wstrb),
    .m_axi_wlast(m_nic_axi_wlast), .m_axi_wvalid(m_nic_axi_wvalid), .m_axi_wready(m_nic_axi_wready),
    .m_axi_bresp(m_nic_axi_bresp), .m_axi_bvalid(m_nic_axi_bvalid), .m_axi_bready(m_nic_axi_bready),
    .her_data, .her_valid, .her_ready, .feedback_valid, .feedback_addr,
    .alloc_dropped(st_dropped), .small_free(st_small_free), .large_free(st_large_free));

  // ------------------------------------------------------- egress path
  pspin_egress_datapath u_egress (
    .clk, .rstn(dp_rstn), .rr_en(egress_rr_en),
    .cmd_data(egress_cmd_data), .cmd_valid(egress_cmd_valid), .cmd_ready(egress_cmd_ready),
    .done_id(egress_done_id), .done_valid(egress_done_valid), .done_ready(egress_done_ready),
    .m_axi_araddr(m_egr_axi_araddr), .m_axi_arlen(m_egr_axi_arlen), .m_axi_arsize(m_egr_axi_arsize),
    .m_axi_arburst(m_egr_axi_arburst), .m_axi_arvalid(m_egr_axi_arvalid),
    .m_axi_arready(m_egr_axi_arready), .m_axi_rdata(m_egr_axi_rdata), .m_axi_rresp(m_egr_axi_rresp),
    .m_axi_rlast(m_egr_axi_rlast), .m_axi_rvalid(m_egr_axi_rvalid), .m_axi_rready(m_egr_axi_rready),
    .s_axis_host_tdata(s_axis_host_tx_tdata), .s_axis_host_tkeep(s_axis_host_tx_tkeep),
    .s_axis_host_tvalid(s_axis_host_tx_tvalid), .s_axis_host_tready(s_axis_host_tx_tready),
    .s_axis_host_tlast(s_axis_host_tx_tlast),
    .m_axis_tx_tdata, .m_axis_tx_tkeep, .m_axis_tx_tvalid, .m_axis_tx_tready, .m_axis_tx_tlast,
    .grants_pspin(st_egr_pspin), .grants_host(st_egr_host), .contended(st_egr_cont));

  // ---------------------------------------------------------- host DMA
  pspin_hostmem_dma #(.DATA_W(AXIS_DATA_W), .ID_W(HOST_ID_W), .BUF_BEATS(256)) u_hostmem (
    .clk, .rstn(dp_rstn),
    .s_axi_awid(s_hm_axi_awid), .s_axi_awaddr(s_hm_axi_awaddr), .s_axi_awlen(s_hm_axi_awlen),
    .s_axi_awsize(s_hm_axi_awsize), .s_axi_awburst(s_hm_axi_awburst),
    .s_axi_awvalid(s_hm_axi_awvalid), .s_axi_awready(s_hm_axi_awready),
    .s_axi_wdata(s_hm_axi_wdata), .s_axi_wstrb(s_hm_axi_wstrb), .s_axi_wlast(s_hm_axi_wlast),
    .s_axi_wvalid(s_hm_axi_wvalid), .s_axi_wready(s_hm_axi_wready),
    .s_axi_bid(s_hm_axi_bid), .s_axi_bresp(s_hm_axi_bresp), .s_axi_bvalid(s_hm_axi_bvalid),
    .s_axi_bready(s_hm_axi_bready),
    .s_axi_arid(s_hm_axi_arid), .s_axi_araddr(s_hm_axi_araddr), .s_axi_arlen(s_hm_axi_arlen),
    .s_axi_arsize(s_hm_axi_arsize), .s_axi_arburst(s_hm_axi_arburst),
    .s_axi_arvalid(s_hm_axi_arvalid), .s_axi_arready(s_hm_axi_arready),
    .s_axi_rid(s_hm_axi_rid), .s_axi_rdata(s_hm_axi_rdata), .s_axi_rresp(s_hm_axi_rresp),
    .s_axi_rlast(s_hm_axi_rlast), .s_axi_rvalid(s_hm_axi_rvalid), .s_axi_rready(s_hm_axi_rready),
    .wr_desc_dma_addr, .wr_desc_ram_addr, .wr_desc_len, .wr_desc_valid, .wr_desc_ready,
    .wr_desc_status_error, .wr_desc_status_valid,
    .rd_desc_dma_addr, .rd_desc_ram_addr, .rd_desc_len, .rd_desc_valid, .rd_desc_ready,
    .rd_desc_status_error, .rd_desc_status_valid,
    .dma_ram_en, .dma_ram_we, .dma_ram_be, .dma_ram_addr, .dma_ram_wdata, .dma_ram_rdata);

endmodule
