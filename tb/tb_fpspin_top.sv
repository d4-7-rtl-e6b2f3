// tb_fpspin_top: end-to-end test of the FPsPIN application block at its
// default (full) size.
//
// Models around the block: the host driving the 24-bit control port, the
// PsPIN host slave port (a word memory), PsPIN's L2 write port for the
// ingress DMA and L2 read port for the egress DMA (byte memories with
// random ready), the PsPIN scheduler (consumes HERs with random stalls and
// returns slots through feedback), the host transmit stream, the NIC PCIe
// DMA engine (serves descriptors from a host-memory model through the
// buffer-RAM port) and the cores printing over APB.
//
// Phases: address map and registers; bypass with the 4-cycle head latency;
// matched traffic into L2 (contents, HER fields, slot class, 4 KiB burst
// split); slot exhaustion and oversize drops; aux reset; egress with
// contention, PsPIN-first and round-robin arbitration; host-memory
// unaligned write, error response and read; stdout. Every mechanism is
// counted and the test fails if one never happened.
module tb_fpspin_top;
  import pspin_pkg::*;

  logic clk = 0, rstn = 0;
  always #2 clk = ~clk;   // 250 MHz

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, msg);
    end
  endtask

  // ------------------------------------------------------------ signals
  logic [23:0] s_ctrl_awaddr = '0, s_ctrl_araddr = '0;
  logic        s_ctrl_awvalid = 0, s_ctrl_wvalid = 0, s_ctrl_bready = 0, s_ctrl_arvalid = 0, s_ctrl_rready = 0;
  logic [31:0] s_ctrl_wdata = '0;
  logic [3:0]  s_ctrl_wstrb = '0;
  logic        s_ctrl_awready, s_ctrl_wready, s_ctrl_bvalid, s_ctrl_arready, s_ctrl_rvalid;
  logic [1:0]  s_ctrl_bresp, s_ctrl_rresp;
  logic [31:0] s_ctrl_rdata;

  logic [31:0] m_host_awaddr, m_host_wdata, m_host_araddr;
  logic [3:0]  m_host_wstrb;
  logic        m_host_awvalid, m_host_wvalid, m_host_bready, m_host_arvalid, m_host_rready;
  logic        m_host_awready, m_host_wready, m_host_arready;
  logic        m_host_bvalid = 0, m_host_rvalid = 0;
  logic [31:0] m_host_rdata = '0;

  logic [AXIS_DATA_W-1:0] rx_tdata = '0, rxo_tdata, htx_tdata = '0, tx_tdata;
  logic [AXIS_KEEP_W-1:0] rx_tkeep = '0, rxo_tkeep, htx_tkeep = '0, tx_tkeep;
  logic rx_tvalid = 0, rx_tlast = 0, rx_tready, rxo_tvalid, rxo_tlast, rxo_tready = 1;
  logic htx_tvalid = 0, htx_tlast = 0, htx_tready, tx_tvalid, tx_tlast, tx_tready = 1;

  logic [NUM_CLUSTERS-1:0] cl_fetch_en, cl_busy = 2'b10;
  logic                    aux_rst;
  logic [NUM_MPQ-1:0]      mpq_full = 16'h8001;

  her_t        her_data;
  logic        her_valid, her_ready = 1, feedback_valid = 0;
  logic [31:0] feedback_addr = '0;

  logic [31:0] nic_awaddr;
  logic [7:0]  nic_awlen;
  logic [2:0]  nic_awsize;
  logic [1:0]  nic_awburst;
  logic        nic_awvalid, nic_awready = 1, nic_wlast, nic_wvalid, nic_wready = 1, nic_bready;
  logic [AXIS_DATA_W-1:0] nic_wdata;
  logic [AXIS_KEEP_W-1:0] nic_wstrb;
  logic        nic_bvalid = 0;

  egress_cmd_t egress_cmd_data = '0;
  logic        egress_cmd_valid = 0, egress_cmd_ready, egress_done_valid, egress_done_ready = 1;
  logic [7:0]  egress_done_id;
  logic [31:0] egr_araddr;
  logic [7:0]  egr_arlen;
  logic [2:0]  egr_arsize;
  logic [1:0]  egr_arburst;
  logic        egr_arvalid, egr_arready = 1, egr_rready;
  logic [AXIS_DATA_W-1:0] egr_rdata = '0;
  logic        egr_rvalid = 0, egr_rlast = 0;

  logic [5:0]  hm_awid = '0, hm_arid = '0, hm_bid, hm_rid;
  logic [63:0] hm_awaddr = '0, hm_araddr = '0;
  logic [7:0]  hm_awlen = '0, hm_arlen = '0;
  logic        hm_awvalid = 0, hm_wlast = 0, hm_wvalid = 0, hm_bready = 0, hm_arvalid = 0, hm_rready = 0;
  logic        hm_awready, hm_wready, hm_bvalid, hm_arready, hm_rvalid, hm_rlast;
  logic [AXIS_DATA_W-1:0] hm_wdata = '0, hm_rdata;
  logic [AXIS_KEEP_W-1:0] hm_wstrb = '0;
  logic [1:0]  hm_bresp, hm_rresp;

  logic [63:0] wr_desc_dma_addr, rd_desc_dma_addr;
  logic [13:0] wr_desc_ram_addr, rd_desc_ram_addr;
  logic [15:0] wr_desc_len, rd_desc_len;
  logic        wr_desc_valid, rd_desc_valid;
  logic        wr_desc_ready = 1, rd_desc_ready = 1, wr_desc_status_valid = 0, rd_desc_status_valid = 0;
  logic [3:0]  wr_desc_status_error = '0, rd_desc_status_error = '0;
  logic        dma_ram_en = 0, dma_ram_we = 0;
  logic [AXIS_KEEP_W-1:0] dma_ram_be = '0;
  logic [7:0]  dma_ram_addr = '0;
  logic [AXIS_DATA_W-1:0] dma_ram_wdata = '0, dma_ram_rdata;

  logic [31:0] apb_paddr = '0, apb_pwdata = '0, apb_prdata;
  logic        apb_psel = 0, apb_penable = 0, apb_pwrite = 0, apb_pready, apb_pslverr;

  fpspin_top dut (
    .clk, .rstn,
    .s_ctrl_awaddr, .s_ctrl_awvalid, .s_ctrl_awready, .s_ctrl_wdata, .s_ctrl_wstrb,
    .s_ctrl_wvalid, .s_ctrl_wready, .s_ctrl_bresp, .s_ctrl_bvalid, .s_ctrl_bready,
    .s_ctrl_araddr, .s_ctrl_arvalid, .s_ctrl_arready, .s_ctrl_rdata, .s_ctrl_rresp,
    .s_ctrl_rvalid, .s_ctrl_rready,
    .m_host_awaddr, .m_host_awvalid, .m_host_awready, .m_host_wdata, .m_host_wstrb,
    .m_host_wvalid, .m_host_wready, .m_host_bresp(2'b00), .m_host_bvalid, .m_host_bready,
    .m_host_araddr, .m_host_arvalid, .m_host_arready, .m_host_rdata, .m_host_rresp(2'b00),
    .m_host_rvalid, .m_host_rready,
    .s_axis_rx_tdata(rx_tdata), .s_axis_rx_tkeep(rx_tkeep), .s_axis_rx_tvalid(rx_tvalid),
    .s_axis_rx_tready(rx_tready), .s_axis_rx_tlast(rx_tlast),
    .m_axis_rx_tdata(rxo_tdata), .m_axis_rx_tkeep(rxo_tkeep), .m_axis_rx_tvalid(rxo_tvalid),
    .m_axis_rx_tready(rxo_tready), .m_axis_rx_tlast(rxo_tlast),
    .s_axis_host_tx_tdata(htx_tdata), .s_axis_host_tx_tkeep(htx_tkeep),
    .s_axis_host_tx_tvalid(htx_tvalid), .s_axis_host_tx_tready(htx_tready),
    .s_axis_host_tx_tlast(htx_tlast),
    .m_axis_tx_tdata(tx_tdata), .m_axis_tx_tkeep(tx_tkeep), .m_axis_tx_tvalid(tx_tvalid),
    .m_axis_tx_tready(tx_tready), .m_axis_tx_tlast(tx_tlast),
    .cl_fetch_en, .aux_rst, .cl_busy, .mpq_full,
    .her_data, .her_valid, .her_ready, .feedback_valid, .feedback_addr,
    .m_nic_axi_awaddr(nic_awaddr), .m_nic_axi_awlen(nic_awlen), .m_nic_axi_awsize(nic_awsize),
    .m_nic_axi_awburst(nic_awburst), .m_nic_axi_awvalid(nic_awvalid), .m_nic_axi_awready(nic_awready),
    .m_nic_axi_wdata(nic_wdata), .m_nic_axi_wstrb(nic_wstrb), .m_nic_axi_wlast(nic_wlast),
    .m_nic_axi_wvalid(nic_wvalid), .m_nic_axi_wready(nic_wready), .m_nic_axi_bresp(2'b00),
    .m_nic_axi_bvalid(nic_bvalid), .m_nic_axi_bready(nic_bready),
    .egress_cmd_data, .egress_cmd_valid, .egress_cmd_ready,
    .egress_done_id, .egress_done_valid, .egress_done_ready,
    .m_egr_axi_araddr(egr_araddr), .m_egr_axi_arlen(egr_arlen), .m_egr_axi_arsize(egr_arsize),
    .m_egr_axi_arburst(egr_arburst), .m_egr_axi_arvalid(egr_arvalid), .m_egr_axi_arready(egr_arready),
    .m_egr_axi_rdata(egr_rdata), .m_egr_axi_rresp(2'b00), .m_egr_axi_rlast(egr_rlast),
    .m_egr_axi_rvalid(egr_rvalid), .m_egr_axi_rready(egr_rready),
    .s_hm_axi_awid(hm_awid), .s_hm_axi_awaddr(hm_awaddr), .s_hm_axi_awlen(hm_awlen),
    .s_hm_axi_awsize(3'd6), .s_hm_axi_awburst(2'b01), .s_hm_axi_awvalid(hm_awvalid),
    .s_hm_axi_awready(hm_awready), .s_hm_axi_wdata(hm_wdata), .s_hm_axi_wstrb(hm_wstrb),
    .s_hm_axi_wlast(hm_wlast), .s_hm_axi_wvalid(hm_wvalid), .s_hm_axi_wready(hm_wready),
    .s_hm_axi_bid(hm_bid), .s_hm_axi_bresp(hm_bresp), .s_hm_axi_bvalid(hm_bvalid),
    .s_hm_axi_bready(hm_bready),
    .s_hm_axi_arid(hm_arid), .s_hm_axi_araddr(hm_araddr), .s_hm_axi_arlen(hm_arlen),
    .s_hm_axi_arsize(3'd6), .s_hm_axi_arburst(2'b01), .s_hm_axi_arvalid(hm_arvalid),
    .s_hm_axi_arready(hm_arready), .s_hm_axi_rid(hm_rid), .s_hm_axi_rdata(hm_rdata),
    .s_hm_axi_rresp(hm_rresp), .s_hm_axi_rlast(hm_rlast), .s_hm_axi_rvalid(hm_rvalid),
    .s_hm_axi_rready(hm_rready),
    .wr_desc_dma_addr, .wr_desc_ram_addr, .wr_desc_len, .wr_desc_valid, .wr_desc_ready,
    .wr_desc_status_error, .wr_desc_status_valid,
    .rd_desc_dma_addr, .rd_desc_ram_addr, .rd_desc_len, .rd_desc_valid, .rd_desc_ready,
    .rd_desc_status_error, .rd_desc_status_valid,
    .dma_ram_en, .dma_ram_we, .dma_ram_be, .dma_ram_addr, .dma_ram_wdata, .dma_ram_rdata,
    .apb_paddr, .apb_psel, .apb_penable, .apb_pwrite, .apb_pwdata, .apb_pready, .apb_prdata,
    .apb_pslverr);

  // ---------------------------------------------------- mechanism counts
  int n_map_handler = 0, n_map_program = 0, n_map_reg = 0;
  int n_bypass = 0, n_latency = 0, n_rx_stall = 0;
  int n_her = 0, n_her_stall = 0, n_small = 0, n_large = 0, n_feedback = 0;
  int n_split_in = 0, n_drop_full = 0, n_drop_big = 0, n_auxrst = 0;
  int n_egr_pspin = 0, n_egr_host = 0, n_egr_split = 0, n_rr_alt = 0, n_contended = 0;
  int n_hm_unaligned = 0, n_hm_error = 0, n_hm_read = 0, n_stdout = 0;

  // ------------------------------------------------- control port master
  task automatic ctrl_write(logic [23:0] a, logic [31:0] d);
    s_ctrl_awaddr <= a; s_ctrl_wdata <= d; s_ctrl_wstrb <= 4'hf;
    s_ctrl_awvalid <= 1; s_ctrl_wvalid <= 1;
    while (1) begin @(negedge clk); if (s_ctrl_awready) begin @(posedge clk); break; end @(posedge clk); end
    s_ctrl_awvalid <= 0; s_ctrl_wvalid <= 0; s_ctrl_bready <= 1;
    while (1) begin @(negedge clk); if (s_ctrl_bvalid) begin @(posedge clk); break; end @(posedge clk); end
    s_ctrl_bready <= 0;
    check(s_ctrl_bresp == 2'b00, "control write response");
  endtask

  task automatic ctrl_read(logic [23:0] a, output logic [31:0] d);
    s_ctrl_araddr <= a; s_ctrl_arvalid <= 1;
    while (1) begin @(negedge clk); if (s_ctrl_arready) begin @(posedge clk); break; end @(posedge clk); end
    s_ctrl_arvalid <= 0; s_ctrl_rready <= 1;
    while (1) begin @(negedge clk); if (s_ctrl_rvalid) begin @(posedge clk); break; end @(posedge clk); end
    d = s_ctrl_rdata;
    s_ctrl_rready <= 0;
  endtask

  function automatic logic [23:0] reg_addr(int grp, int r);
    return 24'h80_0000 | 24'(grp << 12) | 24'(r << 2);
  endfunction

  task automatic reg_write(int grp, int r, logic [31:0] d);
    ctrl_write(reg_addr(grp, r), d);
  endtask

  task automatic reg_read(int grp, int r, output logic [31:0] d);
    ctrl_read(reg_addr(grp, r), d);
  endtask

  // ------------------------------------------------ PsPIN host slave port
  logic [31:0] host_mem[logic [31:0]];
  logic [31:0] last_host_aw = '0, last_host_ar = '0;
  assign m_host_awready = m_host_awvalid && m_host_wvalid && !m_host_bvalid;
  assign m_host_wready  = m_host_awready;
  assign m_host_arready = !m_host_rvalid;
  always @(posedge clk) if (rstn) begin
    if (m_host_awvalid && m_host_awready) begin
      host_mem[m_host_awaddr] = m_host_wdata;
      last_host_aw <= m_host_awaddr;
      m_host_bvalid <= 1;
    end else if (m_host_bvalid && m_host_bready) m_host_bvalid <= 0;
    if (m_host_arvalid && m_host_arready) begin
      last_host_ar  <= m_host_araddr;
      m_host_rdata  <= host_mem.exists(m_host_araddr) ? host_mem[m_host_araddr] : 32'hdead_beef;
      m_host_rvalid <= 1;
    end else if (m_host_rvalid && m_host_rready) m_host_rvalid <= 0;
  end

  // ----------------------------------------------------------- frames
  typedef byte unsigned frame_t[$];

  function automatic frame_t make_frame(int len, int port, bit eom, logic [31:0] msgid, byte unsigned tag);
    frame_t f;
    for (int i = 0; i < len; i++) f.push_back(8'($urandom));
    f[0] = tag;
    f[12] = 8'h08; f[13] = 8'h00; f[14] = 8'h45; f[23] = 8'd17;
    f[36] = 8'(port >> 8); f[37] = 8'(port);
    f[42] = 8'h00; f[43] = eom ? 8'h02 : 8'h00;
    {f[44], f[45], f[46], f[47]} = msgid;
    return f;
  endfunction

  // stream drivers: frames queue up and are sent beat by beat, back to back
  frame_t rx_q[$], htx_q[$];
  int     rx_off = 0, htx_off = 0;

  function automatic logic [AXIS_DATA_W-1:0] beat_data(frame_t f, int off);
    logic [AXIS_DATA_W-1:0] d;
    d = '0;
    for (int i = 0; i < 64; i++) if (off + i < f.size()) d[8*i +: 8] = f[off + i];
    return d;
  endfunction

  function automatic logic [AXIS_KEEP_W-1:0] beat_keep(frame_t f, int off);
    logic [AXIS_KEEP_W-1:0] k;
    k = '0;
    for (int i = 0; i < 64; i++) if (off + i < f.size()) k[i] = 1'b1;
    return k;
  endfunction

  always @(posedge clk) if (rstn) begin
    if (rx_tvalid && rx_tready) begin
      rx_off += 64;
      if (rx_off >= rx_q[0].size()) begin void'(rx_q.pop_front()); rx_off = 0; end
    end
    if (rx_q.size() > 0) begin
      rx_tdata  <= beat_data(rx_q[0], rx_off);
      rx_tkeep  <= beat_keep(rx_q[0], rx_off);
      rx_tlast  <= (rx_off + 64 >= rx_q[0].size());
      rx_tvalid <= 1;
    end else rx_tvalid <= 0;
    if (htx_tvalid && htx_tready) begin
      htx_off += 64;
      if (htx_off >= htx_q[0].size()) begin void'(htx_q.pop_front()); htx_off = 0; end
    end
    if (htx_q.size() > 0) begin
      htx_tdata  <= beat_data(htx_q[0], htx_off);
      htx_tkeep  <= beat_keep(htx_q[0], htx_off);
      htx_tlast  <= (htx_off + 64 >= htx_q[0].size());
      htx_tvalid <= 1;
    end else htx_tvalid <= 0;
  end

  task automatic send_rx(frame_t f);
    rx_q.push_back(f);
    while (rx_q.size() != 0) @(posedge clk);
  endtask

  task automatic send_htx(frame_t f);
    htx_q.push_back(f);
    while (htx_q.size() != 0) @(posedge clk);
  endtask

  // ------------------------------------------ NIC receive pass-through sink
  frame_t exp_bypass[$];
  frame_t cur_rx;
  bit     rx_random = 0;
  always @(posedge clk) if (rstn) begin
    if (rxo_tvalid && !rxo_tready) n_rx_stall++;
    if (rxo_tvalid && rxo_tready) begin
      for (int i = 0; i < 64; i++) if (rxo_tkeep[i]) cur_rx.push_back(rxo_tdata[8*i +: 8]);
      if (rxo_tlast) begin
        if (exp_bypass.size() == 0) begin check(0, "unexpected bypass frame"); $display("  size %0d port %0d", cur_rx.size(), {cur_rx[36], cur_rx[37]}); end
        else check(exp_bypass.pop_front() == cur_rx, "bypass frame contents");
        n_bypass++;
        cur_rx = {};
      end
    end
    rxo_tready <= rx_random ? ($urandom % 3 != 0) : 1'b1;
  end

  // bypass head latency, checked while the path is idle and unthrottled
  bit lat_on = 0, in_frame = 0, head_pending = 0;
  int head_cycle = 0;
  always @(posedge clk) if (rstn) begin
    if (rx_tvalid && rx_tready) in_frame <= !rx_tlast;
    if (rx_tvalid && rx_tready && !in_frame) begin
      head_cycle <= cycle; head_pending <= 1;
    end else if (head_pending && rxo_tvalid) begin
      head_pending <= 0;
      if (lat_on) begin
        check(cycle - head_cycle == 4, $sformatf("matching latency %0d, expected 4", cycle - head_cycle));
        n_latency++;
      end
    end
  end

  // ------------------------------------------------ PsPIN L2 write port
  typedef struct { logic [31:0] addr; int len; } burst_t;
  byte unsigned l2[int unsigned];
  burst_t aw_q[$];
  int wbeat = 0, b_pend = 0;
  bit nic_random = 0;
  always @(posedge clk) if (rstn) begin
    if (nic_awvalid && nic_awready) begin
      aw_q.push_back('{nic_awaddr, int'(nic_awlen) + 1});
      check((nic_awaddr % 4096) + (int'(nic_awlen) + 1) * 64 <= 4096, "ingress burst crosses 4 KiB");
      check(nic_awsize == 3'd6 && nic_awburst == 2'b01, "ingress burst type");
    end
    if (nic_wvalid && nic_wready) begin
      if (aw_q.size() == 0) check(0, "W before AW");
      else begin
        for (int i = 0; i < 64; i++)
          if (nic_wstrb[i]) l2[aw_q[0].addr + 32'(wbeat * 64 + i)] = nic_wdata[8*i +: 8];
        wbeat++;
        if (nic_wlast) begin
          check(wbeat == aw_q[0].len, "ingress wlast position");
          void'(aw_q.pop_front());
          wbeat = 0;
          b_pend++;
        end
      end
    end
    if (nic_bvalid && nic_bready) b_pend--;
    nic_bvalid  <= (b_pend > 0) && ($urandom % 2 == 0 || !nic_random);
    nic_awready <= nic_random ? ($urandom % 3 != 0) : 1'b1;
    nic_wready  <= nic_random ? ($urandom % 4 != 0) : 1'b1;
  end

  // count frames written in more than one burst
  int aw_in_frame = 0;
  always @(posedge clk) if (rstn) begin
    if (nic_awvalid && nic_awready) aw_in_frame++;
    if (her_valid && her_ready) begin
      if (aw_in_frame > 1) n_split_in++;
      aw_in_frame = 0;
    end
  end

  // --------------------------------------------- PsPIN scheduler model
  typedef struct { frame_t f; logic [31:0] msgid; bit eom; } exp_her_t;
  exp_her_t    exp_her[$];
  logic [31:0] held[$];
  bit          hold_feedback = 0, her_random = 0;
  logic [31:0] fb_q[$];
  always @(posedge clk) if (rstn) begin
    if (her_valid && !her_ready) n_her_stall++;
    if (her_valid && her_ready) begin
      n_her++;
      if (exp_her.size() == 0) check(0, "unexpected HER");
      else begin
        exp_her_t e;
        frame_t got;
        e = exp_her.pop_front();
        got = {};
        for (int i = 0; i < e.f.size(); i++) got.push_back(l2[her_data.her_addr + 32'(i)]);
        check(got == e.f, $sformatf("L2 contents of packet at %h", her_data.her_addr));
        if (got != e.f) for (int i = 0; i < e.f.size(); i++) if (got[i] != e.f[i]) begin $display("  byte %0d of %0d: got %h exp %h xfer %0d", i, e.f.size(), got[i], e.f[i], her_data.xfer_size); break; end
        check(her_data.msgid == e.msgid && her_data.eom == e.eom, "HER message ID / EOM");
        check(her_data.ctx_id == 0 && her_data.ctx.hh_addr == 32'h1d00_0100 &&
              her_data.ctx.host_mem_addr == 64'h0000_0001_2000_0000, "HER context fields");
        check(int'(her_data.xfer_size) == e.f.size() && int'(her_data.her_size) == e.f.size(), "HER sizes");
        if (e.f.size() <= 128) begin
          n_small++;
          check(her_data.her_addr < 32'h4_0000 && her_data.her_addr % 128 == 0, "small slot address");
        end else begin
          n_large++;
          check(her_data.her_addr >= 32'h4_0000 && (her_data.her_addr - 32'h4_0000) % 1536 == 0,
                "large slot address");
        end
      end
      if (hold_feedback) held.push_back(her_data.her_addr);
      else fb_q.push_back(her_data.her_addr);
    end
    her_ready <= her_random ? ($urandom % 3 != 0) : 1'b1;
    // feedback: one slot returned per cycle at random
    if (fb_q.size() > 0 && $urandom % 2 == 0) begin
      feedback_valid <= 1;
      feedback_addr  <= fb_q.pop_front();
      n_feedback++;
    end else feedback_valid <= 0;
  end

  // ------------------------------------------------ PsPIN L2 read port
  byte unsigned emem[int unsigned];
  burst_t ar_q[$];
  int ri = 0, n_ar = 0;
  always @(posedge clk) if (rstn) begin
    if (egr_arvalid && egr_arready) begin
      ar_q.push_back('{egr_araddr, int'(egr_arlen) + 1});
      n_ar++;
      check((egr_araddr % 4096) + (int'(egr_arlen) + 1) * 64 <= 4096, "egress burst crosses 4 KiB");
    end
    if (!egr_rvalid || egr_rready) begin
      if (ar_q.size() > 0 && $urandom % 4 != 0) begin
        logic [AXIS_DATA_W-1:0] d;
        for (int i = 0; i < 64; i++) begin
          int unsigned a;
          a = ar_q[0].addr + 32'(ri * 64 + i);
          d[8*i +: 8] = emem.exists(a) ? emem[a] : 8'h00;
        end
        egr_rdata  <= d;
        egr_rvalid <= 1;
        egr_rlast  <= (ri == ar_q[0].len - 1);
        ri++;
        if (ri == ar_q[0].len) begin void'(ar_q.pop_front()); ri = 0; end
      end else egr_rvalid <= 0;
    end
  end

  // ---------------------------------------------------- transmit sink
  frame_t exp_tx_pspin[$], exp_tx_host[$];
  frame_t cur_tx;
  int     tx_order[$];      // source of each transmitted frame, 0 PsPIN 1 host
  always @(posedge clk) if (rstn) begin
    if (tx_tvalid && tx_tready) begin
      for (int i = 0; i < 64; i++) if (tx_tkeep[i]) cur_tx.push_back(tx_tdata[8*i +: 8]);
      if (tx_tlast) begin
        if (cur_tx[0] == 8'hA0) begin
          n_egr_pspin++;
          tx_order.push_back(0);
          if (exp_tx_pspin.size() == 0) check(0, "unexpected PsPIN egress frame");
          else check(exp_tx_pspin.pop_front() == cur_tx, "PsPIN egress frame contents");
        end else begin
          n_egr_host++;
          tx_order.push_back(1);
          if (exp_tx_host.size() == 0) check(0, "unexpected host egress frame");
          else check(exp_tx_host.pop_front() == cur_tx, "host egress frame contents");
        end
        cur_tx = {};
      end
    end
  end

  int n_done = 0;
  always @(posedge clk) if (rstn && egress_done_valid && egress_done_ready) n_done++;

  egress_cmd_t ecmd_q[$];
  always @(posedge clk) begin
    if (egress_cmd_valid && egress_cmd_ready) void'(ecmd_q.pop_front());
    if (ecmd_q.size() > 0) begin
      egress_cmd_data  <= ecmd_q[0];
      egress_cmd_valid <= 1;
    end else egress_cmd_valid <= 0;
  end

  task automatic egress_send(logic [7:0] id, logic [31:0] addr, int len);
    frame_t f;
    f = make_frame(len, 1, 0, 0, 8'hA0);
    for (int i = 0; i < len; i++) emem[addr + 32'(i)] = f[i];
    exp_tx_pspin.push_back(f);
    ecmd_q.push_back('{id: id, addr: addr, len: 16'(len)});
    while (ecmd_q.size() != 0) @(posedge clk);
  endtask

  // n frames of the given length (0: random) from PsPIN and from the host
  task automatic egress_many(int n, int id0, logic [31:0] base, int len);
    for (int k = 0; k < n; k++)
      egress_send(8'(id0 + k), base + 32'(k * 2048), len != 0 ? len : 64 + int'($urandom % 1400));
  endtask

  task automatic host_many(int n, int len);
    frame_t f;
    for (int k = 0; k < n; k++) begin
      f = make_frame(len != 0 ? len : 64 + int'($urandom % 1400), 1, 0, 0, 8'hB0);
      exp_tx_host.push_back(f);
      htx_q.push_back(f);     // queued back to back
    end
    while (htx_q.size() != 0) @(posedge clk);
  endtask

  // ------------------------------------------------ NIC PCIe DMA engine
  logic [7:0] hostmem[logic [63:0]];
  bit         inject_error = 0;
  initial begin
    forever begin
      @(posedge clk);
      if (wr_desc_valid && wr_desc_ready) begin
        logic [63:0] da;
        int ra, len;
        da = wr_desc_dma_addr;
        ra = int'(wr_desc_ram_addr); len = int'(wr_desc_len);
        for (int w = ra / 64; w <= (ra + len - 1) / 64; w++) begin
          dma_ram_en <= 1; dma_ram_we <= 0; dma_ram_addr <= 8'(w);
          @(posedge clk);
          dma_ram_en <= 0;
          @(posedge clk);
          for (int i = 0; i < 64; i++)
            if (w * 64 + i >= ra && w * 64 + i < ra + len)
              hostmem[da + 64'(w * 64 + i - int'(ra))] = dma_ram_rdata[8*i +: 8];
        end
        wr_desc_status_error <= inject_error ? 4'd1 : 4'd0;
        wr_desc_status_valid <= 1;
        @(posedge clk);
        wr_desc_status_valid <= 0;
      end else if (rd_desc_valid && rd_desc_ready) begin
        logic [63:0] da;
        int ra, len;
        da = rd_desc_dma_addr;
        ra = int'(rd_desc_ram_addr); len = int'(rd_desc_len);
        for (int w = 0; w < len / 64; w++) begin
          logic [AXIS_DATA_W-1:0] d;
          for (int i = 0; i < 64; i++) d[8*i +: 8] = 8'(da[7:0] + 8'(w * 64 + i) + 8'h5a);
          dma_ram_en <= 1; dma_ram_we <= 1; dma_ram_be <= '1;
          dma_ram_addr <= 8'(ra / 64 + w); dma_ram_wdata <= d;
          @(posedge clk);
        end
        dma_ram_en <= 0; dma_ram_we <= 0;
        rd_desc_status_error <= 4'd0;
        rd_desc_status_valid <= 1;
        @(posedge clk);
        rd_desc_status_valid <= 0;
      end
    end
  end

  // ---------------------------------------------------------- APB cores
  task automatic apb_write(int core, byte unsigned ch);
    apb_paddr <= 32'(core * 4); apb_pwdata <= 32'(ch); apb_pwrite <= 1; apb_psel <= 1; apb_penable <= 0;
    @(posedge clk);
    apb_penable <= 1;
    while (1) begin @(negedge clk); if (apb_pready) begin @(posedge clk); break; end @(posedge clk); end
    apb_psel <= 0; apb_penable <= 0; apb_pwrite <= 0;
  endtask

  // --------------------------------------------------------- configure
  task automatic config_match();
    reg_write(2, 0, 0);                      // match_valid off while writing
    reg_write(2, 'h10, 0);                   // ruleset 0: AND
    reg_write(2, 'h20 + 0, 3); reg_write(2, 'h40 + 0, 32'hffff_0000);
    reg_write(2, 'h60 + 0, 32'h0800_0000); reg_write(2, 'h80 + 0, 32'h0800_ffff);
    reg_write(2, 'h20 + 1, 5); reg_write(2, 'h40 + 1, 32'hff);
    reg_write(2, 'h60 + 1, 17); reg_write(2, 'h80 + 1, 17);
    reg_write(2, 'h20 + 2, 9); reg_write(2, 'h40 + 2, 32'hffff_0000);
    reg_write(2, 'h60 + 2, 32'h15b3_0000); reg_write(2, 'h80 + 2, 32'h15b3_0000);   // port 5555
    reg_write(2, 'h20 + 3, 9); reg_write(2, 'h40 + 3, 32'hffff_0000);
    reg_write(2, 'h60 + 3, 32'h15b3_0000); reg_write(2, 'h80 + 3, 32'h15b3_0000);
    reg_write(2, 'ha0, 10); reg_write(2, 'ha8, 2); reg_write(2, 'hb0, 2); reg_write(2, 'hb8, 2);
    for (int s = 1; s < NUM_RULESETS; s++) reg_write(2, 'h60 + s * 4, 1);   // never matches
    reg_write(3, 'h10, 1);                   // context 0
    reg_write(3, 'h20, 32'h1c00_0000); reg_write(3, 'h30, 32'h1000);
    reg_write(3, 'h40, 32'h2000_0000); reg_write(3, 'h50, 32'h1);
    reg_write(3, 'h70, 32'h1d00_0100); reg_write(3, 'h90, 32'h1d00_0200); reg_write(3, 'hb0, 32'h1d00_0300);
    reg_write(3, 0, 1);
    reg_write(2, 0, 1);                      // match_valid on
  endtask

  task automatic rx_traffic(int n, bit matching);
    for (int k = 0; k < n; k++) begin
      int len;
      bit hit;
      logic [31:0] id;
      bit eom;
      frame_t f;
      len = (k % 3 == 0) ? 60 + $urandom % 69 : 129 + $urandom % 1408;
      hit = matching && ($urandom % 4 != 0);
      id = $urandom;
      eom = 1'($urandom % 2);
      f = make_frame(len, hit ? 5555 : 1234, eom, id, 8'h11);
      if (hit) exp_her.push_back('{f, id, eom});
      else exp_bypass.push_back(f);
      send_rx(f);
      if ($urandom % 2 == 0) repeat ($urandom % 4) @(posedge clk);
    end
  endtask

  task automatic drain(int max);
    int t;
    t = 0;
    while ((exp_her.size() != 0 || exp_bypass.size() != 0) && t < max) begin @(posedge clk); t++; end
    repeat (20) @(posedge clk);
  endtask

  // -------------------------------------------------------------- test
  logic [31:0] rd;
  initial begin
    repeat (5) @(posedge clk);
    rstn <= 1;
    repeat (3) @(posedge clk);

    // address map: handler memory, program memory, registers
    ctrl_write(24'h00_0100, 32'hcafe_0001);
    check(last_host_aw == 32'h1c00_0100, "handler memory write address");
    ctrl_write(24'h40_0200, 32'hcafe_0002);
    check(last_host_aw == 32'h1d00_0200, "program memory write address");
    ctrl_read(24'h00_0100, rd);
    check(rd == 32'hcafe_0001 && last_host_ar == 32'h1c00_0100, "handler memory read");
    n_map_handler++;
    ctrl_read(24'h40_0200, rd);
    check(rd == 32'hcafe_0002 && last_host_ar == 32'h1d00_0200, "program memory read");
    n_map_program++;
    ctrl_write(24'hbf_0000 | 24'h0000, 32'h3);          // ignored bits set: cl_fetch_en
    check(cl_fetch_en == 2'b11, "cl_fetch_en output");
    reg_read(0, 0, rd); check(rd == 3, "cl_fetch_en readback");
    reg_read(0, 2, rd); check(rd == 32'(cl_busy), "cl_busy status");
    reg_read(0, 3, rd); check(rd == 32'(mpq_full), "mpq_full status");
    reg_read(4, 1, rd); check(rd == 2048, "small slots free after reset");
    reg_read(4, 2, rd); check(rd == 170, "large slots free after reset");
    n_map_reg++;

    // bypass: matching off, every frame back to the NIC, 4-cycle latency
    lat_on = 1;
    for (int k = 0; k < 20; k++) begin
      frame_t f;
      f = make_frame(60 + $urandom % 1000, 5555, 1, k, 8'h11);
      exp_bypass.push_back(f);
      send_rx(f);
      repeat (30) @(posedge clk);
    end
    lat_on = 0;
    drain(2000);

    // matched traffic into L2, random back-pressure everywhere
    config_match();
    rx_random = 1; nic_random = 1; her_random = 1;
    rx_traffic(300, 1);
    drain(100000);
    check(exp_her.size() == 0 && exp_bypass.size() == 0, "all ingress frames delivered");
    rx_random = 0; nic_random = 0; her_random = 0;
    repeat (200) @(posedge clk);
    reg_read(4, 1, rd); check(rd == 2048, "small slots all returned");
    reg_read(4, 2, rd); check(rd == 170, "large slots all returned");

    // slot exhaustion: hold the slots, send 172 large packets
    hold_feedback = 1;
    for (int k = 0; k < 172; k++) begin
      frame_t f;
      f = make_frame(1000, 5555, 0, k, 8'h11);
      if (k < 170) exp_her.push_back('{f, k, 0});
      send_rx(f);
    end
    drain(100000);
    reg_read(4, 0, rd); check(rd == 2, "two packets dropped on a full buffer");
    if (rd == 2) n_drop_full = 2;
    reg_read(4, 2, rd); check(rd == 0, "large slots exhausted");
    // a small packet still gets a small slot
    begin
      frame_t f;
      f = make_frame(100, 5555, 1, 32'h77, 8'h11);
      exp_her.push_back('{f, 32'h77, 1});
      send_rx(f);
    end
    // oversize packet: dropped even with slots free
    hold_feedback = 0;
    while (held.size() > 0) fb_q.push_back(held.pop_front());
    repeat (400) @(posedge clk);
    begin
      frame_t f;
      f = make_frame(1600, 5555, 1, 32'h78, 8'h11);
      send_rx(f);
    end
    drain(10000);
    reg_read(4, 0, rd); check(rd == 3, "oversize packet dropped");
    if (rd == 3) n_drop_big = 1;
    reg_read(4, 2, rd); check(rd == 170, "large slots returned after exhaustion");
    // traffic still flows after the drops
    rx_traffic(20, 1);
    drain(20000);

    // aux reset: data path held in reset, counters cleared
    reg_write(0, 1, 1);
    check(aux_rst == 1, "aux_rst output");
    reg_read(4, 0, rd); check(rd == 0, "drop counter cleared by aux_rst");
    reg_write(0, 1, 0);
    check(aux_rst == 0, "aux_rst released");
    n_auxrst++;
    rx_traffic(10, 1);
    drain(20000);
    check(exp_her.size() == 0 && exp_bypass.size() == 0, "traffic after aux reset");

    // egress, PsPIN-first: both sources loaded while the link is stalled;
    // the host frame is ready first, after it the waiting PsPIN frame must win
    tx_order = {};
    tx_tready <= 0;
    fork
      begin
        egress_send(1, 32'h0000_0fc0, 1000);   // crosses 4 KiB
        egress_many(7, 2, 32'h1_0000, 0);
      end
      host_many(8, 0);
      begin repeat (60) @(posedge clk); tx_tready <= 1; end
    join
    repeat (500) @(posedge clk);
    if (n_ar > 8) n_egr_split++;
    check(tx_order.size() >= 2 && tx_order[0] == 1 && tx_order[1] == 0,
          "PsPIN frame wins over a waiting host frame");
    reg_read(4, 3, rd); check(rd == 8, "PsPIN egress frame count");
    reg_read(4, 4, rd); check(rd == 8, "host egress frame count");

    // egress, round-robin
    reg_write(5, 0, 1);
    tx_order = {};
    tx_tready <= 0;
    fork
      egress_many(6, 20, 32'h2_0000, 256);
      host_many(6, 256);
      begin repeat (60) @(posedge clk); tx_tready <= 1; end
    join
    repeat (500) @(posedge clk);
    for (int i = 1; i < tx_order.size() && i < 6; i++) if (tx_order[i] != tx_order[i-1]) n_rr_alt++;
    check(n_rr_alt >= 4, $sformatf("round-robin alternation (%0d switches)", n_rr_alt));
    check(exp_tx_pspin.size() == 0 && exp_tx_host.size() == 0, "all egress frames sent");
    check(n_done == 14, "egress completions");
    reg_read(4, 5, rd); n_contended = int'(rd);
    check(rd > 0, "egress contention seen");

    // host memory: unaligned write of 89 bytes at 0x1_0000_0010
    begin
      logic [AXIS_DATA_W-1:0] w0, w1;
      for (int i = 0; i < 64; i++) begin w0[8*i +: 8] = 8'(i + 1); w1[8*i +: 8] = 8'(i + 65); end
      hm_awid <= 6'd5; hm_awaddr <= 64'h1_0000_0010; hm_awlen <= 1; hm_awvalid <= 1;
      while (1) begin @(negedge clk); if (hm_awready) begin @(posedge clk); break; end @(posedge clk); end
      hm_awvalid <= 0;
      hm_wdata <= w0; hm_wstrb <= ~64'h0 << 16; hm_wlast <= 0; hm_wvalid <= 1;
      while (1) begin @(negedge clk); if (hm_wready) begin @(posedge clk); break; end @(posedge clk); end
      hm_wdata <= w1; hm_wstrb <= ~64'h0 >> 23; hm_wlast <= 1;
      while (1) begin @(negedge clk); if (hm_wready) begin @(posedge clk); break; end @(posedge clk); end
      hm_wvalid <= 0;
      fork
        begin
          while (1) begin @(negedge clk); if (wr_desc_valid) begin @(posedge clk); break; end @(posedge clk); end
          check(wr_desc_dma_addr == 64'h1_0000_0010 && wr_desc_len == 16'd89 && wr_desc_ram_addr == 14'd16,
                $sformatf("write descriptor addr %h len %0d ram %0d", wr_desc_dma_addr, wr_desc_len, wr_desc_ram_addr));
        end
      join
      hm_bready <= 1;
      while (1) begin @(negedge clk); if (hm_bvalid) begin @(posedge clk); break; end @(posedge clk); end
      hm_bready <= 0;
      check(hm_bresp == 2'b00 && hm_bid == 6'd5, "host write response");
      begin
        bit ok;
        ok = 1;
        for (int i = 16; i < 64; i++) if (!hostmem.exists(64'h1_0000_0000 + 64'(i)) || hostmem[64'h1_0000_0000 + 64'(i)] != 8'(i + 1)) ok = 0;
        for (int i = 0; i <= 40; i++) if (!hostmem.exists(64'h1_0000_0040 + 64'(i)) || hostmem[64'h1_0000_0040 + 64'(i)] != 8'(i + 65)) ok = 0;
        if (hostmem.exists(64'h1_0000_000f) || hostmem.exists(64'h1_0000_0069)) ok = 0;
        check(ok, "host memory contents of unaligned write");
        if (ok) n_hm_unaligned++;
      end
      // same again with the DMA engine reporting an error
      inject_error = 1;
      hm_awaddr <= 64'h1_0000_1000; hm_awlen <= 0; hm_awvalid <= 1;
      while (1) begin @(negedge clk); if (hm_awready) begin @(posedge clk); break; end @(posedge clk); end
      hm_awvalid <= 0;
      hm_wstrb <= '1; hm_wlast <= 1; hm_wvalid <= 1;
      while (1) begin @(negedge clk); if (hm_wready) begin @(posedge clk); break; end @(posedge clk); end
      hm_wvalid <= 0; hm_bready <= 1;
      while (1) begin @(negedge clk); if (hm_bvalid) begin @(posedge clk); break; end @(posedge clk); end
      hm_bready <= 0;
      check(hm_bresp == 2'b10, "host write error response");
      if (hm_bresp == 2'b10) n_hm_error++;
      inject_error = 0;
    end
    // host memory read, 4 beats
    begin
      int beats;
      beats = 0;
      hm_arid <= 6'd9; hm_araddr <= 64'h2_0000_0040; hm_arlen <= 3; hm_arvalid <= 1;
      while (1) begin @(negedge clk); if (hm_arready) begin @(posedge clk); break; end @(posedge clk); end
      hm_arvalid <= 0; hm_rready <= 1;
      while (beats < 4) begin
        @(posedge clk);
        if (hm_rvalid && hm_rready) begin
          bit ok;
          ok = 1;
          for (int i = 0; i < 64; i++) if (hm_rdata[8*i +: 8] != 8'(8'h40 + 8'(beats * 64 + i) + 8'h5a)) ok = 0;
          check(ok && hm_rid == 6'd9 && hm_rresp == 2'b00, $sformatf("host read beat %0d", beats));
          check(hm_rlast == (beats == 3), "host read rlast");
          beats++;
        end
      end
      hm_rready <= 0;
      n_hm_read++;
    end

    // stdout from two cores
    apb_write(3, "H"); apb_write(7, "i"); apb_write(3, "!");
    reg_read(1, 0, rd); check(rd == 32'h8000_0348, $sformatf("stdout entry 1 %h", rd));
    reg_read(1, 0, rd); check(rd == 32'h8000_0769, $sformatf("stdout entry 2 %h", rd));
    reg_read(1, 0, rd); check(rd == 32'h8000_0321, $sformatf("stdout entry 3 %h", rd));
    reg_read(1, 0, rd); check(rd == 32'h0, "stdout empty");
    n_stdout = 3;

    // mechanisms
    $display("map h/p/r %0d %0d %0d, bypass %0d, latency %0d, rx stalls %0d", n_map_handler, n_map_program,
             n_map_reg, n_bypass, n_latency, n_rx_stall);
    $display("her %0d (stall %0d), small %0d, large %0d, feedback %0d, split %0d, drop full %0d, drop big %0d",
             n_her, n_her_stall, n_small, n_large, n_feedback, n_split_in, n_drop_full, n_drop_big);
    $display("egress pspin %0d host %0d split %0d contended %0d rr switches %0d; host mem %0d %0d %0d; stdout %0d; aux %0d",
             n_egr_pspin, n_egr_host, n_egr_split, n_contended, n_rr_alt, n_hm_unaligned, n_hm_error,
             n_hm_read, n_stdout, n_auxrst);
    check(n_map_handler > 0 && n_map_program > 0 && n_map_reg > 0, "coverage: address map regions");
    check(n_bypass > 0 && n_latency > 0 && n_rx_stall > 0, "coverage: bypass, latency, bypass stall");
    check(n_her > 0 && n_her_stall > 0, "coverage: HER and HER stall");
    check(n_small > 0 && n_large > 0 && n_feedback > 0, "coverage: small/large slots, feedback");
    check(n_split_in > 0 && n_egr_split > 0, "coverage: 4 KiB split ingress and egress");
    check(n_drop_full > 0 && n_drop_big > 0, "coverage: drops");
    check(n_egr_pspin > 0 && n_egr_host > 0 && n_contended > 0 && n_rr_alt > 0, "coverage: egress arbitration");
    check(n_hm_unaligned > 0 && n_hm_error > 0 && n_hm_read > 0, "coverage: host memory DMA");
    check(n_stdout > 0 && n_auxrst > 0, "coverage: stdout and aux reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
