// tb_fpspin_datatypes: message reassembly into host memory through FPsPIN.
//
// The shape of the MPI datatypes workload: 16 messages are received in
// parallel (one in flight per handler core), each as a run of SLMP packets
// with one packet in flight per message, so the packets of different
// messages interleave. For every packet a handler model reads the SLMP
// message ID and offset from the L2 slot and writes the payload to the
// message's buffer in host memory at an unaligned address, through the
// AXI4 host-memory port, then frees the slot. A model of the NIC's PCIe DMA
// engine serves the resulting descriptors. The datatype unpacking itself is
// handler software and is not modelled: each payload lands contiguously.
//
// Checks: every host-memory byte of every message, the EOM bit of every
// HER (last packet of a message only), no write error, all slots returned,
// and that the host DMA saw unaligned starts and ends.
module tb_fpspin_datatypes;
  import pspin_pkg::*;
  localparam int unsigned HOST_ID_W = 6;

  logic                   clk;
  logic                   rstn;
  logic [23:0]            s_ctrl_awaddr;
  logic                   s_ctrl_awvalid;
  logic                   s_ctrl_awready;
  logic [31:0]            s_ctrl_wdata;
  logic [3:0]             s_ctrl_wstrb;
  logic                   s_ctrl_wvalid;
  logic                   s_ctrl_wready;
  logic [1:0]             s_ctrl_bresp;
  logic                   s_ctrl_bvalid;
  logic                   s_ctrl_bready;
  logic [23:0]            s_ctrl_araddr;
  logic                   s_ctrl_arvalid;
  logic                   s_ctrl_arready;
  logic [31:0]            s_ctrl_rdata;
  logic [1:0]             s_ctrl_rresp;
  logic                   s_ctrl_rvalid;
  logic                   s_ctrl_rready;
  logic [31:0]            m_host_awaddr;
  logic                   m_host_awvalid;
  logic                   m_host_awready;
  logic [31:0]            m_host_wdata;
  logic [3:0]             m_host_wstrb;
  logic                   m_host_wvalid;
  logic                   m_host_wready;
  logic [1:0]             m_host_bresp;
  logic                   m_host_bvalid;
  logic                   m_host_bready;
  logic [31:0]            m_host_araddr;
  logic                   m_host_arvalid;
  logic                   m_host_arready;
  logic [31:0]            m_host_rdata;
  logic [1:0]             m_host_rresp;
  logic                   m_host_rvalid;
  logic                   m_host_rready;
  logic [AXIS_DATA_W-1:0] s_axis_rx_tdata;
  logic [AXIS_KEEP_W-1:0] s_axis_rx_tkeep;
  logic                   s_axis_rx_tvalid;
  logic                   s_axis_rx_tready;
  logic                   s_axis_rx_tlast;
  logic [AXIS_DATA_W-1:0] m_axis_rx_tdata;
  logic [AXIS_KEEP_W-1:0] m_axis_rx_tkeep;
  logic                   m_axis_rx_tvalid;
  logic                   m_axis_rx_tready;
  logic                   m_axis_rx_tlast;
  logic [AXIS_DATA_W-1:0] s_axis_host_tx_tdata;
  logic [AXIS_KEEP_W-1:0] s_axis_host_tx_tkeep;
  logic                   s_axis_host_tx_tvalid;
  logic                   s_axis_host_tx_tready;
  logic                   s_axis_host_tx_tlast;
  logic [AXIS_DATA_W-1:0] m_axis_tx_tdata;
  logic [AXIS_KEEP_W-1:0] m_axis_tx_tkeep;
  logic                   m_axis_tx_tvalid;
  logic                   m_axis_tx_tready;
  logic                   m_axis_tx_tlast;
  logic [NUM_CLUSTERS-1:0] cl_fetch_en;
  logic                   aux_rst;
  logic [NUM_CLUSTERS-1:0] cl_busy;
  logic [NUM_MPQ-1:0]     mpq_full;
  her_t                   her_data;
  logic                   her_valid;
  logic                   her_ready;
  logic                   feedback_valid;
  logic [31:0]            feedback_addr;
  logic [31:0]            m_nic_axi_awaddr;
  logic [7:0]             m_nic_axi_awlen;
  logic [2:0]             m_nic_axi_awsize;
  logic [1:0]             m_nic_axi_awburst;
  logic                   m_nic_axi_awvalid;
  logic                   m_nic_axi_awready;
  logic [AXIS_DATA_W-1:0] m_nic_axi_wdata;
  logic [AXIS_KEEP_W-1:0] m_nic_axi_wstrb;
  logic                   m_nic_axi_wlast;
  logic                   m_nic_axi_wvalid;
  logic                   m_nic_axi_wready;
  logic [1:0]             m_nic_axi_bresp;
  logic                   m_nic_axi_bvalid;
  logic                   m_nic_axi_bready;
  egress_cmd_t            egress_cmd_data;
  logic                   egress_cmd_valid;
  logic                   egress_cmd_ready;
  logic [7:0]             egress_done_id;
  logic                   egress_done_valid;
  logic                   egress_done_ready;
  logic [31:0]            m_egr_axi_araddr;
  logic [7:0]             m_egr_axi_arlen;
  logic [2:0]             m_egr_axi_arsize;
  logic [1:0]             m_egr_axi_arburst;
  logic                   m_egr_axi_arvalid;
  logic                   m_egr_axi_arready;
  logic [AXIS_DATA_W-1:0] m_egr_axi_rdata;
  logic [1:0]             m_egr_axi_rresp;
  logic                   m_egr_axi_rlast;
  logic                   m_egr_axi_rvalid;
  logic                   m_egr_axi_rready;
  logic [HOST_ID_W-1:0]   s_hm_axi_awid;
  logic [63:0]            s_hm_axi_awaddr;
  logic [7:0]             s_hm_axi_awlen;
  logic [2:0]             s_hm_axi_awsize;
  logic [1:0]             s_hm_axi_awburst;
  logic                   s_hm_axi_awvalid;
  logic                   s_hm_axi_awready;
  logic [AXIS_DATA_W-1:0] s_hm_axi_wdata;
  logic [AXIS_KEEP_W-1:0] s_hm_axi_wstrb;
  logic                   s_hm_axi_wlast;
  logic                   s_hm_axi_wvalid;
  logic                   s_hm_axi_wready;
  logic [HOST_ID_W-1:0]   s_hm_axi_bid;
  logic [1:0]             s_hm_axi_bresp;
  logic                   s_hm_axi_bvalid;
  logic                   s_hm_axi_bready;
  logic [HOST_ID_W-1:0]   s_hm_axi_arid;
  logic [63:0]            s_hm_axi_araddr;
  logic [7:0]             s_hm_axi_arlen;
  logic [2:0]             s_hm_axi_arsize;
  logic [1:0]             s_hm_axi_arburst;
  logic                   s_hm_axi_arvalid;
  logic                   s_hm_axi_arready;
  logic [HOST_ID_W-1:0]   s_hm_axi_rid;
  logic [AXIS_DATA_W-1:0] s_hm_axi_rdata;
  logic [1:0]             s_hm_axi_rresp;
  logic                   s_hm_axi_rlast;
  logic                   s_hm_axi_rvalid;
  logic                   s_hm_axi_rready;
  logic [63:0]            wr_desc_dma_addr;
  logic [13:0]            wr_desc_ram_addr;
  logic [15:0]            wr_desc_len;
  logic                   wr_desc_valid;
  logic                   wr_desc_ready;
  logic [3:0]             wr_desc_status_error;
  logic                   wr_desc_status_valid;
  logic [63:0]            rd_desc_dma_addr;
  logic [13:0]            rd_desc_ram_addr;
  logic [15:0]            rd_desc_len;
  logic                   rd_desc_valid;
  logic                   rd_desc_ready;
  logic [3:0]             rd_desc_status_error;
  logic                   rd_desc_status_valid;
  logic                   dma_ram_en;
  logic                   dma_ram_we;
  logic [AXIS_KEEP_W-1:0] dma_ram_be;
  logic [7:0]             dma_ram_addr;
  logic [AXIS_DATA_W-1:0] dma_ram_wdata;
  logic [AXIS_DATA_W-1:0] dma_ram_rdata;
  logic [31:0]            apb_paddr;
  logic                   apb_psel;
  logic                   apb_penable;
  logic                   apb_pwrite;
  logic [31:0]            apb_pwdata;
  logic                   apb_pready;
  logic [31:0]            apb_prdata;
  logic                   apb_pslverr;

  fpspin_top dut (.*);

  always #2 clk = ~clk;
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, msg); end
  endtask

  typedef byte unsigned frame_t[$];

  // ------------------------------------------------------ unused ports
  assign m_host_awready = 1'b1;
  assign m_host_wready  = 1'b1;
  assign m_host_bresp   = 2'b00;
  assign m_host_arready = 1'b1;
  assign m_host_rdata   = '0;
  assign m_host_rresp   = 2'b00;
  assign cl_busy = '0;
  assign mpq_full = '0;
  assign rd_desc_ready = 1'b1; assign rd_desc_status_error = '0; assign rd_desc_status_valid = 1'b0;
  assign wr_desc_ready = 1'b1;
  assign egress_cmd_valid = 1'b0;
  assign egress_cmd_data = '0;
  assign egress_done_ready = 1'b1;
  assign apb_paddr = '0; assign apb_psel = 1'b0; assign apb_penable = 1'b0;
  assign apb_pwrite = 1'b0; assign apb_pwdata = '0;

  // ------------------------------------------------------ control port
  task automatic ctrl_write(logic [23:0] a, logic [31:0] d);
    s_ctrl_awaddr <= a; s_ctrl_wdata <= d; s_ctrl_wstrb <= 4'hf;
    s_ctrl_awvalid <= 1; s_ctrl_wvalid <= 1;
    while (1) begin @(negedge clk); if (s_ctrl_awready) begin @(posedge clk); break; end @(posedge clk); end
    s_ctrl_awvalid <= 0; s_ctrl_wvalid <= 0; s_ctrl_bready <= 1;
    while (1) begin @(negedge clk); if (s_ctrl_bvalid) begin @(posedge clk); break; end @(posedge clk); end
    s_ctrl_bready <= 0;
  endtask

  task automatic ctrl_read(logic [23:0] a, output logic [31:0] d);
    s_ctrl_araddr <= a; s_ctrl_arvalid <= 1;
    while (1) begin @(negedge clk); if (s_ctrl_arready) begin @(posedge clk); break; end @(posedge clk); end
    s_ctrl_arvalid <= 0; s_ctrl_rready <= 1;
    while (1) begin @(negedge clk); if (s_ctrl_rvalid) begin d = s_ctrl_rdata; @(posedge clk); break; end @(posedge clk); end
    s_ctrl_rready <= 0;
  endtask

  function automatic logic [23:0] reg_addr(int grp, int r);
    return 24'h80_0000 | 24'(grp << 12) | 24'(r << 2);
  endfunction
  task automatic reg_write(int grp, int r, logic [31:0] d); ctrl_write(reg_addr(grp, r), d); endtask
  task automatic reg_read(int grp, int r, output logic [31:0] d); ctrl_read(reg_addr(grp, r), d); endtask

  // ------------------------------------------------------------ frames
  function automatic frame_t make_frame(int len, bit is_udp, int port, int tag);
    frame_t f;
    for (int i = 0; i < len; i++) f.push_back(8'($urandom));
    f[0] = 8'(tag);
    if (is_udp) begin
      f[12] = 8'h08; f[13] = 8'h00; f[14] = 8'h45; f[23] = 8'd17;
      f[36] = 8'(port >> 8); f[37] = 8'(port);
      f[42] = 8'h00; f[43] = 8'h02;
      {f[44], f[45], f[46], f[47]} = 32'(tag);
    end else begin
      f[12] = 8'h08; f[13] = 8'h06;     // ARP
    end
    return f;
  endfunction

  // ------------------------------------------------------ stream drivers
  frame_t rx_q[$], htx_q[$];
  int     rx_off = 0, htx_off = 0;
  int     rx_start[$];      // cycle each request's first beat entered

  function automatic logic [AXIS_DATA_W-1:0] beat_data(frame_t f, int off);
    logic [AXIS_DATA_W-1:0] d;
    d = '0;
    for (int i = 0; i < 64; i++) if (off + i < f.size()) d[8*i +: 8] = f[off + i];
    return d;
  endfunction
  function automatic logic [AXIS_KEEP_W-1:0] beat_keep(frame_t f, int off);
    logic [AXIS_KEEP_W-1:0] k;
    for (int i = 0; i < 64; i++) k[i] = (off + i < f.size());
    return k;
  endfunction

  // registered drivers: a new beat is loaded when the current one is taken
  function automatic bit is_ping(frame_t f);
    return f[12] == 8'h08 && f[13] == 8'h00 && {f[36], f[37]} == 16'd5555;
  endfunction

  always @(posedge clk) begin
    if (!rstn) begin
      s_axis_rx_tvalid <= 1'b0; s_axis_rx_tdata <= '0; s_axis_rx_tkeep <= '0; s_axis_rx_tlast <= 1'b0;
      s_axis_host_tx_tvalid <= 1'b0; s_axis_host_tx_tdata <= '0; s_axis_host_tx_tkeep <= '0;
      s_axis_host_tx_tlast <= 1'b0;
    end else begin
      if (!s_axis_rx_tvalid || s_axis_rx_tready) begin
        if (rx_q.size() > 0) begin
          if (rx_off == 0 && is_ping(rx_q[0])) rx_start.push_back(cycle);
          s_axis_rx_tvalid <= 1'b1;
          s_axis_rx_tdata  <= beat_data(rx_q[0], rx_off);
          s_axis_rx_tkeep  <= beat_keep(rx_q[0], rx_off);
          s_axis_rx_tlast  <= rx_off + 64 >= rx_q[0].size();
          if (rx_off + 64 >= rx_q[0].size()) begin rx_off = 0; void'(rx_q.pop_front()); end
          else rx_off += 64;
        end else s_axis_rx_tvalid <= 1'b0;
      end
      if (!s_axis_host_tx_tvalid || s_axis_host_tx_tready) begin
        if (htx_q.size() > 0) begin
          s_axis_host_tx_tvalid <= 1'b1;
          s_axis_host_tx_tdata  <= beat_data(htx_q[0], htx_off);
          s_axis_host_tx_tkeep  <= beat_keep(htx_q[0], htx_off);
          s_axis_host_tx_tlast  <= htx_off + 64 >= htx_q[0].size();
          if (htx_off + 64 >= htx_q[0].size()) begin htx_off = 0; void'(htx_q.pop_front()); end
          else htx_off += 64;
        end else s_axis_host_tx_tvalid <= 1'b0;
      end
    end
  end

  // ------------------------------------------------------ PsPIN L2 memory
  byte unsigned l2[int unsigned];
  logic [31:0] aw_addr;
  int          w_beat = 0;
  bit          b_pend = 0;
  assign m_nic_axi_awready = !b_pend && (w_beat == 0);
  assign m_nic_axi_wready  = 1'b1;
  assign m_nic_axi_bresp   = 2'b00;
  assign m_nic_axi_bvalid  = b_pend;
  always @(posedge clk) if (rstn) begin
    if (m_nic_axi_awvalid && m_nic_axi_awready) aw_addr <= m_nic_axi_awaddr;
    if (m_nic_axi_wvalid && m_nic_axi_wready) begin
      for (int i = 0; i < 64; i++)
        if (m_nic_axi_wstrb[i]) l2[aw_addr + 32'(w_beat * 64 + i)] = m_nic_axi_wdata[8*i +: 8];
      if (m_nic_axi_wlast) begin w_beat = 0; b_pend <= 1; end
      else w_beat++;
    end
    if (b_pend && m_nic_axi_bready) b_pend <= 0;
  end

  // egress reads from L2
  logic [31:0] ar_addr;
  int          ar_left = 0, r_beat = 0;
  assign m_egr_axi_arready = (ar_left == 0);
  assign m_egr_axi_rvalid  = (ar_left > 0);
  assign m_egr_axi_rresp   = 2'b00;
  assign m_egr_axi_rlast   = (ar_left == 1);
  always_comb begin
    m_egr_axi_rdata = '0;
    for (int i = 0; i < 64; i++)
      if (l2.exists(ar_addr + 32'(r_beat * 64 + i))) m_egr_axi_rdata[8*i +: 8] = l2[ar_addr + 32'(r_beat * 64 + i)];
  end
  always @(posedge clk) if (rstn) begin
    if (m_egr_axi_arvalid && m_egr_axi_arready) begin
      ar_addr <= m_egr_axi_araddr; ar_left <= int'(m_egr_axi_arlen) + 1; r_beat <= 0;
    end else if (m_egr_axi_rvalid && m_egr_axi_rready) begin
      ar_left <= ar_left - 1; r_beat <= r_beat + 1;
    end
  end

  // ------------------------------------------------ NIC PCIe DMA engine
  logic [7:0] hostmem[logic [63:0]];
  int         n_desc = 0, n_unaligned = 0;
  initial begin
    dma_ram_en = 0; dma_ram_we = 0; dma_ram_be = '0; dma_ram_addr = '0; dma_ram_wdata = '0;
    wr_desc_status_valid = 0; wr_desc_status_error = '0;
    forever begin
      @(posedge clk);
      if (rstn && wr_desc_valid && wr_desc_ready) begin
        logic [63:0] da;
        int ra, len;
        da = wr_desc_dma_addr;
        ra = int'(wr_desc_ram_addr); len = int'(wr_desc_len);
        n_desc++;
        if (da[5:0] != 0 || ((da + 64'(len)) % 64) != 0) n_unaligned++;
        for (int w = ra / 64; w <= (ra + len - 1) / 64; w++) begin
          dma_ram_en <= 1; dma_ram_we <= 0; dma_ram_addr <= 8'(w);
          @(posedge clk);
          dma_ram_en <= 0;
          @(posedge clk);
          for (int i = 0; i < 64; i++)
            if (w * 64 + i >= ra && w * 64 + i < ra + len)
              hostmem[da + 64'(w * 64 + i - ra)] = dma_ram_rdata[8*i +: 8];
        end
        wr_desc_status_valid <= 1;
        @(posedge clk);
        wr_desc_status_valid <= 0;
      end
    end
  end

  // ------------------------------------------------- handler model on PsPIN
  // HERs queue up; one handler at a time owns the host-memory port.
  localparam int     N_MSG = 16;
  localparam longint MSG_STRIDE = 64'h10_0000;
  localparam longint HOST_BASE  = 64'h2_0000_0003;   // deliberately unaligned
  her_t        her_q[$];
  logic [31:0] free_q[$];
  int          n_her = 0, n_eom = 0, n_werr = 0;
  assign her_ready = 1'b1;
  always @(posedge clk) if (rstn && her_valid) her_q.push_back(her_data);

  always @(posedge clk) begin
    if (!rstn) begin feedback_valid <= 1'b0; feedback_addr <= '0; end
    else if (free_q.size() > 0) begin feedback_valid <= 1'b1; feedback_addr <= free_q.pop_front(); end
    else feedback_valid <= 1'b0;
  end

  task automatic hm_write(logic [63:0] dest, frame_t d);
    logic [63:0] start;
    int first, nb;
    start = {dest[63:6], 6'd0};
    first = int'(dest[5:0]);
    nb = (first + d.size() + 63) / 64;
    s_hm_axi_awid <= '0; s_hm_axi_awaddr <= start; s_hm_axi_awlen <= 8'(nb - 1);
    s_hm_axi_awsize <= 3'd6; s_hm_axi_awburst <= 2'b01; s_hm_axi_awvalid <= 1;
    while (1) begin @(negedge clk); if (s_hm_axi_awready) begin @(posedge clk); break; end @(posedge clk); end
    s_hm_axi_awvalid <= 0;
    for (int b = 0; b < nb; b++) begin
      logic [AXIS_DATA_W-1:0] wd;
      logic [AXIS_KEEP_W-1:0] ws;
      wd = '0; ws = '0;
      for (int i = 0; i < 64; i++) begin
        int k;
        k = b * 64 + i - first;
        if (k >= 0 && k < d.size()) begin wd[8*i +: 8] = d[k]; ws[i] = 1'b1; end
      end
      s_hm_axi_wdata <= wd; s_hm_axi_wstrb <= ws; s_hm_axi_wlast <= (b == nb - 1); s_hm_axi_wvalid <= 1;
      while (1) begin @(negedge clk); if (s_hm_axi_wready) begin @(posedge clk); break; end @(posedge clk); end
    end
    s_hm_axi_wvalid <= 0; s_hm_axi_wlast <= 0;
    s_hm_axi_bready <= 1;
    while (1) begin @(negedge clk); if (s_hm_axi_bvalid) begin @(posedge clk); break; end @(posedge clk); end
    if (s_hm_axi_bresp != 2'b00) n_werr++;
    s_hm_axi_bready <= 0;
  endtask

  initial begin
    s_hm_axi_awid = '0; s_hm_axi_awaddr = '0; s_hm_axi_awlen = '0; s_hm_axi_awsize = 3'd6;
    s_hm_axi_awburst = 2'b01; s_hm_axi_awvalid = 0; s_hm_axi_wdata = '0; s_hm_axi_wstrb = '0;
    s_hm_axi_wlast = 0; s_hm_axi_wvalid = 0; s_hm_axi_bready = 0;
    s_hm_axi_arid = '0; s_hm_axi_araddr = '0; s_hm_axi_arlen = '0; s_hm_axi_arsize = 3'd6;
    s_hm_axi_arburst = 2'b01; s_hm_axi_arvalid = 0; s_hm_axi_rready = 1;
    forever begin
      @(posedge clk);
      if (her_q.size() > 0) begin
        her_t h;
        frame_t pay;
        logic [31:0] msg, off;
        int len;
        h = her_q.pop_front();
        len = int'(h.xfer_size);
        msg = h.msgid;
        off = {l2[h.her_addr + 48], l2[h.her_addr + 49], l2[h.her_addr + 50], l2[h.her_addr + 51]};
        pay = {};
        for (int i = 52; i < len; i++) pay.push_back(l2[h.her_addr + 32'(i)]);
        n_her++;
        if (h.eom) n_eom++;
        check(h.eom == exp_eom[{msg[15:0], off[15:0]}], "EOM bit of the HER");
        hm_write(HOST_BASE + 64'(msg) * MSG_STRIDE + 64'(off), pay);
        free_q.push_back(h.her_addr);
      end
    end
  end

  // ------------------------------------------------------------ test
  bit      exp_eom[logic [31:0]];     // {message, offset} -> last packet
  frame_t  msg_data[N_MSG];
  int      n_bypass = 0;
  assign m_axis_rx_tready = 1'b1;
  assign m_axis_tx_tready = 1'b1;
  always @(posedge clk) if (rstn && m_axis_rx_tvalid && m_axis_rx_tlast) n_bypass++;

  function automatic frame_t slmp_packet(int msg, int off, frame_t pay, bit eom);
    frame_t f;
    f = make_frame(52, 1, 5555, msg);
    f[43] = eom ? 8'h02 : 8'h00;
    {f[44], f[45], f[46], f[47]} = 32'(msg);
    {f[48], f[49], f[50], f[51]} = 32'(off);
    foreach (pay[i]) f.push_back(pay[i]);
    return f;
  endfunction

  initial begin
    logic [31:0] rd;
    int npkt[N_MSG], sent[N_MSG], offs[N_MSG];
    bit busy;
    s_ctrl_awaddr = '0; s_ctrl_awvalid = 0; s_ctrl_wdata = '0; s_ctrl_wstrb = '0; s_ctrl_wvalid = 0;
    s_ctrl_bready = 0; s_ctrl_araddr = '0; s_ctrl_arvalid = 0; s_ctrl_rready = 0;
    clk = 0; rstn = 0;
    repeat (5) @(posedge clk);
    rstn = 1;
    repeat (5) @(posedge clk);
    // ruleset 0: IPv4, UDP port 5555; EOM from the SLMP eom flag
    reg_write(2, 'h10, 0);
    reg_write(2, 'h20 + 0, 3); reg_write(2, 'h40 + 0, 32'hffff_0000);
    reg_write(2, 'h60 + 0, 32'h0800_0000); reg_write(2, 'h80 + 0, 32'h0800_ffff);
    reg_write(2, 'h20 + 1, 5); reg_write(2, 'h40 + 1, 32'hff);
    reg_write(2, 'h60 + 1, 17); reg_write(2, 'h80 + 1, 17);
    for (int u = 2; u < 4; u++) begin
      reg_write(2, 'h20 + u, 9); reg_write(2, 'h40 + u, 32'hffff_0000);
      reg_write(2, 'h60 + u, 32'h15b3_0000); reg_write(2, 'h80 + u, 32'h15b3_0000);
    end
    reg_write(2, 'ha0, 10); reg_write(2, 'ha8, 2); reg_write(2, 'hb0, 2); reg_write(2, 'hb8, 2);
    for (int s = 1; s < NUM_RULESETS; s++) reg_write(2, 'h60 + s * 4, 1);
    reg_write(3, 'h10, 1);
    reg_write(3, 0, 1);
    reg_write(0, 0, 3);
    reg_write(2, 0, 1);

    // messages of 3..8 packets with payloads of 1..1462 bytes
    for (int m = 0; m < N_MSG; m++) begin
      npkt[m] = 3 + int'($urandom % 6);
      sent[m] = 0; offs[m] = 0;
      msg_data[m] = {};
    end
    // one packet per message per round: the messages interleave
    busy = 1;
    while (busy) begin
      busy = 0;
      for (int m = 0; m < N_MSG; m++) begin
        if (sent[m] < npkt[m]) begin
          frame_t pay;
          int plen;
          bit eom;
          pay = {};
          plen = (sent[m] % 3 == 2) ? 1 + int'($urandom % 70) : 100 + int'($urandom % 1363);
          for (int i = 0; i < plen; i++) pay.push_back(8'($urandom));
          eom = (sent[m] == npkt[m] - 1);
          exp_eom[{16'(m), 16'(offs[m])}] = eom;
          rx_q.push_back(slmp_packet(m, offs[m], pay, eom));
          foreach (pay[i]) msg_data[m].push_back(pay[i]);
          offs[m] += plen;
          sent[m]++;
          busy = 1;
        end
        while (rx_q.size() > 2) @(posedge clk);
      end
    end
    while (rx_q.size() > 0 || her_q.size() > 0) @(posedge clk);
    repeat (3000) @(posedge clk);

    for (int m = 0; m < N_MSG; m++) begin
      int bad;
      bad = 0;
      for (int i = 0; i < msg_data[m].size(); i++) begin
        logic [63:0] a;
        a = HOST_BASE + 64'(m) * MSG_STRIDE + 64'(i);
        if (!hostmem.exists(a) || hostmem[a] != msg_data[m][i]) bad++;
      end
      check(bad == 0, $sformatf("message %0d: %0d wrong bytes in host memory", m, bad));
      check(!hostmem.exists(HOST_BASE + 64'(m) * MSG_STRIDE - 1) &&
            !hostmem.exists(HOST_BASE + 64'(m) * MSG_STRIDE + 64'(msg_data[m].size())),
            $sformatf("message %0d: bytes written outside the buffer", m));
    end
    begin
      int total;
      total = 0;
      for (int m = 0; m < N_MSG; m++) total += npkt[m];
      check(n_her == total, $sformatf("HERs %0d of %0d packets", n_her, total));
      check(n_desc == total, "one host DMA write per packet");
    end
    check(n_eom == N_MSG, "one EOM per message");
    check(n_werr == 0, "no host write errors");
    check(n_unaligned > 0, "unaligned host writes seen");
    check(n_bypass == 0, "nothing passed to the host");
    reg_read(4, 1, rd); check(rd == 2048, "all small slots free again");
    reg_read(4, 2, rd); check(rd == 170, "all large slots free again");
    reg_read(4, 0, rd); check(rd == 0, "no drops");
    $display("messages %0d, packets %0d, eom %0d, host DMA writes %0d (unaligned %0d)",
             N_MSG, n_her, n_eom, n_desc, n_unaligned);
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
