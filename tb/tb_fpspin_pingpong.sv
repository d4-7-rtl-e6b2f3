// tb_fpspin_pingpong: UDP ping-pong through the FPsPIN application block.
//
// The workload of a ping-pong server on the NIC: UDP echo requests to port
// 5555 are matched, land in an L2 slot, and a model of the handler running
// on PsPIN answers each one in place (swaps the Ethernet, IPv4 and UDP
// source and destination fields), issues an egress command for the slot and
// frees the slot when the frame has left. Everything else (ARP, other UDP
// ports) is passed to the host, which at the same time sends its own
// frames on the transmit path. The block runs at its default size.
//
// Checks: every reply leaves the transmit port byte for byte as computed
// here from the request, every other frame reaches the host unchanged,
// host frames are transmitted intact, slots all come back, and the round
// trip (first request beat in to last reply beat out) is reported. Both
// slot classes (short and full-size pings) are used.
module tb_fpspin_pingpong;
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
  assign s_hm_axi_awid = '0; assign s_hm_axi_awaddr = '0; assign s_hm_axi_awlen = '0;
  assign s_hm_axi_awsize = 3'd6; assign s_hm_axi_awburst = 2'b01; assign s_hm_axi_awvalid = 1'b0;
  assign s_hm_axi_wdata = '0; assign s_hm_axi_wstrb = '0; assign s_hm_axi_wlast = 1'b0; assign s_hm_axi_wvalid = 1'b0;
  assign s_hm_axi_bready = 1'b1;
  assign s_hm_axi_arid = '0; assign s_hm_axi_araddr = '0; assign s_hm_axi_arlen = '0;
  assign s_hm_axi_arsize = 3'd6; assign s_hm_axi_arburst = 2'b01; assign s_hm_axi_arvalid = 1'b0;
  assign s_hm_axi_rready = 1'b1;
  assign wr_desc_ready = 1'b1; assign wr_desc_status_error = '0; assign wr_desc_status_valid = 1'b0;
  assign rd_desc_ready = 1'b1; assign rd_desc_status_error = '0; assign rd_desc_status_valid = 1'b0;
  assign dma_ram_en = 1'b0; assign dma_ram_we = 1'b0; assign dma_ram_be = '0;
  assign dma_ram_addr = '0; assign dma_ram_wdata = '0;
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

  // the answer a ping-pong server gives: source and destination swapped
  function automatic frame_t pong(frame_t f);
    frame_t r;
    r = f;
    for (int i = 0; i < 6; i++) begin r[i] = f[6 + i]; r[6 + i] = f[i]; end
    for (int i = 0; i < 4; i++) begin r[26 + i] = f[30 + i]; r[30 + i] = f[26 + i]; end
    for (int i = 0; i < 2; i++) begin r[34 + i] = f[36 + i]; r[36 + i] = f[34 + i]; end
    return r;
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

  // ------------------------------------------------- handler model on PsPIN
  // Takes a HER, rewrites the request in place, sends it, frees the slot.
  her_t        her_q[$];
  logic [31:0] slot_of_id[int];
  egress_cmd_t ecmd_q[$];
  logic [31:0] free_q[$];
  int          n_small = 0, n_large = 0;
  assign her_ready = 1'b1;
  always @(posedge clk) if (rstn) begin
    if (her_valid && her_ready) begin
      her_t h;
      frame_t f, r;
      h = her_data;
      f = {};
      for (int i = 0; i < int'(h.xfer_size); i++) f.push_back(l2[h.her_addr + 32'(i)]);
      r = pong(f);
      for (int i = 0; i < r.size(); i++) l2[h.her_addr + 32'(i)] = r[i];
      if (h.her_addr < 32'h4_0000) n_small++; else n_large++;
      check(h.ctx.ph_addr == 32'h1d00_0200, "HER payload handler address");
      slot_of_id[int'(h.msgid[7:0])] = h.her_addr;
      ecmd_q.push_back('{id: h.msgid[7:0], addr: h.her_addr, len: LEN_W'(h.xfer_size)});
    end
    if (egress_done_valid && egress_done_ready) free_q.push_back(slot_of_id[int'(egress_done_id)]);
  end
  // registered command and feedback drivers
  always @(posedge clk) begin
    if (!rstn) begin
      egress_cmd_valid <= 1'b0; egress_cmd_data <= '0;
      feedback_valid <= 1'b0; feedback_addr <= '0;
    end else begin
      if (!egress_cmd_valid || egress_cmd_ready) begin
        if (ecmd_q.size() > 0) begin egress_cmd_valid <= 1'b1; egress_cmd_data <= ecmd_q.pop_front(); end
        else egress_cmd_valid <= 1'b0;
      end
      if (free_q.size() > 0) begin feedback_valid <= 1'b1; feedback_addr <= free_q.pop_front(); end
      else feedback_valid <= 1'b0;
    end
  end
  assign egress_done_ready = 1'b1;

  // ------------------------------------------------------ output checkers
  frame_t exp_host_rx[$], exp_pong[$], exp_host_tx[$];
  frame_t cur_rx, cur_tx;
  int     n_pong = 0, n_bypass = 0, n_host_tx = 0;
  longint rtt_sum = 0;
  int     rtt_min = 1 << 30, rtt_max = 0;
  assign m_axis_rx_tready = 1'b1;
  assign m_axis_tx_tready = 1'b1;

  task automatic match_tx(frame_t got);
    for (int i = 0; i < exp_pong.size(); i++)
      if (exp_pong[i] == got) begin
        int rtt;
        exp_pong.delete(i);
        n_pong++;
        rtt = cycle - rx_start.pop_front();
        rtt_sum += rtt;
        if (rtt < rtt_min) rtt_min = rtt;
        if (rtt > rtt_max) rtt_max = rtt;
        check(1, "");
        return;
      end
    for (int i = 0; i < exp_host_tx.size(); i++)
      if (exp_host_tx[i] == got) begin exp_host_tx.delete(i); n_host_tx++; check(1, ""); return; end
    check(0, $sformatf("unexpected transmit frame of %0d bytes", got.size()));
  endtask

  always @(posedge clk) if (rstn) begin
    if (m_axis_rx_tvalid && m_axis_rx_tready) begin
      for (int i = 0; i < 64; i++) if (m_axis_rx_tkeep[i]) cur_rx.push_back(m_axis_rx_tdata[8*i +: 8]);
      if (m_axis_rx_tlast) begin
        check(exp_host_rx.size() > 0 && exp_host_rx[0] == cur_rx, "frame passed to the host");
        if (exp_host_rx.size() > 0) void'(exp_host_rx.pop_front());
        n_bypass++;
        cur_rx = {};
      end
    end
    if (m_axis_tx_tvalid && m_axis_tx_tready) begin
      for (int i = 0; i < 64; i++) if (m_axis_tx_tkeep[i]) cur_tx.push_back(m_axis_tx_tdata[8*i +: 8]);
      if (m_axis_tx_tlast) begin match_tx(cur_tx); cur_tx = {}; end
    end
  end

  // ------------------------------------------------------------ test
  localparam int N_PING = 120;
  initial begin
    logic [31:0] rd;
    s_ctrl_awaddr = '0; s_ctrl_awvalid = 0; s_ctrl_wdata = '0; s_ctrl_wstrb = '0; s_ctrl_wvalid = 0;
    s_ctrl_bready = 0; s_ctrl_araddr = '0; s_ctrl_arvalid = 0; s_ctrl_rready = 0;
    clk = 0; rstn = 0;
    repeat (5) @(posedge clk);
    rstn = 1;
    repeat (5) @(posedge clk);
    // ruleset 0: IPv4, UDP, destination port 5555
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
    reg_write(3, 'h90, 32'h1d00_0200);
    reg_write(3, 0, 1);
    reg_write(0, 0, 3);
    reg_write(2, 0, 1);

    // ping requests of short and full size mixed with host traffic
    for (int k = 0; k < N_PING; k++) begin
      frame_t f;
      int len;
      len = (k % 2 == 0) ? 64 + int'($urandom % 65) : 129 + int'($urandom % 1386);
      f = make_frame(len, 1, 5555, k);
      exp_pong.push_back(pong(f));
      rx_q.push_back(f);
      if (k % 4 == 0) begin
        f = make_frame(60 + int'($urandom % 200), k % 8 == 0, 7, 200 + k);
        exp_host_rx.push_back(f);
        rx_q.push_back(f);
      end
      if (k % 6 == 0) begin
        f = make_frame(64 + int'($urandom % 1000), 1, 9, 300 + k);
        exp_host_tx.push_back(f);
        htx_q.push_back(f);
      end
      while (rx_q.size() > 2) @(posedge clk);
    end
    repeat (3000) @(posedge clk);
    check(exp_pong.size() == 0, $sformatf("%0d pings not answered", exp_pong.size()));
    check(exp_host_rx.size() == 0, "all host frames received");
    check(exp_host_tx.size() == 0, "all host frames transmitted");
    reg_read(4, 1, rd); check(rd == 2048, "all small slots free again");
    reg_read(4, 2, rd); check(rd == 170, "all large slots free again");
    reg_read(4, 0, rd); check(rd == 0, "no drops");
    check(n_small > 0 && n_large > 0, "both slot classes used");
    check(n_pong == N_PING && n_bypass > 0 && n_host_tx > 0, "coverage");
    $display("pings %0d (small %0d large %0d), host rx %0d, host tx %0d, rtt cycles min %0d mean %0d max %0d",
             n_pong, n_small, n_large, n_bypass, n_host_tx, rtt_min, n_pong ? int'(rtt_sum / n_pong) : 0, rtt_max);
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
