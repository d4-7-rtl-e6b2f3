// tb_pspin_pkt_match: self-checking test of the packet matching engine.
//
// Builds Ethernet/IPv4/UDP/SLMP frames of random length, UDP port and EOM
// flag (plus some ARP frames), sends them through the engine with random
// back-pressure on both outputs, and compares against a reference written
// from the frame fields: ruleset 0 (AND) takes UDP port 5555, ruleset 1
// (OR) takes ports 7777 and 8888, the rest go back to the NIC. Checks the
// steering, every data beat, the metadata (message ID, EOM, ruleset ID,
// length), the 4-cycle head latency, and that nothing matches while
// match_valid is low.
module tb_pspin_pkt_match;
  import pspin_pkg::*;

  logic clk = 0, rstn = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic                          match_valid;
  ruleset_t [NUM_RULESETS-1:0]   rulesets;
  logic [AXIS_DATA_W-1:0] s_tdata, n_tdata, p_tdata;
  logic [AXIS_KEEP_W-1:0] s_tkeep, n_tkeep, p_tkeep;
  logic s_tvalid = 0, s_tready, s_tlast;
  logic n_tvalid, n_tready, n_tlast, p_tvalid, p_tready, p_tlast;
  pkt_meta_t meta;
  logic meta_valid, meta_ready;

  pspin_pkt_match dut (
    .clk, .rstn, .match_valid, .rulesets,
    .s_axis_nic_tdata(s_tdata), .s_axis_nic_tkeep(s_tkeep), .s_axis_nic_tvalid(s_tvalid),
    .s_axis_nic_tready(s_tready), .s_axis_nic_tlast(s_tlast),
    .m_axis_nic_tdata(n_tdata), .m_axis_nic_tkeep(n_tkeep), .m_axis_nic_tvalid(n_tvalid),
    .m_axis_nic_tready(n_tready), .m_axis_nic_tlast(n_tlast),
    .m_axis_pspin_tdata(p_tdata), .m_axis_pspin_tkeep(p_tkeep), .m_axis_pspin_tvalid(p_tvalid),
    .m_axis_pspin_tready(p_tready), .m_axis_pspin_tlast(p_tlast),
    .meta_data(meta), .meta_valid, .meta_ready);

  // ------------------------------------------------------------ frames
  typedef byte unsigned frame_t[$];
  typedef struct {
    int          dest;   // 0 NIC, 1 PsPIN
    logic [31:0] msgid;
    logic        eom;
    int          rs;
    int          len;
  } exp_t;

  frame_t   exp_nic[$], exp_pspin[$];
  exp_t     exp_meta[$];
  bit       backpressure = 0;

  function automatic frame_t make_frame(int len, bit is_ip, int port, bit eom, logic [31:0] msgid);
    frame_t f;
    for (int i = 0; i < len; i++) f.push_back(8'($urandom));
    if (is_ip) begin
      f[12] = 8'h08; f[13] = 8'h00;        // IPv4
      f[14] = 8'h45;
      f[23] = 8'd17;                       // UDP
      f[36] = 8'(port >> 8); f[37] = 8'(port);
      f[42] = 8'h00; f[43] = eom ? 8'h02 : 8'h00;   // SLMP flags, bit 1 = eom
      {f[44], f[45], f[46], f[47]} = msgid;
    end else begin
      f[12] = 8'h08; f[13] = 8'h06;        // ARP
      f[36] = 8'h00; f[37] = 8'h00;
    end
    return f;
  endfunction

  function automatic match_rule_t rule(int idx, logic [31:0] mask, logic [31:0] lo, logic [31:0] hi);
    return '{idx: 32'(idx), mask: mask, lo: lo, hi: hi};
  endfunction

  task automatic configure();
    match_rule_t never;
    never = rule(0, 32'h0, 32'h1, 32'h0);
    rulesets = '0;
    // ruleset 0: IPv4 and UDP and port 5555 (AND)
    rulesets[0].mode     = MATCH_AND;
    rulesets[0].rules[0] = rule(3, 32'hffff_0000, 32'h0800_0000, 32'h0800_ffff);
    rulesets[0].rules[1] = rule(5, 32'h0000_00ff, 32'd17, 32'd17);
    rulesets[0].rules[2] = rule(9, 32'hffff_0000, 32'h15b3_0000, 32'h15b3_0000);
    rulesets[0].rules[3] = rule(3, 32'hffff_0000, 32'h0800_0000, 32'h0800_0000);
    rulesets[0].eom      = rule(10, 32'h0000_0002, 32'h2, 32'h2);
    // ruleset 1: port 7777 or port 8888 (OR), range form
    rulesets[1].mode     = MATCH_OR;
    rulesets[1].rules[0] = rule(9, 32'hffff_0000, 32'h1e61_0000, 32'h1e61_ffff);
    rulesets[1].rules[1] = rule(9, 32'hffff_0000, 32'h22b8_0000, 32'h22b8_0000);
    rulesets[1].rules[2] = never;
    rulesets[1].rules[3] = rule(100, 32'h0, 32'h0, 32'hffff_ffff);  // beyond the window: never
    rulesets[1].eom      = rule(10, 32'h0000_0002, 32'h2, 32'h2);
    for (int s = 2; s < NUM_RULESETS; s++) begin
      rulesets[s].mode = MATCH_AND;
      for (int u = 0; u < NUM_RULES; u++) rulesets[s].rules[u] = never;
      rulesets[s].eom = never;
    end
  endtask

  // head latency: cycles from head accepted to head presented
  int   head_accept_cycle = 0;
  bit   head_pending = 0;
  int   cycle = 0;
  int   lat_checked = 0;
  logic in_frame = 0;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (s_tvalid && s_tready) in_frame <= !s_tlast;
    if (s_tvalid && s_tready && !in_frame) begin
      head_accept_cycle <= cycle;
      head_pending      <= 1;
    end else if (head_pending && (p_tvalid || n_tvalid)) begin
      head_pending <= 0;
      if (!backpressure) begin
        checks++;
        lat_checked++;
        if (cycle - head_accept_cycle != 4) begin
          failures++;
          $display("latency %0d, expected 4", cycle - head_accept_cycle);
        end
      end
    end
  end

  task automatic send(frame_t f);
    int nb;
    nb = (f.size() + AXIS_KEEP_W - 1) / AXIS_KEEP_W;
    for (int b = 0; b < nb; b++) begin
      s_tdata = '0;
      s_tkeep = '0;
      for (int i = 0; i < AXIS_KEEP_W; i++) begin
        if (b * AXIS_KEEP_W + i < f.size()) begin
          s_tdata[8*i +: 8] = f[b * AXIS_KEEP_W + i];
          s_tkeep[i] = 1'b1;
        end
      end
      s_tlast  = (b == nb - 1);
      s_tvalid = 1;
      @(posedge clk);
      while (!s_tready) @(posedge clk);
      s_tvalid = 0;
    end
  endtask

  // output collectors
  frame_t cur_n, cur_p;
  int got_n = 0, got_p = 0, got_meta = 0;

  task automatic compare_frame(frame_t got, ref frame_t expq[$], input string name);
    frame_t e;
    checks++;
    if (expq.size() == 0) begin
      failures++;
      $display("%s: unexpected frame", name);
      return;
    end
    e = expq.pop_front();
    if (e != got) begin
      failures++;
      $display("%s: frame mismatch len got %0d exp %0d", name, got.size(), e.size());
    end
  endtask

  always @(posedge clk) begin
    if (rstn) begin
      if (n_tvalid && n_tready) begin
        for (int i = 0; i < AXIS_KEEP_W; i++) if (n_tkeep[i]) cur_n.push_back(n_tdata[8*i +: 8]);
        if (n_tlast) begin compare_frame(cur_n, exp_nic, "nic"); cur_n = {}; got_n++; end
      end
      if (p_tvalid && p_tready) begin
        for (int i = 0; i < AXIS_KEEP_W; i++) if (p_tkeep[i]) cur_p.push_back(p_tdata[8*i +: 8]);
        if (p_tlast) begin compare_frame(cur_p, exp_pspin, "pspin"); cur_p = {}; got_p++; end
      end
      if (meta_valid && meta_ready) begin
        exp_t e;
        checks++;
        got_meta++;
        if (exp_meta.size() == 0) begin failures++; $display("unexpected meta"); end
        else begin
          e = exp_meta.pop_front();
          if (meta.msgid != e.msgid || meta.eom != e.eom || int'(meta.rs_id) != e.rs || int'(meta.len) != e.len) begin
            failures++;
            $display("meta mismatch: got id %h eom %0d rs %0d len %0d, exp id %h eom %0d rs %0d len %0d",
                     meta.msgid, meta.eom, meta.rs_id, meta.len, e.msgid, e.eom, e.rs, e.len);
          end
        end
      end
    end
  end

  always_comb begin
    n_tready   = backpressure ? cycle[0] : 1'b1;
    p_tready   = backpressure ? cycle[1] : 1'b1;
    meta_ready = backpressure ? cycle[2] : 1'b1;
  end

  task automatic run_frames(int n, bit valid_on);
    int ports[4] = '{5555, 7777, 8888, 1234};
    for (int k = 0; k < n; k++) begin
      int len, port, rs;
      bit is_ip, eom;
      logic [31:0] id;
      frame_t f;
      len   = 60 + ($urandom % 1477);
      if (k % 7 == 0) len = 60 + ($urandom % 5);
      is_ip = ($urandom % 5) != 0;
      port  = ports[$urandom % 4];
      eom   = $urandom % 2;
      id    = $urandom;
      f = make_frame(len, is_ip, port, eom, id);
      rs = -1;
      if (valid_on && is_ip && port == 5555) rs = 0;
      else if (valid_on && is_ip && (port == 7777 || port == 8888)) rs = 1;
      if (rs < 0) exp_nic.push_back(f);
      else begin
        exp_pspin.push_back(f);
        exp_meta.push_back('{dest: 1, msgid: id, eom: eom, rs: rs, len: len});
      end
      send(f);
      repeat ($urandom % 3) @(posedge clk);
    end
  endtask

  initial begin
    match_valid = 0;
    configure();
    repeat (4) @(posedge clk);
    rstn = 1;
    @(posedge clk);
    // phase 1: match_valid low -> everything passes through
    run_frames(20, 0);
    repeat (50) @(posedge clk);
    // phase 2: matching on, no back-pressure (latency checked)
    match_valid = 1;
    run_frames(150, 1);
    repeat (50) @(posedge clk);
    // phase 3: random back-pressure
    backpressure = 1;
    run_frames(150, 1);
    repeat (200) @(posedge clk);
    checks++;
    if (exp_nic.size() != 0 || exp_pspin.size() != 0 || exp_meta.size() != 0) begin
      failures++;
      $display("missing outputs: nic %0d pspin %0d meta %0d", exp_nic.size(), exp_pspin.size(), exp_meta.size());
    end
    checks++;
    if (got_p == 0 || got_n == 0 || lat_checked == 0) begin
      failures++;
      $display("coverage: pspin %0d nic %0d latency %0d", got_p, got_n, lat_checked);
    end
    $display("frames: nic %0d pspin %0d meta %0d latency checks %0d", got_n, got_p, got_meta, lat_checked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
