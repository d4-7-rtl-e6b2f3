// tb_pspin_axis_arb_mux: self-checking test of the transmit arbiter.
//
// Two sources send numbered frames of random length; the sink checks that
// every frame arrives whole, uninterleaved and in order per source. With
// both inputs always loaded it checks the arbitration policy: PsPIN
// (input 0) wins every contended grant when rr_en is low, the inputs
// alternate when rr_en is high. Random sink back-pressure throughout.
module tb_pspin_axis_arb_mux;
  logic clk = 0, rstn = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         rr_en = 0;
  logic [511:0] s0_tdata = '0, s1_tdata = '0, m_tdata;
  logic [63:0]  s0_tkeep = '0, s1_tkeep = '0, m_tkeep;
  logic         s0_tvalid = 0, s0_tlast = 0, s1_tvalid = 0, s1_tlast = 0, s0_tready, s1_tready;
  logic         m_tvalid, m_tlast, m_tready = 1;
  logic [31:0]  grants0, grants1, contended;

  pspin_axis_arb_mux dut (.clk, .rstn, .rr_en,
    .s0_tdata, .s0_tkeep, .s0_tvalid, .s0_tready, .s0_tlast,
    .s1_tdata, .s1_tkeep, .s1_tvalid, .s1_tready, .s1_tlast,
    .m_tdata, .m_tkeep, .m_tvalid, .m_tready, .m_tlast, .grants0, .grants1, .contended);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // sources: frame = n beats, beat data {src, frame number, beat number}
  int s0_frames[$], s1_frames[$];   // beats per frame still to send
  int s0_fno = 0, s1_fno = 0, s0_beat = 0, s1_beat = 0;
  always @(posedge clk) begin
    if (s0_tvalid && s0_tready) begin
      s0_beat++;
      if (s0_tlast) begin void'(s0_frames.pop_front()); s0_fno++; s0_beat = 0; end
    end
    if (s1_tvalid && s1_tready) begin
      s1_beat++;
      if (s1_tlast) begin void'(s1_frames.pop_front()); s1_fno++; s1_beat = 0; end
    end
    s0_tvalid <= s0_frames.size() > 0;
    s0_tdata  <= {480'b0, 8'd0, 16'(s0_fno), 8'(s0_beat)};
    s0_tkeep  <= '1;
    s0_tlast  <= s0_frames.size() > 0 && s0_beat == s0_frames[0] - 1;
    s1_tvalid <= s1_frames.size() > 0;
    s1_tdata  <= {480'b0, 8'd1, 16'(s1_fno), 8'(s1_beat)};
    s1_tkeep  <= '1;
    s1_tlast  <= s1_frames.size() > 0 && s1_beat == s1_frames[0] - 1;
    m_tready  <= ($urandom % 4) != 0;
  end

  // sink
  int cur_src = -1, exp_fno[2] = '{0, 0}, exp_beat = 0, order[$];
  always @(posedge clk) if (m_tvalid && m_tready) begin
    int src, fno, bt;
    src = int'(m_tdata[31:24]); fno = int'(m_tdata[23:8]); bt = int'(m_tdata[7:0]);
    if (cur_src < 0) cur_src = src;
    check(src == cur_src, "frames interleaved");
    check(fno == exp_fno[src] && bt == exp_beat, $sformatf("src %0d frame %0d beat %0d, exp %0d %0d", src, fno, bt, exp_fno[src], exp_beat));
    exp_beat++;
    if (m_tlast) begin
      order.push_back(src);
      exp_fno[src]++;
      exp_beat = 0;
      cur_src = -1;
    end
  end

  task automatic load(int n);
    for (int k = 0; k < n; k++) begin
      s0_frames.push_back(1 + $urandom % 6);
      s1_frames.push_back(1 + $urandom % 6);
    end
    while (s0_frames.size() + s1_frames.size() != 0) @(posedge clk);
    repeat (10) @(posedge clk);
  endtask

  initial begin
    int c0, sw;
    repeat (3) @(posedge clk);
    rstn <= 1;
    // PsPIN first: input 0 drains before input 1 gets a grant
    order = {};
    load(20);
    c0 = 0;
    for (int i = 0; i < 20; i++) if (order[i] == 0) c0++;
    check(c0 >= 19, $sformatf("priority: %0d of the first 20 frames from PsPIN", c0));
    check(contended > 0, "contended grants counted");
    // round-robin
    rr_en <= 1;
    order = {};
    load(20);
    sw = 0;
    for (int i = 1; i < 38; i++) if (order[i] != order[i-1]) sw++;
    check(sw >= 34, $sformatf("round-robin: %0d switches in 38 frames", sw));
    check(grants0 == 40 && grants1 == 40, $sformatf("grant counters %0d %0d", grants0, grants1));
    check(exp_fno[0] == 40 && exp_fno[1] == 40, "all frames delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
