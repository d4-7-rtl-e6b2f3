// tb_pspin_pkt_alloc: self-checking test of the packet buffer allocator.
//
// Drives metadata records with random lengths and checks, in the same
// cycle (zero latency), the slot class (128-byte slots in the lower half
// for packets up to 128 bytes, 1536-byte slots in the upper half up to
// 1536 bytes), that no slot is handed out twice while in use, the drop
// flag once a class runs out or a packet is oversize, the drop counter and
// free counts, and that freed slots are reused.
module tb_pspin_pkt_alloc;
  import pspin_pkg::*;

  logic clk = 0, rstn = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  pkt_meta_t   in_data = '0;
  logic        in_valid = 0, in_ready, out_valid, out_ready = 1;
  alloc_meta_t out_data;
  logic        feedback_valid = 0;
  logic [31:0] feedback_addr = '0, dropped;
  logic [11:0] small_free;
  logic [7:0]  large_free;

  pspin_pkt_alloc dut (.clk, .rstn, .in_data, .in_valid, .in_ready, .out_data, .out_valid, .out_ready,
    .feedback_valid, .feedback_addr, .dropped, .small_free, .large_free);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  bit          in_use[logic [31:0]];
  logic [31:0] used_small[$], used_large[$];
  int          exp_drops = 0;

  // one allocation; returns the address or drop
  task automatic alloc(int len, output bit drop, output logic [31:0] addr);
    in_data.len = 16'(len); in_data.msgid = $urandom; in_valid = 1;
    #1;
    check(out_valid && in_ready, "zero-latency handshake");
    drop = out_data.drop; addr = out_data.addr;
    check(out_data.meta == in_data, "metadata passed through");
    @(posedge clk); #1;
    in_valid = 0;
  endtask

  task automatic free(logic [31:0] a);
    feedback_valid = 1; feedback_addr = a;
    @(posedge clk); #1;
    feedback_valid = 0;
    in_use.delete(a);
  endtask

  task automatic one(int len, bit expect_drop);
    bit d;
    logic [31:0] a;
    alloc(len, d, a);
    check(d == expect_drop, $sformatf("drop flag for len %0d: got %0d", len, d));
    if (d) exp_drops++;
    else begin
      check(!in_use.exists(a), $sformatf("slot %h handed out twice", a));
      in_use[a] = 1;
      if (len <= 128) begin
        check(a < 32'h4_0000 && a % 128 == 0, $sformatf("small slot address %h", a));
        used_small.push_back(a);
      end else begin
        check(a >= 32'h4_0000 && (a - 32'h4_0000) % 1536 == 0 && a + 1536 <= 32'h8_0000,
              $sformatf("large slot address %h", a));
        used_large.push_back(a);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk); #1;
    rstn = 1;
    @(posedge clk); #1;
    check(small_free == 2048 && large_free == 170, "free counts after reset");
    // mixed traffic with random frees
    for (int k = 0; k < 600; k++) begin
      int r;
      r = $urandom % 10;
      if (r < 4) one(60 + $urandom % 69, 0);
      else if (r < 8) one(129 + $urandom % 1408, 0);
      else if (r == 8) one(1537 + $urandom % 400, 1);                   // oversize
      else if (used_large.size() > 0) free(used_large.pop_front());
      if (used_large.size() > 100) free(used_large.pop_front());
    end
    // exhaust the large class; small still works
    while (large_free != 0) one(1500, 0);
    one(1500, 1);
    one(1536, 1);
    one(128, 0);
    check(dropped == 32'(exp_drops), $sformatf("drop counter %0d exp %0d", dropped, exp_drops));
    // free everything: counts back to full, freed slots reused
    while (used_large.size() > 0) free(used_large.pop_front());
    while (used_small.size() > 0) free(used_small.pop_front());
    check(small_free == 2048 && large_free == 170, $sformatf("free counts after freeing %0d %0d", small_free, large_free));
    for (int k = 0; k < 170; k++) one(1000, 0);
    check(large_free == 0, "all large slots reused");
    one(1000, 1);
    $display("drops %0d", exp_drops);
    check(exp_drops >= 3, "coverage: drops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
