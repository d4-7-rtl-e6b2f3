// tb_pspin_her_gen: self-checking test of the HER generator.
//
// Programs four execution contexts with random values, presents random
// packet records and checks, combinationally (zero cycles), that the HER
// carries the record's message ID, EOM, address and length together with
// the context selected by the ruleset ID, and that records stall while
// the generator or the selected context is disabled.
module tb_pspin_her_gen;
  import pspin_pkg::*;

  int checks = 0, failures = 0;
  logic                         her_gen_en = 0;
  exec_ctx_t [NUM_RULESETS-1:0] ctx = '0;
  l2_meta_t                     in_data = '0;
  logic                         in_valid = 0, in_ready, her_valid, her_ready = 0;
  her_t                         her_data;

  pspin_her_gen dut (.her_gen_en, .ctx, .in_data, .in_valid, .in_ready, .her_data, .her_valid, .her_ready);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int n_pass = 0, n_block = 0;
  initial begin
    for (int c = 0; c < NUM_RULESETS; c++) begin
      ctx[c].handler_mem_addr = $urandom; ctx[c].handler_mem_size = $urandom;
      ctx[c].host_mem_addr = {$urandom, $urandom}; ctx[c].host_mem_size = $urandom;
      ctx[c].hh_addr = $urandom; ctx[c].hh_size = $urandom;
      ctx[c].ph_addr = $urandom; ctx[c].ph_size = $urandom;
      ctx[c].th_addr = $urandom; ctx[c].th_size = $urandom;
      ctx[c].enabled = (c != 3);
    end
    for (int k = 0; k < 2000; k++) begin
      bit go;
      her_gen_en = (k % 10) != 0;
      in_data.meta.msgid = $urandom; in_data.meta.eom = 1'($urandom);
      in_data.meta.rs_id = RS_W'($urandom); in_data.meta.len = 16'(60 + $urandom % 1477);
      in_data.addr = $urandom;
      in_valid = 1'($urandom); her_ready = 1'($urandom);
      #1;
      go = her_gen_en && ctx[in_data.meta.rs_id].enabled;
      check(her_valid == (in_valid && go), "her_valid");
      check(in_ready == (her_ready && go), "in_ready");
      if (her_valid) begin
        check(her_data.msgid == in_data.meta.msgid && her_data.eom == in_data.meta.eom, "msgid/eom");
        check(her_data.ctx_id == in_data.meta.rs_id, "context id");
        check(her_data.her_addr == in_data.addr, "her_addr");
        check(her_data.her_size == 32'(in_data.meta.len) && her_data.xfer_size == 32'(in_data.meta.len), "sizes");
        check(her_data.ctx == ctx[in_data.meta.rs_id], "context fields");
        n_pass++;
      end
      if (in_valid && !go) n_block++;
      #9;
    end
    check(n_pass > 0 && n_block > 0, "coverage: issued and blocked records");
    $display("issued %0d blocked %0d", n_pass, n_block);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
