// pspin_her_gen: Handler Execution Request (HER) generator.
//
// Once a packet sits in the L2 packet buffer, PsPIN is asked to run the
// handlers on it by a HER. Part of the HER comes from the packet metadata
// (SLMP message ID, End-Of-Message bit, packet address and length); the
// rest comes from the execution context (EXTX) selected by the ruleset that
// matched the packet: the addresses and sizes of the header, payload and
// tail handler code, of the handler's L2 memory region and of the host
// memory window for host DMA. The contexts are registers written by the
// host through the control register block.
//
// Interface: l2_meta_t in on in_*, her_t out on her_*. her_gen_en and the
// per-context enabled bit act as the "valid" of the configuration: while
// either is low the request is held back (no HER, no loss), so that the
// host can rewrite a context consistently.
// Timing: zero cycles, purely combinational, valid/ready passed through.
//
// Follows the design description: the HER fields and the context
// selection by ruleset ID. Own choices: holding requests for disabled
// contexts, and her_size = xfer_size = packet length.
module pspin_her_gen
  import pspin_pkg::*;
(
  input  logic                          her_gen_en,
  input  exec_ctx_t [NUM_RULESETS-1:0]  ctx,

  input  l2_meta_t                      in_data,
  input  logic                          in_valid,
  output logic                          in_ready,

  output her_t                          her_data,
  output logic                          her_valid,
  input  logic                          her_ready
);

  logic      go;
  exec_ctx_t sel;

  assign sel       = ctx[in_data.meta.rs_id];
  assign go        = her_gen_en && sel.enabled;
  assign her_valid = in_valid && go;
  assign in_ready  = her_ready && go;

  always_comb begin
    her_data           = '0;
    her_data.msgid     = in_data.meta.msgid;
    her_data.eom       = in_data.meta.eom;
    her_data.ctx_id    = in_data.meta.rs_id;
    her_data.her_addr  = in_data.addr;
    her_data.her_size  = 32'(in_data.meta.len);
    her_data.xfer_size = 32'(in_data.meta.len);
    her_data.ctx       = sel;
  end

endmodule
