// pspin_ctrl_regs: host-visible control and status registers of FPsPIN.
//
// An AXI-Lite slave (16-bit address, 32-bit data) holds every setting the
// host makes before and while PsPIN runs, and hands it to the cluster and
// the data path as plain wires and packed structs. The 16-bit address is
// {grp[3:0], regid[11:0]}: the group selects the subsystem, regid (a byte
// address, registers on 4-byte steps) the subgroup and the instance within
// it. Register index r below is regid[11:2].
//
//   grp 0  cluster   r0 cl_fetch_en (1 bit per cluster)   RW
//                    r1 aux_rst (bit 0)                     RW
//                    r2 cl_busy (1 bit per cluster)         RO
//                    r3 mpq_full bitmap                     RO
//   grp 1  stdout    r0 next entry, reading pops it:        RO
//                       bit 31 valid, [15:8] core, [7:0] char
//                    r1 characters lost to a full FIFO      RO
//   grp 2  match     r0 match_valid                         RW
//                    r 0x10+s      mode of ruleset s        RW (0 AND, 1 OR)
//                    r 0x20+s*4+u  index I of unit u        RW
//                    r 0x40+s*4+u  mask M                   RW
//                    r 0x60+s*4+u  start S                  RW
//                    r 0x80+s*4+u  end E                    RW
//                    r 0xa0+s / 0xa8+s / 0xb0+s / 0xb8+s    RW
//                       index / mask / start / end of the EOM unit
//   grp 3  her_gen   r0 her_gen_en                          RW
//                    r 0x10*k + c, context c, field k:      RW
//                       k=1 enabled, 2 handler_mem_addr, 3 handler_mem_size,
//                       4 host_mem_addr[31:0], 5 host_mem_addr[63:32],
//                       6 host_mem_size, 7 hh_addr, 8 hh_size, 9 ph_addr,
//                       10 ph_size, 11 th_addr, 12 th_size
//   grp 4  stats     r0 dropped packets, r1/r2 free small/large slots,
//                    r3/r4 egress frames PsPIN/host, r5 contended    RO
//   grp 5  egress    r0 round-robin arbitration enable       RW
//
// Consistency: the match and HER generator groups each have an enable
// (match_valid, her_gen_en, per-context enabled); the host clears it,
// rewrites the group and sets it again, so the data path never acts on a
// half-written configuration. Unmapped addresses read 0 and ignore writes;
// all responses are OKAY; wstrb is ignored (full-word writes).
// Timing: one transaction at a time; a write completes 2 cycles after
// address and data are both valid, a read 2 cycles after its address.
//
// Follows the design description: the AXI-Lite slave, grp/regid address
// split, the exported signal groups and the valid-guarded groups. Own
// choices: the register numbering within each group and the reset values
// (all zero: nothing fetches, nothing matches, no HER is issued).
//
// Lint notes: address bits [1:0] and wstrb are unused because every
// register is a full 32-bit word; stdout entry bits [31:16] are unused
// because they are always zero in the FIFO format.
module pspin_ctrl_regs
  import pspin_pkg::*;
(
  input  logic        clk,
  input  logic        rstn,

  // AXI-Lite slave
  input  logic [15:0] s_awaddr,
  input  logic        s_awvalid,
  output logic        s_awready,
  input  logic [31:0] s_wdata,
  input  logic [3:0]  s_wstrb,
  input  logic        s_wvalid,
  output logic        s_wready,
  output logic [1:0]  s_bresp,
  output logic        s_bvalid,
  input  logic        s_bready,
  input  logic [15:0] s_araddr,
  input  logic        s_arvalid,
  output logic        s_arready,
  output logic [31:0] s_rdata,
  output logic [1:0]  s_rresp,
  output logic        s_rvalid,
  input  logic        s_rready,

  // cluster
  output logic [NUM_CLUSTERS-1:0]     cl_fetch_en,
  output logic                        aux_rst,
  input  logic [NUM_CLUSTERS-1:0]     cl_busy,
  input  logic [NUM_MPQ-1:0]          mpq_full,

  // matching engine
  output logic                        match_valid,
  output ruleset_t [NUM_RULESETS-1:0] match_rulesets,

  // HER generator
  output logic                        her_gen_en,
  output exec_ctx_t [NUM_RULESETS-1:0] her_gen_ctx,

  // stdout FIFO
  input  logic                        stdout_valid,
  input  logic [31:0]                 stdout_data,
  output logic                        stdout_pop,
  input  logic [31:0]                 stdout_lost,

  // statistics and egress
  input  logic [31:0]                 stat_dropped,
  input  logic [31:0]                 stat_small_free,
  input  logic [31:0]                 stat_large_free,
  input  logic [31:0]                 stat_egress_pspin,
  input  logic [31:0]                 stat_egress_host,
  input  logic [31:0]                 stat_egress_contended,
  output logic                        egress_rr_en
);

  localparam logic [3:0] G_CL = 4'd0, G_STDOUT = 4'd1, G_MATCH = 4'd2,
                         G_HER = 4'd3, G_STATS = 4'd4, G_EGRESS = 4'd5;

  // ---------------------------------------------------------- write side
  logic wr_fire;
  assign s_awready = s_awvalid && s_wvalid && !s_bvalid;
  assign s_wready  = s_awready;
  assign wr_fire   = s_awready;
  assign s_bresp   = 2'b00;

  logic [3:0] wgrp;
  logic [9:0] wr;
  assign wgrp = s_awaddr[15:12];
  assign wr   = s_awaddr[11:2];

  always_ff @(posedge clk) begin
    if (!rstn) begin
      s_bvalid       <= 1'b0;
      cl_fetch_en    <= '0;
      aux_rst        <= 1'b0;
      match_valid    <= 1'b0;
      match_rulesets <= '0;
      her_gen_en     <= 1'b0;
      her_gen_ctx    <= '0;
      egress_rr_en   <= 1'b0;
    end else begin
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
      if (wr_fire) begin
        s_bvalid <= 1'b1;
        unique case (wgrp)
          G_CL: begin
            if (wr == 10'd0) cl_fetch_en <= s_wdata[NUM_CLUSTERS-1:0];
            if (wr == 10'd1) aux_rst     <= s_wdata[0];
          end
          G_MATCH: begin
            if (wr == 10'd0) match_valid <= s_wdata[0];
            for (int s = 0; s < NUM_RULESETS; s++) begin
              if (wr == 10'(32'h10 + s)) match_rulesets[s].mode <= match_mode_e'(s_wdata[0]);
              for (int u = 0; u < NUM_RULES; u++) begin
                if (wr == 10'(32'h20 + s*NUM_RULES + u)) match_rulesets[s].rules[u].idx  <= s_wdata;
                if (wr == 10'(32'h40 + s*NUM_RULES + u)) match_rulesets[s].rules[u].mask <= s_wdata;
                if (wr == 10'(32'h60 + s*NUM_RULES + u)) match_rulesets[s].rules[u].lo   <= s_wdata;
                if (wr == 10'(32'h80 + s*NUM_RULES + u)) match_rulesets[s].rules[u].hi   <= s_wdata;
              end
              if (wr == 10'(32'ha0 + s)) match_rulesets[s].eom.idx  <= s_wdata;
              if (wr == 10'(32'ha8 + s)) match_rulesets[s].eom.mask <= s_wdata;
              if (wr == 10'(32'hb0 + s)) match_rulesets[s].eom.lo   <= s_wdata;
              if (wr == 10'(32'hb8 + s)) match_rulesets[s].eom.hi   <= s_wdata;
            end
          end
          G_HER: begin
            if (wr == 10'd0) her_gen_en <= s_wdata[0];
            for (int c = 0; c < NUM_RULESETS; c++) begin
              if (wr == 10'(32'h10 + c)) her_gen_ctx[c].enabled               <= s_wdata[0];
              if (wr == 10'(32'h20 + c)) her_gen_ctx[c].handler_mem_addr      <= s_wdata;
              if (wr == 10'(32'h30 + c)) her_gen_ctx[c].handler_mem_size      <= s_wdata;
              if (wr == 10'(32'h40 + c)) her_gen_ctx[c].host_mem_addr[31:0]   <= s_wdata;
              if (wr == 10'(32'h50 + c)) her_gen_ctx[c].host_mem_addr[63:32]  <= s_wdata;
              if (wr == 10'(32'h60 + c)) her_gen_ctx[c].host_mem_size         <= s_wdata;
              if (wr == 10'(32'h70 + c)) her_gen_ctx[c].hh_addr               <= s_wdata;
              if (wr == 10'(32'h80 + c)) her_gen_ctx[c].hh_size               <= s_wdata;
              if (wr == 10'(32'h90 + c)) her_gen_ctx[c].ph_addr               <= s_wdata;
              if (wr == 10'(32'ha0 + c)) her_gen_ctx[c].ph_size               <= s_wdata;
              if (wr == 10'(32'hb0 + c)) her_gen_ctx[c].th_addr               <= s_wdata;
              if (wr == 10'(32'hc0 + c)) her_gen_ctx[c].th_size               <= s_wdata;
            end
          end
          G_EGRESS: if (wr == 10'd0) egress_rr_en <= s_wdata[0];
          default: ;
        endcase
      end
    end
  end

  // ----------------------------------------------------------- read side
  logic [3:0]  rgrp;
  logic [9:0]  rr;
  logic [31:0] rval;
  logic        rd_fire;

  assign rgrp      = s_araddr[15:12];
  assign rr        = s_araddr[11:2];
  assign s_arready = !s_rvalid;
  assign rd_fire   = s_arvalid && s_arready;
  assign s_rresp   = 2'b00;
  assign stdout_pop = rd_fire && (rgrp == G_STDOUT) && (rr == 10'd0) && stdout_valid;

  always_comb begin
    rval = '0;
    unique case (rgrp)
      G_CL: unique case (rr)
        10'd0: rval = 32'(cl_fetch_en);
        10'd1: rval = 32'(aux_rst);
        10'd2: rval = 32'(cl_busy);
        10'd3: rval = 32'(mpq_full);
        default: ;
      endcase
      G_STDOUT: unique case (rr)
        10'd0: rval = stdout_valid ? {1'b1, 15'b0, stdout_data[15:0]} : '0;
        10'd1: rval = stdout_lost;
        default: ;
      endcase
      G_MATCH: begin
        if (rr == 10'd0) rval = 32'(match_valid);
        for (int s = 0; s < NUM_RULESETS; s++) begin
          if (rr == 10'(32'h10 + s)) rval = 32'(match_rulesets[s].mode);
          for (int u = 0; u < NUM_RULES; u++) begin
            if (rr == 10'(32'h20 + s*NUM_RULES + u)) rval = match_rulesets[s].rules[u].idx;
            if (rr == 10'(32'h40 + s*NUM_RULES + u)) rval = match_rulesets[s].rules[u].mask;
            if (rr == 10'(32'h60 + s*NUM_RULES + u)) rval = match_rulesets[s].rules[u].lo;
            if (rr == 10'(32'h80 + s*NUM_RULES + u)) rval = match_rulesets[s].rules[u].hi;
          end
          if (rr == 10'(32'ha0 + s)) rval = match_rulesets[s].eom.idx;
          if (rr == 10'(32'ha8 + s)) rval = match_rulesets[s].eom.mask;
          if (rr == 10'(32'hb0 + s)) rval = match_rulesets[s].eom.lo;
          if (rr == 10'(32'hb8 + s)) rval = match_rulesets[s].eom.hi;
        end
      end
      G_HER: begin
        if (rr == 10'd0) rval = 32'(her_gen_en);
        for (int c = 0; c < NUM_RULESETS; c++) begin
          if (rr == 10'(32'h10 + c)) rval = 32'(her_gen_ctx[c].enabled);
          if (rr == 10'(32'h20 + c)) rval = her_gen_ctx[c].handler_mem_addr;
          if (rr == 10'(32'h30 + c)) rval = her_gen_ctx[c].handler_mem_size;
          if (rr == 10'(32'h40 + c)) rval = her_gen_ctx[c].host_mem_addr[31:0];
          if (rr == 10'(32'h50 + c)) rval = her_gen_ctx[c].host_mem_addr[63:32];
          if (rr == 10'(32'h60 + c)) rval = her_gen_ctx[c].host_mem_size;
          if (rr == 10'(32'h70 + c)) rval = her_gen_ctx[c].hh_addr;
          if (rr == 10'(32'h80 + c)) rval = her_gen_ctx[c].hh_size;
          if (rr == 10'(32'h90 + c)) rval = her_gen_ctx[c].ph_addr;
          if (rr == 10'(32'ha0 + c)) rval = her_gen_ctx[c].ph_size;
          if (rr == 10'(32'hb0 + c)) rval = her_gen_ctx[c].th_addr;
          if (rr == 10'(32'hc0 + c)) rval = her_gen_ctx[c].th_size;
        end
      end
      G_STATS: unique case (rr)
        10'd0: rval = stat_dropped;
        10'd1: rval = stat_small_free;
        10'd2: rval = stat_large_free;
        10'd3: rval = stat_egress_pspin;
        10'd4: rval = stat_egress_host;
        10'd5: rval = stat_egress_contended;
        default: ;
      endcase
      G_EGRESS: if (rr == 10'd0) rval = 32'(egress_rr_en);
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rstn) begin
      s_rvalid <= 1'b0;
      s_rdata  <= '0;
    end else begin
      if (s_rvalid && s_rready) s_rvalid <= 1'b0;
      if (rd_fire) begin
        s_rvalid <= 1'b1;
        s_rdata  <= rval;
      end
    end
  end

endmodule
