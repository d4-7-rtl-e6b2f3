// pspin_pkt_match: packet matching engine of the FPsPIN ingress path.
//
// Every frame arriving from the NIC is checked against NUM_RULESETS
// rulesets. A ruleset holds NUM_RULES matching units; each unit picks the
// 32-bit big-endian word I of the frame and tests S <= (word & M) <= E.
// The ruleset's mode combines the unit results with AND or OR. A frame
// that some ruleset matches is sent to PsPIN on m_axis_pspin and, after its
// last beat, a metadata record (SLMP message ID, EOM bit, ruleset ID,
// length) is offered on meta_*; all other frames pass through unchanged on
// m_axis_nic back to the NIC. The lowest-numbered matching ruleset wins.
// A ruleset's EOM bit is the output of an extra matching unit in the same
// ruleset. While match_valid is low nothing matches, so the NIC behaves as
// a plain NIC.
//
// Timing: the head beat is accepted, then three register stages compute the
// unit results, the ruleset results and the winner; the head beat leaves
// the engine 4 cycles after it was accepted (4-cycle matching latency).
// The rest of the frame then streams through at one beat per cycle. The
// metadata can only be produced once the length is known, after tlast.
//
// Follows the design description: the U32-style rule formula, AND/OR
// modes, the pass-through port and the metadata fields. Own choices: rules
// see only the first beat (64 bytes, which covers the Ethernet, IPv4, UDP
// and SLMP headers; units indexing beyond it never match), the SLMP message
// ID is read at byte 44 (IPv4 without options), frames are contiguous
// (tkeep all ones except on the last beat), and the EOM unit per ruleset.
module pspin_pkt_match
  import pspin_pkg::*;
(
  input  logic                    clk,
  input  logic                    rstn,

  // configuration
  input  logic                    match_valid,
  input  ruleset_t [NUM_RULESETS-1:0] rulesets,

  // from the NIC
  input  logic [AXIS_DATA_W-1:0]  s_axis_nic_tdata,
  input  logic [AXIS_KEEP_W-1:0]  s_axis_nic_tkeep,
  input  logic                    s_axis_nic_tvalid,
  output logic                    s_axis_nic_tready,
  input  logic                    s_axis_nic_tlast,

  // unmatched frames back to the NIC
  output logic [AXIS_DATA_W-1:0]  m_axis_nic_tdata,
  output logic [AXIS_KEEP_W-1:0]  m_axis_nic_tkeep,
  output logic                    m_axis_nic_tvalid,
  input  logic                    m_axis_nic_tready,
  output logic                    m_axis_nic_tlast,

  // matched frames to PsPIN
  output logic [AXIS_DATA_W-1:0]  m_axis_pspin_tdata,
  output logic [AXIS_KEEP_W-1:0]  m_axis_pspin_tkeep,
  output logic                    m_axis_pspin_tvalid,
  input  logic                    m_axis_pspin_tready,
  output logic                    m_axis_pspin_tlast,

  // metadata of matched frames
  output pkt_meta_t               meta_data,
  output logic                    meta_valid,
  input  logic                    meta_ready
);

  localparam int unsigned WORDS = AXIS_DATA_W / 32;

  typedef enum logic [2:0] {S_IDLE, S_UNITS, S_SETS, S_SEL, S_HEAD, S_BODY, S_META} state_e;
  state_e state;

  logic [AXIS_DATA_W-1:0] head_data;
  logic [AXIS_KEEP_W-1:0] head_keep;
  logic                   head_last;

  logic [NUM_RULESETS-1:0][NUM_RULES-1:0] unit_q;
  logic [NUM_RULESETS-1:0]                eom_unit_q;
  logic [NUM_RULESETS-1:0]                set_q;
  logic                                   matched;
  logic [RS_W-1:0]                        rs_id;
  logic                                   eom;
  logic [31:0]                            msgid;
  logic [LEN_W-1:0]                       len;

  // byte b of the head beat, zero where tkeep is clear
  function automatic logic [7:0] head_byte(input int unsigned b);
    return head_keep[b] ? head_data[8*b +: 8] : 8'h00;
  endfunction

  function automatic logic [31:0] head_word(input int unsigned w);
    return {head_byte(4*w), head_byte(4*w+1), head_byte(4*w+2), head_byte(4*w+3)};
  endfunction

  function automatic logic unit_eval(input match_rule_t r);
    logic [31:0] v;
    if (r.idx >= WORDS) return 1'b0;
    v = head_word(r.idx) & r.mask;
    return (r.lo <= v) && (v <= r.hi);
  endfunction

  // ruleset combination and first-match selection
  logic [NUM_RULESETS-1:0] set_d;
  always_comb begin
    for (int s = 0; s < NUM_RULESETS; s++) begin
      unique case (rulesets[s].mode)
        MATCH_AND: set_d[s] = &unit_q[s];
        MATCH_OR:  set_d[s] = |unit_q[s];
        default:   set_d[s] = 1'b0;
      endcase
      set_d[s] = set_d[s] & match_valid;
    end
  end

  logic            sel_hit;
  logic [RS_W-1:0] sel_id;
  always_comb begin
    sel_hit = 1'b0;
    sel_id  = '0;
    for (int s = NUM_RULESETS - 1; s >= 0; s--) begin
      if (set_q[s]) begin
        sel_hit = 1'b1;
        sel_id  = RS_W'(s);
      end
    end
  end

  // output steering
  logic out_ready;
  assign out_ready = matched ? m_axis_pspin_tready : m_axis_nic_tready;

  logic                   o_valid;
  logic [AXIS_DATA_W-1:0] o_data;
  logic [AXIS_KEEP_W-1:0] o_keep;
  logic                   o_last;

  always_comb begin
    o_valid = 1'b0;
    o_data  = head_data;
    o_keep  = head_keep;
    o_last  = head_last;
    s_axis_nic_tready = 1'b0;
    unique case (state)
      S_IDLE: s_axis_nic_tready = 1'b1;
      S_HEAD: o_valid = 1'b1;
      S_BODY: begin
        o_valid = s_axis_nic_tvalid;
        o_data  = s_axis_nic_tdata;
        o_keep  = s_axis_nic_tkeep;
        o_last  = s_axis_nic_tlast;
        s_axis_nic_tready = out_ready;
      end
      default: ;
    endcase
  end

  assign m_axis_pspin_tdata  = o_data;
  assign m_axis_pspin_tkeep  = o_keep;
  assign m_axis_pspin_tlast  = o_last;
  assign m_axis_pspin_tvalid = o_valid & matched;
  assign m_axis_nic_tdata    = o_data;
  assign m_axis_nic_tkeep    = o_keep;
  assign m_axis_nic_tlast    = o_last;
  assign m_axis_nic_tvalid   = o_valid & ~matched;

  assign meta_valid = (state == S_META);
  assign meta_data  = '{msgid: msgid, eom: eom, rs_id: rs_id, len: len};

  always_ff @(posedge clk) begin
    if (!rstn) begin
      state      <= S_IDLE;
      head_data  <= '0;
      head_keep  <= '0;
      head_last  <= 1'b0;
      unit_q     <= '0;
      eom_unit_q <= '0;
      set_q      <= '0;
      matched    <= 1'b0;
      rs_id      <= '0;
      eom        <= 1'b0;
      msgid      <= '0;
      len        <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (s_axis_nic_tvalid) begin
          head_data <= s_axis_nic_tdata;
          head_keep <= s_axis_nic_tkeep;
          head_last <= s_axis_nic_tlast;
          state     <= S_UNITS;
        end
        S_UNITS: begin
          for (int s = 0; s < NUM_RULESETS; s++) begin
            for (int u = 0; u < NUM_RULES; u++) unit_q[s][u] <= unit_eval(rulesets[s].rules[u]);
            eom_unit_q[s] <= unit_eval(rulesets[s].eom);
          end
          msgid <= head_word(SLMP_MSGID_OFFSET / 4);   // offset 44 is word aligned
          state <= S_SETS;
        end
        S_SETS: begin
          set_q <= set_d;
          state <= S_SEL;
        end
        S_SEL: begin
          matched <= sel_hit;
          rs_id   <= sel_id;
          eom     <= eom_unit_q[sel_id];
          len     <= LEN_W'(keep_count(head_keep));
          state   <= S_HEAD;
        end
        S_HEAD: if (out_ready) begin
          if (head_last) state <= matched ? S_META : S_IDLE;
          else           state <= S_BODY;
        end
        S_BODY: if (s_axis_nic_tvalid && out_ready) begin
          len <= len + LEN_W'(keep_count(s_axis_nic_tkeep));
          if (s_axis_nic_tlast) state <= matched ? S_META : S_IDLE;
        end
        S_META: if (meta_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // AXI-Stream rule: data held stable while valid and not ready
  a_pspin_hold: assert property (@(posedge clk) disable iff (!rstn)
    (m_axis_pspin_tvalid && !m_axis_pspin_tready) |=> $stable(m_axis_pspin_tdata));
  a_meta_hold: assert property (@(posedge clk) disable iff (!rstn)
    (meta_valid && !meta_ready) |=> $stable(meta_data));

endmodule
