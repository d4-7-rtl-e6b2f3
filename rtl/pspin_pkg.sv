// pspin_pkg: types and constants shared by the FPsPIN application block.
//
// FPsPIN attaches a PsPIN packet-processing cluster to a NIC. The modules
// of the ingress path pass a small metadata record from stage to stage
// (matching engine -> allocator -> ingress DMA -> HER generator), and the
// control registers hand the matching rulesets and execution contexts to
// the data path as packed structs. All of those records are defined here.
//
// Sizes that follow the design description: 16 message processing queues,
// 2 clusters, 16 handler processing units (HPUs), a 512 KiB L2 packet
// buffer split into 128-byte and 1536-byte slots, a 24-bit application
// control space and 16-bit control register addresses. Sizes chosen here:
// a 512-bit AXI-Stream data path, 4 rulesets of 4 matching rules each (one
// execution context per ruleset), 32-bit SLMP message IDs and a 16-bit
// packet length.
//
// NUM_CLUSTERS, NUM_HPUS, NUM_MPQ and SLMP_MSGID_OFFSET document the
// configuration and the header layout for users of the package; the
// modules here do not all need them.
package pspin_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned AXIS_DATA_W  = 512;             // NIC interface stream width
  localparam int unsigned AXIS_KEEP_W  = AXIS_DATA_W / 8;
  localparam int unsigned NUM_RULESETS = 4;               // rulesets == execution contexts
  localparam int unsigned NUM_RULES    = 4;               // matching units per ruleset
  localparam int unsigned RS_W         = $clog2(NUM_RULESETS);
  localparam int unsigned NUM_CLUSTERS = 2;
  localparam int unsigned NUM_HPUS     = 16;
  localparam int unsigned NUM_MPQ      = 16;
  localparam int unsigned LEN_W        = 16;              // packet length in bytes

  // SLMP header position inside an Ethernet/IPv4 (no options)/UDP frame
  localparam int unsigned SLMP_OFFSET       = 14 + 20 + 8;
  localparam int unsigned SLMP_MSGID_OFFSET = SLMP_OFFSET + 2;

  // ------------------------------------------------------- matching rules
  typedef enum logic [0:0] {
    MATCH_AND = 1'b0,   // ruleset matches when all of its units match
    MATCH_OR  = 1'b1    // ruleset matches when any of its units matches
  } match_mode_e;

  // One matching unit: lo <= (word[idx] & mask) <= hi
  typedef struct packed {
    logic [31:0] idx;    // 32-bit word index into the packet (I)
    logic [31:0] mask;   // M
    logic [31:0] lo;     // start value S
    logic [31:0] hi;     // end value E
  } match_rule_t;

  typedef struct packed {
    match_mode_e                      mode;
    match_rule_t [NUM_RULES-1:0]      rules;
    match_rule_t                      eom;     // unit deciding the End-Of-Message bit
  } ruleset_t;

  // ------------------------------------------------------ packet metadata
  typedef struct packed {
    logic [31:0]      msgid;   // SLMP message ID
    logic             eom;     // last packet of the message
    logic [RS_W-1:0]  rs_id;   // matching ruleset == execution context
    logic [LEN_W-1:0] len;     // packet length in bytes
  } pkt_meta_t;

  // after the allocator
  typedef struct packed {
    pkt_meta_t   meta;
    logic [31:0] addr;   // L2 address of the slot
    logic        drop;   // no slot free: discard the packet
  } alloc_meta_t;

  // after the ingress DMA: packet is in L2
  typedef struct packed {
    pkt_meta_t   meta;
    logic [31:0] addr;
  } l2_meta_t;

  // -------------------------------------------------- execution contexts
  typedef struct packed {
    logic        enabled;
    logic [31:0] handler_mem_addr;
    logic [31:0] handler_mem_size;
    logic [63:0] host_mem_addr;
    logic [31:0] host_mem_size;
    logic [31:0] hh_addr;   // header handler
    logic [31:0] hh_size;
    logic [31:0] ph_addr;   // payload handler
    logic [31:0] ph_size;
    logic [31:0] th_addr;   // tail (completion) handler
    logic [31:0] th_size;
  } exec_ctx_t;

  // Handler Execution Request handed to the PsPIN scheduler
  typedef struct packed {
    logic [31:0]      msgid;
    logic             eom;
    logic [RS_W-1:0]  ctx_id;
    logic [31:0]      her_addr;    // packet address in L2
    logic [31:0]      her_size;    // slot-occupying packet size
    logic [31:0]      xfer_size;   // bytes transferred into L2
    exec_ctx_t        ctx;
  } her_t;

  // ------------------------------------------------------------- egress
  typedef struct packed {
    logic [7:0]       id;
    logic [31:0]      addr;   // source address in PsPIN memory (64-byte aligned)
    logic [LEN_W-1:0] len;    // frame length in bytes
  } egress_cmd_t;

  // ------------------------------------------------------------ helpers
  // number of set bits of a keep/strobe vector
  function automatic logic [$clog2(AXIS_KEEP_W):0] keep_count(input logic [AXIS_KEEP_W-1:0] k);
    logic [$clog2(AXIS_KEEP_W):0] n;
    n = '0;
    for (int i = 0; i < AXIS_KEEP_W; i++) n = n + k[i];
    return n;
  endfunction

  // keep vector with the low n bytes set (n = 0 means all bytes)
  function automatic logic [AXIS_KEEP_W-1:0] keep_mask(input logic [$clog2(AXIS_KEEP_W)-1:0] n);
    logic [AXIS_KEEP_W-1:0] k;
    for (int i = 0; i < AXIS_KEEP_W; i++) k[i] = (n == 0) || (i < int'(n));
    return k;
  endfunction

endpackage
