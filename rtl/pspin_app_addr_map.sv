// pspin_app_addr_map: splits the NIC's application control space.
//
// The host reaches FPsPIN through one AXI-Lite port with a 24-bit address
// (32-bit data). The top two address bits select the target:
//   [23:22] = 00 : L2 handler memory, PsPIN address 0x1c00_0000 + [21:0]
//   [23:22] = 01 : L2 program memory, PsPIN address 0x1d00_0000 + [21:0]
//   [23:22] = 1x : control registers, register address [15:0]
// (bits [21:16] are ignored for registers). The two memory areas are thus
// squeezed into the small control space and reach PsPIN's 32-bit host
// slave port; the driver encodes addresses the same way.
//
// Interface: s_* is the AXI-Lite slave from the NIC; m_host_* an AXI-Lite
// master with the translated 32-bit address towards PsPIN's host slave port
// (a single-beat AXI4 adapter sits outside); m_reg_* an AXI-Lite master
// with the 16-bit register address towards pspin_ctrl_regs. Writes and
// reads are handled independently, one transaction each at a time.
// Timing: a write takes 1 accept cycle, the downstream handshakes, and 1
// response cycle; reads likewise.
//
// Follows the design description: the address split and the PsPIN base
// addresses. Own choices: the AXI-Lite plumbing.
//
// Lint notes: address bit 23 is unused on purpose (both 1x codes select
// the registers), as are bits [21:16] inside the register window.
module pspin_app_addr_map (
  input  logic        clk,
  input  logic        rstn,

  // AXI-Lite slave, 24-bit application control space
  input  logic [23:0] s_awaddr,
  input  logic        s_awvalid,
  output logic        s_awready,
  input  logic [31:0] s_wdata,
  input  logic [3:0]  s_wstrb,
  input  logic        s_wvalid,
  output logic        s_wready,
  output logic [1:0]  s_bresp,
  output logic        s_bvalid,
  input  logic        s_bready,
  input  logic [23:0] s_araddr,
  input  logic        s_arvalid,
  output logic        s_arready,
  output logic [31:0] s_rdata,
  output logic [1:0]  s_rresp,
  output logic        s_rvalid,
  input  logic        s_rready,

  // AXI-Lite master to the PsPIN host slave port
  output logic [31:0] m_host_awaddr,
  output logic        m_host_awvalid,
  input  logic        m_host_awready,
  output logic [31:0] m_host_wdata,
  output logic [3:0]  m_host_wstrb,
  output logic        m_host_wvalid,
  input  logic        m_host_wready,
  input  logic [1:0]  m_host_bresp,
  input  logic        m_host_bvalid,
  output logic        m_host_bready,
  output logic [31:0] m_host_araddr,
  output logic        m_host_arvalid,
  input  logic        m_host_arready,
  input  logic [31:0] m_host_rdata,
  input  logic [1:0]  m_host_rresp,
  input  logic        m_host_rvalid,
  output logic        m_host_rready,

  // AXI-Lite master to the control registers
  output logic [15:0] m_reg_awaddr,
  output logic        m_reg_awvalid,
  input  logic        m_reg_awready,
  output logic [31:0] m_reg_wdata,
  output logic [3:0]  m_reg_wstrb,
  output logic        m_reg_wvalid,
  input  logic        m_reg_wready,
  input  logic [1:0]  m_reg_bresp,
  input  logic        m_reg_bvalid,
  output logic        m_reg_bready,
  output logic [15:0] m_reg_araddr,
  output logic        m_reg_arvalid,
  input  logic        m_reg_arready,
  input  logic [31:0] m_reg_rdata,
  input  logic [1:0]  m_reg_rresp,
  input  logic        m_reg_rvalid,
  output logic        m_reg_rready
);

  localparam logic [7:0] HANDLER_MEM_TOP = 8'h1c;
  localparam logic [7:0] PROGRAM_MEM_TOP = 8'h1d;

  function automatic logic [31:0] to_pspin(input logic [23:0] a);
    return {a[22] ? PROGRAM_MEM_TOP : HANDLER_MEM_TOP, 2'b00, a[21:0]};
  endfunction

  // ------------------------------------------------------------ writes
  typedef enum logic [1:0] {W_IDLE, W_FWD, W_RESP, W_OUT} wstate_e;
  wstate_e     wstate;
  logic [23:0] waddr;
  logic [31:0] wdata;
  logic [3:0]  wstrb;
  logic        aw_done, w_done;
  logic [1:0]  bresp;
  logic        wreg;          // write targets the registers

  assign wreg      = waddr[23];
  assign s_awready = (wstate == W_IDLE) && s_awvalid && s_wvalid;
  assign s_wready  = s_awready;
  assign s_bvalid  = (wstate == W_OUT);
  assign s_bresp   = bresp;

  assign m_host_awaddr  = to_pspin(waddr);
  assign m_host_wdata   = wdata;
  assign m_host_wstrb   = wstrb;
  assign m_host_awvalid = (wstate == W_FWD) && !wreg && !aw_done;
  assign m_host_wvalid  = (wstate == W_FWD) && !wreg && !w_done;
  assign m_host_bready  = (wstate == W_RESP) && !wreg;
  assign m_reg_awaddr   = waddr[15:0];
  assign m_reg_wdata    = wdata;
  assign m_reg_wstrb    = wstrb;
  assign m_reg_awvalid  = (wstate == W_FWD) && wreg && !aw_done;
  assign m_reg_wvalid   = (wstate == W_FWD) && wreg && !w_done;
  assign m_reg_bready   = (wstate == W_RESP) && wreg;

  logic aw_acc, w_acc, b_acc;
  assign aw_acc = wreg ? (m_reg_awvalid && m_reg_awready) : (m_host_awvalid && m_host_awready);
  assign w_acc  = wreg ? (m_reg_wvalid  && m_reg_wready)  : (m_host_wvalid  && m_host_wready);
  assign b_acc  = wreg ? (m_reg_bvalid  && m_reg_bready)  : (m_host_bvalid  && m_host_bready);

  always_ff @(posedge clk) begin
    if (!rstn) begin
      wstate  <= W_IDLE;
      waddr   <= '0;
      wdata   <= '0;
      wstrb   <= '0;
      aw_done <= 1'b0;
      w_done  <= 1'b0;
      bresp   <= 2'b00;
    end else begin
      unique case (wstate)
        W_IDLE: if (s_awready) begin
          waddr   <= s_awaddr;
          wdata   <= s_wdata;
          wstrb   <= s_wstrb;
          aw_done <= 1'b0;
          w_done  <= 1'b0;
          wstate  <= W_FWD;
        end
        W_FWD: begin
          if (aw_acc) aw_done <= 1'b1;
          if (w_acc)  w_done  <= 1'b1;
          if ((aw_done || aw_acc) && (w_done || w_acc)) wstate <= W_RESP;
        end
        W_RESP: if (b_acc) begin
          bresp  <= wreg ? m_reg_bresp : m_host_bresp;
          wstate <= W_OUT;
        end
        W_OUT: if (s_bready) wstate <= W_IDLE;
        default: wstate <= W_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------- reads
  typedef enum logic [1:0] {R_IDLE, R_FWD, R_RESP, R_OUT} rstate_e;
  rstate_e     rstate;
  logic [23:0] raddr;
  logic [31:0] rdata;
  logic [1:0]  rresp;
  logic        rreg;

  assign rreg      = raddr[23];
  assign s_arready = (rstate == R_IDLE);
  assign s_rvalid  = (rstate == R_OUT);
  assign s_rdata   = rdata;
  assign s_rresp   = rresp;

  assign m_host_araddr  = to_pspin(raddr);
  assign m_host_arvalid = (rstate == R_FWD) && !rreg;
  assign m_host_rready  = (rstate == R_RESP) && !rreg;
  assign m_reg_araddr   = raddr[15:0];
  assign m_reg_arvalid  = (rstate == R_FWD) && rreg;
  assign m_reg_rready   = (rstate == R_RESP) && rreg;

  always_ff @(posedge clk) begin
    if (!rstn) begin
      rstate <= R_IDLE;
      raddr  <= '0;
      rdata  <= '0;
      rresp  <= 2'b00;
    end else begin
      unique case (rstate)
        R_IDLE: if (s_arvalid) begin
          raddr  <= s_araddr;
          rstate <= R_FWD;
        end
        R_FWD: if (rreg ? m_reg_arready : m_host_arready) rstate <= R_RESP;
        R_RESP: if (rreg ? m_reg_rvalid : m_host_rvalid) begin
          rdata  <= rreg ? m_reg_rdata : m_host_rdata;
          rresp  <= rreg ? m_reg_rresp : m_host_rresp;
          rstate <= R_OUT;
        end
        R_OUT: if (s_rready) rstate <= R_IDLE;
        default: rstate <= R_IDLE;
      endcase
    end
  end

endmodule
