// pspin_hostmem_dma: lets PsPIN handlers read and write host memory.
//
// PsPIN's host-memory port is an AXI4 master; the NIC's PCIe DMA engine
// instead takes descriptors (host address, buffer address, length) and
// moves data between host memory and a local buffer RAM. This bridge puts
// a dual-port staging RAM between the two.
//
// Write (handler -> host): the AW/W burst is stored in the RAM, beat k at
// RAM word k. AXI expresses an unaligned write as aligned beats with
// strobes, so the bridge recovers the real transfer from the strobes of
// the first and last beat: offset = lowest set strobe of the first beat,
// end = highest set strobe of the last beat, host address = aligned burst
// address + offset, length = beats*64 - offset - (63 - end). It then issues
// one write descriptor (RAM byte address = offset) and answers B when the
// DMA engine reports completion (SLVERR if it reports an error).
// Read (host -> handler): one read descriptor for the whole aligned burst
// lands the data in the RAM; the bridge then returns it as R beats.
//
// Limits (as described for this bridge): INCR bursts of full-width beats
// only, one transaction at a time (writes first when both wait), no
// arbitrary byte enables inside a burst (only the first and last beat may
// be partial, contiguously). The DMA engine reaches the RAM through
// dma_ram_* (read port for host writes, write port for host reads).
//
// Timing: write = 1 + beats + descriptor + DMA completion + B handshake;
// read = 1 + descriptor + DMA completion + 2 cycles per returned beat (the
// RAM read is registered and not pipelined).
//
// Follows the design description: the buffer-RAM staging, descriptor
// order, unsupported cases and the strobe-based address recovery. Own
// choices: the descriptor and RAM port format (the NIC's own DMA interface
// is segmented and is not reproduced) and the buffer size of one maximum
// burst.
//
// Lint notes: the low 6 address bits are unused on purpose; the byte
// offset is recovered from the strobes, not from the address.
module pspin_hostmem_dma #(
  parameter int unsigned DATA_W   = 512,
  parameter int unsigned ID_W     = 6,
  parameter int unsigned BUF_BEATS = 256
) (
  input  logic                 clk,
  input  logic                 rstn,

  // AXI4 slave from PsPIN
  input  logic [ID_W-1:0]      s_axi_awid,
  input  logic [63:0]          s_axi_awaddr,
  input  logic [7:0]           s_axi_awlen,
  input  logic [2:0]           s_axi_awsize,
  input  logic [1:0]           s_axi_awburst,
  input  logic                 s_axi_awvalid,
  output logic                 s_axi_awready,
  input  logic [DATA_W-1:0]    s_axi_wdata,
  input  logic [DATA_W/8-1:0]  s_axi_wstrb,
  input  logic                 s_axi_wlast,
  input  logic                 s_axi_wvalid,
  output logic                 s_axi_wready,
  output logic [ID_W-1:0]      s_axi_bid,
  output logic [1:0]           s_axi_bresp,
  output logic                 s_axi_bvalid,
  input  logic                 s_axi_bready,
  input  logic [ID_W-1:0]      s_axi_arid,
  input  logic [63:0]          s_axi_araddr,
  input  logic [7:0]           s_axi_arlen,
  input  logic [2:0]           s_axi_arsize,
  input  logic [1:0]           s_axi_arburst,
  input  logic                 s_axi_arvalid,
  output logic                 s_axi_arready,
  output logic [ID_W-1:0]      s_axi_rid,
  output logic [DATA_W-1:0]    s_axi_rdata,
  output logic [1:0]           s_axi_rresp,
  output logic                 s_axi_rlast,
  output logic                 s_axi_rvalid,
  input  logic                 s_axi_rready,

  // write descriptors (RAM -> host) and their completion
  output logic [63:0]          wr_desc_dma_addr,
  output logic [$clog2(BUF_BEATS*DATA_W/8)-1:0] wr_desc_ram_addr,
  output logic [15:0]          wr_desc_len,
  output logic                 wr_desc_valid,
  input  logic                 wr_desc_ready,
  input  logic [3:0]           wr_desc_status_error,
  input  logic                 wr_desc_status_valid,

  // read descriptors (host -> RAM) and their completion
  output logic [63:0]          rd_desc_dma_addr,
  output logic [$clog2(BUF_BEATS*DATA_W/8)-1:0] rd_desc_ram_addr,
  output logic [15:0]          rd_desc_len,
  output logic                 rd_desc_valid,
  input  logic                 rd_desc_ready,
  input  logic [3:0]           rd_desc_status_error,
  input  logic                 rd_desc_status_valid,

  // buffer RAM port for the DMA engine
  input  logic                 dma_ram_en,
  input  logic                 dma_ram_we,
  input  logic [DATA_W/8-1:0]  dma_ram_be,
  input  logic [$clog2(BUF_BEATS)-1:0] dma_ram_addr,
  input  logic [DATA_W-1:0]    dma_ram_wdata,
  output logic [DATA_W-1:0]    dma_ram_rdata
);

  localparam int unsigned BYTES = DATA_W / 8;
  localparam int unsigned BW    = $clog2(BYTES);
  localparam int unsigned IW    = $clog2(BUF_BEATS);
  localparam int unsigned RAW   = $clog2(BUF_BEATS * BYTES);

  typedef enum logic [3:0] {
    S_IDLE, S_WDATA, S_WDESC, S_WWAIT, S_B,
    S_RDESC, S_RWAIT, S_RFETCH, S_RSEND
  } state_e;
  state_e state;

  logic [ID_W-1:0]   id;
  logic [63:0]       base;       // burst address, aligned down to a beat
  logic [8:0]        nbeats;     // beats in the burst
  logic [IW-1:0]     idx;        // current beat
  logic [BYTES-1:0]  first_strb, last_strb;
  logic [1:0]        resp;

  // lowest / highest set bit of a strobe vector
  function automatic logic [BW-1:0] low_bit(input logic [BYTES-1:0] s);
    logic [BW-1:0] r;
    r = '0;
    for (int i = BYTES - 1; i >= 0; i--) if (s[i]) r = BW'(i);
    return r;
  endfunction
  function automatic logic [BW-1:0] high_bit(input logic [BYTES-1:0] s);
    logic [BW-1:0] r;
    r = '0;
    for (int i = 0; i < BYTES; i++) if (s[i]) r = BW'(i);
    return r;
  endfunction

  logic [BW-1:0] offset, last_end;
  assign offset   = low_bit(first_strb);
  assign last_end = high_bit(last_strb);

  // AXI handshakes
  assign s_axi_awready = (state == S_IDLE);
  assign s_axi_arready = (state == S_IDLE) && !s_axi_awvalid;
  assign s_axi_wready  = (state == S_WDATA);
  assign s_axi_bvalid  = (state == S_B);
  assign s_axi_bid     = id;
  assign s_axi_bresp   = resp;
  assign s_axi_rvalid  = (state == S_RSEND);
  assign s_axi_rid     = id;
  assign s_axi_rresp   = resp;
  assign s_axi_rlast   = (9'(idx) == nbeats - 9'd1);

  // descriptors
  assign wr_desc_valid    = (state == S_WDESC);
  assign wr_desc_dma_addr = base + 64'(offset);
  assign wr_desc_ram_addr = RAW'(offset);
  assign wr_desc_len      = 16'((32'(nbeats) << BW) - 32'(offset) - (BYTES - 1 - 32'(last_end)));
  assign rd_desc_valid    = (state == S_RDESC);
  assign rd_desc_dma_addr = base;
  assign rd_desc_ram_addr = '0;
  assign rd_desc_len      = 16'(32'(nbeats) << BW);

  // staging RAM, port A on the AXI side
  logic a_en, a_we;
  assign a_en = (state == S_WDATA && s_axi_wvalid) || (state == S_RFETCH);
  assign a_we = (state == S_WDATA);

  pspin_dpram #(.DATA_W(DATA_W), .DEPTH(BUF_BEATS)) u_ram (
    .clk,
    .a_en, .a_we, .a_be(s_axi_wstrb), .a_addr(idx), .a_wdata(s_axi_wdata), .a_rdata(s_axi_rdata),
    .b_en(dma_ram_en), .b_we(dma_ram_we), .b_be(dma_ram_be), .b_addr(dma_ram_addr),
    .b_wdata(dma_ram_wdata), .b_rdata(dma_ram_rdata));

  always_ff @(posedge clk) begin
    if (!rstn) begin
      state      <= S_IDLE;
      id         <= '0;
      base       <= '0;
      nbeats     <= '0;
      idx        <= '0;
      first_strb <= '0;
      last_strb  <= '0;
      resp       <= 2'b00;
    end else begin
      unique case (state)
        S_IDLE: begin
          idx  <= '0;
          resp <= 2'b00;
          if (s_axi_awvalid) begin
            id     <= s_axi_awid;
            base   <= {s_axi_awaddr[63:BW], BW'(0)};
            nbeats <= 9'(s_axi_awlen) + 9'd1;
            state  <= S_WDATA;
          end else if (s_axi_arvalid) begin
            id     <= s_axi_arid;
            base   <= {s_axi_araddr[63:BW], BW'(0)};
            nbeats <= 9'(s_axi_arlen) + 9'd1;
            state  <= S_RDESC;
          end
        end
        S_WDATA: if (s_axi_wvalid) begin
          if (idx == '0) first_strb <= s_axi_wstrb;
          idx <= idx + 1'b1;
          if (s_axi_wlast) begin
            last_strb <= s_axi_wstrb;
            state     <= S_WDESC;
          end
        end
        S_WDESC: if (wr_desc_ready) state <= S_WWAIT;
        S_WWAIT: if (wr_desc_status_valid) begin
          resp  <= (wr_desc_status_error != 0) ? 2'b10 : 2'b00;
          state <= S_B;
        end
        S_B: if (s_axi_bready) state <= S_IDLE;
        S_RDESC: if (rd_desc_ready) state <= S_RWAIT;
        S_RWAIT: if (rd_desc_status_valid) begin
          resp  <= (rd_desc_status_error != 0) ? 2'b10 : 2'b00;
          state <= S_RFETCH;
        end
        S_RFETCH: state <= S_RSEND;
        S_RSEND: if (s_axi_rready) begin
          if (s_axi_rlast) state <= S_IDLE;
          else begin
            idx   <= idx + 1'b1;
            state <= S_RFETCH;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // supported subset of AXI4
  a_incr_w: assert property (@(posedge clk) disable iff (!rstn)
    (s_axi_awvalid && s_axi_awready) |-> (s_axi_awburst == 2'b01 && s_axi_awsize == 3'(BW)));
  a_incr_r: assert property (@(posedge clk) disable iff (!rstn)
    (s_axi_arvalid && s_axi_arready) |-> (s_axi_arburst == 2'b01 && s_axi_arsize == 3'(BW)));
  a_wlast: assert property (@(posedge clk) disable iff (!rstn)
    (s_axi_wvalid && s_axi_wready) |-> (s_axi_wlast == (9'(idx) == nbeats - 9'd1)));

endmodule
