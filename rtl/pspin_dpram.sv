// pspin_dpram: true dual-port RAM with byte enables and registered reads.
//
// Two independent ports on one clock. Each port writes the bytes selected
// by be when en and we are high, and reads when en is high and we low; the
// read data appears one cycle later and holds until the next read on that
// port. Writing the same word from both ports in one cycle is undefined.
// Used as the staging buffer between the PsPIN AXI side and the host DMA
// engine in pspin_hostmem_dma.
module pspin_dpram #(
  parameter int unsigned DATA_W = 512,
  parameter int unsigned DEPTH  = 256
) (
  input  logic                     clk,

  input  logic                     a_en,
  input  logic                     a_we,
  input  logic [DATA_W/8-1:0]      a_be,
  input  logic [$clog2(DEPTH)-1:0] a_addr,
  input  logic [DATA_W-1:0]        a_wdata,
  output logic [DATA_W-1:0]        a_rdata,

  input  logic                     b_en,
  input  logic                     b_we,
  input  logic [DATA_W/8-1:0]      b_be,
  input  logic [$clog2(DEPTH)-1:0] b_addr,
  input  logic [DATA_W-1:0]        b_wdata,
  output logic [DATA_W-1:0]        b_rdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) begin
        for (int i = 0; i < DATA_W / 8; i++)
          if (a_be[i]) mem[a_addr][8*i +: 8] <= a_wdata[8*i +: 8];
      end else begin
        a_rdata <= mem[a_addr];
      end
    end
    if (b_en) begin
      if (b_we) begin
        for (int i = 0; i < DATA_W / 8; i++)
          if (b_be[i]) mem[b_addr][8*i +: 8] <= b_wdata[8*i +: 8];
      end else begin
        b_rdata <= mem[b_addr];
      end
    end
  end

endmodule
