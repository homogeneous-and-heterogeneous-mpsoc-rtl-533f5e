// sram_tile: shared on-chip frame memory of the heterogeneous MPSoC, a
// level-2 memory reached over the NoC through its own NI. The size is a
// synthesis parameter; the default is the 3 Mbit per block of the design
// description (98,304 words of 32 bits), enough for one VGA frame.
//
// Interface: a 32-bit AHB-lite slave port, word addressed by HADDR[..:2].
// Reads are synchronous (address phase in, data phase out), writes happen in
// the data phase, no wait states. An address beyond the memory ends with an
// AHB ERROR response. The memory is written as an array so that synthesis
// can map it to an SRAM macro.
module sram_tile #(
  parameter int unsigned WORDS = 98304
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        hsel,
  input  logic [31:0] haddr,
  input  logic [1:0]  htrans,
  input  logic        hwrite,
  input  logic [31:0] hwdata,
  output logic [31:0] hrdata,
  output logic        hreadyout,
  output logic        hresp
);
  localparam int unsigned IW = $clog2(WORDS);
  localparam int unsigned AW = IW + 2;

  logic          rd_en, wr_en, addr_err;
  logic [AW-1:0] rd_addr, wr_addr;
  logic [31:0]   rd_data, wr_data;
  logic [31:0]   mem [WORDS];

  assign addr_err = (haddr[31:2] >= 30'(WORDS));

  ahb_slave_port #(.AW(AW)) u_port (
    .clk, .rst_n, .hsel, .haddr, .htrans, .hwrite, .hwdata, .hrdata, .hreadyout, .hresp,
    .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data, .addr_err);

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr[AW-1:2]] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr[AW-1:2]];
  end
endmodule
