// ahb_slave_port: AHB-lite slave front end shared by the tiles' AMBA AHB
// wrappers. It turns bus transfers into a simple register/memory port.
//
// A read is requested in the AHB address phase (rd_en with rd_addr = HADDR);
// the tile must present rd_data in the following cycle, which is the data
// phase, so synchronous memories can be read without wait states. A write
// is performed in the data phase (wr_en with wr_addr = the registered
// HADDR and wr_data = HWDATA). If the tile flags the address as invalid
// (addr_err, sampled in the address phase) the transfer ends with the
// two-cycle AHB ERROR response and no access happens. Otherwise HREADYOUT
// is always high: zero wait states.
// Only 32-bit transfers are used by the NIs; HSIZE is not decoded.
module ahb_slave_port #(
  parameter int unsigned AW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          hsel,
  input  logic [31:0]   haddr,
  input  logic [1:0]    htrans,
  input  logic          hwrite,
  input  logic [31:0]   hwdata,
  output logic [31:0]   hrdata,
  output logic          hreadyout,
  output logic          hresp,
  // tile side
  output logic          rd_en,
  output logic [AW-1:0] rd_addr,
  input  logic [31:0]   rd_data,
  output logic          wr_en,
  output logic [AW-1:0] wr_addr,
  output logic [31:0]   wr_data,
  input  logic          addr_err
);
  logic          req, wr_q, rd_q, err1, err2;
  logic [AW-1:0] addr_q;

  assign req       = hsel && htrans[1] && hreadyout;
  assign rd_en     = req && !hwrite && !addr_err;
  assign rd_addr   = haddr[AW-1:0];
  assign wr_en     = wr_q;
  assign wr_addr   = addr_q;
  assign wr_data   = hwdata;
  assign hrdata    = rd_q ? rd_data : 32'h0;
  assign hreadyout = !err1;
  assign hresp     = err1 || err2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_q   <= 1'b0;
      rd_q   <= 1'b0;
      err1   <= 1'b0;
      err2   <= 1'b0;
      addr_q <= '0;
    end else begin
      wr_q   <= req && hwrite && !addr_err;
      rd_q   <= rd_en;
      err1   <= req && addr_err;
      err2   <= err1;
      if (req) addr_q <= haddr[AW-1:0];
    end
  end
endmodule
