// mpsoc_top: the two MPSoC platforms of the design description, side by side.
//
// Heterogeneous MPSoC: an 8-router Spidergon NoC with 5-port routers, each
// router serving two NIs (sixteen in all, NI id = router*2 + local port).
// The tiles sit where the platform figure puts them:
//   R0: SRAM0, filter            R4: transform, SRAM3
//   R1: CPU (initiator), SRAM1   R5: SRAM4, ME0
//   R2: DIAA, ext. memory ctrl   R6: ME1, SRAM5
//   R3: source coding, SRAM2     R7: SRAM6, pixel transform
// Which of the two tiles of a router takes local port NI1 and which NI2 is
// this design's choice (the figure gives no order). The CPU tile itself is
// not built: its AHB master bus is brought out as the cpu_* ports, which
// drive the slave side of the CPU's initiator NI. Every other tile is an
// AHB slave behind a target NI. HADDR[31:28] of a CPU access names the NI
// (e.g. 0x3xxx_xxxx is SRAM1, 0xBxxx_xxxx is ME0), HADDR[27:0] the address
// inside that tile. The DIAA gate signals, the external memory port and the
// tiles' done flags are top-level ports.
//
// Homogeneous MPSoC: an 8-router Spidergon NoC with 4-port routers, one NI
// port per router. Its tiles (RISC core + DSP + 2 Mbit memory) are not built,
// so the eight NI-side links and credit wires are brought out as homo_* ports.
//
// Clocks: nclk runs the NoC and the NI kernels, hclk the tiles and the NI
// shells (500 MHz and 250 MHz in the description); rst_n is asynchronous and
// common to both.
module mpsoc_top
  import noc_pkg::*;
#(
  parameter int unsigned SRAM_WORDS = 98304   // 3 Mbit per on-chip SRAM tile
) (
  input  logic         nclk,
  input  logic         hclk,
  input  logic         rst_n,
  // CPU tile bus (AHB-lite master side of the CPU)
  input  logic         cpu_hsel,
  input  logic [31:0]  cpu_haddr,
  input  logic [1:0]   cpu_htrans,
  input  logic         cpu_hwrite,
  input  logic [2:0]   cpu_hsize,
  input  logic [2:0]   cpu_hburst,
  input  logic [31:0]  cpu_hwdata,
  output logic [31:0]  cpu_hrdata,
  output logic         cpu_hreadyout,
  output logic         cpu_hresp,
  // off-chip memory
  output logic         ext_req,
  output logic         ext_we,
  output logic [31:0]  ext_addr,
  output logic [31:0]  ext_wdata,
  input  logic         ext_gnt,
  input  logic         ext_rvalid,
  input  logic [31:0]  ext_rdata,
  // class-D power stage gate drives
  output logic         gate_ah,
  output logic         gate_al,
  output logic         gate_bh,
  output logic         gate_bl,
  output logic         diaa_fifo_low,
  // done flags: 0 ME0, 1 ME1, 2 transform, 3 filter, 4 pixel, 5 source coding, 6 ext. memory
  output logic [6:0]   irq,
  // homogeneous MPSoC tile-side links
  input  link_t        homo_ni_in         [8],
  output logic         homo_ni_credit_out [8],
  output link_t        homo_ni_out        [8],
  input  logic         homo_ni_credit_in  [8]
);
  localparam int unsigned NNI    = 16;
  localparam int unsigned CPU_ID = 2;

  link_t ni_in      [NNI];
  logic  ni_cred_out[NNI];
  link_t ni_out     [NNI];
  logic  ni_cred_in [NNI];

  spidergon_noc #(.NLOC(2)) u_het_noc (
    .clk(nclk), .rst_n,
    .ni_in(ni_in), .ni_credit_out(ni_cred_out), .ni_out(ni_out), .ni_credit_in(ni_cred_in));

  spidergon_noc #(.NLOC(1)) u_homo_noc (
    .clk(nclk), .rst_n,
    .ni_in(homo_ni_in), .ni_credit_out(homo_ni_credit_out),
    .ni_out(homo_ni_out), .ni_credit_in(homo_ni_credit_in));

  // CPU initiator NI
  ni_initiator #(.MY_ID(CPU_ID), .NLOC(2)) u_cpu_ni (
    .rst_n, .hclk,
    .hsel(cpu_hsel), .haddr(cpu_haddr), .htrans(cpu_htrans), .hwrite(cpu_hwrite),
    .hsize(cpu_hsize), .hburst(cpu_hburst), .hwdata(cpu_hwdata),
    .hrdata(cpu_hrdata), .hreadyout(cpu_hreadyout), .hresp(cpu_hresp),
    .nclk, .out_link(ni_in[CPU_ID]), .credit_in(ni_cred_out[CPU_ID]),
    .in_link(ni_out[CPU_ID]), .credit_out(ni_cred_in[CPU_ID]));

  // Target NIs and their tiles
  logic [31:0] t_haddr [NNI];
  logic [1:0]  t_htrans[NNI];
  logic        t_hwrite[NNI];
  logic [31:0] t_hwdata[NNI];
  logic [31:0] t_hrdata[NNI];
  logic        t_hready[NNI];
  logic        t_hresp [NNI];

  localparam int unsigned ID_SRAM0 = 0,  ID_FILTER = 1,  ID_SRAM1 = 3,  ID_DIAA  = 4;
  localparam int unsigned ID_EXT   = 5,  ID_SRC    = 6,  ID_SRAM2 = 7,  ID_TRANSF = 8;
  localparam int unsigned ID_SRAM3 = 9,  ID_SRAM4  = 10, ID_ME0   = 11, ID_ME1   = 12;
  localparam int unsigned ID_SRAM5 = 13, ID_SRAM6  = 14, ID_PIXEL = 15;

  for (genvar i = 0; i < NNI; i++) begin : g_tgt
    if (i != CPU_ID) begin : g_ni
      logic [2:0] hsize_unused, hburst_unused;
      ni_target #(.MY_ID(i), .NLOC(2)) u_ni (
        .rst_n, .hclk,
        .haddr(t_haddr[i]), .htrans(t_htrans[i]), .hwrite(t_hwrite[i]),
        .hsize(hsize_unused), .hburst(hburst_unused), .hwdata(t_hwdata[i]),
        .hrdata(t_hrdata[i]), .hready(t_hready[i]), .hresp(t_hresp[i]),
        .nclk, .in_link(ni_out[i]), .credit_out(ni_cred_in[i]),
        .out_link(ni_in[i]), .credit_in(ni_cred_out[i]));
    end else begin : g_none
      assign t_haddr[i]  = '0;
      assign t_htrans[i] = '0;
      assign t_hwrite[i] = 1'b0;
      assign t_hwdata[i] = '0;
      assign t_hrdata[i] = '0;
      assign t_hready[i] = 1'b1;
      assign t_hresp[i]  = 1'b0;
    end
  end

  for (genvar i = 0; i < NNI; i++) begin : g_sram
    if (i == ID_SRAM0 || i == ID_SRAM1 || i == ID_SRAM2 || i == ID_SRAM3 ||
        i == ID_SRAM4 || i == ID_SRAM5 || i == ID_SRAM6) begin : g_on
      sram_tile #(.WORDS(SRAM_WORDS)) u_sram (
        .clk(hclk), .rst_n, .hsel(1'b1), .haddr(t_haddr[i]), .htrans(t_htrans[i]),
        .hwrite(t_hwrite[i]), .hwdata(t_hwdata[i]),
        .hrdata(t_hrdata[i]), .hreadyout(t_hready[i]), .hresp(t_hresp[i]));
    end
  end

  me_tile u_me0 (
    .clk(hclk), .rst_n, .hsel(1'b1), .haddr(t_haddr[ID_ME0]), .htrans(t_htrans[ID_ME0]),
    .hwrite(t_hwrite[ID_ME0]), .hwdata(t_hwdata[ID_ME0]), .hrdata(t_hrdata[ID_ME0]),
    .hreadyout(t_hready[ID_ME0]), .hresp(t_hresp[ID_ME0]), .irq_done(irq[0]));

  me_tile u_me1 (
    .clk(hclk), .rst_n, .hsel(1'b1), .haddr(t_haddr[ID_ME1]), .htrans(t_htrans[ID_ME1]),
    .hwrite(t_hwrite[ID_ME1]), .hwdata(t_hwdata[ID_ME1]), .hrdata(t_hrdata[ID_ME1]),
    .hreadyout(t_hready[ID_ME1]), .hresp(t_hresp[ID_ME1]), .irq_done(irq[1]));

  transf_tile u_transf (
    .clk(hclk), .rst_n, .hsel(1'b1), .haddr(t_haddr[ID_TRANSF]), .htrans(t_htrans[ID_TRANSF]),
    .hwrite(t_hwrite[ID_TRANSF]), .hwdata(t_hwdata[ID_TRANSF]), .hrdata(t_hrdata[ID_TRANSF]),
    .hreadyout(t_hready[ID_TRANSF]), .hresp(t_hresp[ID_TRANSF]), .irq_done(irq[2]));

  filter_tile u_filter (
    .clk(hclk), .rst_n, .hsel(1'b1), .haddr(t_haddr[ID_FILTER]), .htrans(t_htrans[ID_FILTER]),
    .hwrite(t_hwrite[ID_FILTER]), .hwdata(t_hwdata[ID_FILTER]), .hrdata(t_hrdata[ID_FILTER]),
    .hreadyout(t_hready[ID_FILTER]), .hresp(t_hresp[ID_FILTER]), .irq_done(irq[3]));

  pixel_transf_tile u_pixel (
    .clk(hclk), .rst_n, .hsel(1'b1), .haddr(t_haddr[ID_PIXEL]), .htrans(t_htrans[ID_PIXEL]),
    .hwrite(t_hwrite[ID_PIXEL]), .hwdata(t_hwdata[ID_PIXEL]), .hrdata(t_hrdata[ID_PIXEL]),
    .hreadyout(t_hready[ID_PIXEL]), .hresp(t_hresp[ID_PIXEL]), .irq_done(irq[4]));

  source_coding_tile u_src (
    .clk(hclk), .rst_n, .hsel(1'b1), .haddr(t_haddr[ID_SRC]), .htrans(t_htrans[ID_SRC]),
    .hwrite(t_hwrite[ID_SRC]), .hwdata(t_hwdata[ID_SRC]), .hrdata(t_hrdata[ID_SRC]),
    .hreadyout(t_hready[ID_SRC]), .hresp(t_hresp[ID_SRC]), .irq_done(irq[5]));

  ext_mem_ctrl u_ext (
    .clk(hclk), .rst_n, .hsel(1'b1), .haddr(t_haddr[ID_EXT]), .htrans(t_htrans[ID_EXT]),
    .hwrite(t_hwrite[ID_EXT]), .hwdata(t_hwdata[ID_EXT]), .hrdata(t_hrdata[ID_EXT]),
    .hreadyout(t_hready[ID_EXT]), .hresp(t_hresp[ID_EXT]),
    .ext_req, .ext_we, .ext_addr, .ext_wdata, .ext_gnt, .ext_rvalid, .ext_rdata,
    .irq_done(irq[6]));

  diaa_tile u_diaa (
    .clk(hclk), .rst_n, .hsel(1'b1), .haddr(t_haddr[ID_DIAA]), .htrans(t_htrans[ID_DIAA]),
    .hwrite(t_hwrite[ID_DIAA]), .hwdata(t_hwdata[ID_DIAA]), .hrdata(t_hrdata[ID_DIAA]),
    .hreadyout(t_hready[ID_DIAA]), .hresp(t_hresp[ID_DIAA]),
    .gate_ah, .gate_al, .gate_bh, .gate_bl, .fifo_low(diaa_fifo_low));
endmodule
