// tb_ni_pair: initiator and target network interfaces end to end. An
// ni_initiator (NI 2, router 1) is driven by an AHB-lite master task on the
// IP clock; two ni_targets, NI 3 (same router) and NI 9 (router 4, across),
// each serve a 1024-word sram_tile. The NoC is the 8-router spidergon_noc
// on a clock twice as fast, so both NIs cross clock domains.
// Checks: random SINGLE writes and reads reach the right tile and return
// the right data; INCR4 bursts are carried as one 4-cell packet each way;
// a write only completes once its response is back (non-posted); an
// out-of-range address comes back as a two-cycle AHB ERROR and the
// interfaces keep working after it.
`timescale 1ns/1ps
module tb_ni_pair;
  import noc_pkg::*;
  logic nclk = 1'b0, hclk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a real falling edge, so the asynchronous resets fire
  always #1 nclk = ~nclk;
  always #2 hclk = ~hclk;
  wire clk = hclk;

  logic        hsel = 1'b0;
  logic [31:0] haddr = '0;
  logic [1:0]  htrans = '0;
  logic        hwrite = 1'b0;
  logic [2:0]  hsize = 3'b010, hburst = '0;
  logic [31:0] hwdata = '0;
  logic [31:0] hrdata;
  logic        hreadyout, hresp;
  logic [31:0] bw[4], br[4];

  link_t ni_in[16], ni_out[16];
  logic  ni_cout[16], ni_cin[16];

  spidergon_noc u_noc (.clk(nclk), .rst_n, .ni_in, .ni_credit_out(ni_cout), .ni_out, .ni_credit_in(ni_cin));

  ni_initiator #(.MY_ID(2)) u_ini (
    .rst_n, .hclk, .hsel, .haddr, .htrans, .hwrite, .hsize, .hburst, .hwdata,
    .hrdata, .hreadyout, .hresp,
    .nclk, .out_link(ni_in[2]), .credit_in(ni_cout[2]), .in_link(ni_out[2]), .credit_out(ni_cin[2]));

  localparam int TID[2] = '{3, 9};
  logic [31:0] t_haddr[2], t_hwdata[2], t_hrdata[2];
  logic [1:0]  t_htrans[2];
  logic        t_hwrite[2], t_hready[2], t_hresp[2];
  int          tile_writes[2] = '{0, 0};

  for (genvar k = 0; k < 2; k++) begin : g_t
    logic [2:0] hs, hb;
    ni_target #(.MY_ID(TID[k])) u_tgt (
      .rst_n, .hclk, .haddr(t_haddr[k]), .htrans(t_htrans[k]), .hwrite(t_hwrite[k]),
      .hsize(hs), .hburst(hb), .hwdata(t_hwdata[k]), .hrdata(t_hrdata[k]),
      .hready(t_hready[k]), .hresp(t_hresp[k]),
      .nclk, .in_link(ni_out[TID[k]]), .credit_out(ni_cin[TID[k]]),
      .out_link(ni_in[TID[k]]), .credit_in(ni_cout[TID[k]]));
    sram_tile #(.WORDS(1024)) u_mem (
      .clk(hclk), .rst_n, .hsel(1'b1), .haddr(t_haddr[k]), .htrans(t_htrans[k]),
      .hwrite(t_hwrite[k]), .hwdata(t_hwdata[k]), .hrdata(t_hrdata[k]),
      .hreadyout(t_hready[k]), .hresp(t_hresp[k]));
    always @(posedge hclk) if (t_htrans[k][1] && t_hwrite[k]) tile_writes[k]++;
  end

  // idle NIs: nothing sent, credits returned at once
  for (genvar i = 0; i < 16; i++) begin : g_idle
    if (i != 2 && i != 3 && i != 9) begin : g_on
      assign ni_in[i]  = LINK_IDLE;
      assign ni_cin[i] = ni_out[i].valid;
    end
  end

  `include "tb_common.svh"

  logic [31:0] model[2][1024];
  bit          known[2][1024];
  int bursts_seen = 0;
  always @(posedge nclk)
    if (ni_in[2].valid && ni_in[2].flit_id == FLIT_FIRST && hdr_tlh(ni_in[2].flit).cells == 3'd4) bursts_seen++;

  initial begin
    logic [31:0] d;
    bit e;
    for (int k = 0; k < 2; k++) for (int i = 0; i < 1024; i++) begin model[k][i] = '0; known[k][i] = 1'b0; end
    repeat (5) @(posedge hclk);
    rst_n = 1'b1;
    repeat (5) @(posedge hclk); #1;
    for (int n = 0; n < 150; n++) begin
      int k, w;
      k = $urandom_range(0, 1);
      w = $urandom_range(0, 1023);
      if ($urandom_range(0, 1) || !known[k][w]) begin
        automatic int wr0 = tile_writes[k];
        d = $urandom;
        bw[0] = d;
        ahb_xfer({4'(TID[k]), 28'(4 * w)}, 1'b1, 1, e);
        check(!e, "write ERROR");
        check(tile_writes[k] == wr0 + 1, "write completed before the tile was written");
        model[k][w] = d;
        known[k][w] = 1'b1;
      end else begin
        ahb_rd({4'(TID[k]), 28'(4 * w)}, d);
        check(d == model[k][w], $sformatf("NI %0d word %0d: %08h expected %08h", TID[k], w, d, model[k][w]));
      end
    end
    for (int n = 0; n < 10; n++) begin
      int k, w;
      k = n % 2;
      w = $urandom_range(0, 255) * 4;
      for (int j = 0; j < 4; j++) begin bw[j] = $urandom; model[k][w+j] = bw[j]; known[k][w+j] = 1'b1; end
      ahb_xfer({4'(TID[k]), 28'(4 * w)}, 1'b1, 4, e);
      check(!e, "burst write ERROR");
      ahb_xfer({4'(TID[k]), 28'(4 * w)}, 1'b0, 4, e);
      check(!e, "burst read ERROR");
      for (int j = 0; j < 4; j++)
        check(br[j] == model[k][w+j], $sformatf("burst beat %0d: %08h expected %08h", j, br[j], model[k][w+j]));
    end
    check(bursts_seen == 10, $sformatf("%0d 4-cell write packets seen", bursts_seen));
    for (int k = 0; k < 2; k++) begin
      ahb_xfer({4'(TID[k]), 28'h1000}, 1'b0, 1, e);
      check(e, "out-of-range read without ERROR");
      ahb_xfer({4'(TID[k]), 28'h2000}, 1'b1, 1, e);
      check(e, "out-of-range write without ERROR");
    end
    ahb_rd({4'(TID[1]), 28'h0}, d);
    check(!known[1][0] || d == model[1][0], "read after ERROR");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
