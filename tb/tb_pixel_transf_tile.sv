// tb_pixel_transf_tile: the pixel-transform tile on its AHB port, against a
// model, for each operation: a random 256-entry LUT on 32 random pixels;
// the reset colour matrix (RGB to YCbCr) within 1 per channel; horizontal
// 2:1 decimation (rounded mean of pixel pairs); clipping to a random range.
// Checks the done flag and that an address outside the map gets ERROR.
`timescale 1ns/1ps
module tb_pixel_transf_tile;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a real falling edge, so the asynchronous resets fire
  always #2 clk = ~clk;
  logic        hsel = 1'b0;
  logic [31:0] haddr = '0;
  logic [1:0]  htrans = '0;
  logic        hwrite = 1'b0;
  logic [2:0]  hsize = 3'b010, hburst = '0;
  logic [31:0] hwdata = '0;
  logic [31:0] hrdata;
  logic        hreadyout, hresp;
  logic [31:0] bw[4], br[4];
  logic irq_done;
  logic [23:0] px[32];
  logic [7:0]  lut[256];
  localparam int M[9] = '{77, 150, 29, -43, -85, 128, 128, -107, -21};
  localparam int POST[3] = '{0, 128, 128};
  function automatic int clip(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction
  task automatic go(int op, int n);
    ahb_wr(32'h4, 32'(n));
    ahb_wr(32'h0, 32'(1 + 2 * op));
    wait_done(32'h8, 200);
    check(irq_done, "done flag");
  endtask
  pixel_transf_tile dut (.clk, .rst_n, .hsel, .haddr, .htrans, .hwrite, .hwdata, .hrdata, .hreadyout, .hresp, .irq_done);
  `include "tb_common.svh"

  task automatic wait_done(int status_off, int max_cycles);
    logic [31:0] s;
    for (int i = 0; i < max_cycles; i++) begin
      ahb_rd(32'(status_off), s);
      if (s[1]) return;
    end
    check(1'b0, "operation never finished");
  endtask

  initial begin
    logic [31:0] d, w;
    bit e;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int i = 0; i < 32; i++) begin px[i] = 24'($urandom); ahb_wr(32'h1000 + 32'(4 * i), 32'(px[i])); end
    for (int i = 0; i < 256; i++) begin lut[i] = 8'($urandom); ahb_wr(32'h400 + 32'(4 * i), 32'(lut[i])); end
    go(0, 32);
    begin
      automatic int bad = 0;
      for (int i = 0; i < 32; i++) begin
        ahb_rd(32'h2000 + 32'(4 * i), d);
        for (int c = 0; c < 3; c++) if (d[8*c +: 8] != lut[px[i][8*c +: 8]]) bad++;
      end
      check(bad == 0, $sformatf("LUT: %0d channels wrong", bad));
    end
    go(1, 32);
    begin
      automatic int bad = 0;
      for (int i = 0; i < 32; i++) begin
        ahb_rd(32'h2000 + 32'(4 * i), d);
        for (int c = 0; c < 3; c++) begin
          automatic int acc = 0, m;
          for (int j = 0; j < 3; j++) acc += M[3*c+j] * int'(px[i][8*j +: 8]);
          m = clip(((acc + 128) >>> 8) + POST[c], 0, 255);
          if (int'(d[8*c +: 8]) - m > 1 || m - int'(d[8*c +: 8]) > 1) bad++;
        end
      end
      check(bad == 0, $sformatf("colour matrix: %0d channels off", bad));
    end
    go(2, 32);
    begin
      automatic int bad = 0;
      for (int i = 0; i < 16; i++) begin
        ahb_rd(32'h2000 + 32'(4 * i), d);
        for (int c = 0; c < 3; c++)
          if (int'(d[8*c +: 8]) != (int'(px[2*i][8*c +: 8]) + int'(px[2*i+1][8*c +: 8]) + 1) / 2) bad++;
      end
      check(bad == 0, $sformatf("decimation: %0d channels wrong", bad));
    end
    ahb_wr(32'hC, {16'h0, 8'd200, 8'd40});
    go(3, 32);
    begin
      automatic int bad = 0;
      for (int i = 0; i < 32; i++) begin
        ahb_rd(32'h2000 + 32'(4 * i), d);
        for (int c = 0; c < 3; c++) if (int'(d[8*c +: 8]) != clip(int'(px[i][8*c +: 8]), 40, 200)) bad++;
      end
      check(bad == 0, $sformatf("clipping: %0d channels wrong", bad));
    end
    ahb_xfer(32'h3000, 1'b0, 1, e);
    check(e, "unmapped address without ERROR");
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
