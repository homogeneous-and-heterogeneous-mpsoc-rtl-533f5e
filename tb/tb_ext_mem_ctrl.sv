// tb_ext_mem_ctrl: the external-memory tile (1 Mbit buffer) with an
// off-chip memory model that grants requests after a random delay and
// returns read data after a random latency. DMA transfers of random length
// move data from the external memory into the buffer and back out to
// another external region. Checks: the buffer and external contents after
// each transfer, that no request is issued outside the programmed range,
// the done flag and status, direct buffer access over AHB (including the
// last word), a zero-length transfer, and ERROR for unmapped addresses.
`timescale 1ns/1ps
module tb_ext_mem_ctrl;
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
  logic        ext_req, ext_we, ext_gnt = 1'b0, ext_rvalid = 1'b0, irq_done;
  logic [31:0] ext_addr, ext_wdata, ext_rdata = '0;
  logic [31:0] xmem[4096];
  int          lo_ok = 0, hi_ok = 0, bad_req = 0;

  // memory model: random grant delay, random read latency
  initial begin
    forever begin
      @(posedge clk);
      if (ext_req && $urandom_range(0, 2) == 0) begin
        logic [31:0] a;
        bit w;
        a = ext_addr; w = ext_we;
        if (int'(a) < lo_ok || int'(a) >= hi_ok) bad_req++;
        #1 ext_gnt = 1'b1;
        if (w) xmem[a[11:0]] = ext_wdata;
        @(posedge clk);
        #1 ext_gnt = 1'b0;
        if (!w) begin
          repeat ($urandom_range(0, 4)) @(posedge clk);
          #1 ext_rvalid = 1'b1; ext_rdata = xmem[a[11:0]];
          @(posedge clk);
          #1 ext_rvalid = 1'b0;
        end
      end
    end
  end

  task automatic dma(int ext, int loc, int len, bit out);
    lo_ok = ext; hi_ok = ext + len;
    ahb_wr(32'h20004, 32'(ext));
    ahb_wr(32'h20008, 32'(loc));
    ahb_wr(32'h2000C, 32'(len));
    ahb_wr(32'h20000, out ? 32'h3 : 32'h1);
    wait_done(32'h20010, 5000);
    check(irq_done, "done flag");
  endtask
  ext_mem_ctrl dut (.clk, .rst_n, .hsel, .haddr, .htrans, .hwrite, .hwdata, .hrdata, .hreadyout, .hresp, .ext_req, .ext_we, .ext_addr, .ext_wdata, .ext_gnt, .ext_rvalid, .ext_rdata, .irq_done);
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
    for (int i = 0; i < 4096; i++) xmem[i] = $urandom;
    for (int r = 0; r < 4; r++) begin
      automatic int len = $urandom_range(1, 40), src = $urandom_range(0, 1000), loc = $urandom_range(0, 32000);
      automatic int dst = 2048 + $urandom_range(0, 1000), bad = 0;
      dma(src, loc, len, 1'b0);
      for (int i = 0; i < len; i++) begin
        ahb_rd(32'(4 * (loc + i)), d);
        if (d != xmem[src + i]) bad++;
      end
      check(bad == 0, $sformatf("DMA in: %0d of %0d words wrong", bad, len));
      ahb_wr(32'(4 * loc), 32'hA5A5_0000 + 32'(r));
      dma(dst, loc, len, 1'b1);
      check(xmem[dst] == 32'hA5A5_0000 + 32'(r), "DMA out: first word");
      bad = 0;
      for (int i = 1; i < len; i++) if (xmem[dst + i] != xmem[src + i]) bad++;
      check(bad == 0, $sformatf("DMA out: %0d of %0d words wrong", bad, len));
    end
    check(bad_req == 0, $sformatf("%0d requests outside the programmed range", bad_req));
    ahb_wr(32'(4 * 32767), 32'h7777_1111);
    ahb_rd(32'(4 * 32767), d);
    check(d == 32'h7777_1111, "last buffer word");
    dma(0, 0, 0, 1'b0);
    ahb_rd(32'h20010, d);
    check(d[1:0] == 2'b10, "status after a zero-length transfer");
    ahb_xfer(32'h20018, 1'b0, 1, e);
    check(e, "unmapped register without ERROR");
    ahb_xfer(32'h40000, 1'b1, 1, e);
    check(e, "address beyond the tile without ERROR");
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
