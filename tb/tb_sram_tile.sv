// tb_sram_tile: one 3 Mbit on-chip SRAM tile (default size) on its AHB
// slave port. Random single writes and reads over the whole address range
// are compared with a model; INCR4 bursts exercise back-to-back pipelined
// transfers (a write data phase overlapping the next address phase); an
// address beyond the memory must give the two-cycle ERROR response and
// leave the memory untouched.
`timescale 1ns/1ps
module tb_sram_tile;
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
  logic [31:0] model[int];
  sram_tile dut (.clk, .rst_n, .hsel, .haddr, .htrans, .hwrite, .hwdata, .hrdata, .hreadyout, .hresp);
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
    for (int n = 0; n < 400; n++) begin
      automatic int a = $urandom_range(0, 98303);
      if ($urandom_range(0, 1) || !model.exists(a)) begin
        d = $urandom;
        ahb_wr(32'(4 * a), d);
        model[a] = d;
      end else begin
        ahb_rd(32'(4 * a), d);
        check(d == model[a], $sformatf("word %0d: %08h expected %08h", a, d, model[a]));
      end
    end
    for (int n = 0; n < 20; n++) begin
      automatic int a = 4 * $urandom_range(0, 24575);
      for (int j = 0; j < 4; j++) begin bw[j] = $urandom; model[a+j] = bw[j]; end
      ahb_xfer(32'(4 * a), 1'b1, 4, e);
      check(!e, "burst write ERROR");
      ahb_xfer(32'(4 * a), 1'b0, 4, e);
      for (int j = 0; j < 4; j++) check(br[j] == model[a+j], "burst read data");
    end
    ahb_wr(32'h10, 32'h1234_5678);
    ahb_xfer(32'(4 * 98304), 1'b0, 1, e);
    check(e, "read beyond the memory without ERROR");
    bw[0] = 32'hDEAD_BEEF;
    ahb_xfer(32'(4 * 98304 + 16), 1'b1, 1, e);
    check(e, "write beyond the memory without ERROR");
    ahb_rd(32'h10, d);
    check(d == 32'h1234_5678, "memory changed by a failed write");
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
