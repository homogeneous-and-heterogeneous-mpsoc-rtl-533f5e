// tb_me_tile: the motion-estimation tile (16x16 blocks, +/-16 range) on its
// AHB port. A random 48x48 search area is written to both local memory
// banks, with the current block copied from it at a known displacement, so
// the true vector has SAD 0. Runs: a full search over +/-16 (1089
// candidates) on bank 0; a full search over +/-4 (81 candidates) on bank 1
// with a different displacement; a predictor-first search with early stop
// that must end after the predicted candidate; the same with early stop off,
// which must still run the full search. Checks the vector, the SAD, the
// candidate count and the done flag, and that an address outside the map
// gets ERROR.
`timescale 1ns/1ps
module tb_me_tile;
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
  logic [7:0] sa[48][48];
  logic [7:0] cb[16][16];
  logic       irq_done;

  task automatic load(int bank, int dx, int dy);
    for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++) cb[y][x] = sa[16+dy+y][16+dx+x];
    for (int wd = 0; wd < 64; wd++)
      ahb_wr(32'h8000 + 32'(bank * 32'h4000 + 4 * wd),
             {cb[wd/4][(wd%4)*4+3], cb[wd/4][(wd%4)*4+2], cb[wd/4][(wd%4)*4+1], cb[wd/4][(wd%4)*4]});
    for (int y = 0; y < 48; y++)
      for (int wd = 0; wd < 12; wd++)
        ahb_wr(32'h8000 + 32'(bank * 32'h4000 + 4 * (64 + 16 * y + wd)),
               {sa[y][wd*4+3], sa[y][wd*4+2], sa[y][wd*4+1], sa[y][wd*4]});
  endtask

  task automatic run(int ctrl, int range, int dx, int dy, int cands_lo, int cands_hi);
    logic [31:0] r, c;
    ahb_wr(32'h4, 32'(range));
    ahb_wr(32'h0, 32'(ctrl));
    wait_done(32'h10, 5000);
    check(irq_done, "done flag");
    ahb_rd(32'h14, r);
    ahb_rd(32'h18, c);
    check(r == {16'h0, 8'(dy), 8'(dx)}, $sformatf("result %08h, expected vector (%0d,%0d) SAD 0", r, dx, dy));
    check(int'(c) >= cands_lo && int'(c) <= cands_hi, $sformatf("%0d candidates evaluated", c));
  endtask
  me_tile dut (.clk, .rst_n, .hsel, .haddr, .htrans, .hwrite, .hwdata, .hrdata, .hreadyout, .hresp, .irq_done);
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
    for (int y = 0; y < 48; y++) for (int x = 0; x < 48; x++) sa[y][x] = 8'($urandom);
    load(0, -7, 11);
    run(32'h1, 16, -7, 11, 1089, 1089);
    load(1, 3, -2);
    run(32'h3, 4, 3, -2, 81, 81);
    ahb_wr(32'h8, 0);
    ahb_wr(32'hC, {16'h0, 8'(-2), 8'(3)});
    run(32'hF, 16, 3, -2, 1, 2);
    run(32'hB, 16, 3, -2, 1089, 1090);
    ahb_xfer(32'h7000, 1'b0, 1, e);
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
