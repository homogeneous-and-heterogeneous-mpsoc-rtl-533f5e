// tb_transf_tile: the 1D/2D transform tile on its AHB port.
// 1D: eight random vectors are transformed and compared with a floating-
// point DCT (within 4), then transformed back and compared with the input
// (within 3). 2D: one random 8x8 block, forward then inverse, must come back
// within 4. Block floating point: a full-scale constant vector must produce
// a DC term that needs exponent 2 (92680 = 23170 * 4). Checks the done flag
// and the exponents.
`timescale 1ns/1ps
module tb_transf_tile;
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
  logic        irq_done;
  logic signed [15:0] xin[64], xf[64];

  task automatic put(input logic signed [15:0] v[64]);
    for (int i = 0; i < 32; i++) ahb_wr(32'h1000 + 32'(4 * i), {v[2*i+1], v[2*i]});
  endtask
  task automatic get(output logic signed [15:0] v[64]);
    logic [31:0] q;
    for (int i = 0; i < 32; i++) begin
      ahb_rd(32'h2000 + 32'(4 * i), q);
      v[2*i] = q[15:0]; v[2*i+1] = q[31:16];
    end
  endtask
  task automatic go(int nvec, int ctrl);
    ahb_wr(32'h4, 32'(nvec));
    ahb_wr(32'h0, 32'(ctrl));
    wait_done(32'h8, 500);
    check(irq_done, "done flag");
  endtask
  function automatic int maxdiff(input logic signed [15:0] a[64], input logic signed [15:0] b[64]);
    int m = 0;
    for (int i = 0; i < 64; i++) begin
      int dd = int'(a[i]) - int'(b[i]);
      if (dd < 0) dd = -dd;
      if (dd > m) m = dd;
    end
    return m;
  endfunction
  transf_tile dut (.clk, .rst_n, .hsel, .haddr, .htrans, .hwrite, .hwdata, .hrdata, .hreadyout, .hresp, .irq_done);
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
    for (int i = 0; i < 64; i++) xin[i] = 16'(int'($urandom_range(0, 2000)) - 1000);
    put(xin);
    go(8, 32'h1);
    get(xf);
    begin
      automatic int bad = 0;
      for (int v = 0; v < 8; v++) for (int k = 0; k < 8; k++) begin
        automatic real r = 0.0;
        for (int m = 0; m < 8; m++)
          r += ((k == 0) ? 1.0 / $sqrt(8.0) : 0.5) * $cos((2 * m + 1) * k * 3.14159265358979 / 16.0) * real'(xin[8*v+m]);
        if (real'(xf[8*v+k]) - r > 4.0 || r - real'(xf[8*v+k]) > 4.0) bad++;
      end
      check(bad == 0, $sformatf("1D forward transform: %0d results off", bad));
    end
    ahb_rd(32'h3000, d);
    check(d == 0, "1D exponent for small input");
    put(xf);
    go(8, 32'h5);
    get(xf);
    check(maxdiff(xf, xin) <= 3, $sformatf("1D inverse(forward) off by %0d", maxdiff(xf, xin)));
    put(xin);
    go(1, 32'h3);
    get(xf);
    ahb_rd(32'h3000, d);
    check(d == 0, $sformatf("2D exponent %0d for small input", d));
    put(xf);
    go(1, 32'h7);
    get(xf);
    check(maxdiff(xf, xin) <= 4, $sformatf("2D inverse(forward) off by %0d", maxdiff(xf, xin)));
    for (int i = 0; i < 64; i++) xin[i] = 16'sd32767;
    put(xin);
    go(1, 32'h1);
    ahb_rd(32'h3000, d);
    check(d == 2, $sformatf("full-scale exponent %0d, expected 2", d));
    ahb_rd(32'h2000, d);
    check($signed(d[15:0]) >= 23168 && $signed(d[15:0]) <= 23171, $sformatf("full-scale DC mantissa %0d", $signed(d[15:0])));
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
