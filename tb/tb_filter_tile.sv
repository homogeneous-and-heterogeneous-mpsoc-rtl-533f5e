// tb_filter_tile: the filter tile on its AHB port, against a model.
// FIR: random Q12 taps on random 64-sample input (some near full scale, so
// the output saturates); every output must equal the model within 1.
// Rational: with K = 0 the filter is a fixed 3-point smoother, checked
// against the model within 1 (output m is centred on input m); on a flat
// signal the output equals the input; with auto-tuning the noise estimate
// of a noisy signal is above that of a flat one. Also checks the done flag.
`timescale 1ns/1ps
module tb_filter_tile;
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
  int   x[64], h[8], y[64];
  function automatic int sat16(longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : int'(v);
  endfunction
  task automatic put_x();
    for (int i = 0; i < 32; i++) ahb_wr(32'h1000 + 32'(4 * i), {16'(x[2*i+1]), 16'(x[2*i])});
  endtask
  task automatic get_y();
    logic [31:0] q;
    for (int i = 0; i < 32; i++) begin
      ahb_rd(32'h2000 + 32'(4 * i), q);
      y[2*i] = int'($signed(q[15:0])); y[2*i+1] = int'($signed(q[31:16]));
    end
  endtask
  task automatic go(int ctrl);
    ahb_wr(32'h4, 64);
    ahb_wr(32'h0, 32'(ctrl));
    wait_done(32'h10, 200);
    check(irq_done, "done flag");
  endtask
  filter_tile dut (.clk, .rst_n, .hsel, .haddr, .htrans, .hwrite, .hwdata, .hrdata, .hreadyout, .hresp, .irq_done);
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
    for (int rep = 0; rep < 3; rep++) begin
      automatic int bad = 0;
      for (int t = 0; t < 8; t++) begin h[t] = int'($urandom_range(0, 8191)) - 4096; ahb_wr(32'h20 + 32'(4 * t), 32'(h[t])); end
      for (int i = 0; i < 64; i++) x[i] = (rep == 2) ? ((i % 2) ? 32767 : 32000) : int'($urandom_range(0, 20000)) - 10000;
      put_x();
      go(1);
      get_y();
      for (int n = 0; n < 64; n++) begin
        automatic longint acc = 0;
        automatic int m;
        for (int t = 0; t < 8; t++) if (n - t >= 0) acc += longint'(h[t]) * x[n-t];
        m = sat16(acc >>> 12);
        if (y[n] - m > 1 || m - y[n] > 1) bad++;
      end
      check(bad == 0, $sformatf("FIR run %0d: %0d outputs off", rep, bad));
    end
    ahb_wr(32'h8, 64);
    ahb_wr(32'hC, 0);
    for (int i = 0; i < 64; i++) x[i] = int'($urandom_range(0, 2000)) - 1000;
    put_x();
    go(3);
    get_y();
    begin
      automatic int bad = 0;
      for (int n = 1; n < 63; n++) begin
        automatic int a = x[n-1], c = x[n], b = x[n+1];
        automatic int m = c + (64 * (a + b - 2 * c)) / 256;
        if (y[n] - m > 1 || m - y[n] > 1) bad++;
      end
      check(bad == 0, $sformatf("rational filter: %0d outputs off", bad));
    end
    for (int i = 0; i < 64; i++) x[i] = 700;
    put_x();
    ahb_wr(32'hC, 200);
    go(7);
    get_y();
    check(y[10] == 700 && y[40] == 700, "flat input changed by the rational filter");
    ahb_rd(32'h14, w);
    for (int i = 0; i < 64; i++) x[i] = 700 + int'($urandom_range(0, 400)) - 200;
    put_x();
    go(7);
    ahb_rd(32'h14, d);
    check(d > w, $sformatf("noise estimate %0d on a noisy input, %0d on a flat one", d, w));
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
