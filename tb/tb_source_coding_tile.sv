// tb_source_coding_tile: the Exp-Golomb coder on its AHB port. Random
// values (mostly small, some large) are coded in unsigned and signed mode;
// the testbench decodes the packed output words bit by bit and compares the
// decoded values with the input, and compares NBITS and NWORDS with the
// code lengths. Also checks the zero padding of the last word and the done
// flag.
`timescale 1ns/1ps
module tb_source_coding_tile;
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
  int   v[256];
  bit   bits[$];
  task automatic run(bit sgn, int n);
    logic [31:0] nb, nw, q;
    automatic int pos = 0, bad = 0;
    for (int i = 0; i < n; i++) begin
      v[i] = ($urandom_range(0, 3) == 0) ? int'($urandom_range(0, 30000)) : int'($urandom_range(0, 20));
      if (sgn) v[i] = ($urandom_range(0, 1) ? v[i] / 2 : -(v[i] / 2));
      ahb_wr(32'h1000 + 32'(4 * i), 32'(v[i]));
    end
    ahb_wr(32'h4, 32'(n));
    ahb_wr(32'h0, sgn ? 32'h3 : 32'h1);
    wait_done(32'h8, 2000);
    check(irq_done, "done flag");
    ahb_rd(32'hC, nb);
    ahb_rd(32'h10, nw);
    bits.delete();
    for (int w = 0; w < int'(nw); w++) begin
      ahb_rd(32'h2000 + 32'(4 * w), q);
      for (int b = 31; b >= 0; b--) bits.push_back(q[b]);
    end
    for (int i = 0; i < n; i++) begin
      automatic int lz = 0, cn;
      automatic longint val = 1;
      while (pos < bits.size() && bits[pos] == 0) begin lz++; pos++; end
      pos++;
      for (int k = 0; k < lz; k++) begin val = 2 * val + (pos < bits.size() ? bits[pos] : 0); pos++; end
      cn = int'(val - 1);
      if (sgn) cn = (cn % 2) ? (cn + 1) / 2 : -(cn / 2);
      if (cn != v[i]) bad++;
    end
    check(bad == 0, $sformatf("%0d of %0d values decoded wrong", bad, n));
    check(int'(nb) == pos, $sformatf("NBITS %0d, decoded %0d bits", nb, pos));
    check(int'(nw) == (pos + 31) / 32, $sformatf("NWORDS %0d", nw));
    for (int k = pos; k < bits.size(); k++) check(bits[k] == 0, "padding not zero");
  endtask
  source_coding_tile dut (.clk, .rst_n, .hsel, .haddr, .htrans, .hwrite, .hwdata, .hrdata, .hreadyout, .hresp, .irq_done);
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
    run(1'b0, 4);
    run(1'b0, 200);
    run(1'b1, 200);
    run(1'b0, 256);
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
