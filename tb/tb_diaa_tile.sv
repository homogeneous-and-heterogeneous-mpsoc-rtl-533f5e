// tb_diaa_tile: the audio amplifier tile on its AHB port. PCM samples are
// written into the FIFO, the coefficients programmed (unity oversampling
// filter, first-order noise shaping) and the chain run in binary and in
// ternary PWM. The testbench watches the four gate signals.
// Checks: register read-back; FIFO level in STATUS; fifo_low while the FIFO
// is less than half full; the high- and low-side gates of a leg are never
// on together and a gate turns on only after DEADTIME off cycles; pulses
// appear in both codings; a positive DC input gives leg A a higher duty
// than leg B; the FIFO drains; running dry counts underruns.
`timescale 1ns/1ps
module tb_diaa_tile;
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
  logic gate_ah, gate_al, gate_bh, gate_bl, fifo_low;
  int   shoot = 0, ah_on = 0, bh_on = 0, edges = 0, short_dead = 0, off_a = 0;
  logic ah_q = 1'b0, al_q = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if ((gate_ah && gate_al) || (gate_bh && gate_bl)) shoot++;
    if (gate_ah) ah_on++;
    if (gate_bh) bh_on++;
    if ((gate_ah && !ah_q) || (gate_al && !al_q)) begin
      edges++;
      if (off_a < 3) short_dead++;
    end
    off_a = (!gate_ah && !gate_al) ? off_a + 1 : 0;
    ah_q = gate_ah; al_q = gate_al;
  end
  function automatic logic [31:0] ctrl(bit en, bit tern, int m, int p, int k);
    return {19'h0, 3'(k), 3'(p), 5'(m), tern, en};
  endfunction
  diaa_tile dut (.clk, .rst_n, .hsel, .haddr, .htrans, .hwrite, .hwdata, .hrdata, .hreadyout, .hresp, .gate_ah, .gate_al, .gate_bh, .gate_bl, .fifo_low);
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
    for (int j = 1; j < 16 * 8; j++) ahb_wr(32'h200 + 32'(4 * j), 32'd0);  // the coefficient memory has no reset
    ahb_wr(32'h200, 32'd16384);                 // h[0] = 1.0: M = 1 passes samples through
    ahb_wr(32'h20, 32'd4096);                   // c1 = 1: first-order shaping
    ahb_wr(32'h4, 32'd1);
    ahb_wr(32'h8, 32'd3);
    ahb_wr(32'h0, ctrl(0, 0, 1, 6, 1));
    ahb_rd(32'h0, d);
    check(d == ctrl(0, 0, 1, 6, 1), $sformatf("CTRL read back %08h", d));
    ahb_rd(32'h8, d);
    check(d == 3, "DEADTIME read back");
    check(fifo_low, "fifo_low with an empty FIFO");
    for (int i = 0; i < 12; i++) ahb_wr(32'h10, 32'd8000);
    ahb_rd(32'hC, d);
    check(d[4:0] == 12, $sformatf("FIFO level %0d after 12 writes", d[4:0]));
    check(!fifo_low, "fifo_low with 12 of 16 samples");
    ahb_wr(32'h0, ctrl(1, 0, 1, 6, 1));
    repeat (64 * 10) @(posedge clk);
    check(edges > 5, $sformatf("binary PWM: only %0d gate turn-ons", edges));
    check(ah_on > bh_on, $sformatf("positive input: leg A high %0d cycles, leg B %0d", ah_on, bh_on));
    ahb_wr(32'h0, ctrl(1, 1, 1, 6, 1));
    edges = 0;
    repeat (64 * 6) @(posedge clk);
    check(edges > 2, $sformatf("ternary PWM: only %0d gate turn-ons", edges));
    repeat (64 * 20) @(posedge clk);
    ahb_rd(32'hC, d);
    check(d[4:0] == 0, $sformatf("FIFO level %0d after playing", d[4:0]));
    check(d[31:16] > 0, "no underrun counted after running dry");
    check(shoot == 0, $sformatf("shoot-through in %0d cycles", shoot));
    check(short_dead == 0, $sformatf("%0d turn-ons without the dead time", short_dead));
    ahb_xfer(32'h100, 1'b0, 1, e);
    check(e, "unmapped address without ERROR");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #4ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
