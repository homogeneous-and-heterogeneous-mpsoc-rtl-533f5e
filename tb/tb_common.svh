// tb_common.svh: shared testbench pieces, included inside a testbench module.
// Provides the pass/fail counters, a check() helper and an AHB-lite master
// task. The including module declares clk and the AHB signals hsel, haddr,
// htrans, hwrite, hsize, hburst, hwdata (driven here) and hrdata, hreadyout,
// hresp (sampled here), plus the beat buffers bw[4] (write data) and br[4]
// (read data). Signals are driven one time unit after a rising edge and
// sampled at the falling edge, so the task works with zero-wait-state tiles
// and with slaves that stretch HREADYOUT for many cycles.
int checks = 0;
int failures = 0;

task automatic check(input bit ok, input string what);
  checks++;
  if (!ok) begin
    failures++;
    $display("FAIL %0t: %s", $time, what);
  end
endtask

// One AHB transfer of n beats (1 = SINGLE, 4 = INCR4) at consecutive word
// addresses from a. Writes take data from bw, reads return it in br.
// err is set if any beat got an ERROR response.
task automatic ahb_xfer(input logic [31:0] a, input bit wr, input int n, output bit err);
  bit r;
  err = 1'b0;
  for (int i = 0; i <= n; i++) begin
    if (i < n) begin
      hsel   = 1'b1;
      haddr  = a + 32'(4 * i);
      htrans = (i == 0) ? 2'b10 : 2'b11;
      hwrite = wr;
      hsize  = 3'b010;
      hburst = (n == 4) ? 3'b011 : 3'b000;
    end else begin
      hsel   = 1'b0;
      htrans = 2'b00;
    end
    if (i > 0 && wr) hwdata = bw[i-1];
    forever begin
      @(negedge clk);
      r = hreadyout;
      if (i > 0 && hresp) err = 1'b1;
      if (i > 0 && r && !wr) br[i-1] = hrdata;
      @(posedge clk);
      #1;
      if (r) break;
    end
  end
endtask

task automatic ahb_wr(input logic [31:0] a, input logic [31:0] d);
  bit e;
  bw[0] = d;
  ahb_xfer(a, 1'b1, 1, e);
  check(!e, $sformatf("write %08h answered ERROR", a));
endtask

task automatic ahb_rd(input logic [31:0] a, output logic [31:0] d);
  bit e;
  ahb_xfer(a, 1'b0, 1, e);
  d = br[0];
  check(!e, $sformatf("read %08h answered ERROR", a));
endtask
