// tb_diaa_deadtime: dead-time insertion for one bridge leg. A random wanted
// state d (long and very short pulses) is applied for several dead times.
// Checks every cycle: the two gates are never on together; after a change
// of d both gates stay off for at least DT cycles before the new side turns
// on; with d stable for longer than DT the matching gate is on; a pulse
// shorter than DT never reaches a gate.
`timescale 1ns/1ps
module tb_diaa_deadtime;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a real falling edge, so the asynchronous resets fire
  always #5 clk = ~clk;
  logic [7:0] dt = 8'd4;
  logic d = 1'b0, hs, ls;
  int checks = 0, failures = 0;
  int since_change = 0, off_run = 0;
  int on_events = 0;
  logic hs_q = 1'b0, ls_q = 1'b0;

  diaa_deadtime dut (.clk, .rst_n, .dt, .d, .hs, .ls);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  always @(negedge clk) if (rst_n) begin
    check(!(hs && ls), "both gates on");
    if ((hs && !hs_q) || (ls && !ls_q)) begin
      on_events++;
      check(off_run >= int'(dt), $sformatf("gate on after only %0d off cycles (dead time %0d)", off_run, dt));
    end
    if (since_change > int'(dt) + 1) check(hs == d && ls == !d, "gate does not follow a stable input");
    off_run = (!hs && !ls) ? off_run + 1 : 0;
    hs_q = hs; ls_q = ls;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 4; k++) begin
      dt = 8'(1 + 3 * k);
      repeat (40) begin
        automatic int len = ($urandom_range(0, 3) == 0) ? $urandom_range(1, 2) : $urandom_range(int'(dt) + 3, int'(dt) + 20);
        @(posedge clk); #1;
        d = !d;
        since_change = 0;
        repeat (len) begin @(posedge clk); #1; since_change++; end
      end
    end
    check(on_events > 50, "too few gate turn-ons");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
