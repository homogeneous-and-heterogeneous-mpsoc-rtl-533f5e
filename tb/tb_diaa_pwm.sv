// tb_diaa_pwm: the PWM modulator with p = 4 (16 ticks per period) and two
// clock cycles per tick, in binary and then ternary coding. The testbench
// answers every frame request with a random sample and, per period, counts
// the cycles spent at +1, -1 and 0.
// Checks: periods last 2^p ticks; binary: +1 for s + 2^(p-1) ticks and -1
// for the rest; ternary: sign(s) for 2|s| ticks and 0 for the rest; the leg
// signals match the level (+1: A high, B low; -1: the opposite; 0: both low).
`timescale 1ns/1ps
module tb_diaa_pwm;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a real falling edge, so the asynchronous resets fire
  always #5 clk = ~clk;
  logic enable = 1'b0, ternary = 1'b0, next_valid = 1'b0;
  logic [2:0] p = 3'd4;
  logic [15:0] tickdiv = 16'd2;
  logic signed [5:0] next_sample = '0;
  logic frame, leg_a, leg_b;
  logic [1:0] level;
  int checks = 0, failures = 0;

  diaa_pwm dut (.clk, .rst_n, .enable, .ternary, .p, .tickdiv, .next_valid, .next_sample,
                .frame, .leg_a, .leg_b, .level);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  int sent[$];
  int n_pos = 0, n_neg = 0, n_zero = 0, cyc = 0, periods = 0;
  bit started = 0;

  always @(posedge clk) if (rst_n && enable) begin
    check((level == 2'b01 && leg_a && !leg_b) || (level == 2'b11 && !leg_a && leg_b) ||
          (level == 2'b00 && !leg_a && !leg_b), "legs do not match the level");
    if (frame) begin
      // a period just ended: check it against the sample that was active
      if (started && sent.size() > 1) begin
        automatic int s = sent.pop_front();
        periods++;
        check(cyc == 32, $sformatf("period of %0d cycles", cyc));
        if (!ternary) check(n_pos == 2 * (s + 8) && n_neg == 32 - 2 * (s + 8),
                            $sformatf("binary s=%0d: +1 %0d cycles, -1 %0d", s, n_pos, n_neg));
        else check(n_pos == ((s > 0) ? 4 * s : 0) && n_neg == ((s < 0) ? -4 * s : 0),
                   $sformatf("ternary s=%0d: +1 %0d cycles, -1 %0d", s, n_pos, n_neg));
      end
      started = 1;
      n_pos = 0; n_neg = 0; n_zero = 0; cyc = 0;
    end
    cyc++;
    if (level == 2'b01) n_pos++;
    else if (level == 2'b11) n_neg++;
    else n_zero++;
  end

  // answer each frame request with a new sample
  initial begin
    forever begin
      @(posedge clk);
      if (frame && enable) begin
        #1;
        next_valid = 1'b1;
        next_sample = 6'(int'($urandom_range(0, 15)) - 8);
        @(posedge clk);
        #1 next_valid = 1'b0;
      end
    end
  end

  // record the samples in order: the one sent after frame k plays from
  // frame k+1 to frame k+2, so the period that ends at a frame belongs to
  // the older of the two queued samples
  always @(posedge clk) if (next_valid) sent.push_back(int'(next_sample));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    enable = 1'b1;
    repeat (40 * 32) @(posedge clk);
    #1 enable = 1'b0;
    ternary = 1'b1;
    started = 0;
    sent.delete();
    repeat (3) @(posedge clk);
    #1 enable = 1'b1;
    repeat (40 * 32) @(posedge clk);
    check(periods > 60, $sformatf("only %0d periods checked", periods));
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
