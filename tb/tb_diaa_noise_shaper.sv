// tb_diaa_noise_shaper: the error-feedback noise shaper against a
// bit-exact model of its equations, for first-order (c = 1) and fifth-order
// (c = 5,-10,10,-5,1) shaping at p = 6 bits, first- and second-order
// (c = 2,-1) shaping at p = 4 bits (a pure fifth-order loop around a 4-bit
// quantiser is not stable, so that pairing is not used), on a slow
// random-walk signal with random gaps in in_valid. Checks each output one
// cycle after its input, its range, and that over a run the mean of the
// re-scaled output follows the mean of the input (the shaped error has no
// DC part).
`timescale 1ns/1ps
module tb_diaa_noise_shaper;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a real falling edge, so the asynchronous resets fire
  always #5 clk = ~clk;
  logic [2:0] p = 3'd6, order = 3'd1;
  logic signed [15:0] c[5];
  logic in_valid = 1'b0, out_valid;
  logic signed [15:0] x = '0;
  logic signed [5:0] y;
  int checks = 0, failures = 0;

  diaa_noise_shaper dut (.clk, .rst_n, .p, .order, .c, .in_valid, .x, .out_valid, .y);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  localparam int C5[5] = '{5, -10, 10, -5, 1};
  localparam int C2[5] = '{2, -1, 0, 0, 0};

  initial begin
    longint e[5];
    for (int i = 0; i < 5; i++) c[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 4; run++) begin
      automatic int sh, sig;
      automatic longint sum_x = 0, sum_y = 0;
      automatic int n = 0;
      p     = (run % 2) ? 3'd4 : 3'd6;
      order = (run < 2) ? 3'd1 : (run == 2) ? 3'd5 : 3'd2;
      for (int i = 0; i < 5; i++)
        c[i] = (run < 2) ? ((i == 0) ? 16'sd4096 : 16'sd0) : (run == 2) ? 16'(C5[i] * 4096) : 16'(C2[i] * 4096);
      rst_n = 1'b0; #1; rst_n = 1'b1;
      for (int i = 0; i < 5; i++) e[i] = 0;
      sh = 16 - int'(p);
      sig = 0;
      for (int k = 0; k < 600; k++) begin
        longint fb, v, q, qmax, qmin;
        @(negedge clk);
        in_valid = ($urandom_range(0, 4) != 0);
        sig = sig + int'($urandom_range(0, 400)) - 200;
        if (sig > 12000) sig = 12000;
        if (sig < -12000) sig = -12000;
        x = 16'(sig);
        fb = 0;
        for (int i = 0; i < int'(order); i++) fb += longint'(c[i]) * e[i];
        v = longint'(x) - (fb >>> 12);
        q = (v + (longint'(1) <<< (sh - 1))) >>> sh;
        qmax = (longint'(1) <<< (int'(p) - 1)) - 1;
        qmin = -(longint'(1) <<< (int'(p) - 1));
        if (q > qmax) q = qmax;
        if (q < qmin) q = qmin;
        @(negedge clk);
        check(out_valid == in_valid, "out_valid timing");
        if (in_valid) begin
          check(longint'(y) == q, $sformatf("y = %0d, model %0d (p=%0d order=%0d)", y, q, p, order));
          for (int i = 4; i > 0; i--) e[i] = e[i-1];
          e[0] = (q <<< sh) - v;
          if (k >= 100) begin sum_x += longint'(x); sum_y += longint'(y) <<< sh; n++; end
        end
        in_valid = 1'b0;
      end
      check((sum_y - sum_x) / n < 64 && (sum_x - sum_y) / n < 64,
            $sformatf("mean error %0d", (sum_y - sum_x) / n));
    end
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
