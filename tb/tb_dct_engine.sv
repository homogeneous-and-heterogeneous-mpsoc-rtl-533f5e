// tb_dct_engine: the 8-point transform engine against a floating-point
// reference of the orthonormal DCT-II (mode 0) and its inverse (mode 1).
// Random vectors, including full-scale ones, are fed one per cycle with the
// mode changing at random. Checks: out_valid exactly two cycles after
// in_valid, and every result within 4.5 of the exact value (the Q15 coefficients
// err by up to 2^-16, which over eight full-scale samples adds up to 4,
// plus the final rounding).
`timescale 1ns/1ps
module tb_dct_engine;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a real falling edge, so the asynchronous resets fire
  always #5 clk = ~clk;
  logic mode = 1'b0, in_valid = 1'b0, out_valid;
  logic signed [15:0] x[8];
  logic signed [19:0] y[8];
  int checks = 0, failures = 0;
  real exp_q[$];        // eight expected results per vector
  bit  vq[$];

  dct_engine dut (.clk, .rst_n, .mode, .in_valid, .x, .out_valid, .y);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  function automatic real ck(int k);
    return (k == 0) ? 1.0 / $sqrt(8.0) : 0.5;
  endfunction

  initial begin
    real e[8];
    real r[8];
    for (int i = 0; i < 8; i++) x[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      // results of the vector sent two cycles ago
      if (vq.size() == 2) begin
        automatic bit v = vq.pop_front();
        for (int k = 0; k < 8; k++) e[k] = exp_q.pop_front();
        check(out_valid == v, "out_valid timing");
        if (v) for (int k = 0; k < 8; k++)
          check(real'(y[k]) - e[k] <= 4.5 && e[k] - real'(y[k]) <= 4.5,
                $sformatf("y[%0d] = %0d, exact %f", k, y[k], e[k]));
      end
      in_valid = ($urandom_range(0, 3) != 0);
      mode = 1'($urandom);
      for (int i = 0; i < 8; i++)
        x[i] = (n % 5 == 0) ? ($urandom_range(0, 1) ? 16'sd32767 : -16'sd32768) : 16'($urandom);
      for (int k = 0; k < 8; k++) begin
        r[k] = 0.0;
        for (int m = 0; m < 8; m++)
          if (!mode) r[k] += ck(k) * $cos((2 * m + 1) * k * 3.14159265358979 / 16.0) * real'(x[m]);
          else       r[k] += ck(m) * $cos((2 * k + 1) * m * 3.14159265358979 / 16.0) * real'(x[m]);
      end
      for (int k = 0; k < 8; k++) exp_q.push_back(r[k]);
      vq.push_back(in_valid);
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
