// tb_diaa_oversampler: the polyphase interpolator with M = 4 and random Q14
// coefficients against a model of y = sum_t h[t*M + q] x[n-t], rounded and
// saturated to 16 bits. The testbench requests output samples at random
// intervals and always offers the next input sample, except in one stretch
// where it withholds input to provoke underruns.
// Checks: out_valid comes TPP + 2 cycles after the cycle of each request; every output
// matches the model within 1; an input sample is taken once per M outputs;
// an underrun is flagged when input is missing and zero is used instead.
`timescale 1ns/1ps
module tb_diaa_oversampler;
  localparam int M = 4, TPP = 8;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a real falling edge, so the asynchronous resets fire
  always #5 clk = ~clk;
  logic coef_we = 1'b0, in_valid = 1'b0, out_req = 1'b0;
  logic [6:0] coef_addr = '0;
  logic signed [15:0] coef_wdata = '0, in_data = '0, out_data;
  logic in_ready, underrun, out_valid;
  int checks = 0, failures = 0;
  int h[M*TPP];
  int xs[$];          // samples taken, newest last
  int n_under = 0, n_taken = 0;

  diaa_oversampler dut (.clk, .rst_n, .m(5'(M)), .coef_we, .coef_addr, .coef_wdata,
                        .in_valid, .in_data, .in_ready, .underrun, .out_req, .out_valid, .out_data);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (in_ready) begin
      xs.push_back(in_valid ? int'(in_data) : 0);
      n_taken++;
      #1 in_data = 16'(int'($urandom_range(0, 40000)) - 20000);
    end
    if (underrun) n_under++;
  end

  initial begin
    for (int i = 0; i < TPP; i++) xs.push_back(0);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int j = 0; j < M * TPP; j++) begin
      @(negedge clk);
      h[j] = int'($urandom_range(0, 8000)) - 4000;
      coef_we = 1'b1; coef_addr = 7'(j); coef_wdata = 16'(h[j]);
    end
    @(negedge clk) coef_we = 1'b0;
    in_valid = 1'b1;
    in_data = 16'sd1000;
    for (int k = 0; k < 200; k++) begin
      automatic int lat = 0;
      automatic longint acc = 0;
      automatic int q = k % M, mdl;
      if (k >= 120 && k < 128) in_valid = 1'b0;
      else in_valid = 1'b1;
      @(negedge clk) out_req = 1'b1;
      @(negedge clk) out_req = 1'b0;
      lat = 1;
      while (!out_valid && lat < 50) begin @(negedge clk); lat++; end
      check(lat == TPP + 2, $sformatf("output %0d cycles after the request", lat));
      for (int t = 0; t < TPP; t++) acc += longint'(h[t*M + q]) * xs[xs.size() - 1 - t];
      mdl = int'((acc + 8192) >>> 14);
      if (mdl > 32767) mdl = 32767;
      if (mdl < -32768) mdl = -32768;
      check(int'(out_data) - mdl <= 1 && mdl - int'(out_data) <= 1,
            $sformatf("output %0d (phase %0d): %0d, model %0d", k, q, out_data, mdl));
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    check(n_taken == 200 / M, $sformatf("%0d input samples taken for 200 outputs", n_taken));
    check(n_under > 0, "no underrun flagged");
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
