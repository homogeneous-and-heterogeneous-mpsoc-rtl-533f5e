// tb_bisync_fifo: the NI clock-domain-crossing FIFO with unrelated write and
// read clocks (4 ns and 6.2 ns periods, the write side faster, as the NoC
// clock is towards the IP clock). The writer pushes random words whenever
// the FIFO is not full, the reader pops at random whenever it is not empty.
// Checks: every word comes out once and in order, rcount never exceeds the
// depth, and the flags start empty after reset.
`timescale 1ns/1ps
module tb_bisync_fifo;
  logic wclk = 1'b0, rclk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a real falling edge, so the asynchronous resets fire
  always #2 wclk = ~wclk;
  always #3.1 rclk = ~rclk;
  logic        push = 1'b0, pop = 1'b0, full, empty;
  logic [15:0] din = '0, dout;
  logic [1:0]  rcount;
  int checks = 0, failures = 0;
  logic [15:0] q[$];
  int n_in = 0, n_out = 0;
  localparam int N = 500;

  bisync_fifo #(.W(16)) dut (.rst_n, .wclk, .push, .din, .full, .rclk, .pop, .dout, .empty, .rcount);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #20;
    check(empty && !full, "flags after reset");
    rst_n = 1'b1;
  end

  // writer
  initial begin
    @(posedge rst_n);
    while (n_in < N) begin
      @(negedge wclk);
      push = !full && ($urandom_range(0, 1) == 1);
      din  = 16'($urandom);
      @(posedge wclk);
      if (push) begin q.push_back(din); n_in++; end
    end
    @(negedge wclk) push = 1'b0;
  end

  // reader
  initial begin
    @(posedge rst_n);
    while (n_out < N) begin
      @(negedge rclk);
      check(rcount <= 2, "rcount above depth");
      pop = !empty && ($urandom_range(0, 3) != 0);
      if (pop) begin
        check(q.size() > 0 && dout == q[0], $sformatf("read %04h", dout));
        void'(q.pop_front());
        n_out++;
      end
      @(posedge rclk);
    end
    @(negedge rclk) pop = 1'b0;
    repeat (4) @(posedge rclk);
    check(empty, "empty after draining");
    check(n_out == N, "all words read");
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
