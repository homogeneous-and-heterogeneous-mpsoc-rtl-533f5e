// tb_noc_fifo: random push/pop test of the router input buffer against a
// queue model, at the default depth of two flits. Pushes are issued only
// when the buffer is not full, as the credit protocol guarantees; every
// cycle the head word, empty, full and count are compared with the model.
`timescale 1ns/1ps
module tb_noc_fifo;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a real falling edge, so the asynchronous resets fire
  always #5 clk = ~clk;
  logic       push = 1'b0, pop = 1'b0;
  logic [7:0] din = '0, dout;
  logic       empty, full;
  logic [1:0] count;
  int checks = 0, failures = 0;
  logic [7:0] q[$];

  noc_fifo dut (.clk, .rst_n, .push, .din, .pop, .dout, .empty, .full, .count);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == 2), "full flag");
      check(int'(count) == q.size(), "count");
      if (q.size() > 0) check(dout == q[0], $sformatf("head %02h expected %02h", dout, q[0]));
      push = !full && ($urandom_range(0, 3) != 0);
      pop  = !empty && ($urandom_range(0, 2) != 0);
      din  = 8'($urandom);
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
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
