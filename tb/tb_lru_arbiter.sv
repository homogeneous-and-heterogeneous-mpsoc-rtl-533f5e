// tb_lru_arbiter: the router's two-step arbiter (priority, then least
// recently used) against a reference model holding the recency list. Random
// request vectors and priorities (mostly equal, as in the MPSoC, sometimes
// mixed) are applied; the grant must be one-hot, go to a requester of the
// highest requesting priority and, among those, to the least recently
// granted one. A grant is taken (update) at random.
`timescale 1ns/1ps
module tb_lru_arbiter;
  localparam int N = 5;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a real falling edge, so the asynchronous resets fire
  always #5 clk = ~clk;
  logic [N-1:0] req = '0, gnt;
  logic [1:0]   prio[N];
  logic         update = 1'b0;
  int checks = 0, failures = 0;
  int order[$];
  int same_prio_conflicts = 0;

  lru_arbiter dut (.clk, .rst_n, .req, .prio, .update, .gnt);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin prio[i] = '0; order.push_back(i); end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      int best, win;
      @(negedge clk);
      req = N'($urandom);
      for (int i = 0; i < N; i++) prio[i] = (c % 3 == 0) ? 2'($urandom) : 2'd0;
      best = -1;
      for (int i = 0; i < N; i++) if (req[i] && int'(prio[i]) > best) best = int'(prio[i]);
      win = -1;
      foreach (order[k]) if (win < 0 && req[order[k]] && int'(prio[order[k]]) == best) win = order[k];
      #1;
      if (win < 0) check(gnt == '0, "grant without request");
      else begin
        check(gnt == N'(1) << win, $sformatf("grant %b expected input %0d", gnt, win));
        if ($countones(req) > 1) same_prio_conflicts++;
      end
      update = (win >= 0) && ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (update) begin
        foreach (order[k]) if (order[k] == win) begin order.delete(k); break; end
        order.push_back(win);
      end
    end
    check(same_prio_conflicts > 100, "too few conflicts exercised");
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
