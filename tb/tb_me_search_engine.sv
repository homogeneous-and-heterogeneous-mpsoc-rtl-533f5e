// tb_me_search_engine: the 16x16 SAD search engine (default parameters)
// against a reference model. Random 16x16 current blocks are compared with
// random candidates and with noisy copies of the block (small SADs). The
// engine gets one candidate per cycle, sometimes with gaps.
// Checks: each SAD one cycle after its candidate; after the last candidate
// the minimum SAD and the vector of the first candidate that reached it;
// the threshold flag set exactly when some SAD was at or below THRESH; and
// clear starting a new block.
`timescale 1ns/1ps
module tb_me_search_engine;
  localparam int N = 256;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a real falling edge, so the asynchronous resets fire
  always #5 clk = ~clk;
  logic clear = 1'b0, cand_valid = 1'b0;
  logic [N-1:0][7:0] cur = '0, cand = '0;
  logic signed [5:0] mvx = '0, mvy = '0, best_mvx, best_mvy;
  logic [15:0] thresh = '0, sad, best_sad;
  logic sad_valid, best_valid, hit;
  int checks = 0, failures = 0;

  me_search_engine dut (.clk, .rst_n, .clear, .cand_valid, .cur, .cand, .mvx, .mvy, .thresh,
                        .sad, .sad_valid, .best_sad, .best_mvx, .best_mvy, .best_valid, .hit);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int blk = 0; blk < 12; blk++) begin
      int best, bx, by, exp_sad;
      bit exp_hit;
      @(negedge clk);
      clear = 1'b1;
      for (int i = 0; i < N; i++) cur[i] = 8'($urandom);
      thresh = 16'($urandom_range(0, 600));
      @(negedge clk);
      clear = 1'b0;
      best = 1 << 20; bx = 0; by = 0; exp_hit = 0;
      for (int c = 0; c < 30; c++) begin
        int noise = $urandom_range(0, 3);
        cand_valid = ($urandom_range(0, 4) != 0);
        for (int i = 0; i < N; i++)
          cand[i] = (c % 3 == 0) ? 8'($urandom) : 8'(int'(cur[i]) + ($urandom_range(0, 99) < 3 * noise ? 1 : 0));
        mvx = 6'($urandom); mvy = 6'($urandom);
        exp_sad = 0;
        for (int i = 0; i < N; i++)
          exp_sad += (cur[i] > cand[i]) ? int'(cur[i] - cand[i]) : int'(cand[i] - cur[i]);
        @(negedge clk);
        check(sad_valid == cand_valid, "sad_valid");
        if (cand_valid) begin
          check(int'(sad) == exp_sad, $sformatf("SAD %0d expected %0d", sad, exp_sad));
          if (exp_sad < best) begin best = exp_sad; bx = int'(mvx); by = int'(mvy); end
          if (exp_sad <= int'(thresh)) exp_hit = 1;
        end
        #0;
      end
      cand_valid = 1'b0;
      @(negedge clk);
      @(negedge clk);
      if (best < (1 << 20)) begin
        check(best_valid && int'(best_sad) == best, $sformatf("best SAD %0d expected %0d", best_sad, best));
        check(int'(best_mvx) == bx && int'(best_mvy) == by, "best vector");
      end
      check(hit == exp_hit, $sformatf("hit %0d expected %0d", hit, exp_hit));
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
