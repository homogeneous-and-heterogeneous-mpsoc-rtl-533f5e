// me_search_engine: block-matching core of the motion-estimation tile.
//
// A BLK x BLK array of processing elements forms one absolute difference
// |cur - cand| per pixel each cycle (256 for the 16x16 configuration of the
// design description), an adder tree sums them into the sum of absolute
// differences (SAD) of the candidate, a minimum-detection unit keeps the best
// candidate and its motion vector, and a threshold unit raises `hit` once a
// candidate's SAD is at or below the programmable threshold (the early-stop
// test of fast searches).
//
// Timing: candidate and motion vector in at cycle t (cand_valid), SAD
// registered at t+1 (sad/sad_valid), best/hit updated at t+2. One candidate
// per cycle. `clear` starts a new block: it empties the minimum and the hit
// flag. On equal SADs the earlier candidate is kept (this design's choice).
module me_search_engine #(
  parameter int unsigned BLK   = 16,
  parameter int unsigned MV_W  = 6
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          clear,
  input  logic                          cand_valid,
  input  logic [BLK*BLK-1:0][7:0]       cur,
  input  logic [BLK*BLK-1:0][7:0]       cand,
  input  logic signed [MV_W-1:0]        mvx,
  input  logic signed [MV_W-1:0]        mvy,
  input  logic [15:0]                   thresh,
  output logic [15:0]                   sad,
  output logic                          sad_valid,
  output logic [15:0]                   best_sad,
  output logic signed [MV_W-1:0]        best_mvx,
  output logic signed [MV_W-1:0]        best_mvy,
  output logic                          best_valid,
  output logic                          hit
);
  localparam int unsigned N  = BLK * BLK;
  localparam int unsigned LV = $clog2(N);

  // PE array: absolute differences
  logic [7:0] ad [N];
  always_comb begin
    for (int i = 0; i < N; i++)
      ad[i] = (cur[i] > cand[i]) ? cur[i] - cand[i] : cand[i] - cur[i];
  end

  // adder tree: level l holds N >> l partial sums
  logic [15:0] tree [LV+1][N];
  always_comb begin
    for (int l = 0; l <= LV; l++)
      for (int i = 0; i < N; i++) tree[l][i] = '0;
    for (int i = 0; i < N; i++) tree[0][i] = 16'(ad[i]);
    for (int l = 1; l <= LV; l++)
      for (int i = 0; i < (N >> l); i++)
        tree[l][i] = tree[l-1][2*i] + tree[l-1][2*i+1];
  end

  logic signed [MV_W-1:0] mvx_q, mvy_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sad        <= '0;
      sad_valid  <= 1'b0;
      mvx_q      <= '0;
      mvy_q      <= '0;
      best_sad   <= '1;
      best_mvx   <= '0;
      best_mvy   <= '0;
      best_valid <= 1'b0;
      hit        <= 1'b0;
    end else begin
      sad       <= tree[LV][0];
      sad_valid <= cand_valid && !clear;
      mvx_q     <= mvx;
      mvy_q     <= mvy;
      if (clear) begin
        best_sad   <= '1;
        best_valid <= 1'b0;
        hit        <= 1'b0;
        sad_valid  <= 1'b0;
      end else if (sad_valid) begin
        if (!best_valid || sad < best_sad) begin
          best_sad   <= sad;
          best_mvx   <= mvx_q;
          best_mvy   <= mvy_q;
          best_valid <= 1'b1;
        end
        if (sad <= thresh) hit <= 1'b1;
      end
    end
  end
endmodule
