// diaa_noise_shaper: noise shaper of the DIAA tile. It requantises the
// oversampled NB-bit PCM signal to p bits (p <= P) so that the PWM period
// stays long enough for real power transistors, and pushes the added
// quantisation noise out of the audio band with error feedback through a
// K-th order FIR filter (order <= K):
//   v[n] = x[n] - sum_{i=1..order} c_i e[n-i]
//   y[n] = round(v[n] / 2^(NB-p)), saturated to p bits
//   e[n] = y[n]*2^(NB-p) - v[n]
// which gives Y = X + (1 - C(z)) E: c = {1} is first-order shaping
// (1 - z^-1); c = {5,-10,10,-5,1} gives (1 - z^-1)^5. The c_i are signed
// Q12 numbers. One sample in (in_valid), the p-bit result one cycle later
// (out_valid), sign-extended to P bits. Limits K = 5 and p = 6 come from the
// design description; the error-feedback structure and formats are this
// design's choices.
module diaa_noise_shaper #(
  parameter int unsigned NB = 16,
  parameter int unsigned K  = 5,
  parameter int unsigned P  = 6
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [2:0]             p,
  input  logic [2:0]             order,
  input  logic signed [15:0]     c [K],
  input  logic                   in_valid,
  input  logic signed [NB-1:0]   x,
  output logic                   out_valid,
  output logic signed [P-1:0]    y
);
  localparam int unsigned EW = NB + 6;

  logic signed [EW-1:0] e [K];
  logic signed [EW+17:0] fb;
  logic signed [EW-1:0] v, yfull, enew;
  logic signed [EW-1:0] q;
  logic [4:0]           sh;
  logic signed [EW-1:0] qmax, qmin;

  always_comb begin
    fb = '0;
    for (int i = 0; i < K; i++)
      if (i < int'(order)) fb = fb + (EW+18)'(c[i]) * (EW+18)'(e[i]);
    v    = EW'(x) - EW'(fb >>> 12);
    sh   = 5'(NB) - 5'(p);
    q    = (v + (EW'(1) <<< (sh - 5'd1))) >>> sh;
    qmax = (EW'(1) <<< (p - 3'd1)) - EW'(1);
    qmin = -(EW'(1) <<< (p - 3'd1));
    if (q > qmax) q = qmax;
    if (q < qmin) q = qmin;
    yfull = q <<< sh;
    enew  = yfull - v;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < K; i++) e[i] <= '0;
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int i = K - 1; i > 0; i--) e[i] <= e[i-1];
        e[0] <= enew;
        y    <= P'(q);
      end
    end
  end

  a_p_range: assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> (p >= 3'd1 && p <= 3'(P)));
endmodule
