// diaa_oversampler: oversampling unit of the digital-input audio amplifier
// (DIAA) tile. It raises the sample rate by M through zero padding followed
// by FIR interpolation, computed in polyphase form: output phase q of input
// step n is  y = sum_{t=0..TPP-1} h[t*M + q] * x[n-t]  (the zero-padded
// samples contribute nothing and are skipped). Coefficients are programmable
// signed Q14 numbers; for unity pass-band gain their sum over all M*TPP taps
// should be about M * 2^14.
//
// Operation is pulled by the PWM: each out_req asks for the next output
// sample. At phase 0 a new input sample is taken (in_ready for one cycle; an
// empty input counts an underrun and uses 0). One multiply-accumulate per
// clock, so out_valid is high TPP + 2 cycles after the cycle of out_req
// (one to start, TPP multiply-accumulates, one to round); results are
// rounded and saturated to NB bits. M may be changed at run time (1..MMAX).
// The polyphase FIR with programmable coefficients and M = 8 or 16 follow
// the design description; TPP = 8 taps per phase and the Q14 format are this
// design's choices.
module diaa_oversampler #(
  parameter int unsigned NB   = 16,
  parameter int unsigned MMAX = 16,
  parameter int unsigned TPP  = 8
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic [4:0]                       m,
  input  logic                             coef_we,
  input  logic [$clog2(MMAX*TPP)-1:0]      coef_addr,
  input  logic signed [15:0]               coef_wdata,
  input  logic                             in_valid,
  input  logic signed [NB-1:0]             in_data,
  output logic                             in_ready,
  output logic                             underrun,
  input  logic                             out_req,
  output logic                             out_valid,
  output logic signed [NB-1:0]             out_data
);
  localparam int unsigned HW = $clog2(MMAX * TPP);
  localparam int unsigned TW = $clog2(TPP + 1);

  logic signed [15:0]   h    [MMAX*TPP];
  logic signed [NB-1:0] hist [TPP];
  logic [4:0]           phase;
  logic [TW-1:0]        t;
  logic                 run;
  logic signed [NB+20:0] acc;

  always_ff @(posedge clk) if (coef_we) h[coef_addr] <= coef_wdata;

  function automatic logic signed [NB-1:0] sat(logic signed [NB+20:0] v);
    if (v > (NB+21)'((1 << (NB-1)) - 1))   return NB'((1 << (NB-1)) - 1);
    if (v < -(NB+21)'(1 << (NB-1)))       return NB'(-(1 << (NB-1)));
    return NB'(v);
  endfunction

  assign in_ready = out_req && (phase == 0) && !run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < TPP; i++) hist[i] <= '0;
      phase     <= '0;
      t         <= '0;
      run       <= 1'b0;
      acc       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      underrun  <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      underrun  <= 1'b0;
      if (out_req && !run) begin
        if (phase == 0) begin
          for (int i = TPP - 1; i > 0; i--) hist[i] <= hist[i-1];
          hist[0]  <= in_valid ? in_data : '0;
          underrun <= !in_valid;
        end
        run <= 1'b1;
        t   <= '0;
        acc <= '0;
      end else if (run) begin
        if (t < TW'(TPP)) begin
          acc <= acc + (NB+21)'(hist[t[$clog2(TPP)-1:0]]) * (NB+21)'(h[HW'(32'(t) * 32'(m) + 32'(phase))]);
          t   <= t + 1'b1;
        end else begin
          out_data  <= sat((acc + (NB+21)'(1 << 13)) >>> 14);
          out_valid <= 1'b1;
          run       <= 1'b0;
          phase     <= (phase + 1'b1 >= m) ? '0 : phase + 1'b1;
        end
      end
    end
  end
endmodule
