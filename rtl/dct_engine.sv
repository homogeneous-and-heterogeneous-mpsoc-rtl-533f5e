// dct_engine: 1D 8-point transform engine of the 1D/2D transform tile.
//
// Four radix-2 butterflies split the eight samples into sums and
// differences of mirrored pairs; multiply-accumulate units then combine
// them with coefficients from a ROM. mode selects the coefficient set:
// 0 = forward DCT-II, 1 = inverse DCT (DCT-III). For the forward transform
// the butterflies act on the input (x[k] +/- x[7-k]) and the even/odd
// outputs are dot products of the sums/differences with the ROM; for the
// inverse the even/odd half-results are formed first and the butterflies
// act at the output. Both sets use the orthonormal scaling
//   C[k][n] = c(k) cos((2n+1) k pi / 16), c(0) = 1/sqrt(8), c(k>0) = 1/2,
// stored as signed Q15 numbers, i.e. 32768 * C[k][n] rounded; the table is
// computed from the seven values round(16384 * cos(m pi / 16)), m = 1..7.
//
// Interface: in_valid with eight signed 16-bit samples; out_valid two
// cycles later with eight signed 20-bit results (products rounded back to
// integer). Results are not normalised here: the tile applies block floating
// point. One vector per cycle. The design description gives the cascade of
// ROM + radix-2 data-path engines and the 8-sample data structure; the
// even/odd factorisation, Q15 coefficients and widths are this design's
// choices. FFT coefficient sets are not included.
module dct_engine (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    mode,
  input  logic                    in_valid,
  input  logic signed [15:0]      x   [8],
  output logic                    out_valid,
  output logic signed [19:0]      y   [8]
);
  // cos(m*pi/16) in Q14 for m = 0..8
  localparam logic signed [16:0] COSQ [9] = '{17'sd16384, 17'sd16069, 17'sd15137, 17'sd13623,
                                             17'sd11585, 17'sd9102,  17'sd6270,  17'sd3196, 17'sd0};

  // Q15 value of C[k][n]
  function automatic logic signed [16:0] coef(int k, int n);
    int a;
    logic signed [16:0] v;
    if (k == 0) return COSQ[4];
    a = ((2 * n + 1) * k) % 32;
    if (a <= 8)       v = COSQ[a];
    else if (a <= 16) v = -COSQ[16 - a];
    else if (a <= 24) v = -COSQ[a - 16];
    else              v = COSQ[32 - a];
    return v;
  endfunction

  // stage 1: butterflies and products
  logic signed [16:0] s [4], d [4];
  logic signed [35:0] acc [8];
  logic signed [35:0] e   [4], o [4];
  logic signed [19:0] y_c [8];

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      s[k] = 17'(x[k]) + 17'(x[7-k]);
      d[k] = 17'(x[k]) - 17'(x[7-k]);
    end
    for (int i = 0; i < 8; i++) acc[i] = '0;
    for (int i = 0; i < 4; i++) begin
      e[i] = '0;
      o[i] = '0;
    end
    if (!mode) begin
      // forward: y[2m] from sums, y[2m+1] from differences
      for (int m = 0; m < 4; m++)
        for (int k = 0; k < 4; k++) begin
          acc[2*m]   = acc[2*m]   + 36'(s[k]) * 36'(coef(2*m, k));
          acc[2*m+1] = acc[2*m+1] + 36'(d[k]) * 36'(coef(2*m+1, k));
        end
    end else begin
      // inverse: even and odd halves, butterflies at the output
      for (int n = 0; n < 4; n++)
        for (int m = 0; m < 4; m++) begin
          e[n] = e[n] + 36'(x[2*m])   * 36'(coef(2*m, n));
          o[n] = o[n] + 36'(x[2*m+1]) * 36'(coef(2*m+1, n));
        end
      for (int n = 0; n < 4; n++) begin
        acc[n]   = e[n] + o[n];
        acc[7-n] = e[n] - o[n];
      end
    end
    for (int i = 0; i < 8; i++) y_c[i] = 20'((acc[i] + 36'sd16384) >>> 15);
  end

  // two registered stages: products, then rounded results
  logic signed [19:0] y_q [8];
  logic               v_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q       <= 1'b0;
      out_valid <= 1'b0;
      for (int i = 0; i < 8; i++) begin
        y_q[i] <= '0;
        y[i]   <= '0;
      end
    end else begin
      v_q       <= in_valid;
      out_valid <= v_q;
      y_q       <= y_c;
      y         <= y_q;
    end
  end
endmodule
