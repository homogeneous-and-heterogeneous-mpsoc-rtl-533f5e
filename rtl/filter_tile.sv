// filter_tile: 1D/2D filter ASIP of the heterogeneous MPSoC, with the four
// parts the design description lists: a programmable filtering core (linear
// or rational), a noise/artifact estimation and filter-tuning unit, local
// memory with a FIFO, and a control unit, behind an AMBA AHB wrapper.
//
// The control unit streams NSAMP samples from the input memory through the
// core into the output memory at one sample per clock cycle.
//  * Linear mode: causal 8-tap FIR, y[n] = sum_t h[t] x[n-t] / 4096, with
//    programmable signed Q12 taps, saturated to 16 bits (x[n<0] = 0).
//  * Rational mode: edge-preserving 3-point rational filter centred on
//    c = x[n-1] with neighbours a = x[n-2], b = x[n]:
//      y = c + LAMBDA*(a + b - 2c) / (256 + (K_eff*(a-b)^2 >> 8))
//    LAMBDA in Q8. The output is stored at the index of its centre sample c
//    (the last sample is filtered with b = 0). Strong local gradients (a-b) shrink the correction, so
//    edges are kept while flat noisy areas are smoothed.
// Noise estimation: a FIFO delays the input so that it lines up with the
// filter output; the mean absolute residual |x - y| over each 64-sample
// segment is the noise estimate (NOISE register). With auto-tuning on, the
// estimate configures the rational filter: K_eff = K >> floor(log2(NOISE+1)),
// so noisier signals are smoothed harder.
// The four-part structure and the 1 sample/cycle rate follow the design
// description; the filter formulas, tap count, segment length and tuning
// rule are this design's choices (the description names the filter classes
// but gives no equations). 2D (image-block) operation is not implemented.
//
// Local memory: 1024 input and 1024 output 16-bit samples (32 kbit) plus the
// FIFO, close to the 35 kbit of the description.
// AHB address map (byte offsets):
//   0x0000 CTRL (W) bit0 start, bit1 rational mode, bit2 auto-tune
//   0x0004 NSAMP  0x0008 LAMBDA  0x000C K  (R/W)
//   0x0010 STATUS (R) bit0 busy, bit1 done   0x0014 NOISE (R)   0x0018 CYCLES (R)
//   0x0020 + 4t  tap h[t], t = 0..7 (R/W)
//   0x1000 + 4w  input memory word w (samples 2w, 2w+1; low half first)
//   0x2000 + 4w  output memory word w
module filter_tile #(
  parameter int unsigned SAMPLES = 1024,
  parameter int unsigned TAPS    = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        hsel,
  input  logic [31:0] haddr,
  input  logic [1:0]  htrans,
  input  logic        hwrite,
  input  logic [31:0] hwdata,
  output logic [31:0] hrdata,
  output logic        hreadyout,
  output logic        hresp,
  output logic        irq_done
);
  localparam int unsigned IW = $clog2(SAMPLES);

  typedef logic signed [15:0] s16_t;

  s16_t in_m  [SAMPLES];
  s16_t out_m [SAMPLES];

  logic        rd_en, wr_en, addr_err;
  logic [15:0] rd_addr, wr_addr;
  logic [31:0] rd_data, wr_data;

  ahb_slave_port #(.AW(16)) u_port (
    .clk, .rst_n, .hsel, .haddr, .htrans, .hwrite, .hwdata, .hrdata, .hreadyout, .hresp,
    .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data, .addr_err);

  assign addr_err = (haddr[31:14] != 0) ||
                    (haddr[13:12] == 2'd0 && haddr[11:6] != 0) ||
                    (haddr[13:12] == 2'd3) ||
                    (haddr[13:12] != 2'd0 && haddr[11:2] >= 10'(SAMPLES / 2));

  // registers
  logic        busy, done, rational, autotune;
  logic [IW:0] nsamp;
  logic [15:0] lambda_q, k_q, noise;
  logic [31:0] cycles;
  s16_t        h [TAPS];

  logic [IW-1:0] rw, ww;
  assign rw = {rd_addr[IW:2], 1'b0};
  assign ww = {wr_addr[IW:2], 1'b0};

  always_ff @(posedge clk) begin
    if (rd_en) begin
      unique case (rd_addr[13:12])
        2'd1: rd_data <= {in_m[rw + 1'b1], in_m[rw]};
        2'd2: rd_data <= {out_m[rw + 1'b1], out_m[rw]};
        default: begin
          if (rd_addr[5]) rd_data <= 32'(unsigned'(h[rd_addr[4:2]]));
          else unique case (rd_addr[4:2])
            3'd1: rd_data <= 32'(nsamp);
            3'd2: rd_data <= 32'(lambda_q);
            3'd3: rd_data <= 32'(k_q);
            3'd4: rd_data <= {30'h0, done, busy};
            3'd5: rd_data <= 32'(noise);
            3'd6: rd_data <= cycles;
            default: rd_data <= '0;
          endcase
        end
      endcase
    end
  end

  // ---------------- control unit and data path ----------------
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_e;
  state_e      st;
  logic [IW:0] rd_idx;          // next input sample to read
  logic        rd_v;            // a sample was read last cycle
  logic        pad_v;           // a zero pad sample enters (rational mode tail)
  s16_t        x_rd;
  s16_t        win [TAPS];      // win[0] newest
  logic [IW:0] n_in;            // samples shifted into the window
  logic        step;

  always_ff @(posedge clk) x_rd <= in_m[IW'(rd_idx)];

  assign step = rd_v || pad_v;

  // filtering core
  logic signed [35:0] acc;
  s16_t               y_fir, y_rat, y;
  logic signed [17:0] lap, grad;
  logic signed [35:0] num;
  logic [35:0]        g2, den;
  logic [15:0]        k_eff;
  logic [3:0]         lg;
  s16_t               x_new;

  assign x_new = rd_v ? x_rd : 16'sd0;

  function automatic s16_t sat16(logic signed [35:0] v);
    if (v > 36'sd32767)  return 16'sd32767;
    if (v < -36'sd32768) return -16'sd32768;
    return 16'(v);
  endfunction

  always_comb begin
    // linear FIR on the window including the new sample
    acc = 36'(x_new) * 36'(h[0]);
    for (int t = 1; t < TAPS; t++) acc = acc + 36'(win[t-1]) * 36'(h[t]);
    y_fir = sat16(acc >>> 12);
    // rational filter centred on win[0] (= x[n-1])
    lg = 4'd0;
    for (int i = 1; i < 16; i++) if (32'(noise) + 32'd1 >= (32'd1 << i)) lg = 4'(i);
    k_eff = autotune ? (k_q >> lg) : k_q;
    lap   = 18'(win[1]) + 18'(x_new) - 18'(win[0]) - 18'(win[0]);
    grad  = 18'(win[1]) - 18'(x_new);
    g2    = 36'(grad * grad);
    den   = 36'd256 + ((36'(k_eff) * g2) >> 8);
    num   = 36'(lap) * 36'(signed'({1'b0, lambda_q}));
    y_rat = sat16(36'(win[0]) + (num / signed'(den)));
    y     = rational ? y_rat : y_fir;
  end

  // FIFO aligning the input with the filter output (residual path); the
  // causal FIR needs no delay, the centred rational filter one sample
  logic        f_empty, f_full;
  logic [15:0] f_dout;
  logic [2:0]  f_cnt;
  logic        out_v;
  logic [IW:0] out_idx;
  assign out_v = step && (!rational || n_in != 0);

  noc_fifo #(.W(16), .DEPTH(4)) u_fifo (
    .clk, .rst_n, .push(rd_v && rational), .din(x_rd), .pop(out_v && rational),
    .dout(f_dout), .empty(f_empty), .full(f_full), .count(f_cnt));

  // noise / artifact estimation
  logic [21:0] res_acc;
  logic [5:0]  seg_cnt;
  logic [16:0] res_abs;
  always_comb begin
    logic signed [16:0] r;
    r = 17'(signed'(rational ? f_dout : x_new)) - 17'(y);
    res_abs = r[16] ? 17'(-r) : 17'(r);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= S_IDLE;
      busy     <= 1'b0;
      done     <= 1'b0;
      rational <= 1'b0;
      autotune <= 1'b0;
      nsamp    <= '0;
      lambda_q <= 16'd256;
      k_q      <= '0;
      noise    <= '0;
      cycles   <= '0;
      rd_idx   <= '0;
      rd_v     <= 1'b0;
      pad_v    <= 1'b0;
      n_in     <= '0;
      out_idx  <= '0;
      res_acc  <= '0;
      seg_cnt  <= '0;
      for (int t = 0; t < TAPS; t++) begin
        h[t]   <= '0;
        win[t] <= '0;
      end
    end else begin
      if (wr_en && wr_addr[13:12] == 2'd0) begin
        if (wr_addr[5]) h[wr_addr[4:2]] <= wr_data[15:0];
        else unique case (wr_addr[4:2])
          3'd1: nsamp    <= wr_data[IW:0];
          3'd2: lambda_q <= wr_data[15:0];
          3'd3: k_q      <= wr_data[15:0];
          default: ;
        endcase
      end
      if (busy) cycles <= cycles + 1;
      rd_v  <= 1'b0;
      pad_v <= 1'b0;
      if (step) begin
        for (int t = TAPS - 1; t > 0; t--) win[t] <= win[t-1];
        win[0] <= x_new;
        n_in   <= n_in + 1'b1;
      end
      if (out_v) begin
        out_idx <= out_idx + 1'b1;
        res_acc <= res_acc + 22'(res_abs);
        seg_cnt <= seg_cnt + 1'b1;
        if (seg_cnt == 6'd63) begin
          noise   <= 16'((res_acc + 22'(res_abs)) >> 6);
          res_acc <= '0;
        end
      end
      unique case (st)
        S_IDLE: if (wr_en && wr_addr[13:2] == 12'd0 && wr_data[0]) begin
          rational <= wr_data[1];
          autotune <= wr_data[2];
          busy     <= 1'b1;
          done     <= 1'b0;
          cycles   <= '0;
          rd_idx   <= '0;
          n_in     <= '0;
          out_idx  <= '0;
          res_acc  <= '0;
          seg_cnt  <= '0;
          for (int t = 0; t < TAPS; t++) win[t] <= '0;
          st       <= S_RUN;
        end
        S_RUN: begin
          if (rd_idx < nsamp) begin
            rd_idx <= rd_idx + 1'b1;
            rd_v   <= 1'b1;
          end else if (rational && rd_idx == nsamp && !rd_v) begin
            rd_idx <= rd_idx + 1'b1;
            pad_v  <= 1'b1;           // one zero sample flushes the centred filter
          end
          if (out_v && out_idx + 1'b1 == nsamp) st <= S_DONE;
        end
        S_DONE: begin
          busy <= 1'b0;
          done <= 1'b1;
          st   <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en && wr_addr[13:12] == 2'd1) begin
      in_m[ww]        <= wr_data[15:0];
      in_m[ww + 1'b1] <= wr_data[31:16];
    end
    if (out_v) out_m[IW'(out_idx)] <= y;
  end

  assign irq_done = done;
endmodule
