// pixel_transf_tile: pixel-level image processing ASIP of the heterogeneous
// MPSoC. It streams NPIX pixels (three 8-bit channels packed in a 32-bit
// word, channel 0 in bits 7:0) from its input memory to its output memory,
// one pixel per clock, applying one operation and then clipping:
//   op 0  LUT: every channel goes through a programmable 256-entry table,
//         which realises gamma correction, contrast enhancement and
//         log-linear / linear-log conversion (the table holds the curve).
//   op 1  colour-domain conversion with a programmable 3x3 matrix:
//         out[c] = ((sum_j M[c][j]*(in[j]-PRE[j]) + 128) >> 8) + POST[c],
//         M in signed Q8. Reset values convert RGB to full-range YCbCr
//         (ITU-R BT.601); other values give YUV or the inverse conversions.
//   op 2  frame size conversion: horizontal 2:1 decimation, each output
//         pixel is the rounded mean of two neighbouring input pixels
//         (NPIX/2 outputs).
//   op 3  clipping only.
// Clipping clamps every channel to [CLIP_LO, CLIP_HI].
// The list of functions comes from the design description; the operations'
// formulas, coefficient formats and the decimation-only size conversion are
// this design's choices.
//
// AHB address map (byte offsets):
//   0x000 CTRL (W) bit0 start, bits3:1 op    0x004 NPIX (R/W)
//   0x008 STATUS (R) bit0 busy, bit1 done    0x00C CLIP [7:0] lo, [15:8] hi
//   0x010 CYCLES (R)
//   0x040 + 4i M[i] (i = 3c + j)   0x080 + 4j PRE[j]   0x0C0 + 4c POST[c]
//   0x400 + 4i LUT[i], i = 0..255
//   0x1000 + 4w input pixel w      0x2000 + 4w output pixel w
module pixel_transf_tile #(
  parameter int unsigned PIXELS = 1024
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
  localparam int unsigned IW = $clog2(PIXELS);
  localparam logic signed [15:0] M_RESET [9] = '{16'sd77, 16'sd150, 16'sd29,
                                                 -16'sd43, -16'sd85, 16'sd128,
                                                 16'sd128, -16'sd107, -16'sd21};
  localparam logic signed [15:0] POST_RESET [3] = '{16'sd0, 16'sd128, 16'sd128};

  logic [23:0] in_m  [PIXELS];
  logic [23:0] out_m [PIXELS];
  logic [7:0]  lut   [256];

  logic        rd_en, wr_en, addr_err;
  logic [13:0] rd_addr, wr_addr;
  logic [31:0] rd_data, wr_data;

  ahb_slave_port #(.AW(14)) u_port (
    .clk, .rst_n, .hsel, .haddr, .htrans, .hwrite, .hwdata, .hrdata, .hreadyout, .hresp,
    .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data, .addr_err);

  assign addr_err = (haddr[31:14] != 0) || (haddr[13:12] == 2'd3) ||
                    (haddr[13:12] == 2'd0 && haddr[11:10] == 2'd0 && haddr[9:8] != 2'd0) ||
                    (haddr[13:12] == 2'd0 && haddr[11:10] >= 2'd2) ||
                    (haddr[13:12] != 2'd0 && 32'(haddr[11:2]) >= 32'(PIXELS));

  logic               busy, done;
  logic [1:0]         op;
  logic [IW:0]        npix;
  logic [7:0]         clip_lo, clip_hi;
  logic [31:0]        cycles;
  logic signed [15:0] m    [9];
  logic [7:0]         pre  [3];
  logic signed [15:0] post [3];

  always_ff @(posedge clk) begin
    if (rd_en) begin
      rd_data <= '0;
      if (rd_addr[13:12] == 2'd1)      rd_data <= {8'h0, in_m[IW'(rd_addr[IW+1:2])]};
      else if (rd_addr[13:12] == 2'd2) rd_data <= {8'h0, out_m[IW'(rd_addr[IW+1:2])]};
      else if (rd_addr[10])            rd_data <= {24'h0, lut[rd_addr[9:2]]};
      else unique case (rd_addr[7:6])
        2'd0: unique case (rd_addr[5:2])
                4'd1: rd_data <= 32'(npix);
                4'd2: rd_data <= {30'h0, done, busy};
                4'd3: rd_data <= {16'h0, clip_hi, clip_lo};
                4'd4: rd_data <= cycles;
                default: ;
              endcase
        2'd1: if (rd_addr[5:2] < 4'd9) rd_data <= 32'(unsigned'(m[rd_addr[5:2]]));
        2'd2: if (rd_addr[5:2] < 4'd3) rd_data <= 32'(pre[rd_addr[3:2]]);
        default: if (rd_addr[5:2] < 4'd3) rd_data <= 32'(unsigned'(post[rd_addr[3:2]]));
      endcase
    end
  end

  // ---------------- data path ----------------
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_e;
  state_e      st;
  logic [IW:0] rd_idx, out_idx;
  logic        rd_v, half;
  logic [23:0] px, px_prev;
  logic [23:0] res;
  logic        res_v;

  always_ff @(posedge clk) px <= in_m[IW'(rd_idx)];

  function automatic logic [7:0] clip(logic signed [19:0] v, logic [7:0] lo, logic [7:0] hi);
    if (v < signed'(20'(lo))) return lo;
    if (v > signed'(20'(hi))) return hi;
    return 8'(v);
  endfunction

  always_comb begin
    logic signed [31:0] acc;
    logic signed [19:0] v [3];
    for (int c = 0; c < 3; c++) v[c] = 20'(px[8*c +: 8]);
    res_v = rd_v;
    unique case (op)
      2'd0: for (int c = 0; c < 3; c++) v[c] = 20'(lut[px[8*c +: 8]]);
      2'd1: for (int c = 0; c < 3; c++) begin
              acc = 32'sd128;
              for (int j = 0; j < 3; j++)
                acc = acc + 32'(m[3*c+j]) * (32'(px[8*j +: 8]) - 32'(pre[j]));
              v[c] = 20'(acc >>> 8) + 20'(post[c]);
            end
      2'd2: begin
              res_v = rd_v && half;
              for (int c = 0; c < 3; c++)
                v[c] = (20'(px[8*c +: 8]) + 20'(px_prev[8*c +: 8]) + 20'd1) >> 1;
            end
      default: ;
    endcase
    for (int c = 0; c < 3; c++) res[8*c +: 8] = clip(v[c], clip_lo, clip_hi);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= S_IDLE;
      busy    <= 1'b0;
      done    <= 1'b0;
      op      <= '0;
      npix    <= '0;
      clip_lo <= 8'd0;
      clip_hi <= 8'd255;
      cycles  <= '0;
      rd_idx  <= '0;
      out_idx <= '0;
      rd_v    <= 1'b0;
      half    <= 1'b0;
      px_prev <= '0;
      for (int i = 0; i < 9; i++) m[i] <= M_RESET[i];
      for (int j = 0; j < 3; j++) begin
        pre[j]  <= '0;
        post[j] <= POST_RESET[j];
      end
    end else begin
      if (wr_en && wr_addr[13:12] == 2'd0 && !wr_addr[10]) begin
        unique case (wr_addr[7:6])
          2'd0: unique case (wr_addr[5:2])
                  4'd1: npix <= wr_data[IW:0];
                  4'd3: begin clip_lo <= wr_data[7:0]; clip_hi <= wr_data[15:8]; end
                  default: ;
                endcase
          2'd1: if (wr_addr[5:2] < 4'd9) m[wr_addr[5:2]] <= wr_data[15:0];
          2'd2: if (wr_addr[5:2] < 4'd3) pre[wr_addr[3:2]] <= wr_data[7:0];
          default: if (wr_addr[5:2] < 4'd3) post[wr_addr[3:2]] <= wr_data[15:0];
        endcase
      end
      if (busy) cycles <= cycles + 1;
      rd_v <= 1'b0;
      if (rd_v) begin
        px_prev <= px;
        half    <= !half;
      end
      if (res_v) out_idx <= out_idx + 1'b1;
      unique case (st)
        S_IDLE: if (wr_en && wr_addr[13:2] == 12'd0 && wr_data[0]) begin
          op      <= wr_data[2:1];
          busy    <= 1'b1;
          done    <= 1'b0;
          cycles  <= '0;
          rd_idx  <= '0;
          out_idx <= '0;
          half    <= 1'b0;
          st      <= S_RUN;
        end
        S_RUN: begin
          if (rd_idx < npix) begin
            rd_idx <= rd_idx + 1'b1;
            rd_v   <= 1'b1;
          end else if (!rd_v) st <= S_DONE;
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
    if (wr_en && wr_addr[13:12] == 2'd1) in_m[IW'(wr_addr[IW+1:2])] <= wr_data[23:0];
    if (wr_en && wr_addr[13:12] == 2'd0 && wr_addr[10]) lut[wr_addr[9:2]] <= wr_data[7:0];
    if (res_v) out_m[IW'(out_idx)] <= res;
  end

  assign irq_done = done;
endmodule
