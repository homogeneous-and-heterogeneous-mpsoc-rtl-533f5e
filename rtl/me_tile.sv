// me_tile: motion-estimation ASIP of the heterogeneous MPSoC. It holds an
// AMBA AHB wrapper (slave port towards its NI), two local memories used as
// ping-pong buffers (one is searched while the other is prefetched), the
// 16x16 hardware search engine and the adaptive ME controller.
//
// Each local memory holds a BLK x BLK current block and its search area of
// (BLK+2*RANGE)^2 pixels, i.e. 16x16 + 48x48 bytes = 20 kbit per memory and
// 40 kbit for both, the size the design description gives for a +/-16 pixel
// search. The controller scans candidates by shifting a BLK x BLK window one
// column per cycle: after BLK cycles of loading, one new candidate enters the
// engine per cycle along a row of the search area. It supports a full search
// over a programmable range (+/-RANGE at most) and a fast mode: the predicted
// vector (PRED register) is tried first, and with early stop enabled the
// search ends as soon as a candidate's SAD is at or below THRESH, otherwise
// the full search follows. The predictor-first strategy and the window
// scanning are this design's reading of "predictive ME with early
// termination"; the register map is this design's choice.
//
// AHB address map (byte offsets inside the tile):
//   0x0000 CTRL   (W) bit0 start, bit1 bank to search, bit2 early stop, bit3 try predictor
//   0x0004 RANGE  (R/W) search range r, 1..RANGE, candidates -r..r
//   0x0008 THRESH (R/W) early-stop SAD threshold
//   0x000C PRED   (R/W) predicted vector: [7:0] dx, [15:8] dy (signed)
//   0x0010 STATUS (R) bit0 busy, bit1 done
//   0x0014 RESULT (R) [7:0] dx, [15:8] dy, [31:16] SAD
//   0x0018 CANDS  (R) candidates evaluated by the last search
//   0x001C CYCLES (R) cycles taken by the last search
//   0x8000 + bank*0x4000 + 4*w : local memory word w. Words 0..BLK*BLK/4-1
//     hold the current block row by row; search-area row y starts at word
//     BLK*BLK/4 + 16*y and holds (BLK+2*RANGE)/4 words. Pixel i of a word is
//     bits 8i+7..8i.
module me_tile #(
  parameter int unsigned BLK   = 16,
  parameter int unsigned RANGE = 16
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
  localparam int unsigned SA   = BLK + 2 * RANGE;
  localparam int unsigned CURW = BLK * BLK / 4;        // words of the current block
  localparam int unsigned SAWW = SA / 4;               // words per search-area row
  localparam int unsigned MV_W = $clog2(RANGE) + 2;
  localparam int unsigned CW   = $clog2(SA + BLK + 1);

  // ---------------- local memories ----------------
  localparam int unsigned BI = $clog2(BLK);
  logic [7:0] cur_m [2][BLK][BLK];
  logic [7:0] sa_m  [2][SA][SA];

  // ---------------- bus port ----------------
  logic        rd_en, wr_en, addr_err;
  logic [15:0] rd_addr, wr_addr;
  logic [31:0] rd_data, wr_data;

  ahb_slave_port #(.AW(16)) u_port (
    .clk, .rst_n, .hsel, .haddr, .htrans, .hwrite, .hwdata, .hrdata, .hreadyout, .hresp,
    .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data, .addr_err);

  // decode a local-memory word index: kind 0 = current block, 1 = search area, 2 = invalid
  function automatic logic [1:0] mem_kind(logic [11:0] w);
    if (w < 12'(CURW)) return 2'd0;
    if ((w - 12'(CURW)) < 12'(16 * SA) && ((w - 12'(CURW)) % 16) < 12'(SAWW)) return 2'd1;
    return 2'd2;
  endfunction

  assign addr_err = (haddr[31:16] != 16'h0) ||
                    (haddr[15] && mem_kind(haddr[13:2]) == 2'd2) ||
                    (!haddr[15] && haddr[14:5] != 10'h0);

  // ---------------- registers ----------------
  logic                   busy, done, bank_q, early_q, pred_q;
  logic [5:0]             range_q;
  logic [15:0]            thresh_q;
  logic signed [7:0]      pdx, pdy;
  logic [31:0]            cands_q, cycles_q;
  logic [15:0]            best_sad;
  logic signed [MV_W-1:0] best_mvx, best_mvy;
  logic                   best_valid, hit;

  always_ff @(posedge clk) begin
    if (rd_en) begin
      rd_data <= '0;
      if (rd_addr[15]) begin
        automatic logic [11:0] w = rd_addr[13:2];
        automatic logic [11:0] s = w - 12'(CURW);
        for (int b = 0; b < 4; b++)
          if (mem_kind(w) == 2'd0)
            rd_data[8*b +: 8] <= cur_m[rd_addr[14]][BI'(w / 12'(BLK/4))][BI'(32'(w % 12'(BLK/4)) * 4 + b)];
          else
            rd_data[8*b +: 8] <= sa_m[rd_addr[14]][s / 16][(s % 16) * 4 + 12'(b)];
      end else begin
        unique case (rd_addr[4:2])
          3'd1: rd_data <= 32'(range_q);
          3'd2: rd_data <= 32'(thresh_q);
          3'd3: rd_data <= {16'h0, pdy, pdx};
          3'd4: rd_data <= {30'h0, done, busy};
          3'd5: rd_data <= {best_sad, 8'(best_mvy), 8'(best_mvx)};
          3'd6: rd_data <= cands_q;
          3'd7: rd_data <= cycles_q;
          default: rd_data <= '0;
        endcase
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en && wr_addr[15]) begin
      automatic logic [11:0] w = wr_addr[13:2];
      automatic logic [11:0] s = w - 12'(CURW);
      for (int b = 0; b < 4; b++)
        if (mem_kind(w) == 2'd0)
          cur_m[wr_addr[14]][BI'(w / 12'(BLK/4))][BI'(32'(w % 12'(BLK/4)) * 4 + b)] <= wr_data[8*b +: 8];
        else
          sa_m[wr_addr[14]][s / 16][(s % 16) * 4 + 12'(b)] <= wr_data[8*b +: 8];
    end
  end

  // ---------------- adaptive ME controller ----------------
  typedef enum logic [2:0] {C_IDLE, C_SCAN, C_DRAIN_PRED, C_DRAIN, C_DONE} cstate_e;
  cstate_e                cs;
  logic [5:0]             y0;          // search-area row of the window's top
  logic [5:0]             xs;          // first column shifted in
  logic [CW-1:0]          k;           // columns shifted in so far
  logic [CW-1:0]          kend;        // last k of this scan
  logic signed [7:0]      dy_cur;      // displacement of the current row
  logic                   pred_phase;
  logic [1:0]             drain;
  logic [BLK*BLK-1:0][7:0] win, curv;
  logic                   win_valid;
  logic signed [MV_W-1:0] win_dx, win_dy;
  logic                   eng_clear;
  logic                   start;
  logic [15:0]            sad;
  logic                   sad_valid;

  assign start = wr_en && !wr_addr[15] && wr_addr[4:2] == 3'd0 && wr_data[0] && !busy;

  always_comb begin
    for (int r = 0; r < BLK; r++)
      for (int c = 0; c < BLK; c++) curv[r*BLK + c] = cur_m[bank_q][r][c];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs        <= C_IDLE;
      busy      <= 1'b0;
      done      <= 1'b0;
      bank_q    <= 1'b0;
      early_q   <= 1'b0;
      pred_q    <= 1'b0;
      range_q   <= 6'(RANGE);
      thresh_q  <= '0;
      pdx       <= '0;
      pdy       <= '0;
      cands_q   <= '0;
      cycles_q  <= '0;
      y0        <= '0;
      xs        <= '0;
      k         <= '0;
      kend      <= '0;
      dy_cur    <= '0;
      pred_phase<= 1'b0;
      drain     <= '0;
      win       <= '0;
      win_valid <= 1'b0;
      win_dx    <= '0;
      win_dy    <= '0;
      eng_clear <= 1'b0;
    end else begin
      eng_clear <= 1'b0;
      win_valid <= 1'b0;
      if (wr_en && !wr_addr[15]) begin
        unique case (wr_addr[4:2])
          3'd1: range_q  <= (wr_data[5:0] > 6'(RANGE) || wr_data[5:0] == 0) ? 6'(RANGE) : wr_data[5:0];
          3'd2: thresh_q <= wr_data[15:0];
          3'd3: begin pdx <= wr_data[7:0]; pdy <= wr_data[15:8]; end
          default: ;
        endcase
      end
      if (busy) cycles_q <= cycles_q + 1;
      if (win_valid) cands_q <= cands_q + 1;

      unique case (cs)
        C_IDLE: if (start) begin
          bank_q    <= wr_data[1];
          early_q   <= wr_data[2];
          pred_q    <= wr_data[3];
          busy      <= 1'b1;
          done      <= 1'b0;
          cands_q   <= '0;
          cycles_q  <= '0;
          eng_clear <= 1'b1;
          k         <= '0;
          if (wr_data[3]) begin
            pred_phase <= 1'b1;
            y0     <= 6'(RANGE) + 6'(pdy);
            xs     <= 6'(RANGE) + 6'(pdx);
            dy_cur <= pdy;
            kend   <= CW'(BLK - 1);
          end else begin
            pred_phase <= 1'b0;
            y0     <= 6'(RANGE) - range_q;
            xs     <= 6'(RANGE) - range_q;
            dy_cur <= -8'(range_q);
            kend   <= CW'(BLK - 1) + CW'(2 * range_q);
          end
          cs <= C_SCAN;
        end
        C_SCAN: begin
          // shift the window one column left and load the next column
          for (int r = 0; r < BLK; r++) begin
            for (int c = 0; c < BLK - 1; c++) win[r*BLK + c] <= win[r*BLK + c + 1];
            win[r*BLK + BLK - 1] <= sa_m[bank_q][y0 + 6'(r)][xs + 6'(k)];
          end
          if (k >= CW'(BLK - 1)) begin
            win_valid <= 1'b1;
            win_dx    <= MV_W'(signed'({2'b00, xs}) + signed'(8'(k)) - signed'(8'(BLK - 1)) - signed'(8'(RANGE)));
            win_dy    <= MV_W'(dy_cur);
          end
          if (k == kend) begin
            k     <= '0;
            drain <= 2'd3;
            cs    <= pred_phase ? C_DRAIN_PRED : C_DRAIN;
          end else begin
            k <= k + 1'b1;
          end
          if (!pred_phase && early_q && hit) begin
            drain <= 2'd3;
            cs    <= C_DRAIN;
          end
        end
        C_DRAIN_PRED: begin
          if (drain != 0) drain <= drain - 1'b1;
          else begin
            pred_phase <= 1'b0;
            if (early_q && hit) cs <= C_DONE;
            else begin
              y0     <= 6'(RANGE) - range_q;
              xs     <= 6'(RANGE) - range_q;
              dy_cur <= -8'(range_q);
              kend   <= CW'(BLK - 1) + CW'(2 * range_q);
              cs     <= C_SCAN;
            end
          end
        end
        C_DRAIN: begin
          if (drain != 0) drain <= drain - 1'b1;
          else if ((early_q && hit) || dy_cur == 8'(range_q)) cs <= C_DONE;
          else begin
            y0     <= y0 + 1'b1;
            dy_cur <= dy_cur + 1'b1;
            cs     <= C_SCAN;
          end
        end
        C_DONE: begin
          busy <= 1'b0;
          done <= 1'b1;
          cs   <= C_IDLE;
        end
        default: cs <= C_IDLE;
      endcase
    end
  end

  assign irq_done = done;

  me_search_engine #(.BLK(BLK), .MV_W(MV_W)) u_engine (
    .clk, .rst_n,
    .clear     (eng_clear),
    .cand_valid(win_valid),
    .cur       (curv),
    .cand      (win),
    .mvx       (win_dx),
    .mvy       (win_dy),
    .thresh    (thresh_q),
    .sad, .sad_valid,
    .best_sad, .best_mvx, .best_mvy, .best_valid, .hit);
endmodule
