// transf_tile: 1D/2D frequency-transform ASIP of the heterogeneous MPSoC.
//
// Structure as in the tile's block diagram: AMBA AHB wrapper, local buffer,
// first 1D transform engine, transpose memory, second 1D transform engine,
// control unit. The elementary data structure is an array of 8 samples.
// For images the 2D transform is computed by separability: an 8x8 block is
// transformed row by row in the first engine, the results are held in the
// transpose memory and the second engine transforms its columns. For audio
// (1D mode) the second stage is bypassed and every 8-sample array of the
// buffer is transformed independently.
//
// Arithmetic is block floating point: each 1D result vector (1D mode), or
// each 8x8 intermediate and final block (2D mode), is shifted right by the
// smallest exponent e that makes all its values fit in 16 bits; the result
// samples are stored as 16-bit mantissas and the exponent (the sum of both
// stages' exponents in 2D mode) is stored per vector or per block. Rounding
// is by truncation (arithmetic shift), a choice of this design.
//
// Local memory: 1024 16-bit input samples and 1024 16-bit results (32 kbit,
// as in the design description), plus one 4-bit exponent per vector/block.
// Throughput: one 8-sample vector per cycle in 1D mode; about 30 cycles per
// 8x8 block in 2D mode (the engines are not overlapped across blocks, a
// simplification of this design).
//
// AHB address map (byte offsets):
//   0x0000 CTRL   (W) bit0 start, bit1 2D mode, bit2 inverse transform
//   0x0004 NVEC   (R/W) 8-sample vectors (1D) or 8x8 blocks (2D) to process
//   0x0008 STATUS (R) bit0 busy, bit1 done
//   0x000C CYCLES (R) cycles taken by the last run
//   0x1000 + 4w   input buffer word w (samples 2w and 2w+1, low half first)
//   0x2000 + 4w   output buffer word w (same packing)
//   0x3000 + 4i   exponent of vector/block i
module transf_tile #(
  parameter int unsigned SAMPLES = 1024
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
  localparam int unsigned ROWS = SAMPLES / 8;
  localparam int unsigned RW   = $clog2(ROWS);
  localparam int unsigned WW   = $clog2(SAMPLES / 2);

  typedef logic signed [15:0] s16_t;
  typedef logic signed [19:0] s20_t;

  logic [7:0][15:0] in_m  [ROWS];
  logic [7:0][15:0] out_m [ROWS];
  logic [3:0]       exp_m [ROWS];

  // ---------------- bus ----------------
  logic        rd_en, wr_en, addr_err;
  logic [15:0] rd_addr, wr_addr;
  logic [31:0] rd_data, wr_data;

  ahb_slave_port #(.AW(16)) u_port (
    .clk, .rst_n, .hsel, .haddr, .htrans, .hwrite, .hwdata, .hrdata, .hreadyout, .hresp,
    .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data, .addr_err);

  assign addr_err = (haddr[31:16] != 0) || (haddr[15:14] != 0) ||
                    (haddr[13:12] == 2'd0 && haddr[11:4] != 0) ||
                    (haddr[13:12] != 2'd0 && haddr[11:2] >= 10'(SAMPLES / 2));

  logic        busy, done, mode2d, inv;
  logic [RW:0] nvec;
  logic [31:0] cycles;

  logic [WW-1:0] rw, ww;
  assign rw = rd_addr[WW+1:2];
  assign ww = wr_addr[WW+1:2];

  always_ff @(posedge clk) begin
    if (rd_en) begin
      unique case (rd_addr[13:12])
        2'd0: unique case (rd_addr[3:2])
                2'd1: rd_data <= 32'(nvec);
                2'd2: rd_data <= {30'h0, done, busy};
                2'd3: rd_data <= cycles;
                default: rd_data <= '0;
              endcase
        2'd1: rd_data <= {in_m[rw[WW-1:2]][{rw[1:0], 1'b1}], in_m[rw[WW-1:2]][{rw[1:0], 1'b0}]};
        2'd2: rd_data <= {out_m[rw[WW-1:2]][{rw[1:0], 1'b1}], out_m[rw[WW-1:2]][{rw[1:0], 1'b0}]};
        default: rd_data <= 32'(exp_m[RW'(rd_addr[RW+1:2])]);
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en && wr_addr[13:12] == 2'd1) begin
      in_m[ww[WW-1:2]][{ww[1:0], 1'b0}] <= wr_data[15:0];
      in_m[ww[WW-1:2]][{ww[1:0], 1'b1}] <= wr_data[31:16];
    end
  end

  // ---------------- block floating point ----------------
  // smallest e in 0..4 such that v >>> e fits in 16 bits
  function automatic logic [2:0] bfp_exp(s20_t v);
    for (int e = 0; e < 4; e++)
      if ((v >>> e) <= 20'sd32767 && (v >>> e) >= -20'sd32768) return 3'(e);
    return 3'd4;
  endfunction

  // ---------------- engines ----------------
  logic  e1_in_v, e1_out_v, e2_in_v, e2_out_v;
  s16_t  e1_x [8], e2_x [8];
  s20_t  e1_y [8], e2_y [8];

  dct_engine u_eng1 (.clk, .rst_n, .mode(inv), .in_valid(e1_in_v), .x(e1_x), .out_valid(e1_out_v), .y(e1_y));
  dct_engine u_eng2 (.clk, .rst_n, .mode(inv), .in_valid(e2_in_v), .x(e2_x), .out_valid(e2_out_v), .y(e2_y));

  // ---------------- control unit ----------------
  typedef enum logic [2:0] {S_IDLE, S_ROWS, S_NORM1, S_COLS, S_NORM2, S_WRITE, S_DONE} state_e;
  state_e      st;
  logic [RW:0] issue, collect;       // vector counters (1D) / row counters (2D)
  logic [RW:0] blk;
  logic [3:0]  icnt, ocnt;           // row/column counters inside a block
  s20_t        tr  [8][8];           // transpose memory (row results)
  s20_t        res [8][8];           // column results, res[k][c]
  logic [2:0]  e1, e2;
  logic [2:0]  e_row;
  logic [2:0]  e_blk1, e_blk2;

  always_comb begin
    e_row = 3'd0;
    for (int i = 0; i < 8; i++) if (bfp_exp(e1_y[i]) > e_row) e_row = bfp_exp(e1_y[i]);
    e_blk1 = 3'd0;
    e_blk2 = 3'd0;
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) begin
        if (bfp_exp(tr[r][c])  > e_blk1) e_blk1 = bfp_exp(tr[r][c]);
        if (bfp_exp(res[r][c]) > e_blk2) e_blk2 = bfp_exp(res[r][c]);
      end
  end

  // engine inputs
  always_comb begin
    e1_in_v = 1'b0;
    e2_in_v = 1'b0;
    for (int i = 0; i < 8; i++) begin
      e1_x[i] = s16_t'(in_m[RW'(issue)][i]);
      e2_x[i] = s16_t'(tr[i][icnt[2:0]] >>> e1);
    end
    if (st == S_ROWS && !mode2d && issue < nvec) e1_in_v = 1'b1;
    if (st == S_ROWS &&  mode2d && icnt < 4'd8)  e1_in_v = 1'b1;
    if (st == S_COLS && icnt < 4'd8)             e2_in_v = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= S_IDLE;
      busy    <= 1'b0;
      done    <= 1'b0;
      mode2d  <= 1'b0;
      inv     <= 1'b0;
      nvec    <= '0;
      cycles  <= '0;
      issue   <= '0;
      collect <= '0;
      blk     <= '0;
      icnt    <= '0;
      ocnt    <= '0;
      e1      <= '0;
      e2      <= '0;
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) begin
          tr[r][c]  <= '0;
          res[r][c] <= '0;
        end
    end else begin
      if (wr_en && wr_addr[13:2] == 12'd1) nvec <= wr_data[RW:0];
      if (busy) cycles <= cycles + 1;
      unique case (st)
        S_IDLE: if (wr_en && wr_addr[13:2] == 12'd0 && wr_data[0]) begin
          mode2d  <= wr_data[1];
          inv     <= wr_data[2];
          busy    <= 1'b1;
          done    <= 1'b0;
          cycles  <= '0;
          issue   <= '0;
          collect <= '0;
          blk     <= '0;
          icnt    <= '0;
          ocnt    <= '0;
          st      <= S_ROWS;
        end
        S_ROWS: begin
          if (!mode2d) begin
            // 1D: stream vectors, normalise each result vector on the fly
            if (e1_in_v) issue <= issue + 1'b1;
            if (e1_out_v) collect <= collect + 1'b1;
            if (collect == nvec || (e1_out_v && collect + 1'b1 == nvec)) st <= S_DONE;
          end else begin
            if (e1_in_v) begin
              issue <= issue + 1'b1;
              icnt  <= icnt + 1'b1;
            end
            if (e1_out_v) begin
              for (int c = 0; c < 8; c++) tr[ocnt[2:0]][c] <= e1_y[c];
              ocnt <= ocnt + 1'b1;
              if (ocnt == 4'd7) st <= S_NORM1;
            end
          end
        end
        S_NORM1: begin
          e1   <= e_blk1;
          icnt <= '0;
          ocnt <= '0;
          st   <= S_COLS;
        end
        S_COLS: begin
          if (e2_in_v) icnt <= icnt + 1'b1;
          if (e2_out_v) begin
            for (int k = 0; k < 8; k++) res[k][ocnt[2:0]] <= e2_y[k];
            ocnt <= ocnt + 1'b1;
            if (ocnt == 4'd7) st <= S_NORM2;
          end
        end
        S_NORM2: begin
          e2   <= e_blk2;
          ocnt <= '0;
          st   <= S_WRITE;
        end
        S_WRITE: begin
          ocnt <= ocnt + 1'b1;
          if (ocnt == 4'd7) begin
            icnt <= '0;
            ocnt <= '0;
            blk  <= blk + 1'b1;
            st   <= (blk + 1'b1 == nvec) ? S_DONE : S_ROWS;
          end
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

  // result and exponent memory writes
  always_ff @(posedge clk) begin
    if (st == S_ROWS && !mode2d && e1_out_v) begin
      for (int i = 0; i < 8; i++) out_m[RW'(collect)][i] <= 16'(e1_y[i] >>> e_row);
      exp_m[RW'(collect)] <= 4'(e_row);
    end
    if (st == S_WRITE) begin
      for (int i = 0; i < 8; i++) out_m[RW'({blk, 3'b000}) + RW'(ocnt[2:0])][i] <= 16'(res[ocnt[2:0]][i] >>> e2);
      if (ocnt == 4'd0) exp_m[RW'(blk)] <= 4'(e1) + 4'(e2);
    end
  end

  assign irq_done = done;
endmodule
