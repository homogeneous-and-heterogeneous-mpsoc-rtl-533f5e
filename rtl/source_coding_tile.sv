// source_coding_tile: bit-stream-level source coder of the heterogeneous
// MPSoC, here a variable-length coder. It reads NVAL 16-bit syntax values
// from its input memory, maps each to an Exp-Golomb codeword and packs the
// codewords MSB-first into 32-bit words of its output memory.
//
// Exp-Golomb code of a code number v >= 0: with L = floor(log2(v+1)), L zero
// bits followed by the L+1-bit binary value v+1 (ue(v) of H.264). In signed
// mode a value k is first mapped to v = 2k-1 for k > 0 and v = -2k otherwise
// (se(v)). The packer keeps up to 64 pending bits: in a cycle where at least
// 32 bits are pending it writes one output word, otherwise it accepts one
// value, so short codes are coded at one value per cycle. At the end the last
// partial word is padded with zeros; NBITS reports the exact bit count.
// The design description only names variable-length coding and CABAC for
// this tile; the choice of Exp-Golomb and everything here is this design's.
// CABAC is not implemented.
//
// Local memory: 256 16-bit input values and 832 32-bit output words, about
// the 30 kbit of the description.
// AHB address map (byte offsets):
//   0x0000 CTRL (W) bit0 start, bit1 signed mapping   0x0004 NVAL (R/W)
//   0x0008 STATUS (R) bit0 busy, bit1 done   0x000C NBITS (R)   0x0010 NWORDS (R)
//   0x0014 CYCLES (R)
//   0x1000 + 4i input value i (bits 15:0)   0x2000 + 4w output word w
module source_coding_tile #(
  parameter int unsigned NIN  = 256,
  parameter int unsigned NOUT = 832
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
  localparam int unsigned IW = $clog2(NIN);
  localparam int unsigned OW = $clog2(NOUT);

  logic [15:0] in_m  [NIN];
  logic [31:0] out_m [NOUT];

  logic        rd_en, wr_en, addr_err;
  logic [14:0] rd_addr, wr_addr;
  logic [31:0] rd_data, wr_data;

  ahb_slave_port #(.AW(15)) u_port (
    .clk, .rst_n, .hsel, .haddr, .htrans, .hwrite, .hwdata, .hrdata, .hreadyout, .hresp,
    .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data, .addr_err);

  assign addr_err = (haddr[31:15] != 0) ||
                    (haddr[14:12] == 3'd0 && haddr[11:5] != 0) ||
                    (haddr[14:12] == 3'd1 && haddr[11:2] >= 10'(NIN)) ||
                    (haddr[14:12] >= 3'd2 && (haddr[14:2] - 13'h800) >= 13'(NOUT));

  logic        busy, done, signed_q;
  logic [IW:0] nval;
  logic [31:0] nbits, cycles;
  logic [OW:0] nwords;

  logic [OW-1:0] ro;
  assign ro = OW'(rd_addr[14:2] - 13'h800);

  always_ff @(posedge clk) begin
    if (rd_en) begin
      if (rd_addr[14:12] == 3'd1)      rd_data <= 32'(in_m[IW'(rd_addr[IW+1:2])]);
      else if (rd_addr[14:12] >= 3'd2) rd_data <= out_m[ro];
      else unique case (rd_addr[4:2])
        3'd1: rd_data <= 32'(nval);
        3'd2: rd_data <= {30'h0, done, busy};
        3'd3: rd_data <= nbits;
        3'd4: rd_data <= 32'(nwords);
        3'd5: rd_data <= cycles;
        default: rd_data <= '0;
      endcase
    end
  end

  // ---------------- coder ----------------
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FLUSH, S_DONE} state_e;
  state_e      st;
  logic [IW:0] rd_idx;
  logic        rd_v;
  logic [15:0] val;
  logic [63:0] acc;          // pending bits, left-aligned at bit 63
  logic [6:0]  nacc;
  logic [16:0] code_num;
  logic [4:0]  lz;
  logic [5:0]  clen;
  logic [32:0] cw;           // codeword right-aligned
  logic        emit, take;

  always_ff @(posedge clk)
    if (st == S_RUN && (!rd_v || take) && rd_idx < nval) val <= in_m[IW'(rd_idx)];

  always_comb begin
    logic signed [16:0] k;
    logic [16:0]        v1;
    k = 17'(signed'(val));
    if (signed_q) code_num = (k > 0) ? 17'(2 * k - 1) : 17'(-2 * k);
    else          code_num = 17'(val);
    v1 = code_num + 17'd1;
    lz = '0;
    for (int i = 1; i < 17; i++) if (v1 >= (17'd1 << i)) lz = 5'(i);
    clen = 6'(2 * lz + 1);
    cw   = 33'(v1);
  end

  assign emit = (nacc >= 7'd32);
  assign take = rd_v && !emit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= S_IDLE;
      busy     <= 1'b0;
      done     <= 1'b0;
      signed_q <= 1'b0;
      nval     <= '0;
      nbits    <= '0;
      nwords   <= '0;
      cycles   <= '0;
      rd_idx   <= '0;
      rd_v     <= 1'b0;
      acc      <= '0;
      nacc     <= '0;
    end else begin
      if (wr_en && wr_addr[14:2] == 13'd1) nval <= wr_data[IW:0];
      if (busy) cycles <= cycles + 1;
      unique case (st)
        S_IDLE: if (wr_en && wr_addr[14:2] == 13'd0 && wr_data[0]) begin
          signed_q <= wr_data[1];
          busy     <= 1'b1;
          done     <= 1'b0;
          nbits    <= '0;
          nwords   <= '0;
          cycles   <= '0;
          rd_idx   <= '0;
          rd_v     <= 1'b0;
          acc      <= '0;
          nacc     <= '0;
          st       <= S_RUN;
        end
        S_RUN: begin
          // read the next value unless the current one is still waiting
          if (!rd_v || take) begin
            if (rd_idx < nval) begin
              rd_idx <= rd_idx + 1'b1;
              rd_v   <= 1'b1;
            end else begin
              rd_v <= 1'b0;
            end
          end
          if (emit) begin
            acc    <= acc << 32;
            nacc   <= nacc - 7'd32;
            nwords <= nwords + 1'b1;
          end else if (take) begin
            acc   <= acc | ((64'(cw) << (7'd64 - 7'(clen))) >> nacc);
            nacc  <= nacc + 7'(clen);
            nbits <= nbits + 32'(clen);
          end else if (!rd_v && rd_idx >= nval) begin
            st <= S_FLUSH;
          end
        end
        S_FLUSH: begin
          if (nacc != 0) begin
            acc    <= acc << 32;
            nacc   <= (nacc >= 7'd32) ? nacc - 7'd32 : 7'd0;
            nwords <= nwords + 1'b1;
          end else st <= S_DONE;
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
    if (wr_en && wr_addr[14:12] == 3'd1) in_m[IW'(wr_addr[IW+1:2])] <= wr_data[15:0];
    if ((st == S_RUN && emit) || (st == S_FLUSH && nacc != 0)) out_m[OW'(nwords)] <= acc[63:32];
  end

  assign irq_done = done;
endmodule
