// ext_mem_ctrl: external-memory tile of the heterogeneous MPSoC. It holds a
// 1 Mbit local buffer (32,768 32-bit words, the size in the design
// description) and a DMA engine that moves blocks of words between that
// buffer and the off-chip memory (DDR-DRAM or ROM/EEPROM). Other tiles reach
// the buffer and the DMA registers through the tile's AHB slave port, i.e.
// over the NoC. This is the third level of the memory hierarchy.
//
// The off-chip side is a generic word-wide request port, not a DDR PHY: the
// DMA holds ext_req with ext_addr/ext_we/ext_wdata until ext_gnt, and a read
// returns its word with ext_rvalid (any later cycle). The DMA moves one word
// at a time (request, then wait for the read data), which keeps it simple at
// the cost of bandwidth. The DDR command protocol and PHY are outside this
// design; the DMA function and the buffer size come from the description,
// the port and register map are this design's choices.
//
// AHB address map (byte offsets):
//   0x00000 + 4w  local buffer word w (w < 32768)
//   0x20000 CTRL (W) bit0 start, bit1 direction (0: external -> buffer,
//                    1: buffer -> external)
//   0x20004 EXT_ADDR (R/W) external word address   0x20008 LOC_ADDR (R/W) buffer word
//   0x2000C LEN (R/W) words to move               0x20010 STATUS (R) bit0 busy, bit1 done
//   0x20014 CYCLES (R) cycles taken by the last transfer
module ext_mem_ctrl #(
  parameter int unsigned WORDS = 32768
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
  // external memory port
  output logic        ext_req,
  output logic        ext_we,
  output logic [31:0] ext_addr,
  output logic [31:0] ext_wdata,
  input  logic        ext_gnt,
  input  logic        ext_rvalid,
  input  logic [31:0] ext_rdata,
  output logic        irq_done
);
  localparam int unsigned IW = $clog2(WORDS);

  logic [31:0] buf_m [WORDS];

  logic        rd_en, wr_en, addr_err;
  logic [17:0] rd_addr, wr_addr;
  logic [31:0] rd_data, wr_data;

  ahb_slave_port #(.AW(18)) u_port (
    .clk, .rst_n, .hsel, .haddr, .htrans, .hwrite, .hwdata, .hrdata, .hreadyout, .hresp,
    .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data, .addr_err);

  assign addr_err = (haddr[31:18] != 0) ||
                    (!haddr[17] && 32'(haddr[16:2]) >= 32'(WORDS)) ||
                    (haddr[17] && haddr[16:2] > 15'd5);

  logic          busy, done;
  logic [31:0]   ext_base, cycles;
  logic [IW-1:0] loc_base;
  logic [IW:0]   len, cnt;

  typedef enum logic [2:0] {D_IDLE, D_RDLOC, D_WREXT, D_REQ, D_WAIT, D_DONE} dstate_e;
  dstate_e       ds;
  logic [31:0]   ldata;
  logic          dma_we;
  logic [IW-1:0] dma_addr;

  assign dma_addr  = loc_base + IW'(cnt);
  assign ext_req   = (ds == D_WREXT) || (ds == D_REQ);
  assign ext_we    = (ds == D_WREXT);
  assign ext_addr  = ext_base + 32'(cnt);
  assign ext_wdata = ldata;
  assign dma_we    = (ds == D_WAIT) && ext_rvalid;
  assign irq_done  = done;

  // local buffer: bus port and DMA port
  always_ff @(posedge clk) begin
    if (dma_we) buf_m[dma_addr] <= ext_rdata;
    else if (wr_en && !wr_addr[17]) buf_m[IW'(wr_addr[16:2])] <= wr_data;
    if (ds == D_RDLOC) ldata <= buf_m[dma_addr];
    if (rd_en) begin
      if (!rd_addr[17]) rd_data <= buf_m[IW'(rd_addr[16:2])];
      else unique case (rd_addr[4:2])
        3'd1: rd_data <= ext_base;
        3'd2: rd_data <= 32'(loc_base);
        3'd3: rd_data <= 32'(len);
        3'd4: rd_data <= {30'h0, done, busy};
        3'd5: rd_data <= cycles;
        default: rd_data <= '0;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ds       <= D_IDLE;
      busy     <= 1'b0;
      done     <= 1'b0;
      ext_base <= '0;
      loc_base <= '0;
      len      <= '0;
      cnt      <= '0;
      cycles   <= '0;
    end else begin
      if (wr_en && wr_addr[17]) unique case (wr_addr[4:2])
        3'd1: ext_base <= wr_data;
        3'd2: loc_base <= wr_data[IW-1:0];
        3'd3: len      <= wr_data[IW:0];
        default: ;
      endcase
      if (busy) cycles <= cycles + 1;
      unique case (ds)
        D_IDLE: if (wr_en && wr_addr[17] && wr_addr[4:2] == 3'd0 && wr_data[0]) begin
          busy   <= 1'b1;
          done   <= 1'b0;
          cnt    <= '0;
          cycles <= '0;
          ds     <= (len == 0) ? D_DONE : (wr_data[1] ? D_RDLOC : D_REQ);
        end
        D_RDLOC: ds <= D_WREXT;
        D_WREXT: if (ext_gnt) begin
          cnt <= cnt + 1'b1;
          ds  <= (cnt + 1'b1 == len) ? D_DONE : D_RDLOC;
        end
        D_REQ:  if (ext_gnt) ds <= D_WAIT;
        D_WAIT: if (ext_rvalid) begin
          cnt <= cnt + 1'b1;
          ds  <= (cnt + 1'b1 == len) ? D_DONE : D_REQ;
        end
        D_DONE: begin
          busy <= 1'b0;
          done <= 1'b1;
          ds   <= D_IDLE;
        end
        default: ds <= D_IDLE;
      endcase
    end
  end
endmodule
