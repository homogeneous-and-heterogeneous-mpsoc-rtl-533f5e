// ni_initiator: network interface of a bus master (the CPU tile). Its shell
// is an AHB-lite slave on the master's 32-bit bus; its kernel talks to the
// 128-bit NoC through ni_kernel_tx (requests) and ni_kernel_rx (responses).
//
// Address map: HADDR[31:28] names the target NI (router * NLOC + local
// port), HADDR[27:0] is the byte address inside the target. For every
// transfer the NLH+TLH encoder computes the Spidergon source route from this
// NI to the target and builds the header flit.
//
// Transactions: SINGLE and INCR4 bursts of 32-bit words. A write collects
// its one or four data cells into one 128-bit payload flit (four_be marks
// the valid cells) and then holds HREADY low until the target's write
// response arrives. A read sends a header-only packet and holds HREADY low
// until the read response with its payload flit arrives; the burst beats are
// then served from that flit without further wait states. A response that
// carries an error code ends the transfer with a two-cycle AHB ERROR reply.
// One transaction is outstanding at a time.
//
// Protocol and size conversion follow the design description (32-bit AHB
// cores, 128-bit flits, header in its own flit); the address map, the
// non-posted writes and the supported burst types are this design's choices.
module ni_initiator
  import noc_pkg::*;
#(
  parameter int unsigned MY_ID      = 2,
  parameter int unsigned NLOC       = 2,
  parameter int unsigned FIFO_DEPTH = 2
) (
  input  logic         rst_n,
  // AHB-lite slave port (IP clock)
  input  logic         hclk,
  input  logic         hsel,
  input  logic [31:0]  haddr,
  input  logic [1:0]   htrans,
  input  logic         hwrite,
  input  logic [2:0]   hsize,
  input  logic [2:0]   hburst,
  input  logic [31:0]  hwdata,
  output logic [31:0]  hrdata,
  output logic         hreadyout,
  output logic         hresp,
  // NoC side (NoC clock)
  input  logic         nclk,
  output link_t        out_link,
  input  logic         credit_in,
  input  link_t        in_link,
  output logic         credit_out
);
  localparam logic [1:0] HTRANS_NONSEQ = 2'b10;
  localparam logic [2:0] HBURST_INCR4  = 3'b011;

  function automatic ni_pos_t pos_of(logic [3:0] id);
    ni_pos_t p;
    p.router = 3'(id / 4'(NLOC));
    p.lport  = 1'(id % 4'(NLOC));
    return p;
  endfunction

  typedef enum logic [2:0] {S_IDLE, S_WDATA, S_RREQ, S_WAIT, S_WDONE, S_RDATA, S_ERR1, S_ERR2} state_e;
  state_e      state;
  logic [31:0] addr_q;
  logic        write_q;
  logic [2:0]  cells_q;
  logic [1:0]  beat;
  logic [31:0] wbuf [4];
  logic [31:0] rbuf [4];
  logic        accept;

  // kernel signals
  logic                tx_hpush, tx_hfull, tx_ppush, tx_pfull;
  logic [HDR_BITS-1:0] tx_hdr;
  logic [FLIT_W-1:0]   tx_pay;
  logic [BE_W-1:0]     tx_be;
  logic                rx_hempty, rx_hpay, rx_hpop, rx_pempty, rx_ppop;
  logic [HDR_BITS-1:0] rx_hdr;
  logic [1:0]          rx_herr;
  logic [FLIT_W-1:0]   rx_pay;
  logic [BE_W-1:0]     rx_be;
  tlh_t                rsp;

  // ---------------- shell: AHB handshake ----------------
  logic last_beat;
  assign last_beat = (beat == 2'(cells_q - 3'd1));

  always_comb begin
    unique case (state)
      S_IDLE, S_WDONE, S_ERR2: hreadyout = 1'b1;
      S_WDATA:                 hreadyout = !last_beat;
      S_RDATA:                 hreadyout = 1'b1;
      default:                 hreadyout = 1'b0;
    endcase
    hresp  = (state == S_ERR1) || (state == S_ERR2);
    hrdata = (state == S_RDATA) ? rbuf[beat] : 32'h0;
    accept = hreadyout && hsel && (htrans == HTRANS_NONSEQ) &&
             (state == S_IDLE || state == S_WDONE || state == S_ERR2 || (state == S_RDATA && last_beat));
  end

  // ---------------- shell: NLH + TLH encoder ----------------
  always_comb begin
    nlh_t n;
    tlh_t t;
    n.prio   = 2'd0;
    n.route  = spidergon_route(pos_of(4'(MY_ID)), pos_of(addr_q[31:28]));
    t.opcode = write_q ? OP_WRITE : OP_READ;
    t.src_ni = 4'(MY_ID);
    t.addr   = addr_q[27:0];
    t.cells  = cells_q;
    t.err    = 2'd0;
    tx_hdr   = HDR_BITS'(make_header(n, t));
    for (int c = 0; c < 4; c++) begin
      tx_pay[32*c +: 32] = wbuf[c];
      tx_be[c]           = (3'(c) < cells_q);
    end
    if (state == S_WDATA && last_beat) tx_pay[32*beat +: 32] = hwdata;
  end

  assign tx_hpush = ((state == S_WDATA && last_beat) || state == S_RREQ) && !tx_hfull && !(write_q && tx_pfull);
  assign tx_ppush = (state == S_WDATA && last_beat) && tx_hpush;

  // ---------------- shell: TLH decoder / output FSM ----------------
  assign rsp     = hdr_tlh(FLIT_W'(rx_hdr));
  logic rsp_ready;
  assign rsp_ready = !rx_hempty && (!rx_hpay || !rx_pempty);
  assign rx_hpop   = (state == S_WAIT) && rsp_ready;
  assign rx_ppop   = rx_hpop && rx_hpay;

  always_ff @(posedge hclk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      addr_q  <= '0;
      write_q <= 1'b0;
      cells_q <= 3'd1;
      beat    <= '0;
      for (int c = 0; c < 4; c++) begin
        wbuf[c] <= '0;
        rbuf[c] <= '0;
      end
    end else begin
      if (accept) begin
        addr_q  <= haddr;
        write_q <= hwrite;
        cells_q <= (hburst == HBURST_INCR4) ? 3'd4 : 3'd1;
        beat    <= '0;
        state   <= hwrite ? S_WDATA : S_RREQ;
      end else begin
        unique case (state)
          S_WDATA: begin
            if (!last_beat) begin
              wbuf[beat] <= hwdata;
              beat       <= beat + 1'b1;
            end else if (tx_hpush) begin
              state <= S_WAIT;
            end
          end
          S_RREQ:  if (tx_hpush) state <= S_WAIT;
          S_WAIT: begin
            if (rx_hpop) begin
              if (rx_herr != 2'd0 || rsp.err != 2'd0) state <= S_ERR1;
              else if (write_q) state <= S_WDONE;
              else begin
                for (int c = 0; c < 4; c++) rbuf[c] <= rx_pay[32*c +: 32];
                beat  <= '0;
                state <= S_RDATA;
              end
            end
          end
          S_RDATA: begin
            if (last_beat) state <= S_IDLE;
            else beat <= beat + 1'b1;
          end
          S_ERR1: state <= S_ERR2;
          default: state <= S_IDLE;   // S_IDLE, S_WDONE, S_ERR2
        endcase
      end
    end
  end

  // ---------------- kernel ----------------
  ni_kernel_tx #(.FIFO_DEPTH(FIFO_DEPTH)) u_tx (
    .rst_n, .hclk,
    .hdr_push(tx_hpush), .hdr_din(tx_hdr), .hdr_has_pay(write_q), .hdr_err(2'd0), .hdr_full(tx_hfull),
    .pay_push(tx_ppush), .pay_din(tx_pay), .pay_be(tx_be), .pay_full(tx_pfull),
    .nclk, .out_link, .credit_in);

  ni_kernel_rx #(.FIFO_DEPTH(FIFO_DEPTH)) u_rx (
    .rst_n, .nclk, .in_link, .credit_out, .hclk,
    .hdr_empty(rx_hempty), .hdr_dout(rx_hdr), .hdr_has_pay(rx_hpay), .hdr_err(rx_herr), .hdr_pop(rx_hpop),
    .pay_empty(rx_pempty), .pay_dout(rx_pay), .pay_be(rx_be), .pay_pop(rx_ppop));

  a_word_only: assert property (@(posedge hclk) disable iff (!rst_n) accept |-> hsize == 3'b010);
endmodule
