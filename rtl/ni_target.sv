// ni_target: network interface of a bus slave (a memory tile or the AHB
// wrapper of a computing tile). Its kernel receives request packets from the
// NoC; its shell decodes the transport layer header and replays the request
// as AHB-lite master transfers on the slave's 32-bit bus, then returns a
// response packet to the NI named in the request.
//
// Each 32-bit cell of a request becomes one non-pipelined AHB SINGLE
// transfer (address phase, then data phase, waiting on HREADY), at
// consecutive word addresses. A read response carries the read cells in one
// 128-bit payload flit; a write response is a header-only packet. An AHB
// ERROR reply from the slave sets the error code of the response and its
// flit_id_error bits. One request is handled at a time.
//
// Shell/kernel split, header decoding and size conversion follow the design
// description; the single-transfer replay is this design's choice.
module ni_target
  import noc_pkg::*;
#(
  parameter int unsigned MY_ID      = 0,
  parameter int unsigned NLOC       = 2,
  parameter int unsigned FIFO_DEPTH = 2
) (
  input  logic         rst_n,
  // AHB-lite master port (IP clock)
  input  logic         hclk,
  output logic [31:0]  haddr,
  output logic [1:0]   htrans,
  output logic         hwrite,
  output logic [2:0]   hsize,
  output logic [2:0]   hburst,
  output logic [31:0]  hwdata,
  input  logic [31:0]  hrdata,
  input  logic         hready,
  input  logic         hresp,
  // NoC side (NoC clock)
  input  logic         nclk,
  input  link_t        in_link,
  output logic         credit_out,
  output link_t        out_link,
  input  logic         credit_in
);
  function automatic ni_pos_t pos_of(logic [3:0] id);
    ni_pos_t p;
    p.router = 3'(id / 4'(NLOC));
    p.lport  = 1'(id % 4'(NLOC));
    return p;
  endfunction

  typedef enum logic [1:0] {T_IDLE, T_ADDR, T_DATA, T_RSP} state_e;
  state_e      state;
  tlh_t        req_q;
  logic [1:0]  idx;
  logic [31:0] wbuf [4];
  logic [31:0] rbuf [4];
  logic        err_q;

  logic                rx_hempty, rx_hpay, rx_hpop, rx_pempty, rx_ppop;
  logic [HDR_BITS-1:0] rx_hdr;
  logic [1:0]          rx_herr;
  logic [FLIT_W-1:0]   rx_pay;
  logic [BE_W-1:0]     rx_be;
  logic                tx_hpush, tx_hfull, tx_ppush, tx_pfull;
  logic [HDR_BITS-1:0] tx_hdr;
  logic [FLIT_W-1:0]   tx_pay;
  logic                is_write;

  assign is_write = (req_q.opcode == OP_WRITE);
  assign rx_hpop  = (state == T_IDLE) && !rx_hempty && (!rx_hpay || !rx_pempty);
  assign rx_ppop  = rx_hpop && rx_hpay;

  // AHB master outputs
  assign haddr  = {4'h0, req_q.addr} + {28'd0, idx, 2'b00};
  assign htrans = (state == T_ADDR) ? 2'b10 : 2'b00;
  assign hwrite = is_write;
  assign hsize  = 3'b010;
  assign hburst = 3'b000;
  assign hwdata = wbuf[idx];

  // response header
  always_comb begin
    nlh_t n;
    tlh_t t;
    n.prio   = 2'd0;
    n.route  = spidergon_route(pos_of(4'(MY_ID)), pos_of(req_q.src_ni));
    t.opcode = is_write ? OP_WRITE_RSP : OP_READ_RSP;
    t.src_ni = 4'(MY_ID);
    t.addr   = req_q.addr;
    t.cells  = req_q.cells;
    t.err    = err_q ? 2'd1 : 2'd0;
    tx_hdr   = HDR_BITS'(make_header(n, t));
    for (int c = 0; c < 4; c++) tx_pay[32*c +: 32] = rbuf[c];
  end
  assign tx_hpush = (state == T_RSP) && !tx_hfull && (is_write || !tx_pfull);
  assign tx_ppush = tx_hpush && !is_write;

  always_ff @(posedge hclk or negedge rst_n) begin
    if (!rst_n) begin
      state <= T_IDLE;
      req_q <= '0;
      idx   <= '0;
      err_q <= 1'b0;
      for (int c = 0; c < 4; c++) begin
        wbuf[c] <= '0;
        rbuf[c] <= '0;
      end
    end else begin
      unique case (state)
        T_IDLE: if (rx_hpop) begin
          req_q <= hdr_tlh(FLIT_W'(rx_hdr));
          for (int c = 0; c < 4; c++) wbuf[c] <= rx_pay[32*c +: 32];
          idx   <= '0;
          err_q <= (rx_herr != 2'd0);
          state <= T_ADDR;
        end
        T_ADDR: if (hready) state <= T_DATA;
        T_DATA: if (hready) begin
          if (!is_write) rbuf[idx] <= hrdata;
          if (hresp) err_q <= 1'b1;
          if (idx == 2'(req_q.cells - 3'd1)) state <= T_RSP;
          else begin
            idx   <= idx + 1'b1;
            state <= T_ADDR;
          end
        end
        T_RSP: if (tx_hpush) state <= T_IDLE;
        default: state <= T_IDLE;
      endcase
    end
  end

  ni_kernel_rx #(.FIFO_DEPTH(FIFO_DEPTH)) u_rx (
    .rst_n, .nclk, .in_link, .credit_out, .hclk,
    .hdr_empty(rx_hempty), .hdr_dout(rx_hdr), .hdr_has_pay(rx_hpay), .hdr_err(rx_herr), .hdr_pop(rx_hpop),
    .pay_empty(rx_pempty), .pay_dout(rx_pay), .pay_be(rx_be), .pay_pop(rx_ppop));

  ni_kernel_tx #(.FIFO_DEPTH(FIFO_DEPTH)) u_tx (
    .rst_n, .hclk,
    .hdr_push(tx_hpush), .hdr_din(tx_hdr), .hdr_has_pay(!is_write), .hdr_err(err_q ? 2'd1 : 2'd0), .hdr_full(tx_hfull),
    .pay_push(tx_ppush), .pay_din(tx_pay), .pay_be(BE_W'((1 << req_q.cells) - 1)), .pay_full(tx_pfull),
    .nclk, .out_link, .credit_in);

  a_cells: assert property (@(posedge hclk) disable iff (!rst_n)
    (state != T_IDLE) |-> (req_q.cells >= 3'd1 && req_q.cells <= 3'd4));
endmodule
