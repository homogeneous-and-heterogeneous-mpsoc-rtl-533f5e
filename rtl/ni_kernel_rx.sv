// ni_kernel_rx: receive half of a network-interface kernel (the response
// path of an initiator NI, the request path of a target NI).
//
// The DS interface holds incoming flits in a small input buffer and returns
// one credit per flit it frees. The input FSM sorts flits by flit_id: a head
// flit (single or first) goes to the header FIFO together with a flag that
// tells whether a payload flit follows and the flit_id_error bits; a payload
// flit goes, with its four_be mask, to the payload FIFO. Both FIFOs are
// bisynchronous and are read by the shell on the IP clock.
// The structure follows the NI block diagram; the input-buffer depth equals
// the credit count the router's output starts with (2).
module ni_kernel_rx
  import noc_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 2,
  parameter int unsigned BUF_DEPTH  = 2
) (
  input  logic                rst_n,
  // NoC clock domain
  input  logic                nclk,
  input  link_t               in_link,
  output logic                credit_out,
  // IP clock domain
  input  logic                hclk,
  output logic                hdr_empty,
  output logic [HDR_BITS-1:0] hdr_dout,
  output logic                hdr_has_pay,
  output logic [1:0]          hdr_err,
  input  logic                hdr_pop,
  output logic                pay_empty,
  output logic [FLIT_W-1:0]   pay_dout,
  output logic [BE_W-1:0]     pay_be,
  input  logic                pay_pop
);
  localparam int unsigned LW = $bits(link_t);
  localparam int unsigned HW = HDR_BITS + 3;
  localparam int unsigned PW = FLIT_W + BE_W;

  logic [LW-1:0] ds_q;
  link_t         head;
  logic          ds_empty, ds_full, ds_pop;
  logic [$clog2(BUF_DEPTH+1)-1:0] ds_cnt;
  logic          hfull, pfull, hpush, ppush;
  logic [HW-1:0] hq;
  logic [PW-1:0] pq;
  logic [$clog2(FIFO_DEPTH):0] hcnt, pcnt;

  noc_fifo #(.W(LW), .DEPTH(BUF_DEPTH)) u_ds (
    .clk(nclk), .rst_n, .push(in_link.valid), .din(in_link), .pop(ds_pop),
    .dout(ds_q), .empty(ds_empty), .full(ds_full), .count(ds_cnt));

  assign head  = link_t'(ds_q);
  assign hpush = !ds_empty && is_head(head.flit_id) && !hfull;
  assign ppush = !ds_empty && !is_head(head.flit_id) && !pfull;
  assign ds_pop     = hpush || ppush;
  assign credit_out = ds_pop;

  bisync_fifo #(.W(HW), .DEPTH(FIFO_DEPTH)) u_hdr (
    .rst_n, .wclk(nclk), .push(hpush),
    .din({head.flit_id_error, head.flit_id == FLIT_FIRST, head.flit[HDR_BITS-1:0]}), .full(hfull),
    .rclk(hclk), .pop(hdr_pop), .dout(hq), .empty(hdr_empty), .rcount(hcnt));

  bisync_fifo #(.W(PW), .DEPTH(FIFO_DEPTH)) u_pay (
    .rst_n, .wclk(nclk), .push(ppush), .din({head.four_be, head.flit}), .full(pfull),
    .rclk(hclk), .pop(pay_pop), .dout(pq), .empty(pay_empty), .rcount(pcnt));

  assign hdr_dout    = hq[HDR_BITS-1:0];
  assign hdr_has_pay = hq[HDR_BITS];
  assign hdr_err     = hq[HW-1 -: 2];
  assign pay_dout    = pq[FLIT_W-1:0];
  assign pay_be      = pq[PW-1 -: BE_W];
endmodule
