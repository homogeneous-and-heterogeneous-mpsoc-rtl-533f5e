// ni_kernel_tx: transmit half of a network-interface kernel (the request
// path of an initiator NI, the response path of a target NI).
//
// The shell pushes a packet as one header entry (network and transport layer
// headers, whether a payload flit follows, error code) into the header FIFO
// and, if present, one 128-bit payload flit with its four_be mask into the
// payload FIFO. Both FIFOs are bisynchronous: the shell writes them on the IP
// clock, the output FSM reads them on the NoC clock. That is where frequency
// conversion happens; size conversion (32-bit bus cells to a 128-bit flit)
// is done by the shell before the push.
//
// Store and forward: the output FSM starts a packet only when its header and
// its payload are both in the FIFOs, so the packet then leaves bubble-free
// (header flit followed by the payload flit in the next cycle if credits
// allow). The US interface keeps a credit counter, initialised to the depth
// of the downstream router input buffer, and sends a flit only when it is
// non-zero. The outgoing link is registered.
// The two-FIFO kernel and store and forward follow the design description;
// one payload flit per packet is this design's choice (bursts of up to four
// 32-bit cells).
module ni_kernel_tx
  import noc_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 2,
  parameter int unsigned CREDITS    = 2
) (
  input  logic                rst_n,
  // IP clock domain
  input  logic                hclk,
  input  logic                hdr_push,
  input  logic [HDR_BITS-1:0] hdr_din,
  input  logic                hdr_has_pay,
  input  logic [1:0]          hdr_err,
  output logic                hdr_full,
  input  logic                pay_push,
  input  logic [FLIT_W-1:0]   pay_din,
  input  logic [BE_W-1:0]     pay_be,
  output logic                pay_full,
  // NoC clock domain
  input  logic                nclk,
  output link_t               out_link,
  input  logic                credit_in
);
  localparam int unsigned HW = HDR_BITS + 3;
  localparam int unsigned PW = FLIT_W + BE_W;
  localparam int unsigned CW = $clog2(CREDITS + 1);

  logic [HW-1:0] hdr_q;
  logic [PW-1:0] pay_q;
  logic          hdr_empty, pay_empty, hdr_pop, pay_pop;
  logic [$clog2(FIFO_DEPTH):0] hdr_cnt, pay_cnt;

  bisync_fifo #(.W(HW), .DEPTH(FIFO_DEPTH)) u_hdr (
    .rst_n, .wclk(hclk), .push(hdr_push), .din({hdr_err, hdr_has_pay, hdr_din}), .full(hdr_full),
    .rclk(nclk), .pop(hdr_pop), .dout(hdr_q), .empty(hdr_empty), .rcount(hdr_cnt));

  bisync_fifo #(.W(PW), .DEPTH(FIFO_DEPTH)) u_pay (
    .rst_n, .wclk(hclk), .push(pay_push), .din({pay_be, pay_din}), .full(pay_full),
    .rclk(nclk), .pop(pay_pop), .dout(pay_q), .empty(pay_empty), .rcount(pay_cnt));

  // output FSM
  typedef enum logic {S_HDR, S_PAY} state_e;
  state_e        state;
  logic [CW-1:0] cred;
  logic          has_pay;
  logic [1:0]    err_q, err_cur;
  logic          send;
  link_t         f;

  assign has_pay = hdr_q[HDR_BITS];

  always_comb begin
    hdr_pop = 1'b0;
    pay_pop = 1'b0;
    send    = 1'b0;
    f       = LINK_IDLE;
    if (cred != 0) begin
      if (state == S_HDR) begin
        if (!hdr_empty && (!has_pay || !pay_empty)) begin
          hdr_pop         = 1'b1;
          send            = 1'b1;
          f.valid         = 1'b1;
          f.flit_id       = has_pay ? FLIT_FIRST : FLIT_SINGLE;
          f.flit_id_error = hdr_q[HW-1 -: 2];
          f.flit          = FLIT_W'(hdr_q[HDR_BITS-1:0]);
        end
      end else if (!pay_empty) begin
        pay_pop         = 1'b1;
        send            = 1'b1;
        f.valid         = 1'b1;
        f.flit_id       = FLIT_LAST;
        f.flit_id_error = err_cur;
        f.four_be       = pay_q[PW-1 -: BE_W];
        f.flit          = pay_q[FLIT_W-1:0];
      end
    end
  end

  assign err_cur = err_q;

  always_ff @(posedge nclk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_HDR;
      cred     <= CW'(CREDITS);
      out_link <= LINK_IDLE;
      err_q    <= '0;
    end else begin
      out_link <= f;
      cred     <= cred - CW'(send) + CW'(credit_in);
      if (hdr_pop && has_pay) begin
        state <= S_PAY;
        err_q <= hdr_q[HW-1 -: 2];
      end
      if (pay_pop) state <= S_HDR;
    end
  end

  a_credit_bound: assert property (@(posedge nclk) disable iff (!rst_n) cred <= CW'(CREDITS));
endmodule
