// noc_router: packet-switched wormhole router of the Spidergon NoC with
// credit-based flow control.
//
// Per port (left to right as in the router block diagram): the DS interface
// with a small input buffer, the input stage that decodes the network layer
// header (NLH) of a head flit, the switching matrix (a multiplexer per
// output), the output stage with an arbiter, and the US interface with its
// credit manager.
//
// Routing needs no tables: the NI writes the whole path into the NLH when it
// injects a packet. The low three bits of the route name this router's
// output port; the router shifts the route by three bits before forwarding,
// so the next router again finds its port in the low bits. A head flit that
// wins arbitration locks its output until the tail flit passes (wormhole).
// Arbitration is the two-step priority + least-recently-used scheme of
// lru_arbiter. A flit is only sent when the credit counter of the output is
// non-zero; the counter starts at the depth of the downstream input buffer,
// drops by one per flit sent and rises by one per credit pulse received, so
// flits are never dropped or retransmitted. A credit pulse is returned
// upstream in the same cycle a flit leaves an input buffer.
//
// Timing: one pipeline stage, the input buffer. A flit on an input link in
// cycle k is written into the buffer at the end of cycle k and, when it wins
// at once, is on the output link in cycle k+1 (crossing latency of one
// cycle). The output link is driven from the buffer head through the
// arbiter and the switching matrix without a further register; the next
// router's input buffer registers it. The optional output buffer of the
// block diagram is not instantiated, as in the configuration the design
// description uses. Port numbering (0 Left, 1 Right, 2 Across, 3 NI1,
// 4 NI2) is this design's choice; NPORT = 4 gives the homogeneous router,
// NPORT = 5 the heterogeneous one.
module noc_router
  import noc_pkg::*;
#(
  parameter int unsigned NPORT     = 5,
  parameter int unsigned BUF_DEPTH = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  link_t in_link    [NPORT],
  output logic  credit_out [NPORT],
  output link_t out_link   [NPORT],
  input  logic  credit_in  [NPORT]
);
  localparam int unsigned PW = $clog2(NPORT);
  localparam int unsigned CW = $clog2(BUF_DEPTH + 1);
  localparam int unsigned LW = $bits(link_t);

  link_t             head    [NPORT];
  logic              empty   [NPORT];
  logic              pop     [NPORT];
  logic [PW-1:0]     dest    [NPORT];
  logic [1:0]        hprio   [NPORT];

  logic              busy    [NPORT];   // output locked by a packet
  logic [PW-1:0]     owner   [NPORT];   // input that holds the output
  logic [CW-1:0]     cred    [NPORT];
  logic [NPORT-1:0]  req     [NPORT];   // req[out][in]
  logic [NPORT-1:0]  gnt     [NPORT];
  logic              send    [NPORT];
  logic [PW-1:0]     src     [NPORT];

  // ---------------- DS interface and input stage ----------------
  for (genvar i = 0; i < NPORT; i++) begin : g_in
    logic [LW-1:0] dout;
    logic          full;
    logic [$clog2(BUF_DEPTH+1)-1:0] cnt;
    noc_fifo #(.W(LW), .DEPTH(BUF_DEPTH)) u_buf (
      .clk, .rst_n,
      .push (in_link[i].valid),
      .din  (in_link[i]),
      .pop  (pop[i]),
      .dout (dout),
      .empty(empty[i]),
      .full (full),
      .count(cnt)
    );
    assign head[i]       = link_t'(dout);
    assign dest[i]       = PW'(hdr_nlh(head[i].flit).route[2:0]);
    assign hprio[i]      = hdr_nlh(head[i].flit).prio;
    assign credit_out[i] = pop[i];
  end

  // ---------------- output stage: arbitration ----------------
  for (genvar o = 0; o < NPORT; o++) begin : g_out
    always_comb begin
      for (int i = 0; i < NPORT; i++)
        req[o][i] = !empty[i] && is_head(head[i].flit_id) && (dest[i] == PW'(o)) && !busy[o];
    end
    lru_arbiter #(.N(NPORT), .PW(2)) u_arb (
      .clk, .rst_n,
      .req   (req[o]),
      .prio  (hprio),
      .update(send[o] && !busy[o]),
      .gnt   (gnt[o])
    );
    always_comb begin
      src[o]  = owner[o];
      send[o] = 1'b0;
      if (busy[o]) begin
        send[o] = !empty[owner[o]] && (cred[o] != 0);
      end else begin
        for (int i = 0; i < NPORT; i++)
          if (gnt[o][i]) src[o] = PW'(i);
        send[o] = (|gnt[o]) && (cred[o] != 0);
      end
    end
  end

  // an input is popped when the output it feeds sends
  always_comb begin
    for (int i = 0; i < NPORT; i++) pop[i] = 1'b0;
    for (int o = 0; o < NPORT; o++)
      if (send[o]) pop[src[o]] = 1'b1;
  end

  // ---------------- switching matrix, output state, credits ----------------
  for (genvar o = 0; o < NPORT; o++) begin : g_sw
    link_t f;
    always_comb begin
      f       = head[src[o]];
      f.valid = 1'b1;
      if (is_head(f.flit_id))
        f.flit[8:0] = {3'b000, f.flit[8:3]};   // consume this router's hop
    end
    assign out_link[o] = send[o] ? f : LINK_IDLE;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        busy[o]     <= 1'b0;
        owner[o]    <= '0;
        cred[o]     <= CW'(BUF_DEPTH);
      end else begin
        cred[o]     <= cred[o] - CW'(send[o]) + CW'(credit_in[o]);
        if (send[o]) begin
          if (is_head(f.flit_id) && !is_tail(f.flit_id)) begin
            busy[o]  <= 1'b1;
            owner[o] <= src[o];
          end else if (is_tail(f.flit_id)) begin
            busy[o]  <= 1'b0;
          end
        end
      end
    end
    a_credit_bound: assert property (@(posedge clk) disable iff (!rst_n) cred[o] <= CW'(BUF_DEPTH));
  end

  for (genvar i = 0; i < NPORT; i++) begin : g_chk
    a_valid_port: assert property (@(posedge clk) disable iff (!rst_n)
      (!empty[i] && is_head(head[i].flit_id)) |-> (32'(hdr_nlh(head[i].flit).route[2:0]) < NPORT));
  end
endmodule
