// spidergon_noc: the network-on-chip of both MPSoCs. Eight routers form a
// ring; each router is linked to its Right neighbour (index + 1), its Left
// neighbour (index - 1) and its Across neighbour (index + 4), so any two
// routers are at most two hops apart and a packet crosses at most three
// routers. Each router has NLOC local ports towards network interfaces:
// NLOC = 1 gives the homogeneous MPSoC's 4-port routers, NLOC = 2 the
// heterogeneous MPSoC's 5-port routers (one port for a computing tile, one
// for a memory tile).
//
// Local port l of router r is element r*NLOC + l of the ni_* arrays. The
// ni_in / ni_credit_out pair is the NI-to-network direction, ni_out /
// ni_credit_in the network-to-NI direction. Every router-to-router link is
// registered at the sending router, so a hop costs one cycle.
module spidergon_noc
  import noc_pkg::*;
#(
  parameter int unsigned NLOC      = 2,
  parameter int unsigned BUF_DEPTH = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  link_t ni_in         [8*NLOC],
  output logic  ni_credit_out [8*NLOC],
  output link_t ni_out        [8*NLOC],
  input  logic  ni_credit_in  [8*NLOC]
);
  localparam int unsigned NP = 3 + NLOC;
  localparam int P_LEFT = int'(PORT_LEFT), P_RIGHT = int'(PORT_RIGHT), P_ACROSS = int'(PORT_ACROSS);

  link_t rin   [8][NP];
  link_t rout  [8][NP];
  logic  crin  [8][NP];
  logic  crout [8][NP];

  for (genvar r = 0; r < 8; r++) begin : g_r
    localparam int unsigned RN = (r + 1) % 8;   // right neighbour
    localparam int unsigned LN = (r + 7) % 8;   // left neighbour
    localparam int unsigned AN = (r + 4) % 8;   // across neighbour

    // ring and diagonal links
    assign rin[r][P_LEFT]    = rout[LN][P_RIGHT];
    assign crin[r][P_LEFT]   = crout[LN][P_RIGHT];
    assign rin[r][P_RIGHT]   = rout[RN][P_LEFT];
    assign crin[r][P_RIGHT]  = crout[RN][P_LEFT];
    assign rin[r][P_ACROSS]  = rout[AN][P_ACROSS];
    assign crin[r][P_ACROSS] = crout[AN][P_ACROSS];

    for (genvar l = 0; l < NLOC; l++) begin : g_l
      assign rin[r][3+l]            = ni_in[r*NLOC+l];
      assign ni_credit_out[r*NLOC+l] = crout[r][3+l];
      assign ni_out[r*NLOC+l]        = rout[r][3+l];
      assign crin[r][3+l]           = ni_credit_in[r*NLOC+l];
    end

    noc_router #(.NPORT(NP), .BUF_DEPTH(BUF_DEPTH)) u_router (
      .clk, .rst_n,
      .in_link   (rin[r]),
      .credit_out(crout[r]),
      .out_link  (rout[r]),
      .credit_in (crin[r])
    );
  end
endmodule
