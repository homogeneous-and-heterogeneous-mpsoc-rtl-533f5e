// lru_arbiter: output-port arbiter of the router. Arbitration has two steps:
// first only the requests carrying the highest QoS priority remain, then the
// least recently used of those wins. With all priorities equal, which is how
// the MPSoC uses the network, it is a pure Least Recently Used arbiter.
//
// The recency order is kept as a list of requester indices, least recently
// used first. When a grant is taken (update = 1) the winner moves to the end
// of the list. Grant is combinational from req/prio and the stored order.
// The two steps follow the design description; the list implementation is
// this design's choice.
module lru_arbiter #(
  parameter int unsigned N  = 5,
  parameter int unsigned PW = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N-1:0]     req,
  input  logic [PW-1:0]    prio [N],
  input  logic             update,
  output logic [N-1:0]     gnt
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] order [N];   // order[0] = least recently used
  logic [PW-1:0] maxp;
  logic [N-1:0]  elig;
  logic [IW-1:0] win;
  logic          found;

  always_comb begin
    maxp = '0;
    for (int i = 0; i < N; i++)
      if (req[i] && prio[i] > maxp) maxp = prio[i];
    for (int i = 0; i < N; i++)
      elig[i] = req[i] && (prio[i] == maxp);
    win   = '0;
    found = 1'b0;
    for (int k = 0; k < N; k++)
      if (!found && elig[order[k]]) begin
        win   = order[k];
        found = 1'b1;
      end
    gnt = '0;
    if (found) gnt[win] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) order[k] <= IW'(k);
    end else if (update && found) begin
      // remove the winner from the list and append it at the end
      automatic int pos = 0;
      for (int k = 0; k < N; k++) if (order[k] == win) pos = k;
      for (int k = 0; k < N - 1; k++)
        if (k >= pos) order[k] <= order[k+1];
      order[N-1] <= win;
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
endmodule
