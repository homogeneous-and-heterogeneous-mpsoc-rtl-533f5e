// noc_fifo: small register-based synchronous FIFO. It is the input buffer of
// a router's NoC downstream (DS) interface and the staging buffer in tiles.
// The design description sizes the router input buffer at 2 locations and
// notes that such small FIFOs are built from registers, not memories.
//
// Interface: push/din write at the clock edge when not full; dout is the
// oldest entry, valid whenever !empty; pop removes it at the clock edge.
// Pushing into a full FIFO or popping an empty one is a protocol error
// (checked by assertions). count is the number of stored entries.
// Depth may be any value >= 1; pointers wrap explicitly.
module noc_fifo #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic [W-1:0]               din,
  input  logic                       pop,
  output logic [W-1:0]               dout,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;

  function automatic logic [AW-1:0] nxt(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign empty = (count == 0);
  assign full  = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign dout  = mem[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (push && !full) wp <= nxt(wp);
      if (pop && !empty) rp <= nxt(rp);
      count <= count + ($clog2(DEPTH+1))'(push && !full) - ($clog2(DEPTH+1))'(pop && !empty);
    end
  end

  always_ff @(posedge clk) begin
    if (push && !full) mem[wp] <= din;
  end

  // Entries are initialised so that dout is defined before the first push.
  initial for (int i = 0; i < DEPTH; i++) mem[i] = '0;

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));
endmodule
