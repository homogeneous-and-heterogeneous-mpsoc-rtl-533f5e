// bisync_fifo: dual-clock FIFO of the NI kernel (header FIFO and payload
// FIFO). It moves words between the IP clock domain and the NoC clock domain,
// which is how the NI performs frequency conversion.
//
// Write and read pointers are kept in binary and in Gray code; each Gray
// pointer crosses to the other domain through a two-flop synchroniser, so
// "full" and "empty" are conservative and the synchronisation delay is two
// cycles of the receiving clock. DEPTH must be a power of two (2 by default,
// the size the design description gives for the NI FIFOs).
//
// Interface: write side (wclk) push/din/full/wcount, read side (rclk)
// pop/dout/empty/rcount. rcount is the number of words the read side can
// see; the NI output FSM uses it for store-and-forward.
module bisync_fifo #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 2
) (
  input  logic                   rst_n,
  input  logic                   wclk,
  input  logic                   push,
  input  logic [W-1:0]           din,
  output logic                   full,
  input  logic                   rclk,
  input  logic                   pop,
  output logic [W-1:0]           dout,
  output logic                   empty,
  output logic [$clog2(DEPTH):0] rcount
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned PW = AW + 1;

  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] wbin, rbin, wgray, rgray;
  logic [PW-1:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [PW-1:0] rbin_w, wbin_r;

  function automatic logic [PW-1:0] bin2gray(logic [PW-1:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [PW-1:0] gray2bin(logic [PW-1:0] g);
    logic [PW-1:0] b;
    b[PW-1] = g[PW-1];
    for (int i = int'(PW) - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // write domain
  assign rbin_w = gray2bin(rgray_w2);
  assign full   = (wbin - rbin_w) == PW'(DEPTH);

  always_ff @(posedge wclk or negedge rst_n) begin
    if (!rst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (push && !full) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  always_ff @(posedge wclk) begin
    if (push && !full) mem[wbin[AW-1:0]] <= din;
  end

  initial for (int i = 0; i < DEPTH; i++) mem[i] = '0;

  // read domain
  assign wbin_r = gray2bin(wgray_r2);
  assign rcount = wbin_r - rbin;
  assign empty  = (rcount == 0);
  assign dout   = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk or negedge rst_n) begin
    if (!rst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (pop && !empty) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

  a_no_overflow:  assert property (@(posedge wclk) disable iff (!rst_n) !(push && full));
  a_no_underflow: assert property (@(posedge rclk) disable iff (!rst_n) !(pop && empty));
endmodule
