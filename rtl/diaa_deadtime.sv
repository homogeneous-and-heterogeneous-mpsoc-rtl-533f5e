// diaa_deadtime: dead-time insertion for one leg of the output H bridge.
// The leg's wanted state d (1 = high-side transistor on) becomes two gate
// signals, hs for the high side and ls for the low side. Whenever d changes,
// both gates are held off for DT clock cycles before the new side turns on,
// so the high-side and low-side transistors are never on together, even
// with turn-off delays of up to DT cycles. A change during a dead time
// restarts it. After reset both gates are off for DT cycles, then ls is on.
// Configurable, digitally inserted guard times come from the design
// description; counting in clock cycles is this design's choice.
module diaa_deadtime (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  dt,
  input  logic        d,
  output logic        hs,
  output logic        ls
);
  logic       d_q;
  logic [7:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_q <= 1'b0;
      cnt <= 8'hFF;
      hs  <= 1'b0;
      ls  <= 1'b0;
    end else begin
      if (d != d_q) begin
        d_q <= d;
        cnt <= dt;
        hs  <= 1'b0;
        ls  <= 1'b0;
      end else if (cnt != 0 && cnt != 8'hFF) begin
        cnt <= cnt - 1'b1;
        hs  <= 1'b0;
        ls  <= 1'b0;
      end else if (cnt == 8'hFF) begin
        cnt <= dt;                // first dead time after reset
      end else begin
        hs  <= d_q;
        ls  <= !d_q;
      end
    end
  end

  a_no_shoot_through: assert property (@(posedge clk) disable iff (!rst_n) !(hs && ls));
endmodule
