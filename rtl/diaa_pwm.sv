// diaa_pwm: multi-level PWM modulator of the DIAA tile. It turns each p-bit
// noise-shaped sample s (signed, -2^(p-1) .. 2^(p-1)-1) into one PWM period
// of 2^p ticks and drives the two legs of the output H bridge.
//  * Binary coding (-1, +1): +1 during the first s + 2^(p-1) ticks of the
//    period, -1 for the rest; a zero signal gives a 50 % square wave.
//  * Ternary coding (-1, 0, +1): sign(s) during the first 2|s| ticks, 0 for
//    the rest; a zero signal gives no switching at all.
// Both codings have the mean value s / 2^(p-1). +1 drives leg A high and leg
// B low, -1 the opposite, 0 both legs low.
// A tick comes every TICKDIV clock cycles. At the first tick of a period the
// sample waiting in the `next` register becomes active and `frame` pulses
// for one cycle to ask for the following sample, which must arrive (next_valid)
// within the period; otherwise the last sample is repeated.
// The binary/ternary codings come from the design description; edge-aligned
// pulses and the sample handshake are this design's choices.
module diaa_pwm #(
  parameter int unsigned P = 6
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                enable,
  input  logic                ternary,
  input  logic [2:0]          p,
  input  logic [15:0]         tickdiv,
  input  logic                next_valid,
  input  logic signed [P-1:0] next_sample,
  output logic                frame,
  output logic                leg_a,
  output logic                leg_b,
  output logic [1:0]          level      // 01 = +1, 11 = -1, 00 = 0
);
  logic [15:0]         div;
  logic [P-1:0]        cnt;
  logic signed [P-1:0] nxt, cur;
  logic                tick;
  logic [P:0]          width;
  logic                on;
  logic [P-1:0]        last;

  assign tick = enable && (div == 16'd0);
  assign last = P'((1 << p) - 1);

  always_comb begin
    if (ternary) width = (cur < 0) ? (P+1)'(-2 * int'(cur)) : (P+1)'(2 * int'(cur));
    else         width = (P+1)'(int'(cur) + (1 << (p - 1)));
    on = ((P+1)'(cnt) < width);
    if (!enable)       level = 2'b00;
    else if (ternary)  level = on ? ((cur < 0) ? 2'b11 : 2'b01) : 2'b00;
    else               level = on ? 2'b01 : 2'b11;
    leg_a = (level == 2'b01);
    leg_b = (level == 2'b11);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div   <= '0;
      cnt   <= '0;
      nxt   <= '0;
      cur   <= '0;
      frame <= 1'b0;
    end else begin
      frame <= 1'b0;
      if (next_valid) nxt <= next_sample;
      if (!enable) begin
        div <= '0;
        cnt <= '0;
      end else begin
        div <= (div + 16'd1 >= tickdiv) ? 16'd0 : div + 16'd1;
        if (tick) begin
          if (cnt == last) begin
            cnt   <= '0;
            cur   <= nxt;
            frame <= 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
      end
    end
  end
endmodule
