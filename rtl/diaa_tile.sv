// diaa_tile: digital-input audio amplifier (DIAA) ASIP of the heterogeneous
// MPSoC. It reproduces a 16-bit PCM stream through a switching power stage:
// PCM samples written over AHB enter a sample FIFO, are oversampled by M
// (diaa_oversampler), requantised to p bits with shaped noise
// (diaa_noise_shaper), converted to binary or ternary PWM (diaa_pwm) and
// given dead times (one diaa_deadtime per bridge leg) before leaving as the
// four gate signals of the off-chip H bridge.
//
// The chain is paced by the PWM: each PWM period (2^p ticks of TICKDIV clock
// cycles) asks for one new oversampled sample, so the oversampled rate is
// f_clk / (TICKDIV * 2^p) = M * F_IN and the input FIFO is drained at F_IN.
// A sample is delivered one period after it is requested. With a 250 MHz
// clock, p = 6 and M = 16, F_IN = 44.1 kHz needs TICKDIV = 5.5; the PWM tick
// is then 22 ns, the minimum pulse the design description quotes. A FIFO
// underrun plays silence and is counted.
// The order of the units and their parameters (M, K <= 5, p <= 6, binary or
// ternary PWM, programmable dead time) follow the description. The PWM
// correction loop with feedback from the power stage is not part of this
// tile. SPDIF input, volume control and decimation are not implemented.
//
// AHB address map (byte offsets):
//   0x000 CTRL (R/W) bit0 enable, bit1 ternary, bits6:2 M, bits9:7 p, bits12:10 K
//   0x004 TICKDIV (R/W) clock cycles per PWM tick (>= 1)
//   0x008 DEADTIME (R/W) dead time in clock cycles
//   0x00C STATUS (R) [4:0] FIFO level, [31:16] underruns
//   0x010 SAMPLE (W) push one PCM sample (bits 15:0) into the FIFO
//   0x020 + 4i noise-shaper coefficient c_(i+1), i = 0..4 (R/W)
//   0x200 + 4j oversampler coefficient h[j], j = 0..M_MAX*8-1 (W)
module diaa_tile #(
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned MMAX       = 16,
  parameter int unsigned TPP        = 8,
  parameter int unsigned K          = 5,
  parameter int unsigned P          = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        hsel,
  input  logic [31:0] haddr,
  input  logic [1:0]  htrans,
  input  logic        hwrite,
  input  logic [31:0] hwdata,
  output logic [31:0] hrdata,
  output logic        hreadyout,
  output logic        hresp,
  output logic        gate_ah,
  output logic        gate_al,
  output logic        gate_bh,
  output logic        gate_bl,
  output logic        fifo_low
);
  localparam int unsigned HW = $clog2(MMAX * TPP);
  localparam int unsigned FW = $clog2(FIFO_DEPTH + 1);

  logic        rd_en, wr_en, addr_err;
  logic [11:0] rd_addr, wr_addr;
  logic [31:0] rd_data, wr_data;

  ahb_slave_port #(.AW(12)) u_port (
    .clk, .rst_n, .hsel, .haddr, .htrans, .hwrite, .hwdata, .hrdata, .hreadyout, .hresp,
    .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data, .addr_err);

  assign addr_err = (haddr[31:12] != 0) ||
                    (haddr[11:9] == 3'd0 && haddr[8:6] != 0) ||
                    (haddr[11:9] == 3'd0 && haddr[5] && haddr[4:2] >= 3'(K)) ||
                    (haddr[11:9] != 3'd0 && (haddr[11:2] - 10'h080) >= 10'(MMAX * TPP));

  logic               enable, ternary;
  logic [4:0]         m;
  logic [2:0]         p, order;
  logic [15:0]        tickdiv;
  logic [7:0]         deadtime;
  logic [15:0]        underruns;
  logic signed [15:0] c [K];

  // sample FIFO
  logic        f_push, f_pop, f_empty, f_full;
  logic [15:0] f_dout;
  logic [FW-1:0] f_cnt;
  assign f_push = wr_en && wr_addr[11:2] == 10'd4;

  noc_fifo #(.W(16), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .push(f_push && !f_full), .din(wr_data[15:0]), .pop(f_pop),
    .dout(f_dout), .empty(f_empty), .full(f_full), .count(f_cnt));

  assign fifo_low = (f_cnt < FW'(FIFO_DEPTH / 2));

  always_ff @(posedge clk) begin
    if (rd_en) begin
      rd_data <= '0;
      if (rd_addr[5]) rd_data <= 32'(unsigned'(c[rd_addr[4:2]]));
      else unique case (rd_addr[4:2])
        3'd0: rd_data <= {19'h0, order, p, m, ternary, enable};
        3'd1: rd_data <= 32'(tickdiv);
        3'd2: rd_data <= 32'(deadtime);
        3'd3: rd_data <= {underruns, 11'h0, 5'(f_cnt)};
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enable   <= 1'b0;
      ternary  <= 1'b0;
      m        <= 5'd16;
      p        <= 3'd6;
      order    <= 3'd0;
      tickdiv  <= 16'd1;
      deadtime <= 8'd2;
      for (int i = 0; i < K; i++) c[i] <= '0;
    end else if (wr_en && wr_addr[11:9] == 3'd0) begin
      if (wr_addr[5]) c[wr_addr[4:2]] <= wr_data[15:0];
      else unique case (wr_addr[4:2])
        3'd0: begin
          enable  <= wr_data[0];
          ternary <= wr_data[1];
          m       <= (wr_data[6:2] == 0 || wr_data[6:2] > 5'(MMAX)) ? 5'(MMAX) : wr_data[6:2];
          p       <= (wr_data[9:7] == 0 || wr_data[9:7] > 3'(P)) ? 3'(P) : wr_data[9:7];
          order   <= (wr_data[12:10] > 3'(K)) ? 3'(K) : wr_data[12:10];
        end
        3'd1: tickdiv  <= (wr_data[15:0] == 0) ? 16'd1 : wr_data[15:0];
        3'd2: deadtime <= wr_data[7:0];
        default: ;
      endcase
    end
  end

  // processing chain
  logic               frame, os_valid, ns_valid, underrun, in_ready;
  logic signed [15:0] os_data;
  logic signed [P-1:0] ns_data;
  logic               leg_a, leg_b;
  logic [1:0]         level;

  assign f_pop = in_ready && !f_empty;

  diaa_oversampler #(.NB(16), .MMAX(MMAX), .TPP(TPP)) u_os (
    .clk, .rst_n, .m,
    .coef_we   (wr_en && wr_addr[11:9] != 3'd0),
    .coef_addr (HW'(wr_addr[11:2] - 10'h080)),
    .coef_wdata(wr_data[15:0]),
    .in_valid  (!f_empty),
    .in_data   (f_dout),
    .in_ready,
    .underrun,
    .out_req   (frame),
    .out_valid (os_valid),
    .out_data  (os_data));

  diaa_noise_shaper #(.NB(16), .K(K), .P(P)) u_ns (
    .clk, .rst_n, .p, .order, .c,
    .in_valid(os_valid), .x(os_data), .out_valid(ns_valid), .y(ns_data));

  diaa_pwm #(.P(P)) u_pwm (
    .clk, .rst_n, .enable, .ternary, .p, .tickdiv,
    .next_valid(ns_valid), .next_sample(ns_data),
    .frame, .leg_a, .leg_b, .level);

  diaa_deadtime u_dt_a (.clk, .rst_n, .dt(deadtime), .d(leg_a), .hs(gate_ah), .ls(gate_al));
  diaa_deadtime u_dt_b (.clk, .rst_n, .dt(deadtime), .d(leg_b), .hs(gate_bh), .ls(gate_bl));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) underruns <= '0;
    else if (underrun && enable) underruns <= underruns + 1'b1;
  end
endmodule
