// tb_mpsoc_top: end-to-end test of both MPSoC platforms at their default
// sizes (3 Mbit SRAM tiles), also used as the full-size run.
//
// The testbench plays the CPU tile on the cpu_* AHB port (hclk), an
// off-chip memory on the ext_* port and the eight homogeneous tiles on the
// homo_* links (nclk). Every tile of the heterogeneous platform is used
// through the NoC: SRAM tiles over every route shape from router 1 (local,
// one and two ring hops each way, Across, Across plus one ring hop), INCR4
// bursts, an out-of-range access answered with ERROR, a full and an
// early-terminated motion search on the two ME tiles running concurrently,
// 1D and 2D forward/inverse transforms, FIR and rational filtering, a LUT
// pixel operation, Exp-Golomb coding, DMA in both directions and the audio
// chain's gate outputs. On the homogeneous NoC it sends packets between
// tiles, holds back credits to make the network stall, and makes two
// packets contend for one output. Each mechanism is counted; one that never
// happened counts as a failure. A watchdog ends a run that hangs.
`timescale 1ns/1ps
module tb_mpsoc_top;
  import noc_pkg::*;

  logic nclk = 1'b0, hclk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a real falling edge, so the asynchronous resets fire
  always #1 nclk = ~nclk;   // 500 MHz NoC clock
  always #2 hclk = ~hclk;   // 250 MHz IP clock
  wire clk = hclk;

  logic        hsel = 1'b0;
  logic [31:0] haddr = '0;
  logic [1:0]  htrans = '0;
  logic        hwrite = 1'b0;
  logic [2:0]  hsize = 3'b010, hburst = '0;
  logic [31:0] hwdata = '0;
  logic [31:0] hrdata;
  logic        hreadyout, hresp;
  logic [31:0] bw[4], br[4];

  logic        ext_req, ext_we, ext_gnt, ext_rvalid;
  logic [31:0] ext_addr, ext_wdata, ext_rdata;
  logic        gate_ah, gate_al, gate_bh, gate_bl, fifo_low;
  logic [6:0]  irq;
  link_t       homo_in[8], homo_out[8];
  logic        homo_cout[8], homo_cin[8];

  mpsoc_top dut (
    .nclk, .hclk, .rst_n,
    .cpu_hsel(hsel), .cpu_haddr(haddr), .cpu_htrans(htrans), .cpu_hwrite(hwrite),
    .cpu_hsize(hsize), .cpu_hburst(hburst), .cpu_hwdata(hwdata),
    .cpu_hrdata(hrdata), .cpu_hreadyout(hreadyout), .cpu_hresp(hresp),
    .ext_req, .ext_we, .ext_addr, .ext_wdata, .ext_gnt, .ext_rvalid, .ext_rdata,
    .gate_ah, .gate_al, .gate_bh, .gate_bl, .diaa_fifo_low(fifo_low), .irq,
    .homo_ni_in(homo_in), .homo_ni_credit_out(homo_cout),
    .homo_ni_out(homo_out), .homo_ni_credit_in(homo_cin));

  `include "tb_common.svh"

  // ---------------- mechanism counters
  localparam int NM = 22;
  int    mech[NM];
  string mname[NM] = '{"route_local", "route_left", "route_left2", "route_right2",
                       "route_across", "route_across_left", "route_across_right",
                       "incr4_burst", "ahb_error", "me_full_search", "me_early_stop",
                       "tiles_concurrent", "dct_1d", "dct_2d", "fir", "rational_filter",
                       "pixel_lut", "exp_golomb", "dma_in", "dma_out", "pwm_gates",
                       "homo_noc"};
  int m_stall = 0, m_contend = 0;

  // ---------------- off-chip memory model: grants at once, read data next cycle
  logic [31:0] ext_mem[256];
  assign ext_gnt = ext_req;
  always_ff @(posedge hclk) begin
    ext_rvalid <= ext_req && !ext_we;
    ext_rdata  <= ext_mem[ext_addr[7:0]];
    if (ext_req && ext_we) ext_mem[ext_addr[7:0]] <= ext_wdata;
  end

  // ---------------- dead-time / gate monitor
  int gate_edges = 0, shoot = 0;
  logic ah_q = 1'b0;
  always_ff @(posedge hclk) begin
    ah_q <= gate_ah;
    if (gate_ah && !ah_q) gate_edges <= gate_edges + 1;
    if ((gate_ah && gate_al) || (gate_bh && gate_bl)) shoot <= shoot + 1;
  end

  // ---------------- homogeneous NoC tile models (nclk)
  int   hcred[8];           // credits the TB holds towards each router
  bit   hold[8];            // TB stops consuming flits at this tile
  int   rx_cnt[8];
  logic [127:0] rx_last[8];
  int   rx_time[8];
  always_ff @(posedge nclk) begin
    for (int i = 0; i < 8; i++) begin
      homo_cin[i] <= 1'b0;
      if (homo_cout[i]) hcred[i] <= hcred[i] + 1;
    end
    for (int i = 0; i < 8; i++)
      if (homo_out[i].valid) begin
        rx_cnt[i]  <= rx_cnt[i] + 1;
        rx_last[i] <= homo_out[i].flit;
        rx_time[i] <= int'($time);
      end
  end
  // a tile that is held keeps its credits back until released
  int owed[8];
  always_ff @(posedge nclk) begin
    for (int i = 0; i < 8; i++) begin
      if (homo_out[i].valid && hold[i]) owed[i] <= owed[i] + 1;
      else if (homo_out[i].valid) homo_cin[i] <= 1'b1;
      else if (!hold[i] && owed[i] > 0) begin
        owed[i] <= owed[i] - 1;
        homo_cin[i] <= 1'b1;
      end
    end
  end

  function automatic logic [127:0] homo_hdr(int s, int d, logic [27:0] tag);
    nlh_t n; tlh_t t;
    n.prio  = 2'd0;
    n.route = spidergon_route(ni_pos_t'({3'(s), 1'b0}), ni_pos_t'({3'(d), 1'b0}));
    t = '0;
    t.opcode = OP_WRITE;
    t.src_ni = 4'(s);
    t.addr   = tag;
    return make_header(n, t);
  endfunction

  // inject one single-flit packet from tile s to tile d, waiting for a credit
  task automatic homo_send(int s, int d, logic [27:0] tag);
    @(posedge nclk); #0.2;
    while (hcred[s] == 0) begin
      m_stall++;
      @(posedge nclk); #0.2;
    end
    homo_in[s] = '{valid: 1'b1, flit_id: FLIT_SINGLE, flit_id_error: '0,
                   flit_id_atomic: 1'b0, four_be: '0, flit: homo_hdr(s, d, tag)};
    hcred[s] = hcred[s] - 1;
    @(posedge nclk); #0.2;
    homo_in[s] = LINK_IDLE;
  endtask

  // ---------------- helpers for the CPU side
  function automatic logic [31:0] A(int id, int off);
    return {4'(id), 28'(off)};
  endfunction

  task automatic wait_done(int id, int status_off, int max_polls);
    logic [31:0] s;
    for (int i = 0; i < max_polls; i++) begin
      ahb_rd(A(id, status_off), s);
      if (s[1]) return;
    end
    check(1'b0, $sformatf("tile %0d never finished", id));
  endtask

  task automatic burst_wr(logic [31:0] a, logic [31:0] d0, d1, d2, d3);
    bit e;
    bw = '{d0, d1, d2, d3};
    ahb_xfer(a, 1'b1, 4, e);
    check(!e, "burst write ERROR");
  endtask

  // ---------------- tests
  localparam int ID_SRAM[7] = '{0, 3, 7, 9, 10, 13, 14};
  localparam int MECH_OF[7] = '{1, 0, 3, 5, 4, 6, 2};  // route shape from router 1

  logic [7:0]  sa[48][48];
  logic [7:0]  cb[16][16];
  logic signed [15:0] xin[64], xf[64];

  initial begin
    logic [31:0] d, w;
    bit e;
    int dx, dy;
    for (int i = 0; i < NM; i++) mech[i] = 0;
    for (int i = 0; i < 8; i++) begin
      homo_in[i] = LINK_IDLE; hcred[i] = 2; hold[i] = 0; rx_cnt[i] = 0;
      owed[i] = 0; rx_time[i] = 0; rx_last[i] = '0;
    end
    for (int i = 0; i < 256; i++) ext_mem[i] = 32'hE000_0000 + 32'(i * 7);
    ext_rvalid = 0; ext_rdata = 0;
    repeat (5) @(posedge hclk);
    rst_n = 1'b1;
    repeat (5) @(posedge hclk); #1;

    // --- SRAM tiles over every route shape
    for (int k = 0; k < 7; k++) begin
      logic [31:0] a, v;
      a = 32'($urandom_range(0, 98303)) << 2;
      v = $urandom;
      ahb_wr(A(ID_SRAM[k], int'(a)), v);
      ahb_rd(A(ID_SRAM[k], int'(a)), d);
      check(d == v, $sformatf("SRAM %0d read %08h expected %08h", ID_SRAM[k], d, v));
      if (d == v) mech[MECH_OF[k]]++;
    end
    // --- INCR4 burst write and read back
    burst_wr(A(13, 32'h100), 32'h11, 32'h22, 32'h33, 32'h44);
    ahb_xfer(A(13, 32'h100), 1'b0, 4, e);
    check(!e && br[0] == 32'h11 && br[1] == 32'h22 && br[2] == 32'h33 && br[3] == 32'h44,
          "INCR4 burst read back");
    if (!e && br[3] == 32'h44) mech[7]++;
    // --- out-of-range address: ERROR response must reach the CPU
    ahb_xfer(A(3, 32'h0060000), 1'b0, 1, e);
    check(e, "out-of-range SRAM read not answered with ERROR");
    if (e) mech[8]++;
    ahb_rd(A(3, 32'h10), d);      // the path still works afterwards

    // --- motion estimation: current block = search area at (+3,-2)
    dx = 3; dy = -2;
    for (int y = 0; y < 48; y++) for (int x = 0; x < 48; x++) sa[y][x] = 8'($urandom);
    for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++) cb[y][x] = sa[16+dy+y][16+dx+x];
    for (int bank = 0; bank < 2; bank++) begin
      for (int wd = 0; wd < 64; wd += 4) begin
        logic [31:0] q[4];
        for (int j = 0; j < 4; j++)
          q[j] = {cb[(wd+j)/4][((wd+j)%4)*4+3], cb[(wd+j)/4][((wd+j)%4)*4+2],
                  cb[(wd+j)/4][((wd+j)%4)*4+1], cb[(wd+j)/4][((wd+j)%4)*4]};
        burst_wr(A(bank ? 12 : 11, 32'h8000 + 4*wd), q[0], q[1], q[2], q[3]);
      end
      for (int y = 0; y < 48; y++)
        for (int wd = 0; wd < 12; wd += 4) begin
          logic [31:0] q[4];
          for (int j = 0; j < 4; j++)
            q[j] = {sa[y][(wd+j)*4+3], sa[y][(wd+j)*4+2], sa[y][(wd+j)*4+1], sa[y][(wd+j)*4]};
          burst_wr(A(bank ? 12 : 11, 32'h8000 + 4*(64 + 16*y + wd)), q[0], q[1], q[2], q[3]);
        end
    end
    ahb_wr(A(11, 32'h4), 16);                   // ME0: full search +/-16
    ahb_wr(A(12, 32'h4), 16);                   // ME1: predictor + early stop
    ahb_wr(A(12, 32'h8), 0);
    ahb_wr(A(12, 32'hC), {16'h0, 8'(dy), 8'(dx)});
    ahb_wr(A(11, 32'h0), 32'h1);
    ahb_wr(A(12, 32'h0), 32'hD);
    ahb_rd(A(11, 32'h10), d);
    ahb_rd(A(12, 32'h10), w);
    if (d[0] && (w[0] || w[1])) mech[11]++;   // ME0 still busy while ME1 was started
    wait_done(11, 32'h10, 2000);
    wait_done(12, 32'h10, 2000);
    ahb_rd(A(11, 32'h14), d);
    check(d == {16'h0, 8'(dy), 8'(dx)}, $sformatf("ME0 result %08h", d));
    ahb_rd(A(11, 32'h18), w);
    check(w == 33 * 33, $sformatf("ME0 evaluated %0d candidates", w));
    if (d == {16'h0, 8'(dy), 8'(dx)} && w == 33 * 33) mech[9]++;
    ahb_rd(A(12, 32'h14), d);
    check(d == {16'h0, 8'(dy), 8'(dx)}, $sformatf("ME1 result %08h", d));
    ahb_rd(A(12, 32'h18), w);
    check(w < 10, $sformatf("ME1 early stop after %0d candidates", w));
    if (w < 10) mech[10]++;

    // --- transform: 1D forward + inverse on 8 vectors, then 2D on one block
    for (int i = 0; i < 64; i++) xin[i] = 16'($signed($urandom_range(0, 1200)) - 600);
    for (int md = 0; md < 2; md++) begin
      for (int i = 0; i < 32; i++) ahb_wr(A(8, 32'h1000 + 4*i), {xin[2*i+1], xin[2*i]});
      ahb_wr(A(8, 32'h4), md ? 1 : 8);
      ahb_wr(A(8, 32'h0), md ? 32'h3 : 32'h1);
      wait_done(8, 32'h8, 200);
      for (int i = 0; i < 32; i++) begin
        ahb_rd(A(8, 32'h2000 + 4*i), d);
        xf[2*i] = d[15:0]; xf[2*i+1] = d[31:16];
      end
      ahb_rd(A(8, 32'h3000), d);
      check(d == 0, $sformatf("transform exponent %0d for small input", d));
      for (int i = 0; i < 32; i++) ahb_wr(A(8, 32'h1000 + 4*i), {xf[2*i+1], xf[2*i]});
      ahb_wr(A(8, 32'h0), md ? 32'h7 : 32'h5);
      wait_done(8, 32'h8, 200);
      begin
        automatic int bad = 0;
        for (int i = 0; i < 32; i++) begin
          ahb_rd(A(8, 32'h2000 + 4*i), d);
          if ($signed(d[15:0]) - xin[2*i] > 3 || xin[2*i] - $signed(d[15:0]) > 3) bad++;
          if ($signed(d[31:16]) - xin[2*i+1] > 3 || xin[2*i+1] - $signed(d[31:16]) > 3) bad++;
        end
        check(bad == 0, $sformatf("%0dD inverse(forward(x)) differs in %0d samples", md + 1, bad));
        if (bad == 0) mech[12 + md]++;
      end
    end

    // --- filter: FIR (mean of two samples), then rational on a flat signal
    for (int i = 0; i < 8; i++) ahb_wr(A(1, 32'h20 + 4*i), (i < 2) ? 2048 : 0);
    for (int i = 0; i < 8; i++) ahb_wr(A(1, 32'h1000 + 4*i), {16'(200*i+100), 16'(200*i)});
    ahb_wr(A(1, 32'h4), 16);
    ahb_wr(A(1, 32'h0), 1);
    wait_done(1, 32'h10, 100);
    begin
      automatic int bad = 0;
      for (int i = 0; i < 8; i++) begin
        ahb_rd(A(1, 32'h2000 + 4*i), d);
        if (d[15:0] != 16'((i == 0) ? 0 : 200*i - 50)) bad++;
        if (d[31:16] != 16'(200*i + 50)) bad++;
      end
      check(bad == 0, $sformatf("FIR output wrong in %0d samples", bad));
      if (bad == 0) mech[14]++;
    end
    for (int i = 0; i < 8; i++) ahb_wr(A(1, 32'h1000 + 4*i), {16'd500, 16'd500});
    ahb_wr(A(1, 32'h0), 3);
    wait_done(1, 32'h10, 100);
    ahb_rd(A(1, 32'h2000 + 4*5), d);
    check(d == {16'd500, 16'd500}, $sformatf("rational filter on flat input gave %08h", d));
    if (d == {16'd500, 16'd500}) mech[15]++;

    // --- pixel tile: inverting LUT
    for (int i = 0; i < 256; i++) ahb_wr(A(15, 32'h400 + 4*i), 255 - i);
    ahb_wr(A(15, 32'hC), 32'hFF00);
    for (int i = 0; i < 4; i++) ahb_wr(A(15, 32'h1000 + 4*i), 32'h00102030 + 32'(i));
    ahb_wr(A(15, 32'h4), 4);
    ahb_wr(A(15, 32'h0), 1);
    wait_done(15, 32'h8, 100);
    ahb_rd(A(15, 32'h2000 + 4*2), d);
    check(d[23:0] == 24'hEFDFCD, $sformatf("pixel LUT gave %08h", d));
    if (d[23:0] == 24'hEFDFCD) mech[16]++;

    // --- source coding: ue(0..3) = 1 010 011 00100
    for (int i = 0; i < 4; i++) ahb_wr(A(6, 32'h1000 + 4*i), i);
    ahb_wr(A(6, 32'h4), 4);
    ahb_wr(A(6, 32'h0), 1);
    wait_done(6, 32'h8, 100);
    ahb_rd(A(6, 32'hC), w);
    ahb_rd(A(6, 32'h2000), d);
    check(w == 12 && d == 32'hA640_0000, $sformatf("Exp-Golomb: %0d bits, word %08h", w, d));
    if (w == 12 && d == 32'hA640_0000) mech[17]++;

    // --- external memory: DMA in, then DMA out
    ahb_wr(A(5, 32'h20004), 32'h10);
    ahb_wr(A(5, 32'h20008), 32'h40);
    ahb_wr(A(5, 32'h2000C), 8);
    ahb_wr(A(5, 32'h20000), 1);
    wait_done(5, 32'h20010, 100);
    ahb_rd(A(5, 4 * 32'h43), d);
    check(d == ext_mem[8'h13], $sformatf("DMA in: buffer word %08h", d));
    if (d == ext_mem[8'h13]) mech[18]++;
    ahb_wr(A(5, 4 * 32'h41), 32'hCAFE_0001);
    ahb_wr(A(5, 32'h20004), 32'h80);
    ahb_wr(A(5, 32'h20000), 3);
    wait_done(5, 32'h20010, 100);
    check(ext_mem[8'h81] == 32'hCAFE_0001 && ext_mem[8'h87] == ext_mem[8'h17],
          "DMA out: external memory contents");
    if (ext_mem[8'h81] == 32'hCAFE_0001) mech[19]++;
    check(irq[6], "ext. memory done flag");

    // --- audio: binary PWM, M = 1, p = 6, dead time 2
    for (int i = 0; i < 8; i++) ahb_wr(A(4, 32'h10), 32'(i * 1000));
    ahb_wr(A(4, 32'h200), 32'd16384);
    ahb_wr(A(4, 32'h4), 1);
    ahb_wr(A(4, 32'h8), 2);
    ahb_wr(A(4, 32'h0), {19'h0, 3'd2, 3'd6, 5'd1, 1'b0, 1'b1});
    repeat (2000) @(posedge hclk);
    ahb_wr(A(4, 32'h0), 0);
    check(shoot == 0, $sformatf("both gates of a leg on in %0d cycles", shoot));
    check(gate_edges > 4, $sformatf("only %0d PWM pulses", gate_edges));
    if (gate_edges > 4 && shoot == 0) mech[20]++;

    // --- homogeneous NoC: all-to-all singles, a stall and a conflict
    for (int s = 0; s < 8; s++) begin
      automatic int d2 = (s + 1 + $urandom_range(0, 6)) % 8;
      automatic int n_prev = rx_cnt[d2];
      homo_send(s, d2, 28'(s * 16 + d2));
      repeat (20) @(posedge nclk); #0.2;
      check(rx_cnt[d2] == n_prev + 1 && rx_last[d2][HDR_BITS-1:11] != 0,
            $sformatf("homogeneous packet %0d -> %0d", s, d2));
      if (rx_cnt[d2] == n_prev + 1) mech[21]++;
    end
    begin                                         // tile 4 stops accepting
      automatic int n_prev = rx_cnt[4];
      hold[4] = 1;
      fork
        for (int k = 0; k < 16; k++) homo_send(0, 4, 28'(k + 1));
        begin #400; hold[4] = 0; end
      join
      repeat (60) @(posedge nclk); #0.2;
      check(m_stall > 0, "no credit stall seen at the source");
      check(rx_cnt[4] == n_prev + 16, $sformatf("%0d of 16 stalled packets delivered", rx_cnt[4] - n_prev));
    end
    begin                                         // two packets meet at router 0
      automatic int n0 = arr0.size();
      fork
        homo_send(3, 0, 28'h31);
        homo_send(5, 0, 28'h51);
      join
      repeat (30) @(posedge nclk); #0.2;
      check(arr0.size() == n0 + 2, "contending packets delivered");
      if (arr0.size() == n0 + 2 && arr0[n0+1] - arr0[n0] == 2) m_contend++;
    end

    for (int i = 0; i < NM; i++) begin
      $display("mechanism %-20s %0d", mname[i], mech[i]);
      check(mech[i] > 0, $sformatf("mechanism %s never happened", mname[i]));
    end
    $display("mechanism %-20s %0d", "credit_stall", m_stall);
    $display("mechanism %-20s %0d", "output_contention", m_contend);
    check(m_contend > 0, "mechanism output_contention never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // arrival times at homogeneous tile 0, to see two contending packets
  // leave router 0 on consecutive cycles
  int arr0[$];
  always @(posedge nclk) if (homo_out[0].valid) arr0.push_back(int'($time));

  initial begin
    #20ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
