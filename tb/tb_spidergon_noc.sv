// tb_spidergon_noc: the 8-router Spidergon network with two NIs per router
// (the heterogeneous configuration, default parameters). Sixteen sources,
// one per NI port, send random packets of 1..4 flits to random NIs with the
// source routes of spidergon_route, under the credit protocol. Sinks take
// every flit and return its credit after a random delay.
// Checks: every flit reaches the NI it was sent to, in order per source and
// with its data intact; the route field of an arriving header is empty (all
// hops used); packets are not interleaved at a sink; nothing is lost; a
// route crosses at most three routers, and the shortest latency seen for
// each route shape equals the number of routers it crosses (one cycle per
// router).
`timescale 1ns/1ps
module tb_spidergon_noc;
  import noc_pkg::*;
  localparam int NNI = 16;
  localparam int PKTS = 40;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a real falling edge, so the asynchronous resets fire
  always #5 clk = ~clk;
  link_t ni_in[NNI], ni_out[NNI];
  logic  ni_credit_out[NNI], ni_credit_in[NNI];
  int checks = 0, failures = 0;

  spidergon_noc dut (.clk, .rst_n, .ni_in, .ni_credit_out, .ni_out, .ni_credit_in);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  function automatic int routers_crossed(int s, int d);
    int rel = ((d / 2) - (s / 2) + 8) % 8;
    case (rel)
      0: return 1;
      1, 7, 4: return 2;
      default: return 3;
    endcase
  endfunction

  typedef struct { logic [127:0] flit; flit_id_e id; int t_in; int hops; } sent_t;
  sent_t exp_q[NNI][NNI][$];
  int src_cred[NNI], pend[NNI], cur_src[NNI];
  int min_lat[4] = '{1000, 1000, 1000, 1000};
  int n_sent = 0, n_recv = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  for (genvar s = 0; s < NNI; s++) begin : g_src
    initial begin
      ni_in[s] = LINK_IDLE;
      src_cred[s] = 2;
      @(posedge rst_n);
      for (int p = 0; p < PKTS; p++) begin
        int len, dst;
        nlh_t n;
        len = $urandom_range(1, 4);
        dst = $urandom_range(0, NNI - 1);
        n.prio = 2'($urandom);
        n.route = spidergon_route(ni_pos_t'({3'(s / 2), 1'(s % 2)}), ni_pos_t'({3'(dst / 2), 1'(dst % 2)}));
        repeat ($urandom_range(0, 8)) @(posedge clk);
        for (int f = 0; f < len; f++) begin
          link_t l;
          sent_t e;
          while (src_cred[s] == 0) @(posedge clk);
          #1;
          l = LINK_IDLE;
          l.valid = 1'b1;
          l.flit_id = (len == 1) ? FLIT_SINGLE : (f == 0) ? FLIT_FIRST : (f == len - 1) ? FLIT_LAST : FLIT_INT;
          l.flit = {8'(s), 16'(p * 4 + f), 104'($urandom)};
          if (f == 0) l.flit[10:0] = n;
          ni_in[s] = l;
          e.flit = l.flit;
          if (f == 0) e.flit[8:0] = '0;
          e.id = l.flit_id;
          e.t_in = cyc;
          e.hops = routers_crossed(s, dst);
          exp_q[s][dst].push_back(e);
          src_cred[s]--;
          n_sent++;
          @(posedge clk);
          #1 ni_in[s] = LINK_IDLE;
        end
      end
    end
  end

  always @(posedge clk)
    for (int s = 0; s < NNI; s++) if (ni_credit_out[s]) src_cred[s]++;

  for (genvar o = 0; o < NNI; o++) begin : g_sink
    initial begin
      ni_credit_in[o] = 1'b0;
      pend[o] = 0;
      cur_src[o] = -1;
      forever begin
        @(posedge clk);
        #2;
        ni_credit_in[o] = 1'b0;
        if (pend[o] > 0 && $urandom_range(0, 9) < 7) begin
          ni_credit_in[o] = 1'b1;
          pend[o]--;
        end
      end
    end
  end

  always @(posedge clk) begin
    for (int o = 0; o < NNI; o++) if (ni_out[o].valid) begin
      link_t l;
      int s;
      l = ni_out[o];
      s = int'(l.flit[127:120]);
      n_recv++;
      pend[o]++;
      check(pend[o] <= 2, $sformatf("NI %0d received more flits than credits", o));
      if (is_head(l.flit_id)) begin
        check(cur_src[o] < 0, $sformatf("packets interleaved at NI %0d", o));
        if (!is_tail(l.flit_id)) cur_src[o] = s;
      end else begin
        check(cur_src[o] == s, $sformatf("foreign flit inside a packet at NI %0d", o));
        if (is_tail(l.flit_id)) cur_src[o] = -1;
      end
      if (s < NNI && exp_q[s][o].size() > 0) begin
        sent_t e;
        e = exp_q[s][o].pop_front();
        check(l.flit == e.flit && l.flit_id == e.id,
              $sformatf("NI %0d from %0d: flit %h expected %h", o, s, l.flit, e.flit));
        if (is_head(l.flit_id) && cyc - e.t_in < min_lat[e.hops]) min_lat[e.hops] = cyc - e.t_in;
      end else check(1'b0, $sformatf("flit at NI %0d that was not sent there (source %0d)", o, s));
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (6000) @(posedge clk);
    check(n_recv == n_sent, $sformatf("sent %0d flits, received %0d", n_sent, n_recv));
    for (int h = 1; h <= 3; h++)
      check(min_lat[h] == h, $sformatf("shortest latency over %0d routers: %0d cycles", h, min_lat[h]));
    $display("flits %0d, shortest latency for 1/2/3 routers: %0d %0d %0d", n_recv, min_lat[1], min_lat[2], min_lat[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
