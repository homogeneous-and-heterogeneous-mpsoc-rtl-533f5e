// tb_noc_router: one 5-port Spidergon router (default parameters) between
// five packet sources and five sinks. Each source sends random packets of
// 1..4 flits (single, or first/intermediate/last) to random output ports,
// honouring the credit protocol: it starts with BUF_DEPTH credits, spends
// one per flit and gets one back per credit_out pulse. Each sink consumes a
// flit on arrival but returns the credit after a random delay, sometimes a
// long one, so outputs run out of credits and the router must stall.
// Checks: every flit leaves on the port its header named; the route field
// of a header is shifted right by three bits; packets are not interleaved
// on an output (wormhole); flits of a source arrive in order with their
// data, flit_id and byte enables intact; a sink never receives more flits
// than the credits it gave; nothing is lost; and the shortest input-to-
// output latency is one cycle. Also counts output conflicts and stalls.
`timescale 1ns/1ps
module tb_noc_router;
  import noc_pkg::*;
  localparam int NP = 5;
  localparam int PKTS = 60;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a real falling edge, so the asynchronous resets fire
  always #5 clk = ~clk;
  link_t in_link[NP], out_link[NP];
  logic  credit_out[NP], credit_in[NP];
  int checks = 0, failures = 0;

  noc_router dut (.clk, .rst_n, .in_link, .credit_out, .out_link, .credit_in);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  // flit payload: [127:120] source, [119:104] sequence number, [103:100] output port
  typedef struct { link_t l; int t_in; } sent_t;
  sent_t exp_q[NP][NP][$];     // [source][output]
  int    src_cred[NP];
  int    sink_cred[NP];         // credits the sink has handed back and not used
  int    pend[NP];              // credits the sink still owes
  int    cur_src[NP];           // source of the packet in progress on an output
  int    n_sent = 0, n_recv = 0, min_lat = 1000, stalls = 0, conflicts = 0;
  int    cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // sources
  for (genvar s = 0; s < NP; s++) begin : g_src
    initial begin
      in_link[s] = LINK_IDLE;
      src_cred[s] = 2;
      @(posedge rst_n);
      for (int p = 0; p < PKTS; p++) begin
        int len, dst, gap;
        logic [8:0] route;
        len = $urandom_range(1, 4);
        dst = $urandom_range(0, NP - 1);
        route = {3'($urandom_range(0, 4)), 3'($urandom_range(0, 4)), 3'(dst)};
        gap = $urandom_range(0, 2);
        repeat (gap) @(posedge clk);
        for (int f = 0; f < len; f++) begin
          link_t l;
          sent_t e;
          while (src_cred[s] == 0) @(posedge clk);
          #1;
          l = LINK_IDLE;
          l.valid = 1'b1;
          l.flit_id = (len == 1) ? FLIT_SINGLE : (f == 0) ? FLIT_FIRST : (f == len - 1) ? FLIT_LAST : FLIT_INT;
          l.four_be = 4'($urandom);
          l.flit_id_atomic = 1'($urandom);
          l.flit = {8'(s), 16'(p * 4 + f), 4'(dst), 100'($urandom)};
          if (f == 0) l.flit[10:0] = {2'($urandom), route};
          in_link[s] = l;
          e.l = l;
          if (f == 0) e.l.flit[8:0] = {3'b000, route[8:3]};
          e.t_in = cyc;
          exp_q[s][dst].push_back(e);
          src_cred[s]--;
          n_sent++;
          @(posedge clk);
          #1 in_link[s] = LINK_IDLE;
        end
      end
    end
  end

  always @(posedge clk)
    for (int s = 0; s < NP; s++) if (credit_out[s]) src_cred[s]++;

  // sinks
  for (genvar o = 0; o < NP; o++) begin : g_sink
    initial begin
      credit_in[o] = 1'b0;
      pend[o] = 0;
      cur_src[o] = -1;
      forever begin
        @(posedge clk);
        #2;
        credit_in[o] = 1'b0;
        if (pend[o] > 0 && $urandom_range(0, 9) < ((o == 2) ? 1 : 6)) begin
          credit_in[o] = 1'b1;
          pend[o]--;
        end
      end
    end
  end

  always @(posedge clk) begin
    for (int o = 0; o < NP; o++) if (out_link[o].valid) begin
      link_t l;
      int s;
      l = out_link[o];
      s = int'(l.flit[127:120]);
      n_recv++;
      pend[o]++;
      check(pend[o] <= 2, $sformatf("output %0d received more flits than credits", o));
      check(int'(l.flit[103:100]) == o, $sformatf("flit for port %0d left on %0d", l.flit[103:100], o));
      if (is_head(l.flit_id)) begin
        check(cur_src[o] < 0, $sformatf("packet interleaved on output %0d", o));
        if (!is_tail(l.flit_id)) cur_src[o] = s;
      end else begin
        check(cur_src[o] == s, $sformatf("flit of source %0d inside packet of %0d on %0d", s, cur_src[o], o));
        if (is_tail(l.flit_id)) cur_src[o] = -1;
      end
      if (s < NP && exp_q[s][o].size() > 0) begin
        sent_t e;
        e = exp_q[s][o].pop_front();
        check(l == e.l, $sformatf("output %0d: flit %h expected %h", o, l.flit, e.l.flit));
        if (cyc - e.t_in < min_lat) min_lat = cyc - e.t_in;
      end else check(1'b0, $sformatf("unexpected flit on output %0d", o));
    end
  end

  // count cycles where a flit waits for a credit, and output conflicts
  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < NP; o++) begin
      int nreq = 0;
      for (int i = 0; i < NP; i++) if (dut.req[o][i]) nreq++;
      if (nreq > 1) conflicts++;
    end
    for (int i = 0; i < NP; i++) if (dut.empty[i] == 1'b0 && !dut.pop[i]) stalls++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (8000) @(posedge clk);
    check(n_recv == n_sent, $sformatf("sent %0d flits, received %0d", n_sent, n_recv));
    for (int s = 0; s < NP; s++) for (int o = 0; o < NP; o++)
      check(exp_q[s][o].size() == 0, "flits left undelivered");
    check(min_lat == 1, $sformatf("shortest latency %0d cycles", min_lat));
    check(stalls > 0, "no stall happened");
    check(conflicts > 0, "no output conflict happened");
    $display("flits %0d, stall cycles %0d, conflicts %0d, min latency %0d", n_recv, stalls, conflicts, min_lat);
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
