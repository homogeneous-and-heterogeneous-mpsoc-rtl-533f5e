// tb_noc_pkg: the shared NoC definitions. For every pair of the sixteen NI
// positions of the heterogeneous network (and the eight of the homogeneous
// one) the source route from spidergon_route is walked hop by hop over the
// Spidergon links (Right = +1, Left = -1, Across = +4). Checks: the walk
// ends at the destination router and local port, crosses at most three
// routers, uses the ring only for destinations one or two hops away, and
// leaves the route field empty. Random headers survive make_header followed
// by hdr_nlh and hdr_tlh, and is_head/is_tail classify all four flit ids.
`timescale 1ns/1ps
module tb_noc_pkg;
  import noc_pkg::*;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    for (int nloc = 1; nloc <= 2; nloc++)
      for (int s = 0; s < 8 * nloc; s++)
        for (int d = 0; d < 8 * nloc; d++) begin
          automatic ni_pos_t ps = '{router: 3'(s / nloc), lport: 1'(s % nloc)};
          automatic ni_pos_t pd = '{router: 3'(d / nloc), lport: 1'(d % nloc)};
          automatic logic [8:0] r = spidergon_route(ps, pd);
          automatic int at = int'(ps.router), crossed = 0, across = 0;
          automatic bit arrived = 0;
          for (int h = 0; h < 3 && !arrived; h++) begin
            automatic logic [2:0] pt = r[2:0];
            crossed++;
            r = {3'b000, r[8:3]};
            case (pt)
              PORT_RIGHT:  at = (at + 1) % 8;
              PORT_LEFT:   at = (at + 7) % 8;
              PORT_ACROSS: begin at = (at + 4) % 8; across++; end
              PORT_NI1:    begin arrived = 1; check(pd.lport == 1'b0, "delivered to NI1 instead of NI2"); end
              PORT_NI2:    begin arrived = 1; check(pd.lport == 1'b1, "delivered to NI2 instead of NI1"); end
              default:     check(1'b0, $sformatf("route %0d -> %0d uses port %0d", s, d, pt));
            endcase
          end
          check(arrived && at == int'(pd.router), $sformatf("route %0d -> %0d does not arrive", s, d));
          check(crossed <= 3, "more than three routers crossed");
          check(r == '0, "route field not empty on arrival");
          if (((int'(pd.router) - int'(ps.router) + 8) % 8) inside {1, 2, 6, 7})
            check(across == 0, "ring destination reached through Across");
        end
    for (int n = 0; n < 200; n++) begin
      automatic nlh_t nl = nlh_t'($urandom);
      automatic tlh_t tl = tlh_t'({$urandom, $urandom});
      automatic logic [FLIT_W-1:0] f = make_header(nl, tl);
      check(hdr_nlh(f) == nl && hdr_tlh(f) == tl, "header fields do not survive packing");
      check(f[FLIT_W-1:HDR_BITS] == '0, "header flit has bits above the header");
    end
    check(is_head(FLIT_SINGLE) && is_head(FLIT_FIRST) && !is_head(FLIT_INT) && !is_head(FLIT_LAST), "is_head");
    check(is_tail(FLIT_SINGLE) && !is_tail(FLIT_FIRST) && !is_tail(FLIT_INT) && is_tail(FLIT_LAST), "is_tail");
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
