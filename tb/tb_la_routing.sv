// tb_la_routing: exhaustive check of the look-ahead routing unit for all
// three topologies. The expected next-router port is worked out here from
// the hop the flit takes and a direct statement of each routing rule (XY for
// the mesh, shortest path for the octagon, up-then-down for the tree).
module tb_la_routing;
  import noc_pkg::*;
  logic [PORT_W-1:0] port_here;
  logic signed [ADDR_W-1:0] a0, a1;
  logic [PORT_W-1:0] np_m, np_r, np_t;
  logic signed [ADDR_W-1:0] m0, m1, r0, r1, t0, t1;
  int checks = 0, failures = 0;

  la_routing #(.TOPO(TOPO_MESH)) u_m (.port_here, .a0, .a1, .np(np_m), .next_a0(m0), .next_a1(m1));
  la_routing #(.TOPO(TOPO_RING)) u_r (.port_here, .a0, .a1, .np(np_r), .next_a0(r0), .next_a1(r1));
  la_routing #(.TOPO(TOPO_TREE)) u_t (.port_here, .a0, .a1, .np(np_t), .next_a0(t0), .next_a1(t1));

  task automatic chk(logic ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    // mesh: (dx, dy) with |dx|,|dy| <= 6, each legal hop
    for (int dx = -6; dx <= 6; dx++)
      for (int dy = -6; dy <= 6; dy++) begin
        int p, ndx, ndy, e;
        // the port a flit with this address takes here (XY)
        p = dx > 0 ? 2 : dx < 0 ? 4 : dy > 0 ? 1 : dy < 0 ? 3 : 0;
        ndx = dx - (p == 2) + (p == 4);
        ndy = dy - (p == 1) + (p == 3);
        e = ndx > 0 ? 2 : ndx < 0 ? 4 : ndy > 0 ? 1 : ndy < 0 ? 3 : 0;
        port_here = 3'(p); a0 = 4'(dx); a1 = 4'(dy);
        #1;
        chk(32'(np_m) == e && int'(m0) == ndx && int'(m1) == ndy,
            $sformatf("mesh dx=%0d dy=%0d np=%0d want %0d", dx, dy, np_m, e));
      end
    // octagon: remaining distance d, the hop taken here
    for (int d = 0; d < 8; d++) begin
      int p, nd, e;
      p = (d == 0) ? 0 : (d <= 2) ? 1 : (d >= 6) ? 2 : 3;
      nd = (p == 1) ? (d + 7) % 8 : (p == 2) ? (d + 1) % 8 : (p == 3) ? (d + 4) % 8 : d;
      e = (nd == 0) ? 0 : (nd <= 2) ? 1 : (nd >= 6) ? 2 : 3;
      port_here = 3'(p); a0 = 4'(d); a1 = '0;
      #1;
      chk(32'(np_r) == e && int'(r0) == nd, $sformatf("ring d=%0d np=%0d want %0d", d, np_r, e));
    end
    // tree: climb 0/1, then a down list of up to two child ports
    for (int up = 0; up <= 1; up++)
      for (int c1 = 1; c1 <= 3; c1++)
        for (int c2 = 0; c2 <= 3; c2++) begin
          int p, e, nup, nlist;
          int list;
          list = c1 | (c2 << 2);
          p = up ? 0 : c1;
          nup = up ? 0 : 0;
          nlist = up ? list : (list >> 2);
          e = nup ? 0 : (nlist & 3) != 0 ? (nlist & 3) : 4;
          port_here = 3'(p); a0 = 4'(up); a1 = 4'(list);
          #1;
          chk(32'(np_t) == e && int'(t0) == nup && int'(unsigned'(t1)) == nlist,
              $sformatf("tree up=%0d list=%0d np=%0d want %0d", up, list, np_t, e));
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
