// tb_input_port: checks input port 0 (local) of a mesh router against a
// model. Random packets of 1..3 flits arrive for outputs 1..4 (no more than
// the VOQ has room for, as credits guarantee); random downstream credit and
// output-binding states, and a random grant, stand in for the rest of the
// router. Checked every cycle: the request is made exactly when some VOQ
// has a flit, downstream credit for it and an unbound output; the round-robin
// choice among those; the flit and look-ahead port presented; and the credit
// pulse one cycle after each flit leaves.
module tb_input_port;
  import noc_pkg::*;
  localparam int D = 4;
  logic clk = 1'b0, rst_n;
  logic in_valid, req_valid, grant;
  flit_t in_flit, req_flit;
  logic [NPORTS-1:0] credit_out, out_blocked;
  logic [NPORTS-1:0] dn_credit [NPORTS];
  logic [PORT_W-1:0] req_port, req_np;
  int checks = 0, failures = 0;
  logic [FLIT_W+PORT_W-1:0] q [NPORTS][$];
  int room [NPORTS];
  int last, pkt_left, pkt_port, pkt_np;
  logic [NPORTS-1:0] exp_credit;
  int n_credit_stall = 0, n_bypass = 0;

  always #5 clk = ~clk;

  input_port #(.TOPO(TOPO_MESH), .PORT_ID(0), .DEPTH(D)) dut (.clk, .rst_n, .in_valid, .in_flit,
    .credit_out, .dn_credit, .out_blocked, .req_valid, .req_port, .req_flit, .req_np, .grant);

  task automatic chk(logic ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  function automatic int xy(int dx, int dy);
    return dx > 0 ? 2 : dx < 0 ? 4 : dy > 0 ? 1 : dy < 0 ? 3 : 0;
  endfunction

  initial begin
    rst_n = 1'b0; in_valid = 0; in_flit = '0; grant = 0; out_blocked = '0;
    for (int j = 0; j < NPORTS; j++) begin dn_credit[j] = '1; room[j] = D; end
    last = NPORTS - 1; pkt_left = 0; exp_credit = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;
    for (int t = 0; t < 5000; t++) begin
      logic [NPORTS-1:0] elig;
      int e;
      // arriving flit
      in_valid = 0;
      if (pkt_left == 0 && $urandom_range(0, 1) == 1) begin
        pkt_port = $urandom_range(1, 4);
        if (room[pkt_port] > 0) begin
          int dx, dy, len;
          len = $urandom_range(1, 3);
          if (len > room[pkt_port]) len = room[pkt_port];
          dx = $urandom_range(0, 6) - 3; dy = $urandom_range(0, 6) - 3;
          in_flit = '0;
          in_flit.ftype = (len == 1) ? FT_SINGLE : FT_HEAD;
          in_flit.port = 3'(pkt_port);
          in_flit.a0 = 4'(dx); in_flit.a1 = 4'(dy);
          in_flit.data = 8'($urandom);
          pkt_np = xy(dx - (pkt_port == 2) + (pkt_port == 4), dy - (pkt_port == 1) + (pkt_port == 3));
          in_valid = 1;
          pkt_left = len - 1;
        end
      end else if (pkt_left > 0 && room[pkt_port] > 0 && $urandom_range(0, 2) != 0) begin
        in_flit = flit_t'($urandom);
        in_flit.ftype = (pkt_left == 1) ? FT_TAIL : FT_BODY;
        in_valid = 1;
        pkt_left--;
      end
      // rest of the router
      for (int j = 0; j < NPORTS; j++) dn_credit[j] = NPORTS'($urandom) | NPORTS'($urandom);
      out_blocked = NPORTS'($urandom) & NPORTS'($urandom) & NPORTS'($urandom);
      #1;
      for (int j = 0; j < NPORTS; j++) begin
        logic [FLIT_W+PORT_W-1:0] h;
        elig[j] = 0;
        if (q[j].size() > 0) begin
          h = q[j][0];
          elig[j] = dn_credit[j][h[PORT_W-1:0]] && !out_blocked[j];
          if (!dn_credit[j][h[PORT_W-1:0]]) n_credit_stall++;
        end
      end
      e = -1;
      for (int o = 1; o <= NPORTS; o++)
        if (e < 0 && elig[(last + o) % NPORTS]) e = (last + o) % NPORTS;
      chk(req_valid == (e >= 0), $sformatf("t=%0d req_valid %0d want %0d", t, req_valid, e >= 0));
      if (e >= 0) begin
        chk(32'(req_port) == e && {req_flit, req_np} == q[e][0],
            $sformatf("t=%0d req port %0d np %0d want %0d / %h", t, req_port, req_np, e, q[e][0]));
        if (elig != (NPORTS'(1) << e) && (q[e].size() > 0)) n_bypass++;
      end
      grant = req_valid && ($urandom_range(0, 2) != 0);
      chk(credit_out == exp_credit, "credit pulse");
      @(posedge clk);
      #1;
      exp_credit = '0;
      if (grant && e >= 0) begin
        void'(q[e].pop_front());
        room[e]++;
        last = e;
        exp_credit[e] = 1'b1;
      end
      if (in_valid) begin
        q[pkt_port].push_back({in_flit, 3'(pkt_np)});
        room[pkt_port]--;
      end
      grant = 0;
    end
    chk(n_credit_stall > 0, "no credit stall seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
