// tb_rni: checks the resource network interface of a mesh node.
// Injection: random packets; each accepted flit reaches the router one cycle
// later, a head flit with its first-router port filled in by XY routing, and
// body flits unchanged; a flit is refused exactly when its queue at the
// router has no credit left (the router's credit return is delayed at
// random). Ejection: each flit from the router is presented to the resource
// one cycle later, and one cycle after arrival a credit is returned for the
// queue named by the packet's head.
module tb_rni;
  import noc_pkg::*;
  localparam int D = 4;
  logic clk = 1'b0, rst_n;
  logic inj_valid, inj_ready, ej_valid, to_rtr_valid, from_rtr_valid;
  flit_t inj_flit, ej_flit, to_rtr_flit, from_rtr_flit;
  logic [NPORTS-1:0] credit_from_rtr, credit_to_rtr;
  int checks = 0, failures = 0;
  int cred [NPORTS];
  int pend [$];
  int pkt_port, left, ej_port, n_refused = 0;
  flit_t exp_to, exp_ej;
  logic exp_to_v, exp_ej_v, took;
  logic [NPORTS-1:0] exp_cr;

  always #5 clk = ~clk;

  rni #(.TOPO(TOPO_MESH), .DEPTH(D)) dut (.clk, .rst_n, .inj_valid, .inj_ready, .inj_flit,
    .ej_valid, .ej_flit, .to_rtr_valid, .to_rtr_flit, .credit_from_rtr,
    .from_rtr_valid, .from_rtr_flit, .credit_to_rtr);

  task automatic chk(logic ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  function automatic int xy(int dx, int dy);
    return dx > 0 ? 2 : dx < 0 ? 4 : dy > 0 ? 1 : dy < 0 ? 3 : 0;
  endfunction

  initial begin
    rst_n = 1'b0; inj_valid = 0; inj_flit = '0; from_rtr_valid = 0; from_rtr_flit = '0;
    credit_from_rtr = '0;
    for (int k = 0; k < NPORTS; k++) cred[k] = D;
    left = 0; pkt_port = 0; ej_port = 0;
    exp_to_v = 0; exp_ej_v = 0; exp_cr = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;
    for (int t = 0; t < 4000; t++) begin
      int p;
      // offer an injected flit
      inj_flit = flit_t'($urandom);
      if (left == 0) begin
        int dx, dy, len;
        do begin dx = $urandom_range(0, 4) - 2; dy = $urandom_range(0, 4) - 2; end
        while (dx == 0 && dy == 0);
        len = $urandom_range(1, 4);
        inj_flit.ftype = (len == 1) ? FT_SINGLE : FT_HEAD;
        inj_flit.a0 = 4'(dx); inj_flit.a1 = 4'(dy);
        p = xy(dx, dy);
      end else begin
        inj_flit.ftype = (left == 1) ? FT_TAIL : FT_BODY;
        p = pkt_port;
      end
      inj_valid = ($urandom_range(0, 1) == 1);
      // router returns credits late
      credit_from_rtr = '0;
      if (pend.size() > 0 && $urandom_range(0, 3) == 0) credit_from_rtr[pend.pop_front()] = 1'b1;
      // a flit leaving the router towards this resource
      from_rtr_valid = ($urandom_range(0, 2) == 0);
      from_rtr_flit = flit_t'($urandom);
      from_rtr_flit.port = 3'($urandom_range(0, 4));
      #1;
      chk(inj_ready == (cred[p] > 0), $sformatf("t=%0d ready %0d with %0d credits", t, inj_ready, cred[p]));
      if (inj_valid && !inj_ready) n_refused++;
      chk(to_rtr_valid == exp_to_v && (!exp_to_v || to_rtr_flit == exp_to), $sformatf("t=%0d flit to router %b %h want %b %h", t, to_rtr_valid, to_rtr_flit, exp_to_v, exp_to));
      chk(ej_valid == exp_ej_v && (!exp_ej_v || ej_flit == exp_ej), "flit to resource");
      chk(credit_to_rtr == exp_cr, "credit to router");
      took = inj_valid && inj_ready;
      @(posedge clk); #1;
      for (int k = 0; k < NPORTS; k++) if (credit_from_rtr[k]) cred[k]++;
      exp_to_v = took;
      if (exp_to_v) begin
        exp_to = inj_flit;
        if (is_head(inj_flit.ftype)) exp_to.port = 3'(p);
        cred[p]--;
        pend.push_back(p);
        pkt_port = p;
        left = is_head(inj_flit.ftype) ? (inj_flit.ftype == FT_SINGLE ? 0 : $urandom_range(1, 3)) : left - 1;
      end
      exp_ej_v = from_rtr_valid;
      exp_ej = from_rtr_flit;
      exp_cr = '0;
      if (from_rtr_valid) begin
        if (is_head(from_rtr_flit.ftype)) ej_port = int'(from_rtr_flit.port);
        exp_cr[ej_port % NPORTS] = 1'b1;
      end
    end
    chk(n_refused > 0, "credit never ran out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
