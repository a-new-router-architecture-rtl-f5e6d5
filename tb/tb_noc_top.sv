// tb_noc_top: end-to-end test of all three networks at their default sizes
// (3x3 mesh, octagon ring, tree of three routers and six leaves), driven at
// once by three traffic generators (see noc_traffic): lone packets with exact
// latency checks, uniform random traffic, then hotspot traffic.
//
// It also counts how often each mechanism of the router actually happened,
// per network, and counts a failure for any that never did:
//   credit  - a VOQ held back because the queue it feeds at the next router
//             is full (no credit)
//   bind    - a VOQ held back because its output is bound to another input
//             in the middle of a multi-flit packet
//   bypass  - a flit leaves an input port while another VOQ of the same port
//             is blocked (no head-of-line blocking)
//   arb     - an input port loses the output arbitration to another port
//   inject  - a resource is held back by its network interface (no credit)
// and, per topology, that the octagon's cross links and the tree's root are
// used.
module tb_noc_top;
  import noc_pkg::*;
  logic clk = 1'b0;
  logic rst_n, rst_unused_r, rst_unused_b;
  logic [8:0] m_iv, m_ir, m_ev;
  logic [7:0] r_iv, r_ir, r_ev;
  logic [5:0] b_iv, b_ir, b_ev;
  flit_t m_if [9], m_ef [9];
  flit_t r_if [8], r_ef [8];
  flit_t b_if [6], b_ef [6];
  logic m_done, r_done, b_done;
  int m_chk, m_fail, m_stall, r_chk, r_fail, r_stall, b_chk, b_fail, b_stall;

  localparam int NMECH = 4;
  localparam string MNAME [NMECH] = '{"credit", "bind", "bypass", "arb"};
  int mech [3][NMECH];
  int across_used = 0, root_used = 0;

  always #5 clk = ~clk;

  noc_top dut (
    .clk, .rst_n,
    .mesh_inj_valid(m_iv), .mesh_inj_ready(m_ir), .mesh_inj_flit(m_if),
    .mesh_ej_valid (m_ev), .mesh_ej_flit (m_ef),
    .ring_inj_valid(r_iv), .ring_inj_ready(r_ir), .ring_inj_flit(r_if),
    .ring_ej_valid (r_ev), .ring_ej_flit (r_ef),
    .bft_inj_valid (b_iv), .bft_inj_ready (b_ir), .bft_inj_flit (b_if),
    .bft_ej_valid  (b_ev), .bft_ej_flit  (b_ef)
  );

  noc_traffic #(.N(9), .TOPO(TOPO_MESH), .COLS(3), .HOT(4), .NPKT(30), .SEED(21)) u_mesh_tr (
    .clk, .rst_n(rst_n), .inj_valid(m_iv), .inj_ready(m_ir), .inj_flit(m_if),
    .ej_valid(m_ev), .ej_flit(m_ef), .done(m_done), .checks(m_chk), .failures(m_fail),
    .src_stall_cycles(m_stall));
  noc_traffic #(.N(8), .TOPO(TOPO_RING), .HOT(3), .NPKT(30), .SEED(22)) u_ring_tr (
    .clk, .rst_n(rst_unused_r), .inj_valid(r_iv), .inj_ready(r_ir), .inj_flit(r_if),
    .ej_valid(r_ev), .ej_flit(r_ef), .done(r_done), .checks(r_chk), .failures(r_fail),
    .src_stall_cycles(r_stall));
  noc_traffic #(.N(6), .TOPO(TOPO_TREE), .HOT(1), .NPKT(30), .SEED(23)) u_bft_tr (
    .clk, .rst_n(rst_unused_b), .inj_valid(b_iv), .inj_ready(b_ir), .inj_flit(b_if),
    .ej_valid(b_ev), .ej_flit(b_ef), .done(b_done), .checks(b_chk), .failures(b_fail),
    .src_stall_cycles(b_stall));

  // mechanism probes, one per input port of every router
`define TB_PROBE(NET, IDX, PATH)                                                       \
    always @(posedge clk) if (rst_n) begin                                              \
      if (|(~PATH.empty & ~PATH.out_blocked & ~PATH.eligible)) mech[IDX][0]++;          \
      if (|(~PATH.empty & PATH.out_blocked))                   mech[IDX][1]++;          \
      if (PATH.grant && |(~PATH.empty & ~PATH.eligible))       mech[IDX][2]++;          \
      if (PATH.req_valid && !PATH.grant)                       mech[IDX][3]++;          \
    end

  for (genvar n = 0; n < 9; n++) begin : g_pm
    for (genvar i = 0; i < NPORTS; i++) begin : g_i
      `TB_PROBE(mesh, 0, dut.u_mesh.g_node[n].u_router.g_in[i].u_ip)
    end
  end
  for (genvar n = 0; n < 8; n++) begin : g_pr
    for (genvar i = 0; i < NPORTS; i++) begin : g_i
      `TB_PROBE(ring, 1, dut.u_ring.g_node[n].u_router.g_in[i].u_ip)
    end
    always @(posedge clk) if (dut.u_ring.g_node[n].u_router.out_valid[3]) across_used++;
  end
  for (genvar n = 0; n < 3; n++) begin : g_pb
    for (genvar i = 0; i < NPORTS; i++) begin : g_i
      `TB_PROBE(bft, 2, dut.u_bft.g_rtr[n].u_router.g_in[i].u_ip)
    end
  end
  always @(posedge clk) if (|dut.u_bft.g_rtr[0].u_router.out_valid) root_used++;

  initial begin
    int checks, failures;
    for (int k = 0; k < 3; k++) for (int m = 0; m < NMECH; m++) mech[k][m] = 0;
    #1;
    wait (m_done && r_done && b_done);
    checks = m_chk + r_chk + b_chk;
    failures = m_fail + r_fail + b_fail;
    for (int k = 0; k < 3; k++) begin
      $display("%s: credit %0d, bind %0d, bypass %0d, arb %0d, inject %0d",
               k == 0 ? "mesh" : k == 1 ? "ring" : "tree",
               mech[k][0], mech[k][1], mech[k][2], mech[k][3],
               k == 0 ? m_stall : k == 1 ? r_stall : b_stall);
      for (int m = 0; m < NMECH; m++) begin
        checks++;
        if (mech[k][m] == 0) begin
          failures++;
          $display("FAIL mechanism %s never happened in network %0d", MNAME[m], k);
        end
      end
    end
    checks += 5;
    if (m_stall == 0) failures++;
    if (r_stall == 0) failures++;
    if (b_stall == 0) failures++;
    if (across_used == 0) begin failures++; $display("FAIL octagon cross links unused"); end
    if (root_used == 0) begin failures++; $display("FAIL tree root unused"); end
    $display("octagon cross-link flits %0d, tree root flits %0d", across_used, root_used);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", m_chk + r_chk + b_chk, m_fail + r_fail + b_fail + 1);
    $finish;
  end
endmodule
