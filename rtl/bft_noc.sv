// bft_noc: tree network of three VOQ routers with six resources at the leaves.
//
// Router 0 is the root; its child ports 1 and 2 link to the parent port (0)
// of routers 1 and 2. Routers 1 and 2 each have three resources on their child
// ports 1..3: resources 0..2 hang from router 1 and 3..5 from router 2. The
// root's ports 0, 3, 4 and port 4 of the other two routers are unused.
// Switches sit only at the inner nodes and resources only at the leaves.
//
// A resource addresses a packet by a0 = hops to climb (0 within its own
// router, 1 otherwise) and a1 = the child ports for the way down, two bits
// each, the first one to use in a1[1:0]. From resource s to resource d on
// the other router: a0 = 1, a1 = {port of d at its router, 2'(d/3 + 1)}.
//
// The shape (a root over two switches with three leaves each) is the tree
// drawn for this design; the addressing is this design's own.
module bft_noc
  import noc_pkg::*;
#(
  parameter int DEPTH = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [5:0]    inj_valid,
  output logic [5:0]    inj_ready,
  input  flit_t         inj_flit [6],
  output logic [5:0]    ej_valid,
  output flit_t         ej_flit  [6]
);
  localparam int NR = 3;

  logic [NPORTS-1:0] r_in_valid  [NR];
  flit_t             r_in_flit   [NR][NPORTS];
  logic [NPORTS-1:0] r_cred_out  [NR][NPORTS];
  logic [NPORTS-1:0] r_out_valid [NR];
  flit_t             r_out_flit  [NR][NPORTS];
  logic [NPORTS-1:0] r_cred_in   [NR][NPORTS];

  for (genvar r = 0; r < NR; r++) begin : g_rtr
    router #(.TOPO(TOPO_TREE), .DEPTH(DEPTH)) u_router (
      .clk, .rst_n,
      .in_valid  (r_in_valid[r]),
      .in_flit   (r_in_flit[r]),
      .credit_out(r_cred_out[r]),
      .out_valid (r_out_valid[r]),
      .out_flit  (r_out_flit[r]),
      .credit_in (r_cred_in[r])
    );
    // port 4 unused everywhere
    assign r_in_valid[r][4] = 1'b0;
    assign r_in_flit[r][4]  = '0;
    assign r_cred_in[r][4]  = '0;
  end

  // root: ports 0 and 3 unused, child ports 1 and 2 to the parent port of routers 1, 2
  for (genvar p = 0; p < 4; p += 3) begin : g_root_open
    assign r_in_valid[0][p] = 1'b0;
    assign r_in_flit[0][p]  = '0;
    assign r_cred_in[0][p]  = '0;
  end
  for (genvar c = 1; c <= 2; c++) begin : g_link
    assign r_in_valid[0][c] = r_out_valid[c][0];
    assign r_in_flit[0][c]  = r_out_flit[c][0];
    assign r_cred_in[0][c]  = r_cred_out[c][0];
    assign r_in_valid[c][0] = r_out_valid[0][c];
    assign r_in_flit[c][0]  = r_out_flit[0][c];
    assign r_cred_in[c][0]  = r_cred_out[0][c];
  end

  // leaves: resource l on router 1 + l/3, child port 1 + l%3
  for (genvar l = 0; l < 6; l++) begin : g_leaf
    localparam int R = 1 + l / 3;
    localparam int P = 1 + l % 3;
    rni #(.TOPO(TOPO_TREE), .DEPTH(DEPTH)) u_rni (
      .clk, .rst_n,
      .inj_valid      (inj_valid[l]),
      .inj_ready      (inj_ready[l]),
      .inj_flit       (inj_flit[l]),
      .ej_valid       (ej_valid[l]),
      .ej_flit        (ej_flit[l]),
      .to_rtr_valid   (r_in_valid[R][P]),
      .to_rtr_flit    (r_in_flit[R][P]),
      .credit_from_rtr(r_cred_out[R][P]),
      .from_rtr_valid (r_out_valid[R][P]),
      .from_rtr_flit  (r_out_flit[R][P]),
      .credit_to_rtr  (r_cred_in[R][P])
    );
  end
endmodule
