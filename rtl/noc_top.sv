// noc_top: the VOQ router in the three network topologies it was built for,
// side by side: a 3x3 mesh, an eight-node octagon ring and a tree with a root,
// two switches and six leaf resources. The three networks share the clock and
// reset and nothing else; each brings out its own resource-side ports
// (inject with valid/ready, eject with valid only).
//
// See mesh_noc, ring_noc and bft_noc for how each network is wired and
// addressed, and router for the router itself. The sizes are those of the
// three topologies drawn for this design.
module noc_top
  import noc_pkg::*;
#(
  parameter int DEPTH = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  // 3x3 mesh
  input  logic [8:0] mesh_inj_valid,
  output logic [8:0] mesh_inj_ready,
  input  flit_t      mesh_inj_flit [9],
  output logic [8:0] mesh_ej_valid,
  output flit_t      mesh_ej_flit  [9],
  // octagon ring
  input  logic [7:0] ring_inj_valid,
  output logic [7:0] ring_inj_ready,
  input  flit_t      ring_inj_flit [8],
  output logic [7:0] ring_ej_valid,
  output flit_t      ring_ej_flit  [8],
  // tree
  input  logic [5:0] bft_inj_valid,
  output logic [5:0] bft_inj_ready,
  input  flit_t      bft_inj_flit [6],
  output logic [5:0] bft_ej_valid,
  output flit_t      bft_ej_flit  [6]
);
  mesh_noc #(.COLS(3), .ROWS(3), .DEPTH(DEPTH)) u_mesh (
    .clk, .rst_n,
    .inj_valid(mesh_inj_valid), .inj_ready(mesh_inj_ready), .inj_flit(mesh_inj_flit),
    .ej_valid (mesh_ej_valid),  .ej_flit  (mesh_ej_flit)
  );

  ring_noc #(.DEPTH(DEPTH)) u_ring (
    .clk, .rst_n,
    .inj_valid(ring_inj_valid), .inj_ready(ring_inj_ready), .inj_flit(ring_inj_flit),
    .ej_valid (ring_ej_valid),  .ej_flit  (ring_ej_flit)
  );

  bft_noc #(.DEPTH(DEPTH)) u_bft (
    .clk, .rst_n,
    .inj_valid(bft_inj_valid), .inj_ready(bft_inj_ready), .inj_flit(bft_inj_flit),
    .ej_valid (bft_ej_valid),  .ej_flit  (bft_ej_flit)
  );
endmodule
