// la_routing: look-ahead routing unit of an input port.
//
// A head flit arrives already knowing which output port it takes here (its
// `port` field, chosen one router upstream). This unit works out the output
// port the flit will need at the *next* router: it applies the address update
// that leaving through `port` will cause, then runs the topology's routing
// function on the updated address. The result is stored with the flit in its
// VOQ, used to check the downstream queue's credit, and written into the
// flit's `port` field when it leaves. Doing this while the flit waits keeps
// route computation out of the switch path.
//
// Purely combinational. Inputs: the flit's port here and its relative
// address. Outputs: next-router port `np` and the address after this hop.
// Look-ahead routing follows the source architecture; the per-topology
// routing functions (noc_pkg::route, noc_pkg::update_addr) are this design's.
module la_routing
  import noc_pkg::*;
#(
  parameter topo_e TOPO = TOPO_MESH
) (
  input  logic [PORT_W-1:0]        port_here,
  input  logic signed [ADDR_W-1:0] a0,
  input  logic signed [ADDR_W-1:0] a1,
  output logic [PORT_W-1:0]        np,
  output logic signed [ADDR_W-1:0] next_a0,
  output logic signed [ADDR_W-1:0] next_a1
);
  always_comb begin
    {next_a0, next_a1} = update_addr(TOPO, port_here, a0, a1);
    np = route(TOPO, next_a0, next_a1);
  end
endmodule
