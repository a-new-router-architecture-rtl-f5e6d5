// ring_noc: octagon network of eight VOQ routers, one resource per router.
//
// Node n's clockwise port (1) links to the counter-clockwise port (2) of
// node n+1 (mod 8), and its across port (3) to the across port of the
// opposite node n+4. With the ring links and the four cross links any node
// reaches any other in at most two hops: distance 1 or 2 clockwise goes
// clockwise, 6 or 7 goes counter-clockwise, and 3, 4 or 5 first crosses to the
// opposite node. Port 0 of every router goes to an RNI; port 4 is unused.
//
// A resource addresses a packet by a0 = (dest - src) mod 8, a1 = 0.
// The octagon arrangement and the eight nodes follow the ring topology drawn
// for this design; the shortest-path routing rule is this design's own.
module ring_noc
  import noc_pkg::*;
#(
  parameter int DEPTH = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [7:0]    inj_valid,
  output logic [7:0]    inj_ready,
  input  flit_t         inj_flit [8],
  output logic [7:0]    ej_valid,
  output flit_t         ej_flit  [8]
);
  localparam int N = 8;

  logic [NPORTS-1:0] r_in_valid  [N];
  flit_t             r_in_flit   [N][NPORTS];
  logic [NPORTS-1:0] r_cred_out  [N][NPORTS];
  logic [NPORTS-1:0] r_out_valid [N];
  flit_t             r_out_flit  [N][NPORTS];
  logic [NPORTS-1:0] r_cred_in   [N][NPORTS];

  for (genvar n = 0; n < N; n++) begin : g_node
    localparam int NEXT = (n + 1) % N;
    localparam int PREV = (n + N - 1) % N;
    localparam int OPP  = (n + N / 2) % N;

    router #(.TOPO(TOPO_RING), .DEPTH(DEPTH)) u_router (
      .clk, .rst_n,
      .in_valid  (r_in_valid[n]),
      .in_flit   (r_in_flit[n]),
      .credit_out(r_cred_out[n]),
      .out_valid (r_out_valid[n]),
      .out_flit  (r_out_flit[n]),
      .credit_in (r_cred_in[n])
    );

    rni #(.TOPO(TOPO_RING), .DEPTH(DEPTH)) u_rni (
      .clk, .rst_n,
      .inj_valid      (inj_valid[n]),
      .inj_ready      (inj_ready[n]),
      .inj_flit       (inj_flit[n]),
      .ej_valid       (ej_valid[n]),
      .ej_flit        (ej_flit[n]),
      .to_rtr_valid   (r_in_valid[n][0]),
      .to_rtr_flit    (r_in_flit[n][0]),
      .credit_from_rtr(r_cred_out[n][0]),
      .from_rtr_valid (r_out_valid[n][0]),
      .from_rtr_flit  (r_out_flit[n][0]),
      .credit_to_rtr  (r_cred_in[n][0])
    );

    // clockwise port 1 <-> counter-clockwise port 2 of the next node
    assign r_in_valid[n][1] = r_out_valid[NEXT][2];
    assign r_in_flit[n][1]  = r_out_flit[NEXT][2];
    assign r_cred_in[n][1]  = r_cred_out[NEXT][2];
    // counter-clockwise port 2 <-> clockwise port 1 of the previous node
    assign r_in_valid[n][2] = r_out_valid[PREV][1];
    assign r_in_flit[n][2]  = r_out_flit[PREV][1];
    assign r_cred_in[n][2]  = r_cred_out[PREV][1];
    // across port 3 <-> across port 3 of the opposite node
    assign r_in_valid[n][3] = r_out_valid[OPP][3];
    assign r_in_flit[n][3]  = r_out_flit[OPP][3];
    assign r_cred_in[n][3]  = r_cred_out[OPP][3];
    // port 4 unused
    assign r_in_valid[n][4] = 1'b0;
    assign r_in_flit[n][4]  = '0;
    assign r_cred_in[n][4]  = '0;
  end
endmodule
