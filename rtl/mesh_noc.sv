// mesh_noc: COLS x ROWS mesh of VOQ routers, one resource per router.
//
// Router (x, y) has index n = y*COLS + x. Its north port (1) links to the
// south port (3) of (x, y+1) and its east port (2) to the west port (4) of
// (x+1, y); both directions of every link carry flits one way and credits the
// other. Ports at the edge of the mesh are left open (no flit comes in, no
// credit ever comes back, and XY routing never sends anything out of them),
// so edge routers use fewer than five ports, as in the mesh topology the
// design targets. Port 0 of every router goes to an RNI.
//
// A resource addresses a packet by its relative destination: a0 = x_dest -
// x_src, a1 = y_dest - y_src (see noc_pkg). Flits cross each router in two
// cycles when nothing blocks them, plus one cycle in each RNI.
//
// The 3x3 default is the size of the mesh drawn for this design; any size
// with |dx|, |dy| <= 7 fits the 4-bit address fields.
module mesh_noc
  import noc_pkg::*;
#(
  parameter int COLS  = 3,
  parameter int ROWS  = 3,
  parameter int DEPTH = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [COLS*ROWS-1:0]  inj_valid,
  output logic [COLS*ROWS-1:0]  inj_ready,
  input  flit_t                 inj_flit [COLS*ROWS],
  output logic [COLS*ROWS-1:0]  ej_valid,
  output flit_t                 ej_flit  [COLS*ROWS]
);
  localparam int N = COLS * ROWS;

  logic [NPORTS-1:0] r_in_valid  [N];
  flit_t             r_in_flit   [N][NPORTS];
  logic [NPORTS-1:0] r_cred_out  [N][NPORTS];
  logic [NPORTS-1:0] r_out_valid [N];
  flit_t             r_out_flit  [N][NPORTS];
  logic [NPORTS-1:0] r_cred_in   [N][NPORTS];

  for (genvar n = 0; n < N; n++) begin : g_node
    localparam int X = n % COLS;
    localparam int Y = n / COLS;

    router #(.TOPO(TOPO_MESH), .DEPTH(DEPTH)) u_router (
      .clk, .rst_n,
      .in_valid  (r_in_valid[n]),
      .in_flit   (r_in_flit[n]),
      .credit_out(r_cred_out[n]),
      .out_valid (r_out_valid[n]),
      .out_flit  (r_out_flit[n]),
      .credit_in (r_cred_in[n])
    );

    rni #(.TOPO(TOPO_MESH), .DEPTH(DEPTH)) u_rni (
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

    // north (1) <-> south (3) of (x, y+1)
    if (Y < ROWS - 1) begin : g_n
      assign r_in_valid[n][1] = r_out_valid[n + COLS][3];
      assign r_in_flit[n][1]  = r_out_flit[n + COLS][3];
      assign r_cred_in[n][1]  = r_cred_out[n + COLS][3];
    end else begin : g_n_edge
      assign r_in_valid[n][1] = 1'b0;
      assign r_in_flit[n][1]  = '0;
      assign r_cred_in[n][1]  = '0;
    end
    // east (2) <-> west (4) of (x+1, y)
    if (X < COLS - 1) begin : g_e
      assign r_in_valid[n][2] = r_out_valid[n + 1][4];
      assign r_in_flit[n][2]  = r_out_flit[n + 1][4];
      assign r_cred_in[n][2]  = r_cred_out[n + 1][4];
    end else begin : g_e_edge
      assign r_in_valid[n][2] = 1'b0;
      assign r_in_flit[n][2]  = '0;
      assign r_cred_in[n][2]  = '0;
    end
    // south (3) <-> north (1) of (x, y-1)
    if (Y > 0) begin : g_s
      assign r_in_valid[n][3] = r_out_valid[n - COLS][1];
      assign r_in_flit[n][3]  = r_out_flit[n - COLS][1];
      assign r_cred_in[n][3]  = r_cred_out[n - COLS][1];
    end else begin : g_s_edge
      assign r_in_valid[n][3] = 1'b0;
      assign r_in_flit[n][3]  = '0;
      assign r_cred_in[n][3]  = '0;
    end
    // west (4) <-> east (2) of (x-1, y)
    if (X > 0) begin : g_w
      assign r_in_valid[n][4] = r_out_valid[n - 1][2];
      assign r_in_flit[n][4]  = r_out_flit[n - 1][2];
      assign r_cred_in[n][4]  = r_cred_out[n - 1][2];
    end else begin : g_w_edge
      assign r_in_valid[n][4] = 1'b0;
      assign r_in_flit[n][4]  = '0;
      assign r_cred_in[n][4]  = '0;
    end
  end
endmodule
