// noc_pkg: types, constants and routing functions shared by the VOQ router,
// its network interface and the three networks built from it.
//
// Flit format. Every flit carries the same packed fields; only the head flit
// uses the routing fields:
//   ftype : HEAD, BODY, TAIL or SINGLE (a one-flit packet, head and tail at once)
//   port  : output port to take at the router that receives this flit. It was
//           computed one router earlier (look-ahead routing), or by the network
//           interface for the first router.
//   a0,a1 : relative destination address (an "address tuple"). Each router
//           updates it as the flit leaves; when every element is 0 the flit has
//           reached its destination and is ejected.
//   data  : payload.
//
// Port numbering (0..4, a 5-port router):
//   MESH : 0 local, 1 north, 2 east, 3 south, 4 west. a0 = hops to go east
//          (negative: west), a1 = hops to go north (negative: south). XY routing.
//   RING : octagon. 0 local, 1 clockwise, 2 counter-clockwise, 3 across
//          (to the opposite node), 4 unused. a0 = (dest - here) mod 8, a1 = 0.
//          At most two hops between any pair of nodes.
//   TREE : 0 parent, 1..3 children, 4 unused. a0 = hops still to climb, a1 = a
//          list of 2-bit child ports for the way down, lowest pair first.
//
// The routing scheme of each topology (XY, shortest octagon path, up-then-down
// tree path) and all field widths are this design's choice; the source
// architecture only asks for look-ahead routing and a relative address that is
// updated at every hop and reads zero at the destination.
package noc_pkg;

  localparam int NPORTS = 5;                  // ports per router
  localparam int PORT_W = 3;                  // bits to name a port
  localparam int ADDR_W = 4;                  // bits per address element
  localparam int DATA_W = 8;                  // payload bits per flit

  typedef enum logic [1:0] {
    TOPO_MESH = 2'd0,
    TOPO_RING = 2'd1,
    TOPO_TREE = 2'd2
  } topo_e;

  typedef enum logic [1:0] {
    FT_HEAD   = 2'd0,
    FT_BODY   = 2'd1,
    FT_TAIL   = 2'd2,
    FT_SINGLE = 2'd3
  } ftype_e;

  typedef struct packed {
    ftype_e                   ftype;
    logic [PORT_W-1:0]        port;
    logic signed [ADDR_W-1:0] a0;
    logic signed [ADDR_W-1:0] a1;
    logic [DATA_W-1:0]        data;
  } flit_t;

  localparam int FLIT_W = $bits(flit_t);

  localparam logic signed [ADDR_W-1:0] A_ONE = 1;

  // Mesh port names
  localparam logic [PORT_W-1:0] P_LOCAL = 3'd0;
  localparam logic [PORT_W-1:0] P_NORTH = 3'd1;
  localparam logic [PORT_W-1:0] P_EAST  = 3'd2;
  localparam logic [PORT_W-1:0] P_SOUTH = 3'd3;
  localparam logic [PORT_W-1:0] P_WEST  = 3'd4;
  // Octagon port names
  localparam logic [PORT_W-1:0] P_CW     = 3'd1;
  localparam logic [PORT_W-1:0] P_CCW    = 3'd2;
  localparam logic [PORT_W-1:0] P_ACROSS = 3'd3;
  // Tree port names
  localparam logic [PORT_W-1:0] P_PARENT = 3'd0;
  localparam logic [PORT_W-1:0] P_UNUSED = 3'd4;

  function automatic logic is_head(ftype_e t);
    return (t == FT_HEAD) || (t == FT_SINGLE);
  endfunction

  function automatic logic is_tail(ftype_e t);
    return (t == FT_TAIL) || (t == FT_SINGLE);
  endfunction

  // Output port to take at a router holding relative address (a0, a1).
  function automatic logic [PORT_W-1:0] route(topo_e topo,
                                              logic signed [ADDR_W-1:0] a0,
                                              logic signed [ADDR_W-1:0] a1);
    logic [2:0] d;
    d = a0[2:0];
    unique case (topo)
      TOPO_MESH: begin
        if      (a0 > 0) return P_EAST;
        else if (a0 < 0) return P_WEST;
        else if (a1 > 0) return P_NORTH;
        else if (a1 < 0) return P_SOUTH;
        else             return P_LOCAL;
      end
      TOPO_RING: begin
        unique case (d)
          3'd0:             return P_LOCAL;
          3'd1, 3'd2:       return P_CW;
          3'd6, 3'd7:       return P_CCW;
          default:          return P_ACROSS;   // 3, 4, 5
        endcase
      end
      default: begin                           // TOPO_TREE
        if (a0 != 0)               return P_PARENT;
        else if (a1[1:0] != 2'd0)  return {1'b0, a1[1:0]};
        else                       return P_UNUSED;
      end
    endcase
  endfunction

  // Relative address after leaving through port p. Returned as {a0, a1}.
  function automatic logic [2*ADDR_W-1:0] update_addr(topo_e topo,
                                                      logic [PORT_W-1:0] p,
                                                      logic signed [ADDR_W-1:0] a0,
                                                      logic signed [ADDR_W-1:0] a1);
    logic signed [ADDR_W-1:0] n0, n1;
    n0 = a0;
    n1 = a1;
    unique case (topo)
      TOPO_MESH: begin
        unique case (p)
          P_EAST:  n0 = a0 - A_ONE;
          P_WEST:  n0 = a0 + A_ONE;
          P_NORTH: n1 = a1 - A_ONE;
          P_SOUTH: n1 = a1 + A_ONE;
          default: ;
        endcase
      end
      TOPO_RING: begin
        unique case (p)
          P_CW:     n0 = {{(ADDR_W-3){1'b0}}, 3'(a0[2:0] - 3'd1)};
          P_CCW:    n0 = {{(ADDR_W-3){1'b0}}, 3'(a0[2:0] + 3'd1)};
          P_ACROSS: n0 = {{(ADDR_W-3){1'b0}}, 3'(a0[2:0] - 3'd4)};
          default:  ;
        endcase
      end
      default: begin
        if (p == P_PARENT)       n0 = a0 - A_ONE;
        // the down list is a plain bit list: shift in zeros
        else if (p != P_UNUSED)  n1 = $signed({2'b00, a1[ADDR_W-1:2]});
      end
    endcase
    return {n0, n1};
  endfunction

endpackage
