// input_port: one input port i of the VOQ router (DMUX, Routing, VOQ control
// and the VOQs of one row of the router diagram).
//
// Arriving flits are demultiplexed into one of the VOQs VOQ(i,j), j != i, by
// the output port j they need here: a head flit names it in its `port` field,
// and body and tail flits follow the VOQ of their head, remembered in a
// register. For a head flit the look-ahead routing unit computes the output
// port the flit will need at the next router (np); the flit is stored with
// it, and body/tail flits are stored with the np of their head.
//
// Each cycle the port builds the bit array of VOQs that "have a chance to be
// forwarded": the VOQ is not empty, the queue its head flit will enter at the
// next router has a free slot (credit), and its output port is not bound to
// another input port in the middle of a packet. A round-robin arbiter picks
// one of them and the port presents that flit to the switch allocator of the
// chosen output port (req_valid, req_port, req_flit, req_np). When the
// allocator grants it (grant, same cycle) the flit is removed from its VOQ,
// and one cycle later credit_out[j] pulses to tell the upstream router that a
// slot of VOQ(i,j) came free.
//
// Interface: in_valid/in_flit from the link (no ready: the upstream router
// only sends with a credit in hand); dn_credit[j][k] = output j still has
// credit for queue k of the next router; out_blocked[j] = output j is bound
// to another input port.
//
// Timing: a flit written in cycle t can be requested and granted in cycle
// t+1. All of this follows the source architecture except the arbiter
// (a five-line round-robin with line i never requesting, i.e. a four-way
// round robin), the VOQ depth and the credit-per-slot flow control, which are
// this design's choices.
module input_port
  import noc_pkg::*;
#(
  parameter topo_e TOPO    = TOPO_MESH,
  parameter int    PORT_ID = 0,
  parameter int    DEPTH   = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // link side
  input  logic              in_valid,
  input  flit_t             in_flit,
  output logic [NPORTS-1:0] credit_out,
  // allocation side
  input  logic [NPORTS-1:0] dn_credit [NPORTS],
  input  logic [NPORTS-1:0] out_blocked,
  output logic              req_valid,
  output logic [PORT_W-1:0] req_port,
  output flit_t             req_flit,
  output logic [PORT_W-1:0] req_np,
  input  logic              grant
);
  localparam int CW = $clog2(DEPTH + 1);

  // ---------------- DMUX and look-ahead routing ----------------
  logic [PORT_W-1:0] cur_voq_q, cur_np_q;    // VOQ and np of the packet in flight
  logic [PORT_W-1:0] la_np;
  logic signed [ADDR_W-1:0] la_a0, la_a1;
  logic [PORT_W-1:0] wr_voq, wr_np;

  la_routing #(.TOPO(TOPO)) u_route (
    .port_here(in_flit.port), .a0(in_flit.a0), .a1(in_flit.a1),
    .np(la_np), .next_a0(la_a0), .next_a1(la_a1)
  );

  always_comb begin
    if (is_head(in_flit.ftype)) begin
      wr_voq = in_flit.port;
      wr_np  = la_np;
    end else begin
      wr_voq = cur_voq_q;
      wr_np  = cur_np_q;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cur_voq_q <= '0;
      cur_np_q  <= '0;
    end else if (in_valid && is_head(in_flit.ftype)) begin
      cur_voq_q <= in_flit.port;
      cur_np_q  <= la_np;
    end
  end

  // ---------------- VOQs ----------------
  flit_t             head_flit [NPORTS];
  logic [PORT_W-1:0] head_np   [NPORTS];
  logic [NPORTS-1:0] empty, rd_en;

  for (genvar j = 0; j < NPORTS; j++) begin : g_voq
    if (j == PORT_ID) begin : g_none
      // no VOQ(i,i): a flit never leaves through the port it came in by
      assign head_flit[j] = '0;
      assign head_np[j]   = '0;
      assign empty[j]     = 1'b1;
    end else begin : g_q
      logic           full_unused;
      logic [CW-1:0]  count_unused;
      voq #(.DEPTH(DEPTH)) u_voq (
        .clk, .rst_n,
        .wr_en    (in_valid && wr_voq == PORT_W'(j)),
        .wr_flit  (in_flit),
        .wr_np    (wr_np),
        .rd_en    (rd_en[j]),
        .head_flit(head_flit[j]),
        .head_np  (head_np[j]),
        .empty    (empty[j]),
        .full     (full_unused),
        .count    (count_unused)
      );
    end
  end

  // ---------------- VOQ request selection ----------------
  logic [NPORTS-1:0] eligible, sel;
  logic [$clog2(NPORTS)-1:0] sel_idx;

  always_comb begin
    for (int j = 0; j < NPORTS; j++)
      eligible[j] = !empty[j] && dn_credit[j][head_np[j]] && !out_blocked[j];
  end

  rr_arbiter #(.N(NPORTS)) u_arb (
    .clk, .rst_n, .req(eligible), .advance(grant), .grant(sel), .grant_idx(sel_idx)
  );

  assign req_valid = |sel;
  assign req_port  = PORT_W'(sel_idx);
  assign req_flit  = head_flit[sel_idx];
  assign req_np    = head_np[sel_idx];
  assign rd_en     = grant ? sel : '0;

  always_ff @(posedge clk) begin
    if (!rst_n) credit_out <= '0;
    else        credit_out <= rd_en;
  end

  a_grant_has_req: assert property (@(posedge clk) disable iff (!rst_n) grant |-> req_valid);
  a_no_uturn: assert property (@(posedge clk) disable iff (!rst_n)
                               in_valid && is_head(in_flit.ftype) |-> 32'(in_flit.port) != PORT_ID);
endmodule
