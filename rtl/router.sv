// router: five-port Virtual Output Queue (VOQ) router.
//
// Each input port i holds four VOQs, VOQ(i,j) for every output j other than
// i, so a flit waiting for a busy output never blocks flits behind it that
// want another output (no head-of-line blocking). A flit moves through the
// router in two steps:
//   cycle t   : the flit arrives and is written into its VOQ; a head flit's
//               next-router port is computed (look-ahead routing).
//   cycle t+1 : each input port picks one eligible VOQ (round robin), each
//               output's switch allocator picks one requesting input (round
//               robin, or the packet's owner while a multi-flit packet is
//               passing), the winner leaves its VOQ through the output's 4x1
//               switch and is registered, header updated.
//   cycle t+2 : the flit is on the output link.
// So an unblocked flit crosses a router in 2 cycles, and each port can move
// one flit per cycle.
//
// Flow control is credit based, per VOQ of the next router: credit_out[i][k]
// pulses when a slot of VOQ(i,k) comes free, and credit_in[j][k] carries the
// same pulses back from the router on output link j.
//
// Ports, for p = 0..4: in_valid[p], in_flit[p], credit_out[p][*] on input
// link p; out_valid[p], out_flit[p], credit_in[p][*] on output link p. The
// meaning of each port number (local, N, E, S, W and so on) comes from the
// topology, see noc_pkg. An unconnected input is tied to in_valid = 0.
//
// The block structure (input ports with DMUX, routing and VOQs; one SA and
// one 4x1 switch per output) follows the source architecture; the port
// numbering, flit format and credit scheme are this design's.
module router
  import noc_pkg::*;
#(
  parameter topo_e TOPO  = TOPO_MESH,
  parameter int    DEPTH = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NPORTS-1:0] in_valid,
  input  flit_t             in_flit    [NPORTS],
  output logic [NPORTS-1:0] credit_out [NPORTS],
  output logic [NPORTS-1:0] out_valid,
  output flit_t             out_flit   [NPORTS],
  input  logic [NPORTS-1:0] credit_in  [NPORTS]
);
  // input port -> allocators
  logic [NPORTS-1:0] ip_req_valid, ip_grant;
  logic [PORT_W-1:0] ip_req_port [NPORTS];
  logic [PORT_W-1:0] ip_req_np   [NPORTS];
  flit_t             ip_req_flit [NPORTS];
  ftype_e            ip_req_ftype [NPORTS];
  // allocators -> input ports
  logic [NPORTS-1:0] sa_grant  [NPORTS];   // [output][input]
  logic [NPORTS-1:0] sa_credit [NPORTS];   // [output][next-router queue]
  logic [NPORTS-1:0] sa_locked;
  logic [PORT_W-1:0] sa_owner  [NPORTS];

  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    logic [NPORTS-1:0] blocked;
    always_comb begin
      for (int j = 0; j < NPORTS; j++)
        blocked[j] = sa_locked[j] && sa_owner[j] != PORT_W'(i);
      ip_grant[i] = 1'b0;
      for (int j = 0; j < NPORTS; j++)
        ip_grant[i] = ip_grant[i] | sa_grant[j][i];
    end
    assign ip_req_ftype[i] = ip_req_flit[i].ftype;

    input_port #(.TOPO(TOPO), .PORT_ID(i), .DEPTH(DEPTH)) u_ip (
      .clk, .rst_n,
      .in_valid   (in_valid[i]),
      .in_flit    (in_flit[i]),
      .credit_out (credit_out[i]),
      .dn_credit  (sa_credit),
      .out_blocked(blocked),
      .req_valid  (ip_req_valid[i]),
      .req_port   (ip_req_port[i]),
      .req_flit   (ip_req_flit[i]),
      .req_np     (ip_req_np[i]),
      .grant      (ip_grant[i])
    );
  end

  for (genvar j = 0; j < NPORTS; j++) begin : g_out
    logic [NPORTS-1:0] req;
    flit_t             sw_flit [NPORTS-1];
    logic [PORT_W-1:0] sw_np   [NPORTS-1];
    logic [NPORTS-2:0] sw_sel;

    always_comb begin
      for (int i = 0; i < NPORTS; i++)
        req[i] = ip_req_valid[i] && ip_req_port[i] == PORT_W'(j);
    end

    switch_alloc #(.PORT_ID(j), .DN_DEPTH(DEPTH)) u_sa (
      .clk, .rst_n,
      .req      (req),
      .req_np   (ip_req_np),
      .req_ftype(ip_req_ftype),
      .grant    (sa_grant[j]),
      .credit_in(credit_in[j]),
      .dn_credit(sa_credit[j]),
      .locked   (sa_locked[j]),
      .owner    (sa_owner[j])
    );

    // slot s of the 4x1 switch carries input s (s < j) or input s+1 (s >= j)
    for (genvar s = 0; s < NPORTS - 1; s++) begin : g_slot
      localparam int I = (s < j) ? s : s + 1;
      assign sw_flit[s] = ip_req_flit[I];
      assign sw_np[s]   = ip_req_np[I];
      assign sw_sel[s]  = sa_grant[j][I];
    end

    out_switch #(.TOPO(TOPO), .PORT_ID(j), .NIN(NPORTS - 1)) u_sw (
      .clk, .rst_n,
      .in_flit  (sw_flit),
      .in_np    (sw_np),
      .sel      (sw_sel),
      .out_valid(out_valid[j]),
      .out_flit (out_flit[j])
    );
  end

  // an input port is granted by at most one output per cycle
  for (genvar i = 0; i < NPORTS; i++) begin : g_chk
    logic [NPORTS-1:0] col;
    always_comb for (int j = 0; j < NPORTS; j++) col[j] = sa_grant[j][i];
    a_one_output: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(col));
  end
endmodule
