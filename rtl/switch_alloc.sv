// switch_alloc: switch allocation unit SA of one output port j.
//
// Second arbitration step of the router (the IP/OP step). Every input port
// that has chosen a flit for output j asks for it; a round-robin arbiter
// grants one of them per cycle. Once a head flit of a multi-flit packet is
// granted, the output is bound to that input port until the tail flit has
// passed, so that no other packet's flits interleave with it; while bound,
// only the owner can be granted.
//
// The allocator also keeps the downstream flow-control state: one credit
// counter per queue k of the next router's input port (that port's VOQ(.,k)),
// reset to the queue depth, decremented when a flit bound for queue k (its
// look-ahead port np == k) is granted, incremented when the next router
// returns credit_in[k]. dn_credit[k] tells the input ports whether a flit
// for queue k may be sent now.
//
// Interface: req[i] and req_np[i], req_ftype[i] from the input ports;
// grant[i] back (combinational, same cycle); locked/owner for the input ports'
// eligibility check. Per-output SA and round robin follow the source
// architecture; the credit counters are how this design makes the neighbours
// "report the states of their VCs".
module switch_alloc
  import noc_pkg::*;
#(
  parameter int PORT_ID  = 0,
  parameter int DN_DEPTH = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NPORTS-1:0] req,
  input  logic [PORT_W-1:0] req_np    [NPORTS],
  input  ftype_e            req_ftype [NPORTS],
  output logic [NPORTS-1:0] grant,
  input  logic [NPORTS-1:0] credit_in,
  output logic [NPORTS-1:0] dn_credit,
  output logic              locked,
  output logic [PORT_W-1:0] owner
);
  localparam int CW = $clog2(DN_DEPTH + 1);
  localparam int IW = $clog2(NPORTS);

  logic [NPORTS-1:0] arb_req, arb_grant;
  logic [IW-1:0]     arb_idx;
  logic [CW-1:0]     credits [NPORTS];

  always_comb begin
    arb_req = req;
    if (locked) arb_req = req & (NPORTS'(1) << owner);
  end

  rr_arbiter #(.N(NPORTS)) u_arb (
    .clk, .rst_n, .req(arb_req), .advance(1'b1), .grant(arb_grant), .grant_idx(arb_idx)
  );

  assign grant = arb_grant;

  // packet binding
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      locked <= 1'b0;
      owner  <= '0;
    end else if (|arb_grant) begin
      if (is_tail(req_ftype[arb_idx])) begin
        locked <= 1'b0;
      end else begin
        locked <= 1'b1;
        owner  <= PORT_W'(arb_idx);
      end
    end
  end

  // downstream credits
  for (genvar k = 0; k < NPORTS; k++) begin : g_cred
    logic take;
    assign take = |arb_grant && req_np[arb_idx] == PORT_W'(k);
    always_ff @(posedge clk) begin
      if (!rst_n)                       credits[k] <= CW'(DN_DEPTH);
      else if (take && !credit_in[k])   credits[k] <= credits[k] - 1'b1;
      else if (!take && credit_in[k])   credits[k] <= credits[k] + 1'b1;
    end
    assign dn_credit[k] = (credits[k] != '0);

    a_no_overspend: assert property (@(posedge clk) disable iff (!rst_n) take |-> dn_credit[k]);
    a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n)
                                     credit_in[k] && !take |-> 32'(credits[k]) < DN_DEPTH);
  end

  a_no_self: assert property (@(posedge clk) disable iff (!rst_n) !req[PORT_ID]);
endmodule
