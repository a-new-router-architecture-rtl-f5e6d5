// rni: resource network interface, the "RNI in/out buffer" between a
// resource (a processor, memory or other IP core) and the router port it is
// attached to.
//
// Injection: the resource offers one flit at a time (inj_valid/inj_ready,
// flit taken in a cycle with both high). For a head flit the RNI fills in the
// `port` field with the output port the flit needs at the first router, so
// every router can do look-ahead routing, and remembers it for the body and
// tail flits of the packet. It keeps one credit counter per VOQ of the
// router input it feeds, reset to the VOQ depth, and accepts a flit only when
// that flit's VOQ has a free slot. Accepted flits are registered and reach the
// router one cycle later.
//
// Ejection: flits arriving from the router's output are registered and
// presented on ej_valid/ej_flit for one cycle; the resource must take them
// (no back-pressure). For each flit received, the RNI returns a credit on
// credit_to_rtr[k], k being the `port` field of the flit's head, which the
// router filled with the queue number it charged.
//
// Only the name and place of this block come from the source architecture;
// its behaviour here is the simplest that lets a resource use the router.
module rni
  import noc_pkg::*;
#(
  parameter topo_e TOPO  = TOPO_MESH,
  parameter int    DEPTH = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // resource side, injection
  input  logic              inj_valid,
  output logic              inj_ready,
  input  flit_t             inj_flit,
  // resource side, ejection
  output logic              ej_valid,
  output flit_t             ej_flit,
  // router side
  output logic              to_rtr_valid,
  output flit_t             to_rtr_flit,
  input  logic [NPORTS-1:0] credit_from_rtr,
  input  logic              from_rtr_valid,
  input  flit_t             from_rtr_flit,
  output logic [NPORTS-1:0] credit_to_rtr
);
  localparam int CW = $clog2(DEPTH + 1);

  logic [CW-1:0]     credits [NPORTS];
  logic [PORT_W-1:0] pkt_port_q, cur_port;
  flit_t             out_flit;
  logic              take;
  logic [PORT_W-1:0] ej_pkt_port_q, ej_port;

  // body and tail flits were charged to the queue of their head
  assign ej_port = is_head(from_rtr_flit.ftype) ? from_rtr_flit.port : ej_pkt_port_q;

  always_comb begin
    cur_port = is_head(inj_flit.ftype) ? route(TOPO, inj_flit.a0, inj_flit.a1) : pkt_port_q;
    out_flit = inj_flit;
    if (is_head(inj_flit.ftype)) out_flit.port = cur_port;
  end

  assign inj_ready = (credits[cur_port] != '0);
  assign take      = inj_valid && inj_ready;

  for (genvar k = 0; k < NPORTS; k++) begin : g_cred
    logic use_k;
    assign use_k = take && cur_port == PORT_W'(k);
    always_ff @(posedge clk) begin
      if (!rst_n)                             credits[k] <= CW'(DEPTH);
      else if (use_k && !credit_from_rtr[k])  credits[k] <= credits[k] - 1'b1;
      else if (!use_k && credit_from_rtr[k])  credits[k] <= credits[k] + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pkt_port_q    <= '0;
      ej_pkt_port_q <= '0;
      to_rtr_valid  <= 1'b0;
      to_rtr_flit   <= '0;
      ej_valid      <= 1'b0;
      ej_flit       <= '0;
      credit_to_rtr <= '0;
    end else begin
      if (take && is_head(inj_flit.ftype)) pkt_port_q <= cur_port;
      to_rtr_valid <= take;
      if (take) to_rtr_flit <= out_flit;
      ej_valid <= from_rtr_valid;
      if (from_rtr_valid) ej_flit <= from_rtr_flit;
      if (from_rtr_valid && is_head(from_rtr_flit.ftype)) ej_pkt_port_q <= from_rtr_flit.port;
      credit_to_rtr <= from_rtr_valid ? (NPORTS'(1) << ej_port) : '0;
    end
  end
endmodule
