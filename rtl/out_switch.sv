// out_switch: the 4x1 switch in front of output port j (one column of the
// crossbar), with a registered output.
//
// The switch allocator's one-hot select picks which of the four other input
// ports drives the output; the chosen flit is registered, so a flit granted
// in cycle t is on the output link in cycle t+1 (out_valid high for exactly
// one cycle per flit). As a head flit passes, its header is rewritten for the
// next router: the relative address is updated for the hop through port j,
// and the `port` field is replaced by the look-ahead port np computed at the
// input. Body and tail flits pass unchanged.
//
// Interface: in_flit[4], in_np[4], sel[4] (one-hot or zero), out_valid,
// out_flit. Slot s carries input port s when s < j and input port s+1
// otherwise (the router does that mapping). Registered crossbar outputs and
// the address update at the output follow the source architecture; the
// header layout is this design's.
module out_switch
  import noc_pkg::*;
#(
  parameter topo_e TOPO    = TOPO_MESH,
  parameter int    PORT_ID = 0,
  parameter int    NIN     = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  flit_t             in_flit [NIN],
  input  logic [PORT_W-1:0] in_np   [NIN],
  input  logic [NIN-1:0]    sel,
  output logic              out_valid,
  output flit_t             out_flit
);
  flit_t             mux_flit;
  logic [PORT_W-1:0] mux_np;
  flit_t             upd_flit;

  always_comb begin
    mux_flit = '0;
    mux_np   = '0;
    for (int s = 0; s < NIN; s++) begin
      if (sel[s]) begin
        mux_flit = in_flit[s];
        mux_np   = in_np[s];
      end
    end
    upd_flit = mux_flit;
    if (is_head(mux_flit.ftype)) begin
      {upd_flit.a0, upd_flit.a1} = update_addr(TOPO, PORT_W'(PORT_ID), mux_flit.a0, mux_flit.a1);
      upd_flit.port = mux_np;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_flit  <= '0;
    end else begin
      out_valid <= |sel;
      if (|sel) out_flit <= upd_flit;
    end
  end

  a_onehot_sel: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(sel));
endmodule
