// rr_arbiter: round-robin arbiter over N requesters.
//
// The grant is combinational: among the requesting lines it picks the first
// one after the line that was granted last (wrapping around), so every
// requester that keeps asking is served within N grants. The priority pointer
// moves only when `advance` is high in a cycle with a grant, i.e. when the
// grant was actually used; a grant that a later stage throws away does not
// cost the requester its turn.
//
// Ports: req[N] in, advance in, grant[N] out (one-hot or zero), grant_idx out.
// Reset sets the pointer so that line 0 has the highest priority.
// Round-robin service follows the source architecture; the pointer update
// rule is this design's choice.
module rr_arbiter #(
  parameter int N = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 advance,
  output logic [N-1:0]         grant,
  output logic [$clog2(N)-1:0] grant_idx
);
  localparam int IW = $clog2(N);

  logic [IW-1:0] last_q;   // index granted most recently

  always_comb begin
    int unsigned k;
    grant     = '0;
    grant_idx = '0;
    for (int unsigned off = 1; off <= N; off++) begin
      k = (32'(last_q) + off) % N;
      if (grant == '0 && req[k]) begin
        grant[k]  = 1'b1;
        grant_idx = IW'(k);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)                    last_q <= IW'(N - 1);
    else if (advance && |grant)    last_q <= grant_idx;
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
  a_subset: assert property (@(posedge clk) disable iff (!rst_n) (grant & ~req) == '0);
endmodule
