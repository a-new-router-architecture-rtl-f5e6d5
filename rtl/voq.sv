// voq: one virtual output queue VOQ(i,j) of an input port.
//
// It holds the flits that arrived at input port i and will leave through
// output port j, in arrival order. Each entry keeps the flit together with the
// look-ahead port `np` (the output port the flit will take at the next
// router), which was worked out when the flit was written. The block is a
// memory array (the "memory block") and a pair of pointers with an occupancy
// counter (the "control unit").
//
// Timing: a write in cycle t is visible at the head in cycle t+1. A read
// (rd_en) removes the head at the clock edge; head outputs are combinational
// reads of the array. A write and a read may happen in the same cycle.
// Writing a full queue or reading an empty one is a protocol error, flagged
// by assertions: the credit flow control upstream never lets it happen.
//
// The split into memory and control follows the source architecture; the
// depth (4 flits) is this design's choice.
module voq
  import noc_pkg::*;
#(
  parameter int DEPTH = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_en,
  input  flit_t             wr_flit,
  input  logic [PORT_W-1:0] wr_np,
  input  logic              rd_en,
  output flit_t             head_flit,
  output logic [PORT_W-1:0] head_np,
  output logic              empty,
  output logic              full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int CW = $clog2(DEPTH + 1);

  flit_t             mem_flit [DEPTH];
  logic [PORT_W-1:0] mem_np   [DEPTH];
  logic [PW-1:0]     wr_ptr, rd_ptr;
  logic [CW-1:0]     cnt;

  function automatic logic [PW-1:0] next_ptr(logic [PW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (wr_en) begin
      mem_flit[wr_ptr] <= wr_flit;
      mem_np[wr_ptr]   <= wr_np;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      cnt    <= '0;
    end else begin
      if (wr_en) wr_ptr <= next_ptr(wr_ptr);
      if (rd_en) rd_ptr <= next_ptr(rd_ptr);
      unique case ({wr_en, rd_en})
        2'b10:   cnt <= cnt + 1'b1;
        2'b01:   cnt <= cnt - 1'b1;
        default: ;
      endcase
    end
  end

  assign head_flit = mem_flit[rd_ptr];
  assign head_np   = mem_np[rd_ptr];
  assign empty     = (cnt == '0);
  assign full      = (32'(cnt) == DEPTH);
  assign count     = cnt;

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full && !rd_en));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty));
endmodule
