// tb_bft_noc: self-checking test of the tree network. Runs lone packets for
// exact latency (2 cycles per router plus 2), uniform random traffic with
// packets of 1..4 flits and a hotspot phase towards leaf 5, and
// checks delivery, order and integrity of every flit (see noc_traffic).
module tb_bft_noc;
  import noc_pkg::*;
  localparam int N = 6;
  logic clk = 1'b0;
  logic rst_n, done;
  logic [N-1:0] inj_valid, inj_ready, ej_valid;
  flit_t inj_flit [N];
  flit_t ej_flit  [N];
  int checks, failures, stalls;

  always #5 clk = ~clk;

  bft_noc dut (.clk, .rst_n, .inj_valid, .inj_ready, .inj_flit, .ej_valid, .ej_flit);

  noc_traffic #(.N(N), .TOPO(TOPO_TREE), .HOT(5), .SEED(13)) u_traffic (
    .clk, .rst_n, .inj_valid, .inj_ready, .inj_flit, .ej_valid, .ej_flit,
    .done, .checks, .failures, .src_stall_cycles(stalls)
  );

  initial begin
    #1;
    wait (done);
    $display("source stall cycles: %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
