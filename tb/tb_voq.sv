// tb_voq: checks the virtual output queue against a queue model under random
// writes and reads (never writing when full, never reading when empty), and
// checks that a flit written in one cycle is at the head in the next.
module tb_voq;
  import noc_pkg::*;
  localparam int DEPTH = 4;
  logic clk = 1'b0, rst_n;
  logic wr_en, rd_en, empty, full;
  flit_t wr_flit, head_flit;
  logic [PORT_W-1:0] wr_np, head_np;
  logic [2:0] count;
  int checks = 0, failures = 0;
  logic [FLIT_W+PORT_W-1:0] model [$];

  always #5 clk = ~clk;

  voq #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .wr_en, .wr_flit, .wr_np, .rd_en,
                            .head_flit, .head_np, .empty, .full, .count);

  task automatic chk(logic ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    rst_n = 1'b0; wr_en = 0; rd_en = 0; wr_flit = '0; wr_np = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;
    chk(empty && !full && count == 0, "empty after reset");
    for (int t = 0; t < 3000; t++) begin
      wr_en = ($urandom_range(0, 1) == 1) && (model.size() < DEPTH);
      rd_en = ($urandom_range(0, 1) == 1) && (model.size() > 0);
      wr_flit = flit_t'($urandom);
      wr_np = 3'($urandom);
      if (model.size() > 0)
        chk({head_flit, head_np} == model[0], $sformatf("head t=%0d", t));
      chk(32'(count) == model.size(), "count");
      chk(empty == (model.size() == 0) && full == (model.size() == DEPTH), "flags");
      @(posedge clk);
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back({wr_flit, wr_np});
      #1;
      if (wr_en && model.size() == 1) chk({head_flit, head_np} == model[0], "bypass-free next-cycle head");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
