// tb_out_switch: checks the 4x1 switch of mesh output 2 (east): the selected
// input appears on the output one cycle later, exactly once, and a head
// flit's address is updated for the eastward hop (a0 - 1) and its port field
// replaced by the look-ahead port; body flits pass unchanged.
module tb_out_switch;
  import noc_pkg::*;
  logic clk = 1'b0, rst_n;
  flit_t in_flit [4];
  logic [PORT_W-1:0] in_np [4];
  logic [3:0] sel;
  logic out_valid;
  flit_t out_flit, exp_flit;
  logic exp_valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  out_switch #(.TOPO(TOPO_MESH), .PORT_ID(2)) dut (.clk, .rst_n, .in_flit, .in_np, .sel,
                                                   .out_valid, .out_flit);

  task automatic chk(logic ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    rst_n = 1'b0; sel = '0;
    for (int s = 0; s < 4; s++) begin in_flit[s] = '0; in_np[s] = '0; end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;
    exp_valid = 0;
    for (int t = 0; t < 2000; t++) begin
      int s;
      for (int k = 0; k < 4; k++) begin
        in_flit[k] = flit_t'($urandom);
        in_np[k] = 3'($urandom_range(0, 4));
      end
      s = $urandom_range(0, 4);
      sel = (s == 4) ? '0 : (4'(1) << s);
      @(posedge clk);
      #1;
      if (s < 4) begin
        exp_flit = in_flit[s];
        if (is_head(exp_flit.ftype)) begin
          exp_flit.a0 = in_flit[s].a0 - 4'sd1;
          exp_flit.port = in_np[s];
        end
        chk(out_valid && out_flit == exp_flit, $sformatf("t=%0d out %h want %h", t, out_flit, exp_flit));
      end else begin
        chk(!out_valid, "valid without select");
      end
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
