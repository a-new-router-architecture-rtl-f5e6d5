// tb_router: checks one five-port mesh router on its own, the testbench
// acting as the four neighbours and the local resource.
//  - A lone head flit crosses in 2 cycles (arrival edge to output edge) with
//    its address updated and its port field set to the next router's port.
//  - Random packets of 1..4 flits on all five inputs, sent only with credit
//    for the target VOQ (taken from credit_out); downstream credits come back
//    after a random delay, so outputs run out of credit.
// Checked: each flit leaves on the right output, in order per input/output
// pair, with the right header; packets on one output never interleave; no
// credit is returned for a queue that was not used; every flit leaves.
module tb_router;
  import noc_pkg::*;
  localparam int D = 4;
  logic clk = 1'b0, rst_n;
  logic [NPORTS-1:0] in_valid, out_valid;
  flit_t in_flit [NPORTS];
  flit_t out_flit [NPORTS];
  logic [NPORTS-1:0] credit_out [NPORTS];
  logic [NPORTS-1:0] credit_in [NPORTS];
  int checks = 0, failures = 0;
  logic [FLIT_W-1:0] expq [NPORTS][NPORTS][$];  // [in][out]
  int cred [NPORTS][NPORTS];                   // tb's credits for router VOQ(i,j)
  int pend [NPORTS][NPORTS][$];                // downstream credit return times [out][k]
  int left [NPORTS], port_of [NPORTS], tx_out [NPORTS];
  logic in_pkt [NPORTS];
  int src_of [NPORTS];
  int cyc = 0, sent = 0, recv = 0;
  logic random_phase = 0;
  int n_credit_wait = 0;

  always #5 clk = ~clk;

  router #(.TOPO(TOPO_MESH), .DEPTH(D)) dut (.clk, .rst_n, .in_valid, .in_flit, .credit_out,
                                             .out_valid, .out_flit, .credit_in);

  task automatic chk(logic ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL t=%0d %s", cyc, s); end
  endtask

  function automatic int xy(int dx, int dy);
    return dx > 0 ? 2 : dx < 0 ? 4 : dy > 0 ? 1 : dy < 0 ? 3 : 0;
  endfunction

  // a head flit entering on input i that leaves on output j: expected header
  function automatic flit_t make_head(int i, int j, int len, output flit_t outf);
    flit_t f;
    int dx, dy;
    // an address for which XY routing takes output j here
    unique case (j)
      2: begin dx = $urandom_range(1, 3); dy = $urandom_range(0, 6) - 3; end
      4: begin dx = -$urandom_range(1, 3); dy = $urandom_range(0, 6) - 3; end
      1: begin dx = 0; dy = $urandom_range(1, 3); end
      3: begin dx = 0; dy = -$urandom_range(1, 3); end
      default: begin dx = 0; dy = 0; end
    endcase
    f = '0;
    f.ftype = (len == 1) ? FT_SINGLE : FT_HEAD;
    f.port = 3'(j);
    f.a0 = 4'(dx);
    f.a1 = 4'(dy);
    f.data = {4'(i), 4'($urandom)};
    outf = f;
    dx = dx - (j == 2) + (j == 4);
    dy = dy - (j == 1) + (j == 3);
    outf.a0 = 4'(dx);
    outf.a1 = 4'(dy);
    outf.port = 3'(xy(dx, dy));
    return f;
  endfunction

  // legal output for a flit entering on input i under XY routing (no U-turn)
  function automatic int pick_out(int i);
    int j;
    do j = $urandom_range(0, 4);
    while (j == i || (i == 2 && j == 4) || (i == 4 && j == 2) ||
           ((i == 1 || i == 3) && (j == 2 || j == 4)));
    return j;
  endfunction

  // credits returned by the router
  always @(posedge clk) if (rst_n)
    for (int i = 0; i < NPORTS; i++)
      for (int j = 0; j < NPORTS; j++)
        if (credit_out[i][j]) begin
          cred[i][j]++;
          chk(cred[i][j] <= D && j != i, "credit beyond VOQ depth");
        end

  // outputs: check, then schedule the downstream credit
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int k = 0; k < NPORTS; k++) credit_in[k] <= '0;
    if (rst_n) for (int j = 0; j < NPORTS; j++) begin
      for (int k = 0; k < NPORTS; k++)
        if (pend[j][k].size() > 0 && pend[j][k][0] <= cyc) begin
          void'(pend[j][k].pop_front());
          credit_in[j][k] <= 1'b1;
        end
      if (out_valid[j]) begin
        flit_t f;
        int s, k;
        f = out_flit[j];
        if (is_head(f.ftype)) begin
          chk(!in_pkt[j], "head inside packet");
          src_of[j] = int'(f.data[7:4]);
          port_of[j] = int'(f.port);
        end else chk(in_pkt[j], "body outside packet");
        in_pkt[j] = !is_tail(f.ftype);
        s = src_of[j];
        k = port_of[j];
        if (s < NPORTS && expq[s][j].size() > 0)
          chk(FLIT_W'(f) == expq[s][j].pop_front(), $sformatf("output %0d flit from %0d", j, s));
        else chk(0, $sformatf("unexpected flit on output %0d", j));
        pend[j][k].push_back(cyc + (random_phase ? $urandom_range(1, 12) : 1));
        recv++;
      end
    end
  end

  initial begin
    flit_t hf, ho;
    rst_n = 1'b0; in_valid = '0;
    for (int i = 0; i < NPORTS; i++) begin
      in_flit[i] = '0; credit_in[i] = '0; left[i] = 0; in_pkt[i] = 0; src_of[i] = 0; port_of[i] = 0;
      for (int j = 0; j < NPORTS; j++) cred[i][j] = (i == j) ? 0 : D;
    end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;

    // lone flit: local input to east output, 2 cycles
    hf = make_head(0, 2, 1, ho);
    in_valid[0] = 1; in_flit[0] = hf;
    expq[0][2].push_back(FLIT_W'(ho));
    cred[0][2]--; sent++;
    @(posedge clk); #1;                     // written into VOQ(0,2)
    in_valid = '0;
    chk(!out_valid[2], "east output one cycle after arrival: too early");
    @(posedge clk); #1;                     // granted and registered
    chk(out_valid[2], "lone flit should be on the output link 2 cycles after its input link cycle");

    // random packets on all inputs
    random_phase = 1;
    for (int t = 0; t < 3000; t++) begin
      for (int i = 0; i < NPORTS; i++) begin
        in_valid[i] = 0;
        begin
          if (left[i] == 0 && t < 2800 && $urandom_range(0, 3) == 0) begin
            int j, len;
            j = pick_out(i);
            len = $urandom_range(1, 4);
            if (cred[i][j] > 0) begin
              hf = make_head(i, j, len, ho);
              in_flit[i] = hf; in_valid[i] = 1;
              expq[i][j].push_back(FLIT_W'(ho));
              cred[i][j]--; sent++;
              left[i] = len - 1; tx_out[i] = j;
            end
          end else if (left[i] > 0 && cred[i][tx_out[i]] > 0) begin
            flit_t b;
            b = flit_t'($urandom);
            b.ftype = (left[i] == 1) ? FT_TAIL : FT_BODY;
            b.data = {4'(i), 4'($urandom)};
            in_flit[i] = b; in_valid[i] = 1;
            expq[i][tx_out[i]].push_back(FLIT_W'(b));
            cred[i][tx_out[i]]--; sent++;
            left[i]--;
          end else if (left[i] > 0) n_credit_wait++;
        end
      end
      @(posedge clk); #1;
    end
    in_valid = '0;
    repeat (100) @(posedge clk);
    chk(sent == recv, $sformatf("sent %0d flits, %0d left the router", sent, recv));
    chk(n_credit_wait > 0, "credit never ran out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
