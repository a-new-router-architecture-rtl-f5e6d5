// tb_switch_alloc: checks the switch allocator of output 2 against a
// reference model under random requests: round-robin grants, binding of the
// output to one input from a head flit to its tail, and the per-queue credit
// counters (spent on grant, returned by credit_in). Requests for a queue
// without credit are not made, as the input ports guarantee.
module tb_switch_alloc;
  import noc_pkg::*;
  localparam int J = 2, D = 4;
  logic clk = 1'b0, rst_n;
  logic [NPORTS-1:0] req, grant, credit_in, dn_credit;
  logic [PORT_W-1:0] req_np [NPORTS];
  ftype_e req_ftype [NPORTS];
  logic locked;
  logic [PORT_W-1:0] owner;
  int checks = 0, failures = 0;
  int m_last, m_owner, m_cred [NPORTS];
  logic m_locked;
  int n_lock_block = 0;

  always #5 clk = ~clk;

  switch_alloc #(.PORT_ID(J), .DN_DEPTH(D)) dut (.clk, .rst_n, .req, .req_np, .req_ftype,
    .grant, .credit_in, .dn_credit, .locked, .owner);

  task automatic chk(logic ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    rst_n = 1'b0; req = '0; credit_in = '0;
    for (int i = 0; i < NPORTS; i++) begin req_np[i] = '0; req_ftype[i] = FT_SINGLE; end
    m_last = NPORTS - 1; m_locked = 0; m_owner = 0;
    for (int k = 0; k < NPORTS; k++) m_cred[k] = D;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;
    for (int t = 0; t < 4000; t++) begin
      int e, g;
      logic [NPORTS-1:0] areq;
      for (int i = 0; i < NPORTS; i++) begin
        req_np[i] = 3'($urandom_range(0, 4));
        req_ftype[i] = ftype_e'($urandom_range(0, 3));
        req[i] = (i != J) && ($urandom_range(0, 2) != 0) && m_cred[req_np[i]] > 0;
      end
      for (int k = 0; k < NPORTS; k++)
        credit_in[k] = (m_cred[k] < D) && ($urandom_range(0, 3) == 0);
      #1;
      areq = m_locked ? (req & (NPORTS'(1) << m_owner)) : req;
      if (m_locked && (req & ~(NPORTS'(1) << m_owner)) != 0) n_lock_block++;
      e = -1;
      for (int o = 1; o <= NPORTS; o++)
        if (e < 0 && areq[(m_last + o) % NPORTS]) e = (m_last + o) % NPORTS;
      chk(e < 0 ? grant == '0 : grant == (NPORTS'(1) << e), $sformatf("t=%0d grant %b want %0d", t, grant, e));
      for (int k = 0; k < NPORTS; k++) chk(dn_credit[k] == (m_cred[k] > 0), "dn_credit");
      chk(locked == m_locked && (!m_locked || 32'(owner) == m_owner), "lock state");
      // the model follows the grant actually made, so that one wrong grant
      // is counted once and does not throw the credit model off
      g = -1;
      for (int i = 0; i < NPORTS; i++) if (grant[i] && g < 0) g = i;
      @(posedge clk);
      #1;
      if (g >= 0) begin
        m_last = g;
        m_cred[req_np[g]]--;
        if (is_tail(req_ftype[g])) m_locked = 0;
        else begin m_locked = 1; m_owner = g; end
      end
      for (int k = 0; k < NPORTS; k++) if (credit_in[k]) m_cred[k]++;
    end
    chk(n_lock_block > 0, "binding never held off another input");
    $display("binding held off another input in %0d cycles", n_lock_block);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
