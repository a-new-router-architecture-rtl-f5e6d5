// tb_rr_arbiter: checks the round-robin arbiter against a reference model
// with random requests and random advance, and checks that a requester that
// keeps asking is served within N grants.
module tb_rr_arbiter;
  localparam int N = 4;
  logic clk = 1'b0, rst_n;
  logic [N-1:0] req, grant;
  logic [1:0] grant_idx;
  logic advance;
  int checks = 0, failures = 0;
  int last, wait_cnt [N];

  always #5 clk = ~clk;

  rr_arbiter #(.N(N)) dut (.clk, .rst_n, .req, .advance, .grant, .grant_idx);

  function automatic int model(logic [N-1:0] r, int l);
    for (int o = 1; o <= N; o++)
      if (r[(l + o) % N]) return (l + o) % N;
    return -1;
  endfunction

  initial begin
    rst_n = 1'b0; req = '0; advance = 1'b0; last = N - 1;
    for (int i = 0; i < N; i++) wait_cnt[i] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    #1;
    for (int t = 0; t < 2000; t++) begin
      int e;
      req = 4'($urandom);
      if (t > 1000) req = 4'b1111;         // saturated: strict rotation
      advance = (t > 1000) || ($urandom_range(0, 3) != 0);
      #1;
      e = model(req, last);
      checks++;
      if (e < 0 ? grant != '0 : (grant != (N'(1) << e) || grant_idx != 2'(e))) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d req=%b grant=%b want %0d", t, req, grant, e);
      end
      for (int i = 0; i < N; i++) begin
        if (req[i] && !grant[i]) wait_cnt[i]++;
        else wait_cnt[i] = 0;
        if (req == 4'b1111 && advance) begin
          checks++;
          if (wait_cnt[i] >= N) failures++;
        end
      end
      @(posedge clk);
      #1;
      if (advance && e >= 0) last = e;
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
