// tb_sca_arbiter: round-robin arbiter, N = 23 (the network controller's
// size). Random request patterns are compared with a reference model of
// the rotation: after index g is served, the search starts at g + 1.
// Checks the grant vector, index, any_req, and that a request held
// continuously is served within N grants (no starvation).
module tb_sca_arbiter;
  localparam int N = 23;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] req = '0, grant;
  logic take = 0, any_req;
  logic [$clog2(N)-1:0] grant_idx;
  int checks = 0, failures = 0;

  sca_arbiter #(.N(N)) dut (.clk, .rst_n, .req, .take, .grant, .grant_idx, .any_req);

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    int last = N - 1, exp_i, wait_n;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      req = (it % 3 == 0) ? N'(1) << ($urandom % N) : {$urandom, $urandom};
      if (it % 50 == 7) req = '0;
      take = $urandom % 4 != 0;
      #1;
      exp_i = -1;
      for (int k = 1; k <= N; k++) if (exp_i < 0 && req[(last + k) % N]) exp_i = (last + k) % N;
      chk(any_req == (req != 0), "any_req");
      if (exp_i >= 0) begin
        chk(grant == N'(1) << exp_i && grant_idx == exp_i,
            $sformatf("it %0d grant %0d want %0d", it, grant_idx, exp_i));
        if (take) last = exp_i;
      end else chk(grant == 0, "no grant without requests");
    end
    // starvation: request 5 always on, all others random, take every cycle
    wait_n = 0;
    for (int it = 0; it < 500; it++) begin
      @(negedge clk);
      req = {$urandom, $urandom}; req[5] = 1; take = 1;
      #1;
      if (grant_idx == 5) wait_n = 0; else wait_n++;
      chk(wait_n < N, "request 5 served within N grants");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
