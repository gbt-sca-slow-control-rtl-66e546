// tb_tmr_reg: triplicated register with voting and scrubbing.
// Checks the reset value, writes, that an injected upset in one copy does
// not change the voted output, that the mismatch is flagged for exactly one
// clock and repaired on the next (scrubbing), and that a write on the same
// clock as an upset still lands.
module tb_tmr_reg;
  localparam int W = 22;
  localparam logic [W-1:0] INIT = 22'h000001;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic we = 0, inject = 0, seu;
  logic [W-1:0] d = '0, q;
  int checks = 0, failures = 0;

  tmr_reg #(.WIDTH(W), .INIT(INIT)) dut (.clk, .rst_n, .we, .d, .inject, .q, .seu);

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    logic [W-1:0] v;
    repeat (2) @(negedge clk);
    chk(q == INIT && !seu, "reset value");
    rst_n = 1;
    for (int it = 0; it < 200; it++) begin
      v = W'($urandom);
      @(negedge clk); we = 1; d = v;
      @(negedge clk); we = 0;
      chk(q == v && !seu, "write");
      inject = 1;
      @(negedge clk); inject = 0;
      chk(q == v, "voted value survives an upset");
      chk(seu, "upset flagged");
      @(negedge clk);
      chk(q == v && !seu, "copy repaired by scrubbing");
      if (it % 10 == 0) begin
        @(negedge clk); we = 1; d = ~v; inject = 1;
        @(negedge clk); we = 0; inject = 0;
        chk(q == ~v, "write with simultaneous upset");
        @(negedge clk);
        chk(!seu && q == ~v, "repaired after write");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
