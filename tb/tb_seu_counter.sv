// tb_seu_counter: SEU event counter fed by three voted registers.
// Random upsets are injected into three tmr_reg instances; the counter must
// equal the number of flagged mismatches (several on the same clock count
// separately), clear to 0, and saturate instead of wrapping (an 8-bit
// instance is driven past 255).
module tb_seu_counter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [2:0] inject = '0, seu;
  logic [7:0] q [3];
  logic clear = 0;
  logic [31:0] count;
  logic [7:0] count8;
  int checks = 0, failures = 0;

  for (genvar g = 0; g < 3; g++) begin : g_r
    tmr_reg #(.WIDTH(8)) u (.clk, .rst_n, .we(1'b0), .d(8'h0), .inject(inject[g]), .q(q[g]), .seu(seu[g]));
  end
  seu_counter #(.N(3)) dut (.clk, .rst_n, .seu_in(seu), .clear, .count);
  seu_counter #(.N(3), .WIDTH(8)) dut8 (.clk, .rst_n, .seu_in(seu), .clear(1'b0), .count(count8));

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    int exp = 0, exp8 = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    chk(count == 0, "zero after reset");
    for (int it = 0; it < 400; it++) begin
      inject = 3'($urandom);
      @(negedge clk);
      inject = 0;
      exp += $countones(seu); exp8 = (exp8 + $countones(seu) > 255) ? 255 : exp8 + $countones(seu);
      @(negedge clk);
      chk(count == exp, $sformatf("count %0d want %0d", count, exp));
      chk(count8 == exp8, $sformatf("8-bit count %0d want %0d", count8, exp8));
      if (it == 150) begin
        clear = 1; @(negedge clk); clear = 0; exp = 0;
        chk(count == 0, "cleared");
      end
    end
    chk(exp8 == 255, "8-bit counter driven into saturation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
