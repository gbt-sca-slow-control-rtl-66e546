// tb_sync_fifo: first-word fall-through FIFO against a queue model.
// Random push/pop (never push when full, never pop when empty), checks
// rd_data at the head, full and empty flags, and the clear input.
module tb_sync_fifo;
  localparam int W = 16, D = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear = 0, push = 0, pop = 0, full, empty;
  logic [W-1:0] wr_data = '0, rd_data;
  int checks = 0, failures = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst_n, .clear, .push, .wr_data, .pop, .rd_data, .full, .empty);

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    logic [W-1:0] m[$];
    repeat (2) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      chk(empty == (m.size() == 0) && full == (m.size() == D), $sformatf("flags at %0d entries", m.size()));
      if (m.size() > 0) chk(rd_data == m[0], "head data");
      push = ($urandom % 2) && m.size() < D;
      pop  = ($urandom % 2) && m.size() > 0;
      clear = (it % 400 == 399);
      wr_data = W'($urandom);
      @(posedge clk);
      if (clear) m.delete();
      else begin
        if (pop) void'(m.pop_front());
        if (push) m.push_back(wr_data);
      end
      #1 push = 0; pop = 0; clear = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
