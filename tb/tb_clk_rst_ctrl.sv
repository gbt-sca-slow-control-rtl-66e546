// tb_clk_rst_ctrl: reset generation.
// Checks that the pad reset acts at once and is released two clocks after
// the pad goes high, that a soft reset resets the network controller and
// every channel for one clock but not the e-port side, that each channel
// reset follows its enable bit one clock later, and that channel 0 (the
// controller's own channel) is never held in reset by its enable bit.
module tb_clk_rst_ctrl;
  localparam int N = 22;
  logic clk = 0, rst_pad_n = 0, soft_reset = 0;
  always #5 clk = ~clk;
  logic [N-1:0] chan_en = '0, chan_rst_n;
  logic core_rst_n, nc_rst_n;
  int checks = 0, failures = 0;

  clk_rst_ctrl #(.N(N)) dut (.clk, .rst_pad_n, .soft_reset, .chan_en, .core_rst_n, .nc_rst_n, .chan_rst_n);

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    logic [N-1:0] en;
    repeat (3) @(negedge clk);
    chk(!core_rst_n && !nc_rst_n && chan_rst_n == 0, "in reset");
    rst_pad_n = 1;
    @(negedge clk); chk(!core_rst_n, "still in reset after one clock");
    @(negedge clk); chk(core_rst_n && nc_rst_n, "released after two clocks");
    for (int it = 0; it < 100; it++) begin
      en = N'($urandom);
      chan_en = en;
      @(negedge clk);
      chk(chan_rst_n == (en | N'(1)), $sformatf("channel resets follow enables %h", chan_rst_n));
      if (it % 10 == 5) begin
        soft_reset = 1;
        @(negedge clk); soft_reset = 0;
        chk(core_rst_n && !nc_rst_n && chan_rst_n == 0, "soft reset");
        @(negedge clk);
        chk(nc_rst_n, "soft reset lasts one clock");
      end
      if (it == 50) begin
        #2 rst_pad_n = 0; #1;
        chk(!core_rst_n && !nc_rst_n && chan_rst_n == 0, "pad reset acts at once");
        @(negedge clk); rst_pad_n = 1;
        repeat (2) @(negedge clk);
        chk(core_rst_n, "pad reset released");
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
