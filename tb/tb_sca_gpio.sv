// tb_sca_gpio: GPIO channel.
// Checks direction and output registers, three-state enables, input
// sampling on the system clock and on a chosen edge of the external clock,
// rising and falling edge interrupts (status bits and unsolicited replies),
// clearing of the status and an invalid command.
module tb_sca_gpio;
  import sca_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  chan_req_t req;
  chan_rsp_t rsp;
  logic      rsp_ack = 0;
  logic [31:0] gin = 0, gout, goe;
  logic extclk = 0, irq;
  int checks = 0, failures = 0;

  sca_gpio dut (.clk, .rst_n, .req, .rsp, .rsp_ack, .gpio_in(gin), .gpio_out(gout),
                .gpio_oe(goe), .gpio_extclk(extclk), .irq);

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic do_cmd(logic [7:0] c, logic [31:0] d, output chan_rsp_t r);
    int n = 0;
    @(negedge clk);
    req = '{valid: 1'b1, cmd: c, len: 8'd4, data: d};
    @(negedge clk);
    req.valid = 1'b0;
    while (!(rsp.valid && !rsp.irq) && n < 100) begin @(negedge clk); n++; end
    r = rsp;
    chk(n == 0 && r.err == 0, $sformatf("cmd %h", c));
    rsp_ack = 1'b1; @(negedge clk); rsp_ack = 1'b0;
  endtask

  initial begin
    chan_rsp_t r;
    logic [31:0] pat;
    req = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    chk(goe == 0, "reset: all inputs");
    pat = $urandom;
    do_cmd(GP_W_DIR, 32'hFF00_FF00, r);
    do_cmd(GP_W_DOUT, pat, r);
    chk(gout == pat && goe == 32'hFF00_FF00, "outputs");
    do_cmd(GP_R_DOUT, 0, r); chk(r.data == pat && r.len == 4, "read DOUT");
    gin = 32'h1234_5678;
    repeat (4) @(negedge clk);
    do_cmd(GP_R_DIN, 0, r); chk(r.data == 32'h1234_5678, "DIN system clock");
    // external clock sampling, rising edge
    do_cmd(GP_W_CLKSEL, 32'h1, r);
    gin = 32'hCAFE_0001;
    repeat (6) @(negedge clk);
    do_cmd(GP_R_DIN, 0, r); chk(r.data == 32'h1234_5678, "DIN held without ext clock");
    extclk = 1; repeat (6) @(negedge clk);
    do_cmd(GP_R_DIN, 0, r); chk(r.data == 32'hCAFE_0001, "DIN on ext rising edge");
    gin = 32'h0BAD_0002;
    extclk = 0; repeat (6) @(negedge clk);
    do_cmd(GP_R_DIN, 0, r); chk(r.data == 32'hCAFE_0001, "no sample on falling edge");
    do_cmd(GP_W_CLKSEL, 32'h3, r);
    extclk = 1; repeat (6) @(negedge clk); extclk = 0; repeat (6) @(negedge clk);
    do_cmd(GP_R_DIN, 0, r); chk(r.data == 32'h0BAD_0002, "DIN on ext falling edge");
    do_cmd(GP_W_CLKSEL, 32'h0, r);
    // interrupts: line 0 rising, line 5 falling; line 8 is an output (ignored)
    gin = 0; repeat (5) @(negedge clk);
    do_cmd(GP_W_INTSEL, 32'h0000_0020, r);
    do_cmd(GP_W_INTEN, 32'h0000_0121, r);
    gin[5] = 1; gin[8] = 1; repeat (6) @(negedge clk);
    chk(!irq && !rsp.valid, "no irq on rising edge of a falling-edge line");
    gin[0] = 1;
    begin
      int n = 0;
      while (!rsp.valid && n < 20) begin @(negedge clk); n++; end
      chk(rsp.valid && rsp.irq && rsp.data == 32'h1, "irq reply line 0");
      rsp_ack = 1; @(negedge clk); rsp_ack = 0;
    end
    chk(irq, "irq level");
    gin[5] = 0;
    begin
      int n = 0;
      while (!rsp.valid && n < 20) begin @(negedge clk); n++; end
      chk(rsp.valid && rsp.irq && rsp.data == 32'h21, "irq reply line 5");
      rsp_ack = 1; @(negedge clk); rsp_ack = 0;
    end
    do_cmd(GP_R_INTS, 0, r); chk(r.data == 32'h21, "INTS");
    do_cmd(GP_W_INTS, 32'h1, r);
    do_cmd(GP_R_INTS, 0, r); chk(r.data == 32'h20, "INTS after clear");
    do_cmd(GP_W_INTS, 32'h20, r);
    repeat (3) @(negedge clk);
    chk(!irq && !rsp.valid, "all clear");
    @(negedge clk);
    req = '{valid: 1'b1, cmd: 8'h77, len: 8'd4, data: 0};
    @(negedge clk); req.valid = 0;
    chk(rsp.valid && rsp.err == ERR_COMMAND, "invalid command");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
