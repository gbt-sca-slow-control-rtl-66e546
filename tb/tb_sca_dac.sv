// tb_sca_dac: DAC channel registers and the behavioural DAC cores.
// Writes random codes to the four DACs, reads them back, checks the
// voltages of the DAC models (code / 255 V), an invalid command and that
// every reply comes one clock after its command.
module tb_sca_dac;
  import sca_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  chan_req_t req;
  chan_rsp_t rsp;
  logic      rsp_ack;
  logic [7:0] code [4];
  real        v [4];
  int checks = 0, failures = 0;

  sca_dac dut (.clk, .rst_n, .req, .rsp, .rsp_ack, .dac_code(code));
  for (genvar k = 0; k < 4; k++) begin : g_m
    dac_model m (.code(code[k]), .pd(1'b0), .vout(v[k]));
  end

  task automatic do_cmd(logic [7:0] c, logic [31:0] d, output chan_rsp_t r);
    int n = 0;
    @(negedge clk);
    req = '{valid: 1'b1, cmd: c, len: 8'd4, data: d};
    @(negedge clk);
    req.valid = 1'b0;
    while (!rsp.valid && n < 100) begin @(negedge clk); n++; end
    r = rsp;
    checks++; if (n != 0) begin failures++; $display("latency %0d", n); end
    rsp_ack = 1'b1; @(negedge clk); rsp_ack = 1'b0;
  endtask

  initial begin
    chan_rsp_t r;
    logic [7:0] want [4];
    req = '0; rsp_ack = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 4; k++) begin checks++; if (code[k] != 0) failures++; end
    for (int round = 0; round < 3; round++) begin
      for (int k = 0; k < 4; k++) begin
        want[k] = (round == 2) ? 8'd255 : 8'($urandom);
        do_cmd(DAC_W_A + 8'(2*k), {24'h0, want[k]}, r);
        checks++; if (r.err != 0) failures++;
      end
      repeat (3) @(negedge clk);
      for (int k = 0; k < 4; k++) begin
        real e;
        do_cmd(DAC_R_A + 8'(2*k), 0, r);
        checks++; if (r.err != 0 || r.len != 1 || r.data[7:0] != want[k]) begin failures++; $display("read %0d", k); end
        e = real'(want[k]) / 255.0 - v[k];
        checks++; if (e > 1e-6 || e < -1e-6) begin failures++; $display("dac %0d v=%f", k, v[k]); end
      end
    end
    do_cmd(8'h99, 0, r);
    checks++; if (r.err != ERR_COMMAND) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
