// tb_aux_i2c_port: auxiliary I2C slave port driven by an I2C master channel
// of the design itself (sca_i2c) at 100 kHz and 1 MHz. A controller model
// takes the commands and returns replies. Checks: the status byte is 0 with
// no reply waiting; a written packet reaches cmd with all its fields; the
// reply reads back as status 1, TR#, CH#, ERR, LEN, data and 0xFF;
// rep_full stays high until the reply has been read, and drops at the STOP;
// packets shorter than four bytes are dropped; another address is not
// acknowledged.
module tb_aux_i2c_port;
  import sca_pkg::*;
  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;
  chan_req_t req;
  chan_rsp_t rsp;
  logic rsp_ack = 0, scl_oe, m_sda_oe, s_sda_oe;
  wire scl = !scl_oe;
  wire sda = !m_sda_oe && !s_sda_oe;
  logic cmd_valid, cmd_pop = 0, rep_push = 0, rep_full;
  sca_cmd_t cmd;
  sca_rep_t rep = '0;
  int checks = 0, failures = 0;

  sca_i2c master (.clk, .rst_n, .req, .rsp, .rsp_ack, .scl_oe, .sda_oe(m_sda_oe), .scl_in(scl), .sda_in(sda));
  aux_i2c_port #(.ADDR(7'h00)) dut (.clk, .rst_n, .scl_in(scl), .sda_in(sda), .sda_oe(s_sda_oe),
    .cmd_valid, .cmd, .cmd_pop, .rep_push, .rep, .rep_full);

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic mcmd(logic [7:0] c, logic [31:0] d, output chan_rsp_t r);
    int lat = 0;
    @(negedge clk);
    req = '{valid: 1'b1, cmd: c, len: 8'd4, data: d};
    @(negedge clk);
    req.valid = 1'b0;
    while (!rsp.valid && lat < 400000) begin @(negedge clk); lat++; end
    r = rsp;
    rsp_ack = 1'b1; @(negedge clk); rsp_ack = 1'b0;
  endtask

  task automatic write_pkt(byte unsigned b[$], int sp, output chan_rsp_t r);
    logic [127:0] buff = '0;
    chan_rsp_t x;
    foreach (b[i]) buff[8*i +: 8] = b[i];
    for (int w = 0; w < 4; w++) mcmd(I2C_W_DATA0 + 8'(2*w), buff[32*w +: 32], x);
    mcmd(I2C_W_CTRL, {24'h0, 1'b0, 5'(b.size() % 16), 2'(sp)}, x);
    mcmd(I2C_M_W, 32'h00, r);
  endtask

  task automatic read_bytes(int n, int sp, output byte unsigned b[$], output chan_rsp_t r);
    chan_rsp_t x;
    mcmd(I2C_W_CTRL, {24'h0, 1'b0, 5'(n % 16), 2'(sp)}, x);
    mcmd(I2C_M_R, 32'h00, r);
    b.delete();
    for (int w = 0; w < 4; w++) begin
      mcmd(I2C_R_DATA0 + 8'(2*w), 0, x);
      for (int i = 0; i < 4; i++) if (4*w + i < n) b.push_back(x.data[8*i +: 8]);
    end
  endtask

  initial begin
    chan_rsp_t r;
    byte unsigned b[$];
    req = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int pass = 0; pass < 4; pass++) begin
      int sp;
      logic [31:0] d;
      sp = (pass % 2) ? 3 : 0;
      d = $urandom;
      read_bytes(2, sp, b, r);
      chk(r.err == 0 && b[0] == 8'h00, "status 0 with no reply");
      write_pkt('{8'(pass + 1), 8'h03, 8'h86, 8'h04, d[7:0], d[15:8], d[23:16], d[31:24]}, sp, r);
      chk(r.err == 0, "packet write acknowledged");
      repeat (20) @(negedge clk);
      chk(cmd_valid, "command offered");
      chk(cmd.tr == 8'(pass + 1) && cmd.ch == 3 && cmd.cmd == 8'h86 && cmd.len == 4 && cmd.data[31:0] == d,
          "command fields");
      @(negedge clk); cmd_pop = 1; @(negedge clk); cmd_pop = 0;
      chk(!cmd_valid, "command taken");
      chk(!rep_full, "reply slot free");
      rep = '{tr: 8'(pass + 1), ch: 8'h03, err: 8'h00, len: 8'h04, data: ~d};
      @(negedge clk); rep_push = 1; @(negedge clk); rep_push = 0;
      chk(rep_full, "reply slot full");
      read_bytes(10, sp, b, r);
      chk(r.err == 0 && b.size() == 10, "reply read");
      chk(b[0] == 1 && b[1] == 8'(pass + 1) && b[2] == 3 && b[3] == 0 && b[4] == 4 &&
          {b[8], b[7], b[6], b[5]} == ~d && b[9] == 8'hFF, $sformatf("reply bytes %p", b));
      repeat (20) @(negedge clk);
      chk(!rep_full, "reply slot released after the read");
    end
    // short packet dropped
    write_pkt('{8'h09, 8'h03, 8'h86}, 3, r);
    repeat (20) @(negedge clk);
    chk(!cmd_valid, "short packet dropped");
    // other address: no acknowledge
    mcmd(I2C_S_W, 32'h0000_0055, r);
    chk(r.err == ERR_GENERIC && r.data[15:8] == 8'h40, "other address not acknowledged");
    chk(!cmd_valid, "nothing offered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
