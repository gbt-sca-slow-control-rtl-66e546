// tb_sca_i2c: one I2C master channel on an open-drain bus with two slave
// models, one at 7-bit address 0x21 and one at 10-bit address 0x2A5.
// Checks, at all four rates: the SCL period (4 quarters of 100/50/25/10
// clocks), single-byte write and read, multi-byte write and read of 1..16
// bytes, 10-bit addressing, the three read-modify-write operations, a
// missing acknowledge (status NOACK, generic error), SDA held low before
// START (status LEVERR, no START sent), and clock stretching by a slave
// that holds SCL low (the transfer waits and stays correct).
module tb_sca_i2c;
  import sca_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  chan_req_t req;
  chan_rsp_t rsp;
  logic rsp_ack = 0, scl_oe, sda_oe;
  logic sp7, sp10, stretch_pull = 0, sda_stuck = 0;
  wire scl = !scl_oe && !stretch_pull;
  wire sda = !sda_oe && !sp7 && !sp10 && !sda_stuck;
  int checks = 0, failures = 0;
  int stretch = 0;

  sca_i2c dut (.clk, .rst_n, .req, .rsp, .rsp_ack, .scl_oe, .sda_oe, .scl_in(scl), .sda_in(sda));
  i2c_slave_model #(.ADDR7(7'h21)) s7 (.scl, .sda, .sda_pull(sp7));
  i2c_slave_model #(.ADDR10(10'h2A5), .TEN(1)) s10 (.scl, .sda, .sda_pull(sp10));

  // SCL period measurement and optional stretching
  int last_rise = 0, cyc = 0, min_per, max_per;
  always @(posedge clk) cyc++;
  always @(posedge scl) begin
    if (last_rise != 0) begin
      if (cyc - last_rise < min_per) min_per = cyc - last_rise;
      if (cyc - last_rise > max_per) max_per = cyc - last_rise;
    end
    last_rise = cyc;
  end
  always @(negedge scl) if (stretch > 0) begin
    stretch_pull = 1;
    repeat (stretch) @(posedge clk);
    stretch_pull = 0;
  end

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic do_cmd(logic [7:0] c, logic [31:0] d, output chan_rsp_t r);
    int lat = 0;
    @(negedge clk);
    req = '{valid: 1'b1, cmd: c, len: 8'd4, data: d};
    @(negedge clk);
    req.valid = 1'b0;
    while (!rsp.valid && lat < 400000) begin @(negedge clk); lat++; end
    chk(rsp.valid, $sformatf("cmd %h answered", c));
    r = rsp;
    rsp_ack = 1'b1; @(negedge clk); rsp_ack = 1'b0;
  endtask

  task automatic ok_cmd(logic [7:0] c, logic [31:0] d, output chan_rsp_t r);
    do_cmd(c, d, r);
    chk(r.err == ERR_NONE, $sformatf("cmd %h err %h data %h", c, r.err, r.data));
  endtask

  initial begin
    chan_rsp_t r;
    int qlen[4] = '{100, 50, 25, 10};
    logic [127:0] buff;
    req = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (2) @(negedge clk);
    chk(scl && sda, "bus released after reset");
    for (int sp = 0; sp < 4; sp++) begin
      byte unsigned b;
      int n, st0;
      ok_cmd(I2C_W_CTRL, 32'(sp), r);
      ok_cmd(I2C_R_CTRL, 0, r);
      chk(r.data[7:0] == 8'(sp), "CTRL read back");
      // single write then read, 7-bit
      b = $urandom;
      min_per = 1 << 30; max_per = 0; last_rise = 0;
      ok_cmd(I2C_S_W, {8'h0, b, 16'h0021}, r);
      chk(min_per == 4 * qlen[sp] && max_per == 4 * qlen[sp],
          $sformatf("speed %0d SCL period %0d..%0d", sp, min_per, max_per));
      chk(s7.mem[0] == b, "single write");
      chk(r.data[15:8] == 8'h04, "status SUCC after write");
      s7.mem[0] = b ^ 8'hFF;
      ok_cmd(I2C_S_R, 32'h21, r);
      chk(r.data[7:0] == (b ^ 8'hFF) && r.data[15:8] == 8'h04, $sformatf("single read %h", r.data));
      ok_cmd(I2C_R_STR, 0, r);
      chk(r.data[7:0] == 8'h04, "STATUS register");
      // multi-byte, 7-bit
      n = (sp == 0) ? 16 : 1 + $urandom % 16;
      buff = {$urandom, $urandom, $urandom, $urandom};
      for (int w = 0; w < 4; w++) ok_cmd(I2C_W_DATA0 + 8'(2*w), buff[32*w +: 32], r);
      ok_cmd(I2C_W_CTRL, {24'h0, 1'b0, 5'(n % 16), 2'(sp)}, r);
      st0 = s7.starts;
      ok_cmd(I2C_M_W, 32'h21, r);
      chk(s7.starts == st0 + 1, "one START per multi-byte write");
      for (int i = 0; i < n; i++) chk(s7.mem[i] == buff[8*i +: 8], $sformatf("multi write byte %0d", i));
      for (int i = 0; i < 16; i++) s7.mem[i] = $urandom;
      ok_cmd(I2C_M_R, 32'h21, r);
      for (int w = 0; w < 4; w++) begin
        ok_cmd(I2C_R_DATA0 + 8'(2*w), 0, r);
        for (int i = 0; i < 4; i++)
          if (4*w + i < n) chk(r.data[8*i +: 8] == s7.mem[4*w + i], $sformatf("multi read byte %0d", 4*w+i));
      end
      // 10-bit addressing
      ok_cmd(I2C_W_CTRL, {24'h0, 1'b1, 5'(n % 16), 2'(sp)}, r);
      b = $urandom;
      ok_cmd(I2C_S_W, {8'h0, b, 16'h02A5}, r);
      chk(s10.mem[0] == b, "10-bit single write");
      ok_cmd(I2C_S_R, 32'h2A5, r);
      chk(r.data[7:0] == b, "10-bit single read");
      for (int w = 0; w < 4; w++) ok_cmd(I2C_W_DATA0 + 8'(2*w), buff[32*w +: 32], r);
      ok_cmd(I2C_M_W, 32'h2A5, r);
      for (int i = 0; i < n; i++) chk(s10.mem[i] == buff[8*i +: 8], $sformatf("10-bit multi write %0d", i));
      for (int i = 0; i < 16; i++) s10.mem[i] = $urandom;
      ok_cmd(I2C_M_R, 32'h2A5, r);
      for (int w = 0; w < 4; w++) begin
        ok_cmd(I2C_R_DATA0 + 8'(2*w), 0, r);
        for (int i = 0; i < 4; i++)
          if (4*w + i < n) chk(r.data[8*i +: 8] == s10.mem[4*w + i], $sformatf("10-bit multi read %0d", 4*w+i));
      end
      ok_cmd(I2C_W_CTRL, 32'(sp), r);
    end
    // read-modify-write
    begin
      byte unsigned v, m;
      for (int op = 0; op < 3; op++) begin
        v = $urandom; m = $urandom;
        s7.mem[0] = v;
        ok_cmd(I2C_W_MSK, m, r);
        ok_cmd(I2C_R_MSK, 0, r);
        chk(r.data[7:0] == m, "MASK read back");
        ok_cmd(op == 0 ? I2C_RMW_AND : op == 1 ? I2C_RMW_OR : I2C_RMW_XOR, 32'h21, r);
        chk(s7.mem[0] == (op == 0 ? (v & m) : op == 1 ? (v | m) : (v ^ m)),
            $sformatf("RMW op %0d: %h %h -> %h", op, v, m, s7.mem[0]));
      end
    end
    // missing acknowledge
    do_cmd(I2C_S_W, 32'h0011_0033, r);
    chk(r.err == ERR_GENERIC && r.data[15:8] == 8'h40, $sformatf("NOACK reply %h %h", r.err, r.data));
    repeat (50) @(negedge clk);
    chk(scl && sda, "bus released after NOACK");
    // SDA stuck low
    begin
      int st0;
      sda_stuck = 1;
      repeat (5) @(negedge clk);
      st0 = s7.starts;
      do_cmd(I2C_S_W, 32'h0011_0021, r);
      sda_stuck = 0;
      chk(r.err == ERR_GENERIC && r.data[15:8] == 8'h08, $sformatf("LEVERR reply %h %h", r.err, r.data));
      chk(s7.starts == st0, "no START on a stuck bus");
    end
    // clock stretching
    begin
      byte unsigned b = 8'hC3;
      stretch = 300;
      ok_cmd(I2C_W_CTRL, 32'h3, r);
      min_per = 1 << 30; max_per = 0; last_rise = 0;
      ok_cmd(I2C_S_W, {8'h0, b, 16'h0021}, r);
      chk(s7.mem[0] == b, "write with clock stretching");
      chk(min_per >= 300, $sformatf("SCL period stretched to %0d", min_per));
      s7.mem[0] = 8'h3C;
      ok_cmd(I2C_S_R, 32'h21, r);
      chk(r.data[7:0] == 8'h3C, $sformatf("read with clock stretching %h", r.data));
      stretch = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
