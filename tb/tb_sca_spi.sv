// tb_sca_spi: SPI master channel against an SPI slave model.
// For each of the four modes, several lengths, both bit orders and two
// clock dividers, the slave model (event driven on SCLK edges) records the
// MOSI bits and returns its own pattern on MISO. Checks: bits seen by the
// slave, bits read back by the master, SCLK idle level and period
// (2 * (DIV + 1) clocks), MOSI idle level, slave select, and that GO is
// answered only when the transfer ends.
module tb_sca_spi;
  import sca_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  chan_req_t req;
  chan_rsp_t rsp;
  logic rsp_ack = 0, sclk, mosi, miso;
  logic [7:0] ss_n;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  sca_spi dut (.clk, .rst_n, .req, .rsp, .rsp_ack, .sclk, .mosi, .miso, .ss_n);

  // slave model
  bit mcpol, mcpha;
  bit got[$];
  bit spat[$];
  int sidx;
  int last_edge = 0, min_half = 1000, max_half = 0;
  wire sel = (ss_n != 8'hFF);
  always @(posedge sel) if ($time > 0) begin
    got.delete(); sidx = 0;
    if (!mcpha) miso = spat[0];
  end
  always @(sclk) if (sel && $time > 0) begin
    bit leading;
    int h;
    leading = (sclk != mcpol);
    h = cyc - last_edge; last_edge = cyc;
    if (!(leading && got.size() == 0)) begin
      if (h < min_half) min_half = h;
      if (h > max_half) max_half = h;
    end
    if (leading == !mcpha) begin
      got.push_back(mosi);
      sidx++;
    end else begin
      if (mcpha) miso = spat[sidx];
      else if (sidx < spat.size()) miso = spat[sidx];
    end
  end

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic do_cmd(logic [7:0] c, logic [31:0] d, output chan_rsp_t r, output int lat);
    lat = 0;
    @(negedge clk);
    req = '{valid: 1'b1, cmd: c, len: 8'd4, data: d};
    @(negedge clk);
    req.valid = 1'b0;
    while (!rsp.valid && lat < 100000) begin @(negedge clk); lat++; end
    r = rsp;
    chk(r.err == 0, $sformatf("cmd %h err", c));
    rsp_ack = 1'b1; @(negedge clk); rsp_ack = 1'b0;
  endtask

  initial begin
    chan_rsp_t r;
    int lat;
    logic [127:0] tx, sp, rxw;
    req = '0; miso = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      int len, div, inv, lsb;
      len = (t == 0) ? 128 : (t == 1) ? 1 : 1 + ($urandom % 128);
      div = (t % 3 == 0) ? 0 : (t % 3 == 1) ? 2 : 5;
      mcpha = t[0]; mcpol = t[1];
      inv = t[2]; lsb = (t % 5 == 2);
      tx = {$urandom, $urandom, $urandom, $urandom};
      sp = {$urandom, $urandom, $urandom, $urandom};
      spat.delete();
      for (int i = 0; i < len; i++) spat.push_back(sp[i]);
      for (int w = 0; w < 4; w++) do_cmd(SJ_W_TX0 + 8'(2*w), tx[w*32 +: 32], r, lat);
      do_cmd(SJ_W_CTRL, (inv << 12) | (lsb << 11) | (mcpol << 10) | (mcpha << 9) | (len % 128), r, lat);
      do_cmd(SJ_W_FREQ, div, r, lat);
      do_cmd(SJ_W_SS, 32'h1 << (t % 8), r, lat);
      repeat (2) @(negedge clk);
      chk(sclk == mcpol && mosi == inv[0] && ss_n == 8'hFF, "idle levels");
      min_half = 1000; max_half = 0;
      do_cmd(SJ_GO, 0, r, lat);
      chk(lat >= 2 * len * (div + 1) && lat <= 2 * len * (div + 1) + 2 * (div + 1) + 4,
          $sformatf("t%0d GO latency %0d for %0d bits div %0d", t, lat, len, div));
      if (len > 1) chk(min_half == div + 1 && max_half == div + 1,
                       $sformatf("t%0d half period %0d..%0d", t, min_half, max_half));
      chk(got.size() == len, $sformatf("t%0d slave got %0d bits", t, got.size()));
      for (int i = 0; i < len && i < got.size(); i++)
        chk(got[i] == tx[lsb ? i : len - 1 - i], $sformatf("t%0d mosi bit %0d", t, i));
      for (int w = 0; w < 4; w++) begin
        do_cmd(SJ_R_RX0 + 8'(2*w), 0, r, lat);
        rxw[w*32 +: 32] = r.data;
      end
      for (int i = 0; i < len; i++)
        chk(rxw[lsb ? i : len - 1 - i] == sp[i], $sformatf("t%0d miso bit %0d", t, i));
      for (int i = len; i < 128; i++)
        chk(rxw[i] == tx[i], "bits above length untouched");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
