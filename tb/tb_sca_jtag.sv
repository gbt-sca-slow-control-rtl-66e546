// tb_sca_jtag: JTAG master channel against a bit-level device model.
// The model (event driven on TCK edges) samples TDO and TMS on the edge
// opposite to the one the master launches them on (set by CTRL.TXE) and
// drives its own pattern on TDI so that it is stable at the edge the master
// samples (set by CTRL.RXE). For random lengths, dividers and INV/TXE/RXE
// settings the test checks the TDO and TMS streams, the TDI bits read back,
// bits above the length left alone, TCK idle level and half period, the
// GO answer time, and the ARST pulse length of RSTLEN + 1 clocks.
module tb_sca_jtag;
  import sca_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  chan_req_t req;
  chan_rsp_t rsp;
  logic rsp_ack = 0, tck, tms, tdo, tdi, arst;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  sca_jtag dut (.clk, .rst_n, .req, .rsp, .rsp_ack, .tck, .tms, .tdo, .tdi, .arst);

  bit minv, mtxe, mrxe, active;
  bit gtdo[$], gtms[$], pat[$];
  int nlead, last_edge, min_half, max_half;
  always @(tck) if (active && $time > 0) begin
    bit leading;
    int h;
    leading = (tck != minv);
    h = cyc - last_edge; last_edge = cyc;
    if (!(leading && nlead == 0)) begin
      if (h < min_half) min_half = h;
      if (h > max_half) max_half = h;
    end
    if (leading) nlead++;
    if (leading == !mtxe) begin gtdo.push_back(tdo); gtms.push_back(tms); end
    if (mrxe && leading && nlead - 1 < pat.size()) tdi = pat[nlead - 1];
    if (!mrxe && !leading && nlead < pat.size()) tdi = pat[nlead];
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
    int lat, hi;
    logic [127:0] tx, tmv, sp, rxw;
    req = '0; tdi = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      int len, div;
      len = (t == 0) ? 128 : (t == 1) ? 1 : 1 + ($urandom % 128);
      div = (t % 3 == 0) ? 0 : (t % 3 == 1) ? 3 : 1;
      mtxe = t[0]; mrxe = t[1]; minv = t[2];
      tx = {$urandom, $urandom, $urandom, $urandom};
      tmv = {$urandom, $urandom, $urandom, $urandom};
      sp = {$urandom, $urandom, $urandom, $urandom};
      pat.delete(); gtdo.delete(); gtms.delete();
      for (int i = 0; i < len; i++) pat.push_back(sp[i]);
      for (int w = 0; w < 4; w++) begin
        do_cmd(SJ_W_TX0 + 8'(2*w), tx[w*32 +: 32], r, lat);
        do_cmd(SJ_W_TMS0 + 8'(2*w), tmv[w*32 +: 32], r, lat);
      end
      do_cmd(SJ_W_CTRL, (minv << 12) | (mrxe << 10) | (mtxe << 9) | (len % 128), r, lat);
      do_cmd(SJ_W_FREQ, div, r, lat);
      repeat (2) @(negedge clk);
      chk(tck == minv && tdo == minv && tms == minv, "idle levels");
      tdi = pat[0];
      min_half = 1000; max_half = 0; nlead = 0; active = 1;
      do_cmd(SJ_GO, 0, r, lat);
      active = 0;
      chk(lat >= 2 * len * (div + 1) && lat <= 2 * len * (div + 1) + 2 * (div + 1) + 4,
          $sformatf("t%0d GO latency %0d", t, lat));
      if (len > 1) chk(min_half == div + 1 && max_half == div + 1,
                       $sformatf("t%0d half period %0d..%0d", t, min_half, max_half));
      chk(gtdo.size() == len, $sformatf("t%0d device got %0d bits", t, gtdo.size()));
      for (int i = 0; i < len && i < gtdo.size(); i++) begin
        chk(gtdo[i] == tx[i], $sformatf("t%0d tdo bit %0d", t, i));
        chk(gtms[i] == tmv[i], $sformatf("t%0d tms bit %0d", t, i));
      end
      for (int w = 0; w < 4; w++) begin
        do_cmd(SJ_R_RX0 + 8'(2*w), 0, r, lat);
        rxw[w*32 +: 32] = r.data;
        do_cmd(SJ_R_TMS0 + 8'(2*w), 0, r, lat);
        chk(r.data == tmv[w*32 +: 32], "TMS register unchanged by transfer");
      end
      for (int i = 0; i < 128; i++)
        chk(rxw[i] == (i < len ? sp[i] : tx[i]), $sformatf("t%0d tdi bit %0d", t, i));
    end
    // reset pulse
    foreach (hi_len[k]) begin
      do_cmd(SJ_W_SS, hi_len[k], r, lat);
      chk(!arst, "arst idle low");
      hi = 0;
      fork
        do_cmd(SJ_ARST, 0, r, lat);
        begin @(posedge arst); @(negedge clk); while (arst) begin hi++; @(negedge clk); end end
      join
      chk(hi == hi_len[k] + 1, $sformatf("arst high %0d clocks for RSTLEN %0d", hi, hi_len[k]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int hi_len[3] = '{0, 9, 200};
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
