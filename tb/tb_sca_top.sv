// tb_sca_top: end-to-end test of the whole Slow Control Adapter.
//
// Two host models stand for the primary and the secondary GBTX; an I2C
// slave model sits on I2C bus 0 (7-bit address) and another on bus 5
// (10-bit address); SPI MISO is looped to MOSI and JTAG TDI to TDO; the
// low GPIO lines are looped back. The test connects, sends commands to
// every channel through HDLC frames and checks every reply against values
// the testbench works out itself. It counts each mechanism of the design
// (connect, test loopback, frame rejection, error replies, concurrent I2C
// transfers, read-modify-write, interrupts, ADC calibration, SEU counting,
// link reset, port switching, auxiliary port) and fails any that never
// happened. Runs with all parameters of the top at their defaults.
module tb_sca_top;
  import sca_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  logic reset_b = 0;
  logic [1:0] rx_pri, rx_sec, tx_pri, tx_sec;
  logic eport_connected, eport_active_sec;
  logic aux_test_en = 0, aux_scl = 1, aux_sda_m = 1, aux_sda_oe;
  logic spi_sclk, spi_mosi, jtag_tck, jtag_tms, jtag_tdo, jtag_arst, gpio_irq;
  logic [7:0] spi_ss_n;
  logic [15:0] i2c_scl_oe, i2c_sda_oe, i2c_scl_in, i2c_sda_in;
  logic [31:0] gpio_in, gpio_out, gpio_oe, seu_count;
  logic [15:0] gpio_hi = 0;
  logic gpio_extclk = 0, seu_inject = 0;
  real  adc_vin [31];
  real  adc_r_ext [32];
  real  temp_c = 25.0;
  real  dac_vout [4];
  logic sp0, sp5;

  sca_top dut (
    .clk, .reset_b, .rx_pri, .rx_sec, .tx_pri, .tx_sec, .eport_connected, .eport_active_sec,
    .aux_test_en, .aux_scl, .aux_sda_in(aux_sda_m & !aux_sda_oe), .aux_sda_oe,
    .spi_sclk, .spi_mosi, .spi_miso(spi_mosi), .spi_ss_n,
    .jtag_tck, .jtag_tms, .jtag_tdo, .jtag_tdi(jtag_tdo), .jtag_arst,
    .i2c_scl_oe, .i2c_sda_oe, .i2c_scl_in, .i2c_sda_in,
    .gpio_in, .gpio_out, .gpio_oe, .gpio_extclk, .gpio_irq,
    .adc_vin, .adc_r_ext, .temp_c, .dac_vout, .seu_inject, .seu_count);

  hdlc_host hp (.clk, .tx_bits(rx_pri), .rx_bits(tx_pri));
  hdlc_host hs (.clk, .tx_bits(rx_sec), .rx_bits(tx_sec));

  // I2C buses (open drain, wired AND)
  i2c_slave_model #(.ADDR7(7'h21)) s0 (.scl(i2c_scl_in[0]), .sda(i2c_sda_in[0]), .sda_pull(sp0));
  i2c_slave_model #(.ADDR10(10'h2A5), .TEN(1)) s5 (.scl(i2c_scl_in[5]), .sda(i2c_sda_in[5]), .sda_pull(sp5));
  always_comb begin
    for (int k = 0; k < 16; k++) begin
      i2c_scl_in[k] = !i2c_scl_oe[k];
      i2c_sda_in[k] = !i2c_sda_oe[k];
    end
    i2c_sda_in[0] = !i2c_sda_oe[0] && !sp0;
    i2c_sda_in[5] = !i2c_sda_oe[5] && !sp5;
  end
  assign gpio_in = {gpio_hi, gpio_out[15:0]};

  int checks = 0, failures = 0;
  // mechanism counters
  int n_connect = 0, n_test = 0, n_rej = 0, n_err_dis = 0, n_err_ch = 0, n_err_busy = 0,
      n_concurrent = 0, n_rmw = 0, n_irq = 0, n_adc = 0, n_seu = 0, n_reset = 0,
      n_switch = 0, n_discard = 0, n_aux = 0, n_nack = 0, n_ten = 0, n_arst = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL [%0d]: %s", cyc, what); end
  endtask

  // host state
  int ns = 0;        // host send sequence number
  bit use_sec = 0;
  byte unsigned trn = 1;

  task automatic send(byte unsigned fr[$]);
    if (use_sec) hs.send_frame(fr); else hp.send_frame(fr);
  endtask

  task automatic get_frame(output byte unsigned fr[$], input int tmo, output bit got);
    int t = 0;
    got = 0;
    while (t < tmo) begin
      if (!use_sec && hp.rx_q.size() > 0) begin fr = hp.rx_q.pop_front(); got = 1; return; end
      if ( use_sec && hs.rx_q.size() > 0) begin fr = hs.rx_q.pop_front(); got = 1; return; end
      @(posedge clk); t++;
    end
  endtask

  // a reply, skipping unsolicited interrupt frames (counted)
  byte unsigned irq_frame[$];
  task automatic get_reply(output byte unsigned fr[$], input int tmo, output bit got);
    do begin
      get_frame(fr, tmo, got);
      if (got && fr.size() >= 6 && fr[1][0] == 0 && fr[2] == 8'hFF) begin
        irq_frame = fr; n_irq++; got = 0;
        continue;
      end
      break;
    end while (1);
  endtask

  task automatic send_cmd(byte unsigned tr, byte unsigned ch, byte unsigned c, logic [31:0] d,
                          byte unsigned len);
    byte unsigned fr[$];
    fr = {8'h00, byte'({3'd0, 1'b0, 3'(ns), 1'b0}), tr, ch, c, len};
    for (int i = 0; i < len; i++) fr.push_back(d[i*8 +: 8]);
    ns = (ns + 1) % 8;
    send(fr);
  endtask

  // send a command and wait for its reply
  task automatic cmd(byte unsigned ch, byte unsigned c, logic [31:0] d, output byte unsigned err,
                     output logic [31:0] rd, input int tmo = 20000);
    byte unsigned fr[$];
    bit got;
    byte unsigned tr;
    tr = trn; trn = (trn == 8'hFE) ? 1 : trn + 1;
    send_cmd(tr, ch, c, d, 4);
    get_reply(fr, tmo, got);
    rd = 0; err = 8'hEE;
    check(got, $sformatf("reply to ch %0h cmd %0h", ch, c));
    if (got) begin
      check(fr.size() >= 6 && fr[2] == tr && fr[3] == ch,
            $sformatf("reply tr/ch %0h/%0h want %0h/%0h", fr[2], fr[3], tr, ch));
      err = fr[4];
      for (int i = 0; i < fr[5] && i < 4; i++) rd[i*8 +: 8] = fr[6 + i];
      check(fr.size() == 6 + fr[5], "reply length");
    end
  endtask

  task automatic cmd_ok(byte unsigned ch, byte unsigned c, logic [31:0] d, output logic [31:0] rd,
                        input int tmo = 20000);
    byte unsigned err;
    cmd(ch, c, d, err, rd, tmo);
    check(err == 0, $sformatf("ch %0h cmd %0h err %0h", ch, c, err));
  endtask

  task automatic unnumbered(byte unsigned ctrl, byte unsigned pl[$], byte unsigned want_ctrl,
                            output bit ok);
    byte unsigned fr[$], r[$];
    bit got;
    fr = {8'h00, ctrl};
    foreach (pl[i]) fr.push_back(pl[i]);
    send(fr);
    get_frame(r, 3000, got);
    ok = got && r.size() == 2 + pl.size() && r[1] == want_ctrl;
    if (ok) foreach (pl[i]) if (r[2 + i] != pl[i]) ok = 0;
  endtask

  // --------------------------------------------------- aux port I2C master
  localparam int QA = 20;
  task automatic aq(); repeat (QA) @(posedge clk); endtask
  task automatic a_start(); aux_sda_m = 1; aq(); aux_scl = 1; aq(); aux_sda_m = 0; aq(); aux_scl = 0; aq(); endtask
  task automatic a_stop(); aux_sda_m = 0; aq(); aux_scl = 1; aq(); aux_sda_m = 1; aq(); endtask
  task automatic a_wbyte(byte unsigned b, output bit ack);
    for (int i = 7; i >= 0; i--) begin aux_sda_m = b[i]; aq(); aux_scl = 1; aq(); aq(); aux_scl = 0; end
    aux_sda_m = 1; aq(); aux_scl = 1; aq(); ack = !(aux_sda_m & !aux_sda_oe); aq(); aux_scl = 0;
  endtask
  task automatic a_rbyte(bit last, output byte unsigned b);
    aux_sda_m = 1;
    for (int i = 7; i >= 0; i--) begin aq(); aux_scl = 1; aq(); b[i] = !aux_sda_oe; aq(); aux_scl = 0; end
    aux_sda_m = last; aq(); aux_scl = 1; aq(); aq(); aux_scl = 0; aux_sda_m = 1;
  endtask

  // --------------------------------------------------------- watch signals
  int arst_len = 0, ss2_low = 0, tms_ones = 0, tck_rises = 0;
  logic tck_q = 0;
  always @(posedge clk) begin
    if (jtag_arst) arst_len++;
    if (!spi_ss_n[2]) ss2_low++;
    tck_q <= jtag_tck;
    if (jtag_tck && !tck_q) begin tck_rises++; if (jtag_tms) tms_ones++; end
  end

  byte unsigned none[$];
  initial begin
    byte unsigned err, fr[$];
    logic [31:0] rd;
    bit ok, got, ack;
    for (int i = 0; i < 31; i++) adc_vin[i] = 0.0;
    for (int i = 0; i < 32; i++) adc_r_ext[i] = 0.0;
    adc_vin[7] = 0.5;
    adc_vin[12] = 0.8125;
    adc_r_ext[3] = 25000.0;    // 10 uA * 25 kOhm = 0.25 V
    repeat (5) @(posedge clk);
    reset_b = 1;
    repeat (60) @(posedge clk);

    // frames before CONNECT are discarded
    send_cmd(8'h01, CH_CTRL, CTRL_R_ID, 0, 4);
    get_frame(fr, 400, got);
    check(!got, "reply before CONNECT");
    if (!got) n_discard++;
    ns = 0;

    // CONNECT on the primary link
    unnumbered(HDLC_CONNECT, none, HDLC_UA, ok);
    check(ok && eport_connected && !eport_active_sec, "CONNECT primary");
    if (ok) n_connect++;

    // TEST loopback
    unnumbered(HDLC_TEST, {8'h11, 8'hFF, 8'h7E, 8'h00, 8'h3F}, HDLC_TEST, ok);
    check(ok, "TEST loopback"); if (ok) n_test++;

    // chip id from the e-fuses
    cmd_ok(CH_CTRL, CTRL_R_ID, 0, rd);
    check(rd == 32'h5CA0_0001, $sformatf("chip id %h", rd));

    // disabled and invalid channels
    cmd(CH_SPI, SJ_R_CTRL, 0, err, rd);
    check(err == ERR_DISABLED, "disabled channel"); if (err == ERR_DISABLED) n_err_dis++;
    cmd(8'h30, 8'h00, 0, err, rd);
    check(err == ERR_CHANNEL, "invalid channel"); if (err == ERR_CHANNEL) n_err_ch++;

    // wrong N(S): REJ with N(R) = expected
    begin
      byte unsigned f2[$];
      f2 = {8'h00, byte'({3'd0, 1'b0, 3'((ns + 3) % 8), 1'b0}), 8'h05, CH_CTRL, CTRL_R_ID, 8'h00};
      send(f2);
      get_frame(fr, 3000, got);
      check(got && fr.size() == 2 && fr[1][3:0] == 4'b1001 && fr[1][7:5] == 3'(ns), "REJ");
      if (got && fr.size() == 2 && fr[1][3:0] == 4'b1001) n_rej++;
    end

    // enable all channels
    cmd_ok(CH_CTRL, CTRL_W_ENA, 32'h003F_FFFF, rd);
    cmd_ok(CH_CTRL, CTRL_R_ENA, 0, rd);
    check(rd == 32'h003F_FFFF, $sformatf("enable mask %h", rd));

    // ---------------------------------------------------------------- DAC
    cmd_ok(CH_DAC, DAC_W_A + 8'd4, 32'd128, rd);
    cmd_ok(CH_DAC, DAC_R_A + 8'd4, 0, rd);
    check(rd == 128, "DAC readback");
    repeat (5) @(posedge clk);
    check(dac_vout[2] > 0.50 && dac_vout[2] < 0.505, $sformatf("DAC 2 voltage %f", dac_vout[2]));
    check(dac_vout[0] == 0.0, "DAC 0 at 0 V");

    // --------------------------------------------------------------- GPIO
    cmd_ok(CH_GPIO, GP_W_DIR, 32'h0000_FFFF, rd);
    cmd_ok(CH_GPIO, GP_W_DOUT, 32'h1234_ABCD, rd);
    gpio_hi = 16'h00C3;
    repeat (5) @(posedge clk);
    cmd_ok(CH_GPIO, GP_R_DIN, 0, rd);
    check(rd == 32'h00C3_ABCD, $sformatf("GPIO DIN %h", rd));
    check(gpio_oe == 32'h0000_FFFF, "GPIO three-state");
    cmd_ok(CH_GPIO, GP_W_INTEN, 32'h0010_0000, rd);
    gpio_hi[4] = 1;                                   // line 20 rises
    get_frame(fr, 2000, got);
    check(got && fr.size() == 10 && fr[2] == 8'hFF && fr[3] == CH_GPIO && fr[8] == 8'h10,
          "GPIO interrupt frame");
    if (got && fr.size() >= 3 && fr[2] == 8'hFF) n_irq++;
    check(gpio_irq, "irq line");
    cmd_ok(CH_GPIO, GP_W_INTS, 32'h0010_0000, rd);
    check(!gpio_irq, "irq cleared");

    // ---------------------------------------------------------------- SPI
    begin
      logic [127:0] pat;
      int t0, t1;
      pat = {32'hDEADBEEF, 32'h01234567, 32'h89ABCDEF, 32'hF0E1D2C3};
      for (int w = 0; w < 4; w++) cmd_ok(CH_SPI, SJ_W_TX0 + 8'(2*w), pat[w*32 +: 32], rd);
      cmd_ok(CH_SPI, SJ_W_CTRL, 32'h0, rd);        // 128 bits, mode (0,0), MSB first
      cmd_ok(CH_SPI, SJ_W_FREQ, 32'd0, rd);        // 20 MHz
      cmd_ok(CH_SPI, SJ_W_SS, 32'h04, rd);
      ss2_low = 0;
      cmd_ok(CH_SPI, SJ_GO, 0, rd);
      check(ss2_low >= 256 && ss2_low <= 262, $sformatf("SPI transfer %0d clocks", ss2_low));
      for (int w = 0; w < 4; w++) begin
        cmd_ok(CH_SPI, SJ_R_RX0 + 8'(2*w), 0, rd);
        check(rd == pat[w*32 +: 32], $sformatf("SPI loopback word %0d %h", w, rd));
      end
      // mode (1,1), 40 bits, LSB first, slow clock
      cmd_ok(CH_SPI, SJ_W_CTRL, 32'h0000_0E28, rd);
      cmd_ok(CH_SPI, SJ_W_FREQ, 32'd3, rd);
      ss2_low = 0;
      cmd_ok(CH_SPI, SJ_GO, 0, rd);
      check(ss2_low >= 40 * 8 && ss2_low <= 40 * 8 + 10, $sformatf("SPI slow %0d", ss2_low));
      cmd_ok(CH_SPI, SJ_R_RX0, 0, rd);
      check(rd == pat[31:0], "SPI mode 3 loopback");
    end

    // --------------------------------------------------------------- JTAG
    begin
      tck_rises = 0; tms_ones = 0;
      cmd_ok(CH_JTAG, SJ_W_TX0, 32'hA5A5_1234, rd);
      cmd_ok(CH_JTAG, SJ_W_TX0 + 8'd2, 32'h0F0F_8001, rd);
      cmd_ok(CH_JTAG, SJ_W_TMS0, 32'h0000_0007, rd);
      cmd_ok(CH_JTAG, SJ_W_TMS0 + 8'd2, 32'h8000_0000, rd);
      cmd_ok(CH_JTAG, SJ_W_CTRL, 32'd64, rd);
      cmd_ok(CH_JTAG, SJ_W_FREQ, 32'd1, rd);
      cmd_ok(CH_JTAG, SJ_GO, 0, rd);
      check(tck_rises == 64, $sformatf("JTAG TCK count %0d", tck_rises));
      check(tms_ones == 4, $sformatf("JTAG TMS ones %0d", tms_ones));
      cmd_ok(CH_JTAG, SJ_R_RX0, 0, rd);
      check(rd == 32'hA5A5_1234, "JTAG TDI word 0");
      cmd_ok(CH_JTAG, SJ_R_RX0 + 8'd2, 0, rd);
      check(rd == 32'h0F0F_8001, "JTAG TDI word 1");
      cmd_ok(CH_JTAG, SJ_W_SS, 32'd9, rd);
      arst_len = 0;
      cmd_ok(CH_JTAG, SJ_ARST, 0, rd);
      check(arst_len == 10, $sformatf("JTAG reset pulse %0d", arst_len));
      if (arst_len == 10) n_arst++;
    end

    // ---------------------------------------------------------------- I2C
    begin
      byte unsigned c0, c5;
      c0 = CH_I2C0; c5 = CH_I2C0 + 5;
      cmd_ok(c0, I2C_W_CTRL, 32'h0000_0013, rd);     // 1 MHz, 4 bytes
      cmd_ok(c0, I2C_S_W, 32'h005A_0021, rd);
      check(s0.mem[0] == 8'h5A, "I2C single write");
      cmd_ok(c0, I2C_S_R, 32'h0000_0021, rd);
      check(rd[7:0] == 8'h5A && rd[15:8] == 8'h04, $sformatf("I2C single read %h", rd));
      cmd_ok(c0, I2C_W_MSK, 32'h0000_00F0, rd);
      cmd_ok(c0, I2C_RMW_XOR, 32'h0000_0021, rd);
      check(s0.mem[0] == 8'hAA, $sformatf("I2C RMW XOR %h", s0.mem[0]));
      if (s0.mem[0] == 8'hAA) n_rmw++;
      // absent slave: NACK
      cmd(c0, I2C_S_W, 32'h0000_0055, err, rd);
      check(err == ERR_GENERIC && rd[15:8] == 8'h40, "I2C NACK");
      if (err == ERR_GENERIC) n_nack++;
      // concurrent: 10-bit multi-byte write on bus 5 and a read on bus 0
      cmd_ok(c5, I2C_W_CTRL, 32'h0000_0093, rd);     // 10-bit, 4 bytes, 1 MHz
      cmd_ok(c5, I2C_W_DATA0, 32'h4433_2211, rd);
      begin
        byte unsigned r1[$], r2[$], r3[$];
        bit g1, g2, g3;
        send_cmd(8'h60, c5, I2C_M_W, 32'h0000_02A5, 4);
        send_cmd(8'h61, c0, I2C_S_R, 32'h0000_0021, 4);
        send_cmd(8'h62, c5, I2C_R_CTRL, 0, 4);       // c5 still busy
        get_reply(r1, 20000, g1);
        get_reply(r2, 20000, g2);
        get_reply(r3, 20000, g3);
        check(g1 && g2 && g3, "three replies");
        if (g1 && g2 && g3) begin
          // busy error comes first, then the short read, then the long write
          check(r1[2] == 8'h62 && r1[4] == ERR_BUSY, "busy error");
          if (r1[4] == ERR_BUSY) n_err_busy++;
          check(r2[2] == 8'h61 && r2[4] == 0 && r2[6] == 8'hAA, "concurrent read");
          check(r3[2] == 8'h60 && r3[4] == 0, "10-bit write");
          if (r2[2] == 8'h61 && r3[2] == 8'h60) n_concurrent++;
        end
      end
      check(s5.mem[0] == 8'h11 && s5.mem[3] == 8'h44, "10-bit slave data");
      cmd_ok(c5, I2C_M_R, 32'h0000_02A5, rd);
      cmd_ok(c5, I2C_R_DATA0, 0, rd);
      check(rd == 32'h4433_2211, $sformatf("10-bit multi read %h", rd));
      if (rd == 32'h4433_2211) n_ten++;
    end

    // ---------------------------------------------------------------- ADC
    begin
      int t0;
      cmd_ok(CH_ADC, ADC_W_MUX, 32'd7, rd);
      t0 = cyc;
      cmd_ok(CH_ADC, ADC_GO, 0, rd, 40000);
      check(rd >= 2045 && rd <= 2051, $sformatf("ADC 0.5 V -> %0d", rd));
      check(cyc - t0 > 400 + 2000 * 6, "ADC conversion time");
      cmd_ok(CH_ADC, ADC_R_RAW, 0, rd);
      check(rd > 2051, $sformatf("ADC raw count %0d (before calibration)", rd));
      cmd_ok(CH_ADC, ADC_W_MUX, 32'd12, rd);
      cmd_ok(CH_ADC, ADC_GO, 0, rd, 40000);
      check(rd >= 3325 && rd <= 3331, $sformatf("ADC 0.8125 V -> %0d", rd));
      cmd_ok(CH_ADC, ADC_W_MUX, 32'd31, rd);
      cmd_ok(CH_ADC, ADC_GO, 0, rd, 40000);
      check(rd >= 2250 && rd <= 2256, $sformatf("ADC temperature -> %0d", rd));   // 0.55 V
      cmd_ok(CH_ADC, ADC_W_MUX, 32'd3, rd);
      cmd_ok(CH_ADC, ADC_W_CURR, 32'h8, rd);
      cmd_ok(CH_ADC, ADC_GO, 0, rd, 40000);
      check(rd >= 1021 && rd <= 1027, $sformatf("ADC current source -> %0d", rd)); // 0.25 V
      if (rd >= 1021 && rd <= 1027) n_adc++;
    end

    // ---------------------------------------------------------------- SEU
    cmd_ok(CH_CTRL, CTRL_R_SEU, 0, rd);
    check(rd == 0, "no SEU yet");
    @(negedge clk); seu_inject = 1; @(negedge clk); seu_inject = 0;
    repeat (3) @(posedge clk);
    cmd_ok(CH_CTRL, CTRL_R_SEU, 0, rd);
    check(rd == 1, $sformatf("SEU count %0d", rd)); if (rd == 1) n_seu++;
    cmd_ok(CH_CTRL, CTRL_R_ENA, 0, rd);
    check(rd == 32'h003F_FFFF, "enable mask survived the upset");

    // -------------------------------------------------------------- RESET
    unnumbered(HDLC_RESET, none, HDLC_UA, ok);
    check(ok, "RESET"); ns = 0;
    repeat (5) @(posedge clk);
    cmd(CH_SPI, SJ_R_CTRL, 0, err, rd);
    check(err == ERR_DISABLED, "channels disabled after RESET");
    if (ok && err == ERR_DISABLED) n_reset++;

    // ------------------------------------------------- switch to secondary
    use_sec = 1; ns = 0;
    unnumbered(HDLC_CONNECT, none, HDLC_UA, ok);
    check(ok && eport_active_sec, "CONNECT secondary");
    cmd_ok(CH_CTRL, CTRL_R_ID, 0, rd);
    check(rd == 32'h5CA0_0001, "command on secondary");
    if (ok && rd == 32'h5CA0_0001) n_switch++;
    // the primary is now ignored
    use_sec = 0;
    send_cmd(8'h09, CH_CTRL, CTRL_R_ID, 0, 4);
    get_frame(fr, 600, got);
    check(!got, "inactive port discarded");
    use_sec = 1;
    get_frame(fr, 600, got);
    check(!got, "nothing on secondary for primary's command");
    if (!got) n_discard++;

    // ---------------------------------------------------- auxiliary port
    aux_test_en = 1;
    a_start();
    a_wbyte(8'h00, ack); check(ack, "aux address ack");
    a_wbyte(8'h33, ack); a_wbyte(CH_CTRL, ack); a_wbyte(CTRL_R_ID, ack); a_wbyte(8'h00, ack);
    a_stop();
    repeat (20) @(posedge clk);
    begin
      byte unsigned b[10];
      a_start();
      a_wbyte(8'h01, ack); check(ack, "aux read address ack");
      for (int i = 0; i < 9; i++) a_rbyte(i == 8, b[i]);
      a_stop();
      check(b[0] == 1 && b[1] == 8'h33 && b[2] == CH_CTRL && b[3] == 0 && b[4] == 4 &&
            {b[8], b[7], b[6], b[5]} == 32'h5CA0_0001, "aux reply");
      if (b[0] == 1 && b[1] == 8'h33) n_aux++;
    end
    aux_test_en = 0;

    // ------------------------------------------------------- mechanisms
    check(n_connect > 0, "mechanism: connect");
    check(n_test > 0, "mechanism: test loopback");
    check(n_rej > 0, "mechanism: reject");
    check(n_err_dis > 0, "mechanism: disabled channel");
    check(n_err_ch > 0, "mechanism: invalid channel");
    check(n_err_busy > 0, "mechanism: busy channel");
    check(n_concurrent > 0, "mechanism: concurrent I2C");
    check(n_rmw > 0, "mechanism: read-modify-write");
    check(n_nack > 0, "mechanism: I2C NACK");
    check(n_ten > 0, "mechanism: 10-bit addressing");
    check(n_irq > 0, "mechanism: interrupt");
    check(n_adc > 0, "mechanism: ADC with current source");
    check(n_arst > 0, "mechanism: JTAG reset pulse");
    check(n_seu > 0, "mechanism: SEU counting");
    check(n_reset > 0, "mechanism: link reset");
    check(n_switch > 0, "mechanism: port switch");
    check(n_discard > 1, "mechanism: discard");
    check(n_aux > 0, "mechanism: auxiliary port");
    $display("mechanisms: connect=%0d test=%0d rej=%0d dis=%0d badch=%0d busy=%0d conc=%0d rmw=%0d nack=%0d ten=%0d irq=%0d adc=%0d arst=%0d seu=%0d reset=%0d switch=%0d discard=%0d aux=%0d",
             n_connect, n_test, n_rej, n_err_dis, n_err_ch, n_err_busy, n_concurrent, n_rmw, n_nack,
             n_ten, n_irq, n_adc, n_arst, n_seu, n_reset, n_switch, n_discard, n_aux);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog at cycle %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
