// tb_sca_adc: ADC channel logic together with the behavioural analog part.
// The analog model has an offset error of -2 mV and a gain error of 0.98.
// Checks: MUX and CURR registers, the offset-cancellation phase length,
// raw counts against the value the ramp must reach (within one count),
// conversion time growing with the input, the calibrated result with the
// matching offset and gain constants (within two counts of the ideal
// 4096 * V code), clamping at 0 and 4095, the temperature sensor input and
// the current source used with an external resistor. Shorter timing
// parameters than the defaults keep the run short; the logic is the same.
module tb_sca_adc;
  import sca_pkg::*;
  localparam int AZ = 40, DIV = 3;
  localparam real OFS_E = -0.002, GAIN_E = 0.98;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  chan_req_t req;
  chan_rsp_t rsp;
  logic rsp_ack = 0;
  logic [4:0] mux;
  logic [31:0] curr_en;
  logic az, ramp_rst, step, cmp;
  logic [11:0] cal_offset = 0;
  logic [15:0] cal_gain = 16'h8000;
  real vin [31];
  real r_ext [32];
  real temp_c = 25.0;
  int checks = 0, failures = 0;
  int cyc = 0, az_len = 0;
  always @(posedge clk) begin cyc++; if (az) az_len++; end

  sca_adc #(.AZ_CLKS(AZ), .RAMP_DIV(DIV)) dut (.clk, .rst_n, .req, .rsp, .rsp_ack,
    .adc_mux(mux), .adc_curr_en(curr_en), .adc_az(az), .adc_ramp_rst(ramp_rst),
    .adc_step(step), .adc_cmp(cmp), .cal_offset, .cal_gain);
  adc_analog_model #(.OFS_ERR(OFS_E), .GAIN_ERR(GAIN_E)) ana (.clk, .vin, .r_ext, .temp_c,
    .mux, .curr_en, .az, .ramp_rst, .step, .pd(1'b0), .cmp);

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

  // count the ramp needs to reach v
  function automatic int want_raw(real v);
    int n = 0;
    while (n < 4095 && OFS_E + n * GAIN_E / 4096.0 < v) n++;
    return n;
  endfunction

  task automatic convert(int ch, output int res, output int raw, output int lat);
    chan_rsp_t r;
    int l;
    do_cmd(ADC_W_MUX, ch, r, l);
    az_len = 0;
    do_cmd(ADC_GO, 0, r, lat);
    chk(az_len == AZ, $sformatf("offset cancellation %0d clocks", az_len));
    res = r.data;
    chk(r.len == 2 && r.data[31:12] == 0, "GO reply format");
    do_cmd(ADC_R_RAW, 0, r, l);
    raw = r.data;
  endtask

  initial begin
    chan_rsp_t r;
    int lat, res, raw, prev_lat;
    real v;
    req = '0;
    for (int i = 0; i < 31; i++) vin[i] = 0.0;
    for (int i = 0; i < 32; i++) r_ext[i] = 0.0;
    repeat (2) @(negedge clk); rst_n = 1;
    do_cmd(ADC_W_MUX, 13, r, lat);
    do_cmd(ADC_R_MUX, 0, r, lat);
    chk(r.data == 13, "MUX read back");
    do_cmd(ADC_W_CURR, 32'hA5A5_0F0F, r, lat);
    do_cmd(ADC_R_CURR, 0, r, lat);
    chk(r.data == 32'hA5A5_0F0F, "CURR read back");
    do_cmd(ADC_W_CURR, 0, r, lat);
    // uncalibrated: result equals the raw count
    prev_lat = 0;
    for (int k = 0; k < 8; k++) begin
      v = 0.05 + k * 0.12;
      vin[k] = v;
      convert(k, res, raw, lat);
      chk(raw >= want_raw(v) && raw <= want_raw(v) + 1, $sformatf("raw %0d for %f V (want %0d)", raw, v, want_raw(v)));
      chk(res == raw, "no correction with offset 0, gain 1.0");
      chk(lat > prev_lat && lat >= AZ + raw * DIV && lat <= AZ + (raw + 2) * DIV + 6,
          $sformatf("conversion time %0d for count %0d", lat, raw));
      prev_lat = lat;
    end
    // calibrated
    cal_offset = 12'd8;
    cal_gain = 16'(int'(GAIN_E * 32768.0));
    do_cmd(ADC_R_OFS, 0, r, lat);
    chk(r.data == 8, "OFS read");
    do_cmd(ADC_R_GAIN, 0, r, lat);
    chk(r.data == cal_gain, "GAIN read");
    for (int k = 0; k < 20; k++) begin
      int ch;
      ch = $urandom % 31;
      v = 0.01 + ($urandom % 970) / 1000.0;
      vin[ch] = v;
      convert(ch, res, raw, lat);
      chk(res >= int'(v * 4096.0) - 2 && res <= int'(v * 4096.0) + 2,
          $sformatf("calibrated %0d for %f V on input %0d", res, v, ch));
    end
    // clamping
    vin[2] = -0.1;
    convert(2, res, raw, lat);
    chk(res == 0 && raw == 0, $sformatf("below zero -> %0d", res));
    vin[2] = 1.5;
    convert(2, res, raw, lat);
    chk(raw == 4095 && res == ((4095 - 8) * cal_gain) >> 15, $sformatf("over range -> %0d (raw %0d)", res, raw));
    // temperature sensor
    for (int k = 0; k < 3; k++) begin
      temp_c = -20.0 + 50.0 * k;
      v = 0.6 - 0.002 * temp_c;
      convert(31, res, raw, lat);
      chk(res >= int'(v * 4096.0) - 2 && res <= int'(v * 4096.0) + 2,
          $sformatf("temperature %f -> %0d", temp_c, res));
    end
    // current source into an external resistor
    r_ext[9] = 47000.0;    // 0.47 V
    vin[9] = 0.1;
    do_cmd(ADC_W_CURR, 32'h200, r, lat);
    convert(9, res, raw, lat);
    chk(res >= 1923 && res <= 1927, $sformatf("current source -> %0d", res));
    do_cmd(ADC_W_CURR, 0, r, lat);
    convert(9, res, raw, lat);
    chk(res >= 408 && res <= 412, $sformatf("current source off -> %0d", res));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
