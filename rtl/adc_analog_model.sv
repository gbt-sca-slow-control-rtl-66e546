// adc_analog_model: behavioural model of the analog half of the ADC
// (analog multiplexer, offset cancellation, ramp generator, comparator and
// temperature sensor); not synthesizable logic.
//
// vin[0..30] are the external inputs; input 31 is the on-chip temperature
// sensor, modelled as TS_V0 + TS_K * temp_c volts. When an input's current
// source is enabled its 10 uA flows into the sensor resistance r_ext, so
// the converted voltage becomes 10 uA * r_ext[i]. The ramp starts at 0 V
// when ramp_rst is released and rises one LSB (1 V / 4096 = 244 uV) per
// step pulse, scaled by GAIN_ERR and shifted by OFS_ERR to stand for the
// spread the production calibration removes. cmp goes high when the ramp
// passes the selected input. In power down (pd) cmp stays low.
module adc_analog_model #(
  parameter real OFS_ERR  = -0.002,    // volts (ramp start)
  parameter real GAIN_ERR = 0.98,
  parameter real TS_V0    = 0.600,
  parameter real TS_K     = -0.002     // volts per degree
) (
  input  logic        clk,
  input  real         vin [31],
  input  real         r_ext [32],
  input  real         temp_c,
  input  logic [4:0]  mux,
  input  logic [31:0] curr_en,
  input  logic        az,
  input  logic        ramp_rst,
  input  logic        step,
  input  logic        pd,
  output logic        cmp
);
  real vramp, vsel;

  always_comb begin
    if (curr_en[mux])       vsel = 10.0e-6 * r_ext[mux];
    else if (mux == 5'd31)  vsel = TS_V0 + TS_K * temp_c;
    else                    vsel = vin[mux];
  end

  always @(posedge clk) begin
    if (ramp_rst || az) vramp <= OFS_ERR;
    else if (step)      vramp <= vramp + GAIN_ERR / 4096.0;
  end

  assign cmp = !pd && !ramp_rst && !az && (vramp >= vsel);
  initial vramp = 0.0;
endmodule
