// sca_top: the GBT Slow Control Adapter chip, core plus analog parts.
//
// Joins the synthesizable digital core (sca_core) with behavioural models
// of what is analog or process specific: the ADC front end (multiplexer,
// offset cancellation, ramp, comparator, temperature sensor), the four
// 8-bit DACs and the five e-fuse banks. The ports are the chip's pins as
// plain signals: e-link data two bits per 40 MHz clock (the DDR SLVS pads
// and their serialisers are not modelled), open-drain I2C lines as separate
// input and pull-down enable, GPIO as input, output and output enable, and
// the analog inputs and outputs as real voltages. r_ext models the sensor
// resistors fed by the ADC current sources. The FUSE_* parameters are the
// values blown into the e-fuses at production: chip id and the ADC offset
// and gain matching the model's OFS_ERR / GAIN_ERR.
module sca_top
  import sca_pkg::*;
#(
  parameter logic [31:0] FUSE_ID      = 32'h5CA0_0001,
  parameter logic [31:0] FUSE_ADC_OFS = 32'd8,      // 0.002 V * 4096 / 0.98
  parameter logic [31:0] FUSE_ADC_GN  = 32'd32113,  // 0.98 * 32768
  parameter int unsigned ADC_AZ_CLKS  = 400,
  parameter int unsigned ADC_RAMP_DIV = 6
) (
  input  logic                clk,
  input  logic                reset_b,
  input  logic [1:0]          rx_pri,
  input  logic [1:0]          rx_sec,
  output logic [1:0]          tx_pri,
  output logic [1:0]          tx_sec,
  output logic                eport_connected,
  output logic                eport_active_sec,
  input  logic                aux_test_en,
  input  logic                aux_scl,
  input  logic                aux_sda_in,
  output logic                aux_sda_oe,
  output logic                spi_sclk,
  output logic                spi_mosi,
  input  logic                spi_miso,
  output logic [7:0]          spi_ss_n,
  output logic                jtag_tck,
  output logic                jtag_tms,
  output logic                jtag_tdo,
  input  logic                jtag_tdi,
  output logic                jtag_arst,
  output logic [N_I2C-1:0]    i2c_scl_oe,
  output logic [N_I2C-1:0]    i2c_sda_oe,
  input  logic [N_I2C-1:0]    i2c_scl_in,
  input  logic [N_I2C-1:0]    i2c_sda_in,
  input  logic [N_GPIO-1:0]   gpio_in,
  output logic [N_GPIO-1:0]   gpio_out,
  output logic [N_GPIO-1:0]   gpio_oe,
  input  logic                gpio_extclk,
  output logic                gpio_irq,
  input  real                 adc_vin [31],
  input  real                 adc_r_ext [32],
  input  real                 temp_c,
  output real                 dac_vout [N_DAC],
  input  logic                seu_inject,
  output logic [31:0]         seu_count
);
  logic [4:0]          adc_mux;
  logic [N_ADC_IN-1:0] adc_curr_en;
  logic                adc_az, adc_ramp_rst, adc_step, adc_pd, adc_cmp;
  logic [7:0]          dac_code [N_DAC];
  logic                dac_pd;
  logic                fuse_rd;
  logic [4:0]          fuse_addr, fuse_bit;

  sca_core #(.ADC_AZ_CLKS(ADC_AZ_CLKS), .ADC_RAMP_DIV(ADC_RAMP_DIV)) u_core (
    .clk, .rst_pad_n(reset_b), .rx_pri, .rx_sec, .tx_pri, .tx_sec,
    .eport_connected, .eport_active_sec, .aux_test_en, .aux_scl, .aux_sda_in, .aux_sda_oe,
    .spi_sclk, .spi_mosi, .spi_miso, .spi_ss_n,
    .jtag_tck, .jtag_tms, .jtag_tdo, .jtag_tdi, .jtag_arst,
    .i2c_scl_oe, .i2c_sda_oe, .i2c_scl_in, .i2c_sda_in,
    .gpio_in, .gpio_out, .gpio_oe, .gpio_extclk, .gpio_irq,
    .adc_mux, .adc_curr_en, .adc_az, .adc_ramp_rst, .adc_step, .adc_pd, .adc_cmp,
    .dac_code, .dac_pd, .fuse_rd, .fuse_addr, .fuse_bit, .seu_inject, .seu_count);

  adc_analog_model u_adc_analog (
    .clk, .vin(adc_vin), .r_ext(adc_r_ext), .temp_c, .mux(adc_mux), .curr_en(adc_curr_en),
    .az(adc_az), .ramp_rst(adc_ramp_rst), .step(adc_step), .pd(adc_pd), .cmp(adc_cmp));

  for (genvar k = 0; k < N_DAC; k++) begin : g_dac
    dac_model u_dac (.code(dac_code[k]), .pd(dac_pd), .vout(dac_vout[k]));
  end

  localparam logic [31:0] FUSES [5] = '{FUSE_ID, FUSE_ADC_OFS, FUSE_ADC_GN, 32'h0, 32'h0};
  for (genvar b = 0; b < 5; b++) begin : g_fuse
    efuse_bank #(.BITS(32), .VALUE(FUSES[b])) u_bank (
      .rd(fuse_rd), .addr(fuse_addr), .q(fuse_bit[b]));
  end
endmodule
