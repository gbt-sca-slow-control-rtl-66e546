// sca_core: the digital core of the GBT Slow Control Adapter.
//
// Wires the blocks of the chip together. The dual e-port receives HDLC
// frames from the primary or the secondary e-link and hands SCA command
// packets to the network controller, which sends each to one of 21
// channels: SPI (1), GPIO (2), sixteen I2C masters (3..18), JTAG (19),
// ADC (20) and DAC (21); channel 0 is the controller's own control channel.
// Replies of all channels are arbitrated back into the e-port's TX FIFO.
// With test_en high the auxiliary I2C slave port takes the e-port's place.
// clk_rst_ctrl synchronises the reset pad and keeps disabled channels in
// reset; the e-fuse reader loads the chip id and the ADC calibration after
// reset; the SEU counter counts upsets corrected in the voted enable
// register. The analog parts (ADC front end, DAC cores), the e-fuse
// macros and the pads are outside: their digital signals are ports here.
// One clock, 40 MHz, runs everything (the e-link clock).
module sca_core
  import sca_pkg::*;
#(
  parameter int unsigned ADC_AZ_CLKS  = 400,
  parameter int unsigned ADC_RAMP_DIV = 6
) (
  input  logic                clk,
  input  logic                rst_pad_n,
  // e-links (two bits per clock)
  input  logic [1:0]          rx_pri,
  input  logic [1:0]          rx_sec,
  output logic [1:0]          tx_pri,
  output logic [1:0]          tx_sec,
  output logic                eport_connected,
  output logic                eport_active_sec,
  // auxiliary I2C port
  input  logic                aux_test_en,
  input  logic                aux_scl,
  input  logic                aux_sda_in,
  output logic                aux_sda_oe,
  // SPI
  output logic                spi_sclk,
  output logic                spi_mosi,
  input  logic                spi_miso,
  output logic [7:0]          spi_ss_n,
  // JTAG
  output logic                jtag_tck,
  output logic                jtag_tms,
  output logic                jtag_tdo,
  input  logic                jtag_tdi,
  output logic                jtag_arst,
  // I2C masters
  output logic [N_I2C-1:0]    i2c_scl_oe,
  output logic [N_I2C-1:0]    i2c_sda_oe,
  input  logic [N_I2C-1:0]    i2c_scl_in,
  input  logic [N_I2C-1:0]    i2c_sda_in,
  // GPIO
  input  logic [N_GPIO-1:0]   gpio_in,
  output logic [N_GPIO-1:0]   gpio_out,
  output logic [N_GPIO-1:0]   gpio_oe,
  input  logic                gpio_extclk,
  output logic                gpio_irq,
  // ADC analog front end
  output logic [4:0]          adc_mux,
  output logic [N_ADC_IN-1:0] adc_curr_en,
  output logic                adc_az,
  output logic                adc_ramp_rst,
  output logic                adc_step,
  output logic                adc_pd,
  input  logic                adc_cmp,
  // DACs
  output logic [7:0]          dac_code [N_DAC],
  output logic                dac_pd,
  // e-fuses
  output logic                fuse_rd,
  output logic [4:0]          fuse_addr,
  input  logic [4:0]          fuse_bit,
  // radiation test
  input  logic                seu_inject,
  output logic [31:0]         seu_count
);
  // ------------------------------------------------------------ resets
  logic              core_rst_n, nc_rst_n, soft_reset;
  logic [N_CHAN-1:0] chan_en, chan_rst_n;
  clk_rst_ctrl #(.N(N_CHAN)) u_clkrst (
    .clk, .rst_pad_n, .soft_reset, .chan_en, .core_rst_n, .nc_rst_n, .chan_rst_n);

  // ------------------------------------------------------------ e-fuses
  logic [31:0] fw [5];
  logic        fuse_done;
  efuse_reader #(.NBANK(5), .BITS(32)) u_fuse (
    .clk, .rst_n(core_rst_n), .fuse_rd, .fuse_addr, .fuse_bit, .word(fw), .done(fuse_done));

  // ------------------------------------------------------------ e-port
  logic     ep_cmd_valid, ep_cmd_pop, ep_rep_push, ep_rep_full;
  sca_cmd_t ep_cmd;
  sca_rep_t rep;
  eport u_eport (
    .clk, .rst_n(core_rst_n), .rx_pri, .rx_sec, .tx_pri, .tx_sec,
    .cmd_valid(ep_cmd_valid), .cmd(ep_cmd), .cmd_pop(ep_cmd_pop),
    .rep_push(ep_rep_push), .rep, .rep_full(ep_rep_full),
    .connected(eport_connected), .active_sec(eport_active_sec), .core_reset(soft_reset));

  // ------------------------------------------------------ auxiliary port
  logic     ax_cmd_valid, ax_cmd_pop, ax_rep_push, ax_rep_full;
  sca_cmd_t ax_cmd;
  aux_i2c_port u_aux (
    .clk, .rst_n(core_rst_n), .scl_in(aux_scl), .sda_in(aux_sda_in), .sda_oe(aux_sda_oe),
    .cmd_valid(ax_cmd_valid), .cmd(ax_cmd), .cmd_pop(ax_cmd_pop),
    .rep_push(ax_rep_push), .rep, .rep_full(ax_rep_full));

  // -------------------------------------------------- network controller
  chan_req_t         req [N_CHAN];
  chan_rsp_t         rsp [N_CHAN];
  logic [N_CHAN-1:0] rsp_ack;
  logic              seu_clear, seu_flag;
  network_controller u_nc (
    .clk, .rst_n(nc_rst_n), .test_en(aux_test_en),
    .ep_cmd_valid, .ep_cmd, .ep_cmd_pop, .ep_rep_push, .ep_rep_full,
    .ax_cmd_valid, .ax_cmd, .ax_cmd_pop, .ax_rep_push, .ax_rep_full,
    .rep, .req, .rsp, .rsp_ack, .chan_en, .seu_count, .seu_clear, .seu_flag,
    .seu_inject, .chip_id(fuse_done ? fw[0] : 32'h0));

  seu_counter #(.N(1), .WIDTH(32)) u_seu (
    .clk, .rst_n(core_rst_n), .seu_in(seu_flag), .clear(seu_clear), .count(seu_count));

  assign rsp[0] = RSP_IDLE;     // control channel answers inside the controller

  // ------------------------------------------------------------ channels
  sca_spi u_spi (.clk, .rst_n(chan_rst_n[CH_SPI]), .req(req[CH_SPI]), .rsp(rsp[CH_SPI]),
                 .rsp_ack(rsp_ack[CH_SPI]), .sclk(spi_sclk), .mosi(spi_mosi), .miso(spi_miso),
                 .ss_n(spi_ss_n));

  sca_gpio u_gpio (.clk, .rst_n(chan_rst_n[CH_GPIO]), .req(req[CH_GPIO]), .rsp(rsp[CH_GPIO]),
                   .rsp_ack(rsp_ack[CH_GPIO]), .gpio_in, .gpio_out, .gpio_oe, .gpio_extclk,
                   .irq(gpio_irq));

  for (genvar k = 0; k < N_I2C; k++) begin : g_i2c
    localparam int unsigned C = int'(CH_I2C0) + k;
    sca_i2c u_i2c (.clk, .rst_n(chan_rst_n[C]), .req(req[C]), .rsp(rsp[C]),
                   .rsp_ack(rsp_ack[C]), .scl_oe(i2c_scl_oe[k]), .sda_oe(i2c_sda_oe[k]),
                   .scl_in(i2c_scl_in[k]), .sda_in(i2c_sda_in[k]));
  end

  sca_jtag u_jtag (.clk, .rst_n(chan_rst_n[CH_JTAG]), .req(req[CH_JTAG]), .rsp(rsp[CH_JTAG]),
                   .rsp_ack(rsp_ack[CH_JTAG]), .tck(jtag_tck), .tms(jtag_tms), .tdo(jtag_tdo),
                   .tdi(jtag_tdi), .arst(jtag_arst));

  sca_adc #(.AZ_CLKS(ADC_AZ_CLKS), .RAMP_DIV(ADC_RAMP_DIV)) u_adc (
    .clk, .rst_n(chan_rst_n[CH_ADC]), .req(req[CH_ADC]), .rsp(rsp[CH_ADC]),
    .rsp_ack(rsp_ack[CH_ADC]), .adc_mux, .adc_curr_en, .adc_az, .adc_ramp_rst, .adc_step,
    .adc_cmp, .cal_offset(fw[1][11:0]), .cal_gain(fw[2][15:0]));
  assign adc_pd = !chan_rst_n[CH_ADC];

  sca_dac u_dac (.clk, .rst_n(chan_rst_n[CH_DAC]), .req(req[CH_DAC]), .rsp(rsp[CH_DAC]),
                 .rsp_ack(rsp_ack[CH_DAC]), .dac_code);
  assign dac_pd = !chan_rst_n[CH_DAC];
endmodule
