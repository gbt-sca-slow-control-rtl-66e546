// sca_adc: control, calibration and register logic of the ADC channel.
//
// The converter is single slope: a ramp generator charges a capacitor, a
// comparator compares the ramp with the selected input and the digital side
// counts the time until the comparator fires. This module is that digital
// side. ADC_GO starts a conversion of the input chosen in MUX (0..31; 31 is
// the on-chip temperature sensor): for AZ_CLKS clocks the analog part is in
// its automatic offset cancellation phase (adc_az), then the ramp is released
// (adc_ramp_rst low) and a 12-bit counter advances one step every RAMP_DIV
// clocks (adc_step pulses once per step, so a behavioural ramp can follow)
// until adc_cmp goes high or the count reaches 4095. The conversion time
// therefore grows with the input: a full-scale input takes
// AZ_CLKS + 4096 * RAMP_DIV clocks, about 0.6 ms at 40 MHz by default.
//
// The raw count is then corrected with the offset and gain measured at
// production and stored in e-fuses: result = clamp((raw - OFS) * GAIN /
// 32768), GAIN = 0x8000 meaning 1.0. The reply to ADC_GO carries the 12-bit
// result in data[11:0]; ADC_R_RAW returns the uncorrected count. CURR
// enables, per input, the 10 uA current source used with Pt sensors
// (adc_curr_en). A disabled channel is held in reset, which is its
// power-down (the core also powers down the analog part then).
// Timing constants and the correction formula are this design's choice; the
// 12-bit resolution, 32 inputs, current sources and calibration follow the
// source.
module sca_adc
  import sca_pkg::*;
#(
  parameter int unsigned AZ_CLKS  = 400,   // offset cancellation: 10 us
  parameter int unsigned RAMP_DIV = 6      // clocks per LSB of the ramp
) (
  input  logic                clk,
  input  logic                rst_n,
  input  chan_req_t           req,
  output chan_rsp_t           rsp,
  input  logic                rsp_ack,
  // analog front end
  output logic [4:0]          adc_mux,
  output logic [N_ADC_IN-1:0] adc_curr_en,
  output logic                adc_az,
  output logic                adc_ramp_rst,
  output logic                adc_step,
  input  logic                adc_cmp,
  // calibration constants (from the e-fuses)
  input  logic [11:0]         cal_offset,
  input  logic [15:0]         cal_gain
);
  typedef enum logic [1:0] {A_IDLE, A_AZ, A_RAMP, A_CAL} adc_st_e;

  adc_st_e     st;
  logic [15:0] tcnt;
  logic [11:0] cnt, raw;
  logic        cmp_q;

  // calibration: (raw - offset) * gain / 2^15, clamped to 0..4095
  logic signed [13:0] diff;
  logic signed [30:0] prod;
  logic [11:0]        corr;
  always_comb begin
    diff = $signed({2'b00, raw}) - $signed({2'b00, cal_offset});
    prod = diff * $signed({1'b0, cal_gain});
    if (prod < 0)                         corr = 12'd0;
    else if (prod[30:15] > 16'd4095)      corr = 12'd4095;
    else                                  corr = prod[26:15];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= A_IDLE; tcnt <= '0; cnt <= '0; raw <= '0; cmp_q <= 1'b0;
      adc_mux <= '0; adc_curr_en <= '0; adc_az <= 1'b0; adc_ramp_rst <= 1'b1;
      adc_step <= 1'b0; rsp <= RSP_IDLE;
    end else begin
      if (rsp_ack) rsp.valid <= 1'b0;
      cmp_q    <= adc_cmp;
      adc_step <= 1'b0;
      case (st)
        A_IDLE: if (req.valid) begin
          rsp <= rsp_make(ERR_NONE, 8'd0, 32'h0);
          case (req.cmd)
            ADC_GO: begin
              rsp.valid <= 1'b0;
              st        <= A_AZ;
              adc_az    <= 1'b1;
              tcnt      <= 16'(AZ_CLKS - 1);
            end
            ADC_W_MUX:  adc_mux     <= req.data[4:0];
            ADC_R_MUX:  rsp <= rsp_make(ERR_NONE, 8'd4, {27'h0, adc_mux});
            ADC_W_CURR: adc_curr_en <= req.data;
            ADC_R_CURR: rsp <= rsp_make(ERR_NONE, 8'd4, adc_curr_en);
            ADC_R_RAW:  rsp <= rsp_make(ERR_NONE, 8'd4, {20'h0, raw});
            ADC_R_OFS:  rsp <= rsp_make(ERR_NONE, 8'd4, {20'h0, cal_offset});
            ADC_R_GAIN: rsp <= rsp_make(ERR_NONE, 8'd4, {16'h0, cal_gain});
            default:    rsp <= rsp_make(ERR_COMMAND, 8'd0, 32'h0);
          endcase
        end
        A_AZ: begin
          if (tcnt != 16'd0) tcnt <= tcnt - 16'd1;
          else begin
            adc_az       <= 1'b0;
            adc_ramp_rst <= 1'b0;
            cnt          <= '0;
            tcnt         <= 16'(RAMP_DIV - 1);
            st           <= A_RAMP;
          end
        end
        A_RAMP: begin
          if (cmp_q || cnt == 12'hFFF) begin
            raw          <= cnt;
            adc_ramp_rst <= 1'b1;
            st           <= A_CAL;
          end else if (tcnt != 16'd0) begin
            tcnt <= tcnt - 16'd1;
          end else begin
            tcnt     <= 16'(RAMP_DIV - 1);
            cnt      <= cnt + 12'd1;
            adc_step <= 1'b1;
          end
        end
        default: begin
          rsp <= rsp_make(ERR_NONE, 8'd2, {20'h0, corr});
          st  <= A_IDLE;
        end
      endcase
    end
  end
endmodule
