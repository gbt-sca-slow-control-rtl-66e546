// sca_dac: DAC channel, four independent 8-bit analog outputs.
//
// Holds one 8-bit code register per converter (four, as in the DAC channel
// drawing: DAC 1..4, 8 bits each). Command DAC_W_A + 2k writes data[7:0]
// into register k, DAC_R_A + 2k reads it back; each command is answered the
// next clock. The codes drive the converters continuously (dac_code);
// the converters themselves are analog and sit outside this module
// (dac_model). Codes reset to 0, i.e. 0 V. Command codes are this design's.
module sca_dac
  import sca_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  chan_req_t  req,
  output chan_rsp_t  rsp,
  input  logic       rsp_ack,
  output logic [7:0] dac_code [N_DAC]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp <= RSP_IDLE;
      for (int k = 0; k < int'(N_DAC); k++) dac_code[k] <= '0;
    end else begin
      if (rsp_ack) rsp.valid <= 1'b0;
      if (req.valid) begin
        rsp <= rsp_make(ERR_COMMAND, 8'd0, 32'h0);
        for (int k = 0; k < int'(N_DAC); k++) begin
          if (req.cmd == DAC_W_A + 8'(2*k)) begin
            dac_code[k] <= req.data[7:0];
            rsp         <= rsp_make(ERR_NONE, 8'd0, 32'h0);
          end
          if (req.cmd == DAC_R_A + 8'(2*k))
            rsp <= rsp_make(ERR_NONE, 8'd1, {24'h0, dac_code[k]});
        end
      end
    end
  end
endmodule
