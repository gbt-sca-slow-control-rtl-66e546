// dac_model: behavioural model of one 8-bit voltage-output DAC (an analog
// IP block, not synthesizable logic).
//
// The output follows the code linearly from 0.0 V (code 0) to 1.0 V
// (full scale, code 255): vout = VFS * code / 255, settling after a delay
// of SETTLE time units. Power down (pd) forces 0 V.
module dac_model #(
  parameter real VFS    = 1.0,
  parameter int  SETTLE = 2
) (
  input  logic [7:0] code,
  input  logic       pd,
  output real        vout
);
  always @(code or pd) begin
    #(SETTLE);
    vout = pd ? 0.0 : VFS * real'(code) / 255.0;
  end
  initial vout = 0.0;
endmodule
