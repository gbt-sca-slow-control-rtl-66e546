// clk_rst_ctrl: reset generation and per-channel power-down.
//
// The external active-low reset (RESET_B pad) is synchronised to the 40 MHz
// clock: it asserts the core reset at once and releases it two clocks after
// the pad goes high. An e-port RESET command (soft_reset) resets the
// channels and the network controller for one clock in addition.
// A channel that is not enabled is kept in reset, which stops all its
// activity (this design's stand-in for the power-down mode: the clock gate
// itself is a library cell and not modelled); enabling it releases the
// reset one clock later, so every enable starts the channel from reset, as
// the channel enable command requires. chan_rst_n[0] (the control channel)
// follows the core reset only.
module clk_rst_ctrl #(
  parameter int unsigned N = 22
) (
  input  logic         clk,
  input  logic         rst_pad_n,    // external reset, asynchronous
  input  logic         soft_reset,   // from the e-port RESET command
  input  logic [N-1:0] chan_en,
  output logic         core_rst_n,   // to e-port and everything not a channel
  output logic         nc_rst_n,     // network controller: also soft reset
  output logic [N-1:0] chan_rst_n
);
  logic [1:0] sync;

  always_ff @(posedge clk or negedge rst_pad_n) begin
    if (!rst_pad_n) sync <= 2'b00;
    else            sync <= {sync[0], 1'b1};
  end
  assign core_rst_n = sync[1];

  logic         soft_q;
  logic [N-1:0] en_q;
  always_ff @(posedge clk or negedge core_rst_n) begin
    if (!core_rst_n) begin
      soft_q <= 1'b0;
      en_q   <= '0;
    end else begin
      soft_q <= soft_reset;
      en_q   <= chan_en & ~{N{soft_reset}};
    end
  end

  assign nc_rst_n   = core_rst_n & ~soft_q;
  assign chan_rst_n = {en_q[N-1:1], 1'b1} & {N{nc_rst_n}};
endmodule
