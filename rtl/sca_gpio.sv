// sca_gpio: general purpose I/O channel, 32 bidirectional lines.
//
// Registers: DOUT (output values), DIR (1 = line drives), INTEN (interrupt
// enable per line), INTSEL (0 = rising, 1 = falling edge interrupts), INTS
// (interrupt status, write 1 to clear) and CLKSEL. Lines whose DIR bit is 0
// are three-stated (gpio_oe = 0). Inputs are first synchronised by two
// flip-flops, then registered into DIN either every system clock
// (CLKSEL[0] = 0) or on the edge of the external clock gpio_extclk chosen
// by CLKSEL[1] (0 rising, 1 falling), detected in the system clock domain.
// An enabled edge on an input line sets its INTS bit; a new interrupt makes
// the channel send an unsolicited reply (rsp.irq) carrying INTS, as soon as
// no command reply is waiting. Every command is answered one clock after it
// arrives. The register set and command codes are this design's own.
module sca_gpio
  import sca_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  chan_req_t         req,
  output chan_rsp_t         rsp,
  input  logic              rsp_ack,
  input  logic [N_GPIO-1:0] gpio_in,
  output logic [N_GPIO-1:0] gpio_out,
  output logic [N_GPIO-1:0] gpio_oe,
  input  logic              gpio_extclk,
  output logic              irq            // any enabled interrupt pending
);
  logic [N_GPIO-1:0] dout, dir, inten, intsel, ints, din, s1, s2;
  logic [1:0]        clksel;
  logic [2:0]        ck;                  // external clock synchroniser + previous
  logic              irq_pend;

  assign gpio_out = dout;
  assign gpio_oe  = dir;
  assign irq      = |ints;

  wire ck_rise = ck[1] && !ck[2];
  wire ck_fall = !ck[1] && ck[2];
  wire sample  = !clksel[0] || (clksel[1] ? ck_fall : ck_rise);

  logic [N_GPIO-1:0] din_next, edge_hit;
  always_comb begin
    din_next = sample ? s2 : din;
    edge_hit = (intsel & din & ~din_next) | (~intsel & ~din & din_next);
    edge_hit = edge_hit & inten & ~dir;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout <= '0; dir <= '0; inten <= '0; intsel <= '0; ints <= '0;
      din <= '0; s1 <= '0; s2 <= '0; clksel <= '0; ck <= '0;
      rsp <= RSP_IDLE; irq_pend <= 1'b0;
    end else begin
      s1  <= gpio_in;
      s2  <= s1;
      ck  <= {ck[1:0], gpio_extclk};
      din <= din_next;
      if (|edge_hit) irq_pend <= 1'b1;
      if (rsp_ack) begin
        rsp.valid <= 1'b0;
        if (rsp.irq) irq_pend <= 1'b0;
      end
      ints <= ints | edge_hit;
      if (req.valid) begin
        rsp <= rsp_make(ERR_NONE, 8'd0, 32'h0);
        case (req.cmd)
          GP_W_DOUT:   dout   <= req.data;
          GP_W_DIR:    dir    <= req.data;
          GP_W_INTEN:  inten  <= req.data;
          GP_W_INTSEL: intsel <= req.data;
          GP_W_INTS:   ints   <= (ints & ~req.data) | edge_hit;
          GP_W_CLKSEL: clksel <= req.data[1:0];
          GP_R_DOUT:   rsp <= rsp_make(ERR_NONE, 8'd4, dout);
          GP_R_DIN:    rsp <= rsp_make(ERR_NONE, 8'd4, din);
          GP_R_DIR:    rsp <= rsp_make(ERR_NONE, 8'd4, dir);
          GP_R_INTEN:  rsp <= rsp_make(ERR_NONE, 8'd4, inten);
          GP_R_INTSEL: rsp <= rsp_make(ERR_NONE, 8'd4, intsel);
          GP_R_INTS:   rsp <= rsp_make(ERR_NONE, 8'd4, ints);
          GP_R_CLKSEL: rsp <= rsp_make(ERR_NONE, 8'd4, {30'h0, clksel});
          default:     rsp <= rsp_make(ERR_COMMAND, 8'd0, 32'h0);
        endcase
      end else if (irq_pend && (!rsp.valid || rsp_ack) && !(rsp_ack && rsp.irq)) begin
        rsp     <= rsp_make(ERR_NONE, 8'd4, ints | edge_hit);
        rsp.irq <= 1'b1;
      end
    end
  end
endmodule
