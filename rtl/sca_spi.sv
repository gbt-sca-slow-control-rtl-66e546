// sca_spi: SPI master channel.
//
// One 128-bit register holds the bits to send and, as the transfer goes,
// receives the bits read back: the bit sent in slot i is replaced by the
// MISO bit sampled in slot i (the loop around the shift register in the SPI
// drawing). A transfer moves LEN bits, 1..128 (LEN field 0 means 128),
// MSB of the LEN-bit word first, or LSB first when CTRL.LSB is set.
//
// SCLK runs at f_clk / (2 * (DIV + 1)): DIV = 0..127 gives the 128 rates
// from 20 MHz down to 156.25 kHz with the 40 MHz system clock. CPOL is
// SCLK's idle level and CPHA selects the edge: with CPHA = 0 a bit is put on
// MOSI half a period before the leading edge and MISO is sampled on the
// leading edge; with CPHA = 1 MOSI changes on the leading edge and MISO is
// sampled on the trailing edge, so all four modes (0,0) (0,1) (1,0) (1,1)
// work. CTRL.INV sets the level MOSI rests at between transfers. The slave
// selects (/SS, active low, 8 lines) chosen in the SS register are asserted
// for the whole transfer.
//
// Registers (32 bit): TX/RX words 0..3 (word 0 = bits 31:0), CTRL = {INV[12],
// LSB[11], CPOL[10], CPHA[9], LEN[6:0]}, FREQ = DIV[6:0], SS[7:0]. Commands
// other than GO are answered the next clock; GO is answered when the last
// bit is done (the acknowledge that reports the end of the transfer), with
// ERR_BUSY never needed because the controller holds further commands.
// Register layout and codes are this design's own; rates, length, modes and
// eight slave selects follow the source.
module sca_spi
  import sca_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  chan_req_t  req,
  output chan_rsp_t  rsp,
  input  logic       rsp_ack,
  output logic       sclk,
  output logic       mosi,
  input  logic       miso,
  output logic [7:0] ss_n
);
  logic [127:0] sh;
  logic [6:0]   len, div;
  logic         cpha, cpol, lsb, inv;
  logic [7:0]   ss;
  logic         run;
  logic [6:0]   hcnt;       // clocks left in this half period
  logic [8:0]   edge_i;     // SCLK edges made so far
  logic [7:0]   nbits;

  wire [7:0] nb = (len == 7'd0) ? 8'd128 : {1'b0, len};
  function automatic logic [6:0] pos(input logic [7:0] i);
    pos = lsb ? i[6:0] : 7'(nb - 8'd1 - i);
  endfunction

  logic [6:0] wsel;
  assign wsel = {req.cmd[2:1], 5'd0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '0; len <= '0; div <= '0; cpha <= 1'b0; cpol <= 1'b0; lsb <= 1'b0;
      inv <= 1'b0; ss <= '0; run <= 1'b0; hcnt <= '0; edge_i <= '0; nbits <= '0;
      sclk <= 1'b0; mosi <= 1'b0; rsp <= RSP_IDLE;
    end else begin
      if (rsp_ack) rsp.valid <= 1'b0;
      if (!run) begin
        sclk <= cpol;
        mosi <= inv;
      end
      if (req.valid && !run) begin
        rsp <= rsp_make(ERR_NONE, 8'd0, 32'h0);
        casez (req.cmd)
          8'b0000_0??0: sh[wsel +: 32] <= req.data;                         // W_TXk
          8'b0000_0??1: rsp <= rsp_make(ERR_NONE, 8'd4, sh[wsel +: 32]);     // R_RXk
          SJ_W_CTRL: {inv, lsb, cpol, cpha, len} <= {req.data[12:9], req.data[6:0]};
          SJ_R_CTRL: rsp <= rsp_make(ERR_NONE, 8'd4, {19'h0, inv, lsb, cpol, cpha, 2'b00, len});
          SJ_W_FREQ: div <= req.data[6:0];
          SJ_R_FREQ: rsp <= rsp_make(ERR_NONE, 8'd4, {25'h0, div});
          SJ_W_SS:   ss  <= req.data[7:0];
          SJ_R_SS:   rsp <= rsp_make(ERR_NONE, 8'd4, {24'h0, ss});
          SJ_GO: begin
            rsp.valid <= 1'b0;
            run       <= 1'b1;
            hcnt      <= div;
            edge_i    <= '0;
            nbits     <= nb;
            sclk      <= cpol;
            if (!cpha) mosi <= sh[pos(8'd0)];
          end
          default: rsp <= rsp_make(ERR_COMMAND, 8'd0, 32'h0);
        endcase
      end else if (run) begin
        if (hcnt != 7'd0) begin
          hcnt <= hcnt - 7'd1;
        end else begin
          hcnt <= div;
          if (edge_i == {nbits, 1'b0}) begin
            // half a period after the last edge: end of transfer
            run  <= 1'b0;
            mosi <= inv;
            rsp  <= rsp_make(ERR_NONE, 8'd0, 32'h0);
          end else begin
            logic [7:0] bi;
            logic       leading;
            bi      = edge_i[8:1];
            leading = !edge_i[0];
            sclk    <= !sclk;
            edge_i  <= edge_i + 9'd1;
            if (leading) begin
              if (cpha) mosi <= sh[pos(bi)];
              else      sh[pos(bi)] <= miso;
            end else begin
              if (cpha) sh[pos(bi)] <= miso;
              else if (bi + 8'd1 < nbits) mosi <= sh[pos(bi + 8'd1)];
            end
          end
        end
      end
    end
  end

  assign ss_n = run ? ~ss : 8'hFF;
endmodule
