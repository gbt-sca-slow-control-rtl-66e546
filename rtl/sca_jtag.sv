// sca_jtag: JTAG master channel.
//
// Two 128-bit registers hold the bit streams: TDO/TDI (the bits sent on TDO
// are replaced by the bits received on TDI, slot by slot) and TMS. A
// transfer clocks LEN bits (1..128, field value 0 means 128), bit 0 first
// as JTAG shifts; the TAP state sequence itself is whatever the software
// puts in the TMS register (the protocol is left to software).
//
// TCK runs at f_clk / (2 * (DIV + 1)), 20 MHz down to 156.25 kHz in 128
// steps. TCK rests at CTRL.INV, and TDO and TMS rest at CTRL.INV between
// transfers. Each bit is one TCK period: a leading edge (rising when INV =
// 0) then a trailing edge. With CTRL.TXE = 0 the next TDO/TMS bit is
// launched on the trailing edge (the first one half a period before the
// first leading edge); with TXE = 1 on the leading edge. With CTRL.RXE = 0
// TDI is sampled on the leading edge, with RXE = 1 on the trailing edge.
// The ARST command drives the reset output high for RSTLEN + 1 system
// clocks (RSTLEN in the register that the SPI channel uses for slave
// selects), asynchronously to any transfer, and is answered at its end.
//
// Registers: TDO/TDI words 0..3, TMS words 0..3, CTRL = {INV[12], RXE[10],
// TXE[9], LEN[6:0]}, FREQ = DIV[6:0], RSTLEN[15:0]. GO is answered when the
// last bit is done, everything else the next clock. Layout and codes are
// this design's own; register sizes, rates, edge and idle options follow
// the source.
module sca_jtag
  import sca_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  chan_req_t  req,
  output chan_rsp_t  rsp,
  input  logic       rsp_ack,
  output logic       tck,
  output logic       tms,
  output logic       tdo,
  input  logic       tdi,
  output logic       arst
);
  logic [127:0] sh, tm;
  logic [6:0]   len, div;
  logic         txe, rxe, inv;
  logic [15:0]  rstlen, rcnt;
  logic         run, rst_run;
  logic [6:0]   hcnt;
  logic [8:0]   edge_i;
  logic [7:0]   nbits;

  wire [7:0] nb   = (len == 7'd0) ? 8'd128 : {1'b0, len};
  wire [6:0] wsel = {req.cmd[2:1], 5'd0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '0; tm <= '0; len <= '0; div <= '0; txe <= 1'b0; rxe <= 1'b0; inv <= 1'b0;
      rstlen <= '0; rcnt <= '0; run <= 1'b0; rst_run <= 1'b0; hcnt <= '0;
      edge_i <= '0; nbits <= '0; tck <= 1'b0; tms <= 1'b0; tdo <= 1'b0; arst <= 1'b0;
      rsp <= RSP_IDLE;
    end else begin
      if (rsp_ack) rsp.valid <= 1'b0;
      if (!run) begin
        tck <= inv;
        tms <= inv;
        tdo <= inv;
      end
      // reset pulse
      if (rst_run) begin
        if (rcnt == 16'd0) begin
          rst_run <= 1'b0;
          arst    <= 1'b0;
          rsp     <= rsp_make(ERR_NONE, 8'd0, 32'h0);
        end else begin
          rcnt <= rcnt - 16'd1;
        end
      end
      if (req.valid && !run && !rst_run) begin
        rsp <= rsp_make(ERR_NONE, 8'd0, 32'h0);
        casez (req.cmd)
          8'b0000_0??0: sh[wsel +: 32] <= req.data;
          8'b0000_0??1: rsp <= rsp_make(ERR_NONE, 8'd4, sh[wsel +: 32]);
          8'b0000_1??0: tm[wsel +: 32] <= req.data;
          8'b0000_1??1: rsp <= rsp_make(ERR_NONE, 8'd4, tm[wsel +: 32]);
          SJ_W_CTRL: {inv, rxe, txe, len} <= {req.data[12], req.data[10:9], req.data[6:0]};
          SJ_R_CTRL: rsp <= rsp_make(ERR_NONE, 8'd4, {19'h0, inv, 1'b0, rxe, txe, 2'b00, len});
          SJ_W_FREQ: div <= req.data[6:0];
          SJ_R_FREQ: rsp <= rsp_make(ERR_NONE, 8'd4, {25'h0, div});
          SJ_W_SS:   rstlen <= req.data[15:0];
          SJ_R_SS:   rsp <= rsp_make(ERR_NONE, 8'd4, {16'h0, rstlen});
          SJ_ARST: begin
            rsp.valid <= 1'b0;
            rst_run   <= 1'b1;
            arst      <= 1'b1;
            rcnt      <= rstlen;
          end
          SJ_GO: begin
            rsp.valid <= 1'b0;
            run       <= 1'b1;
            hcnt      <= div;
            edge_i    <= '0;
            nbits     <= nb;
            tck       <= inv;
            if (!txe) begin
              tdo <= sh[0];
              tms <= tm[0];
            end
          end
          default: rsp <= rsp_make(ERR_COMMAND, 8'd0, 32'h0);
        endcase
      end else if (run) begin
        if (hcnt != 7'd0) begin
          hcnt <= hcnt - 7'd1;
        end else begin
          hcnt <= div;
          if (edge_i == {nbits, 1'b0}) begin
            run <= 1'b0;
            tdo <= inv;
            tms <= inv;
            rsp <= rsp_make(ERR_NONE, 8'd0, 32'h0);
          end else begin
            logic [6:0] bi;
            logic       leading;
            bi      = edge_i[7:1];
            leading = !edge_i[0];
            tck     <= !tck;
            edge_i  <= edge_i + 9'd1;
            if (leading) begin
              if (txe) begin tdo <= sh[bi]; tms <= tm[bi]; end
              if (!rxe) sh[bi] <= tdi;
            end else begin
              if (rxe) sh[bi] <= tdi;
              if (!txe && {1'b0, bi} + 8'd1 < nbits) begin
                tdo <= sh[bi + 7'd1];
                tms <= tm[bi + 7'd1];
              end
            end
          end
        end
      end
    end
  end
endmodule
