// eport: dual redundant e-port, the SCA's link to one of two GBTX chips.
//
// Two HDLC receivers listen to the primary and the secondary e-link; one
// HDLC transmitter drives whichever link is active (the other TX line is held
// at 1, idle). Only one port is active at a time. A CONNECT frame
// received on a link makes that link active and restarts the frame
// numbering; frames other than CONNECT arriving on the inactive link are
// discarded. RESET restarts the numbering and pulses core_reset; both are
// answered with UA. TEST is answered with a TEST frame carrying the same
// payload (loopback through the mux in front of the transmitter).
//
// Information frames carry SCA command packets (TR#, CH#, CMD, LEN, data).
// The control byte of an I-frame is {N(R)[2:0], P/F, N(S)[2:0], 0}. A frame
// whose N(S) is the expected one is accepted, its packet pushed into the RX
// FIFO and the receive count advanced; any other N(S) is answered with a
// REJ supervisory frame {N(R), 0, 2'b10, 2'b01}. Replies popped from the
// TX FIFO leave as I-frames with the port's own N(S) and the current N(R),
// which acknowledges the commands received. A packet with LEN > MAX_DATA or
// shorter than its header is dropped. Both FIFOs hold whole packets.
//
// Timing: a command appears in the RX FIFO two clocks after the closing
// flag has been received. Control codes, address handling and the REJ
// reply are this design's choices; the source names CONNECT, RESET, TEST and
// packet numbering without giving their encodings.
module eport
  import sca_pkg::*;
#(
  parameter logic [7:0]  ADDR       = 8'h00,   // HDLC address of the SCA
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // e-links, two bits per 40 MHz clock, bit 0 first
  input  logic [1:0]  rx_pri,
  input  logic [1:0]  rx_sec,
  output logic [1:0]  tx_pri,
  output logic [1:0]  tx_sec,
  // to / from the network controller
  output logic        cmd_valid,
  output sca_cmd_t    cmd,
  input  logic        cmd_pop,
  input  logic        rep_push,
  input  sca_rep_t    rep,
  output logic        rep_full,
  // status
  output logic        connected,
  output logic        active_sec,      // 1: secondary e-port active
  output logic        core_reset       // one-clock pulse on RESET
);
  localparam int unsigned MAXP = 4 + MAX_DATA;

  // ------------------------------------------------------------ receivers
  logic [1:0]          rv, rf, rend, rok;
  logic [7:0]          rd [2];
  logic [1:0]          fv;
  logic [7:0]          fa [2], fc [2], fl [2];
  logic [MAXP*8-1:0]   fp [2];

  for (genvar p = 0; p < 2; p++) begin : g_rx
    hdlc_rx #(.BITS(2)) u_rx (
      .clk, .rst_n, .en(1'b1), .rx_bits(p == 0 ? rx_pri : rx_sec),
      .out_valid(rv[p]), .out_first(rf[p]), .out_data(rd[p]),
      .frame_end(rend[p]), .frame_ok(rok[p]));
    hdlc_frame_asm #(.MAXP(MAXP)) u_asm (
      .clk, .rst_n, .in_valid(rv[p]), .in_first(rf[p]), .in_data(rd[p]),
      .frame_end(rend[p]), .frame_ok(rok[p]),
      .frame_valid(fv[p]), .addr(fa[p]), .ctrl(fc[p]), .payload(fp[p]), .plen(fl[p]));
  end

  // ------------------------------------------------------- frame control
  logic [2:0]         vr, vs;          // receive / send sequence numbers
  logic               u_pend;          // an unnumbered/supervisory reply waits
  logic [7:0]         u_ctrl;
  logic [MAXP*8-1:0]  u_pl;
  logic [7:0]         u_len;
  logic               rxf_push, rxf_full, rxf_empty;
  sca_cmd_t           rxf_in;
  logic               u_taken;
  logic               tx_take_i;       // a reply leaves the TX FIFO

  // frame from the primary port wins if both end in the same clock; the
  // other one is lost (only one link is in use at a time)
  logic               sel;
  logic               fval;
  assign sel  = !fv[0] && fv[1];
  assign fval = fv[0] || fv[1];

  wire [7:0]        f_addr = fa[sel];
  wire [7:0]        f_ctrl = fc[sel];
  wire [MAXP*8-1:0] f_pl   = fp[sel];
  wire [7:0]        f_len  = fl[sel];
  wire              f_from_active = connected && (sel == active_sec);

  always_comb begin
    rxf_in.tr   = f_pl[7:0];
    rxf_in.ch   = f_pl[15:8];
    rxf_in.cmd  = f_pl[23:16];
    rxf_in.len  = f_pl[31:24];
    rxf_in.data = f_pl[32 +: MAX_DATA*8];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vr         <= '0;
      vs         <= '0;
      connected  <= 1'b0;
      active_sec <= 1'b0;
      core_reset <= 1'b0;
      u_pend     <= 1'b0;
      u_ctrl     <= '0;
      u_pl       <= '0;
      u_len      <= '0;
      rxf_push   <= 1'b0;
    end else begin
      core_reset <= 1'b0;
      rxf_push   <= 1'b0;
      if (u_taken) u_pend <= 1'b0;
      if (tx_take_i) vs <= vs + 3'd1;
      if (fval && f_addr == ADDR) begin
        if (f_ctrl == HDLC_CONNECT) begin
          connected  <= 1'b1;
          active_sec <= sel;
          vr         <= '0;
          vs         <= '0;
          u_pend     <= 1'b1; u_ctrl <= HDLC_UA; u_len <= '0;
        end else if (f_from_active) begin
          if (f_ctrl == HDLC_RESET) begin
            vr         <= '0;
            vs         <= '0;
            core_reset <= 1'b1;
            u_pend     <= 1'b1; u_ctrl <= HDLC_UA; u_len <= '0;
          end else if (f_ctrl == HDLC_TEST) begin
            u_pend <= 1'b1; u_ctrl <= HDLC_TEST; u_pl <= f_pl; u_len <= f_len;
          end else if (f_ctrl[0] == 1'b0) begin
            if (f_ctrl[3:1] == vr) begin
              if (!rxf_full && f_len >= 8'd4 && f_pl[31:24] <= 8'(MAX_DATA)
                  && f_len >= 8'd4 + f_pl[31:24]) begin
                rxf_push <= 1'b1;
                vr       <= vr + 3'd1;
              end
            end else begin
              u_pend <= 1'b1; u_ctrl <= {vr, 1'b0, 4'b1001}; u_len <= '0;
            end
          end
        end
      end
    end
  end

  // the packet is registered once more so that rxf_in is stable on push
  sca_cmd_t rxf_q;
  always_ff @(posedge clk) if (fval) rxf_q <= rxf_in;

  sync_fifo #(.WIDTH($bits(sca_cmd_t)), .DEPTH(FIFO_DEPTH)) u_rxfifo (
    .clk, .rst_n, .clear(core_reset), .push(rxf_push), .wr_data(rxf_q),
    .pop(cmd_pop), .rd_data(cmd), .full(rxf_full), .empty(rxf_empty));
  assign cmd_valid = !rxf_empty;

  // ------------------------------------------------------------ transmit
  logic     txf_empty, txf_pop;
  sca_rep_t txf_head;
  sync_fifo #(.WIDTH($bits(sca_rep_t)), .DEPTH(FIFO_DEPTH)) u_txfifo (
    .clk, .rst_n, .clear(core_reset), .push(rep_push), .wr_data(rep),
    .pop(txf_pop), .rd_data(txf_head), .full(rep_full), .empty(txf_empty));

  // Frame being sent: up to 2 + MAXP bytes
  logic [(MAXP+2)*8-1:0] tbuf;
  logic [7:0]            tlen, tidx;
  logic                  tact;
  logic                  hv, hl, hr, hbusy;
  logic [1:0]            txb;

  assign tx_take_i = !tact && !hbusy && !u_pend && !txf_empty;
  assign txf_pop   = tx_take_i;
  assign u_taken   = !tact && !hbusy && u_pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tact <= 1'b0;
      tbuf <= '0;
      tlen <= '0;
      tidx <= '0;
    end else if (!tact) begin
      if (u_taken) begin
        tact <= 1'b1;
        tidx <= '0;
        tbuf <= {u_pl, u_ctrl, ADDR};
        tlen <= u_len + 8'd2;
      end else if (tx_take_i) begin
        tact <= 1'b1;
        tidx <= '0;
        tbuf <= {txf_head.data, txf_head.len, txf_head.err, txf_head.ch, txf_head.tr,
                 vr, 1'b0, vs, 1'b0, ADDR};
        tlen <= 8'd6 + ((txf_head.len > 8'(MAX_DATA)) ? 8'(MAX_DATA) : txf_head.len);
      end
    end else if (hr) begin
      tidx <= tidx + 8'd1;
      if (hl) tact <= 1'b0;
    end
  end

  assign hv = tact;
  assign hl = (tidx == tlen - 8'd1);

  hdlc_tx #(.BITS(2)) u_tx (
    .clk, .rst_n, .in_valid(hv), .in_data(tbuf[tidx*8 +: 8]), .in_last(hl),
    .in_ready(hr), .tx_bits(txb), .busy(hbusy));

  assign tx_pri = active_sec ? 2'b11 : txb;   // inactive link: idle ones
  assign tx_sec = active_sec ? txb : 2'b11;
endmodule
