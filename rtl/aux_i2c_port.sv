// aux_i2c_port: auxiliary I2C slave port for test and expansion.
//
// Gives an I2C master direct access to the network controller, bypassing
// the e-ports, when the test-enable pin is high. The port is an I2C slave
// at 7-bit address ADDR. SCL and SDA are synchronised to the 40 MHz clock
// (two flip-flops) and their edges detected there, so the port works up to
// about 1 MHz. SDA is open drain (sda_oe = 1 pulls low).
//
// Write transfer: START, ADDR+W, then the command packet bytes TR#, CH#,
// CMD, LEN, data..., STOP. At the STOP a packet of at least four bytes is
// offered to the network controller (cmd_valid until cmd_pop); a packet
// arriving while the previous one waits is dropped.
// Read transfer: START, ADDR+R; the slave returns a status byte (1 when a
// reply is ready, 0 otherwise), then the reply TR#, CH#, ERR, LEN and LEN
// data bytes, then 0xFF. A reply sent is released at the STOP, making room
// for the next one (rep_full). The packet framing over I2C is this
// design's own; the source states only that the port receives commands and
// returns replies.
module aux_i2c_port
  import sca_pkg::*;
#(
  parameter logic [6:0] ADDR = 7'h00
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     scl_in,
  input  logic     sda_in,
  output logic     sda_oe,
  output logic     cmd_valid,
  output sca_cmd_t cmd,
  input  logic     cmd_pop,
  input  logic     rep_push,
  input  sca_rep_t rep,
  output logic     rep_full
);
  typedef enum logic [1:0] {P_IDLE, P_ADDR, P_WR, P_RD} port_st_e;

  logic [2:0]  scl_s, sda_s;     // two sync stages + previous value
  wire scl = scl_s[1], sda = sda_s[1];
  wire scl_rise = scl && !scl_s[2];
  wire scl_fall = !scl && scl_s[2];
  wire start_c  = scl && scl_s[2] && !sda && sda_s[2];
  wire stop_c   = scl && scl_s[2] && sda && !sda_s[2];

  port_st_e        st;
  logic [3:0]      bitn;          // 0..7 data bits, 8: after 8th bit, 9: ack slot
  logic [7:0]      sh, txb;
  logic [7:0]      nb;            // bytes of this transfer
  logic [7:0]      wbuf [4 + MAX_DATA];
  logic            mack;          // master acknowledged the last read byte
  sca_rep_t        rq;            // waiting reply
  logic            rep_sent;

  assign rep_full = rq.len != 8'hFF;   // rq.len = 0xFF marks "no reply"

  function automatic logic [7:0] rd_byte(input logic [7:0] k);
    logic [7:0] r;
    if (k == 8'd0)            r = {7'd0, rep_full};
    else if (!rep_full)       r = 8'hFF;
    else if (k == 8'd1)       r = rq.tr;
    else if (k == 8'd2)       r = rq.ch;
    else if (k == 8'd3)       r = rq.err;
    else if (k == 8'd4)       r = rq.len;
    else if (k <= 8'd4 + rq.len && k <= 8'd4 + 8'(MAX_DATA)) r = rq.data[(k - 8'd5)*8 +: 8];
    else                      r = 8'hFF;
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_s <= 3'b111; sda_s <= 3'b111; st <= P_IDLE; bitn <= '0; sh <= '0; txb <= '0;
      nb <= '0; mack <= 1'b0; sda_oe <= 1'b0; cmd_valid <= 1'b0; cmd <= '0;
      rq <= '0; rq.len <= 8'hFF; rep_sent <= 1'b0;
      for (int i = 0; i < int'(4 + MAX_DATA); i++) wbuf[i] <= '0;
    end else begin
      scl_s <= {scl_s[1:0], scl_in};
      sda_s <= {sda_s[1:0], sda_in};
      if (cmd_pop) cmd_valid <= 1'b0;
      if (rep_push) rq <= rep;
      if (start_c) begin
        st <= P_ADDR; bitn <= '0; nb <= '0; sda_oe <= 1'b0;
      end else if (stop_c) begin
        if (st == P_WR && nb >= 8'd4 && !cmd_valid) begin
          cmd_valid <= 1'b1;
          cmd.tr    <= wbuf[0];
          cmd.ch    <= wbuf[1];
          cmd.cmd   <= wbuf[2];
          cmd.len   <= wbuf[3];
          for (int i = 0; i < int'(MAX_DATA); i++) cmd.data[i*8 +: 8] <= wbuf[4 + i];
        end
        if (rep_sent && !rep_push) rq.len <= 8'hFF;
        rep_sent <= 1'b0;
        st       <= P_IDLE;
        sda_oe   <= 1'b0;
      end else if (st != P_IDLE) begin
        if (scl_rise) begin
          if (bitn < 4'd8) begin
            sh   <= {sh[6:0], sda};
            bitn <= bitn + 4'd1;
          end else if (bitn == 4'd9 && st == P_RD) begin
            mack <= !sda;
          end
        end else if (scl_fall) begin
          if (bitn == 4'd8) begin
            // start of the acknowledge slot
            bitn <= 4'd9;
            case (st)
              P_ADDR: begin
                if (sh[7:1] == ADDR) begin
                  sda_oe <= 1'b1;
                  st     <= sh[0] ? P_RD : P_WR;
                  mack   <= 1'b1;
                end else begin
                  st <= P_IDLE;
                end
              end
              P_WR: begin
                if (nb < 8'(4 + MAX_DATA)) wbuf[nb[$clog2(4 + MAX_DATA)-1:0]] <= sh;
                nb     <= nb + 8'd1;
                sda_oe <= 1'b1;
              end
              default: sda_oe <= 1'b0;   // read: the master acknowledges
            endcase
          end else if (bitn == 4'd9) begin
            // end of the acknowledge slot
            bitn <= '0;
            if (st == P_RD) begin
              if (mack) begin
                logic [7:0] b;
                b = rd_byte(nb);
                if (nb == 8'd0 && rep_full) rep_sent <= 1'b1;
                txb    <= b;
                sda_oe <= !b[7];
                nb     <= nb + 8'd1;
              end else begin
                sda_oe <= 1'b0;
                st     <= P_IDLE;
              end
            end else begin
              sda_oe <= 1'b0;
            end
          end else if (st == P_RD) begin
            sda_oe <= !txb[3'd7 - bitn[2:0]];
          end
        end
      end
    end
  end
endmodule
