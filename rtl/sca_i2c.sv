// sca_i2c: one I2C master channel (the SCA has sixteen, all independent).
//
// A bit-level engine divides every SCL period into four quarters: SCL low
// (quarters 0-1, SDA changes as quarter 1 begins), SCL released high (2-3),
// SDA sampled as quarter 3 begins. While SCL is released the engine waits for the line to
// actually rise, so slow slaves may stretch the clock. Quarter lengths for
// the four rates 100 kHz, 200 kHz, 400 kHz and 1 MHz assume the 40 MHz
// system clock. Lines are open drain: scl_oe / sda_oe = 1 pulls low.
// Only a single bus master is supported (no arbitration).
//
// On top of it a sequencer builds whole transfers: START, address byte(s),
// data bytes written from or read into the 16-byte command buffer (ACK
// after every read byte but the last, NACK after it), STOP. In 10-bit mode
// the address goes out as 11110 a9 a8 W then a7..a0; a read then continues
// with a repeated START and 11110 a9 a8 R. A missing acknowledge on an
// address or write byte ends the transfer with STOP and status NOACK; SDA
// found low before START gives status LEVERR and no transfer. Read-modify-
// write commands read one byte, combine it with the mask register (AND, OR
// or XOR) and write the result back in a second transfer.
//
// Registers: CTRL = {TEN[7], NBYTE[6:2] (0 means 16), SPEED[1:0]}, STATUS =
// {NOACK[6], LEVERR[3], SUCC[2]}, MASK[7:0], buffer words 0..3 (byte 0 in
// bits 7:0 of word 0). Single write: data[9:0] address, data[23:16] byte.
// Single read and RMW: data[9:0] address. Multi-byte: data[9:0] address,
// NBYTE bytes. Transfer commands are answered at the end of the transfer
// with data = {STATUS, last byte read} and ERR_GENERIC if it failed;
// others the next clock. Rates, modes, buffer and RMW operations follow the
// source; register layout, command codes and the waveform are this
// design's own.
module sca_i2c
  import sca_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  chan_req_t  req,
  output chan_rsp_t  rsp,
  input  logic       rsp_ack,
  output logic       scl_oe,
  output logic       sda_oe,
  input  logic       scl_in,
  input  logic       sda_in
);
  typedef enum logic [3:0] {S_IDLE, S_START, S_A1, S_A2, S_RS, S_A1R, S_WR, S_RD,
                            S_STOP, S_DONE} step_e;

  logic [7:0]   ctrl, mask, status;
  logic [127:0] buffer;
  step_e        step;
  logic [1:0]   q;           // quarter within the slot
  logic [6:0]   tcnt;        // clocks left in this quarter
  logic [3:0]   bitn;        // 0..7 data bits, 8 = acknowledge
  logic [7:0]   tx, rx;
  logic [4:0]   nleft;       // bytes still to move in this phase
  logic [3:0]   bidx;        // buffer index
  logic [9:0]   addr;
  logic         rd, ten, multi, noack;
  logic [1:0]   rmw;         // 0: none, 1..3: AND, OR, XOR
  logic         rmw_wr;      // second (write) pass of read-modify-write
  logic [7:0]   wbyte;       // single-write byte

  wire [4:0] nbyte = (ctrl[6:2] == 5'd0) ? 5'd16 : ctrl[6:2];

  function automatic logic [6:0] qlen(input logic [1:0] sp);
    case (sp)
      2'd0:    qlen = 7'd99;   // 100 kHz: 400 clocks per bit
      2'd1:    qlen = 7'd49;   // 200 kHz
      2'd2:    qlen = 7'd24;   // 400 kHz
      default: qlen = 7'd9;    // 1 MHz
    endcase
  endfunction

  // byte to send first in a phase
  function automatic logic [7:0] first_tx(input step_e s);
    case (s)
      S_A1:    first_tx = ten ? {5'b11110, addr[9:8], 1'b0} : {addr[6:0], rd};
      S_A2:    first_tx = addr[7:0];
      S_A1R:   first_tx = {5'b11110, addr[9:8], 1'b1};
      default: first_tx = 8'h00;
    endcase
  endfunction

  logic [7:0] rmw_res;
  always_comb begin
    case (rmw)
      2'd1:    rmw_res = rx & mask;
      2'd2:    rmw_res = rx | mask;
      default: rmw_res = rx ^ mask;
    endcase
  end

  wire is_tx_step = (step == S_A1) || (step == S_A2) || (step == S_A1R) || (step == S_WR);
  wire [3:0] wsel = {req.cmd[2:1], 2'b00};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl <= '0; mask <= '0; status <= '0; buffer <= '0; step <= S_IDLE;
      q <= '0; tcnt <= '0; bitn <= '0; tx <= '0; rx <= '0; nleft <= '0; bidx <= '0;
      addr <= '0; rd <= 1'b0; ten <= 1'b0; multi <= 1'b0; noack <= 1'b0;
      rmw <= '0; rmw_wr <= 1'b0; wbyte <= '0;
      scl_oe <= 1'b0; sda_oe <= 1'b0; rsp <= RSP_IDLE;
    end else begin
      if (rsp_ack) rsp.valid <= 1'b0;
      if (step == S_IDLE) begin
        if (req.valid) begin
          logic start;
          start = 1'b0;
          rsp   <= rsp_make(ERR_NONE, 8'd0, 32'h0);
          rmw   <= 2'd0;
          rmw_wr <= 1'b0;
          case (req.cmd)
            I2C_W_CTRL: ctrl <= req.data[7:0];
            I2C_R_CTRL: rsp  <= rsp_make(ERR_NONE, 8'd4, {24'h0, ctrl});
            I2C_R_STR:  rsp  <= rsp_make(ERR_NONE, 8'd4, {24'h0, status});
            I2C_W_MSK:  mask <= req.data[7:0];
            I2C_R_MSK:  rsp  <= rsp_make(ERR_NONE, 8'd4, {24'h0, mask});
            I2C_S_W:    begin start = 1'b1; rd <= 1'b0; multi <= 1'b0; wbyte <= req.data[23:16]; end
            I2C_S_R:    begin start = 1'b1; rd <= 1'b1; multi <= 1'b0; end
            I2C_M_W:    begin start = 1'b1; rd <= 1'b0; multi <= 1'b1; end
            I2C_M_R:    begin start = 1'b1; rd <= 1'b1; multi <= 1'b1; end
            I2C_RMW_AND: begin start = 1'b1; rd <= 1'b1; multi <= 1'b0; rmw <= 2'd1; end
            I2C_RMW_OR:  begin start = 1'b1; rd <= 1'b1; multi <= 1'b0; rmw <= 2'd2; end
            I2C_RMW_XOR: begin start = 1'b1; rd <= 1'b1; multi <= 1'b0; rmw <= 2'd3; end
            default: begin
              if (req.cmd[7:3] == 5'b01000) begin          // buffer words 0x40..0x47
                if (!req.cmd[0]) buffer[{wsel, 3'b000} +: 32] <= req.data;
                else rsp <= rsp_make(ERR_NONE, 8'd4, buffer[{wsel, 3'b000} +: 32]);
              end else begin
                rsp <= rsp_make(ERR_COMMAND, 8'd0, 32'h0);
              end
            end
          endcase
          if (start) begin
            rsp.valid <= 1'b0;
            addr      <= req.data[9:0];
            ten       <= ctrl[7];
            noack     <= 1'b0;
            if (!sda_in) begin
              status <= 8'h08;                            // LEVERR: bus held low
              rsp    <= rsp_make(ERR_GENERIC, 8'd2, {16'h0, 8'h08, 8'h00});
            end else begin
              step <= S_START;
              q    <= 2'd0;
              tcnt <= qlen(ctrl[1:0]);
            end
          end
        end
      end else if (step == S_DONE) begin
        if (rmw != 2'd0 && !rmw_wr && !noack) begin
          // second pass of read-modify-write: write the combined byte
          rmw_wr <= 1'b1;
          rd     <= 1'b0;
          wbyte  <= rmw_res;
          step   <= S_START;
          q      <= 2'd0;
          tcnt   <= qlen(ctrl[1:0]);
        end else begin
          step   <= S_IDLE;
          status <= noack ? 8'h40 : 8'h04;
          rsp    <= rsp_make(noack ? ERR_GENERIC : ERR_NONE, 8'd2,
                             {16'h0, noack ? 8'h40 : 8'h04, (rmw != 2'd0) ? wbyte : rx});
        end
      end else begin
        // ---------------------------------------------- bit-level engine
        // waveform of the current quarter
        case (step)
          S_START, S_RS: begin
            case (q)
              2'd0: begin                                   // SDA released; SCL low first
                sda_oe <= 1'b0;                             // for a repeated START
                if (step == S_RS) scl_oe <= 1'b1;
              end
              2'd1: begin scl_oe <= 1'b0; sda_oe <= 1'b0; end
              2'd2: begin scl_oe <= 1'b0; sda_oe <= 1'b1; end // SDA falls with SCL high
              default: begin scl_oe <= 1'b1; sda_oe <= 1'b1; end
            endcase
          end
          S_STOP: begin
            case (q)
              2'd0: scl_oe <= 1'b1;
              2'd1: sda_oe <= 1'b1;
              2'd2: scl_oe <= 1'b0;
              default: sda_oe <= 1'b0;                      // SDA rises with SCL high
            endcase
          end
          default: begin
            scl_oe <= (q < 2'd2);
            if (q == 2'd1) begin
              if (is_tx_step) sda_oe <= (bitn < 4'd8) ? !tx[7 - bitn[2:0]] : 1'b0;
              else            sda_oe <= (bitn < 4'd8) ? 1'b0 : (nleft != 5'd1); // ACK / NACK
            end
          end
        endcase
        // time base; SCL released: wait for it to be high (clock stretching)
        if (tcnt != 7'd0) begin
          tcnt <= tcnt - 7'd1;
        end else if (!(!scl_oe && !scl_in)) begin
          tcnt <= qlen(ctrl[1:0]);
          q    <= q + 2'd1;
          // sample SDA as quarter 3 begins
          if (q == 2'd2 && (step == S_RD) && bitn < 4'd8) rx <= {rx[6:0], sda_in};
          if (q == 2'd2 && is_tx_step && bitn == 4'd8 && sda_in) noack <= 1'b1;
          if (q == 2'd3) begin
            // end of slot: choose the next one
            case (step)
              S_START: begin step <= S_A1; bitn <= '0; tx <= first_tx(S_A1); end
              S_RS:    begin step <= S_A1R; bitn <= '0; tx <= first_tx(S_A1R); end
              S_STOP:  step <= S_DONE;
              default: begin
                if (bitn != 4'd8) begin
                  bitn <= bitn + 4'd1;
                end else begin
                  bitn <= '0;
                  if (is_tx_step && noack) begin
                    step <= S_STOP;
                  end else begin
                    case (step)
                      S_A1: begin
                        if (ten)     begin step <= S_A2; tx <= first_tx(S_A2); end
                        else if (rd) begin step <= S_RD; nleft <= multi ? nbyte : 5'd1; bidx <= '0; end
                        else begin
                          step <= S_WR; nleft <= multi ? nbyte : 5'd1; bidx <= 4'd1;
                          tx   <= multi ? buffer[7:0] : wbyte;
                        end
                      end
                      S_A2: begin
                        if (rd) step <= S_RS;
                        else begin
                          step <= S_WR; nleft <= multi ? nbyte : 5'd1; bidx <= 4'd1;
                          tx   <= multi ? buffer[7:0] : wbyte;
                        end
                      end
                      S_A1R: begin step <= S_RD; nleft <= multi ? nbyte : 5'd1; bidx <= '0; end
                      S_WR: begin
                        if (nleft == 5'd1) step <= S_STOP;
                        else begin
                          nleft <= nleft - 5'd1;
                          bidx  <= bidx + 4'd1;
                          tx    <= buffer[{bidx, 3'b000} +: 8];
                        end
                      end
                      default: begin // S_RD
                        if (multi) buffer[{bidx, 3'b000} +: 8] <= rx;
                        bidx <= bidx + 4'd1;
                        if (nleft == 5'd1) step <= S_STOP;
                        else nleft <= nleft - 5'd1;
                      end
                    endcase
                  end
                end
              end
            endcase
          end
        end
      end
    end
  end
endmodule
