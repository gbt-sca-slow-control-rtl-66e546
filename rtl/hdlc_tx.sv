// hdlc_tx: HDLC frame transmitter for one e-link.
//
// Sends BITS (default 2) bits per 40 MHz clock, tx_bits[0] first, which is
// the 80 Mb/s double-data-rate e-link. Between frames the line carries
// continuous flags (01111110). A frame is offered byte by byte on
// in_valid/in_data/in_last (address, control, payload); each byte is taken
// in the cycle in_ready is high. The transmitter sends an opening flag, the
// bytes LSB first with a zero inserted after every five consecutive ones,
// the FCS (one's complement of the CRC-16 G(x) = x^16 + x^12 + x^5 + 1,
// low byte first, also stuffed) and a closing flag.
//
// Bits wait in a 24-bit queue; a new unit (a flag, or one stuffed byte of at
// most 10 bits) is appended whenever fewer than 14 bits are queued, so the
// line never runs dry. busy is high from the first accepted byte until the
// closing flag has been queued.
module hdlc_tx #(
  parameter int unsigned BITS = 2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [7:0]      in_data,
  input  logic            in_last,
  output logic            in_ready,
  output logic [BITS-1:0] tx_bits,
  output logic            busy
);
  import sca_pkg::*;

  typedef enum logic [2:0] {S_IDLE, S_DATA, S_FCS0, S_FCS1, S_CLOSE} tx_st_e;

  localparam int unsigned QW = 24;

  tx_st_e        st_q, st_d;
  logic [QW-1:0] q_q, q_d;
  logic [4:0]    qn_q, qn_d;
  logic [2:0]    ones_q, ones_d;
  logic [15:0]   crc_q, crc_d;
  logic          rdy;

  always_comb begin
    logic [QW-1:0] q;
    logic [4:0]    qn;
    logic [2:0]    ones;
    logic [7:0]    unit;
    logic          load, stuff;
    q     = q_q >> BITS;
    qn    = qn_q - 5'(BITS);
    ones  = ones_q;
    st_d  = st_q;
    crc_d = crc_q;
    rdy   = 1'b0;
    load  = 1'b0;
    stuff = 1'b0;
    unit  = HDLC_FLAG;
    if (qn < 5'd14) begin
      load = 1'b1;
      case (st_q)
        S_IDLE: begin
          unit = HDLC_FLAG;                    // idle flag, or opening flag
          if (in_valid) begin
            st_d  = S_DATA;
            crc_d = 16'hFFFF;
          end
        end
        S_DATA: begin
          if (in_valid) begin
            unit  = in_data;
            stuff = 1'b1;
            rdy   = 1'b1;
            crc_d = crc16_byte(crc_q, in_data);
            if (in_last) st_d = S_FCS0;
          end else begin
            load = 1'b0;                       // wait for the next byte
          end
        end
        S_FCS0: begin unit = ~crc_q[7:0];  stuff = 1'b1; st_d = S_FCS1;  end
        S_FCS1: begin unit = ~crc_q[15:8]; stuff = 1'b1; st_d = S_CLOSE; end
        default: begin unit = HDLC_FLAG; st_d = S_IDLE; end
      endcase
    end
    if (load) begin
      if (!stuff) begin
        q    = q | (QW'(unit) << qn);
        qn   = qn + 5'd8;
        ones = 3'd0;
      end else begin
        for (int i = 0; i < 8; i++) begin
          q  = q | (QW'(unit[i]) << qn);
          qn = qn + 5'd1;
          if (unit[i]) begin
            ones = ones + 3'd1;
            if (ones == 3'd5) begin
              qn   = qn + 5'd1;               // inserted zero (queue bits are 0 already)
              ones = 3'd0;
            end
          end else begin
            ones = 3'd0;
          end
        end
      end
    end
    q_d    = q;
    qn_d   = qn;
    ones_d = ones;
  end

  assign in_ready = rdy;
  assign busy     = (st_q != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q    <= S_IDLE;
      q_q     <= QW'(HDLC_FLAG) | (QW'(HDLC_FLAG) << 8);
      qn_q    <= 5'd16;
      ones_q  <= 3'd0;
      crc_q   <= 16'hFFFF;
      tx_bits <= '1;
    end else begin
      st_q    <= st_d;
      q_q     <= q_d;
      qn_q    <= qn_d;
      ones_q  <= ones_d;
      crc_q   <= crc_d;
      tx_bits <= q_q[BITS-1:0];
    end
  end
endmodule
