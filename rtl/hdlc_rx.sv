// hdlc_rx: HDLC frame receiver for one e-link.
//
// The e-link runs at 80 Mb/s on a 40 MHz clock, so the receiver takes
// BITS (default 2) serial bits per clock, rx_bits[0] first. For every bit it
// counts consecutive ones: a zero after five ones is a stuffed bit and is
// dropped, a zero after six ones completes the flag 01111110 that opens and
// closes frames, and seven or more ones abort the frame (idle / abort). Data
// bits are assembled LSB first into bytes and run through the FCS
// (G(x) = x^16 + x^12 + x^5 + 1, preset to all ones, checked against the
// residue 0xF0B8, as in ISO HDLC).
//
// The last two bytes of every frame are the FCS, so bytes are delayed by two
// before they appear on out_valid/out_data; out_first marks a frame's first
// byte. On the closing flag frame_end pulses with frame_ok set when the FCS is
// right, the frame ended on a byte boundary and it holds at least address,
// control and FCS. An aborted frame ends with frame_ok = 0. Outputs are
// registered: one clock of latency after the bit that completes a byte.
// Bit order, FCS preset and residue are this design's choice (standard HDLC);
// the source gives the flag, the stuffing rule and the polynomial.
module hdlc_rx #(
  parameter int unsigned BITS = 2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,          // receiver enabled (else state is held in reset)
  input  logic [BITS-1:0] rx_bits,
  output logic            out_valid,
  output logic            out_first,
  output logic [7:0]      out_data,
  output logic            frame_end,
  output logic            frame_ok
);
  import sca_pkg::*;

  typedef struct packed {
    logic [2:0]  ones;
    logic [7:0]  shreg;
    logic [2:0]  bitcnt;
    logic        in_frame;
    logic [15:0] crc;
    logic [7:0]  hold0;      // older held byte
    logic [7:0]  hold1;      // newer held byte
    logic [1:0]  nhold;
    logic        first_pending;
    logic [7:0]  nbytes;     // saturating count of bytes in frame
  } rx_state_t;

  rx_state_t st_q, st_d;
  logic      ov_d, of_d, fe_d, fok_d;
  logic [7:0] od_d;

  // shift one data bit in; on a full byte update FCS and the hold pipeline
  always_comb begin
    rx_state_t s;
    logic      b;
    logic      data_bit;
    s     = st_q;
    ov_d  = 1'b0;
    of_d  = 1'b0;
    od_d  = out_data;
    fe_d  = 1'b0;
    fok_d = 1'b0;
    for (int i = 0; i < int'(BITS); i++) begin
      b        = rx_bits[i];
      data_bit = 1'b0;
      if (b) begin
        if (s.ones != 3'd7) s.ones = s.ones + 3'd1;
        if (s.ones == 3'd7) begin
          // seven ones: abort / idle
          if (s.in_frame && s.nbytes != 8'd0) begin
            fe_d  = 1'b1;
            fok_d = 1'b0;
          end
          s.in_frame = 1'b0;
        end else if (s.ones <= 3'd5) begin
          data_bit = s.in_frame;
        end
      end else begin
        if (s.ones == 3'd6) begin
          // flag: close the current frame, open a new one
          if (s.in_frame && s.nbytes != 8'd0) begin
            fe_d  = 1'b1;
            fok_d = (s.bitcnt == 3'd6) && (s.crc == FCS_RESIDUE) && (s.nbytes >= 8'd4);
          end
          s.in_frame      = 1'b1;
          s.bitcnt        = 3'd0;
          s.crc           = 16'hFFFF;
          s.nhold         = 2'd0;
          s.nbytes        = 8'd0;
          s.first_pending = 1'b1;
        end else if (s.ones != 3'd5) begin
          data_bit = s.in_frame;      // (a zero after five ones is stuffing)
        end
        s.ones = 3'd0;
      end
      if (data_bit) begin
        s.shreg  = {b, s.shreg[7:1]};
        s.bitcnt = s.bitcnt + 3'd1;
        if (s.bitcnt == 3'd0) begin
          s.crc = crc16_byte(s.crc, s.shreg);
          if (s.nbytes != 8'hFF) s.nbytes = s.nbytes + 8'd1;
          if (s.nhold == 2'd2) begin
            ov_d            = 1'b1;
            od_d            = s.hold0;
            of_d            = s.first_pending;
            s.first_pending = 1'b0;
          end else begin
            s.nhold = s.nhold + 2'd1;
          end
          s.hold0 = s.hold1;
          s.hold1 = s.shreg;
        end
      end
    end
    st_d = s;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q      <= '0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_data  <= 8'h00;
      frame_end <= 1'b0;
      frame_ok  <= 1'b0;
    end else if (!en) begin
      st_q      <= '0;
      out_valid <= 1'b0;
      frame_end <= 1'b0;
    end else begin
      st_q      <= st_d;
      out_valid <= ov_d;
      out_first <= of_d;
      out_data  <= od_d;
      frame_end <= fe_d;
      frame_ok  <= fok_d;
    end
  end
endmodule
