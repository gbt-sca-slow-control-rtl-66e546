// sca_pkg: types and constants shared by the Slow Control Adapter core.
//
// The SCA carries "channel commands" inside HDLC frames. A command packet is
// TR# (transaction id), CH# (channel), CMD, LEN and up to MAX_DATA bytes of
// data; the reply carries TR#, CH#, ERR, LEN and data (field order and 8-bit
// widths as in the packet-format drawing). Inside the chip the network
// controller hands a command to a channel as a chan_req_t pulse and the
// channel answers, sooner or later, with a chan_rsp_t held until acknowledged.
//
// Channel numbers, command codes, error bits and HDLC control codes are this
// design's own choices (the source gives the fields, not their encodings);
// the channel numbering follows the arrangement commonly used for this chip.
package sca_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned MAX_DATA   = 4;   // data bytes per SCA packet
  localparam int unsigned N_I2C      = 16;  // I2C master channels
  localparam int unsigned N_CHAN     = 22;  // channel numbers 0..21
  localparam int unsigned N_GPIO     = 32;
  localparam int unsigned N_DAC      = 4;
  localparam int unsigned N_ADC_IN   = 32;  // 31 pins + temperature sensor

  // -------------------------------------------------------- channel numbers
  localparam logic [7:0] CH_CTRL = 8'h00;
  localparam logic [7:0] CH_SPI  = 8'h01;
  localparam logic [7:0] CH_GPIO = 8'h02;
  localparam logic [7:0] CH_I2C0 = 8'h03;   // I2C k is CH_I2C0 + k
  localparam logic [7:0] CH_JTAG = 8'h13;
  localparam logic [7:0] CH_ADC  = 8'h14;
  localparam logic [7:0] CH_DAC  = 8'h15;

  // ----------------------------------------------------------- error bits
  localparam logic [7:0] ERR_NONE      = 8'h00;
  localparam logic [7:0] ERR_GENERIC   = 8'h01;  // operation failed (e.g. I2C NACK)
  localparam logic [7:0] ERR_CHANNEL   = 8'h02;  // no such channel
  localparam logic [7:0] ERR_COMMAND   = 8'h04;  // command not valid for channel
  localparam logic [7:0] ERR_LENGTH    = 8'h10;  // LEN out of range
  localparam logic [7:0] ERR_DISABLED  = 8'h20;  // channel not enabled
  localparam logic [7:0] ERR_BUSY      = 8'h40;  // channel still busy

  // -------------------------------------------------- CTRL channel commands
  localparam logic [7:0] CTRL_W_ENA  = 8'h02;  // data[31:0] = enable mask of channels
  localparam logic [7:0] CTRL_R_ENA  = 8'h03;
  localparam logic [7:0] CTRL_R_SEU  = 8'h04;  // read SEU counter
  localparam logic [7:0] CTRL_C_SEU  = 8'h05;  // clear SEU counter
  localparam logic [7:0] CTRL_R_ID   = 8'h06;  // chip id (from e-fuses)

  // ------------------------------------------- generic per-channel commands
  // Every peripheral channel uses register write/read commands: an even code
  // writes a 32-bit register, the next odd code reads it back.
  // SPI / JTAG
  localparam logic [7:0] SJ_W_TX0  = 8'h00;  // .. SJ_W_TX3 = 0x06 (TX / TDO words)
  localparam logic [7:0] SJ_R_RX0  = 8'h01;  // .. 0x07 (RX / TDI words)
  localparam logic [7:0] SJ_W_TMS0 = 8'h08;  // JTAG only: .. 0x0E
  localparam logic [7:0] SJ_R_TMS0 = 8'h09;
  localparam logic [7:0] SJ_W_CTRL = 8'h10;
  localparam logic [7:0] SJ_R_CTRL = 8'h11;
  localparam logic [7:0] SJ_W_FREQ = 8'h12;
  localparam logic [7:0] SJ_R_FREQ = 8'h13;
  localparam logic [7:0] SJ_W_SS   = 8'h14;  // SPI slave selects / JTAG reset pulse length
  localparam logic [7:0] SJ_R_SS   = 8'h15;
  localparam logic [7:0] SJ_GO     = 8'h20;  // start transfer; reply when finished
  localparam logic [7:0] SJ_ARST   = 8'h22;  // JTAG: emit reset pulse

  // GPIO
  localparam logic [7:0] GP_W_DOUT   = 8'h10;
  localparam logic [7:0] GP_R_DOUT   = 8'h11;
  localparam logic [7:0] GP_R_DIN    = 8'h01;
  localparam logic [7:0] GP_W_DIR    = 8'h20;  // 1 = output
  localparam logic [7:0] GP_R_DIR    = 8'h21;
  localparam logic [7:0] GP_W_INTEN  = 8'h30;  // interrupt enable per line
  localparam logic [7:0] GP_R_INTEN  = 8'h31;
  localparam logic [7:0] GP_W_INTSEL = 8'h32;  // 1 = falling edge, 0 = rising edge
  localparam logic [7:0] GP_R_INTSEL = 8'h33;
  localparam logic [7:0] GP_W_INTS   = 8'h34;  // write 1 to clear interrupt status
  localparam logic [7:0] GP_R_INTS   = 8'h35;
  localparam logic [7:0] GP_W_CLKSEL = 8'h40;  // bit0: ext clock, bit1: falling edge of it
  localparam logic [7:0] GP_R_CLKSEL = 8'h41;

  // DAC: write/read register k (k = 0..3) at 0x10+2k / 0x11+2k
  localparam logic [7:0] DAC_W_A = 8'h10;
  localparam logic [7:0] DAC_R_A = 8'h11;

  // ADC
  localparam logic [7:0] ADC_GO      = 8'h02;  // convert; reply with result
  localparam logic [7:0] ADC_W_MUX   = 8'h50;
  localparam logic [7:0] ADC_R_MUX   = 8'h51;
  localparam logic [7:0] ADC_W_CURR  = 8'h60;  // current-source enable per input
  localparam logic [7:0] ADC_R_CURR  = 8'h61;
  localparam logic [7:0] ADC_R_RAW   = 8'h21;  // last uncorrected count
  localparam logic [7:0] ADC_R_OFS   = 8'h23;  // offset from e-fuses
  localparam logic [7:0] ADC_R_GAIN  = 8'h25;  // gain from e-fuses

  // I2C
  localparam logic [7:0] I2C_W_CTRL  = 8'h30;  // [1:0] speed, [6:2] NBYTE, [7] 10-bit mode
  localparam logic [7:0] I2C_R_CTRL  = 8'h31;
  localparam logic [7:0] I2C_R_STR   = 8'h11;  // status
  localparam logic [7:0] I2C_W_MSK   = 8'h70;  // RMW mask
  localparam logic [7:0] I2C_R_MSK   = 8'h71;
  localparam logic [7:0] I2C_W_DATA0 = 8'h40;  // .. 0x46: command buffer words
  localparam logic [7:0] I2C_R_DATA0 = 8'h41;  // .. 0x47
  localparam logic [7:0] I2C_S_W     = 8'h82;  // single byte write, data[23:16]=byte, data[9:0] addr
  localparam logic [7:0] I2C_S_R     = 8'h86;  // single byte read
  localparam logic [7:0] I2C_M_W     = 8'hDA;  // multi-byte write from buffer
  localparam logic [7:0] I2C_M_R     = 8'hDE;  // multi-byte read into buffer
  localparam logic [7:0] I2C_RMW_AND = 8'hF0;
  localparam logic [7:0] I2C_RMW_OR  = 8'hF4;
  localparam logic [7:0] I2C_RMW_XOR = 8'hF8;

  // ----------------------------------------------------- HDLC control field
  localparam logic [7:0] HDLC_CONNECT = 8'h2F;  // SABM
  localparam logic [7:0] HDLC_RESET   = 8'h8F;
  localparam logic [7:0] HDLC_TEST    = 8'hE3;
  localparam logic [7:0] HDLC_UA      = 8'h63;  // unnumbered acknowledge
  localparam logic [7:0] HDLC_FLAG    = 8'h7E;  // 01111110
  localparam logic [15:0] FCS_RESIDUE = 16'hF0B8;

  // ------------------------------------------------------------- structures
  typedef struct packed {
    logic [7:0]              tr;
    logic [7:0]              ch;
    logic [7:0]              cmd;
    logic [7:0]              len;
    logic [MAX_DATA*8-1:0]   data;     // data[7:0] is the first data byte
  } sca_cmd_t;

  typedef struct packed {
    logic [7:0]              tr;
    logic [7:0]              ch;
    logic [7:0]              err;
    logic [7:0]              len;
    logic [MAX_DATA*8-1:0]   data;
  } sca_rep_t;

  // command towards one channel (valid for one cycle)
  typedef struct packed {
    logic                    valid;
    logic [7:0]              cmd;
    logic [7:0]              len;
    logic [31:0]             data;
  } chan_req_t;

  // reply from one channel (valid held until ack)
  typedef struct packed {
    logic                    valid;
    logic                    irq;      // unsolicited (interrupt) reply
    logic [7:0]              err;
    logic [7:0]              len;
    logic [31:0]             data;
  } chan_rsp_t;

  localparam chan_rsp_t RSP_IDLE = '{valid: 1'b0, irq: 1'b0, err: 8'h00, len: 8'h00, data: 32'h0};

  // CRC-16 with G(x) = x^16 + x^12 + x^5 + 1, bits processed LSB first
  // (reflected form 0x8408), as HDLC sends them.
  function automatic logic [15:0] crc16_bit(input logic [15:0] crc, input logic b);
    logic fb;
    fb = crc[0] ^ b;
    crc16_bit = {1'b0, crc[15:1]} ^ (fb ? 16'h8408 : 16'h0000);
  endfunction

  function automatic logic [15:0] crc16_byte(input logic [15:0] crc, input logic [7:0] d);
    logic [15:0] c;
    c = crc;
    for (int i = 0; i < 8; i++) c = crc16_bit(c, d[i]);
    crc16_byte = c;
  endfunction

  // Build a channel reply with data
  function automatic chan_rsp_t rsp_make(input logic [7:0] err, input logic [7:0] len,
                                         input logic [31:0] data);
    rsp_make = '{valid: 1'b1, irq: 1'b0, err: err, len: len, data: data};
  endfunction

endpackage
