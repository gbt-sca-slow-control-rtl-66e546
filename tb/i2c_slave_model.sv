// i2c_slave_model: testbench model of an I2C slave device.
//
// Answers at 7-bit address ADDR7 or, when TEN is set, at 10-bit address
// ADDR10. Holds a 16-byte memory with an internal pointer that restarts at
// 0 with every transfer: written bytes fill mem[0], mem[1], ..., reads
// return mem[0], mem[1], .... sda_pull is its open-drain pull-down. It
// follows the bus on SCL/SDA edges, as a real device does.
module i2c_slave_model #(
  parameter logic [6:0] ADDR7  = 7'h21,
  parameter logic [9:0] ADDR10 = 10'h2A5,
  parameter bit         TEN    = 0
) (
  input  logic scl,
  input  logic sda,
  output logic sda_pull
);
  byte unsigned mem [16];
  int   bitc, ptr, nbyte;
  logic [7:0] sh;
  bit   active, rd, acking, sending, hi_ok;
  bit   ten_read_ok;
  int   starts = 0;
  initial begin sda_pull = 0; active = 0; ten_read_ok = 0; end

  always @(negedge sda) if (scl) begin
    // START or repeated START
    starts++;
    active = 1; bitc = 0; nbyte = 0; ptr = 0; acking = 0; sending = 0; rd = 0;
  end
  always @(posedge sda) if (scl) begin
    active = 0; sda_pull = 0; ten_read_ok = 0;
  end

  always @(posedge scl) if (active) begin
    if (acking) begin
      // nothing: master samples our ack
    end else if (sending) begin
      if (bitc == 8) begin
        if (sda) begin sending = 0; active = 0; end   // NACK: master is done
      end
    end else if (bitc < 8) begin
      sh = {sh[6:0], sda};
      bitc++;
    end
  end

  always @(negedge scl) if (active) begin
    if (acking) begin
      acking   = 0;
      sda_pull = 0;
      bitc     = 0;
      if (sending) sda_pull = !mem[ptr][7];
    end else if (sending) begin
      if (bitc == 8) begin
        // master ACKed: next byte
        ptr++;
        bitc = 0;
        sda_pull = !mem[ptr % 16][7];
      end else begin
        bitc++;
        if (bitc < 8) sda_pull = !mem[ptr % 16][7 - bitc];
        else sda_pull = 0;       // release for master ack
      end
    end else if (bitc == 8) begin
      bit ack;
      ack = 0;
      if (nbyte == 0) begin
        if (!TEN && sh[7:1] == ADDR7) begin ack = 1; rd = sh[0]; end
        if (TEN && sh[7:3] == 5'b11110 && sh[2:1] == ADDR10[9:8]) begin
          ack = 1; rd = sh[0];
          if (rd && !ten_read_ok) ack = 0;
        end
      end else if (TEN && nbyte == 1 && !rd) begin
        ack = (sh == ADDR10[7:0]);
        if (ack) ten_read_ok = 1;
      end else begin
        mem[ptr % 16] = sh; ptr++; ack = 1;
      end
      if (!ack) active = 0;
      nbyte++;
      sda_pull = ack;
      acking   = ack;
      sending  = ack && rd;
      if (sending) ptr = 0;
    end
  end
endmodule
