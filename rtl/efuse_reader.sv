// efuse_reader: copies the e-fuse banks into registers after reset.
//
// The e-fuse banks are read one bit at a time (fuse_addr selects the bit,
// fuse_bit returns it from every bank at once, so all banks are read in
// parallel). After reset the reader steps fuse_addr through the BITS bit
// positions, one per clock, with fuse_rd high, and shifts each bank's bit
// into its word; done goes high after BITS + 1 clocks and the words stay
// valid until the next reset. Words are in bank order: 0 chip id,
// 1 ADC offset, 2 ADC gain; further banks are spare. The bank contents and
// the serial read are this design's choices; the source shows five e-fuse
// banks read by the ADC's calibration logic.
module efuse_reader #(
  parameter int unsigned NBANK = 5,
  parameter int unsigned BITS  = 32
) (
  input  logic                  clk,
  input  logic                  rst_n,
  output logic                  fuse_rd,
  output logic [$clog2(BITS)-1:0] fuse_addr,
  input  logic [NBANK-1:0]      fuse_bit,
  output logic [BITS-1:0]       word [NBANK],
  output logic                  done
);
  localparam int unsigned AW = $clog2(BITS);
  logic [AW:0] n;     // bits read so far
  logic        rd_q;

  assign fuse_rd   = !done && (n < (AW+1)'(BITS));
  assign fuse_addr = n[AW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n    <= '0;
      rd_q <= 1'b0;
      done <= 1'b0;
      for (int b = 0; b < int'(NBANK); b++) word[b] <= '0;
    end else begin
      rd_q <= fuse_rd;
      if (fuse_rd) begin
        n <= n + 1'b1;
        for (int b = 0; b < int'(NBANK); b++) word[b][fuse_addr] <= fuse_bit[b];
      end
      if (!fuse_rd && rd_q) done <= 1'b1;
    end
  end
endmodule
