// tmr_reg: triple-redundant register with majority voting and scrubbing.
//
// Radiation hardening of configuration state: three copies of the register
// are written together; the output is the bitwise majority of the three.
// Every clock the voted value is written back into all copies, so a single
// upset is corrected one clock after it happens, and seu pulses for that
// clock. inject flips bit 0 of copy 1 for one clock; it exists only to
// exercise the detection path and is tied low in normal use.
// A synthesis flow must keep the three copies apart (no register merging).
module tmr_reg #(
  parameter int unsigned    WIDTH = 8,
  parameter logic [WIDTH-1:0] INIT = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [WIDTH-1:0] d,
  input  logic             inject,
  output logic [WIDTH-1:0] q,
  output logic             seu
);
  logic [WIDTH-1:0] c0, c1, c2;

  assign q   = (c0 & c1) | (c1 & c2) | (c0 & c2);
  assign seu = (c0 != c1) || (c1 != c2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c0 <= INIT;
      c1 <= INIT;
      c2 <= INIT;
    end else begin
      c0 <= we ? d : q;
      c1 <= (we ? d : q) ^ {{(WIDTH-1){1'b0}}, inject};
      c2 <= we ? d : q;
    end
  end
endmodule
