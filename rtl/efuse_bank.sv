// efuse_bank: behavioural model of one bank of electrically programmable
// fuses (a process-specific macro, not synthesizable logic).
//
// VALUE is the pattern blown at production test. A read returns the bit at
// addr while rd is high, 0 otherwise (fuse sensing); the model answers
// after a short sensing delay. Programming (the fuse program pulse pad)
// is not modelled: the value is fixed by the parameter.
module efuse_bank #(
  parameter int unsigned BITS  = 32,
  parameter logic [BITS-1:0] VALUE = '0
) (
  input  logic                    rd,
  input  logic [$clog2(BITS)-1:0] addr,
  output logic                    q
);
  assign #1 q = rd & VALUE[addr];
endmodule
