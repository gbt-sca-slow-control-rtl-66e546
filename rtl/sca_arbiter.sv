// sca_arbiter: round-robin arbiter for the channel replies.
//
// Any number of channels may finish at once (all 16 I2C masters run
// concurrently), but replies leave one at a time through the e-port. Each
// clock with take high, the requester following the last granted one in
// circular order wins; grant is a one-hot vector and grant_idx its index,
// both combinational, valid while any_req is high. The pointer moves only
// when take is high, so a requester keeps its grant until served.
module sca_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 take,
  output logic [N-1:0]         grant,
  output logic [$clog2(N)-1:0] grant_idx,
  output logic                 any_req
);
  localparam int unsigned IW = $clog2(N);
  logic [IW-1:0] last;

  always_comb begin
    grant     = '0;
    grant_idx = '0;
    for (int k = int'(N); k >= 1; k--) begin
      int unsigned j;
      j = (int'(last) + k) % N;
      if (req[j]) begin
        grant     = '0;
        grant[j]  = 1'b1;
        grant_idx = IW'(j);
      end
    end
  end
  assign any_req = |req;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              last <= IW'(N - 1);
    else if (take && any_req) last <= grant_idx;
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) any_req |-> $onehot(grant));
endmodule
