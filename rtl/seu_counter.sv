// seu_counter: counts single event upsets seen by the voted registers.
//
// Each clock, the number of set bits in seu_in (one per protected
// register) is added to a WIDTH-bit counter that saturates at all ones.
// clear sets it back to zero. The network controller reads it through the
// control channel.
module seu_counter #(
  parameter int unsigned N     = 1,
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N-1:0]     seu_in,
  input  logic             clear,
  output logic [WIDTH-1:0] count
);
  logic [WIDTH:0] sum;
  always_comb sum = {1'b0, count} + (WIDTH+1)'($countones(seu_in));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     count <= '0;
    else if (clear) count <= '0;
    else            count <= sum[WIDTH] ? '1 : sum[WIDTH-1:0];
  end
endmodule
