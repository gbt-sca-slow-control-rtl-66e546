// hdlc_frame_asm: gathers the bytes of one received HDLC frame.
//
// Takes the byte stream of hdlc_rx (FCS already removed) and stores address,
// control and up to MAXP payload bytes. When hdlc_rx reports a good frame
// end, frame_valid pulses for one clock with the fields; a frame with a bad
// FCS, an abort, or more than MAXP payload bytes (too_long) is dropped
// silently. Payload byte 0 is the first one received.
module hdlc_frame_asm #(
  parameter int unsigned MAXP = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic                in_first,
  input  logic [7:0]          in_data,
  input  logic                frame_end,
  input  logic                frame_ok,
  output logic                frame_valid,
  output logic [7:0]          addr,
  output logic [7:0]          ctrl,
  output logic [MAXP*8-1:0]   payload,
  output logic [7:0]          plen
);
  logic [7:0] n;        // bytes received in this frame
  logic       too_long;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n           <= '0;
      too_long    <= 1'b0;
      addr        <= '0;
      ctrl        <= '0;
      payload     <= '0;
      plen        <= '0;
      frame_valid <= 1'b0;
    end else begin
      frame_valid <= frame_end && frame_ok && !too_long && (n >= 8'd2);
      if (frame_end) begin
        n        <= '0;
        too_long <= 1'b0;
      end
      if (in_valid) begin
        logic [7:0] k;
        k = in_first ? 8'd0 : n;
        if (in_first) too_long <= 1'b0;
        if (k == 8'd0) begin
          addr    <= in_data;
          payload <= '0;
        end else if (k == 8'd1) begin
          ctrl <= in_data;
        end else if (k < 8'(MAXP + 2)) begin
          payload[(k-8'd2)*8 +: 8] <= in_data;
        end else begin
          too_long <= 1'b1;
        end
        n <= k + 8'd1;
        if (k >= 8'd2 && k < 8'(MAXP + 2)) plen <= k - 8'd1;
        else if (k < 8'd2) plen <= 8'd0;
      end
    end
  end
endmodule
