// hdlc_host: testbench model of the GBTX side of one e-link.
//
// Plays the control-room end of the link: send_frame() encodes a frame
// (flag, bytes LSB first with zero stuffing, FCS, flag) and puts it on
// tx_bits two bits per clock; between frames the line carries idle ones.
// A decoder watches rx_bits, removes stuffing, checks the FCS and queues
// every good frame (FCS bytes removed) in rx_q. The encoding is written
// here independently of the RTL, from the HDLC rules.
module hdlc_host (
  input  logic       clk,
  output logic [1:0] tx_bits,
  input  logic [1:0] rx_bits
);
  typedef byte unsigned frame_t[$];
  frame_t rx_q[$];
  int     bad_fcs = 0;

  bit     txs[$];
  int     ones_run;
  initial tx_bits = 2'b11;

  function automatic logic [15:0] fcs_calc(byte unsigned d[$]);
    logic [15:0] c = 16'hFFFF;
    foreach (d[k]) for (int i = 0; i < 8; i++)
      c = ((c[0] ^ d[k][i]) == 1'b1) ? ((c >> 1) ^ 16'h8408) : (c >> 1);
    return c;
  endfunction

  function automatic void put_byte(byte unsigned b, bit stuff);
    for (int i = 0; i < 8; i++) begin
      bit v = (b >> i) & 1;
      txs.push_back(v);
      if (stuff) begin
        if (v) begin
          ones_run++;
          if (ones_run == 5) begin txs.push_back(0); ones_run = 0; end
        end else ones_run = 0;
      end
    end
  endfunction

  task automatic send_frame(byte unsigned d[$]);
    logic [15:0] f;
    f = ~fcs_calc(d);
    ones_run = 0;
    put_byte(8'h7E, 0);
    foreach (d[k]) put_byte(d[k], 1);
    put_byte(f[7:0], 1);
    put_byte(f[15:8], 1);
    put_byte(8'h7E, 0);
    if (txs.size() % 2) txs.push_back(1);
    while (txs.size() > 0) begin
      @(negedge clk);
      tx_bits[0] = txs.pop_front();
      tx_bits[1] = txs.pop_front();
    end
    @(negedge clk);
    tx_bits = 2'b11;
  endtask

  // receiver
  int          r_ones = 0;
  bit          r_in = 0;
  logic [7:0]  r_sh;
  int          r_nb = 0;
  byte unsigned r_cur[$];

  function automatic void r_bit(bit b);
    if (b) begin
      r_ones++;
      if (r_ones <= 5 && r_in) begin r_sh = {b, r_sh[7:1]}; r_nb++; end
      if (r_ones >= 7) begin r_in = 0; r_cur.delete(); end
    end else begin
      if (r_ones == 6) begin
        if (r_in && r_cur.size() >= 4) begin
          if (fcs_calc(r_cur) == 16'hF0B8) begin
            r_cur = r_cur[0:r_cur.size()-3];
            rx_q.push_back(r_cur);
          end else bad_fcs++;
        end
        r_cur.delete(); r_in = 1; r_nb = 0;
      end else if (r_ones != 5 && r_in) begin r_sh = {b, r_sh[7:1]}; r_nb++; end
      r_ones = 0;
    end
    if (r_nb == 8) begin r_cur.push_back(r_sh); r_nb = 0; end
  endfunction

  always @(posedge clk) begin
    r_bit(rx_bits[0]);
    r_bit(rx_bits[1]);
  end
endmodule
