// tb_hdlc_tx: self-checking test of the HDLC transmitter.
// Random frames are offered to the transmitter; a reference decoder in the
// testbench removes stuffed zeros, finds flags and checks the bytes and the
// FCS of every frame, and that no six ones ever appear inside a frame. It
// also checks the line rate: a frame of N bytes must not take more than
// (8*(N+2)*6/5 + 16)/2 clocks plus a small margin at two bits per clock.
module tb_hdlc_tx;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_last, in_ready, busy;
  logic [7:0] in_data;
  logic [1:0] tx_bits;
  int checks = 0, failures = 0;

  hdlc_tx #(.BITS(2)) dut (.clk, .rst_n, .in_valid, .in_data, .in_last, .in_ready, .tx_bits, .busy);
  always #5 clk = ~clk;

  // reference decoder
  int ones = 0;
  bit in_fr = 0;
  byte unsigned cur[$];
  byte unsigned frames[$][$];
  logic [7:0] sh; int nb = 0;
  function automatic void rx_bit(bit b);
    if (b) begin
      ones++;
      if (ones <= 5 && in_fr) begin sh = {b, sh[7:1]}; nb++; end
      if (ones >= 7) in_fr = 0;
    end else begin
      if (ones == 6) begin
        if (in_fr && cur.size() > 0) frames.push_back(cur);
        cur.delete(); in_fr = 1; nb = 0;
      end else if (ones != 5 && in_fr) begin sh = {b, sh[7:1]}; nb++; end
      ones = 0;
    end
    if (nb == 8) begin cur.push_back(sh); nb = 0; end
  endfunction
  always_ff @(posedge clk) if (rst_n) begin rx_bit(tx_bits[0]); rx_bit(tx_bits[1]); end

  function automatic logic [15:0] ref_fcs(byte unsigned d[$]);
    logic [15:0] c = 16'hFFFF;
    foreach (d[k]) for (int i = 0; i < 8; i++)
      c = ((c[0] ^ d[k][i]) == 1'b1) ? ((c >> 1) ^ 16'h8408) : (c >> 1);
    return ~c;
  endfunction

  initial begin
    byte unsigned sent[$][$];
    in_valid = 0; in_last = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);
    for (int n = 0; n < 8; n++) begin
      byte unsigned fr[$];
      int len, t0, t1;
      fr.delete();
      len = 3 + n;
      for (int k = 0; k < len; k++) fr.push_back((n == 2) ? 8'hFF : 8'($urandom));
      sent.push_back(fr);
      t0 = $time;
      foreach (fr[k]) begin
        in_valid <= 1; in_data <= fr[k]; in_last <= (k == len - 1);
        do @(negedge clk); while (!in_ready);
        @(posedge clk);
      end
      in_valid <= 0; in_last <= 0;
      do @(negedge clk); while (busy);
      t1 = $time;
      checks++;
      if ((t1 - t0) / 10 > (8 * (len + 2) * 6 / 5 + 16) / 2 + 8) begin
        failures++; $display("frame %0d too slow: %0d clocks", n, (t1 - t0) / 10);
      end
      if (n % 3 == 0) repeat (20) @(posedge clk);
    end
    repeat (40) @(posedge clk);
    checks++;
    if (frames.size() != sent.size()) begin failures++; $display("got %0d frames, sent %0d", frames.size(), sent.size()); end
    else for (int n = 0; n < sent.size(); n++) begin
      logic [15:0] f;
      f = ref_fcs(sent[n]);
      checks++;
      if (frames[n].size() != sent[n].size() + 2) begin failures++; $display("frame %0d size %0d", n, frames[n].size()); end
      else begin
        foreach (sent[n][k]) begin checks++; if (frames[n][k] != sent[n][k]) failures++; end
        checks++;
        if (frames[n][sent[n].size()] != f[7:0] || frames[n][sent[n].size()+1] != f[15:8]) begin
          failures++; $display("frame %0d bad FCS", n);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
