// tb_hdlc_rx: self-checking test of the HDLC receiver.
// A reference encoder in the testbench builds bit streams (flags, stuffed
// bytes, FCS) for random frames and feeds them two bits per clock. Checks:
// every payload byte arrives in order, first-byte marking, frame_ok for good
// frames, frame_ok = 0 for a frame with a corrupted bit, and silence for an
// aborted frame (seven ones).
module tb_hdlc_rx;
  logic clk = 0, rst_n = 0;
  logic [1:0] rx_bits;
  logic out_valid, out_first, frame_end, frame_ok;
  logic [7:0] out_data;
  int checks = 0, failures = 0;

  hdlc_rx #(.BITS(2)) dut (.clk, .rst_n, .en(1'b1), .rx_bits, .out_valid, .out_first,
                           .out_data, .frame_end, .frame_ok);
  always #5 clk = ~clk;

  bit stream[$];
  byte unsigned got[$];
  int nend = 0, nok = 0, nfirst = 0;

  function automatic void put_flag();
    for (int i = 0; i < 8; i++) stream.push_back((8'h7E >> i) & 1);
  endfunction

  int ones_run;
  function automatic void put_byte(byte unsigned b);
    for (int i = 0; i < 8; i++) begin
      bit v = (b >> i) & 1;
      stream.push_back(v);
      if (v) begin
        ones_run++;
        if (ones_run == 5) begin stream.push_back(0); ones_run = 0; end
      end else ones_run = 0;
    end
  endfunction

  function automatic logic [15:0] ref_crc(byte unsigned d[$]);
    logic [15:0] c = 16'hFFFF;
    foreach (d[k]) for (int i = 0; i < 8; i++) begin
      if ((c[0] ^ d[k][i]) == 1'b1) c = (c >> 1) ^ 16'h8408; else c = c >> 1;
    end
    return c;
  endfunction

  function automatic void put_frame(byte unsigned d[$]);
    logic [15:0] f;
    f = ~ref_crc(d);
    ones_run = 0;
    put_flag();
    foreach (d[k]) put_byte(d[k]);
    put_byte(f[7:0]);
    put_byte(f[15:8]);
    put_flag();
  endfunction

  always_ff @(posedge clk) begin
    if (out_valid) begin
      got.push_back(out_data);
      if (out_first) nfirst++;
    end
    if (frame_end) begin
      nend++;
      if (frame_ok) nok++;
    end
  end

  task automatic drive_stream();
    while (stream.size() % 2) stream.push_back(1);
    while (stream.size() > 0) begin
      rx_bits[0] = stream.pop_front();
      rx_bits[1] = stream.pop_front();
      @(posedge clk);
    end
    rx_bits = 2'b11;
    repeat (4) @(posedge clk);
  endtask

  initial begin
    byte unsigned fr[$];
    rx_bits = 2'b11;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    // 1: several good frames, incl. bytes full of ones (stuffing)
    for (int n = 0; n < 6; n++) begin
      int len;
      fr.delete(); got.delete(); nend = 0; nok = 0; nfirst = 0;
      len = 2 + (n % 5) * 2;
      for (int k = 0; k < len; k++) fr.push_back((n == 1) ? 8'hFF : 8'($urandom));
      put_frame(fr);
      drive_stream();
      checks++; if (nend != 1 || nok != 1) begin failures++; $display("frame %0d: end=%0d ok=%0d", n, nend, nok); end
      checks++; if (nfirst != 1) begin failures++; $display("frame %0d: first=%0d", n, nfirst); end
      checks++; if (got.size() != fr.size()) begin failures++; $display("frame %0d: %0d bytes, want %0d", n, got.size(), fr.size()); end
      else foreach (fr[k]) begin checks++; if (got[k] != fr[k]) begin failures++; $display("byte %0d %h/%h", k, got[k], fr[k]); end end
    end
    // 2: corrupted frame -> frame_ok = 0
    fr.delete(); nend = 0; nok = 0;
    for (int k = 0; k < 4; k++) fr.push_back(8'($urandom));
    put_frame(fr);
    stream[20] = !stream[20];
    drive_stream();
    checks++; if (nend != 1 || nok != 0) begin failures++; $display("bad frame: end=%0d ok=%0d", nend, nok); end
    // 3: aborted frame (seven ones in place of the FCS): no good frame
    fr.delete(); nend = 0; nok = 0;
    ones_run = 0; put_flag(); put_byte(8'h01); put_byte(8'h12); put_byte(8'h34);
    for (int i = 0; i < 9; i++) stream.push_back(1);
    drive_stream();
    checks++; if (nok != 0) begin failures++; $display("abort: ok=%0d", nok); end
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
