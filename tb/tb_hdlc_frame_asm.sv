// tb_hdlc_frame_asm: frame field gathering after the HDLC receiver.
// Byte streams are driven as hdlc_rx delivers them. Checks that good
// frames give address, control, payload and length one clock after the
// frame end, and that frames with a bad check sequence, with fewer than
// two bytes, or with more than MAXP payload bytes give no frame_valid.
module tb_hdlc_frame_asm;
  localparam int MAXP = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_first = 0, frame_end = 0, frame_ok = 0;
  logic [7:0] in_data = 0, addr, ctrl, plen;
  logic [MAXP*8-1:0] payload;
  logic frame_valid;
  int checks = 0, failures = 0, nvalid = 0;
  always @(posedge clk) if (frame_valid) nvalid++;

  hdlc_frame_asm #(.MAXP(MAXP)) dut (.clk, .rst_n, .in_valid, .in_first, .in_data, .frame_end,
    .frame_ok, .frame_valid, .addr, .ctrl, .payload, .plen);

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic frame(byte unsigned b[$], bit ok);
    foreach (b[i]) begin
      @(negedge clk); in_valid = 1; in_first = (i == 0); in_data = b[i];
      @(negedge clk); in_valid = 0; in_first = 0;
      repeat ($urandom % 3) @(negedge clk);
    end
    @(negedge clk); frame_end = 1; frame_ok = ok;
    @(negedge clk); frame_end = 0; frame_ok = 0;
    @(negedge clk);
  endtask

  initial begin
    byte unsigned b[$];
    int n0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 200; it++) begin
      int np;
      bit ok, short;
      np = $urandom % (MAXP + 3);
      ok = ($urandom % 4) != 0;
      short = (it % 17 == 3);
      b.delete();
      if (short) b.push_back(8'h00);
      else for (int i = 0; i < np + 2; i++) b.push_back(8'($urandom));
      n0 = nvalid;
      frame(b, ok);
      if (ok && !short && np <= MAXP) begin
        chk(nvalid == n0 + 1, $sformatf("frame %0d accepted (%0d payload bytes)", it, np));
        chk(addr == b[0] && ctrl == b[1] && plen == np, "address, control, length");
        for (int i = 0; i < np; i++) chk(payload[8*i +: 8] == b[i + 2], "payload byte");
      end else begin
        chk(nvalid == n0, $sformatf("frame %0d dropped (ok %0d short %0d np %0d)", it, ok, short, np));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
