// tb_eport: dual e-port against two GBTX-side link models.
// A simple controller model takes every command packet from the e-port and
// answers it with a reply (same TR# and CH#, data inverted). Checks:
// CONNECT answered with UA on the link it came on; information frames with
// the expected N(S) delivered with all packet fields, eight or more in a
// row so the numbers wrap; replies sent as I-frames with rising N(S) and
// the current N(R); a wrong N(S) answered with REJ and not delivered;
// TEST payload looped back; RESET answered with UA, pulsing core_reset and
// restarting the numbers; frames for another address and over-long
// packets dropped; frames on the inactive link ignored; a CONNECT on the
// secondary link moves all traffic there and leaves the primary idle.
module tb_eport;
  import sca_pkg::*;
  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;
  logic [1:0] rx_pri, rx_sec, tx_pri, tx_sec;
  logic cmd_valid, cmd_pop = 0, rep_push = 0, rep_full, connected, active_sec, core_reset;
  sca_cmd_t cmd;
  sca_rep_t rep = '0;
  int checks = 0, failures = 0, n_core_reset = 0;
  always @(posedge clk) if (core_reset) n_core_reset++;

  eport dut (.clk, .rst_n, .rx_pri, .rx_sec, .tx_pri, .tx_sec, .cmd_valid, .cmd, .cmd_pop,
             .rep_push, .rep, .rep_full, .connected, .active_sec, .core_reset);
  hdlc_host hp (.clk, .tx_bits(rx_pri), .rx_bits(tx_pri));
  hdlc_host hs (.clk, .tx_bits(rx_sec), .rx_bits(tx_sec));

  // controller model
  sca_cmd_t got[$];
  int idle_bad_pri = 0, idle_bad_sec = 0;
  initial forever begin
    @(negedge clk);
    if (cmd_valid) begin
      sca_cmd_t c;
      c = cmd;
      got.push_back(c);
      cmd_pop = 1; @(negedge clk); cmd_pop = 0;
      repeat (3) @(negedge clk);
      while (rep_full) @(negedge clk);
      rep = '{tr: c.tr, ch: c.ch, err: 8'h00, len: c.len, data: ~c.data};
      rep_push = 1; @(negedge clk); rep_push = 0;
    end
  end
  always @(posedge clk) begin
    if (active_sec && tx_pri != 2'b11) idle_bad_pri++;
    if (!active_sec && tx_sec != 2'b11) idle_bad_sec++;
  end

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  typedef byte unsigned fr_t[$];
  task automatic send(bit sec, fr_t f);
    if (sec) hs.send_frame(f); else hp.send_frame(f);
  endtask
  task automatic recv(bit sec, output fr_t f, output bit ok, input int tmo = 4000);
    ok = 0;
    for (int t = 0; t < tmo; t++) begin
      if (!sec && hp.rx_q.size() > 0) begin f = hp.rx_q.pop_front(); ok = 1; return; end
      if (sec && hs.rx_q.size() > 0) begin f = hs.rx_q.pop_front(); ok = 1; return; end
      @(posedge clk);
    end
  endtask

  int vs, vr;   // host side: next N(S) to send, next N(S) expected from the SCA
  task automatic iframe(bit sec, int ns, byte unsigned tr, byte unsigned ch, byte unsigned c,
                        byte unsigned len, logic [31:0] d, byte unsigned addr = 8'h00);
    fr_t f;
    f = {addr, byte'({3'd0, 1'b0, 3'(ns), 1'b0}), tr, ch, c, len};
    for (int i = 0; i < len; i++) f.push_back(d[8*i +: 8]);
    send(sec, f);
  endtask

  task automatic good_cmd(bit sec, int k);
    fr_t f;
    bit ok;
    int n0 = got.size();
    logic [31:0] d = $urandom;
    iframe(sec, vs, 8'(k + 1), 8'(k % 22), 8'(k * 3), 4, d);
    recv(sec, f, ok);
    chk(ok, $sformatf("reply %0d", k));
    chk(got.size() == n0 + 1, "command delivered");
    if (got.size() == n0 + 1)
      chk(got[n0].tr == 8'(k + 1) && got[n0].ch == 8'(k % 22) && got[n0].cmd == 8'(k * 3)
          && got[n0].len == 4 && got[n0].data == d, "command fields");
    if (ok) begin
      chk(f.size() == 10 && f[0] == 8'h00 && f[1][0] == 0, "reply is an I-frame");
      chk(f[1][3:1] == 3'(vr), $sformatf("reply N(S) %0d want %0d", f[1][3:1], vr));
      chk(f[1][7:5] == 3'(vs + 1), $sformatf("reply N(R) %0d want %0d", f[1][7:5], vs + 1));
      chk(f[2] == 8'(k + 1) && f[3] == 8'(k % 22) && {f[9], f[8], f[7], f[6]} == ~d, "reply fields");
    end
    vs = (vs + 1) % 8; vr = (vr + 1) % 8;
  endtask

  task automatic connect(bit sec);
    fr_t f;
    bit ok;
    send(sec, '{8'h00, HDLC_CONNECT});
    recv(sec, f, ok);
    chk(ok && f.size() == 2 && f[1] == HDLC_UA, "CONNECT answered with UA");
    chk(connected && active_sec == sec, "connected on the right link");
    vs = 0; vr = 0;
  endtask

  initial begin
    fr_t f;
    bit ok;
    int n0;
    repeat (4) @(negedge clk); rst_n = 1;
    repeat (20) @(negedge clk);
    chk(!connected, "not connected after reset");
    // before CONNECT nothing is accepted
    iframe(0, 0, 1, 1, 1, 4, 0);
    recv(0, f, ok, 1500);
    chk(!ok && got.size() == 0, "I-frame ignored before CONNECT");
    connect(0);
    for (int k = 0; k < 12; k++) good_cmd(0, k);
    // wrong N(S)
    n0 = got.size();
    iframe(0, (vs + 3) % 8, 8'h55, 1, 1, 4, 0);
    recv(0, f, ok);
    chk(ok && f.size() == 2 && f[1] == byte'({3'(vs), 1'b0, 4'b1001}), $sformatf("REJ %h", f[1]));
    chk(got.size() == n0, "out-of-sequence frame not delivered");
    good_cmd(0, 40);
    // TEST loopback
    send(0, '{8'h00, HDLC_TEST, 8'h12, 8'h34, 8'hAB});
    recv(0, f, ok);
    chk(ok && f.size() == 5 && f[1] == HDLC_TEST && f[2] == 8'h12 && f[3] == 8'h34 && f[4] == 8'hAB,
        "TEST loopback");
    // other address, too-long packet
    n0 = got.size();
    iframe(0, vs, 1, 1, 1, 4, 0, 8'h07);
    recv(0, f, ok, 1500);
    chk(!ok && got.size() == n0, "frame for another address dropped");
    iframe(0, vs, 1, 1, 1, 4, 0);
    begin
      fr_t g;
      g = {8'h00, byte'({3'd0, 1'b0, 3'(vs), 1'b0}), 8'd1, 8'd1, 8'd1, 8'd6, 8'd0, 8'd0, 8'd0, 8'd0, 8'd0, 8'd0};
      recv(0, f, ok);   // reply to the frame just sent
      vs = (vs + 1) % 8; vr = (vr + 1) % 8;
      n0 = got.size();
      send(0, g);
      recv(0, f, ok, 1500);
      chk(!ok && got.size() == n0, "packet with LEN > 4 dropped");
    end
    good_cmd(0, 41);
    // RESET
    n0 = n_core_reset;
    send(0, '{8'h00, HDLC_RESET});
    recv(0, f, ok);
    chk(ok && f.size() == 2 && f[1] == HDLC_UA, "RESET answered with UA");
    chk(n_core_reset == n0 + 1, "core_reset pulse");
    vs = 0; vr = 0;
    good_cmd(0, 42);
    // secondary link: ignored while primary is active
    n0 = got.size();
    iframe(1, 0, 1, 1, 1, 4, 0);
    recv(1, f, ok, 1500);
    chk(!ok && got.size() == n0, "inactive link ignored");
    connect(1);
    chk(active_sec, "secondary active");
    for (int k = 0; k < 9; k++) good_cmd(1, 50 + k);
    send(1, '{8'h00, HDLC_TEST, 8'h77});
    recv(1, f, ok);
    chk(ok && f[1] == HDLC_TEST && f[2] == 8'h77, "TEST on secondary");
    chk(hp.rx_q.size() == 0, "nothing sent on the primary link");
    connect(0);
    good_cmd(0, 60);
    chk(idle_bad_pri == 0 && idle_bad_sec == 0, "inactive TX line held at idle");
    chk(hp.bad_fcs == 0 && hs.bad_fcs == 0, "no frames with a bad FCS from the SCA");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
