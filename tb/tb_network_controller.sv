// tb_network_controller: command dispatch and reply building.
// Channel models 1..21 answer each command after a random delay with
// data = command data + channel number; channel 7 can also raise an
// unsolicited (interrupt) reply. Checks: control channel (enable mask,
// chip id, SEU counter read and clear), ERR_DISABLED before channels are
// enabled, ERR_CHANNEL, ERR_LENGTH, ERR_BUSY for a second command to a
// channel still working, many commands in flight at once with every reply
// carrying its own TR# and CH#, TR# = 0xFF on interrupt replies, reply
// back-pressure, the auxiliary port taking over when test_en is high, and
// the SEU flag of the voted enable register.
module tb_network_controller;
  import sca_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic test_en = 0;
  sca_cmd_t ep_cmd, ax_cmd;
  logic ep_cmd_valid, ax_cmd_valid, ep_cmd_pop, ax_cmd_pop, ep_rep_push, ax_rep_push;
  logic ep_rep_full = 0, ax_rep_full = 0;
  sca_rep_t rep;
  chan_req_t req [N_CHAN];
  chan_rsp_t rsp [N_CHAN];
  logic [N_CHAN-1:0] rsp_ack, chan_en;
  logic [31:0] seu_count = 32'd1234;
  logic seu_clear, seu_flag, seu_inject = 0;
  int checks = 0, failures = 0, n_clear = 0, n_flag = 0;
  always @(posedge clk) begin if (seu_clear) n_clear++; if (seu_flag) n_flag++; end

  network_controller dut (.clk, .rst_n, .test_en, .ep_cmd_valid, .ep_cmd, .ep_cmd_pop,
    .ep_rep_push, .ep_rep_full, .ax_cmd_valid, .ax_cmd, .ax_cmd_pop, .ax_rep_push, .ax_rep_full,
    .rep, .req, .rsp, .rsp_ack, .chan_en, .seu_count, .seu_clear, .seu_flag, .seu_inject,
    .chip_id(32'h5CA0_0042));

  // command queues (first-word fall-through, like the port FIFOs)
  sca_cmd_t epq[$], axq[$];
  assign ep_cmd_valid = epq.size() > 0;
  assign ax_cmd_valid = axq.size() > 0;
  always_comb ep_cmd = epq.size() > 0 ? epq[0] : '0;
  always_comb ax_cmd = axq.size() > 0 ? axq[0] : '0;
  sca_rep_t ep_reps[$], ax_reps[$];
  always @(posedge clk) if (rst_n) begin
    if (ep_cmd_pop) void'(epq.pop_front());
    if (ax_cmd_pop) void'(axq.pop_front());
    if (ep_rep_push) ep_reps.push_back(rep);
    if (ax_rep_push) ax_reps.push_back(rep);
  end

  // channel models
  int irq_req = 0;
  for (genvar g = 1; g < N_CHAN; g++) begin : g_ch
    chan_rsp_t r = RSP_IDLE;
    assign rsp[g] = r;
    initial forever begin
      @(posedge clk);
      if (req[g].valid) begin
        logic [31:0] d;
        d = req[g].data + g;
        repeat (1 + $urandom % 40) @(posedge clk);
        r <= '{valid: 1'b1, irq: 1'b0, err: 8'h00, len: 8'd4, data: d};
        do @(posedge clk); while (!rsp_ack[g]);
        r <= RSP_IDLE;
      end else if (g == 7 && irq_req > 0) begin
        irq_req--;
        r <= '{valid: 1'b1, irq: 1'b1, err: 8'h00, len: 8'd4, data: 32'h1A1A};
        do @(posedge clk); while (!rsp_ack[g]);
        r <= RSP_IDLE;
      end
    end
  end
  assign rsp[0] = RSP_IDLE;

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic put(bit ax, byte unsigned tr, byte unsigned ch, byte unsigned c, byte unsigned len, logic [31:0] d);
    sca_cmd_t x;
    x = '{tr: tr, ch: ch, cmd: c, len: len, data: d};
    @(negedge clk);
    if (ax) axq.push_back(x); else epq.push_back(x);
  endtask

  task automatic get(bit ax, output sca_rep_t r, input int tmo = 2000);
    int t = 0;
    while ((ax ? ax_reps.size() : ep_reps.size()) == 0 && t < tmo) begin @(negedge clk); t++; end
    chk(t < tmo, "reply arrived");
    if (t < tmo) r = ax ? ax_reps.pop_front() : ep_reps.pop_front();
    else r = '0;
  endtask

  task automatic txn(bit ax, byte unsigned tr, byte unsigned ch, byte unsigned c, logic [31:0] d,
                     output sca_rep_t r, input byte unsigned len = 4);
    put(ax, tr, ch, c, len, d);
    get(ax, r);
    chk(r.tr == tr && r.ch == ch, $sformatf("reply tr/ch %h/%h want %h/%h", r.tr, r.ch, tr, ch));
  endtask

  initial begin
    sca_rep_t r;
    repeat (3) @(negedge clk); rst_n = 1;
    // control channel
    txn(0, 1, CH_CTRL, CTRL_R_ID, 0, r);
    chk(r.err == 0 && r.data[31:0] == 32'h5CA0_0042, "chip id");
    txn(0, 2, CH_CTRL, CTRL_R_ENA, 0, r);
    chk(r.data[N_CHAN-1:0] == 1, "only the control channel enabled after reset");
    txn(0, 3, 5, 8'h10, 0, r);
    chk(r.err == ERR_DISABLED, "disabled channel");
    txn(0, 4, CH_CTRL, CTRL_W_ENA, 32'h003F_FFFF, r);
    chk(r.err == 0, "write enables");
    txn(0, 5, CH_CTRL, CTRL_R_ENA, 0, r);
    chk(r.data[N_CHAN-1:0] == 22'h3F_FFFF && chan_en == 22'h3F_FFFF, "enables read back");
    txn(0, 6, CH_CTRL, CTRL_R_SEU, 0, r);
    chk(r.data[31:0] == 1234, "SEU counter read");
    txn(0, 7, CH_CTRL, CTRL_C_SEU, 0, r);
    chk(n_clear == 1, "SEU counter clear pulse");
    // error replies
    txn(0, 8, 8'h30, 8'h00, 0, r);
    chk(r.err == ERR_CHANNEL, "bad channel");
    txn(0, 9, 3, 8'h00, 0, r, 5);
    chk(r.err == ERR_LENGTH, "bad length");
    // single command round trip on every channel
    for (int ch = 1; ch < N_CHAN; ch++) begin
      logic [31:0] d;
      d = $urandom;
      txn(0, 8'(16 + ch), 8'(ch), 8'h11, d, r);
      chk(r.err == 0 && r.len == 4 && r.data[31:0] == d + ch, $sformatf("channel %0d data", ch));
    end
    // busy
    put(0, 8'h60, 9, 8'h11, 4, 32'h100);
    put(0, 8'h61, 9, 8'h11, 4, 32'h200);
    get(0, r);
    chk(r.tr == 8'h61 && r.err == ERR_BUSY, $sformatf("busy channel reply %h %h", r.tr, r.err));
    get(0, r);
    chk(r.tr == 8'h60 && r.err == 0 && r.data[31:0] == 32'h109, "first command still completes");
    // many in flight
    begin
      bit seen [N_CHAN];
      for (int ch = 1; ch < N_CHAN; ch++) put(0, 8'(ch + 100), 8'(ch), 8'h22, 4, 32'(ch * 1000));
      for (int k = 1; k < N_CHAN; k++) begin
        get(0, r);
        chk(r.err == 0 && r.ch >= 1 && int'(r.ch) < N_CHAN && r.tr == r.ch + 8'd100 &&
            r.data[31:0] == 32'(r.ch) * 1000 + 32'(r.ch), $sformatf("concurrent reply ch %0d", r.ch));
        if (int'(r.ch) < N_CHAN) seen[r.ch[4:0]] = 1;
      end
      for (int ch = 1; ch < N_CHAN; ch++) chk(seen[ch], "every channel answered");
    end
    // interrupt reply
    irq_req = 1;
    get(0, r);
    chk(r.tr == 8'hFF && r.ch == 7 && r.data[31:0] == 32'h1A1A, "interrupt reply TR 0xFF");
    // back-pressure
    ep_rep_full = 1;
    put(0, 8'h70, 4, 8'h11, 4, 32'h0);
    repeat (100) @(negedge clk);
    chk(ep_reps.size() == 0, "no reply while the reply FIFO is full");
    ep_rep_full = 0;
    get(0, r);
    chk(r.tr == 8'h70, "reply after back-pressure");
    // auxiliary port
    test_en = 1;
    put(0, 8'h80, 4, 8'h11, 4, 32'h0);
    txn(1, 8'h81, 6, 8'h11, 32'h10, r);
    chk(r.data[31:0] == 32'h16, "auxiliary port command");
    chk(epq.size() == 1 && ep_reps.size() == 0, "e-port ignored in test mode");
    test_en = 0;
    get(0, r);
    chk(r.tr == 8'h80, "e-port command served after test mode");
    // SEU in the enable register
    n_flag = 0;
    @(negedge clk); seu_inject = 1; @(negedge clk); seu_inject = 0;
    repeat (3) @(negedge clk);
    chk(n_flag == 1 && chan_en == 22'h3F_FFFF, "upset flagged, enables unchanged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
