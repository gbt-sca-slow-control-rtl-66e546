// network_controller: command decoder and reply builder of the SCA.
//
// Takes SCA command packets (TR#, CH#, CMD, LEN, data) from the active
// e-port, or from the auxiliary I2C port when test_en is high, and hands
// each to its channel as a one-clock chan_req_t. Every channel works on its
// own; when one finishes it raises a chan_rsp_t, the round-robin arbiter
// picks one finished channel per clock, and the controller turns it into a
// reply packet (TR# of the command, CH#, ERR, LEN, data) for the same port.
//
// The controller answers by itself, through an error slot that takes part
// in the arbitration like a channel, when the channel number does not
// exist (ERR_CHANNEL), LEN exceeds MAX_DATA (ERR_LENGTH), the channel is
// not enabled (ERR_DISABLED) or still busy with an earlier command
// (ERR_BUSY). Channel 0, the control channel, lives here: it holds the
// channel enable mask (voted, triple-redundant), reads and clears the SEU
// counter and returns the chip id. Unsolicited replies (rsp.irq, GPIO
// interrupts) go out with TR# = 0xFF.
//
// Timing: a command is popped and dispatched in one clock when its target
// is free; a reply is pushed the clock the arbiter grants it and the
// reply FIFO has room. All encodings are this design's choices.
module network_controller
  import sca_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                test_en,       // auxiliary port replaces the e-port
  // e-port
  input  logic                ep_cmd_valid,
  input  sca_cmd_t            ep_cmd,
  output logic                ep_cmd_pop,
  output logic                ep_rep_push,
  input  logic                ep_rep_full,
  // auxiliary I2C port
  input  logic                ax_cmd_valid,
  input  sca_cmd_t            ax_cmd,
  output logic                ax_cmd_pop,
  output logic                ax_rep_push,
  input  logic                ax_rep_full,
  output sca_rep_t            rep,           // shared by both ports
  // channels (index = channel number; index 0 unused, internal)
  output chan_req_t           req [N_CHAN],
  input  chan_rsp_t           rsp [N_CHAN],
  output logic [N_CHAN-1:0]   rsp_ack,
  // control and status
  output logic [N_CHAN-1:0]   chan_en,
  input  logic [31:0]         seu_count,
  output logic                seu_clear,
  output logic                seu_flag,      // voted register upset this clock
  input  logic                seu_inject,
  input  logic [31:0]         chip_id
);
  // ---------------------------------------------------- input port select
  wire       c_valid = test_en ? ax_cmd_valid : ep_cmd_valid;
  sca_cmd_t  c;
  assign c = test_en ? ax_cmd : ep_cmd;
  wire       rep_full = test_en ? ax_rep_full : ep_rep_full;

  // ------------------------------------------------------ channel enables
  logic [N_CHAN-1:0] en_q;
  logic              en_we;
  logic [N_CHAN-1:0] en_d;
  tmr_reg #(.WIDTH(N_CHAN), .INIT(N_CHAN'(1))) u_en (
    .clk, .rst_n, .we(en_we), .d(en_d), .inject(seu_inject), .q(en_q), .seu(seu_flag));
  assign chan_en = en_q | N_CHAN'(1);

  // ------------------------------------------------------- state
  logic [N_CHAN-1:0] pending;
  logic [7:0]        tr_q [N_CHAN];
  chan_rsp_t         err_rsp;       // controller's own error replies
  logic [7:0]        err_tr, err_ch;
  chan_rsp_t         ctl_rsp;       // control channel reply

  // arbitration over channels 0..N_CHAN-1 plus the error slot (index N_CHAN)
  localparam int unsigned NA = N_CHAN + 1;
  logic [NA-1:0]         areq, agnt;
  logic [$clog2(NA)-1:0] aidx;
  logic                  aany, take;

  always_comb begin
    for (int i = 0; i < int'(N_CHAN); i++) areq[i] = (i == 0) ? ctl_rsp.valid : rsp[i].valid;
    areq[N_CHAN] = err_rsp.valid;
  end

  sca_arbiter #(.N(NA)) u_arb (.clk, .rst_n, .req(areq), .take, .grant(agnt),
                               .grant_idx(aidx), .any_req(aany));

  assign take = aany && !rep_full;

  chan_rsp_t g;
  always_comb begin
    if (aidx == $clog2(NA)'(N_CHAN)) g = err_rsp;
    else if (aidx == '0)             g = ctl_rsp;
    else                             g = rsp[aidx];
    rep.err  = g.err;
    rep.len  = g.len;
    rep.data = g.data;
    if (aidx == $clog2(NA)'(N_CHAN)) begin
      rep.tr = err_tr;
      rep.ch = err_ch;
    end else begin
      rep.tr = g.irq ? 8'hFF : tr_q[aidx];
      rep.ch = 8'(aidx);
    end
  end
  assign ep_rep_push = take && !test_en;
  assign ax_rep_push = take && test_en;
  always_comb for (int i = 0; i < int'(N_CHAN); i++) rsp_ack[i] = take && agnt[i] && (i != 0);

  // ------------------------------------------------------- dispatch
  logic       bad_ch, bad_len, dis, busy, to_ctl, can_err, pop;
  logic [7:0] ecode;
  always_comb begin
    bad_ch  = (c.ch >= 8'(N_CHAN));
    bad_len = (c.len > 8'(MAX_DATA));
    dis     = !bad_ch && !chan_en[c.ch[4:0]];
    busy    = !bad_ch && (c.ch == 8'd0 ? ctl_rsp.valid : pending[c.ch[4:0]]);
    to_ctl  = (c.ch == 8'd0);
    ecode   = bad_ch ? ERR_CHANNEL : bad_len ? ERR_LENGTH : dis ? ERR_DISABLED :
              busy ? ERR_BUSY : ERR_NONE;
    // an error reply needs the error slot to be free
    can_err = !err_rsp.valid || (take && aidx == $clog2(NA)'(N_CHAN));
    pop     = c_valid && ((ecode != ERR_NONE) ? can_err : 1'b1);
  end
  assign ep_cmd_pop = pop && !test_en;
  assign ax_cmd_pop = pop && test_en;

  always_comb begin
    for (int i = 0; i < int'(N_CHAN); i++) begin
      req[i].valid = pop && (ecode == ERR_NONE) && (c.ch == 8'(i)) && (i != 0);
      req[i].cmd   = c.cmd;
      req[i].len   = c.len;
      req[i].data  = c.data[31:0];
    end
  end

  // control channel command execution
  always_comb begin
    en_we = 1'b0;
    en_d  = c.data[N_CHAN-1:0];
    if (pop && ecode == ERR_NONE && to_ctl && c.cmd == CTRL_W_ENA) en_we = 1'b1;
  end
  assign seu_clear = pop && ecode == ERR_NONE && to_ctl && c.cmd == CTRL_C_SEU;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= '0;
      err_rsp <= RSP_IDLE;
      ctl_rsp <= RSP_IDLE;
      err_tr  <= '0;
      err_ch  <= '0;
      for (int i = 0; i < int'(N_CHAN); i++) tr_q[i] <= '0;
    end else begin
      // replies leaving
      if (take && aidx == $clog2(NA)'(N_CHAN)) err_rsp.valid <= 1'b0;
      if (take && aidx == '0)                  ctl_rsp.valid <= 1'b0;
      for (int i = 1; i < int'(N_CHAN); i++)
        if (rsp_ack[i] && !rsp[i].irq) pending[i] <= 1'b0;
      // commands arriving
      if (pop) begin
        if (ecode != ERR_NONE) begin
          err_rsp <= rsp_make(ecode, 8'd0, 32'h0);
          err_tr  <= c.tr;
          err_ch  <= c.ch;
        end else if (to_ctl) begin
          tr_q[0] <= c.tr;
          case (c.cmd)
            CTRL_W_ENA: ctl_rsp <= rsp_make(ERR_NONE, 8'd0, 32'h0);
            CTRL_R_ENA: ctl_rsp <= rsp_make(ERR_NONE, 8'd4, 32'(chan_en));
            CTRL_R_SEU: ctl_rsp <= rsp_make(ERR_NONE, 8'd4, seu_count);
            CTRL_C_SEU: ctl_rsp <= rsp_make(ERR_NONE, 8'd0, 32'h0);
            CTRL_R_ID:  ctl_rsp <= rsp_make(ERR_NONE, 8'd4, chip_id);
            default:    ctl_rsp <= rsp_make(ERR_COMMAND, 8'd0, 32'h0);
          endcase
        end else begin
          pending[c.ch[4:0]] <= 1'b1;
          tr_q[c.ch[4:0]]    <= c.tr;
        end
      end
    end
  end

  // a channel must not answer a command it was never given, except by irq
  for (genvar i = 1; i < N_CHAN; i++) begin : g_chk
    a_rsp_pending: assert property (@(posedge clk) disable iff (!rst_n)
      (rsp[i].valid && !rsp[i].irq) |-> pending[i]);
  end
endmodule
