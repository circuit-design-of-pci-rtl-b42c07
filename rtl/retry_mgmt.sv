// retry_mgmt: retry management module of the Data Link Layer transmitter.
//
// Holds every sent TLP until the link partner acknowledges it and replays
// the unacknowledged ones after a NAK or a replay timer timeout. It joins
// the retry control logic (retry_ctrl), the retry buffer holding the TLP
// copies, the sot buffer holding each TLP's start address by sequence
// number, and the replay timer. See retry_ctrl for the rules.
//
// Interface: `wr_*` takes the TLP copies and sequence numbers from the
// package module, `rp_*` / `reply_*` is the replay path back to it,
// `rvd_ack`, `rvd_nak` and `rcvd_acknak_seq` come from the DLLP receiver,
// `tlp_sent` marks the last beat of every packaged TLP sent to the
// Physical Layer (it starts the replay timer), `timer_limit` comes from
// the configuration interface.
// Timing: buffers have one clock of read latency; see retry_ctrl.
module retry_mgmt
  import pcie_retry_pkg::*;
#(
  parameter int unsigned RB_DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_valid,
  input  tlp_beat_t    wr_beat,
  input  seq_t         wr_seq,
  output logic [9:0]   rb_free,
  input  logic         rvd_ack,
  input  logic         rvd_nak,
  input  seq_t         rcvd_acknak_seq,
  input  logic         tlp_sent,
  input  logic [15:0]  timer_limit,
  output logic         reply_req,
  input  logic         reply_grant,
  output logic         rp_valid,
  output tlp_beat_t    rp_beat,
  output seq_t         rp_seq,
  input  logic         rp_ready,
  input  logic         pkg_idle,
  output logic         reply_done,
  output logic         link_retrain_req,
  input  logic         link_retrain_done,
  output seq_t         ackd_seq,
  output logic [1:0]   replay_num,
  output retry_state_e state,
  output logic         replay_start,
  output logic         retrain_start,
  output logic         timer_expire
);

  localparam int unsigned AW = $clog2(RB_DEPTH);

  logic          rb_we, rb_re, sb_we, sb_re;
  logic [AW-1:0] rb_addr, sb_addr;
  tlp_beat_t     rb_wdata, rb_rdata;
  logic [AW:0]   sb_wdata, sb_rdata;
  logic          timer_hold, outstanding, timer_running;

  retry_ctrl #(.RB_DEPTH(RB_DEPTH)) u_ctrl (
    .clk, .rst_n, .wr_valid, .wr_beat, .wr_seq,
    .rvd_ack, .rvd_nak, .rcvd_acknak_seq,
    .timer_expire, .timer_hold, .outstanding,
    .reply_req, .reply_grant, .rp_valid, .rp_beat, .rp_seq, .rp_ready, .pkg_idle, .reply_done,
    .link_retrain_req, .link_retrain_done,
    .rb_we, .rb_re, .rb_addr, .rb_wdata, .rb_rdata,
    .sb_we, .sb_re, .sb_addr, .sb_wdata, .sb_rdata,
    .rb_free, .ackd_seq, .replay_num, .state, .replay_start, .retrain_start
  );

  retry_buffer #(.DEPTH(RB_DEPTH)) u_rb (
    .clk, .we(rb_we), .re(rb_re), .addr(rb_addr), .wdata(rb_wdata), .rdata(rb_rdata)
  );

  sot_buffer #(.DEPTH(RB_DEPTH), .WIDTH(AW + 1)) u_sb (
    .clk, .we(sb_we), .re(sb_re), .addr(sb_addr), .wdata(sb_wdata), .rdata(sb_rdata)
  );

  replay_timer #(.CNT_W(16)) u_timer (
    .clk, .rst_n, .limit(timer_limit), .tlp_sent, .restart(reply_done), .acknak_rcvd(rvd_ack || rvd_nak),
    .outstanding, .hold(timer_hold), .expire(timer_expire), .running(timer_running)
  );

endmodule
