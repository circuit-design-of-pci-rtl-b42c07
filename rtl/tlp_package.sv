// tlp_package: TLP package module of the Data Link Layer transmitter.
//
// Packages TLPs for the Physical Layer: a header DW with the sequence
// number goes in front, the LCRC behind. In normal mode the TLPs come from
// the Transaction Layer; each gets a new sequence number and an unpackaged
// copy, with its sequence number, goes to the retry management module for
// the retry buffer (`rbw_*`, "tlp2retrybuf"). In replay mode the TLPs come
// back from the retry buffer with their old sequence number (`rp_seq`) and
// are packaged again. The packaged stream leaves on `mac_*` ("tlp2mac").
//
// Inside: sequence number generator, LCRC generator, package mode arbiter
// (source multiplexer), package control state machine and package
// process, as the text divides the module.
//
// Interface: both sources use valid/ready with beats of type tlp_beat_t.
// The Physical Layer side has no back-pressure: a packaged TLP leaves as
// back-to-back beats. `reply_req` is held by the retry management for the
// whole replay; `reply_grant` pulses each time a replayed TLP is started.
// Timing: a TLP of n beats costs n + 2 cycles (start decision in S_IDLE,
// n beats, one CRC adding cycle); the output lags the input by one clock.
module tlp_package
  import pcie_retry_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       gen3,
  // Transaction Layer
  input  logic       tl_valid,
  input  tlp_beat_t  tl_beat,
  output logic       tl_ready,
  // retry management: copies of new TLPs
  output logic       rbw_valid,
  output tlp_beat_t  rbw_beat,
  output seq_t       rbw_seq,
  input  logic [9:0] rb_free,
  // retry management: replay
  input  logic       reply_req,
  output logic       reply_grant,
  input  logic       rp_valid,
  input  tlp_beat_t  rp_beat,
  input  seq_t       rp_seq,
  output logic       rp_ready,
  output logic       pkg_idle,
  output seq_t       next_seq,
  // Physical Layer
  output logic       mac_valid,
  output tlp_beat_t  mac_beat
);

  pkg_state_e state;
  logic       src_ready, src_valid, load, start_ok, start_replay, mode_q, fire;
  tlp_beat_t  src_beat;
  seq_t       new_seq, hdr_seq;
  logic [31:0] lcrc;
  logic       is_start;

  pkg_mode_arbiter u_arb (
    .clk, .rst_n, .reply_req, .rb_free,
    .tl_valid, .tl_beat, .tl_ready,
    .rp_valid, .rp_beat, .rp_ready,
    .load, .src_ready, .start_ok, .start_replay, .mode_q,
    .src_valid, .src_beat
  );

  pkg_ctrl_fsm u_fsm (
    .clk, .rst_n, .start_ok, .start_replay,
    .src_valid, .src_sot(src_beat.sot), .src_eot(src_beat.eot), .src_ldw(src_beat.ldw),
    .state, .src_ready, .load, .reply_grant, .pkg_idle
  );

  assign fire     = src_valid && src_ready;
  assign is_start = (state == S_TLP_START) || (state == S_REPLY_START);
  assign hdr_seq  = mode_q ? rp_seq : new_seq;

  seq_num_gen u_seq (
    .clk, .rst_n, .alloc(fire && state == S_TLP_START), .seq(new_seq)
  );

  lcrc_gen u_lcrc (
    .clk, .rst_n, .valid(fire), .start(is_start), .eot(src_beat.eot),
    .ldw(src_beat.ldw), .seq(hdr_seq), .data(src_beat.data), .lcrc
  );

  pkg_process u_proc (
    .clk, .rst_n, .state, .fire, .src_beat, .seq(hdr_seq), .gen3, .lcrc,
    .out_valid(mac_valid), .out_beat(mac_beat)
  );

  assign rbw_valid = fire && !mode_q;
  assign rbw_beat  = src_beat;
  assign rbw_seq   = new_seq;
  assign next_seq  = new_seq;

endmodule
