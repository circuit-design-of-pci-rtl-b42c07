// pkg_mode_arbiter: package mode arbiter and source multiplexer of the TLP
// package module.
//
// Chooses between normal mode (package a new TLP from the Transaction
// Layer) and replay mode (package a TLP copy read from the retry buffer).
// A pending replay request always wins. A new TLP may start only when its
// first beat is offered and the retry buffer has room for all of it: the
// beat count is decoded from the TLP's first header DW and compared with
// `rb_free`. The choice is made while the package state machine is idle
// (`start_ok`, `start_replay`) and is registered into `mode_q` when the
// state machine takes it (`load`); the multiplexer then routes that
// source's beats and the state machine's `src_ready` for the whole TLP.
//
// The replay-first rule follows the text ("If the reply request is valid,
// the module selects reply mode"); the space check and handshakes are this
// design's choices.
module pkg_mode_arbiter
  import pcie_retry_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      reply_req,
  input  logic [9:0] rb_free,
  // Transaction Layer source
  input  logic      tl_valid,
  input  tlp_beat_t tl_beat,
  output logic      tl_ready,
  // retry buffer source
  input  logic      rp_valid,
  input  tlp_beat_t rp_beat,
  output logic      rp_ready,
  // package state machine side
  input  logic      load,
  input  logic      src_ready,
  output logic      start_ok,
  output logic      start_replay,
  output logic      mode_q,       // 1: replay mode
  output logic      src_valid,
  output tlp_beat_t src_beat
);

  logic fits;
  assign fits         = dw_to_beats(tlp_total_dw(tl_beat.data[DATA_W-1 -: 32])) <= rb_free;
  assign start_replay = reply_req;
  assign start_ok     = reply_req || (tl_valid && tl_beat.sot && fits);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    mode_q <= 1'b0;
    else if (load) mode_q <= start_replay;
  end

  assign src_valid = mode_q ? rp_valid : tl_valid;
  assign src_beat  = mode_q ? rp_beat  : tl_beat;
  assign tl_ready  = src_ready && !mode_q;
  assign rp_ready  = src_ready &&  mode_q;

endmodule
