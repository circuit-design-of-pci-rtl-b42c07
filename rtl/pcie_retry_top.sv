// pcie_retry_top: transmit side of a PCI Express Data Link Layer with the
// TLP retry mechanism.
//
// TLPs from the Transaction Layer enter the TLP package module, which
// gives each a sequence number, stores an unpackaged copy in the retry
// management module's retry buffer and sends the packaged TLP (header DW,
// TLP, LCRC) to the Physical Layer. ACK and NAK DLLPs reported by the
// receive side release copies; a NAK or a replay timer timeout makes the
// retry management module replay every unacknowledged copy through the
// package module again; a fourth replay without progress asks the Physical
// Layer to retrain the link first. A configuration interface sets the Gen3
// length checksum and the replay timer limit and reads status.
//
// Ports: Transaction Layer stream `tl_*` (valid/ready, tlp_beat_t fields
// brought out as plain signals), Physical Layer stream `mac_*` (no
// back-pressure), DLLP receiver inputs `rvd_ack`, `rvd_nak`,
// `rcvd_acknak_seq`, link retraining handshake, configuration bus `cfg_*`.
// The Transaction Layer, the DLLP receiver and the Physical Layer are
// outside this design.
module pcie_retry_top
  import pcie_retry_pkg::*;
#(
  parameter int unsigned RB_BYTES      = 256,
  parameter int unsigned TIMER_DEFAULT = 711,
  parameter logic        GEN3_DEFAULT  = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  // Transaction Layer
  input  logic              tl_dv,
  input  logic              tl_sot,
  input  logic              tl_eot,
  input  logic [1:0]        tl_ldw,
  input  logic [DATA_W-1:0] tl_data,
  output logic              tl_ready,
  // Physical Layer
  output logic              mac_dv,
  output logic              mac_sot,
  output logic              mac_eot,
  output logic [1:0]        mac_ldw,
  output logic [DATA_W-1:0] mac_data,
  output logic              link_retrain_req,
  input  logic              link_retrain_done,
  // ACK/NAK DLLP receiver
  input  logic              rvd_ack,
  input  logic              rvd_nak,
  input  logic [SEQ_W-1:0]  rcvd_acknak_seq,
  // configuration management interface
  input  logic [3:0]        cfg_addr,
  input  logic              cfg_wr,
  input  logic              cfg_rd,
  input  logic [31:0]       cfg_din,
  output logic [31:0]       cfg_dout,
  // events
  output logic              reply_done,
  output logic              timer_expire
);

  localparam int unsigned RB_DEPTH = RB_BYTES / (DATA_W / 8);

  tlp_beat_t    tl_beat, mac_beat, rbw_beat, rp_beat;
  logic         rbw_valid, reply_req, reply_grant, rp_valid, rp_ready, pkg_idle;
  seq_t         rbw_seq, rp_seq, next_seq, ackd_seq;
  logic [9:0]   rb_free;
  logic         gen3_en, replay_start, retrain_start;
  logic [15:0]  timer_limit;
  logic [1:0]   replay_num;
  retry_state_e rstate;

  assign tl_beat  = '{sot: tl_sot, eot: tl_eot, ldw: tl_ldw, data: tl_data};
  assign mac_sot  = mac_beat.sot;
  assign mac_eot  = mac_beat.eot;
  assign mac_ldw  = mac_beat.ldw;
  assign mac_data = mac_beat.data;

  tlp_package u_pkg (
    .clk, .rst_n, .gen3(gen3_en),
    .tl_valid(tl_dv), .tl_beat, .tl_ready,
    .rbw_valid, .rbw_beat, .rbw_seq, .rb_free,
    .reply_req, .reply_grant, .rp_valid, .rp_beat, .rp_seq, .rp_ready,
    .pkg_idle, .next_seq,
    .mac_valid(mac_dv), .mac_beat
  );

  retry_mgmt #(.RB_DEPTH(RB_DEPTH)) u_rm (
    .clk, .rst_n, .wr_valid(rbw_valid), .wr_beat(rbw_beat), .wr_seq(rbw_seq), .rb_free,
    .rvd_ack, .rvd_nak, .rcvd_acknak_seq,
    .tlp_sent(mac_dv && mac_beat.eot), .timer_limit,
    .reply_req, .reply_grant, .rp_valid, .rp_beat, .rp_seq, .rp_ready, .pkg_idle, .reply_done,
    .link_retrain_req, .link_retrain_done,
    .ackd_seq, .replay_num, .state(rstate), .replay_start, .retrain_start, .timer_expire
  );

  cfg_mgmt #(.GEN3_DEFAULT(GEN3_DEFAULT), .TIMER_DEFAULT(TIMER_DEFAULT)) u_cfg (
    .clk, .rst_n, .cfg_addr, .cfg_wr, .cfg_rd, .cfg_din, .cfg_dout,
    .gen3_en, .timer_limit,
    .ackd_seq, .next_seq, .replay_num, .retry_state(rstate),
    .replay_start, .retrain_start
  );

endmodule
