// retry_ctrl: control logic of the retry management module.
//
// Keeps the bookkeeping of the retry buffer and runs retransmission:
//  * Writing. Every beat of a new TLP copy from the package module is
//    written at the write pointer. On its first beat the write pointer is
//    also stored in the sot buffer at the TLP's sequence number, so the
//    buffer can later be entered at any TLP.
//  * Acknowledging. An ACK or NAK DLLP carries sequence number S: all TLPs
//    up to and including S are acknowledged. Their space is released by
//    moving the free pointer to the start of TLP S+1, read from the sot
//    buffer (or to the end of the last stored TLP when S is the newest).
//    Nothing is erased: new TLPs simply overwrite acknowledged copies.
//    A sequence number outside [last acknowledged, newest] is ignored.
//  * Replaying. A NAK, or the replay timer expiring, asks for a replay of
//    every unacknowledged TLP. The controller raises `reply_req`, waits for
//    the package module's `reply_grant`, then reads the retry buffer from
//    the free pointer to the end and hands the beats, with each TLP's
//    original sequence number (`rp_seq`), to the package module. When the
//    package module is idle again it pulses `reply_done`.
//  * Retraining. Replays are counted since the last acknowledgement that
//    made progress; the fourth request instead asks the Physical Layer to
//    retrain the link (`link_retrain_req` until `link_retrain_done`), and
//    the replay follows the retraining.
//
// Both buffers are single-port RAMs with one clock of read latency. The
// sot buffer port serves TLP starts first; a pending ACK/NAK lookup waits a
// cycle. ACK/NAK DLLPs arriving during a replay are held (the newest
// sequence number is kept, a NAK flag is kept) and handled afterwards.
// Replay data goes through a two-entry buffer so that the package module's
// ready signal can stop the stream.
//
// Pointers carry one wrap bit above the RAM address, so the free space is
// DEPTH - (write pointer - free pointer); RB_DEPTH must therefore be a
// power of two (from 2 to 512), which is checked at elaboration. Reset: empty buffer, next and
// last acknowledged sequence numbers 0 and 4095, as PCI Express starts.
// The division of work, the sot buffer lookups, overwriting acknowledged
// copies and the retrain after more than three replays follow the text;
// the handshakes, deferral rules and encodings are this design's choices.
module retry_ctrl
  import pcie_retry_pkg::*;
#(
  parameter int unsigned RB_DEPTH = 16,
  localparam int unsigned AW      = $clog2(RB_DEPTH),
  localparam int unsigned PW      = AW + 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // copies of new TLPs from the package module
  input  logic           wr_valid,
  input  tlp_beat_t      wr_beat,
  input  seq_t           wr_seq,
  // ACK/NAK DLLP information from the receive side
  input  logic           rvd_ack,
  input  logic           rvd_nak,
  input  seq_t           rcvd_acknak_seq,
  // replay timer
  input  logic           timer_expire,
  output logic           timer_hold,
  output logic           outstanding,
  // replay handshake with the package module
  output logic           reply_req,
  input  logic           reply_grant,
  output logic           rp_valid,
  output tlp_beat_t      rp_beat,
  output seq_t           rp_seq,
  input  logic           rp_ready,
  input  logic           pkg_idle,
  output logic           reply_done,
  // Physical Layer
  output logic           link_retrain_req,
  input  logic           link_retrain_done,
  // retry buffer port
  output logic           rb_we,
  output logic           rb_re,
  output logic [AW-1:0]  rb_addr,
  output tlp_beat_t      rb_wdata,
  input  tlp_beat_t      rb_rdata,
  // sot buffer port
  output logic           sb_we,
  output logic           sb_re,
  output logic [AW-1:0]  sb_addr,
  output logic [PW-1:0]  sb_wdata,
  input  logic [PW-1:0]  sb_rdata,
  // status
  output logic [9:0]     rb_free,
  output seq_t           ackd_seq,
  output logic [1:0]     replay_num,
  output retry_state_e   state,
  output logic           replay_start,
  output logic           retrain_start
);

  logic [PW-1:0] wr_ptr, free_ptr, done_ptr, rd_ptr, end_ptr;
  seq_t          last_done_seq, cur_seq;

  // pending ACK/NAK and sot lookup in flight
  logic pend_valid, pend_nak;
  seq_t pend_seq;
  logic lk_busy, lk_nak;
  seq_t lk_seq;
  logic replay_pending;

  if (RB_DEPTH < 2 || RB_DEPTH > 512 || (RB_DEPTH & (RB_DEPTH - 1)) != 0) begin : g_bad_depth
    $error("retry_ctrl: RB_DEPTH must be a power of two from 2 to 512");
  end

  // replay read-out buffer (two entries)
  tlp_beat_t fifo [2];
  logic      fifo_head;
  logic [1:0] fifo_cnt;
  logic      inflight;
  logic      pop, issue;

  // ---------------------------------------------------------------------
  // ACK/NAK decode
  seq_t rel, span, s_plus1;
  logic sot_write, can_lookup;
  assign sot_write  = wr_valid && wr_beat.sot;
  assign rel        = pend_seq - ackd_seq;
  assign span       = last_done_seq - ackd_seq;
  assign s_plus1    = pend_seq + seq_t'(1);
  assign can_lookup = pend_valid && !lk_busy && !sot_write && (state == R_IDLE);

  // ---------------------------------------------------------------------
  // RAM ports
  assign issue = (state == R_WAIT || state == R_IN_REPLY) && (rd_ptr != end_ptr) &&
                 ({1'b0, fifo_cnt} + {2'b0, inflight} - {2'b0, pop} < 3'd2);

  always_comb begin
    rb_we    = wr_valid;
    rb_re    = issue;
    rb_addr  = wr_valid ? wr_ptr[AW-1:0] : rd_ptr[AW-1:0];
    rb_wdata = wr_beat;
    sb_we    = sot_write;
    sb_wdata = wr_ptr;
    sb_re    = can_lookup && (rel != '0) && (rel <= span) && (pend_seq != last_done_seq);
    sb_addr  = sot_write ? wr_seq[AW-1:0] : s_plus1[AW-1:0];
  end

  // ---------------------------------------------------------------------
  // status
  logic [PW-1:0] used;
  assign used          = wr_ptr - free_ptr;
  assign rb_free       = 10'(RB_DEPTH) - 10'(used);
  assign outstanding   = (free_ptr != done_ptr);
  assign timer_hold    = (state != R_IDLE);
  assign reply_req     = (state == R_REPLY_REQ) || (state == R_WAIT) || (state == R_IN_REPLY);
  assign link_retrain_req = (state == R_RETRAIN);

  assign rp_valid = (fifo_cnt != 2'd0);
  assign rp_beat  = fifo[fifo_head];
  assign pop      = rp_valid && rp_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr         <= '0;
      free_ptr       <= '0;
      done_ptr       <= '0;
      rd_ptr         <= '0;
      end_ptr        <= '0;
      last_done_seq  <= seq_t'(4095);
      ackd_seq       <= seq_t'(4095);
      cur_seq        <= '0;
      pend_valid     <= 1'b0;
      pend_nak       <= 1'b0;
      pend_seq       <= '0;
      lk_busy        <= 1'b0;
      lk_nak         <= 1'b0;
      lk_seq         <= '0;
      replay_pending <= 1'b0;
      replay_num     <= '0;
      state          <= R_IDLE;
      rp_seq         <= '0;
      fifo_head      <= 1'b0;
      fifo_cnt       <= '0;
      inflight       <= 1'b0;
      reply_done     <= 1'b0;
      replay_start   <= 1'b0;
      retrain_start  <= 1'b0;
      fifo[0]        <= '0;
      fifo[1]        <= '0;
    end else begin
      reply_done    <= 1'b0;
      replay_start  <= 1'b0;
      retrain_start <= 1'b0;

      // ---- writing new TLP copies
      if (wr_valid) begin
        wr_ptr <= wr_ptr + 1'b1;
        if (wr_beat.sot) cur_seq <= wr_seq;
        if (wr_beat.eot) begin
          done_ptr      <= wr_ptr + 1'b1;
          last_done_seq <= wr_beat.sot ? wr_seq : cur_seq;
        end
      end

      // ---- acknowledgements
      if (lk_busy) begin
        lk_busy    <= 1'b0;
        free_ptr   <= sb_rdata;
        ackd_seq   <= lk_seq;
        replay_num <= '0;
        if (lk_nak) replay_pending <= 1'b1;
      end
      if (can_lookup) begin
        pend_valid <= 1'b0;
        pend_nak   <= 1'b0;
        if (rel <= span) begin
          if (rel == '0) begin
            if (pend_nak) replay_pending <= 1'b1;
          end else if (pend_seq == last_done_seq) begin
            free_ptr   <= done_ptr;
            ackd_seq   <= pend_seq;
            replay_num <= '0;
            if (pend_nak) replay_pending <= 1'b1;
          end else begin
            lk_busy <= 1'b1;
            lk_seq  <= pend_seq;
            lk_nak  <= pend_nak;
          end
        end
      end
      if (rvd_ack || rvd_nak) begin
        pend_valid <= 1'b1;
        pend_seq   <= rcvd_acknak_seq;
        pend_nak   <= rvd_nak || (pend_valid && pend_nak && !can_lookup);
      end
      if (timer_expire) replay_pending <= 1'b1;

      // ---- replay read-out buffer
      inflight <= issue;
      if (issue) rd_ptr <= rd_ptr + 1'b1;
      if (inflight) fifo[fifo_head ^ fifo_cnt[0]] <= rb_rdata;
      if (pop) begin
        fifo_head <= !fifo_head;
        if (rp_beat.eot) rp_seq <= rp_seq + seq_t'(1);
      end
      fifo_cnt <= fifo_cnt + {1'b0, inflight} - {1'b0, pop};

      // ---- replay control
      case (state)
        R_IDLE:
          if (replay_pending && !lk_busy && !pend_valid) begin
            replay_pending <= 1'b0;
            if (outstanding) begin
              if (replay_num == 2'd3) begin
                replay_num    <= '0;
                retrain_start <= 1'b1;
                state         <= R_RETRAIN;
              end else begin
                replay_num   <= replay_num + 1'b1;
                replay_start <= 1'b1;
                state        <= R_REPLY_REQ;
              end
            end
          end
        R_RETRAIN:
          if (link_retrain_done) begin
            replay_start <= 1'b1;
            state        <= R_REPLY_REQ;
          end
        R_REPLY_REQ:
          if (reply_grant) begin
            rd_ptr  <= free_ptr;
            end_ptr <= done_ptr;
            rp_seq  <= ackd_seq + seq_t'(1);
            state   <= R_WAIT;
          end
        R_WAIT:
          state <= R_IN_REPLY;
        R_IN_REPLY:
          if (rd_ptr == end_ptr && !inflight && !issue &&
              ((fifo_cnt == 2'd1 && pop) || fifo_cnt == 2'd0))
            state <= R_DONE_PIPE;
        R_DONE_PIPE:
          if (pkg_idle) begin
            reply_done <= 1'b1;
            state      <= R_IDLE;
          end
        default:
          state <= R_IDLE;
      endcase
    end
  end

  // New TLP copies are never written while the retry buffer is replayed.
  a_no_write_in_replay: assert property (@(posedge clk) disable iff (!rst_n)
    wr_valid |-> !(state inside {R_WAIT, R_IN_REPLY}));
  // The retry buffer never overflows.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    used <= PW'(RB_DEPTH));

endmodule
