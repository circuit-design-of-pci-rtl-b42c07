// tb_retry_ctrl: checks the retry control logic, connected here to the
// retry buffer, the sot buffer and the replay timer exactly as in the
// retry management module. The testbench plays
// the TLP package module (it writes TLP copies with sequence numbers,
// grants replay requests and takes the replayed beats with a random ready)
// and the link partner (ACK/NAK DLLPs). It keeps its own list of stored
// TLPs and checks:
//  - free space: 16 beats minus the beats of unacknowledged TLPs, after
//    writes and after every ACK/NAK (also ACKs that release only part);
//  - the last acknowledged sequence number; ACKs outside the range of
//    unacknowledged TLPs are ignored;
//  - a NAK for S replays exactly the TLPs after S, in order, beat for
//    beat, each with its own sequence number, then pulses reply_done;
//  - with DLLPs missing, the replay timer (limit 60 cycles here) expires
//    and everything unacknowledged is replayed;
//  - the fourth replay in a row without progress asks for link retraining
//    first and replays once the retraining is done.
`timescale 1ns/1ps
module tb_retry_ctrl;
  import pcie_retry_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wr_valid = 0;
  tlp_beat_t wr_beat = '0;
  seq_t wr_seq = 0;
  logic [9:0] rb_free;
  logic rvd_ack = 0, rvd_nak = 0;
  seq_t rcvd_acknak_seq = 0;
  logic tlp_sent = 0;
  logic [15:0] timer_limit = 16'd60;
  logic reply_req, reply_grant = 0, rp_valid, rp_ready = 0, pkg_idle = 1, reply_done;
  tlp_beat_t rp_beat;
  seq_t rp_seq, ackd_seq;
  logic link_retrain_req, link_retrain_done = 0;
  logic [1:0] replay_num;
  retry_state_e state;
  logic replay_start, retrain_start, timer_expire;
  always #5 clk = ~clk;
  logic          rb_we, rb_re, sb_we, sb_re, timer_hold, outstanding, timer_running;
  logic [3:0]    rb_addr, sb_addr;
  tlp_beat_t     rb_wdata, rb_rdata;
  logic [4:0]    sb_wdata, sb_rdata;
  retry_ctrl dut (
    .clk, .rst_n, .wr_valid, .wr_beat, .wr_seq,
    .rvd_ack, .rvd_nak, .rcvd_acknak_seq,
    .timer_expire, .timer_hold, .outstanding,
    .reply_req, .reply_grant, .rp_valid, .rp_beat, .rp_seq, .rp_ready, .pkg_idle, .reply_done,
    .link_retrain_req, .link_retrain_done,
    .rb_we, .rb_re, .rb_addr, .rb_wdata, .rb_rdata,
    .sb_we, .sb_re, .sb_addr, .sb_wdata, .sb_rdata,
    .rb_free, .ackd_seq, .replay_num, .state, .replay_start, .retrain_start
  );
  retry_buffer u_rb (.clk, .we(rb_we), .re(rb_re), .addr(rb_addr), .wdata(rb_wdata), .rdata(rb_rdata));
  sot_buffer   u_sb (.clk, .we(sb_we), .re(sb_re), .addr(sb_addr), .wdata(sb_wdata), .rdata(sb_rdata));
  replay_timer u_tm (.clk, .rst_n, .limit(timer_limit), .tlp_sent, .restart(reply_done),
                     .acknak_rcvd(rvd_ack || rvd_nak), .outstanding, .hold(timer_hold),
                     .expire(timer_expire), .running(timer_running));
  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL @%0d: %s", cycle, what); end
  endtask

  // model: stored TLPs by sequence number
  tlp_beat_t st_b [4096][8];
  int        st_nb [4096];
  int        next_s = 0;          // next sequence number (count)
  int        ackd = -1;           // last acknowledged (count)
  int n_done = 0, n_expire = 0, n_retrain_req = 0;
  always @(posedge clk) begin
    if (reply_done) n_done++;
    if (timer_expire) n_expire++;
    if (retrain_start) n_retrain_req++;
  end

  function automatic int used_beats();
    int u = 0;
    for (int s = ackd + 1; s < next_s; s++) u += st_nb[s % 4096];
    return u;
  endfunction

  task automatic write_tlp(input int nb);
    for (int b = 0; b < nb; b++) begin
      wr_valid = 1;
      wr_beat = tlp_beat_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
      wr_beat.sot = (b == 0); wr_beat.eot = (b == nb - 1);
      wr_seq = seq_t'(next_s % 4096);
      st_b[next_s % 4096][b] = wr_beat;
      @(negedge clk);
    end
    wr_valid = 0;
    st_nb[next_s % 4096] = nb;
    next_s++;
    tlp_sent = 1; @(negedge clk); tlp_sent = 0;
    chk(int'(rb_free) == 16 - used_beats(), $sformatf("free %0d after write, expected %0d", rb_free, 16 - used_beats()));
  endtask

  task automatic dllp(input bit nak, input int s, input bit valid);
    rvd_ack = !nak; rvd_nak = nak; rcvd_acknak_seq = seq_t'(s % 4096);
    @(negedge clk);
    rvd_ack = 0; rvd_nak = 0;
    if (valid && s > ackd) ackd = s;
    repeat (4) @(negedge clk);
    chk(int'(rb_free) == 16 - used_beats(), $sformatf("free %0d after DLLP, expected %0d", rb_free, 16 - used_beats()));
    chk(int'(ackd_seq) == (ackd + 4096) % 4096, "acknowledged sequence number");
  endtask

  // act as the package module for one replay; expects TLPs ackd+1 .. next_s-1
  task automatic take_replay();
    int s, b, waitc;
    waitc = 0;
    while (!reply_req && waitc < 2000) begin @(negedge clk); waitc++; end
    chk(reply_req, "replay requested");
    if (!reply_req) return;
    repeat ($urandom_range(0, 3)) @(negedge clk);
    pkg_idle = 0;
    reply_grant = 1; @(negedge clk); reply_grant = 0;
    s = ackd + 1; b = 0;
    waitc = 0;
    while (s < next_s && waitc < 500) begin
      rp_ready = $urandom_range(0, 3) != 0;
      #1;
      if (rp_valid && rp_ready) begin
        chk(rp_beat == st_b[s % 4096][b], $sformatf("replayed beat %0d of TLP %0d", b, s));
        chk(int'(rp_seq) == s % 4096, $sformatf("replayed sequence %0d expected %0d", rp_seq, s));
        b++;
        if (b == st_nb[s % 4096]) begin b = 0; s++; end
      end
      @(negedge clk); waitc++;
    end
    rp_ready = 0;
    chk(s == next_s, "all unacknowledged TLPs replayed");
    repeat (2) @(negedge clk);
    chk(!rp_valid && !reply_req, "nothing more replayed");
    pkg_idle = 1;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    int d0;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    chk(rb_free == 10'd16, "empty after reset");
    for (int round = 0; round < 60; round++) begin
      // fill with random TLPs that fit
      repeat ($urandom_range(1, 5)) begin
        automatic int nb = $urandom_range(1, 8);
        if (used_beats() + nb <= 16) write_tlp(nb);
      end
      case ($urandom_range(0, 4))
        0, 1: if (next_s - 1 > ackd) dllp(0, $urandom_range(ackd + 1, next_s - 1), 1);
        2: begin
          // NAK: replay what follows
          if (next_s - 1 > ackd) begin
            d0 = n_done;
            dllp(1, $urandom_range(ackd, next_s - 2), 1);
            take_replay();
            chk(n_done == d0 + 1, "reply_done after the replay");
          end
        end
        3: begin
          // out of range: must change nothing
          dllp(0, next_s + 5, 0);
        end
        default: begin
          // everything acknowledged
          if (next_s - 1 > ackd) dllp(0, next_s - 1, 1);
        end
      endcase
    end
    // replay timer: no DLLPs
    if (next_s - 1 == ackd) write_tlp(3);
    d0 = n_expire;
    take_replay();
    chk(n_expire > d0, "replay timer expired");
    // four NAKs without progress: the fourth retrains first
    dllp(0, next_s - 1, 1);
    write_tlp(2); write_tlp(4);
    d0 = n_retrain_req;
    for (int k = 0; k < 4; k++) begin
      dllp(1, ackd, 1);
      if (k == 3) begin
        automatic int w = 0;
        while (!link_retrain_req && w < 100) begin @(negedge clk); w++; end
        chk(link_retrain_req && !reply_req, "retrain requested before the fourth replay");
        repeat (10) @(negedge clk);
        chk(!reply_req, "no replay during retraining");
        link_retrain_done = 1; @(negedge clk); link_retrain_done = 0;
      end
      take_replay();
    end
    chk(n_retrain_req == d0 + 1, "exactly one retrain");
    dllp(0, next_s - 1, 1);
    chk(rb_free == 10'd16, "empty at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
