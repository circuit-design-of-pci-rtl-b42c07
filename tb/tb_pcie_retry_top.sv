// tb_pcie_retry_top: end-to-end test of the retry mechanism at its default
// size (256-byte retry buffer, 711-cycle replay timer).
//
// A Transaction Layer driver sends random TLPs (3 or 4 header DWs, 0 to
// 128 bytes in all, optional ECRC DW). A model of the link partner's
// receiver checks every packaged TLP that leaves the design: header
// identifier, packet length, Gen3 length checksum and parity, and the LCRC,
// all recomputed here with independent formulations, and that its beats
// leave back to back. It accepts TLPs only
// in sequence order, compares their contents with what the driver sent
// under that sequence number, and answers with ACK and NAK DLLPs after a
// random delay. It can corrupt TLPs (NAK), lose DLLPs (replay timeout) and
// reject every replay (link retraining).
// Phases: random errors; lost DLLPs; NAK storm until retraining; Gen3
// checksum off through the configuration interface; a long run of small
// TLPs that wraps the 12-bit sequence number. At the end every TLP must
// have been received once and in order, the design's acknowledged sequence
// number and event counters are read back through the configuration bus,
// and every mechanism counted below must have happened at least once.
`timescale 1ns/1ps
module tb_pcie_retry_top;
  import pcie_retry_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              tl_dv, tl_sot, tl_eot, tl_ready;
  logic [1:0]        tl_ldw;
  logic [127:0]      tl_data;
  logic              mac_dv, mac_sot, mac_eot;
  logic [1:0]        mac_ldw;
  logic [127:0]      mac_data;
  logic              link_retrain_req, link_retrain_done;
  logic              rvd_ack, rvd_nak;
  logic [11:0]       rcvd_acknak_seq;
  logic [3:0]        cfg_addr;
  logic              cfg_wr, cfg_rd;
  logic [31:0]       cfg_din, cfg_dout;
  logic              reply_done, timer_expire;

  pcie_retry_top dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // ------------------------------------------------------------------
  // independent reference formulas
  function automatic logic [31:0] ref_crc32(input logic [7:0] bytes [], input int n);
    logic [31:0] c = 32'hFFFF_FFFF;
    logic [31:0] r;
    for (int i = 0; i < n; i++) begin
      logic [7:0] rb;
      for (int k = 0; k < 8; k++) rb[k] = bytes[i][7-k];
      for (int k = 7; k >= 0; k--) begin
        logic fb;
        fb = rb[k] ^ c[31];
        c  = {c[30:0], 1'b0};
        if (fb) c = c ^ 32'h04C1_1DB7;
      end
    end
    for (int k = 0; k < 32; k++) r[k] = c[31-k];
    return ~r;
  endfunction

  function automatic logic [3:0] ref_cs(input logic [10:0] len);
    logic [14:0] r;
    r = {len, 4'd0};
    for (int b = 14; b >= 4; b--) if (r[b]) r = r ^ (15'h13 << (b - 4));
    return r[3:0];
  endfunction

  // ------------------------------------------------------------------
  // TLPs sent, by sequence number
  logic [31:0] sent_dw [4096][32];
  int          sent_n  [4096];
  int          tb_seq = 0;        // TLPs accepted so far (sequence = tb_seq mod 4096)

  // driver
  logic [31:0] cur [32];
  int          cur_n = 0, cur_b = 0;
  bit          have_tlp = 0;
  bit          small_only = 0;
  int          tlps_to_send = 0;

  task automatic make_tlp();
    bit hdr4, has_data, td;
    int hdr, pay, maxpay;
    hdr4     = 1'($urandom_range(0, 1));
    has_data = small_only ? 1'b0 : 1'($urandom_range(0, 3) != 0);
    td       = small_only ? 1'b0 : 1'($urandom_range(0, 3) == 0);
    hdr      = hdr4 ? 4 : 3;
    maxpay   = 32 - hdr - (td ? 1 : 0);
    pay      = has_data ? $urandom_range(1, maxpay) : 0;
    cur[0]   = $urandom;
    cur[0][31] = 1'b0;
    cur[0][30] = has_data;
    cur[0][29] = hdr4;
    cur[0][15] = td;
    cur[0][9:0] = has_data ? 10'(pay) : 10'($urandom_range(0, 1023));
    cur_n = hdr + pay + (td ? 1 : 0);
    for (int i = 1; i < cur_n; i++) cur[i] = $urandom;
    cur_b = 0;
    have_tlp = 1;
  endtask

  always_comb begin
    tl_data = '0;
    for (int d = 0; d < 4; d++)
      if (4*cur_b + d < cur_n) tl_data[127-32*d -: 32] = cur[4*cur_b + d];
    tl_sot = (cur_b == 0);
    tl_eot = (4*cur_b + 4 >= cur_n);
    tl_ldw = 2'((cur_n - 1) % 4);
  end

  bit drv_en = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (tl_dv && tl_ready) begin
        if (tl_sot) begin
          for (int i = 0; i < cur_n; i++) sent_dw[tb_seq % 4096][i] = cur[i];
          sent_n[tb_seq % 4096] = cur_n;
          tb_seq++;
        end
        if (tl_eot) begin
          have_tlp = 0;
          tlps_to_send--;
        end else cur_b++;
      end
      if (!have_tlp && drv_en && tlps_to_send > 0 && $urandom_range(0, 3) != 0) make_tlp();
    end
  end
  assign tl_dv = have_tlp;

  // ------------------------------------------------------------------
  // link partner receiver model
  int  next_rcv = 0;             // next expected sequence, as a count
  bit  nak_sched = 0;
  bit  err_inject = 0;           // corrupt 1 in 16 good TLPs
  bit  dllp_loss = 0;            // drop every ACK/NAK
  bit  nak_all = 0;              // corrupt every TLP that would be accepted
  bit  ack_pend = 0;
  longint ack_due = 0;
  bit  nak_now = 0;
  int  gen3_exp = 1;

  // mechanism counters
  int n_nak = 0, n_dup = 0, n_expire = 0, n_retrain = 0, n_full = 0;
  int n_block = 0, n_crc_a = 0, n_crc_b = 0, n_crc_c = 0, n_wrap = 0;
  int n_gen3_on = 0, n_gen3_off = 0, n_lookup = 0, n_replay_done = 0, n_pkts = 0;

  logic [31:0] pkt [40];
  int          pkt_n = 0;

  task automatic receive_packet();
    logic [7:0]  bytes [];
    logic [31:0] h, exp_lcrc, v;
    logic [10:0] len;
    logic [11:0] s;
    int          m, exp_s;
    m   = pkt_n;
    h   = pkt[0];
    len = h[27:17];
    s   = h[11:0];
    n_pkts++;
    check(h[31:28] == 4'hF, "header identifier");
    check(int'(len) == m, $sformatf("packet length %0d vs %0d DWs", len, m));
    if (gen3_exp != 0) begin
      check(h[16:13] == ref_cs(len) && h[12] == ^{len, ref_cs(len)}, "Gen3 length checksum");
      n_gen3_on++;
    end else begin
      check(h[16:12] == 5'd0, "no checksum without Gen3");
      n_gen3_off++;
    end
    bytes = new[2 + 4*(m-2)];
    bytes[0] = {4'd0, s[11:8]};
    bytes[1] = s[7:0];
    for (int i = 1; i < m - 1; i++)
      for (int b = 0; b < 4; b++) bytes[2 + 4*(i-1) + b] = pkt[i][31-8*b -: 8];
    v = ref_crc32(bytes, 2 + 4*(m-2));
    exp_lcrc = {v[7:0], v[15:8], v[23:16], v[31:24]};
    check(pkt[m-1] == exp_lcrc, $sformatf("LCRC of seq %0d", s));
    exp_s = next_rcv % 4096;
    if (int'(s) == exp_s) begin
      if (nak_all || (err_inject && $urandom_range(0, 15) == 0)) begin
        if (!nak_sched || nak_all) begin
          nak_now   = 1;
          nak_sched = 1;
        end
      end else begin
        bit same;
        same = (sent_n[exp_s] == m - 2);
        for (int i = 0; i < m - 2 && same; i++) same = (pkt[i+1] == sent_dw[exp_s][i]);
        check(same, $sformatf("contents of TLP %0d", next_rcv));
        check(next_rcv < tb_seq, "TLP received before it was sent");
        next_rcv++;
        if (next_rcv % 4096 == 0) n_wrap++;
        nak_sched = 0;
        if (!ack_pend) begin
          ack_pend = 1;
          ack_due  = cycle + longint'($urandom_range(2, 40));
        end
      end
    end else if (((exp_s - int'(s)) & 4095) < 2048) begin
      n_dup++;                 // already received: acknowledge again
      if (!ack_pend) begin
        ack_pend = 1;
        ack_due  = cycle + longint'($urandom_range(2, 10));
      end
    end else begin
      // a gap: a TLP before this one was lost
      if (!nak_sched) begin
        nak_now   = 1;
        nak_sched = 1;
      end
    end
  endtask

  bit in_pkt = 0;
  always @(posedge clk) begin
    rvd_ack <= 1'b0;
    rvd_nak <= 1'b0;
    if (rst_n) begin
      if (in_pkt && !mac_dv) begin
        failures++;
        $display("FAIL @%0d: gap inside a packaged TLP", cycle);
      end
      if (mac_dv) begin
        in_pkt = !mac_eot;
        if (mac_sot) pkt_n = 0;
        for (int d = 0; d < 4; d++)
          if (!mac_eot || d <= int'(mac_ldw)) begin
            if (pkt_n < 40) pkt[pkt_n] = mac_data[127-32*d -: 32];
            pkt_n++;
          end
        if (mac_eot) receive_packet();
      end
      if (nak_now) begin
        nak_now = 0;
        if (!dllp_loss) begin
          rvd_nak         <= 1'b1;
          rcvd_acknak_seq <= 12'((next_rcv - 1) % 4096);
          n_nak++;
        end
      end else if (ack_pend && cycle >= ack_due) begin
        ack_pend = 0;
        if (!dllp_loss) begin
          rvd_ack         <= 1'b1;
          rcvd_acknak_seq <= 12'((next_rcv - 1) % 4096);
        end
      end
    end
  end

  // Physical Layer: retrain takes 20 cycles
  int retrain_cnt = 0;
  always @(posedge clk) begin
    link_retrain_done <= 1'b0;
    if (link_retrain_req && !link_retrain_done) begin
      retrain_cnt <= retrain_cnt + 1;
      if (retrain_cnt == 20) begin
        link_retrain_done <= 1'b1;
        retrain_cnt       <= 0;
        n_retrain++;
      end
    end
  end

  // observers of internal events
  always @(posedge clk) if (rst_n) begin
    if (timer_expire) n_expire++;
    if (reply_done)   n_replay_done++;
    if (tl_dv && tl_sot && !tl_ready && dut.u_pkg.u_fsm.state == S_IDLE &&
        !dut.u_pkg.reply_req && !dut.u_pkg.u_arb.fits) n_full++;
    if (tl_dv && !tl_ready && dut.u_rm.state != R_IDLE) n_block++;
    if (tl_dv && tl_ready && dut.u_rm.state inside {R_WAIT, R_IN_REPLY}) begin
      failures++;
      $display("FAIL @%0d: new TLP taken during a replay", cycle);
    end
    case (dut.u_pkg.u_fsm.state)
      S_CRC_A: n_crc_a++;
      S_CRC_B: n_crc_b++;
      S_CRC_C: n_crc_c++;
      default: ;
    endcase
    if (dut.u_rm.u_ctrl.sb_re) n_lookup++;
  end

  // ------------------------------------------------------------------
  task automatic cfg_read(input logic [3:0] a, output logic [31:0] d);
    @(negedge clk); cfg_addr = a; cfg_rd = 1'b1;
    @(negedge clk); cfg_rd = 1'b0; d = cfg_dout;
  endtask

  task automatic cfg_write(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk); cfg_addr = a; cfg_din = d; cfg_wr = 1'b1;
    @(negedge clk); cfg_wr = 1'b0;
  endtask

  task automatic send_and_drain(input int n, input int max_cycles);
    longint t0;
    tlps_to_send = n;
    drv_en = 1;
    t0 = cycle;
    while ((tlps_to_send > 0 || next_rcv != tb_seq || dut.u_rm.ackd_seq != 12'((tb_seq - 1) % 4096)
            || dut.u_rm.state != R_IDLE) && cycle - t0 < max_cycles)
      @(posedge clk);
    check(tlps_to_send == 0 && next_rcv == tb_seq, $sformatf("all TLPs delivered (%0d of %0d)", next_rcv, tb_seq));
    if (next_rcv != tb_seq)
      $display("  stuck: rm.state=%0d ackd=%0d free=%0d done=%0d wr=%0d pend=%0d rp=%0d timer=%0d pkg=%0d tl_dv=%0d next_rcv=%0d",
               dut.u_rm.state, dut.u_rm.ackd_seq, dut.u_rm.u_ctrl.free_ptr, dut.u_rm.u_ctrl.done_ptr,
               dut.u_rm.u_ctrl.wr_ptr, dut.u_rm.u_ctrl.pend_valid, dut.u_rm.u_ctrl.replay_pending,
               dut.u_rm.u_timer.running, dut.u_pkg.u_fsm.state, tl_dv, next_rcv);
    drv_en = 0;
  endtask

  initial begin
    logic [31:0] d;
    logic [7:0]  tv [];
    automatic string s9 = "123456789";
    cfg_addr = '0; cfg_wr = 0; cfg_rd = 0; cfg_din = '0;
    rcvd_acknak_seq = '0; rvd_ack = 0; rvd_nak = 0;
    // the reference CRC itself: CRC-32 check value
    tv = new[9];
    for (int i = 0; i < 9; i++) tv[i] = s9[i];
    check(ref_crc32(tv, 9) == 32'hCBF4_3926, "reference CRC-32 check value");
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // phase 1: random TLPs, random corruption
    err_inject = 1;
    send_and_drain(300, 60000);
    $display("phase 1 done @%0d: tlps=%0d naks=%0d dup=%0d", cycle, tb_seq, n_nak, n_dup);
    err_inject = 0;

    // phase 2: DLLPs lost until the replay timer expires
    dllp_loss = 1;
    tlps_to_send = 4; drv_en = 1;
    begin
      automatic longint t0 = cycle;
      automatic int     e0 = n_expire;
      while (n_expire == e0 && cycle - t0 < 5000) @(posedge clk);
      check(n_expire > e0, "replay timer expired with DLLPs lost");
    end
    dllp_loss = 0;
    send_and_drain(0, 20000);
    $display("phase 2 done @%0d: tlps=%0d expire=%0d dup=%0d", cycle, tb_seq, n_expire, n_dup);

    // phase 3: every TLP rejected until the link is retrained
    nak_all = 1;
    tlps_to_send = 3; drv_en = 1;
    begin
      automatic longint t0 = cycle;
      while (!link_retrain_req && cycle - t0 < 20000) @(posedge clk);
    end
    check(link_retrain_req, "link retraining requested after repeated replays");
    nak_all = 0;
    nak_sched = 0;
    send_and_drain(0, 20000);
    $display("phase 3 done @%0d: tlps=%0d retrain=%0d", cycle, tb_seq, n_retrain);

    // phase 4: Gen3 length checksum switched off
    cfg_write(4'd0, 32'd0);
    cfg_read(4'd0, d);
    check(d == 32'd0, "CTRL register reads back");
    gen3_exp = 0;
    err_inject = 1;
    send_and_drain(100, 30000);
    err_inject = 0;
    cfg_write(4'd0, 32'd1);
    gen3_exp = 1;

    // phase 5: many small TLPs, sequence number wraps
    small_only = 1;
    err_inject = 1;
    send_and_drain(4200 - tb_seq + 5, 200000);
    err_inject = 0;

    // status through the configuration interface
    repeat (50) @(posedge clk);
    cfg_read(4'd2, d);
    check(d[11:0] == 12'((tb_seq - 1) % 4096), $sformatf("acknowledged sequence %0d", d[11:0]));
    check(d[23:12] == 12'(tb_seq % 4096), "next sequence number");
    cfg_read(4'd3, d);
    check(int'(d[15:0]) == n_replay_done, $sformatf("replay counter %0d vs %0d", d[15:0], n_replay_done));
    check(int'(d[31:16]) == n_retrain, "retrain counter");

    $display("events: packets=%0d naks=%0d duplicates=%0d timer_expiries=%0d retrains=%0d replays=%0d",
             n_pkts, n_nak, n_dup, n_expire, n_retrain, n_replay_done);
    $display("events: buffer_full_stalls=%0d blocked_in_replay=%0d crc_a=%0d crc_b=%0d crc_c=%0d",
             n_full, n_block, n_crc_a, n_crc_b, n_crc_c);
    $display("events: seq_wraps=%0d gen3_on=%0d gen3_off=%0d sot_lookups=%0d tlps=%0d",
             n_wrap, n_gen3_on, n_gen3_off, n_lookup, tb_seq);
    check(n_nak > 0, "NAK replay happened");
    check(n_dup > 0, "duplicate TLP seen by receiver");
    check(n_expire > 0, "replay timer expiry happened");
    check(n_retrain > 0, "link retrain happened");
    check(n_replay_done > 0, "replay completed");
    check(n_full > 0, "retry buffer full stall happened");
    check(n_block > 0, "new TLP blocked during replay");
    check(n_crc_a > 0 && n_crc_b > 0 && n_crc_c > 0, "all three CRC adding sub-states used");
    check(n_wrap > 0, "sequence number wrapped");
    check(n_gen3_on > 0 && n_gen3_off > 0, "both framing modes used");
    check(n_lookup > 0, "sot buffer lookups happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(4_000_000 * 10);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
