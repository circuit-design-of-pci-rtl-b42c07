// tb_tlp_package: checks the TLP package module. The testbench plays the
// Transaction Layer (random TLPs of up to 128 bytes, random gaps between
// TLPs, random retry buffer space) and the retry management module (it
// keeps the copies the module hands over and replays chosen ones with
// their original sequence numbers). Checked:
//  - copies for the retry buffer equal the TLP beats, with sequence
//    numbers 0, 1, 2, ... in order;
//  - no new TLP starts unless the retry buffer has room for all of it;
//  - a replay request made while idle is granted one clock later; while
//    replaying, no new TLP is taken and no copy is made;
//  - every packaged TLP, new or replayed, has the right header DW (length,
//    sequence number, Gen3 checksum and parity, recomputed here), the TLP
//    contents and the CRC-32 LCRC, with its beats back to back.
`timescale 1ns/1ps
module tb_tlp_package;
  import pcie_retry_pkg::*;
  logic clk = 0, rst_n = 0, gen3 = 1;
  logic tl_valid, tl_ready;
  tlp_beat_t tl_beat;
  logic rbw_valid;
  tlp_beat_t rbw_beat;
  seq_t rbw_seq;
  logic [9:0] rb_free = 10'd16;
  logic reply_req = 0, reply_grant, rp_valid = 0, rp_ready, pkg_idle;
  tlp_beat_t rp_beat = '0;
  seq_t rp_seq = 0, next_seq;
  logic mac_valid;
  tlp_beat_t mac_beat;
  always #5 clk = ~clk;
  tlp_package dut (.*);
  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL @%0d: %s", cycle, what); end
  endtask

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

  // TLPs by sequence number: as sent, and as copied to the retry buffer
  logic [31:0] sent_dw [64][32];
  int          sent_n  [64];
  tlp_beat_t   copy_b  [64][8];
  int          copy_nb [64];
  int          n_new = 0;

  // expected packaged TLPs, in order
  int exp_seq [$];

  // ---------------- Transaction Layer driver
  logic [31:0] cur [32];
  int cur_n = 0, cur_b = 0;
  bit have = 0, drv_en = 0;
  int to_send = 0;
  task automatic make_tlp();
    bit hdr4, has_data, td;
    int hdr, pay;
    hdr4 = 1'($urandom_range(0, 1)); has_data = ($urandom_range(0, 3) != 0); td = ($urandom_range(0, 3) == 0);
    hdr = hdr4 ? 4 : 3;
    pay = has_data ? $urandom_range(1, 32 - hdr - (td ? 1 : 0)) : 0;
    cur[0] = $urandom; cur[0][31] = 0; cur[0][30] = has_data; cur[0][29] = hdr4; cur[0][15] = td;
    if (has_data) cur[0][9:0] = 10'(pay);
    cur_n = hdr + pay + (td ? 1 : 0);
    for (int i = 1; i < cur_n; i++) cur[i] = $urandom;
    cur_b = 0; have = 1;
  endtask
  always_comb begin
    tl_beat = '0;
    for (int d = 0; d < 4; d++)
      tl_beat.data[127-32*d -: 32] = (4*cur_b + d < cur_n) ? cur[4*cur_b + d] : 32'hDEAD_BEEF;
    tl_beat.sot = (cur_b == 0);
    tl_beat.eot = (4*cur_b + 4 >= cur_n);
    tl_beat.ldw = 2'((cur_n - 1) % 4);
  end
  assign tl_valid = have;

  // One block, in order: record a new TLP, check the retry buffer copy,
  // then move the driver on (so that nothing races with the copy check).
  int n_nofit = 0;
  int cp_seq = 0, cp_b = 0, n_copies = 0;
  always @(posedge clk) if (rst_n) begin
    if (tl_valid && tl_ready && tl_beat.sot) begin
      chk((cur_n + 3) / 4 <= int'(rb_free), "TLP started without retry buffer room");
      for (int i = 0; i < cur_n; i++) sent_dw[n_new % 64][i] = cur[i];
      sent_n[n_new % 64] = cur_n;
      exp_seq.push_back(n_new);
      n_new++;
    end
    if (rbw_valid) begin
      if (rbw_beat.sot) begin
        chk(int'(rbw_seq) == n_copies % 4096, $sformatf("copy sequence %0d expected %0d", rbw_seq, n_copies));
        cp_seq = n_copies; cp_b = 0; n_copies++;
      end
      chk(rbw_beat.sot == (cp_b == 0), "copy start flag");
      if (cp_b < 8) copy_b[cp_seq % 64][cp_b] = rbw_beat;
      cp_b++;
      if (rbw_beat.eot) begin
        copy_nb[cp_seq % 64] = cp_b;
        chk(cp_b == (sent_n[cp_seq % 64] + 3) / 4, "copy length");
        for (int b = 0; b < cp_b && b < 8; b++)
          for (int d = 0; d < 4; d++)
            if (4*b + d < sent_n[cp_seq % 64])
              chk(copy_b[cp_seq % 64][b].data[127-32*d -: 32] == sent_dw[cp_seq % 64][4*b + d], "copy contents");
      end
    end
    if (tl_valid && tl_ready) begin
      if (tl_beat.eot) begin have = 0; to_send--; end else cur_b++;
    end
    if (tl_valid && tl_beat.sot && (cur_n + 3) / 4 > int'(rb_free) && pkg_idle && !reply_req) n_nofit++;
    if (!have && drv_en && to_send > 0 && $urandom_range(0, 2) != 0) make_tlp();
  end

  // ---------------- Physical Layer monitor
  logic [31:0] pkt [40];
  int pkt_n = 0, n_pkts = 0;
  bit in_pkt = 0;
  always @(posedge clk) if (rst_n) begin
    if (in_pkt && !mac_valid) chk(0, "gap inside a packaged TLP");
    if (mac_valid) begin
      if (mac_beat.sot) pkt_n = 0;
      in_pkt = !mac_beat.eot;
      for (int d = 0; d < 4; d++)
        if (!mac_beat.eot || d <= int'(mac_beat.ldw)) begin
          if (pkt_n < 40) pkt[pkt_n] = mac_beat.data[127-32*d -: 32];
          pkt_n++;
        end
      if (mac_beat.eot) begin
        logic [7:0] bytes [];
        logic [31:0] v;
        logic [10:0] len;
        int e, m;
        m = pkt_n; len = pkt[0][27:17];
        e = exp_seq.pop_front();
        chk(pkt[0][31:28] == 4'hF && int'(len) == m, "header identifier and length");
        chk(int'(pkt[0][11:0]) == e % 4096, $sformatf("sequence %0d expected %0d", pkt[0][11:0], e));
        chk(pkt[0][16:12] == (gen3 ? {ref_cs(len), ^{len, ref_cs(len)}} : 5'd0), "length checksum");
        chk(m == sent_n[e % 64] + 2, "packet DW count");
        for (int i = 0; i < m - 2 && i < 32; i++) chk(pkt[i+1] == sent_dw[e % 64][i], "contents");
        bytes = new[2 + 4*(m-2)];
        bytes[0] = {4'd0, pkt[0][11:8]}; bytes[1] = pkt[0][7:0];
        for (int i = 1; i < m - 1; i++) for (int k = 0; k < 4; k++) bytes[2 + 4*(i-1) + k] = pkt[i][31-8*k -: 8];
        v = ref_crc32(bytes, 2 + 4*(m-2));
        chk(pkt[m-1] == {v[7:0], v[15:8], v[23:16], v[31:24]}, "LCRC");
        n_pkts++;
      end
    end
  end

  // ---------------- replay source
  task automatic replay(input int first, input int count);
    @(negedge clk);
    while (!pkg_idle) @(negedge clk);
    reply_req = 1;
    @(negedge clk);
    chk(reply_grant, "grant one clock after the replay request");
    for (int t = first; t < first + count; t++) begin
      rp_seq = seq_t'(t % 4096);
      for (int b = 0; b < copy_nb[t % 64]; b++) begin
        rp_beat = copy_b[t % 64][b];
        rp_valid = 1;
        #1;
        while (!rp_ready) begin
          chk(!tl_ready && !rbw_valid, "no new TLP during replay");
          @(negedge clk); #1;
        end
        if (b == 0) exp_seq.push_back(t);
        @(negedge clk);
        rp_valid = 0;
      end
    end
    reply_req = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int round = 0; round < 40; round++) begin
      int base;
      gen3 = round % 3 != 0;
      rb_free = ($urandom_range(0, 2) == 0) ? 10'($urandom_range(0, 8)) : 10'd16;
      base = n_new;
      to_send = $urandom_range(1, 6); drv_en = 1;
      while (to_send > 0) begin
        @(negedge clk);
        if (rb_free < 16 && $urandom_range(0, 9) == 0) rb_free = rb_free + 1;
      end
      drv_en = 0;
      replay(base + $urandom_range(0, n_new - base - 1), 1 + $urandom_range(0, 1));
      while (exp_seq.size() != 0) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    chk(n_pkts > 100 && n_nofit > 0, $sformatf("packets %0d, no-room waits %0d", n_pkts, n_nofit));
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
