// tb_workload_max_tlp: the retry buffer sizing workload, run on the full
// design at its default parameters (256-byte retry buffer).
//
// The retry buffer is sized to hold two TLPs of the largest size, 128
// bytes each. This test sends only 128-byte TLPs (3-DW header with a
// 29-DW payload, or 4-DW header with a 28-DW payload), once with Gen3
// framing and once without, and checks per run that:
//  - with no acknowledgement, exactly two TLPs leave and the third is held
//    back because the buffer is full (the buffer holds exactly two);
//  - each packaged TLP is 34 DWs (header DW, 32 TLP DWs, LCRC) in nine
//    back-to-back beats, with a correct header and LCRC, sequence numbers
//    in order and the contents that were sent;
//  - a NAK that acknowledges nothing replays both TLPs bit for bit as they
//    were first sent (the copies kept without framing are framed again
//    the same way);
//  - each ACK of one TLP lets exactly one more TLP out, until all are sent.
// The design is reset between the two runs; Gen3 framing is switched
// through the configuration interface.
`timescale 1ns/1ps
module tb_workload_max_tlp;
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

  localparam int N_TLP = 8;        // TLPs per run
  localparam int TLP_DW = 32;      // 128 bytes
  localparam int PKT_DW = TLP_DW + 2;

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

  // reference CRC-32 over bytes, bit by bit, most significant bit first
  // after reversing each byte; result reversed and complemented
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

  // reference length checksum: polynomial division by x^4 + x + 1
  function automatic logic [3:0] ref_cs(input logic [10:0] len);
    logic [14:0] r;
    r = {len, 4'd0};
    for (int b = 14; b >= 4; b--) if (r[b]) r = r ^ (15'h13 << (b - 4));
    return r[3:0];
  endfunction

  // ------------------------------------------------------------------
  // Transaction Layer driver
  logic [31:0] tlp [N_TLP][TLP_DW];
  int          n_queued = 0;       // TLPs released to the driver
  int          n_taken = 0;        // TLPs accepted by the design
  int          cur_b = 0;

  task automatic make_tlps();
    for (int t = 0; t < N_TLP; t++) begin
      bit hdr4 = t[0];
      for (int i = 0; i < TLP_DW; i++) tlp[t][i] = $urandom;
      tlp[t][0][31]   = 1'b0;
      tlp[t][0][30]   = 1'b1;                       // with payload
      tlp[t][0][29]   = hdr4;
      tlp[t][0][15]   = 1'b0;                       // no digest
      tlp[t][0][9:0]  = hdr4 ? 10'd28 : 10'd29;     // payload DWs
    end
  endtask

  assign tl_dv = rst_n && (n_taken < n_queued);
  always_comb begin
    tl_data = '0;
    for (int d = 0; d < 4; d++)
      tl_data[127-32*d -: 32] = tlp[n_taken % N_TLP][4*cur_b + d];
    tl_sot = (cur_b == 0);
    tl_eot = (cur_b == TLP_DW/4 - 1);
    tl_ldw = 2'd3;
  end

  always @(posedge clk) if (rst_n && tl_dv && tl_ready) begin
    if (tl_eot) begin
      cur_b   <= 0;
      n_taken <= n_taken + 1;
    end else cur_b <= cur_b + 1;
  end

  // ------------------------------------------------------------------
  // receiver: collects packaged TLPs
  logic [31:0] rx [64][PKT_DW];
  int          rx_n = 0;           // packaged TLPs received
  logic [31:0] pkt [40];
  int          pkt_n = 0, beats = 0;
  bit          in_pkt = 0;
  int          gen3_exp = 1;

  task automatic check_packet();
    logic [7:0]  bytes [];
    logic [31:0] h, v;
    logic [10:0] len;
    logic [11:0] s;
    h   = pkt[0];
    len = h[27:17];
    s   = h[11:0];
    check(pkt_n == PKT_DW, $sformatf("packaged TLP has %0d DWs", pkt_n));
    check(beats == 9, $sformatf("packaged TLP in %0d beats", beats));
    check(h[31:28] == 4'hF && len == 11'(PKT_DW), "header identifier and length");
    if (gen3_exp != 0)
      check(h[16:13] == ref_cs(len) && h[12] == ^{len, ref_cs(len)}, "Gen3 length checksum");
    else
      check(h[16:12] == 5'd0, "no checksum without Gen3");
    bytes = new[2 + 4*TLP_DW];
    bytes[0] = {4'd0, s[11:8]};
    bytes[1] = s[7:0];
    for (int i = 0; i < TLP_DW; i++)
      for (int b = 0; b < 4; b++) bytes[2 + 4*i + b] = pkt[i+1][31-8*b -: 8];
    v = ref_crc32(bytes, 2 + 4*TLP_DW);
    check(pkt[PKT_DW-1] == {v[7:0], v[15:8], v[23:16], v[31:24]}, $sformatf("LCRC of seq %0d", s));
    if (int'(s) < N_TLP) begin
      bit same = 1;
      for (int i = 0; i < TLP_DW; i++) same &= (pkt[i+1] == tlp[s][i]);
      check(same, $sformatf("contents of TLP %0d", s));
    end else check(0, $sformatf("unexpected sequence number %0d", s));
    if (rx_n < 64) for (int i = 0; i < PKT_DW; i++) rx[rx_n][i] = pkt[i];
    rx_n++;
  endtask

  always @(posedge clk) if (rst_n) begin
    if (in_pkt && !mac_dv) begin
      failures++;
      $display("FAIL @%0d: gap inside a packaged TLP", cycle);
    end
    if (mac_dv) begin
      in_pkt = !mac_eot;
      if (mac_sot) begin pkt_n = 0; beats = 0; end
      beats++;
      for (int d = 0; d < 4; d++)
        if (!mac_eot || d <= int'(mac_ldw)) begin
          if (pkt_n < 40) pkt[pkt_n] = mac_data[127-32*d -: 32];
          pkt_n++;
        end
      if (mac_eot) check_packet();
    end
  end

  // the link never needs retraining here
  assign link_retrain_done = 1'b0;

  // ------------------------------------------------------------------
  task automatic dllp(input bit nak, input int seq);
    @(negedge clk);
    rvd_ack = !nak; rvd_nak = nak; rcvd_acknak_seq = 12'(seq);
    @(negedge clk);
    rvd_ack = 1'b0; rvd_nak = 1'b0;
  endtask

  task automatic cfg_write(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk); cfg_addr = a; cfg_din = d; cfg_wr = 1'b1;
    @(negedge clk); cfg_wr = 1'b0;
  endtask

  task automatic wait_cycles(input int n);
    repeat (n) @(negedge clk);
  endtask

  int n_full_stall = 0;
  always @(posedge clk) if (rst_n && tl_dv && tl_sot && !tl_ready &&
                            dut.u_rm.state == R_IDLE) n_full_stall++;

  task automatic run(input bit gen3);
    int first_rx;
    @(negedge clk); rst_n = 1'b0;
    n_queued = 0; n_taken = 0; cur_b = 0; rx_n = 0; in_pkt = 0;
    @(negedge clk); rst_n = 1'b1;
    cfg_write(4'd0, {31'd0, gen3});
    gen3_exp = gen3;
    make_tlps();
    // fill: no acknowledgement, the buffer takes exactly two
    n_queued = N_TLP;
    wait_cycles(100);
    check(rx_n == 2, $sformatf("TLPs sent before any ACK: %0d, expected 2", rx_n));
    check(n_taken == 2, $sformatf("TLPs taken into the buffer: %0d, expected 2", n_taken));
    check(dut.u_rm.rb_free == 10'd0, $sformatf("free beats with two TLPs stored: %0d", dut.u_rm.rb_free));
    check(tl_dv && !tl_ready, "third TLP held back while the buffer is full");
    // NAK acknowledging nothing: both are replayed exactly as first sent
    dllp(1'b1, 4095);
    wait_cycles(60);
    check(rx_n == 4, $sformatf("packaged TLPs after the NAK: %0d, expected 4", rx_n));
    for (int p = 0; p < 2; p++) begin
      bit same = 1;
      for (int i = 0; i < PKT_DW; i++) same &= (rx[p+2][i] == rx[p][i]);
      check(same, $sformatf("replay of TLP %0d identical to its first transmission", p));
    end
    // acknowledge one at a time: each ACK lets exactly one more TLP out
    for (int s = 0; s < N_TLP; s++) begin
      first_rx = rx_n;
      dllp(1'b0, s);
      wait_cycles(40);
      check(rx_n == first_rx + ((s + 2 < N_TLP) ? 1 : 0),
            $sformatf("after ACK %0d: %0d new TLPs", s, rx_n - first_rx));
      check(n_taken - (s + 1) <= 2, "never more than two TLPs stored");
    end
    check(n_taken == N_TLP && rx_n == N_TLP + 2, "all TLPs sent once, plus two replays");
    check(dut.u_rm.rb_free == 10'd16, "buffer empty at the end");
  endtask

  initial begin
    rvd_ack = 0; rvd_nak = 0; rcvd_acknak_seq = '0;
    cfg_addr = '0; cfg_wr = 0; cfg_rd = 0; cfg_din = '0;
    wait_cycles(3);
    run(1'b1);
    run(1'b0);
    check(n_full_stall > 0, "buffer-full stall happened");
    $display("full-buffer stall cycles: %0d", n_full_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
