// tb_pkg_process: checks the package process on its own. The testbench
// plays the state machine (start, in-packet and CRC states) and the LCRC
// generator (a random LCRC value held in the CRC state), feeding random
// TLPs of 1 to 32 DWs with random gaps between TLPs. The packaged beats
// are collected and compared DW by DW with the expected packet: the header
// DW (identifier F, length = TLP DWs + 2, Gen3 length checksum and parity
// computed here, sequence number), the TLP and the LCRC. Start, end and
// last-DW flags are checked, and once the first packaged beat leaves the
// rest must follow on consecutive cycles (the input beats of a TLP are
// back to back here).
`timescale 1ns/1ps
module tb_pkg_process;
  import pcie_retry_pkg::*;
  logic clk = 0, rst_n = 0;
  pkg_state_e state = S_IDLE;
  logic fire = 0, gen3 = 1;
  tlp_beat_t src_beat = '0, out_beat;
  seq_t seq = 0;
  logic [31:0] lcrc = 0;
  logic out_valid;
  always #5 clk = ~clk;
  pkg_process dut (.*);
  int checks = 0, failures = 0;

  function automatic logic [3:0] ref_cs(input logic [10:0] len);
    logic [14:0] r;
    r = {len, 4'd0};
    for (int b = 14; b >= 4; b--) if (r[b]) r = r ^ (15'h13 << (b - 4));
    return r[3:0];
  endfunction
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, what); end
  endtask

  logic [31:0] got [40];
  int got_n = 0, got_pkts = 0;
  bit in_pkt = 0;
  logic [31:0] expq [40];
  int exp_n = 0;
  bit last_valid = 0;
  always @(posedge clk) begin
    if (rst_n && in_pkt && !out_valid) begin failures++; checks++; $display("FAIL: gap inside a packaged TLP"); end
    if (rst_n && out_valid) begin
      if (out_beat.sot) begin got_n = 0; in_pkt = 1; end
      for (int d = 0; d < 4; d++)
        if (!out_beat.eot || d <= int'(out_beat.ldw)) begin
          if (got_n < 40) got[got_n] = out_beat.data[127-32*d -: 32];
          got_n++;
        end
      if (out_beat.eot) begin
        automatic bit same = (got_n == exp_n);
        for (int i = 0; i < exp_n && same; i++) same = (got[i] == expq[i]);
        chk(same, $sformatf("packaged TLP %0d: %0d DWs, expected %0d", got_pkts, got_n, exp_n));
        got_pkts++;
        in_pkt = 0;
      end
    end
  end

  initial begin
    logic [31:0] dw [32];
    automatic int n, nb, sent = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      logic [10:0] len;
      logic [3:0]  cs;
      bit hdr4, has_data, td;
      int hdr, pay;
      @(negedge clk);
      gen3 = 1'($urandom_range(0, 1));
      seq = seq_t'($urandom);
      hdr4 = 1'($urandom_range(0, 1)); has_data = 1'($urandom_range(0, 1)); td = 1'($urandom_range(0, 1));
      hdr = hdr4 ? 4 : 3;
      pay = has_data ? $urandom_range(1, 32 - hdr - (td ? 1 : 0)) : 0;
      n = hdr + pay + (td ? 1 : 0);
      nb = (n + 3) / 4;
      for (int i = 0; i < n; i++) dw[i] = $urandom;
      dw[0][30] = has_data; dw[0][29] = hdr4; dw[0][15] = td;
      if (has_data) dw[0][9:0] = 10'(pay);
      len = 11'(n + 2);
      cs = gen3 ? ref_cs(len) : 4'd0;
      wait (!in_pkt && got_pkts == sent);
      expq[0] = {4'hF, len, cs, gen3 ? ^{len, cs} : 1'b0, seq};
      for (int i = 0; i < n; i++) expq[i+1] = dw[i];
      lcrc = $urandom;
      expq[n+1] = lcrc;
      exp_n = n + 2;
      for (int b = 0; b < nb; b++) begin
        state = (b == 0) ? S_TLP_START : S_IN_TLP;
        if ($urandom_range(0, 1) != 0) state = (b == 0) ? S_REPLY_START : S_IN_REPLY;
        while (b == 0 && $urandom_range(0, 3) == 0) begin
          fire = 0; src_beat = tlp_beat_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
          @(negedge clk);
        end
        fire = 1;
        src_beat.sot = (b == 0); src_beat.eot = (b == nb - 1); src_beat.ldw = 2'((n - 1) % 4);
        for (int d = 0; d < 4; d++) src_beat.data[127-32*d -: 32] = (4*b + d < n) ? dw[4*b + d] : 32'($urandom);
        @(negedge clk);
      end
      fire = 0;
      state = ((n - 1) % 4 < 2) ? S_CRC_A : (((n - 1) % 4 == 2) ? S_CRC_B : S_CRC_C);
      @(negedge clk);
      state = S_IDLE;
      lcrc = $urandom;
      sent++;
    end
    repeat (3) @(negedge clk);
    chk(got_pkts == sent, "every TLP packaged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
