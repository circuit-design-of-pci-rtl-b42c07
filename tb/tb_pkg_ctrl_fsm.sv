// tb_pkg_ctrl_fsm: checks the package control state machine. Random TLPs
// of 1 to 8 beats are offered in normal or replay mode with random gaps.
// Checked each cycle against a cycle model kept here: idle after reset;
// a start is taken from idle in one cycle; a replay request gives a grant
// pulse exactly one clock later, in the reply start state; beats are taken
// only in the start and in-packet states; the end beat leads to the CRC
// sub-state chosen by its DW count (1-2, 3, 4 DWs); the CRC state lasts
// one cycle and returns to idle. A TLP of n beats with no gaps takes n + 2
// cycles from leaving idle to being idle again.
`timescale 1ns/1ps
module tb_pkg_ctrl_fsm;
  import pcie_retry_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start_ok = 0, start_replay = 0, src_valid = 0, src_sot = 0, src_eot = 0;
  logic [1:0] src_ldw = 0;
  pkg_state_e state;
  logic src_ready, load, reply_grant, pkg_idle;
  always #5 clk = ~clk;
  pkg_ctrl_fsm dut (.*);
  int checks = 0, failures = 0;
  int seen_crc [3] = '{0, 0, 0};
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, what); end
  endtask
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    chk(state == S_IDLE && pkg_idle, "idle after reset");
    for (int t = 0; t < 600; t++) begin
      int nb, cyc;
      bit rep, gaps;
      logic [1:0] l;
      pkg_state_e exp_crc;
      nb = $urandom_range(1, 8); rep = 1'($urandom_range(0, 1)); l = 2'($urandom);
      gaps = 1'($urandom_range(0, 1));
      exp_crc = (l < 2) ? S_CRC_A : ((l == 2) ? S_CRC_B : S_CRC_C);
      // idle: nothing offered for a while
      repeat ($urandom_range(0, 2)) begin
        @(negedge clk); chk(state == S_IDLE && !src_ready && !reply_grant, "stays idle");
      end
      start_ok = 1; start_replay = rep;
      #1 chk(load, "load in idle with start_ok");
      cyc = 0;
      @(negedge clk); cyc++;
      start_ok = 0; start_replay = 0;
      chk(state == (rep ? S_REPLY_START : S_TLP_START), "start state");
      chk(reply_grant == rep, "grant one clock after the replay request");
      for (int b = 0; b < nb; b++) begin
        if (gaps) while ($urandom_range(0, 2) == 0) begin
          src_valid = 0; @(negedge clk); cyc++;
          chk(reply_grant == 0, "single grant pulse");
        end
        src_valid = 1; src_sot = (b == 0); src_eot = (b == nb - 1); src_ldw = l;
        #1 chk(src_ready, "ready in start/in state");
        @(negedge clk); cyc++;
        src_valid = 0;
        if (b < nb - 1) chk(state == (rep ? S_IN_REPLY : S_IN_TLP), "in state");
      end
      chk(state == exp_crc, $sformatf("CRC sub-state for ldw %0d", l));
      seen_crc[exp_crc == S_CRC_A ? 0 : (exp_crc == S_CRC_B ? 1 : 2)]++;
      #1 chk(!src_ready, "no beat taken in the CRC state");
      @(negedge clk); cyc++;
      chk(state == S_IDLE, "back to idle");
      if (!gaps) chk(cyc == nb + 2, $sformatf("cycles %0d for %0d beats", cyc, nb));
    end
    chk(seen_crc[0] > 0 && seen_crc[1] > 0 && seen_crc[2] > 0, "all CRC sub-states");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
