// tb_pkg_mode_arbiter: checks the package mode arbiter with random
// inputs. Each cycle: a replay request must win; a new TLP may start only
// with its first beat offered and enough free retry buffer beats (the TLP
// size is worked out here from the Fmt, TD and Length fields); the mode
// is taken on `load` and then routes the chosen source and the ready.
`timescale 1ns/1ps
module tb_pkg_mode_arbiter;
  import pcie_retry_pkg::*;
  logic clk = 0, rst_n = 0;
  logic reply_req = 0;
  logic [9:0] rb_free = 0;
  logic tl_valid = 0, rp_valid = 0, load = 0, src_ready = 0;
  tlp_beat_t tl_beat = '0, rp_beat = '0, src_beat;
  logic tl_ready, rp_ready, start_ok, start_replay, mode_q, src_valid;
  always #5 clk = ~clk;
  pkg_mode_arbiter dut (.*);
  int checks = 0, failures = 0;
  int n_fit = 0, n_nofit = 0, n_rep = 0;
  bit mode = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      int dws, beats;
      bit exp_ok;
      reply_req = ($urandom_range(0, 3) == 0);
      tl_valid = 1'($urandom_range(0, 1)); rp_valid = 1'($urandom_range(0, 1));
      tl_beat = tlp_beat_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
      rp_beat = tlp_beat_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
      rb_free = 10'($urandom_range(0, 16));
      load = 1'($urandom_range(0, 1)); src_ready = 1'($urandom_range(0, 1));
      #1;
      dws = (tl_beat.data[125] ? 4 : 3) + (tl_beat.data[111] ? 1 : 0);
      if (tl_beat.data[126]) dws += (tl_beat.data[105:96] == 0) ? 1024 : int'(tl_beat.data[105:96]);
      beats = (dws + 3) / 4;
      exp_ok = reply_req || (tl_valid && tl_beat.sot && beats <= int'(rb_free));
      if (!reply_req && tl_valid && tl_beat.sot) begin
        if (beats <= int'(rb_free)) n_fit++; else n_nofit++;
      end
      if (reply_req) n_rep++;
      chk(start_ok == exp_ok, $sformatf("start_ok, beats %0d free %0d", beats, rb_free));
      chk(start_replay == reply_req, "replay wins");
      chk(mode_q == mode, "mode");
      chk(src_valid == (mode ? rp_valid : tl_valid), "src_valid");
      chk(src_beat == (mode ? rp_beat : tl_beat), "src_beat");
      chk(tl_ready == (src_ready && !mode) && rp_ready == (src_ready && mode), "ready routing");
      @(negedge clk);
      if (load) mode = reply_req;
    end
    chk(n_fit > 0 && n_nofit > 0 && n_rep > 0, "all cases seen");
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
