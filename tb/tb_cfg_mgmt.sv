// tb_cfg_mgmt: checks the configuration register file: reset values,
// write and read back of CTRL and TIMER, the outputs they drive, the
// STATUS fields, the event counters and 0 from unused addresses. Read
// data is expected one clock after cfg_rd. A random phase then drives
// random reads, writes, status values and event pulses for 5000 cycles
// and compares every output each cycle with a register model.
`timescale 1ns/1ps
module tb_cfg_mgmt;
  import pcie_retry_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] cfg_addr = 0;
  logic cfg_wr = 0, cfg_rd = 0;
  logic [31:0] cfg_din = 0, cfg_dout;
  logic gen3_en;
  logic [15:0] timer_limit;
  seq_t ackd_seq = 12'h5A5, next_seq = 12'h123;
  logic [1:0] replay_num = 2'd2;
  logic [2:0] retry_state = 3'd3;
  logic replay_start = 0, retrain_start = 0;
  always #5 clk = ~clk;
  cfg_mgmt dut (.*);
  int checks = 0, failures = 0;
  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h expected %h", what, got, exp); end
  endtask
  task automatic rd(input logic [3:0] a, output logic [31:0] d);
    cfg_addr = a; cfg_rd = 1; @(negedge clk); cfg_rd = 0; d = cfg_dout;
  endtask
  task automatic wr(input logic [3:0] a, input logic [31:0] d);
    cfg_addr = a; cfg_din = d; cfg_wr = 1; @(negedge clk); cfg_wr = 0;
  endtask
  initial begin
    logic [31:0] d;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    chk({31'd0, gen3_en}, 32'd1, "gen3 reset");
    chk({16'd0, timer_limit}, 32'd711, "timer reset");
    rd(4'd0, d); chk(d, 32'd1, "CTRL read");
    rd(4'd1, d); chk(d, 32'd711, "TIMER read");
    wr(4'd0, 32'd0); chk({31'd0, gen3_en}, 32'd0, "gen3 write");
    wr(4'd1, 32'd1234); chk({16'd0, timer_limit}, 32'd1234, "timer write");
    rd(4'd1, d); chk(d, 32'd1234, "TIMER read back");
    rd(4'd2, d); chk(d, {3'd0, 3'd3, 2'd2, 12'h123, 12'h5A5}, "STATUS");
    for (int i = 0; i < 5; i++) begin replay_start = 1; @(negedge clk); replay_start = 0; @(negedge clk); end
    for (int i = 0; i < 2; i++) begin retrain_start = 1; @(negedge clk); retrain_start = 0; end
    rd(4'd3, d); chk(d, {16'd2, 16'd5}, "EVENTS");
    rd(4'd9, d); chk(d, 32'd0, "unused address");
    begin
      // model state, continuing from the directed part
      automatic logic        m_gen3 = 1'b0;
      automatic logic [15:0] m_timer = 16'd1234, m_nrep = 16'd5, m_nret = 16'd2;
      automatic logic [31:0] m_dout = d;
      for (int i = 0; i < 5000; i++) begin
        cfg_addr      = ($urandom_range(0, 3) != 0) ? 4'($urandom_range(0, 3)) : 4'($urandom);
        cfg_wr        = ($urandom_range(0, 3) == 0);
        cfg_rd        = ($urandom_range(0, 1) == 0);
        cfg_din       = $urandom;
        ackd_seq      = 12'($urandom);
        next_seq      = 12'($urandom);
        replay_num    = 2'($urandom);
        retry_state   = 3'($urandom);
        replay_start  = ($urandom_range(0, 3) == 0);
        retrain_start = ($urandom_range(0, 7) == 0);
        if (cfg_rd)
          case (cfg_addr)
            4'd0:    m_dout = {31'd0, m_gen3};
            4'd1:    m_dout = {16'd0, m_timer};
            4'd2:    m_dout = {3'd0, retry_state, replay_num, next_seq, ackd_seq};
            4'd3:    m_dout = {m_nret, m_nrep};
            default: m_dout = '0;
          endcase
        if (cfg_wr && cfg_addr == 4'd0) m_gen3 = cfg_din[0];
        if (cfg_wr && cfg_addr == 4'd1) m_timer = cfg_din[15:0];
        if (replay_start)  m_nrep++;
        if (retrain_start) m_nret++;
        @(negedge clk);
        chk(cfg_dout, m_dout, "random cfg_dout");
        chk({31'd0, gen3_en}, {31'd0, m_gen3}, "random gen3_en");
        chk({16'd0, timer_limit}, {16'd0, m_timer}, "random timer_limit");
      end
    end
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
