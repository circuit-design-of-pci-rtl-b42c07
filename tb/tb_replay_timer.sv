// tb_replay_timer: checks the replay timer with a limit of 20 cycles.
// Each scenario records the clock edge that starts or resets the timer
// and expects `expire` exactly `limit` edges later (or never):
//  - nothing outstanding: a sent TLP does not start it;
//  - a sent TLP starts it and it expires once;
//  - an ACK/NAK part-way resets it to 0 and it expires later;
//  - hold (replay in progress) keeps it from expiring;
//  - the end of a replay (restart) starts it again;
//  - a second sent TLP while running does not restart it.
// A second phase drives random inputs for 20000 cycles with random limits
// and compares `expire` and `running` every cycle with a model that keeps
// the clock edge of the last start or reset and expects expiry exactly
// `limit` edges after it.
`timescale 1ns/1ps
module tb_replay_timer;
  logic clk = 0, rst_n = 0;
  logic [15:0] limit = 16'd20;
  logic tlp_sent = 0, restart = 0, acknak_rcvd = 0, outstanding = 0, hold = 0;
  logic expire, running;
  always #5 clk = ~clk;
  replay_timer dut (.*);
  int checks = 0, failures = 0;
  int edge_n = 0, last_expire = -1, n_expire = 0;
  always @(posedge clk) begin
    edge_n <= edge_n + 1;
  end
  always @(negedge clk) if (expire) begin last_expire = edge_n; n_expire++; end

  // reference model, evaluated on the same edges as the timer
  bit m_run = 0, m_exp = 0, m_on = 0;
  int m_start = 0;
  always @(posedge clk) if (m_on) begin
    m_exp = 0;
    if (!outstanding || hold) m_run = 0;
    else if (acknak_rcvd) begin m_run = 1; m_start = edge_n; end
    else if ((tlp_sent || restart) && !m_run) begin m_run = 1; m_start = edge_n; end
    else if (m_run && edge_n - m_start >= int'(limit)) begin m_run = 0; m_exp = 1; end
  end
  always @(negedge clk) if (m_on) begin
    checks++;
    if (expire != m_exp || running != m_run) begin
      failures++;
      if (failures < 10) $display("FAIL random: edge %0d expire=%0b/%0b running=%0b/%0b",
                                  edge_n, expire, m_exp, running, m_run);
    end
  end

  task automatic step(input int n);
    repeat (n) @(negedge clk);
  endtask
  task automatic pulse_sent();
    tlp_sent = 1; @(negedge clk); tlp_sent = 0;
  endtask
  task automatic expect_expire(input int start_edge, input string what);
    checks++;
    if (last_expire != start_edge + 20) begin
      failures++;
      $display("FAIL %s: expire at edge %0d, expected %0d", what, last_expire, start_edge + 20);
    end
  endtask

  initial begin
    int s;
    step(2); rst_n = 1; step(1);
    // nothing outstanding
    pulse_sent(); step(40);
    checks++; if (n_expire != 0) begin failures++; $display("FAIL: expired with nothing outstanding"); end
    // plain expiry
    outstanding = 1;
    s = edge_n + 1; pulse_sent(); step(30);
    expect_expire(s, "plain");
    checks++; if (n_expire != 1) begin failures++; $display("FAIL: expire count %0d", n_expire); end
    // ACK part-way
    s = edge_n + 1; pulse_sent(); step(10);
    s = edge_n + 1; acknak_rcvd = 1; step(1); acknak_rcvd = 0;
    step(5); pulse_sent(); step(30);
    expect_expire(s, "after ack reset");
    // hold
    hold = 1; pulse_sent(); step(40); hold = 0;
    checks++; if (n_expire != 2) begin failures++; $display("FAIL: expired during hold"); end
    // restart at the end of a replay
    s = edge_n + 1; restart = 1; step(1); restart = 0; step(30);
    expect_expire(s, "restart");
    // everything acknowledged part-way: stops
    pulse_sent(); step(5); outstanding = 0; step(40);
    checks++; if (n_expire != 3) begin failures++; $display("FAIL: expired with nothing outstanding"); end
    // random phase
    for (int seg = 0; seg < 40; seg++) begin
      outstanding = 0; hold = 0; tlp_sent = 0; restart = 0; acknak_rcvd = 0;
      limit = 16'($urandom_range(1, 40));
      step(2);
      m_run = 0; m_exp = 0; m_on = 1;
      repeat (500) begin
        outstanding = ($urandom_range(0, 49) != 0);
        hold        = ($urandom_range(0, 19) == 0);
        tlp_sent    = ($urandom_range(0, 9) == 0);
        restart     = ($urandom_range(0, 29) == 0);
        acknak_rcvd = ($urandom_range(0, 24) == 0);
        step(1);
      end
      m_on = 0;
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
