// tb_retry_buffer: checks the retry buffer RAM. Random writes and reads
// (never both in one cycle) are compared with an array kept here; read
// data must appear one clock after the read and hold while idle.
`timescale 1ns/1ps
module tb_retry_buffer;
  import pcie_retry_pkg::*;
  logic clk = 0, we = 0, re = 0;
  logic [3:0] addr = 0;
  tlp_beat_t wdata = '0, rdata;
  always #5 clk = ~clk;
  retry_buffer dut (.*);
  int checks = 0, failures = 0;
  tlp_beat_t model [16];
  bit        known [16];
  initial begin
    tlp_beat_t exp;
    automatic bit have = 0;
    for (int i = 0; i < 16; i++) known[i] = 0;
    @(negedge clk);
    for (int i = 0; i < 3000; i++) begin
      automatic int op = $urandom_range(0, 2);
      we = (op == 0); re = (op == 1);
      addr = 4'($urandom);
      wdata = tlp_beat_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
      @(posedge clk);
      if (we) begin model[addr] = wdata; known[addr] = 1; end
      if (re && known[addr]) begin exp = model[addr]; have = 1; end
      else if (re) have = 0;
      @(negedge clk);
      if (have) begin
        checks++;
        if (rdata !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL: addr %0d", addr);
        end
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
