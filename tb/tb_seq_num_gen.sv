// tb_seq_num_gen: checks the sequence number generator. After reset the
// number is 0; every alloc pulse adds one, cycles without alloc keep it,
// and after 4095 it returns to 0. 5000 random pulses are compared with a
// counter kept here.
`timescale 1ns/1ps
module tb_seq_num_gen;
  import pcie_retry_pkg::*;
  logic clk = 0, rst_n = 0, alloc = 0;
  seq_t seq;
  always #5 clk = ~clk;
  seq_num_gen dut (.*);
  int checks = 0, failures = 0;
  int model = 0, wraps = 0;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (seq != 0) failures++;
    for (int i = 0; i < 10000; i++) begin
      alloc = 1'($urandom_range(0, 1));
      @(negedge clk);
      if (alloc) begin
        model = (model + 1) % 4096;
        if (model == 0) wraps++;
      end
      checks++;
      if (seq != seq_t'(model)) begin
        failures++;
        if (failures < 10) $display("FAIL: seq %0d expected %0d", seq, model);
      end
    end
    checks++; if (wraps == 0) begin failures++; $display("FAIL: no wrap"); end
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
