// tb_lcrc_gen: checks the LCRC generator against a bit-serial CRC-32
// written here in the non-reflected form (poly 04C11DB7h on bit-reversed
// bytes), itself checked with the standard check value CBF43926h of
// "123456789". Random TLPs of 1 to 32 DWs with random sequence numbers
// are fed one beat per cycle; the LCRC is compared one cycle after the
// end beat, for every possible count of valid DWs in the last beat.
`timescale 1ns/1ps
module tb_lcrc_gen;
  import pcie_retry_pkg::*;
  logic clk = 0, rst_n = 0;
  logic valid = 0, start = 0, eot = 0;
  logic [1:0] ldw = 0;
  seq_t seq = 0;
  logic [127:0] data = 0;
  logic [31:0] lcrc;
  always #5 clk = ~clk;
  lcrc_gen dut (.*);
  int checks = 0, failures = 0;

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

  initial begin
    logic [7:0] tv [];
    logic [31:0] dw [32];
    automatic string s9 = "123456789";
    automatic int ldw_seen [4] = '{0, 0, 0, 0};
    tv = new[9];
    for (int i = 0; i < 9; i++) tv[i] = s9[i];
    checks++; if (ref_crc32(tv, 9) != 32'hCBF4_3926) failures++;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      int n, nb;
      logic [31:0] v, exp;
      n  = $urandom_range(1, 32);
      nb = (n + 3) / 4;
      seq = seq_t'($urandom);
      for (int i = 0; i < n; i++) dw[i] = $urandom;
      for (int b = 0; b < nb; b++) begin
        valid = 1; start = (b == 0); eot = (b == nb - 1);
        ldw = 2'((n - 1) % 4);
        data = '0;
        for (int d = 0; d < 4; d++) data[127-32*d -: 32] = (4*b + d < n) ? dw[4*b + d] : 32'($urandom);
        @(negedge clk);
        if ($urandom_range(0, 3) == 0) begin
          valid = 0; start = 0; eot = 0; data = 128'($urandom);
          @(negedge clk);
        end
      end
      valid = 0; start = 0; eot = 0;
      tv = new[2 + 4*n];
      tv[0] = {4'd0, seq[11:8]};
      tv[1] = seq[7:0];
      for (int i = 0; i < n; i++) for (int k = 0; k < 4; k++) tv[2 + 4*i + k] = dw[i][31-8*k -: 8];
      v   = ref_crc32(tv, 2 + 4*n);
      exp = {v[7:0], v[15:8], v[23:16], v[31:24]};
      ldw_seen[(n - 1) % 4]++;
      checks++;
      if (lcrc !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL: n=%0d seq=%0d lcrc %h expected %h", n, seq, lcrc, exp);
      end
      @(negedge clk);
    end
    for (int i = 0; i < 4; i++) begin checks++; if (ldw_seen[i] == 0) failures++; end
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
