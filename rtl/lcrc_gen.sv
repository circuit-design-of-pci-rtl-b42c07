// lcrc_gen: LCRC generator of the TLP package module.
//
// Computes the 32-bit link CRC of a TLP over its 16-bit sequence field
// (4 reserved zero bits, then the 12-bit sequence number) followed by every
// byte of the TLP, one 128-bit beat per clock. The CRC is CRC-32 with the
// generator polynomial 04C11DB7h, processed least significant bit of each
// byte first (the reflected form, EDB88320h), seeded with FFFFFFFFh and
// complemented at the end. Byte order is the wire order of this design:
// DW0 first, bits [31:24] of each DW first.
//
// Interface: `valid` marks a beat. With `start` set the CRC is reseeded
// from `seq` before the beat is added. With `eot` set only DWs 0..`ldw`
// of the beat count. `lcrc` is the finished LCRC as the DW to append,
// arranged so that its first byte on the wire (bits [31:24]) is the low
// byte of the complemented CRC.
//
// Timing: one beat per cycle; `lcrc` reflects every beat up to the
// previous clock edge, so it is ready the cycle after the end beat.
// The CRC algorithm itself is this design's choice (the PCI Express LCRC
// uses the same polynomial); the text only asks for a 32-bit CRC over the
// TLP and its sequence number.
module lcrc_gen
  import pcie_retry_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              valid,
  input  logic              start,
  input  logic              eot,
  input  logic [1:0]        ldw,
  input  seq_t              seq,
  input  logic [DATA_W-1:0] data,
  output logic [31:0]       lcrc
);

  logic [31:0] crc_q, crc_base, crc_next;

  function automatic logic [31:0] crc_byte(input logic [31:0] c, input logic [7:0] b);
    logic [31:0] r;
    r = c ^ {24'd0, b};
    for (int k = 0; k < 8; k++) r = r[0] ? ((r >> 1) ^ 32'hEDB88320) : (r >> 1);
    return r;
  endfunction

  always_comb begin
    crc_base = crc_q;
    if (start) begin
      crc_base = crc_byte(32'hFFFF_FFFF, {4'd0, seq[11:8]});
      crc_base = crc_byte(crc_base, seq[7:0]);
    end
    crc_next = crc_base;
    for (int d = 0; d < DW_PER_BEAT; d++) begin
      if (!eot || (d <= int'(ldw))) begin
        for (int b = 0; b < 4; b++) begin
          crc_next = crc_byte(crc_next, data[DATA_W-1-32*d-8*b -: 8]);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     crc_q <= 32'hFFFF_FFFF;
    else if (valid) crc_q <= crc_next;
  end

  logic [31:0] fcs;
  assign fcs  = ~crc_q;
  assign lcrc = {fcs[7:0], fcs[15:8], fcs[23:16], fcs[31:24]};

endmodule
