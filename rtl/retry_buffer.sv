// retry_buffer: the retry buffer, a single-port RAM that keeps a copy of
// every TLP that has been sent but not yet acknowledged.
//
// Only TLP contents are stored (no sequence number, header DW or LCRC):
// the package module adds those again when a TLP is replayed, which is
// what keeps the buffer at 256 bytes for two 128-byte TLPs. Each word is
// one 128-bit beat plus its start/end flags and last-DW index, so the
// default 16 words hold 256 bytes of TLP data.
//
// Interface: one port, `addr` shared by reads and writes. `we` writes
// `wdata`; `re` reads, and `rdata` holds the word one clock later (a
// registered read, as a synchronous single-port SRAM gives). A write and
// a read are never requested in the same cycle (asserted).
// The single-port organisation and the 256-byte size follow the text;
// the word format and the registered read are this design's choices.
module retry_buffer
  import pcie_retry_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic          re,
  input  logic [AW-1:0] addr,
  input  tlp_beat_t     wdata,
  output tlp_beat_t     rdata
);

  tlp_beat_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we)      mem[addr] <= wdata;
    else if (re) rdata     <= mem[addr];
  end

  a_single_port: assert property (@(posedge clk) !(we && re));

endmodule
