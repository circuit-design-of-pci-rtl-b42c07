// sot_buffer: the start-of-TLP buffer, a single-port RAM holding, for each
// TLP in the retry buffer, the retry buffer address of its first beat.
//
// It is written with the sequence number of a new TLP as the address, so
// a sequence number taken from an ACK or NAK DLLP reads back where that
// TLP starts in the retry buffer. The address is the low bits of the
// sequence number; DEPTH must be at least the number of TLPs the retry
// buffer can hold at once (one per retry buffer word at most), so the
// default equals the retry buffer depth.
//
// Interface: one port; `we` writes `wdata` at `addr`, `re` reads and
// `rdata` follows one clock later. Write and read never coincide
// (asserted). Stored values are WIDTH bits: the retry buffer address
// plus one wrap bit, which lets the control logic count the free space.
module sot_buffer #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 5,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic             re,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we)      mem[addr] <= wdata;
    else if (re) rdata     <= mem[addr];
  end

  a_single_port: assert property (@(posedge clk) !(we && re));

endmodule
