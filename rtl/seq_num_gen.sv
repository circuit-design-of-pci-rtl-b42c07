// seq_num_gen: sequence number generator of the TLP package module.
//
// Hands out a 12-bit sequence number to every new TLP taken from the
// Transaction Layer. `seq` is the number the next new TLP receives; an
// `alloc` pulse (one per new TLP, on its first accepted beat) moves it on
// by one. The count runs 0, 1, ... 4095 and then starts again at 0, as the
// PCI Express sequence number rules require. Replayed TLPs keep the number
// they were first sent with and do not pulse `alloc`.
//
// Timing: `seq` is a register; it changes on the clock edge after `alloc`.
// Reset value 0 is this design's choice.
module seq_num_gen
  import pcie_retry_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic alloc,
  output seq_t seq
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     seq <= '0;
    else if (alloc) seq <= (seq == seq_t'(4095)) ? '0 : seq + seq_t'(1);
  end

endmodule
