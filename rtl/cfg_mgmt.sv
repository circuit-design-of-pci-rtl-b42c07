// cfg_mgmt: external circuit configuration management interface.
//
// A small register file through which an external controller sets up and
// observes the retry logic. Registers (32 bits, word addresses):
//   0  CTRL     rw  [0] Gen3 framing: add the packet length checksum
//   1  TIMER    rw  [15:0] replay timer limit in clock cycles
//   2  STATUS   ro  [11:0] last acknowledged sequence number,
//                   [23:12] next sequence number, [25:24] replay count
//                   since the last acknowledgement, [28:26] retry state
//   3  EVENTS   ro  [15:0] replays started, [31:16] link retrains
//   others read as 0.
// A write (`cfg_wr`) takes `cfg_din` at `cfg_addr` on the clock edge; a
// read (`cfg_rd`) returns the register on `cfg_dout` one clock later.
// Only the existence of this interface and its signal names are given;
// the register map, widths and read timing are this design's choices.
module cfg_mgmt
  import pcie_retry_pkg::*;
#(
  parameter logic        GEN3_DEFAULT  = 1'b1,
  parameter int unsigned TIMER_DEFAULT = 711
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  cfg_addr,
  input  logic        cfg_wr,
  input  logic        cfg_rd,
  input  logic [31:0] cfg_din,
  output logic [31:0] cfg_dout,
  // configuration outputs
  output logic        gen3_en,
  output logic [15:0] timer_limit,
  // status inputs
  input  seq_t        ackd_seq,
  input  seq_t        next_seq,
  input  logic [1:0]  replay_num,
  input  logic [2:0]  retry_state,
  input  logic        replay_start,
  input  logic        retrain_start
);

  logic [15:0] n_replay, n_retrain;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gen3_en     <= GEN3_DEFAULT;
      timer_limit <= 16'(TIMER_DEFAULT);
      n_replay    <= '0;
      n_retrain   <= '0;
      cfg_dout    <= '0;
    end else begin
      if (cfg_wr) begin
        case (cfg_addr)
          4'd0:    gen3_en     <= cfg_din[0];
          4'd1:    timer_limit <= cfg_din[15:0];
          default: ;
        endcase
      end
      if (replay_start)  n_replay  <= n_replay + 1'b1;
      if (retrain_start) n_retrain <= n_retrain + 1'b1;
      if (cfg_rd) begin
        case (cfg_addr)
          4'd0:    cfg_dout <= {31'd0, gen3_en};
          4'd1:    cfg_dout <= {16'd0, timer_limit};
          4'd2:    cfg_dout <= {3'd0, retry_state, replay_num, next_seq, ackd_seq};
          4'd3:    cfg_dout <= {n_retrain, n_replay};
          default: cfg_dout <= '0;
        endcase
      end
    end
  end

endmodule
