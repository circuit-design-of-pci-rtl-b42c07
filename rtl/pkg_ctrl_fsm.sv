// pkg_ctrl_fsm: package control state machine of the TLP package module.
//
// Orders the packaging work so that one TLP is packaged at a time. After
// reset it is in S_IDLE. From there it enters replay mode (S_REPLY_START)
// when the arbiter reports a replay request, or normal mode (S_TLP_START)
// when a new TLP may start. The start state takes the first beat (the
// header DW is added there), the in-TLP/in-reply state takes the middle
// beats, and the end-of-packet flag sends it into one of three CRC adding
// sub-states chosen by how many DWs the last beat holds:
//   S_CRC_A  1 or 2 DWs: the last data and the LCRC leave in one beat
//   S_CRC_B  3 DWs: the LCRC leaves alone in an extra beat
//   S_CRC_C  4 DWs: the last data DW and the LCRC leave in an extra beat
// Every CRC sub-state returns to S_IDLE.
//
// Outputs: `src_ready` in the start and in states; `load` when a start is
// taken; `reply_grant`, a registered pulse in the first cycle of
// S_REPLY_START, telling the retry management that the package module is
// ready for replay data; `pkg_idle` in S_IDLE.
// Timing: the grant follows a replay request seen in S_IDLE by one clock.
// The state list and the three CRC sub-states follow the text; the split
// of the sub-states by DW count is this design's reading of it.
module pkg_ctrl_fsm
  import pcie_retry_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start_ok,
  input  logic       start_replay,
  input  logic       src_valid,
  input  logic       src_sot,
  input  logic       src_eot,
  input  logic [1:0] src_ldw,
  output pkg_state_e state,
  output logic       src_ready,
  output logic       load,
  output logic       reply_grant,
  output logic       pkg_idle
);

  pkg_state_e next;
  logic       fire;

  assign src_ready = (state == S_TLP_START) || (state == S_IN_TLP) ||
                     (state == S_REPLY_START) || (state == S_IN_REPLY);
  assign fire      = src_valid && src_ready;
  assign load      = (state == S_IDLE) && start_ok;
  assign pkg_idle  = (state == S_IDLE);

  function automatic pkg_state_e crc_state(input logic [1:0] ldw);
    case (ldw)
      2'd0, 2'd1: return S_CRC_A;
      2'd2:       return S_CRC_B;
      default:    return S_CRC_C;
    endcase
  endfunction

  always_comb begin
    next = state;
    case (state)
      S_IDLE:
        if (start_ok) next = start_replay ? S_REPLY_START : S_TLP_START;
      S_TLP_START, S_IN_TLP:
        if (fire) next = src_eot ? crc_state(src_ldw) : S_IN_TLP;
      S_REPLY_START, S_IN_REPLY:
        if (fire) next = src_eot ? crc_state(src_ldw) : S_IN_REPLY;
      default:
        next = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      reply_grant <= 1'b0;
    end else begin
      state       <= next;
      reply_grant <= load && start_replay;
    end
  end

  // The first beat taken in a start state must carry the start flag.
  a_sot_first: assert property (@(posedge clk) disable iff (!rst_n)
    (fire && (state == S_TLP_START || state == S_REPLY_START)) |-> src_sot);

endmodule
