// pkg_process: package process of the TLP package module.
//
// Turns a TLP stream into a packaged stream for the Physical Layer: a
// header DW (header identifier, packet length, Gen3 length checksum and
// sequence number, see pcie_retry_pkg::make_header) goes in front of the
// TLP and the 32-bit LCRC behind it. Because the header takes one DW,
// every output beat is the previous input beat's DW3 (`carry`) followed
// by DW0..DW2 of the current input beat; the first output beat has the
// header in place of the carry.
//
// The package control state machine's state steers the work:
//   start states   assemble {header, DW0..DW2}
//   in states      assemble {carry, DW0..DW2}
//   S_CRC_A        last input beat had 1 or 2 DWs: {its DWs, LCRC}
//   S_CRC_B        last input beat had 3 DWs: {LCRC}
//   S_CRC_C        last input beat had 4 DWs: {carry, LCRC}
// The LCRC is registered in the LCRC generator, so it can only be added in
// the CRC sub-state after the end beat. When the last input beat has 3 or
// 4 DWs the packaged TLP is one beat longer than the TLP and every beat
// leaves as soon as it is assembled. When it has 1 or 2 DWs the packaged
// TLP has as many beats as the TLP, so each assembled beat is held back
// one cycle (`held`) and the packaged TLP still leaves as a run of
// back-to-back beats. Which case applies is known at the first beat from
// the TLP's Length field; the end beat must agree (asserted).
//
// Timing: outputs are registered. A beat leaves one clock after it is
// taken, or two clocks in the held case; the end beat leaves from the CRC
// sub-state. A TLP whose beats arrive with gaps leaves with the same gaps.
// Adding the header at the start and the LCRC at the end, and the three
// CRC sub-states, follow the text; the shifting and holding scheme is this
// design's choice.
module pkg_process
  import pcie_retry_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  pkg_state_e  state,
  input  logic        fire,
  input  tlp_beat_t   src_beat,
  input  seq_t        seq,
  input  logic        gen3,
  input  logic [31:0] lcrc,
  output logic        out_valid,
  output tlp_beat_t   out_beat
);

  logic [31:0]       carry;
  logic [DATA_W-1:0] held;
  logic              held_sot;
  logic              delay, delay_now;
  logic [DATA_W-1:0] stash;
  logic [1:0]        stash_ldw;
  logic              stash_sot;
  logic              is_start;
  logic [31:0]       prefix;
  logic [DATA_W-1:0] asm_beat;

  assign is_start = (state == S_TLP_START) || (state == S_REPLY_START);
  assign prefix   = is_start ? make_header(tlp_total_dw(src_beat.data[DATA_W-1 -: 32]), seq, gen3)
                             : carry;
  assign asm_beat = {prefix, src_beat.data[DATA_W-1:32]};

  // Last beat of this TLP holds 1 or 2 DWs: hold every beat back one cycle.
  logic [10:0] first_dw_cnt;
  assign first_dw_cnt = tlp_total_dw(src_beat.data[DATA_W-1 -: 32]) - 11'd1;
  assign delay_now    = is_start ? (first_dw_cnt[1:0] < 2'd2) : delay;

  // S_CRC_A: the held beat with the LCRC written after its last DW.
  logic [DATA_W-1:0] crc_a_beat;
  always_comb begin
    crc_a_beat = stash;
    if (stash_ldw == 2'd1) crc_a_beat[63:0] = {lcrc, 32'd0};
    else                   crc_a_beat[31:0] = lcrc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_beat  <= '0;
      carry     <= '0;
      held      <= '0;
      held_sot  <= 1'b0;
      delay     <= 1'b0;
      stash     <= '0;
      stash_ldw <= '0;
      stash_sot <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      case (state)
        S_CRC_A: begin
          out_valid <= 1'b1;
          out_beat  <= '{sot: stash_sot, eot: 1'b1, ldw: stash_ldw + 2'd1, data: crc_a_beat};
        end
        S_CRC_B: begin
          out_valid <= 1'b1;
          out_beat  <= '{sot: 1'b0, eot: 1'b1, ldw: 2'd0, data: {lcrc, 96'd0}};
        end
        S_CRC_C: begin
          out_valid <= 1'b1;
          out_beat  <= '{sot: 1'b0, eot: 1'b1, ldw: 2'd1, data: {carry, lcrc, 64'd0}};
        end
        default: begin
          if (fire) begin
            carry <= src_beat.data[31:0];
            delay <= delay_now;
            if (delay_now) begin
              // held case: the previous assembled beat leaves now
              if (!is_start) begin
                out_valid <= 1'b1;
                out_beat  <= '{sot: held_sot, eot: 1'b0, ldw: 2'd3, data: held};
              end
              held     <= asm_beat;
              held_sot <= is_start;
            end else if (!src_beat.eot || src_beat.ldw >= 2'd2) begin
              out_valid <= 1'b1;
              out_beat  <= '{sot: is_start, eot: 1'b0, ldw: 2'd3, data: asm_beat};
            end
            if (src_beat.eot && src_beat.ldw < 2'd2) begin
              stash     <= asm_beat;
              stash_ldw <= src_beat.ldw + 2'd1;
              stash_sot <= is_start;
            end
          end
        end
      endcase
    end
  end

  // The end beat's DW count agrees with the Length field seen at the start.
  a_len_agrees: assert property (@(posedge clk) disable iff (!rst_n)
    (fire && src_beat.eot && !(state inside {S_CRC_A, S_CRC_B, S_CRC_C})) |->
      (delay_now == (src_beat.ldw < 2'd2)));

endmodule
