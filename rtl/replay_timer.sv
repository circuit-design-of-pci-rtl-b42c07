// replay_timer: the REPLAY TIMER of the Data Link Layer transmitter.
//
// It measures how long sent TLPs have waited for an answer. The timer is
// started by the last symbol of a TLP transmission or retransmission
// (`tlp_sent`, the end beat leaving the package module) when it is not
// already running, or by the end of a replay (`restart`), and goes back to 0 whenever an ACK or NAK DLLP arrives
// (`acknak_rcvd`); it keeps running after that while unacknowledged TLPs
// remain (`outstanding`). When it reaches `limit` cycles it pulses
// `expire` once, which asks for a replay, and stops. It is held at 0 and
// stopped while nothing is outstanding and while a replay or link
// retraining is under way (`hold`).
//
// Timing: `expire` is a registered one-cycle pulse, raised on the clock
// edge at which the count reaches `limit`. The start, reset and expiry
// rules follow the text; the hold during replay and the stop when
// everything is acknowledged are this design's choices.
module replay_timer #(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CNT_W-1:0] limit,
  input  logic             tlp_sent,
  input  logic             restart,
  input  logic             acknak_rcvd,
  input  logic             outstanding,
  input  logic             hold,
  output logic             expire,
  output logic             running
);

  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      running <= 1'b0;
      expire  <= 1'b0;
    end else begin
      expire <= 1'b0;
      if (!outstanding || hold) begin
        cnt     <= '0;
        running <= 1'b0;
      end else if (acknak_rcvd) begin
        cnt     <= '0;
        running <= 1'b1;
      end else if ((tlp_sent || restart) && !running) begin
        cnt     <= '0;
        running <= 1'b1;
      end else if (running) begin
        if (cnt + 1'b1 >= limit) begin
          cnt     <= '0;
          running <= 1'b0;
          expire  <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
