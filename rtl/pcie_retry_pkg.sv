// pcie_retry_pkg: types and constants shared by the PCI Express Data Link
// Layer retry mechanism (TLP package module and retry management module).
//
// Every datapath in this design moves 128-bit beats of four double words
// (DW). DW0 of a beat sits in bits [127:96], DW3 in bits [31:0]; inside a
// DW the first byte on the wire is bits [31:24]. A beat carries start and
// end of packet flags and, on the end beat, the index of its last valid DW.
//
// The 128-bit width follows the 128-bit data buses of the retry logic's
// simulation trace. The 12-bit sequence number follows the description of
// the sequence number generator. The header DW layout, the TLP length
// decoding and the length checksum are this design's choices modelled on
// the PCI Express framing rules.
package pcie_retry_pkg;

  localparam int unsigned DATA_W      = 128;
  localparam int unsigned DW_PER_BEAT = DATA_W / 32;
  localparam int unsigned SEQ_W       = 12;

  typedef logic [SEQ_W-1:0] seq_t;

  // One beat of a TLP stream.
  typedef struct packed {
    logic              sot;   // first beat of a TLP
    logic              eot;   // last beat of a TLP
    logic [1:0]        ldw;   // index of the last valid DW (valid on eot)
    logic [DATA_W-1:0] data;  // DW0 in [127:96]
  } tlp_beat_t;

  // Package control state machine states (4-bit state register).
  typedef enum logic [3:0] {
    S_IDLE        = 4'd0,
    S_TLP_START   = 4'd1,  // normal mode: header DW + first data DWs
    S_IN_TLP      = 4'd2,  // normal mode: middle beats
    S_REPLY_START = 4'd3,  // replay mode: header DW + first data DWs
    S_IN_REPLY    = 4'd4,  // replay mode: middle beats
    S_CRC_A       = 4'd5,  // last beat had 1 or 2 DWs: data and LCRC in one beat
    S_CRC_B       = 4'd6,  // last beat had 3 DWs: LCRC alone
    S_CRC_C       = 4'd7   // last beat had 4 DWs: last data DW and LCRC
  } pkg_state_e;

  // Retry control (replay) states, 3-bit state register.
  typedef enum logic [2:0] {
    R_IDLE       = 3'd0,
    R_REPLY_REQ  = 3'd1,  // replay request raised, waiting for the grant
    R_WAIT       = 3'd2,  // first retry buffer read issued
    R_IN_REPLY   = 3'd3,  // streaming TLP copies to the package module
    R_DONE_PIPE  = 3'd4,  // waiting for the package module to finish
    R_RETRAIN    = 3'd5   // fourth replay: physical layer retrains the link
  } retry_state_e;

  // Number of DWs of a TLP, from its first header DW: 3 or 4 header DWs
  // (Fmt bit 29), the payload when Fmt bit 30 is set (Length field [9:0],
  // 0 meaning 1024) and one ECRC DW when TD (bit 15) is set.
  function automatic logic [10:0] tlp_total_dw(input logic [31:0] dw0);
    logic [10:0] n;
    n = dw0[29] ? 11'd4 : 11'd3;
    if (dw0[30]) n = n + ((dw0[9:0] == 10'd0) ? 11'd1024 : {1'b0, dw0[9:0]});
    if (dw0[15]) n = n + 11'd1;
    return n;
  endfunction

  // Number of 128-bit beats a TLP of n DWs occupies.
  function automatic logic [9:0] dw_to_beats(input logic [10:0] n);
    logic [11:0] t;
    t = {1'b0, n} + 12'd3;
    return t[11:2];
  endfunction

  // 4-bit checksum of the 11-bit packet length (Gen3 only): CRC with the
  // polynomial x^4 + x + 1, length bits fed most significant first.
  function automatic logic [3:0] len_checksum(input logic [10:0] len);
    logic [3:0] c;
    logic       fb;
    c = 4'd0;
    for (int i = 10; i >= 0; i--) begin
      fb = c[3] ^ len[i];
      c  = {c[2:0], 1'b0} ^ (fb ? 4'b0011 : 4'b0000);
    end
    return c;
  endfunction

  // Header DW placed in front of each packaged TLP:
  //   [31:28] header identifier 4'hF
  //   [27:17] packet length in DWs (header DW + TLP + LCRC)
  //   [16:13] length checksum (Gen3, else 0)
  //   [12]    even parity over length and checksum (Gen3, else 0)
  //   [11:0]  sequence number
  function automatic logic [31:0] make_header(input logic [10:0] tlp_dw,
                                              input seq_t        seq,
                                              input logic        gen3);
    logic [10:0] len;
    logic [3:0]  cs;
    logic        par;
    len = tlp_dw + 11'd2;
    cs  = gen3 ? len_checksum(len) : 4'd0;
    par = gen3 ? ^{len, cs} : 1'b0;
    return {4'hF, len, cs, par, seq};
  endfunction

endpackage
