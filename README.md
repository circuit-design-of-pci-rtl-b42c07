# PCI Express retry mechanism: transmit-side Data Link Layer

A PCI Express link guarantees delivery at the Data Link Layer. Each
Transaction Layer Packet (TLP) leaves with a 12-bit sequence number and a
32-bit LCRC. The sender keeps a copy until the receiver acknowledges it with
an ACK DLLP. A NAK DLLP, or no answer before the replay timer runs out, makes
the sender send every unacknowledged TLP again, in order and with its
original sequence number. If that keeps failing, the sender asks the Physical
Layer to retrain the link.

This RTL implements that transmit side. Its main idea concerns what is kept
in the retry buffer. The buffer holds the **bare TLP**, without the header
word and the LCRC that framing adds. On a replay the TLP goes back through
the same packaging logic as a new TLP. That logic adds the original sequence
number and recomputes the LCRC. Two 128-byte-payload TLPs then fit in a
256-byte buffer. Storing them packaged would take 272 bytes, or 273 bytes
with Gen3 framing.

## Structure

```
                         pcie_retry_top
  Transaction  ┌───────────────────────────────────────┐
  Layer  tl_*  │ tlp_package                           │ mac_*   Physical
  ────────────►│  pkg_mode_arbiter ─► pkg_ctrl_fsm     ├────────► Layer
               │  seq_num_gen   lcrc_gen   pkg_process │
               └──▲──────────┬──────────────▲──────────┘
        replayed  │ rp_*     │ copies       │ reply_req / reply_grant
        TLPs      │          ▼ rbw_*        │
               ┌──┴──────────────────────────┴─────────┐ link_retrain_*
  ACK/NAK ────►│ retry_mgmt                            │◄──────────────►
  rvd_*        │  retry_ctrl   retry_buffer (RAM)      │
               │  sot_buffer (RAM)   replay_timer      │
               └───────────────────────────────────────┘
  cfg_* ◄────► cfg_mgmt (settings, status, event counters)
```

All logic runs on a single clock, `clk`, with an asynchronous active-low
reset, `rst_n`. Every datapath carries `tlp_beat_t` beats, defined in
`pcie_retry_pkg`:

| Field | Bits | Meaning |
|---|---|---|
| `sot` | 1 | First beat of a TLP |
| `eot` | 1 | Last beat of a TLP |
| `ldw` | 2 | Index of the last valid DW on the `eot` beat |
| `data` | 128 | Four 32-bit DWs. DW0 is in `[127:96]`; the first byte on the wire is the top byte of each DW. |

## TLP package module (`tlp_package`)

### Two modes

`pkg_mode_arbiter` picks the source of the next TLP.

- **Replay mode** has priority whenever the retry controller raises
  `reply_req`. Beats come from the retry buffer, with the TLP's original
  sequence number on `rp_seq`. No copy is written.
- **Normal mode** takes the next TLP from the Transaction Layer.
  `seq_num_gen` gives it a new sequence number (0 to 4095, then wrapping).
  Each beat is also written to the retry buffer as it goes by.

A new TLP starts only if the retry buffer has room for all of its beats. Its
size is decoded from its first header DW:

- Fmt bit 29 gives 3 or 4 header DWs.
- Fmt bit 30 says whether it has a payload. The payload size is Length
  `[9:0]`, where 0 means 1024.
- The TD bit 15 adds one digest DW.

While the buffer is full, `tl_ready` stays low. The switch to replay happens
only between TLPs. The controller's request is answered by a registered
`reply_grant` pulse, one clock after the package module is seen idle.

### Control state machine (`pkg_ctrl_fsm`)

The state register is 4 bits wide. From `S_IDLE`, the machine enters
`S_TLP_START` → `S_IN_TLP` (normal) or `S_REPLY_START` → `S_IN_REPLY`
(replay). After the end beat it spends one clock in a CRC state chosen by how
many DWs the last beat held:

| Last beat | State | Beat produced |
|---|---|---|
| 1 or 2 DWs | `S_CRC_A` | the remaining DWs followed by the LCRC, in the same beat |
| 3 DWs | `S_CRC_B` | the LCRC alone |
| 4 DWs | `S_CRC_C` | the last data DW and the LCRC |

### Framing (`pkg_process`, `lcrc_gen`)

Each packaged TLP is one header DW, then the TLP, then the LCRC DW.

**Header DW:** `{4'hF, len[10:0], csum[3:0], parity, seq[11:0]}`.
- `len` is the packaged length in DWs: TLP + header + LCRC.
- `csum` is a CRC-4 (x⁴+x+1) of `len`. It is added only when Gen3 framing
  is enabled and is 0 otherwise.
- `parity` is the XOR of `len` and `csum`. It too is 0 when Gen3 framing is
  off.

This layout is modelled on the Gen3 STP token, but it is this design's own
format. Change `make_header` in the package to use another.

**LCRC:** the PCI Express CRC-32. It uses polynomial 04C11DB7h processed
LSB-first (reflected form EDB88320h), seed FFFFFFFFh, and complements the
result. It runs over the 16-bit field `{4'b0, seq}` and then every TLP byte
in wire order, one 128-bit beat per clock. The complemented remainder is sent
byte-reversed, so its byte 0 goes first.

**Keeping the output back to back:** the header pushes every DW one position
later. Each output beat is therefore the previous input beat's DW3
(`carry`) plus DW0–DW2 of the current input beat.

- If the last input beat had 3 or 4 DWs, the packaged TLP is one beat longer
  than the input. Beats leave as soon as they are assembled.
- If the last beat had only 1 or 2 DWs, the packaged TLP has the same number
  of beats as the input. The final beat cannot be built until the LCRC,
  which is registered, is ready one clock after the end beat. So every beat
  of that TLP is held back one clock, and the packaged TLP still leaves as an
  unbroken run of beats. Which case applies is known from the Length field on
  the first beat. An assertion checks that the end beat agrees.

**Latency:** one clock from a taken beat to `mac_*` in the first case, two in
the second. `mac_dv` has no back-pressure.

## Retry management module (`retry_mgmt`)

### Retry buffer and sot buffer

`retry_buffer` is a single-port RAM. It has 16 words of 132 bits: 256 bytes
of TLP data plus the beat flags. Reads are registered.

`sot_buffer` is a second single-port RAM with 16 entries, indexed by the low
4 bits of the sequence number. It stores the retry-buffer address at which
each TLP starts, so the buffer can be entered at any TLP from just a sequence
number. The controller's pointers carry an extra wrap bit, and so do the sot
buffer entries. Free space is the depth minus (write pointer − free pointer).

### Acknowledging

An ACK or NAK with sequence number S acknowledges every TLP up to and
including S. The controller reads the sot buffer at S+1 to find where the
oldest unacknowledged TLP starts, and moves the free pointer there. If S is
the newest stored TLP, the free pointer moves to the end of the stored data.

Nothing is erased; acknowledged copies are simply overwritten. Other rules:

- A sequence number outside the range from the last acknowledged TLP to the
  newest sent TLP is ignored.
- The sot buffer port is shared: TLP-start writes win, and a lookup waits a
  clock.
- ACK/NAKs that arrive during a replay or retrain are merged and handled
  afterwards. The newest number is kept, and so is a NAK flag.

### Replay (`retry_ctrl`)

The state register is 3 bits wide, with states `R_IDLE`, `R_REPLY_REQ`,
`R_WAIT`, `R_IN_REPLY`, `R_DONE_PIPE` and `R_RETRAIN`.

1. A NAK, or an expiry of the replay timer, moves the controller to
   `R_REPLY_REQ` and raises `reply_req`.
2. After `reply_grant`, the controller reads the retry buffer from the free
   pointer to the end of the stored data.
3. The read beats go through a two-entry FIFO, so the package module's ready
   signal can pause the replay. `rp_seq` starts at the last acknowledged
   number + 1 and steps on each end beat.
4. In `R_DONE_PIPE` the controller waits for the package module to go idle,
   then pulses `reply_done`.

**Retraining:** replays are counted in `replay_num`. The count is cleared by
any ACK/NAK that acknowledges new TLPs. The fourth replay request in a row
goes to `R_RETRAIN` instead. That state drives `link_retrain_req` until
`link_retrain_done`, and the replay follows.

### Replay timer (`replay_timer`)

The timer starts when the end of a packaged TLP is sent while it is not
already running. It also starts when a replay completes. Any ACK/NAK resets
it to zero. It is held during replay and retraining, and stops once nothing
is unacknowledged.

When it reaches its limit, it pulses `timer_expire`. The limit is set
through the configuration interface. The default is 711 cycles, the PCI
Express limit in symbol times for a 128-byte payload on a x1 link, reused
here as clock cycles. This default is an assumption.

## Configuration interface (`cfg_mgmt`)

Writes take effect on the clock edge with `cfg_wr`. Reads return on
`cfg_dout` one clock after `cfg_rd`.

| Addr | Name | Access | Contents |
|---|---|---|---|
| 0 | CTRL | rw | `[0]` Gen3 length checksum enable (reset 1) |
| 1 | TIMER | rw | `[15:0]` replay timer limit (reset 711) |
| 2 | STATUS | ro | `[11:0]` last acknowledged seq, `[23:12]` next seq, `[25:24]` replay count, `[28:26]` retry state |
| 3 | EVENTS | ro | `[15:0]` replays started, `[31:16]` link retrains |

## Parameters of `pcie_retry_top`

| Parameter | Default | Meaning |
|---|---|---|
| `RB_BYTES` | 256 | Retry buffer size in bytes of TLP data (16-byte words) |
| `TIMER_DEFAULT` | 711 | Reset value of the replay timer limit |
| `GEN3_DEFAULT` | 1 | Reset value of the Gen3 checksum enable |

The 256-byte default holds two 128-byte TLPs, 8 beats each. A new TLP
waits until all of it fits, so the Transaction Layer must never send a TLP
longer than the buffer. The end-to-end test sends TLPs of up to 32 DWs in
total. `RB_BYTES / 16` must be a power of two, which is checked at
elaboration. The sot buffer has one entry per retry-buffer word, enough for
the most TLPs the buffer can hold.

A TLP with a full 128-byte payload plus a 4-DW header and a digest is 37
DWs, or 10 beats. Holding two of those needs 20 words, so set `RB_BYTES` to
512.

## Where this design departs from, or goes beyond, the source description

These items come from the source description:

- The two modules.
- Storing unpackaged copies and repackaging them on replay.
- The sot buffer holding TLP start addresses, addressed by sequence number.
- Two single-port RAMs.
- The three CRC sub-states.
- A 256-byte buffer.
- The 12-bit sequence number.
- Replaying on a NAK or timeout.
- Retraining after more than three replays.
- The replay state names.
- The 128-bit data width.

These are this design's own choices:

- The header format and checksum.
- The LCRC bit ordering.
- All handshakes (`reply_req`/`reply_grant`, ready signals, `reply_done`).
- The beat-holding scheme.
- The buffer-full stall.
- The wrap-bit pointers.
- Deferring ACK/NAKs during a replay.
- The FIFO in the replay path.
- The timer default and the timer's hold and restart rules.
- The whole register map.

A trace of the original design shows 7-bit retry-buffer and sot-buffer
addresses, which suggest larger buffers. Here the sizes follow the stated
256 bytes.

A NAK here acknowledges TLPs up to its sequence number, as in PCI Express.
It also starts a replay, like a timeout.

The following are not part of the RTL and appear only as top-level ports:

- The Transaction Layer.
- The receive side that decodes ACK/NAK DLLPs.
- The Physical Layer, including its retraining.

The Physical Layer is assumed to accept one beat per clock.

## Simulation

Each module has a self-checking testbench, `tb/tb_<module>.sv`. Each
testbench:

- drives random traffic;
- compares the outputs with an independent model in the testbench;
- prints `TB_RESULT checks=<n> failures=<n>`;
- has a watchdog.

For example, to simulate the whole design at its default parameters:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -Irtl -y rtl -y tb +libext+.sv \
  rtl/pcie_retry_pkg.sv tb/tb_pcie_retry_top.sv --top-module tb_pcie_retry_top
./obj_dir/Vtb_pcie_retry_top
```

Other blocks work the same way; only the top module name changes. The
simulator is two-state, so every register that is read is reset.

**End-to-end test:** `tb_pcie_retry_top` runs at the defaults. It sends a
few thousand random TLPs of all header and payload shapes. A receiver model
checks every packaged TLP on `mac_*`:

- header fields and parity;
- Gen3 checksum;
- LCRC, recomputed bit by bit;
- in-order sequence numbers;
- payload against the sent TLP;
- no gaps inside a packaged TLP.

It answers with random ACKs, NAKs and silence. It also checks duplicates
after replays, retraining after repeated replays, a sequence-number wrap,
register reads, and a run with Gen3 framing off. It counts each event and
fails if any never happened: NAK replay, timer replay, retrain, buffer-full
stall, blocking during replay, each CRC sub-state, sequence-number wrap, and
Gen3 on/off.

**Buffer-sizing test:** `tb_workload_max_tlp` also runs at the defaults. It
sends only 128-byte TLPs, with Gen3 framing on and then off, and checks
that:

- without acknowledgements, exactly two TLPs are stored and sent, and the
  third waits;
- each packaged TLP is 34 DWs in nine back-to-back beats;
- a NAK replays both TLPs bit for bit as first sent;
- each later ACK releases exactly one more TLP.

Each of these tests runs in well under a second.
