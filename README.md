# PBX to ATM user-network interface over a DS1/T1 line

This RTL describes a board that sits between a PBX trunk card and a T1
(DS1) line. It carries 21 telephone channels from the PBX as ATM cells.

- **Transmit direction.** The board collects the bytes of each voice channel
  from the PBX's 2.048 Mb/s time-division highway. Each cell holds 47 bytes
  of one channel, with an AAL1 sequence-number byte and a 5-byte ATM header.
  The cells go out on the T1 side of the trunk card.
- **Receive direction.** The board finds cell boundaries in the incoming
  byte stream and checks the header error control (HEC). It puts the
  payloads into per-channel buffer rings and plays one byte per channel per
  frame back onto the highway.

The design is two controllers, one per direction. Each works around a
single SRAM with a small EPROM beside it. It also has a bench-test clock
generator and a bench-test pattern generator.

## Why 21 channels, and why idle cells

The highway has 32 time slots of 8 bits every 125 µs. The trunk card uses
only 24 of them; slots 0, 4, 8, …, 28 are "dead" and always carry all ones.
So the line side has 24 byte slots per frame.

- A channel produces one byte per frame.
- A cell carries 47 such bytes in 53 line bytes.
- 21 channels therefore need 21 × 53 / 47 = 23.68 line bytes per frame,
  which is just under 24. A 22nd channel would not fit.

The spare 0.32 byte per frame is filled with idle cells. The smallest
repeating pattern is 1128 cells: 21 × 53 user cells plus 15 idle cells.
To keep the receive buffering small, the 15 idle cells are spread evenly:

- 3 runs of 75 user cells;
- then 12 runs of 74 user cells;
- with one idle cell before each run.

`tx_idle_insert` produces exactly this sequence with two down-counters.

The 21 carried channels are PBX time slots 5–7, 9–11, …, 29–31. These are
the slots that are neither dead nor among 1–3. Each cell's header names the
time slot in its VCI:

- VPI 0, VCI = 32 + slot, PT 0, CLP 0.
- The HEC follows the original board's EPROM tables. They hold the CRC-8
  (x^8+x^2+x+1, no coset) of the VCI as a 32-bit number, for example 0xFB
  for slot 5. Three entries differ from that rule and are kept as listed:
  0x65 for slot 14, 0xC5 for slot 15 and 0xB5 for slot 31. These are not the ITU I.432 HEC
  values, so a standard I.432 receiver would reject these user cells.
- The idle cell is the I.432 one: header `00 00 00 01 52`, payload `6A`.

## Timing conventions

Everything runs on the rising edge of one clock, CLKA (2.048 MHz, one
highway bit).

- **FMB.** The frame marker comes every 64 slots (two frames). If FMB is
  sampled high at a CLKA edge, the next cycle is bit 0 of slot 0.
- **Bit order.** Bits travel MSB first.
- **Clock enables, not derived clocks.** The original board clocks some
  registers on divided clocks: C1 is 1.024 MHz and C256k is the byte clock.
  Here those become clock enables taken from a 3-bit bit counter:
  - `bit_cnt[0]` ends a C1 period;
  - `bit_cnt == 7` is the byte boundary.
- **Parity.** Every memory word is 9 bits. Bit 8 is the XNOR of the eight
  data bits, so a good word has an odd number of ones. Parity is generated
  serially as the byte arrives and checked serially as it leaves. EPROM data
  and forced all-ones slots are not checked.
- **Memories.** The SRAMs and EPROMs are modelled as synchronous-read
  arrays with one CLKA of read latency, and both controllers are timed for
  that latency.

## Transmitter (`atm_tx`)

**SRAM map.** The 8k × 9 SRAM address is {channel[4:0], buffer[1:0],
index[5:0]}.

- **Buffers 0–2 of a channel.** Each buffer holds one cell's payload at
  indexes 6–52.
- **Buffer 3 (status buffer).** It holds the header bytes at indexes 0–4,
  the SN byte at index 5 and the channel status word at index 63.
- **Channel 31.** Its status buffer is the idle cell.

The EPROM has the same map. It provides:

- the headers;
- the first SN byte of every channel (0x01: SN 0, CRC 0, parity 1);
- the channel status words (0x80 = active);
- the idle cell.

**Load side (`tx_load_addr`, `tx_ts_map`).** The byte of slot t is
deserialised during slot t. It is written during slot t+1 into its channel's
current buffer at the current index. `tx_ts_map` folds that one-slot delay
into its slot-to-channel table: slots that follow dead or uncarried slots
map to dummy channels 21–30. Once per frame the index steps through 6–52.
After 47 frames the buffer changes (0, 1, 2, 0, …). StartToUnload is set
when the first buffer is full.

**Unload side (`tx_unload_addr`).** A byte index runs 0–52 through one
cell. The index holds still before a dead slot, so the byte read for that
slot is sent in the next live one.

- At the end of each cell the channel counter steps 0–20.
- After channel 20 the buffer steps.
- The index selects the header and the SN byte (in the status buffer) or
  the payload.
- The address is forced to the idle cell in three cases: before unloading
  starts, when `tx_idle_insert` asks for an idle cell, and when the
  channel's status word says the channel is inactive.

**Memory cycles (`tx_fsm`).** There are four memory cycles per slot, one
per C1 period:

| cycle | use |
|---|---|
| LOAD | write the received byte |
| UL1 | index 0: read the status word; otherwise read the byte to send |
| UL2 | index 0: read the first header byte; at the SN byte: write back the next SN |
| PROC | processor access on request (`t_req` → `t_ack`), else idle |

**Sequence numbers.** `tx_sn_gen` is the 16-entry table of AAL1 SN bytes:

- CSI kept;
- SN + 1 mod 8;
- CRC-3;
- parity.

During the first pass over the buffers, the SN byte is read from the EPROM
(the NFirstTime flag is clear). After that it is read from the SRAM, where
each cell wrote back its successor. The SN table never produces 0x01: it
follows SN 7 with 0x00. So after the first eight cells, SN 0 is carried as
0x00.

**Serial output.** `p2s_parity_check` shifts the output register out. It
forces all ones in dead slots and checks the parity of every SRAM byte it
sends.

## Receiver (`atm_rx`)

**SRAM map.** The 32k × 9 SRAM address is {time slot[4:0], buffer[3:0],
index[5:0]}.

- **Buffers 0–14** form a ring of 47-byte payloads per slot.
- **Buffer 15** holds three status words:
  - index 61: the unload index;
  - index 62: unload status {Active, Init, UnderRun, 0, TP};
  - index 63: load status {OverRun, SN[2:0], HP}.

HP is the buffer last loaded and TP the buffer being played. The EPROM
holds their start values:

- index 0x00;
- unload status 0x80 for the 21 carried slots (Active) and 0x00 otherwise;
- load status 0x70 (SN 7, HP 0), so the first cell, SN 0, follows on.

**Finding cells.** `rx_header_recog` hunts for a header by its zero bits.
The carried headers always start with 22 zero bits (GFC, VPI and upper
VCI), so it looks for two zero bytes followed by a `000000xx` byte.
`rx_cell_delin` then moves through its states:

1. It latches the 6-bit channel number {byte 3[1:0], byte 4[7:4]}.
2. It compares byte 5 with the HEC ROM entry for that channel number.
3. It takes the SN byte.
4. It counts the 47 payload bytes.

If the HEC fails, hunting resumes. If the failing byte itself completes a
new header pattern, the block goes straight to latching a new channel
number. Idle cells (channel number 0) are delineated but never written.

Dead slots are skipped entirely. Only live bytes enter the previous-byte
register that the channel number is taken from.

**Loading.** At the SN byte the block reads the slot's TP and HP. The cell
goes to buffer HP+1 (mod 15). If that is buffer TP, which is still being
played, the cell is an overrun and is dropped. After the last payload byte
the block writes the load status.

**Unloading.** In every slot the block fetches the byte for the next slot
(slot + 1).

- At index 0 of an active, initialised channel, it moves to TP+1 if the
  load side has filled it. Otherwise it replays TP and flags an underrun.
- The index steps 0–46, one byte per frame.
- Channels that are not active and initialised send all ones.

**Start-up (`rx_init`).** Unloading waits until the load side has written
buffer number Buffer_Delta for channel 31, the last channel in the cell
rotation. StartToUnload is then set at the end of a frame, and stays set
until reset. The Buffer_Delta input (4 bits, 1–14) therefore sets the
playout delay: about 5.9 ms per buffer (47 frames of 125 µs).

Until each side has written its status words once, status reads go to the
EPROM. The NFirstTime flags track this.

**Memory phases (`rx_fsm`).** The receiver shares its SRAM between three
users in eight one-CLKA phases per slot:

| phase | use |
|---|---|
| 0, 1, 2 | unload: read unload status, load status, index |
| 3 | load: read TP at the SN byte, or write a payload byte |
| 4 | load: read HP at the SN byte, or write the load status after the last byte; otherwise processor access |
| 5 | unload: read the data byte |
| 6, 7 | unload: write the index and unload status back |

Read data is captured in the following phase.

## Bench-test logic

- **`clock_gen`** makes CLKA from a 4.096 MHz clock. It makes an FMB pulse
  every 1024 of those cycles. The pulse is registered and spans exactly one
  CLKA edge.
- **`pattern_gen`** can replace the PBX input with a fixed pattern. It
  cycles through 11 byte values, one per slot, restarting at every FMB, so
  each slot alternates between two known values from frame to frame.

`atm_uni_board` selects the pattern with `test_pattern_en`. It brings the
generated CLKA and FMB out as `test_clka` and `test_fmb`. To run from them,
loop these back to the `clka` and `fmb` inputs.

## Files

| module | role |
|---|---|
| `atm_pkg` | shared constants, parity and HEC functions, header format |
| `atm_uni_board` | top: both controllers, memories, HEC ROM, bench-test logic |
| `atm_tx` | transmitter |
| `tdm_timing`, `s2p_parity`, `p2s_parity_check`, `dead_byte_counter` | serial/byte timing, used by both directions |
| `tx_ts_map`, `tx_load_addr` | transmitter load side |
| `tx_unload_addr`, `tx_idle_insert`, `tx_sn_gen` | transmitter unload side |
| `tx_fsm` | transmitter memory cycles |
| `tx_eprom` | transmitter EPROM |
| `atm_rx` | receiver |
| `rx_header_recog`, `rx_cell_delin`, `rx_hec_rom` | receiver cell delineation |
| `rx_load_addr`, `rx_unload_addr`, `rx_init` | receiver buffer handling |
| `rx_fsm` | receiver memory phases |
| `rx_eprom` | receiver EPROM |
| `sync_sram` | memory model |
| `clock_gen`, `pattern_gen` | bench-test logic |

The EPROM contents are generated in SystemVerilog from the header format.
They reproduce the original tables. No data files are needed.

## Simulating

Each module has a self-checking testbench `tb/<module>_tb.sv`. Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog. For example:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
  rtl/atm_pkg.sv tb/atm_uni_board_tb.sv --top-module atm_uni_board_tb
./obj_dir/Vatm_uni_board_tb
```

`atm_uni_board_tb` runs the whole board at full size. It drives only the
4.096 MHz clock and loops the transmitter's line output back into the
receiver. It then works through six phases:

1. Start-up.
2. Clean loopback. The check here is that every carried slot comes back in
   unbroken frame order.
3. A cut line, which must cause underruns.
4. Random bit errors, which must cause HEC failures.
5. Testbench-made cells: one channel is flooded to force overruns, and
   some cells carry bad HEC bytes.
6. The pattern generator.

Throughout, a line monitor delineates the transmitted cells and checks:

- the HEC, VCI and SN sequence of every cell;
- the payload order;
- that dead slots are all ones;
- that there are 74 or 75 user cells between idle cells.

It counts every mechanism, and each must occur at least once. It takes
well under a minute.

`atm_tx_tb` and `atm_rx_tb` test each direction on its own. `atm_rx_tb`
feeds the receiver with cells the testbench builds itself.

## Where this design makes its own choices

The original board is specified at block level, with equations for most
counters and decoders. Some parts are given only as function, and these
are this design's own:

- **Controller cycle plans.** The order of the transmitter cycles and the
  eight-phase receiver plan.
- **Status word layouts.**
- **Start-up comparison.** Using channel 31 to decide when Buffer_Delta is
  reached.
- **HEC ROM address.** It is the full 6-bit channel register: address 0 is
  the idle cell and 32 + t is slot t.

Some printed equations contradict the surrounding description. In those
places the description was followed:

- the idle-channel select;
- the channel-counter enable in the transmitter;
- the parity sense.

In the transmitter memory select, the idle cell is always read from the
EPROM.

The SRAM chips are modelled as synchronous memories. A board built with
asynchronous parts would need the capture points moved.

## Not included

These parts are not described as logic and are outside this RTL:

- the PBX trunk card itself, with its DS1 framer and line interface;
- the reset debouncing circuit;
- FPGA configuration.

The board's ports are the serial signals that the trunk card would connect
to.
