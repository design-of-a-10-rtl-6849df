# 1 Gb/s random number recorder

This design records one channel of a true random number generator. Statistical
tests such as NIST SP 800-22 need long, unbroken runs of random bits. A generator
that puts out 1 Gb/s is too fast and too deep for an oscilloscope or a logic
analyzer to capture. The recorder solves this on an FPGA in three steps:

1. **Acquisition.** A serial transceiver with clock recovery turns the 1 Gb/s
   line into 16-bit words at 62.5 MHz.
2. **Cache.** The words are written into a 2 GB DDR3 memory in real time, as
   64-bit words, until the memory is full.
3. **Up-link.** On request, the stored run is read back and sent to a PC over
   Gigabit Ethernet, one byte per 125 MHz clock.

A PC program controls the whole sequence with command frames over the same
Ethernet link.

The RTL here covers everything between the vendor cores: the two rate-matching
FIFOs, the control that fills and drains the DDR3 memory, the Ethernet frame
builder and the command decoder. The transceiver, the DDR3 controller/PHY and
the Ethernet MAC are vendor IP. They stay outside `trng_recorder`, which brings
out their client-side signals as ports.

## Data path and clock domains

```
             rx_clk (62.5 MHz)    |        ui_clk (DDR3 user clock)        |   mac_clk (125 MHz)
transceiver --16--> acq_gate --> FIFO1 ==64==> cache_ctrl <==64==> DDR3 controller (app_*)
                                  16->64        |        \
                                                |         ==64==> FIFO2 --8--> eth_tx_framer --> MAC TX client
                                                ^                 64->8
                                            pulse_sync <------------------- cmd_decoder <-- MAC RX client
```

| module | role |
|---|---|
| `trng_recorder` | top level; wires the blocks below and brings out the vendor-core interfaces |
| `acq_gate` | starts and stops the capture on whole 64-bit groups; holds the sticky overflow flag |
| `fifo1_16to64` | FIFO1: packs four 16-bit words into one 64-bit entry; crosses rx_clk to ui_clk |
| `cache_ctrl` | record/upload sequencer on the DDR3 application interface |
| `fifo2_64to8` | FIFO2: crosses ui_clk to mac_clk; unpacks 64-bit entries into bytes |
| `eth_tx_framer` | cuts the byte stream into Ethernet frames for the MAC transmit client |
| `cmd_decoder` | turns command frames from the PC into record/upload pulses |
| `async_fifo`, `sync_bits`, `pulse_sync` | Gray-pointer dual-clock FIFO and synchronisers |
| `recorder_pkg` | widths, EtherType, command and state encodings |

There are three clock domains, each with its own active-low asynchronous reset
(`rx_rst_n`, `ui_rst_n`, `mac_rst_n`). Only these signals cross between domains:

- the two FIFOs' Gray-coded pointers;
- `capture_en` (ui to rx) and `capture_active` (rx to ui), both as levels through
  two flip-flops;
- the two command pulses (mac to ui), through toggle synchronisers.

Command pulses come at most once per received frame, so they are far enough
apart for the toggle synchronisers. The prefix of a status output names its
domain: `rx_overflow`, `ui_state`/`ui_mem_valid`/`ui_upload_done`, and
`mac_frames_sent`/`mac_host_valid`.

## Recording a run

A record command starts a new run. The run always fills the whole memory:
addresses 0 to 2^ADDR_W−1, one 64-bit word each.

**Stale data.** While idle, `cache_ctrl` keeps reading FIFO1 and throws the words
away. A record command is held until the capture gate has stopped and FIFO1 has
stayed empty for `QUIET_CYCLES` (8) user clocks. Only then does it raise
`capture_en`. This keeps words left over from an earlier run out of the new one.

**Whole entries.** `acq_gate` synchronises `capture_en` into the transceiver
domain and passes words to FIFO1 while it is high. When `capture_en` falls, the
gate still passes words until the current group of four is complete. FIFO1
therefore only ever holds whole 64-bit entries, and every run starts on a fresh
entry. FIFO1 does the packing on its write side: the first word goes to bits
[15:0], the fourth to [63:48].

**Writes.** In the `RECORD` state, `cache_ctrl` issues one write in every user
clock where FIFO1 has an entry and both `app_rdy` and `app_wdf_rdy` are high.
`app_en` and `app_wdf_wren` are asserted together. After the last address,
`capture_en` falls, `ui_mem_valid` rises and the controller returns to idle.

**Continuity.** A run is only useful if it is continuous. At 1 Gb/s a run needs
15.6 M writes/s. If the user clock is 200 MHz, `cache_ctrl` can issue up to
200 M/s. FIFO1 (512 × 64 bits) absorbs about 33 µs of memory stall, far more
than a DDR3 refresh takes. If the memory stalls for longer and FIFO1 is full,
the completed entry is dropped, FIFO1 pulses `overflow` and `acq_gate` sets
`rx_overflow`. The flag stays set until the next run starts. The stored run then
contains a gap and should be thrown away.

## Reading the run back

An upload command is accepted only while a complete run is stored
(`ui_mem_valid`). The run stays stored after an upload, so it can be uploaded
again.

**Flow control on the read side.** Read data comes back from the DDR3 controller
with `app_rd_data_valid`, which cannot be stalled. So `cache_ctrl` issues a read
only if FIFO2 has room for that word and for every read still in flight:

`f2_wcount + outstanding < 2^F2_AW`

Here `f2_wcount` is FIFO2's occupancy as the write side sees it. That count is
never below the true occupancy, so this rule cannot overrun FIFO2. Returned
words go straight into FIFO2. `ui_upload_done` pulses when the last word has
come back.

**Frames.** The MAC transmit client needs one byte in every cycle from the
acknowledged first byte to the last byte of a frame. So `eth_tx_framer` starts a
frame only when FIFO2 reports at least `PAYLOAD_BYTES` bytes (`rd_bytes`, which
counts a partly read entry exactly). The framer then:

1. holds the first header byte with `tx_data_valid` until `tx_ack`;
2. sends the rest of the 14-byte header, then the payload, one byte per clock;
3. drops `tx_data_valid` after the last byte.

A frame takes 14 + `PAYLOAD_BYTES` clocks after the acknowledge. The MAC adds the
preamble, the FCS and the inter-frame gap. FIFO2 must hold at least one payload.
An elaboration-time assertion in `trng_recorder` checks this.

## Frame formats

Both directions use EtherType 0x88B5 (IEEE local experimental). The recorder's
own address is the parameter `LOCAL_MAC` (default 02:00:00:00:00:01, a locally
administered address).

Command frame, PC to recorder:

| bytes | content |
|---|---|
| 0–5 | `LOCAL_MAC` or broadcast |
| 6–11 | the PC's address; it becomes the destination of the data frames |
| 12–13 | 0x88B5 |
| 14 | opcode: 0x01 record, 0x02 upload |
| 15– | ignored (padding) |

A command takes effect only when the MAC closes the frame with `rx_good_frame`.
Frames with a bad FCS, for another address, with another EtherType, with fewer
than 15 bytes or with an unknown opcode are dropped. The decoder never replies.
The PC learns that a run is complete by the data frames arriving, or from the
status outputs.

Data frame, recorder to PC: bytes 0–5 are the PC's address, 6–11 are
`LOCAL_MAC`, 12–13 are 0x88B5, followed by `PAYLOAD_BYTES` data bytes. Data
frames carry no sequence number. With the default sizes, a run is exactly
2^31 / 1024 = 2,097,152 frames.

## Bit order

Bit 0 of `rx_data` is taken to be the earliest bit on the line. Word *k* of a
64-bit memory word is bits [16k+15:16k]. Byte *k* of a memory word is sent
*k*-th. So the data bytes carry the line bits in order, least significant bit
of each byte first. The PC rebuilds the stream by reading each byte from bit 0
to bit 7. If a transceiver presents the first received bit as bit 15, reverse
`rx_data` before the input.

## Parameters (`trng_recorder`)

| parameter | default | meaning |
|---|---|---|
| `ADDR_W` | 28 | memory size in 64-bit words, 2^ADDR_W: 2^28 × 8 B = 2 GB = 16 Gbit, one run |
| `F1_AW` | 9 | FIFO1 depth 2^F1_AW × 64 bits (one 36 Kb block RAM) |
| `F2_AW` | 9 | FIFO2 depth 2^F2_AW × 64 bits |
| `PAYLOAD_BYTES` | 1024 | data bytes per Ethernet frame (46 to 1500, at most 8 × 2^F2_AW) |
| `LOCAL_MAC` | 02:00:00:00:00:01 | the recorder's Ethernet address |

## Interfaces to the vendor cores

- **Transceiver** (`rx_clk`, `rx_data[15:0]`, `rx_valid`): the recovered
  62.5 MHz clock and the 16-bit parallel words of a serial transceiver with
  clock and data recovery, running at 1 Gb/s.
- **DDR3 controller** (`ui_clk`, `init_calib_complete`, `app_*`): the
  application interface is simplified. Each command carries one 64-bit word at
  a word address. `app_cmd` is 000 for write and 001 for read. Write data goes
  with its command in the same cycle. Reads return in order. A real controller
  with a wider burst interface needs a small adapter, which is not included.
- **Ethernet MAC** (`mac_clk`, `mac_rx_*`, `mac_tx_*`): the 8-bit client
  interface of a tri-mode Ethernet MAC.
  - Receive: `rx_data`, `rx_data_valid`, then `rx_good_frame` or `rx_bad_frame`
    after the last byte.
  - Transmit: `tx_data`, `tx_data_valid`, `tx_ack`.
  - The MAC handles preamble and FCS. The PHY and the RJ45 port sit beyond it.

Clock generation is not part of the RTL. Neither are the transceiver, the DDR3
controller and PHY, the MAC, the Ethernet PHY, or the PC software.

## Design choices beyond the original description

The original description fixes the structure, the widths, the rates and the
memory size:

- 16-bit words at 62.5 MHz;
- a mixed-width FIFO to 64 bits;
- DDR3 filled to 2 GB and read back through a second FIFO;
- 8-bit bytes at 125 MHz to the MAC;
- a command decoder driven by the PC.

The following are this design's own:

- the FIFO depths, and the choice of which side of each FIFO does the width
  conversion;
- the capture gate, the quiet wait before a run, and the overflow flag;
- the simplified memory interface and the rule that reserves FIFO2 space for
  reads in flight;
- the command and data frame formats, the payload size and the bit order;
- ignoring commands while busy, and always recording the full memory (there is
  no record length and no stop command);
- starting the upload on a command from the PC rather than on its own when the
  memory is full. The original describes both; a command keeps the PC in
  control of when data arrives.

The original shows a two-way link between the command decoder and the MAC.
Here the decoder only receives; there are no status replies.

## Simulation

Each block has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|---|---|
| `tb_fifo1_16to64` | packing order with random gaps on both clocks; lane counter; exactly two overflow pulses when written two entries past full |
| `tb_fifo2_64to8` | byte order; `rd_bytes` never above the true level and exact when settled, including partly read entries; full/`wcount` |
| `tb_cache_ctrl` | idle drain; upload ignored without a run; addresses and data in order under random stalls; FIFO2 never overfilled and throttling reached; one write per clock with no stalls |
| `tb_eth_tx_framer` | no start before a full payload; header and payload order; no gap inside a frame; 14 + payload cycles per frame; frame count |
| `tb_cmd_decoder` | local and broadcast commands; bad FCS, wrong address, wrong EtherType, unknown opcode and short frames rejected; pulse one cycle after `rx_good_frame` |
| `tb_trng_recorder` | end-to-end bit error rate test, described below |
| `tb_bert_workload` | the same bit error rate test for all four polynomials, with the default FIFO depths and 1024-byte payloads and `ADDR_W = 18` (16.8 Mbit per run); it checks bits as they arrive and takes about half a minute |

`tb_trng_recorder` is the end-to-end test. It runs one record and one upload for
each of four PRBS polynomials:

- PRBS7: x^7+x^6+1
- PRBS15: x^15+x^14+1
- PRBS23: x^23+x^18+1
- PRBS31: x^31+x^28+1

Each pattern enters at 16 bits per 62.5 MHz clock. The memory is a behavioural
model (`tb/ddr3_app_model.sv`) that drops its ready signals at random. The PC
side acknowledges frames after random delays. The test checks every received
bit against the polynomial's recurrence, and checks the frame headers, the
frame count, and that each run is stored in real time. A fifth run holds the
memory off until FIFO1 overflows. It checks that `rx_overflow` rises and that
the bit check finds the gap. Memory stalls, FIFO2 throttling, acknowledge waits,
a rejected command frame and the overflow are each counted and must each happen.

Run a testbench with Verilator 5, for example:

```
verilator --binary --timing --timescale 1ns/1ps --assert -Irtl -Itb \
  rtl/recorder_pkg.sv tb/tb_trng_recorder.sv --top-module tb_trng_recorder
./obj_dir/Vtb_trng_recorder
```

The testbenches reduce the sizes to keep runs short. The end-to-end test uses
`ADDR_W = 13` (524,288 bits per run), `F1_AW = 5`, `F2_AW = 5` and 256-byte
payloads. It runs in a few seconds. No simulation uses the default 2 GB memory:
one full run is 2^30 transceiver clocks, about 17 s of simulated time, far
beyond what a simulator covers in minutes. The largest size simulated end to
end is `ADDR_W = 18`, in `tb_bert_workload`. A full-size run, like the original 1.6 × 10^9-bit tests,
needs hardware.
