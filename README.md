# BaBar drift chamber readout electronics in SystemVerilog

This repository holds synthesizable SystemVerilog for the digital part of the readout electronics of the BaBar central drift chamber. It is a re-implementation from the published description ("Electronics for the BaBar Central Drift Chamber"). Everything runs on the 59.5 MHz BaBar system clock:
- the FADC sample rate, 14.875 MHz (clk/4), is a clock enable;
- the trigger tick, 3.72 MHz (clk/16), is a clock enable.

## Structure

| Module | What it is |
|---|---|
| `dch_pkg` | constants, command frame type, opcodes, register map |
| `tick_gen` | sample and trigger-tick enables; Sync realigns them |
| `elefant_channel` | one ELEFANT channel: FADC word delayed one sample, replaced by `{1, 6-bit vernier}` on a TDC hit; hit bit from the TDC or from an FADC rise above a threshold relative to two samples earlier |
| `elefant_pipeline` | Level-1 latency pipeline, 179 samples (about 12 us) of 8 channels |
| `elefant_event_buffers` | on L1 accept, copies the 32 oldest samples into one of 4 event buffers with trigger time, tag and hit-flag byte; Clear Readout; drops accepts when full |
| `elefant_readout` | output mux onto the 8-bit bus: time, tag, flags, then 32 samples of each hit channel only (sparse readout) |
| `elefant` | the 8-channel chip built from the blocks above, plus its 8 prompt hit lines |
| `adb_trigger_fpga` | down-samples the hit lines from the sample rate to the trigger tick |
| `adb` | amplifier-digitizer board: 8 or 6 ELEFANTs on one bus, plus the trigger FPGA |
| `rib_trigger_serializer` | 16 bits per line per tick onto 8, 9 or 12 lines |
| `sync_fifo` | local FIFO |
| `rib` | readout interface board: command decoding, configuration registers (DAC codes and hit definition), parallel board readout into per-board FIFOs, packet sent on grant, forwarding of L1 accept/tag, Clear, Sync and Cal Strobe |
| `fea` | front end assembly: inner (2 x 64 ch), middle (3 x 48 ch) or outer (4 x 48 ch) |
| `diom` | data I/O module: command distribution to 12 FEAs, FEA and TIOM resets, grants after a delay, D-LINK multiplexing |
| `tiom` | trigger I/O module: 58 serial lines from two wedges onto 3 x 20-bit links per tick |
| `dch_quadrant` | 4 wedges x 3 FEAs, one DIOM, two TIOMs |
| `dch_electronics` | top: 4 quadrants (48 FEAs, 928 ELEFANTs, 7424 channels) |

Each file starts with a header. The header gives the module's interface and timing. It also says which parts follow the published description and which were my own choice.

### Interfaces chosen here (not given in the description)

- **Command frame.** A command is 20 bits: `{op[3:0], fea[3:0], addr[3:0], data[7:0]}`.
  - Opcodes: NOP, CFG_WRITE, CFG_READ, EVENT_READ, CLEAR, SYNC, L1_ACCEPT, CAL_STROBE, RESET.
  - FEA address 15 broadcasts to all FEAs.
  - In RESET, addresses 12, 13 and 14 select TIOM 0, TIOM 1 or both.
- **Configuration registers**, 8 bits each:
  - 0: discriminator threshold
  - 1: calibration charge
  - 2–4: ladder top, middle and bottom taps
  - 5: hit mode
  - 6: FADC rise threshold
  - 7: calibration channel select
- **ELEFANT event.** The event is sent as trigger time, tag and hit flags. After that come 32 bytes `{0, sample}` for each flagged channel.
- **FEA packet.** An FEA sends its configuration-read replies (`{0xC, addr}`, value), then the events of board 0 .. N-1, then a trailer `{event, 000, FEA id}`.
- **D-LINK word.** Each word is `{fea[3:0], first, last, 00, byte}`. A grant round ends with the word `{F, 0, 1, 00, round count}`.
- **Trigger links.** Each TIOM sends 16 frames of 20 bits per tick on each of its 3 links. That is 960 bits, of which 928 carry channel bits and the last 32 carry a tick counter.
- **Sizing.**
  - The grant delay is 64 clocks.
  - Each local FIFO holds 512 bytes.
  - Trigger time is an 8-bit sample count.
  - Down-sampling ORs the 4 samples of a tick.

## Not implemented

Several parts are analog, mixed-signal or vendor components and are not described as logic:
- the amplifier/discriminator IC;
- the FADC and TDC vernier of the ELEFANT;
- the DACs;
- the high voltage boards;
- the fiber transceivers and G-LINK serializers;
- the 68HC705/CANBus environmental monitoring;
- the off-detector readout module.

The design's ports stand at their boundary:
- inputs: FADC codes and TDC hit/vernier per channel;
- outputs: DAC codes, calibration select/strobe, and parallel link words.

The pipeline and buffers are register arrays, not DRAM/SRAM macros.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints `TB_RESULT checks=N failures=M`.
- **Block testbenches** compare the module against a reference model. They use directed and random stimulus.
- **End-to-end testbench.** `tb_dch_electronics` runs the top reduced to one quadrant (`N_QUAD = 1`: 12 FEAs, 232 ELEFANTs, 1856 channels; grant delay raised to 600 clocks so that a fully hit board fills its 512-byte FIFO before the grant arrives). It drives commands and channel data and checks the D-LINK packets and trigger-link bits. It also counts each mechanism and fails if any did not happen:
  - TDC hits;
  - FADC-rise hits;
  - sparse skips;
  - FIFO stall;
  - event-buffer overflow;
  - Clear Readout;
  - configuration read;
  - calibration strobe;
  - FEA reset;
  - trigger bits;
  - grant rounds.

The largest size simulated is one quadrant. The full four-quadrant top elaborates and synthesizes, but it was not simulated: its compiled model is too large to build in reasonable time.

To simulate, for example:

    verilator --binary --timing -Irtl rtl/dch_pkg.sv tb/tb_fea.sv rtl/*.sv --top-module tb_fea
    ./obj_dir/Vtb_fea

The one-quadrant testbench builds a large C++ model (several minutes of compile time). Its simulation takes seconds.
