# AXI4-Stream BPSK / QPSK / QAM-16 modulator for DCO-OFDM visible-light links

In visible light communication the LED can only be driven by a real,
non-negative signal, so there is no I/Q up-converter. DCO-OFDM solves this by
giving the IFFT a frequency-domain frame that is Hermitian symmetric: the
IFFT output is then real, and a DC bias makes it positive. This design builds
that frame. A processor writes 31, 62 or 124 payload bits into four
registers. The modulator maps them to 31 BPSK, QPSK or QAM-16 points and
places them on subcarriers X1..X31. It writes their complex conjugates on
X63..X33, zeroes X0 and X32, and streams the 64 subcarriers to a 64-point IFFT
over AXI4-Stream.

```
            AXI4-Lite                AXI4-Stream                     AXI4-Stream
 processor ==========> axi_tx_ctrl ==============> axis_modulator ==============> 64-point IFFT
                       CTRL, DATA0..3  1/2/4 words    |  mod_type      64 words      (not included)
                       mod_type -----------------------+
```

All of it runs on one clock (`aclk`, 100 MHz in the reference system) with a
synchronous active-low reset (`aresetn`).

## The frame the IFFT receives

This layout is the part that matters most when you connect the design to
anything else.

| output word | subcarrier | content |
|---|---|---|
| 0 | X0 | 0 |
| 1 .. 31 | X1 .. X31 | symbol 0 .. 30 |
| 32 | X32 | 0 |
| 33 .. 63 | X33 .. X63 | conj(X31) .. conj(X1), i.e. X[64-k] = conj(X[k]) |

- Each word is `{imag[15:0], real[15:0]}` in two's complement, with the real
  part in the low half. This is the packing that common FPGA FFT cores expect
  for 16-bit input. `m_axis_tlast` marks word 63.
- **Payload bits.** Only bits [30:0] of each input word are used; bit 31 is
  ignored. So one word carries 31 bits: one BPSK frame, half a QPSK frame or
  a quarter of a QAM-16 frame. The payload is the concatenation of these
  31-bit fields, word 0 first. Symbol `s` (0..30, on subcarrier X(s+1))
  takes `B` payload bits starting at bit `B*s`, least significant first. `B`
  is 1, 2 or 4.
- **Constellation levels.** The levels are the integers ±1 and ±3, times
  the parameter `AMP` (default 1). Scale them with `AMP` to use more of the
  IFFT's input range.

### Constellations

| value | BPSK | QPSK | | value | QAM-16 | value | QAM-16 |
|---|---|---|---|---|---|---|---|
| 0 | +1 | +1+1j | | 0 | +1+1j | 8 | -1+1j |
| 1 | -1 | +1-1j | | 1 | +1+3j | 9 | -1+3j |
| 2 | | -1+1j | | 2 | +1-1j | 10 | -1-1j |
| 3 | | -1-1j | | 3 | +1-3j | 11 | -1-3j |
| | | | | 4 | +3+1j | 12 | -3+1j |
| | | | | 5 | +3+3j | 13 | -3+3j |
| | | | | 6 | +3-1j | 14 | -3-1j |
| | | | | 7 | +3-3j | 15 | -3-3j |

For QAM-16 with value b3 b2 b1 b0, the bits work as follows:

- b3 is the sign of I.
- b2 selects |I| = 3.
- b1 is the sign of Q.
- b0 selects |Q| = 3.

For QPSK, bit 1 is the sign of I and bit 0 the sign of Q. In every case a
1 means negative.

## Software interface (`axi_tx_ctrl`)

| offset | register | meaning |
|---|---|---|
| 0x00 | CTRL | bits [1:0] = mod_type: 00 BPSK, 01 QPSK, 10 QAM-16, 11 off |
| 0x10 | DATA0 | payload word 0 |
| 0x14 | DATA1 | payload word 1 |
| 0x18 | DATA2 | payload word 2 |
| 0x1C | DATA3 | payload word 3 |

- All five registers can be read back. Other offsets read as zero, and
  writes to them are ignored. Only address bits [4:0] are decoded. Byte
  strobes are honoured. Responses are always OKAY.
- Writing the last register of a frame sends the frame to the modulator as
  one AXI4-Stream packet: DATA0 in BPSK, DATA1 in QPSK, DATA3 in QAM-16. So
  software writes DATA0..DATA(n-1) in order, and the last write sends the
  frame. In BPSK, every write to DATA0 sends a frame.
- In mode 11 nothing is sent.
- While a packet is still waiting to be accepted, the slave holds off new
  writes: `awready` and `wready` stay low. A register therefore never changes
  under a pending stream word. The effect is that the processor's next
  writes stall until the modulator takes the frame.
- An AXI4-Lite write needs `awvalid` and `wvalid` together. It is accepted
  in one clock, and the B response follows on the next clock.
- Change CTRL only when no frame is in flight. The modulator's select follows
  CTRL at once.

## Inside the modulator

`axis_modulator` holds three independent modulators, `axis_bpsk_mod`,
`axis_qpsk_mod` and `axis_qam16_mod`. `mod_type` routes the input handshake
to one of them and multiplexes its output stream. The other two see no
`tvalid` and no `tready`.

All three modulators have the same structure:

```
 s_axis_tdata --> data_mem ---data_in---> LUT (bpsk/qpsk/qam16_mod) --data_mod--> subcar_mem --> m_axis_tdata
                  31 x B bits             symbol + conjugate          data_conj   64 x 32
                      ^                          ^                                    ^
                      +----------------- axis_controller (FSM) ----------------------+
                        s_axis_tready, s_axis_tvalid/tlast     m_axis_tvalid/tlast, m_axis_tready
```

`axis_controller` has three states:

1. **RECV.** `s_axis_tready` = 1. Each accepted word goes into `data_mem`. A
   frame ends at word NW (1, 2 or 4 words), or earlier if `s_axis_tlast` is
   seen. The words that were not sent keep their old contents.
2. **MAP.** One symbol per clock. The LUT turns the symbol's bits into a point
   and its conjugate. `subcar_mem` stores both in the same clock, at X[k] and
   X[64-k]. The mirrored half is thus complete as soon as the last symbol is
   mapped.
3. **SEND.** `m_axis_tvalid` = 1. `subcar_mem` is read combinationally at
   address 0..63, advancing on each accepted transfer. X0 and X32 are not
   stored: the read port decodes them to zero.

`s_axis_tready` is low in MAP and SEND. A modulator holds one frame at a
time.

### Latency

The first symbol is mapped in the same clock that takes the last input word.
This works because `data_mem`'s read port is write-through: the word being
written is already visible. The remaining 30 symbols take 30 more clocks. In
clocks, from the first accepted input word to the first clock with
`m_axis_tvalid` high:

| mode | input words | latency | at 100 MHz |
|---|---|---|---|
| BPSK | 1 | 31 | 310 ns |
| QPSK | 2 | 32 | 320 ns |
| QAM-16 | 4 | 34 | 340 ns |

These are the reference figures the design targets, and every testbench
checks them cycle for cycle.

Dividing the frame's bits by this latency gives 100, 193.75 and 364.7 Mbit/s.
In binary megabits (2^20) that is 95.37, 184.77 and 347.81. These figures
ignore the 64 clocks the frame takes to leave the modulator. The sustained
rate, with a sink that is always ready and input that is ready at once, is
one frame every NW + 30 + 64 clocks. That is 95 clocks (32.6 Mbit/s) for
BPSK, 96 clocks (64.6 Mbit/s) for QPSK and 98 clocks (126.5 Mbit/s) for
QAM-16.

## Files

| file | contents |
|---|---|
| `rtl/vlc_mod_pkg.sv` | shared constants (64 points, 31 symbols), `mod_type_e`, sample struct `cplx_t`, `conj()` |
| `rtl/vlc_tx_top.sv` | top: `axi_tx_ctrl` + `axis_modulator`, m_axis brought out for the IFFT |
| `rtl/axi_tx_ctrl.sv` | AXI4-Lite registers and the stream source |
| `rtl/axis_modulator.sv` | three modulators and the mod_type selector |
| `rtl/axis_bpsk_mod.sv`, `axis_qpsk_mod.sv`, `axis_qam16_mod.sv` | one modulator each |
| `rtl/axis_controller.sv` | RECV / MAP / SEND sequencer |
| `rtl/data_mem.sv` | 31 x B-bit payload buffer with write-through read |
| `rtl/subcar_mem.sv` | 64 x 32 subcarrier buffer, dual-entry write |
| `rtl/bpsk_mod.sv`, `qpsk_mod.sv`, `qam16_mod.sv` | constellation LUTs |
| `tb/vlc_ref_pkg.sv` | reference model: constellation tables and expected frame |
| `tb/tb_*.sv` | one self-checking testbench per module |

### Parameters

- `AMP` (int, default 1) is the value of one constellation unit. It is
  available on the top, on `axis_modulator`, on the three modulators and on
  the LUTs.
- `ADDR_W` (default 32) is the AXI address width.

The frame geometry (64 points, 31 data subcarriers) comes from
`vlc_mod_pkg`. `axis_controller` and `subcar_mem` take it as parameters, so
another FFT size means changing the package constants together with the
31-bit word packing in `data_mem`.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
It also has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/vlc_mod_pkg.sv tb/vlc_ref_pkg.sv tb/tb_vlc_tx_top.sv \
  --top-module tb_vlc_tx_top -o sim && obj_dir/sim
```

Replace `tb_vlc_tx_top` with any other testbench name to run that one.

- **`tb_vlc_tx_top`** runs the whole design at its default sizes. It plays
  both the processor and the IFFT sink:
  - one frame per mode, with the latency checked;
  - register read-back and byte strobes;
  - mode 11, which produces no output;
  - 30 random frames with random modes, a stalling sink and back-to-back
    writes.

  It counts mode switches, output stalls, writes held off by a busy stream,
  and writes that do not complete a frame. A failure is recorded if any of
  these never happens.
- **`tb_axis_modulator`** and **`tb_axis_{bpsk,qpsk,qam16}_mod`** check
  every output word against the reference model, with and without gaps on
  both streams. They check the latency and the 64-clock output burst on
  gap-free frames, and that a stalled output holds its data.
- **`tb_rate_table`** measures latency, frame period and throughput per
  mode at 100 MHz. It checks them against the table above.
- **`tb_axis_controller`** checks the FSM's control outputs clock by clock,
  including a frame ended early by `tlast`.
- **`tb_data_mem`**, **`tb_subcar_mem`** and the three LUT testbenches check
  the storage and the mappings exhaustively or with random data.

The reference model in `tb/vlc_ref_pkg.sv` is written separately from the
RTL. The constellations are tables of (I, Q) points, and the expected frame
is built by loops over the payload bits.

## How far it follows its source, and where it does not

These points follow the published design:

- the block structure: register controller, modulator core, three
  modulators, data buffer, LUTs, subcarrier buffer and FSM;
- the Hermitian frame layout, and the 31, 62 and 124 bits per frame;
- the constellation labelling;
- the 4 x 32-bit data registers and the DATA0 / DATA1 / DATA3 triggers;
- the mod_type codes 00, 01 and 10;
- the AXI4-Stream port set of the modulator;
- the 1, 2 or 4 input transfers and 64 output transfers per frame;
- the latencies.

These are choices of this implementation, because the source leaves them
open:

- the sample format (16-bit I/Q, real part low, integer levels scaled by
  `AMP`);
- the order of the payload bits, and the 31-bit field per word;
- the internal cycle plan that meets the latencies, including mapping the
  first symbol in the clock of the last input word;
- the CTRL register at offset 0x00 (the data registers at 0x10-0x1C are given
  by the source);
- how the AXI4-Lite handshake works, and holding off writes while a packet is
  pending;
- how mode 11 and an early or missing `tlast` are handled;
- steering the handshakes as well as the output in `axis_modulator`;
- the synchronous reset.

The source states in its text that the modulator's input `tready` is always
1. Its simulation waveforms show `tready` falling after a frame is taken, and
this design follows the waveforms: a modulator accepts no new frame until
its 64 output words have left.

**The 64-point IFFT is not included.** It is a vendor core in the reference
system. Connect its AXI4-Stream data input to `m_axis_*`. It has to accept
the `{imag, real}` 16-bit packing, or you adapt the packing in the LUTs.
