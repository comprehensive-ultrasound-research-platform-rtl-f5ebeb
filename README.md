# Eight-channel coded-excitation transmitter for an ultrasound research platform

An ultrasound research platform tests coded excitation. The transducer is driven by a long coded waveform, for example a pre-enhanced chirp, instead of a short pulse. The echo is then compressed on a PC. This RTL is the digital part of such a platform:

- **Transmit side.** A PC encodes each excitation waveform as a one-bit sigma-delta stream, which is an oversampled bitstream. A low-pass filter after the pins turns that bitstream back into an analog waveform. The FPGA stores these streams in DDR2 memory. On command it plays up to eight of them at once, one per output pin, at about 1.07 Gsample/s. Each pin has its own start delay.
- **Receive side.** When all excitations have been sent, a capture controller records eight 14-bit ADC channels at 65 MHz for 997 µs.

The design follows a student project proposal for such a platform. That proposal describes the FPGA's main functions:

- storing waveforms
- a record of where each waveform is stored
- assigning waveforms to pins
- per-pin delays kept as start times for a run-time counter
- a memory arbiter with priorities and least-recent access
- a 4x output speed-up that XORs four signals clocked on the four quarter-phase edges

It leaves the details open: widths, the command protocol, handshakes and buffering. Those choices are this design's own and are marked as such below and in each file's header comment.

## Signal path

```
 PC --UART--> uart_rx -> host_cmd --+--> wave_record (id -> base, length)
        <--- uart_tx <-- (acks)     +--> pin_assign (pin -> id)   --lookup--+
                                    +--> delay_ctrl (pin -> start count)    |
                                    +--> START -> tx_sequencer <------------+
                                    |              | fetch x8, run
                      socket 0 (writes)            v
   DDR2 <-- MIG <-- ddr2_user_if <-- mem_arbiter <-- sockets 1..8 = pin_channel x8
                                                         | 4 samples / clock
                                                         v
                                                  xor_serializer x8 --> pins_o[7:0]
                                                         (to the HV amplifier, LPF, transducer)

 tx_sequencer --excite_done toggle--> rx_capture (65 MHz ADC clock) --> capture write port
```

`us_platform_top` instantiates all of this. Some parts sit outside it, and their signals are ports of the top:

- the Xilinx MIG controller and the DDR2 devices
- the clock manager that makes `clk90`
- the ADC
- the memory that the receive side writes to

## Sample format

A waveform sample is one bit: 1 stands for +1 and 0 for −1. A 128-bit memory word holds 128 consecutive samples, with sample *k* in bit *k*.

The word width comes from the required memory rate. Eight pins at about 1 Gbit/s need 8 Gbit/s. At the 62.5 MHz memory rate the proposal quotes, that is 128 bits per access.

A 3 µs excitation at 1.024 Gsample/s is 3072 samples, which is 24 words. The design sizes every per-pin buffer for that (`MAX_WORDS = 24`).

## The 4x output: XOR of four quarter-phase signals

This is the least obvious part of the design; it is in `rtl/xor_serializer.sv`.

No flop in the FPGA fabric toggles at 1 GHz. But `clk` and `clk90` (the same 266 MHz clock shifted by a quarter period) together give four edges per period, 0.94 ns apart:

| signal | clocked on   | carries   |
|--------|--------------|-----------|
| s1     | `clk` rise   | sample 0  |
| s2     | `clk90` rise | sample 1  |
| s3     | `clk` fall   | sample 2  |
| s4     | `clk90` fall | sample 3  |

The pin is `s1 ^ s2 ^ s3 ^ s4`. At its edge, each flop loads its sample XOR the current values of the other three. Right after that edge the XOR of all four equals the new sample. The other three do not change at that edge, so the pin shows the new sample until the next quarter edge. Each flop still runs at 266 MHz.

Samples 1 to 3 are taken from a copy of the nibble that was registered at the `clk` rising edge. So all four quarters of one clock come from the same nibble, with sample 0 first.

The source says only "two clocks offset by 90 degrees … four signals combined by XOR". The order of the edges above is this design's choice.

The output rate is 4 × 266 MHz = 1.064 Gsample/s. The proposal encodes its chirp at 1.024 Gsample/s. A stream encoded for 1.024 GS/s therefore plays about 4 % faster (3072 samples last 2.89 µs). To keep the exact frequencies, encode at 1.064 GS/s.

On a real FPGA the four flops and the XOR need placement constraints and matched routing to the pad. The RTL shows the function. It does not time-close this path.

## Sharing one DDR2 port: sockets and the arbiter

Every user of the memory is a *socket*. A socket has a `sock_req_t` request bundle and a `sock_rsp_t` response bundle (both in `us_pkg`).

**Socket rules:**

- A socket raises `req` and keeps it high for its whole list of accesses, including the return of all read data.
- It issues one command in each clock where `cmd_valid` and `cmd_ready` are both high.
- Read data comes back in order on `rvalid`.

**Arbiter rules** (`mem_arbiter`), following the proposal's flow chart:

1. **Is free?** A new grant is made only when no socket holds the port and no read data is outstanding in `ddr2_user_if`.
2. **Highest priority.** Requesters below the highest requesting priority are dropped. Socket 0, the host writer, has priority 2. The eight pin readers have priority 1. These values are an assumption; the source gives none.
3. **Least recent.** Among the rest, the winner is the socket whose previous grant lies furthest in the past. This is kept exactly in an N×N "older-than" matrix. At reset, the lower index counts as older.

The grant is registered. It is held until the owner drops `req`, so two grants are always separated by at least one free clock.

`evt_prio_o` and `evt_lru_o` pulse when rule 2 or rule 3 decided a grant.

`ddr2_user_if` turns one accepted command into one entry of the MIG address FIFO:

- `app_af_cmd` = `000` for a write (which also pushes its data word) and `001` for a read.
- Commands are accepted only when `phy_init_done` is high and neither FIFO is almost full.

The signal names are the MIG user interface's. The mapping of one 128-bit word per command is an assumption about the MIG configuration.

## A transmission, step by step

1. **START.** The PC sends START. In `tx_sequencer`, pin *p* is looked up one per clock: pin id in `pin_assign`, then base and length in `wave_record`. The pin's `pin_channel` then gets a fetch pulse. A pin that was never assigned, or whose id is not in the record, gets length 0 and stays silent (output 0).
2. **Fetch.** Each `pin_channel` requests the memory and reads its waveform into a local buffer of `MAX_WORDS` words. The whole waveform is buffered before anything is sent, so all eight pins can run together from one memory. Buffering is this design's choice. The source says only that the data is "retrieved … and parallelized" once the start signal comes.
3. **Run.** When every channel is loaded, `run` goes high and the run-time counter in `delay_ctrl` counts from 0, one count per 266 MHz clock (3.76 ns). Because the counter starts only after loading, all delays share one time origin. A pin's `go` pulse fires the clock after the counter equals its start time.
4. **Stream.** The channel sends four samples per clock through its `xor_serializer`. Let *E* be the first clock edge at which `run` is seen high. Sample 0 of a pin with delay *d* appears at the rising `clk` edge *E + 3 + d*. This latency is the same for every pin, so the relative delays are exact to one clock. 5 µs is 1330 counts. The 28-bit counter reaches 1.009 s, covering the 1 s delay the proposal used for bench tests.
5. **Done.** When all channels are done, `run` drops and `excite_done_o` changes level. This is the signal to the receiver. It is a toggle so it can cross clock domains safely.

## Host command protocol (own design)

The source fixes only that the PC link is a UART; the protocol below is this design's own. The link runs at 8N1, with `CLKS_PER_BIT` = 2309 (115200 baud at 266 MHz). Multi-byte fields are sent most-significant byte first.

| opcode | arguments | action |
|---|---|---|
| `0x01` WRITE  | addr[23:0], n, then n × 16 data bytes | store n words from word address `addr`; data byte *b* = samples 8b…8b+7, LSB first |
| `0x02` RECORD | id, base[23:0], len | enter waveform `id` in the record (overwrites an existing `id`) |
| `0x03` ASSIGN | pin, id | pin sends waveform `id` |
| `0x04` DELAY  | pin, delay[31:0] | start time of the pin in 266 MHz clocks (kept to 28 bits) |
| `0x05` START  | — | begin a transmission (ignored while one is running) |

Each command is acknowledged with `opcode | 0x80` once carried out. A WRITE is acknowledged when its last word is in memory. Acks wait in a four-entry queue and leave in command order. The next command may follow a WRITE at once. It is carried out straight away, but its ack waits behind the WRITE's.

Received data words are double-buffered. One word can wait for the memory while the next is being received. If the next word is complete before the waiting one has been written, `err_overrun_o` pulses and the waiting word is replaced.

Unknown opcodes are ignored. If the record is full (16 entries), a new id is dropped and `err_record_full_o` pulses.

## Receive capture

`rx_capture` runs on the 65 MHz ADC clock. Each change of the excitation-done toggle starts one recording, after a two-flop synchroniser. A toggle during a recording is ignored.

A recording writes `RECORD_SAMPLES` = 64805 words (997 µs × 65 MHz), one per ADC clock, to word addresses 0, 1, 2, … Each word packs the eight 14-bit samples of that clock, with channel 0 in bits 13:0 and bits 127:112 zero. One 128-bit write per 65 MHz clock matches the stated minimum memory speed of 65 MHz. One recording is 64805 × 16 bytes = 1.04 MB, or about 8.3 Mbit.

A recording is 1.04 MB, which is 7.3 Mbit of sample data. The proposal's "approximately 8 Megabytes" is read as megabits.

Moving the data to the PC, by USB on the ADC evaluation kit, is outside this RTL.

## Parameters (`us_platform_top`)

| parameter | default | meaning |
|---|---|---|
| `NUM_PINS` | 8 | output pins / pin channels |
| `MAX_WORDS` | 24 | buffer per pin in 128-bit words (3072 samples) |
| `NUM_WAVES` | 16 | entries in the waveform record (assumed) |
| `CLKS_PER_BIT` | 2309 | UART bit time in clocks (assumed 115200 baud) |
| `NUM_CH`, `ADC_W` | 8, 14 | ADC channels and resolution |
| `RECORD_SAMPLES` | 64805 | words per recording |

Package constants in `us_pkg`:

- `WORD_W` = 128
- `ADDR_W` = 24 (word address, 256 MB)
- `ID_W` = 8
- `LEN_W` = 8
- `DELAY_W` = 28

## Files

- `rtl/`: one module or package per file. `us_pkg.sv` holds the shared types and constants.
- `tb/tb_<module>.sv`: a self-checking testbench for each module. Each one prints `TB_RESULT checks=… failures=…`.
- `tb/mig_model.sv`: a behavioural MIG and DDR2 model with configurable latency and back-pressure.
- `tb/us_platform_tb_body.svh`: the shared end-to-end sequence. It makes waveforms with a second-order sigma-delta modulator, using integrators `i1 += x − v`, `i2 += i1 − v` and `v = sign(i2)`, on linear chirps.
- `tb/tb_us_platform_top.sv`: runs that sequence at reduced UART and recording sizes with a slow memory. This forces:
  - a host write during the pins' fetch, so the priority rule decides a grant
  - a record overflow
  - memory back-pressure
  - a second START during the transmission, which is acknowledged but ignored
- `tb/tb_us_platform_full.sv`: runs the design at its default parameters. It takes about 11 ms of simulated time, 2.9 million clocks.
- `tb/tb_workload_8x3072.sv`: the largest transmit load, at default parameters. Eight different 3072-sample chirps go to the eight pins, with delays from 0 to 1330 counts. All eight pins fetch 24 words each at the same time.

The end-to-end tests check every pin sample by sample against the expected waveform and delay. Unassigned pins and pins given an unrecorded id must stay silent. The tests also check:

- the acknowledge byte sequence
- the DDR2 contents written over the link
- the number of captured words

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_us_platform_top rtl/us_pkg.sv tb/tb_us_platform_top.sv
./obj_dir/Vtb_us_platform_top
```

To run another testbench, replace the top module name and file. The testbenches use `--timing` delays for the clocks and the `clk90` phase. Verilator is two-state, so the testbenches hold reset from time zero.

## Not included

These parts of the platform are not RTL here:

- **Vendor or external parts:** the MIG core and DDR2 devices, the clock manager, the ADC front end (AD9276), the T/R switch (TX810) and the USB link of the receive kit. They have either no logic function or a vendor-supplied one.
- **Analog circuits:** the high-voltage amplifier and H-bridge, the RC low-pass filter and the transducer.
- **PC software:** sigma-delta encoding, Wiener-filter pulse compression, delay-and-sum beamforming, time-gain compensation, envelope detection, log compression and the GUI.
- **Ethernet:** the proposal first planned an Ethernet link to the PC but replaced it with the UART.
