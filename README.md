# SCPPM optical transmit slice

This design is the transmit half of a deep-space optical link. A laser is
pulsed in one of M time slots per symbol (pulse position modulation, PPM). The
bits behind those pulses are protected by serially concatenated PPM coding
(SCPPM), the coding used by the CCSDS high-photon-efficiency optical
standard. Two parts make up the slice:

* **The waveform** runs on an FPGA. It turns test data into a stream of PPM
  slots: framing, scrambling, CRC, convolutional coding, interleaving,
  accumulation, symbol mapping, a second interleaver, synchronization markers,
  repeats and pulse/guard-slot generation. Every 125 MHz clock it hands out
  a word of 16 slots.
* **The serializer** sits on the optical mezzanine card. It is a 16:1
  multiplexer clocked by the slot clock, 2 GHz for 0.5 ns slots. It sends the
  16 slots out one after the other and returns the slot clock divided by 16.
  That divided clock runs the whole waveform, so the FPGA never has to run at
  the slot rate.

The block structure, the set of reconfigurable parameters and their legal
values, the 16-lane serializer interface and the clocking scheme come from the
paper this RTL is based on, *Development of an Optical Slice for an RF and
Optical Software Defined Radio*. That paper names most blocks without giving
their insides. Where it is silent, the choices made here are listed in
[Choices made here](#choices-made-here); read that section before relying on
bit-exact compatibility with any other SCPPM implementation.

## The signal path

```
 host ──reg port──► waveform_controller ──cfg──┐
                                               ▼
 data_generation ► tfsm_attachment ► slicer ► randomizer ► crc_termination
   ► convolutional_encoder ► code_interleaver ► accumulator          (bits)
   ► ppm_symbol_mapper ► channel_interleaver ► csm_insertion
   ► symbol_repeater ► modulation_mapper                           (symbols)
   ► slot_repeater_wrapper ══16 lanes══► serializer ──► ppm_data    (slots)
                                             │
                          clk_div16 ◄────────┘   (clocks everything above)
```

| Block (module) | What it does |
|---|---|
| `waveform_controller` | Register file for all run-time settings. Illegal values are ignored. Also holds the sticky underflow status. |
| `data_generation` | Test data: PRBS 2^23−1, a constant byte, or an up-counting byte. |
| `tfsm_attachment` | Puts the 32-bit marker `1ACFFC1D` ahead of every transfer frame of `FRAME_BITS` bits. |
| `slicer` | Cuts the stream into information blocks of 15120·r − 34 bits and tags each bit with its block's code rate. |
| `randomizer` | XORs each block with the CCSDS pseudo-random sequence (`FF 48 0E C0 …`). |
| `crc_termination` | Appends CRC-32 and two zero bits that flush the encoder. |
| `convolutional_encoder` | Rate 1/3 code with generators (5,7,7), punctured to 1/2 or 2/3. Every block becomes exactly 15120 code bits. |
| `code_interleaver` | Permutes each 15120-bit codeword: output j = input (11j + 210j²) mod 15120. |
| `accumulator` | Running XOR (1/(1+D)), restarted at each codeword. |
| `ppm_symbol_mapper` | Groups log2 M bits into one PPM symbol. |
| `channel_interleaver` | Convolutional symbol interleaver with N rows; row r delays by r·B. |
| `csm_insertion` | Puts a 16-symbol codeword synchronization marker ahead of every codeword. |
| `symbol_repeater` | Sends each symbol R times (1, 2, 3, 4, 8, 16, 32). |
| `modulation_mapper` | Turns a symbol into a frame of M + M/4 slots, with the pulse in slot s and M/4 guard slots. |
| `slot_repeater_wrapper` | Stretches every slot to Q slot clocks (1, 2, 4, 8, 16, 1024). Packs 16 slots per clock. |
| `serializer` | Behavioural model of the mezzanine's 16:1 multiplexer and ÷16 clock. |
| `hpe_waveform` | The waveform chain and controller wired together. |
| `optical_slice_top` | Waveform plus serializer: the whole slice. |

`scppm_pkg` holds the shared types (beat structs, enums, configuration struct),
the code constants and the block-size functions.

## How the bit counts fit together

Every codeword is 15120 code bits, whatever the rate or PPM order. This fixes
the size of every block upstream:

| Code rate r | Encoder input 15120·r | Information bits from the slicer | + CRC + tail |
|---|---|---|---|
| 1/3 | 5040 | 5006 | 5006 + 32 + 2 |
| 1/2 | 7560 | 7526 | 7526 + 32 + 2 |
| 2/3 | 10080 | 10046 | 10046 + 32 + 2 |

15120 is a multiple of every log2 M from 2 to 8. So a codeword is always a
whole number of symbols: 7560, 5040, 3780, 3024, 2520, 2160 or 1890 symbols
for M = 4 … 256. The channel interleaver's row count N must divide all of
these, which means it must divide 54. That way every codeword starts on row 0
and the codeword boundaries survive the interleaver. The default is N = 6,
B = 4, which uses 60 symbols of memory.

Frame markers and codeword boundaries are independent. The slicer cuts
straight through the marked frames, as the standard intends.

## Streams, handshakes and reconfiguration

Every link between blocks is a valid/ready stream. A beat moves on a clock
edge where both are high, and a beat that is not taken stays unchanged
(`symbol_repeater` asserts this rule). Up to the accumulator a beat is one bit
(`bit_beat_t`: bit, first, last, rate). From the mapper on, a beat is one
symbol (`sym_beat_t`: value, log2 M, first, csm). Blocks that insert beats
hold their input while they do it: both markers, the CRC tail and the extra
code bits of the encoder. Backpressure then reaches back to the data source.
This replaces the paper's scheme of data-enable lines with FIFOs at the rate
changes. Nothing can overflow, and no FIFO sizing is needed.

Code rate and PPM order can be written at any time. Each takes effect at a
codeword boundary:

* The slicer samples the rate when a block's first bit passes and tags every
  bit of that block with it. The CRC, the encoder and the code interleaver use
  that tag, not the register.
* The mapper samples M at a codeword's first bit and tags every symbol with
  it. The marker inserter and modulation mapper use that tag.
* The symbol repeats and slot repeats are sampled per symbol and per frame.

A new rate appears at the encoder with the next information block. A new M
appears one codeword later, because the code interleaver holds a whole
codeword.

## From symbols to 16-lane words (`slot_repeater_wrapper`)

This block is the least obvious part. The modulation mapper does not draw
slots. It emits a frame description: the pulse slot p and the frame length
L = M + M/4. The slot repeater scales it by Q: the pulse covers slot clocks
[p·Q, (p+1)·Q) of a frame of L·Q. Scaled frames wait in an 8-entry FIFO.

Every clock, the wrapper fills lanes 0…15 (lane 0 is sent first). It walks
through the FIFO head while keeping a position inside the current frame. A
lane is 1 if its slot clock lies inside the pulse. When a frame ends inside the
word, the next lane starts the next frame. The shortest frame is 5 slots
(M = 4, Q = 1), so one word can touch at most four frames. The wrapper
therefore looks at four entries and pops up to four per clock. This is a
16-step chain of compares and increments; it is the longest combinational path
in the design.

The serializer must get a word every clock, so the wrapper cannot wait. It
starts once four frames are queued. After that, a lane with no frame available
is sent empty and `underflow` pulses for that clock. This produces a gap in the
slot sequence, meaning the upstream chain did not keep up. The controller
keeps a sticky copy in register 7.

## Throughput: where this RTL departs from the paper

The paper reports 528 Mbit/s at M = 4 with 0.5 ns slots, using an 8-bit bus
between blocks. This RTL moves **one bit per clock** through the coding chain
and **one symbol per clock** through the symbol chain. That is 125 Mbit/s of
code bits, and a frame of 1.25·M·Q·R slot clocks per symbol beat. The slot
stream runs without gaps only when

    1.25 · M · Q · R ≥ 16 · log2 M      (and 1.25 · M · Q ≥ 16 per beat)

This holds for:

* M ≥ 128 with no repeats;
* M = 64 with Q·R ≥ 2;
* M = 16 with Q·R ≥ 4;
* M = 4 with Q·R ≥ 7, for example Q = 4, R = 4.

High-order, photon-starved modes run at the full slot rate, exactly as in the
paper; there the slot rate, not the logic, limits the data rate. The
low-order, high-rate modes underflow. Reaching them would take a chain that is
several bits and several symbols wide. That is not built here.

## Register map (`waveform_controller`)

| Addr | Register | Legal values | Reset |
|---|---|---|---|
| 0 | enable (bit 0) | 0/1 | 0 |
| 1 | data source | 0 PRBS, 1 constant, 2 counter | 0 |
| 2 | constant byte | 0–255 | 0 |
| 3 | code rate | 0 = 1/3, 1 = 1/2, 2 = 2/3 | 0 |
| 4 | log2 M | 2 … 8 | 4 (M = 16) |
| 5 | symbol repeats | 1, 2, 3, 4, 8, 16, 32 | 1 |
| 6 | slot repeats | 1, 2, 4, 8, 16, 1024 | 1 |
| 7 | status: bit 0 sticky underflow | write 1 to clear | 0 |

A write takes effect on the next clock. Reads are combinational.

## Clocking and the serializer model

`optical_slice_top` has one clock input, `slot_clk`, which is the output of the
mezzanine's limiting amplifier. The serializer divides it by 16 into
`clk_div16`, and the waveform runs on that clock. The model takes the
parallel word on the slot-clock edge where its counter is 15. That is half a
word period after the waveform launched the word on the rising edge of
`clk_div16`. It then shifts lane 0 out first. The sampling point and lane order
are choices made here. The real multiplexer's timing, the amplifier, the
connector and all analog behaviour (extinction ratio, jitter) are not
modelled. A real FPGA build would route `clk_div16` through a clock buffer or
clock manager.

## Choices made here

The paper gives the block list, the order of the blocks, the parameter values
listed above, the 16-line serializer and the ÷16 clock. Everything below was
chosen for this design. Most of it follows the CCSDS SCPPM code as generally
published, but it has not been checked against the standard's text:

* 15120-bit codeword; (5,7,7) convolutional code; accumulator 1/(1+D),
  reset per codeword.
* Puncturing per pair of input bits: rate 1/2 keeps c0 c1 | c0 c2, rate 2/3
  keeps c0 c1 | c0.
* CRC-32 generator 04C11DB7, preset all ones, no final inversion, MSB first.
  It gives 0376E6E7 for "123456789".
* Randomizer x^8+x^7+x^5+x^3+1, restarted at each block.
* PRBS polynomial x^23+x^18+1 with an all-ones seed.
* Code interleaver permutation (11j + 210j²) mod 15120.
* Transfer frame length 8920 bits (1115 bytes).
* Codeword marker: 16 symbols, where entry k of the 2-bit pattern `CSM_BASE`
  is scaled by M/4. This pattern is **not** the standard's marker.
* Guard time of M/4 slots.
* Channel interleaver size N = 6, B = 4. The delay lines start out holding
  zeros.
* Bit order MSB first throughout; lane 0 first.
* Valid/ready handshakes; the wrapper's start and underflow behaviour; the
  register map.

## Parameters

| Module | Parameter | Default | Note |
|---|---|---|---|
| `optical_slice_top`, `hpe_waveform`, `tfsm_attachment` | `FRAME_BITS` | 8920 | transfer frame length |
| top, `hpe_waveform`, `channel_interleaver` | `CI_N`/`N`, `CI_B`/`B` | 6, 4 | N must divide 54 |
| `code_interleaver` | `N` | 15120 | keep at 15120: the slicer's block sizes assume it |
| `slot_repeater_wrapper` | `LANES`, `FIFO_DEPTH` | 16, 8 | 16 matches the serializer |

## Simulation

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=F` and stops itself with a watchdog. The three
end-to-end benches also need `tb/scppm_ref_pkg.sv`. That package is an
independent model of the whole chain, written with plain arrays: long-division
CRC, recurrences for the sequences, direct evaluation of the permutation, and
the delay rule for the channel interleaver. It produces the expected slot
sequence. For example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/scppm_pkg.sv tb/scppm_ref_pkg.sv tb/tb_optical_slice_top.sv \
    --top-module tb_optical_slice_top -o sim && obj_dir/sim
```

(Any other bench works the same way. The block benches need only
`rtl/scppm_pkg.sv` and the bench itself; `-Irtl` finds the modules.)

* `tb_hpe_waveform` runs four configurations from reset: PRBS at rate 1/2 and
  M = 16 with Q = 4; counter data at rate 2/3 and M = 4 with R = 4, Q = 4;
  constant data at rate 1/3 and M = 256; PRBS at rate 1/3 and M = 64 with
  R = 2. For each, every slot of the first one or two codewords (up to 1.2
  million slots) must match the model, with no underflow and a word every
  clock.
* `tb_waveform_modes` sweeps every value in the register map. It runs all 21
  pairs of M and code rate for a whole codeword each, every slot-repeat factor
  at M = 256 and every symbol-repeat factor at M = 128. That is 10 million slot
  checks in a few seconds. The expected repeats are derived by index arithmetic
  from the model's plain slot sequence.
* `tb_optical_slice_top` runs the whole slice at its default size with a
  2 GHz slot clock. It first checks 303,680 consecutive slots on the serial
  `ppm_data` line against the model. It then changes the rate and M while
  running and checks that both take effect. Finally it starves the wrapper at
  M = 4 and checks the underflow status. It counts frame markers, codeword
  markers, backpressure, symbol repeats, slot repeats, rate and order changes
  and underflow, and fails if any of them never happened. It takes a few
  seconds.
* The block benches check each block against a model written in the bench:
  under random valid/ready, every legal value of each parameter, and the
  one-beat-per-clock rates where the block promises them (encoder, code
  interleaver ping-pong, symbol repeater, wrapper).
