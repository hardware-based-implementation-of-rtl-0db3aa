# CCSDS formatted data packets: RS(255,223) transmitter and receiver

This is a synthesizable SystemVerilog implementation of a CCSDS telemetry link at the channel-coding layer. It has two halves.

**Transmitter.** A ramp generator feeds a systematic Reed-Solomon RS(255,223) encoder. Every 255-byte codeblock is randomized with the CCSDS pseudo-random sequence and preceded by the 32-bit Attached Sync Marker (ASM) `1ACFFC1D`. The result goes out as one serial bit stream.

**Receiver.** The receiver runs the reverse chain:
- It finds the marker with a correlator that tolerates up to 3 bit errors.
- It derandomizes the codeblock and packs it back into bytes.
- It corrects up to 16 symbol errors per codeblock and delivers the 223 message bytes.

A third, independent part is an AXI4-Stream ramp source. It feeds a DMA channel into processor memory; the DMA and processor themselves are not part of this RTL.

The top level, `ccsds_top`, loops the transmitter output into the receiver through an XOR error-injection input `chan_err`. The derandomized serial stream is also brought out as `rx_derand_bit`, for observation. The stream source sits beside the loop with its own ports.

```
 tx_en                                                     chan_err
   |                                                          |
 test_stimulus -> rs_encoder -> par_ser -> XOR prbs -> mux -> XOR -> line
 (ramp, slots)   (32-stage LFSR)  (MSB first)  ^        ^ ASM
                                               |        |
                                            prbs_gen  data_shifter

 line -> correlator -> derandomizer -> syndrome_gen -> equation_solver -> chien_search -> error_evaluator -> rx bytes
                           |                                                                    ^
                           +----------------------> recd_data_buffer (2 x 256) -----------------+
```

## Timing model

Everything runs on one clock, `clk`, which is 50 MHz in the target system. The serial line carries one bit per clock.

The original design divides the clock by eight to get a byte clock. Here `clk_divider` instead produces a one-cycle `tick` enable every 8 clocks, and all byte-wide logic advances only on `tick`. The arithmetic is the same and there is a single clock domain.

A frame on the line consists of 4 marker byte slots followed by 255 codeblock byte slots. That is 259 slots × 8 = 2072 clocks. At 50 MHz this gives 50 Mbit/s on the line and about 21.5 Mbyte/s of message data. Frames follow each other with no gap.

## Frame generation (transmitter)

`encoder_top` contains the transmitter.

**`test_stimulus`** is the slot sequencer. It counts slots 0..258 on `tick`:
- Slots 0–3 are marker slots (`sync_slot`).
- Slots 4..226 carry ramp bytes. `data` increments once per message byte and continues across frames.
- During slots 227..258, `parity_sel` is high so the encoder shifts out its 32 parity bytes.
- `start` marks the first message byte. It clears the encoder's registers.

**`rs_encoder`** is the encoder LFSR.

**`par_ser`** loads one byte per `tick` and shifts it out MSB first. A valid tag and a sync tag travel with the byte.

**`data_shifter`** is a 32-bit shift register. It is loaded with the marker at the start of each frame and shifted out MSB first during the marker period.

**`prbs_gen`** is the pseudo-random sequence generator, h(x) = x^8 + x^7 + x^5 + x^3 + 1. It works as follows:
- It is an 8-stage register X8..X1. The output is X1, and the new X8 is X8 ⊕ X6 ⊕ X4 ⊕ X1.
- It is held at all ones while the marker is sent.
- It advances once per codeblock bit.
- The sequence begins `FF 48 0E C0 9A 0D 70 BC …` and repeats every 255 bits.
- The marker is never randomized.

A 1-bit **`mux2`** chooses the marker bit or the randomized codeblock bit. The result is registered into `serial_out`. `frame_start` pulses with the first marker bit.

## Reed-Solomon encoder

The code is RS(255,223) over GF(2^8), with t = 16 and 2t = 32 parity symbols. The encoder uses the classic division circuit: 32 byte registers R0..R31 and 32 constant multipliers by the generator coefficients g0..g31.

On every accepted message symbol:
- The feedback f = in ⊕ R31 is computed.
- Each register takes R(i-1) ⊕ g_i·f.

After the 223rd symbol, `parity_sel` does two things:
- One `mux2` forces the feedback to zero, which turns the register chain into a plain shift register.
- A second `mux2` switches the output from the message to R31.

The generator polynomial g(x) = ∏ (x − β^(112+j)) for j = 0..31, with β = α^11. It is computed at elaboration by the functions in `ccsds_pkg`. The field polynomial is x^8 + x^7 + x^2 + x + 1. These are the CCSDS conventional-basis values. The CCSDS dual-basis representation is not used.

Latency is one clock: the output register. The reference design also registers the input and reports 3 clock pulses of latency.

All of `M`, `N`, `K`, `POLY`, `FCR` and `STEP` are parameters. With `M=3, N=7, K=3, POLY='hB, FCR=1, STEP=1`, the encoder reproduces the textbook (7,3) example: message 7,3,2 encodes to 7,3,2,5,6,4,1.

## Receiver: synchronization and derandomizing

**`correlator`** works as follows:
- It keeps the last 32 line bits and counts how many agree with `1ACFFC1D`.
- When at least `THRESHOLD` = 29 agree, it raises `sync_flag` for one cycle. In that cycle, `bit_in` is the first bit of the codeblock.
- While a codeblock is being received, the `search` input blanks the correlator, so marker-like patterns inside the data are ignored.
- A frame whose marker has more than 3 bit errors is missed. That codeblock is dropped, and the correlator looks again at the next marker.

**`derandomizer`** restarts its own `prbs_gen` from all ones on `sync_flag` and XORs the sequence into the next 2040 bits. It packs the bits into bytes MSB first, with `out_sof` on byte 0 and `out_eof` on byte 254.

## Receiver: Reed-Solomon decoder

The decoder (`decoder_top`) is a chain of start-pulse-driven blocks. Each block hands a done pulse to the next. The order follows the classic split: syndromes → key equation (Berlekamp-Massey) → Chien search → Forney.

A received byte arrives only every 8 clocks, but each decode block does one step per clock. One instance of each block therefore decodes a codeblock in well under the 2072 clocks before the next one is complete.

### Received-data buffer

`recd_data_buffer` is a simple dual-port RAM with 2 banks of 256 bytes and a registered read.
- Incoming bytes are written into bank `wbank`.
- At each end of codeblock, the bank is handed to the decoder and writing switches to the other bank.
- The Chien search reads the handed-over bank back in reception order, one symbol per step.

### Syndrome generator

`syndrome_gen` holds 32 Horner cells, S_j ← S_j·β^(112+j) ⊕ r. Each cell is a register, an XOR and a constant multiplier.
- Each cell sees every byte as it arrives, so the syndromes are complete one cycle after the last byte.
- `done` starts the solver.
- `nonzero` reports whether any syndrome is nonzero.

### Equation solver (Berlekamp-Massey and evaluator)

`equation_solver` runs the inversionless Berlekamp-Massey algorithm. There is no field inversion in the loop.

**Locator phase.** Each clock performs one iteration, for 2t = 32 iterations. Each iteration does the following:
- It computes the discrepancy Δ = Σ σ_i · S_(r−i) with t+1 multipliers.
- It updates σ ← γ·σ − Δ·x·τ.
- If Δ ≠ 0 and 2L ≤ r, it sets τ ← σ (old), γ ← Δ and L ← r+1−L. Otherwise it sets τ ← x·τ.

**Evaluator phase.** The error evaluator Ω(x) = S(x)·σ(x) mod x^2t is then computed on the same multiplier array, one coefficient per clock, over t clocks.

The whole solve takes 3t+1 = 49 clocks. Its outputs are σ (scaled by an unknown nonzero constant, which cancels in Forney), Ω and the degree L.

### Chien search

`chien_search` evaluates σ at all 255 positions. It holds one register per coefficient, and each register is multiplied by its constant power every step.
- The positions are visited in reception order, so the buffer read address simply counts up.
- For each position it reports whether it is a root and the sum of the odd-degree terms σ_odd(x), which is x·σ'(x).
- At the end it compares the number of roots with L. If they differ, or if L > t, the codeblock is marked uncorrectable (`fail`).

### Error evaluator (Forney)

`error_evaluator` runs in step with the search. At each root it computes

    Y = x^FCR · Ω(x) / σ_odd(x)

using a running power of x. The division uses a^(2^8−2), built from squarings and multiplies.

The buffered symbol is XORed with Y and delivered:
- Only message positions are delivered (the 32 parity bytes are stripped), with `out_sof`/`out_eof`.
- `out_corrected` is high when the delivered byte was changed.
- An uncorrectable codeblock is delivered unchanged, with `cw_fail`.

### Decoder latency

`cw_done` comes N + 3t + 5 = 308 clocks after the last bit of a codeblock. It is reported with `cw_fail` and `cw_nerr` (the number of symbols in error).

## Data acquisition stream source

`sample_generator` is an AXI4-Stream master intended for the S2MM (stream-to-memory) channel of an AXI DMA. Its control inputs are meant to come from AXI GPIO.
- `en` runs the ramp. Dropping `en` resets the ramp to 0.
- `axi_en` gates `m_axis_tvalid`.
- `m_axis_tdata` is a 32-bit ramp that advances on each handshake (`tvalid && tready`) and holds its value while the DMA stalls.
- `m_axis_tlast` marks every `frame_size`-th word. For example, `frame_size = 32'h8000` gives 128 KiB packets, which is the direct-register-mode transfer size used with this system.

## Parameters

| Parameter | Default | Where |
|---|---|---|
| `N`, `K` | 255, 223 | encoder, decoder blocks, tops |
| `M` | 8 | symbol width |
| `POLY` | `9'h187` | field polynomial x^8+x^7+x^2+x+1 |
| `FCR`, `STEP` | 112, 11 | generator roots β^(FCR+j), β = α^STEP |
| `DIV` | 8 | clocks per byte |
| `MARKER` | `32'h1ACFFC1D` | ASM |
| `THRESHOLD` | 29 | correlator agreement needed out of 32 |
| `DATA_W` | 32 | stream width |

The shared constants and the elaboration-time GF(2^m) functions live in `ccsds_pkg`:
- `gf_mul`, `gf_pow`, `gf_inv`
- `pow_table`
- `rs_gen_poly`

The individual RS blocks accept other field sizes and codes. The (7,3) GF(8) configuration is exercised in their testbenches: the encoder output above, syndromes 3,7,5,0, σ(x) = 1 + α^6 x + x^2 with roots at positions 2 and 3, and the corrected message 7,3,2. The two chain tops are fixed to 8-bit symbols.

## Departures and assumptions

- **Clocking.** One clock with a divide-by-8 enable, instead of a divided byte clock.
- **Field and roots.** The field polynomial, the first root 112 and the root spacing 11 are the CCSDS conventional-basis values. The reference design names these parameters but does not state them. The dual-basis transform is not applied.
- **Encoder latency.** The encoder has one output register (1 clock latency), instead of input plus output registers (3 clocks).
- **Bit order.** Bytes go onto the line MSB first.
- **Parity.** The decoder strips the parity bytes and delivers 223 bytes per codeblock.
- **Correlator.** The correlator is blanked while a codeblock is being received. It does not keep searching inside the data.
- **Solver runs on every codeblock.** The key-equation solver and the search run even when all syndromes are zero. In that case they give σ = 1 and change nothing. This keeps the decoder timing fixed, where the reference design starts the locator only for nonzero syndromes.
- **Reset.** Reset is synchronous and active high everywhere except the stream source, which uses the AXI-style active-low `aresetn`.
- **Ramp rate.** The reference material quotes the test ramp as both 50 MHz and 100 MHz. Here it is one byte per message slot at the 50 MHz / 8 byte rate.
- **Not built here.**
  - The AXI DMA, AXI GPIO, AXI interconnect and the Zynq processing system, including the BRAM descriptor store used for scatter-gather mode. These are vendor IP or hard blocks; the stream source exposes the ports they connect to.
  - No interleaving or de-interleaving (interleave depth 1).
- **Additions.** Decoder status outputs (`cw_done`, `cw_fail`, `cw_nerr`, `out_corrected`) and the `chan_err` injection input.

## Simulating

Each testbench in `tb/` checks itself and prints `TB_RESULT checks=<n> failures=<n>`. It also has a watchdog. `tb/rs_ref_pkg.sv` is a table-based software model of the field, encoder, syndromes, locator and randomizer, used as the reference.

With Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/ccsds_pkg.sv tb/rs_ref_pkg.sv tb/tb_ccsds_top.sv --top-module tb_ccsds_top
./obj_dir/Vtb_ccsds_top
```

For another block, replace `tb_ccsds_top` with `tb_<block>`, for example `tb_rs_encoder` or `tb_equation_solver`.

`tb_ccsds_top` runs the default-parameter top over six back-to-back frames with different kinds of impairment:
- 0, 8, 16 and 20 symbol errors;
- marker bit errors below and above the threshold;
- DMA back-pressure on the stream source.

It checks that:
- every recovered message byte equals the transmitted ramp;
- uncorrectable and missed frames are flagged;
- the stream never loses or repeats a word.

`tb_dma_transfer` runs the stream source through the two DMA transfer patterns:
- one 0x20000-byte transfer (0x8000 words, one `tlast`) of the kind used in direct-register mode;
- three back-to-back 0x8000-word buffers with random back-pressure, as scatter-gather mode fills them.

The DMA side is a simple sink inside the testbench.
