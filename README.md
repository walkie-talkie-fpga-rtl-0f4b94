# Encrypted FPGA walkie-talkie

Two FPGA boards talk to each other over a single digital line, a laser and
phototransistor or just a wire. Each board hears its on-board PDM microphone,
filters the sound down to 8-bit speech samples at about 12 kHz, encrypts the
samples with AES-128 in blocks of 16, and sends each 128-bit ciphertext block
down the line with a simple pulse-width code. The receiving board decodes the
pulses, decrypts the block with the same key, and plays the bytes out at
12 kHz through a first-order delta-sigma modulator on the headphone jack.

This RTL describes one board. Its transmit and receive paths sit side by
side in `wtf_top`. Wire `tx_line` of one board to `rx_line` of the other, or
to its own `rx_line`, which is what the end-to-end testbench does.

```
 mic_data ─► pdm_input ─► lpf_decimator ─► block_create ─► aes_encrypt ─► wtf_tx ─► tx_line
 (1 bit,      (3.06 MHz    (4 × [30-tap FIR    (16 bytes →     (AES-128,      (sync + pulse-
  3 Msps)      strobe)      + decimate by 4])   128-bit block)  282 cycles)    width code)

 rx_line ─► wtf_rx ─► aes_decrypt ─► block_destroy ─► delta_sigma ─► audio_out
            (sync_2ff,   (AES-128,     (1 byte per       (1-bit stream
             pulse        282 cycles)   12 kHz tick)      at 98 MHz)
             decoder)
```

## Rates and the timing budget

Everything runs from a single clock of about 98 MHz (`clk`). Every rate below
is a fixed division of that clock.

| point | rate | cycles at 98 MHz |
|---|---|---|
| PDM microphone bit | 98 MHz / 32 = 3.06 MHz | 32 |
| after FIR stage 1..4 | 766 k / 191 k / 47.9 k / 11.96 kHz | 128 / 512 / 2048 / 8192 |
| AES block (16 samples) | 748 Hz | 131,072 |
| AES-128 encrypt or decrypt | – | 282 |
| one line frame, worst case (all ones) | 1040 µs | 101,920 |
| output byte | 11.96 kHz | 8192 |

No stage needs back-pressure. Each one finishes well inside the interval
before its next input arrives. The tightest point is the first FIR, which
needs 31 cycles per sample and receives one every 32. The line frame is next:
a frame of 128 ones still ends 22 % before the next block is ready. A block
that finds the encryptor or transmitter busy would be dropped. At these rates
that cannot happen.

## Microphone front end (`pdm_input`, `fir`, `decimate`, `lpf_decimator`)

`pdm_input` makes the microphone clock, `clk`/32 with a 50 % duty cycle. It
takes the data bit on the last system cycle of each microphone period and
gives one strobe per period. `lpf_decimator` maps a 1 to +256 and a 0 to
−256, as 16-bit signed values. It then runs four identical stages, each a
30-tap FIR low-pass filter followed by keeping every 4th output.

The FIR is computed serially, not as a tree of multipliers. A three-state
machine does the work:

* **IDLE** waits for the one-cycle input strobe. It pushes the sample into a
  30-deep history.
* **SUM_ADD** does one multiply-accumulate per cycle for 30 cycles into a
  40-bit accumulator. That is wide enough that no partial sum overflows.
* **DONE** presents the result for one cycle with `dout_valid`.

The output is the accumulator shifted right by 14 and saturated to 16 bits.
The taps sum to exactly 2^14, so every stage has unity DC gain. Without this
scaling the gain would compound over four stages. The output strobe follows
the input strobe by 31 cycles. A new sample is accepted in IDLE or in DONE.

The taps are a Hamming-windowed sinc with its cutoff at 1/8 of the stage's
input rate, which suits decimation by 4. The formula is in `rtl/wtf_pkg.sv`.
They are easy to retune: only `FIR_COEFS` changes, with the constraint that
the taps sum to 2^14. The fourth stage's output is shifted right by one and
saturated to signed 8 bits. A full-scale PDM input therefore maps to about
±128. In simulation a 1 kHz tone at half scale comes out with a peak of 65,
and a 20 kHz tone at the same level comes out below 3.

## AES-128 (`aes_*`)

Standard AES-128 (FIPS-197): a 128-bit key, 10 rounds and 11 round keys.
Blocks are 128-bit vectors. Byte *k* is bits `[127-8k -: 8]`, and it sits at
row *k* mod 4 and column *k*/4 of the state. This is the byte order in which
FIPS-197 test vectors are printed, so those vectors can be used as they are.

The modules nest as the cipher is usually described:

* **Step modules.** `aes_sub_bytes`, `aes_shift_rows`, `aes_mix_columns` and
  `aes_add_round_key`, each with an `INVERSE` parameter where the step has an
  inverse.
* **Round modules.** `aes_enc_round` chains SubBytes → ShiftRows →
  MixColumns → AddRoundKey. `aes_dec_round` chains InvShiftRows →
  InvSubBytes → AddRoundKey → InvMixColumns. A `last` input skips
  (Inv)MixColumns.
* **Cipher modules.** `aes_encrypt` and `aes_decrypt` expand the key, apply
  the initial AddRoundKey and run the round module 10 times, taking keys
  1..10 for encryption and 9..0 for decryption. A caller pulses `start` with a
  block and a key, and later sees `done` with the result.

**The S-box is a block RAM.** `aes_sbox_rom` is a 256×8 table read from
`rtl/aes_sbox.hex` or `rtl/aes_inv_sbox.hex`. The address and the data are
both registered, so a result appears two cycles after its address. The table
entries are s(x) = b ⊕ rotl(b,1) ⊕ rotl(b,2) ⊕ rotl(b,3) ⊕ rotl(b,4) ⊕ 0x63,
where b is x⁻¹ in GF(2⁸). The inverse table is its inverse permutation.

**SubBytes shares one ROM.** `aes_sub_bytes` issues one byte per cycle and
writes each result back two cycles later, so a block takes 19 cycles.

**Key expansion is sequential.** `aes_key_expand` has its own S-box ROM. It
builds each round key in 7 cycles: four lookups for SubWord(RotWord(w3)),
then the XOR chain. All 11 keys are kept in registers, and the round modules
read them by index. The key is expanded again for every block, so the key
may change between blocks. The expansion takes 71 cycles.

Total latency is 72 + 10 × 21 = 282 cycles, about 2.9 µs, against a budget of
131,072 cycles per block. Unrolled, pipelined or combinational S-box versions
would be faster, but nothing here needs the speed.

Nothing here protects the key from side channels. The key is a plain input
port (`key`), and how both boards come to share it is outside this design.

## The line code (`wtf_tx`, `sync_2ff`, `wtf_rx`)

This is the part where most things can go wrong between two boards, so it is
described in full.

**Frame.** The line idles low. A frame is:

```
 sync:   ____ 8 µs low ____|‾‾‾ 8 µs high ‾‾‾|
 bit 0:  ___ 4 µs low ___|‾ 2 µs ‾|
 bit 1:  ___ 4 µs low ___|‾‾‾ 4 µs ‾‾‾|
```

* The sync is followed by the 128 ciphertext bits, most significant bit
  first.
* Information is carried only by the length of each high pulse.
* The shortest full cycle is 6 µs (166 kHz). That pace suits a slow
  phototransistor receiver.
* A frame takes 16 µs plus 6 to 8 µs per bit: 784 to 1040 µs.
* All lengths are parameters in clock cycles (784, 784, 392, 196 and 392 at
  98 MHz, from `wtf_pkg`).
* `NBITS` sets the frame length. With `NBITS = 8` a frame carries one sample
  instead of a block, and a byte of ones takes 80 µs, just inside one 12 kHz
  sample period (83 µs). Whole 128-bit frames are the default: with one-byte
  frames a lost frame shifts the grouping of bytes into AES blocks and garbles
  the audio, while with block frames it only costs that one block.

**The line idles low on purpose.** The receiver learns a bit's value only when
its high pulse ends. With a low idle level, the last bit of a frame ends like
all the others.

**Receiver.** The raw line first passes the two-flip-flop synchronizer
`sync_2ff`, because it comes from another board's clock domain. Two
saturating counters measure the current low and high times. At every falling
edge the pulse that just ended is judged together with the low time before
it. The windows sit at the midpoints between nominal lengths, so each side
tolerates about ±1 µs of error at the default timings:

| judged as | preceding low | high pulse |
|---|---|---|
| sync (starts a new block) | ≥ 6 µs | 6 – 12 µs |
| bit 0 | 2 – 6 µs | 1 – 3 µs |
| bit 1 | 2 – 6 µs | 3 – 6 µs |

While a block is being captured, the receiver drops the partial block and
pulses `rx_error` in either of these cases:

* a pulse fits none of the rows;
* a low or high level lasts longer than its window, for example when the
  sender stops mid-frame.

The same happens when a new sync arrives. A damaged block is never passed on
in part: either all 128 bits arrive or the block is lost. A single wrong
ciphertext bit would corrupt all 16 audio samples of the block after
decryption, so this is the better failure. A block is delivered in the cycle
after the falling edge of its last bit reaches the synchronizer output.

## Output side (`block_destroy`, `delta_sigma`)

`block_destroy` keeps a one-block holding register in front of a 16-byte
shift-out register. A free-running tick in `wtf_top` pulses every 8192 cycles,
which is 11.96 kHz, the same rate at which the far end produces samples. On
each tick one byte leaves, top byte first, the same order `block_create`
packs. A new block waits in the holding register until the current one is
used up. A block that arrives before the held one is taken replaces it. With
nothing to play, `rx_sample` holds its last value.

`delta_sigma` is a first-order modulator. A 9-bit register Q is loaded every
clock with X + Q − 256·Y, where Y, the output bit, is Q's MSB, and X is the
signed sample offset to 0..255. Over any 256 cycles the number of ones equals
X to within one. The quantisation noise lies far above the audio band, where
the RC filter and the speaker at the jack remove it.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `wtf_top` | `PDM_DIV` | 32 | clock cycles per microphone bit |
| `wtf_top` | `SAMPLE_DIV` | 8192 | clock cycles per played output sample |
| `wtf_top`, `wtf_tx`, `wtf_rx` | `SYNC_LOW`, `SYNC_HIGH`, `BIT_LOW`, `ZERO_HIGH`, `ONE_HIGH` | 784, 784, 392, 196, 392 | line code in clock cycles |
| `wtf_tx`, `wtf_rx` | `NBITS` | 128 | bits per frame |
| `fir` | `TAPS`, `DATA_W`, `COEF_SHIFT`, `ACC_W`, `COEFS` | 30, 16, 14, 40, `FIR_COEFS` | filter |
| `lpf_decimator` | `STAGES`, `DECIM`, `PDM_LEVEL`, `OUT_SHIFT` | 4, 4, 256, 1 | chain |
| `aes_encrypt`, `aes_decrypt` | `NR` | 10 | rounds |

Keep these relations when changing them:

* `PDM_DIV` × `DECIM`^`STAGES` must equal `SAMPLE_DIV`, so that both ends play
  at the rate they record.
* `PDM_DIV` must be at least `TAPS` + 1.
* A frame must fit in one block period: 16 + 8·`NBITS` µs < 16 × (1 / sample
  rate).

## What was decided here rather than given

The overall structure is taken as given, as are these numbers:

* the 30-tap FIR with its three-state machine and 30-cycle multiply-accumulate;
* four stages of decimation by 4, from 3 Msps 1-bit audio to 12 kHz 8-bit
  samples;
* a two-cycle block-RAM S-box;
* AES-128 with its round, step and key hierarchy;
* blocks of 16 bytes;
* the 8/8/4/2/4 µs line code;
* a 128-bit frame per block;
* the receiver synchronizer;
* a first-order delta-sigma modulator as in the usual block diagram.

These details are this design's own:

* the FIR tap values and the scaling, described above;
* PDM levels of ±256 and the final shift to 8 bits;
* the microphone clock at `clk`/32 and where the data bit is sampled;
* byte order in a block and bit order on the line (most significant first);
* the line idling low;
* the receiver's acceptance windows and drop rules;
* one shared S-box ROM per SubBytes and per key expander;
* key expansion repeated for every block;
* the holding register and tick in block destruction;
* the modulator's place at the output, running at the full clock rate;
* a synchronous active-high reset everywhere.

One figure was reconciled. The 8 µs + 8 µs sync above is used throughout. A
12 µs sync also appears in the timing estimates; with it, an 8-bit frame of
ones would take 76 µs instead of 80 µs, and both fit the 83 µs of a 12 kHz
sample period.

Outside this RTL are the microphone itself and the analog parts:

* the op-amp that lifts `tx_line` from 3.3 V to the laser's 5 V;
* the phototransistor, transimpedance amplifier and comparator that produce
  `rx_line`;
* the speaker on the headphone jack.

The top-level ports are the points where these parts connect.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. It ends with a
`TB_RESULT checks=N failures=M` line, and a watchdog stops it if it hangs.
Run from the repository root, because the S-box ROMs load `rtl/*.hex` by a
relative path:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
  rtl/aes_pkg.sv rtl/wtf_pkg.sv tb/tb_aes_ref_pkg.sv tb/tb_wtf_top.sv \
  --top-module tb_wtf_top -o sim && ./obj_dir/sim
```

Swap in another testbench name for the others. `tb_aes_ref_pkg.sv` is needed
only by the AES and top-level testbenches.

The AES testbenches check these published FIPS-197 values:

* the Appendix A.1 key schedule;
* the Appendix B worked example, step by step;
* the Appendix C.1 example vector.

For random data they compare against `tb_aes_ref_pkg`, a behavioural AES
written from the definition that shares no code with the RTL. Both compute
their S-box rather than reading the hex files.

`tb_wtf_top` runs one board at full size with `tx_line` looped to `rx_line`,
for about 1.5 million cycles. That takes a few seconds of simulator time.
Over the run:

* a 600 Hz tone goes through the filter chain;
* seven or more blocks are encrypted and sent;
* one frame is hit by a 60-cycle glitch and dropped;
* every received frame must equal the reference encryption of the samples it
  came from;
* every played byte must equal the recorded one;
* the modulator's density is checked for every output sample.
