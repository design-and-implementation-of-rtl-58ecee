# Area-efficient double-buffered interleaver for an IEEE 802.16 OFDM transmitter

Before an OFDM transmitter maps bits onto subcarriers, its forward error correction (FEC)
chain encodes, punctures and interleaves the data. Interleaving spreads adjacent coded bits
apart, so a burst of channel errors turns into scattered single errors that the decoder can
correct. The interleaver is the only part of that chain that needs real memory, so its
organisation decides the area.

This design stores the bits in one small single-bit RAM per bit of a mapper symbol (1 RAM for
BPSK, 2 for QPSK, 4 for 16-QAM). Each RAM holds two blocks, and the two halves work as ping-pong
buffers. All RAMs are written at the same address. Reading takes several locations out of one
RAM in a single operation, and those bits form a complete constellation symbol. The mapper
therefore receives one finished symbol per cycle. There is no separate symbol-assembly stage,
and reading starts as soon as one block has been written.

The RTL implements the transmitter chain up to time-domain samples:

```
data bits -> conv_encoder -> puncturer -> interleaver -> mapper
             (rate 1/2)      (3/4 or     (ilv_addr_gen +
                              none)       NB x ilv_ram)
          -> zero_padding -> ifft -> cyclic_prefix -> I/Q samples
             (192 -> 256     (256-point   (64 + 256
              carriers)       inverse DFT)  samples)
```

Each interleaver block yields 192 mapped points, whatever the modulation. The back end uses
those 192 points as the data carriers of one 256-point OFDM symbol. A symbol generator between
the mapper and the zero padding is not included, because its job (pilots, framing) is not
specified. The mapper feeds the zero padding directly.

## The interleaver

### Geometry

One interleaver block holds `NB x 192` coded bits, where `NB` is the number of bits per
subcarrier: 1, 2, 4 or 6. The block is treated as a matrix with `COLS = 12` columns and
`ROWS = NB x 192 / 12` rows (16, 32, 64 or 96). The matrix is written row by row and read
column by column:

```
input bit k = r*12 + c   ->   output bit j = c*ROWS + r
```

The storage splits the columns over the `NB` RAMs:

* RAM `r` holds every matrix column `c` with `c mod NB = r`.
* Inside a RAM, a matrix row takes `W = 12 / NB` consecutive words. `W` is 12 for BPSK,
  6 for QPSK, 3 for 16-QAM and 2 for 64-QAM.
* Packed group `g` holds coded bits `NB*g .. NB*g+NB-1`. Bit `r` of the group goes to RAM `r` at
  address `g`. This is why one shared write address serves all RAMs.
* Each RAM is 384 words of 1 bit. Words 0..191 form half 0 and words 192..383 form half 1.

### Reading one symbol

Reading visits the columns in order `c = 0 .. 11`, which takes RAM1, RAM2, ... in turn. In each
column it takes `NB` consecutive rows per read. The `NB` addresses of one read are

```
base + i*W,   i = 0 .. NB-1,   base = half*192 + s*12 + c/NB
```

Here `s` counts the symbols down the column (0..15). These `NB` bits leave as one symbol, with
the first bit in the MSB. A column yields 16 symbols and a block yields 192 symbols, which is
one symbol per RAM word.

Example, QPSK (`NB = 2`, `W = 6`):

* Symbol 0 reads RAM1 at addresses 0 and 6: matrix column 0, rows 0 and 1.
* Symbol 1 reads RAM1 at 12 and 18, and so on down column 0.
* Symbol 16 reads RAM2 at 0 and 6: matrix column 1.

### Double buffering and timing

`ilv_addr_gen` keeps a full flag for each half:

* The last write of a half sets its flag. The same cycle raises the read enable `out_valid` if
  the reader is idle, so the first symbol can leave in the cycle after the block's last write.
* The reader drains a full half at one symbol per cycle while `out_ready` is high. It then
  clears the flag and moves on to the other half.
* The writer keeps filling the other half while the first one is read.
* The writer stops only when both halves hold unread blocks. The packer then holds its group
  and `in_ready` falls.

In steady state at full rate, the input takes one coded bit per cycle (`NB x 192` cycles per
block). The output needs only 192 cycles per block, so for `NB > 1` the reader idles between
blocks.

Each RAM has `NB` asynchronous read ports, as a LUT-based (distributed) RAM provides. The
`NB`-location read of one RAM therefore happens in one cycle. Mapping the RAMs to block RAM
would need registered reads and one more cycle of output latency. That change is not made here.

## Encoder and puncturer

`conv_encoder` is a rate-1/N, non-recursive, non-systematic convolutional encoder:

* A shift register holds K-1 past bits.
* Each generator polynomial selects taps from the window {past bits, new bit}, and an XOR tree
  adds them modulo 2. Bit `j` of a generator is the tap on the input delayed by `j` cycles.
* The chain uses `G = [1+D^2, 1+D+D^2]` with K = 3, so `x = m1 + m-1` and `y = m1 + m0 + m-1`.
* The rate-1/3 code with G1 = (1,1,1), G2 = (0,1,1) and G3 = (1,0,1) is the parameter setting
  `GENS = {3'b101, 3'b110, 3'b111}` with `N = 3`.
* After a bit marked `in_last`, the encoder runs K-1 more steps with zero input. This returns
  the register to the all-zero state, and `out_last` marks the final tail output.

`puncturer` applies an `N x P` matrix:

* Row `i` is encoder output `i`, and column `j` is the step `j` of the pattern period.
* A 1 keeps the bit and a 0 deletes it.
* Kept bits leave serially, at one bit per cycle.

Patterns used:

* QPSK, 16-QAM and 64-QAM use rate 3/4 with `X = 1 0 1` and `Y = 1 1 0`. The output order is
  X1 Y1 Y2 X3.
* BPSK stays at rate 1/2. Its all-ones matrix makes the puncturer a plain serialiser.

The pattern restarts at column 0 after each frame. Frames that end in the middle of a period
still puncture correctly.

## Mapper

`mapper` labels each axis with a Gray code. The first `NB/2` bits of a symbol select the I level
and the rest select the Q level:

```
level = 2 * gray_to_binary(bits) - (2^(NB/2) - 1)
```

For 16-QAM this gives 00 -> -3, 01 -> -1, 11 -> +1 and 10 -> +3. BPSK maps b0 to ±1 on I and
sets Q to 0. The outputs are odd integers, `DW = 4` bits wide, with no power normalisation.

## OFDM back end

* **`zero_padding`** streams the 256-carrier vector in carrier order `k = -128 .. 127`.
  * Data point `d` goes on carrier `d - 96` for `d < 96` and on carrier `d - 95` otherwise.
    This fills carriers -96..-1 and 1..96.
  * DC and the band edges (32 carriers below, 31 above) carry zeros.
  * The zeros are inserted on the fly, so the block has no buffer.
  * Pilot carriers are not inserted.
* **`ifft`** is the smallest possible inverse DFT: one complex multiply-accumulate.
  * It loads the 256 carriers, storing carrier `k` at bin `k mod 256`.
  * For each output sample `n` it accumulates `X[k] * exp(+j 2 pi k n / 256)` over all `k` in
    256 cycles. The twiddle index steps by `n`.
  * It outputs the sum shifted right by 8, which is the 1/N scaling.
  * Twiddles are `round(2047 * cos/sin)` in 12 bits. The table is computed during elaboration
    with `$cos`/`$sin`. Output samples are 16 bits and carry the 2047 scale.
  * One symbol takes 256 load cycles plus 256 x 257 compute and output cycles (66 048 in
    all). This stage therefore sets the throughput of the whole chain, and the handshakes hold
    everything before it back.
  * Replacing it with a pipelined FFT needs no other change, because the interface is a plain
    stream.
* **`cyclic_prefix`** buffers one symbol, then sends samples 192..255 followed by 0..255. That
  is 320 samples, with `out_first` on the first one.

## Block sizes per modulation

| NBPSC | mapping | code rate | RAMs x bits | coded bits / block | encoder steps / block |
|------:|---------|-----------|-------------|-------------------:|----------------------:|
| 1     | BPSK    | 1/2       | 1 x 384     | 192                | 96                    |
| 2     | QPSK    | 3/4       | 2 x 384     | 384                | 288                   |
| 4     | 16-QAM  | 3/4       | 4 x 384     | 768                | 576                   |
| 6     | 64-QAM  | 3/4       | 6 x 384     | 1152               | 864                   |

The encoder steps include the two tail steps of a frame. `ofdm_tx` sets `NBPSC` at build time,
and its default is 16-QAM. The interleaver also accepts 64-QAM (`NB = 6`), which is tested at
the interleaver level only.

## Where this design makes its own choices

The structure described above is taken as stated: the RAM per symbol bit, the 384-bit
double-size RAMs, the shared write address, the read start after 192 writes, column-wise
reading through the RAMs in turn and the per-modulation code rates. The following points are
this design's own reading or choice:

* **12 columns.** The matrix width is not stated directly. It follows from the read-address
  increments: 6 with two RAMs and 3 with four. The standard IEEE 802.16 first permutation uses
  16 columns, the transpose of this matrix. Setting the interleaver's `COLS` parameter (or
  `ofdm_pkg::ILV_COLS`) to 16 gives that layout, and the interleaver testbench covers it for
  16-QAM. It needs `COLS % NB == 0` and `192 % COLS == 0`, which excludes `NB = 6`.
* **No second permutation.** The bit-swapping second permutation of 802.16 for 16-QAM and
  64-QAM is not included.
* **Rate-1/2 mother code.** The chain uses `G = [1+D^2, 1+D+D^2]`. The 802.16 code with K = 7
  (171/133 octal) is one parameter change away.
* **Puncturing pattern.** The rate-3/4 pattern (X 101, Y 110) is the 802.16 one. The serial bit
  order and the restart of the pattern at each frame are this design's choices.
* **Constellations.** The Gray labelling and the integer levels are conventional choices.
* **Packer and handshakes.** The serial-to-parallel packer in front of the RAMs, the
  valid/ready handshakes, the write stall when both halves are full and the asynchronous
  active-low reset are all design decisions. The RAM contents are not reset.
* **One data stream.** A second data stream for multiple antennas is not built.
* **OFDM back end.** Everything after the mapper is this design's own: the sizes (256
  carriers, 192 data carriers, a 64-sample prefix, as in IEEE 802.16 OFDM), the carrier
  layout, the word lengths and the serial DFT architecture.

## Files

| file | contents |
|------|----------|
| `rtl/ofdm_pkg.sv` | interleaver geometry, code, puncturing and OFDM constants |
| `rtl/ofdm_tx.sv` | top: the chain above, `NBPSC` parameter |
| `rtl/conv_encoder.sv`, `rtl/puncturer.sv` | FEC |
| `rtl/interleaver.sv`, `rtl/ilv_addr_gen.sv`, `rtl/ilv_ram.sv` | interleaver: packer and RAMs, address state machine, buffer RAM |
| `rtl/mapper.sv` | constellation mapper |
| `rtl/zero_padding.sv`, `rtl/ifft.sv`, `rtl/cyclic_prefix.sv` | OFDM back end |
| `tb/*_tb.sv` | one self-checking testbench per module, plus `ofdm_tx_full_tb` |
| `tb/*_chk.sv` | stimulus and reference-model helpers used by those testbenches |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops. It also has a watchdog that
counts a failure if the test hangs. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/ofdm_pkg.sv tb/ofdm_tx_tb.sv --top-module ofdm_tx_tb
./obj_dir/Vofdm_tx_tb
```

* `ofdm_tx_tb` runs the BPSK, QPSK and 16-QAM builds side by side. It checks every output
  sample exactly against a model of the whole chain that is written independently of the RTL. It also counts
  how often each mechanism occurs: frame tails, deleted bits, pattern restarts, overlapping
  write and read, use of both halves and writer stalls. A mechanism that never occurs counts as
  a failure.
* `ofdm_tx_full_tb` runs the default build, 16-QAM, for 20 OFDM symbols (about 1.4 million
  cycles).
* The block-level benches cover the rest:
  * the interleaver for `NB` = 1, 2, 4 and 6, including full-rate timing and the stall;
  * every read address and increment of the address generator;
  * the multi-port RAM;
  * both encoder codes;
  * three puncturing matrices;
  * every mapper input;
  * the carrier layout;
  * the inverse DFT, against both an exact integer model and a floating-point DFT;
  * the prefix.

The tests use only two-state simulation. Everything that is read is either reset or written
before it is read.

## Limits

* **No symbol generator.** Pilots and preambles are not generated, so the output is not a
  standards-compliant 802.16 signal.
* **Slow IFFT.** The serial inverse DFT gives about one OFDM symbol per 66 000 clock cycles.
* **Partial last block.** A block that is only partly filled is never read out. Frames must
  supply whole interleaver blocks before the data reaches the output.
* **No timing or area measurement.** Timing and resource use have not been measured on an FPGA.
