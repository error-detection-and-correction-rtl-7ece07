# Golay-coded cache memory

Soft errors in cache SRAM often flip two or three neighbouring bits at once, which
single-error-correcting codes cannot repair. This design protects each 12-bit data word
with the binary Golay code, which corrects any three wrong bits in a word. It also
corrects any three random bits, not just adjacent ones. The check bits come from a CRC
division by the Golay generator polynomial. The codeword is stored in a 1K x 23 array.
On a read, the decoder finds and removes up to three errors using two syndromes and a
bank of small "weight measurement" adder trees.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. Everything except the
array is combinational or a simple register.

## The code

**(23,12) Golay code.** The 12 message bits `m` are read as a polynomial (`m[11]` is the
x^11 coefficient), multiplied by x^11 and divided by the generator

    g(x) = x^11 + x^10 + x^6 + x^5 + x^4 + x^2 + 1      (12'hC75, x^11 at bit 11)

The 11-bit remainder is appended, giving the systematic codeword `{m, remainder}`. This is
a CRC. The division is done in block `crc` as twelve conditional 12-bit XOR steps. The
code has minimum distance 7. It is *perfect*: every 23-bit word lies within three bit
flips of exactly one codeword.

**(24,12) extended Golay code.** Block `golay23_24` appends the XOR of the 23 bits, so
every extended codeword has even weight. This raises the minimum distance to 8: three
errors can be corrected and four detected. The 4096 codewords have the weight
distribution 1 / 759 / 2576 / 759 / 1 at weights 0 / 8 / 12 / 16 / 24, and the encoder
testbench checks exactly this.

Bit layout of a 24-bit word everywhere in this design:

| bits    | content                                   |
|---------|-------------------------------------------|
| [23:12] | message m[11:0]                           |
| [11:1]  | CRC check bits (x^10 coefficient at 11)   |
| [0]     | overall parity                            |

The generator polynomial is a parameter, `GOLAY_POLY`, defined in `golay_pkg`. The other
standard Golay generator, 12'hAE3, also works. Every matrix the decoder uses is derived
from this parameter at elaboration.

## Decoding: how three errors are found

This is the least obvious part of the design (`golay_decoder`).

Write the extended code as `c = [m, m*A]`. Row `i` of the 12x12 matrix `A` holds the
11 check bits and the parity bit that message bit `i` produces alone. For the extended
Golay code `A * A^T = I`, so `A` is its own inverse transpose. Split the received word
into `r1` (message part) and `r2` (check part), and the error into `e = [e1, e2]`.

1. **Syndrome.** `s = r1*A + r2`. In other words, recompute the CRC check bits of the
   received message and XOR them with the received check bits. `s = 0` means no error.
   Otherwise `s = e1*A + e2`.
2. **Errors only in the check part.** Then `e1 = 0` and `s = e2`. This is the case
   when `weight(s) <= 3`.
3. **One error in the message part, bit i.** Then `s + A[i] = e2`. This is the case
   when `weight(s ^ A[i]) <= 2`.
4. **Errors only in the message part.** Multiply by `A^T` to get the second syndrome
   `t = s*A^T = e1 + e2*A^T`. If `e2 = 0`, then `t = e1` and `weight(t) <= 3`.
5. **One error in the check part, bit j.** Then `t ^ A^T[j] = e1`. This is the case
   when `weight(t ^ A^T[j]) <= 2`.

Any pattern of at most three errors falls into exactly one of these cases. Twenty-six
weights are needed: `s`, `t`, twelve `s ^ A[i]` and twelve `t ^ A^T[j]`. All of them
are computed in parallel by `weight_unit` instances. The first case that holds gives
`e`, and the decoder outputs `msg = r1 ^ e1`, the corrected 24-bit word `code_out`,
and `err_weight = weight(e)`. If no case holds, at least four bits are wrong. The
decoder then raises `err_uncorrectable` and passes the message through unchanged.

**Weight measurement unit** (`weight_unit`). This block counts the ones in a 12-bit
vector with a fixed adder tree. Four full adders each add three neighbouring bits.
Two 2-bit adders combine their results in pairs. One 3-bit adder produces the 4-bit
count.

## The cache

```
data_in --> golay_encoder --23--> (xor err_inject) --> data_register <--> cache_sram 1K x 23
               \--24--> code24                               |          (falling edge)
                                                             v
                          golay23_24 (+ inverted parity) --> golay_decoder --> data_out, flags
address --> address_register (10 bits) --> cache_sram
```

`golay_cache_top` wires these parts together.

* `golay_encoder` is `crc` followed by `golay23_24`.
* `address_register` is 10 bits wide. `data_register` is 23 bits wide and loads either
  the encoded word (for a write) or the array output (for a read).
* `cache_sram` holds 1024 words of 23 bits. Its read and write strobes act on the
  **falling** clock edge. The registers use the rising edge.

**Read-path extension.** The array stores only the 23-bit code, but the decoder works
on 24 bits. With even parity, three errors in the stored bits would become four in the
24-bit word, which the decoder cannot correct. The read path therefore appends the
*complement* of the even-parity bit, so the 24-bit word always has odd weight. One,
two or three stored errors then become one, three or three errors in 24 bits, and all
of these are corrected. The top does not count a correction of this added bit as an
error, so `err_detected`, `err_corrected` and `err_weight` describe the 23 stored bits
only.

Because the 23-bit code is perfect, every stored word decodes to *some* codeword.
Four or more stored errors are therefore miscorrected silently, and
`err_uncorrectable` stays low on this path. Detection of four errors is available only
when `golay_decoder` is used directly on 24-bit words.

### Interface and timing of `golay_cache_top`

| port | dir | width | meaning |
|---|---|---|---|
| clk, reset | in | 1 | clock; synchronous active-high reset |
| write, read | in | 1 | request; taken on a rising edge while `ready` is high; write wins if both |
| addr | in | 10 | row |
| data_in | in | 12 | message to write |
| err_inject | in | 23 | codeword bits to flip on their way into the array (soft-error model for tests; tie to 0) |
| ready | out | 1 | low for the one cycle while a read is in flight; requests are then ignored |
| code24 | out | 24 | extended codeword of `data_in` (combinational) |
| rd_valid | out | 1 | one-cycle pulse: `data_out` and the flags hold a new read result |
| data_out | out | 12 | corrected message |
| err_detected, err_corrected, err_uncorrectable | out | 1 | see above |
| err_weight | out | 3 | number of stored bits corrected |

**Write.** Rising edge `T` loads the address and the codeword into the registers. The
array stores the word on the falling edge that follows. The write takes one cycle.

**Read.** Rising edge `T` loads the address. The array reads on the falling edge that
follows. Rising edge `T+1` loads the word into `data_register` and raises `rd_valid`.
The result stays on `data_out` until `data_register` is loaded again. A read takes two
cycles, and `ready` is low between the two edges. The decoder is combinational after
`data_register`, so its delay sets the clock period.

Parameters: `ADDR_W = 10`, `DEPTH = 1024`. The array is 23 bits wide.

## Where this design departs from, or adds to, its source

The architecture this design follows specifies:

* the 1K x 23 array with a 10-bit address register and a 23-bit data register;
* read, write, reset and a falling-edge clock on the array;
* CRC-based G23 generation followed by conversion to G24, with port names `m`, `p`,
  `transoutput` and `g1`, `g2`;
* even parity for the extended bit;
* the 12-bit weight-unit adder tree;
* a decoder that flags an error when the recomputed CRC differs, corrects up to three
  errors and detects four.

The following are this design's own choices:

* **Generator polynomial.** The source does not give it. 12'hC75 is used.
* **Decoder search.** The source describes the decoder only in outline. The standard
  two-syndrome algorithm above is used, fully combinational.
* **Flip-flop counts.** The source reports 3 flip-flops in its encoder and 23 in its
  decoder without saying what they hold. Here the encoder and decoder contain no
  flip-flops, and the pipeline registers are the address and data registers of the
  cache.
* **Timing and handshake.** The request handshake, the two-cycle read and the
  write-over-read priority are all chosen here.
* **Reset.** Reset clears only the registers and the array's read-data register, not
  the array contents.
* **Read-path parity.** The complemented parity bit on the read path, described above,
  is this design's choice.
* **Error injection.** `err_inject` is an added test port.

The source also mentions a (32,19) block code but does not define it, so it is not
implemented. Its FPGA slice, LUT and delay comparisons are not reproduced.

## Verification

Each module has a self-checking testbench in `tb/`. The expected values come from
`tb/golay_ref_pkg.sv`, an independent bit-serial LFSR encoder.

* `tb_crc`: all 4096 messages against the reference. Each codeword rotated by one
  place must also be a codeword (the code is cyclic).
* `tb_golay23_24`: two vectors with known outputs and 5000 random words.
* `tb_golay_encoder`: all 4096 messages, plus the weight distribution of the extended
  code.
* `tb_weight_unit`: all 4096 inputs.
* `tb_golay_decoder`: 60 random messages, each with these error patterns:
  * no error;
  * every single error;
  * every 2-bit and 3-bit adjacent burst;
  * random 2-bit and 3-bit errors, where the corrected message, the word, the flags and
    the weight must all be exact;
  * random 4-bit errors, which must raise `err_uncorrectable`.
* `tb_cache_sram`, `tb_address_register`, `tb_data_register`: random traffic against a
  model in the testbench, checking edge, priority and reset behaviour.
* `tb_golay_cache_top`: runs the full-size design with default parameters.
  * It writes all 1024 rows, each with an error class: none, single, double-adjacent,
    triple-adjacent, random double or random triple.
  * It reads every row back and checks the data, the flags, the weight and the latency
    of `rd_valid`.
  * It checks that a request made while busy is dropped, and that reset cancels a
    pending read.
  * It counts each of these events and fails if any never occurs.

Each testbench ends by printing `TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

```
verilator --binary --timing --assert -Irtl -Itb rtl/golay_pkg.sv tb/golay_ref_pkg.sv \
    tb/tb_golay_cache_top.sv --top-module tb_golay_cache_top -Mdir obj_top
./obj_top/Vtb_golay_cache_top
```

Replace `golay_cache_top` with any other module name to run that module's testbench.
Verilator finds the remaining files in `rtl/` and `tb/` by their module names. Lint
with `verilator --lint-only -Wall rtl/golay_pkg.sv rtl/<module>.sv -Irtl`.

Files: `rtl/golay_pkg.sv` (widths, polynomial, matrix functions), `crc`, `golay23_24`,
`golay_encoder`, `weight_unit`, `golay_decoder`, `cache_sram`, `address_register`,
`data_register`, `golay_cache_top`. Each file opens with a comment on its function and
timing.
