# RSA co-processor: Montgomery multiplication in hardware, the ladder in software

This is the hardware half of a hardware/software RSA implementation for 1024-bit keys. It was
designed for a small FPGA SoC: a hard ARM core with a DMA engine into the programmable logic. The
processor keeps everything that is control flow: the loop over the exponent bits, the messages,
and the transfer of operands. The programmable logic does the expensive arithmetic: 1024-bit
Montgomery multiplications. One command from software performs one step of a Montgomery ladder.
That is two modular multiplications, which run at the same time on two multipliers. Each
multiplier is built around a single two-slice adder of 514 bits per slice.

The arithmetic, for a modulus N (odd, at most 1024 bits) and R = 2^1024:

* `MM(x, y) = x * y * R^-1 mod N` is a Montgomery multiplication.
* Software precomputes `R_N = R mod N` and `R2_N = R^2 mod N`.
* `X = MM(M, R2_N) = M*R mod N` brings the message into the Montgomery domain.
* Starting from `A = R_N` (the Montgomery form of 1), the exponent bits are scanned from the
  most significant end:
  * bit 1: `A <- MM(A, X)`, `X <- MM(X, X)`
  * bit 0: `X <- MM(A, X)`, `A <- MM(A, A)`
* Finally `MM(A, 1) = M^e mod N`.

Every step does the same work whatever the exponent bit, which is the point of a ladder.

## Files

| file | module | role |
|---|---|---|
| `rtl/rsa_pkg.sv` | package | widths, command encodings, operation and state enums |
| `rtl/mpadder.sv` | `mpadder` | multi-cycle multi-precision adder/subtractor |
| `rtl/montgomery.sv` | `montgomery` | bit-serial Montgomery multiplier, one `mpadder` inside |
| `rtl/rsa.sv` | `rsa` (top) | command controller, DMA control, N / R2_N / A / X registers, two multipliers |
| `tb/dma_model.sv` | `dma_model` | behavioural DMA + memory (simulation only) |
| `tb/tb_mpadder.sv`, `tb/tb_montgomery.sv` | | unit testbenches |
| `tb/tb_rsa.sv` | | end-to-end at full size (1024 bits, all defaults) |
| `tb/tb_rsa_small.sv` | | end-to-end, 64-bit build, 60 random keys and exponents |
| `tb/tb_rsa_crt.sv` | | 64-bit build: key generation, encryption, plain and CRT decryption |

## Software interface of `rsa`

Software sees three registers: `command`, `rx_addr` and `tx_addr`. It also sees a `busy` flag
and a monitoring output `state_o`. Every command follows the same protocol:

1. Set `rx_addr`, and `tx_addr` where needed.
2. Write the command. Bit 0 is the start flag.
3. Poll until `busy` is 0.
4. Write 0 to `command`.

The block does not start another command until bit 0 has been cleared, so a command that is
still in the register after `busy` falls does not run twice. `busy` rises combinationally in the
cycle the command appears.

| command | name | DMA read (`rx_addr`) | action | DMA write (`tx_addr`) |
|---|---|---|---|---|
| `0b1001` | load N | N | `N <- data` | none |
| `0b1011` | load R2_N | R2_N | `R2_N <- data` | none |
| `0b0001` | load M | M | `X <- MM(M, R2_N)` | none |
| `0b0011` | ladder step, bit 1 | A | `A <- MM(A,X)`, `X <- MM(X,X)` | A |
| `0b0101` | ladder step, bit 0 | A | `X <- MM(A,X)`, `A <- MM(A,A)` | A |
| `0b0111` | final | A | `A <- MM(A, 1)` | A |

An exponentiation with an e-bit exponent therefore takes these commands:

* two loading commands, which are needed only when the key changes;
* one `load M`;
* e ladder steps;
* one `final`.

Before the first step, software writes `R_N` into the memory word at `A`. `X` never leaves the
block. `A` makes a round trip through memory on every step. That costs a DMA transfer in each
direction per step. In exchange the A operand needs no extra multiplexing, and software can see
A between steps.

### DMA channel

The top has a read channel and a write channel, both pulse-based.

* **Read:** `dma_rx_start` is high for one cycle, with `dma_rx_addr` valid. The DMA answers with
  `dma_rx_done` high for exactly one cycle, and `dma_rx_data` (1024 bits) is valid in that cycle
  only. The block captures it at once. This is why N, R2_N, A and X all need their own 1024-bit
  registers.
* **Write:** `dma_tx_start` is high for one cycle, with `dma_tx_addr` and `dma_tx_data` (= A)
  valid. `dma_tx_done` pulses when the write is finished.

The DMA engine itself, the processor and the bus registers are platform parts. They are outside
this RTL, and their signals are the top's ports. `tb/dma_model.sv` models the DMA with the
platform's measured average latencies: 86 fabric cycles to deliver a word and 8 to write one
back.

## Multi-precision adder (`mpadder`)

A 1027-bit addition done by one 514-bit carry-propagate adder, used twice.

* **Start cycle:** A, B and the add/subtract flag are registered. The caller can change its
  inputs straight away.
* **Next two cycles:** the low slice and then the high slice are added, with the carry kept in a
  flip-flop between them.
* **Data path:** the operand registers shift down by one slice per cycle. The slice sums shift
  into the top of the result register.
* **Subtraction:** the B slice is inverted after its register, by an inverter and a multiplexer,
  and the initial carry is 1.
* **Result:** `result[1027]` is the carry out. For a subtraction it is the "no borrow" flag
  (`a >= b`).

`done` is high in the third cycle, counting the start cycle as the first. `CHUNK` sets the slice
width, and the latency is `ceil(1028/CHUNK) + 1` cycles. For example, `CHUNK = 64` gives an
18-cycle adder that uses far less carry logic. The two-slice default was chosen for speed: its
critical path is the 514-bit carry chain. Registering the carry between the adder and its result
would cost one cycle in three.

The 1027-bit width is one bit more than the largest value the multiplier forms: `C + B + N < 4N`
for a 1024-bit `N`.

## Montgomery multiplier (`montgomery`)

This is radix-2 Montgomery multiplication, one bit of `A` per iteration. Every iteration is a
**single** addition on the one shared adder.

1. `B + N` is computed once, before the loop, and kept in a register.
2. In iteration i, let `a_i` be bit i of A and `q = C[0] xor (a_i and B[0])`. The adder computes
   `C + {0, B, N, B+N}[q, a_i]`. The sum is even, and its value shifted right by one bit is the
   next C.
3. The shifted adder output feeds straight back into the adder's A operand, and the B operand is
   chosen by the two bits. So the next addition starts in the cycle in which the previous one
   finishes. This feedback (adder output, shift, multiplexers, adder operand) is the critical
   path.
4. After 1024 iterations `C < 2N`. One subtraction `C - N` on the same adder gives the reduced
   result when it does not borrow; otherwise C is kept.

The latency is `3*WIDTH + 8` cycles from the start cycle to `done`, which is 3080 cycles at 1024
bits. The parts are:

* 1 cycle to capture the operands;
* 3 cycles for `B + N`;
* 3 cycles per bit of A;
* 3 cycles for the final subtraction;
* 1 cycle to register the result.

The design this follows reports 3097 cycles; the small difference is in the bookkeeping around
the loop.

Operand rules:

* `in_m` must be odd.
* `in_b` must be less than `in_m`.
* `in_a` may be any 1024-bit value.

`in_a` is the only operand that may be larger than the modulus (any value below 2^WIDTH). This matters
for `load M`, where the message is `in_a`. It also allows a modulus much shorter than 1024 bits.

## Controller (`rsa`)

States: `IDLE`, then `RX` (waiting for the DMA), then `MUL` (both multipliers), then `TX`, then
`WAITCLR`. The loading commands go straight from `RX` to `WAITCLR`, and so does `load M` after
`MUL`.

* The two multipliers share the modulus register and a start pulse.
* Operand routing depends on the command: A or X to multiplier 0's B input, and A or X to
  multiplier 1's A input.
* The second multiplier starts only on the two ladder commands.

Busy time of each command, measured at full size with the DMA model:

| command | cycles |
|---|---|
| load N / load R2_N | 89 (86 DMA + 3) |
| load M | 3170 (86 + 3080 + 4) |
| ladder step / final | 3180 (86 + 3080 + 8 + 6) |

The measured figure this design targets is 86 + 3097 + 8 = 3191 cycles per step. A 16-bit-key
encryption is 18 commands, about 57k cycles at 100 MHz (0.57 ms), plus the processor's own loop
overhead. The two multipliers make a ladder step cost one multiplication time instead of two.

## Assertions

* `mpadder`, `montgomery`: no `start` while busy.
* `rsa`: every command started is one of the six codes; DMA completions arrive only in the state
  that waits for them.

They are concurrent assertions, checked in simulation with `--assert`.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M`, stops itself with a watchdog, and needs
only the files in `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb rtl/rsa_pkg.sv tb/tb_rsa.sv --top-module tb_rsa
./obj_dir/Vtb_rsa
```

Use the same command for `tb_mpadder`, `tb_montgomery`, `tb_rsa_small` and `tb_rsa_crt`.

* **`tb_mpadder`:** 1027-bit adders with 514-bit and 64-bit slices, and a 70-bit adder with
  16-bit slices. It covers overflow, negative differences, equal operands and random values,
  checks the 3- and 18-cycle latencies, and changes the inputs right after start.
* **`tb_montgomery`:** six 1024-bit multiplications, including extreme operands and a short
  modulus, plus 300 random 16-bit ones. A result `r` is accepted when `r < N` and
  `r * 2^W = a*b (mod N)`. The latency of `3W+8` is checked.
* **`tb_rsa`:** all defaults. It runs encryptions with two 16-bit exponents and with 65537, then
  an exponentiation with a random 1024-bit exponent (about 3.3 M cycles; a few seconds in
  Verilator). Results are compared with square-and-multiply on wide integers. It also checks:
  * the busy cycles of every command and the number of DMA transfers;
  * that a command left set is not run again;
  * that every command type, both DMA directions and both multipliers working together occurred.
* **`tb_rsa_small`:** a 64-bit build (`WIDTH=64`, `CHUNK=34`) with random moduli of many lengths,
  exponents of every length from 1 to 64 bits, single-bit exponents and zero messages.
* **`tb_rsa_crt`:** the same 64-bit build doing real RSA. The host model generates 32-bit primes,
  computes `d`, `dP`, `dQ` and `qinv`, and encrypts on the co-processor. It then decrypts both
  directly and by CRT (two exponentiations modulo p and q on the co-processor, recombined in
  software), and checks that the message comes back. It prints the ladder steps each method
  needed.

To build another size, override `WIDTH` and `CHUNK` on `rsa` (or on `montgomery` / `mpadder`).
Any `CHUNK` of 1 or more works. The adder inside the multiplier is `WIDTH+3` bits wide, so each
addition takes `L = ceil((WIDTH+4)/CHUNK) + 1` cycles. A multiplication then takes
`(WIDTH + 2) * L + 2` cycles, which is `3*WIDTH + 8` whenever `L = 3`.

## Where this RTL departs from, or goes beyond, the design it follows

* **Ladder arithmetic per command.** The command codes are the design's, and so is the split
  between A (sent back and forth) and X (kept inside). The exact multiplications per command are
  reconstructed as the standard Montgomery ladder, consistent with the command sequence (one
  command per exponent bit, a load before and a final command after) and with A starting at
  `R mod N`.
* **Multiplier algorithm.** Only the outline is given: one adder, a shift and two multiplexers
  in the feedback to the adder operand. The precomputed `B + N`, the one-bit shift per iteration
  and the state sequence are choices made here. The cycle count is 3080 instead of 3097.
* **Two multipliers.** Both are instances of the same multiplier. The original dual-multiplier
  build used an older, larger multiplier variant for placement reasons. That variant is not
  described, so it is not reproduced.
* **Adder width.** The 1027-bit operand width is derived: it is the width that gives both the
  quoted 3-cycle (514-bit slice) and 18-cycle (64-bit slice) latencies.
* **Handshakes and reset.** The following are not specified by the design and are choices made
  here:
  * the DMA start/done pulses and separate read/write completions;
  * the busy/clear protocol details;
  * the 32-bit addresses;
  * a synchronous active-low reset.
* **Monitoring.** The original uses up to seven monitoring registers for debugging, without
  saying what they hold. Only the controller state is brought out here.
* **Not included.** These are processor software or platform IP rather than co-processor logic:
  * the host software (key loading, ladder loop, text encoding);
  * the DMA engine;
  * the bus register block;
  * CRT decryption, which was only prototyped in software.

  CRT's two half-size exponentiations can run on this block unchanged. Load p (or q) as N, with
  `R2_N = 2^2048 mod p` and `A = 2^1024 mod p`. The ciphertext may exceed p, because it enters as
  the unrestricted `in_a` operand. The recombination stays in software. `tb_rsa_crt` does exactly
  this on a 64-bit build.

  Because every multiplication costs `3*WIDTH + 8` cycles whatever the modulus length, CRT on
  this fixed-width hardware needs about as many full-cost ladder steps as plain decryption: two
  half-length exponents instead of one full-length one. A speed-up from CRT would need a
  multiplier whose width, or whose number of iterations, follows the modulus length.
