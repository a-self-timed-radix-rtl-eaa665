# A radix-2 FFT built from links and joints

This is an N-point radix-2 decimation-in-time FFT that does all of its
arithmetic on one complex multiplier. That multiplier is built from a signed
multiplier, which is built from an unsigned shift-and-add multiplier. Every
level is described in the *link-joint* style of self-timed design. Storage
consists only of **links**: a data word plus a "full" flag. All computation
happens in **joints**, which sit between links and fire when their inputs
are full and their outputs are empty. A block whose boundary is made of links
(for example a whole multiplier) can itself be used as a link, a *complex
link*, by the next level up. That is how the FFT is stacked:

```
fft_r2 ── cmul ── smul ── umul ── async_reg ── lj_link
   │        │       └── lj_queue (sign queue)
   │        └── lj_queue (state queue), async_reg (phase, running sums)
   ├── async_reg  X0..X(N-1)   the N numbers
   ├── async_reg  CNT          {step, index}
   ├── lj_queue   index queue, number queue
   ├── twiddle_rom             W_N^z
   └── lj_link    L-busy, R0..R(N-1)
```

The original design is self-timed, with latches and handshakes. This RTL is a
**clocked equivalent** of it. A joint's fire rule is a combinational
expression of full flags, and a firing takes effect at the next rising clock
edge. The structure, the fire rules and the pipelining behaviour are kept.
Absolute speed and the latch-level handshake are not modelled.

## Links, joints and the two rules

`lj_link` is the only storage primitive. It has these ports:

- `wr_fire`/`din` come from its one writer joint.
- `rd_fire` comes from its one reader joint.
- `full`/`dout` go to both joints.

Two rules hold everywhere, and assertions check them:

1. A link has exactly one writer joint and one reader joint.
2. No joint reads and writes the same link.

Rule 2 makes iterative state awkward, because a counter cannot update itself.
The **asynchronous register** (`async_reg`) is the way around it. It has
three links:

| link | written by | role |
|------|------------|------|
| Li   | outside (`ld_fire`) | initial value |
| Lin  | processing joint (`wr_fire`) | next value |
| Lout | internal joint Ji | current value, read by the processing joint |

Ji fires on this rule:

- If Li is full, Ji copies Li to Lout and empties Li. It also discards any
  waiting value in Lin.
- Otherwise, if Lin is full and Lout is empty, Ji copies Lin to Lout.

So a processing joint can read the current value and write the next value
without breaking rule 2. The old value stays readable in Lout until the
reader releases it. The FFT depends on this property.

In this RTL a value written to an empty register appears at its output two
cycles later. `async_reg` has one addition, `OUT_INIT_FULL`: Lout leaves
reset full, holding zero (an initial token). Registers that are never loaded
and only circulate a joint's state use it.

## The multiplier chain

**`umul` (unsigned, n = 32 by default).** A request is loaded in one
`prefire`, which fills these links together:

- Lstart, whose full flag is `prefull`;
- the multiplicand link L1;
- the load links of three asynchronous registers: the multiplier word, a
  `log2 n`-bit counter (loaded with 0) and a 2n-bit accumulator (loaded
  with 0).

The centre joint J1 fires n times. Each firing does
`acc <- (acc << 1) + (MSB(mult) ? mcand : 0)`, shifts the multiplier word
left and increments the counter. On the last firing the sum goes to the
result link L5 instead, and J1 releases Lstart and L1.

The next request can therefore load while the previous result waits unread.
That second computation then stalls on its last step until L5 is read.
Latency is **2n+1 cycles** from `prefire` to `sucfull`. Each iteration takes
two cycles: one for J1 to fire and one for the register joints to move the
new value forward.

**`smul` (signed).** J1 passes |a| and |b| to `umul` and pushes the sign
`a[n-1] ^ b[n-1]` into a two-link sign queue. J3 negates the unsigned product
when the sign is 1 and writes the result link. The unsigned multiplier holds
two requests: one finished and one stalled. With the request links and the
result link, the signed multiplier holds **four requests** before its first
result is read. The magnitude of -2^(n-1) still fits in n unsigned bits, so
every operand pair is exact. Latency is 2n+3 cycles.

**`cmul` (complex).** It computes `(ar*br - ai*bi) + j(ar*bi + ai*br)` on the
one signed multiplier:

- An issue joint steps a 2-bit phase through `ar*br, ai*bi, ar*bi, ai*br`.
  For each product it pushes one bit, "subtract this product", into a
  four-link state queue.
- A collect joint adds the products up and writes `{re, im}`, each part 2n
  bits wide, to the result link.
- The phase and the running sums are kept in asynchronous registers with
  initial tokens.

Isolated latency is 264 cycles for n = 32. Sustained, the unit takes about
8n cycles per complex product. It takes 3 requests before its first result
is read.

All three multipliers look like a link to the outside:

- `prefire` loads a request while `prefull` is 0.
- `sucfull` says a result is present.
- `sucfire` reads it.

## How the FFT walks the butterflies

The N numbers sit in N asynchronous registers X0..X(N-1). A request does
three things:

- It loads the inputs in bit-reversed order, X_i = input[bitrev(i)]. The
  reversal is done by the wiring of the load ports.
- It loads a zero into the counter register CNT.
- It fills L-busy, which drives `prefull`.

The transform then runs log2(N) steps, and each step visits every index once.
In step s, index i is paired with y, which is i with bit s flipped. Call the
member of the pair with bit s set `hi`, and the other `lo`. Then

```
next_i = prev_lo + prev_hi * W_N^z,     z = (i << (log2(N) - 1 - s)) mod N
```

This one formula gives both outputs of every butterfly. For the `hi` index,
the exponent is N/2 larger than for the `lo` index, and W_N^(N/2) = -1, so the
subtraction happens without any special case. Each step therefore makes
exactly N complex multiplications.

Two joints do the work.

**J1, the controller.** CNT holds `{step, index}`. J1 fires when L-busy and
CNT are full, all register outputs are full, the complex multiplier can take
a request and both queues have room. On each firing J1:

- sends `prev_hi` and `W_N^z` (from `twiddle_rom`) to the complex multiplier;
- pushes `i` into the index queue;
- pushes `prev_lo` into the number queue;
- advances CNT.

Together with the **last index of a step**, J1 also releases every register
output.

**J2, the writer.** For each product, J2 takes the index and the number from
the two queues and writes `number + product` into the update link of X_index.

The old values must survive until the whole step has been issued, because
each one is read twice. They do survive:

- J2's writes during a step wait in the update links.
- The register outputs keep the old values until J1 releases them with the
  step's last index.
- After the release, new values move forward as J2 produces them.
- J1 cannot start the next step until every register output is full again.

After the last step, CNT reads `{log2 N, 0}`. When every register output is
full, J1 copies them to the result links R0..R(N-1). It waits if those links
are still full from the previous transform. It then releases the registers,
CNT and L-busy, so the next request can load while the results wait. All
results are written and read together (`sucfull`, `sucfire`).

**Number format.** Each complex number is `{re, im}`, two DW-bit two's
complement integers. Twiddles have DW-2 fraction bits, rounded to nearest,
so +1 and -1 are exact. J2 shifts each product right by DW-2 bits
(arithmetic shift, truncating) before adding. Sums wrap at DW bits, so inputs
need about log2(N)+1 bits of headroom.

**Speed.** The single multiplier sets the pace. The default 8-point
transform with 32-bit parts takes about 6,300 cycles: 24 complex products at
about 8·DW cycles each.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `fft_r2` | `NPT` | 8 | points (power of two) |
| `fft_r2` | `DW` | 32 | bits per real/imaginary part |
| `fft_r2` | `QDEPTH` | 4 | depth of the index and number queues |
| `umul`, `smul`, `cmul` | `N_BITS` | 32 | operand width |
| `twiddle_rom` | `NPT`, `DW` | 8, 32 | table size and word width |
| `lj_queue` | `W`, `DEPTH` | 8, 2 | word width and number of links |

The 32-bit multiplier width is the only size that comes from the original
design. The FFT size, the number format and the queue depth are choices of
this implementation.

## Where this RTL departs from the original description

- **Clocked, not self-timed.** Links are flip-flops with a synchronous
  active-low reset, and each firing takes one clock cycle. The source does
  not give the latch-level handshake.
- **Twiddle exponent.** The source writes the exponent as `i << log N - s`,
  with s counted from 0. Taken literally, that gives W^0 for every index in
  step 0, which is not an FFT. This RTL uses `i << (log N - 1 - s)`. The
  end-to-end test checks the result against a floating-point DFT.
- **Counter width.** CNT uses `ceil(log2(log2 N + 1)) + log2 N` bits, so that
  step = log2 N can mean "done". That matches the source's
  `ceil(log(log n) + log n)` for N = 8. It is one bit wider when log2 N is a
  power of two.
- **Complex-multiplier pipelining.** The source says the complex multiplier
  accepts 7 requests before its result is read. This structure accepts 3.
  The source does not show the joints inside the complex multiplier, so they
  are this design's own: the issue and collect joints, the product order and
  the meaning of the 1-bit state.
- **0-bit links** (L-busy, Lstart) are 1-bit links holding a constant 1.
- **Twiddle ROM** is a combinational table computed at elaboration from
  cos/sin. It is not a separately handshaken link.
- **Result order.** Results come out in natural order, because the inputs
  are bit-reversed on load. All N result links are written and read as one
  group.

## Simulating

Every testbench checks its own results. It prints
`TB_RESULT checks=<n> failures=<m>` and stops; a watchdog ends a hung run.
For example, with plain Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
          --top-module tb_fft_r2 tb/tb_fft_r2.sv -o sim --Mdir obj
./obj/sim
```

| testbench | what it checks |
|-----------|----------------|
| `tb_lj_link` | random legal firings against a model; initial-token link |
| `tb_async_reg` | load latency; update waits while the old value is held; load priority |
| `tb_lj_queue` | order of random pushes and pops; capacity = DEPTH |
| `tb_umul` | random and corner products; latency 2n+1; second request accepted while the first result waits |
| `tb_smul` | signed corners including -2^31·-2^31; latency 2n+3; exactly 4 requests before the first read; random stream |
| `tb_smul_n8` | all 65,536 operand pairs of an 8-bit signed multiplier, streamed |
| `tb_cmul` | random and corner complex products; latency 264; 3 requests before the first read; random stream |
| `tb_twiddle_rom` | every entry against cos/sin for N = 8 and 16 |
| `tb_fft_r2` | 12 transforms at the default size (impulse, constant, tones, random) |
| `tb_fft_r2_n16` | the same test for a 16-point FFT with 16-bit parts |

The two FFT testbenches compare every output with two references:

- bit-exactly with a fixed-point model of the same algorithm;
- with a double-precision DFT, to within 16 LSB.

Results are read after random delays. The testbenches count how often each
of these mechanisms occurred, and fail if one never did:

- J1 waiting for the multiplier;
- J1 waiting at a step boundary;
- a value parked in an update link while the old one is held;
- J1 waiting for the result links;
- a request loaded while results are unread.

The default-size FFT test runs in a few seconds.

Assertions (`--assert`) check the link protocol: no write into a full link
unless it is read in the same cycle, no read of an empty link, and no
`prefire` while `prefull` is high.
