# Serial CRC-8 / CRC-16 / CRC-32 on one LFSR template

A cyclic redundancy check treats a frame as a polynomial over GF(2) and
appends the remainder of its division by a generator polynomial G(x). This
RTL builds that division one bit per clock in a linear-feedback shift
register (LFSR). One parameterised module serves three generators, so the
three cores differ only in register width and tap positions:

| variant | generator G(x)                 | `POLY`        | seed         |
|---------|--------------------------------|---------------|--------------|
| CRC-8   | x^8 + x^2 + x + 1              | `8'h07`       | `8'hFF`      |
| CRC-16  | x^16 + x^15 + x^2 + 1          | `16'h8005`    | `16'hFFFF`   |
| CRC-32  | IEEE 802.3                     | `32'h04C11DB7`| `32'hFFFFFFFF`|

Around the cores sits a self-contained comparison harness. It sends the same
pseudo-random payload through all three and disturbs all three links with the
same bit flips. It then counts, per variant, how many corrupted frames the
checker caught and how many slipped through. This reproduces in hardware a
coverage experiment on the three generators: 512-bit PRBS-15 frames, single
flips and 2-4 bit bursts at about one event per 128 bits, and 100,000
corrupted frames per variant.

## The division register (`crc_lfsr`)

The register holds the running remainder `crc[n-1:0]`. For each accepted
input bit `d`, MSB of the message first:

```
fb    = d ^ crc[n-1]                     // the bit leaving x^(n-1), plus the new bit
crc'  = {crc[n-2:0], 1'b0} ^ (fb ? POLY : 0)
```

This is the Galois (internal-XOR) form. Each coefficient of G(x) below x^n
that is 1 puts an XOR in front of the stage it feeds. The x^n term is the
feedback wire from the MSB. For CRC-16 that means XORs into stages 0, 2 and
15. A wider generator gives more stages and taps, but the longest path stays
one XOR deep plus the fan-out of `fb`.

After a k-bit message M the register holds

```
R = (SEED * x^k  +  M(x) * x^n)  mod  G(x)
```

The bits are not reflected and there is no final XOR. With these conventions
the ASCII string `123456789` gives `0xFB`, `0xAEE7` (the catalogued
CRC-16/CMS value) and `0x0376E6E7` (CRC-32/MPEG-2). The testbenches check all
three.

Two properties of this form carry the rest of the design:

* **Appending is free.** Feed the register its own MSB (`d = crc[n-1]`). Then
  `fb = 0`, and the register just shifts left. Its MSB over n cycles is R,
  MSB first, and the register ends at zero. The encoder uses this, so it
  needs no second register.
* **An intact codeword leaves zero.** Divide M followed by R from the same
  seed and the result is x^n (R + R) mod G = 0. So the checker does not need
  to know where the message ends and the CRC field begins. It divides the
  whole codeword and flags any non-zero remainder.

Reset is asynchronous and active high, and loads the seed. A separate
synchronous `clear` reloads the seed at the start of every frame. When
`clear` and `valid` are high together, the bit is processed from the seed,
so frames can follow each other with no gap. `ready` is high except during
reset and the cycle after it.

## Encoder and checker

`crc_encoder` ("append bits") passes message bits straight through while the
LFSR absorbs them. `in_last` marks the final message bit. After that bit the
encoder drops `in_ready` for exactly n cycles and drives R onto the output,
MSB first. `out_last` marks the last CRC bit. In the first append cycle
`crc_valid` is high and `crc_out` shows R. With no idle input cycles, a k-bit
message becomes a (k + n)-bit codeword in k + n clocks.

```
cycle      0 .. k-1        k .. k+n-1          k+n
in_ready   1 1 ... 1       0 0 ... 0           1
out_data   m0 .. m(k-1)    R[n-1] .. R[0]      next message
crc_valid  0               1 0 ... 0
```

`crc_checker` ("remainder") divides every valid bit of the codeword. In the
cycle after the bit marked `last`, `done` pulses for one cycle, `crc_out` holds
the remainder and `error = (crc_out != 0)`. The next codeword may begin in
that same cycle.

What the generators guarantee, and the testbenches confirm on random frames:
every single-bit error and every burst of at most n bits is detected. CRC-8
and CRC-16 both contain the factor (x + 1), so they also catch every
odd-weight error. The IEEE CRC-32 does not contain it.

## The comparison harness (`crc_compare_top`)

```
            +--> crc_channel CRC-8  : encoder --XOR--> checker --> counters
prbs15 -----+--> crc_channel CRC-16 : encoder --XOR--> checker --> counters
 (payload)  +--> crc_channel CRC-32 : encoder --XOR--> checker --> counters
                                            ^
error_injector (one flip bit per slot) -----+  (same flip to all three)
```

* **Framing.** Each frame occupies `FRAME_LEN + 32` = 544 clock slots. The
  payload goes out in slots 0-511. Each encoder then appends its 8, 16 or
  32 CRC bits, and the shorter links sit idle for the rest of the slot. The
  injector advances once per slot, so a flip hits the same bit position in
  all three codewords. That is what "the same disturbances" means here. The
  CRC field is disturbed as well as the payload. A frame starts while `run`
  is high and all encoders are ready. Dropping `run` lets the current frame
  finish.
* **Payload.** `prbs15` is the PRBS-15 sequence x^15 + x^14 + 1, seeded with
  `0x1ACE`. It advances only on payload bits and runs on across frames.
* **Disturbances.** `error_injector` draws from a 32-bit Galois LFSR
  (x^32 + x^22 + x^2 + x + 1) seeded with `0xC0DE`, stepped 16 times per
  slot. An event starts when 7 fresh bits are all zero, i.e. one chance in
  128 per slot, but never inside a running burst. Each event inverts 1, 2, 3
  or 4 consecutive bits, with equal odds. `ev_start` and `ev_len` are brought
  out for counting.
* **Counting.** `crc_channel` remembers whether any flip hit the current
  codeword. When its checker reports, it updates `stats`: `frames`,
  `corrupted`, `detected` (corrupted and flagged), `undetected` (corrupted but
  remainder zero, i.e. equal to the remainder of an intact frame), and
  `false_alarm` (clean but flagged, which never happens). Coverage is
  `1 - undetected / corrupted`.

### Result of the 100,000-case run (`tb_coverage_100k`)

It takes 101,652 frames (55.3 M clocks) for every channel to collect at least
100,000 corrupted frames:

| variant | corrupted frames | undetected | coverage  | 2^-n bound |
|---------|------------------|------------|-----------|------------|
| CRC-8   | 100,000          | 348        | 0.99652   | 3.9e-3     |
| CRC-16  | 100,086          | 7          | 0.99993   | 1.5e-5     |
| CRC-32  | 100,265          | 0          | 1.00000   | 2.3e-10    |

The miss rate of CRC-8 is close to its 2^-8 aliasing bound. CRC-32 misses
nothing, as expected. The 7 CRC-16 misses are more than 2^-16 would predict.
Every one of them matches the long-division reference: the 2000-frame
end-to-end test checks each remainder against that reference. These errors
are few, structured events on short frames, not uniformly random patterns.

## Design choices beyond the source description

The polynomials, seeds, MSB-first order, asynchronous active-high reset,
valid/ready interface, one bit per clock, 512-bit PRBS-15 frames with seed
0x1ACE, the injector seed 0xC0DE, its rate and burst lengths, and the
zero-remainder check rule all come from the source description. The rest is
this design's choice:

* The remainder has no reflection and no final XOR.
* The per-frame `clear` and the `last`-based frame delimiting.
* The append mechanism, and a CRC field sent right after the message.
* The PRBS-15 polynomial, the injector's random generator, the even split of
  event lengths, and flipping every bit of a burst.
* The 544-slot framing, disturbance of the CRC field, 32-bit counters, and
  the rule that a frame starts only when every encoder is ready.
* The source also prints a short CRC-16 update listing whose taps do not
  match x^16 + x^15 + x^2 + 1. This RTL follows the polynomial, which the
  source states several times.

Not built: the FPGA mapping and timing figures (a 50 MHz Cyclone-V target
with post-map delays of about 12, 18 and 25 ns for CRC-8, -16 and -32).
Parallel or folded CRC cores are not built either, since they are mentioned
only as future work.

## Files

| file | contents |
|------|----------|
| `rtl/crc_pkg.sv` | polynomials, seeds, frame size, `chan_stats_t` |
| `rtl/crc_lfsr.sv` | the serial division register |
| `rtl/crc_encoder.sv` | message pass-through plus appended remainder |
| `rtl/crc_checker.sv` | codeword division, `done` / `error` |
| `rtl/crc_channel.sv` | encoder, disturbed link, checker, counters |
| `rtl/prbs15.sv` | PRBS-15 payload source |
| `rtl/error_injector.sv` | shared single-flip / burst pattern |
| `rtl/crc_compare_top.sv` | three channels, sequencer, event counters |
| `tb/crc_ref_pkg.sv` | golden CRC by polynomial long division |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_coverage_100k` |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. For
example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/crc_pkg.sv tb/crc_ref_pkg.sv tb/tb_crc_compare_top.sv \
    --top-module tb_crc_compare_top
obj_dir/Vtb_crc_compare_top
```

These testbenches need `tb/crc_ref_pkg.sv`: `tb_crc_lfsr`, `tb_crc_encoder`,
`tb_crc_checker` and `tb_crc_compare_top`. `tb_prbs15`,
`tb_error_injector` and `tb_coverage_100k` need only `rtl/crc_pkg.sv` on the
command line.

* `tb_crc_compare_top` runs 2000 frames at the default size, in a few
  seconds. It re-derives every payload bit, every appended CRC and every
  checker remainder independently. It also requires each mechanism to occur
  at least once: single flips, bursts, clean frames, detections on each
  channel, a CRC-8 miss, encoder back-pressure, and a stop of `run`.
* `tb_coverage_100k` runs the full 100,000-case experiment in about 40
  seconds.

## Changing it

A different CRC is a different `WIDTH`/`POLY`/`SEED` on `crc_lfsr`,
`crc_encoder` or `crc_checker`, with POLY in normal (non-reflected) notation
and the x^n term left out. Widths above 32 work in the RTL. The harness
leaves room for up to `MAX_CRC_BITS` = 32, and the testbench reference model
is limited to 32 bits. `FRAME_LEN` sets the payload length. `RATE_LOG2`
sets the event rate, at one event per 2^RATE_LOG2 slots.
