# Trojan-resilient AES-128 from three untrusted chips and one small trusted one

A chip bought from an untrusted foundry may carry a hardware Trojan that
leaks the key or corrupts the result. This design keeps both threats out of
reach. Three identical **slaves**, each of which may be malicious, compute
AES-128 together. They use a three-party computation in which each slave only
ever holds a uniformly random share of the key and of the state. A small
**master** is the only part that has to be trusted. It:

- splits the key and the plaintext into shares;
- carries every message between the slaves;
- rebuilds the ciphertext three ways and raises an error flag if the three
  results disagree.

The master holds no S-box, no key schedule and no round logic. It uses a few
XOR gates, a reconstruction unit, an SPI controller and a sequencer, and about
180 flip-flops in this implementation.

One slave alone learns nothing, because its share is independent of the
secret. One slave that computes wrongly is caught, because the three
reconstructions then differ.

## Parties and links

```
                 +-------------------- master ---------------------+
   key, pt  ---> | sequencer -- SPI controller (nSS, SCK)          |
   prg keys ---> | MOSI_i = MISO_{i-1}  (^ data while loading)     | ---> ct, ct_err
                 | serial reconstruction + comparison              |
                 +------+-------------------+-------------------+--+
                        | link 1            | link 2            | link 3
                     slave 1             slave 2             slave 3
```

Each link has its own SCK, nSS, MOSI and MISO (each `BUS_W` bits wide) and
IRQ. The slaves are never wired to each other. Logically they form a ring
1 → 2 → 3 → 1, and the master builds that ring by forwarding slave i−1's
MISO to slave i's MOSI.

## Several triplets and the majority vote

One triplet catches a cheating slave but cannot correct it. For stronger
guarantees the whole triplet is repeated: the parameter `LAMBDA` (default 1)
sets the number of triplets, so the design has 3·`LAMBDA` slaves, each on
its own link. Triplet t consists of slaves 3t, 3t+1 and 3t+2. The ring and
the loading XOR stay inside the triplet, so every triplet computes the same
block on its own independent sharing. The master:

- drives all links with the same SCK and nSS;
- starts a session only when every slave raises IRQ;
- has one reconstruction unit per triplet;
- takes the bitwise majority of the triplets' results as the ciphertext.

`ct_err` is raised when any triplet is internally inconsistent or the
triplets do not all agree. A wrong result therefore needs more than half of
the triplets to be corrupted in the same way. Each extra triplet costs one
reconstruction unit, a few XORs and three links. The sequencer and SPI
controller are shared.

## The sharing

A 128-bit value v is held as three pairs (x_i, a_i), where:

- x_1 ⊕ x_2 ⊕ x_3 = 0;
- a_i = v ⊕ x_{i−1} (indices taken mod 3).

Any two neighbours can rebuild v = x_{i−1} ⊕ a_i. Either component of a single
pair on its own is uniformly random.

**Linear steps.** ShiftRows, MixColumns and AddRoundKey are applied to x and a
separately, with no communication. A constant (the S-box constant 0x63 or a
key-schedule rcon) is XORed into the a component only.

**Multiplication** (in GF(2^4) here). For two shared values (x, a) and (y, b),
the steps are:

1. Slave i computes c_i = x_i·y_i ⊕ a_i·b_i ⊕ o_i, where the o_i are fresh
   random values with o_1 ⊕ o_2 ⊕ o_3 = 0.
2. It sends c_i to slave i+1.
3. It receives c_{i−1} and keeps (c_i ⊕ c_{i−1}, c_i) as its share of the
   product.

Each slave sends one field element per multiplication.

**Correlated randomness** comes from inside the slaves. Slave i knows two of
three PRG keys, k_i and k_{i−1}, and computes
o_i = AES_{k_i}(n) ⊕ AES_{k_{i−1}}(n) for a counter n. Each key appears in
exactly two of the three sums, so the o_i always sum to zero, and no slave can
predict its neighbour's value.

**Loading a secret.** Slave i sends its own o_i, which it keeps as x_i. In the
same beat the master sends slave i the value MISO_{i−1} ⊕ v = v ⊕ o_{i−1}, and
slave i keeps that as a_i. The master needs three XOR gates and no storage
for this, and the slaves end up with a valid sharing of v.

## The S-box on shares

The only non-linear part of AES is the S-box inversion in GF(2^8). It is
computed in the composite field GF((2^4)^2), so that every multiplication is
a 4-bit one. The steps are:

1. Map each byte through the 8×8 bit matrix T (`htr_pkg::T_ROWS`) to two
   nibbles (h, l). GF(2^4) uses x^4 + x + 1.
2. Compute d = (h ⊕ l)·l ⊕ ω·h², with ω = 0x9.
3. Compute d⁻¹ = d^14 = (d²·d⁴)·d⁸. Squaring is linear, so only the products
   cost communication.
4. Compute b₁ = d⁻¹·h and b₀ = d⁻¹·(h ⊕ l).
5. Map back with T⁻¹ (`TINV_ROWS`), then apply the affine map of AES.

This is five multiplications per byte. They are grouped into four layers, and
each layer is one exchange between the slaves:

| layer | product                       | bits sent per slave (16 bytes) |
|-------|-------------------------------|--------------------------------|
| 1     | (h ⊕ l)·l                     | 64                             |
| 2     | d²·d⁴                         | 64                             |
| 3     | (d²·d⁴)·d⁸                    | 64                             |
| 4     | d⁻¹·h and d⁻¹·(h ⊕ l)         | 128                            |

That is 320 bits per round. All 16 bytes go through one unit (`mpc_sbox`) at
the same time.

## What happens on the links

The SPI here has no addresses or commands. Both ends know which word comes
next, so words can have different lengths.

**One session:**

1. Each slave raises IRQ when it has its next word ready.
2. When all three IRQ lines are high, the master pulls nSS low and toggles
   SCK.
3. On every rising edge each slave samples MOSI and moves MISO to its next
   `BUS_W`-bit beat. Beats go least significant first.
4. A slave drops IRQ after its last beat.
5. When all three IRQ lines are low, the master raises nSS.

A slave that is still computing simply keeps IRQ low, so the master waits
for the slowest slave.

**Session order:**

| phase                     | sessions | bits per link | master routes                 |
|---------------------------|----------|---------------|-------------------------------|
| INIT (set-up)             | 1        | 384           | {id, k_{i−1}, k_i} to slave i |
| key load (set-up)         | 1        | 128           | MISO_{i−1} ⊕ key              |
| key expansion (set-up)    | 40       | 64/64/64/128  | MISO_{i−1}                    |
| plaintext load (per block)| 1        | 128           | MISO_{i−1} ⊕ pt               |
| 10 rounds (per block)     | 40       | 64/64/64/128  | MISO_{i−1}                    |
| output (per block)        | 1        | 256           | into reconstruction           |

Key expansion happens on shares. SubWord runs through the same 16-lane S-box
unit, with four lanes in use. The eleven round-key shares are stored in the
slaves, so a block costs 3584 bits per link.

**Reconstruction.** In the output session each slave sends one chunk of x_i
and then the same chunk of a_i, and repeats. The master works as follows:

- It keeps the x chunk of each slave in a `BUS_W`-bit register.
- When the a chunks arrive, it forms x_1 ⊕ a_2, x_2 ⊕ a_3 and x_3 ⊕ a_1.
- It stores the first of these in the result register.
- It sets a sticky mismatch flag if the three differ.

## Using the top module

`htr_aes_top` has three parameters:

- `BUS_W`: data wires per link and direction; 1, 2, 4 or 8, default 8.
- `SCK_HALF`: the SCK half period in clock cycles. The default is 1, which
  puts the bus at half the clock.
- `LAMBDA`: the number of slave triplets, default 1 (see above).

1. Hold `prg_key[0..3·LAMBDA−1]`, `prg_id` and `key` steady and pulse `setup_start`.
   Wait for `ready` (about 1,500 cycles at the defaults).
2. Pulse `enc_start` with `pt` valid.
3. After the latency, `ct_valid` pulses with `ct` and `ct_err`.
   - `ct_err` is high if the three reconstructions of a triplet, or the
     triplets, disagreed.
   - `err_any` stays high from then on.
4. To use a new key, reset and repeat set-up.

The PRG keys and the counter start come from outside. Generate them
with a good random source, because the secrecy of the shares rests on them.

Bytes are numbered AES-style from the top: byte 0 is bits 127:120. The
FIPS-197 example is `key = 000102..0f`, `pt = 00112233..ff`, which gives
`ct = 69c4e0d86a7b0430d8cdb78070b4c55a`.

## Performance

These are the measured cycles per block from `enc_start` to `ct_valid`. The
transfer bound is 3584 bits divided by the bits per cycle on one link:

| BUS_W | clock cycles per SCK period | cycles per block | transfer bound |
|-------|-----------------------------|------------------|----------------|
| 1     | 2                           | 7372             | 7168           |
| 1     | 4                           | 14498            | 14336          |
| 2     | 4                           | 7330             | 7168           |
| 4     | 4                           | 3746             | 3584           |
| 8     | 4                           | 1954             | 1792           |
| 8     | 2 (default)                 | 1445             | 896            |
| 32    | 4                           | 1413             | 448            |

At narrow buses the links set the pace. At 8 wires and full bus speed, and
at 32 wires, the correlated randomness becomes the limit:

- each round needs 320 random bits per slave;
- the generator yields 128 bits every 51 cycles.

The source design reports 9356 cycles for one wire at 0.5 bit per cycle. For
a quarter-rate bus it reports 16820, 9119, 5268 and 3343 cycles for 1, 2, 4
and 8 wires. Those figures include a key load per block, which this design
does once at set-up. For 32 wires it gives only a throughput, four times
the 8-wire one. At the same bus speed this design needs 1413
cycles per block there. That is 2.4 times faster than the published 8-wire
count, but only 1.4 times faster than its own 8-wire run (1954). A faster
generator would be needed to go further.

## Where this design departs from its source, or had to choose

- **Loading direction.** The source gives both "slave i+1 receives v ⊕ o_i"
  and a listing (with a matching figure) in which slave 1 receives v ⊕ o_2. The two are mirror images of each other (swap the names of slaves 2 and 3). This design uses the
  first, which matches the ring direction of the multiplication.
- **Constant addition.** The source adds constants to the "first element" of
  a share. With the component names used here that element is a_i.
- **Round order.** A slave block diagram in the source shows MixColumns ahead
  of ShiftRows. Standard AES order is used instead, since the other order is
  not AES.
- **ω.** The constant ω in the inversion formula is 0x9. This value was
  confirmed by checking that the composite S-box matches AES on all 256
  inputs.
- **Error flag polarity.** The source describes the output bit as high when
  the sharing was correct. Here `ct_err` is high on a disagreement.
- **Randomness generator.** The generator is two AES-128 cores in counter
  mode, as in the source. The source quotes 55 cycles per 128 bits; these
  cores take 51.
- **Key expansion and new keys.** Key expansion on shares, its one-off
  placement at set-up and the need for a reset to change keys are this
  design's choices.
- **Link protocol details.** The exact IRQ/nSS handshake, the beat order, the
  word layouts and the host-side start/valid signals are this design's
  choices.
- **Reconstruction variant.** The master uses the serial scheme, with one
  delay register per wire. The variant that sends x and a on separate wires
  is not built.
- **Ciphertext register.** The master collects the ciphertext in a 128-bit
  register. Streaming it out would remove 128 flip-flops.
- **Single clock.** One clock drives all four parties. On a board the master
  would forward its clock. Clock generation, pads, UART and LEDs of a
  demonstration board are not part of the RTL.
- **Triplet keys and the vote.** With several triplets, each triplet gets
  its own three PRG keys. The vote is taken bit by bit on each output chunk.
  A tie, possible only for an even `LAMBDA`, gives 0. Triplets that disagree
  also raise `ct_err`.
- **Not built: Mysterion.** The lightweight cipher Mysterion, which the
  source also runs on the same framework, is not implemented: its linear
  layer matrix, S-box wiring and constants are not available here.
- **Verilator notes.** Verilator reports `rst_n` as used both asynchronously
  and synchronously in several modules. The synchronous use is the
  `disable iff` of the protocol assertions, not logic.

## Files

`rtl/`:

| file                | content                                                             |
|---------------------|---------------------------------------------------------------------|
| `htr_pkg.sv`        | types, GF(2^4)/GF(2^8) helpers, T/T⁻¹, the AES round functions      |
| `htr_aes_top.sv`    | master plus 3·LAMBDA slaves                                         |
| `htr_master.sv`     | session sequencer, loading XORs, forwarding, majority vote          |
| `spi_master.sv`     | nSS/SCK generation, IRQ handshake, beat counter                     |
| `master_recon.sv`   | serial reconstruction and comparison                                |
| `aes_slave.sv`      | slave sequencer, loader, key expansion and rounds on shares         |
| `spi_slave.sv`      | slave side of the link, variable-length words                       |
| `mpc_sbox.sv`       | 16-byte shared S-box, four exchange layers                          |
| `mpc_aes_linear.sv` | ShiftRows, MixColumns, AddRoundKey on a share                       |
| `corr_rng.sv`       | correlated randomness o_i from two AES cores                        |
| `aes_core.sv`       | iterative AES-128 (PRF of the generator)                            |

`tb/` holds one self-checking testbench per module, named `tb_<module>.sv`.
It also holds:

- `tb_aes_ref_pkg.sv`: an independent reference AES, which computes the
  S-box as x^254;
- `tb_htr_aes_widths.sv`: the bus-width sweep above;
- `tb_htr_aes_lambda.sv`: three triplets. A corrupted share in one slave, and
  then a whole triplet that is consistently wrong, must both be outvoted,
  giving the correct ciphertext with the error flag raised.

`tb_htr_aes_top` runs the top at its default parameters. It covers:

- the FIPS vector and random blocks;
- a corrupted share, which must raise the flag;
- a reset and a second key.

It counts each protocol mechanism. Every testbench prints
`TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/htr_pkg.sv tb/tb_aes_ref_pkg.sv -y rtl -y tb \
    tb/tb_htr_aes_top.sv --top-module tb_htr_aes_top -Mdir obj -o sim
./obj/sim
```

To run another testbench, replace both `tb_htr_aes_top` names. The full-size
end-to-end test runs in about a second. The width sweep takes a few seconds.

## Trust notes

- The master checks that the three reconstructions agree. It does not check
  the slaves' intermediate messages. A Trojan in one slave that changes its
  exchanges is detected at the output, not earlier.
- Two colluding slaves of the same triplet defeat that triplet by
  construction. With several triplets the vote still holds while fewer than
  half the triplets are corrupted.
- The testbenches check functional behaviour only. They do not analyse side
  channels or prove security.
