# Reversible-logic pixel cipher

This design encrypts an image one 8-bit pixel at a time. It has two parts.
The first is a fixed network of reversible logic gates (SCL, Toffoli,
Fredkin and Feynman) that scrambles the bits of each pixel. The second is a
key-XOR stage, fed by a small cellular-automaton key generator. Every gate in
the network is a one-to-one mapping of its inputs onto its outputs, and each
one is its own inverse. So decryption is the same set of gates run in the
opposite order with the same key. The receiver needs no other inverse logic,
and it recovers every pixel exactly.

The RTL holds the gate library, the encryption and decryption networks, both
key generators the design describes, and a streaming top level. The top
connects a transmitter to a receiver and shows that a pixel put in comes back
out unchanged. Image handling is not in the RTL: reading images, converting
them to binary, and LSB watermarking happen in software before and after the
cipher.

## The gate library

| Gate | Inputs | Outputs | Module |
|------|--------|---------|--------|
| SCL | A B C D | P=A, Q=B, R=C, S = A·(B+C) ⊕ D | `scl_gate` |
| Toffoli | A B C | P=A, Q=B, R = A·B ⊕ C | `toffoli_gate` |
| Fredkin | A B C | P=A; B and C swap places when A=1 | `fredkin_gate` |
| Feynman | A B | P=A, Q = A ⊕ B | `feynman_gate` |
| key XOR | 4-bit nibble, 4-bit key | nibble ⊕ key | `xor_key_gate` |

Each gate passes its control lines straight through. That is what makes the
gates reversible. A synthesis report will therefore list most gate outputs as
wired directly to inputs, which is expected.

## The encryption network (`rlg_encrypt`)

The pixel is split into two nibbles. Each nibble has its own chain of gates,
and one Feynman gate links the two chains:

```
 pix[7] ─A┐                 ┌─ Toffoli ── Fredkin ─┐
 pix[6] ─B│  upper SCL  P,Q,R                      ├─ XOR key ─ en[7:5]
 pix[5] ─C│                 │                      │
 pix[4] ─D┘           S ────┼──► Feynman A ── P ───┘  XOR key ─ en[4]
                            │
 pix[3] ─A┐           P ────┼──► Feynman B ── Q ───── XOR key ─ en[3]
 pix[2] ─B│  lower SCL      │
 pix[1] ─C│           Q,R,S └─ Toffoli ── Fredkin ─── XOR key ─ en[2:0]
 pix[0] ─D┘
```

- In the upper half, the three pass-through outputs of the SCL gate go
  through a Toffoli gate and then a Fredkin gate. The SCL's computed output
  S goes to the Feynman gate.
- The lower half is the mirror image. The SCL's top output P (which equals
  pix[3]) goes to the Feynman gate. Q, R and the computed output S go
  through the lower Toffoli and Fredkin gates.
- Inside each chain the lines keep their top-to-bottom order. The first line
  is the control of both the Toffoli and the Fredkin gate.
- Both nibbles are XORed with the same 4-bit key. Key bit 3 goes on the most
  significant line of each nibble.

Some wiring is not fixed by the design: which port of each gate a line lands
on, the orientation of the Feynman gate, and the order of the key bits. These
choices are read from the block diagram and made consistent between the two
directions. Change them only in `rlg_encrypt` and `rlg_decrypt` together.

The network with the key XOR is a permutation of the 256 pixel values for
each of the 16 keys. The testbench checks this exhaustively. Examples with
key 0: `00 → 00`, `FF → AF`.

## Decryption (`rlg_decrypt`)

Decryption runs the same stages in reverse order. First it XORs with the
key. Then the Fredkin, Toffoli and Feynman gates follow, and the SCL gates
come last. Each stage undoes its counterpart because each gate is its own
inverse. For example, the SCL's S output is `A·(B+C) ⊕ D`, and applying the
gate again gives back D. The Feynman gate recovers the lower SCL's P line,
and that line is the A (control) input of the lower SCL during decryption.
Both networks are purely combinational.

## Key generation

**Cellular automaton (`ca_keygen`, the default key source).** The
automaton is a row of four flip-flops. Each flip-flop loads the XOR of its
neighbours (rule 90), or of its neighbours and itself (rule 150). A constant
0 lies beyond each end of the row. Cell 1 uses rule 150 and cells 2–4 use
rule 90. There is no shift and no long feedback path, so the row can be made
longer by adding cells (parameter `N`, rule vector `RULE150`).

**LFSR (`lfsr_keygen`, the alternative key source).** Four flip-flops shift
from bit 1 towards bit 4. Bit 1 takes XNOR(bit 2, bit 4). The taps are the
parameter `TAPS`.

Both generators are weak as key sources, and a user should know this:

- With the rules above, the 16 states of the CA form two 7-state cycles and
  two fixed points: 0000 and cells 4..1 = 1101. A seed on a fixed point gives
  a constant key. The reset seed 0001 lies on a 7-cycle.
- With taps 2 and 4, the LFSR runs through only 6 states from reset (0000,
  0001, 0011, 0110, 1100, 1000, written bit 4 first). `TAPS = 4'b1100`
  gives the maximal 15-state sequence. The state 1111 locks up.

So the key repeats every 6 or 7 pixels. The cipher is a faithful hardware
model of the scheme, not a secure cipher.

## Streaming top level (`rlgcd_top`)

```
 in_pix/in_valid ──► rlg_encrypt ──► [reg] ── enc_pix/enc_valid ──► rlg_decrypt ──► [reg] ── dec_pix/dec_valid
                       ▲ key                                          ▲ key
              CA_tx / LFSR_tx (key_sel)                      CA_rx / LFSR_rx (registered key_sel)
```

- **Throughput and latency.** The top takes one pixel per clock when
  `in_valid` is high. `enc_pix` appears 1 cycle later and `dec_pix` 2 cycles
  later. The valid signals follow the same timing. Gaps in `in_valid` are
  allowed.
- **Key stream.** Each side has its own CA and LFSR. Every valid pixel steps
  both generators on that side. `key_sel` picks the key for the pixel
  presented with it: 0 selects the CA, 1 the LFSR. It may change from pixel
  to pixel.
- **Seeding.** `seed_load` loads `ca_seed` and `lfsr_seed` into both
  generators. A pixel presented in the same cycle still uses the key from
  before the load.
- **Keeping the receiver in step.** The receiver's generators get every load
  and every step one cycle after the transmitter's, along with the
  ciphertext they belong to. So the receiver always regenerates exactly the
  key the transmitter used. Nothing but the ciphertext stream, its valid bit
  and the registered control crosses from transmitter to receiver.
- **Reset.** Reset is asynchronous and active low. The CA resets to 0001 and
  the LFSR to 0000.

The two networks and the two generators follow the design. The following
are this design's own choices: the valid/seed interface, the one-step-per-
pixel key schedule, the output registers, the key source select, and a
mirrored receiver in place of a single shared key generator.

## Files

- `rtl/rlgcd_pkg.sv`: shared types (`pixel_t`, `key_t`, `key_src_e`) and widths.
- `rtl/scl_gate.sv`, `toffoli_gate.sv`, `fredkin_gate.sv`, `feynman_gate.sv`, `xor_key_gate.sv`: the gate library.
- `rtl/rlg_encrypt.sv`, `rlg_decrypt.sv`: the two networks.
- `rtl/ca_keygen.sv`, `lfsr_keygen.sv`: the key generators.
- `rtl/rlgcd_top.sv`: the streaming transmitter/receiver.
- `tb/tb_*.sv`: a self-checking testbench for each module. `tb/tb_rlgcd_ref_pkg.sv`
  holds reference models written independently of the RTL.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M`. Each has a watchdog.

- **Gates.** Exhaustive over all inputs. Each test also checks that the gate
  is its own inverse.
- **Networks.** All 256 pixels × 16 keys are checked against the reference
  model. The encryption test also checks that each key gives a permutation.
  The decryption test also checks that a wrong key fails.
- **Key generators.** Random step/load sequences are checked against the
  reference. The cycle length from every seed, the fixed points and the
  LFSR lock-up state are checked too.
- **Top.** `tb_rlgcd_top` streams a generated 64 × 64 image (4096 pixels)
  through the top at its default parameters. It adds random idle cycles,
  random key-source switching and random reseeds, some of them in the same
  cycle as a pixel. It checks every ciphertext and latency against the
  models, and it checks that every pixel comes back out unchanged. It
  reports how often each of these events occurred, and it fails if any
  never did.

Every testbench was also run against a deliberately broken copy of its
module, and each one reported failures.

To simulate with Verilator, for example the end-to-end test:

```
verilator --binary --timing -y rtl -y tb rtl/rlgcd_pkg.sv tb/tb_rlgcd_ref_pkg.sv \
    tb/tb_rlgcd_top.sv --top-module tb_rlgcd_top
obj_dir/Vtb_rlgcd_top
```

Replace `tb_rlgcd_top` with any other `tb_*` module to run that block's
test.

## Where this departs from, or goes beyond, the described scheme

- **Gate wiring.** The port-level wiring of the networks is inferred from
  the line positions in the block diagrams (see above).
- **Key width and sharing.** The key is 4 bits and both nibbles share it.
  This matches the four-cell automaton and the four-line XOR gates. The
  width of the key is not stated anywhere.
- **CA boundary.** The right-hand boundary of the CA is assumed to be 0,
  like the left one.
- **LFSR role.** The LFSR is described as the baseline that the CA improves
  on. It is included as a selectable second key source. Its taps are kept
  as drawn, even though they do not give a maximal-length sequence.
- **Not in the RTL.** LSB watermark embedding and extraction (third and
  fourth LSB, blue channel for colour images, threshold-based detection)
  and all image/text-file handling are software steps. They are not
  implemented here.
- **No speed or power targets.** No clock rate, area or power target is
  given, and none is claimed for this RTL.
