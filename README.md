# Working-zone encoding of an off-chip address bus

Driving an off-chip address bus costs far more energy per transition than any
on-chip node, because each pin carries pad and board capacitance roughly a
thousand times that of an internal wire. This design cuts the number of
transitions on the address bus. It adds a small encoder on the processor side
and a matching decoder on the memory side.

The idea is that programs work in a few *working zones* at a time, for example
two arrays they are walking through. Each side keeps one register per zone,
called a **Pref**. A Pref holds the last address used in its zone. When a new
address lies close to one of the Prefs, the full address is not sent. The
encoder sends only the zone number and the small difference (the *offset*).
The offset goes out in a *modified one-hot* code, so a new offset changes
exactly one wire and a repeated offset changes none. Only an address that is
near no Pref goes out in full.

On the two memory-intensive programs that come with it (full-search motion
estimation and quicksort), this RTL puts about a third as many transitions on
the bus as a plain binary address bus. The measurements are
[below](#measured-bus-activity).

## The bus

With an N-bit address and B Prefs, the bus has m = N + log2(B) + 1 wires. At
the default N = 16 and B = 2 that is 18 wires:

| field       | wires   | meaning |
|-------------|---------|---------|
| `word`      | N       | a full address, or the modified one-hot offset |
| `ident`     | log2(B) | which Pref (zone) the offset refers to |
| `Pref_miss` | 1       | 1: `word` is a full address; 0: `word` is an offset |

A separate `bus_valid` strobe marks the cycles that carry a reference. It is
the ordinary access strobe that any memory bus has, and it is not counted in
m. Between references the bus holds its last value, so idle cycles toggle
nothing.

For each reference the encoder does one of three things:

| case | condition | `Pref_miss` | `ident` | `word` | wires that toggle in `word` |
|------|-----------|-------------|---------|--------|-----------------------------|
| hit, same offset | addr − Pref_r is in −N/2 … N/2−1 and equals the last offset of zone r | 0 | r | previous word, resent | 0 |
| hit, new offset  | addr − Pref_r is in −N/2 … N/2−1 and differs from it | 0 | r | previous word XOR one-hot(offset) | 1 |
| miss             | no Pref is that close | 1 | previous ident, resent | the address | about N/2 |

In every case the Pref used is loaded with the address. On a miss, the
least-recently-used Pref is replaced. The zone's stored offset is kept on a
miss, because there is no offset to store.

## Modified one-hot offsets

This is the least obvious part of the design. A plain one-hot code for the
offset would need two transitions for every new offset (the old 1 falls, the
new 1 rises). It would need about N/2 transitions right after a full address.
Instead, the encoder XORs the one-hot vector into the word it sent last. The
decoder XORs the received word with the one it received last. That gives back
the one-hot vector, or all zeros.

- A nonzero result has one bit set, and its position is the offset.
- A zero result means that the sender repeated its previous word. The decoder
  reads this as "same offset as the last time this zone was used" and takes
  the offset from its own copy of `prev_off[ident]`.

The encoder resends the previous word whenever the offset equals the last
offset *of the same zone*, not of the previous reference. An interleaved
stride pattern such as A[i], B[i], A[i+1], B[i+1], … therefore costs only the
`ident` toggle per reference.

Offset v maps to bit position `v mod N`: 0 → bit 0, 3 → bit 3, −1 → bit N−1,
−N/2 → bit N/2. The one-hot field does not have to span the whole word. The
`OFF_W` parameter sets k = 2^OFF_W. Only the low k word wires then carry
offsets, and the range shrinks to −k/2 … k/2−1. The default is k = N.

A worked example on a 6-wire word, starting from 000000:

| offset | one-hot | sent (modified) | toggles |
|--------|---------|-----------------|---------|
| 1      | 000010  | 000010          | –       |
| 3      | 001000  | 001010          | 1       |
| 2      | 000100  | 001110          | 1       |
| 2      | 000100  | 001010          | 1       |
| 0      | 000001  | 001011          | 1       |

(This row-by-row example applies the code without the "resend on same offset"
rule. With the rule, the fourth row would resend 001110 and toggle nothing.)

## Encoder (`wze_encoder`)

Each zone is one `wze_enc_pref` slot. A slot holds the zone's Pref register,
a subtractor `addr − Pref`, a range check and the `prev_off` register, with an
equality comparator against it. The range check is "all bits above the offset
field equal its sign bit". All slots compare in parallel, so the search is
fully associative. The encoder then does the following:

- It picks the lowest-numbered hitting slot, if several hit. That can happen
  when two Prefs are close together, for example right after reset.
- It forms `Pref_miss` as the NOR of the hits.
- It muxes the chosen slot's offset into `wze_moh_encode`.
- It chooses between the previous word, the modified one-hot word and the
  full address.
- It latches `word`, `ident` and `Pref_miss` into the output registers that
  drive the pins. These registers *are* `prev_sent` and `prev_ident`.

`wze_lru` picks the replacement victim. Each Pref has an age from 0 to B−1,
and a use makes that Pref the youngest. For B = 2 this is one bit. Hits and
misses both count as uses.

Timing: a request (`req_valid`, `req_addr`) is taken every cycle. The bus
fields change one clock later.

## Decoder (`wze_decoder`)

The decoder keeps its own copies of the Prefs, the per-zone `prev_off`, the
last received word and an LRU state. It updates all of them with exactly the
rules the encoder uses, so the two sides never need to talk about their state:

- `Pref_miss = 1`: the address is `word`. It replaces the LRU Pref.
- `Pref_miss = 0`: the address is `Pref[ident] + offset`, modulo 2^N. The
  offset is either retrieved by `wze_moh_retrieve` or taken from
  `prev_off[ident]` when the XOR is zero. `Pref[ident]` is updated. So is
  `prev_off[ident]`, when the offset is new.

The decoded address is combinational from the bus, so the address reaches the
memory side in the same cycle as the bus value. End to end (`wze_top`), an
address comes out exactly one clock after it goes in.

`protocol_err` rises when a hit changes more than one word wire, or a wire
above the k one-hot wires. A matching encoder never produces either, and
`wze_top` asserts that it never happens.

**Keeping the two sides in step.** Correct decoding depends on four
conditions:

- Both sides reset together. Every Pref, `prev_off`, word and ident register
  resets to 0.
- Both sides use the same N, B and OFF_W.
- Both sides see the same sequence of references. `bus_valid` must not drop
  a reference.
- Both sides compute addresses modulo 2^N, so offsets can cross address 0.

If either side is reset alone, the two must be reset again together.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `N`       | 16 | address width and width of `word` |
| `B`       | 2  | number of Prefs (working zones) |
| `OFF_W`   | log2(N) = 4 | k = 2^OFF_W one-hot wires, offsets −k/2 … k/2−1 |
| `ID_W`    | log2(B) = 1 | width of `ident`; leave at its default |

Two limits apply:

- N and k must be powers of two.
- B is meant to be small. The published evaluation found two Prefs enough for
  its programs, and expected at most four to pay off.

The defaults live in `wze_pkg`.

At the defaults, synthesis gives 61 flip-flops in the encoder:

- 2 × (16-bit Pref + 4-bit `prev_off`) = 40
- the 18 bus registers
- the strobe
- 2 bits of LRU state

The decoder has 58 flip-flops. For comparison, the method's own estimate for
the encoder is about 700 gates and 50 flip-flops.

## Measured bus activity

Both programs run at full size on `wze_top` with default parameters, one
reference per clock. Every decoded address is checked against the original.
"Transitions" counts toggling wires per reference: 16 address wires for the
plain bus, 18 wires for the encoded bus. The published figures come from the
description of the method.

| program | references | plain tr/ref | encoded tr/ref | ratio | published: refs, plain, encoded, ratio |
|---------|-----------:|-------------:|---------------:|------:|----------------------------|
| motion estimation, full search, 128×128 frames, 8×8 blocks, ±4 window | 2.10 M | 4.78 | 1.65 | 0.35 | 2.0 M, 4.8, 2.5, 0.53 |
| quicksort, 64 K random bytes filling the address space | 1.94 M | 3.93 | 1.29 | 0.33 | 1.9 M, 4.1, 1.4, 0.33 |

Quicksort matches the published numbers closely (7.61 M plain transitions
against 7.6 M published).

For motion estimation, the plain bus matches, but the encoded bus here does
better than published. The source of the gap is not known. The published
program is only outlined, and some of its details are this testbench's
choices:

- pixels outside the frame are clamped to the edge;
- the frames are stored row-major;
- MV is written on every improvement.

The published energy estimate for the encoder logic itself is under 0.35
I/O-transition equivalents per reference. The method's authors also evaluate a
register-blocked variant of motion estimation (the "QR" algorithm). It is not
reproduced here, because that algorithm is not specified in enough detail.

## What is not modelled

- **Pad drivers and receivers.** The bus fields are top-level ports.
- **The processor and the memory.** `req_*` and `mem_*` stand for the
  processor's address output and the memory's address input.
- **Bus-invert coding of the full address on a miss.** It was considered for
  the method and found not to pay for its extra wire.
- **Positive-only or negative-only offset ranges, and software-managed
  Prefs.** These are mentioned as options only.

## Choices made in this RTL

Each file's header comment says which of its details follow the published
method and which are this design's own choices. The main choices:

- the `bus_valid` strobe, and holding the bus while idle;
- the offset-to-bit mapping `v mod k`;
- lowest-index priority when several Prefs hit;
- the LRU encoding and reset order;
- all-zero reset on both sides;
- modulo-2^N address arithmetic;
- a combinational decoder output;
- the `protocol_err` check.

## Files

| file | contents |
|------|----------|
| `rtl/wze_pkg.sv` | default sizes and small helpers |
| `rtl/wze_moh_encode.sv` | one-hot of the offset XOR previous word |
| `rtl/wze_moh_retrieve.sv` | XOR with previous word, offset from the single set bit |
| `rtl/wze_enc_pref.sv` | one encoder zone: Pref, subtract, range check, prev_off, compare |
| `rtl/wze_lru.sv` | LRU replacement state |
| `rtl/wze_encoder.sv` | sender: all zones, selection, bus latch |
| `rtl/wze_decoder.sv` | receiver |
| `rtl/wze_top.sv` | encoder → bus → decoder |
| `tb/wze_ref_pkg.sv` | integer reference model of the encoding, and a generator of address streams with locality |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_wze_motion_est` and `tb_wze_quicksort` |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops. To run
one with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_wze_top \
  -y rtl -y tb +libext+.sv rtl/wze_pkg.sv tb/wze_ref_pkg.sv tb/tb_wze_top.sv
./obj_dir/Vtb_wze_top
```

To run another testbench, replace `tb_wze_top` with its name. Each workload
bench simulates about two million cycles in a few seconds.

`tb_wze_top` runs the default-size design end to end on a random stream with
locality. It counts each mechanism, and fails if one never occurs:

- a Pref miss;
- a repeated offset;
- a new negative offset and a new positive offset;
- replacement of each Pref;
- an ident change;
- a double hit;
- wrap-around through address 0;
- an idle cycle.
