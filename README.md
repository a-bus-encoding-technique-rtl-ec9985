# Dual XOR/XNOR bus code for crosstalk-limited interconnect

On a long on-chip bus, the delay of a wire depends on what its neighbours do
in the same cycle. When two adjacent wires switch in opposite directions, the
coupling capacitance between them is charged through twice the voltage swing.
That transition arrives late (or early, for the other wire), and the worst
such pair sets the bus cycle. This design recodes each data word before it
enters the bus so that such opposite-direction switching happens less often.
The receiver undoes the code.

The code is simple. Each encoded bit is the data bit XORed or XNORed with its
already-encoded right neighbour. A 4-bit group of data bits picks XOR or XNOR
by looking at its own contents. One extra wire per group tells the receiver
which operation was used. An n-bit bus therefore needs n + n/4 wires: 80 wires
for the default 64-bit word.

## The code

Number the bits of an n-bit word D as positions 1 (leftmost, MSB) to n
(rightmost, LSB). Cut the word into subsets of four positions, starting at the
right. In the RTL, position P is vector bit `N-P`, and subset k holds bits
`4k+3..4k`.

**Choosing the operation of a subset** (`dc_subset_mode`):

| subset contents                                  | operation | control bit |
|--------------------------------------------------|-----------|-------------|
| more zeroes than ones (0 or 1 one)               | XOR       | 1           |
| more ones than zeroes (3 or 4 ones)              | XNOR      | 0           |
| two of each, 2 or 3 neighbour changes (0101, 1010, 1001, 0110) | XOR | 1 |
| two of each, 1 neighbour change (0011, 1100)     | XNOR      | 0           |

A "neighbour change" is a pair of adjacent bits inside the subset that
differ. A subset has three such pairs.

**Encoding** (`dc_encoder`). Bits are processed from right to left:

    X(n) = D(n)
    X(P) = D(P) XOR  X(P+1)   if the subset holding P has control bit 1
    X(P) = D(P) XNOR X(P+1)   if the subset holding P has control bit 0

The chain runs through the whole word. The rightmost bit of a subset is
combined with the encoded leftmost bit of the subset to its right. Only bit n
is sent unchanged.

**Decoding** (`dc_decoder`) inverts each step locally:

    D(n) = X(n)
    D(P) = X(P) XOR  X(P+1)   (control bit 1)
    D(P) = X(P) XNOR X(P+1)   (control bit 0)

### Worked example, 8 bits

D = `0000 1101`. The right subset `1101` has three ones, so it uses XNOR with
control bit 0. The left subset `0000` uses XOR with control bit 1.

- Right subset, from the right: X = 1 (copied), then XNOR(0,1) = 0,
  XNOR(1,0) = 0, XNOR(1,0) = 0. This gives `0001`.
- Left subset: the chain enters with 0. Every XOR with 0 gives 0, so the
  result is `0000`.

The wires carry X = `0000 0001` and control bits `{1,0}`.

The four reference words used in verification, one each of 8, 16, 32 and 64
bits, are in `tb/tb_table1.sv`. For example, 16-bit
`10110100 00101110` encodes to `11000011 11100000`, with control bits `0110`.

### Why the chain must cross subset boundaries

The rules can also be read as restarting the chain in every subset, with each
subset's rightmost bit copied. That reading gives a different code and fails
on the 16-, 32- and 64-bit reference words. The whole-word chain reproduces
all four exactly. `tb_dc_encoder` would catch a change to the restarting form.

One consequence is that the encoder is a ripple chain N-1 gates long, while
every decoder output bit is a single gate. Because the first bit is copied,
`bus_o[0]` is `data_i[0]` and `data_o[0]` is `bus_i[0]`. These two are plain
wires by construction.

## Bus layout and the link

`dc_link` is the top level. It holds the encoder at the sending end and the
decoder at the receiving end. The wires in between are not part of it:

    data_i[N-1:0] --> dc_encoder --> bus_o[N+N/4-1:0]   ~~ wires ~~
    bus_i[N+N/4-1:0] --> dc_decoder --> data_o[N-1:0]

- `bus[N-1:0]` carries the encoded word X.
- `bus[N+k]` carries the control bit of subset k.

Connect `bus_i` to `bus_o` for an ideal wire. You can also place a wire
model, a register stage or a network link between them. Where the control
wires sit among the data wires is a free choice. This layout is an
assumption; a physical design could interleave them, for instance one control
wire next to each subset.

The whole link is combinational, with no clock, reset or handshake. The code
is memoryless: each word depends only on itself, not on the previous word.
Register the bus where the surrounding system needs it.

## Files

| file | contents |
|------|----------|
| `rtl/dc_pkg.sv` | `SUBSET_W = 4`, the `op_e` type (`OP_XNOR = 0`, `OP_XOR = 1`) |
| `rtl/dc_subset_mode.sv` | operation/control bit of one 4-bit subset |
| `rtl/dc_encoder.sv` | N-bit encoder, parameter `N` (default 64, multiple of 4) |
| `rtl/dc_decoder.sv` | N-bit decoder, parameter `N` |
| `rtl/dc_link.sv` | top: encoder, bus ports, decoder |
| `tb/dc_ref_pkg.sv` | reference encode/decode written in position numbering, plus a coupling-transition counter |
| `tb/tb_dc_subset_mode.sv` | all 16 subsets plus hand-worked cases |
| `tb/tb_dc_encoder.sv` | reference words at N = 8, 16, 32, 64, single-bit words, 8,000 random words |
| `tb/tb_dc_decoder.sv` | reference words decoded back, random code words, round trips |
| `tb/tb_dc_link.sv` | 10,000 words through the default 64-bit link, looped back |
| `tb/tb_table1.sv` | the four reference words on links of their own width, and zero-extended on the 64-bit link |

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
with a watchdog.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

    verilator --binary -y rtl -y tb +libext+.sv rtl/dc_pkg.sv tb/dc_ref_pkg.sv \
        tb/tb_dc_link.sv --top-module tb_dc_link
    ./obj_dir/Vtb_dc_link

Replace `tb_dc_link` with any other testbench name. Each run takes well under
a second.

`tb_dc_link` checks every wire of every word against the reference model. It
also checks that the received word equals the sent one. It counts how often
each of the four subset rules fired, and fails if one never fired. In a
typical run, of 160,000 subsets, about 50,000 go to each majority rule,
40,000 to tie/XOR and 20,000 to tie/XNOR.

As an indication of what the code is for, `tb_dc_link` also counts
neighbouring wires that switch in opposite directions between consecutive
words:

| random 64-bit words | plain 64-wire bus | coded 80-wire bus |
|---------------------|-------------------|-------------------|
| 10,000              | 78,599            | 49,790            |

This count is reported, not checked.

## What this RTL does not contain

- **The wires.** The bus is a distributed RLC line, with coupling capacitance
  and mutual inductance between neighbours. No values are available for it,
  so no delay model is included. The delay reduction the code is meant to
  achieve is about 13 % on an FPGA network-on-chip bus, measured on the four
  reference words. It cannot be reproduced in logic simulation. The count of
  opposite-direction transitions above is the closest logical proxy.
- **The network-on-chip** that carried the bus in those measurements. Its
  routers and protocol are not specified.

## Interpretations to be aware of

- **Tie rule.** On a 2-2 tie, "transitions" are taken as changes between
  neighbouring bits inside the subset. They could instead be read as changes
  against the previous word on the bus. The reference words contain only ties
  with 2 or 3 changes, so they cannot tell the two readings apart for 0011
  and 1100. To change the rule, edit the last two branches of
  `dc_subset_mode`, and `ref_mode` in `tb/dc_ref_pkg.sv`.
- **Chaining across subsets.** See above. This one is settled by the
  reference words.
- **Control-bit placement** on the bus and the purely combinational timing
  are choices of this design.
- **Widths.** `N` must be a multiple of 4. Elaboration stops with an error
  otherwise. The code was defined and evaluated at 8, 16, 32 and 64 bits.
  Words narrower than N can be sent zero-extended: the low bits of the code
  are unchanged, because the chain starts at the right.
