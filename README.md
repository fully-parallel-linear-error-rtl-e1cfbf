# Fully parallel linear block encoder and syndrome decoder

Error-detecting codes for links and memories are usually computed serially.
A CRC is a polynomial division done by a linear-feedback shift register, one
bit per clock. This design computes a systematic linear block code
**in one step**. Every parity bit is a fixed Boolean function of the message
bits: an AND of the message with one column of a constant matrix, followed by
an XOR tree. All parity bits are formed side by side. Apart from the input
register, the encoder and the decoder are pure combinational logic. Their
depth is one AND level plus `ceil(log2 k)` XOR levels, and a whole word is
coded or checked per clock.

The code is not limited to cyclic (CRC) codes. A cyclic code of length n has
only `n-k-1` free generator coefficients. A general systematic code has all
`(n-k)·k` entries of its parity matrix free. Those entries can be chosen, for
example by a binary optimisation over all error patterns, to detect as many
errors as possible for a given n and k. The RTL takes the matrix as a
parameter, so any such code drops in unchanged.

## The code: one matrix

A message `m = (m_0 … m_{k-1})` of k bits gets `n-k` parity bits:

    b_j = (m_0 & p(0,j)) ^ (m_1 & p(1,j)) ^ … ^ (m_{k-1} & p(k-1,j))      j = 0 … n-k-1

The coded word is `c = (b_0 … b_{n-k-1}, m_0 … m_{k-1})`. This equals `m·G`
with the generator `G = (P | I_k)`. The message travels unchanged, and the
parities are placed in front of it.

The `k × (n-k)` parity matrix `P` is the only thing that defines the code.
`rtl/lbc_pkg.sv` holds three codes. Each one is declared with ascending
ranges `[0:k-1][0:n-k-1]`, so a literal reads like the matrix written on
paper: the first word is row 0, and its leftmost bit is `p(0,0)`.

| constant | (n,k) | rows of P | min. distance | detects all errors of |
|---|---|---|---|---|
| `P_7_4`  | (7,4)  | 110 011 111 101 | 3 | 1–2 bits |
| `P_8_4`  | (8,4)  | 0111 1011 1101 1110 | 4 | 1–3 bits |
| `P_16_8` | (16,8) | 00001111 00110011 01010101 01101010 10010110 10101011 11011111 11100111 | 5 | 1–4 bits (default) |

`P_7_4` is the (7,4) Hamming code, which is also the CRC of
`g(X) = 1 + X + X^3`. Its row i is `X^(3+i) mod g(X)`, with the coefficient
of `X^0` first. The last two columns of the table were checked by exhaustive
simulation (see *Verification*).

**Bit order on the ports.** Bit q of a vector port is element q of the
vector. So `c[n-k-1:0]` holds the parities, `c[n-1:n-k]` holds the message,
and `c[n-k+i] = m[i]`. If a word is printed with the highest bit first, an
8-bit message 01110010 of an (11,8) code appears as `01110010` followed by
the three parity bits.

## Encoder (`lbc_encoder`)

    m ──REG──┬──────────────────────────────────────────────► c[n-1:n-k]
             │   for each column j:
             └─► two-bus AND (m, P[.][j]) ─► XOR tree ─► b_j ─► c[n-k-1:0], b

* `lbc_reg` registers the k message bits. It loads on `in_valid` and carries
  a valid bit along.
* `lbc_parity_gen` holds one `lbc_two_bus_and` and one `lbc_xor_tree` per
  parity column.
* `lbc_xor_tree` is an explicit balanced tree. Level l pairs the nodes of
  level l-1, and an odd node at the end of a level moves up unchanged.

Because `P` is a constant, synthesis removes the AND gates. Each `b_j`
becomes an XOR of the message bits whose `p(i,j)` is 1. The default (16,8)
parity generator synthesises to 23 two-input XORs.

## Syndrome decoder (`lbc_decoder`)

The received word `r` is the coded word with some bits flipped:
`r = c ^ e`. The decoder registers the parity part `r[n-k-1:0]` and the
message part `r[n-1:n-k]` separately. It passes the message part through the
same parity generator as the encoder. A two-bus XOR then compares the result
with the received parities:

    s_j = r_j ^ (r_{n-k} & p(0,j)) ^ … ^ (r_{n-1} & p(k-1,j))      i.e.  s = r·H,  H = (I_{n-k} ; P)

Because the code is linear, `s` depends only on the error: `s = e·H`. It is
zero for an error-free word. It is non-zero for every error that is not
itself a codeword. Hence a code of minimum distance d detects all errors of
up to d-1 bits. `err` is the OR of the syndrome bits. The decoder only
detects errors. It does not look up an error pattern from the syndrome, so it
corrects nothing.

## The link (`lbc_top`)

    m ─► encoder ─► c ─► (XOR e) ─► r ─► decoder ─► s, err

The top chains encoder and decoder. Between them it places a two-bus XOR
that flips the bits of `c` selected by the error vector `e`. That XOR models
the channel, and `e` serves as a fault-injection input; tie it to 0 for a
clean link. `e` is applied in the same cycle as its message. The top delays
it by the encoder's latency so that it meets the right coded word.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid` | in | 1 | `m` and `e` valid |
| `m` | in | K | message |
| `e` | in | N | error vector |
| `enc_valid` | out | 1 | `c`, `r` valid |
| `c`, `r` | out | N | coded word; received word `c ^ e` |
| `dec_valid` | out | 1 | `s`, `err` valid |
| `s` | out | N-K | syndrome |
| `err` | out | 1 | `s != 0` |

**Timing.** With `REGISTERED = 1` (the default), `c`, `r` and `enc_valid`
come one clock after `m`/`in_valid`. `s`, `err` and `dec_valid` come two
clocks after. Each stage takes one word per clock, and a word is held while
`in_valid` is low. With `REGISTERED = 0`, every register becomes a wire, and
the encoder, the decoder and the whole link are combinational ("zero clock
delay").

**Parameters** (all modules): `N`, `K`, `P` (type `logic [0:K-1][0:N-K-1]`)
and `REGISTERED`. To use another code, pass its matrix:

```systemverilog
lbc_top #(.N(8), .K(4), .P(lbc_pkg::P_8_4)) u_link (...);
```

## How this relates to the original description

This design follows the original description in:

* the Boolean formulation of encoder and decoder;
* the circuit structure: input register, one two-bus AND and one XOR tree per
  parity bit, and a decoder that reuses the encoder circuit plus a two-bus
  XOR;
* the three sample codes and their detection limits.

The following are this design's own choices:

* **Input registers are optional.** Registers sit on the inputs as in the
  original circuit drawings. The description also calls the circuit a
  zero-clock-delay solution. `REGISTERED` gives both forms.
* **Added interface signals.** The valid bits, the load enable, the
  asynchronous reset, the `c` output of the encoder, the `err` flag and the
  alignment of `e` in the top are additions.
* **Fixed code at build time.** `P` is a build-time parameter. Changing the
  code at run time is not supported.
* **No matrix search.** The optimisation that chooses `P` is a design-time
  calculation, not hardware, and is not included. Only its published results
  (the three matrices) are.
* **No correction.** The source discusses how many errors a code could
  correct. It gives no correcting circuit, and none is built.
* **No serial CRC.** The shift-register implementation is the serial
  baseline that this design replaces. It is not included.
* **No timing claim.** The source reports turn-around times below 10 ns on an
  FPGA. RTL simulation does not model delays, so that figure is not
  reproduced here.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. Expected values come from
`tb/tb_lbc_ref_pkg.sv`. That package keeps its own copy of the three
matrices as strings and works out parities and syndromes with plain loops.

| testbench | what it shows |
|---|---|
| `tb_lbc_two_bus_and`, `tb_lbc_two_bus_xor`, `tb_lbc_xor_tree` | gate networks; exhaustive at small widths, random at large widths |
| `tb_lbc_reg` | load, hold, reset and the bypassed form |
| `tb_lbc_parity_gen` | all messages of all three codes; (7,4) also against CRC division by `g(X)` |
| `tb_lbc_encoder` | one-clock latency, valid, hold; zero-delay (8,4) encoder |
| `tb_lbc_decoder` | all 2^n error vectors of each code; the lightest undetected error has weight 3, 4 and 5 for (7,4), (8,4) and (16,8); registered latency |
| `tb_lbc_top` | default (16,8) link end to end with random traffic and gaps; latencies of 1 and 2 clocks; counts clean words, detected errors of each weight 1–4, detected heavier errors, undetected codeword errors and idle cycles, and fails if any of them never occurs |
| `tb_lbc_workloads` | all three codes through `lbc_top`: every message (64 random messages for (16,8)) against every error up to the detection limit; (16,8) in zero-delay form |

The testbenches run in well under a minute in total. To run one with
Verilator:

```sh
verilator --binary --timing --assert -Irtl -Itb \
    rtl/lbc_pkg.sv tb/tb_lbc_ref_pkg.sv tb/tb_lbc_top.sv --top-module tb_lbc_top
./obj_dir/Vtb_lbc_top
```

Other files are found through `-Irtl`/`-Itb`. The package files must be
listed first.

Lint notes: Verilator reports `ASCRANGE` for the matrix type, whose
ascending ranges are deliberate. It reports `UNUSEDPARAM` for the matrices a
given build does not use. It reports `PINCONNECTEMPTY` in `lbc_top`, where
the encoder's separate parity output is left open because the same bits are
part of `c`.
