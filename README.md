# Rate-1/2 convolutional encoder and hard-decision Viterbi decoder

A noisy channel flips bits. This design adds redundancy at the transmitter,
so the receiver can correct errors without asking for the data again. The
encoder turns each 6-bit message into a 12-bit code word using a rate-1/2
convolutional code with constraint length 3. The decoder runs the Viterbi
algorithm on the received 12 bits. It returns the 6-bit message whose code
word is nearest to what arrived, counting distance in flipped bits
(Hamming distance).

Both ends work on one block at a time. A reset starts a block. The input
word must be held stable until the result is out, much as a switch or a
debug console would hold it on a board.

## The code

The encoder keeps the last two message bits as its state `{a, b}`. `a` is
the newer bit, and the state starts at `00`. For each new bit `u` it sends
two bits and then moves to the state `{u, a}`:

    o1 = u xor a xor b        (G1 = 1 + D + D^2, mask 3'b111)
    o2 =     a xor b          (G2 =     D + D^2, mask 3'b011)

`o1` is sent first. The generator masks are parameters (`G1`, `G2`). Bit 2
of a mask taps `u`, bit 1 taps `a` and bit 0 taps `b`.

| state | u=0: next / out | u=1: next / out |
|-------|-----------------|-----------------|
| 00    | 00 / 00         | 10 / 10         |
| 10    | 01 / 11         | 11 / 01         |
| 01    | 00 / 11         | 10 / 01         |
| 11    | 01 / 00         | 11 / 10         |

Worked example: message `100100` (0x24) gives code word
`10 11 11 10 11 11` (0xBEF). Decoding 0xBEF gives 0x24 back.

The first message bit is `ip[5]`, and its code symbol lands in
`op[11:10]`. No tail bits are added, so 6 bits give exactly 12. This has a
cost: the trellis is not driven back to a known state at the end, so the
last message bits are poorly protected (see *What the decoder can correct*).

The second generator is a deliberate choice. The more common textbook
version of this code uses `1 + D^2`. This design uses `D + D^2` because
that is what reproduces the state table above and the worked example
0x24 -> 0xBEF. To get the textbook code, set `G2 = 3'b101`. The trellis
example test runs the decoder that way.

## Encoder: `convolutional_encoder`

Four stages, each a module:

| stage       | job |
|-------------|-----|
| `rs`        | reads `ip` one bit per clock, MSB first, with a valid strobe |
| `sd`        | the state machine above: one 2-bit symbol per valid bit, registered |
| `opshifter` | shifts each symbol in at the low end, two bits at a time. `flag` is high until the 6th symbol is in |
| `fde`       | output register. Its enable is `~flag`, so `op` changes only once the word is complete |

Timing with reset released at cycle 0: `flag` falls at cycle L+2 = 8, and
`op` is valid at cycle L+3 = 9. `op` reads 0 until then, and it holds the
word until the next reset.

## Decoder: `viterbi_decoder` = `bmu` + `acs` (which contains `traceback`)

Each trellis step is one received 2-bit symbol, and the decoder handles one
step per clock.

**Branch metric unit (`bmu`).** This unit steps through `in1`, starting
with the top two bits. For each step it outputs eight 2-bit metrics
`d[0..7]`, one per trellis branch. Branch `i = 2p + u` leaves state `p` on
input `u`. Its metric is the Hamming distance (0, 1 or 2) between the
received symbol and the symbol that branch would send. `bm_valid` marks each
of the 6 metric sets, and `last_state` marks the final one.

**Add-compare-select (`acs`).** This unit keeps one path metric per state:
the distance of the best path found so far that ends in that state. Only
two states can lead into state `s = {a, b}`: `p0 = {b, 0}` and
`p1 = {b, 1}`, both on input `a`. Each step, for all four states in
parallel, it:

1. adds each predecessor's metric to that branch's metric;
2. keeps the smaller sum, taking `p0` on a tie;
3. stores one decision bit per state (1 = `p1` won).

Those 6 x 4 decision bits are the survivor memory, held in flip-flops. The
metrics start at 0 for state `00` and at 2L+1 for the other states. 2L+1 is
more than any real path can reach, so only paths that start from `00` can
win. The metric width, `clog2(4L+2)` = 5 bits, is large enough that no sum
can overflow within a block, so the metrics never need rescaling.

**Choosing the end state.** Nothing forces the encoder into a known final
state, so after the last step `acs` takes the state with the smallest
metric. On a tie it takes the lowest state number.

**Traceback (`traceback`).** This unit walks the surviving path backwards,
one step per clock. In state `{a, b}` after step `t`:

- the decoded bit of step `t` is `a`;
- the state before step `t` was `{b, surv[t][{a,b}]}`.

The bit of step `t` is written to `do1[L-1-t]`, so `do1` fills from its
low end and ends with the first message bit in the MSB. `done` rises after
step 0.

Timing with reset released at cycle 0: the metric set for step `t` appears
at cycle `t+1`, and `acs` takes it at cycle `t+2`. Traceback starts at
cycle L+2 and `done` rises at cycle 2L+2 = 14.

Result: `do1` is a true maximum-likelihood decision. Among all 64 messages
that start from state `00`, no code word is closer to `in1` than that of
`do1`. When several are equally close, the tie rules above decide which one
is returned.

## What the decoder can correct

Without a tail, the two message bits sent last are checked by only a few
code bits. The last message bit affects only `o1` of the last symbol, so
two code words can differ in just one bit. Across all 64 messages and all
12 single-bit error positions (768 cases):

- An error in any of the first six code bits, or in the eighth, has a
  unique nearest code word: the one that was sent. So the error is always
  corrected.
- An error in the 7th, 9th, 10th or 12th code bit leaves a tie between the
  sent message and another one.
- An error in the 11th bit (the first bit of the last symbol) always turns
  the word into the code word of another message. It cannot be corrected.

Longer blocks, or two zero tail bits, would fix this. Both are changes to
how the design is used, not to its RTL. `L` is a parameter, and a tail can
be added by sending two zeros at the end of the message.

## System top: `conv_viterbi_system`

The top holds the encoder and the decoder. The channel between them is not
logic, so the top brings out both of its ends: the encoder's `code_out`,
and the decoder's input `code_in`. The decoder is held in reset until one
cycle after the encoder's `flag` falls. At that point the code word is in
the encoder's output register, and the decoder starts on `code_in`. With
reset released at cycle 0, `code_out` is valid at cycle 9 and `dec_done`
rises at cycle 23 (3L+5).

Ports: `clk`, `rst` (synchronous, active high), `enc_in[L-1:0]`,
`code_out[2L-1:0]`, `enc_flag`, `code_in[2L-1:0]`, `dec_out[L-1:0]`,
`dec_done`. Parameters: `L` (6), `G1` (3'b111), `G2` (3'b011). Sizes after
coarse synthesis: 112 flip-flop bits and about 135 word-level cells.

## Where this departs from, or adds to, the reference design

- **Generators:** `D + D^2` for the second output, as in its state table and
  measured results, not `1 + D^2`. See *The code*.
- **Word layout:** the first symbol is in the MSBs, which the worked example
  requires. In Verilog terms the symbol register therefore shifts left.
- **Strobes:** valid strobes between stages (`q_valid`, `op_valid`,
  `bm_valid`) and the decoder's `done` output are added.
- **Resets:** a synchronous reset on the output register, so it reads 0
  before the word is ready.
- **Decoder details not specified there:** the branch numbering, the tie
  rules, the initial metrics, the choice of end state, the metric width and
  all cycle timing.
- **Metrics:** eight per step, one per branch, rather than four, one per
  distinct symbol.
- **Debug cores:** the on-chip logic analyser and virtual I/O cores used to
  drive and watch the ports on an FPGA board are not included. The
  testbenches take their place.

## Files

`rtl/`:

- `conv_code_pkg.sv`: constants (`MSG_LEN`, `CODE_LEN`, `K`, default
  generators), types, and the symbol and distance functions.
- `rs.sv`, `sd.sv`, `opshifter.sv`, `fde.sv`, `convolutional_encoder.sv`
- `bmu.sv`, `acs.sv`, `traceback.sv`, `viterbi_decoder.sv`
- `conv_viterbi_system.sv`

`tb/`: one self-checking testbench per module and for the package, `tb_<name>.sv`, plus:

- `tb_ref_pkg.sv`: the reference models. The encoder reference looks the
  symbol up in a hand-written table. The decoder reference searches all
  messages for the nearest code word.
- `tb_trellis_example.sv`: a 5-bit block with `G2 = 1 + D^2`. It sends
  11011, receives `11 01 01 10 01` (one error), and checks that the decoder
  returns 11011.

What the testbenches check:

- The encoder and top tests run all 64 messages.
- The decoder tests add random one- to four-bit errors. They check that the
  result is at minimum distance, and that it is the unique nearest message
  when there is one.
- All of them check the cycle counts given above.
- The top test also counts how often each mechanism occurred and fails if
  one never did: clean decodes, corrected errors, uncorrectable patterns,
  both ACS outcomes, and a traceback from a non-zero end state.

Each testbench ends with the line
`TB_RESULT checks=<n> failures=<m>`.

## Simulating

With Verilator 5, from the top of the tree:

    verilator --binary --timing --top-module tb_conv_viterbi_system \
      -y rtl -y tb +libext+.sv rtl/conv_code_pkg.sv tb/tb_ref_pkg.sv \
      tb/tb_conv_viterbi_system.sv -o sim
    ./obj_dir/sim

For another testbench, change the module name and the file. Packages must
be listed first; Verilator finds the rest via `-y`. Every test runs in well
under a second.

To change the code or the block length, override `L`, `G1` and `G2` on the
top. All modules size themselves from these. `tb_ref_pkg` models only the
default code, but `tb_trellis_example` shows how to check another one.
