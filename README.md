# LZSS compression on a wrap systolic array

This is synthesizable SystemVerilog for a real-time LZSS compressor and its
decompressor. The encoder takes one 8-bit character per clock, whatever the
window size, and puts out a packed bit stream in 16-bit words. It finds
matches with a linear systolic array of small cells. Each cell compares the
passing character with eight dictionary characters. Instead of a length
counter and a magnitude comparator, each cell keeps a few state bits and
passes a 2-bit *group code* down the chain. The decoder is a second systolic
array that rebuilds one character per clock from the stream.

Default size: 256 encoding cells, each covering 8 distances, so the window
holds 2048 characters. The decoder has 1024 cells, each covering 2 distances,
for the same window.

## The coded stream

Each codeword starts with a flag bit:

| codeword | bits | layout (MSB first) |
|---|---|---|
| literal | 9 | `0`, character[7:0] |
| pointer | 17 | `1`, offset[10:0], length[4:0] |
| end of stream | 17 | `1`, 11'b0, 5'b0 |

- `offset` is the distance back minus one (0..2047).
- `length` is the match length (2..31).
- Codewords are packed back to back with no gaps. The first bit of the first
  codeword is the MSB of the first 16-bit word.
- The last word is zero-padded after the end codeword.

A single character is sent as a literal, because a 17-bit pointer costs about
as much as two 9-bit literals. Any longer match is sent as a pointer.

## Finding matches: the wrap array (`vlcell_array`, `enc_cell`)

Characters to be coded flow along the array in one direction. Once they have
passed the last cell they wrap around and flow back through the cells in the
other direction, as the dictionary:

```
 SIN -> [cell N-1] -> [cell N-2] -> ... -> [cell 0] --+
 (storage path, 4 registers per cell,                 |  wrap
  4 clocks per cell)                                  |
        [cell N-1] <- [cell N-2] <- ... <- [cell 0] <-+
 (dictionary path, 4 registers per cell, 1 clock per register)
```

- **Timing.** A character spends four clocks in each cell. The dictionary
  moves one register per clock. So the character and the dictionary pass
  each other at eight positions per cell.
- **Distances.** Each clock, cell *k* compares its current character with
  its own four dictionary registers (distances 8k+1..8k+4). It also compares
  it with the four registers of the cell before it (8k+5..8k+8). Comparator
  *i* of cell *k* therefore stands for offset field `8k+i`.
- **Extra registers.** The first stage has no cell before it. Four extra
  dictionary registers stand in for that missing neighbour.
- **Slots.** Every cell holds four characters in flight. Its four storage
  (S), group-code (L) and offset (O) registers are used round-robin under a
  shared 2-bit slot counter `ptr`. Only one register of each set is written
  per clock. Each clock the cell works on slot `S[ptr]`, the character that
  came in four clocks earlier. That slot's code and offset go to the next
  cell in the same slot four clocks later.
- **Cell count.** Adding cells widens the window but does not lengthen the
  clock period. It only adds latency, 4 clocks per cell.

## Group codes: the part to understand

Every character leaving a cell has a 2-bit group code:

| code | meaning |
|---|---|
| `00` | this character matched nothing |
| `01` | group **leader**: it starts a new match |
| `11` | group **member**: it extends the current match by one |

A run of one leader and its members becomes one codeword. The final group
code, after cell 0, splits the input into matches. The encoder never counts a
length inside the array.

### Nine paths per cell

Each cell has nine *paths*:

- the eight comparators `l0..l7`;
- the group code `lk` coming from the cell before it.

One state bit `q` per path records whether that path belongs to the group
being built. In each clock:

```
cont_i = q_i & l_i               (local path i still matches)
cont_k = q_k & (lk == 11)        (the cell before still extends its group)
L[1]   = OR(cont)                -> the group goes on
L[0]   = OR(l0..l7) | lk[0]      -> something matches
next q = L[1] ? cont : { lk[0], l7..l0 }
```

If the group goes on, only the paths that still match stay in it. If no path
goes on, every path that matches now starts a new group, and this character
becomes a leader. Each path's next-state logic is one AND-OR gate.

The offset sent with the code is taken from the new state, in this order:

1. the lowest local comparator in it (`8k+i`);
2. otherwise the offset from the cell before.

### Why every reported offset is valid

Take any path still in the group. It has matched every character since the
group's leader. For the path from the cell before, it has followed that
cell's own group since a leader at least as early.

So the offset reported with any member code is valid for the whole group so
far. This is why the preceding cell's path continues only on a member code
`11`. A leader code `01` from that cell means it has just restarted at a new
offset, which does not cover this cell's earlier characters.

### Example with two paths

A group that starts first keeps priority while it lasts. Suppose cell *k*
finds "group" at distance 4 and starts a group, which it passes on. The next
cell may find a longer match that starts later. It cannot take over while the
earlier group still extends. It starts its own group only when the earlier
one breaks.

The result is a greedy parse made from locally taken decisions. It is not
always the longest match over the whole window.

## From codes to codewords (`enc_monitor`)

The monitor sits after cell 0. It receives each character together with its
final code and offset. It keeps the group being collected ("pending"): the
leader character, the length so far and the newest offset.

- **Member code.** The pending length grows by one.
- **Any other code.** The pending group is closed and sent. If it holds more
  than one character it goes out as a pointer; a single character goes out as
  a literal. The new character then starts the next pending group.
- **Length limit.** A group that reaches length 31 is closed. Its next member
  starts a new group. This split is exact: the newest offset is valid back to
  the original leader, so it also covers the rest.
- **End of stream.** When the input ends, the monitor sends the pending group
  and then the end codeword, and raises `over`.

The monitor sends at most one codeword per clock.

## Packing and output (`enc_packet`, `enc_sender`)

`enc_packet` packs codewords into 16-bit words:

- A 48-bit left-aligned register holds the bits not yet sent; `res` counts
  them.
- A new codeword is left-aligned by its length, shifted right by `res` (the
  barrel shifter) and ORed in.
- When 16 bits are held, the top word goes to the output register.
- A 15-bit residue plus a 17-bit pointer makes 32 bits, two words. The second
  word goes out in the next clock (`out_again`).
- Pointers never come in adjacent clocks, so the register never overflows. An
  assertion checks this.

`enc_sender` drives `DATA`/`SEND` with the packet module's words. After
`over` it sends the residue as one last zero-padded word. `FINISH` is high
while encoding and falls when the last word has gone out.

## Decoding (`dec_frontend`, `dec_preproc`, `dec_array`, `dec_cell`)

- **`dec_frontend`** collects 16-bit words in a 48-bit bit register. It looks
  at the flag bit to know whether the next codeword has 9 or 17 bits, offers
  it once all its bits are present, and shifts it out when it is taken. It
  stops after the end codeword.
- **`dec_preproc`** turns each codeword into one *token* per output
  character: one for a literal (the character is already known), and
  `length` tokens carrying the offset for a pointer, counted by a down
  counter. It asks for the next codeword in the clock of the last token, so
  tokens follow each other without gaps.
- **`dec_array`** is a chain of cells. Tokens enter at cell N-1 and move
  towards cell 0 one cell per clock. Cell 0's result is written into its own
  S register, and decoded characters flow back through the S registers from
  cell 0 towards cell N-1. The two streams pass each other at two positions
  per clock, so cell *n* holds the characters at distances 2n+1 and 2n+2
  behind the token. `dec_cell` fills a waiting token from `S_n` when the
  offset field is `2n`, and from `S_{n+1}` when it is `2n+1`. Copies that
  overlap their own output (distance < length) work without special handling.
- **Stall.** The whole array moves only in clocks that have a token, so a
  slow input stream does not change the distances. After the end codeword
  the array is clocked N more times to drain it, and then `done` rises.

## Cascading encoders

Several `lzss_encoder` chips can be chained to widen the window. Wire them
like this:

- Each chip's `SOUT`/`A0`, `L0` and `OFF0` feed the next chip's `SINC`,
  `CODEIN` and `OFFIN`.
- Each chip's `DOUT` feeds the previous chip's `DIN`.
- `INDEX` is the number of the chip's cell 0 in the whole chain: the number
  of cells in the chips after it.
- The first chip runs with `MODE = 1` and takes `SIN`/`ACTI`. The others run
  with `MODE = 0` and take `SINC`.
- The last chip has `INDEX = 0` and holds the shortest distances. It wraps
  its own output back as its dictionary and gives the coded output.

Every chip registers its inputs once. `DOUT` is taken two dictionary
registers before the end of the chain, so that the neighbour's copy lines up
after its input register and its first dictionary register.

`tb_lzss_cascade` chains two 2-cell chips into a 32-character window. It
checks that the result equals a 4-cell encoder bit for bit.

A window larger than 2048 also needs a wider offset field (`OFF_W` in
`lzss_pkg`). That makes the pointer longer than 17 bits.

## Interfaces and timing

| module | in | out | latency |
|---|---|---|---|
| `lzss_encoder` | `sin` + `acti`, one character every clock, no gaps | `data`/`send`, `finish` | first codeword 4N+8 clocks after the first character |
| `vlcell_array` | `s_in` | `code_out`, `off_out`, `char_al` | 4N+4 clocks |
| `lzss_decoder` | `word`/`in_valid`/`in_ready` | `char_out`/`char_valid`, `done`, `err` | N+1 active clocks per token |

- All modules share one clock and an asynchronous active-low reset.
- While `acti` is high, the encoder needs a new character in every clock. A
  clock without one ends the stream.
- Reset between streams, because the dictionary is not cleared otherwise.
- The decoder gives one character per clock whenever its input keeps up.

## Parameters

| parameter | default | where |
|---|---|---|
| `N_CELLS` (encoder) | 256 | `lzss_encoder`, `vlcell_array` |
| `N_CELLS` (decoder) | 1024 | `lzss_decoder`, `dec_array` |
| `ENC_CELLS`, `DEC_CELLS` | 256, 4*ENC_CELLS | `lzss_top` |
| `OFF_W`, `LEN_W`, `CHAR_W` | 11, 5, 8 | `lzss_pkg` |

Smaller arrays work unchanged with the same 17-bit codewords; they just use
fewer offsets. Keep the decoder at four times the encoder's cell count.

## Where this departs from the original description

- **Window size.** It is taken as 2048 characters (256 cells x 8 distances,
  11-bit offset). The original also gives 512 in one place.
- **Length field and pointer rule.** The 5-bit length field, the
  pointer-for-length-2 rule, the length-31 split, the end codeword and the
  bit order are choices made here.
- **Preceding-cell path.** This path continues only on a member code, and
  leader priority is lowest-comparator first. Both are choices made here.
- **Offset timing.** The offset is formed in the same clock as the code. In
  the original it is formed one pipeline stage later.
- **Packet register.** The packet module uses one 48-bit register in place of
  separate W1/W2/W3 registers. It uses one clock for input and output.
- **Decoder frontend.** The frontend uses an occupancy count in place of the
  original three-step start-up enables. The decoder stalls when it has no
  token.
- **Cascade wiring.** How the cascade is wired, which `DOUT` tap is used and
  the rule that the `INDEX = 0` chip wraps are choices made here.
- **Not modelled.** I/O and power pads (128 pins) are left out.

## Simulating

The testbenches are in `tb/` and print `TB_RESULT checks=N failures=M` at
the end. For example, with plain Verilator:

```
verilator --binary --timing -Irtl -Itb rtl/lzss_pkg.sv tb/tb_lzss_pkg.sv \
    rtl/*.sv tb/tb_lzss_top.sv --top-module tb_lzss_top -o sim
./obj_dir/sim
```

Pass `rtl/lzss_pkg.sv` first and leave it out of the `rtl/*.sv` glob if
Verilator warns about the duplicate.

`tb_lzss_pkg` holds the shared checking pieces:

- a text generator (repeated words, long runs, random bytes);
- a timing-free model of the parse, which walks the cells for every
  character and applies the rules above;
- a packer;
- a software decoder.

The testbenches:

- **`tb_lzss_top`** runs the whole system at its default size. It sends 6000
  characters through the encoder and feeds the words to the decoder, which
  is offered input only two clocks in three. It checks that the decoder's
  output, and a software decode, both equal the input, and that the words
  match the model bit for bit. It also requires these to happen at least
  once: pointers, literals, overlapping copies, length-31 splits, offsets
  from inner cells, the two-word case, the residue flush and decoder stalls.
- **Block testbenches** (`tb_enc_cell`, `tb_vlcell_array`, `tb_enc_monitor`,
  `tb_enc_packet`, `tb_enc_sender`, `tb_enc_inbuf`, `tb_lzss_encoder`,
  `tb_dec_frontend`, `tb_dec_preproc`, `tb_dec_cell`, `tb_dec_array`,
  `tb_lzss_decoder`) check each block against the model or against directed
  values, including latencies.
- **`tb_lzss_cascade`** checks two chained encoders against the model of one
  encoder of the combined size.

All of these pass.
