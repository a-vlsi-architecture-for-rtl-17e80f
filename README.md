# A ZL77 data compression engine for packet networks

This is synthesizable SystemVerilog for a lossless compression engine. It sits
beside a network processor and compresses each outgoing packet. It also restores
packets that another engine compressed. The algorithm is a hardware-friendly
variant of Ziv-Lempel 1977 ("ZL77"). Every string of input characters is
replaced by a fixed-size pointer to an earlier occurrence of that string. The
earlier occurrence is looked up in a 1024-character history of recent data.

The idea that makes it fast is the **string matcher**. It is a 1024-word
content-addressable memory (CAM). All 1024 history positions compare the next
input character at once, so the longest match is found at one character per
clock cycle. A software search, by contrast, hashes and walks linked lists.

The engine is full duplex. An encoder half and a decoder half share the chip
and work independently, and each has its own input and output FIFO.

## Codeword format

Each codeword is 14 bits: `{Index[9:0], Length[3:0]}`.

| Length | Meaning |
|---|---|
| 1..15 | The next `Length` characters repeat history characters. `Index` is the history address of the **last** of them, so the copy starts at `Index - Length + 1` (modulo 1024). |
| 0 | No match. `Index[7:0]` holds the raw character and `Index[9:8]` is 0. |

Unlike textbook LZ77, a codeword does not carry the next character after the
match. The character that ends a match becomes the first character of the next
string. Every character the encoder consumes, matched or raw, is appended to
the history at a wrapping address counter. The decoder does the same, so both
histories stay identical. Matches may run across the wrap point from address
1023 to address 0.

Codewords are packed LSB first into a byte stream with no gaps. After the last
codeword of a packet, the last byte is padded with zeros. The packet's status
reports how many of its bits are valid (0 means all 8).

## The string matcher (`vlsm`, `cam_word_cell`, `addr_prio_enc`)

The history sits in a 64 x 16 array of CAM words. Word `n` is at
row `n / 16` and column `n % 16`. Each word holds one character and one
"delayed hit" flip-flop. The controller drives it with five commands,
selected by `ENABLE, S1, S0`:

| ENABLE S1 S0 | Command | Effect |
|---|---|---|
| 0 x x | NOP | nothing |
| 1 0 0 | INIT | set every delayed hit to 1 |
| 1 0 1 | COMPARE | word n hits if it holds DATA **and** word n-1 hit in the previous COMPARE (word 1023 feeds word 0); CAM_HIT = any hit |
| 1 1 0 | OUTPUT | drive INDEX, the address of the last character of the longest match |
| 1 1 1 | UPDATE | write DATA into word ADDRESS |

A search works like this:
1. INIT starts the search.
2. The input string goes in one character per COMPARE. While CAM_HIT stays
   high, every word that still hits ends a run of history that equals the
   input so far.
3. The first COMPARE that misses ends the string. The match length is the
   number of COMPAREs that hit.

Several words may hit at once. The lowest-numbered one wins, found by a
priority encoder. A flat 1024-input encoder would be slow and large, so it
works in two dimensions:
- every row has an H_MATCH line (OR of its words' hits);
- every column has a V_MATCH line.

The row encoder finds the lowest row with a hit. Only that row is then enabled
onto the V_MATCH lines, and the column encoder finds the lowest column in it.

**Pipelining is the hardest part.** A COMPARE cycle encodes only the row of its
own hits. The column of those hits is encoded in the next COMPARE, from the
words' delayed-hit flip-flops, and that cycle also encodes the new row. When a
COMPARE misses, the answer is the hit from one COMPARE earlier. Its row is
therefore two registers back (`row_q2`) and its column one register back
(`col_q`). OUTPUT reads `{row_q2, col_q}`.

Sometimes the search ends on a COMPARE that hit, with no trailing miss. This
happens at 15 characters, or when the packet ends. OUTPUT then takes the row
from `row_q1` and encodes the column in the same cycle.

`addr_prio_enc` resolves the most significant address bit first. A bit is 1
only if the lower half of the current range has no active line.

## Bit packer and unpacker

`bit_packer` holds a 14-bit shift register that feeds an 8-bit "byte template".
- A countdown counter, preset to 14, counts codeword bits.
- A count-to-8 counter says when the template is full.
- Each full template is written to the output FIFO (`WR`, handshaked by `WR_RDY`).
- FLUSH writes a partly filled template, zero padded.
- One codeword costs 14 shift cycles, plus one cycle for each byte completed.
- `BP_RDY` tells the controller that a new codeword can be taken.

`bit_unpacker` is the mirror image. It fetches bytes from the input FIFO by
itself (`RD`, `RD_RDY`) and fills a 14-bit register ahead of demand.
- `BUP_RDY` says a codeword is waiting.
- `BUP` takes it; it appears on the output for one cycle with `OE` high.
- The next codeword is ready 16 cycles later, plus one cycle for each byte read.

FSM state codes:

| Block | State | Meaning |
|---|---|---|
| packer | 000 | clear |
| packer | 100 | idle / ready |
| packer | 001 | shift |
| packer | 010 | wait for FIFO room |
| packer | 011 | write |
| packer | 110 | flush |
| unpacker | 000 | ready |
| unpacker | 001 | output |
| unpacker | 011 | shift |
| unpacker | 010 | read |
| unpacker | 110 | wait for data |
| unpacker | 100 | reset / prefetch |

## Encoder (`zl77_encoder`)

One string costs INIT + (n+1) COMPARE + OUTPUT + max(n,1) UPDATE cycles.
That is max(2n+3, 4) cycles for a match of length n, so 9 cycles when n = 3.

The steps are:
1. **COMPARE.** Each compared character is latched in the *tri-state register*
   and saved in a 16-entry *character buffer*. The *length counter* counts
   the COMPAREs that hit.
2. **OUTPUT.**
   - After a match, OUTPUT reads the Index from the matcher.
   - After a miss on the first character, the codeword is `{00, char, 0000}`,
     taken straight from the tri-state register.
   - The codeword goes to the bit packer.
3. **UPDATE.** The buffered characters are written into the CAM at the
   *address counter*, one per UPDATE cycle.
4. **Next string.** The character that missed is still in the tri-state
   register. It starts the next string in place of a FIFO read.

A string that stops without a missed COMPARE costs 2n+2. This happens at 15
characters, or because the packet ended.

End of packet is signalled by `en_stop`:
- The surrounding logic raises it once the whole packet is in the input FIFO.
- When the FIFO has drained, the encoder ends the current string and flushes
  the packer.
- It then raises `en_done`, with the packet's codeword count
  (`en_cw_count`) and the valid bits of its last byte (`en_valid_bits`).
- `en_done` stays high until `en_stop` falls.

## Decoder (`zl77_decoder`)

The decoder is given each packet with `de_start`, its compressed length in
bytes, and the valid bits of the last byte. From these it knows exactly how
many codewords the packet holds, so the padding is never decoded.

For each codeword:
- **Match.** The decoder computes `Index - Length + 1`. It reads `Length`
  characters from the 1024-byte history RAM into the output FIFO and into a
  character buffer. It then writes them back at the *history pointer*.
- **Raw character** (Length 0). It goes straight from the codeword to the
  output FIFO and the history.

A match of n characters costs 2n+3 cycles: one to request the codeword, one
to take it, one for the subtraction, n reads and n write-backs. A raw
character costs 4. The original estimates about 2n+2. That estimate assumes the
"+1" is removed by having the matcher report the address after the last match
character. This design keeps the matcher's plain Index and pays the extra
cycle. The decoder reads first and writes after, so a match may
overlap the region being written.

## Top level (`dc_engine`)

The top level puts the encoder and decoder side by side, with FIFO depths of:
- Encode Input 256, Encode Output 128;
- Decode Input 128, Decode Output 256.

The parameters `ROWS`, `COLS` and the four `*_DEPTH` values default to these
full sizes. The decoder's history size follows `ROWS*COLS`.

In the full system two more units surround the engine:
- a DMA controller, which moves packets between shared memory and the FIFOs;
- an interface manager, which walks a queue of packet descriptors set up by the
  host processor and holds the command, status and interrupt registers.

Only their purpose is defined, not their buses or registers, so they are not
included. Their connections are the top's ports: the FIFO read/write
handshakes and the per-packet signals described above.

## Where this design departs from the original architecture

- **One clock.** The original uses two-phase non-overlapping clocks, with
  precharged wired-OR match lines. Here everything is edge-triggered on one
  clock, and the wired-ORs are OR gates.
- **Packer and unpacker speed.** The original runs them at four times the
  controller clock, so that they never slow it down. Here they share the
  controller clock, and the controller waits on `BP_RDY`/`BUP_RDY`. With
  mostly short strings, the packer (about 15.75 cycles per codeword on
  average) sets the encoder's pace. The cycle counts above exclude these
  waits.
- **Packer cost.** Here a codeword costs 14 cycles plus one per completed byte,
  which is 15 or 16. The original quotes 15. The unpacker gives a codeword
  every 16 cycles plus one per byte read; the original says about 16.
- **Own choices, not specified originally:**
  - the packet-boundary signals;
  - zero padding of the last byte;
  - LSB-first bit order;
  - the unpacker's read-state code;
  - the OUTPUT path after a final hit;
  - an all-zero history after reset, in both halves.
- **Not implemented:** the DMA controller and interface manager (see above);
  the host processor and shared memory; the per-connection history store
  suggested for context switching.
- The faster alternative encoder (2n+2 cycles for every string) is not built.
  Nor is the alternative decoder, which writes the history while reading it
  and drops the "+1" step.

## Files

| File | Contents |
|---|---|
| `rtl/dce_pkg.sv` | constants (history size, widths), codeword struct, matcher mode enum |
| `rtl/dc_engine.sv` | top level |
| `rtl/zl77_encoder.sv`, `rtl/zl77_decoder.sv` | the two controllers and their datapaths |
| `rtl/vlsm.sv`, `rtl/cam_word_cell.sv`, `rtl/addr_prio_enc.sv` | string matcher |
| `rtl/bit_packer.sv`, `rtl/bit_unpacker.sv` | 14-to-8 and 8-to-14 bit conversion |
| `rtl/byte_fifo.sv` | the four FIFOs |
| `tb/zl77_ref_pkg.sv` | software reference: encoder, decoder, packer, packet generator |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench ends by printing `TB_RESULT checks=N failures=M`. Each also has
a watchdog. To run one, for example the full-size end-to-end test:

```
verilator --binary --timing --assert -Irtl \
  rtl/dce_pkg.sv rtl/*.sv tb/zl77_ref_pkg.sv tb/tb_dc_engine.sv \
  --top-module tb_dc_engine -Mdir obj_dc_engine
./obj_dc_engine/Vtb_dc_engine
```

The compile takes under a minute and the run about a second. Verilator prints
some warnings (unused package constants, unconnected optional FIFO outputs);
`-Wno-fatal` keeps them from stopping the build.

What each testbench covers:
- **`tb_dc_engine`** runs at the full default size (1024-character history,
  full FIFO depths).
  - It loops the encoder's output into the decoder while both run at once.
  - It checks the compressed bytes against the reference encoder and the
    restored bytes against the source.
  - It checks the per-string and per-codeword cycle counts.
  - It counts each mechanism and fails if any never occurred: raw and matched
    codewords, 15-character matches, matches across the history wrap,
    zero-padded last bytes, and stalls on every FIFO and on the
    packer/unpacker.
- **`tb_vlsm`** also runs at the full 1024-word size.
- **The encoder and decoder testbenches** use a 128-character history, so the
  history wraps often.

## Trust and limits

The engine has been checked in simulation only. Every module has its own
testbench, checked against an independent software model or explicit
expectations. Each testbench has been shown to fail when a single plausible bug
is put into its module. The RTL has not been timed or placed.

The CAM is written as flip-flops and comparators: about 17,700 flip-flop bits
at the default size. A real chip would use a custom CAM macro instead.
