# X-Match word compressor and decompressor (32-bit, 64-entry dictionary)

This design compresses a stream of 32-bit words without loss, then expands it again. It uses
a dictionary method in the X-Match family. The compressor keeps the last 64 distinct words it
has seen in a content addressable memory (CAM). For each new word, the CAM compares the word
with all 64 entries in one clock:

* If the word is already stored, only a 1-bit match flag and the 6-bit location are sent.
* If not, the word is sent as a literal and stored at the next dictionary slot.

The decompressor builds an identical dictionary from the literals it receives. So a 6-bit
location means the same word on both sides, and every input word comes back unchanged, in
order.

The top level, `top32`, joins the two halves. The compressor `x1` feeds the decompressor `x2`
directly. One word enters per clock, and each word reappears on `dout` five clocks later.

```
            +------------------------- x1: xmatch ---------------------------+
 data[31:0] |  +------+    +---------------- cam_comparator ---------------+ |
 srt ------>|->| fifo |--->| s0 reg -> cam (64 x 32, one match_logic/row)  | |
            |  +------+    |           -> priority enc. -> sig_address      | |
            |              |           -> address, match_hit, data_out      | |
            |              +-----------------------------------------------+ |
            +----------------------------------------------------------------+
                 comp_valid, comp_hit, comp_addr[5:0], comp_literal[31:0]
                                          |
            +------------------------- x2: dexmatch -------------------------+
            |   dx_control (hit: read / miss: store + check address)         |
            |   history_fifo (64 x 32, filled in arrival order)              |--> dout[31:0]
            +----------------------------------------------------------------+
```

## The two dictionaries and why they stay in step

This is the part to understand before changing anything. The compressor and the
decompressor each hold their own 64-word dictionary. They never exchange dictionary
contents. They stay identical only because both follow the same rules:

1. Only a miss writes a word. A hit changes nothing.
2. A miss writes at a write pointer that starts at 0 after reset and advances by one per miss,
   wrapping from 63 to 0. Once the dictionary is full, each miss replaces the oldest word.
3. Both sides see the words in the same order.

On a miss, the compressor also sends the address where it stored the word. The decompressor's
control unit (`dx_control`) compares that address with its own write pointer. If they differ,
it raises `sync_err`: the two dictionaries no longer agree. This should never happen while
both sides share a reset and a lossless link. It is a check, not a recovery mechanism.

Because every word is stored at most once, at most one CAM row can match. The comparator
asserts this with an SVA property. Its priority encoder (lowest address wins) only makes the
logic well defined.

Timing at the edge where the dictionary wraps is safe. Suppose word *n* hits location *L*,
and word *n+1* misses and overwrites *L*. On the compressor, the read-back of *L* for word *n*
and the write of word *n+1* fall on the same clock edge, so the read returns the old word. On
the decompressor, the compressed words arrive in the same order, so *L* is read for word *n*
one cycle before it is overwritten.

## The CAM comparator: three clocks per word

`cam_comparator` looks up one word per clock in three register steps:

| edge | what is registered |
|------|--------------------|
| 1 | the input word (`s0`); during the next cycle, the 64 match lines are evaluated for it |
| 2 | `sig_address`: the matching row on a hit, or the write pointer on a miss. On a miss the word is also written into the CAM at this edge |
| 3 | `address` (= `sig_address`), `match_hit`, and `data_out`, the word read back from the CAM at that address |

`sig_address` is the provisional location. It is valid one clock before `address`, while the
word is still being written. `data_out` always equals the input word: on a hit it comes from
the matching entry, and on a miss from the entry just written. The next word's lookup (edge 2
of word *n+1*) sees the CAM after word *n* was written. So back-to-back equal words give a
miss, then a hit, and there is no hazard to forward.

`cam` is the storage and search array. Each row has a register, a valid bit and a
`match_logic` equality comparator: bitwise XOR, invert, then AND over the word. `miss` is the
NOR of all match lines. Writing and reading go by address, as in an SRAM. Read data is
registered. The read and write addresses are separate, so the comparator can read back one
word while it writes the next. Reset clears only the valid bits, so an empty row never
matches. On its own, `cam` defaults to a 4 x 4 array; the comparator uses it at 64 x 32.

`match_logic` defaults to the 2-bit unit the design is built up from (two XORs, two
inverters, one AND). The CAM instantiates it at 32 bits.

## The compressor (`xmatch`)

Input words with `start` high are pushed into an 8-word FIFO (`fifo`, first-word
fall-through). The comparator pops a word whenever the FIFO is not empty. Nothing after the
FIFO can stall, so the FIFO normally holds at most one word, and `fifo_full` only reports a
word that would be lost.

The compressed word is the tuple (`match_hit`, `address`, `literal`). `literal` is zero on a
hit, because the receiver does not need it. Latency from `start` to `out_valid` is four clocks
(one in the FIFO, three in the comparator), at one word per clock.

If the compressed words were packed serially, a hit would cost 1 + 6 = 7 bits and a miss
1 + 6 + 32 = 39 bits. The end-to-end testbench reports that figure. On its mixed stream,
about half the words hit, and 80 480 input bits become 60 869 bits. Real packing is not part
of this RTL (see below).

## The decompressor (`dexmatch`)

For each valid compressed word (`start_de`), `dx_control` decodes one of two cases:

* **Hit:** the output is taken from `history_fifo` at `addrin`.
* **Miss:** the output is `datain`, and `datain` is also pushed into `history_fifo` at its
  write pointer.

`history_fifo` is written in first-in first-out order but read at any address. It is reset
to all zeros. `dataout`, `out_valid` and `sync_err` are registered, one clock after
`start_de`.

## Interface of `top32`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock, all logic on the rising edge |
| `rst` | in | 1 | synchronous reset, active high; empties the FIFO and both dictionaries |
| `srt` | in | 1 | start: `data` holds a word this cycle |
| `data` | in | 32 | word to compress |
| `dout` | out | 32 | reconstructed word |
| `dout_valid` | out | 1 | `dout` is new this cycle (five clocks after `srt`) |
| `comp_valid`, `comp_hit`, `comp_addr`, `comp_literal` | out | 1, 1, 6, 32 | the compressed link between the two halves |
| `sync_err` | out | 1 | decompressor detected a miss at an unexpected address |
| `fifo_full` | out | 1 | compressor input FIFO full; a word offered now is dropped |

Parameters (all modules take them from `xm_pkg`):

* `DATA_W` = 32: the word width.
* `ADDR_W` = 6: the dictionary address width, so each dictionary holds `2**ADDR_W` = 64 words.
* `FIFO_DEPTH` = 8: the input FIFO depth, a power of two.

## Where this departs from the X-Match algorithm as usually described

* **Whole-word matches only.** X-Match proper also codes partial matches, with a match type
  saying which bytes agree. The original description of this design mentions that the
  compressor finds a match "length" but gives no coding for it. Here a word either matches
  all 32 bits or is sent as a literal.
* **No output packetiser.** The compressed word stays a parallel bundle between the halves.
  No packet or bit-stream format was specified, so none was invented.
* **Round-robin replacement.** X-Match is usually paired with a move-to-front dictionary.
  Here a miss fills the next slot in turn, and the oldest word goes first once the dictionary
  is full. This choice is what lets the decompressor's dictionary be a simple FIFO-ordered
  buffer.
* **Static CAM.** The reference CAM is a full-custom circuit: cross-coupled bit cells with a
  pass-transistor XOR, precharged match lines and a pseudo-nMOS NOR for the miss signal. This
  RTL keeps the logic function (register + XOR/invert/AND per row, NOR for miss), not the
  circuit.
* **Choices of this design where the description is silent:**
  * the start/valid convention, with `start` active high;
  * synchronous active-high reset;
  * the FIFO depth;
  * the decompressor's one-clock latency;
  * the separate CAM read and write addresses;
  * the valid bits per CAM row;
  * the added `sync_err`, `dout_valid`, `fifo_full` and link outputs.

## Simulating

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. Each one has a watchdog. For example, for the end-to-end
test at the default sizes:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/xm_pkg.sv tb/tb_top32.sv --top-module tb_top32
./obj_dir/Vtb_top32 +verilator+rand+reset+2
```

Replace `top32` with `xmatch`, `cam_comparator`, `cam`, `match_logic`, `fifo`, `dexmatch`,
`dx_control` or `history_fifo` to run the block tests.

| testbench | what it establishes |
|-----------|---------------------|
| `tb_top32` | The stream 1, 2, 3, 4, 5 is sent twice, then a 3000-cycle mixed stream. Every word returns unchanged with exactly 5 clocks of latency. Hits, misses, replacement of full-dictionary entries, back-to-back words and idle cycles are each counted and must all occur. `sync_err` and `fifo_full` must never rise. It runs at the default parameters and takes about a second. |
| `tb_xmatch`, `tb_cam_comparator` | Checked against a dictionary model: hit flag, address, `sig_address` one clock ahead, `data_out`, literal, and 4- and 3-clock latency, across dictionary wrap-around. |
| `tb_dexmatch` | A model-generated compressed stream is reconstructed with 1-clock latency. One corrupted miss address must raise `sync_err`, exactly once. |
| `tb_cam` | Match lines, miss and registered read data against an array model. Rows written before a reset must not match after it. |
| `tb_fifo`, `tb_history_fifo`, `tb_dx_control`, `tb_match_logic` | Queue and array models, plus exhaustive or random checks of each unit's definition. |

Each testbench has also been run against a copy of its block with one deliberate bug, and it
reports failures for that copy.

All RTL is synthesizable SystemVerilog-2017. The 64 x 32 dictionaries are written as plain
arrays. The CAM becomes 64 parallel 32-bit comparators, which is the dominant logic cost of
the design.
