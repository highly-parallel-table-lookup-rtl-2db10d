# Parallel table-lookup coding with a flexible multi-ported CAM

Static Huffman coding, and table substitution in general, is a lookup: find
the input symbol in a table and emit the code word stored with it. A SIMD
processor can compute many symbols per cycle, but a lookup table usually has
one port, so coding becomes the sequential bottleneck. Giving every processing
element its own copy of the table multiplies the memory, and a classic
fully-parallel CAM with several ports needs one comparator per stored word
*per port*.

This design gives P processing elements one shared table that all of them can
search at the same time. It is a *flexible multi-ported content addressable
memory* (FMCAM):

* the table lives in ordinary single-port memory banks, one per **category**
  (a value range of the symbols), with no comparators inside;
* every cycle each bank reads one word, at an address common to all banks,
  and broadcasts it to all ports;
* each port has **one** search comparator. It picks its symbol's category and
  compares its symbol with that category's broadcast word, one word per cycle.

A search therefore takes as many cycles as a category has words (at most
2^A/C), but P ports search in parallel and the comparator count grows with P,
not with P x table size. A second, multi-port code word RAM holds the code words
at the same addresses as the symbols, so each search result turns straight
into a code word.

## The loop-address-counter: how ports run without waiting for each other

All banks read at the same address, so all ports see the same word offset in
each cycle. If every search had to start at word 0, a port that gets a symbol
while another is mid-search would have to wait. Instead, one counter
(`loop_address_counter`) runs all the time, 0, 1, ..., N-1, 0, 1, ..., whether
or not anyone searches. A port that takes a request notes the current address
as its **start address** and compares from there. It stops after comparing at
the address just before the start address, so it has seen every word once,
in rotated order. Each port keeps its own start address, so requests are taken
in any cycle on any port.

The counter also provides `addr_next`. When a port's start address equals
`addr_next`, the current compare is the last one, so the port finishes with
no extra cycle.

## Two settings that shorten searches

* **Search mode** (`search_mode_e`). In `MODE_MULTIPLE` a port visits every
  word of the category and reports each match. This is the general CAM
  behaviour, useful when several entries can match, for example with masked
  bits. In `MODE_SINGLE` a port stops at the first match. That is right for a
  one-to-one table such as a Huffman code. On average it halves the search.
* **Counting value** (`set_count`, 1..2^A/C). This sets the counter's loop
  length, so every search visits exactly that many words. If the categories
  hold only 11 symbols each, a count of 11 avoids 5 wasted cycles per search.
  A value of 0, or one above the bank size, means the full bank.

Change both only while no port is searching. The counter follows a new count
at its next step.

## Categories

A category is a value range. `category_registers` holds one lower bound per
category, written in ascending order. A symbol belongs to the highest
category whose bound it reaches (unsigned compare). Each port has C
comparators (`data >= bound[k]`) and a decoder that picks the category. The
contents table is addressed `{category, word}`, so bank k holds the words of
category k. Whoever loads the table sorts the symbols into their categories.
The hardware does not sort them. A word placed in the wrong bank is simply
never found. Unused words in a bank that the loop still visits must hold a
value that cannot match, for example a value outside the category's range.

After reset the bounds split the D-bit space into C equal ranges
(`bound[k] = k * 2^D / C`).

## Search port protocol

Each port (`fmcam_port`) works on its own:

| signal | dir | meaning |
|---|---|---|
| `req_valid`/`req_ready` | in/out | request handshake; ready whenever the port is idle |
| `req_data` | in | D-bit comparison data |
| `req_mask` | in | D-bit mask; a 1 leaves that bit out of the comparison (but not out of category selection) |
| `rsp_valid` | out | a response this cycle |
| `rsp_match` | out | this compare matched |
| `rsp_addr` | out | A-bit match address `{category, word}` |
| `rsp_last` | out | the search is over |
| `busy` | out | searching |

Timing:

* The first compare happens in the cycle the request is accepted. Compare n
  happens n-1 cycles later.
* Each response is registered, one cycle after its compare.
* A search of n compares holds the port for n cycles. The next request can be
  accepted in the cycle after the last compare.
* Single search mode gives one response: either `match=1, last=1`, or, if
  nothing matched, `match=0, last=1`.
* Multiple search mode gives one response per match. The final response has
  `last=1`, and its `match` bit says whether that last compare matched.

## Top level: `fmcam_coder`

```
 sym_* (P ports) --> fmcam --------------------------+--> out_valid/match/last/addr
                     |  port_block  (P x fmcam_port) |
                     |  category_block (C banks)     +--> codeword_ram (P read ports)
                     |  fmcam_controller             |        --> out_code / out_len
                     |   (category regs, loop cnt,   |
                     |    mode, counting value)      |
```

The top's results come two cycles after the compare that produced them: one
cycle for the FMCAM response register and one for the code word RAM read.
Code words are right-aligned in `CODE_W` bits, with their length in `out_len`.
Packing them into a bit stream is left to the processing elements.

Loading:

* `cam_we/cam_waddr/cam_wdata` write the symbol table.
* `cw_we/...` write the code word table at the same address.
* `cat_we/cat_idx/cat_bound` write the bounds.
* `set_we/set_mode/set_count` write the settings. After reset the mode is single
  search and the count is the full bank.

Do not search while loading. The banks are single-port memories, so a write
takes over their address.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `P` | 16 | ports (any value; 1..16 are the intended range) |
| `A` | 8 | table address bits: 2^A symbols |
| `D` | 32 | symbol width |
| `C` | 16 | categories = banks; must be a power of two dividing 2^A |
| `CODE_W` | 16 | code word bits (JPEG Huffman codes are at most 16 bits) |
| `LEN_W` | 5 | code length field |

With the defaults each bank holds 16 words and a search takes 1..16 cycles.
The area grows about linearly with P. Each port adds one D-bit search
comparator, C D-bit category comparators, a C:1 multiplexer and a few
registers. The table is not copied.

## Where this design makes its own choices

The overall organisation comes from the published FMCAM architecture. That
includes the port module, category banks, controller, loop counter with
per-port start address, the two modes, and the FMCAM with a code word RAM as
a parallel coder. The following points are this design's own:

* **Categories as value ranges**, selected by `>=` comparators and a
  highest-match decoder. The architecture only says that words are sorted into
  categories by a predefined rule.
* **Equal banks** of 2^A/C words, with match address `{category, word}`.
* **Counting value as the loop length** of the shared counter. The requirement
  is only that the number of compare cycles can be set.
* **Mask polarity** (1 = don't care), the valid/ready handshake, the response
  format with `last`, and reset values.
* **The first compare in the accept cycle**, so a hit on the first word is
  reported one cycle after the request.
* **Combinational reads from flip-flop banks.** A real SRAM macro with a
  registered read would need the broadcast address one cycle ahead.
* **The code word RAM is a flip-flop array with P read ports.** The intended
  part is an area-efficient bank-based multi-port RAM, which would add bank
  conflicts and their arbitration; that part is not built here.
* The surrounding processor (SIMD processing elements, bus) is not part of
  the RTL. Its connections are the `sym_*` and `out_*` ports.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_loop_address_counter` | stepping, wrap, changing the count, loop of one |
| `tb_category_registers` | reset split, random writes |
| `tb_category_bank`, `tb_category_block` | table writes by `{category, word}`, broadcast of all banks |
| `tb_fmcam_controller` | loop length for every count 1..16, 0 and 17 as full, mode register |
| `tb_fmcam_port` | one port against a cycle-exact model: both modes, masks, misses, short counts |
| `tb_port_block` | 16 ports in parallel, every response checked |
| `tb_fmcam` | full FMCAM loaded through its own ports, uneven categories |
| `tb_codeword_ram` | 16 simultaneous reads |
| `tb_fmcam_coder` | end to end at the default size (see below) |

`tb_fmcam_coder` runs the top with every default parameter. Its table comes
from `tb_jpeg_table_pkg` and is JPEG-like:

* 162 run/size symbols, with a canonical Huffman code that has the JPEG
  luminance-AC number of codes per length. The testbench chooses which symbol
  gets which length.
* Symbols sorted into 15 categories of 11, with the counting value set to 11.

All 16 ports code random streams at once. A cycle-exact model checks:

* every result: cycle, address, code word and length;
* every port's `ready` in every cycle.

The test requires each of these to happen at least once: an early stop in
single mode, multiple matches in multiple mode, a symbol missing from the
table, a shortened count, all ports busy, back-to-back requests, and a mode
switch.

`tb_huffman_workload` codes one 1024-symbol stream with 1, 2, 4, 8 and 16
ports. Symbols are drawn with probability 2^-(code length), which mimics the
statistics of real coefficient data. Each port count runs in two ways:

* the plain FMCAM way: multiple search over full 16-word categories;
* the adapted way: single search with the counting value at 11.

The test checks every code word and these cycle counts. The results were:

| ports | full-category multiple search | single search, count 11 | saved |
|---|---|---|---|
| 1 | 16384 | 7151 | 56 % |
| 2 | 8192 | 3567 | 56 % |
| 4 | 4096 | 1849 | 55 % |
| 8 | 2048 | 919 | 55 % |
| 16 | 1024 | 478 | 53 % |

The cycle count falls in proportion to the port count. The two search
settings together save about half the cycles. The exact saving depends on the
symbol statistics and on how full the categories are.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fmcam_pkg.sv tb/tb_jpeg_table_pkg.sv tb/tb_fmcam_coder.sv \
    --top-module tb_fmcam_coder
./obj_dir/Vtb_fmcam_coder
```

## Limits

* The RTL is functionally verified in simulation only. No clock rate or area
  is claimed for it.
* One address space of 2^A = 256 words holds one 162-symbol AC Huffman table.
  The four baseline JPEG tables together (348 symbols) do not fit at once.
  Load them one at a time or raise `A`.
* A port cannot abort a search. Settings and tables must not change while a
  port is busy.
