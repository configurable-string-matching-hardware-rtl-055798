# Aho-Corasick string-matching accelerator for intrusion detection

Most of the work of a network intrusion detection system such as Snort goes into one
task: checking every packet payload for hundreds of known attack strings at once. This
design does that in hardware with a table-driven state machine. The string set is
compiled in software into an Aho-Corasick automaton. Its complete transition function is
stored in RAM: for every (state, input byte) pair there is one entry holding the next
state and a match ID. The hardware is then very small. It is a RAM, a state register and
a little control. Each clock it looks up `{state, byte}`, loads the next state and
reports the match ID of that transition. It reads exactly one byte per clock, whatever
the strings are. Changing the rule set means rewriting the RAM, not re-synthesising
logic.

Several such FSMs run side by side to raise throughput. The default build has eight of
them. Together they take 8 bytes (64 bits) per clock.

The architecture follows the accelerator described in *Configurable String Matching
Hardware for Speeding up Intrusion Detection* (2004). That description stops at the block
level, so the sizes, address map, handshakes and several behaviours here are this
design's own choices. They are listed under [Design choices](#design-choices-and-departures).

## How the state table matches strings

Take the strings `hers` (ID 1), `she` (ID 2), `the` (ID 3) and `there` (ID 4). Their trie
has 13 states, each named by the prefix it has read so far: `idle` (the root), `h`, `he`,
`her`, `hers`, `s`, `sh`, `she`, `t`, `th`, `the`, `ther`, `there`. The Aho-Corasick
construction then fills in every missing edge. A missing edge goes to the state of the
longest suffix of the text so far that is still a prefix of some string. Some rows of
the result (next state, match ID):

| state  | `e`      | `h`    | `r`      | `s`      | `t`   | other  |
|--------|----------|--------|----------|----------|-------|--------|
| idle   | idle,0   | h,0    | idle,0   | s,0      | t,0   | idle,0 |
| sh     | she,2    | h,0    | idle,0   | s,0      | t,0   | idle,0 |
| she    | idle,0   | h,0    | her,0    | s,0      | t,0   | idle,0 |
| ther   | there,4  | h,0    | idle,0   | hers,1   | t,0   | idle,0 |

The `she` row sends `r` to `her`, because `he` is a suffix of `she`. So in `shers` the
hardware reports `she` and then `hers` without ever going back in the input. The match ID
sits on the transition (a Mealy output). It is the ID of the longest string that ends at
that byte, and 0 means no match. The testbench `tb_ac_match_fsm` loads exactly this
13-state table and checks the FSM against a direct string search.

In the RAM an entry is `{next_state, match_id}`. It is stored at index
`{state, byte}`: the state number in the upper bits and the 8-bit input byte in the lower
8 bits. One FSM therefore needs `2^STATE_W * 256` entries of `STATE_W + MATCH_W` bits.
That is the general rule `(log2 states + log2 strings) * states * symbols` with all 256
byte values as symbols.

### Building the tables

The host builds the tables; the hardware does not. `tb/ac_model_pkg.sv` has a reference
version that the testbenches use:

1. Insert the strings into a trie. States are numbered in order of creation, the root is
   state 0 and string *k* gets match ID *k*+1.
2. Visit the states breadth-first. For a trie edge `r --c--> u`, set
   `fail(u) = delta(fail(r), c)`, or the root when `r` is the root. Also set
   `out(u) = id(u)` if a string ends at `u`, else `out(fail(u))`.
3. For a missing edge set `delta(r, c) = delta(fail(r), c)`, or the root when `r` is the
   root.
4. Entry `(s, c)` is `{delta(s, c), out(delta(s, c))}`.

Only the rows of states that exist need to be written.

## What the host sees

Each FSM sits in a *channel*. A channel also has its own packet buffer and its own
control words. The host talks to the accelerator only through loads and stores. A word
address is `{channel, region, offset}`:

| region | offset | content |
|---|---|---|
| 0 packet SRAM | 0 | RAP, the read address pointer. The accelerator advances it; it points to the next word to read. |
| 0 | 1 | WAP, the write address pointer. The host writes it; it points to the last packet word written. |
| 0 | 2 .. `PKT_DEPTH`-1 | circular packet buffer, 4 bytes per word, most significant byte first |
| 1 tree SRAM | 0 | control word: bit 31 `used`, bit 30 `write`, bit 0 `start` |
| 1 | 1 | match ID of the last scan (0 = none) |
| 1 | 2 + `{state, byte}` | state-table entry `{next_state, match_id}` |

The control bits are the handshake between host and accelerator:

- `write`: the host is rewriting the tables. While it is set the channel will not start
  a scan.
- `used`: the channel is scanning and reading the tables. The host must not write
  tables now. The hardware drops such writes, shows them on `wr_blocked`, and an
  assertion warns about them in simulation.
- `start`: the host asks for a scan. The channel clears it when the scan is finished.

A typical sequence on one channel:

1. Write the control word with `write` set. Write the table entries. Write the control
   word with `write` clear.
2. Read RAP. Write the packet words from RAP onwards. Wrap from word `PKT_DEPTH-1` to
   word 2.
3. Write WAP, the address of the last packet word.
4. Write the control word with `start` set.
5. Wait for `irq`. Read the match ID. Write the control word again; this clears `irq`.
   RAP now points one past WAP, where the next packet goes.

One scan covers the words from RAP through WAP, and the FSM starts it from the root
state. The match ID reported is the **first** match in the packet. The full match stream
is on the `match_valid` / `match_id` outputs, one pair per channel per clock. Starting
with an empty buffer (RAP one past WAP) finishes at once with ID 0.

## Inside a channel

```
host bus --+--> packet_sram (RAP, WAP, data) --> pkt_interface --> byte_parser --> ac_match_fsm --> match
           |                                        ^   |                          (state_table_ram)
           +--> tree_regs (control, match ID) ------+   +-- begin/done ----------------^
                     \---- table entries ----------------------------------------------^
```

- `pkt_interface` runs the scan. It waits for `start` with `write` clear. It pulses
  `scan_begin`, which sets `used`, and `restart`, which puts the FSM in the root state.
  It hands the word at RAP to the parser and advances RAP each time a word is taken. It
  flags the word at WAP as the last one. Once the last byte has been matched it pulses
  `scan_done`.
- `byte_parser` holds one word and sends its four bytes one per clock. It takes the next
  word in the same clock as the last byte goes out, so there are no gaps.
- `ac_match_fsm` is the matcher. The table RAM is read combinationally at
  `{state, byte}`. A multiplexer picks either the table's next state or the initial state
  (on restart) for the state register.
- `tree_regs` holds the control word and the match-ID word. It keeps the first non-zero
  match ID of the scan. At `scan_done` it stores that ID, clears `start` and `used` and
  raises `irq`.

### Timing

Each FSM takes one byte per clock. A packet of *N* words raises `irq` 4*N* + 3 clocks
after the clock edge that writes `start`. Of these, 4*N* clocks are bytes, one clock
starts the scan, one fills the parser and one finishes the scan. With all eight channels
busy the accelerator takes 64 bits per clock. The end-to-end test measures 7.92 bytes
per clock over eight 1500-byte packets; the starts are staggered by the host's writes.
The clock rate is left to the implementation. Eight FSMs reach 10 Gbit/s at about
158 MHz.

## Parameters and sizes

| parameter | default | meaning |
|---|---|---|
| `NUM_FSM` | 8 | parallel FSM channels |
| `STATE_W` | 9 | state bits: 512 states, enough for a rule class of about 500 characters |
| `MATCH_W` | 8 | match-ID bits: 255 strings per table |
| `PKT_DEPTH` | 512 | words per packet buffer, including the two pointers |

With the defaults each FSM has a 2^17 x 17-bit table (272 KiB). The whole accelerator
holds about 2.1 MiB of tables and 16 KiB of packet buffers.

The Snort rule set of October 2003 was split into classes of 138 to 3242 states. With the
defaults, a class fits in one FSM if it has at most 512 states and 255 strings. Of the
classes measured, FTP, SMTP, ICMP, Oracle and Web-Frontpage fit. RPC, the Web-CGI, -Misc,
-IIS, -PHP and -Coldfusion classes need `STATE_W` = 10 to 12, or must be split into
smaller groups over several FSMs. `STATE_W = 12` holds the largest class (3242 states).
Each of its tables is then 2^20 entries.

The measured class tables of the original work are smaller than full 256-entry rows
would give. Web-Misc, for example, takes 768,975 bytes for 3242 states, which is about
90 entries of 21 bits per state. That work evidently stores only a reduced alphabet per
state. This design keeps the full 256-entry row. That needs no character mapping in
front of the RAM, but the table is about 2.8 times larger.

Growing the table makes the RAM slower. This is why throughput falls as classes grow,
and why the design works with many small tables in parallel rather than one big one.

## Design choices and departures

The architecture fixes only these points: one byte per FSM step; the RAM state table with
next state and match ID; the state register with an initial-state multiplexer; the
packet buffer with RAP and WAP in its first two words; the control word with
`used`, `write` and `start`; the match ID in the second word; `start` cleared with an
interrupt at the end; and eight parallel FSMs. Everything else is a choice made here:

- **Parallel FSMs as independent channels.** Each FSM has its own table copy and packet
  buffer, and the host gives different packets to different FSMs. The original work does
  not say how its parallel FSMs share the input. Tables may be the same in all channels
  or differ per rule class.
- **Parser = word-to-byte serialiser.** The original names a parser between interface and
  matcher but does not say what it does. Here it only splits 32-bit words into bytes,
  most significant byte first (the byte order of the big-endian OpenRISC host).
- **Packets are whole words.** A packet whose length is not a multiple of 4 must be padded
  by the host with a byte that begins no string (`0x00` in the tests).
- **First match kept.** Only the first match ID of a packet goes into the match-ID word.
- **Control bit positions** 31, 30 and 0, and the address map above.
- **Asynchronous-read table RAM**, so the state loop closes in one clock. A synchronous
  SRAM macro would need the state register moved into the RAM's output stage.
- **Level interrupt**, one line per channel, cleared by the next control-word write.
- **Table read-back** uses a second, synchronous port of the table RAM, so it never
  disturbs a scan.
- The host processor, its DMA and block-operation units and the other accelerators of
  the platform are not part of this RTL. The host bus is brought out as plain ports.

## Files

`rtl/`: `sm_pkg` (shared constants), `state_table_ram`, `ac_match_fsm`, `byte_parser`,
`packet_sram`, `tree_regs`, `pkt_interface`, `accel_channel` and `ids_accel_top`.

`tb/`: one self-checking testbench per module, `tb_<module>.sv`, plus `ac_model_pkg.sv`
(table builder and reference search). Each prints
`TB_RESULT checks=N failures=M`. `tb_ids_accel_top` runs the full default
configuration end to end. It loads eight random string sets, runs four rounds of packets
on all eight channels at once, and checks match IDs, RAP, scan times and the aggregate
rate. It also checks buffer wrap-around, the `write` hold-off, a dropped table write and
an empty-buffer start. `tb_ids_workload` gives each FSM a rule class of a measured
Snort class size: FTP (49 strings, 268 states), SMTP (24, 362), ICMP (11, 138), Oracle
(25, 265), Web-Frontpage (34, 367), and three classes of 500 characters. The real rule
strings are not used. Each class is random lowercase strings whose total length matches
the class's state count, and the packets have class strings planted in them.

To simulate, for example, the top:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
  rtl/sm_pkg.sv tb/ac_model_pkg.sv tb/tb_ids_accel_top.sv \
  --top-module tb_ids_accel_top -o sim && ./obj_dir/sim
```

`-y rtl -y tb` lets verilator find each module in the file of the same name. The two
packages are listed first. Any other testbench is built the same way with its own top
module. Every one runs in a few seconds at most.
