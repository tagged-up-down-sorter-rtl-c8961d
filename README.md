# Tagged up/down sorter: a single-cycle hardware priority queue

This is a priority queue for hardware. It accepts one operation per clock
cycle: either *insert* a record, or *extract* the record with the smallest
key. Records with equal keys come out in the order they went in. Schedulers
need both of these properties, for example to pick the next thread or
packet, or to fire the next event timer. A queue of `n` records needs only
`n/2` comparators. They sit in a linear column of identical elements, with
no global search and no tree to balance.

The RTL is synthesizable SystemVerilog. By default it builds the 16-record
queue with 8-bit keys and 8-bit data that the original tagged up/down sorter
was laid out and evaluated at. A parameter turns it into an extract-maximum
queue.

## The idea: two columns that slide past each other

Think of the queue as a column of levels `0 .. n/2-1`. Each level holds two
records, a *left* one `L_i` and a *right* one `R_i`. Empty locations hold
"infinity", which is a key larger than any real key.

- **Insert** pushes the whole left column down one level. The new record
  becomes `L_0`. The old `L_i` moves to `L_{i+1}`.
- **Extract** pulls the whole right column up one level. `R_0` leaves the
  queue as the result. `R_{i+1}` moves to `R_i`, and infinity enters at the
  bottom.
- After either shift, every level does one **compare-and-swap** at the same
  time. If the left record should come out first, the two records change
  sides.

Because every level compares once per operation, the whole queue settles in
one cycle. The right column is always sorted, and each left record is never
smaller than the right record at its level. So `R_0` is always the minimum.
The right column never holds fewer records than the left, and at most one
more.

### Why records need a tag

The plain scheme sorts correctly but can break FIFO order among equal keys.
Here is how. A record that has already reached the right column can be
swapped back to the left by a smaller arrival. It then sits on the left next
to a right-hand record with the *same* key. That right-hand record was
inserted later, but it now sits ahead of the older one.

The fix is one bit per record. A record is **tagged** when it arrives on the
right. A tagged record on the left is swapped back to the right at the next
compare, whatever the keys. This is always safe. The right-hand record it
meets was physically below it in the right column. That record's key is
therefore equal or larger, and if equal, it was inserted later. The swap
rule of a level is therefore:

```
swap  if  L.key < R.key  or  L.tag        (the record moving right gets tagged)
```

New records enter untagged. Every record on the right is tagged. The swap
rule never compares the tags of right-hand records.

### A worked example

Insert keys 2, 2, 2, 1, 4, 3, then extract six times. The three 2s are named
2a, 2b, 2c in insertion order, and `*` marks a tag. The table shows levels 0
to 2 after each operation, as `left | right`. All other levels hold infinity
(`-`).

| after       | level 0   | level 1   | level 2   | out |
|-------------|-----------|-----------|-----------|-----|
| insert 2a   | `-  \| 2a*` | `-  \| -`   | `-  \| -`   |     |
| insert 2b   | `2b \| 2a*` | `-  \| -`   | `-  \| -`   |     |
| insert 2c   | `2c \| 2a*` | `-  \| 2b*` | `-  \| -`   |     |
| insert 1    | `2a*\| 1*`  | `2c \| 2b*` | `-  \| -`   |     |
| insert 4    | `4  \| 1*`  | `2b*\| 2a*` | `-  \| 2c*` |     |
| insert 3    | `3  \| 1*`  | `4  \| 2a*` | `2c*\| 2b*` |     |
| extract     | `3  \| 2a*` | `4  \| 2b*` | `-  \| 2c*` | 1   |
| extract     | `3  \| 2b*` | `4  \| 2c*` | `-  \| -`   | 2a  |
| extract     | `3  \| 2c*` | `-  \| 4*`  | `-  \| -`   | 2b  |
| extract     | `4* \| 3*`  | `-  \| -`   | `-  \| -`   | 2c  |
| extract     | `-  \| 4*`  | `-  \| -`   | `-  \| -`   | 3   |
| extract     | `-  \| -`   | `-  \| -`   | `-  \| -`   | 4   |

Look at the insert of 4. The 2a pushed down to level 1 is tagged, so it is
forced back to the right past 2b, although the keys are equal. Without the
tag, 2b would leave before 2a. The end-to-end testbench checks every row of
this table.

## One element: swapping by steering, not by moving data

A direct implementation would compare in one cycle and swap the two
registers in the next. This element does both in the same cycle. It never
moves the records. Instead, it changes which register *counts as* left.

Each element (`tud_element`) holds two records in registers **A** and
**B**. Each has a tag bit (`at`, `bt`). One more bit, `oldx`, is also kept.
Two 2x2 crossbars (`tud_crossbar`) sit around the registers, both steered
by the same signal `x`:

| `x`   | input crossbar                | output crossbar                  |
|-------|-------------------------------|----------------------------------|
| true  | `l_in -> A`, `r_in -> B`      | `A -> l_out`, `B -> r_out`       |
| false | `l_in -> B`, `r_in -> A`      | `B -> l_out`, `A -> r_out`       |

So `x = 1` means "A is left, B is right". `l_in` comes from the element
above and `l_out` goes to the element below. `r_in` comes from the element
below and `r_out` goes to the element above.

### Control equations

`oldx` is the value `x` had when the last operation happened. It says which
register held the left record *before* the compare. `x` is a purely
combinational function of the registers (`tud_control`):

```
x   = ((oldx & A.key == B.key) | A.key > B.key | (~oldx & B.tag))
      & ~(oldx & A.tag)
ac  = ( x & insert) | (~x & extract)     load A
bc  = (~x & insert) | ( x & extract)     load B
atc = insert | (~x & extract)            load at
btc = insert | ( x & extract)            load bt
```

Read the `x` equation in its two cases:

- `oldx = 1` (A was left): `x = (A.key >= B.key) & ~A.tag`. A stays left
  unless its key is smaller or it is tagged, which is exactly the swap rule.
- `oldx = 0` (B was left): `x = (A.key > B.key) | B.tag`. A becomes left
  when B (the left record) has the smaller key or is tagged.

A swap is therefore just `x != oldx`. It takes effect through the crossbars
as soon as the registers settle, within the same cycle.

The load enables follow from which register is left. On **insert**, the
left register loads the record from above. Its old contents are on `l_out`
and are loaded by the element below in the same clock. On **extract**, the
right register loads the record coming up from below, and its old contents
leave through `r_out`.

### How tags get set

Each tag register is loaded through an OR gate: `at <= t | ~x` and
`bt <= t | x`. Whichever register is on the right gets its tag set whenever
its tag bit is written. On extract, the record coming up from below is
tagged as it is loaded. On insert, both tag bits are written (`atc = btc =
insert`). The left one takes the new record's tag, and the right one is
forced to 1.

A record that has just been swapped from left to right therefore carries a
clear tag register until the next operation. This is harmless. The control
logic reads only the left record's tag (`A.tag` when `oldx`, `B.tag`
otherwise). The next operation either sets that tag (insert) or passes the
record upward (extract), and the element above forces the tag when it
latches it. As a result, `r_out_tag` is not meaningful, and the queue does
not bring it out.

## Interface (`tud_sorter`)

| port                 | dir | width    | meaning |
|----------------------|-----|----------|---------|
| `clk`                | in  | 1        | clock; one operation per rising edge |
| `rst_n`              | in  | 1        | synchronous, active low; empties the queue |
| `insert`             | in  | 1        | insert `in_key`/`in_data` at this edge |
| `extract`            | in  | 1        | remove the head record at this edge |
| `in_key`, `in_data`  | in  | `KEY_W`, `DATA_W` | record to insert |
| `out_key`, `out_data`| out | `KEY_W`, `DATA_W` | head record: smallest key, earliest inserted among equals |
| `ovf_key`, `ovf_data`| out | `KEY_W`, `DATA_W` | record an insert would push out of the bottom |

Timing and rules:

- `insert` and `extract` must never be high in the same cycle. An assertion
  in each element reports it.
- `out_*` is combinational from the registers and valid all the time. The
  record an `extract` removes is the one on `out_*` during that cycle. A
  record inserted in cycle *t* can be extracted in cycle *t+1*. Back-to-back
  operations need no idle cycles.
- **Empty marker.** An empty location holds the key `'1` (all ones). It is
  `'0` in the extract-maximum variant. An empty queue shows this key on
  `out_key`, and an extract from an empty queue changes nothing. This key is
  reserved: inserting it makes the record indistinguishable from empty
  space.
- **Overflow.** The queue holds `2*ELEMENTS` records. An insert into a full
  queue pushes the bottom element's left record out through `ovf_*`. That
  record is not necessarily the largest. The records that remain still form
  a correct priority queue. When nothing is lost, `ovf_key` shows the empty
  key. There is no count or full flag. If you need one, keep a counter
  beside the queue.

## Parameters

| parameter     | default | meaning |
|---------------|---------|---------|
| `KEY_W`       | 8       | key width |
| `DATA_W`      | 8       | data width |
| `ELEMENTS`    | 8       | number of elements; capacity is `2*ELEMENTS` records |
| `EXTRACT_MAX` | 0       | 1 turns the queue into an extract-maximum queue |

The defaults (8-bit key and data, 8 elements, 16 records) are the
configuration the original design was evaluated at. That implementation ran
at a cycle time of about 10 ns in a 1 um CMOS process, and its speed hardly
changed with length. In RTL terms, the critical path is one key comparator
plus the control and crossbar logic inside a single element. The only signals
that grow with length are the broadcast `insert`/`extract` lines. Area grows
linearly with `ELEMENTS` and with the key width. At the defaults the design
has 280 flip-flops: 16 records of 17 bits, plus one `oldx` per element.

`EXTRACT_MAX = 1` mirrors the key comparison and uses key 0 as the empty
marker. Everything else is unchanged, including FIFO order among equal keys.

## Files

| file | contents |
|------|----------|
| `rtl/tud_pkg.sv`      | default sizes and the empty-key function |
| `rtl/tud_crossbar.sv` | 2x2 crossbar, straight or crossed by `x` |
| `rtl/tud_control.sv`  | compare & control: `x`, `ac`, `bc`, `atc`, `btc` |
| `rtl/tud_element.sv`  | one level: registers A/B, tags, `oldx`, two crossbars, control |
| `rtl/tud_sorter.sv`   | top: the column of elements |
| `tb/tb_tud_crossbar.sv` | random check of both crossbar settings |
| `tb/tb_tud_control.sv`  | exhaustive check (3-bit keys) of the control against the swap rule, minimum and maximum |
| `tb/tb_tud_element.sv`  | one element against a two-record reference model, random traffic |
| `tb/tb_tud_sorter.sv`   | full default size: the worked example state by state, 20,000 random operations against a reference queue, and a 16-record batch sort in 32 cycles |
| `tb/tb_tud_sorter_max.sv` | extract-maximum variant, 4 elements, random traffic |

## Simulating

Every testbench is self-checking. It prints `TB_RESULT checks=N failures=M`
and stops itself. A watchdog ends a run that hangs. With Verilator 5:

```sh
verilator --binary --timing --assert -y rtl -y tb \
    rtl/tud_pkg.sv tb/tb_tud_sorter.sv --top-module tb_tud_sorter
./obj_dir/Vtb_tud_sorter
```

Replace `tb_tud_sorter` with any other testbench name. To lint the design
on its own:

```sh
verilator --lint-only -Wall -y rtl rtl/tud_pkg.sv rtl/tud_sorter.sv
```

The only warnings are package constants that a given module does not use.

The reference models in the testbenches are written from the algorithm: a
list kept in insertion order, searched for the smallest key. They are not
written from the control equations. After every random operation,
`tb_tud_sorter` also reads the left and right record at every level and
checks the queue invariant:

- occupied locations are contiguous from the top of each column;
- the right column holds as many records as the left, or one more;
- the right column is ordered;
- each level's right record sorts before its left record;
- a tagged left record sorts before the right record one level down;
- an untagged left record was inserted after every deeper record with the
  same key.

Here "sorts before" means a smaller key, or an equal key inserted earlier.

`tb_tud_sorter` also counts how often each mechanism occurs. It fails if
any of them never happened:

- a compare-and-swap;
- a swap forced only by a tag;
- an extract that had to choose between equal keys;
- an extract from an empty queue;
- an overflow;
- an extract right after the insert of the same record.

The full-size run takes well under a second.

## Design choices and departures from the original circuit

- **Clocking.** The original element uses negative-edge latches. The
  `insert` and `extract` pulses themselves clock these latches, and only
  the latches that must change are clocked. Here the design has one clock
  `clk`. `insert`/`extract` and the `ac`/`bc`/`atc`/`btc` signals become
  clock enables of ordinary rising-edge flip-flops. This keeps the circuit
  fully synchronous and leaves the behaviour per operation unchanged.
- **Reset.** A synchronous active-low reset loads infinity into every
  register and sets every tag and `oldx`. The original only states that an
  empty sorter holds infinity everywhere. Tagged empty locations match its
  worked example. The `oldx` value is arbitrary.
- **Control equation for `oldx = 0`.** The original's prose walk-through of
  the extract case writes the result as `(A.key > B.key) | ~B.tag`. The
  implementation follows the control equation `(A.key > B.key) | B.tag`,
  which is the only version consistent with the swap rule. The exhaustive
  control testbench checks this.
- **Overflow port, reserved empty key, and the extract-maximum variant.**
  The original does not specify these details. They are this design's own
  choices, described above.
- **Crossbar.** It is built as a pair of 2:1 multiplexers per record bus.
  The original specifies only its function.

The original also describes a simpler two-cycle element. That element
compares in one cycle and physically swaps the registers in the next. This
design uses only the single-cycle element, so the two-cycle element is not
included.
