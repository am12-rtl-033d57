# Fleet fetch unit with a literal portion

A Fleet fetch unit loads a *code bag* from memory and sends its contents into
the machine. This design drops the code bag descriptor as a pointer to a
structure in memory. Instead, the fetch unit receives the bag's location and
sizes directly, as three separate inputs. A bag is also split into two parts:

* a **literal portion**: plain data words that leave the fetch unit through
  its own *literal outboxes*, so that any instruction can use them as a source;
* an **instruction portion**: instructions sent on to the instruction horn,
  which delivers them to the places that execute them.

This removes the need to embed literals in instruction words. A literal can be
as wide as an instruction, and any region of memory (a table, a network packet)
can be dispatched as a bag of literals without being assembled for the purpose.

## Memory layout of a code bag

The descriptor has three fields, and each arrives at its own inbox:

| field             | meaning                                                        |
|-------------------|----------------------------------------------------------------|
| `Address`         | lowest word of the literal portion                             |
| `NumLiterals`     | literal words, at `Address` .. `Address+NumLiterals-1`         |
| `NumInstructions` | instruction words, at `Address-NumInstructions` .. `Address-1` |

The literals grow upward from `Address` and the instructions grow downward from
`Address-1`. So an ordinary pointer to the first word of a data block can be
used as `Address` unchanged. Example (the bag used throughout the tests):
`Address=0xBEEF0008`, `NumLiterals=2`, `NumInstructions=5`.

```
0xBEEF000A  (not part of the bag)
0xBEEF0009  literal    L_1
0xBEEF0008  literal    L_0      <- Address
0xBEEF0007  instruction 4
   ...
0xBEEF0003  instruction 0
0xBEEF0002  (not part of the bag)
```

Other uses:

* A bag with `NumLiterals=0` reads no word at `Address`.
* A bag with `NumInstructions=0` is a pure literal bag.
* A code bag can be loaded in two halves: its literals first, then its
  instructions with `NumLiterals=0`.

## What happens when the unit fires

The unit *fires* once all three inboxes hold a value and the previous bag has
been fully read. Firing takes all three values. Then two streams share one
memory read port:

* **Literal stream.** Reads `Address` upward. The word at address `a` goes to
  literal FIFO `a mod N_OUT`, and each FIFO feeds outbox `L_c1` .. `L_cN`.
  Consecutive words therefore go round-robin over the outboxes. Words whose
  addresses are equal modulo `N_OUT` share a FIFO, lowest address first.
* **Instruction stream.** Reads `Address-NumInstructions` upward to
  `Address-1`. Instructions from lower addresses come first, because that is
  the order in which instructions sharing a source must execute. Each
  instruction passes through the rewrite stage and then a small queue towards
  the instruction horn.

When both streams have a word to read and room for it, the memory port
alternates between them. A word is only read when its FIFO has a free slot,
counting the read already in flight. So a response is never refused and the
memory never needs to be stalled from this side.

### Serial mode

Round-robin dispatch is wrong for a list of literals that must be consumed in
order, because words from different outboxes can overtake one another in the
switch fabric. When `serial_mode` is high at the moment the unit fires, every
literal of that bag goes to the single FIFO `Address mod N_OUT`, in address
order.

## Literal references and the rewrite stage

Code is written as if there were one global set of literal outboxes `L_0`,
`L_1`, ..., where `L_k` means "the literal at `Address+k`". Each fetch unit has
its own outboxes, so `literal_rewrite` changes every such reference in an
instruction's source or destination field to the port of this unit's outbox
that holds that literal:

* round-robin: `L_k` becomes outbox `(Address + k) mod N_OUT`;
* serial: every `L_k` becomes outbox `Address mod N_OUT`.

Instruction format and port ids are defined in `fetch_pkg`. They are this
design's own, because only the two port fields matter to the fetch unit:

| bits  | field | notes                                                     |
|-------|-------|-----------------------------------------------------------|
| 31:24 | src   | port id; `0xF0+k` means generic literal outbox `L_k`       |
| 23:16 | dst   | same encoding                                             |
| 15:0  | body  | passed unchanged                                          |

Outbox `i` (0-based) of a unit has port id `UNIT_LIT_BASE + i`. Give every
fetch unit in a system its own `UNIT_LIT_BASE`. Only `L_0` .. `L_15` can be
named with this encoding.

## Modules

| module            | role                                                                  |
|-------------------|-----------------------------------------------------------------------|
| `fetch_unit`      | top: three inboxes, controller, literal FIFOs and outboxes, rewrite, instruction queue |
| `fetch_ctrl`      | firing rule, address generation, memory port sharing, room reservation |
| `inbox`           | holds one descriptor field until the unit fires                       |
| `fetch_fifo`      | FIFO with any depth (literal FIFOs and instruction queue)             |
| `outbox`          | registered valid/ready output towards the switch fabric               |
| `literal_rewrite` | combinational rewrite of `L_k` references                             |
| `fetch_pkg`       | widths, instruction struct, port-id encoding                          |

Memory, the instruction horn and the switch fabric are outside the unit. They
connect through ports.

### Parameters of `fetch_unit`

| parameter       | default | meaning                                             |
|-----------------|---------|-----------------------------------------------------|
| `N_OUT`         | 3       | literal outboxes (fetch unit "C" has three)         |
| `LIT_DEPTH`     | 3       | words per literal FIFO                              |
| `INS_DEPTH`     | 3       | words in the instruction queue                      |
| `UNIT_LIT_BASE` | `8'h20` | port id of this unit's first literal outbox         |

The widths live in `fetch_pkg`:

* words: 32 bits;
* addresses: 32 bits;
* `NumLiterals` and `NumInstructions`: 16 bits each, so a portion can hold up
  to 65535 words.

The FIFO depths do not limit the bag size, because the FIFOs drain while the
bag is read.

### Ports and handshakes

Every stream uses valid/ready. A transfer happens on a rising clock edge when
both are high.

* `nlit_*`, `addr_*`, `nins_*`: the three descriptor fields. They may arrive in
  any order and at different times.
* `serial_mode`: a level, sampled when the unit fires.
* `mem_req_valid/ready/addr`: read request. It stays steady until accepted.
* `mem_resp_valid/data`: the memory answers each accepted read in order, one
  or more cycles later, with a single cycle of `mem_resp_valid`. This port
  keeps at most one read outstanding.
* `lit_out_valid/ready/data[i]`: outbox `L_c(i+1)`.
* `ins_out_valid/ready/data`: rewritten instructions for the instruction horn.
* `busy`: a bag is still being read.

The reset `rst_n` is synchronous and active low. It empties every inbox, FIFO
and outbox and ends any bag in progress. Inputs are ignored while it is low.

### Timing

With a memory that accepts every read and answers one cycle later, and with
outputs that are always ready:

* The unit fires one cycle after the last descriptor field is accepted.
* The first read is issued on the next cycle, and one word is read per cycle
  after that.
* A literal appears at its outbox 3 cycles after its read.
* An instruction appears at the instruction output 2 cycles after its read.

For the example bag, the 7 reads take 7 consecutive cycles, starting two
cycles after the descriptor is accepted.

## Design choices beyond the basic scheme

The layout, the firing rule, the modulo mapping, the rewrite rule and serial
mode define the scheme. The following are choices of this implementation:

* **One shared memory port.** The two streams take turns on it, with at most
  one read outstanding.
* **Instruction order.** Instructions are read from the lowest address upward,
  so the output order is already the order of execution.
* **Round-robin mapping by absolute address** (`a mod N_OUT`) rather than by
  position in the bag. Both satisfy the mapping rules within one bag. Absolute
  addresses also keep them across bags.
* **How serial mode is selected.** It is a level input, and it uses the outbox
  that `L_0` names.
* **Sizes and formats.** FIFO depths, handshakes, the instruction format and
  the port-id encoding are all choices of this design.
* **Outboxes `L_1`..`L_5`.** Code may also be written against five generic
  outboxes (`L_1` .. `L_5`). This design numbers the generic references from
  `L_0`, the literal at `Address`, and defaults to the three outboxes of fetch
  unit C. `N_OUT` can be set to any number. The rewrite logic is tested with
  both 3 and 5.

The reads of the two portions are interleaved, not truly simultaneous.

## Simulating

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` at the end. For example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
  rtl/fetch_pkg.sv tb/tb_fetch_unit.sv --top-module tb_fetch_unit
./obj_dir/Vtb_fetch_unit
```

`tb_fetch_unit` runs the whole unit at its default parameters. Its memory
model stalls and answers after 1 to 3 cycles, and the outboxes and instruction
horn apply random backpressure. It runs these bags:

* the example bag, checking the exact set of addresses read and the timing
  above;
* a bag loaded in two halves;
* a packet dispatched as a literal bag, followed by an instruction-only bag
  that reads its fields;
* 130 random bags in round-robin and serial mode.

Every word leaving the unit is compared with a model computed in the
testbench. The test also counts each mechanism and fails if one never
happened:

* serial bags;
* round-robin wrap-around;
* memory stalls;
* reads held back by full FIFOs;
* outbox and horn backpressure;
* source and destination rewrites;
* bags with no literals, and bags with no instructions;
* interleaving of the two streams.

The other testbenches:

| testbench            | what it checks                                              |
|----------------------|-------------------------------------------------------------|
| `tb_fetch_ctrl`      | the controller on its own, with modelled FIFOs              |
| `tb_inbox`           | one inbox                                                   |
| `tb_literal_fifo`    | the FIFO at depths 3 and 4                                  |
| `tb_outbox`          | one outbox                                                  |
| `tb_literal_rewrite` | every port id, every base residue and both modes, for 3 and 5 outboxes |
| `tb_workloads`       | usage patterns checked by meaning: a packet sent as a literal bag and read by a later instruction-only bag, a bag loaded in two halves, a whole bag, and the packet in serial mode. A consumer runs the instructions in order, and each must receive the literal its `L_k` named |
