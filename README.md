# Conflict-free vector access to multi-module memories

A vector memory built from M modules, each busy for T cycles per access, can
deliver one element per cycle only if no module is asked for a new element
less than T cycles after its previous one. With requests issued in element
order, that holds for very few strides: in a matched memory (M = T) it holds
for a single stride family. This RTL requests the elements of a stream
**out of order**. The reordering makes every *balanced* stride family
conflict-free: λ − t + 1 families instead of one, and 2(λ − t) + 2 when the
memory has T² modules. A family is balanced when
no module holds more than L/T of the stream's elements. The hardware cost is
a second address generator, a few address latches and a small order
register.

Three pieces are provided:

| piece | module | configuration (defaults) |
|---|---|---|
| Single vector processor on a matched XOR-mapped memory | `uniproc_system` | M = T = 8, upper XOR field at s = 3, L = 64 |
| Vector multiprocessor with synchronous access to one stream | `multiproc_system` | 4 ports, 4 sections × 4 modules, T = 4, L = 32 |
| Single vector processor on an unmatched memory (M = T²) | `unmatched_system` | T = 4, 16 modules, s = 3, y = 7, L = 32 |

`vecmem_top` places all three side by side. They share only the clock and
the reset.

## Terms

* A **stream** is given by its first address `a0`, its length L = 2^λ and its
  stride S. Write S = σ·2^x with σ odd: x is the stride **family**.
* A module has **latency** T = 2^t cycles. A **conflict** is a request to a
  module that is still busy with an earlier one.
* The memory is **matched** when M = P·T (P requesting ports) and
  **unmatched** when it has more modules.
* A stream is accessed **conflict-free** when the L requests leave in L
  consecutive cycles. The memory then finishes serving them L+T−1 cycles
  after the first request.

## Storage schemes

**Matched XOR scheme** (`xor_map`). Module bit i is `a[i] ^ a[s+i]` for
0 ≤ i < m, and the displacement is `a[n-1:m]`. With m = 3 and s = 3,
addresses 0..7 go to modules 0..7, and the next row holds 9 8 11 10 13 12
15 14.

**Block-interleaved scheme** (multiprocessor). The
t-bit supermodule field starts at bit c0, and the s-bit section field sits
directly above it. The displacement is made of the bits above the section
field followed by the c0 bits below the supermodule field. The RTL fixes
c0 = λ − t, which gives the widest window of balanced families (x = 0..c0).
The scheme is only a choice of address bits, so it has no module of its
own: `multiproc_system` slices the fields out of each port's request
address.

**Unmatched XOR scheme** (`unmatched_xor_map`). There are 2t module bits:
* The low t bits are `a[i] ^ a[s+i]`.
* The high t bits are `a[y+t-1:y]`.

The modules therefore form T sections of T modules, and each block of 2^y
addresses stays in one section. The displacement is the address without
those two t-bit fields.

## How the reordering works

### Sequences

Take a stream of family x ≤ s, where s is the position of the upper XOR
field (or c0 in the multiprocessor). Let D = 2^(s−x). Addresses D elements
apart differ by σ·2^s, so T consecutive such addresses step through all T
values of the module field. The stream is cut into L/T **sequences**. The
elements of sequence q are

    e(q, k) = j1 · T·D + j0 + k·D,     k = 0 .. T−1
    j0 = q mod D,  j1 = q div D

Each sequence therefore touches every module exactly once. This needs
s + t − λ ≤ x ≤ s. For other families the unit falls back to plain element
order, and the memory stalls it on conflicts.

Example, with M = T = 8, s = 3, a0 = 32 and S = 20 (x = 2, D = 2):
* Sequence 0 is elements 0, 2, 4, …, 14. It visits modules 4 1 6 3 0 5 2 7.
* Sequence 1 is elements 1, 3, …, 15. It visits the same cycle of modules,
  rotated: 2 7 4 1 6 3 0 5.

Each sequence alone is conflict-free. Back to back, however, sequence 1
would return to a module long before T cycles have passed.

### Second reordering

Every sequence is issued in the **module order of the first sequence**. This
keeps any module from being revisited in fewer than T cycles. The catch is
that the element order inside a sequence is what makes address generation
cheap: the address advances by adding S·D. Address generation and issue are
therefore decoupled.

* **Generator 1** computes sequence 0. Its requests go out immediately. The
  module of each request is shifted into the **order register**, a circular
  shift register of T entries.
* **Generator 2** runs one sequence ahead. It computes sequence q+1 in
  natural order while sequence q is issued. It writes each address (and its
  element index) into the **address buffers** at the index of its module.
* From sequence 1 on, the request multiplexer reads the buffer entry the
  order register points to, and rotates the register by one.

Generator 2 is used for all sequences after the first. Generator 1 is used
only during the first T cycles.

Timing with no back-pressure:

| cycles after `start` | what happens |
|---|---|
| 0–1 | set-up: the stride family is decoded and both generators are loaded |
| 2 … 2+T−1 | sequence 0 from generator 1; generator 2 fills buffer bank 1 with sequence 1 |
| 2+T … 2+2T−1 | sequence 1 read from bank 1 in recorded order; sequence 2 written to bank 0 |
| … | banks alternate |
| 2+L−1 | last request (`done` of the access unit) |
| 2+L−1+T | last response on the return bus |

The buffers are **double-banked**, so 2·T entries of (address, element). A
single bank of T entries is not enough. Sequence q+1 writes its entries in
its own module order, and can overwrite an entry of sequence q that has not
been issued yet. In the example above, module 7 is written second and read
last.

### Requests and returns

Every request carries its element index as a tag. All modules have the same
fixed latency and at most one request is accepted per cycle, so at most one
response appears per cycle. The return bus therefore needs no arbiter. Loads
write each response into the vector register at its tag, which undoes the
reordering. Stores read the vector register at the tag of the outgoing
request.

## The vector multiprocessor

P = 2^s ports share M = P·T modules. The modules form P sections of T
modules (supermodules) on a section bus, and a P × P crossbar
(`crossbar_network`) connects ports to sections. The ports load or store
**one stream together**: port i handles vector V_i, which holds stream
elements i·L … i·L+L−1 and starts at address a0 + i·L·S.

Each port has its own `ooo_access_unit`. Its bank is the supermodule field,
so every sequence of a port visits each supermodule once, in the order of
its first sequence. All ports start in the same cycle. To keep the ports out
of each other's sections, port p starts at a different group of sequences:
the group index j1 is rotated by `p >> max(s − x, 0)`, modulo the number of
groups. This holds because:
* port addresses then differ only in multiples of 2^(c0+t), so only in the
  section field;
* the rotation makes those section offsets distinct for every p.

So for every balanced family (x = 0..c0), in every cycle:
* the P requests go to P different sections (no crossbar conflict);
* the P requests go to the same supermodule;
* each port's T consecutive requests go to T different supermodules.

A stream of P·L elements therefore takes L request cycles and L+T−1 cycles
in all. With a0 = 4 and S = 4 (defaults):
* The ports start at addresses 4, 164, 324 and 484.
* Their second sequences start at 32, 192, 352 and 512.

For unbalanced strides the system still completes. The crossbar gives a
contested section to the lowest-numbered port, and a refused port stalls on
its own while the others go on.

## The unmatched memory

With M = T² modules the module number has two t-bit halves: the low half
is the XOR field `a[t-1:0] ^ a[s+t-1:s]`, and the high half is `a[y+t-1:y]`.
There are now two places a sequence can walk. A stream of family x ≤ s uses
sequences spaced 2^(s−x) elements apart, as in the matched case, so
consecutive elements of a sequence differ by σ·2^s and step through the
low half. A stream of family s < x ≤ y uses sequences spaced 2^(y−x)
elements apart, which differ by σ·2^y and step through the high half. In
both cases the other half stays the same for all T elements of a sequence.

The access unit (`ooo_access_unit` with `MAP_XOR_UNMATCHED`) indexes its
buffers and its order register by the half that the sequences walk. All
later sequences then repeat the first sequence's order of that half. This
is enough to avoid conflicts between sequences. Say position p of a
sequence reaches module (h, b), with b the walked half. The requests that
were still in flight from the previous sequence sat at positions p+1 and
later, so their walked half was different from b. They were therefore in
different modules.

With s = λ − t and y = 2(λ − t) + 1 this makes every family
0 ≤ x ≤ 2(λ − t) + 1 conflict-free. With the defaults (t = 2, s = 3, y = 7,
L = 32) that is x = 0..7. A Cray-1-sized memory (M = 16, T = 4, L = 64,
s = 4, y = 9) gets x = 0..9. Families above y are issued in plain order and
stall.

## Module hierarchy

```
vecmem_top
├── uniproc_system
│   ├── ooo_access_unit  (MAP_XOR_MATCHED)
│   │   ├── seq_addr_gen ×2, xor_map ×2, order_register, addr_buffers
│   ├── xor_map
│   ├── single_bus_memory ── memory_module ×8
│   └── vector_register
├── multiproc_system
│   ├── per port: ooo_access_unit (MAP_BLOCK_INTERLEAVED), vector_register
│   ├── crossbar_network
│   └── per section: single_bus_memory ── memory_module ×4
└── unmatched_system
    ├── ooo_access_unit  (MAP_XOR_UNMATCHED)
    │   ├── seq_addr_gen ×2, unmatched_xor_map ×2, order_register, addr_buffers
    ├── unmatched_xor_map
    ├── single_bus_memory ── memory_module ×16
    └── vector_register
```

`vecmem_pkg` holds the map-kind and operation enums and the stride-family
function.

## Interfaces

* **Starting an operation.** Pulse `start` for one cycle with `op`
  (`OP_LOAD` or `OP_STORE`), `a0` and `stride` while `busy` is low. `done`
  pulses in the cycle the last response returns.
* **Vector registers.** The host ports (`host_we`, `host_idx`,
  `host_wdata`, `host_rdata`, plus `host_port` on the multiprocessor) read
  and write them between operations.
* **Monitor outputs.** These show the request traffic: the uniprocessor's
  `bus_*` of the two single-processor systems, and the multiprocessor's
  `port_req_*`. Alongside them:
  * `reorder` tells whether the stream was reordered;
  * `conflict` and `stall` flag cycles where a request waited for a busy
    module;
  * `section_conflict` flags cycles where two ports wanted the same section.
* **Reset.** `rst_n` is an active-low asynchronous reset for the control
  state. Memory arrays, buffers and vector registers are not reset.
* **Sizes.** Addresses are 16 bits and data words 32 bits. Each module holds
  2^(16−m) words.

## What follows the source and what is this design's own

Taken from the published scheme:
* the three storage schemes;
* the split into sequences spaced 2^(s−x) elements apart, and in the
  unmatched memory 2^(y−x) apart for families above s;
* the two generators, the order register and the buffers;
* the fixed-latency modules on a shared bus, and the return bus without an
  arbiter;
* the crossbar;
* the synchronous multiprocessor access in which vector i starts at
  a0 + i·L·S;
* the example sizes used as defaults.

Choices made here:
* double-banked address buffers (explained above);
* the rule that decides between reordered and plain order (s + t − λ ≤ x ≤ s);
* the two set-up cycles after `start`;
* the base address of each sequence, computed as a0 + S·e (one multiply per
  sequence), with purely incremental updates inside a sequence;
* the per-port rotation rule of the multiprocessor. It reproduces the
  published 4-port example and is derived for c0 = λ − t;
* the order between sequences in the unmatched memory. The published
  design uses a variant of the matched rule that it does not spell out.
  Here the matched rule is reused, indexed by the walked half of the module
  number, and simulation shows the published window of families;
* L = 32 for the unmatched defaults, derived from s = λ − t with the
  example's s = 3 and t = 2;
* valid/ready back-pressure, lowest-port-wins crossbar arbitration, and
  element-index tags;
* a response for stores;
* the host ports, widths and reset behaviour;
* the displacement fields of the three mappings, chosen to be one-to-one
  and to match the published tables.

Where the published example and its own table disagree, the RTL follows the
table and the formulas:
* The module list given for the odd elements of the S = 20 stream is off by
  one element from the XOR table.
* One entry of the 16-module unmatched table contradicts its own formula.

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
ends by printing `TB_RESULT checks=N failures=F`. For example:

```
verilator --binary --timing --assert -Wno-fatal rtl/vecmem_pkg.sv \
    tb/tb_multiproc_system.sv -y rtl --top-module tb_multiproc_system \
    -Mdir obj -o sim && obj/sim
```

What the testbenches establish:
* **System and top-level testbenches.** They store streams from the vector
  registers and load them back, and compare the data with a shadow memory.
  For every request they check the module, section or supermodule against a
  reference mapping of a0 + S·element, and that every element is requested
  exactly once.
* **Balanced strides.** These must run with no conflict, in L request cycles
  and L+T−1 cycles overall. In the multiprocessor, every cycle is checked for
  distinct sections and a common supermodule.
* **Published examples.** The S = 20 module order 4 1 6 3 0 5 2 7 is
  checked, and so are the multiprocessor start addresses 4, 164, 324, 484.
* **Unbalanced strides.** These must show conflicts (stall cycles) and still
  return correct data.
* **`tb_vecmem_top`.** It runs the whole top at its default parameters. It
  counts reordered accesses, in-order accesses, module-conflict stalls,
  section conflicts, y-field sequences of the unmatched memory, stores and
  loads, and requires each to occur.
* **`tb_family_window`.** It loads streams of every family with random σ
  and a0. In both matched systems it finds exactly x = 0..3 (λ − t + 1
  families) conflict-free. In the unmatched memory it finds x = 0..7 at the
  defaults and x = 0..9 at the Cray-1 size. Every larger family conflicts.
* **Unit testbenches.** They check the mappings against the published table
  entries and for one-to-one behaviour. They check the generator against a
  direct enumeration of the sequences. The memory module's latency and busy
  window, the bus's ready rule, the crossbar's arbitration and routing, and
  the access unit's order and throughput under random back-pressure are all
  checked as well.

## Changing the design

* **Sizes.** `T_LOG`, `S_POS` and `LAMBDA` of `uniproc_system` can be
  changed freely as long as s ≥ t, s + t ≤ 16 and λ > t. The families that
  get reordered are s + t − λ ≤ x ≤ s.
* **Unmatched memory.** `unmatched_system` needs y ≥ s + t, s ≥ t and
  y + t ≤ `ADDR_W`. The widest window comes from s = λ − t and
  y = 2(λ − t) + 1.
* **Multiprocessor.** c0 follows from λ − t. The address width must leave
  room for the fields: λ + s ≤ `ADDR_W`.
* **Memory capacity.** Capacity is 2^`ADDR_W` words in all. Raising
  `ADDR_W` grows every module array.
