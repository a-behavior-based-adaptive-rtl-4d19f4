# BAAM: behaviour-based adaptive access modes for a low-power set-associative L1 cache

A conventional 4-way cache reads all four tag ways and all four data ways on every access, then
throws three of the four data words away. Several tricks avoid that waste. *Way prediction* (WP)
reads only the way that was most recently used in the set. *Partial tag comparison* (PTC) compares
a few tag bits first and senses only the data ways whose partial tag matches. A *single block
buffer* (SBB) keeps the last block read so that the arrays need not be sensed again. None of these
tricks is best for every program, or even for every phase of one program: WP loses energy and a
cycle whenever it guesses wrong, PTC saves less when many ways share partial tags, and the buffer
only pays off when there is spatial locality.

The idea behind this design is to pick the access mode per *program module* (a subroutine or a
long loop). The choice is made ahead of time, by measuring each module offline, and the binary is
instrumented with two extra instructions: **ConReg_we** at the head of a module sets the mode, and
**Exit_Con** at its tail restores the mode of the caller. So the hardware stays small. Each cache
gets three one-bit configuration registers and a few small arrays. One shared 16-entry stack keeps
the configurations of the enclosing modules.

This repository holds synthesizable SystemVerilog for the instruction cache, the data cache and the
configuration unit. It also holds self-checking testbenches for every module.

## The three register bits of each cache

| Reg2 Reg1 Reg0 | mode | tag ways read | data sense amplifiers enabled | latency of a hit |
|---|---|---|---|---|
| x 0 0 | conventional | 4 | 4 | 1 cycle |
| x 0 1 | WP | predicted way; the other 3 only if it misses | 1; the other 3 only if it misses | 1 cycle, 2 on a misprediction |
| x 1 0 | PTC | 4 | only the ways whose 3-bit partial tag matches | 1 cycle |
| x 1 1 | treated as WP | as WP | as WP | as WP |
| 1 x x | + block buffer | unchanged | none on a buffer hit | unchanged (1 cycle) |

- **Reg0 (way prediction).** A way-prediction table holds one 2-bit flag per set. It is read as
  soon as the set index is known. Only that way's tag and data are activated. On a tag mismatch,
  the controller probes the other three ways in the next cycle. After each hit or refill, the flag
  is set to the way used (MRU). The flags are updated only while Reg0 is set.
- **Reg1 (partial tag comparison).** A small array copies the 3 least significant tag bits
  (address bits [15:13]) of every way. It is read during set decode. The sense-amplifier enable of
  data way *i* is `Reg0 OR match_i`: the OR gates let Reg0 override the partial-tag result, so WP
  is never blocked by it. When Reg1 is 0, the partial-tag array reports every way as matching, so
  Reg0 = Reg1 = 0 gives the conventional cache.
- **Reg2 (single block buffer).** The buffer holds the line address (27 bits) and the data
  (256 bits) of the last block read. It is looked up in parallel with the array access, not before
  it. On a buffer hit the tag probe still happens but no data sense amplifier is enabled, and the
  word comes from the buffer with the same latency. The buffer is never used on its own in a
  sequential first-buffer-then-cache way, because that would cost a cycle on every buffer miss.
  While Reg2 is 0 the buffer is empty, so no stale block can be used after it is turned back on.

## One access, cycle by cycle

All arrays are synchronous. `baam_access_ctrl` sequences the access:

```
cycle 0  request accepted (req_valid && req_ready); the configuration is sampled for this
         access; WP flag, partial-tag matches and the buffer lookup are evaluated
         combinationally; tag_en / sa_en select which ways the arrays read at the clock edge
cycle 1  LOOKUP: tag compare on the ways that were read
           buffer hit (load)      -> respond from the buffer
           tag hit (load)         -> respond from the way MUX, load the block into the buffer;
                                     the next request can be accepted in this same cycle
           WP and no hit          -> read the other three ways (PROBE2), respond in cycle 2 on a hit
           miss (load)            -> MEM_REQ, wait for the line, write it into the victim way,
                                     respond one cycle after the line arrives
           store                  -> update the word on a hit, send the store to the next level,
                                     acknowledge when the next level answers
```

Read latency from acceptance to `resp_valid` is 1 cycle for a hit or a buffer hit, and 2 cycles
for a hit after a WP misprediction. A read miss takes 3 + *L* cycles, plus 1 in WP mode, where
*L* is the latency of the next level. A store takes 2 + *L* cycles, plus 1 after a WP
misprediction.

Stores are write-through and do not allocate on a miss. A store only probes tags (no data sense
amplifier) and does not use the buffer for lookup, but it does update the buffered word if the
block is held there. Victims are chosen round robin per set. A way-prediction flag written in the
response cycle of one access is forwarded to a request for the same set accepted in that cycle.
The buffer lookup is likewise forwarded from a block being loaded in that cycle, so back-to-back
reads of one block hit the buffer.

## Switching modes: ConReg_we, Exit_Con and the configuration stack

`baam_cfg_regs` holds Reg0..Reg2 of both caches as a 6-bit word: instruction cache in bits
[2:0] and data cache in bits [5:3], each as {Reg2, Reg1, Reg0}.

- `conreg_we` with `conreg_data` (ConReg_we): the active word is pushed onto `baam_cfg_stack`
  (16 x 6 bits) and the new word becomes active at the next edge.
- `exit_con` (Exit_Con): the top entry is popped and becomes active again.

A call from one instrumented module into another, or a loop inside a module that has its own mode,
nests naturally: each level pushes on entry and pops on exit. When the stack is full, a ConReg_we
is **not applied** and the caches stay in their current mode. A counter (`stack_ovf_depth`)
remembers how many were dropped, so the matching Exit_Con instructions also leave the mode
alone. Pushes and pops stay paired, and the outer levels get back exactly the mode they had. An
Exit_Con with nothing to undo is ignored and reported on `ev_cfg_underflow`. After reset both
caches are in conventional mode. A new configuration applies from the first access accepted after
the edge; an access already in flight finishes in the mode it started with.

## Geometry and storage

| item | default |
|---|---|
| capacity, ways, line | 32 KB, 4 ways, 32 bytes, so 256 sets |
| address split | tag [31:13] (19 bits), set [12:5], word [4:2], byte [1:0] |
| partial tag | tag bits [2:0] = address [15:13]; 256 x 4 x 3 bits |
| way-prediction table | 256 x 2 bits |
| block buffer | 27-bit line address + 256-bit line + valid |
| configuration stack | 16 x 6 bits |

Per cache, this comes to 262,144 data bits, 19,456 tag bits and 3,072 partial-tag bits of memory.
The tables in `baam_pkg` give the defaults. `SETS` and `WAYS` can be overridden on `baam_cache`
and `baam_top`, and `STK_DEPTH` on `baam_top`.

## Module structure

```
baam_top
 |- baam_cfg_regs            Reg0..Reg2 of IC and DC, ConReg_we / Exit_Con, overflow counter
 |   `- baam_cfg_stack       16 x 6 LIFO
 |- baam_cache (IC)          req_we tied low
 `- baam_cache (DC)
     |- baam_access_ctrl     FSM, tag-way and sense-amplifier enables, OR gates G0..G3
     |- baam_wp_table        2-bit MRU flag per set
     |- baam_way_predictor   new flag from tag compare results / refilled way
     |- baam_ptag_array      3-bit partial tags, per-way match
     |- baam_tag_array  x4   tag + valid per set, read only when the way is activated
     |- baam_data_array x4   line per set, read only when its sense amplifiers are enabled
     |- baam_way_select      tag comparators and output MUX
     `- baam_block_buffer    last accessed block
```

`baam_pkg` holds the constants, the `cfg_t` / `cfg_pair_t` register types and the
response-source enum. An unsensed data way reads as zero. That is a modelling choice, so a fault
that uses a switched-off way shows up as wrong data.

## Interfaces of `baam_top`

- **Fetch port** (`ic_req_*`, `ic_resp_*`): valid/ready request with a byte address, one 32-bit
  word back on `ic_resp_valid`.
- **Load/store port** (`dc_req_*`, `dc_resp_*`): the same, plus `dc_req_we`, `dc_req_wdata` and
  byte enables `dc_req_be`. A store is acknowledged by `dc_resp_valid`. One access per cache is
  in flight at a time.
- **Next level** (`ic_mem_*`, `dc_mem_*`): one request at a time with a valid/ready handshake. A
  read asks for the aligned line and gets 256 bits back with `*_mem_resp_valid`. A data-cache
  store is a 32-bit write with byte enables, acknowledged the same way. The next level (an L2 or
  memory) is not part of this design.
- **Configuration instructions**: `conreg_we` + `conreg_data`, and `exit_con`. Never both in the
  same cycle (an assertion checks this). Status outputs: `cfg`, `stack_count`, `stack_full`,
  `stack_ovf_depth` and one-cycle events for push, pop, overflow and underflow.
- **Activity** (`*_act_tag_en`, `*_act_sa_en`, per cycle) and **events** (`*_ev` =
  {buffer hit, WP misprediction, miss, hit}). These are the quantities an access-energy model
  needs. For example, energy per access = tag-way reads x tag energy + sensed data ways x
  sense-amplifier energy + buffer accesses x buffer energy. With the numbers of a given SRAM
  macro, this gives the average power per access of each mode.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_baam_top` | The whole design at its default size. A seven-module instrumented program with a nested call into code that aliases the caller's sets, an inner loop with its own mode, 20-deep nesting that overflows the stack, and concurrent fetches, loads and stores, then back-to-back fetch bursts. Checks all data, the configuration after every instruction, hit latency (1, or 2 after a WP misprediction), no sense amplifier on buffer hits and one on predicted hits, and write-through; a burst of hits must stream at one per cycle, with each new fetch accepted in the response cycle of the previous one. It requires every mechanism to occur. It prints the average number of sense amplifiers per read in each mode: about 1.1 with WP, 1.0 with PTC, 0.2-0.5 with the buffer added, against 4.0 for conventional access. |
| `tb_baam_cache` | One full-size cache against a cycle-level reference model: data, exact latency, exact tag-way count and sense-amplifier count (a range where a partial tag of a never-filled way is unknown) for 4000 random loads and stores under all eight register settings, plus event totals. |
| `tb_baam_access_ctrl` | The controller alone, with the testbench playing the arrays. Checks response source, latency, enables and strobes per access. |
| `tb_baam_cfg_regs`, `tb_baam_cfg_stack` | Nesting as in the instrumentation example, overflow and unwinding, and random traffic against a model. |
| `tb_baam_tag_array`, `tb_baam_data_array`, `tb_baam_ptag_array`, `tb_baam_wp_table`, `tb_baam_way_predictor`, `tb_baam_way_select`, `tb_baam_block_buffer` | Each leaf against a model, including reset state, enables, byte enables and forwarding. |

`tb/tb_mem_model.sv` is a behavioural next-level memory with a fixed latency, used by the cache and
top testbenches.

Run any testbench with Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
          rtl/baam_pkg.sv tb/tb_baam_top.sv --top-module tb_baam_top
./obj_dir/Vtb_baam_top
```

All testbenches pass and each takes well under a second of simulation. Each testbench was also run
against a deliberately broken copy of its module (for example, the Reg0 OR gate removed, the
overflow counter ignored, or the buffer loaded from the wrong source), and every such copy failed.

## Where this RTL departs from, or adds to, the published scheme

- **Array latency.** The source evaluates caches with a 3-cycle access latency. Here a hit takes
  one cycle after acceptance, because real SRAM timing belongs to the macro. The relative costs
  are kept: PTC and the buffer add no cycle, and a WP misprediction adds exactly one.
- **Own choices where the scheme is silent:**
  - write-through with no allocation on a store miss;
  - round-robin replacement;
  - the next-level handshake;
  - one access in flight;
  - reset values (conventional mode, flags at way 0);
  - the IC/DC bit order in the 6-bit word;
  - the overflow counter that keeps Exit_Con paired;
  - forwarding of flags and buffer contents;
  - no valid bits in the partial-tag array;
  - emptying the buffer while Reg2 is 0.
- **Reg0 = Reg1 = 1.** The scheme allows only one of WP and PTC per phase. This setting is
  handled as WP.
- **Address fields.** The architecture drawing labels the set index as bits a10..a5. The stated
  geometry (256 sets, 19-bit tag, 27-bit buffer tag+index) needs a12..a5. The geometry was
  followed.
- **Baselines not built.** These exist only for comparison and are not implemented:
  - the sequential buffer-only cache;
  - the phased cache;
  - the access-mode-prediction scheme (AMPS), which switches between WP and phased access from
    access history.
- **Not hardware, not included.** These must come from elsewhere:
  - the processor;
  - the L2 cache;
  - the offline module selection, with its instruction-count thresholds and filtering;
  - the exhaustive mode exploration under a maximum performance loss;
  - the binary instrumentation;
  - the encoding of ConReg_we / Exit_Con in an instruction set;
  - the analytical power models.
- **Circuit detail.** The 6T/8T/9T cells, the sense amplifiers and the power numbers of the
  source are not modelled. Sense-amplifier use is visible only through `act_sa_en`.
