# Self-repairing FPGA logic: FT architectures under a generic partial reconfiguration controller

An SRAM FPGA loses logic in two ways. A radiation upset can flip a configuration bit, which is a
transient fault: rewriting the configuration repairs it. Or a physical resource can wear out,
which is a permanent fault: the logic must move away from it. This design handles both without a
processor.

Each protected system unit is built as a **fault-tolerant (FT) architecture**. Its parts are spread
over five partially reconfigurable regions, PRR0..PRR4. Each region holds one partially
reconfigurable module (PRM). Detection logic in the architecture reports a PRM error vector: one
bit per region, saying which region misbehaves.

A small hardware controller, the **GPDRC** (generic partial dynamic reconfiguration controller),
watches the error vectors of every architecture and repairs them through the FPGA's internal
configuration port (ICAP):

* **Transient fault:** the controller rewrites the faulty region with a golden partial bitstream
  (PRB). The repaired unit then copies its state from its neighbours.
* **Same region faulty again in the next repair cycle of that architecture:** the fault is
  permanent. The controller reloads the whole architecture in a smaller configuration that leaves
  the region out. This is the next *generation*.
* **Permanent fault in the last generation:** the controller reports it as unrepairable (`fatal`).

Only one PRB per module type is stored. It is moved ("relocated") to any region on the fly by
rewriting the frame addresses inside it while it streams to ICAP.

The RTL is the synthesizable static and dynamic logic around the protected function:
* the controller with its bitstream path;
* the FT detection logic (voters, checker, comparators);
* the synchronisation control.

The protected function itself (the functional units), the ICAP primitive and the bitstream memory
are outside the top module and appear as its ports.

## Regions, configuration codes and generations

A **configuration code** has one bit per region. Bit k set means PRR k holds a PRM.

* **PRR0** always holds PRM_ROUTE, which carries all signals between the units and the rest of the
  FPGA. It has no detection logic, so its error bit is always 0 and its code bit is always 1.
* **Generation 0**, code `11111`: a TMR architecture. Codes here are written as the RTL vectors
  `[4:0]`, with PRR4 on the left. Writing PRR1 first, as in "b1 b2 b3 ...", gives the reverse
  order.
  * PRR1 holds PRM_VOTER, a voter that is itself duplicated so that its own faults show.
  * PRR2..PRR4 hold the three functional units FU1..FU3.
* **Generation 1**, one of PRR1..PRR4 dropped (codes `11101`, `11011`, `10111`, `01111`): a duplex
  with checker.
  * The three remaining regions, in ascending order, hold FU1, CHECKER and FU2.
  * Example: code `11011` (PRR2 dropped) puts FU1 in PRR1, CHECKER in PRR3 and FU2 in PRR4.
* **The next code** is the current code AND the inverted error vector. Bit 0 is kept at 1.
* **Fatal:** generation 1 is the last generation. A permanent fault in it is fatal. So is a new code
  that would keep fewer than three regions.

The function that maps a code and a region to a module type is `prr_type` in `rtl/gpdrc_pkg.sv`.
It is the one place to change if you want a different placement. The controller's look-up tables
(`config_luts`) and the FT architecture (`ft_arch`) both call it, so they always agree.

## Detecting and locating faults inside an FT architecture

### Generation 0: TMR with a duplicated voter (`prm_voter`, `tmr_voter`)

* **Two voter copies.** `prm_voter` holds two identical copies of `tmr_voter`. Each copy computes
  the bitwise majority of FU1..FU3, and raises one flag per unit whose word differs from that
  majority.
* **Unit errors.** A unit error errN is raised when both copies flag unit N.
* **Voter error.** `err_voter` is raised when the two copies disagree about any flag or about the
  voted word.
* **Voter upsets are not mistaken for FU faults.** If copy B is upset, the two copies disagree.
  That disagreement raises `err_voter` rather than an FU error, so the voter region is the one
  rewritten.
* **The `voter_seu` input** inverts copy B. It lets a test reach the voter region, standing in for
  a configuration upset in it.

### Generation 1: duplex with checker (`duplex_checker`)

Two comparators check FU1 and FU2 against the checker's word:
* **Both differ:** the checker is faulty (`err_ch`).
* **Only FU1 differs:** `err1` is raised, and the error-controlled output multiplexer switches the
  output to FU2.
* **Only FU2 differs:** `err2` is raised.

### `ft_arch`

`ft_arch` places these blocks according to the code. It routes each error back to the region
index, so `prm_err[k]` always refers to PRR k.

## The controller (GPDRC)

The controller is a pipeline of small units around one sequencer (`gpdrc_fsm`). The error vectors
of all FT_COUNT architectures form an FT_COUNT × 5 bit array.

| unit | role |
|---|---|
| `input_capture_reg` | ORs the incoming error vectors of unmasked architectures into a sticky register, so a one-cycle error pulse is not lost while the controller is busy |
| `actual_error_reg` | the vectors handed over for mitigation; an entry clears when its repair ends |
| `previous_error_reg` | per architecture, the PRM repaired in the last transient cycle |
| `hard_error_unit` | a fault is permanent if the same PRM is in both the actual and the previous entry |
| `round_robin_unit` | picks the next architecture with a pending entry, searching from the one after the last served |
| `error_encoder` | index of the faulty PRM (lowest set bit) |
| `config_luts` | module type of a region, storage address of its PRB, relocation offset; all computed from parameters |
| `address_counter` | reads one PRB word by word with credit-based flow control |
| `memory_controller` | fixed-latency pipelined read port to the external bitstream storage |
| `relocation_unit` | rewrites frame addresses in the stream |
| `bitstream_fifo` | buffers words between the storage and ICAP |
| `icap_wrapper` | writes one word per clock to ICAP, bits swapped within each byte as the 7-series ICAP expects |
| `ft_arch_status` | per architecture: configuration code and state NORMAL / BUSY / SYNC / FATAL |

### One mitigation cycle, step by step

1. **IDLE.** The captured vectors move into the actual error register. If any architecture has a
   pending entry, the FSM latches the following and moves on:
   * the round-robin grant (architecture `a`);
   * the vector;
   * the encoded PRM index;
   * the hard/transient verdict.
2. **DECIDE.**
   * **Transient.** The PRM index goes into the previous error register. The faulty region alone is
     scheduled for rewriting.
   * **Permanent, in generation 0, with at least three regions left.** The new code is written to
     the status unit and the previous entry is cleared. Then the jobs are scheduled:
     * first PRR0, with the PRM_ROUTE PRB of the new configuration (never relocated across
       regions);
     * then every assigned region in ascending order, each with the PRB of its new type.
   * **Permanent otherwise.** The architecture goes to FATAL, and its errors are ignored from then
     on.
3. **START / WAIT / NEXT.** Each job runs in this order:
   1. The address counter starts.
   2. Each word is fetched, relocated, buffered and written.
   3. The FSM waits until the counter, the relocation stage, the FIFO and the ICAP register are all
      empty. Then it starts the next job.
4. **FINISH.**
   * `rec_done[a]` rises, and the actual entry of `a` clears.
   * The round-robin pointer moves past `a`.
   * The architecture stays masked until it answers `sync_done[a]`.

While an architecture is BUSY, SYNC or FATAL, its error inputs are masked at the capture register.
Faults it shows during its own repair therefore cannot start a second repair. Other architectures
keep being captured and are served in round-robin order afterwards.

### Why "detected twice" means permanent

* **After a transient repair,** the region holds a fresh copy of the golden PRB. If the same region
  is flagged in the next cycle for that architecture, rewriting did not help, so the fault is
  taken as physical.
* **Only the repaired PRM is remembered.** Another PRM flagged in the same vector has not been
  repaired yet, so its next detection counts as its first.
* **After a generation change,** the previous entry is cleared. A fault in the new configuration
  therefore always gets one transient try before it counts as permanent.

## Bitstream storage and relocation

Golden PRBs are stored in slots of `PRB_WORDS` 32-bit words. Slot s starts at word s·PRB_WORDS.

| slot | contents | built for |
|---|---|---|
| 0 | FU | PRR1 of architecture 0 |
| 1 | VOTER | PRR1 of architecture 0 |
| 2 | CHECKER | PRR1 of architecture 0 |
| 3 | PRM_ROUTE of generation 0 | PRR0 of architecture 0 |
| 3+k | PRM_ROUTE of the configuration that dropped PRR k | PRR0 of architecture 0 |

That is eight PRBs in all, whatever FT_COUNT is. Without relocation, every module type would need
its own PRB for each region of each architecture.

The frame address of region k of architecture a is:

    FAR(a, k) = FAR_BASE + a * FT_FAR_STRIDE + k * PRR_FAR_STRIDE

The defaults are `0x400000`, `0x1000` and `0x100`.

`config_luts` gives the offset: the target frame address minus the address the PRB was built for.
`relocation_unit` watches the stream for the 7-series type-1 packet header "write one word to FAR"
(`0x30002001`). It adds the offset to the word that follows. It checks the whole PRB, so a PRB that
writes several frame ranges is relocated throughout.

This assumes every region has the same resources and frame layout. That is the condition under
which a real device allows this kind of relocation. The stride parameters must be set to the real
floorplan.

**Flow control.** `address_counter` issues one read per clock while the reads in flight plus the
words in the FIFO stay below `FIFO_DEPTH`. With a storage that answers every clock, a PRB therefore
reaches ICAP without an idle cycle. At the default `PRB_WORDS = 1280` (5 kB), a transient repair
takes PRB_WORDS + 12 clocks from the error to `rec_done`: 1,292 clocks, or 12.9 µs at 100 MHz. The
12 clocks are fixed overhead: capture, decision, storage latency and pipeline fill. A generation
change writes four PRBs (PRM_ROUTE and three modules), about 5,200 clocks.

## Synchronisation after a repair (`ft_sync_ctrl`)

A rewritten unit comes back with an undefined state, while its partners have kept running. One
`ft_sync_ctrl` per architecture brings it back in step, using the state-copy ring of the functional
units. Each unit has a point-to-point link from its predecessor on the ring.

* **Error masking.** While running, the controller records which regions reported errors. Its
  error output follows the detection logic only in RUN. In every other state it is 0, so a unit
  that is not yet synchronised never triggers another repair.
* **Transient repair (code unchanged).** When `rec_done` rises:
  1. `enable` drops. Every unit stops and shows its state register on its ring output.
  2. `load[k]` rises for each stateful region that was flagged (an FU or the checker). That unit
     copies its predecessor's state.
  3. The copy ends when the loaded units answer `unit_sync_done`.
  4. A voter-only repair skips the copy, because the voter holds no state.
* **Generation change.** Every module was rewritten, so no intact state is left to copy.
  `local_rst` pulses instead.
* **End of synchronisation.** In both cases `sync_done` pulses once. The controller then unmasks the
  architecture. Both sides wait for `rec_done` to fall before a new cycle can start.

The controller itself knows nothing of how synchronisation is done. It only raises `rec_done` and
waits for `sync_done`, so another scheme (checkpoints, stop-and-write, reset) can replace
`ft_sync_ctrl` without touching the controller.

## Top module `ft_system_top`

| parameter | default | meaning |
|---|---|---|
| `FT_COUNT` | 32 | number of FT architectures |
| `DATA_W` | 32 | width of a functional-unit word |
| `PRB_WORDS` | 1280 | words per PRB (5 kB) |
| `ADDR_W` | 24 | bitstream storage word address width |
| `FIFO_DEPTH` | 16 | bitstream FIFO depth |
| `STORAGE_LAT` | 1 | read latency of the storage in clocks |
| `PRM_COUNT` (local) | 5 | regions per architecture |

Ports:

* **Functional units.** `prr_out[a][k]` is the word of the unit in PRR k of architecture a.
  `unit_sync_done[a][k]` is that unit's end-of-copy answer.
* **Unit control.** `fu_enable`, `fu_load` and `fu_local_rst` control the units.
  `cfg_code[a]` tells the fabric which module each region should hold.
* **Fault injection.** `voter_seu[a]` inverts copy B of architecture a's voter.
* **Protected output.** `ft_out[a]` is architecture a's output.
* **Controller status.**
  * `rec_done`, `busy`;
  * `hard` (verdict of the last decision), `permanent` (the current job is a generation change);
  * `fatal`, `fatal_vec`;
  * `arch_index`, `prm_error_index`;
  * `job_type` (module type being written), `relocated` (a frame address was rewritten).
* **Bitstream storage.** `mem_en` and `mem_addr` are outputs. `mem_rdata` is the input, expected
  `STORAGE_LAT` clocks after `mem_en`.
* **ICAP.** `icap_csib`, `icap_rdwrb`, `icap_i`. Connect them to `ICAPE2` (`CSIB`, `RDWRB`, `I`).

There is one clock and an asynchronous active-low reset. After reset every architecture is in
generation 0.

## Simulating

Each testbench is self-checking. It prints `TB_RESULT checks=<n> failures=<m>` and calls `$finish`.
It also has a watchdog. With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/gpdrc_pkg.sv tb/tb_ft_system_top.sv \
        --top-module tb_ft_system_top
    ./obj_dir/Vtb_ft_system_top

* Replace `tb_ft_system_top` with `tb_<module>` to test one unit.
* `tb_ft_system_top` runs the whole system with 4 architectures and 32-word PRBs, in a few thousand
  clocks.
* `tb_ft_system_top_full` runs the same scenario at every default: 32 architectures and 1280-word
  PRBs, about 20,000 clocks. It takes seconds.
* `tb_reconfig_time` repairs one transient fault with PRBs of 5, 10, 15, 20 and 25 kB, one top
  per size. At every size it checks that the PRB reaches ICAP on consecutive clocks, and that the
  repair takes PRB_WORDS plus the same fixed overhead. The repair times it prints are 12.9, 25.7,
  38.5, 51.3 and 64.1 µs at 100 MHz.
* `tb_gpdrc_table1` runs the controller alone with 32 architectures of six PRMs (192 error lines).
  This shows that the controller scales by parameters alone.
* `tb_ft_arch_widths` runs the FT architecture at unit widths of 2, 4, 8, 16, 32 and 64 bits, in
  every configuration, with single-bit faults in each region.

The end-to-end scenario lives in `tb/ft_system_harness.sv`. Its behavioural models are:
* **Functional units:** accumulators whose state follows the ring-copy protocol.
* **Bitstream storage:** `tb/bitstream_storage_model.sv`. It computes each word from its address.
* **Configuration fabric:** it decodes the ICAP stream into "region loaded with PRB slot s" events.
  A rewrite clears a transient fault in that region. The rewritten unit comes back with a
  scrambled state.

The scenario injects, in order:
1. a transient FU fault;
2. two faults in different architectures at once;
3. a voter upset;
4. two PRMs of one architecture flagged together: an FU fault captured while the controller serves
   another architecture, then a voter upset. Both must be repaired as transient;
5. a permanent FU fault, which leads to generation 1;
6. a checker fault;
7. a permanent fault in generation 1, which is fatal.

Along the way the harness checks:
* each ICAP stream: sync word, relocated frame addresses, payload, and a module type that matches
  the configuration;
* that no idle cycle occurs inside a PRB;
* that the protected outputs match a reference every cycle, except during a generation change,
  where wrong outputs are expected;
* the codes, the fatal flags and the repair latency.

It counts each mechanism and fails if one never happened. The mechanisms are transient repair,
generation change, fatal report, voter repair, checker repair, state copy, local reset,
relocation, hidden errors, round-robin queueing and two PRMs repaired in one architecture.

The `bitstream_fifo` and `gpdrc` assertions catch FIFO overflow or underflow, so run with
`--assert`.

## Size and confidence

Generic gate-level synthesis with Yosys (not mapped to an FPGA) gives these sizes at the defaults:

| block | cells | flip-flop bits | memory bits |
|---|---|---|---|
| whole top, 32 architectures | 7,779 | 1,461 | 512 |
| `gpdrc`, the controller alone | 1,342 | 794 | 512 (the 16 × 32 FIFO) |

Most of the controller's flip-flops are the three 32 × 5 error registers and the per-architecture
status (code and state). The controller grows linearly with FT_COUNT × PRM_COUNT. The reference
reports 624 flip-flops for its controller at 32 × 6.

How far it has been verified:
* Every unit has its own self-checking testbench.
* Each unit testbench was shown to fail against a deliberately broken copy of its unit.
* The end-to-end tests run at reduced size and at full size.
* All tests run on Verilator with assertions enabled.

What is not covered:
* Nothing has been run on an FPGA.
* The frame-address and packet handling assume 7-series bitstreams, with one FAR write per
  frame range. Check this against the bitstreams your tools produce before relying on relocation.

## Where this design departs from, or goes beyond, the reference

* **Six-region architectures are not built.** The reference evaluates the controller with 32
  architectures of six PRMs each, but describes only five-region architectures. The top is fixed at
  five regions. `gpdrc` itself takes any `PRM_COUNT` and is tested at 32 × 6.
* **Only two generations.** The reference also mentions a duplex with a plain comparator as a
  possible last stage, without evaluating it. Here generation 1 is the last generation.
* **Placement and layout are this design's choices.** The reference gives no region-to-type mapping
  for generation 1, no PRB storage layout, no frame-address layout and no encodings. All of these
  are in `gpdrc_pkg` and `config_luts`.
* **Fixed threshold of two detections.** The reference calls a fault permanent when it is detected
  again after a repair, and leaves the count open. Here it is two consecutive mitigation cycles of
  the same architecture.
* **Some gate details are this design's reading.**
  * The checker error `err_ch` is inverted at the `err1`/`err2` gates, so that a faulty checker is
    not also reported as a faulty FU.
  * The voter's duplicate also compares the voted words.
* **Reconfiguration time.** The reference reports 0.23 ms for a 5 kB PRB, a time that includes its
  memory system. This controller needs 12.9 µs at 100 MHz with a one-clock storage. Set
  `STORAGE_LAT` to match a slower memory. Reads are pipelined, so while `FIFO_DEPTH` exceeds the
  read latency only that latency is added, not a per-word cost.
* **Not built: fault tolerance of the controller itself.** The reference suggests placing it in
  hardened or triplicated logic, but does not design that.
* **Not built: parts outside the RTL.** The ICAP primitive, the bitstream memory and the functional
  units are outside the RTL. Models of them exist only in the testbenches.
* **Assertions use `disable iff (!rst_n)`.** Verilator reports this reset as used both
  asynchronously and in a synchronous context (SYNCASYNCNET). This is harmless.
