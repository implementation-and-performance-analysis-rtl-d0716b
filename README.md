# Slave-side arbitrated AHB bus matrix

On a multi-layer AHB bus matrix every slave has its own arbiter, so masters
that talk to different slaves never wait for each other. This design
implements a **slave-side (SS) arbiter** for such a matrix. Each master puts
its requested priority level and its desired transfer length into unused
upper bits of its own address. The arbiter at each slave port uses them to
decide who gets the slave next and for how many transfers. One piece of
hardware covers nine arbitration schemes, and each slave port's scheme can be
changed at run time:

| priority policy \ grant length | one transfer | one transaction (HBURST) | desired length (T_Length) |
|---|---|---|---|
| fixed priority  | FT | FR | FL |
| round robin     | RT | RR | RL |
| dynamic priority (P_Level) | DT | DR | DL |

The scheme follows the article "Implementation and Performance analysis of
SS Arbiter for System on chip". Where the article does not say how something
works (widths, counts, handshake details), this design made its own choice.
Those choices are listed in [Choices made in this design](#choices-made-in-this-design).

## Address format

Each master's 32-bit HADDR doubles as the request to the arbiter:

| bits  | field      | meaning |
|-------|------------|---------|
| 31:29 | S_Number   | target slave (decoded directly into HSEL) |
| 28:26 | P_Level    | priority level; a larger value means higher priority (dynamic policy only) |
| 25:22 | T_Length   | desired number of transfers minus one, so 1..16 (desired-length mode only) |
| 21:0  | Offset_Add | byte offset inside the slave |

A master keeps the upper fields constant through a burst; only the offset
increments. `ahb_pkg::ss_addr_t` is this layout as a packed struct.

## Structure

```
 ahb_master x4 ──► ahb_master_port x4 ──► ahb_slave_port x8 ──► ahb_sram_slave x8
 (burst engine)    decoder               ss_arbiter
                   input stage           address mux
                   response mux          write-data mux
                   default slave
                 └──────────────── ahb_matrix ───────────────┘
                 └──────────────────── ss_ahb_system ─────────────────────────┘
```

* **ahb_master_port**: one per master layer.
  * It decodes S_Number and offers the transfer to the target slave port.
  * It holds an address phase that has been accepted but not yet granted.
  * It routes the response of whichever slave holds the master's data phase back to the master.
  * Addresses whose S_Number is not below `NUM_SLAVES` go to a built-in default slave that answers ERROR.
* **ahb_slave_port**: one per slave.
  * Its `ss_arbiter` chooses the owning master.
  * It forwards that master's transfer to the slave, or IDLE if there is none.
  * It remembers which master is in the slave's data phase, to route HWDATA.
* **ss_arbiter** = `ss_rr_block` + `ss_p_block` + `ss_controller`.
  * It also turns the scheme (`cfg`) into a priority level and a transfer length for each master.

## The SS arbiter

### Levels and lengths

For each master `m` that requests the slave, the arbiter forms a priority level:

* fixed policy: the level is `NUM_MASTERS-1-m`, so master 0 is the highest;
* round-robin policy: every master gets level 0;
* dynamic policy: the level is the master's P_Level.

It also forms a transfer length:

* transfer mode: 1;
* transaction mode: the number of beats of HBURST (SINGLE 1, 4/8/16-beat bursts their count, undefined-length INCR 16);
* desired mode: T_Length + 1.

### Choosing a master

`ss_p_block` finds the requester with the highest level; on a tie the
lowest-numbered requester wins. It also reports whether all requesters have
the same level. If they do, the controller uses the `ss_rr_block` result
instead. That block picks the first requester after the master that won its
last round-robin decision. So "round robin" is not a special case in the
hardware: it is the result of giving every master the same level. Under the
dynamic policy, round robin also applies whenever the masters happen to send
equal P_Levels.

### Controller rules

The controller holds the owner, a No-Port flag (no owner) and a down-counter
of the transfers the owner may still make. It acts only on clock edges where
the slave's HREADY is high, and applies these rules in order:

1. The owner asserts HMASTLOCK: it keeps the port.
2. There is no owner: if nobody requests, No-Port stays set. Otherwise a new
   owner is chosen and the counter is loaded with that master's length.
3. There is an owner:
   * **Counter expired.** If no other master requests, the owner keeps the port with a reloaded counter as long as it still addresses the slave; otherwise No-Port is set. If other masters request, a new choice is made. The current owner is a candidate too, so under fixed priority it can win again.
   * **Counter running and the owner still addresses the slave.** The owner keeps the port, and each accepted transfer decrements the counter.
   * **The owner stops addressing the slave early.** No-Port is set, or a new choice is made if others are waiting.

The counter counts accepted NONSEQ/SEQ transfers. It "expires" on the very
edge that accepts the last allotted transfer, so a waiting master's transfer
goes out in the next cycle. Under transfer or desired-length grants, a burst
can therefore be interleaved with other masters' transfers at full bus rate.
Under transaction grants each burst stays whole.

## Timing and handshake

* **Choosing the owner costs one cycle.** A transfer that reaches a slave
  with no owner waits one cycle in the input stage while the arbiter chooses.
  An uncontended burst of N beats therefore finishes N+2 cycles after the
  edge that accepts the command: one cycle of address phase, one cycle of
  arbitration, then N data phases overlapped with the following address
  phases.
* **Input stage.** AHB has one HREADY per master, which cannot say "your
  previous data phase is done but your new address was refused". So the
  master port accepts every address phase and, if the target is busy, keeps
  it in a holding register. The master then sees HREADY low in its data phase
  until the held transfer has been granted and completed. When the target
  port is free and owned by the master, transfers pass straight through and a
  burst runs at one transfer per cycle.
* **Contention.** Masters waiting at one slave are served back to back:
  with four masters waiting, the slave accepts a transfer every cycle.
  Masters at different slaves run in parallel.
* **Rule for masters.** A master must not have a transfer waiting at one
  slave while it already addresses another. `ahb_master` meets this by
  driving IDLE for at least one cycle after every burst.
* **ERROR.** `ahb_sram_slave` and the default slave give the standard
  two-cycle ERROR response. `ahb_master` drops the rest of the burst from the
  first ERROR cycle on and reports `done_err`. Reissuing is left to whoever
  sends the commands.
* **Combinational paths.** A slave's HREADYOUT reaches the HTRANS/HSEL of
  another slave through the master port (master HREADY, then offered
  transfer, then slave-port multiplexer). For this to be loop-free, a slave's
  HREADYOUT must not depend combinationally on its own HSEL/HTRANS; the
  memory slave meets that. The arbiters' owner and counter outputs are
  registered.

## Masters and slaves

* **ahb_master** runs one command (`ss_cmd_t`: address fields, HBURST,
  write, lock) at a time as SINGLE, INCR4, INCR8 or INCR16 word bursts. It
  shows the beat in its data phase on `wbeat` and sends `wdata` on HWDATA,
  so write data can be computed from the beat number. Read data comes out on
  `rd_valid`/`rd_beat`/`rd_data`, and `done` pulses with the last data phase.
* **ahb_sram_slave** is a word memory of `MEM_WORDS` words. It supports
  byte, halfword and word writes, inserts `WAIT_STATES` wait cycles in every
  data phase, and answers ERROR for offsets past the memory. It is not
  cleared at reset.

## Parameters

| module | parameter | default | note |
|---|---|---|---|
| ss_ahb_system, ahb_matrix, ss_arbiter | NUM_MASTERS | 4 | a 2-bit master number |
| ss_ahb_system, ahb_matrix, ahb_decoder | NUM_SLAVES | 8 | all values of the 3-bit S_Number |
| ss_ahb_system, ahb_sram_slave | MEM_WORDS | 256 | per slave |
| ss_ahb_system, ahb_sram_slave | WAIT_STATES | 0 | per data phase |

Data width is 32 bits (`ahb_pkg::DATA_W`). The counter is 5 bits wide and
holds lengths from 1 to 16. `NUM_MASTERS` and `NUM_SLAVES` must each be at
least 2.

## Files

`rtl/` holds one module or package per file:

* `ahb_pkg.sv`: types and encodings;
* `ahb_decoder.sv`, `ss_rr_block.sv`, `ss_p_block.sv`, `ss_controller.sv`, `ss_arbiter.sv`: decoder and arbiter;
* `ahb_master_port.sv`, `ahb_slave_port.sv`, `ahb_matrix.sv`: the matrix;
* `ahb_master.sv`, `ahb_sram_slave.sv`: master and slave;
* `ss_ahb_system.sv`: the top level.

`tb/` has one self-checking testbench per module, named `tb_<module>.sv`,
plus `tb_ss_scheme_perf.sv`, which compares the nine schemes. Each testbench
prints `TB_RESULT checks=N failures=M` at the end.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/ahb_pkg.sv tb/tb_ss_ahb_system.sv --top-module tb_ss_ahb_system
./obj_dir/Vtb_ss_ahb_system
```

Replace `tb_ss_ahb_system` with any other testbench name. Every testbench
finishes in well under a second.

`tb_ss_ahb_system` runs the whole system at its default size. It covers:

* the latency of single bursts (N+2);
* four parallel bursts to four slaves;
* each of the nine schemes with four masters contending at one slave;
* a locked burst under per-transfer grants;
* an ERROR burst;
* a change of scheme in the middle of traffic.

It checks every read word against a shadow memory. It checks the finishing
order the scheme implies:

* fixed: 0,1,2,3;
* round robin: a rotation of 0,1,2,3;
* dynamic: ordered by P_Level.

It also checks the interleaving that the length mode implies. Finally it
requires that stalls, round-robin and priority decisions, No-Port, lock,
ERROR, mid-burst handover and a scheme change all happened.

`tb_ss_scheme_perf` compares the nine schemes on the same contended traffic.
Four masters replay one random sequence of write and read bursts to two
shared slaves. For each scheme the testbench prints the cycles taken, the
slave use and the mean burst latency of each master. It checks the data,
and that the transfers counted at the slaves match the beats commanded. It
also checks which master each policy favours:

* fixed: master 0 ahead of master 3;
* dynamic: the master sending level 7 ahead of the one sending level 1;
* round robin: no master waits more than twice as long as another.

One run gave:

| scheme | cycles | slave use | mean latency m0 / m1 / m2 / m3 |
|---|---|---|---|
| FT | 315 | 0.56 | 13.0 / 21.0 / 29.0 / 38.1 |
| FR | 281 | 0.63 | 15.1 / 17.2 / 31.8 / 33.9 |
| FL | 309 | 0.57 | 13.5 / 21.5 / 29.5 / 37.4 |
| RT | 357 | 0.49 | 43.0 / 43.1 / 43.2 / 43.4 |
| RR | 272 | 0.65 | 26.8 / 28.8 / 30.8 / 32.8 |
| RL | 308 | 0.57 | 36.0 / 36.2 / 37.0 / 37.2 |
| DT | 315 | 0.56 | 38.1 / 21.0 / 29.0 / 13.0 |
| DR | 281 | 0.63 | 33.9 / 17.2 / 31.8 / 15.1 |
| DL | 309 | 0.57 | 37.4 / 21.5 / 29.5 / 13.5 |

On this traffic, transaction grants keep the slaves busiest, because bursts
are not broken up. Per-transfer round robin evens out latency between the
masters, at the cost of finishing every burst late. The figures depend on
the random traffic and change with the simulator seed.

The unit testbenches check, respectively:

* `tb_ss_arbiter`: the transfer-by-transfer owner sequence of every scheme;
* `tb_ss_controller`: every controller rule, directed;
* `tb_ss_rr_block`, `tb_ss_p_block`: the RR and P blocks against reference models, with random inputs;
* `tb_ahb_matrix`: the matrix routing, input-stage holding and default slave;
* `tb_ahb_master`: the master's AHB protocol;
* `tb_ahb_sram_slave`: the slave's byte lanes, wait states and ERROR.

## Choices made in this design

The following follow the article:

* the address fields;
* the RR block, P block and controller, and the controller's three rules;
* HMASTLOCK and No-Port handling;
* the nine schemes and how a grant length is derived in each;
* run-time switching of the scheme;
* masters returning to IDLE after each burst.

The following are this design's own:

* **Sizes.** Four masters and eight slaves, inferred from the 2-bit master
  number and 3-bit S_Number. A 32-bit data bus and 256-word memory slaves.
* **Priority details.** A larger P_Level wins. Ties at the top level go to
  the lowest-numbered master. Fixed priority puts master 0 highest.
* **Length details.** T_Length codes length minus one. An undefined-length
  INCR gets 16 transfers.
* **Clocking.** Every decision is made on the rising clock edge, and only
  when HREADY is high. The description of the round-robin and priority
  functions mentions the falling edge. This design keeps the whole bus on
  one edge, as AHB does.
* **Counter.** It expires on the edge that accepts the last allotted
  transfer. "No other master requests" in the expiry rule is read as
  excluding the current owner.
* **Matrix.** The input stage with its holding register, the default slave
  with ERROR, and BUSY treated as IDLE. The master's command and data
  interfaces, and word-only bursts.
* **Reset.** An active-low asynchronous reset.

Limits:

* Masters must insert IDLE before changing slave.
* No SPLIT or RETRY responses.
* No wrapping bursts from `ahb_master`. The arbiter itself accepts any HBURST.
* No automatic retry after ERROR.
