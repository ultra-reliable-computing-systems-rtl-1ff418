# Self-repairing GAL modules and switching circuit

Programmable logic built from EEPROM-style cells wears out: individual
cross-points of the AND array end up stuck ON or stuck OFF. This design keeps
a small programmable-logic system working through such faults, without anyone
stepping in. Every GAL-type block carries spare product-term columns and
spare OR groups. The wires between blocks run through a switching circuit
that has a spare line for every connection. A fault-locating / fault-repairing
processor (FLFRP) does the maintenance:

1. test every block with scan registers;
2. compare the measured cell states with the intended fuse map;
3. reprogram around every fault, by moving data between columns, onto spare
   columns, onto a spare OR group, or onto a spare line.

Only when the spares run out does it raise a global no-go signal.

The RTL follows the architecture of C. H. Lee, *Ultra Reliable Computing
Systems* (dissertation, 2007). In that work it was evaluated by software
simulation; here it is written as synthesizable SystemVerilog.

## System

```
 x0[15:0] --> GM0 --8--> SC0 --8--+--> GM1 --> y[7:0]
                                  |
 x1[7:0]  ------------------------+
             ^        ^            ^
             +--------+------------+---- FLFRP (scan access + programming)
```

- **GM0** and **GM1** are GAL16V8-sized modules:
  - 16 variables, so 32 AND-plane rows (each variable and its complement);
  - 8 OR groups (OLMCs);
  - 16 columns per OR group: 8 programmed, 8 spare.
  - By default 6 OR groups are in use and 2 are kept as spare ORs.
- **SC0** is an 8 x 8 switching circuit. It takes the GM0 outputs and feeds
  variables 0..7 of GM1. Variables 8..15 of GM1 are primary inputs.
- **FLFRP** contains:
  - one repair unit per GAL (`gal_repair_ctrl`);
  - one repair unit for the switching circuit (`sc_repair_ctrl`);
  - a sequencer with the MSCI table. MSCI (module / switching-circuit information) records which module drives which module through the SC.

## How a GAL module tests itself

The AND plane is an n x m grid of cells. n = 32 rows, m = 8 x 16 = 128
columns.

- An **ON** cell ties its row into the column's AND gate.
- An **OFF** cell presents a constant 1 to it.
- A column with every cell ON ANDs a variable with its complement, so its product is always 0. Spare and discarded columns are parked like this, so they never disturb the OR.

Two scan registers sit in the datapath:

- **SCR1** (n bits) drives the rows in test mode.
- **SCR2** (m bits) sits between the AND and OR planes. It is transparent in normal use. In test mode it captures the product terms and shifts them out.

The test is a *walking 0*. SCR1 is loaded with `11…10` and shifted one place per vector, so each vector pulls exactly one row low. For that vector:

- every column whose cell on that row is ON (really ON, whatever was programmed) outputs 0;
- every other column outputs 1.

SCR2 shifts these m bits out, and the FLFRP stores their inverse as one row of the **SAP**, the measured state of every cell. n vectors give the whole SAP. One test takes about n·(m+2) cycles, roughly 4.2 k cycles at full size.

The **minus comparator** then walks the columns. For each column it subtracts the MAP (the intended fuse map) as it stood when the test ran from the SAP:

| SAP − MAP | meaning |
|---|---|
| +1 | cell stuck at 1 |
| −1 | cell stuck at 0 |
| 0 | cell correct |

Faults in columns that are in use are repaired as described in the next section. Columns that are out of use (spare or discarded) are checked for one thing only, described at the end of that section.

## How a GAL module repairs itself

For each faulty column c in OR group g, the repair unit tries, in order:

1. **Cell-column re-use.** Find another in-use column c′ of the same OR group whose MAP already has, at every faulty cell of c, the value that cell is stuck at. Swap the two MAP columns and reprogram both. The stuck cells now hold exactly what c′'s product term needs. The OR function is unchanged, because the same set of products is still ORed. c is marked *re-used* (NC = −2); a re-used column may afterwards only be replaced.
2. **Column replacement.** Copy the column to a free spare column of the same OR group. Park c as all-ON and mark it discarded (NC = −1).
3. **Extra-OR replacement.** Copy every in-use column and the OLMC setting of g to a spare OR group h. Mark g faulty. This is allowed only when this GAL's outputs go through a switching circuit, which can then take the signal from pin h instead of pin g. The FLFRP enables it from the MSCI table.

If none of these applies, the unit reports no-go.

**Columns out of use.** An out-of-use column must still contribute 0 to its OR. It does so because all its cells are ON, so some variable and its complement are both connected. Stuck-at-0 cells can break that. Once every variable has at least one of its two cells stuck at 0, the column's product is no longer constant 0 and it corrupts its OR group. Nothing inside the group can fix that, so the unit treats the whole OR group as lost: it moves the group to a spare OR, or reports no-go. A spare column with any detected fault is marked discarded, so it is never chosen for replacement.

Every pass that changed something is followed by a new test. This catches faults in the columns that just received data. Repeats stop at the first clean pass, or at a pass limit.

A detail that makes the source design's worked example come out right: faults are located against a *copy* of the MAP taken when the test started. Earlier swaps in the same pass can give a column new MAP contents while its measured cells still reflect the old ones. Comparing against the current MAP would report false faults.

Status registers use small signed codes stored as 2-bit two's complement:

| Register | Meaning of each value |
|---|---|
| NC (per column) | 0 in use, 1 spare, −1 discarded, −2 re-used |
| NR (per OR) | 0 in use, 1 spare OR, −1 faulty |
| MCIR (per SC AND gate) | 0 in use, −1 available, −2 unusable |

## The switching circuit

Each of the k = 8 input pins p feeds two DEMUXes:

- d(2p) for the original lines;
- d(2p+1) for the spare lines.

Each output pin q has two AND gates, a(2q) and a(2q+1), each followed by its own buffer. DEMUX d(2p+f) output q feeds AND a(2q+f), which gives 2k² = 128 lines.

A DEMUX puts its data on the selected line and 1 on all the others. So an AND gate passes exactly the one line that selects it, and a route from p to q is just a DEMUX select plus a buffer enable.

Test uses SCR6, which drives the DEMUX data inputs, and SCR7, which captures the AND outputs:

- **Phase 1, all ones.** An AND gate that reads 0 has a stuck-at-0 line. The whole gate is unusable, because that line pulls it low whatever is routed through it. Its NSC column is cleared and MCIR is set to −2.
- **Phase 2, one 0 at a time.** DEMUX d gets a 0, every other DEMUX gets a 1, and all select output s. The AND gate a(2s + d mod 2) must read 0. A 1 means that single line is stuck at 1, and only its NSC bit is cleared.
- A stuck-at-1 line is harmless to its AND gate while some other line carries the data, so the gate stays usable for other inputs.

The two phases take about 2.6 k cycles for k = 8.

Repair keeps the pin-to-pin configuration (SRC), so the downstream GAL never sees a change. For each output q fed by input p, routing uses:

1. the original line d(2p)→a(2q), if it is sound;
2. otherwise the spare line d(2p+1)→a(2q+1);
3. otherwise it asks the master GAL's repair unit to move OR group p to a spare OR h (`mv_req`, held until `mv_ack`). Every output fed by p then follows h, and routing starts over.

When a GAL unit moves an OR on its own because its columns ran out, it reports this on `moved_*`, and the SC unit follows in the same way.

## The FLFRP sequencer

Commands from a host:

- **`init_start`** programs both GALs from their stored fuse maps and OLMC settings, then routes the SC.
- **`maint_start`** runs maintenance rounds. Each round tests and repairs GM0, then GM1, then SC0. Another round follows whenever an OR group moved, because the new group's columns have not been tested yet.

The command ends with a one-cycle `done` and `go` or `nogo`. Event counters report each repair kind:

- re-uses, replacements and OR moves per GAL;
- lost SC AND gates, stuck-at-1 lines, spare-line routes and reroutes;
- rounds.

Before init, the host loads the following while the FLFRP is idle:

- the fuse maps (`host_gm_sel`, `map_*`);
- the OLMC settings (`cfgsh_*`);
- the SC routing (`route_*`);
- the MSCI entry GM0→GM1 (`msci_*`).

`map_rd_*` reads back a MAP column, which shows where the repairs put each product term.

The `*_defect_sa0/sa1` ports of `urcs_top` inject stuck-at cell and line faults for evaluation. They are tied to 0 in a real part.

## Files

| File | Contents |
|---|---|
| `rtl/urcs_pkg.sv` | sizes, status encodings, OLMC setting type |
| `rtl/and_plane.sv` | programmable AND plane with cell defect model |
| `rtl/scan_sipo.sv`, `rtl/scan_piso.sv` | SCR1/SCR6 and SCR2/SCR7 scan registers |
| `rtl/olmc_plane.sv` | fixed OR plane, polarity and register per OLMC |
| `rtl/gal_module.sv` | one self-testable GAL (SCR1, AND plane, SCR2, OLMCs) |
| `rtl/minus_comparator.sv` | stuck-at-0 / stuck-at-1 locator |
| `rtl/gal_repair_ctrl.sv` | MAP, SAP, NC, NR, test sequencing and column/OR repair |
| `rtl/switching_circuit.sv` | DEMUX/AND/buffer switch with spare lines, SCR6, SCR7 |
| `rtl/sc_repair_ctrl.sv` | NSC, MCIR, SRC, line test, spare lines and rerouting |
| `rtl/flfrp.sv` | both kinds of repair units, MSCI table, maintenance sequencer |
| `rtl/urcs_top.sv` | GM0 → SC0 → GM1 system with the FLFRP |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_gal_lifetime.sv` | random-fault lifetime experiment, with and without spare columns |
| `tb/tb_sc_lifetime.sv` | random-fault lifetime experiment on the switching circuit |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. Each also has a watchdog. For example:

```
verilator --binary -Irtl rtl/urcs_pkg.sv tb/tb_urcs_top.sv --top-module tb_urcs_top
./obj_dir/Vtb_urcs_top
```

- `tb_urcs_top` runs the whole system at its default size with no parameter overrides. It takes about a second. It loads random sum-of-products functions into both GALs and injects faults step by step. After every maintenance command it compares `y` with a reference model of the functions. The steps provoke, in turn:
  - a re-use;
  - a replacement;
  - an extra-OR move with a second round;
  - a stuck-at-1 SC line;
  - a lost AND gate;
  - an SC-requested OR move;
  - a final no-go.

  It counts each of these and fails if one never happens.
- `tb_gal_repair_ctrl` replays the source design's 4-row cell-column re-use example. It checks the final MAP (1010, 1001, 0110, 0101) and NC (−2, −2, −2, 0). It then drives replacement, both kinds of OR move and no-go.
- `tb_sc_repair_ctrl` also replays the source design's two-pin multiple-fault example on a 2 × 2 switching circuit. A stuck-at-1 on the original line moves the connection to the spare line. A stuck-at-0 on the spare AND gate's other line then forces an OR move, and the connection is made through the line the stuck-at-1 left usable.
- `tb_gal_lifetime` runs a lifetime experiment on two small GALs (6 rows, 2 OR groups of 4 product terms). One has no spare columns and the other has 4 per OR group. Each loop adds 1 to 5 random stuck-at cross-points, in spare columns too, and repairs. After every repair that succeeds, the outputs must match the programmed sum of products for all inputs. The test also requires the version with spares to survive more loops on average. A typical run gives about 2.4 loops without spares and about 9.8 with them.
- `tb_sc_lifetime` runs the same kind of experiment on the full 8 × 8 switching circuit. A behavioural master GAL has 6 functions on 6 pins and 2 spare ORs, and grants OR moves until its spares run out. Each loop adds random stuck-at lines, up to a fault limit of 2 or 4. After every repair that succeeds, each routed output must carry its function from wherever the master now produces it. A typical run survives about 9 loops at limit 2 and about 6 at limit 4.
- `tb_flfrp` checks the round sequencing and the MSCI rule at reduced size: without the MSCI entry, an OR-level fault in GM0 is fatal.

## Where this RTL departs from, or adds to, the source design

- **Switching-circuit phase-2 test.** The description applies an all-zero vector for stuck-at-1 lines. With every line at 0, a stuck-at-1 line is masked by the other lines of its AND gate. The worked result of that example is only reached when each line is tested alone, so phase 2 applies a single 0 per vector.
- **NR encoding.** The text and the figure legend disagree on which of 1 / −1 means a spare OR. The legend's reading is used (1 = spare, −1 = faulty), which matches NC.
- **Fault location against a MAP snapshot** (see above); the description does not spell out this detail.
- **Out-of-use columns that can no longer be held at 0** cost their OR group (see above). The source treats discarding a column as always safe.
- **Only the integrated repair flow is built**: re-use, then replacement, then extra OR. The replacement-only and column-column re-use variants, which the source compares against, are not.
- **OLMC.** It models only the OR, output polarity and register/combinational choice. Feedback to the AND plane and output enables are left out, and all 16 GAL variables come from ports.
- **Tri-state output buffers** are modelled as an enable-gated OR.
- **Programming.** E²CMOS programming pulses are not modelled. A column is written in one clock through a programming port. The GAL programmer therefore exists only as that port, driven by the repair units.
- **Controller structure.** The source suggests a micro-controller for the FLFRP. Here it is dedicated hardware. The command interface, the cycle-level sequencing, the round and pass limits and the `mv_req/mv_ack` handshake are this design's own.
- **System size.** The system has two GAL modules and one SC. The 4-GAL FPGA-type and ASIC-type systems that the source evaluates are larger instances of the same blocks and are not assembled here. Holding 8 used OR groups plus up to 8 spares needs `N_OR = 16`.
- **Spare ORs.** Six of eight OR groups in use (two spares) is a default chosen here. Change `OR_USED` for other splits.

## Sizes and timing at the defaults

| Item | Value |
|---|---|
| Rows n | 32 |
| Columns m | 128 (8 OR × (8 + 8 spare)) |
| SC | 8 pins, 16 DEMUX / AND / buffer, 128 lines |
| GAL self-test | n·(m+2) + n ≈ 4.2 k cycles |
| Comparison | 2 cycles per column plus 2 per repaired column |
| SC test | 2k(2k+3) + 2k²(2k+3) ≈ 2.6 k cycles |
| Flip-flops | about 27 k for the whole system, mostly the MAP, SAP and MAP snapshot of each GAL unit (3 × 4096 bits per GAL) |
