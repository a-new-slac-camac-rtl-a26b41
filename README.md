# CCU2 — a CAMAC type U crate controller for the SLAC parallel branch

A CAMAC crate controller sits between a branch highway, which connects a host
computer's branch driver to up to seven crates, and one crate's Dataway, the
backplane bus of up to 24 plug-in modules. The older SLAC controller was almost
transparent: the branch driver's S1 and S2 strobes went straight to the
Dataway, so every cycle had to be stretched until the most distant crate was
safe (4 to 10 µs per cycle in practice), and nothing else in the crate could
use the Dataway.

CCU2 fixes both problems while staying compatible with the old branch:

* **A handshake instead of fixed branch timing.** The branch driver raises
  *Parallel Branch Busy* (PBB); the addressed crate answers *Crate Ready* (CRR)
  once it owns its Dataway, runs a complete 1 µs or 2 µs Dataway cycle with its
  own timing generator, and signals data time back with *Branch Timing* (BT).
  Cable delay then costs one round trip per operation, not a stretched strobe.
* **An Auxiliary Controller Bus (ACB) interface.** Other controllers in the
  crate may own the Dataway; the crate controller takes it back by
  request-grant or by Auxiliary Controller Lockout (ACL) arbitration.
* **A LAM system across crates.** Each crate ORs its 24 Look-At-Me lines,
  masks the sum with a program flag, and arbitrates against the other crates
  on a priority chain, so the host can find the interrupting crate with one
  broadcast read.
* **Local or global Clear, Initialize, Inhibit** through program flags or the
  branch lines.

The crate controller itself answers as station N25, even while an auxiliary
controller owns the Dataway.

This RTL models the logic of the module. All signals are active high and run
in one direction; the module's real lines are low true, open collector, with
hysteresis receivers. The bit layouts of the status and control words, the
clock, and several handshake details are this implementation's own choices.
They are listed under [Departures and choices](#departures-and-choices).

## Structure

```
                 SLAC parallel branch (bcr bn ba bf bw br bq bx pbb crr bt bs1 bs2 bc bz bi bl)
                       |                 |                       |
            crate_addr_decode      data_interface          handshake_timing ----- ccrq/acidl ----- acb_control --- ACB (req gnt ri acl busy)
                       |           (F gating, R/W)         (FPLS: handshake,                         |
                       |                 |                  timing generator)                        |
   ACB encoded N --- n_decoder ---- Dataway N            B S1 S2                                     |
                       |                                     |                                       |
                   control_regs (N25: status, LAM, control word)  ---  ciz_control (C Z I flags) --- Dataway C Z I
                       |
   Dataway L --- lam_register --- lam_priority --- BL, LRQ, LRI, LGI/LGO (rear panel chain)
                       |
                   ACB L outputs
```

| file | role |
|---|---|
| `rtl/ccu2_pkg.sv` | switch bundle type, mode decoding, N25 function codes, word layouts, cycle timing |
| `rtl/ccu2.sv` | top: one crate controller |
| `rtl/crate_addr_decode.sv` | branch crate address against the MCRA switch, CR7, disconnect |
| `rtl/n_decoder.sv` | Dataway N lines from branch or ACB, N25 recognition |
| `rtl/handshake_timing.sv` | PBB/CRR/BT handshake, modes 0–7, timing generator, local C/Z cycles |
| `rtl/acb_control.sv` | request-grant / ACL arbitration, per cycle or per block |
| `rtl/lam_register.sv` | 24-bit LAM latch and LAM sum |
| `rtl/lam_priority.sv` | EL masking, BL, crate priority chain |
| `rtl/ciz_control.sv` | C, Z, I generation and flags, power-up initialise |
| `rtl/control_regs.sv` | N25 command decoding, EL/BRQ/ACLRQ flags, status word |
| `rtl/data_interface.sv` | W/R data routing, Q/X, two-level F gating |

## The handshake and the timing generator

This is the part to understand first. On the real module it is one field
programmable logic sequencer (FPLS). Here it is `handshake_timing`, a state
machine clocked at `TICK_NS` (default 100 ns, 10 MHz).

The internal mode switch (`sw.mode`) selects the branch protocol:

| mode | protocol | strobes | Last Crate |
|---|---|---|---|
| 0, 1 | old SLAC branch, no handshake | branch S1/S2 passed through | 1 |
| 2, 3 | PBB–CRR handshake | from the branch driver | 3 |
| 4, 5 | PBB–CRR handshake | internal, 1 µs cycle | 5 |
| 6, 7 | PBB–CRR handshake | internal, 2 µs cycle | 7 |

A handshake operation, modes 4–7:

1. PBB arrives. It passes through a two-flop synchroniser. If the crate is
   addressed, the block raises `ccrq` to `acb_control`.
2. `acb_control` arbitrates and returns `acidl` once it owns the Dataway.
3. CRR goes high and the timing cycle starts. Offsets are from the start of
   Busy; the 2 µs cycle doubles every edge:

   | signal | 1 µs cycle | 2 µs cycle |
   |---|---|---|
   | Dataway B | 0–1000 ns | 0–2000 ns |
   | S1 | 400–600 ns | 800–1200 ns |
   | S2 | 700–900 ns | 1400–1800 ns |
   | BT | 0–600 ns (ends with S1) | 0–1200 ns |

   The falling edge of BT tells the branch driver that read data, Q and X are
   valid.
4. CRR stays high until the driver drops PBB. Then `cycle_done` pulses and
   the ACB logic may release the Dataway.

With an idle ACB, CRR follows PBB after 6 clocks: two for the synchroniser,
the rest for the handshake and arbitration state machines. A whole 1 µs read,
from PBB to the fall of CRR, takes 17 clocks of the branch driver's time.
`tb_ccu2` measures and checks both numbers.

The mode sets change the operation as follows:

* **Modes 2 and 3.** CRR is returned the same way, but Dataway S1 and S2
  follow the branch `bs1`/`bs2` lines, and Busy lasts until PBB drops. No BT is
  produced, because the branch driver makes the timing itself.
* **Modes 0 and 1.** There is no handshake. The controller keeps Dataway
  control permanently through the ACB logic. While the crate is addressed,
  branch S1 and S2 pass straight to the Dataway.
* **Last Crate.** In an operation to all crates (CR7, which includes the global
  C and Z commands) every crate runs its cycle, but only a crate whose mode
  switch is odd drives CRR and BT. Set it in the most distant crate, so its
  reply arrives last.
* **N25 and OFFLINE.** A command to N25 completes the handshake and the timing
  cycle, so BT and the internal S1 strobe occur, but it requests no
  arbitration and drives no Dataway strobe. A Dataway command to an OFFLINE
  crate does the same and answers X = 0.
* **C and Z flag cycles.** A pending C or Z flag starts a *local* cycle. It
  forces ACL, runs one internal timing cycle with C and/or Z, and returns no
  CRR. The cycle is 1 µs, or 2 µs in modes 6 and 7. Every C or Z cycle
  suppresses S1.

## ACB arbitration

`acb_control` owns the Dataway on behalf of the branch. Two program flags pick
the mode. Each flag can be set only when its manual enable switch is on:
`sw.ebrq` for BRQ and `sw.aclrq_en` for ACLRQ.

| ACLRQ | BRQ | mode |
|---|---|---|
| 0 | 0 | request-grant, control released after each cycle |
| 1 | 0 | ACL, control released after each cycle |
| 0 | 1 | request-grant, control held for a block of cycles |
| 1 | 1 | ACL, control held for a block of cycles |

* **Request-grant.** The block raises RI (Request Inhibit), so no new
  auxiliary controller may request. The controller that holds the grant
  finishes its block and drops REQ.
* **ACL.** The block also raises ACL, and removes the grant at once. The
  auxiliary controller must stop after its current Dataway cycle (`acb_busy`).

ACIDL follows one clock after the auxiliary side is idle. In block mode the
block keeps RI (and ACL) between branch cycles until BRQ is cleared.
Operations to all crates and C/Z cycles always use ACL and never hold a block.
While the crate controller is idle, the grant (`acb_gnt`) follows the
auxiliary controllers' REQ. The ACB here is reduced to REQ, one grant output,
RI, ACL, a busy input, the encoded N and the L lines. That is enough to show
the arbitration, but it is not a pin-exact ACB.

## LAM handling across crates

`lam_register` latches the Dataway L lines every clock. It holds them during a
LAM read (N25 F1), and feeds the ACB L outputs and the LAM sum. `lam_priority`
gates the sum with the EL flag onto the branch BL line.

If the ELRG switch is on, the sum also requests on the crate chain:

* LRQ and LRI are bussed between crates. The grant runs from each crate's LGO
  to the next crate's LGI, in priority order. The highest crate's LGI is tied
  active.
* A requesting crate blocks the grant to the crates below it.
* A crate that holds the grant while LRI is free takes LRI, one clock later,
  and keeps it until its masked sum drops. A higher crate that raises a LAM
  meanwhile does not pre-empt it.

The host then proceeds as follows:

1. N25 F4 to all crates (CR7). Only the crate holding LRI answers, with its
   status word, which contains its address.
2. N25 F1 to that crate returns its 24 LAM bits.
3. The host clears EL in that crate, or clears the LAM sources in the
   modules. LRI is released and the next crate wins.

`tb_branch7` runs this procedure on seven crates.

## N25 commands, control word and status word

| command | action | X | Q |
|---|---|---|---|
| N25 F0 | read status word | 1 | 1 |
| N25 F1 | read LAM word | 1 | 1 |
| N25 F4 | read status word, only if this crate holds LRI | only holder | 1 |
| N25 F8 | test LAM sum | 1 | LAM sum |
| N25 F16 | write control word at S1 | 1 | 1 |
| other F | none | 0 | 0 |

The subaddress is ignored.

Control word bits, written with F16:

| bit | flag | notes |
|---|---|---|
| 0 | EL | |
| 1 | BRQ | needs EBRQ |
| 2 | ACLRQ | needs the ACLRQ enable switch |
| 3 | I flag | loaded |
| 4 | C flag | set only; cleared when its cycle ends |
| 5 | Z flag | set only; cleared when its cycle ends |

Status word bits (the switch fields are `ccu2_switches_t` packed):

| bits | content |
|---|---|
| 0 | EBI |
| 1 | EBRQ |
| 2 | OFFLINE |
| 3 | ACLRQ enable |
| 4 | ELRG |
| 7:5 | mode |
| 11:8 | MCRA |
| 12 | EL |
| 13 | BRQ |
| 14 | ACLRQ |
| 15 | I flag |
| 16 | C flag |
| 17 | Z flag |
| 18 | LRI held |
| 19 | LAM sum |
| 20 | ACIDL |

## Clear, Initialize, Inhibit

Dataway I is (BI and EBI) or the I flag.

Branch BC and BZ act only in an operation to all crates. They use forced ACL,
and C or Z is held for the whole Busy period of that cycle: the internal cycle
in modes 4–7, the branch strobes otherwise.

Every Z cycle does the following, whether it came from the branch, the Z flag
or power-up:

* clears EL, BRQ and ACLRQ;
* sets the I flag.

Reset sets the Z flag, so a crate initialises itself after power-up.

## Crate address switch

| MCRA | behaviour |
|---|---|
| 0–6 | crate address |
| 7 | answers only operations to all crates |
| 8, 9 | Branch Disconnect: no response at all, no BL, no arbitration, BI ignored |
| 10–15 | treated like 8 and 9 |

## Departures and choices

The following are this implementation's choices rather than parts of the
original design:

* The clock (100 ns), and the strobe offsets inside the cycle, which follow
  usual CAMAC practice.
* CRR is held until PBB falls.
* BT is produced only in modes 4–7.
* The use of the ACB in the old modes 0 and 1 (control held permanently).
* The handling of N25 and OFFLINE commands.
* S1 is suppressed in C/Z cycles.
* The status and control word layouts, and the Q/X rules.
* The reduced ACB signal set.
* The LAM latch sampling scheme.
* The LAM chain: win and release rules, and the tied-active LGI at the top of
  the chain.
* Line receivers and drivers, hysteresis, open-collector wiring and the front
  panel display are not modelled. The flags are brought out as `fp_*` ports
  instead.

Branch inputs other than PBB and the strobes are assumed stable while PBB is
high; only PBB is synchronised.

## Simulation

Every testbench in `tb/` is self-checking. Each ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog. Example with
Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl \
          rtl/ccu2_pkg.sv tb/tb_ccu2.sv --top-module tb_ccu2
./obj_dir/Vtb_ccu2
```

| testbench | what it shows |
|---|---|
| `tb_ccu2` | Two crates on one branch at default parameters. It covers power-up Z, handshake in 1 µs and 2 µs modes, branch-driver timing, old mode, Last Crate, LAM arbitration and reading, F8, request-grant waiting, ACL, block mode, forced ACL, C and Z flag cycles, branch BZ, inhibit, OFFLINE, Branch Disconnect, N25 access while an auxiliary controller owns the Dataway, and ACB N decoding. It counts each of these mechanisms and fails if one never happened. |
| `tb_branch7` | Seven crates running the LAM procedure over random LAM patterns. It checks service order and LAM words. |
| `tb_handshake_timing` | Cycle-exact B/S1/S2/BT/CRR timing in every mode. |
| `tb_acb_control` | The four arbitration modes and forced ACL. |
| `tb_<block>` | One testbench per remaining block. |

Concurrent assertions in `handshake_timing` and `acb_control` check the
handshake and ACB rules in every simulation run with `--assert`:

* Busy and CRR only while control is held;
* BT only with CRR;
* ACL only with RI;
* no grant while the crate controller owns the Dataway.

`tb_dataway_model.sv` is a behavioural crate. It has registers at every
station, answers F0/F16, and counts Busy clocks and C/Z cycles.

## Resources

After generic synthesis, one `ccu2` is about 360 word-level cells and 68
flip-flops. All of it is control logic; there is no memory.
