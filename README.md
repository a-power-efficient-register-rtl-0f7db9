# Partitioned register file with a hardened bank

A small embedded core spends a large share of its datapath energy in the
register file, and the register file is also where most soft errors that
reach the architectural state are born. This design attacks both with one
structure: the 16 architectural registers are split into **two banks**.

* The **protected bank** is built from radiation-hardened SRAM cells (cells
  with added storage capacitance, so a particle strike cannot flip them). Its
  cells cost about 20 % more energy per access than ordinary ones.
* The **unprotected bank** holds the remaining registers in ordinary cells.

Each bank is smaller than a monolithic 16-entry file, so its bit lines are
shorter and an access that touches only one bank costs less. An access that
touches both banks in the same cycle (a *cross access*) costs more. Which
registers go into the protected bank is decided offline, from a profile of
the target program, by a cost function that weighs a register's
vulnerability against its access energy:

    cost(R) = alpha * AVF(R) + (1 - alpha) * (Power(R) + CrossPower(R))

`alpha = 1` protects the registers that hold live values longest; `alpha = 0`
places the most frequently used registers, and those used together, in one
bank to save energy. The hardware only has to honour the result, which is a
fixed register-to-bank map.

The default build is the balanced 8-8 split with registers
0, 4, 5, 6, 7, 8, 9 and 11 protected, the selection the cost function gives a
string-search program at `alpha = 1`. The 2-14 and 4-12 splits and any other
selection are a parameter change.

## Block diagram

```
            en/we/addr/wdata (2 ports, architectural register numbers)
                   |                                   |
          +--------v---------+                +--------v----------+
          | rf_part_decoder  |                | rf_access_monitor |
          | reg -> bank, row |                | A1/A2/A12, ACE    |
          +---+----------+---+                +-------------------+
              |          |                    | rf_access_graph   |
              |          |                    | solo/pair counts  |
              |          |                    +-------------------+
      prot_en |          | unprot_en
   prot_addr  |          | unprot_addr
        +-----v----+  +--v-------+
        | rf_bank  |  | rf_bank  |
        | protected|  | ordinary |
        | PROT_SIZE|  | 16-PROT  |
        +-----+----+  +----+-----+
              |            |
              +--> mux <---+  (per port, by sel_prot)
                    |
                  rdata
```

| File | Role |
|---|---|
| `rtl/prf_pkg.sv` | default sizes, the default protected-register mask, the access-class enum |
| `rtl/rf_bank.sv` | one two-port bank: decoder, array, read path |
| `rtl/rf_part_decoder.sv` | register number to (bank, row), per-bank port enables |
| `rtl/rf_access_monitor.sv` | access-class counters and per-register ACE time |
| `rtl/rf_access_graph.sv` | co-access profile: per-register solo and per-pair joint access counts |
| `rtl/prf_top.sv` | the complete partitioned register file |

## How a register is found

`PROT_MASK` has one bit per architectural register; a 1 puts the register in
the protected bank. At elaboration, `rf_part_decoder` builds a 16-entry table
giving each register its row inside its own bank: its rank among the
registers of the same bank, in register-number order. With the default mask:

| register | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 | 13 | 14 | 15 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| bank | P | U | U | U | P | P | P | P | P | P | U | P | U | U | U | U |
| row  | 0 | 0 | 1 | 2 | 1 | 2 | 3 | 4 | 5 | 6 | 3 | 7 | 4 | 5 | 6 | 7 |

For each port the decoder raises the enable of **only** the bank that holds
the addressed register. A bank port whose enable is low raises no word line
and drives zero on its read bus, so in RTL as in silicon the other bank does
no work for that port. `prot_en` and `unprot_en` are brought out of the top
so that a power model can count bank activations directly.

The mask must name exactly `PROT_SIZE` registers; an assertion at time zero
reports a mismatch.

## The banks

`rf_bank` is a plain two-port register array. Each port has its own decoder
output (one-hot word line) and its own read bus. Each port can read or
write.

* Reads are combinational: the addressed row appears on `rdata` in the same
  cycle. A read and a write of the same row in the same cycle return the old
  value.
* Writes take effect at the rising edge of `clk`.
* If both ports write the same row in one cycle, port 0 wins.
* `rst_n` (asynchronous, active low) clears every row.
* `rdata` is zero when the port is idle or writing.

The protected and unprotected banks are the same module. Cell hardening is
an electrical property of the cell and has no effect at the logic level.

## Measuring what the partitioning optimises

`rf_access_monitor` measures, while a program runs, the two quantities the
register selection trades against each other. It watches the same
`en/we/addr` signals as the register file.

**Access classes (energy).** A two-bank file costs `P1` per access that
touches only bank 1, `P2` per access that touches only bank 2, and `P12` per
access that touches both. Its access energy is

    E = P1*A1 + P2*A2 + P12*A12

Every cycle with at least one port enabled counts once, in exactly one class:

| Counter | Class | Term |
|---|---|---|
| `cnt_prot` | touches only the protected bank | A1 |
| `cnt_unpr` | touches only the unprotected bank | A2 |
| `cnt_cross` | touches both banks | A12 |

`acc_class` gives the class of the current cycle. The per-access energies
depend on the cell library and bank sizes, so the design leaves them to the
user. As a guide: access energy grows roughly linearly with bank size, so for
unequal banks the smaller bank is the cheaper one. Cross accesses cost the
most. Hardened cells add about 20 %.

**ACE time (vulnerability).** A bit flip in a register matters only while
the register holds a value that will still be read. That interval is its
*ACE time* (architecturally correct execution): it runs from a write to the
**last** read before the next write. The time from that last read to the next
write is *un-ACE*. So is the whole interval when a value is overwritten
without being read. A register's AVF (architectural vulnerability factor) is
its ACE time divided by total time.

Getting "last read" right without looking ahead is the subtle part. The
monitor keeps, per register, an open-interval counter that restarts on every
read and on every write. A read adds the open interval to the register's ACE
total. A write only restarts the counter. So each read extends the ACE time
up to itself, and the time after the final read is never added: when the next
write comes, that time is simply dropped. Example: write at cycle 0, reads at
3 and 7, write at 12. The reads add 3 and then 4, so the ACE total is 7. The
cycles from 7 to 12 are un-ACE.

Two edge cases are fixed as follows:
* A read and a write of one register in the same cycle: the read sees the old
  value, so it ends the old lifetime, and the write starts a new one.
* Reset and `mon_clr` count as a write of every register.

Outputs:
* `ace[r]`: the ACE total of register `r`.
* `ace_total`: the sum over all registers.
* `ace_unprot`: the sum over the unprotected registers only. Hardened cells
  are treated as immune.
* `cycles`: the number of cycles observed.

The fraction of vulnerable time the split removes is
`1 - ace_unprot / ace_total`. The average AVF of the unprotected bank is
`ace_unprot / (cycles * (16 - PROT_SIZE))`.

All counters are `CNT_W` (32) bits wide and wrap silently. That is enough
for runs of about 4 x 10^9 cycles.

## Profiling for the next register selection

The register selection is computed offline, from a weighted graph of the
target program's register use:
* Each register (node) is weighted by the number of accesses that use that
  register alone.
* Each pair of registers (edge) is weighted by the number of accesses that
  use both registers together.

The node weight stands in for the register's own access power. The edges to
registers already placed stand in for its cross-access power.
`rf_access_graph` collects this graph from a running system:
* Each cycle, it forms the set of registers the enabled ports address. Reads
  and writes count alike. Two ports naming the same register count once.
* A set of one register increments that register's `solo` counter.
* Every pair in the set increments its `pair` counter.

Pair `(i, j)` with `i < j` is at index `i*16 - i*(i+1)/2 + (j-i-1)`
(`prf_pkg::pair_index`). The 120 pair counters are the largest part of the
design: about 3 800 of its 6 000 flip-flops. A build that does not need
on-chip profiling can drop `rf_access_graph` from `prf_top`.

The static greedy partitioner that consumes the graph works as follows:
1. Start with every register unprotected.
2. Protect the register with the highest AVF.
3. Until the protected bank is full, protect the unprotected register with
   the highest `alpha*AVF + (1-alpha)*(solo + sum of pair counts to
   protected registers)`.

`tb_rf_access_graph` runs this algorithm on counts the hardware collected
for a five-register example. The example's node weights are 83, 45, 62, 24
and 38, and its AVFs are 94, 48, 32, 55 and 64 %. The algorithm protects R1,
then R3, then R2.

## Parameters (`prf_top`)

| Parameter | Default | Meaning |
|---|---|---|
| `NREGS` | 16 | architectural registers |
| `PROT_SIZE` | 8 | registers in the protected bank (2, 4 or 8 in the evaluated splits) |
| `PROT_MASK` | `16'h0BF1` | protected registers, one bit each (0 4 5 6 7 8 9 11) |
| `DATA_W` | 32 | register width |
| `NPORTS` | 2 | register file ports |
| `CNT_W` | 32 | monitor counter width |

Other register selections produced by the cost function for the
string-search profile (all 8-8):

| alpha | protected registers | `PROT_MASK` |
|---|---|---|
| 0 | 0 1 2 3 4 11 12 14 | `16'h581F` |
| 0.1 | 0 1 2 3 4 11 12 13 | `16'h381F` |
| 0.2, 0.3 | 0 1 2 3 4 8 11 12 | `16'h191F` |
| 0.4 to 0.6 | 0 1 4 6 8 9 11 12 | `16'h1B53` |
| 0.7 to 0.9 | 0 4 6 7 8 9 11 12 | `16'h1BD1` |
| 1 | 0 4 5 6 7 8 9 11 | `16'h0BF1` |

For that profile, the energy saving reported for these selections falls from
about 19 % at alpha = 0 to about 12 % at alpha = 1. Over the same range, the
reduction in vulnerability rises from about 46 % to about 65 %.

## What follows the source design and what is this implementation's choice

Taken from the source design:
* 16 registers split into a hardened and an ordinary bank.
* The 2-14, 4-12 and 8-8 splits, with 8-8 as the main configuration.
* The register selections in the table above.
* A two-port register file built from decoder, word lines, bit lines and a
  read path.
* The three access classes of the energy model.
* The definition of ACE and un-ACE time.

Choices of this implementation:
* The 32-bit word.
* Both ports read/write, combinational reads, and port-0 write priority.
* Reset clearing the array.
* The rank order of registers inside a bank.
* Measuring access classes, ACE time and the co-access graph on-line in
  hardware. The source design obtained them from simulation traces.

Not included:
* The partitioning algorithms (static greedy and dynamic greedy). They are
  run in the compiler or after compilation, and their output is `PROT_MASK`.
* The hardened cell itself, which is a circuit-level part.
* The processor core that drives the ports.
* A run-time-programmable map. The register selection is fixed at build time,
  because remapping in hardware would cost the energy the split is meant to
  save.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/prf_pkg.sv tb/tb_prf_top.sv \
          --top-module tb_prf_top -Mdir obj_top
./obj_top/Vtb_prf_top
```

Replace `tb_prf_top` with the testbench you want:

| Testbench | What it checks |
|---|---|
| `tb_rf_bank` | 8-row and 14-row banks against a reference array: same-cycle reads, idle-port zeros, port-0 write priority, reset |
| `tb_rf_part_decoder` | all registers and enable patterns for the 8-8, 4-12 and 2-14 maps; every bank row used exactly once |
| `tb_rf_access_monitor` | the write/read/read/rewrite and write/rewrite cases, then random traffic against a trace-based lifetime model, including a mid-run clear |
| `tb_rf_access_graph` | replays a five-register profile graph and checks every node and edge count, runs the static greedy partitioner on the counts, then checks random traffic |
| `tb_prf_top` | the full register file at its default parameters, 20 000 cycles of program-like traffic; read data, bank enables, all monitor outputs and all profile counters are checked, and every mechanism (each access class, reads from each bank, write conflicts, same-cycle read and write, lifetimes with and without reads, single- and two-register accesses, monitor clear) must occur |
| `tb_prf_configs` | eight register files side by side (2-14, 4-12 and the six 8-8 selections) on the same skewed traffic; prints A1/A2/A12 and the unprotected share of ACE time for each |

Each simulation takes well under a second.

## Limits

* Without a processor, the testbenches drive synthetic traffic rather than
  real programs. The access-class counts and ACE shares that
  `tb_prf_configs` prints describe that traffic only.
* The monitor classifies per cycle. A processor that spreads one
  instruction's register accesses over several cycles would have to combine
  them to match a per-instruction count.
* No register selections are given for the 2-14 and 4-12 splits.
  `tb_prf_configs` uses registers 0 and 4, and registers 0, 4, 5 and 6 (the
  highest-ranked registers of the alpha = 1 selection). These are examples,
  not derived selections.
* The default register selection suits the profile it was derived from. For
  another program, derive a new mask from that program's profile.
