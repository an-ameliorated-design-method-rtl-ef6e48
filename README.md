# Multi-layer AHB BusMatrix without input stages

A multi-layer AHB BusMatrix connects several AHB-Lite masters to several
AHB-Lite slaves so that masters addressing different slaves run in
parallel. The classic BusMatrix puts a register stage, the *input stage*,
behind every master port and arbitrates each slave with a Moore-type state
machine. That costs one clock cycle every time a master starts a
transaction or moves to another slave: the address is first captured in the
input stage, and the arbiter's select output only changes one cycle later.

This BusMatrix drops the input stages and makes each slave's arbiter a
Mealy-type machine, so its master select is a combinational function of the
present requests. A master that addresses an idle slave is routed to it in
the same cycle. An uncontended burst of BL beats then takes BL + 1 cycles,
counted from the first NONSEQ cycle to the end of the last data phase. The
classic structure needs BL + 2, so the gain is 1/(BL + 1): 20 % for INCR4,
11 % for INCR8, 6 % for INCR16. Removing the input stages also removes
most of the registers and 2-to-1 multiplexers in the BusMatrix. Those are
where most of its area and power go.

The price is a small change to the AHB rules for masters and a
non-preemptive arbitration policy. Both are described below, because a
master that ignores them will lose transfers.

## Structure

```
 master 0 ──► bm_decoder ──┐           ┌── bm_output_stage (+ bm_arbiter) ──► slave 0
 master 1 ──► bm_decoder ──┼── NM x NS ┼── bm_output_stage (+ bm_arbiter) ──► slave 1
   ...                     │  crossbar │          ...
 master NM-1 ► bm_decoder ─┘           └── bm_output_stage (+ bm_arbiter) ──► slave NS-1
```

| file | module | role |
|---|---|---|
| `rtl/bm_pkg.sv` | `bm_pkg` | widths (32-bit address and data), `htrans_e`, `hresp_e`, the request bundle `bm_req_t` (HADDR, HTRANS, HWRITE, HSIZE, HBURST, HPROT) and the response bundle `bm_rsp_t` (HREADYOUT, HRESP, HRDATA) |
| `rtl/ahb_busmatrix.sv` | `ahb_busmatrix` | top: one decoder per master port, one output stage per slave port, fully crossed |
| `rtl/bm_decoder.sv` | `bm_decoder` | per master: address decoding, request routing, response selection, DELAY generation, default slave |
| `rtl/bm_output_stage.sv` | `bm_output_stage` | per slave: address/control and write-data multiplexers around the arbiter |
| `rtl/bm_arbiter.sv` | `bm_arbiter` | per slave: Mealy FSM with non-preemptive round robin |

Parameters of `ahb_busmatrix`: `NM` masters (default 4), `NS` slaves
(default 4), and `SLV_LSB` (default 28). The address map is a choice of this
RTL: slave *s* owns every address whose bits [31:`SLV_LSB`] equal *s*. Any
other address goes to a built-in default slave. It answers NONSEQ and SEQ
with the usual two-cycle ERROR, and IDLE and BUSY with a zero-wait OKAY.

Every top-level port is a plain packed array: `req_m[m]`, `hwdata_m[m]`,
`hreadyout_m[m]`, ... for master *m*, and `req_s[s]`, `rsp_s[s]`, ... for
slave *s*. Each slave port also gets `hready_s` (its own HREADYOUT fed back,
as on an AHB-Lite layer) and `hmaster_s`, the number of the master in the
address phase.

## The decoder: DELAY instead of an input stage

The input stage used to hold a master's address while that master waited
for a busy slave. Without it, the master itself must hold its address, so
the decoder has to stall it. `bm_decoder` does this with a **DELAY
response**: HREADYOUT low with HRESP OKAY.

* **Sel.** The request is Sel = HSEL and HTRANS ≠ IDLE and a mapped address.
  It goes to the addressed output stage on `sel_o[port]`. That stage's
  `active_i[port]` bit says whether it has selected this master in this
  cycle.
* **Data-phase registers.** When the master's HREADY is high, two registers
  load Sel and the port number. HREADY here is the decoder's own HREADYOUT.
  While a data phase is open, HREADYOUT, HRESP and HRDATA come straight from
  that slave.
* **With no data phase open.** The decoder answers DELAY if Sel is high and
  Active is low. Otherwise it gives a zero-wait OKAY.

This has one consequence for masters. A master can get a DELAY while the
transfer in its data phase was an IDLE. Plain AHB would require an OKAY
there. So a master must count an address phase as accepted only in a cycle
where HREADYOUT is high, even when the previous transfer was IDLE.

A DELAY must never hide the end of a real data phase. So a master may start
a transaction at a slave it does not already own only when it has no data
phase open: after an IDLE, or at the start. The non-preemptive arbiter
guarantees that a burst's SEQ beats always find their slave owned by that
master. `bm_decoder` has an assertion (`a_no_hidden_dp`) that checks this
rule.

## The arbiter: Mealy, non-preemptive, round robin

`bm_arbiter` has two states:

| state | condition | action |
|---|---|---|
| READY | no request, or HREADY low | none |
| READY | a request and HREADY high | pick a master by round robin, assert its select now, go to ACTION |
| ACTION | the current master still requests | keep selecting it (HREADY does not matter) |
| ACTION | current master stopped; others request; HREADY high | pick a new master by round robin, stay in ACTION |
| ACTION | current master stopped; no request, or HREADY low | go to READY |

HREADY is the slave's HREADYOUT. Round robin uses a mask. Requests from
masters numbered above the current master win first. If there are none, the
lowest-numbered request wins.

**Why the arbiter cannot preempt.** Preemption means taking the slave away
while the current master still requests it. That master's next address
phase would then be left with nowhere to go: no input stage holds it, and
its HREADY was already high. The transfer would be lost. So a master keeps
its slave for as long as it keeps Sel high. To let others in, **a master
must insert at least one IDLE transfer after each transaction.** Masters
that never idle will starve the others. That is the main restriction to
keep in mind when connecting master IP. A wrapper that inserts the IDLE is
not part of this RTL.

## The output stage

`bm_output_stage` steers its address/control multiplexer directly with the
arbiter's combinational select. The selected master's address therefore
reaches the slave in the same cycle. When nothing is selected, the slave
sees HSEL low and HTRANS IDLE. A register loaded on HREADY records which
master owns the data phase, and that register selects the write data. The
slave's response is broadcast to all decoders, and each decoder keeps only
the slave it owns a data phase at.

## Timing

* Address and control pass from a master port to a slave port with no
  register in between. Write data follow one cycle later, as AHB requires.
  All registers are on `clk`, with asynchronous active-low reset `rst_n`.
* Uncontended burst of BL beats with zero-wait slaves: the NONSEQ is
  accepted at the first clock edge, and the burst ends BL + 1 cycles after
  NONSEQ was first driven.
* Two masters starting a BL-beat burst to the same slave in the same cycle:
  one runs without a wait. The other sees BL DELAY cycles. Its NONSEQ is
  accepted in the cycle when the first master drives its closing IDLE. Both
  bursts are done after 2·BL + 1 cycles.
* The combinational path per cycle runs: master address → decoder → arbiter
  → Active → decoder HREADYOUT → master. The clock period has to cover this
  path, because nothing in it is registered.

## Departures and open points

* The address map, the default slave, the 32-bit widths, reset values and
  the extra `hmaster_s` output are this RTL's own choices. HMASTLOCK and
  SPLIT/RETRY handling are not implemented. HRESP is the 2-bit AHB encoding,
  passed through unchanged.
* In the block diagram of the improved decoder, the registers are enabled by
  a separate HREADY input. Here they use the decoder's own HREADYOUT, which
  is the same signal on a one-master layer.
* The output stage is only drawn as a box around the arbiter. Its
  multiplexers are the simplest ones that do the job.
* The mask-based round robin follows the usual scheme. Its exact form in the
  original design is not known.
* The classic BusMatrix with input stages is only a baseline for
  comparison and is not included. The published area, clock period and power
  figures were measured on a Xilinx XCV3000 with a commercial power tool, and
  this RTL reproduces none of them. For reference: 4×4 used 1047 slices at
  10.0 ns with input stages, against 543 slices at 6.5 ns without.

## Simulation

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. To build one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/bm_pkg.sv rtl/*.sv \
    tb/ahb_tb_master.sv tb/ahb_tb_slave.sv tb/tb_ahb_busmatrix.sv \
    --top-module tb_ahb_busmatrix -Mdir obj_top
./obj_top/Vtb_ahb_busmatrix
```

With `--assert`, the assertions in the RTL run in every test. They check
that each arbiter selects at most one master, and only one that is
requesting. They check the decoder's no-hidden-data-phase rule. At every
slave port, they check that an address phase the slave stalls stays in
place, with the same master, until the slave accepts it.

| testbench | what it checks |
|---|---|
| `tb_bm_arbiter` | the arbiter against a reference model of the state table, cycle by cycle; same-cycle grant, hold, round-robin order |
| `tb_bm_decoder` | Sel routing, data-phase responses, DELAY, default-slave ERROR, against a reference model |
| `tb_bm_output_stage` | one requester selected when the slave is free, no preemption, address/control, HMASTER, write-data routing |
| `tb_ahb_busmatrix` | default 4×4 end to end: random SINGLE/INCR4 traffic with read-back checks, lone-master latency of BL + 1, and a count of DELAYs, handovers, non-preemptive holds, parallel accesses, wait states and ERRORs (each must occur) |
| `tb_bm_burst_timing` | exact cycle counts for INCR4/8/16, lone and with two masters on one slave; prints the gain against BL + 2 |
| `tb_bm_sizes` | random traffic through 2×2, 4×4, 6×6 and 8×8 builds side by side |

Models used by the testbenches: `ahb_tb_master` is a random master that
obeys the IDLE-after-transaction rule and checks its reads against a shadow
copy. `ahb_tb_burst_master` is a directed burst master. `ahb_tb_slave` is a
memory slave with random wait states. `bm_tb_env` is one BusMatrix with a
full set of masters and slaves.
