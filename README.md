# Aging-aware integer register file with narrow-value gating and duty-cycle balancing

## The problem

A pMOS transistor ages (NBTI: its threshold voltage creeps up) while its gate
sits at logic 0, and it partly recovers while it sits at 1. In a 64-bit integer
register file, most values are small: their top 30 bits are a sign extension,
and for typical integer code nearly always zeros. The storage cells of those
top bits therefore hold 0 almost all the time, and they age much faster than
the rest of the array. Their wear sets the lifetime guardband of the whole
register file.

## The idea

Each register entry is split into two halves:

| half  | bits    | width |
|-------|---------|-------|
| lower | 33..0   | 34    |
| upper | 63..34  | 30    |

Each entry also gets one *narrow-width flag* bit.

* A result is **narrow** when bits 63..33 are all zeros or all ones. Such a
  value equals the sign extension of its low 34 bits. Only its lower half is
  stored, and the flag is set. The upper half of a narrow entry is not written
  and not read. Its wordlines are gated by the flag, which is the power saving.
* On a read of a narrow entry, the Execute stage rebuilds the 64-bit operand by
  copying bit 33 into bits 63..34. It does this with a flag-controlled mux in
  front of the ALU. A wide entry is read in full.
* Because the upper half of a narrow entry holds nothing that is ever read, it
  can be overwritten freely. Every 40,000 cycles, all narrow entries have their
  upper half rewritten with a constant pattern. That pattern is all ones, then
  all zeros, and so on. Over time these idle cells spend about half their life
  at 0 and half at 1, so their NBTI stress is balanced. The rewrite stores a
  constant through the flag-gated wordline. It needs no XOR or read-modify-write,
  and it never lies on a read path.

Nothing is done about the lower half. Its duty cycle is whatever the program's
data gives it.

## Block diagram

```
 results from the           +--------------------- aarf_top ----------------------+
 functional units           |                                                     |
 wr_en/addr/data  ----+---->|  narrow_detect (x NUM_WR) --wr_narrow-->            |
                      |     |                                     aarf_regfile    |
                      +-----|-------------------------------->  +-------------+   |
                            |  flip_timer --flip_req/flip_val-> | upper 30b   |   |
 rd_en/rd_addr  ----------->|                                   | flag 1b     |   |
                            |                                   | lower 34b   |   |
                            |                                   +------+------+   |
                            |                 rd_data (flag, hi, lo)   |          |
                            |       ------------- RR/EX register ------+          |
                            |       ex_operand_path (x NUM_RD):                   |
 ex_byp_sel/ex_byp_data --->|         flag ? {30{lo[33]}} : hi ; bypass mux  -----|--> ex_operand
                            +-----------------------------------------------------+
```

## Modules

| file | role |
|------|------|
| `rtl/aarf_pkg.sv` | widths (64 = 30 + 34) and the `rf_read_t` read-result struct |
| `rtl/narrow_detect.sv` | leading-0/1 detector: narrow = bits 63..33 all equal |
| `rtl/aarf_regfile.sv` | split storage, flag column, gated upper wordlines, flip write |
| `rtl/flip_timer.sv` | interval counter; emits `flip_req` and the current pattern `flip_val` |
| `rtl/ex_operand_path.sv` | Execute stage: sign-extension mux, then bypass mux |
| `rtl/aarf_top.sv` | wires it all together with a register-read / Execute pipeline register |

Top-level parameters (`aarf_top`):

| parameter | default | origin |
|-----------|---------|--------|
| `NUM_REGS` | 80 | integer register count of the reference core |
| `NUM_RD` | 8 | own choice: 2 source operands for each of 4 instructions per cycle |
| `NUM_WR` | 4 | own choice: one result for each of 4 instructions per cycle |
| `FLIP_INTERVAL` | 40000 | the published flip interval, in cycles |

## Timing and behaviour in detail

* **Write (cycle t).** `narrow_detect` classifies `wr_data` combinationally. At
  the clock edge the lower half and the flag are written. The upper half is
  written only for a wide value, and `wr_hi_en` shows when that happens. Two
  ports may not write the same entry in one cycle, and an assertion checks this.
* **Read (cycle t → t+1).** The read is combinational from the stored state, so
  a value written in cycle t is visible from cycle t+1. `rd_hi_en` is high only
  for a wide entry. A gated upper half reads as zero. The result is registered,
  and in cycle t+1 `ex_operand` carries the rebuilt value, or `ex_byp_data`
  when `ex_byp_sel` is set. `ex_valid` follows `rd_en` with one cycle of delay.
* **Flip.** `flip_timer` counts from reset release. At the end of every
  `FLIP_INTERVAL` cycles it pulses `flip_req` for one cycle, with `flip_val`
  already toggled. The first flip writes ones. In that cycle every entry whose
  flag is set *after* that cycle's writes gets `{30{flip_val}}` in its upper
  half, and `flip_we` shows which entries these are. A wide write in the same
  cycle wins for its own entry, and a narrow write in that cycle is flipped as
  well. All narrow entries are flipped in one cycle.
* **Reset** (asynchronous, active low) clears every entry to zero and sets its
  flag, since zero is a narrow value. The flip pattern starts at zero.
* **A stale upper half.** When a wide entry is overwritten by a narrow value,
  its upper half keeps the old wide bits until the next flip. Those bits are
  never read. They simply take part in the duty-cycle average.

## Where this RTL makes its own choices

These points follow from the published design's intent but are not specified by it:

* The read and write port counts.
* The use of flip-flops with an asynchronous read in place of an SRAM array
  with precharged bitlines. "Gated" here means not written, or read as zero,
  and the `*_hi_en` outputs expose the wordline activity.
* Flipping all narrow entries in a single cycle. A real array might spread this
  over several cycles; at one flip per 40,000 cycles the cost is negligible
  either way.
* Treating bit 33 as part of the narrow test. Without it, sign extension would
  corrupt positive 34-bit values that have bit 33 set.
* One bypass input per operand. The bypass network and the ALU themselves are
  outside this design.
* The reset contents.

The surrounding out-of-order core (issue queues, caches, ALUs) is not included.
The register file's ports are the interface to it.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_narrow_detect` | detector against a signed range test, boundaries ±2^33 and every leading-bit length |
| `tb_flip_timer` | pulse cycles and pattern, at interval 7 and at the default 40,000 |
| `tb_ex_operand_path` | rebuild and bypass against signed-cast arithmetic |
| `tb_aarf_regfile` | all read outputs, gating enables, flipped-entry set and the physical upper cells, against a model, under random traffic and flips |
| `tb_aarf_top` | end to end with a 64-cycle interval; counts and requires narrow and wide writes, gated and full reads, negative sign extension, bypass, flips to ones and to zeros |
| `tb_aarf_full` | all defaults, 160,000 cycles of a 96%-narrow write stream; checks every operand and the duty cycle |

`tb_aarf_full` measures the fraction of cell-cycles at 0 in the upper 30 bits.
It measures this for the design and for a plain register file holding the same
values. On its synthetic stream the plain file holds 0 about 93% of the time,
and this design about 50%; the test requires 45–55%. About 96% of reads skip
the upper half. These numbers come from a synthetic value mix, not from real
programs.

Running one testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl --top-module tb_aarf_top \
    rtl/aarf_pkg.sv tb/tb_aarf_top.sv -o sim && obj_dir/sim
```

Lint reports `SYNCASYNCNET`, because `rst_n` serves both as the asynchronous
reset and as the `disable iff` of the write-conflict assertion. It also reports
`UNUSEDSIGNAL`, because the detector looks only at bits 63..33. Both are
expected.
