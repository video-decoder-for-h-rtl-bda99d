# H.264/AVC Main Profile entropy-decoding front end

This RTL decodes the entropy-coded part of an H.264 Main Profile bitstream,
at the rate needed for 1920x1088 video. Its centre is a CABAC decoder that
keeps only **two sets of four context models** in registers and holds the
other 399 models, in 112 groups of four, in a small SRAM. A syntax element
almost always needs just one group. So the decoder loads a group only when
the next bin needs a group that neither register set holds. That costs one
stall cycle; every other bin decodes in one cycle.

Around the CABAC decoder sit the other parts of the bitstream parser that a
Main Profile upgrade of a Baseline decoder needs:

* a 48-bit **line bitstream buffer** (a 16-bit stage in front of a 32-bit
  stage). It replaces a wide circular buffer and its large output
  multiplexers.
* a **two-cycle Exp-Golomb decoder**. It handles the 27-bit codewords that
  1920-wide motion vectors need, using a window only 16 bits wide for the
  zero count.
* a **common info line buffer** with one entry per macroblock column (120).
  The CAVLC and CABAC paths share it, because only one of them is active in
  a stream.

The design follows a master's thesis on a power-efficient Main Profile
decoder. That thesis adds a CABAC decoder to an existing, silicon-proven
Baseline decoder. Only the parts the thesis itself designs are built here.
The reused parts are not: the syntax-element FSM, CAVLC, inverse transform,
intra/inter prediction, deblocking and memory control. Their connections
appear as ports of the top module.

```
             bitstream memory (16-bit words)
                     |
             line_bitstream_buffer ---- 32-bit window, consume count
               |                 |
        expgolomb_dec       cabac_decoder -------- context init ROM (m,n)
       (ue/se, 2 cycles)      |  cabac_ctx_init   (port on the top)
                              |  cabac_ctx_mem  112 x 28 bit
                              |  cabac_ctxinc   bin -> group/slot
                              |  cabac_ae       arithmetic engine
                              |  cabac_lps_lut  rangeLPS / state tables
                              |  cabac_bin_match de-binarisation FSMs
        common_info_line_buffer (120 x 67 + 120 x 9, CAVLC or CABAC words)
```

`h264_parser_top` wires these together. `cabac_pkg` holds the shared types.

## Context model groups and the two register sets

A context model is 7 bits: `{MPS, pState[5:0]}`. Models are stored four to
a 28-bit word. Slot *i* sits in bits `[7i+6:7i]`. A syntax element's
context index increment `ctxIdxInc` picks a group and a slot:

    group = grp_base + ctxIdxInc[3:2]      slot = ctxIdxInc[1:0]

So increments 0-3 share one group, 4-7 the next, and so on. Two pairs get
special placement:

* `prev_intra4x4_pred_mode` and `rem_intra4x4_pred_mode` switch back and
  forth constantly and have one model each. They are placed in one group:
  the requester gives both the same base and different slots.
* In P slices, the `mb_type` prefix (increment 3) and the intra suffix
  (increment 0) use the same model. It is kept with the prefix group.
  `cabac_ctxinc` reads that one bin from the prefix group and the rest of
  the suffix from `grp_base2`.

The thesis does not print the map from syntax elements to the 112 groups.
So a request carries its own group base, and the controller that issues
requests owns the map.

### Request format

The syntax-element controller sends one `cabac_req_t` per element:

| field | meaning |
|---|---|
| `id` | tag echoed with the result |
| `kind` | FLAG, BYPASS, TERM, FL, TU, UEG, MBTYPE_I, MBTYPE_P, SUBMB_P |
| `grp_base`, `grp_base2` | group of increment 0 (and of the P intra suffix) |
| `inc0` | bin-0 increment, already derived from the neighbours |
| `inc1`, `inc_max` | TU/UEG prefix: bin *k* > 0 uses `min(inc1 + k - 1, inc_max)` |
| `cmax`, `k`, `sgn` | FL length or TU/UEG cut-off, Exp-Golomb order, signed value |
| `pre_en`, `pre_grp` | group to preload after a bin-0 miss |

With these fields, every Main Profile element maps to one of the nine
kinds. For example, `mvd` is UEG3 with cut-off 9 and a sign. Its
`inc1`/`inc_max` are 3 and 6. `coeff_abs_level_minus1` is UEG0 with
cut-off 14.

## The pipeline and its timing

`cabac_decoder` has three stages:

1. **LOAD_MEM**: read a group from the context memory into a register set.
   This happens only on a miss.
2. **CTXIDX**: register which set and slot the next bin uses, and the
   decoding mode.
3. **DEC/MATCH**: decode the bin, write the updated model back into the
   register set, and step the matching FSM.

In the DEC/MATCH cycle the decoder also works out the next bin's context.
That is the next bin of this element, or bin 0 of the next request. The
group is compared with both set tags:

* **Hit** in either set: the next bin decodes in the following cycle.
  When it is in the other set, this is a "hit switch" and costs nothing.
* **Miss**: the read goes out at once to the set not in use, which costs
  one stall cycle. The set being left keeps its contents. If it was
  modified, it is written back in the next cycle. A later return to it is
  therefore still a hit.
* **Preload**: if bin 0 of a request misses and the request names a
  `pre_grp`, that group is read into the other set in the following
  (stall-free) cycle. This serves `last_significant_coeff_flag`, which
  follows `significant_coeff_flag`.

This reproduces the thesis's timing chart. Element se0 (3 bins, group 0)
is accepted in cycle 0. se1 (2 bins, group 1) and se2 (1 bin, group 0)
follow:

| cycle | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 |
|---|---|---|---|---|---|---|---|---|---|
| LOAD_MEM | g0 → set 0 | | | | g1 → set 1 | | | | |
| DEC/MATCH | | se0 b0 | se0 b1 | se0 b2 | stall | se1 b0 | se1 b1 | se2 b0 | |
| write-back | | | | | set 0 | | | set 1 | |
| `se_valid` | | | | | se0 | | | se1 | se2 |

The only stalls are cycle 1, for the first group, and cycle 5, for group
1. The return to group 0 in cycle 8 is a hit. `se_valid` is registered, so
it comes one cycle after an element's last bin. `tb_cabac_decoder` checks
these exact cycles and counts: 2 misses, 1 hit switch, 2 write-backs and
6 bins.

A new request is accepted in the cycle the previous element's last bin
decodes. Elements therefore follow each other without a gap.

### Slice start

`slice_init` starts `cabac_ctx_init` and clears both set tags.
`cabac_ctx_init` reads the (m,n) ROM once per cycle at
`table_sel*448 + i` and turns each pair into a model:

    pre = clip(1, 126, ((m * clip(0, 51, SliceQP)) >> 4) + n)
    pre <= 63 : pState = 63 - pre, MPS = 0     else : pState = pre - 64, MPS = 1

Models are collected four at a time in two alternating group registers.
One is written to memory while the other fills. A pass takes about 451
cycles (448 ROM reads plus the pipeline). Then the arithmetic engine loads
its 9-bit offset and the decoder accepts requests.

A terminate bin that decodes as 1 (end of slice, or `I_PCM`) leaves the
engine where the standard leaves it. The controller must pulse
`slice_init` again before more CABAC data.

### Arithmetic engine

`cabac_ae` uses the standard 9-bit range and offset.

* **Decision bin**: `rLPS = rangeTabLPS[pState][range[7:6]]`, taken from
  `cabac_lps_lut`. The offset is compared with `range - rLPS`.
  Renormalisation is done in the same cycle by a leading-zero count, so it
  may take up to 6 new bits from the window.
* **Bypass bin**: compares `2*offset + next bit` with the range.
* **Terminate bin**: subtracts 2 and renormalises by at most one bit.

`consume` reports how many window bits the cycle used.

### Bin matching

`cabac_bin_match` has one small FSM per binarisation, not a lookup on the
whole bin string. So "this element is complete" depends only on the state
and the current bin. This keeps the loop from engine to matcher to next
context short.

The `mb_type` FSM follows the thesis's state chart:

* I slices: states I_bin0 to I_bin6.
* P slices: P_bin0 to P_bin2. A 1 in P_bin0 enters the I chain, and 5 is
  added to the value.

The matcher also gives the position of the next bin (`nxt`). It records
bins 1 and 3, which choose later increments in the `mb_type` tables.

## Line bitstream buffer

The buffer has 48 bits of registers: a 16-bit stage holding the oldest
bits, and a 32-bit stage filled from memory with 16-bit words.

* The output window is the 16-bit stage followed by the top 16 bits of the
  32-bit stage.
* Consuming *n* bits (0-16) shifts both stages left together.
* A word is requested whenever fewer than 16 valid bits remain in the
  32-bit stage, that is, fewer than 32 in total. It is placed directly
  behind the valid bits.
* The window is valid from 32 bits on.

A refill is requested only after the level has dropped, so with a
consumer taking many bits per cycle the window can be invalid for one
cycle. It is never invalid for two in a row when memory answers at once.
`flush` empties the buffer for a jump to a new slice.

## Exp-Golomb decoder

Cycle 1 counts the leading zeros in the window's top 16 bits and consumes
them. Cycle 2 takes the `1` and the N info bits, which are now at the top
of the window, and consumes them. The value, either ue or se mapped, is
registered, so `done` comes three cycles after `start` when the window
stays valid. Codewords of up to 31 bits are handled. Level 4.0 motion
vectors need at most 27. Sixteen zeros raise `err`.

## Common info line buffer

There are two single-port RAMs of 120 entries: a 67-bit data word and a
9-bit type word.

* In CABAC mode the data word is the CABAC top-neighbour info. It is
  passed through unchanged, since its layout belongs to the neighbour logic
  outside this RTL.
* In CAVLC mode the data word holds the top neighbour's luma (20 bits), Cb
  (10 bits) and Cr (10 bits) coefficient counts in bits [39:0].
* The type word is `{cabac_info[2:0], bs_coef[3:0], mb_type[1:0]}` in both
  modes.

Read data appears one cycle after the read. The read port of the mode not
in use shows zero.

## Top-level interface (`h264_parser_top`)

| group | signals | protocol |
|---|---|---|
| bitstream memory | `bs_mem_req`, `bs_mem_valid`, `bs_mem_data[15:0]`, `bs_flush` | word accepted in a cycle with req and valid both high |
| Exp-Golomb | `ue_start`, `ue_sgn` → `ue_busy`, `ue_done`, `ue_err`, `ue_value` | start pulse; result with `done` |
| CABAC control | `slice_init`, `table_sel`, `slice_qp` → `cabac_ready` | ready once init is done |
| init ROM | `rom_rd`, `rom_addr[10:0]` → `rom_data[15:0]` = {m, n} | data one cycle after the address |
| CABAC elements | `req_valid`, `req`, `req_ready` → `se_valid`, `se_id`, `se_value` | valid/ready; result one cycle after the last bin |
| common info buffer | `cib_*` | single-port RAM, `cabac_mode` selects the client |
| counters | `cnt_bins`, `cnt_stall`, `cnt_miss`, `cnt_hit_switch`, `cnt_preload`, `cnt_writeback`, `cnt_bypass`, `cnt_term`, `cnt_refill` | free-running event counts |

The Exp-Golomb decoder takes the bitstream window while it is busy or
starting. Otherwise the window goes to the CABAC decoder. Both never run
at once in a real stream.

The only parameter is `MB_COLS = 120` (1920 / 16), which sizes the line
buffer.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and ends with
`$finish`. Each also has a watchdog. Build a testbench with Verilator 5,
listing the packages first, for example:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
  rtl/cabac_pkg.sv tb/cabac_ref_pkg.sv tb/tb_h264_parser_top.sv \
  --top-module tb_h264_parser_top
./obj_dir/Vtb_h264_parser_top
```

`tb/cabac_ref_pkg.sv` is a plain sequential model of CABAC decoding. It
has a bit array, 448 models, the bit-by-bit renormalising engine and one
procedure per binarisation. The CABAC testbenches compare against it. It
also provides a stand-in (m,n) ROM pattern:
`m = ((a*37+5) mod 91) - 45`, `n = (a*53+11) mod 127`.

| testbench | what it shows |
|---|---|
| `tb_h264_parser_top` | Full size, end to end. Three slices (CABAC, CAVLC, CABAC) with flushes between them and slice restarts after end-of-slice bins. All results are checked. Every mechanism must occur: miss/stall, hit switch, preload, write-back, bypass, terminate, refill, flush, codewords of 27 bits or more, both buffer modes, restart. Also checks bins + stalls against busy cycles. |
| `tb_cabac_decoder` | The timing-chart cycles above, then 3000 random elements of every kind with random bitstream gaps. Checks values, bin count, stream position, and stalls = misses. |
| `tb_cabac_ae` | 20 000 random decision, bypass and terminate bins; the state is compared after each one. |
| `tb_cabac_lps_lut` | All 256 rangeLPS entries and both transition tables. |
| `tb_cabac_ctx_init` | Memory contents after init for several tables and QPs, the 452-cycle bound, and restart while busy. |
| `tb_cabac_ctx_mem`, `tb_common_info_line_buffer` | Random read/write against a shadow array, with one-cycle read latency. |
| `tb_cabac_ctxinc` | Group and slot for every kind and bin position. |
| `tb_cabac_bin_match` | Random values binarised in the testbench and matched back. |
| `tb_line_bitstream_buffer` | Window contents, the refill rule against a tracked fill level, the gap bound, and recovery after a flush. |
| `tb_expgolomb_dec` | 3000 ue/se codes of up to 31 bits, the three-cycle latency, and the error case. |

In the end-to-end run the decoder managed about 0.7 bin per cycle on
random element sequences: about 650 bins and 260 stalls in 920 busy cycles.

## Where this RTL departs from or goes beyond the thesis

* **Tables from the standard.** The thesis does not print rangeTabLPS,
  transIdxLPS, the (m,n) initialisation formula, the per-bin context
  increments or the `mb_type` value mapping. The H.264 standard's versions
  are used. The (m,n) ROM contents (4 x 448 pairs) are not included: the
  ROM is a port, and the testbenches use a stand-in pattern.
* **Neighbour-derived increments** (from the left and top neighbours) are
  computed outside. They arrive in `inc0`. The thesis gives only the sizes
  of the neighbour memory, not its contents.
* **Group map and preload.** The preload is general: any request may name
  a group. The thesis uses it for one pair of elements.
* **Replacement.** On a miss, the group always replaces the set not in use.
* **Binarisations.** All binarisations follow the standard. The
  `sub_mb_type` mapping also matches the thesis's example (3 → `010`).
* **Bypass rule.** The thesis states the bypass rule two ways that
  disagree. The standard rule (bin = 1 when `2*offset + bit >= range`) is
  used.
* **Buffer stage naming.** The thesis's prose and its drawing of the
  bitstream buffer name the stages in opposite order. The drawing is
  followed: memory feeds the 32-bit stage, and the 16-bit stage gives the
  top of the window. The memory word width (16 bits) is a choice.
* **CAVLC word width.** The CAVLC coefficient counts are said to pack to
  60 bits, but their listed widths add up to 40. The listed widths are
  used.
* **Exp-Golomb split.** How the two cycles divide the work is a choice,
  as are the 31-bit maximum and the error flag.
* **Shared window.** How the Exp-Golomb and CABAC decoders share the
  window is a choice.
* **Lint warnings.** The remaining Verilator warnings are unused bits of
  shared structs and debug outputs, plus assertion resets. None is a
  circuit problem.

## Not included

* **Reused decoder parts.** The syntax-element FSM, CAVLC, the rest of
  UVLC (the table mappings), the syntax-element registers, the
  reconstruction path (IQIT, intra and inter prediction, summation,
  deblocking), the pipeline and memory controllers, the frame address
  generator and the other resized line memories all come from the reused
  decoder, and the thesis gives no detail for them.
* **Performance on the thesis's streams.** The thesis reports results on
  1920x1088 test sequences at QP 29. Its standalone CABAC decoder averaged
  0.51 bin/cycle, 72 Mbin/s at 143 MHz. The full decoder ran at 36.2 fps
  in CABAC mode and 38.2 fps in CAVLC mode. Those figures depend on real
  bitstreams and on the parts listed above, so they have not been
  reproduced here. What this RTL guarantees is one bin per cycle on a
  group hit, one stall per miss, and the cycle pattern shown above.
