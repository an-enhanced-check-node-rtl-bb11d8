# Layered LDPC decoder for 5G NR with a multi-phase check-node unit

The LDPC codes of 5G New Radio are very irregular. In base graph 2 (BG2), the
42 rows of the base matrix have check-node degrees between 3 and 10, and most
rows have degree 4 or 5. Only two rows have degree 10. In base graph 1 the
largest degree is 19, but only 4 of its 46 rows reach it.

A conventional layered decoder sizes its check-node units (CNUs) for the
largest degree. It also sizes every per-edge unit that feeds and drains them:
barrel shifters, variable-node units, saturators and APP adders. Most of that
hardware then idles in most layers.

This design sizes the datapath for a smaller degree instead: DC = 6 edges per
cycle, against a largest degree of 10. A layer with more edges than DC is
processed in several *phases* of DC edges. Each CNU keeps its partial result
between phases: the first minimum, the index of that minimum, the second
minimum and the signs. The per-edge hardware shrinks roughly by DC/dc_max
(6/10 here). Only the few high-degree layers pay for this, with two extra
cycles per extra phase.

A second feature is the **selective offset**. The offset of the offset
min-sum (OMS) algorithm is applied only on the first four layers. These are
the kernel rows, whose variable nodes all have high degree. All other layers
run plain min-sum. The choice is made once per layer and broadcast to all Z
CNUs.

The reference configuration is a BG2 decoder with lifting size Z = 52
(for example K = 520, N = 2080, rate 1/4) and up to 15 iterations.

## Decoding algorithm

Layered offset min-sum decoding works as follows. For each layer *l* (one
row of the base matrix, lifted to Z check nodes) and each check node *m* of
that layer:

```
v[n]      = APP[n] - c2v_old[m][n]                 (VNU, full precision)
vs[n]     = clip(v[n], -7, +7)                     (SAT)
min1, idx = smallest |vs[n]| and its edge (lowest edge wins ties)
min2      = smallest |vs[n]| over the other edges
lambda    = 1 if l < 4 else 0                      (selective offset)
c2v[m][n] = sign(prod vs) * sign(vs[n]) * max((n == idx ? min2 : min1) - lambda, 0)
APP[n]    = clip(v[n] + c2v[m][n], -63, +63)       (APP update)
```

One iteration visits every layer once. Decoding stops after the first
iteration whose hard decisions form a codeword, or after `it_max`
iterations.

## The multi-phase CNU (`cnu`)

A check node of degree d takes P = ceil(d/DC) phases. Phase k carries edges
k·DC … k·DC+DC-1, and slots beyond the degree are masked. Each phase passes
through two pipeline stages:

* **Stage A, the cycle the phase's inputs arrive.** This stage finds the
  smallest magnitude among the DC inputs and its slot. It merges them into
  the stored min1 and index (the new value wins only if it is strictly
  smaller, so earlier edges win ties). It XORs the input signs into the sign
  parity and stores every input sign.
* **Stage B, the next cycle.** This stage finds the phase's local min2: the
  smallest magnitude except at the local min1 slot. It merges it into the
  stored min2:
  * if the phase's min1 beat the old min1, the new min2 is
    min(old min1, local min2);
  * otherwise the new min2 is min(old min2, local min1).

Stage A of phase k+1 overlaps stage B of phase k. When the last stage B
finishes, the registers hold exactly what a DCMAX-input CNU would have
computed.

In the cycle of the last stage B, `final_valid` is 1 and the final min2 is
available combinationally. After that cycle it comes from the register. For
the phase selected by `o_phase`, the output stage forms DC new messages: the
magnitude is min2 at the min1 edge and min1 elsewhere, minus the offset,
floored at 0. The sign is the parity XOR the edge's own sign. The output
stage also produces the compressed record (`c2v_rec_t`) that goes to the
message memory.

### Layer schedule (`decoder_ctrl`)

Layers are not overlapped. A layer of P phases takes 2P cycles:

| cycle c       | read port        | CNU                    | APP / memory write       |
|---------------|------------------|------------------------|--------------------------|
| 0 … P-1       | phase c (search) | stage A of phase c; stage B of phase c-1 | –      |
| P             | phase P-1        | last stage B (final)   | APP of phase P-1         |
| P+1 … 2P-1    | phase c-P-1      | output only            | APP of phase c-P-1; CN record written at c = 2P-1 |

Take P = 1 (degree ≤ 6). Cycle 0 reads and searches. Cycle 1 finds min2 and
writes the new APP values, so the layer takes 2 cycles.

Take P = 2 (degree 7–10). Cycles 0 and 1 search, and cycle 2 finishes and
updates phase 1. Cycle 3 reads phase 0 again and updates it, so the layer
takes 4 cycles.

The earlier phases are not buffered. They are re-read from the APP memory,
which does not change during the layer because the edges of a layer lie in
distinct columns. The old CN messages are re-expanded from the CN message
memory, which is written only in the last cycle of the layer.

Cycles per iteration = 2L + σ, where σ = 2·Σ(P_l − 1). For the 42 rows of
BG2 with DC = 6, the four rows of degree 8 and 10 need two phases, so
σ = 8 and an iteration takes 92 cycles instead of 84. Throughput is
θ = N·f / (it·(2L + σ)), where *it* is the number of iterations run.

## Datapath (`ldpc_decoder`)

```
          +-----------+   DC columns   +----+   +-----+   +-----+   Z x CNU
host ---> |  app_mem  | -------------> | BS | ->| VNU | ->| SAT | ---------+
 LLRs     | NCOL x Z  |                +----+   +-----+   +-----+          |
          |           | <---- nBS <---- APP update <-- VNU result         |
          +-----------+                    ^                              |
                                           +------ new messages ----------+
  c2v_mem (per layer, Z compressed records) --> old messages --> VNU
  layer_table (degree, columns, shifts) --> slot addressing, BS/nBS shift
  offset_ctrl (layer) --> lambda --> all CNUs
  stop_check <-- APP signs read / written
```

* **Edge slots.** There are DC edge slots. In phase p, slot s serves edge
  p·DC+s of the current layer. Its block column and shift come from
  `layer_table`.
* **Shift convention.** A base-matrix entry with shift s connects row r to
  column (r + s) mod Z. The BS produces `row[r] = col[(r+s) mod Z]`, and the
  nBS undoes it. The host stores each shift already reduced modulo Z.
* **`app_mem`.** It stores APP values in column order, built from flip-flops
  with DC combinational read ports and DC write ports. The host loads 4-bit
  channel LLRs (sign-extended) one block column per cycle. It reads back
  hard decisions (sign bits) one column at a time.
* **`c2v_mem`.** It keeps one record per check node: min1 and min2 (offset
  already applied), the index of min1 and DCMAX sign bits, 20 bits in all.
  Per-layer valid bits are cleared when decoding starts, so the first
  iteration sees zero messages without clearing the array.
* **`stop_check`.** It tests for a codeword without a separate syndrome
  pass. In each layer's search cycles it XORs the APP sign bits of every row
  across the phases, and each row must end even. In the update cycles no APP
  sign may change. If both hold for a whole iteration, every check was
  evaluated on the same hard-decision vector, so that vector is a codeword.

### Number formats (`ldpc_pkg`)

| quantity            | bits | range      |
|---------------------|------|------------|
| channel LLR         | 4    | −7 … +7    |
| VN↔CN message       | 4    | −7 … +7    |
| APP value           | 7    | −63 … +63  |
| VNU output (internal)| 8   | full range |

A positive value means bit 0. These widths are choices of this design. Only
the use of a quantized OMS decoder with integer offset 1 is fixed by the
architecture.

## Parameters

| parameter (module `ldpc_decoder`) | default | meaning |
|---|---|---|
| `Z`           | 52 | lifting size, number of parallel CNUs |
| `DC`          | 6  | CNU inputs = edges processed per cycle |
| `NCOL`        | 52 | block columns held in the APP memory (BG2 has 52) |
| `NLAYER`      | 42 | layers held in the table and the message memory (BG2 has 42) |
| `NOFF_LAYERS` | 4  | layers 0 … NOFF_LAYERS−1 get the offset |
| `OFFSET`      | 1  | offset value |
| `ITW`         | 5  | width of `it_max` / `iters` |

Package constants: `DCMAX = 10` (largest layer degree), `COLW = 6`,
`SHW = 9`, and the number formats above. BG1 needs 46 layers, degree 19 and
68 columns. To decode it, raise `NLAYER` to 46, `DCMAX` to 19, `COLW` to 7
and `NCOL` to 68.

## Using the decoder

All host ports are synchronous and used only while `busy` = 0:

1. Write each base-matrix row with `tbl_we`, `tbl_layer` and `tbl_data`.
   `tbl_data` holds the degree, up to 10 block columns and the shifts mod Z,
   with edges in any order, and gives one entry per layer.
2. Load the channel LLRs, one block column per cycle, with `ld_en`, `ld_col`
   and `ld_data` (Z × 4 bits).
3. Set `num_layers` and `it_max`, then pulse `start` for one cycle.
4. Wait for the one-cycle `done` pulse. `success` and `iters` then stay valid
   until the next start.
5. Read the hard decisions with `hd_col`; `hd_bits` is combinational.

The base matrices of the 3GPP specification (TS 38.212) are not included.
Write the rows of the wanted graph, with shifts reduced for the lifting size
in use.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=… failures=…` and has a cycle watchdog.

* `tb_ldpc_decoder` runs end to end at the default parameters. It uses a
  synthetic 42-layer code with BG2's degree profile, with columns and shifts
  from a formula given in the file. It decodes eight noisy all-zero
  codewords at several noise levels. An integer reference model in the
  testbench predicts every hard decision, the success flag and the number of
  iterations. The cycle count must equal iterations × 92. The test also
  checks that two-phase layers, the offset, message and APP saturation,
  early stops and it_max stops all occur.
* `tb_ldpc_decoder_n2080` runs a code the size of the reference
  configuration. It has 42 block columns, and columns 0 and 1 are punctured
  (their channel LLRs are 0). That gives N = 2080 and K = 520. It uses 32
  layers (`num_layers` = 32) and it_max = 15. An iteration takes 72 cycles:
  2·32 plus 8 for the four kernel rows of degree 8 and 10. At 204 MHz with
  all 15 iterations, that is 2080·204 MHz / (15·72) ≈ 393 Mb/s. Early
  termination raises this in proportion to the iterations saved.
* `tb_ldpc_decoder_dc_sweep` builds the decoder with DC = 3, 4, 5, 6 and
  10 and decodes the same frames. Every width must give identical results:
  the phase split is exact. For the BG2 degree profile, the cycles per
  iteration are:

  | DC | cycles per iteration | throughput vs. DC = 10 | per-edge hardware |
  |----|----------------------|------------------------|-------------------|
  | 3  | 168                  | 0.50                   | 0.3               |
  | 4  | 120                  | 0.70                   | 0.4               |
  | 5  | 98                   | 0.86                   | 0.5               |
  | 6  | 92                   | 0.91                   | 0.6               |
  | 10 | 84                   | 1.00                   | 1.0               |

* `tb_cnu` feeds random check nodes of degree 2–10 with random offsets and
  checks all outputs, the record and the phase timing.
* `tb_decoder_ctrl` checks the whole cycle-by-cycle schedule and the stop
  decisions.
* The remaining testbenches check each block alone: exhaustive tests for
  `vnu`, `sat` and `app_update`; every shift for the BS and nBS; and
  shadow-model tests for `app_mem`, `c2v_mem`, `layer_table`, `stop_check`
  and `offset_ctrl`.

The top module also carries two assertions. The host may load or write
the table only while the decoder is idle. Every CNU must finish its search
exactly in the first update cycle of each layer.

Run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wall -Wno-fatal --top-module tb_ldpc_decoder \
    -y rtl -y tb +libext+.sv -Irtl rtl/ldpc_pkg.sv tb/tb_ldpc_decoder.sv
./obj_dir/Vtb_ldpc_decoder
```

The end-to-end test builds in about half a minute and runs in well under a
second.

## How far to trust it, and what differs from the published architecture

* **Taken from the published architecture:**
  * the phase split of the CNU;
  * the stored min1, index and min2;
  * one cycle for min1 and index and one for min2;
  * one additional update cycle per extra phase;
  * 2 cycles per single-phase layer;
  * the selective offset (λ = 1 on the first four layers only);
  * the set of per-edge units (SAT, VNU, BS, nBS, APP) attached to each CNU
    input;
  * DC = 6 with Z = 52 for BG2.
* **Choices of this design:**
  * all number formats;
  * storing the input signs inside the CNU;
  * the compressed message memory;
  * re-reading earlier phases from the APP memory instead of buffering them;
  * the order of the update cycles;
  * the on-the-fly stopping test;
  * flip-flop memories;
  * the host interface.
* **Throughput.** The published throughput figures (1.285 Gb/s at 204 MHz,
  N = 2080, 15 iterations) imply about 22 cycles per iteration. That does
  not match 2 cycles per layer over the rows of BG2. This design follows the
  2-cycles-per-layer rule, which gives 92 cycles per full-BG2 iteration.
* **Not included:** the actual BG1/BG2 shift tables, support for several
  lifting sizes in one instance (Z is a parameter), and pipelining between
  consecutive layers.
* **Codes used in testing.** The decoder has been checked against a
  bit-exact reference model on synthetic codes, not on the 3GPP graphs. The
  all-zero codeword is valid for any code, so this checks the arithmetic and
  the schedule, but not error-rate performance.
