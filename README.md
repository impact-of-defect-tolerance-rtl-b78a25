# Mesh-of-Clusters SRAM FPGA fabric with local defect-tolerance redundancy

This is synthesizable SystemVerilog for the programmable interconnect and
logic of a *Mesh-of-Clusters* FPGA. The fabric can be built with several
kinds of hardware redundancy that let configuration software route around
defective interconnect multiplexers.

The starting point is a criticality analysis of the interconnect. In every
Mini Switch Box (MSB), each output is an N:1 multiplexer. A multiplexer is more
*critical* when many logic blocks depend on it and few alternative paths
bypass it. By that measure, the multiplexers of the *upward* boxes (UMSB)
are the most critical. These collect CLB or cluster outputs, so losing one
cuts a logic block off from the network. Next come the multiplexers of the
cluster's *downward* boxes (DMSB), which feed the CLB inputs. Redundancy is
therefore not spread uniformly. Each **Local Redundancy Strategy** (LRS)
combines one technique for the DMSBs with, possibly, one for the UMSBs. The
default build is **LRS2**: Adapted Fine Grain Redundancy on the DMSBs and
Upward Redundant Multiplexers on the UMSBs. The published evaluation found
LRS2 the best balance of defects tolerated, area and delay.

Everything is parameterised. The defaults are those of the studied device:

| parameter | default | meaning |
|---|---|---|
| `NX`, `NY` | 36, 36 | clusters per row / column |
| `CW` | 36 | channel tracks into (and out of) each switch box, 9 per side |
| `N_CLB` | 10 | CLBs per cluster |
| `K` | 4 | inputs per CLB (4-input LUT) |
| `N_IN` | 24 | cluster inputs, 6 from each corner switch box |
| `N_OUT` | 12 | cluster outputs, 3 to each corner switch box |
| `RED` | `LRS2` | redundancy techniques built in (`moc_pkg::redund_t`) |
| `N_URM` | 1 | spare multiplexers per UMSB when URM is built |

## The mesh (`moc_fpga`)

```
   SB ===== SB ===== SB        SB  switch box (sbox), at every grid corner
   ||  \  / ||  \  / ||        CL  cluster, in every grid cell
   ||   CL  ||   CL  ||        ==  channel: 9 tracks each way per side
   ||  /  \ ||  /  \ ||        \/  6 inputs from and 3 outputs to each
   SB ===== SB ===== SB            of the cluster's four corner switch boxes
```

There are `NX*NY` clusters and `(NX+1)*(NY+1)` switch boxes. Cluster (i,j)
has switch box (i,j) at its south-west corner. Its corner `c` (0 SW, 1 SE,
2 NW, 3 NE) is switch box `(i + c%2, j + c/2)`. From that switch box's point
of view the cluster is quadrant `3-c`. Two clusters exchange signals only
through a switch box they share, or along channel tracks.

A switch box has 36 incoming and 36 outgoing tracks. Track `t` is on side
`t/9` (0 N, 1 E, 2 S, 3 W), and its number within the side is `t%9`.
Outgoing track `k` of side E of box (x,y) is incoming track `k` of side W of
box (x+1,y), and similarly for the other sides. Tracks that leave the array
are the pins: `n_in/n_out[x]`, `s_in/s_out[x]`, `e_in/e_out[y]` and
`w_in/w_out[y]`, one 9-bit vector per edge switch box.

## Inside a cluster (`cluster`)

```
 in[6q+5:6q] (corner q) --> [AFGR levels, common to all DMSBs] --+
                                                                 v
   UMSB outputs of corner q (3 feedbacks) -----------------> DMSB q (10 Md, 9:1)
                                                                 | Md c -> input q of CLB c
                                               CLB 0..9 (LUT4 + optional FF)
                                                                 |
                                  UMSB (12 Mu, 10:1) + URM spare --+--> out[3c+2:3c] (corner c)
```

* DMSB `q` drives input `q` of every CLB. It sees the six inputs of corner `q`
  and three feedback lines: the UMSB outputs that leave through the same
  corner.
* The UMSB has one 10:1 multiplexer (Mu) per cluster output. Every output
  also returns into a DMSB, so CLBs can be chained inside the cluster.
* A CLB is a 16-bit LUT (a 16:1 multiplexer whose data are configuration
  bits and whose select is the CLB input vector). It is followed by a
  flip-flop that one configuration bit switches into the output path.

## Inside a switch box (`sbox`)

* **UMSB2** (3 boxes × 3 lines). Each line is a 12:1 multiplexer over the
  outputs of the four adjacent clusters (3 each). The 9 lines are called
  `s[0..8]`.
* **DMSB2** (9 boxes). Box `k` sees incoming tracks `4k..4k+3` and line
  `s[k]`. It has four 5:1 multiplexers. Lane `l` drives outgoing track
  `(4k+l+18) mod 36`, which is half-way round the box. A signal can
  therefore continue straight or turn a corner. Each lane also feeds the
  DMSB1 level. A DMSB2 multiplexer thus has two loads, and a cluster output
  (through `s[k]`) reaches the channels this way.
* **DMSB1** (one per adjacent cluster). Box `j` sees lane `j` of every DMSB2
  and drives the six inputs of the cluster in quadrant `j`.

## Redundancy techniques as built

| technique | where | what is added | what it lets the router do |
|---|---|---|---|
| AFGR (`afgr_stage`) | ahead of the cluster DMSBs; between DMSB2 and DMSB1 | two rows of 2:1 muxes: line *i* takes *i* or *i+1*, then *i* or *i−1* (wrapping) | move a signal to a neighbouring line, also across DMSB boundaries, when the multiplexer it would use is defective |
| URM (`umsb`) | every UMSB / UMSB2 | `N_URM` spare multiplexers seeing the same inputs, plus a (1+`N_URM`):1 selector on each output | replace any one defective Mu by a spare |
| DF | cluster DMSBs; switch box DMSB1 | cluster: all 12 UMSB outputs reach every DMSB (9 extra Md inputs); switch box: all `s` lines reach every DMSB1 | bring a feedback in through another DMSB |
| FGR (`msb`) | cluster DMSBs and switch box DMSB1 | two rows of 2:1 output muxes after the Mds: output *j* can come from Md *j−1*, *j* or *j+1* | shift the outputs of a defective Md to a neighbour |
| IFGR (`msb`) | same as FGR | FGR with a second, separate output driver per Md | as FGR, and survive a defect on one of the two drivers |

| strategy | FGR | IFGR | AFGR | DF | URM |
|---|---|---|---|---|---|
| `LRS1` | | | | x | x |
| `LRS2` (default) | | | x | | x |
| `LRS3` | | x | x | | |
| `LRS4` | | x | | x | |
| `LRS5` | x | | | | x |

The published evaluation of these strategies (20 MCNC benchmarks on the
36×36 array, random stuck-open defects) reports the following. LRS1 and
LRS4 bypass up to about 47% of defective multiplexers at about +52% area.
LRS2, LRS3 and LRS5 bypass about 38% at +21% to +31% area. LRS2 does so
with +9.7% critical-path delay. The redundancy is inert logic until the
configuration uses it: with its configuration bits at 0, each technique
behaves as a plain wire or as the original multiplexer.

## Configuration

Every tile (cluster or switch box) has its own configuration SRAM
(`cfg_mem`). Its bits are continuously visible to the logic. It is written
32 bits at a time:

* `cfg_we` high for one rising edge;
* `cfg_tile`: cluster (i,j) is tile `j*NX + i`; switch box (x,y) is tile
  `NX*NY + y*(NX+1) + x`;
* `cfg_addr`: word inside the tile, bit `w*32` upwards;
* `cfg_wdata`: the word.

`rst` clears all configuration. In that state every LUT outputs 0 and no
track is connected to any other. Keep `hold` high while writing, and release
it when the configuration is complete. `hold` forces every CLB output to 0
and clears the CLB flip-flops. A half-written configuration therefore
cannot form an oscillating loop.

Multiplexer selects are binary indices; a select past the last input gives 0.
Layout of a cluster at the defaults (LRS2, 442 bits = 14 words), least
significant bit first:

| bits | field |
|---|---|
| 0–23 | AFGR level 1, line *i* takes input *i+1* |
| 24–47 | AFGR level 2, line *i* takes level-1 line *i−1* |
| 48 + 40q + 4c | DMSB q, select of the Md feeding CLB c: 0–5 = input 6q..6q+5 (after AFGR), 6–8 = UMSB outputs 3q..3q+2 |
| 208 + 4j | UMSB Mu j: CLB index |
| 256 | URM spare: CLB index (4 bits) |
| 260 + j | output j takes the spare instead of Mu j |
| 272 + 17c | CLB c: 16 LUT bits (bit *v* is the output for input vector *v*, input *q* = bit *q*), then the register-select bit |

Layout of a switch box at the defaults (333 bits = 11 words):

| bits | field |
|---|---|
| 19u + 4p | UMSB2 u, Mu of line `s[3u+p]`: index into the 12 cluster outputs (quadrant j at 3j..3j+2) |
| 19u + 12 | UMSB2 u URM spare select (4 bits) |
| 19u + 16 + p | line `s[3u+p]` takes the spare |
| 57 + 12k + 3l | DMSB2 k lane l: 0 = `s[k]`, 1–4 = incoming track 4k..4k+3 |
| 165 / 201 | AFGR levels 1 / 2 on the 36 DMSB2 lanes |
| 237 + 24j + 4o | DMSB1 j output o (input o of cluster j): index k of DMSB2 k's lane j |

With other strategies the fields move. The offsets are the `localparam`s
`O_*` at the top of `cluster.sv` and `sbox.sv`, and the order is described
in each module's header. At the defaults the whole array holds 1,028,709
configuration bits.

A valid configuration must not close a combinational loop except through a
CLB whose flip-flop is selected. The fabric is structurally cyclic, as every
FPGA is. Lint tools therefore report combinational loops through the
UMSB → DMSB → CLB feedback and through chains of switch boxes; these
reports are expected.

## Files

| file | content |
|---|---|
| `rtl/moc_pkg.sv` | `redund_t`, the strategy constants `LRS1..LRS5`, configuration port widths |
| `rtl/moc_fpga.sv` | top: the mesh |
| `rtl/cluster.sv`, `rtl/sbox.sv` | the two tiles |
| `rtl/msb.sv`, `rtl/umsb.sv`, `rtl/afgr_stage.sv` | switch boxes and redundancy levels |
| `rtl/clb.sv`, `rtl/cfg_mux.sv`, `rtl/mux2.sv`, `rtl/cfg_mem.sv` | CLB, N:1 multiplexer, 2:1 multiplexer, configuration SRAM |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_lrs_cluster.sv`, `tb/tb_lrs_sbox.sv` | every strategy LRS1..LRS5 (and none) on a cluster and a switch box |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself.
Example with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    --top-module tb_moc_fpga rtl/moc_pkg.sv tb/tb_moc_fpga.sv
./obj_dir/Vtb_moc_fpga
```

`tb_moc_fpga` runs the mesh end to end on a 2×2 array. It configures four
switch boxes and two clusters through the configuration port. It then runs
an XOR of two pins through a cluster (one input moved by AFGR, the output
Mu replaced by the URM spare, a switch-box UMSB2 line served by its spare).
A registered copy of that XOR is read back through the UMSB feedback and
sent through a shared switch box into a second cluster. That cluster
inverts it, and the result travels along a channel track to a pin. The
testbench counts each of these mechanisms and fails if one never occurs.
Set the testbench's `NX`/`NY` localparams to run it on a larger array. The
largest array simulated is 8×8, where the same test passes and the build
takes about a minute. The full 36×36 array has not been simulated. Verilator
needs about 17 minutes and 10 GB just to lint it, and a simulation build is
larger still.

## How far to trust it, and where it departs from the source architecture

The source defines the architecture at block level. The following come from
it: the mesh of clusters and switch boxes, the cluster's DMSB/CLB/UMSB
organisation, the two DMSB levels and the UMSB of the switch box, the sizes
above, the redundancy techniques and the five strategies. The following are
this design's own choices, and another reading is possible:

* the exact wiring inside a switch box: which DMSB2 lane drives which
  outgoing track, how UMSB2 lines and DMSB2 lanes are distributed, one
  DMSB1 per adjacent cluster;
* which feedbacks a DMSB sees without DF (those of its own corner), and the
  source of the DF lines (all UMSB outputs);
* the direction of the AFGR and FGR shifts and their wrap-around at the
  ends;
* the CLB beyond "4 inputs": a LUT4 with an optional flip-flop;
* the configuration port, tile addressing, `hold`, and the binary select
  encoding;
* one URM spare per UMSB (`N_URM = 1`), as the architecture drawings show.
  The published criticality table would correspond to more spares; change
  `N_URM` to build them.

Known differences and omissions:

* A defect (a multiplexer whose output is stuck-open) cannot be represented
  in two-state simulation. The tests model a defective multiplexer as one
  configured onto a wrong, constant source and check that the redundant path
  restores the function.
* IFGR's doubled drivers are built as separate multiplexers, but without a
  defect they carry the same value. IFGR is therefore logically identical to
  FGR.
* The FGR input multiplexer levels are not built. In these full-crossbar
  boxes every Md already sees every input, so they would add no routing
  choice.
* `cfg_mux` states the multiplexer function directly instead of
  instantiating a tree of `mux2` cells. Synthesis produces the tree. At
  36×36 an explicit tree of about 2.4 million cells made elaboration run out
  of memory.
* The error-correcting protection of the configuration memory is not built.
  Neither is the test-and-diagnosis flow that produces the map of defective
  multiplexers.
