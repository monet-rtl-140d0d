# MONET: a mixture-of-experts accelerator on a two-tier network-on-chip

A mixture-of-experts (MoE) layer runs a small gating network on every token. The gating
network picks the k best of N expert networks for that token. Only those k experts run, and
their outputs are added together, each scaled by its softmax weight. The arithmetic is
ordinary matrix-vector work. The traffic is not. Every token must reach every gating unit
(a broadcast). After gating, each token must reach a different, data-dependent set of k
experts (a multicast). Then k results per token must come back and be combined (a gather).

This design is built around those traffic patterns. It is a 4x4 grid of processing-element
*islands*, and each island is an 8x8 weight-stationary systolic array with its own buffers.
The islands are joined by two separate mesh networks that cover the same grid:

* The **Mel plane** carries everything that goes *into* the islands: configuration,
  gating weights, expert weights and tokens. Its routers copy one flit to several output
  ports in the same cycle, so a multicast costs one injection. The links between Mel
  routers have two lanes, and a lane can change direction when the other side needs it.
* The **Bel plane** carries results *out of* the islands. Its routers have a normal
  four-stage pipeline and also a one-cycle bypass. A flit takes the bypass when its output
  port is free and nothing else is waiting.

A central control unit sits at the west edge, next to an on-chip global buffer. It runs the
batch and does the per-token gating arithmetic (softmax and top-k). It also holds the
aggregator that adds up the weighted expert results.

## Numbers and sizes

| item | value | package constant / parameter |
|---|---|---|
| operand format | signed Q8.8, 16 bits | `DATA_W`, `FRAC` |
| accumulator | 36 bits; rounded toward minus infinity and saturated back to Q8.8 | `ACC_W` |
| vector (one flit payload, one array row) | 8 values, 128 bits | `LANES` |
| grid | 4x4 islands, island id = 4*y + x | `MESH_X`, `MESH_Y` |
| experts | 16, expert e on island e, one 8x8 tile each | `NUM_EXPERTS` |
| top-k | 1..4 | `MAX_K` |
| batch | up to 16 tokens | `TOKENS` |
| softmax weights | unsigned Q1.16 (17 bits) | `softmax_topk` |

An "expert" here is one 8x8 weight tile followed by the activation function. A "token" is
one 8-element vector. The gating network is a 16x8 matrix, which gives 16 logits per token.
Two islands each hold 8 rows of it.

## The flow of one batch

The host fills the global buffer through port A, then pulses `start` with the batch size
`n_tok`, the top-k value `k` and a configuration word. The control unit then:

1. multicasts the configuration word to all 16 islands;
2. sends gating rows 0-7 to island 0 and rows 8-15 to island 1;
3. sends expert e's tile to island e;
4. multicasts each token to islands 0 and 1. Each returns 8 logits over the Bel plane;
5. joins the two halves and runs `softmax_topk`. This gives the k chosen experts and their
   weights;
6. if reordering is on, runs `expert_reorder`. It sorts the batch by first-choice expert, so
   tokens for the same expert reach it back to back;
7. multicasts each token once to all k of its expert islands. The token goes in one flit with
   a k-bit destination set; the routers make the copies;
8. weights each returning result in the aggregator and sums the k results for that token.
   The finished output is written to the global buffer, and `done` pulses after the last one.

Global-buffer map, in 128-bit words: gating rows at 0-15; expert e row r at 16 + 8e + r;
token t at 144 + t; output t at 160 + t.

The control unit does not wait between phases. Results are collected while flits are still
being injected. Islands use double buffering: one bank of a buffer fills from the network
while the array reads the other.

## Configuration word (`cfg_t`)

| field | meaning |
|---|---|
| `act_gelu` | 1: GELU approximation on expert results; 0: ReLU (gating logits never pass through it) |
| `sparse` | 1: PEs skip multiplies whose weight or input is zero (results unchanged; the skips are counted) |
| `exp_par` | experts hosted per island, 2/4/8/16: how many expert-buffer slots are in use |
| `reorder` | group the batch by first-choice expert before dispatch |
| `noc_en` | 1: Mel lane reversal and Bel bypass enabled; 0: both off (plain routers) |

The reset value is ReLU, dense, 2 experts per island, no reordering, NoC features on.

## The Mel plane in detail

**Flit.** `mel_flit_t` holds a 16-bit destination bitmap (one bit per island), a type
(configuration, gating row, expert row, gating token, expert token), a 4-bit index, an 8-bit
tag and the 128-bit vector.

**Multicast tree.** A router splits the destination set it receives into disjoint subsets.
The flit goes first along the column (Y), then along each row (X):

* north gets the destinations in rows above;
* south gets the destinations in rows below;
* east and west get the destinations in the router's own row on that side;
* the local port gets the router's own bit.

Each copy carries only its own subset, so no island receives a flit twice. The subsets are
plain masks on the bitmap. They are computed per router as constants.

**Partial service.** Sometimes only some of the needed outputs are free. The router then sends
the copies it can, marks those subsets done, and keeps the flit at the head of its queue until
the rest have gone. A router has nine sources: two lanes from each of four neighbours, plus
local injection. They are served round-robin, and one source may drive several outputs in
the same cycle.

**Reversible links (`mel_link`).** Two neighbours share a link with two FIFO lanes. Lane 0
belongs to side A (west or north), and lane 1 belongs to side B. A lane is lent to the
non-owner when all of these hold:

* it is empty;
* its owner has nothing to send that way;
* the other side does.

The lane returns when it is empty again and the owner asks for it, or when reversal is
switched off. While lent, a link carries two flits per cycle in one direction. The link
counts its direction changes. Each router sends one request bit per direction, and that bit
drives this lending rule.

**Entry.** The control unit reaches the network through a link of the same kind, at the west
port of the top-left router.

## The Bel plane in detail

Each `bel_router` has five ports, in the order local, N, E, S, W, and a 4-entry FIFO on each
input. The normal path takes four cycles:

1. the flit is buffered;
2. route computation;
3. the "VA" stage. There is one virtual channel per port, so this stage only registers the
   output request;
4. switch allocation with a round-robin arbiter per output, then the output register.

The bypass sends a flit straight through the crossbar in the cycle it arrives. It is used when
all of these hold:

* its input FIFO is empty;
* the flit wins the output port;
* nothing in the normal pipeline wants that port.

So a lone flit moves one hop per cycle. The router counts bypassed flits.

Results carry a `to_gb` bit. Such flits go west along their row and leave the mesh at column 0
into the control unit, one exit per row. Other flits use X-then-Y routing to an island number.
This design does not use them, but the routers handle them.

## Inside an island (`pe_island`)

* **config_unit**: holds `cfg_t`.
* **weight buffer** (`pingpong_buffer`): holds gating rows. A bank swaps in when all 8 rows
  of a tile are written.
* **expert buffer**: 16 tile slots. `exp_par` masks the slot number.
* **input buffer** (`pingpong_buffer`): holds token jobs. Each job records gating or expert,
  the slot, the tag and the data.
* **systolic_array**: 8x8 weight-stationary.
  * PE[i][j] holds W[j][i], so row i of W is loaded one row per cycle (8 cycles).
  * The array skews the inputs and deskews the outputs internally.
  * A vector presented in cycle t appears at the output 15 cycles later. One vector can be
    issued per cycle.
* **activation_unit**: passes gating results through unchanged, and applies ReLU or GELU to
  expert results. It takes one cycle.
* **output buffer** (`sync_fifo`): a 4-deep queue into the Bel router.

Stationary weights stay loaded until a job needs a different tile. The island first lets the
array drain, then loads the new tile. Tokens are issued only while the output buffer has room
for every result in flight. So back-pressure from the Bel plane stalls issue and never drops a
result.

## Gating arithmetic

`softmax_topk` takes the 16 logits of a token and selects the maximum k times. Ties go to the
lower expert number. Over the selected experts it computes:

* e_i = 2^((l_i - l_max) * log2(e)), with log2(e) taken as 369/256 and 2^f approximated as
  1 + f on the fractional part;
* w_i = e_i / sum(e_j), in Q1.16, from a sequential divider.

The softmax is taken over the selected experts only. A result is ready 2k+1 cycles after
start.

`expert_reorder` is a stable counting sort on the first-choice expert. It takes 2n+4 cycles
for n tokens.

The `aggregator` keeps a 48-bit accumulator per token. It adds w times the result for each
arriving result and emits the token one cycle after its k-th result.

GELU is approximated as x * clamp(x + 3, 0, 6) / 6, with 1/6 as 43/256.

## Files

`rtl/` holds one module or package per file:

| file | contents |
|---|---|
| `monet_pkg` | shared constants and types |
| `pe`, `systolic_array` | the array |
| `pingpong_buffer`, `expert_buffer`, `sync_fifo` | the island's buffers |
| `config_unit`, `activation_unit` | island configuration and activation |
| `softmax_topk`, `expert_reorder`, `aggregator` | gating and aggregation arithmetic |
| `mel_router`, `mel_link` | the Mel plane |
| `bel_router` | the Bel plane |
| `global_buffer` | the on-chip memory |
| `pe_island`, `control_unit` | island and central control |
| `monet_top` | the whole accelerator |

`tb/` holds one self-checking testbench per module, `tb_<module>`. Each prints a line
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

`tb_monet_top` runs the whole accelerator at its default size. It runs three batches of 16
tokens:

* k=2, ReLU, dense;
* k=4, GELU, sparse, with reordering;
* k=1 with the NoC features off.

Every output is compared with a reference model written in the testbench, computed with the
same fixed-point rules. The test also checks that each mechanism actually happened:

* multicast replication;
* Bel bypass;
* lane reversal (counted on the entry link);
* skipped multiplies;
* tile reloads.

The test also checks that no bypass happens while `noc_en` is off. Each batch
takes about 900 cycles.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/monet_pkg.sv tb/tb_monet_top.sv \
              --top-module tb_monet_top -o sim -Mdir obj_tb_monet_top
    ./obj_tb_monet_top/sim

Replace `tb_monet_top` with any other testbench name to test a single block. All state that is
read is reset, so the result does not depend on Verilator's random initial values.

To change the configuration, edit `monet_pkg`:

* the grid (`MESH_X`, `MESH_Y`);
* the array size (`LANES`);
* `NUM_EXPERTS`;
* `MAX_K`.

The control unit's memory map and the expert-to-island placement assume 16 islands and 16
experts.

## How far this follows the published architecture

These parts follow the architecture description:

* the 4x4 island grid with 8x8 PEs per island;
* the two mesh planes;
* routers that copy a flit to several outputs in one cycle;
* links whose direction can reverse;
* the Bel router: a 5x5 crossbar with RC/VA/SA stages and a one-cycle bypass when there is no
  contention;
* double-buffered input and weight buffers, and the expert buffer;
* the configuration options (GELU/ReLU, sparse/dense, 2/4/8/16 experts, reorder on/off, NoC
  logic on/off);
* the gating, expert-delivery and dispatch-and-aggregate phases, including multicasting a
  token once to all of its experts.

These are this implementation's own choices, because the description leaves them open:

* the number format and all widths;
* the flit formats, buffer depths and handshakes;
* the multicast routing rule and the lane-lending rule;
* the GELU and softmax approximations;
* the reordering policy;
* the memory map and the placement of gating and experts on islands.

Departures and limits:

* **Softmax/top-k and expert reordering are central.** They run in the control unit, not in
  every island. A token's logits come from two islands, so a single unit sees all 16.
  Scheduling decisions that the architecture leaves to a software scheduler are made in
  hardware here.
* **One tile per expert.** Each expert is a single 8x8 matrix. Real layers, such as 384x384
  or 768x3072, would need tiling of large matrices over many tiles and partial-sum
  accumulation across passes. That is not built, so full-size models do not fit.
* **Expert weights are loaded once per batch, before gating.** Every island holds its own
  expert, so the weights do not depend on the gating result. Selective weight delivery after
  top-k selection is therefore not exercised.
* **One virtual channel per port** on the Bel plane.
* **Layer normalization is not implemented.** The island has no layer-norm post-processing
  stage.
* **The gating split is fixed.** Gating always runs on islands 0 and 1, experts on islands
  0-15.
* **Memories are register arrays.** They are not SRAM macros.
