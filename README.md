# A Gaussian-mixture classifier on a 4 x 4 network on chip

A Gaussian mixture model (GMM) classifier picks the class of a pattern `x` whose
likelihood is largest. Each class `k` has M Gaussian models, and model `j`
contributes `K_j * exp(-z_j)`, where `z_j` is a quadratic form in `x - mu_j`.
Done directly, that needs a full vector-matrix product per model and an
exponential. The design here avoids both costs:

* The covariance inverse is kept as a lower-triangular factor `G`. The quadratic form
  then becomes `z = sum_j y_j^2` with `y = (x - mu)^T G`. A serial-parallel systolic
  multiplier with one processing element (PE) per dimension computes it. The
  multiplier takes one row of `G` per cycle and produces one `y_j` per cycle, fully
  pipelined.
* `exp(-z)` becomes a piecewise-linear function (LPF, linear piecewise function).
  Comparators, one subtractor and a shifter compute it. The LPF has three shapes, and
  only register contents choose between them.
* A winner-takes-all (WTA) circuit compares the class scores as they stream past and
  returns the winning class as a one-hot code.

The classifier is one IP core on a 4 x 4 mesh network on chip. Other cores load its
parameters, send patterns and receive results as network messages.

Everything is synthesizable SystemVerilog-2017. It is split into the classifier
datapath (`gmm_pkg`, `sp_vm_mult`, `square_unit`, `gmm_accumulator`, `lpf_unit`,
`k_multiplier`, `wta`), its register file and control (`reg_x`, `reg_gmm`, `reg_k`,
`ctrl_unit`, `gmm_processor`, `gmm_classifier`), and the network (`noc_pkg`,
`flit_fifo`, `link_ctrl`, `route_arb`, `crossbar`, `router`, `nic`, `mesh_noc`).
`gmm_node` and `noc_gmm_top` tie the two together.

## What is computed

The defaults: dimension D = 5, 5 classes, up to 10 models per class (50 models), and
10-bit parameter words.

For each class `k` and each of its models `m`:

```
s      = x - mu                    (11-bit signed, per component)
y_j    = sum_{i >= j} s_i * g_ij   (G lower triangular, 10-bit signed entries)
z      = sum_j y_j^2               (saturated to 40 bits)
f      = LPF(z)                    (40 bits, all ones = 1.0)
score_k = sum_m K_m * f            (K: 10 bits unsigned)
class  = argmax_k score_k          (one-hot, 5 bits)
```

The factor 1/2 of the Gaussian exponent, the priors and all scaling are folded into
`G` and `K` when they are loaded. Patterns of lower dimension use D = 5 with zero
rows in `G` and zero components in `x` and `mu`.

## The serial-parallel multiplier (`sp_vm_mult`)

This is the part that is easiest to get wrong. There are D PEs in a chain. PE `p`
holds a register `q_p`. Every cycle, PE `p` computes `q_p <= q_{p-1} + s * g[p]`,
and PE 1 starts from zero. The scalar `s` is broadcast to all PEs; the row of `G`
arrives in parallel, one entry per PE. The output is the register of the last PE.

Rows go in from the **last** row to the first, i = D, D-1, ..., 1. Entry `g_ij` is
placed on PE `j + D - i`. Row i has only i nonzero entries, so the bottom row fills
all PEs. Each earlier row is shifted one PE further right, with zeros on the left.
For D = 3:

```
cycle  s     PE1   PE2   PE3     y leaving PE3 one cycle later
t1     s3    g31   g32   g33     y3 = s3 g33
t2     s2    0     g21   g22     y2 = s3 g32 + s2 g22
t3     s1    0     0     g11     y1 = s3 g31 + s2 g21 + s1 g11
```

A partial sum started on PE p at cycle t reaches the last PE D − p cycles later. At
each PE it picks up the term of the row that is there at that time. So `y_j` collects
`s_i g_ij` for every `i >= j`, and leaves one cycle after row `j` went in. The
outputs come out in the order y_D, ..., y_1, one per cycle.

The zeros on the left mean that no partial sum from the previous vector is still
travelling when a new vector starts. So vectors (different models, classes or
patterns) follow each other with no gap. The register file (`reg_gmm`) stores every
row already shifted into this position. The multiplier therefore needs no alignment
logic, and one read gives `mu_i` and the whole aligned row.

## The exponential replacement (`lpf_unit`)

With breakpoints `a <= b <= c`, the unit produces one of three shapes:

| shape | z < a | a <= z < b | b <= z < c | z >= c | registers |
|---|---|---|---|---|---|
| f1 | 1 | 0 | 0 | 0 | R1 = R2 = a |
| f2 | 1 | b - z | 0 | 0 | R1 = R3 = a, R2 = R5 = b |
| f3 | 1 | 2^(n-m) (b - z) | c - z | 0 | R1 = a, R3 = R4 = b, R2 = R5 = c, R6 = n - m |

The datapath has three comparators, a subtractor with a two-way choice of minuend, a
left shifter and the output register SR1:

* **C1**: when z < R1, SR1 is set to all ones, which stands for 1.0.
* **C2**: when z >= R2, SR1 is cleared.
* **C3**: when z >= R3 ("high"), SR1 loads `R5 - z` unshifted. Otherwise it loads
  `R4 - z` shifted left by R6.

Setting takes priority over clearing, and clearing over loading. For f3, between a
and b the unit gives the steep segment `2^(n-m)(b - z)`. Between b and c it gives
`c - z`. The shift saturates at all ones. A negative difference would give zero, but
cannot occur when the breakpoints are ordered.

`z` passes through R7, R8 and R9. C1 looks at z in R7, C2 in R8 and C3 in R9, and
each decision travels with z. The unit is therefore a 4-stage pipeline that takes
one z per cycle, with f ready 4 cycles after z.

**Loading R1..R6.** There are 21 bus words, written with the `load_lpf` strobe. R1 to
R5 take four 10-bit words each, least significant first. R6 takes one word. Changing
the shape means rewriting these registers only.

## Scores and the winner (`gmm_accumulator`, `k_multiplier`, `wta`)

* `square_unit` squares `y`.
* The first accumulator sums D squares into `z`. It saturates at 2^40 − 1, which is
  exact, because every z beyond the last breakpoint maps to 0.
* `k_multiplier` forms `K * f` as a 50-bit product.
* The second accumulator sums these over the models of a class, into a 54-bit score.

The pipeline carries framing flags next to the data: row first/last, model
first/last and class first. So each accumulator knows where its run starts and ends.

The WTA receives one score per class, class 1 first:

* R10 takes the score.
* A comparator checks it against R11, the best score so far.
* A one-hot shift register SR2, starting at `10000`, points at the current class's
  flip-flop D_k.
* A larger score sets D_k, clears the flip-flops of earlier classes, and copies the
  score into R11.

The comparison is strict, so a tie keeps the earlier class. If every score is zero,
the result is the all-zero code. The first score of a pattern restarts SR2 and is
compared with zero instead of R11, so patterns need no reset between them. The result
comes 2 cycles after the last score.

## Register file, control and timing (`reg_*`, `ctrl_unit`, `gmm_classifier`)

All parameters come in on one 10-bit bus, with a strobe per destination. Every
destination fills in order, and `reset` restarts all write positions.

| strobe | words | order |
|---|---|---|
| `load_x` | D | x_1 ... x_D |
| `load_gmm` | 20 per model | per model, per row i = 1..D: mu_i, g_i1 ... g_ii; models in order class 1 model 1, class 1 model 2, ..., class 5 model num_m |
| `load_k` | 1 per model | same model order |
| `load_lpf` | 21 | see above |

Models are packed in the order they are used. With `num_m` models per class, class
`k` (0-based) model `m` is stored as model `k * num_m + m`. A parameter set is
therefore loaded for one value of `num_m`, and up to 50 models fit.

`enable` starts a classification with `num_m` models per class (1..10). The control
unit issues rows for class 1 model 1 (rows D..1), then class 1 model 2, and so on:
`5 * num_m * 5` rows, one per cycle.

Pipeline latency from a row to the class output is 12 cycles:

| stage | cycles |
|---|---|
| subtractor and input register (s = x_i - mu_i, row of G) | 1 |
| multiplier | 1 |
| square | 1 |
| d-accumulator | 1 |
| LPF | 4 |
| K multiplier | 1 |
| M-accumulator | 1 |
| WTA | 2 |

A whole classification therefore takes `25 * num_m + 12` cycles from `enable` to
`out_valid`:

* 37 cycles with one model per class;
* 262 cycles at full capacity.

`busy` stays high until the result is out. `enable` is ignored while busy.

## The network

**Topology.** A 4 x 4 mesh. Node `n = y*4 + x` sits at column x, row y. Each router
has five ports: local 0, north 1 (y+1), east 2 (x+1), south 3, west 4.

**Packets.** Every packet is one 27-bit flit:

```
{dst.x, dst.y, src.x, src.y, kind[2:0], data[15:0]}
```

**Flow control.** Valid/ready handshakes on every hop, with no credit counters.

**Inside the router.** Each channel, including the local injection and ejection
channels, passes through these stages in turn:

* a link controller (`link_ctrl`): a two-entry skid buffer, registered in both
  directions and running at full rate;
* an input FIFO of depth 4;
* the crossbar;
* an output FIFO of depth 2;
* a link controller.

**Routing and arbitration.** `route_arb` routes each head flit by XY routing: first
along x, then along y. XY routing is free of deadlock on a mesh. Each output has its
own round-robin arbiter and grants only when the output FIFO has room. All granted
flits cross the crossbar in the same cycle.

**Latency.** A lone flit spends 4 cycles per router. A path over `h` links costs
`4 * (h + 1)` cycles from NIC to NIC. Flits between one pair of nodes stay in order.

**Network interface (`nic`).** The NIC sits between a core and its router. The core
side exchanges messages `{peer, kind, data}` through two 4-deep queues. Outgoing, the
NIC fills in the source coordinates. Incoming, it hands the source on as `peer`.

### The classifier as a network core (`gmm_node`)

Message kinds:

| kind | name | data | effect |
|---|---|---|---|
| 1 | LOAD_X | bus word | `load_x` |
| 2 | LOAD_GMM | bus word | `load_gmm` |
| 3 | LOAD_K | bus word | `load_k` |
| 4 | LOAD_LPF | bus word | `load_lpf` |
| 5 | RESET | — | restarts the load positions |
| 6 | START | `num_m` | starts a classification |
| 7 | RESULT | one-hot class in data[4:0] | sent back to the node that sent START |

The node accepts no message while a classification runs or a result waits to be
sent. Commands stay queued in the network, so a client may send its next pattern
before the previous result has arrived. Several clients may share the classifier.
Each client must send its LOAD_X words and START without another client's words in
between. The testbench has one client at a time load a pattern; a real system would
need a lock or a dedicated loader.

### Top level (`noc_gmm_top`)

The classifier sits at node (0,0). It can be moved with `GMM_X`/`GMM_Y`. The other 15
nodes are plain NICs, and their core-side ports are top-level port arrays indexed by
node number:

* `ip_tx_valid/ready/ip_tx[n]`
* `ip_rx_valid/ready/ip_rx[n]`

The classifier's entries in these arrays are unused (`ip_tx_ready` is 0 there).
`arb_conflict[n]` shows contention in router n. `gmm_busy` shows that a
classification is running.

## Where this departs from the source description, and what is chosen

Several points of the source description are contradicted by other parts of it.
These were resolved as follows:

* **Multiplier indexing.** One passage writes the product with the indices of `g`
  swapped, for example `y4 = s4 g54 + s5 g44`. The worked 3-dimensional example and
  the timing diagram of the PEs both give `y_j = sum_{i>=j} s_i g_ij` with `G` lower
  triangular. The RTL follows the example and the diagram.
* **f3 registers.** The f3 register assignment in the text puts `b` only in R3 and
  `c` in R4 as well as R2 and R5. That would make the steep segment `2^(n-m)(c - z)`,
  which is not the stated formula. The RTL follows the formula: R4 = b.
* **Comparator C1 polarity.** C1 is described as "low" when z < a. Here it is active
  when z < a. This changes only the internal naming.

The description gives no value for any of the following; each is a choice made here:

* operand widths beyond the 10-bit bus and the 40-bit z and LPF output;
* the capacity of 10 models per class;
* the word orders for loading;
* the pipeline staging of the LPF and the WTA;
* strict comparison in the WTA;
* the flit format;
* XY routing and round-robin arbitration;
* buffer depths;
* the skid-buffer link controller;
* the message protocol of the classifier node;
* the classifier's position in the mesh.

Not built:

* the other IP cores of the mesh, whose function is not described (their NIC ports
  are the top's ports);
* the physical prototype: process, area, and place and route.

## How it was verified

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each compares the
module against values computed independently in the testbench. Where a latency is
fixed, the testbench checks it too:

* LPF 4 cycles;
* WTA 2;
* a router 4;
* a mesh path `4*(h+1)`;
* a classification `25*num_m + 12`.

`tb/gmm_ref_pkg.sv` is a behavioural reference of the whole classifier: z, the three
LPF shapes, the scores and the winner. The classifier-level testbenches use it.

`tb_noc_gmm_top` runs the whole design at its default size:

* Node 15 loads all 50 models, K and the LPF registers across the mesh.
* Two nodes classify 18 patterns in all: f1 with 1 model per class, f2 with 3 models,
  and f3 with 10 models.
* The other nodes exchange random traffic at the same time.

It checks every result and every background message (arrival, content, order). It
counts, and requires at least once, each of these mechanisms:

* router contention;
* NIC back-pressure;
* commands held while the classifier is busy;
* each LPF case (set, clear, shifted slope, plain slope);
* a WTA winner being replaced;
* a score summed over several models.

## Capacity and throughput on real tasks

A pattern costs its D load words plus `25 * num_m + 12` cycles.

* **Gas identification.** Ten models (two per class), five classes, 100 test
  patterns. `tb_gas_workload` runs exactly this. It takes 6700 cycles, 67 per
  pattern, and every winner matches the reference.
* **Colour image segmentation.** A 256 x 256 RGB image into five classes, with
  pixels streamed one by one. The image needs no storage in the classifier: each
  pixel is a 3-component pattern padded to 5. `tb_image_workload` classifies a
  generated image of four quadrants and a disc in 4,390,912 cycles, about 44 ms at
  100 MHz. Every pixel matches the reference.

The parameter memory holds 50 models of dimension up to 5. Larger dimensions or more
models need larger `D` or `M_MAX`. The multiplier grows by one PE per dimension, and
a classification takes `N_CLASS * num_m * D + 12` cycles.

## Simulating

With Verilator 5 (two-state, timing enabled), from the top of the tree:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/gmm_pkg.sv rtl/noc_pkg.sv tb/gmm_ref_pkg.sv \
  -y rtl +libext+.sv tb/tb_noc_gmm_top.sv --top-module tb_noc_gmm_top
./obj_dir/Vtb_noc_gmm_top
```

Swap in any `tb/tb_<module>.sv`. The packages must come first on the command line.
Each testbench ends with `TB_RESULT checks=<n> failures=<n>` and has a watchdog.
`tb_noc_gmm_top` compiles in under a minute and runs in well under a second;
`tb_image_workload` runs about 3 seconds.

To change sizes:

* `gmm_pkg` holds the classifier constants (`D`, `N_CLASS`, `M_MAX`, `BUS_W` and the
  derived widths).
* `noc_pkg` holds the mesh size and the flit format.
* Router buffer depths are parameters of `router`.
