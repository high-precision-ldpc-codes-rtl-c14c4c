# Serial LDPC node processors with a 2-output M-min* check node

An LDPC decoder spends most of its logic on the check node update. This RTL
implements a serial check node processor (CNP) in which that update is cut
down to almost nothing: instead of computing one output magnitude per edge,
it computes only **two**, one for the edge that brought the least reliable
input and one shared by every other edge. Combined with the modified
Min-Sum operator M-min*, the processor needs a single M-min* operator, a
comparator, a handful of registers and a one-bit-per-edge sign delay line,
and its size grows only with the logarithm of the node degree (apart from
that delay line). A serial variable node processor (VNP) for the same
message format sits beside it.

The architecture follows the CNP published by M. Rovini, F. Rossi,
N. E. L'Insalata and L. Fanucci ("High-Precision LDPC Codes Decoding at the
Lowest Complexity"). The fixed-point details, the stream protocol, the
control unit, the generic-P datapath and the VNP are this implementation's
own; the sections below say which is which.

## The update that is computed

For check node *i* with incoming messages mu_ik (sign s_k, magnitude m_k,
k = 0 .. d-1) the outgoing message eps_ij is:

* **sign** – the exact rule `-sign(eps_ij) = prod_{k != j} -sign(mu_ik)`.
  With sign bits (1 = negative) this is
  `s_out(j) = XOR_{k != j} s_k  XOR  (d mod 2)`. Note the degree-parity
  term: the rule holds for LLRs of the form L = log(P(1)/P(0)), where a
  negative LLR favours bit 0, and the whole design uses that convention
  (the VNP decides 1 for a positive total). For LLRs of the form
  log(P(0)/P(1)), change the two `~in_sign` in `cn_sign_proc` to `in_sign`
  and invert `hard_bit` in `vnp_serial`.
* **magnitude** – with `M(a,b) = max(0, min(a,b) - corr(|a-b|))` and the
  P least reliable inputs of the node set apart:
  an edge among those P gets the M-min* of all inputs but its own; every
  other edge gets the M-min* of *all* inputs. For P = 1 there are two
  values: `theta0` (all inputs but the minimum) and
  `theta1 = M(theta0, min)`.

`corr` is the quantised `log(1 + exp(-d))`. The magnitude LSB is taken as
0.5, so the correction is one LSB while `|a-b| < 3` LSBs and zero after
that (`CORR_TH`). Results are clipped at zero. This quantisation is a
choice of this RTL; change `CORR_TH` (or `mmin_star`) for a different LSB.

## Message format and stream protocol

Messages are sign-magnitude, `NM` bits: bit `NM-1` is the sign, the rest the
magnitude. Both processors take one message per clock and use the same
three inputs:

| signal      | meaning |
|-------------|---------|
| `node_sync` | high with edge 0 of a new node |
| `in_valid`  | high on every edge; low cycles inside a node are skipped |
| `in_msg`    | the message |

A node ends when the next `node_sync` arrives. `node_sync` with `in_valid`
low closes the current node without starting another – use it after the
last node, or before a pause. Outputs come back in the same edge order with
`out_valid`, and `out_first` marks edge 0.

**Nodes must be sent in non-decreasing degree order.** A node's outputs
take as many cycles as its inputs; a shorter node right after a longer one
would produce its outputs while the longer one is still draining. The
processors flag that case on `order_err`; `proto_err` flags a degree
outside the legal range (2..`DCN_MAX` for the CNP, P+1.. for the generic
CNP, 1..`DVN_MAX` for the VNP) or a message outside any node.

## The P = 1 check node processor (`cnp_p1`)

```
           +--------------------- cn_sign_proc ----------------------+
 in_msg -->| running parity -> node register ---(xor)--> out sign    |
   |       | sign delay line (DCN_MAX+2 bits) -----^                 |
   |       +---------------------------------------------------------+
   |  mag   +-- cn_input_forming --+    +--- mmin_accumulator ---+    +-- cn_output_select --+
   +------->| <=? vs MIN register  |chi | stage reg -> M-min* --+ |th0 | out_idx == min_idx ? |--> out mag
            | 2-way mux            |--->| acc reg <------------+ |--->|   th0 : th1          |
            | min edge index       |    | theta0 / theta1 regs   |th1 |                      |
            +----------------------+    +------------------------+    +----------------------+
                           all strobes from cn_control_unit (node_sync, in_valid)
```

The trick is the input forming stage. It keeps the smallest magnitude seen
so far in the MIN register. Each new magnitude is compared with it: if the
new one is smaller or equal it takes MIN's place and the old MIN moves on,
otherwise the new one moves on. So the accumulator receives all magnitudes
except the minimum, and when the node ends the minimum is sent last. One
operator folds the stream into `theta0`; folding the minimum in gives
`theta1`. On ties the later edge counts as the minimum.

### Cycle schedule

For a node of degree d whose edges arrive on cycles 0 .. d-1, with the next
`node_sync` on cycle d (E, "node_end"):

| cycle | input forming | accumulator | output side |
|-------|---------------|-------------|-------------|
| 0 | MIN := m_0 | – | – |
| k = 1..d-1 | compare; the larger value goes to the stage register | from k = 2: fold the value staged one cycle earlier (the first one is loaded) | – |
| d (E) | stage := MIN; MIN := next node's m_0 | fold the last staged value | sign parity saved |
| d+1 | next node's edge 1 | `theta1 = M(MIN, acc)` and `theta0 = acc` registered | min index, sign parity, degree loaded |
| d+2 .. 2d+1 | … | … | edge j output on cycle d+2+j |

The latency is therefore **d + 2 cycles** from edge 0 in to edge 0 out, and
the next node can follow without a gap. The theta registers are overwritten
at cycle E'+1 of the following node, which is safe exactly when that node is
at least as long – hence the ordering rule.

The sign section keeps a running parity of the `-sign` bits, copies it into
a node register when the node ends, and XORs it with each edge's own sign
bit as that bit comes out of a delay line. The delay line holds d + 2 signs
while the next node streams in behind, so it is `DCN_MAX + 2` bits deep.

### Blocks

| module | role |
|--------|------|
| `cn_control_unit` | edge counter, edge-0 / accumulate / node-end strobes, theta load, output counter, `order_err`/`proto_err` |
| `cn_input_forming` | comparator, MIN register, 2-way mux, edge index of the minimum |
| `mmin_accumulator` | stage register, one `mmin_star`, accumulator, `theta0`/`theta1` registers |
| `mmin_star` | combinational M-min* |
| `cn_output_select` | stores the minimum's edge index, selects `theta0` or `theta1` per edge |
| `cn_sign_proc` | sign rule and sign delay line |
| `cnp_p1` | wires the above |

## The generic processor (`cnp_general`, P = 1..3)

Here the input forming stage keeps the P smallest magnitudes in a sorted
register set with their edge indices; a new value that is smaller than or
equal to the largest held one displaces it into the accumulator. When the
node ends, the held set is frozen and P + 1 thetas are built from the
accumulated value by short chains of M-min* operators (P*P operators in
total, held values folded in ascending order) and registered in the same
cycle as for P = 1, so the latency is still d + 2. A (P+1)-way mux then
gives theta_i to the edge of the i-th held value and theta_P to the rest.
The published design leaves the accumulator for P > 1 to other work; this
chained form is this RTL's own, and it only makes sense for small P. With
P = 1 the outputs equal those of `cnp_p1`.

## The variable node processor (`vnp_serial`)

It computes `mu_ij = lambda_j + sum_{k != i} eps_kj`: it adds the channel
LLR (`lambda`, sign-magnitude on `NL` bits, sampled with edge 0) and every
incoming message into a two's-complement total, buffers the messages, and
after the node ends outputs `total - eps_j` per edge, saturated to
±(2^(NM-1) − 1). The total is also output (`app`) with its sign as the hard
decision. Only the function of a serial VNP is known from the source; the
structure, saturation and d + 2 latency are chosen here to match the CNP.
It reuses `cn_control_unit` for its stream control.

## Top level (`ldpc_np_top`)

The top holds the CNP (ports `cn_*`) and the VNP (ports `vn_*`) side by
side. A full decoder also needs the message memories, the interconnect
between the processors and the iteration control; those are not part of
this RTL, so the two processors are not connected to each other.

| parameter | default | meaning |
|-----------|---------|---------|
| `NM` | 6 | message width (sign + magnitude) |
| `NL` | 6 | channel LLR width |
| `DCN_MAX` | 30 | maximum check node degree |
| `DVN_MAX` | 13 | maximum variable node degree |
| `CORR_TH` | 3 | M-min* correction threshold in LSBs |
| `P` | 1 | 1: `cnp_p1`; 2..3: `cnp_general` |

The defaults are the node degrees of a DVB-S2 class code (check degree up
to 30, variable degree up to 13) with 6-bit messages. A rate-0.82 code of
length 4095 with column weight 4 (check degrees 22–23) also fits. Message
widths of 5 or 7 bits and check degrees up to 34 are parameter settings;
they are simulated by the tests below but are not the defaults.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The reference models are in
`tb/ldpc_ref_pkg.sv`: M-min* is evaluated from its floating-point
definition and rounded, and the check node model reorders the stream the
way the input forming stage does, so it reproduces the operator order of the
hardware rather than an order-free ideal.

* `tb_mmin_star` – all 1024 input pairs of a 5-bit operator.
* `tb_cn_sign_proc`, `tb_cn_input_forming`, `tb_mmin_accumulator`,
  `tb_cn_output_select`, `tb_cn_control_unit` – each block against a
  generated schedule, including ties, idle cycles and the error flags.
* `tb_cnp_p1`, `tb_cnp_general` (P = 1, 2, 3), `tb_vnp_serial` – random
  node streams, every output message compared, d + 2 latency checked.
* `tb_ldpc_np_top` – both processors at default parameters through
  all degrees, a slice of a degree-22/23 code and DVB-S2 maximum degrees; it
  also counts that each mechanism happened (minimum replaced, ties, M-min*
  correction, clipping at zero, closing strobe, idle cycles, VNP
  saturation). `tb_ldpc_np_top_p2` does the same with `P = 2`.
* `tb_decode_awgn` – whole decoding runs, with two decoders side by side
  (`P = 1` and `P = 2`). Each `tb/ldpc_decode_harness.sv` plays the part of
  the decoder around the processors: it builds a random code with the sizes
  of a rate-0.82, length-4095 code (738 checks of degree 22/23, variable
  degree 4; short cycles are not removed), keeps the message memories and
  runs a flooding schedule, check nodes in increasing degree order. All-zero
  codewords are sent with BPSK over AWGN and the channel LLRs quantised to
  6 bits with an LSB of 0.5. At 4.0 dB (channel BER about 2e-2) all 30
  frames of each decoder converge to the sent codeword within a few
  iterations; a set of 10 frames at 3.5 dB is reported (all converged in
  our runs). This shows that the fixed-point update works in a decoder
  loop, not how close it comes to the published error rates, which need
  far more frames and the original code.
* `tb_decode_quant` – the same decoding runs with P = 1 at two other
  quantisations: 6-bit channel LLRs with 7-bit messages, and 5 bits for
  both (the LSB stays 0.5, so 5-bit messages saturate at ±7.5). All frames
  converged at both points in our runs. The harness takes `NM`, `NL` and
  the two Eb/N0 values as parameters.
* `tb_cnp_p1_sweep` – the P = 1 processor at message widths 5 and 7 and
  maximum degrees 4 and 34, each against the reference model with the
  d + 2 latency checked (`tb/cnp_p1_sweep_harness.sv`).

Run one with plain Verilator, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/ldpc_pkg.sv tb/ldpc_ref_pkg.sv tb/tb_ldpc_np_top.sv \
  --top-module tb_ldpc_np_top -o sim
./obj_dir/sim
```

## How far to trust it, and where it departs

* The datapath and schedule of the P = 1 processor follow the published
  architecture and its stated d + 2 latency. The bit-level choices – LSB
  of 0.5, one-LSB correction, clipping, sign bit = MSB – are this RTL's.
  The source's own quantisation scheme is not reproduced, so error-rate
  results may differ from the published curves.
* The sign rule includes the degree-parity term of the `-sign` product
  (see above).
* The published sign delay line is sized to the maximum degree; here it is
  two entries longer to cover the d + 2 latency, and the node sign
  register has two stages for the same reason.
* The operator's two enable pins of the published datapath are replaced by
  loading the first value of a node straight into the accumulator.
* Degree-1 check nodes are not supported (an assertion fires).
* Nothing here has been synthesised for a cell library; gate counts and
  clock rates of the published design are not claimed.
