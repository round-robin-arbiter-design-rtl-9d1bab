# Hierarchic round-robin arbiter with skipping

A round-robin arbiter shares one resource among several requesters
("candidates") by passing a single token around them in a fixed cyclic order.
The plainest version simply rotates the token every cycle and grants the
candidate under it only if that candidate happens to be requesting. When
requests are sparse or bunched together, most turns land on idle candidates
and are wasted, while real requests wait for the token to come round. In an
on-chip router, such a request may give up and try another, busier, output.

This design never wastes a turn. Each arbitration node *skips* idle candidates:
starting at the token, it walks forward to the nearest candidate that is
requesting and grants it in the same cycle. Whenever at least one request is
asserted, exactly one is granted.

A flat skipping arbiter over n candidates has a search chain n stages deep, so
it slows down as n grows. This design splits the candidates into a small tree
of nodes. Each node has a short chain of its own, and the tree passes the turn
from the root down to one leaf. The main configuration serves 13 candidates,
the largest number of simultaneous requests an output of a two-dimensional,
fully adaptive wormhole router can receive. Its three levels have 1, 2 and 4
nodes, and the candidates are grouped as `{{4}{3}}{{3}{3}}`.

## The node: token register and skipping logic (`rr_skip_node`)

Every node in the tree, root, middle or leaf, is the same circuit:

* **Token register (RRT):** a one-hot register of N bits. The set bit is the
  input that has the turn. Reset puts it on bit 0.
* **Skipping logic (SL):** a combinational chain. It starts at the token and
  moves towards higher indices, wrapping from N-1 back to 0. It passes every
  input whose request is low and selects the first one whose request is high.
  The chain is unrolled over 2N stages, so the wrap-around needs no
  combinational loop.
* **Reload:** when the node grants, the RRT is loaded with the position *one
  past* the granted input. The candidate just served then has the lowest
  priority in the next cycle. When the node does not grant, its RRT holds its
  value. A node does not grant when its enable is low or none of its inputs
  requests.

| port  | dir | width | meaning |
|-------|-----|-------|---------|
| `clk` | in  | 1 | clock |
| `rst` | in  | 1 | synchronous, active high; token to bit 0 |
| `en`  | in  | 1 | the turn handed down by the parent (tie high at a root) |
| `req` | in  | N | requests |
| `gnt` | out | N | one-hot grant, zero when `en` is low |
| `any` | out | 1 | OR of `req`: the request this node raises to its parent |

`req` to `gnt` is purely combinational. Only the RRT is clocked. Used alone
with `en` tied high, the node is the flat skipping arbiter.

## The tree: how the turn travels (`rr_group`, `rr_hier_arbiter`)

```
                       root  (RRu, 2 inputs)
              ┌───────────────┴───────────────┐
       middle 1 (RRm1, 2)               middle 0 (RRm0, 2)
        ┌──────┴──────┐                  ┌──────┴──────┐
   leaf 3 (RRd3,4) leaf 2 (RRd2,3)   leaf 1 (RRd1,3) leaf 0 (RRd0,3)
   cand. 12..9     cand. 8..6        cand. 5..3      cand. 2..0
```

One arbitration takes one clock cycle and has two sweeps:

1. **Up:** each node ORs its requests (`any`) and presents the result as a
   single request to its parent. The root therefore sees which middle groups
   have any work, and each middle node sees which of its leaves have work.
2. **Down:** the root, which is always enabled, uses its own token and
   skipping logic to pick a middle node. Only that node gets `en`. It then
   picks one of its leaves the same way. The enabled leaf grants one
   candidate. Its grant is the arbiter's `ack`.

On the next clock edge, every node on the granted path reloads its token with
the position one past its own choice. All other nodes keep their tokens, since
they granted nothing. As a result, a node's token only advances when its
subtree is actually served.

`rr_group` is one middle node together with its leaves. From outside it looks
like a single node (`en` in, `any` out), so the top is a root node over
`NUM_MID` groups.

### A worked sequence

The testbench replays this sequence and checks every grant and all seven
tokens. Tokens are written as one-hot values, so 1 means position 0.

| cycle(s) | req (hex) | ack (hex) | what happens |
|---|---|---|---|
| 1 | 0001 | 0001 | Turn hit at every level. RRu, RRm0 and RRd0 move to 2. |
| 2–3 | 0005 | 0004, 0001 | RRd0 = 2 points at idle candidate 1. It skips to 2, then wraps to 0. |
| 4–7 | 0007 | 0002, 0004, 0001, 0002 | Plain rotation inside leaf 0. RRd0 runs 4, 1, 2, 4. |
| 8–9 | 1000 | 1000 | The root skips the idle middle 0. Leaf 3 skips from bit 0 to bit 3. RRu becomes 1. |
| 10 | 0020 | 0020 | Middle 0 skips the idle leaf 0. RRm0 becomes 1 and RRu becomes 2. |
| 13–14 | 0600 | 0200, 0400 | Leaf 3 serves its bits 0 and 1. RRd3 runs 2, 4. |

Throughout this sequence RRm1, RRd2 and RRd1 stay at 1. Their subtrees are
never served, or they are served exactly at their token.

### Fairness is per subtree, not per candidate

When all candidates request continuously, each node alternates evenly among
its children. A candidate is therefore served once every (product of the
fan-outs on its path) cycles. In the 13-candidate tree that is 2·2·3 = 12
cycles for candidates 0–8 and 2·2·4 = 16 cycles for candidates 9–12. No one
starves, but the share is set by the grouping, not equal for everyone.
Choose the grouping with this in mind. The testbenches check these exact
intervals.

## Parameters and configurations

`rr_hier_arbiter` has the following parameters:

| parameter | default | meaning |
|---|---|---|
| `NUM_MID` | 2 | middle nodes under the root |
| `LEAVES_PER_MID` | 2 | leaves under each middle node |
| `LEAF_SIZE` | `'{3,3,3,4,0,0,0,0}` | leaf sizes, **lowest candidates first**; unused entries are 0 |
| `N` (localparam) | 13 | sum of the used leaf sizes; width of `req`/`ack` |

`LEAF_SIZE` is of type `rr_arb_pkg::size_list_t`, a list of up to eight
entries. Written highest group first, the default is `{{4}{3}}{{3}{3}}`.
The other groupings considered for this arbiter are:

| candidates | grouping (highest first) | parameters |
|---|---|---|
| 13 | `{{4}{3}}{{3}{3}}` | defaults |
| 10 | `{{3}{2}}{{3}{2}}` | `NUM_MID=2, LEAVES_PER_MID=2, LEAF_SIZE='{2,3,2,3,0,0,0,0}` |
| 6  | `{{3}{3}}` | `NUM_MID=1, LEAVES_PER_MID=2, LEAF_SIZE='{3,3,0,0,0,0,0,0}` |

With `NUM_MID=1` the root has a single input and always passes the turn
down, so the tree has two working levels. The tree is fixed at three levels,
and every middle node has the same number of leaves. Deeper or irregular trees
would need another level of `rr_group`-style wrapping.

At the defaults the design holds 19 flip-flops in total: 2 + 2 + 2 for the
root and middle tokens, and 4 + 3 + 3 + 3 for the leaf tokens.

## Timing

* `ack` is combinational from `req`. Grants appear in the cycle of the request
  and there is no pipeline.
* The critical path runs from the requests through the leaf `any` ORs, the
  root's skip chain, the middle node's skip chain (gated by `en`), and the
  leaf's skip chain to `ack`. It ends at the token registers' next-state
  logic. Each chain is only as long as its node's fan-in, which is the point
  of the tree.
* Reset is synchronous and active high. After reset every token sits on
  position 0.

## Where this RTL makes its own choices

* **Token direction and reload.** The token walks towards higher bit indices,
  and after a grant it moves to the position after the granted one. A variant
  that reloads the token with the granted position itself would let a
  persistent requester keep the turn for ever. This design does not do that.
* **Who updates.** Only nodes on the granted path move their tokens.
* **Reset and port names.** The synchronous reset, the `en`/`any` node ports
  and the way tree sizes are passed in are implementation choices.
* **Not included:** the plain token-shift arbiter (no skipping) and the
  surrounding router parts (virtual-channel FIFOs, physical-channel
  multiplexer, status collection). They are context for this arbiter, not
  part of it. The flat 13-input skipping arbiter needs no separate module:
  it is `rr_skip_node #(.N(13))`.
* **Assertions.** Immediate assertions in `rr_skip_node` check that the token
  stays one-hot and that an enabled node with requests grants exactly one
  requesting input. Assertions in `rr_hier_arbiter` check that `ack` is
  one-hot, granted only to requesters, and non-zero exactly when `req` is.
  The assertions are clocked and are ignored in synthesis.

## Files

| file | contents |
|---|---|
| `rtl/rr_arb_pkg.sv` | `size_list_t` and the `span()` helper that sizes groups |
| `rtl/rr_skip_node.sv` | one node: token register and skipping logic |
| `rtl/rr_group.sv` | a middle node with its leaves |
| `rtl/rr_hier_arbiter.sv` | top: root over the middle groups |
| `tb/rr_tree_model_pkg.sv` | reference model of the tree (integer tokens, plain scan) |
| `tb/tb_rr_skip_node.sv` | 4- and 13-input nodes, random, with enable |
| `tb/tb_rr_group.sv` | groups `{4,3}` and `{2,3,1}`, random, with enable |
| `tb/tb_rr_hier_arbiter.sv` | top at defaults: worked sequence, 20 000 random cycles, saturation |
| `tb/tb_rr_hier_configs.sv` | the 10- and 6-candidate groupings |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>`. The top-level one
also prints how often each mechanism occurred: turn hits, skips at each level,
wrap-arounds and idle cycles. From the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --top-module tb_rr_hier_arbiter \
    -y rtl -y tb rtl/rr_arb_pkg.sv tb/rr_tree_model_pkg.sv tb/tb_rr_hier_arbiter.sv
./obj_dir/Vtb_rr_hier_arbiter
```

Replace the testbench name to run the others. Each one finishes in well under
a second.

The random tests compare against `rr_tree_model`, which keeps every token as
an integer and finds each choice by scanning, without sharing code with the
RTL. To try another grouping, construct the model with the same sizes, for
example `new(2, 2, '{2, 3, 2, 3})`, and override the top's parameters to
match.
