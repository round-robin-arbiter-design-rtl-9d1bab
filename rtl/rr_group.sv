// rr_group -- one sub-tree of the hierarchic round-robin arbiter: a parent
// skipping node over G leaf skipping nodes.
//
// The W candidates of the group are split into G consecutive leaf groups,
// whose sizes are SIZES[FIRST] .. SIZES[FIRST+G-1], lowest-numbered
// candidates in the first group. Each leaf node ORs its requests into one
// request bit for the parent node. The parent arbitrates among the leaf groups
// with its own token and skipping logic and passes the turn (en) to exactly
// one leaf, which then grants one of its own candidates. Every node on the
// granted path moves its token one place past its grant; all other nodes keep
// their tokens.
//
// The group looks from outside like a single node (en in, any out), so it can
// sit under a further parent node; rr_hier_arbiter uses it as the middle
// level of a three-level tree.
//
// Interface and timing: req -> gnt and req -> any are combinational; the
// tokens update on the rising clock edge; rst is synchronous, active high.
// The tree structure and the OR reduction follow the described design; the
// way sizes are passed in is a choice of this implementation.
module rr_group
  import rr_arb_pkg::*;
#(
  parameter size_list_t  SIZES = '{4, 3, 0, 0, 0, 0, 0, 0},
  parameter int unsigned FIRST = 0,
  parameter int unsigned G     = 2,
  localparam int unsigned W    = span(SIZES, FIRST, G)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [W-1:0] req,
  output logic [W-1:0] gnt,
  output logic         any
);

  logic [G-1:0] leaf_any;   // one OR-reduced request per leaf group
  logic [G-1:0] leaf_en;    // turn passed from the parent to one leaf

  rr_skip_node #(.N(G)) u_parent (
    .clk (clk),
    .rst (rst),
    .en  (en),
    .req (leaf_any),
    .gnt (leaf_en),
    .any (any)
  );

  for (genvar k = 0; k < G; k++) begin : g_leaf
    localparam int unsigned OFF = span(SIZES, FIRST, k);
    localparam int unsigned SZ  = SIZES[FIRST + k];

    rr_skip_node #(.N(SZ)) u_leaf (
      .clk (clk),
      .rst (rst),
      .en  (leaf_en[k]),
      .req (req[OFF +: SZ]),
      .gnt (gnt[OFF +: SZ]),
      .any (leaf_any[k])
    );
  end

endmodule
