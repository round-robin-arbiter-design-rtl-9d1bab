// rr_hier_arbiter -- round-robin arbiter with hierarchic skipping.
//
// A round-robin arbiter that skips idle candidates never wastes a turn, but a
// flat skip chain over n candidates is O(n) deep. This arbiter splits the
// candidates into a tree of small nodes, each with its own token register and
// skipping logic (rr_skip_node), so each node's chain is short and the turn
// is passed down the tree.
//
// Tree, default configuration (13 candidates, three levels):
//   root node (2 inputs, the upper token register)
//     middle node 1 (2 inputs): leaf 3 = candidates 12..9  (4)
//                               leaf 2 = candidates  8..6  (3)
//     middle node 0 (2 inputs): leaf 1 = candidates  5..3  (3)
//                               leaf 0 = candidates  2..0  (3)
// i.e. the grouping {{4}{3}}{{3}{3}}. Requests are OR-reduced up the tree,
// the root picks a middle node, that node picks a leaf, and the leaf grants
// one candidate. Each node on the granted path then moves its token one place
// past its grant; the others keep theirs. All tokens reset to position 0.
//
// Parameters: NUM_MID middle nodes under the root, LEAVES_PER_MID leaves under
// each, and LEAF_SIZE the leaf sizes, lowest candidates first (entries beyond
// NUM_MID*LEAVES_PER_MID unused). NUM_MID = 1 gives a two-level tree behind a
// one-input root, e.g. {{3}{3}} for six candidates.
//
// Interface and timing: ack is a one-hot grant, combinational from req in the
// same cycle; whenever req is non-zero exactly one ack bit is set. The token
// registers update on the rising edge of clk. rst is synchronous and active
// high.
//
// The grouping, the three levels, the token initialisation and update rule
// follow the described design; the synchronous reset and the parameter
// encoding of the tree are choices of this implementation.
module rr_hier_arbiter
  import rr_arb_pkg::*;
#(
  parameter int unsigned NUM_MID        = 2,
  parameter int unsigned LEAVES_PER_MID = 2,
  parameter size_list_t  LEAF_SIZE      = '{3, 3, 3, 4, 0, 0, 0, 0},
  localparam int unsigned N = span(LEAF_SIZE, 0, NUM_MID * LEAVES_PER_MID)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] req,
  output logic [N-1:0] ack
);

  logic [NUM_MID-1:0] mid_any;   // OR-reduced request of each middle node
  logic [NUM_MID-1:0] mid_en;    // turn passed from the root
  logic               root_any;  // some request is asserted

  rr_skip_node #(.N(NUM_MID)) u_root (
    .clk (clk),
    .rst (rst),
    .en  (1'b1),
    .req (mid_any),
    .gnt (mid_en),
    .any (root_any)
  );

  for (genvar m = 0; m < NUM_MID; m++) begin : g_mid
    localparam int unsigned FIRST = m * LEAVES_PER_MID;
    localparam int unsigned OFF   = span(LEAF_SIZE, 0, FIRST);
    localparam int unsigned W     = span(LEAF_SIZE, FIRST, LEAVES_PER_MID);

    rr_group #(
      .SIZES (LEAF_SIZE),
      .FIRST (FIRST),
      .G     (LEAVES_PER_MID)
    ) u_grp (
      .clk (clk),
      .rst (rst),
      .en  (mid_en[m]),
      .req (req[OFF +: W]),
      .gnt (ack[OFF +: W]),
      .any (mid_any[m])
    );
  end

  // The arbiter never misses: a request always gets a grant in its cycle.
  always_ff @(posedge clk) begin
    if (!rst) begin
      a_grant_iff_req: assert (root_any == (ack != '0))
        else $error("rr_hier_arbiter: request without grant or grant without request");
      a_ack_onehot: assert (((ack & (ack - 1'b1)) == '0) && ((ack & ~req) == '0))
        else $error("rr_hier_arbiter: grant not one-hot or not requested");
    end
  end

endmodule
