// rr_skip_node -- one round-robin arbitration node with skipping logic.
//
// The node holds a one-hot token in the round-robin token register (RRT).
// The token marks the candidate that has the turn. The skipping logic (SL)
// starts at the token and walks towards higher indices, wrapping from N-1 to
// 0, past every candidate that does not request, and grants the first one
// that does. A request therefore never loses its turn to an idle candidate:
// whenever any request is asserted, exactly one is granted in the same cycle.
//
// After a grant the RRT is reloaded with the position just after the granted
// one (cyclically), so the granted candidate has the lowest priority in the
// next cycle. The RRT only changes when the node actually grants, that is
// when en is high and at least one request is asserted; otherwise it keeps
// its token.
//
// In a hierarchy of nodes, en is the turn passed down from the parent node,
// and any (the OR of all requests) is the request this node raises to its
// parent. A root node has en tied high. Used alone with en tied high, this
// module is the flat arbiter with skipping logic.
//
// Interface and timing:
//   req -> gnt and req -> any are combinational (grant in the cycle of the
//   request); the RRT updates on the rising clock edge. rst is synchronous and
//   active high and puts the token on position 0.
//
// The skip chain is written the plain way, one match stage per candidate, so
// its delay grows with N as the naive design does. The token walk direction,
// the reload with the next position and the reset value follow the described
// design and its verification waveform; the reset style, the en input name and
// the any output are choices of this implementation.
module rr_skip_node #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [N-1:0] req,
  output logic [N-1:0] gnt,
  output logic         any
);

  logic [N-1:0] rrt;        // token register, one-hot
  logic [N-1:0] sel;        // candidate chosen by the skipping logic
  logic [N-1:0] rrt_next;   // token after a grant: one place past sel

  // Skipping logic. search[i] is high when the walk that started at the token
  // reaches stage i without having met a request. Stages 0..N-1 cover the
  // candidates from the token upwards; stages N..2N-1 cover the wrap-around
  // back to the candidates below the token.
  logic [2*N-1:0] search;

  always_comb begin
    sel = '0;
    for (int unsigned i = 0; i < 2 * N; i++) begin
      if (i == 0)
        search[i] = rrt[0];
      else if (i < N)
        search[i] = rrt[i] | (search[i-1] & ~req[(i-1) % N]);
      else
        search[i] = search[i-1] & ~req[(i-1) % N];
      if (search[i] && req[i % N])
        sel[i % N] = 1'b1;
    end
  end

  // Reload value: the position after the granted one, cyclically.
  always_comb begin
    rrt_next = '0;
    for (int unsigned i = 0; i < N; i++)
      if (sel[i]) rrt_next[(i + 1) % N] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst)
      rrt <= N'(1);
    else if (en && any)
      rrt <= rrt_next;
  end

  assign any = |req;
  assign gnt = en ? sel : '0;

  // The token is always exactly one bit, and an enabled node with requests
  // grants exactly one of them (no miss).
  always_ff @(posedge clk) begin
    if (!rst) begin
      a_rrt_onehot: assert ((rrt != '0) && ((rrt & (rrt - 1'b1)) == '0))
        else $error("rr_skip_node: token register is not one-hot");
      a_no_miss: assert (!(en && any) || ((gnt != '0) && ((gnt & (gnt - 1'b1)) == '0) && ((gnt & ~req) == '0)))
        else $error("rr_skip_node: requests present but no single valid grant");
    end
  end

endmodule
