// tb_rr_hier_arbiter -- end-to-end testbench of the 13-candidate hierarchic
// round-robin arbiter at its default parameters.
//
// Phase 1 replays the verification sequence of the design: requests 0001,
// 0005, 0007, 1000, 0020, 0000 and 0600 (hex) after reset, and compares every
// grant and the seven token registers (root, two middle and four leaf nodes)
// with the expected values, given as one-hot masks.
// Phase 2 drives random requests (sparse, single, dense and clustered
// patterns) and compares every grant with the tree reference model, in the
// cycle of the request. It counts each mechanism: turn hits, skips at the
// leaf, middle and root level, wrap-around skips, idle cycles, and it fails
// if one of them never happened. Every cycle with a request must produce a
// grant (no turn is missed).
// Phase 3 holds all 13 requests for many cycles and checks the service
// interval of every candidate: a candidate in a leaf of s inputs is granted
// once every 2 * 2 * s cycles.
module tb_rr_hier_arbiter;
  import rr_tree_model_pkg::*;

  localparam int N = 13;
  localparam int CYCLES = 20000;

  logic clk = 1'b0;
  logic rst;
  logic [N-1:0] req, ack;

  int checks = 0;
  int failures = 0;
  int hits = 0, leaf_skips = 0, mid_skips = 0, root_skips = 0, wraps = 0, idles = 0;

  always #5 clk = ~clk;

  rr_hier_arbiter dut (
    .clk (clk), .rst (rst), .req (req), .ack (ack)
  );

  rr_tree_model model;

  task automatic fail(string msg);
    failures++;
    if (failures <= 20) $display("FAIL %s", msg);
  endtask

  task automatic expect_val(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) fail($sformatf("%s = %h, expected %h", what, got, exp));
  endtask

  // Token registers: RRu, RRm1, RRm0, RRd3, RRd2, RRd1, RRd0.
  task automatic expect_tokens(int step, int u, int m1, int m0, int d3, int d2, int d1, int d0);
    expect_val($sformatf("step %0d RRu", step), 16'(dut.u_root.rrt), 16'(u));
    expect_val($sformatf("step %0d RRm1", step), 16'(dut.g_mid[1].u_grp.u_parent.rrt), 16'(m1));
    expect_val($sformatf("step %0d RRm0", step), 16'(dut.g_mid[0].u_grp.u_parent.rrt), 16'(m0));
    expect_val($sformatf("step %0d RRd3", step), 16'(dut.g_mid[1].u_grp.g_leaf[1].u_leaf.rrt), 16'(d3));
    expect_val($sformatf("step %0d RRd2", step), 16'(dut.g_mid[1].u_grp.g_leaf[0].u_leaf.rrt), 16'(d2));
    expect_val($sformatf("step %0d RRd1", step), 16'(dut.g_mid[0].u_grp.g_leaf[1].u_leaf.rrt), 16'(d1));
    expect_val($sformatf("step %0d RRd0", step), 16'(dut.g_mid[0].u_grp.g_leaf[0].u_leaf.rrt), 16'(d0));
  endtask

  // Classify the arbitration about to happen, from the model's tokens.
  function automatic void classify(logic [63:0] r);
    int m, k, leaf;
    logic [63:0] g;
    int rt, mt, lt;
    if (r == 0) begin
      idles++;
      return;
    end
    rt = model.root_tok;
    g = model.step(r, 1'b0);
    m = model.last_path[0];
    k = model.last_path[1];
    leaf = m * model.lpm + k;
    mt = model.mid_tok[m];
    lt = model.leaf_tok[leaf];
    if (m != rt) root_skips++;
    if (k != mt) mid_skips++;
    if (model.last_path[2] == lt) hits++;
    else begin
      leaf_skips++;
      if (model.last_path[2] < lt) wraps++;
    end
  endfunction

  initial begin
    repeat (CYCLES + 1000) @(posedge clk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Phase 1 vectors: request, expected grant, expected tokens after the edge.
  typedef struct {
    logic [15:0] req;
    logic [15:0] ack;
    int u, m1, m0, d3, d2, d1, d0;
  } vec_t;

  vec_t vecs[$];

  initial begin
    logic [63:0] exp_ack;
    int last_grant[N];
    int gap_max[N];

    model = new(2, 2, '{3, 3, 3, 4});
    rst = 1'b1;
    req = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    // ---- Phase 1: directed sequence --------------------------------------
    //            req      ack      RRu m1 m0 d3 d2 d1 d0
    vecs.push_back('{16'h0000, 16'h0000, 1, 1, 1, 1, 1, 1, 1});
    vecs.push_back('{16'h0000, 16'h0000, 1, 1, 1, 1, 1, 1, 1});
    vecs.push_back('{16'h0001, 16'h0001, 2, 1, 2, 1, 1, 1, 2});
    vecs.push_back('{16'h0005, 16'h0004, 2, 1, 2, 1, 1, 1, 1});
    vecs.push_back('{16'h0005, 16'h0001, 2, 1, 2, 1, 1, 1, 2});
    vecs.push_back('{16'h0007, 16'h0002, 2, 1, 2, 1, 1, 1, 4});
    vecs.push_back('{16'h0007, 16'h0004, 2, 1, 2, 1, 1, 1, 1});
    vecs.push_back('{16'h0007, 16'h0001, 2, 1, 2, 1, 1, 1, 2});
    vecs.push_back('{16'h0007, 16'h0002, 2, 1, 2, 1, 1, 1, 4});
    vecs.push_back('{16'h1000, 16'h1000, 1, 1, 2, 1, 1, 1, 4});
    vecs.push_back('{16'h1000, 16'h1000, 1, 1, 2, 1, 1, 1, 4});
    vecs.push_back('{16'h0020, 16'h0020, 2, 1, 1, 1, 1, 1, 4});
    vecs.push_back('{16'h0000, 16'h0000, 2, 1, 1, 1, 1, 1, 4});
    vecs.push_back('{16'h0000, 16'h0000, 2, 1, 1, 1, 1, 1, 4});
    vecs.push_back('{16'h0600, 16'h0200, 1, 1, 1, 2, 1, 1, 4});
    vecs.push_back('{16'h0600, 16'h0400, 1, 1, 1, 4, 1, 1, 4});
    expect_tokens(0, 1, 1, 1, 1, 1, 1, 1);
    foreach (vecs[i]) begin
      @(negedge clk) req = N'(vecs[i].req);
      #1;
      expect_val($sformatf("step %0d ack", i + 1), 16'(ack), vecs[i].ack);
      void'(model.step(64'(req), 1'b1));
      @(posedge clk);
      #1;
      expect_tokens(i + 1, vecs[i].u, vecs[i].m1, vecs[i].m0, vecs[i].d3, vecs[i].d2,
                    vecs[i].d1, vecs[i].d0);
    end

    // ---- Phase 2: random requests against the model ----------------------
    for (int c = 0; c < CYCLES; c++) begin
      @(negedge clk);
      case ($urandom_range(0, 5))
        0: req = N'($urandom) & N'($urandom) & N'($urandom);
        1: req = N'(1) << $urandom_range(0, N - 1);
        2: req = '0;
        3: begin  // a cluster of neighbouring candidates: an unevenly hot resource
          automatic int lo = $urandom_range(0, N - 1);
          req = N'(((1 << $urandom_range(1, 4)) - 1) << lo);
        end
        default: req = N'($urandom);
      endcase
      #1;
      classify(64'(req));
      exp_ack = model.step(64'(req), 1'b1);
      expect_val("random ack", 16'(ack), 16'(exp_ack));
      checks++;
      if ((req != 0) != (ack != 0)) fail($sformatf("req=%h but ack=%h", req, ack));
    end
    $display("events: turn hits=%0d leaf skips=%0d middle skips=%0d root skips=%0d wrap-around skips=%0d idle=%0d",
             hits, leaf_skips, mid_skips, root_skips, wraps, idles);
    checks++;
    if (hits == 0 || leaf_skips == 0 || mid_skips == 0 || root_skips == 0 ||
        wraps == 0 || idles == 0)
      fail("some arbitration mechanism never occurred");

    // ---- Phase 3: all candidates requesting ------------------------------
    foreach (last_grant[i]) begin
      last_grant[i] = -1;
      gap_max[i] = 0;
    end
    for (int c = 0; c < 200; c++) begin
      @(negedge clk) req = '1;
      #1;
      exp_ack = model.step(64'(req), 1'b1);
      expect_val("saturated ack", 16'(ack), 16'(exp_ack));
      for (int i = 0; i < N; i++)
        if (ack[i]) begin
          if (last_grant[i] >= 0 && c - last_grant[i] > gap_max[i]) gap_max[i] = c - last_grant[i];
          last_grant[i] = c;
        end
    end
    for (int i = 0; i < N; i++) begin
      automatic int s = (i >= 9) ? 4 : 3;
      checks++;
      if (gap_max[i] != 2 * 2 * s)
        fail($sformatf("candidate %0d served every %0d cycles, expected %0d", i, gap_max[i], 4 * s));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
