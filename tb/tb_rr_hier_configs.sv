// tb_rr_hier_configs -- the hierarchic round-robin arbiter in the two smaller
// groupings that were evaluated besides the 13-candidate one:
//   10 candidates as {{3}{2}}{{3}{2}}: two middle nodes with two leaves each,
//   6 candidates as {{3}{3}}: one group of two leaves (a one-input root).
// Each arbiter gets random requests and is compared with the tree reference
// model in every cycle; every cycle with a request must give a grant. Then all
// requests are held and each candidate's service interval is checked against
// the product of the fan-outs on its path.
module tb_rr_hier_configs;
  import rr_arb_pkg::*;
  import rr_tree_model_pkg::*;

  localparam int CYCLES = 10000;
  localparam size_list_t SIZES10 = '{2, 3, 2, 3, 0, 0, 0, 0};
  localparam size_list_t SIZES6  = '{3, 3, 0, 0, 0, 0, 0, 0};

  logic clk = 1'b0;
  logic rst;
  logic [9:0] req10, ack10;
  logic [5:0] req6, ack6;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  rr_hier_arbiter #(.NUM_MID(2), .LEAVES_PER_MID(2), .LEAF_SIZE(SIZES10)) dut10 (
    .clk (clk), .rst (rst), .req (req10), .ack (ack10)
  );

  rr_hier_arbiter #(.NUM_MID(1), .LEAVES_PER_MID(2), .LEAF_SIZE(SIZES6)) dut6 (
    .clk (clk), .rst (rst), .req (req6), .ack (ack6)
  );

  rr_tree_model m10, m6;

  task automatic fail(string msg);
    failures++;
    if (failures <= 20) $display("FAIL %s", msg);
  endtask

  task automatic compare(string tag, rr_tree_model mdl, logic [63:0] r, logic [63:0] a);
    logic [63:0] exp_a;
    exp_a = mdl.step(r, 1'b1);
    checks++;
    if (a !== exp_a) fail($sformatf("%s: req=%h ack=%h expected %h", tag, r, a, exp_a));
    checks++;
    if ((r != 0) != (a != 0)) fail($sformatf("%s: req=%h ack=%h (missed turn)", tag, r, a));
  endtask

  initial begin
    repeat (CYCLES + 1000) @(posedge clk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last10[10], gap10[10], last6[6], gap6[6];
    m10 = new(2, 2, '{2, 3, 2, 3});
    m6 = new(1, 2, '{3, 3});
    rst = 1'b1;
    req10 = '0;
    req6 = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    for (int c = 0; c < CYCLES; c++) begin
      @(negedge clk);
      case ($urandom_range(0, 3))
        0: begin req10 = 10'($urandom) & 10'($urandom); req6 = 6'($urandom) & 6'($urandom); end
        1: begin req10 = 10'(1) << $urandom_range(0, 9); req6 = 6'(1) << $urandom_range(0, 5); end
        default: begin req10 = 10'($urandom); req6 = 6'($urandom); end
      endcase
      #1;
      compare("10 candidates", m10, 64'(req10), 64'(ack10));
      compare("6 candidates", m6, 64'(req6), 64'(ack6));
    end

    foreach (last10[i]) begin last10[i] = -1; gap10[i] = 0; end
    foreach (last6[i]) begin last6[i] = -1; gap6[i] = 0; end
    for (int c = 0; c < 200; c++) begin
      @(negedge clk);
      req10 = '1;
      req6 = '1;
      #1;
      compare("10 candidates saturated", m10, 64'(req10), 64'(ack10));
      compare("6 candidates saturated", m6, 64'(req6), 64'(ack6));
      for (int i = 0; i < 10; i++)
        if (ack10[i]) begin
          if (last10[i] >= 0 && c - last10[i] > gap10[i]) gap10[i] = c - last10[i];
          last10[i] = c;
        end
      for (int i = 0; i < 6; i++)
        if (ack6[i]) begin
          if (last6[i] >= 0 && c - last6[i] > gap6[i]) gap6[i] = c - last6[i];
          last6[i] = c;
        end
    end
    // Leaves of the 10-candidate tree, lowest first: 2, 3, 2, 3 candidates.
    for (int i = 0; i < 10; i++) begin
      automatic int s = (i < 2 || (i >= 5 && i < 7)) ? 2 : 3;
      checks++;
      if (gap10[i] != 4 * s) fail($sformatf("10 candidates: %0d served every %0d, expected %0d", i, gap10[i], 4 * s));
    end
    for (int i = 0; i < 6; i++) begin
      checks++;
      if (gap6[i] != 2 * 3) fail($sformatf("6 candidates: %0d served every %0d, expected 6", i, gap6[i]));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
