// tb_rr_group -- self-checking testbench for rr_group.
//
// Two groups are checked against the tree reference model (a root with one
// input stands in for the group's enable): the default group of two leaves
// with 4 and 3 candidates (the upper middle node of the 13-candidate tree),
// and a group of three leaves with 2, 3 and 1 candidates. Requests and the
// enable are random, with many sparse patterns so that the parent node has to
// skip idle leaf groups. Grant and any are checked in the cycle of the
// request. The testbench counts cycles in which the parent's token sat on an
// idle leaf group (a skip at the parent level) and fails if there were none.
module tb_rr_group;
  import rr_arb_pkg::*;
  import rr_tree_model_pkg::*;

  localparam int unsigned CYCLES = 4000;
  localparam size_list_t SIZES_B = '{2, 3, 1, 0, 0, 0, 0, 0};

  logic clk = 1'b0;
  logic rst;
  logic en_a, en_b;
  logic [6:0] req_a, gnt_a;
  logic [5:0] req_b, gnt_b;
  logic any_a, any_b;

  int checks = 0;
  int failures = 0;
  int parent_skips = 0;

  always #5 clk = ~clk;

  rr_group dut_a (
    .clk (clk), .rst (rst), .en (en_a), .req (req_a), .gnt (gnt_a), .any (any_a)
  );

  rr_group #(.SIZES(SIZES_B), .FIRST(0), .G(3)) dut_b (
    .clk (clk), .rst (rst), .en (en_b), .req (req_b), .gnt (gnt_b), .any (any_b)
  );

  rr_tree_model model_a, model_b;

  task automatic check(string tag, rr_tree_model mdl, logic [63:0] r, logic e,
                       logic [63:0] g, logic a);
    logic [63:0] exp_g;
    int tok_before;
    tok_before = mdl.mid_tok[0];
    exp_g = e ? mdl.step(r, 1'b1) : 64'd0;
    if (e && r != 0 && !mdl.leaf_any(r, tok_before)) parent_skips++;
    checks++;
    if (g !== exp_g) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: req=%h en=%b gnt=%h expected %h", tag, r, e, g, exp_g);
    end
    checks++;
    if (a !== (r != 0)) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: any=%b for req=%h", tag, a, r);
    end
  endtask

  initial begin
    repeat (CYCLES + 200) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model_a = new(1, 2, '{4, 3});
    model_b = new(1, 3, '{2, 3, 1});
    rst = 1'b1;
    en_a = 1'b0; en_b = 1'b0; req_a = '0; req_b = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int c = 0; c < CYCLES; c++) begin
      @(negedge clk);
      case ($urandom_range(0, 3))
        0: req_a = 7'($urandom) & 7'($urandom) & 7'($urandom);
        1: req_a = 7'(1) << $urandom_range(0, 6);
        default: req_a = 7'($urandom);
      endcase
      case ($urandom_range(0, 3))
        0: req_b = 6'($urandom) & 6'($urandom) & 6'($urandom);
        1: req_b = 6'(1) << $urandom_range(0, 5);
        default: req_b = 6'($urandom);
      endcase
      en_a = ($urandom_range(0, 7) != 0);
      en_b = ($urandom_range(0, 7) != 0);
      #1;
      check("G=2 {4,3}", model_a, 64'(req_a), en_a, 64'(gnt_a), any_a);
      check("G=3 {2,3,1}", model_b, 64'(req_b), en_b, 64'(gnt_b), any_b);
    end
    $display("parent-level skips: %0d", parent_skips);
    checks++;
    if (parent_skips == 0) begin
      failures++;
      $display("FAIL the parent node never skipped an idle leaf group");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
