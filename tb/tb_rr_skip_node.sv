// tb_rr_skip_node -- self-checking testbench for rr_skip_node.
//
// Two nodes are driven with random requests and a random enable: a 4-input
// node (the default, the largest leaf of the 13-candidate tree) and a
// 13-input node (the flat arbiter with skipping logic). A reference model
// keeps the token position as an integer and finds the expected grant by
// scanning upwards from it, cyclically; after each grant the model's token
// moves one place past the grant. Every cycle the grant and the any output
// are compared with the model, in the same cycle as the request (zero
// latency). The testbench also counts turn hits (token on a requester),
// skips (token on an idle candidate), wrap-around skips and idle cycles,
// and fails if any of them never happened.
module tb_rr_skip_node;

  localparam int unsigned NA = 4;
  localparam int unsigned NB = 13;
  localparam int unsigned CYCLES = 4000;

  logic clk = 1'b0;
  logic rst;
  logic en_a, en_b;
  logic [NA-1:0] req_a, gnt_a;
  logic [NB-1:0] req_b, gnt_b;
  logic any_a, any_b;

  int checks = 0;
  int failures = 0;
  int hits = 0, skips = 0, wraps = 0, idles = 0, disabled = 0;

  always #5 clk = ~clk;

  rr_skip_node dut_a (
    .clk (clk), .rst (rst), .en (en_a), .req (req_a), .gnt (gnt_a), .any (any_a)
  );

  rr_skip_node #(.N(NB)) dut_b (
    .clk (clk), .rst (rst), .en (en_b), .req (req_b), .gnt (gnt_b), .any (any_b)
  );

  // Reference: expected grant index for a token position, -1 for none.
  function automatic int pick(logic [15:0] r, int tok, int n);
    for (int k = 0; k < n; k++)
      if (r[(tok + k) % n]) return (tok + k) % n;
    return -1;
  endfunction

  int tok_a, tok_b;

  task automatic check_node(string tag, logic [15:0] r, logic e, logic [15:0] g,
                            logic a, int n, ref int tok, input bit count_events);
    int idx;
    logic [15:0] exp_g;
    idx = pick(r, tok, n);
    exp_g = (e && idx >= 0) ? (16'd1 << idx) : 16'd0;
    checks++;
    if (g !== exp_g) begin
      failures++;
      if (failures <= 10)
        $display("FAIL %s: req=%h en=%b tok=%0d gnt=%h expected %h", tag, r, e, tok, g, exp_g);
    end
    checks++;
    if (a !== (r != 0)) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: any=%b for req=%h", tag, a, r);
    end
    if (count_events) begin
      if (!e) disabled++;
      else if (idx < 0) idles++;
      else if (idx == tok) hits++;
      else if (idx < tok) wraps++;
      else skips++;
    end
    if (e && idx >= 0) tok = (idx + 1) % n;
  endtask

  initial begin
    repeat (CYCLES + 200) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    en_a = 1'b0; en_b = 1'b0; req_a = '0; req_b = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    tok_a = 0;
    tok_b = 0;
    for (int c = 0; c < CYCLES; c++) begin
      @(negedge clk);
      // Mix sparse and dense request patterns.
      case ($urandom_range(0, 3))
        0: req_a = NA'($urandom) & NA'($urandom);
        1: req_a = NA'(1) << $urandom_range(0, NA - 1);
        default: req_a = NA'($urandom);
      endcase
      case ($urandom_range(0, 3))
        0: req_b = NB'($urandom) & NB'($urandom) & NB'($urandom);
        1: req_b = NB'(1) << $urandom_range(0, NB - 1);
        default: req_b = NB'($urandom);
      endcase
      en_a = ($urandom_range(0, 7) != 0);
      en_b = ($urandom_range(0, 7) != 0);
      #1;
      check_node("N=4", 16'(req_a), en_a, 16'(gnt_a), any_a, NA, tok_a, 1'b1);
      check_node("N=13", 16'(req_b), en_b, 16'(gnt_b), any_b, NB, tok_b, 1'b0);
    end
    // Reset puts the token back on position 0.
    @(negedge clk) rst = 1'b1;
    @(negedge clk) rst = 1'b0;
    req_a = '1; en_a = 1'b1;
    #1;
    checks++;
    if (gnt_a !== NA'(1)) begin
      failures++;
      $display("FAIL reset: gnt=%h expected 1", gnt_a);
    end
    $display("events: hits=%0d skips=%0d wraps=%0d idle=%0d disabled=%0d",
             hits, skips, wraps, idles, disabled);
    checks++;
    if (hits == 0 || skips == 0 || wraps == 0 || idles == 0 || disabled == 0) begin
      failures++;
      $display("FAIL some arbitration case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
