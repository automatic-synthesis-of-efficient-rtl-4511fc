// tb_tree_matcher: random test of the final match gate of the tree
// architecture.
//
// The matcher holds "/scripts/ab" (length 11): level-1 prefix "/scr",
// level-2 prefix "ipts", suffix "/ab". The testbench drives random level-1
// and level-2 hit chains, random fire and a pipeline built from a byte
// history over the suffix alphabet, and expects match one clock later to be
// fire AND l1_hits[6] AND l2_hits[2] AND "the newest three bytes are /ab".
module tb_tree_matcher;
  import ids_pkg::*;
  import tb_ids_ref_pkg::*;

  localparam rule_text_t TEXT = rule_text_t'("/scripts/ab");
  localparam key_mask_t  USED = keys_of(TEXT, 1'b0, rule_text_t'("z"));
  localparam int         NL   = count_keys(USED);
  localparam int         D    = 12;
  localparam int         ND   = D - PREFIX_LEN;

  logic clk = 0, rst_n = 0, fire = 0, match;
  logic [D-1:0][NL-1:0] stages = '0;
  logic [ND-1:0] l1 = '0, l2 = '0;
  int checks = 0, failures = 0, hits = 0;

  tree_matcher #(.TEXT(TEXT), .NOCASE(1'b0), .USED(USED), .NLINES(NL), .DEPTH(D), .NDELAY(ND)) dut (
    .clk(clk), .rst_n(rst_n), .stages(stages), .l1_hits(l1), .l2_hits(l2), .fire(fire), .match(match));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rule_text_t hist = '0;
  bit exp_m = 0;
  localparam string A = "/abz";

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      checks++;
      if (match !== exp_m) begin
        failures++;
        if (failures < 10) $display("cycle %0d: match=%0b expected %0b", i, match, exp_m);
      end
      if (match) hits++;
      hist = push(hist, A[$urandom_range(0, 3)]);
      if ($urandom_range(0, 1)) hist[23:0] = 24'("/ab");
      for (int k = 0; k < D; k++) stages[k] = decode(USED, hist[8*k +: 8])[NL-1:0];
      l1 = ND'($urandom) | ND'($urandom);
      l2 = ND'($urandom) | ND'($urandom);
      fire = ($urandom_range(0, 3) != 0);
      exp_m = fire && l1[6] && l2[2] && (hist[23:0] == 24'("/ab"));
    end
    checks++;
    if (hits < 50) begin failures++; $display("too few matches: %0d", hits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
