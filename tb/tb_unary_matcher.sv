// tb_unary_matcher: random test of one unary matcher.
//
// The matcher holds the case-insensitive pattern "hAck/3" in a bit-line map
// that also carries unrelated exact bytes, so line selection matters. The
// testbench plays the character pipeline itself: it keeps a byte history,
// drives the decoded stages and fire, and expects match one clock later to
// equal fire AND "the newest six bytes spell hack/3 in any letter case".
// Bytes come mostly from the pattern's alphabet, with whole patterns (in
// random case, sometimes with one byte replaced) inserted often.
module tb_unary_matcher;
  import ids_pkg::*;
  import tb_ids_ref_pkg::*;

  localparam rule_text_t TEXT  = rule_text_t'("hAck/3");
  localparam bit         NC    = 1'b1;
  localparam key_mask_t  USED  = keys_of(TEXT, NC, rule_text_t'("xH3kQ"));
  localparam int         NL    = count_keys(USED);
  localparam int         D     = 8;

  logic clk = 0, rst_n = 0, fire = 0, match;
  logic [D-1:0][NL-1:0] stages = '0;
  int checks = 0, failures = 0, hits = 0;

  unary_matcher #(.TEXT(TEXT), .NOCASE(NC), .USED(USED), .NLINES(NL), .DEPTH(D)) dut (
    .clk(clk), .rst_n(rst_n), .stages(stages), .fire(fire), .match(match));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rule_text_t hist = '0;
  logic [7:0] q [$];
  bit exp_m = 0;
  localparam string ALPHA = "hackHACK/3x";

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
      if (q.size() == 0) begin
        if ($urandom_range(0, 2) == 0) begin
          // sometimes with one byte wrong, so every compared position is exercised
          int bad;
          bad = $urandom_range(0, 11);
          for (int k = 5; k >= 0; k--)
            q.push_back(k == bad ? 8'("x") :
                        $urandom_range(0, 1) ? flip_case(TEXT[8*k +: 8]) : TEXT[8*k +: 8]);
        end else q.push_back(ALPHA[$urandom_range(0, ALPHA.len() - 1)]);
      end
      fire = ($urandom_range(0, 3) != 0);
      if (fire) begin
        hist = push(hist, q.pop_front());
        for (int k = 0; k < D; k++) stages[k] = decode(USED, hist[8*k +: 8])[NL-1:0];
      end
      exp_m = fire && window_match(TEXT, NC, hist);
    end
    checks++;
    if (hits < 50) begin failures++; $display("too few matches: %0d", hits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
