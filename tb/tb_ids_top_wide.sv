// tb_ids_top_wide: end-to-end test of the multi-byte architecture, four
// bytes per clock (BYTES = 4), default rule set, two partitions.
//
// The byte stream (filler, whole patterns, broken patterns, patterns in
// flipped case) is cut into 4-byte words and offered with random idle
// clocks. The reference pushes the bytes of each accepted word into a
// history one at a time; after byte b of the word, the rules whose pattern
// ends there are expected on match[r][3-b] two clocks after the word was
// accepted. The test fails if any lane offset never saw a match, or if no
// clock ever carried two matches at once.
module tb_ids_top_wide;
  import ids_pkg::*;
  import tb_ids_ref_pkg::*;

  localparam int N = DEF_NUM_RULES;
  localparam int W = 4;
  localparam int CYCLES = 12000;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [W-1:0][7:0] in_char = '0;
  logic [N-1:0][W-1:0] match;
  int checks = 0, failures = 0;

  ids_top #(.BYTES(W)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_char(in_char), .match(match));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (CYCLES + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0][W-1:0] exp0 = '0, exp1 = '0;
  rule_text_t hist = '0;
  logic [7:0] q [$];
  int per_off [W];
  int multi_off = 0;

  initial begin
    for (int o = 0; o < W; o++) per_off[o] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < CYCLES; i++) begin
      @(negedge clk);
      for (int r = 0; r < N; r++)
        for (int o = 0; o < W; o++) begin
          checks++;
          if (match[r][o] !== exp1[r][o]) begin
            failures++;
            if (failures < 10) $display("cycle %0d rule %0d offset %0d: %0b expected %0b",
                                        i, r, o, match[r][o], exp1[r][o]);
          end
          if (match[r][o]) per_off[o]++;
        end
      if ($countones(match) > 1) multi_off++;

      while (q.size() < W) begin
        if ($urandom_range(0, 2) == 0) begin
          int r;
          rule_text_t t;
          r = $urandom_range(0, N - 1);
          t = DEF_RULE_TEXT[r];
          for (int k = MAX_LEN - 1; k >= 0; k--)
            if (t[8*k +: 8] != 0)
              q.push_back((DEF_RULE_NOCASE[r] && $urandom_range(0, 1)) ? flip_case(t[8*k +: 8]) : t[8*k +: 8]);
          if ($urandom_range(0, 4) == 0) q[q.size() - 1] = q[q.size() - 1] ^ 8'h04;
        end else begin
          int n;
          n = $urandom_range(0, 3);
          for (int k = 0; k < n; k++)
            q.push_back(DEF_RULE_TEXT[$urandom_range(0, N - 1)][8*$urandom_range(0, 4) +: 8] | 8'h01);
        end
      end
      exp1 = exp0;
      exp0 = '0;
      in_valid = ($urandom_range(0, 4) != 0);
      if (in_valid) begin
        for (int b = 0; b < W; b++) begin
          in_char[b] = q.pop_front();
          hist = push(hist, in_char[b]);
          for (int r = 0; r < N; r++)
            exp0[r][W-1-b] = window_match(DEF_RULE_TEXT[r], DEF_RULE_NOCASE[r], hist);
        end
      end
    end
    $display("matches per offset: %0d %0d %0d %0d, clocks with two or more matches: %0d",
             per_off[0], per_off[1], per_off[2], per_off[3], multi_off);
    for (int o = 0; o < W; o++) begin
      checks++;
      if (per_off[o] == 0) begin failures++; $display("no match at offset %0d", o); end
    end
    checks++;
    if (multi_off == 0) begin failures++; $display("no clock with two matches"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
