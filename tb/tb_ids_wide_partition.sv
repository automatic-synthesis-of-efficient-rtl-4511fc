// tb_ids_wide_partition: random test of one multi-byte partition pipeline at
// eight bytes per clock.
//
// Partition 0 of the default rule set (pattern1, pattern2, root and five
// /cgi-... URLs) is built with BYTES = 8. Words of eight bytes drawn from a
// stream of patterns of both partitions, broken patterns and filler are
// offered with random idle clocks. The reference pushes each accepted byte
// into a history; a pattern ending at byte b of the word is expected on
// match[j][7-b] two clocks after the word was accepted. Every lane offset
// must see at least one match.
module tb_ids_wide_partition;
  import ids_pkg::*;
  import tb_ids_ref_pkg::*;

  localparam int PID = 0;
  localparam int NL  = 8;
  localparam int W   = 8;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [W-1:0][7:0] in_word = '0;
  logic [NL-1:0][W-1:0] match;
  int checks = 0, failures = 0;

  ids_wide_partition #(.PART_ID(PID), .BYTES(W)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_word(in_word), .match(match));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (7000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int gidx [NL];
  int per_off [W];
  logic [NL-1:0][W-1:0] exp0 = '0, exp1 = '0;
  rule_text_t hist = '0;
  logic [7:0] q [$];

  initial begin
    int n = 0;
    for (int r = 0; r < DEF_NUM_RULES; r++)
      if (DEF_RULE_PART[r] == PID) begin gidx[n] = r; n++; end
    for (int o = 0; o < W; o++) per_off[o] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      for (int j = 0; j < NL; j++)
        for (int o = 0; o < W; o++) begin
          checks++;
          if (match[j][o] !== exp1[j][o]) begin
            failures++;
            if (failures < 10) $display("cycle %0d rule %0d offset %0d: %0b expected %0b",
                                        i, gidx[j], o, match[j][o], exp1[j][o]);
          end
          if (match[j][o]) per_off[o]++;
        end
      while (q.size() < W) begin
        if ($urandom_range(0, 1) == 0) begin
          int r;
          rule_text_t t;
          r = $urandom_range(0, DEF_NUM_RULES - 1);
          t = DEF_RULE_TEXT[r];
          for (int k = MAX_LEN - 1; k >= 0; k--)
            if (t[8*k +: 8] != 0)
              q.push_back((DEF_RULE_NOCASE[r] && $urandom_range(0, 1)) ? flip_case(t[8*k +: 8]) : t[8*k +: 8]);
          if ($urandom_range(0, 4) == 0) q[q.size() - 1] = q[q.size() - 1] ^ 8'h02;
        end else q.push_back(DEF_RULE_TEXT[$urandom_range(0, DEF_NUM_RULES - 1)][8*$urandom_range(0, 5) +: 8] | 8'h01);
      end
      exp1 = exp0;
      exp0 = '0;
      in_valid = ($urandom_range(0, 4) != 0);
      if (in_valid)
        for (int b = 0; b < W; b++) begin
          in_word[b] = q.pop_front();
          hist = push(hist, in_word[b]);
          for (int j = 0; j < NL; j++)
            exp0[j][W-1-b] = window_match(DEF_RULE_TEXT[gidx[j]], DEF_RULE_NOCASE[gidx[j]], hist);
        end
    end
    for (int o = 0; o < W; o++) begin
      checks++;
      if (per_off[o] == 0) begin failures++; $display("no match at offset %0d", o); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
