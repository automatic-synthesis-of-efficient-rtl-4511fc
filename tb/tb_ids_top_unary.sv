// tb_ids_top_unary: end-to-end test of the matcher built as the
// partitioning-only unary architecture (TREE = 0), default rule set, two
// partitions. Apart from the architecture it is the same test as tb_ids_top;
// the shared-prefix counters are only reported, since this architecture has
// no prefix blocks.
//
// A byte stream of random filler, whole patterns, broken patterns (last byte
// changed), patterns in flipped letter case and back-to-back overlapping
// patterns is fed with random idle cycles (in_valid low), including idle
// cycles inside patterns. Every cycle the 16 match outputs are compared with
// a reference computed from the byte history, two clocks after the byte that
// completes a pattern. The test also counts how often each mechanism occurred
// and fails if one never did: matches in each partition, tree matches through
// a shared level-1 prefix and through a shared level-2 prefix, unary matches, case-insensitive matches on
// upper-case input, matches with a stall inside the pattern, matches of both
// partitions in the same cycle, and a match of every rule.
module tb_ids_top_unary;
  import ids_pkg::*;
  import tb_ids_ref_pkg::*;

  localparam int N      = DEF_NUM_RULES;
  localparam int CYCLES = 40000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [7:0] in_char = 8'h00;
  logic [N-1:0] match;

  ids_top #(.TREE(1'b0)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_char(in_char), .match(match)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;

  initial begin : watchdog
    repeat (CYCLES + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // rule properties worked out independently of the design
  int  rlen [N];
  bit  shared_l1 [N];
  bit  shared_l2 [N];
  int  n_l2_shared = 0;
  int  rule_hits [N];
  int  n_part [2], n_tree_shared, n_unary, n_nocase_upper, n_stall_inside, n_both_parts;

  function automatic bit tree_rule(int r);
    return rlen[r] > 8;
  endfunction

  // stream generator state
  logic [7:0] queue [$];
  rule_text_t hist = '0;
  bit   exp0 [N], exp1 [N];
  bit   upper0 [N], upper1 [N];
  bit   stall0 [N], stall1 [N];
  int   upper_marks [$];   // remaining bytes of an upper-case insertion
  int   last_stall = -100, accepted = 0;

  task automatic enqueue_rule(int r, bit mangle, bit upcase);
    for (int i = rlen[r] - 1; i >= 0; i--) begin
      logic [7:0] c = DEF_RULE_TEXT[r][8*i +: 8];
      if (upcase) c = flip_case(c);
      if (mangle && i == 0) c = c ^ 8'h01;
      queue.push_back(c);
    end
  endtask

  initial begin
    for (int r = 0; r < N; r++) begin
      rlen[r] = 0;
      for (int k = 0; k < MAX_LEN; k++) if (DEF_RULE_TEXT[r][8*k +: 8] != 0) rlen[r] = k + 1;
      shared_l1[r] = 1'b0;
      shared_l2[r] = 1'b0;
      for (int q = 0; q < r; q++)
        if (DEF_RULE_PART[q] == DEF_RULE_PART[r] && rlen[q] > 8 && rlen[r] > 8 &&
            DEF_RULE_TEXT[q][8*(rlen[q]-4) +: 32] == DEF_RULE_TEXT[r][8*(rlen[r]-4) +: 32])
          shared_l1[r] = 1'b1;
      for (int q = 0; q < r; q++)
        if (DEF_RULE_PART[q] == DEF_RULE_PART[r] && rlen[q] > 8 && rlen[r] > 8 &&
            DEF_RULE_TEXT[q][8*(rlen[q]-8) +: 64] == DEF_RULE_TEXT[r][8*(rlen[r]-8) +: 64])
          shared_l2[r] = 1'b1;
      rule_hits[r] = 0;
      exp0[r] = 0; exp1[r] = 0; upper0[r] = 0; upper1[r] = 0; stall0[r] = 0; stall1[r] = 0;
    end
    n_part = '{0, 0}; n_tree_shared = 0; n_unary = 0; n_nocase_upper = 0;
    n_stall_inside = 0; n_both_parts = 0;

    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // directed start: overlapping and simultaneous matches
    enqueue_rule(14, 0, 0);          // /scripts/root.exe also holds root
    enqueue_rule(0, 0, 0);
    enqueue_rule(1, 0, 0);           // pattern1pattern2
    enqueue_rule(9, 0, 1);           // HACKER

    for (cyc = 0; cyc < CYCLES; cyc++) begin
      bit any_p0, any_p1;
      bit got_upper;
      @(negedge clk);
      // ---- check outputs of this cycle
      any_p0 = 0; any_p1 = 0;
      for (int r = 0; r < N; r++) begin
        checks++;
        if (match[r] !== exp1[r]) begin
          failures++;
          if (failures < 10)
            $display("cycle %0d rule %0d: match=%0b expected %0b", cyc, r, match[r], exp1[r]);
        end
        if (exp1[r] && match[r]) begin
          rule_hits[r]++;
          n_part[DEF_RULE_PART[r]]++;
          if (DEF_RULE_PART[r] == 0) any_p0 = 1; else any_p1 = 1;
          if (tree_rule(r) && shared_l1[r]) n_tree_shared++;
          if (tree_rule(r) && shared_l2[r]) n_l2_shared++;
          if (!tree_rule(r)) n_unary++;
          if (upper1[r]) n_nocase_upper++;
          if (stall1[r]) n_stall_inside++;
        end
      end
      if (any_p0 && any_p1) n_both_parts++;

      // ---- drive the next byte
      if (queue.size() == 0) begin
        int sel;
        sel = $urandom_range(0, 9);
        if (sel < 4) begin
          int r;
          r = $urandom_range(0, N - 1);
          enqueue_rule(r, $urandom_range(0, 5) == 0, DEF_RULE_NOCASE[r] && $urandom_range(0, 1));
        end else begin
          int n;
          n = $urandom_range(1, 6);
          for (int i = 0; i < n; i++) begin
            // filler from the pattern alphabet, upper and lower case
            logic [7:0] c;
            c = DEF_RULE_TEXT[$urandom_range(0, N-1)][8*$urandom_range(0, 3) +: 8];
            if (c == 0 || $urandom_range(0, 7) == 0) c = 8'($urandom_range(1, 255));
            queue.push_back(c);
          end
        end
      end
      in_valid = ($urandom_range(0, 4) != 0);
      if (in_valid) begin
        in_char = queue.pop_front();
        hist = push(hist, in_char);
        accepted++;
      end else begin
        in_char = 8'($urandom);
        last_stall = accepted;
      end

      // ---- reference: matches that become visible two clocks later
      for (int r = 0; r < N; r++) begin
        exp1[r] = exp0[r]; upper1[r] = upper0[r]; stall1[r] = stall0[r];
        exp0[r] = in_valid && window_match(DEF_RULE_TEXT[r], DEF_RULE_NOCASE[r], hist);
        got_upper = 0;
        for (int k = 0; k < rlen[r]; k++)
          if (hist[8*k +: 8] >= "A" && hist[8*k +: 8] <= "Z" &&
              DEF_RULE_TEXT[r][8*k +: 8] >= "a" && DEF_RULE_TEXT[r][8*k +: 8] <= "z") got_upper = 1;
        upper0[r] = got_upper;
        stall0[r] = (last_stall > accepted - rlen[r]) && (last_stall < accepted);
      end
    end

    $display("matches: partition0=%0d partition1=%0d tree_shared_prefix=%0d unary=%0d",
             n_part[0], n_part[1], n_tree_shared, n_unary);
    $display("matches: shared_level2_prefix=%0d", n_l2_shared);
    $display("matches: nocase_upper=%0d stall_inside=%0d both_partitions_same_cycle=%0d",
             n_nocase_upper, n_stall_inside, n_both_parts);
    checks++; if (n_part[0] == 0) begin failures++; $display("no partition-0 match"); end
    checks++; if (n_part[1] == 0) begin failures++; $display("no partition-1 match"); end
    checks++; if (n_unary == 0) begin failures++; $display("no unary match"); end
    checks++; if (n_nocase_upper == 0) begin failures++; $display("no case-insensitive match"); end
    checks++; if (n_stall_inside == 0) begin failures++; $display("no stalled match"); end
    checks++; if (n_both_parts == 0) begin failures++; $display("no simultaneous match"); end
    for (int r = 0; r < N; r++) begin
      checks++;
      if (rule_hits[r] == 0) begin failures++; $display("rule %0d never matched", r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
