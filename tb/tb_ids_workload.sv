// tb_ids_workload: the matcher regenerated for a rule set of the size used in
// the evaluation of this architecture: NR synthetic Nikto-style URL patterns
// split over NP partitions, tree architecture.
//
// The rule set is computed at elaboration by a small linear congruential
// generator: about nine in ten patterns are a directory prefix taken from a
// list of eight (/cgi-bin/, /scripts/, /_vti_bin/, ...) followed by a random
// file name, giving lengths of 10 to 32 characters and plenty of shared level-1
// and level-2 prefixes; the rest are short words of 4 to 8 characters. Rules
// with the same directory go to the same partition, standing in for the
// similarity-graph partitioning. The stream first contains every pattern once,
// then random patterns, broken patterns and filler with idle clocks; every
// match output is compared with a reference computed from the byte history.
// Every rule must match at least once.
module tb_ids_workload;
  import ids_pkg::*;
  import tb_ids_ref_pkg::*;

  localparam int NR = 64;
  localparam int NP = 4;
  localparam int NDIR = 8;

  typedef rule_text_t rules_t [NR];
  typedef int         parts_t [NR];

  function automatic int unsigned lcg(int unsigned s);
    return s * 32'd1664525 + 32'd1013904223;
  endfunction

  function automatic rule_text_t dir_text(int d);
    case (d)
      0: return rule_text_t'("/cgi-bin/");
      1: return rule_text_t'("/cgi-win/");
      2: return rule_text_t'("/scripts/");
      3: return rule_text_t'("/_vti_bin/");
      4: return rule_text_t'("/iisadmin/");
      5: return rule_text_t'("/msadc/");
      6: return rule_text_t'("/cgi-sys/");
      default: return rule_text_t'("/admin/");
    endcase
  endfunction

  function automatic int dir_of(int r);
    int unsigned s = 32'd12345 + 32'(r) * 32'd7919;
    s = lcg(lcg(s));
    return ((s >> 20) % 10 == 9) ? -1 : int'((s >> 8) % NDIR);
  endfunction

  function automatic rules_t gen_rules();
    rules_t t;
    for (int r = 0; r < NR; r++) begin
      int unsigned s = lcg(32'd777 + 32'(r) * 32'd104729);
      int d = dir_of(r);
      int len, total;
      rule_text_t x = (d >= 0) ? dir_text(d) : '0;
      total = (d >= 0) ? text_len(x) : 0;
      s = lcg(s);
      len = (d >= 0) ? 3 + int'((s >> 16) % 18) : 4 + int'((s >> 16) % 5);
      if (total + len > MAX_LEN) len = MAX_LEN - total;
      for (int i = 0; i < len; i++) begin
        int unsigned v;
        s = lcg(s);
        v = (s >> 16) % 40;
        x = {x[8*MAX_LEN-9:0], (v < 26) ? 8'(8'h61 + v) : (v < 36) ? 8'(8'h30 + v - 26) :
                                (v < 38) ? 8'h2e : 8'h5f};
      end
      t[r] = x;
    end
    return t;
  endfunction

  function automatic parts_t gen_parts();
    parts_t p;
    for (int r = 0; r < NR; r++) p[r] = (dir_of(r) >= 0) ? dir_of(r) % NP : r % NP;
    return p;
  endfunction

  localparam rules_t RT = gen_rules();
  localparam parts_t RP = gen_parts();

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [7:0] in_char = 0;
  logic [NR-1:0] match;
  int checks = 0, failures = 0;

  ids_top #(.NUM_RULES(NR), .NUM_PARTS(NP), .RULE_TEXT(RT), .RULE_NOCASE('0),
            .RULE_PART(RP), .TREE(1'b1)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_char(in_char), .match(match));

  always #5 clk = ~clk;

  localparam int CYCLES = 3000;

  initial begin : watchdog
    repeat (CYCLES + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit exp0 [NR], exp1 [NR];
  int hits [NR];
  rule_text_t hist = '0;
  logic [7:0] q [$];

  task automatic enqueue(int r, bit mangle);
    for (int k = text_len(RT[r]) - 1; k >= 0; k--)
      q.push_back((mangle && k == 0) ? RT[r][7:0] ^ 8'h01 : RT[r][8*k +: 8]);
  endtask

  initial begin
    int chars = 0, unique_missed = 0;
    for (int r = 0; r < NR; r++) begin
      exp0[r] = 0; exp1[r] = 0; hits[r] = 0;
      chars += text_len(RT[r]);
      enqueue(r, 1'b0);
      q.push_back(" ");
    end
    $display("rule set: %0d patterns, %0d characters, %0d partitions", NR, chars, NP);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < CYCLES; i++) begin
      @(negedge clk);
      for (int r = 0; r < NR; r++) begin
        checks++;
        if (match[r] !== exp1[r]) begin
          failures++;
          if (failures < 10) $display("cycle %0d rule %0d: %0b expected %0b", i, r, match[r], exp1[r]);
        end
        if (match[r]) hits[r]++;
      end
      if (q.size() == 0) begin
        if ($urandom_range(0, 1)) enqueue($urandom_range(0, NR - 1), $urandom_range(0, 3) == 0);
        else q.push_back(RT[$urandom_range(0, NR - 1)][8*$urandom_range(0, 7) +: 8] | 8'h01);
      end
      in_valid = ($urandom_range(0, 5) != 0);
      if (in_valid) begin
        in_char = q.pop_front();
        hist = push(hist, in_char);
      end
      for (int r = 0; r < NR; r++) begin
        exp1[r] = exp0[r];
        exp0[r] = in_valid && window_match(RT[r], 1'b0, hist);
      end
    end
    for (int r = 0; r < NR; r++) if (hits[r] == 0) unique_missed++;
    checks++;
    if (unique_missed != 0) begin failures++; $display("%0d rules never matched", unique_missed); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
