// tb_ids_partition: random test of one partition pipeline on its own.
//
// Partition 1 of the default rule set (cracker, hacker, /cmd.exe and five
// /scripts/... URLs, tree architecture) is fed a stream of its own patterns,
// patterns of the other partition, broken patterns and filler, with random
// stall cycles. Each of its eight match outputs is compared every cycle with
// a reference computed from the byte history, two clocks after the byte that
// completes the pattern; every rule of the partition must match at least once.
module tb_ids_partition;
  import ids_pkg::*;
  import tb_ids_ref_pkg::*;

  localparam int PID = 1;
  localparam int NL  = 8;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [7:0] in_char = 0;
  logic [NL-1:0] match;
  int checks = 0, failures = 0;

  ids_partition #(.PART_ID(PID), .TREE(1'b1)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_char(in_char), .match(match));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (12000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int gidx [NL];
  int hits [NL];
  bit exp0 [NL], exp1 [NL];
  rule_text_t hist = '0;
  logic [7:0] q [$];

  initial begin
    int n = 0;
    for (int r = 0; r < DEF_NUM_RULES; r++)
      if (DEF_RULE_PART[r] == PID) begin gidx[n] = r; n++; end
    for (int j = 0; j < NL; j++) begin hits[j] = 0; exp0[j] = 0; exp1[j] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 10000; i++) begin
      @(negedge clk);
      for (int j = 0; j < NL; j++) begin
        checks++;
        if (match[j] !== exp1[j]) begin
          failures++;
          if (failures < 10) $display("cycle %0d rule %0d: %0b expected %0b", i, gidx[j], match[j], exp1[j]);
        end
        if (match[j]) hits[j]++;
      end
      if (q.size() == 0) begin
        if ($urandom_range(0, 1) == 0) begin
          int r;
          rule_text_t t;
          r = $urandom_range(0, DEF_NUM_RULES - 1);
          t = DEF_RULE_TEXT[r];
          for (int k = MAX_LEN - 1; k >= 0; k--)
            if (t[8*k +: 8] != 0)
              q.push_back((DEF_RULE_NOCASE[r] && $urandom_range(0, 1)) ? flip_case(t[8*k +: 8]) : t[8*k +: 8]);
          if ($urandom_range(0, 4) == 0) q[q.size() - 1] = q[q.size() - 1] ^ 8'h02;
        end else q.push_back(DEF_RULE_TEXT[$urandom_range(0, DEF_NUM_RULES - 1)][8*$urandom_range(0, 5) +: 8]);
      end
      in_valid = ($urandom_range(0, 4) != 0);
      if (in_valid) begin
        in_char = q.pop_front();
        hist = push(hist, in_char);
      end
      for (int j = 0; j < NL; j++) begin
        exp1[j] = exp0[j];
        exp0[j] = in_valid && window_match(DEF_RULE_TEXT[gidx[j]], DEF_RULE_NOCASE[gidx[j]], hist);
      end
    end
    for (int j = 0; j < NL; j++) begin
      checks++;
      if (hits[j] == 0) begin failures++; $display("rule %0d never matched", gidx[j]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
