// tb_prefix_block: random test of the level-1 and level-2 prefix blocks.
//
// Two blocks are built for the pattern "/cgi-bin/x": level 1 (FIRST = 0,
// prefix "/cgi") and level 2 (FIRST = 4, prefix "-bin"), each with a chain of
// six delay registers. The testbench plays the character pipeline: it drives
// the four newest decoded stages from a byte history and a random in_valid.
// On every clock with in_valid high the reference shifts "the four newest
// bytes equal the prefix" into its own copy of the hit chain; both chains
// must equal the blocks' hits outputs every cycle.
module tb_prefix_block;
  import ids_pkg::*;
  import tb_ids_ref_pkg::*;

  localparam rule_text_t TEXT = rule_text_t'("/cgi-bin/x");
  localparam key_mask_t  USED = keys_of(TEXT, 1'b0, rule_text_t'("qw"));
  localparam int         NL   = count_keys(USED);
  localparam int         ND   = 6;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [PREFIX_LEN-1:0][NL-1:0] stages = '0;
  logic [ND-1:0] hits1, hits2;
  int checks = 0, failures = 0, n1 = 0, n2 = 0;

  prefix_block #(.TEXT(TEXT), .NOCASE(1'b0), .USED(USED), .NLINES(NL), .FIRST(0), .NDELAY(ND)) u_l1 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .stages(stages), .hits(hits1));
  prefix_block #(.TEXT(TEXT), .NOCASE(1'b0), .USED(USED), .NLINES(NL), .FIRST(4), .NDELAY(ND)) u_l2 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .stages(stages), .hits(hits2));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rule_text_t hist = '0;
  logic [ND-1:0] m1 = '0, m2 = '0;
  logic [7:0] q [$];
  localparam string S = "/cgi-bin/x";

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      checks += 2;
      if (hits1 !== m1) begin failures++; if (failures < 10) $display("cycle %0d: l1 %b expected %b", i, hits1, m1); end
      if (hits2 !== m2) begin failures++; if (failures < 10) $display("cycle %0d: l2 %b expected %b", i, hits2, m2); end
      if (hits1[0]) n1++;
      if (hits2[0]) n2++;
      // present the current pipeline content; it is what the next edge sees
      for (int k = 0; k < PREFIX_LEN; k++) stages[k] = decode(USED, hist[8*k +: 8])[NL-1:0];
      in_valid = ($urandom_range(0, 3) != 0);
      if (in_valid) begin
        m1 = {m1[ND-2:0], hist[31:0] == 32'("/cgi")};
        m2 = {m2[ND-2:0], hist[31:0] == 32'("-bin")};
        if (q.size() == 0) begin
          if ($urandom_range(0, 3) == 0) for (int k = 0; k < S.len(); k++) q.push_back(S[k]);
          else q.push_back(S[$urandom_range(0, S.len() - 1)]);
        end
        hist = push(hist, q.pop_front());
      end
    end
    checks++;
    if (n1 < 20 || n2 < 20) begin failures++; $display("too few prefix hits %0d %0d", n1, n2); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
