// ids_partition: one independent matching pipeline, serving the patterns of
// one partition of the rule set.
//
// The partition decodes the input byte into bit lines only for the characters
// its own patterns use (char_decoder), delays them in a pipeline as deep as
// its longest pattern (char_pipeline) and matches every pattern against the
// stages. With TREE = 0 every pattern gets a unary_matcher. With TREE = 1 a
// pattern longer than eight characters is matched as level-1 prefix + level-2
// prefix + suffix (tree_matcher); each distinct level-1 prefix is matched once
// per partition, and each distinct level-2 prefix once per level-1 prefix, by
// a prefix_block shared by all patterns with that prefix. Shorter patterns
// keep a unary_matcher.
//
// The rule set is passed whole (RULE_TEXT, RULE_NOCASE, RULE_PART); the
// partition takes the rules r with RULE_PART[r] == PART_ID, in rule order, and
// match[j] belongs to the j-th of them. Timing: a match is set by the clock
// edge after the one that accepts the pattern's last character and is high for
// one clock (two clocks after the clock in which that character is offered);
// in_valid low stalls the whole pipeline. Bit-line pruning per partition,
// the pipeline and the prefix sharing follow the design; keying the sharing by
// owner rule (the first rule with that prefix) is this implementation's way of
// expressing it in a generate loop.
module ids_partition
  import ids_pkg::*;
#(
  parameter int          NUM_RULES = ids_pkg::DEF_NUM_RULES,
  parameter rule_text_t  RULE_TEXT [NUM_RULES] = ids_pkg::DEF_RULE_TEXT,
  parameter logic [NUM_RULES-1:0] RULE_NOCASE  = ids_pkg::DEF_RULE_NOCASE,
  parameter int          RULE_PART [NUM_RULES] = ids_pkg::DEF_RULE_PART,
  parameter int          PART_ID   = 0,
  parameter bit          TREE      = 1'b1,
  parameter int          NLOCAL    = count_local()
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [7:0]        in_char,
  output logic [NLOCAL-1:0] match
);

  // ------------------------------------------------ elaboration-time helpers
  function automatic int count_local();
    int n = 0;
    for (int r = 0; r < NUM_RULES; r++)
      if (RULE_PART[r] == PART_ID) n++;
    return n;
  endfunction

  function automatic int global_of(int j);
    int n = 0;
    for (int r = 0; r < NUM_RULES; r++)
      if (RULE_PART[r] == PART_ID) begin
        if (n == j) return r;
        n++;
      end
    return 0;
  endfunction

  function automatic key_mask_t used_keys();
    key_mask_t m = '0;
    for (int r = 0; r < NUM_RULES; r++)
      if (RULE_PART[r] == PART_ID)
        for (int k = 0; k < text_len(RULE_TEXT[r]); k++)
          m[key_of(RULE_TEXT[r], RULE_NOCASE[r], k)] = 1'b1;
    return m;
  endfunction

  function automatic int max_len();
    int n = 1;
    for (int r = 0; r < NUM_RULES; r++)
      if (RULE_PART[r] == PART_ID && text_len(RULE_TEXT[r]) > n)
        n = text_len(RULE_TEXT[r]);
    return n;
  endfunction

  // key of character i (0 = first) of rule r
  function automatic key_t char_key(int r, int i);
    return key_of(RULE_TEXT[r], RULE_NOCASE[r], text_len(RULE_TEXT[r]) - 1 - i);
  endfunction

  function automatic bit is_tree(int r);
    return TREE && text_len(RULE_TEXT[r]) > TREE_MIN_LEN;
  endfunction

  // first local tree rule whose first NCHARS characters equal those of rule j
  function automatic int owner(int j, int nchars);
    int g = global_of(j);
    int n = 0;
    if (!is_tree(g)) return j;
    for (int r = 0; r < g; r++) begin
      if (RULE_PART[r] == PART_ID) begin
        if (is_tree(r)) begin
          bit same = 1'b1;
          for (int i = 0; i < nchars; i++)
            if (char_key(r, i) != char_key(g, i)) same = 1'b0;
          if (same) return n;
        end
        n++;
      end
    end
    return j;
  endfunction

  localparam key_mask_t USED   = used_keys();
  localparam int        NLINES = count_keys(USED);
  localparam int        DEPTH  = max_len();
  localparam int        NDELAY = (DEPTH > PREFIX_LEN) ? DEPTH - PREFIX_LEN : 1;

  // ------------------------------------------------------------- datapath
  logic [NLINES-1:0]             lines;
  logic [DEPTH-1:0][NLINES-1:0]  stages;
  logic                          fire;

  char_decoder #(.USED(USED), .NLINES(NLINES)) u_dec (
    .in_char (in_char),
    .lines   (lines)
  );

  char_pipeline #(.NLINES(NLINES), .DEPTH(DEPTH)) u_pipe (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .in_lines (lines),
    .stages   (stages),
    .fire     (fire)
  );

  logic [NDELAY-1:0] l1_hits [NLOCAL];
  logic [NDELAY-1:0] l2_hits [NLOCAL];

  for (genvar j = 0; j < NLOCAL; j++) begin : g_rule
    localparam int R = global_of(j);

    if (is_tree(R)) begin : g_tree
      if (owner(j, PREFIX_LEN) == j) begin : g_l1
        prefix_block #(
          .TEXT(RULE_TEXT[R]), .NOCASE(RULE_NOCASE[R]), .USED(USED),
          .NLINES(NLINES), .FIRST(0), .NDELAY(NDELAY)
        ) u_l1 (
          .clk(clk), .rst_n(rst_n), .in_valid(in_valid),
          .stages(stages[PREFIX_LEN-1:0]), .hits(l1_hits[j])
        );
      end else begin : g_l1_shared
        assign l1_hits[j] = '0;
      end

      if (owner(j, TREE_MIN_LEN) == j) begin : g_l2
        prefix_block #(
          .TEXT(RULE_TEXT[R]), .NOCASE(RULE_NOCASE[R]), .USED(USED),
          .NLINES(NLINES), .FIRST(PREFIX_LEN), .NDELAY(NDELAY)
        ) u_l2 (
          .clk(clk), .rst_n(rst_n), .in_valid(in_valid),
          .stages(stages[PREFIX_LEN-1:0]), .hits(l2_hits[j])
        );
      end else begin : g_l2_shared
        assign l2_hits[j] = '0;
      end

      tree_matcher #(
        .TEXT(RULE_TEXT[R]), .NOCASE(RULE_NOCASE[R]), .USED(USED),
        .NLINES(NLINES), .DEPTH(DEPTH), .NDELAY(NDELAY)
      ) u_match (
        .clk(clk), .rst_n(rst_n), .stages(stages),
        .l1_hits(l1_hits[owner(j, PREFIX_LEN)]),
        .l2_hits(l2_hits[owner(j, TREE_MIN_LEN)]),
        .fire(fire), .match(match[j])
      );
    end else begin : g_unary
      assign l1_hits[j] = '0;
      assign l2_hits[j] = '0;
      unary_matcher #(
        .TEXT(RULE_TEXT[R]), .NOCASE(RULE_NOCASE[R]), .USED(USED),
        .NLINES(NLINES), .DEPTH(DEPTH)
      ) u_match (
        .clk(clk), .rst_n(rst_n), .stages(stages), .fire(fire),
        .match(match[j])
      );
    end
  end

  initial begin
    assert (NLOCAL == count_local() && NLOCAL > 0)
      else $error("ids_partition: partition %0d has no rules or wrong NLOCAL", PART_ID);
  end

endmodule
