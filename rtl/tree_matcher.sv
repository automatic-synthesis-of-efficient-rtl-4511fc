// tree_matcher: final matching stage ("Match") of a pattern in the tree
// architecture.
//
// A pattern of length L > 8 is split into a level-1 prefix (characters 0..3),
// a level-2 prefix (characters 4..7) and a suffix (characters 8..L-1). The two
// prefixes come from shared prefix_block instances as delayed hit vectors: the
// level-1 prefix ended L-4 characters before the last character, so the
// matcher takes l1_hits[L-5]; the level-2 prefix ended L-8 characters before
// it, so it takes l2_hits[L-9]. The suffix character i is read directly from
// pipeline stage L-1-i. One AND gate combines all of them; the result is
// registered and qualified by fire exactly like unary_matcher, so both
// architectures have the same match timing.
//
// Only one line of each suffix stage is read (and no stage beyond the
// suffix), so the linter reports the rest of stages as unused by design.
// The three-part combination follows the design; the tap arithmetic results
// from the delay-chain arrangement of prefix_block.
module tree_matcher
  import ids_pkg::*;
#(
  parameter rule_text_t TEXT   = rule_text_t'("abcdefghi"),
  parameter logic       NOCASE = 1'b0,
  parameter key_mask_t  USED   = key_mask_t'(1) << 8'h69,
  parameter int         NLINES = count_keys(USED),
  parameter int         DEPTH  = text_len(TEXT),
  parameter int         NDELAY = DEPTH - PREFIX_LEN
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [DEPTH-1:0][NLINES-1:0] stages,
  input  logic [NDELAY-1:0]            l1_hits,
  input  logic [NDELAY-1:0]            l2_hits,
  input  logic                         fire,
  output logic                         match
);

  localparam int LEN  = text_len(TEXT);
  localparam int NSUF = LEN - TREE_MIN_LEN;

  logic [NSUF-1:0] suffix;

  // suffix character 8+m is byte LEN-9-m, found in stage LEN-9-m
  for (genvar k = 0; k < NSUF; k++) begin : g_tap
    assign suffix[k] = stages[k][line_of(USED, key_of(TEXT, NOCASE, k))];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) match <= 1'b0;
    else        match <= fire && l1_hits[LEN-1-PREFIX_LEN] &&
                         l2_hits[LEN-1-TREE_MIN_LEN] && (&suffix);
  end

  initial begin
    assert (LEN > TREE_MIN_LEN && LEN <= DEPTH && LEN - PREFIX_LEN <= NDELAY)
      else $error("tree_matcher: pattern length %0d does not fit", LEN);
  end

endmodule
