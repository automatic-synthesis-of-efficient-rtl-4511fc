// unary_matcher: shift-and-compare matcher of one pattern in the unary
// (pre-decoded) architecture.
//
// The pattern's character i of L sits in stage L-1-i of the character pipeline
// once the whole pattern has arrived, so the matcher is one AND gate over L
// bits, one selected bit line from each of the stages 0 .. L-1. Its output is
// registered and qualified by fire, so match is high for exactly one clock,
// the cycle after the pipeline shifted the pattern's last character into
// stage 0 (it is set by the clock edge after the edge that accepts that
// character).
//
// TEXT/NOCASE give the pattern (see ids_pkg), USED the partition's bit-line
// map. Only one line of each stage is read, so the linter reports the other
// stage bits as unused; that is inherent to the shift-and-compare structure. The AND-of-selected-bits structure follows the design; the output
// register and its qualification are this implementation's choices.
module unary_matcher
  import ids_pkg::*;
#(
  parameter rule_text_t TEXT   = rule_text_t'("a"),
  parameter logic       NOCASE = 1'b0,
  parameter key_mask_t  USED   = key_mask_t'(1) << 8'h61,
  parameter int         NLINES = count_keys(USED),
  parameter int         DEPTH  = text_len(TEXT)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [DEPTH-1:0][NLINES-1:0] stages,
  input  logic                         fire,
  output logic                         match
);

  localparam int LEN = text_len(TEXT);

  logic [LEN-1:0] taps;

  for (genvar k = 0; k < LEN; k++) begin : g_tap
    assign taps[k] = stages[k][line_of(USED, key_of(TEXT, NOCASE, k))];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) match <= 1'b0;
    else        match <= fire && (&taps);
  end

  initial begin
    assert (LEN >= 1 && LEN <= DEPTH)
      else $error("unary_matcher: pattern length %0d outside 1..%0d", LEN, DEPTH);
  end

endmodule
