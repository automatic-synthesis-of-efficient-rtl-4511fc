// prefix_block: a shared four-character prefix matcher of the tree
// architecture ("Prefix Level 1" / "Prefix Level 2").
//
// The block compares the four newest pipeline stages (stage 3 .. stage 0)
// against characters FIRST .. FIRST+3 of its pattern, so it asserts as soon as
// those four characters have arrived, wherever the rest of the pattern stands.
// Four decoded bits fit one 4-input LUT. The result is captured in a flip-flop
// (hits[0]) and then moved down a chain of delay registers, hits[1] ..
// hits[NDELAY-1], that shift together with the character pipeline (on
// in_valid). hits[k] is high when the prefix ended k+1 characters before the
// newest character in stage 0. One block serves every pattern of the partition
// that has the same prefix; each such pattern picks the delay its length needs.
//
// Level 1 uses FIRST = 0, level 2 FIRST = 4. The prefix size, the flip-flop
// after the prefix and the sharing follow the design; the single delay chain
// per prefix, from which patterns of different lengths tap, is this
// implementation's reading of "delayed through registers".
module prefix_block
  import ids_pkg::*;
#(
  parameter rule_text_t TEXT   = rule_text_t'("abcd"),
  parameter logic       NOCASE = 1'b0,
  parameter key_mask_t  USED   = (key_mask_t'(1) << 8'h61) | (key_mask_t'(1) << 8'h62) |
                                 (key_mask_t'(1) << 8'h63) | (key_mask_t'(1) << 8'h64),
  parameter int         NLINES = count_keys(USED),
  parameter int         FIRST  = 0,
  parameter int         NDELAY = 1
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              in_valid,
  input  logic [PREFIX_LEN-1:0][NLINES-1:0] stages,
  output logic [NDELAY-1:0]                 hits
);

  localparam int LEN = text_len(TEXT);

  logic [PREFIX_LEN-1:0] taps;

  for (genvar j = 0; j < PREFIX_LEN; j++) begin : g_tap
    // character FIRST+j is byte LEN-1-FIRST-j of TEXT
    assign taps[j] = stages[PREFIX_LEN-1-j][line_of(USED, key_of(TEXT, NOCASE, LEN-1-FIRST-j))];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hits <= '0;
    end else if (in_valid) begin
      hits[0] <= &taps;
      for (int k = 1; k < NDELAY; k++) hits[k] <= hits[k-1];
    end
  end

  initial begin
    assert (LEN >= FIRST + PREFIX_LEN)
      else $error("prefix_block: pattern shorter than its prefix");
  end

endmodule
