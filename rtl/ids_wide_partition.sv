// ids_wide_partition: one partition pipeline that accepts BYTES bytes per
// clock (the multi-byte unary architecture).
//
// The byte stream arrives as words of BYTES bytes; in_word byte 0 is the
// oldest byte of the word, byte BYTES-1 the newest. Each byte lane has its own
// char_decoder for the partition's bit lines, and the decoded words move
// through a char_pipeline whose stages are whole words. Read backwards from
// the newest byte, the stages form one window of decoded bytes (window
// position 0 = newest byte of the newest word). A pattern can end at any of
// the BYTES lanes of a word, so every pattern gets BYTES unary_matchers, the
// one for lane offset o looking at the window from position o on: the stream
// is, in effect, duplicated, offset and fed through duplicated matchers.
//
// match[j][o] is high for one clock when pattern j of the partition ended at
// byte BYTES-1-o of a word; the latency is that of the single-byte partition
// (match is set by the edge after the accepting edge). in_valid low stalls the pipeline; words are accepted whole.
// The duplication of matchers per byte offset follows the design; how the
// window is arranged is this implementation's choice, and the tree
// (shared-prefix) form is not used in this architecture.
module ids_wide_partition
  import ids_pkg::*;
#(
  parameter int          NUM_RULES = ids_pkg::DEF_NUM_RULES,
  parameter rule_text_t  RULE_TEXT [NUM_RULES] = ids_pkg::DEF_RULE_TEXT,
  parameter logic [NUM_RULES-1:0] RULE_NOCASE  = ids_pkg::DEF_RULE_NOCASE,
  parameter int          RULE_PART [NUM_RULES] = ids_pkg::DEF_RULE_PART,
  parameter int          PART_ID   = 0,
  parameter int          BYTES     = 4,
  parameter int          NLOCAL    = count_local()
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             in_valid,
  input  logic [BYTES-1:0][7:0]            in_word,
  output logic [NLOCAL-1:0][BYTES-1:0]     match
);

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

  localparam key_mask_t USED   = used_keys();
  localparam int        NLINES = count_keys(USED);
  localparam int        DEPTH  = max_len();
  // words needed so that every offset sees DEPTH bytes
  localparam int        NWORDS = (DEPTH + BYTES - 1 + BYTES - 1) / BYTES;
  localparam int        NWIN   = NWORDS * BYTES;

  logic [BYTES-1:0][NLINES-1:0]              word_lines;
  logic [NWORDS-1:0][BYTES-1:0][NLINES-1:0]  stages;
  logic [NWIN-1:0][NLINES-1:0]               window;
  logic                                      fire;

  for (genvar b = 0; b < BYTES; b++) begin : g_lane
    char_decoder #(.USED(USED), .NLINES(NLINES)) u_dec (
      .in_char (in_word[b]),
      .lines   (word_lines[b])
    );
  end

  char_pipeline #(.NLINES(BYTES * NLINES), .DEPTH(NWORDS)) u_pipe (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .in_lines (word_lines),
    .stages   (stages),
    .fire     (fire)
  );

  // window position q: word q / BYTES, lane BYTES-1 - q % BYTES
  for (genvar q = 0; q < NWIN; q++) begin : g_win
    assign window[q] = stages[q / BYTES][BYTES - 1 - (q % BYTES)];
  end

  for (genvar j = 0; j < NLOCAL; j++) begin : g_rule
    localparam int R = global_of(j);
    for (genvar o = 0; o < BYTES; o++) begin : g_off
      unary_matcher #(
        .TEXT(RULE_TEXT[R]), .NOCASE(RULE_NOCASE[R]), .USED(USED),
        .NLINES(NLINES), .DEPTH(DEPTH)
      ) u_match (
        .clk(clk), .rst_n(rst_n), .stages(window[o +: DEPTH]), .fire(fire),
        .match(match[j][o])
      );
    end
  end

  initial begin
    assert (NLOCAL == count_local() && NLOCAL > 0 && BYTES >= 1)
      else $error("ids_wide_partition: partition %0d has no rules or wrong NLOCAL", PART_ID);
  end

endmodule
