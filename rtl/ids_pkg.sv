// ids_pkg: types, constants, helper functions and the default rule set of the
// pre-decoded shift-and-compare intrusion-detection matcher.
//
// A pattern is held right-aligned in a rule_text_t vector, the way a string
// literal is stored: its last character is byte 0 (bits 7:0), the character
// before it byte 1, and so on. Byte k of a pattern is therefore exactly the
// character that has to sit in pipeline stage k at the moment the pattern has
// fully arrived, which is how every matcher reads it. A pattern's length is the
// number of bytes up to its highest non-zero byte, so patterns cannot contain
// the byte 0x00 (a choice of this implementation).
//
// A decoded bit line is identified by a 9-bit key {nocase, byte}. Case-sensitive
// characters and non-letters use nocase = 0 and compare all eight bits; a
// letter of a case-insensitive pattern uses nocase = 1 with the lower-case byte
// and its comparator ignores bit 5 (the ASCII case bit).
//
// The default rule set is an illustrative Nikto/Snort-style set. Its split into
// two partitions keeps the two groups of the partitioning example of the design
// ({pattern1, pattern2, root} and {cracker, hacker, /cmd.exe}) and adds URL
// patterns that share the four-character prefixes "/cgi", "/scr", "-bin",
// "-win" and "ipts" so that the tree architecture has prefixes to share. The
// partition assignment is an input produced offline by a graph partitioner.
package ids_pkg;

  // Longest pattern the matchers can hold (characters).
  localparam int MAX_LEN    = 32;
  // Characters per prefix block: one Virtex 4-input LUT of decoded bits.
  localparam int PREFIX_LEN = 4;
  // Patterns longer than this use a level-1 and a level-2 prefix (tree mode).
  localparam int TREE_MIN_LEN = 2 * PREFIX_LEN;
  localparam int KEY_W      = 9;
  localparam int NUM_KEYS   = 1 << KEY_W;

  typedef logic [8*MAX_LEN-1:0]  rule_text_t;
  typedef logic [KEY_W-1:0]      key_t;
  typedef logic [NUM_KEYS-1:0]   key_mask_t;

  function automatic logic is_alpha(logic [7:0] c);
    return (c >= 8'h41 && c <= 8'h5a) || (c >= 8'h61 && c <= 8'h7a);
  endfunction

  function automatic logic [7:0] to_lower(logic [7:0] c);
    return (c >= 8'h41 && c <= 8'h5a) ? (c | 8'h20) : c;
  endfunction

  // Number of characters in a right-aligned pattern.
  function automatic int text_len(rule_text_t t);
    int n = 0;
    for (int k = 0; k < MAX_LEN; k++)
      if (t[8*k +: 8] != 8'h00) n = k + 1;
    return n;
  endfunction

  // Key of byte k (k = 0 is the last character) of a pattern.
  function automatic key_t key_of(rule_text_t t, logic nocase, int k);
    logic [7:0] c;
    if (k < 0 || k >= MAX_LEN) return '0;
    c = t[8*k +: 8];
    if (nocase && is_alpha(c)) return {1'b1, to_lower(c)};
    return {1'b0, c};
  endfunction

  // Comparator of one bit line: does byte c belong to the class of key?
  function automatic logic key_hit(key_t key, logic [7:0] c);
    if (key[8]) return {c[7:6], c[4:0]} == {key[7:6], key[4:0]};
    return c == key[7:0];
  endfunction

  // Bit-line index of a key: the number of used keys below it.
  function automatic int line_of(key_mask_t used, key_t key);
    int n = 0;
    for (int k = 0; k < int'(key); k++)
      if (used[k]) n++;
    return n;
  endfunction

  function automatic int count_keys(key_mask_t used);
    int n = 0;
    for (int k = 0; k < NUM_KEYS; k++)
      if (used[k]) n++;
    return n;
  endfunction

  // ---------------------------------------------------------------- rule set
  localparam int DEF_NUM_RULES = 16;
  localparam int DEF_NUM_PARTS = 2;

  localparam rule_text_t DEF_RULE_TEXT [DEF_NUM_RULES] = '{
    "pattern1",
    "pattern2",
    "root",
    "/cgi-bin/phf",
    "/cgi-bin/test-cgi",
    "/cgi-bin/cmd.exe",
    "/cgi-win/uploader.exe",
    "/cgi-win/wwwuploader.exe",
    "cracker",
    "hacker",
    "/cmd.exe",
    "/scripts/iisadmin/ism.dll",
    "/scripts/tools/newdsn.exe",
    "/scripts/cmd.exe",
    "/scripts/root.exe",
    "/scripts/..%c1%9c../"
  };

  // Bit r set: rule r is matched without regard to letter case.
  localparam logic [DEF_NUM_RULES-1:0] DEF_RULE_NOCASE = DEF_NUM_RULES'(
    (1 << 2) | (1 << 9) | (1 << 15));

  localparam int DEF_RULE_PART [DEF_NUM_RULES] = '{
    0, 0, 0, 0, 0, 0, 0, 0,
    1, 1, 1, 1, 1, 1, 1, 1
  };

endpackage
