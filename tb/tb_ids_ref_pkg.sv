// tb_ids_ref_pkg: reference model shared by the matcher testbenches.
//
// The reference works on the raw byte history, not on decoded bit lines:
// hist holds the newest byte in bits 7:0, the one before in bits 15:8, and so
// on, which lines up byte for byte with a right-aligned pattern. A pattern of
// length L is present when its last L bytes equal the newest L history bytes,
// letters compared without case for a case-insensitive rule.
package tb_ids_ref_pkg;
  import ids_pkg::*;

  function automatic logic [7:0] lc(logic [7:0] c);
    return (c >= "A" && c <= "Z") ? c + 8'd32 : c;
  endfunction

  function automatic bit byte_eq(logic [7:0] p, logic [7:0] c, bit nocase);
    return nocase ? (lc(p) == lc(c)) : (p == c);
  endfunction

  function automatic bit window_match(rule_text_t text, bit nocase, rule_text_t hist);
    int len = 0;
    for (int k = 0; k < MAX_LEN; k++) if (text[8*k +: 8] != 0) len = k + 1;
    if (len == 0) return 1'b0;
    for (int k = 0; k < len; k++)
      if (!byte_eq(text[8*k +: 8], hist[8*k +: 8], nocase)) return 1'b0;
    return 1'b1;
  endfunction

  function automatic rule_text_t push(rule_text_t hist, logic [7:0] c);
    return {hist[8*MAX_LEN-9:0], c};
  endfunction

  // Random case flip of letters, used for case-insensitive rules.
  function automatic logic [7:0] flip_case(logic [7:0] c);
    if ((c >= "a" && c <= "z") || (c >= "A" && c <= "Z")) return c ^ 8'h20;
    return c;
  endfunction
  // Decoded bit lines of byte c for a bit-line map: line n is the n-th used
  // key in ascending order, a key being {nocase, byte}.
  function automatic logic [NUM_KEYS-1:0] decode(key_mask_t used, logic [7:0] c);
    logic [NUM_KEYS-1:0] v = '0;
    int n = 0;
    for (int k = 0; k < NUM_KEYS; k++)
      if (used[k]) begin
        if (k >= 256) v[n] = (lc(c) == 8'(k - 256)) && (lc(c) != c || (c >= "a" && c <= "z"));
        else          v[n] = (c == 8'(k));
        n++;
      end
    return v;
  endfunction

  // Key mask of all bytes of a pattern plus the given extra exact bytes.
  function automatic key_mask_t keys_of(rule_text_t text, bit nocase, rule_text_t extra);
    key_mask_t m = '0;
    for (int k = 0; k < MAX_LEN; k++) begin
      logic [7:0] c = text[8*k +: 8];
      if (c != 0) begin
        if (nocase && ((c >= "a" && c <= "z") || (c >= "A" && c <= "Z"))) m[256 + int'(lc(c))] = 1'b1;
        else m[c] = 1'b1;
      end
      if (extra[8*k +: 8] != 0) m[extra[8*k +: 8]] = 1'b1;
    end
    return m;
  endfunction
endpackage
