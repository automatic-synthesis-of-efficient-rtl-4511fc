// char_decoder: pre-decodes one input byte into the bit lines of one partition.
//
// Every character class used by the partition's patterns gets one comparator
// (an AND gate over the eight input bits with the appropriate inputs inverted),
// so each bit line asserts exactly for its character; the result is a
// "one-hot" style vector of only the characters the partition needs. A line
// that stands for a letter of a case-insensitive pattern ignores the ASCII
// case bit (bit 5), so an input letter may raise both its case-sensitive and
// its case-insensitive line.
//
// USED is a 512-bit mask over the keys {nocase, byte} (see ids_pkg); line i is
// the i-th set bit of USED counted from bit 0. The decoder is purely
// combinational: the first character pipeline register stores its output.
// The comparator array follows the design; the key encoding and the
// case-insensitive comparator are this implementation's choices.
module char_decoder
  import ids_pkg::*;
#(
  parameter key_mask_t USED   = key_mask_t'(1) << 8'h61,
  parameter int        NLINES = count_keys(USED)
) (
  input  logic [7:0]        in_char,
  output logic [NLINES-1:0] lines
);

  for (genvar k = 0; k < NUM_KEYS; k++) begin : g_key
    if (USED[k]) begin : g_cmp
      assign lines[line_of(USED, key_t'(k))] = key_hit(key_t'(k), in_char);
    end
  end

  initial begin
    assert (NLINES == count_keys(USED))
      else $error("char_decoder: NLINES does not match USED");
  end

endmodule
