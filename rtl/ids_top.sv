// ids_top: pre-decoded shift-and-compare intrusion-detection pattern matcher.
//
// The byte stream is broadcast to NUM_PARTS independent partition pipelines,
// one per group of patterns produced offline by a graph partitioner; each
// pipeline decodes and carries only the bit lines of its own characters.
// Every rule r of the rule set has its own match output, high for one clock
// when the rule's pattern has just appeared in the stream.
//
// Architectures: with BYTES = 1 each partition is an ids_partition, either
// the tree architecture with shared prefix blocks (TREE = 1, the default) or
// the partitioning-only unary architecture (TREE = 0). With BYTES > 1 each
// partition is an ids_wide_partition that takes BYTES bytes per clock with
// duplicated unary matchers; TREE is then not used.
//
// Interface: in_char (BYTES bytes, byte 0 first in the stream) is accepted on
// a rising clock edge where in_valid is high; in_valid low stalls every
// pipeline. match[r][o] is registered: it is set by the rising edge after the
// one that accepts the pattern's last byte and stays high for one clock, two
// clocks after the clock in which that byte is offered; o is the position of that
// byte counted back from the newest byte of the word (always 0 for BYTES = 1).
// rst_n is an asynchronous active-low reset. The partitioned structure,
// both architectures and the duplicated multi-byte matchers follow the
// design; the handshake, latency, output format and default rule set are this
// implementation's own.
module ids_top
  import ids_pkg::*;
#(
  parameter int          NUM_RULES = ids_pkg::DEF_NUM_RULES,
  parameter int          NUM_PARTS = ids_pkg::DEF_NUM_PARTS,
  parameter rule_text_t  RULE_TEXT [NUM_RULES] = ids_pkg::DEF_RULE_TEXT,
  parameter logic [NUM_RULES-1:0] RULE_NOCASE  = ids_pkg::DEF_RULE_NOCASE,
  parameter int          RULE_PART [NUM_RULES] = ids_pkg::DEF_RULE_PART,
  parameter bit          TREE      = 1'b1,
  parameter int          BYTES     = 1
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            in_valid,
  input  logic [BYTES-1:0][7:0]           in_char,
  output logic [NUM_RULES-1:0][BYTES-1:0] match
);

  function automatic int count_in(int p);
    int n = 0;
    for (int r = 0; r < NUM_RULES; r++)
      if (RULE_PART[r] == p) n++;
    return n;
  endfunction

  // position of rule r among the rules of its partition
  function automatic int local_of(int r);
    int n = 0;
    for (int q = 0; q < r; q++)
      if (RULE_PART[q] == RULE_PART[r]) n++;
    return n;
  endfunction

  for (genvar p = 0; p < NUM_PARTS; p++) begin : g_part
    localparam int NLOCAL = count_in(p);
    logic [NLOCAL-1:0][BYTES-1:0] part_match;

    if (BYTES == 1) begin : g_byte
      ids_partition #(
        .NUM_RULES(NUM_RULES), .RULE_TEXT(RULE_TEXT), .RULE_NOCASE(RULE_NOCASE),
        .RULE_PART(RULE_PART), .PART_ID(p), .TREE(TREE), .NLOCAL(NLOCAL)
      ) u_part (
        .clk      (clk),
        .rst_n    (rst_n),
        .in_valid (in_valid),
        .in_char  (in_char[0]),
        .match    (part_match)
      );
    end else begin : g_wide
      ids_wide_partition #(
        .NUM_RULES(NUM_RULES), .RULE_TEXT(RULE_TEXT), .RULE_NOCASE(RULE_NOCASE),
        .RULE_PART(RULE_PART), .PART_ID(p), .BYTES(BYTES), .NLOCAL(NLOCAL)
      ) u_part (
        .clk      (clk),
        .rst_n    (rst_n),
        .in_valid (in_valid),
        .in_word  (in_char),
        .match    (part_match)
      );
    end
  end

  for (genvar r = 0; r < NUM_RULES; r++) begin : g_out
    assign match[r] = g_part[RULE_PART[r]].part_match[local_of(r)];
  end

  initial begin
    for (int r = 0; r < NUM_RULES; r++)
      assert (RULE_PART[r] >= 0 && RULE_PART[r] < NUM_PARTS)
        else $error("ids_top: rule %0d assigned to partition %0d", r, RULE_PART[r]);
  end

endmodule
