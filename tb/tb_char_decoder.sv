// tb_char_decoder: exhaustive test of the character pre-decoder.
//
// The decoder is built for eight character classes: the exact bytes '/',
// '0', 'A', 'a', '.', 0xFF and the case-insensitive letters 'a' and 'z'. All
// 256 input bytes are applied and every bit line is compared with a class
// test written directly from the byte values (line order is the ascending
// key order {nocase, byte}).
module tb_char_decoder;
  import ids_pkg::*;

  localparam int NL = 8;
  // keys in ascending order: exact '.', '/', '0', 'A', 'a', 0xFF, nocase 'a', 'z'
  localparam logic [8:0] KEYS [NL] = '{9'h02e, 9'h02f, 9'h030, 9'h041, 9'h061, 9'h0ff, 9'h161, 9'h17a};

  function automatic key_mask_t mask();
    key_mask_t m = '0;
    for (int i = 0; i < NL; i++) m[KEYS[i]] = 1'b1;
    return m;
  endfunction

  logic [7:0]    in_char;
  logic [NL-1:0] lines;
  int checks = 0, failures = 0;

  char_decoder #(.USED(mask()), .NLINES(NL)) dut (.in_char(in_char), .lines(lines));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 256; c++) begin
      logic [NL-1:0] exp;
      in_char = 8'(c);
      #1;
      exp[0] = (c == 46);
      exp[1] = (c == 47);
      exp[2] = (c == 48);
      exp[3] = (c == 65);
      exp[4] = (c == 97);
      exp[5] = (c == 255);
      exp[6] = (c == 97) || (c == 65);
      exp[7] = (c == 122) || (c == 90);
      checks++;
      if (lines !== exp) begin
        failures++;
        $display("byte %02h: lines=%b expected %b", c, lines, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
