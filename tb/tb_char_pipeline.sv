// tb_char_pipeline: random test of the character pipeline registers.
//
// Random 6-bit line vectors are offered with in_valid high about two thirds
// of the time. A queue model of the accepted vectors gives every stage's
// expected content (stage k = k-th most recent accepted vector, zero before
// enough have arrived), and fire must equal in_valid of the previous clock.
module tb_char_pipeline;
  localparam int NL = 6, D = 5;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [NL-1:0] in_lines = '0;
  logic [D-1:0][NL-1:0] stages;
  logic fire;
  int checks = 0, failures = 0;

  char_pipeline #(.NLINES(NL), .DEPTH(D)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_lines(in_lines),
    .stages(stages), .fire(fire));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [NL-1:0] model [D];
  logic exp_fire;

  initial begin
    for (int k = 0; k < D; k++) model[k] = '0;
    exp_fire = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      for (int k = 0; k < D; k++) begin
        checks++;
        if (stages[k] !== model[k]) begin
          failures++;
          if (failures < 10) $display("cycle %0d stage %0d: %b expected %b", i, k, stages[k], model[k]);
        end
      end
      checks++;
      if (fire !== exp_fire) failures++;
      in_valid = ($urandom_range(0, 2) != 0);
      in_lines = NL'($urandom);
      exp_fire = in_valid;
      if (in_valid) begin
        for (int k = D - 1; k > 0; k--) model[k] = model[k-1];
        model[0] = in_lines;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
