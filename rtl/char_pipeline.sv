// char_pipeline: the character pipeline registers of one partition.
//
// A shift register of DEPTH stages, each NLINES bits wide, holding the decoded
// bit lines of the last DEPTH characters: stage 0 holds the newest character,
// stage k the character that arrived k characters earlier. Matchers select one
// bit per stage, so a character comparison is the inspection of a single bit.
//
// All stages shift together on a clock edge where in_valid is high; with
// in_valid low the pipeline holds (a stall of the input stream). fire is a
// register that is high for the cycle after each shift, telling the matchers
// that the stages hold a new alignment. Asynchronous active-low reset clears
// every stage. The shift structure follows the design; the enable, the fire
// flag and the reset are this implementation's choices.
module char_pipeline #(
  parameter int NLINES = 8,
  parameter int DEPTH  = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic [NLINES-1:0]             in_lines,
  output logic [DEPTH-1:0][NLINES-1:0]  stages,
  output logic                          fire
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stages <= '0;
      fire   <= 1'b0;
    end else begin
      fire <= in_valid;
      if (in_valid) begin
        stages[0] <= in_lines;
        for (int k = 1; k < DEPTH; k++) stages[k] <= stages[k-1];
      end
    end
  end

endmodule
