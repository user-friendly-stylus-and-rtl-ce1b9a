// pipe_delay: a DEPTH-stage shift register for a WIDTH-bit word.
// Used to delay the pixel position from the video handler by four cycles so
// that it reaches the accumulator together with that pixel's accumulate
// enable (the document gives the four-cycle delay). Reset clears all stages.
module pipe_delay #(
  parameter int unsigned WIDTH = 19,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] stage [DEPTH];
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) stage[i] <= '0;
    end else begin
      stage[0] <= d;
      for (int i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
    end
  end
  assign q = stage[DEPTH-1];
endmodule
