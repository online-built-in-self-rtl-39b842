// cycle_delay: a DEPTH-stage register pipeline for a WIDTH-bit control word.
//
// The ROM under test registers its output, so its response appears one
// cycle after the vector. This block delays the response verifier enable
// (and the end-of-session strobe) by the same number of cycles so that the
// accumulator adds exactly the response of each monitored vector. The
// stages are cleared by a synchronous active-high reset. DEPTH must be at
// least 1.
module cycle_delay #(
  parameter int unsigned WIDTH = 1,
  parameter int unsigned DEPTH = 1
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
