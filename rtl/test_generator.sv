// test_generator: selects the active window.
//
// Its k-bit state is the common high-order part of the 2^w vectors of the
// active window. Each tge pulse (all cells of the window full) steps it to
// the next window; after 2^k windows every n-bit input vector has been
// applied once and the response signature can be examined, which is flagged
// by last (state is the final one). A binary up-counter is used, the
// simplest generator that visits every state; the method allows any
// generator that does, for example an LFSR extended with the all-zero state.
// Synchronous active-high reset to the all-zero state.
module test_generator #(
  parameter int unsigned K = 12
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         step,             // tge: move to the next window
  output logic [K-1:0] state,            // active window
  output logic         last              // state is the last of the session
);

  always_comb last = (state == '1);

  always_ff @(posedge clk) begin
    if (rst)
      state <= '0;
    else if (step)
      state <= state + 1'b1;
  end

endmodule
