// wstage_counter: the w-stage counter of the concurrent BIST unit.
//
// In normal mode it is stepped by rve, once for every vector that fills an
// empty cell, so its value is the number of cells already full. When all
// 2^w cells are full the last step makes it wrap, and ovf (the carry out,
// combinational, valid in the cycle of that step) tells the controller to
// raise tge one cycle later. In test mode the controller steps it every
// cycle and its value is the w low-order bits of the test vector and the
// address of the cell to check. clr (mode switch to test) clears it
// synchronously and takes priority over inc. Binary counting and the
// synchronous reset are this design's choices.
module wstage_counter #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         rst,              // synchronous, active high
  input  logic         clr,              // synchronous clear (enter test mode)
  input  logic         inc,              // count one
  output logic [W-1:0] count,
  output logic         ovf               // inc while count is all ones
);

  always_comb ovf = inc && (count == '1);

  always_ff @(posedge clk) begin
    if (rst || clr)
      count <= '0;
    else if (inc)
      count <= count + 1'b1;
  end

endmodule
