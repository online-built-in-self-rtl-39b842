// sram_cell_array: the column of 2^w one-bit cells that records which
// vectors of the active window have already reached the CUT inputs.
//
// A cell holds 1 (full) once its vector has been seen in the current window
// and 0 (empty) otherwise. Each cycle the cell picked by the decoder is read
// combinationally (rd); if the controller then asserts wr, a one is written
// to the selected cell at the clock edge. Asserting cd writes zero into every
// selected cell; with the decoder's all-enable this empties the whole column
// in one cycle, which is how the window is cleared on tge and on reset.
//
// In the method each cell is a six-transistor-like static cell read in the
// first half of the clock and written in the second half, with tri-state
// write buffers. Here the read-then-write is mapped onto a combinational read
// and an edge-triggered write, which gives the same cycle-level behaviour.
// There is no separate reset: as in the method, reset empties the array
// through the same path as tge (decoder fully enabled, cd asserted), driven
// by the controller.
module sram_cell_array #(
  parameter int unsigned WS = 16         // number of cells (window size)
) (
  input  logic          clk,
  input  logic [WS-1:0] sel,             // decoder outputs (word lines)
  input  logic          wr,              // write one into the selected cell
  input  logic          cd,              // write zero into all selected cells
  output logic          rd,              // content of the selected cell
  output logic [WS-1:0] cells            // all cells, for observation
);

  logic [WS-1:0] mem;

  always_comb rd = |(mem & sel);
  assign cells = mem;

  always_ff @(posedge clk) begin
    if (cd)
      mem <= mem & ~sel;
    else if (wr)
      mem <= mem | sel;
  end

endmodule
