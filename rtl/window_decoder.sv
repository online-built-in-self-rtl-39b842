// window_decoder: w-to-2^w decoder that selects the SRAM cell of the
// incoming vector.
//
// The w low-order bits of the CUT input (or of the w-stage counter in test
// mode) address one of the 2^w cells. The decoder is enabled by cmp, so a
// vector outside the active window selects nothing. While tge (or reset) is
// active every output is driven high at once, so that the whole column of
// cells can be written with zero in a single cycle. Combinational, one-hot
// (or all-ones) output, as the method describes.
module window_decoder #(
  parameter int unsigned W  = 4,         // address width
  parameter int unsigned WS = 2**W       // number of outputs (window size)
) (
  input  logic [W-1:0]  addr,            // low-order bits of the vector
  input  logic          en,              // cmp: vector is in the window
  input  logic          all_en,          // tge: select every cell
  output logic [WS-1:0] sel              // cell select lines D[i]
);

  always_comb begin
    sel = '0;
    if (all_en)
      sel = '1;
    else if (en)
      sel[addr] = 1'b1;
  end

endmodule
