// sram_cbu: the concurrent BIST unit of the input vector monitoring scheme
// with SRAM cells.
//
// The 2^n input space of the CUT is cut into 2^k windows of 2^w vectors
// (n = k + w). The test generator holds the active window. In normal mode
// the CUT is driven by in_normal, and every vector is also monitored: its k
// high-order bits are compared with the test generator (cmp), and on a match
// its w low-order bits select one SRAM cell through the decoder. If the cell
// is empty the vector is new in this window: rve is raised (the response
// verifier must add this vector's response), the cell is filled and the
// w-stage counter counts one. A vector whose cell is already full, or that
// is outside the active window, does nothing. When the counter wraps (all
// 2^w cells full) tge is raised in the next cycle (a one-flip-flop delay):
// in that cycle every cell is emptied and the test generator steps to the
// next window. No vector is monitored during the tge cycle.
//
// When mode_select asks for test mode, the counter is cleared and the unit
// applies {test generator, counter} to the CUT instead, stepping the
// counter every cycle. Each counter value addresses its own cell: if it is
// empty the vector is applied as a new one (rve, fill), otherwise it was
// already applied in normal mode and is not counted again. The counter wraps
// after 2^w cycles and tge ends the window as before, so test mode only
// completes windows the normal inputs left unfinished. Going back to normal
// mode is taken only at the tge that ends a window (the window being swept
// is always completed); this, the synchronous active-high reset and the
// extra outputs for observation are this design's choices. As in the
// method, reset empties the cells by acting as tge on the decoder and the
// clear input of the cells; the counter, generator and mode register are
// reset directly.
//
// Timing: cut_in, in_test and rve are combinational in the cycle of the
// vector; tge and session_end are registered and last one cycle. The session
// ends (session_end) on the tge of the last window, after all 2^n vectors
// have been applied once.
module sram_cbu #(
  parameter int unsigned N = cbist_pkg::N_DEFAULT,   // CUT input width
  parameter int unsigned W = cbist_pkg::W_DEFAULT    // window index width
) (
  input  logic         clk,
  input  logic         rst,            // synchronous, active high
  input  logic         mode_select,    // 0: normal mode, 1: test mode
  input  logic [N-1:0] in_normal,      // normal-mode CUT inputs
  output logic [N-1:0] cut_in,         // inputs applied to the CUT
  output logic [N-1:0] in_test,        // test vector {window, counter}
  output logic         test_mode,      // unit is applying test vectors
  output logic         cmp,            // vector is in the active window
  output logic         rve,            // new vector: enable the verifier
  output logic         tge,            // window complete, cells cleared
  output logic [N-W-1:0] window,       // active window (test generator)
  output logic         session_end,    // tge of the last window
  output logic [2**W-1:0] cells        // SRAM cell contents
);

  localparam int unsigned K  = N - W;
  localparam int unsigned WS = 2**W;

  cbist_pkg::cbist_mode_e mode_q;
  logic [W-1:0]  count;
  logic          ovf, cnt_inc, cnt_clr, enter_test, leave_test;
  logic          cell_rd;
  logic [WS-1:0] sel;
  logic          tg_last;
  logic          clear;              // tge or reset: empty every cell

  assign clear      = tge || rst;
  assign test_mode  = (mode_q == cbist_pkg::MODE_TEST);
  assign enter_test = mode_select && !test_mode;
  assign leave_test = !mode_select && test_mode && tge;

  // Input multiplexer: normal inputs or the test vector.
  assign in_test = {window, count};
  assign cut_in  = test_mode ? in_test : in_normal;

  // Monitoring path: the CUT input is what is checked against the window.
  // In test mode its high-order part is the generator state itself, so cmp
  // holds and the counter addresses the cell.
  window_comparator #(.K(K)) u_cmp (
    .en      (!clear),
    .vec_high(cut_in[N-1:W]),
    .tg_state(window),
    .cmp     (cmp)
  );

  window_decoder #(.W(W), .WS(WS)) u_dec (
    .addr  (cut_in[W-1:0]),
    .en    (cmp),
    .all_en(clear),
    .sel   (sel)
  );

  sram_cell_array #(.WS(WS)) u_cells (
    .clk  (clk),
    .sel  (sel),
    .wr   (rve),
    .cd   (clear),
    .rd   (cell_rd),
    .cells(cells)
  );

  // A hit on an empty cell is a new vector of the window.
  assign rve = cmp && !cell_rd;

  assign cnt_clr = enter_test;
  assign cnt_inc = test_mode ? !tge : rve;

  wstage_counter #(.W(W)) u_cnt (
    .clk  (clk),
    .rst  (rst),
    .clr  (cnt_clr),
    .inc  (cnt_inc),
    .count(count),
    .ovf  (ovf)
  );

  test_generator #(.K(K)) u_tg (
    .clk  (clk),
    .rst  (rst),
    .step (tge),
    .state(window),
    .last (tg_last)
  );

  assign session_end = tge && tg_last;

  // Overflow is registered once: tge follows the completing vector by one
  // cycle. Mode register.
  always_ff @(posedge clk) begin
    if (rst) begin
      tge    <= 1'b0;
      mode_q <= cbist_pkg::MODE_NORMAL;
    end else begin
      tge <= ovf;
      if (enter_test)
        mode_q <= cbist_pkg::MODE_TEST;
      else if (leave_test)
        mode_q <= cbist_pkg::MODE_NORMAL;
    end
  end

  // tge lasts exactly one cycle, and the counter cannot overflow in it.
  a_tge_single: assert property (@(posedge clk) disable iff (rst) tge |=> !tge);
  // A new vector is recorded only in an empty cell of the active window.
  a_rve_needs_cmp: assert property (@(posedge clk) disable iff (rst) rve |-> cmp && !tge);
  // In test mode the applied vector always lies in the active window.
  a_test_in_window: assert property (@(posedge clk) disable iff (rst)
                                     (test_mode && !tge) |-> cmp);

endmodule
