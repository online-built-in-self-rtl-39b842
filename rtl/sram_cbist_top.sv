// sram_cbist_top: input vector monitoring concurrent BIST with SRAM cells,
// wrapped around a ROM under test.
//
// The circuit under test is a 2^N x DATA_W ROM (64K x 16 by default). The
// concurrent BIST unit (sram_cbu) monitors the vectors that reach the ROM
// address inputs during normal operation, records the new ones of the active
// window in SRAM cells, and, when mode_select is raised, applies the missing
// ones itself. Each new vector enables the accumulator response verifier one
// cycle later, when the ROM word is out of its output register (cycle_delay);
// after all 2^N vectors have been applied once the accumulated signature is
// compared with the golden one (session_done, session_pass).
//
// A second, always fault-free ROM (stored_result) is read with the same
// address and gives ideal_result; g_b is 1 when the CUT word equals it, a
// per-vector good/bad flag. Both ROM outputs are registered, so cut_out,
// ideal_result and g_b refer to the cut_in of the previous cycle.
//
// Ports are plain signals. clk rises once per vector; rst is synchronous
// and active high. FAULT_EN, FAULT_ADDR and FAULT_MASK inject a stored-data
// fault into the CUT copy only (off by default); they exist to demonstrate
// detection. The ROM content (~address), the accumulator width and the
// fault parameters are this design's own choices.
module sram_cbist_top #(
  parameter int unsigned       N          = cbist_pkg::N_DEFAULT,
  parameter int unsigned       W          = cbist_pkg::W_DEFAULT,
  parameter int unsigned       DATA_W     = cbist_pkg::DATA_W_DEFAULT,
  parameter int unsigned       ACC_W      = cbist_pkg::ACC_W_DEFAULT,
  parameter bit                FAULT_EN   = 1'b0,
  parameter logic [N-1:0]      FAULT_ADDR = '0,
  parameter logic [DATA_W-1:0] FAULT_MASK = '0
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              mode_select,   // 0: normal, 1: test
  input  logic [N-1:0]      in_normal,     // normal-mode ROM address
  output logic [N-1:0]      in_test,       // test vector from the BIST unit
  output logic [N-1:0]      cut_in,        // address applied to the CUT
  output logic [DATA_W-1:0] cut_out,       // CUT word (one cycle later)
  output logic [DATA_W-1:0] ideal_result,  // stored fault-free word
  output logic              g_b,           // 1: cut_out equals ideal_result
  output logic              test_mode,     // BIST unit drives the CUT
  output logic              cmp,           // vector in the active window
  output logic              rve,           // new vector of the window
  output logic              tge,           // window complete
  output logic [N-W-1:0]    window,        // active window
  output logic [2**W-1:0]   cells,         // SRAM cells (1: vector seen)
  output logic [ACC_W-1:0]  signature,     // accumulator contents
  output logic              session_done,  // signature examined (pulse)
  output logic              session_pass   // signature equal to golden
);

  localparam logic [ACC_W-1:0] GOLDEN =
    ACC_W'(cbist_pkg::golden_signature(N, DATA_W, ACC_W));

  logic              session_end;
  logic              rv_en, rv_check;

  sram_cbu #(.N(N), .W(W)) u_cbu (
    .clk        (clk),
    .rst        (rst),
    .mode_select(mode_select),
    .in_normal  (in_normal),
    .cut_in     (cut_in),
    .in_test    (in_test),
    .test_mode  (test_mode),
    .cmp        (cmp),
    .rve        (rve),
    .tge        (tge),
    .window     (window),
    .session_end(session_end),
    .cells      (cells)
  );

  cut_rom #(
    .ADDR_W    (N),
    .DATA_W    (DATA_W),
    .FAULT_EN  (FAULT_EN),
    .FAULT_ADDR(FAULT_ADDR),
    .FAULT_MASK(FAULT_MASK)
  ) u_cut (
    .clk (clk),
    .rst (rst),
    .addr(cut_in),
    .data(cut_out)
  );

  cut_rom #(
    .ADDR_W(N),
    .DATA_W(DATA_W)
  ) u_stored_result (
    .clk (clk),
    .rst (rst),
    .addr(cut_in),
    .data(ideal_result)
  );

  assign g_b = (cut_out == ideal_result);

  // Align the verifier enable and the end-of-session strobe with the
  // registered ROM output.
  cycle_delay #(.WIDTH(2), .DEPTH(1)) u_delay (
    .clk(clk),
    .rst(rst),
    .d  ({rve, session_end}),
    .q  ({rv_en, rv_check})
  );

  accumulator_rv #(
    .DATA_W(DATA_W),
    .ACC_W (ACC_W),
    .GOLDEN(GOLDEN)
  ) u_rv (
    .clk      (clk),
    .rst      (rst),
    .en       (rv_en),
    .data     (cut_out),
    .check    (rv_check),
    .signature(signature),
    .done     (session_done),
    .pass     (session_pass)
  );

endmodule
