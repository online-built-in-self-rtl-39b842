// accumulator_rv: order-independent response verifier.
//
// Because the vectors of a window may reach the CUT in any order, the
// compactor must give a signature that does not depend on order. This one
// adds every enabled CUT response into an ACC_W-bit accumulator (modulo
// 2^ACC_W), the accumulator-based compaction the method calls for. When
// check is pulsed (one cycle after the last response of a session has been
// added) the accumulator is compared with GOLDEN: done pulses for one cycle
// with pass = 1 when they match, and the accumulator restarts from the
// response enabled in that same cycle (if any), which belongs to the next
// session. Plain binary addition without end-around carry, the
// accumulator width and the golden value held as a parameter are this
// design's choices.
module accumulator_rv #(
  parameter int unsigned        DATA_W = 16,
  parameter int unsigned        ACC_W  = 16,
  parameter logic [ACC_W-1:0]   GOLDEN = '0
) (
  input  logic              clk,
  input  logic              rst,          // synchronous, active high
  input  logic              en,           // rve, aligned with data
  input  logic [DATA_W-1:0] data,         // CUT response
  input  logic              check,        // end of session
  output logic [ACC_W-1:0]  signature,    // current accumulator
  output logic              done,         // one-cycle result strobe
  output logic              pass          // signature matched GOLDEN
);

  logic [ACC_W-1:0] addend;

  always_comb addend = en ? ACC_W'(data) : '0;

  always_ff @(posedge clk) begin
    if (rst) begin
      signature <= '0;
      done      <= 1'b0;
      pass      <= 1'b0;
    end else if (check) begin
      signature <= addend;
      done      <= 1'b1;
      pass      <= (signature == GOLDEN);
    end else begin
      signature <= signature + addend;
      done      <= 1'b0;
    end
  end

endmodule
