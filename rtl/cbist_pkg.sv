// cbist_pkg: constants and helper functions shared by the input vector
// monitoring concurrent BIST (SRAM-cell variant).
//
// The default sizes are those of the 64K-word configuration: a 16-bit CUT
// input (n), a 4-bit window index (w, so 16 SRAM cells per window) and a
// 16-bit CUT output word. The circuit under test is a ROM whose word at
// address a is the bitwise complement of a; that content, and the choice of
// a plain modulo-2^ACC_W adder as the response accumulator, are this
// design's own reading and not fixed by the method itself.
package cbist_pkg;

  // Default configuration (64K x 16 ROM under test, window of 16 vectors).
  localparam int unsigned N_DEFAULT      = 16;  // CUT input width n
  localparam int unsigned W_DEFAULT      = 4;   // window index width w
  localparam int unsigned DATA_W_DEFAULT = 16;  // CUT output width
  localparam int unsigned ACC_W_DEFAULT  = 16;  // accumulator width

  // Operating mode of the concurrent BIST unit.
  typedef enum logic {
    MODE_NORMAL = 1'b0,   // CUT driven by the normal inputs, inputs monitored
    MODE_TEST   = 1'b1    // CUT driven by {test generator, w-stage counter}
  } cbist_mode_e;

  // Fault-free content of the ROM under test: word(a) = ~a, cut or
  // zero-extended to DATA_W bits.
  function automatic logic [63:0] rom_word(input longint unsigned addr,
                                           input int unsigned data_w);
    logic [63:0] mask;
    mask = (data_w >= 64) ? '1 : ((64'd1 << data_w) - 64'd1);
    return (~addr) & mask;
  endfunction

  // Golden signature: sum of every fault-free ROM word over all 2^n
  // addresses, modulo 2^acc_w. Because addition is commutative this is the
  // value the accumulator holds after a complete session, whatever order
  // the vectors arrived in. Closed form, so no loop over 2^n words:
  //   d = min(data_w, n); every d-bit value v appears 2^(n-d) times as the
  //   low d address bits, contributing (2^d - 1 - v) each, so the sum is
  //   2^(n-d) * (2^d * (2^d - 1) / 2) = 2^(n-1) * (2^d - 1).
  //   Bits of the word above bit n-1 are all ones (complement of zero
  //   extension): they add 2^n * (2^data_w - 2^n) when data_w > n.
  function automatic logic [63:0] golden_signature(input int unsigned n,
                                                   input int unsigned data_w,
                                                   input int unsigned acc_w);
    logic [63:0] sum, mask;
    int unsigned d;
    d    = (data_w < n) ? data_w : n;
    sum  = (64'd1 << (n - 1)) * ((64'd1 << d) - 64'd1);
    if (data_w > n)
      sum += (64'd1 << n) * ((64'd1 << data_w) - (64'd1 << n));
    mask = (acc_w >= 64) ? '1 : ((64'd1 << acc_w) - 64'd1);
    return sum & mask;
  endfunction

endpackage
