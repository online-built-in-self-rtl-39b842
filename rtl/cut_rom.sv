// cut_rom: read-only memory used both as the circuit under test and as the
// stored copy of its ideal (fault-free) results.
//
// The array holds 2^ADDR_W words of DATA_W bits. The word at address a is
// ~a (the bitwise complement of the address, cut or zero-extended to DATA_W
// bits), written into the array at start-up by the initial block, as an
// FPGA block ROM is. The address is applied in one cycle and the word is
// available from the output register in the next (one-cycle read latency,
// like a synchronous block memory). A synchronous reset clears the output
// register.
//
// FAULT_EN, FAULT_ADDR and FAULT_MASK describe an optional stored-data
// fault, used only to show that the BIST detects a faulty CUT: when FAULT_EN
// is set, the word at FAULT_ADDR is XORed with FAULT_MASK. With the defaults
// the ROM is fault-free. The ROM content and the fault parameters are this
// design's own choice.
module cut_rom #(
  parameter int unsigned        ADDR_W     = cbist_pkg::N_DEFAULT,
  parameter int unsigned        DATA_W     = cbist_pkg::DATA_W_DEFAULT,
  parameter bit                 FAULT_EN   = 1'b0,
  parameter logic [ADDR_W-1:0]  FAULT_ADDR = '0,
  parameter logic [DATA_W-1:0]  FAULT_MASK = '0
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] data
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  initial begin
    for (int unsigned a = 0; a < 2**ADDR_W; a++) begin
      mem[a] = DATA_W'(cbist_pkg::rom_word(longint'(a), DATA_W));
      if (FAULT_EN && ADDR_W'(a) == FAULT_ADDR)
        mem[a] = mem[a] ^ FAULT_MASK;
    end
  end

  always_ff @(posedge clk) begin
    if (rst)
      data <= '0;
    else
      data <= mem[addr];
  end

endmodule
