// tb_cut_rom: reads the default 64K x 16 ROM at every address in a scrambled
// order and checks word(a) = ~a with one cycle of read latency; a second
// instance with an injected fault must differ only at the fault address, by
// the fault mask. Reset must clear the output register.
module tb_cut_rom;
  int checks = 0, failures = 0;

  logic        clk = 0, rst;
  logic [15:0] addr, data, fdata, prev;
  int unsigned mism;

  cut_rom dut (.clk(clk), .rst(rst), .addr(addr), .data(data));
  cut_rom #(.FAULT_EN(1'b1), .FAULT_ADDR(16'h1234), .FAULT_MASK(16'h8001)) dutf (
    .clk(clk), .rst(rst), .addr(addr), .data(fdata));

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; addr = 16'h5555;
    @(posedge clk); #1;
    checks++;
    if (data !== 16'h0) begin failures++; $display("FAIL reset data=%h", data); end
    rst = 0;
    mism = 0;
    for (int i = 0; i < 65536; i++) begin
      addr = 16'((i * 40503 + 999) % 65536);
      prev = addr;
      @(posedge clk); #1;
      checks++;
      if (data !== ~prev) begin
        failures++; $display("FAIL addr=%h data=%h expected %h", prev, data, ~prev);
      end
      checks++;
      if (prev == 16'h1234) begin
        if (fdata !== (~prev ^ 16'h8001)) begin failures++; $display("FAIL fault word=%h", fdata); end
      end else if (fdata !== ~prev) begin
        failures++; mism++; $display("FAIL faulty copy differs at %h", prev);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
