// tb_test_generator: steps the 12-bit window generator through a whole
// session with random idle cycles in between; the state must visit every
// one of the 4096 windows exactly once, in order, change only on step, and
// flag last only on the final window.
module tb_test_generator;
  int checks = 0, failures = 0;

  logic        clk = 0, rst, step, last;
  logic [11:0] state;
  bit          seen [4096];
  int          steps;

  test_generator dut (.clk(clk), .rst(rst), .step(step), .state(state), .last(last));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; step = 0;
    @(posedge clk); #1;
    rst = 0;
    steps = 0;
    while (steps < 4096) begin
      step = ($urandom_range(0, 2) != 0);
      #1;
      checks++;
      if (state !== 12'(steps)) begin
        failures++; $display("FAIL state=%0d expected %0d", state, steps);
      end
      checks++;
      if (last !== (steps == 4095)) begin
        failures++; $display("FAIL last=%0d at window %0d", last, steps);
      end
      if (step) begin
        if (seen[state]) begin failures++; $display("FAIL window %0d twice", state); end
        seen[state] = 1;
        steps++;
      end
      @(posedge clk); #1;
    end
    #1;
    checks++;
    if (state !== 12'd0) begin failures++; $display("FAIL no wrap, state=%0d", state); end
    for (int i = 0; i < 4096; i++) begin
      checks++;
      if (!seen[i]) begin failures++; $display("FAIL window %0d never visited", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
