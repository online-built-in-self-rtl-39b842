// tb_cycle_delay: random words through a 1-stage (default) and a 3-stage
// delay line; each output must equal the input of exactly DEPTH cycles
// before, and reset must clear the stages.
module tb_cycle_delay;
  int checks = 0, failures = 0;

  logic       clk = 0, rst;
  logic       d1, q1;
  logic [7:0] d3, q3;
  logic       h1 [$];
  logic [7:0] h3 [$];

  cycle_delay                         dut1 (.clk(clk), .rst(rst), .d(d1), .q(q1));
  cycle_delay #(.WIDTH(8), .DEPTH(3)) dut3 (.clk(clk), .rst(rst), .d(d3), .q(q3));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; d1 = 1; d3 = 8'hFF;
    @(posedge clk); #1;
    checks++;
    if (q1 !== 1'b0 || q3 !== 8'h00) begin failures++; $display("FAIL reset q1=%0d q3=%h", q1, q3); end
    rst = 0;
    h1 = '{1'b0};
    h3 = '{8'h00, 8'h00, 8'h00};
    for (int t = 0; t < 1000; t++) begin
      d1 = 1'($urandom);
      d3 = 8'($urandom);
      h1.push_back(d1);
      h3.push_back(d3);
      @(posedge clk); #1;
      void'(h1.pop_front());
      void'(h3.pop_front());
      checks += 2;
      if (q1 !== h1[0]) begin failures++; $display("FAIL t=%0d q1=%0d expected %0d", t, q1, h1[0]); end
      if (q3 !== h3[0]) begin failures++; $display("FAIL t=%0d q3=%h expected %h", t, q3, h3[0]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
