// tb_wstage_counter: random inc / clr stimulus on the 4-stage counter,
// compared with an integer model; ovf must be set exactly when an increment
// wraps the counter from 15 to 0, which must take 16 increments.
module tb_wstage_counter;
  int checks = 0, failures = 0;

  logic       clk = 0, rst, clr, inc, ovf;
  logic [3:0] count;
  int         model, ovfs, incs_since_wrap;

  wstage_counter dut (.clk(clk), .rst(rst), .clr(clr), .inc(inc), .count(count), .ovf(ovf));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; clr = 0; inc = 0;
    @(posedge clk); #1;
    rst = 0; model = 0; ovfs = 0; incs_since_wrap = 0;
    for (int t = 0; t < 3000; t++) begin
      inc = ($urandom_range(0, 3) != 0);
      clr = ($urandom_range(0, 199) == 0);
      #1;
      checks++;
      if (ovf !== (inc && model == 15)) begin
        failures++; $display("FAIL t=%0d ovf=%0d model=%0d inc=%0d", t, ovf, model, inc);
      end
      if (ovf && !clr) begin
        ovfs++;
        checks++;
        if (incs_since_wrap != 15) begin
          failures++; $display("FAIL wrap after %0d increments", incs_since_wrap + 1);
        end
      end
      @(posedge clk);
      if (clr) begin model = 0; incs_since_wrap = 0; end
      else if (inc) begin
        if (model == 15) incs_since_wrap = 0; else incs_since_wrap++;
        model = (model + 1) % 16;
      end
      #1;
      checks++;
      if (count !== 4'(model)) begin
        failures++; $display("FAIL t=%0d count=%0d model=%0d", t, count, model);
      end
    end
    checks++;
    if (ovfs == 0) begin failures++; $display("FAIL no overflow seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
