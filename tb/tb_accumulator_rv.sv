// tb_accumulator_rv: three sessions through the 16-bit accumulator with
// GOLDEN = 16'h8000, the sum of ~a over all 65536 16-bit addresses.
// Session 1 feeds those words in a scrambled order (a -> a*40503+12345 mod
// 2^16 is a permutation) with random idle cycles: the result must be pass.
// Session 2 feeds them in another order: pass again (order independence).
// Session 3 flips one bit of one word: fail. The running signature is
// compared with a model every cycle.
module tb_accumulator_rv;
  int checks = 0, failures = 0;

  logic        clk = 0, rst, en, check, done, pass;
  logic [15:0] data, signature, model;

  accumulator_rv #(.DATA_W(16), .ACC_W(16), .GOLDEN(16'h8000)) dut (
    .clk(clk), .rst(rst), .en(en), .data(data), .check(check),
    .signature(signature), .done(done), .pass(pass));

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_session(input int mult, input int add, input bit corrupt,
                             input bit expect_pass);
    int unsigned a;
    int i;
    i = 0;
    while (i < 65536) begin
      en = ($urandom_range(0, 3) != 0);
      a = (i * mult + add) % 65536;
      data = en ? ~16'(a) : 16'($urandom);
      if (en && corrupt && i == 777) data = data ^ 16'h0010;
      check = 0;
      @(posedge clk);
      if (en) begin model = model + data; i++; end
      #1;
      checks++;
      if (signature !== model) begin
        failures++; $display("FAIL signature=%h model=%h", signature, model);
        break;
      end
    end
    en = 0; check = 1;
    @(posedge clk); #1;
    check = 0;
    model = '0;
    checks += 3;
    if (!done) begin failures++; $display("FAIL done missing"); end
    if (pass !== expect_pass) begin failures++; $display("FAIL pass=%0d expected %0d", pass, expect_pass); end
    if (signature !== 16'h0) begin failures++; $display("FAIL not restarted: %h", signature); end
    @(posedge clk); #1;
    checks++;
    if (done) begin failures++; $display("FAIL done longer than one cycle"); end
  endtask

  initial begin
    rst = 1; en = 0; check = 0; data = '0;
    @(posedge clk); #1;
    rst = 0; model = '0;
    run_session(40503, 12345, 1'b0, 1'b1);
    run_session(1, 0, 1'b0, 1'b1);
    run_session(3, 7, 1'b1, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
