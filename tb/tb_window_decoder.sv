// tb_window_decoder: exhaustive check of the w-to-2^w decoder (w = 4):
// one-hot select when enabled, nothing when disabled, all lines when the
// all-enable (tge) is set.
module tb_window_decoder;
  int checks = 0, failures = 0;

  logic [3:0]  addr;
  logic        en, all_en;
  logic [15:0] sel, expect_sel;

  window_decoder dut (.addr(addr), .en(en), .all_en(all_en), .sel(sel));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ae = 0; ae < 2; ae++)
      for (int e = 0; e < 2; e++)
        for (int i = 0; i < 16; i++) begin
          addr = 4'(i); en = e[0]; all_en = ae[0];
          if (ae == 1)      expect_sel = 16'hFFFF;
          else if (e == 1)  expect_sel = 16'(1) << i;
          else              expect_sel = 16'h0000;
          #1;
          checks++;
          if (sel !== expect_sel) begin
            failures++;
            $display("FAIL addr=%0d en=%0d all=%0d sel=%h expected %h", i, e, ae, sel, expect_sel);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
