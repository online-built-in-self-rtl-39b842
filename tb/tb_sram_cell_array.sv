// tb_sram_cell_array: random read / write-one / clear sequences on the
// 16-cell array, compared cycle by cycle with a bit-vector model. Also
// checks that the read of a cell returns its value before the write of the
// same cycle takes effect, and that a full clear (as used for tge and for
// reset) empties every cell.
module tb_sram_cell_array;
  int checks = 0, failures = 0;

  logic        clk = 0;
  logic [15:0] sel, cells, model;
  logic        wr, cd, rd;
  int unsigned a;

  sram_cell_array dut (.clk(clk), .sel(sel), .wr(wr), .cd(cd), .rd(rd), .cells(cells));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // reset is a full clear: all cells selected, cd asserted
    sel = '1; wr = 0; cd = 1;
    @(posedge clk); #1;
    model = '0;
    checks++;
    if (cells !== 16'h0) begin failures++; $display("FAIL reset: cells=%h", cells); end
    for (int t = 0; t < 3000; t++) begin
      a = $urandom_range(0, 15);
      if ($urandom_range(0, 39) == 0) begin
        sel = '1; cd = 1; wr = 0;                 // window clear
      end else begin
        sel = ($urandom_range(0, 7) == 0) ? '0 : (16'(1) << a);
        cd = 0; wr = 1'($urandom);
      end
      #1;
      checks++;
      if (rd !== |(model & sel)) begin
        failures++; $display("FAIL t=%0d read sel=%h rd=%0d model=%h", t, sel, rd, model);
      end
      @(posedge clk);
      if (cd)      model = model & ~sel;
      else if (wr) model = model | sel;
      #1;
      checks++;
      if (cells !== model) begin
        failures++; $display("FAIL t=%0d cells=%h model=%h", t, cells, model);
      end
    end
    // Fill everything, then one clear must empty all cells.
    cd = 0; wr = 1;
    for (int i = 0; i < 16; i++) begin sel = 16'(1) << i; @(posedge clk); #1; end
    #1; checks++;
    if (cells !== 16'hFFFF) begin failures++; $display("FAIL fill cells=%h", cells); end
    sel = '1; wr = 0; cd = 1; @(posedge clk); #1; checks++;
    if (cells !== 16'h0) begin failures++; $display("FAIL clear cells=%h", cells); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
