// tb_sram_cbist_sizes: the ROM sizes the BIST is meant for, 16K, 128K and
// 256K words of 16 bits (n = 14, 17, 18; the 64K size is the default and is
// run by tb_sram_cbist_full), each with windows of 16 vectors. All three run
// one session in pure test mode from reset, side by side. In test mode every
// window takes 2^w = 16 sweep cycles plus one tge cycle, so the session must
// end (last tge) exactly 2^(n-w) * 17 cycles after the first test cycle, and
// the verdict follows two cycles later. Checked for each size: that cycle
// count, 2^n verifier enables, g_b always 1, a signature equal to the sum of
// all ROM words computed here, and a passing verdict.
module tb_sram_cbist_sizes;
  localparam int W = 4, D = 16;
  localparam int NS [3] = '{14, 17, 18};

  int checks = 0, failures = 0;
  logic clk = 0, rst, mode_select;

  always #5 clk = ~clk;

  initial begin
    #6000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  bit all_done [3];

  for (genvar g = 0; g < 3; g++) begin : g_size
    localparam int N = NS[g];
    logic [N-1:0]   in_test, cut_in;
    logic [D-1:0]   cut_out, ideal_result, signature;
    logic           g_b, test_mode, cmp, rve, tge, session_done, session_pass;
    logic [N-W-1:0] window;
    logic [2**W-1:0] cells;

    sram_cbist_top #(.N(N), .W(W), .DATA_W(D), .ACC_W(D)) dut (
      .clk(clk), .rst(rst), .mode_select(mode_select), .in_normal('1),
      .in_test(in_test), .cut_in(cut_in), .cut_out(cut_out), .ideal_result(ideal_result),
      .g_b(g_b), .test_mode(test_mode), .cmp(cmp), .rve(rve), .tge(tge),
      .window(window), .cells(cells), .signature(signature),
      .session_done(session_done), .session_pass(session_pass));

    initial begin : run
      logic [D-1:0] golden;
      logic [D-1:0] ref_sum;
      bit prev_rve;
      int cycle, n_rve, last_tge;
      golden = '0;
      for (int a = 0; a < 2**N; a++) golden = golden + ~D'(a);
      all_done[g] = 0;
      cycle = 0; n_rve = 0; last_tge = -1; ref_sum = '0; prev_rve = 0;
      @(negedge rst);
      #1;
      while (!all_done[g]) begin
        if (cycle > 1) check("g_b", g_b);
        if (prev_rve && last_tge < 0 || prev_rve && cycle == last_tge) ref_sum = ref_sum + cut_out;
        if (rve && last_tge < 0) n_rve++;
        prev_rve = rve;
        if (tge && window == '1) last_tge = cycle;
        if (session_done) begin
          $display("n=%0d: session done at cycle %0d, last tge at cycle %0d", N, cycle, last_tge);
          // cycle 0 is the mode-switch cycle; test vectors start at cycle 1
          check("last tge after 2^(n-w)*17 test cycles", last_tge == (2**(N-W)) * 17);
          check("verdict two cycles after last tge", cycle == last_tge + 2);
          check("every vector applied once", n_rve == 2**N);
          if (n_rve != 2**N) $display("n_rve=%0d", n_rve);
          check("accumulated sum equals golden", ref_sum == golden);
          check("session passes", session_pass);
          check("golden matches package closed form",
                golden == D'(cbist_pkg::golden_signature(N, D, D)));
          all_done[g] = 1;
        end
        cycle++;
        @(posedge clk); #1;
      end
    end
  end

  initial begin
    rst = 1; mode_select = 1;
    @(posedge clk); #1;
    rst = 0;
    wait (all_done[0] && all_done[1] && all_done[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
