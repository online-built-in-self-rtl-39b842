// tb_sram_cbist_full: one complete BIST session of the default design
// (64K x 16 ROM under test, windows of 16 vectors, 4096 windows), with the
// top's parameters left at their defaults. The first 30000 cycles are normal
// operation with random addresses, most of them in the active window, so a
// number of windows are completed by normal traffic alone; then test mode
// is requested and the unit finishes the session by itself. Checked: the
// CUT word is ~address one cycle later and g_b stays 1, every one of the
// 65536 addresses enables the verifier exactly once, the signature equals
// the sum of all words computed here (16'h8000) and the session passes.
// After the session, mode_select is dropped and the unit must return to
// normal mode at the next window end.
module tb_sram_cbist_full;
  localparam int N = 16, W = 4, K = N - W, D = 16;

  int checks = 0, failures = 0;

  logic            clk = 0, rst, mode_select;
  logic [N-1:0]    in_normal, in_test, cut_in;
  logic [D-1:0]    cut_out, ideal_result, signature;
  logic            g_b, test_mode, cmp, rve, tge, session_done, session_pass;
  logic [K-1:0]    window;
  logic [2**W-1:0] cells;

  sram_cbist_top dut (
    .clk(clk), .rst(rst), .mode_select(mode_select), .in_normal(in_normal),
    .in_test(in_test), .cut_in(cut_in), .cut_out(cut_out), .ideal_result(ideal_result),
    .g_b(g_b), .test_mode(test_mode), .cmp(cmp), .rve(rve), .tge(tge),
    .window(window), .cells(cells), .signature(signature),
    .session_done(session_done), .session_pass(session_pass));

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  bit           applied [2**N];
  int           n_applied, cycle, done_cycle;
  logic [D-1:0] golden, ref_sum;
  logic [N-1:0] prev_cut_in, prev_in;
  bit           prev_rve, finished, sess_over, sess_over_d;
  int n_new_hit, n_rep_hit, n_miss, n_win_normal, n_win_test, n_fill, n_skip;

  initial begin
    golden = '0;
    for (int a = 0; a < 2**N; a++) golden = golden + ~D'(a);
    rst = 1; mode_select = 0; in_normal = '0;
    @(posedge clk); #1;
    rst = 0;
    ref_sum = '0; n_applied = 0; prev_rve = 0; prev_in = '0; finished = 0;
    sess_over = 0; sess_over_d = 0;
    cycle = 0; done_cycle = -1;
    while (!finished) begin
      mode_select = (cycle >= 30000) && (done_cycle < 0);
      case ($urandom_range(0, 9))
        0:       in_normal = prev_in;
        1, 2:    in_normal = N'($urandom);
        default: in_normal = {window, W'($urandom)};
      endcase
      prev_in = in_normal;
      #1;
      if (cycle > 0) begin
        check("cut_out = ~addr", cut_out == ~D'(prev_cut_in));
        check("g_b", g_b == 1'b1);
      end
      if (!test_mode && !tge) begin
        if (!cmp) n_miss++; else if (rve) n_new_hit++; else n_rep_hit++;
      end
      if (test_mode && !tge) begin
        if (rve) n_fill++; else n_skip++;
      end
      if (tge) begin
        if (test_mode) n_win_test++; else n_win_normal++;
      end
      if (rve && !sess_over) begin
        check("address applied once", !applied[cut_in]);
        applied[cut_in] = 1;
        n_applied++;
      end
      if (session_done) begin
        done_cycle = cycle;
        check("all 65536 addresses applied", n_applied == 2**N);
        check("golden is 16'h8000", golden == 16'h8000);
        check("signature matched", ref_sum == golden);
        check("session passes", session_pass == 1'b1);
        $display("session done at cycle %0d", cycle);
      end
      if (done_cycle >= 0 && !test_mode) finished = 1;
      check("test mode left within one window", done_cycle < 0 || cycle - done_cycle < 40);
      if (prev_rve && !sess_over_d) ref_sum = ref_sum + cut_out;
      sess_over_d = sess_over;
      if (tge && window == '1) sess_over = 1;
      prev_cut_in = cut_in;
      prev_rve    = rve;
      cycle++;
      @(posedge clk); #1;
    end
    $display("mechanisms: new_hit=%0d repeat_hit=%0d miss=%0d win_normal=%0d win_test=%0d fill=%0d skip=%0d",
             n_new_hit, n_rep_hit, n_miss, n_win_normal, n_win_test, n_fill, n_skip);
    check("mechanism: new hit", n_new_hit > 0);
    check("mechanism: repeated hit", n_rep_hit > 0);
    check("mechanism: miss", n_miss > 0);
    check("mechanism: window end in normal mode", n_win_normal > 0);
    check("mechanism: window end in test mode", n_win_test > 0);
    check("mechanism: test fill", n_fill > 0);
    check("mechanism: test skip", n_skip > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
