// tb_sram_cbist_top: end-to-end test of the BIST around a 256 x 16 ROM
// (n = 8, w = 3). Two copies run side by side on the same stimulus: one with
// a fault-free CUT, one whose CUT word at address 8'hA5 has bit 6 flipped.
// Random normal-mode traffic (biased towards the active window, with repeats
// and misses) is interleaved with test-mode periods for three complete
// sessions. Checked every cycle: the CUT word is ~address one cycle after
// the address, ideal_result likewise, and g_b is 1 except, in the faulty
// copy, right after the faulty address. Checked per session: every one of
// the 256 vectors enables the verifier exactly once, session_done follows
// the last window's tge by two cycles, the good copy's signature equals a
// sum computed here and passes, and the faulty copy fails. Each mechanism
// (new hit, repeated hit, miss, window end in normal and in test mode, test
// fill and skip, mode entry and exit, session pass, fault detection) must
// occur at least once.
module tb_sram_cbist_top;
  localparam int N = 8, W = 3, K = N - W, D = 16;
  localparam logic [N-1:0] FADDR = 8'hA5;
  localparam logic [D-1:0] FMASK = 16'h0040;

  int checks = 0, failures = 0;

  logic          clk = 0, rst, mode_select;
  logic [N-1:0]  in_normal;
  // good copy
  logic [N-1:0]  in_test, cut_in;
  logic [D-1:0]  cut_out, ideal_result, signature;
  logic          g_b, test_mode, cmp, rve, tge, session_done, session_pass;
  logic [K-1:0]  window;
  logic [2**W-1:0] cells;
  // faulty copy
  logic [N-1:0]  f_in_test, f_cut_in;
  logic [D-1:0]  f_cut_out, f_ideal_result, f_signature;
  logic          f_g_b, f_test_mode, f_cmp, f_rve, f_tge, f_session_done, f_session_pass;
  logic [K-1:0]  f_window;
  logic [2**W-1:0] f_cells;

  sram_cbist_top #(.N(N), .W(W), .DATA_W(D), .ACC_W(D)) dut (
    .clk(clk), .rst(rst), .mode_select(mode_select), .in_normal(in_normal),
    .in_test(in_test), .cut_in(cut_in), .cut_out(cut_out), .ideal_result(ideal_result),
    .g_b(g_b), .test_mode(test_mode), .cmp(cmp), .rve(rve), .tge(tge),
    .window(window), .cells(cells), .signature(signature),
    .session_done(session_done), .session_pass(session_pass));

  sram_cbist_top #(.N(N), .W(W), .DATA_W(D), .ACC_W(D),
                   .FAULT_EN(1'b1), .FAULT_ADDR(FADDR), .FAULT_MASK(FMASK)) dut_f (
    .clk(clk), .rst(rst), .mode_select(mode_select), .in_normal(in_normal),
    .in_test(f_in_test), .cut_in(f_cut_in), .cut_out(f_cut_out), .ideal_result(f_ideal_result),
    .g_b(f_g_b), .test_mode(f_test_mode), .cmp(f_cmp), .rve(f_rve), .tge(f_tge),
    .window(f_window), .cells(f_cells), .signature(f_signature),
    .session_done(f_session_done), .session_pass(f_session_pass));

  always #5 clk = ~clk;

  initial begin
    #50000000;
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

  int           applied [2**N];
  logic [D-1:0] golden, ref_sum, ref_sum_f, sum_at_end, sum_at_end_f;
  logic [N-1:0] prev_cut_in, prev_in;
  bit           prev_valid, prev_rve;
  int           sessions, phase_left, since_last_tge;
  int n_new_hit, n_rep_hit, n_miss, n_win_normal, n_win_test, n_fill, n_skip,
      n_enter, n_leave, n_pass, n_detect, n_gb_low;
  bit           prev_test_mode;

  initial begin
    golden = '0;
    for (int a = 0; a < 2**N; a++) golden = golden + ~D'(a);
    rst = 1; mode_select = 0; in_normal = '0;
    @(posedge clk); #1;
    rst = 0;
    foreach (applied[i]) applied[i] = 0;
    ref_sum = '0; ref_sum_f = '0; sessions = 0; phase_left = 0;
    prev_valid = 0; prev_rve = 0; prev_in = '0; since_last_tge = -1;
    prev_test_mode = 0;
    while (sessions < 3) begin
      if (phase_left == 0) begin
        mode_select = ($urandom_range(0, 3) == 0);
        phase_left  = $urandom_range(5, 100);
      end
      phase_left--;
      case ($urandom_range(0, 9))
        0, 1:    in_normal = prev_in;
        2, 3:    in_normal = N'($urandom);
        default: in_normal = {window, W'($urandom)};
      endcase
      prev_in = in_normal;
      #1;
      // the two copies share all control
      check("copies agree", cut_in == f_cut_in && rve == f_rve && tge == f_tge);
      // registered ROM outputs refer to the previous address
      if (prev_valid) begin
        check("cut_out = ~addr", cut_out == ~D'(prev_cut_in));
        check("ideal_result = ~addr", ideal_result == ~D'(prev_cut_in));
        check("g_b good copy", g_b == 1'b1);
        check("g_b faulty copy", f_g_b == (prev_cut_in != FADDR));
        if (!f_g_b) n_gb_low++;
      end
      // mechanisms
      if (!test_mode && !tge) begin
        if (!cmp) n_miss++; else if (rve) n_new_hit++; else n_rep_hit++;
      end
      if (test_mode && !tge) begin
        if (rve) n_fill++; else n_skip++;
      end
      if (tge) begin
        if (test_mode) n_win_test++; else n_win_normal++;
      end
      if (test_mode && !prev_test_mode) n_enter++;
      if (!test_mode && prev_test_mode) n_leave++;
      prev_test_mode = test_mode;
      if (rve) begin
        applied[cut_in]++;
        check("vector applied once", applied[cut_in] == 1);
      end
      if (tge) check("no verifier enable in a tge cycle", !rve);
      if (tge && window == '1) begin
        since_last_tge = 0;
        foreach (applied[i]) begin
          check("every vector applied", applied[i] == 1);
          applied[i] = 0;
        end
      end else if (since_last_tge >= 0) begin
        since_last_tge++;
      end
      if (since_last_tge == 1) begin
        // rv_check cycle: the accumulator now holds the whole session
        sum_at_end   = ref_sum;
        sum_at_end_f = ref_sum_f;
        check("signature before check", signature == ref_sum && f_signature == ref_sum_f);
      end
      if (session_done || f_session_done) begin
        check("session_done two cycles after the last tge", since_last_tge == 2);
        check("both copies done", session_done && f_session_done);
        check("reference sum equals golden", sum_at_end == golden);
        check("good copy passes", session_pass == 1'b1);
        check("faulty copy fails", f_session_pass == 1'b0);
        if (session_pass) n_pass++;
        if (!f_session_pass) n_detect++;
        ref_sum = '0; ref_sum_f = '0;
        since_last_tge = -1;
        sessions++;
      end
      // verifier enable is one cycle behind rve: accumulate the
      // response (after a session end it opens the next session)
      if (prev_rve) begin
        ref_sum   = ref_sum + cut_out;
        ref_sum_f = ref_sum_f + f_cut_out;
      end
      prev_cut_in = cut_in;
      prev_rve    = rve;
      prev_valid  = 1;
      @(posedge clk); #1;
    end
    $display("mechanisms: new_hit=%0d repeat_hit=%0d miss=%0d win_normal=%0d win_test=%0d fill=%0d skip=%0d enter=%0d leave=%0d pass=%0d detect=%0d gb_low=%0d",
             n_new_hit, n_rep_hit, n_miss, n_win_normal, n_win_test, n_fill, n_skip,
             n_enter, n_leave, n_pass, n_detect, n_gb_low);
    check("mechanism: new hit", n_new_hit > 0);
    check("mechanism: repeated hit", n_rep_hit > 0);
    check("mechanism: miss", n_miss > 0);
    check("mechanism: window end in normal mode", n_win_normal > 0);
    check("mechanism: window end in test mode", n_win_test > 0);
    check("mechanism: test fill", n_fill > 0);
    check("mechanism: test skip", n_skip > 0);
    check("mechanism: enter test mode", n_enter > 0);
    check("mechanism: leave test mode", n_leave > 0);
    check("mechanism: session pass", n_pass > 0);
    check("mechanism: fault detected by signature", n_detect > 0);
    check("mechanism: fault flagged by g_b", n_gb_low > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
