// tb_sram_cbu: the concurrent BIST unit at n = 8, w = 3 (32 windows of 8
// vectors) against a cycle-level model, under random normal inputs (biased
// towards the active window, with repeats) and random mode changes.
// Every cycle cut_in, test_mode, cmp, rve, tge, window, cells and
// session_end are compared with the model. Independently of the model, each
// session must enable the verifier exactly once for each of the 256 vectors,
// and each window must end after exactly 8 new vectors. Sessions are run
// until four have ended; each mechanism (new hit, repeated hit, miss,
// window ended in normal mode and in test mode, test fill and test skip,
// entering and leaving test mode) must have occurred.
module tb_sram_cbu;
  localparam int N = 8, W = 3, K = N - W, WS = 2**W;

  int checks = 0, failures = 0;

  logic          clk = 0, rst, mode_select;
  logic [N-1:0]  in_normal, cut_in, in_test;
  logic          test_mode, cmp, rve, tge, session_end;
  logic [K-1:0]  window;
  logic [WS-1:0] cells;

  sram_cbu #(.N(N), .W(W)) dut (
    .clk(clk), .rst(rst), .mode_select(mode_select), .in_normal(in_normal),
    .cut_in(cut_in), .in_test(in_test), .test_mode(test_mode), .cmp(cmp),
    .rve(rve), .tge(tge), .window(window), .session_end(session_end),
    .cells(cells));

  always #5 clk = ~clk;

  // model state
  bit            mode_m, tge_m;
  logic [WS-1:0] cells_m;
  logic [W-1:0]  cnt_m;
  logic [K-1:0]  tg_m;
  // independent bookkeeping
  int            applied [2**N];
  int            new_in_window, sessions;
  // mechanism counters
  int n_new_hit, n_rep_hit, n_miss, n_win_normal, n_win_test, n_fill, n_skip, n_enter, n_leave;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  logic [N-1:0] cut_in_e, prev_in;
  bit           cmp_e, rve_e, enter, leave, inc, ovf;
  int           phase_left;

  initial begin
    rst = 1; mode_select = 0; in_normal = '0;
    @(posedge clk); #1;
    rst = 0;
    mode_m = 0; tge_m = 0; cells_m = '0; cnt_m = '0; tg_m = '0;
    foreach (applied[i]) applied[i] = 0;
    new_in_window = 0; sessions = 0; prev_in = '0; phase_left = 0;
    while (sessions < 4) begin
      // stimulus
      if (phase_left == 0) begin
        mode_select = ($urandom_range(0, 3) == 0);
        phase_left  = $urandom_range(5, 120);
      end
      phase_left--;
      case ($urandom_range(0, 9))
        0, 1:    in_normal = prev_in;                                   // repeat
        2, 3:    in_normal = N'($urandom);                              // anywhere
        default: in_normal = {tg_m, W'($urandom)};                      // in window
      endcase
      prev_in = in_normal;
      #1;
      // expected combinational outputs
      cut_in_e = mode_m ? {tg_m, cnt_m} : in_normal;
      cmp_e    = !tge_m && (cut_in_e[N-1:W] == tg_m);
      rve_e    = cmp_e && !cells_m[cut_in_e[W-1:0]];
      expect_eq("cut_in", cut_in, cut_in_e);
      expect_eq("in_test", in_test, {tg_m, cnt_m});
      expect_eq("test_mode", test_mode, mode_m);
      expect_eq("cmp", cmp, cmp_e);
      expect_eq("rve", rve, rve_e);
      expect_eq("tge", tge, tge_m);
      expect_eq("window", window, tg_m);
      expect_eq("cells", cells, cells_m);
      expect_eq("session_end", session_end, tge_m && tg_m == '1);
      // mechanism accounting
      if (!mode_m && !tge_m) begin
        if (!cmp_e)      n_miss++;
        else if (rve_e)  n_new_hit++;
        else             n_rep_hit++;
      end
      if (mode_m && !tge_m) begin
        if (rve_e) n_fill++; else n_skip++;
      end
      // independent checks: each vector once per session, 2^w per window
      if (rve) begin
        applied[cut_in]++;
        new_in_window++;
        checks++;
        if (applied[cut_in] != 1) begin
          failures++; $display("FAIL vector %h applied %0d times", cut_in, applied[cut_in]);
        end
      end
      if (tge) begin
        if (mode_m) n_win_test++; else n_win_normal++;
      end
      if (session_end) begin
        sessions++;
        foreach (applied[i]) begin
          checks++;
          if (applied[i] != 1) begin
            failures++; $display("FAIL session %0d: vector %h applied %0d times", sessions, i, applied[i]);
          end
          applied[i] = 0;
        end
      end
      // model update
      enter = mode_select && !mode_m;
      leave = !mode_select && mode_m && tge_m;
      inc   = mode_m ? !tge_m : rve_e;
      ovf   = inc && (cnt_m == '1);
      if (ovf) begin
        checks++;
        if (new_in_window + 0 != WS && !(enter)) begin
          // the completing vector was counted above; a window ends after 2^w new vectors
          failures++; $display("FAIL window ended after %0d new vectors", new_in_window);
        end
        new_in_window = 0;
      end
      if (enter) n_enter++;
      if (leave) n_leave++;
      @(posedge clk);
      if (tge_m)       cells_m = '0;
      else if (rve_e)  cells_m[cut_in_e[W-1:0]] = 1'b1;
      if (enter)       cnt_m = '0;
      else if (inc)    cnt_m = cnt_m + 1'b1;
      if (tge_m)       tg_m = tg_m + 1'b1;
      tge_m = ovf;
      if (enter)       mode_m = 1;
      else if (leave)  mode_m = 0;
      #1;
    end
    $display("mechanisms: new_hit=%0d repeat_hit=%0d miss=%0d win_normal=%0d win_test=%0d fill=%0d skip=%0d enter=%0d leave=%0d",
             n_new_hit, n_rep_hit, n_miss, n_win_normal, n_win_test, n_fill, n_skip, n_enter, n_leave);
    checks += 9;
    if (n_new_hit == 0)    begin failures++; $display("FAIL no new hit"); end
    if (n_rep_hit == 0)    begin failures++; $display("FAIL no repeated hit"); end
    if (n_miss == 0)       begin failures++; $display("FAIL no miss"); end
    if (n_win_normal == 0) begin failures++; $display("FAIL no window ended in normal mode"); end
    if (n_win_test == 0)   begin failures++; $display("FAIL no window ended in test mode"); end
    if (n_fill == 0)       begin failures++; $display("FAIL no test fill"); end
    if (n_skip == 0)       begin failures++; $display("FAIL no test skip"); end
    if (n_enter == 0)      begin failures++; $display("FAIL never entered test mode"); end
    if (n_leave == 0)      begin failures++; $display("FAIL never left test mode"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
