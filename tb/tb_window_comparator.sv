// tb_window_comparator: exhaustive check of the window comparator at K = 6
// and a random check at the default width: cmp must be 1 exactly when the
// enable is set and the two k-bit values are equal.
module tb_window_comparator;
  int checks = 0, failures = 0;

  logic        en6, cmp6;
  logic [5:0]  a6, b6;
  logic        en, cmp;
  logic [11:0] a, b;

  window_comparator #(.K(6)) dut6 (.en(en6), .vec_high(a6), .tg_state(b6), .cmp(cmp6));
  window_comparator          dut  (.en(en),  .vec_high(a),  .tg_state(b),  .cmp(cmp));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int i = 0; i < 64; i++)
        for (int j = 0; j < 64; j++) begin
          en6 = e[0]; a6 = 6'(i); b6 = 6'(j);
          #1;
          checks++;
          if (cmp6 !== (e == 1 && i == j)) begin
            failures++;
            $display("FAIL K=6 en=%0d a=%0d b=%0d cmp=%0d", e, i, j, cmp6);
          end
        end
    for (int t = 0; t < 2000; t++) begin
      en = 1'($urandom);
      a  = 12'($urandom);
      b  = (t % 3 == 0) ? a : 12'($urandom);
      #1;
      checks++;
      if (cmp !== (en && a == b)) begin
        failures++;
        $display("FAIL K=12 en=%0d a=%h b=%h cmp=%0d", en, a, b, cmp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
