// tb_type_conversion: random check of the per-type transition counts.
// Two instances (the 5-line default and a 9-line link) get random previous
// and candidate flits; the expected counts come from the signed change of
// each line, pair by pair, and must also add up to W-1.
module tb_type_conversion;
  localparam int W1 = 5;
  localparam int W2 = 9;
  localparam int N1 = $clog2(W1);
  localparam int N2 = $clog2(W2);

  logic [W1-1:0] p1, c1;
  logic [W2-1:0] p2, c2;
  logic [N1-1:0] a1, b1, e1, f1;
  logic [N2-1:0] a2, b2, e2, f2;
  int checks = 0, failures = 0;

  type_conversion dut1 (.prev_flit(p1), .cur_flit(c1), .n_t1(a1), .n_t2(b1), .n_t3(e1), .n_t4(f1));
  type_conversion #(.W(W2)) dut2 (.prev_flit(p2), .cur_flit(c2), .n_t1(a2), .n_t2(b2), .n_t3(e2), .n_t4(f2));

  function automatic void expect_counts(int w, logic [63:0] p, logic [63:0] c, output int n [4]);
    n = '{0, 0, 0, 0};
    for (int i = 0; i < w - 1; i++) begin
      int da, db;
      da = int'(c[i]) - int'(p[i]);
      db = int'(c[i+1]) - int'(p[i+1]);
      if (da == 0 && db == 0)      n[3]++;
      else if (da == 0 || db == 0) n[0]++;
      else if (da == db)           n[2]++;
      else                         n[1]++;
    end
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n [4];
    for (int t = 0; t < 400; t++) begin
      p1 = W1'($urandom); c1 = W1'($urandom);
      p2 = W2'($urandom); c2 = W2'($urandom);
      #1;
      expect_counts(W1, 64'(p1), 64'(c1), n);
      check("W5 t1", int'(a1), n[0]); check("W5 t2", int'(b1), n[1]);
      check("W5 t3", int'(e1), n[2]); check("W5 t4", int'(f1), n[3]);
      check("W5 sum", int'(a1) + int'(b1) + int'(e1) + int'(f1), W1 - 1);
      expect_counts(W2, 64'(p2), 64'(c2), n);
      check("W9 t1", int'(a2), n[0]); check("W9 t2", int'(b2), n[1]);
      check("W9 t3", int'(e2), n[2]); check("W9 t4", int'(f2), n[3]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
