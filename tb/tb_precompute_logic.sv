// tb_precompute_logic: random check of the cost weighting and selection for
// three candidates on a 5-line link. Expected cost is ones + t1 + 2*t2; the
// expected choice is the first candidate with the lowest cost. Ties are
// forced in part of the vectors.
module tb_precompute_logic;
  localparam int W = 5, NC = 3, NW = 3, CW = 4, SW = 2;
  logic [NC-1:0][NW-1:0] ones, t1, t2;
  logic [NC-1:0][CW-1:0] cost;
  logic [SW-1:0] sel;
  logic [CW-1:0] min_cost;
  int checks = 0, failures = 0, ties = 0;

  precompute_logic #(.W(W), .NCAND(NC)) dut (.ones, .n_t1(t1), .n_t2(t2), .cost, .sel, .min_cost);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      int ec [NC];
      int best, bi;
      for (int c = 0; c < NC; c++) begin
        ones[c] = NW'($urandom_range(0, W));
        t1[c]   = NW'($urandom_range(0, W - 1));
        t2[c]   = NW'($urandom_range(0, W - 1 - int'(t1[c])));
      end
      if (t % 4 == 0) begin
        ones[2] = ones[0]; t1[2] = t1[0]; t2[2] = t2[0];
      end
      #1;
      best = 1000; bi = 0;
      for (int c = 0; c < NC; c++) begin
        ec[c] = int'(ones[c]) + int'(t1[c]) + 2 * int'(t2[c]);
        checks++;
        if (int'(cost[c]) != ec[c]) begin
          failures++; $display("FAIL cost[%0d]=%0d exp %0d", c, cost[c], ec[c]);
        end
        if (ec[c] < best) begin best = ec[c]; bi = c; end
      end
      for (int c = 0; c < NC; c++) for (int k = c + 1; k < NC; k++)
        if (ec[c] == ec[k] && ec[c] == best) ties++;
      checks += 2;
      if (int'(sel) != bi) begin
        failures++; $display("FAIL sel=%0d exp %0d", sel, bi);
      end
      if (int'(min_cost) != best) begin
        failures++; $display("FAIL min_cost=%0d exp %0d", min_cost, best);
      end
    end
    checks++;
    if (ties == 0) begin failures++; $display("FAIL no tie exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
