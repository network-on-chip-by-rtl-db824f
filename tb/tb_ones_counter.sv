// tb_ones_counter: random check of the toggle counter, default 5 lines and
// a 16-line instance; the expected count is $countones of the XOR.
module tb_ones_counter;
  logic [4:0]  p1, c1;
  logic [2:0]  o1;
  logic [15:0] p2, c2;
  logic [4:0]  o2;
  int checks = 0, failures = 0;

  ones_counter dut1 (.prev_flit(p1), .cur_flit(c1), .ones(o1));
  ones_counter #(.W(16)) dut2 (.prev_flit(p2), .cur_flit(c2), .ones(o2));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      p1 = 5'($urandom); c1 = (t == 0) ? ~p1 : 5'($urandom);
      p2 = 16'($urandom); c2 = (t == 0) ? ~p2 : 16'($urandom);
      #1;
      checks += 2;
      if (int'(o1) != $countones(p1 ^ c1)) begin
        failures++; $display("FAIL W5 %b %b -> %0d", p1, c1, o1);
      end
      if (int'(o2) != $countones(p2 ^ c2)) begin
        failures++; $display("FAIL W16 %h %h -> %0d", p2, c2, o2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
