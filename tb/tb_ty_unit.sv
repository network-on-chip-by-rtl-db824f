// tb_ty_unit: exhaustive check of the pair transition classifier.
// All 16 combinations of previous and current values of two lines are
// applied; the expected type is worked out from the signed change of each
// line (both zero: IV, one zero: I, equal: III, opposite: II).
module tb_ty_unit;
  import noc_enc_pkg::*;

  logic prev_a, prev_b, cur_a, cur_b;
  trans_type_e ttype;
  int checks = 0, failures = 0;

  ty_unit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int da, db;
      trans_type_e exp;
      {prev_a, prev_b, cur_a, cur_b} = 4'(v);
      #1;
      da = int'(cur_a) - int'(prev_a);
      db = int'(cur_b) - int'(prev_b);
      if (da == 0 && db == 0)      exp = TYPE_IV;
      else if (da == 0 || db == 0) exp = TYPE_I;
      else if (da == db)           exp = TYPE_III;
      else                         exp = TYPE_II;
      checks++;
      if (ttype !== exp) begin
        failures++;
        $display("FAIL prev=%b%b cur=%b%b got %s exp %s", prev_a, prev_b, cur_a, cur_b,
                 ttype.name(), exp.name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
