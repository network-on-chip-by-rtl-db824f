// tb_prev_encoded_reg: reset value, load-enable hold and one-clock timing of
// the previous-encoded-flit register, with random data and load pattern.
module tb_prev_encoded_reg;
  import noc_enc_pkg::*;
  logic clk = 0, rst_n = 0, load = 0;
  logic [4:0] d, q;
  inv_mode_e d_mode, q_mode;
  logic q_valid;
  int checks = 0, failures = 0, holds = 0;
  logic [4:0] exp_q;
  inv_mode_e exp_m;

  prev_encoded_reg dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 5'h1f; d_mode = INV_FULL;
    repeat (2) @(posedge clk);
    #1;
    checks += 3;
    if (q !== 5'd0 || q_mode !== INV_NONE || q_valid !== 1'b0) begin
      failures++; $display("FAIL reset: q=%b mode=%0d v=%b", q, q_mode, q_valid);
    end
    rst_n = 1;
    exp_q = '0; exp_m = INV_NONE;
    for (int t = 0; t < 300; t++) begin
      logic l;
      l = ($urandom_range(0, 2) != 0);
      load = l; d = 5'($urandom); d_mode = inv_mode_e'($urandom_range(0, 3));
      @(posedge clk);
      #1;
      if (l) begin exp_q = d; exp_m = d_mode; end else holds++;
      checks += 3;
      if (q !== exp_q || q_mode !== exp_m || q_valid !== l) begin
        failures++;
        $display("FAIL t=%0d q=%b exp %b mode=%0d exp %0d v=%b exp %b", t, q, exp_q, q_mode, exp_m, q_valid, l);
      end
    end
    checks++;
    if (holds == 0) begin failures++; $display("FAIL no hold cycle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
