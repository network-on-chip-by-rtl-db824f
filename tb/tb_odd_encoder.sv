// tb_odd_encoder: self-checking test of the scheme 1 encoder (odd invert).
// A random stream of header flits, body flits and idle cycles drives two
// instances, the default 4-bit body and a 7-bit body. Each link flit and
// its mode are compared, one clock after the flit was offered, with the
// reference model in enc_ref_pkg; idle cycles must leave the link still.
// The total switching cost over the stream is compared with that of sending
// the flits plain, which it may not exceed.
module tb_odd_encoder;
  import noc_enc_pkg::*;
  import enc_ref_pkg::*;

  localparam int DA = 4, DB = 7;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_header = 0;
  logic [DA-1:0] body_a;
  logic [DB-1:0] body_b;
  logic [DA:0] flit_a;
  logic [DB:0] flit_b;
  inv_mode_e mode_a, mode_b;
  logic valid_a, valid_b;
  int checks = 0, failures = 0;
  int mode_count [4] = '{0, 0, 0, 0};
  int headers = 0, idles = 0;
  int cost_enc = 0, cost_plain = 0;

  odd_encoder dut_a (.clk, .rst_n, .in_valid, .in_header, .in_body(body_a),
               .link_flit(flit_a), .link_mode(mode_a), .link_valid(valid_a));
  odd_encoder #(.DATA_W(DB)) dut_b (.clk, .rst_n, .in_valid, .in_header, .in_body(body_b),
               .link_flit(flit_b), .link_mode(mode_b), .link_valid(valid_b));

  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] prev_a, prev_b, plain_prev, ef;
    int em;
    body_a = '0; body_b = '0;
    repeat (3) @(posedge clk);
    #1;
    check("reset link", flit_a == '0 && flit_b == '0 && !valid_a && !valid_b);
    rst_n = 1;
    prev_a = '0; prev_b = '0; plain_prev = '0;
    for (int t = 0; t < 3000; t++) begin
      int r;
      logic v, h;
      r = $urandom_range(0, 9);
      v = (r != 0);
      h = v && (r == 1);
      in_valid = v; in_header = h;
      body_a = DA'($urandom); body_b = DB'($urandom);
      @(posedge clk);
      #1;
      check("latency", valid_a == v && valid_b == v);
      if (v) begin
        ref_encode(1, DA, prev_a, 64'(body_a), h, ef, em);
        check("flit A", 64'(flit_a) == ef);
        check("mode A", int'(mode_a) == em);
        if (64'(flit_a) != ef)
          $display("  body=%b prev=%b got %b/%0d exp %b/%0d", body_a, prev_a[DA:0], flit_a, mode_a, ef[DA:0], em);
        cost_enc   += ref_cost(DA + 1, prev_a, ef);
        cost_plain += ref_cost(DA + 1, plain_prev, 64'(body_a) << 1);
        plain_prev  = 64'(body_a) << 1;
        prev_a = ef;
        if (h) headers++; else mode_count[em]++;
        ref_encode(1, DB, prev_b, 64'(body_b), h, ef, em);
        check("flit B", 64'(flit_b) == ef);
        check("mode B", int'(mode_b) == em);
        prev_b = ef;
      end else begin
        idles++;
        check("idle hold", 64'(flit_a) == prev_a && 64'(flit_b) == prev_b);
      end
    end
    in_valid = 0;
    $display("headers=%0d idles=%0d none=%0d odd=%0d even=%0d full=%0d cost enc=%0d plain=%0d",
             headers, idles, mode_count[0], mode_count[1], mode_count[2], mode_count[3],
             cost_enc, cost_plain);
    check("header seen", headers > 0);
    check("idle seen", idles > 0);
    check("plain chosen", mode_count[0] > 0);
    check("odd chosen", mode_count[1] > 0);
    check("no more switching than plain", cost_enc <= cost_plain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
