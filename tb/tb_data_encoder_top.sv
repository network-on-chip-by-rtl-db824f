// tb_data_encoder_top: end-to-end test of the three encoders side by side,
// at the default 4-bit body (no parameter override).
// Phase 1 walks every ordered pair of 4-bit body flits (each value follows
// every other one), phase 2 is a random packet stream: a header flit, a
// random number of body flits, random idle cycles between flits. Every link
// flit and mode is checked against the reference model one clock after the
// flit is offered. The test counts how often each mechanism occurs (header
// bypass, idle hold, plain kept on a tie, odd, full and even inversion) and
// fails if one never did; it also sums the switching cost of each link and
// of the plain flits and requires every scheme to do no worse than plain.
module tb_data_encoder_top;
  import noc_enc_pkg::*;
  import enc_ref_pkg::*;

  localparam int D = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_header = 0;
  logic [D-1:0] in_body = '0;
  logic [D:0] link1_flit, link2_flit, link3_flit;
  inv_mode_e link1_mode, link2_mode, link3_mode;
  logic link1_valid, link2_valid, link3_valid;

  int checks = 0, failures = 0;
  int headers = 0, idles = 0, ties = 0;
  int mode_count [3][4];
  int cost [3];
  int cost_plain = 0;
  logic [63:0] prev [3];
  logic [63:0] plain_prev;

  data_encoder_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Offer one flit (or an idle cycle) and check all three links a clock later.
  task automatic step(logic v, logic h, logic [D-1:0] b);
    logic [63:0] ef;
    int em;
    logic [D:0] got [3];
    inv_mode_e gm [3];
    in_valid = v; in_header = h; in_body = b;
    @(posedge clk);
    #1;
    got = '{link1_flit, link2_flit, link3_flit};
    gm  = '{link1_mode, link2_mode, link3_mode};
    check("latency", link1_valid == v && link2_valid == v && link3_valid == v);
    if (!v) begin
      idles++;
      for (int s = 0; s < 3; s++) check("idle hold", 64'(got[s]) == prev[s]);
      return;
    end
    if (h) headers++;
    else begin
      // A tie: an inversion would cost exactly as much as the plain flit,
      // and nothing is cheaper, so the plain flit must be kept.
      int cp, co, cf;
      // On a 5-line link only scheme III can tie: odd and full inversion
      // always change the parity of the cost, even inversion keeps it.
      cp = ref_cost(D + 1, prev[2], 64'(b) << 1);
      co = ref_cost(D + 1, prev[2], ref_apply(D, 64'(b), 1));
      cf = ref_cost(D + 1, prev[2], ref_apply(D, 64'(b), 2));
      if ((co == cp && cf >= cp) || (cf == cp && co >= cp)) ties++;
    end
    for (int s = 0; s < 3; s++) begin
      ref_encode(s + 1, D, prev[s], 64'(b), h, ef, em);
      check("flit", 64'(got[s]) == ef);
      check("mode", int'(gm[s]) == em);
      if (h) check("header unencoded", got[s] == {b, 1'b0});
      cost[s] += ref_cost(D + 1, prev[s], ef);
      prev[s] = ef;
      if (!h) mode_count[s][em]++;
    end
    cost_plain += ref_cost(D + 1, plain_prev, 64'(b) << 1);
    plain_prev = 64'(b) << 1;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 3; s++) begin
      prev[s] = '0; cost[s] = 0;
      for (int m = 0; m < 4; m++) mode_count[s][m] = 0;
    end
    plain_prev = '0;
    repeat (3) @(posedge clk);
    #1;
    check("reset", link1_flit == '0 && link2_flit == '0 && link3_flit == '0);
    rst_n = 1;
    // Phase 1: every 4-bit body value after every other one.
    step(1'b1, 1'b1, 4'h0);
    for (int a = 0; a < 16; a++) begin
      for (int b = 0; b < 16; b++) begin
        step(1'b1, 1'b0, D'(a));
        step(1'b1, 1'b0, D'(b));
      end
    end
    // Phase 2: random packets with idle gaps.
    for (int p = 0; p < 200; p++) begin
      int len;
      len = $urandom_range(1, 8);
      step(1'b1, 1'b1, D'($urandom));
      for (int k = 0; k < len; k++) begin
        while ($urandom_range(0, 3) == 0) step(1'b0, 1'b0, D'($urandom));
        step(1'b1, 1'b0, D'($urandom));
      end
    end
    in_valid = 0;
    $display("plain cost=%0d  scheme I=%0d  scheme II=%0d  scheme III=%0d",
             cost_plain, cost[0], cost[1], cost[2]);
    for (int s = 0; s < 3; s++)
      $display("scheme %0d: none=%0d odd=%0d even=%0d full=%0d", s + 1,
               mode_count[s][0], mode_count[s][1], mode_count[s][2], mode_count[s][3]);
    $display("headers=%0d idles=%0d ties=%0d", headers, idles, ties);
    check("header bypass happened", headers > 0);
    check("idle hold happened", idles > 0);
    check("tie kept plain happened (scheme III)", ties > 0);
    for (int s = 0; s < 3; s++) begin
      check("plain kept happened", mode_count[s][0] > 0);
      check("odd inversion happened", mode_count[s][1] > 0);
      check("scheme no worse than plain", cost[s] <= cost_plain);
    end
    check("full inversion happened", mode_count[1][3] > 0);
    check("even inversion happened", mode_count[2][2] > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
