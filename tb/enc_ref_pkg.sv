// enc_ref_pkg: reference model of the link data encoders, for testbenches.
//
// Written independently of the RTL: a line's change is taken as an integer
// d in {-1, 0, +1}; a flit's switching cost is sum |d_i| (self switching)
// plus sum |d_i - d_(i+1)| over adjacent pairs, which gives 1 for a Type I
// pair, 2 for a Type II pair and 0 for Types III and IV. The encoding is the
// cheapest of the scheme's candidate flits, the plain flit winning ties and
// earlier candidates winning over later ones.
package enc_ref_pkg;

  // Scheme candidate lists use the inversion codes of the RTL:
  // 0 none, 1 odd body bits, 2 even body bits, 3 all body bits.
  function automatic int ref_cost(int w, logic [63:0] prev, logic [63:0] cur);
    int d [64];
    int c;
    c = 0;
    for (int i = 0; i < w; i++) begin
      d[i] = int'(cur[i]) - int'(prev[i]);
      c += (d[i] < 0) ? -d[i] : d[i];
    end
    for (int i = 0; i < w - 1; i++) begin
      int x;
      x = d[i] - d[i+1];
      c += (x < 0) ? -x : x;
    end
    return c;
  endfunction

  function automatic logic [63:0] ref_apply(int data_w, logic [63:0] body, int mode);
    logic [63:0] f;
    f = body << 1;
    if (mode != 0) begin
      f[0] = 1'b1;
      for (int j = 0; j < data_w; j++) begin
        if ((mode == 3) || (mode == 1 && (j % 2 == 1)) || (mode == 2 && (j % 2 == 0)))
          f[j+1] = ~f[j+1];
      end
    end
    return f;
  endfunction

  // scheme 1: {none, odd}; 2: {none, odd, full}; 3: {none, odd, even}
  function automatic void ref_encode(int scheme, int data_w, logic [63:0] prev,
                                     logic [63:0] body, logic header,
                                     output logic [63:0] flit, output int mode);
    int cands [3];
    int n;
    int best;
    logic [63:0] f;
    cands[0] = 0;
    cands[1] = 1;
    cands[2] = (scheme == 2) ? 3 : 2;
    n = (scheme == 1) ? 2 : 3;
    flit = ref_apply(data_w, body, 0);
    mode = 0;
    if (header) return;
    best = ref_cost(data_w + 1, prev, flit);
    for (int k = 1; k < n; k++) begin
      f = ref_apply(data_w, body, cands[k]);
      if (ref_cost(data_w + 1, prev, f) < best) begin
        best = ref_cost(data_w + 1, prev, f);
        flit = f;
        mode = cands[k];
      end
    end
  endfunction

endpackage
