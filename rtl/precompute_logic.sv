// precompute_logic: pick the cheapest of NCAND candidate encodings.
//
// For every candidate flit the encoder has already computed, in parallel,
// how many lines toggle (ones) and how many adjacent pairs make Type I and
// Type II transitions. This block weighs them into one switching cost,
//   cost = COST_SELF*ones + COST_T1*n_t1 + COST_T2*n_t2   (noc_enc_pkg),
// compares the costs and returns the index of the lowest. On a tie the lower
// index wins, so candidate 0 (the plain flit) is kept unless an inversion is
// strictly cheaper. The document says the pre-computation logic counts the
// transitions and decides on the inversion from the counts; the weighted sum
// and the tie rule are this design's own. Combinational.
module precompute_logic
  import noc_enc_pkg::*;
#(
  parameter int unsigned W     = 5,                 // link lines
  parameter int unsigned NCAND = 2,                 // candidates compared
  parameter int unsigned NW    = $clog2(W + 1),     // width of a count
  parameter int unsigned CW    = cost_width(W),     // width of a cost
  parameter int unsigned SW    = (NCAND > 1) ? $clog2(NCAND) : 1
)(
  input  logic [NCAND-1:0][NW-1:0] ones,
  input  logic [NCAND-1:0][NW-1:0] n_t1,
  input  logic [NCAND-1:0][NW-1:0] n_t2,
  output logic [NCAND-1:0][CW-1:0] cost,
  output logic [SW-1:0]            sel,
  output logic [CW-1:0]            min_cost
);

  always_comb begin
    for (int c = 0; c < NCAND; c++) begin
      cost[c] = CW'(COST_SELF * ones[c]) + CW'(COST_T1 * n_t1[c])
              + CW'(COST_T2 * n_t2[c]);
    end
    sel      = '0;
    min_cost = cost[0];
    for (int c = 1; c < NCAND; c++) begin
      if (cost[c] < min_cost) begin
        sel      = SW'(c);
        min_cost = cost[c];
      end
    end
  end

endmodule
