// type_conversion: transition-type census of one candidate flit.
//
// One ty_unit per pair of adjacent lines (W-1 units for a W-line link)
// classifies the transition from the previous encoded flit to the candidate
// flit; the unit outputs are counted per type. The encoders instantiate one
// type_conversion per candidate (plain, odd-, even- or fully inverted), so
// that the counts of all candidates are available at once for the
// pre-computation logic. The document names the Ty, T2 and T4 blocks of this
// stage; counting all four types in one block is this design's own choice.
// Combinational.
module type_conversion
  import noc_enc_pkg::*;
#(
  parameter int unsigned W  = 5,                   // link lines
  parameter int unsigned NW = $clog2(W)            // width of a count (0..W-1)
)(
  input  logic [W-1:0]  prev_flit,
  input  logic [W-1:0]  cur_flit,
  output logic [NW-1:0] n_t1,
  output logic [NW-1:0] n_t2,
  output logic [NW-1:0] n_t3,
  output logic [NW-1:0] n_t4
);

  trans_type_e pair_type [W-1];

  for (genvar i = 0; i < W - 1; i++) begin : g_pair
    ty_unit u_ty (
      .prev_a (prev_flit[i]),
      .prev_b (prev_flit[i+1]),
      .cur_a  (cur_flit[i]),
      .cur_b  (cur_flit[i+1]),
      .ttype  (pair_type[i])
    );
  end

  always_comb begin
    n_t1 = '0;
    n_t2 = '0;
    n_t3 = '0;
    n_t4 = '0;
    for (int i = 0; i < W - 1; i++) begin
      unique case (pair_type[i])
        TYPE_I:   n_t1 = n_t1 + NW'(1);
        TYPE_II:  n_t2 = n_t2 + NW'(1);
        TYPE_III: n_t3 = n_t3 + NW'(1);
        TYPE_IV:  n_t4 = n_t4 + NW'(1);
      endcase
    end
  end

endmodule
