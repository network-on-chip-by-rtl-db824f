// ty_unit: transition type of one pair of adjacent link lines.
//
// Compares the values a pair of neighbouring lines had in the previous flit
// (prev_a, prev_b) with the values they take in the candidate flit (cur_a,
// cur_b) and reports the coupling transition type (Type I..IV of
// noc_enc_pkg). The document builds the type-conversion stage from such
// two-bit blocks and defines the four types; the gate structure is this
// design's own. Purely combinational, no clock.
module ty_unit
  import noc_enc_pkg::*;
(
  input  logic        prev_a,
  input  logic        prev_b,
  input  logic        cur_a,
  input  logic        cur_b,
  output trans_type_e ttype
);

  logic tog_a, tog_b;

  always_comb begin
    tog_a = prev_a ^ cur_a;
    tog_b = prev_b ^ cur_b;
    if (tog_a && tog_b) begin
      // Both toggle: same direction if they now hold the same value.
      ttype = (cur_a == cur_b) ? TYPE_III : TYPE_II;
    end else if (tog_a || tog_b) begin
      ttype = TYPE_I;
    end else begin
      ttype = TYPE_IV;
    end
  end

endmodule
