// ones_counter: number of link lines that toggle.
//
// Counts the ones of prev_flit XOR cur_flit, i.e. the self transitions a
// candidate flit would cause on the link. The document places a "Ones" block
// after the type conversions in the odd/full scheme; that it counts the
// ones of the transition vector (rather than of the raw data) is this
// design's reading, because that is the quantity full inversion changes:
// a fully inverted flit toggles exactly the lines the plain one leaves.
// Combinational.
module ones_counter #(
  parameter int unsigned W  = 5,
  parameter int unsigned NW = $clog2(W + 1)
)(
  input  logic [W-1:0]  prev_flit,
  input  logic [W-1:0]  cur_flit,
  output logic [NW-1:0] ones
);

  logic [W-1:0] toggles;

  always_comb begin
    toggles = prev_flit ^ cur_flit;
    ones = '0;
    for (int i = 0; i < W; i++) begin
      ones = ones + NW'(toggles[i]);
    end
  end

endmodule
