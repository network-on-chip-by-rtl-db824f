// noc_enc_pkg: types and constants shared by the NoC link data encoders.
//
// A link flit is W = DATA_W + 1 lines wide: the DATA_W body bits in the upper
// lines and one inversion-indicator line ("inv") at line 0. Between two
// consecutive flits, each pair of adjacent lines makes one of four coupling
// transitions (Type I: one line toggles, the other stays; Type II: both
// toggle in opposite directions; Type III: both toggle the same way; Type IV:
// neither toggles). The four types and the 4-bit default body width follow
// the document; the cost weights are this design's own choice and follow the
// usual bus energy model: a toggling line costs 1 (self switching), a Type I
// pair costs 1 and a Type II pair costs 2 coupling units, Types III and IV
// cost nothing.
package noc_enc_pkg;

  typedef enum logic [1:0] {
    TYPE_I   = 2'd0,  // one line toggles, the other stays
    TYPE_II  = 2'd1,  // both toggle in opposite directions
    TYPE_III = 2'd2,  // both toggle in the same direction
    TYPE_IV  = 2'd3   // neither toggles
  } trans_type_e;

  // Inversion applied to the body of a flit before it is driven on the link.
  typedef enum logic [1:0] {
    INV_NONE = 2'd0,
    INV_ODD  = 2'd1,  // body bits 1, 3, 5, ... inverted
    INV_EVEN = 2'd2,  // body bits 0, 2, 4, ... inverted
    INV_FULL = 2'd3   // every body bit inverted
  } inv_mode_e;

  // Switching cost weights (self, Type I coupling, Type II coupling).
  localparam int unsigned COST_SELF = 1;
  localparam int unsigned COST_T1   = 1;
  localparam int unsigned COST_T2   = 2;

  // Width of a cost value for a W-line link: at most W self toggles plus
  // (W-1) Type II pairs.
  function automatic int unsigned cost_width(int unsigned w);
    return $clog2(COST_SELF * w + COST_T2 * (w - 1) + 1);
  endfunction

  // Inversion mask over the W link lines for a given mode. Line 0 (inv) is
  // set whenever any body bit is inverted, so the appended 0 becomes 1.
  function automatic logic [63:0] inv_mask(inv_mode_e mode, int unsigned data_w);
    logic [63:0] m;
    m = '0;
    for (int unsigned j = 0; j < data_w; j++) begin
      unique case (mode)
        INV_ODD:  m[j+1] = (j % 2) == 1;
        INV_EVEN: m[j+1] = (j % 2) == 0;
        INV_FULL: m[j+1] = 1'b1;
        default:  m[j+1] = 1'b0;
      endcase
    end
    m[0] = (mode != INV_NONE);
    return m;
  endfunction

endpackage
