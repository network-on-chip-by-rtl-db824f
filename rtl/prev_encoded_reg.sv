// prev_encoded_reg: the "previous encoded flit" register of the encoder.
//
// Holds the last flit driven on the link together with the inversion mode
// that produced it. It loads only when load is high (a flit is being sent);
// otherwise it keeps its value, so the link lines and everything fed from
// this register stay still between flits. Its output both drives the link
// and is fed back to the encoder as the reference for the next flit, as in
// the document's encoder architecture. Reset (active low, synchronous) puts
// all lines at 0; the reset value and style are this design's choice.
// Timing: the flit presented with load appears on q one clock later.
module prev_encoded_reg
  import noc_enc_pkg::*;
#(
  parameter int unsigned W = 5
)(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] d,
  input  inv_mode_e    d_mode,
  output logic [W-1:0] q,
  output inv_mode_e    q_mode,
  output logic         q_valid      // a new flit was loaded last cycle
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q       <= '0;
      q_mode  <= INV_NONE;
      q_valid <= 1'b0;
    end else begin
      q_valid <= load;
      if (load) begin
        q      <= d;
        q_mode <= d_mode;
      end
    end
  end

endmodule
