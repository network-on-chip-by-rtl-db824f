// data_encoder_top: the three NoC link data-encoding schemes side by side.
//
// The document proposes encoding body flits in the network interface, before
// they enter the network, so that the link lines switch less. It describes
// three schemes built on one encoder architecture: odd invert (scheme I),
// odd/full invert (scheme II) and odd/even invert (scheme III). This top
// feeds one flit stream to an encoder of each scheme, each driving a link of
// its own, so the three can be used or compared on the same traffic.
// Choosing one scheme for a real network interface means keeping one of the
// three instances.
//
// Interface: in_valid/in_header/in_body offer one flit per clock (header
// flits pass unencoded). Each link_* group is W = DATA_W + 1 lines
// {encoded body, inv}, the inversion mode used, and a valid strobe.
// Timing: every link shows the flit one clock after it is offered.
module data_encoder_top
  import noc_enc_pkg::*;
#(
  parameter int unsigned DATA_W = 4,
  parameter int unsigned W      = DATA_W + 1
)(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic              in_header,
  input  logic [DATA_W-1:0] in_body,
  output logic [W-1:0]      link1_flit,   // scheme I: odd invert
  output inv_mode_e         link1_mode,
  output logic              link1_valid,
  output logic [W-1:0]      link2_flit,   // scheme II: odd/full invert
  output inv_mode_e         link2_mode,
  output logic              link2_valid,
  output logic [W-1:0]      link3_flit,   // scheme III: odd/even invert
  output inv_mode_e         link3_mode,
  output logic              link3_valid
);

  odd_encoder #(.DATA_W(DATA_W), .W(W)) u_scheme1 (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (in_valid),
    .in_header  (in_header),
    .in_body    (in_body),
    .link_flit  (link1_flit),
    .link_mode  (link1_mode),
    .link_valid (link1_valid)
  );

  odd_full_encoder #(.DATA_W(DATA_W), .W(W)) u_scheme2 (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (in_valid),
    .in_header  (in_header),
    .in_body    (in_body),
    .link_flit  (link2_flit),
    .link_mode  (link2_mode),
    .link_valid (link2_valid)
  );

  odd_even_encoder #(.DATA_W(DATA_W), .W(W)) u_scheme3 (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (in_valid),
    .in_header  (in_header),
    .in_body    (in_body),
    .link_flit  (link3_flit),
    .link_mode  (link3_mode),
    .link_valid (link3_valid)
  );

endmodule
