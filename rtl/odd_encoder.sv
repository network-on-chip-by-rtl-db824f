// odd_encoder: scheme I, odd-invert link encoder.
//
// Scheme I of the document: a body flit is sent either as it is or with its
// odd body bits inverted. Inverting every other line turns Type I pair
// transitions into Types III and IV, the kind the scheme sets out to reduce;
// the encoder picks whichever of the two flits causes less self plus
// coupling switching against the flit last driven on the link.
//
// Every cycle with in_valid high one flit is accepted. A body flit is
// extended with a 0 on line 0 (the inv line) and the candidates plain and odd-inverted
// are formed from it; for each candidate a type_conversion census and a
// ones_counter run against the previous encoded flit, and precompute_logic
// keeps the cheapest (plain on a tie). A header flit (in_header high) is
// sent as it is, with inv = 0, because the document leaves header flits
// unencoded. While no body flit is offered the census logic is fed the
// previous encoded flit instead of the input, so it does not switch
// (the document's pre-computation idea of disabling inputs); and the link
// register only loads on in_valid, so idle cycles leave the link still.
//
// Interface: in_body is DATA_W bits (the document uses 4); link_flit is
// W = DATA_W + 1 lines, {encoded body, inv}. link_mode says which inversion
// produced link_flit; the inv line alone marks that some inversion was
// applied, and the document does not say how a receiver tells the
// inversions apart, so link_mode is brought out for that purpose.
// Timing: one clock from in_valid to link_valid; one flit per clock.
module odd_encoder
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
  output logic [W-1:0]      link_flit,
  output inv_mode_e         link_mode,
  output logic              link_valid
);

  localparam int unsigned NCAND = 2;
  localparam inv_mode_e CAND_MODE [NCAND] = '{INV_NONE, INV_ODD};
  localparam int unsigned NW = $clog2(W + 1);
  localparam int unsigned CW = cost_width(W);
  localparam int unsigned SW = $clog2(NCAND);

  logic [W-1:0] prev_flit;
  logic         body_en;
  logic [W-1:0] plain_flit;
  logic [W-1:0] eval_flit;
  logic [NCAND-1:0][W-1:0]  cand_flit;
  logic [NCAND-1:0][NW-1:0] cand_ones, cand_t1, cand_t2;
  logic [NCAND-1:0][CW-1:0] cand_cost;
  logic [SW-1:0]            sel;
  logic [CW-1:0]            min_cost;
  logic [W-1:0]             enc_flit;
  inv_mode_e                enc_mode;

  assign body_en    = in_valid && !in_header;
  assign plain_flit = {in_body, 1'b0};
  // Input disabling: with no body flit the census sees no transition.
  assign eval_flit  = body_en ? plain_flit : prev_flit;

  for (genvar c = 0; c < NCAND; c++) begin : g_cand
    localparam logic [W-1:0] MASK = W'(inv_mask(CAND_MODE[c], DATA_W));
    logic [NW-1:0] t3_unused, t4_unused;

    assign cand_flit[c] = eval_flit ^ MASK;

    type_conversion #(.W(W), .NW(NW)) u_types (
      .prev_flit (prev_flit),
      .cur_flit  (cand_flit[c]),
      .n_t1      (cand_t1[c]),
      .n_t2      (cand_t2[c]),
      .n_t3      (t3_unused),
      .n_t4      (t4_unused)
    );

    ones_counter #(.W(W), .NW(NW)) u_ones (
      .prev_flit (prev_flit),
      .cur_flit  (cand_flit[c]),
      .ones      (cand_ones[c])
    );
  end

  precompute_logic #(.W(W), .NCAND(NCAND), .NW(NW), .CW(CW), .SW(SW)) u_pre (
    .ones     (cand_ones),
    .n_t1     (cand_t1),
    .n_t2     (cand_t2),
    .cost     (cand_cost),
    .sel      (sel),
    .min_cost (min_cost)
  );

  always_comb begin
    if (body_en) begin
      enc_flit = cand_flit[sel];
      enc_mode = CAND_MODE[sel];
    end else begin
      enc_flit = plain_flit;
      enc_mode = INV_NONE;
    end
  end

  prev_encoded_reg #(.W(W)) u_prev (
    .clk     (clk),
    .rst_n   (rst_n),
    .load    (in_valid),
    .d       (enc_flit),
    .d_mode  (enc_mode),
    .q       (prev_flit),
    .q_mode  (link_mode),
    .q_valid (link_valid)
  );

  assign link_flit = prev_flit;

  // The inv line must mark exactly the flits that carry an inversion.
  a_inv_line : assert property (@(posedge clk) disable iff (!rst_n)
                                link_flit[0] == (link_mode != INV_NONE));

endmodule
