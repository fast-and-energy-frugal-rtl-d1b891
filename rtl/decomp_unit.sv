// decomp_unit: on-chip decompressor that builds each test vector from the
// previous one by flipping single bits.
//
// The tester sends, serially on tdi, the location of every bit in which the
// next test vector differs from the current one, L = ceil(log2 M) bits per
// location, least significant bit first. The correlation register collects a
// location; the enable generator raises the decoder enable once per L shift
// cycles, when a complete location is held; the decoder turns it into a
// one-hot flip strobe; and the addressed toggle cell driving the core input
// inverts. A test set whose consecutive vectors differ in W bits in all is
// applied in W*L shift cycles (plus one for the final flip), against N*M for
// plain serial loading, and the core inputs make exactly W transitions.
//
// STYLE picks how the decoder is built (see vc_pkg): a flat decoder, a tree
// of 1-to-2 decoders, or the half-size pair decoder; all three behave alike.
//
// Interface: shift_en high means tdi carries a location bit this cycle. The
// tester keeps shift_en high for L consecutive cycles per location (it may
// run continuously across locations). dec_en shows the cycle in which a flip
// is applied; vec changes at the end of that cycle. Reset clears the vector.
module decomp_unit
  import vc_pkg::*;
#(
  parameter int unsigned M     = 8,
  parameter int unsigned L     = code_width(M),
  parameter dec_style_e  STYLE = DEC_FLAT,
  localparam int unsigned PW   = (L <= 2) ? 1 : $clog2(L)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          shift_en,
  input  logic          tdi,
  output logic [M-1:0]  vec,
  output logic          dec_en,
  output logic [L-1:0]  code,
  output logic [PW-1:0] phase
);

  logic [M-1:0] flip;

  corr_reg #(.L(L)) u_corr_reg (
    .clk      (clk),
    .rst_n    (rst_n),
    .shift_en (shift_en),
    .tdi      (tdi),
    .code     (code)
  );

  dec_enable_gen #(.L(L)) u_enable (
    .clk      (clk),
    .rst_n    (rst_n),
    .shift_en (shift_en),
    .dec_en   (dec_en),
    .phase    (phase)
  );

  if (STYLE == DEC_TREE) begin : g_tree
    tree_decoder #(.M(M), .L(L)) u_dec (.en(dec_en), .code(code), .flip(flip));
  end else if (STYLE == DEC_PAIR) begin : g_pair
    pair_flip_decoder #(.M(M), .L(L)) u_dec (.en(dec_en), .code(code), .flip(flip));
  end else begin : g_flat
    flip_decoder #(.M(M), .L(L)) u_dec (.en(dec_en), .code(code), .flip(flip));
  end

  toggle_cells #(.M(M)) u_cells (
    .clk   (clk),
    .rst_n (rst_n),
    .flip  (flip),
    .vec   (vec)
  );

  // At most one core input may change per clock (flip is all zero in reset).
  a_one_flip : assert property (@(posedge clk) $onehot0(flip));

endmodule
