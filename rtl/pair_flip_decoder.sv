// pair_flip_decoder: reduced-area flip selection with a half-size decoder.
//
// The least significant code bit is not decoded. The remaining L-1 bits go to
// a (L-1)-to-ceil(M/2) decoder with enable; its output j selects the pair of
// cells 2j and 2j+1. Two gates per pair then pass the selection to cell 2j
// when code[0] is 0 and to cell 2j+1 when code[0] is 1. The resulting strobes
// are identical to those of a full decoder, at about half the decoder size
// and a few more gates at its outputs. Halving the decoder and using the
// code's LSB to pick the cell in a pair follow the scheme; which register
// bit is the LSB follows corr_reg. Purely combinational. Needs L >= 2.
module pair_flip_decoder #(
  parameter int unsigned M = 8,
  parameter int unsigned L = vc_pkg::code_width(M),
  localparam int unsigned PAIRS = (M + 1) / 2
) (
  input  logic         en,
  input  logic [L-1:0] code,
  output logic [M-1:0] flip
);

  logic [PAIRS-1:0] pair_sel;

  flip_decoder #(.M(PAIRS), .L(L - 1)) u_half_dec (
    .en   (en),
    .code (code[L-1:1]),
    .flip (pair_sel)
  );

  always_comb begin
    for (int unsigned i = 0; i < M; i++) begin
      flip[i] = pair_sel[i/2] && (code[0] == i[0]);
    end
  end

endmodule
