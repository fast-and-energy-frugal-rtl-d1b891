// flip_decoder: log2(M)-to-M location decoder with enable.
//
// When en is high, exactly the output selected by the location code is
// raised: flip[code] = 1. When en is low, or the code is M or above (spare
// codes exist when M is not a power of two), all outputs stay low. Each
// output is the flip strobe of one core input cell. Purely combinational.
// The decoder and its enable are the scheme's; treating codes at or above M
// as no operation is this design's choice.
module flip_decoder #(
  parameter int unsigned M = 8,
  parameter int unsigned L = vc_pkg::code_width(M)
) (
  input  logic         en,
  input  logic [L-1:0] code,
  output logic [M-1:0] flip
);

  always_comb begin
    for (int unsigned i = 0; i < M; i++) begin
      flip[i] = en && (code == L'(i));
    end
  end

endmodule
