// corr_reg: the correlation register.
//
// A small serial shift register, L bits wide, that receives the location of
// the next bit-flip from the test data input TDI, one bit per clock while
// shift_en is high. The location is shifted in least significant bit first:
// each new bit enters at the top (bit L-1) and the register shifts toward
// bit 0, so after L shifts the first bit sent sits in code[0]. The register
// width equals the number of encoded bits per flip, ceil(log2 M) for a core
// with M inputs; that width and its serial loading follow the scheme the
// design implements, the bit order and the reset to zero are this design's
// choices.
//
// Timing: code changes on the rising clock edge after tdi is sampled.
module corr_reg #(
  parameter int unsigned L = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift_en,
  input  logic         tdi,
  output logic [L-1:0] code
);

  logic [L-1:0] code_next;

  if (L == 1) begin : g_one
    assign code_next = tdi;
  end else begin : g_wide
    assign code_next = {tdi, code[L-1:1]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        code <= '0;
    else if (shift_en) code <= code_next;
  end

endmodule
