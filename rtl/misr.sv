// misr: multiple-input signature register on the core outputs.
//
// Instead of capturing the core responses in a shift register and shifting
// each one out, the responses are folded into an N-bit signature. On every
// clock with capture high the register shifts one place toward its MSB, the
// bit leaving the MSB is fed back into the positions set in POLY (internal,
// Galois-type feedback), and the N response bits are XORed in:
//   sig <= {sig[N-2:0], 0} ^ (sig[N-1] ? POLY : 0) ^ d.
// With unload high (and capture low) the register instead shifts toward its
// MSB with zero fill, presenting the signature MSB first on tdo, so it can be
// read serially after the test. Reset clears it.
//
// Compacting the responses in a MISR that drives TDO follows the scheme; the
// feedback structure, the default polynomial x^8+x^4+x^3+x^2+1 (primitive for
// N = 8), the capture/unload controls and the reset value are this design's
// choices.
module misr #(
  parameter int unsigned  N    = 8,
  parameter logic [N-1:0] POLY = N'('h1D)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         capture,
  input  logic         unload,
  input  logic [N-1:0] d,
  output logic [N-1:0] sig,
  output logic         tdo
);

  logic [N-1:0] shifted;

  if (N == 1) begin : g_one
    assign shifted = '0;
  end else begin : g_wide
    assign shifted = {sig[N-2:0], 1'b0};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sig <= '0;
    end else if (capture) begin
      sig <= shifted ^ (sig[N-1] ? POLY : '0) ^ d;
    end else if (unload) begin
      sig <= shifted;
    end
  end

  assign tdo = sig[N-1];

endmodule
