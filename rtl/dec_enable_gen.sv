// dec_enable_gen: periodic enable for the location decoder.
//
// While a location is being shifted into the correlation register the
// decoder must stay disabled, or the partially loaded code would flip wrong
// cells. This block counts shift cycles modulo L and raises dec_en for one
// clock after every L-th shift, that is in the cycle in which the correlation
// register holds a complete location. With shift_en held high the enable is a
// periodic pulse of period L cycles and no extra test pin is needed to
// produce it. The pulse in the cycle after the code is complete (rather than
// in the L-th shift cycle itself) is this design's choice: the decoder sees
// only registered code bits, and the flip of location i happens on the same
// clock edge that shifts in the first bit of location i+1. After the last
// location the tester may drop shift_en; the final flip still happens.
//
// Outputs: dec_en (one-cycle pulse), phase (shift count within a location).
module dec_enable_gen #(
  parameter int unsigned L  = 3,
  localparam int unsigned PW = (L <= 2) ? 1 : $clog2(L)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          shift_en,
  output logic          dec_en,
  output logic [PW-1:0] phase
);

  localparam logic [PW-1:0] LAST = PW'(L - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase  <= '0;
      dec_en <= 1'b0;
    end else begin
      dec_en <= shift_en && (phase == LAST);
      if (shift_en) phase <= (phase == LAST) ? '0 : phase + 1'b1;
    end
  end

endmodule
