// toggle_cells: the M flip-flops that hold the test vector at the core inputs.
//
// Each cell is a flip-flop whose next value is its own output XORed with its
// flip strobe, so a raised strobe inverts the cell on the next clock edge and
// all other cells hold. The current test vector therefore becomes the next
// one by flipping only the bits in which the two differ, and the core inputs
// see no other transitions. The XOR-and-flip-flop cell is the scheme's; the
// asynchronous reset to all zeros, from which the first vector is built by
// flips like any other, is this design's choice.
//
// Timing: vec changes on the rising clock edge at which flip is sampled.
module toggle_cells #(
  parameter int unsigned M = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [M-1:0] flip,
  output logic [M-1:0] vec
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vec <= '0;
    else        vec <= vec ^ flip;
  end

endmodule
