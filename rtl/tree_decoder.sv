// tree_decoder: log2(M)-to-M enable decoder built as a tree of 1-to-2 decoders.
//
// The root cell takes the decoder enable and the most significant code bit;
// each of its two outputs enables a cell of the next level, which decodes the
// next code bit, and so on down to the least significant bit, whose level has
// 2^(L-1) cells and 2^L outputs. Leaf output i is high exactly when en is high
// and code == i, the same function as flip_decoder. Building it as a tree lets
// each level sit close to the cells it serves, which eases wiring. The tree of
// Dec(1x2) cells and the enable at its root follow the scheme; putting the
// most significant bit at the root (so that leaf order equals code value) is
// this design's choice. Leaves at index M and above (M not a power of two)
// are left unconnected. Purely combinational.
//
// Nodes are numbered as in a heap: node 1 is the root's input, node n feeds
// cell n whose outputs are nodes 2n and 2n+1; nodes 2^L .. 2^(L+1)-1 are the
// leaves.
module tree_decoder #(
  parameter int unsigned M = 8,
  parameter int unsigned L = vc_pkg::code_width(M)
) (
  input  logic         en,
  input  logic [L-1:0] code,
  output logic [M-1:0] flip
);

  localparam int unsigned NODES = 2 ** (L + 1);

  wire [NODES-1:1] node;

  assign node[1] = en;

  for (genvar lvl = 0; lvl < L; lvl++) begin : g_level
    for (genvar j = 0; j < 2 ** lvl; j++) begin : g_cell
      localparam int unsigned N = 2 ** lvl + j;
      dec1x2 u_cell (
        .en (node[N]),
        .d  (code[L-1-lvl]),
        .y0 (node[2*N]),
        .y1 (node[2*N+1])
      );
    end
  end

  for (genvar i = 0; i < M; i++) begin : g_leaf
    assign flip[i] = node[2 ** L + i];
  end

endmodule
