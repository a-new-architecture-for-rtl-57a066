// parity_tree: even-parity bit of one configuration frame.
//
// `parity` is the XOR of all WIDTH input bits: 1 when an odd number of them are 1,
// so any odd number of bit flips in a frame changes it. Written as the XOR
// reduction operator, which synthesis maps to a balanced tree of two-input XORs of
// depth ceil(log2(WIDTH)) (9 levels for a 512-bit frame). Purely combinational.
// Adding a parity tree to each frame is the core idea of the architecture; leaving
// the tree shape to synthesis is this design's choice.
module parity_tree #(
  parameter int unsigned WIDTH = 512
) (
  input  logic [WIDTH-1:0] data,
  output logic             parity
);

  assign parity = ^data;

endmodule
