// frame_decoder: the 6-to-64 decoder of the SEU detection controller.
//
// Turns the scan count into a one-hot word line: sel[i] is 1 exactly when addr == i.
// The same line drives frame i of every configuration column, so one scan step reads
// one frame index in all columns at once. Combinational.
module frame_decoder #(
  parameter int unsigned NUM_FRAMES = seu_pkg::NUM_FRAMES,
  localparam int unsigned AW = $clog2(NUM_FRAMES)
) (
  input  logic [AW-1:0]         addr,
  output logic [NUM_FRAMES-1:0] sel
);

  always_comb begin
    sel = '0;
    for (int unsigned i = 0; i < NUM_FRAMES; i++)
      if (addr == AW'(i)) sel[i] = 1'b1;
  end

endmodule
