// scan_counter: the 6-bit synchronous frame counter that steps the scan sequence.
//
// While `enable` is high the count advances by one per clock and wraps from
// NUM_FRAMES-1 to 0; while it is low the count holds, which freezes the scan. Each
// enabled step also copies the current count into `frame_addr`: the detection stores
// take their result at that edge, so when a fault shows up one clock later,
// `frame_addr` names the frame that produced it even though `count` has moved on.
// That second register and the up/wrap order are this design's choices; the
// counter, its width and its Enable input follow the published design. Synchronous reset
// to 0.
module scan_counter #(
  parameter int unsigned NUM_FRAMES = seu_pkg::NUM_FRAMES,
  localparam int unsigned AW = $clog2(NUM_FRAMES)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          enable,
  output logic [AW-1:0] count,
  output logic [AW-1:0] frame_addr
);

  always_ff @(posedge clk) begin
    if (rst) begin
      count      <= '0;
      frame_addr <= '0;
    end else if (enable) begin
      frame_addr <= count;
      count      <= (count == AW'(NUM_FRAMES - 1)) ? '0 : count + 1'b1;
    end
  end

endmodule
