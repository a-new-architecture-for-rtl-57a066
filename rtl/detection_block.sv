// detection_block: per-frame SEU detector.
//
// Two one-bit stores hold the parity of the frame seen at the latest scan (`cur_q`)
// and at the scan before it (`prev_q`). On every scan step of this frame (`scan`),
// prev_q takes cur_q and cur_q takes the parity now read through the scan port, so
// the pair behaves as a two-stage shift register of scan parities. `fault` is
// cur_q XOR prev_q: it rises the clock after a scan that saw the parity change,
// i.e. after an odd number of bit flips, and stays up until the frame is scanned
// again or rewritten.
//
// A write of the frame through the configuration port (`load`) puts the new parity
// into both stores, which clears `fault` and makes the freshly written contents the
// reference. Load-on-write and the master/slave ordering of the two stores are this
// design's choices; the two stores, the parity input and the XOR output follow the
// published detection-block drawing. Synchronous active-high reset clears both.
module detection_block (
  input  logic clk,
  input  logic rst,
  input  logic parity,       // parity of the frame read on the scan port
  input  logic scan,
  input  logic load,
  input  logic load_parity,  // parity of the frame being written on port 1
  output logic fault
);

  logic cur_q, prev_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      cur_q  <= 1'b0;
      prev_q <= 1'b0;
    end else if (load) begin
      cur_q  <= load_parity;
      prev_q <= load_parity;
    end else if (scan) begin
      cur_q  <= parity;
      prev_q <= cur_q;
    end
  end

  assign fault = cur_q ^ prev_q;

endmodule
