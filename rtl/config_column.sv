// config_column: one column (major address) of the parity-checked configuration memory.
//
// The column stores NUM_FRAMES frames of FRAME_BITS bits in a dual-port array:
//  * Port 1 is the normal configuration port. `p1_we` writes frame `p1_addr` with
//    `p1_wdata` at the clock edge; `p1_rdata` reads frame `p1_addr` combinationally
//    (readback).
//  * Port 2 only reads, for error checking. The one-hot word line `scan_sel` from
//    the frame decoder selects the frame whose bits appear on `p2_data`.
// A parity tree on the port-2 data feeds the detection block of every frame; the
// block of the selected frame takes the parity when `scan_en` says a scan step is
// taken. A second parity tree on `p1_wdata` gives the reference parity that a
// port-1 write loads into the written frame's detection block. `col_fault` is the
// OR of the NUM_FRAMES frame faults (the column's Fault_C line); it rises one clock
// after the scan of an upset frame.
//
// The dual-port frame store, per-frame detection and the column fault OR follow
// the published architecture. Sharing one scan parity tree per column (only one frame per column
// is on the scan word line at a time) instead of one tree per frame, and the
// upset-injection inputs `seu_*`, which invert one stored bit to model a particle
// strike, are this design's choices. The memory itself is not reset; `rst` clears
// the detection stores.
module config_column #(
  parameter int unsigned NUM_FRAMES = seu_pkg::NUM_FRAMES,
  parameter int unsigned FRAME_BITS = seu_pkg::FRAME_BITS,
  localparam int unsigned FAW = $clog2(NUM_FRAMES),
  localparam int unsigned BAW = $clog2(FRAME_BITS)
) (
  input  logic                  clk,
  input  logic                  rst,
  // port 1: configuration / partial reconfiguration / readback
  input  logic                  p1_we,
  input  logic [FAW-1:0]        p1_addr,
  input  logic [FRAME_BITS-1:0] p1_wdata,
  output logic [FRAME_BITS-1:0] p1_rdata,
  // port 2: read-only scan
  input  logic [NUM_FRAMES-1:0] scan_sel,
  input  logic                  scan_en,
  // upset injection
  input  logic                  seu_flip,
  input  logic [FAW-1:0]        seu_frame,
  input  logic [BAW-1:0]        seu_bit,
  output logic                  col_fault
);

  logic [FRAME_BITS-1:0] mem [NUM_FRAMES];
  logic [FRAME_BITS-1:0] p2_data;
  logic                  scan_parity, write_parity;
  logic [NUM_FRAMES-1:0] frame_fault;

  always_ff @(posedge clk) begin
    if (seu_flip) mem[seu_frame][seu_bit] <= ~mem[seu_frame][seu_bit];
    if (p1_we)    mem[p1_addr]            <= p1_wdata;
  end

  assign p1_rdata = mem[p1_addr];

  // Port-2 bit lines: wired OR of the frame on the active word line.
  always_comb begin
    p2_data = '0;
    for (int unsigned i = 0; i < NUM_FRAMES; i++)
      if (scan_sel[i]) p2_data |= mem[i];
  end

  parity_tree #(.WIDTH(FRAME_BITS)) u_scan_parity  (.data(p2_data),  .parity(scan_parity));
  parity_tree #(.WIDTH(FRAME_BITS)) u_write_parity (.data(p1_wdata), .parity(write_parity));

  for (genvar f = 0; f < NUM_FRAMES; f++) begin : g_frame
    detection_block u_det (
      .clk        (clk),
      .rst        (rst),
      .parity     (scan_parity),
      .scan       (scan_sel[f] & scan_en),
      .load       (p1_we && p1_addr == FAW'(f)),
      .load_parity(write_parity),
      .fault      (frame_fault[f])
    );
  end

  assign col_fault = |frame_fault;

endmodule
