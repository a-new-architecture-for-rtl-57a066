// seu_pkg: sizes and encodings shared by the parity-checked configuration memory,
// its SEU detection controller, the SelectMAP device port and the external
// partial-reconfiguration controller.
//
// The configuration layer is NUM_COLS columns (major address) of NUM_FRAMES frames
// (minor address) each. A frame is FRAME_BITS configuration bits. 256 columns and a
// 6-bit frame counter (64 frames) follow the detection-controller drawing; the
// 512-bit frame is this design's choice, picked so that the whole bitstream is
// exactly 2^20 bytes, the reach of the 20-bit flash address of the SelectMAP set-up.
package seu_pkg;

  parameter int unsigned NUM_COLS   = 256;
  parameter int unsigned NUM_FRAMES = 64;
  parameter int unsigned FRAME_BITS = 512;

  // Port addresses of the SelectMAP device interface (PORT ADD(1:0)).
  typedef enum logic [1:0] {
    PORT_GLOBAL_FAULT   = 2'b00,
    PORT_COLUMN_ADDRESS = 2'b01,
    PORT_FRAME_ADDRESS  = 2'b10,
    PORT_RECOVERED      = 2'b11
  } smap_port_e;

endpackage
