// seu_fpga_system: self-checking FPGA configuration layer plus its external
// partial-reconfiguration controller.
//
// The FPGA's configuration memory is dual-ported: port 1 configures it, port 2 is
// scanned continuously, one frame index of every column per clock, and each frame's
// parity is compared with its parity at the previous scan. An odd number of upset
// bits in a frame changes its parity; the scan then stops and the frame's column
// and frame address are offered on the SelectMAP ports. The controller reads them,
// rewrites that frame from flash and writes RECOVERED, and the scan resumes.
//
// Ports: clock and synchronous active-high reset; the flash bus of the controller
// (the flash itself is outside); status of the device; a readback port that reads
// any frame through port 1; and an upset-injection port that inverts one stored bit
// (`seu_flip` for one clock) to model a particle strike.
//
// Timing at the defaults (256 columns x 64 frames x 512 bits): initial configuration
// takes 68 clocks per frame; an upset is detected at most 65 clocks after it happens
// and repaired about 80 clocks later.
module seu_fpga_system #(
  parameter int unsigned NUM_FRAMES = seu_pkg::NUM_FRAMES,
  parameter int unsigned NUM_COLS   = seu_pkg::NUM_COLS,
  parameter int unsigned FRAME_BITS = seu_pkg::FRAME_BITS,
  localparam int unsigned FAW = $clog2(NUM_FRAMES),
  localparam int unsigned CAW = $clog2(NUM_COLS),
  localparam int unsigned BAW = $clog2(FRAME_BITS),
  localparam int unsigned AW  = $clog2(NUM_COLS * NUM_FRAMES * FRAME_BITS / 8)
) (
  input  logic                  clk,
  input  logic                  rst,
  // flash holding the original bitstream
  output logic [AW-1:0]         flash_a,
  output logic                  flash_ce_n,
  output logic                  flash_oe_n,
  input  logic [7:0]            flash_d,
  // status
  output logic                  done,
  output logic                  global_fault,
  output logic [CAW-1:0]        column_addr,
  output logic [FAW-1:0]        frame_addr,
  output logic                  scan_en,
  output logic                  resolved,
  output logic                  ctrl_busy,
  output logic [15:0]           repairs,
  // readback
  input  logic [CAW-1:0]        readback_col,
  input  logic [FAW-1:0]        readback_frame,
  output logic [FRAME_BITS-1:0] readback_data,
  // upset injection
  input  logic                  seu_flip,
  input  logic [CAW-1:0]        seu_col,
  input  logic [FAW-1:0]        seu_frame,
  input  logic [BAW-1:0]        seu_bit
);

  logic                smap_cs, smap_write;
  seu_pkg::smap_port_e smap_port;
  logic [7:0]          smap_to_dev, smap_from_dev;
  logic                init_done;

  pr_controller #(
    .NUM_FRAMES(NUM_FRAMES), .NUM_COLS(NUM_COLS), .FRAME_BITS(FRAME_BITS)
  ) u_ctrl (
    .clk       (clk),
    .rst       (rst),
    .flash_a   (flash_a),
    .flash_ce_n(flash_ce_n),
    .flash_oe_n(flash_oe_n),
    .flash_d   (flash_d),
    .smap_cs   (smap_cs),
    .smap_write(smap_write),
    .smap_port (smap_port),
    .smap_dout (smap_to_dev),
    .smap_din  (smap_from_dev),
    .busy      (ctrl_busy),
    .init_done (init_done),
    .repairs   (repairs)
  );

  fpga_device #(
    .NUM_FRAMES(NUM_FRAMES), .NUM_COLS(NUM_COLS), .FRAME_BITS(FRAME_BITS)
  ) u_fpga (
    .clk           (clk),
    .rst           (rst),
    .smap_cs       (smap_cs),
    .smap_write    (smap_write),
    .smap_port     (smap_port),
    .smap_din      (smap_to_dev),
    .smap_dout     (smap_from_dev),
    .done          (done),
    .global_fault  (global_fault),
    .column_addr   (column_addr),
    .frame_addr    (frame_addr),
    .scan_en       (scan_en),
    .resolved      (resolved),
    .readback_col  (readback_col),
    .readback_frame(readback_frame),
    .readback_data (readback_data),
    .seu_flip      (seu_flip),
    .seu_col       (seu_col),
    .seu_frame     (seu_frame),
    .seu_bit       (seu_bit)
  );

  // DONE in the device and the controller's own record of it agree.
  a_done_agrees: assert property (@(posedge clk) disable iff (rst) done |-> init_done);

endmodule
