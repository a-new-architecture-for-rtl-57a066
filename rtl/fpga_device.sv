// fpga_device: configuration layer of the proposed self-checking FPGA.
//
// NUM_COLS configuration columns, each NUM_FRAMES frames of FRAME_BITS bits held in
// dual-port memory. Port 1 of every column is driven by the SelectMAP device port:
// a completed frame write goes to column `cfg_col`, frame `cfg_frame`. Port 2 of
// every column is driven by the SEU detection controller, which scans one frame
// index of all columns per clock, checks each frame's parity against the previous
// scan and, on a mismatch, freezes the scan and exposes Global Fault, Column Address
// and Frame Address on the SelectMAP ports. The external controller rewrites the
// frame and writes RECOVERED, which restarts the scan.
//
// The scan is held off (enable controller in reset) until DONE, i.e. until the
// first RECOVERED write after the initial configuration; this gating is this
// design's choice. `readback_*` reads any frame through port 1 for inspection, and
// `seu_*` inverts one stored bit to model an upset; both are additions for test.
// The logic fabric that the configuration bits would control is not modelled.
module fpga_device #(
  parameter int unsigned NUM_FRAMES = seu_pkg::NUM_FRAMES,
  parameter int unsigned NUM_COLS   = seu_pkg::NUM_COLS,
  parameter int unsigned FRAME_BITS = seu_pkg::FRAME_BITS,
  localparam int unsigned FAW = $clog2(NUM_FRAMES),
  localparam int unsigned CAW = $clog2(NUM_COLS),
  localparam int unsigned BAW = $clog2(FRAME_BITS)
) (
  input  logic                  clk,
  input  logic                  rst,
  // SelectMAP
  input  logic                  smap_cs,
  input  logic                  smap_write,
  input  seu_pkg::smap_port_e   smap_port,
  input  logic [7:0]            smap_din,
  output logic [7:0]            smap_dout,
  output logic                  done,
  // observation
  output logic                  global_fault,
  output logic [CAW-1:0]        column_addr,
  output logic [FAW-1:0]        frame_addr,
  output logic                  scan_en,
  output logic                  resolved,
  input  logic [CAW-1:0]        readback_col,
  input  logic [FAW-1:0]        readback_frame,
  output logic [FRAME_BITS-1:0] readback_data,
  // upset injection
  input  logic                  seu_flip,
  input  logic [CAW-1:0]        seu_col,
  input  logic [FAW-1:0]        seu_frame,
  input  logic [BAW-1:0]        seu_bit
);

  logic                  cfg_we;
  logic [CAW-1:0]        cfg_col;
  logic [FAW-1:0]        cfg_frame;
  logic [FRAME_BITS-1:0] cfg_data;
  logic [NUM_COLS-1:0]   col_fault;
  logic [NUM_FRAMES-1:0] scan_sel;
  logic [FRAME_BITS-1:0] col_rdata [NUM_COLS];

  selectmap_port #(
    .NUM_FRAMES(NUM_FRAMES), .NUM_COLS(NUM_COLS), .FRAME_BITS(FRAME_BITS)
  ) u_smap (
    .clk         (clk),
    .rst         (rst),
    .cs          (smap_cs),
    .write       (smap_write),
    .port_add    (smap_port),
    .d_in        (smap_din),
    .d_out       (smap_dout),
    .global_fault(global_fault),
    .column_addr (column_addr),
    .frame_addr  (frame_addr),
    .done        (done),
    .resolved    (resolved),
    .cfg_we      (cfg_we),
    .cfg_col     (cfg_col),
    .cfg_frame   (cfg_frame),
    .cfg_data    (cfg_data)
  );

  seu_detection_controller #(
    .NUM_FRAMES(NUM_FRAMES), .NUM_COLS(NUM_COLS)
  ) u_detect (
    .clk         (clk),
    .rst         (rst | ~done),
    .resolved    (resolved),
    .col_fault   (col_fault),
    .scan_sel    (scan_sel),
    .scan_en     (scan_en),
    .frame_addr  (frame_addr),
    .global_fault(global_fault),
    .column_addr (column_addr)
  );

  // Port 1 of a column reads the readback address unless that column is being written.
  for (genvar c = 0; c < NUM_COLS; c++) begin : g_col
    logic           sel_wr;
    logic [FAW-1:0] p1_addr;
    assign sel_wr  = cfg_we && cfg_col == CAW'(c);
    assign p1_addr = sel_wr ? cfg_frame : readback_frame;

    config_column #(
      .NUM_FRAMES(NUM_FRAMES), .FRAME_BITS(FRAME_BITS)
    ) u_col (
      .clk      (clk),
      .rst      (rst),
      .p1_we    (sel_wr),
      .p1_addr  (p1_addr),
      .p1_wdata (cfg_data),
      .p1_rdata (col_rdata[c]),
      .scan_sel (scan_sel),
      .scan_en  (scan_en),
      .seu_flip (seu_flip && seu_col == CAW'(c)),
      .seu_frame(seu_frame),
      .seu_bit  (seu_bit),
      .col_fault(col_fault[c])
    );
  end

  assign readback_data = col_rdata[readback_col];

endmodule
