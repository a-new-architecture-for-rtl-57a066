// seu_detection_controller: the scan and fault-reporting logic shared by all columns.
//
// A scan_counter walks the frame index 0..NUM_FRAMES-1; the frame_decoder turns it
// into a one-hot word line that reads the same frame index of every column through
// port 2 at once (`scan_sel`, with `scan_en` marking that the step is taken). Each
// column returns its fault line; their OR is `global_fault`, and the column_encoder
// turns them into `column_addr`. `frame_addr` is the count of the step whose result
// the columns report. The enable_controller freezes the counter when a fault is seen
// after the settling time, so `frame_addr` and `column_addr` stay put until the
// external controller has repaired the frame and pulsed `resolved`; the scan resumes
// two clocks after that pulse.
//
// Timing: an upset in frame f is reported one clock after the scan step that reads
// frame f, so detection takes at most NUM_FRAMES+1 clocks after the upset. The
// structure follows the published complete detection-controller drawing.
module seu_detection_controller #(
  parameter int unsigned NUM_FRAMES = seu_pkg::NUM_FRAMES,
  parameter int unsigned NUM_COLS   = seu_pkg::NUM_COLS,
  localparam int unsigned FAW = $clog2(NUM_FRAMES),
  localparam int unsigned CAW = $clog2(NUM_COLS)
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  resolved,
  input  logic [NUM_COLS-1:0]   col_fault,
  output logic [NUM_FRAMES-1:0] scan_sel,
  output logic                  scan_en,
  output logic [FAW-1:0]        frame_addr,
  output logic                  global_fault,
  output logic [CAW-1:0]        column_addr
);

  logic [FAW-1:0] count;
  logic           enc_valid;
  logic           genuine_fault;

  assign global_fault = |col_fault;

  enable_controller u_enable (
    .clk          (clk),
    .rst          (rst),
    .resolved     (resolved),
    .fault        (global_fault),
    .enable       (scan_en),
    .genuine_fault(genuine_fault)
  );

  scan_counter #(.NUM_FRAMES(NUM_FRAMES)) u_counter (
    .clk       (clk),
    .rst       (rst),
    .enable    (scan_en),
    .count     (count),
    .frame_addr(frame_addr)
  );

  frame_decoder #(.NUM_FRAMES(NUM_FRAMES)) u_decoder (
    .addr(count),
    .sel (scan_sel)
  );

  column_encoder #(.NUM_COLS(NUM_COLS)) u_encoder (
    .fault(col_fault),
    .addr (column_addr),
    .valid(enc_valid)
  );

  // The scan never runs while a fault is visible and settled.
  a_stop_on_fault: assert property (@(posedge clk) disable iff (rst) genuine_fault |-> !scan_en);
  a_enc_matches_or: assert property (@(posedge clk) enc_valid == global_fault);

endmodule
