// selectmap_port: device side of the SelectMAP bus of the proposed FPGA.
//
// The external controller addresses four device ports with PORT ADD(1:0):
//   read  00 GLOBAL FAULT   -> d_out[0] = global fault
//   read  01 COLUMN ADDRESS -> d_out    = column (major) address of the fault
//   read  10 FRAME ADDRESS  -> d_out    = frame (minor) address of the fault
//   read  11 RECOVERED      -> d_out[0] = DONE (initial configuration finished)
//   write 01                -> port-1 column address for the next frame write
//   write 10                -> port-1 frame address; restarts the byte count
//   write 00                -> next byte of frame data (byte 0 = frame bits 7:0)
//   write 11 RECOVERED      -> one-clock `resolved` pulse, sets DONE
// A bus cycle is one clock with `cs` high; `write` high means data into the device.
// Reads are combinational (d_out is 0 when not read). When the last of the
// FRAME_BITS/8 bytes has been taken, `cfg_we` is high for the next clock with the
// assembled frame on `cfg_data` and its address on `cfg_col`/`cfg_frame`; this is the
// port-1 write into the configuration memory.
//
// The port names and addresses are the published ones; what a write to each port means,
// the byte order and the one-clock bus timing are this design's choices, since the
// published architecture does not cover the configuration data protocol. DONE is modelled as a
// flag set by the first RECOVERED write.
module selectmap_port #(
  parameter int unsigned NUM_FRAMES = seu_pkg::NUM_FRAMES,
  parameter int unsigned NUM_COLS   = seu_pkg::NUM_COLS,
  parameter int unsigned FRAME_BITS = seu_pkg::FRAME_BITS,
  localparam int unsigned FAW = $clog2(NUM_FRAMES),
  localparam int unsigned CAW = $clog2(NUM_COLS),
  localparam int unsigned NBYTES = FRAME_BITS / 8,
  localparam int unsigned BCW = $clog2(NBYTES)
) (
  input  logic                  clk,
  input  logic                  rst,
  // bus
  input  logic                  cs,
  input  logic                  write,
  input  seu_pkg::smap_port_e   port_add,
  input  logic [7:0]            d_in,
  output logic [7:0]            d_out,
  // status from the detection controller
  input  logic                  global_fault,
  input  logic [CAW-1:0]        column_addr,
  input  logic [FAW-1:0]        frame_addr,
  // to the detection controller and configuration memory
  output logic                  done,
  output logic                  resolved,
  output logic                  cfg_we,
  output logic [CAW-1:0]        cfg_col,
  output logic [FAW-1:0]        cfg_frame,
  output logic [FRAME_BITS-1:0] cfg_data
);
  import seu_pkg::*;

  logic [BCW-1:0] byte_cnt;
  logic           wr, rd;

  assign wr = cs &  write;
  assign rd = cs & ~write;

  always_comb begin
    d_out = '0;
    if (rd) begin
      unique case (port_add)
        PORT_GLOBAL_FAULT:   d_out = 8'(global_fault);
        PORT_COLUMN_ADDRESS: d_out = 8'(column_addr);
        PORT_FRAME_ADDRESS:  d_out = 8'(frame_addr);
        PORT_RECOVERED:      d_out = 8'(done);
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      byte_cnt  <= '0;
      cfg_we    <= 1'b0;
      cfg_col   <= '0;
      cfg_frame <= '0;
      resolved  <= 1'b0;
      done      <= 1'b0;
    end else begin
      cfg_we   <= 1'b0;
      resolved <= 1'b0;
      if (wr) begin
        unique case (port_add)
          PORT_COLUMN_ADDRESS: cfg_col <= CAW'(d_in);
          PORT_FRAME_ADDRESS: begin
            cfg_frame <= FAW'(d_in);
            byte_cnt  <= '0;
          end
          PORT_GLOBAL_FAULT: begin
            cfg_data[8*byte_cnt +: 8] <= d_in;
            if (byte_cnt == BCW'(NBYTES - 1)) begin
              byte_cnt <= '0;
              cfg_we   <= 1'b1;
            end else begin
              byte_cnt <= byte_cnt + 1'b1;
            end
          end
          PORT_RECOVERED: begin
            resolved <= 1'b1;
            done     <= 1'b1;
          end
        endcase
      end
    end
  end

endmodule
