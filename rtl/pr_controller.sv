// pr_controller: external partial-reconfiguration controller on the SelectMAP bus.
//
// It sits between the flash holding the original bitstream and the FPGA. After reset
// it configures every frame of the device from flash (column by column, frame by
// frame) and then writes RECOVERED, which sets DONE in the device and starts the
// scan. From then on it polls the GLOBAL FAULT port. When a fault is reported it
// reads the COLUMN ADDRESS and FRAME ADDRESS ports, copies that one frame from flash
// into the device, and writes RECOVERED, whose Resolved pulse restarts the scan.
//
// Copying a frame: write the column to port 01 and the frame to port 10, then stream
// FRAME_BITS/8 bytes to port 00. Byte b of frame (col, frame) sits at flash address
//   ((col * NUM_FRAMES) + frame) * FRAME_BITS/8 + b,
// which at the default sizes fills the 20-bit flash address exactly. The flash is read
// with CE/OE low and returns the byte one clock after the address; the copy is
// pipelined, one byte per clock, so a frame takes FRAME_BITS/8 + 4 clocks and a
// repair about FRAME_BITS/8 + 12 clocks from the fault being polled.
//
// All bus outputs are registered. Port meanings follow the published SelectMAP port
// table; the sequencing, the flash layout and the initial full configuration by this
// controller are this design's choices.
module pr_controller #(
  parameter int unsigned NUM_FRAMES = seu_pkg::NUM_FRAMES,
  parameter int unsigned NUM_COLS   = seu_pkg::NUM_COLS,
  parameter int unsigned FRAME_BITS = seu_pkg::FRAME_BITS,
  localparam int unsigned FAW = $clog2(NUM_FRAMES),
  localparam int unsigned CAW = $clog2(NUM_COLS),
  localparam int unsigned NBYTES = FRAME_BITS / 8,
  localparam int unsigned BCW = $clog2(NBYTES) + 1,
  localparam int unsigned AW = $clog2(NUM_COLS * NUM_FRAMES * NBYTES)
) (
  input  logic                clk,
  input  logic                rst,
  // flash
  output logic [AW-1:0]       flash_a,
  output logic                flash_ce_n,
  output logic                flash_oe_n,
  input  logic [7:0]          flash_d,
  // SelectMAP
  output logic                smap_cs,
  output logic                smap_write,
  output seu_pkg::smap_port_e smap_port,
  output logic [7:0]          smap_dout,
  input  logic [7:0]          smap_din,
  // status
  output logic                busy,
  output logic                init_done,
  output logic [15:0]         repairs
);
  import seu_pkg::*;

  typedef enum logic [3:0] {
    S_SET_COL, S_SET_FRAME, S_DATA, S_NEXT, S_RECOVER,
    S_POLL, S_POLL_WAIT, S_RD_COL, S_RD_COL_WAIT, S_RD_FRAME, S_RD_FRAME_WAIT
  } state_e;

  state_e         state;
  logic [CAW-1:0] col;
  logic [FAW-1:0] frame;
  logic [BCW-1:0] rd_cnt, wr_cnt;
  logic           rd_v, d_v;

  assign flash_ce_n = ~rd_v;
  assign flash_oe_n = ~rd_v;
  assign busy       = (state != S_POLL) && (state != S_POLL_WAIT);

  // Bus cycle helper values.
  task automatic bus(input logic w, input smap_port_e p, input logic [7:0] d);
    smap_cs    <= 1'b1;
    smap_write <= w;
    smap_port  <= p;
    smap_dout  <= d;
  endtask

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_SET_COL;
      col        <= '0;
      frame      <= '0;
      rd_cnt     <= '0;
      wr_cnt     <= '0;
      rd_v       <= 1'b0;
      d_v        <= 1'b0;
      flash_a    <= '0;
      smap_cs    <= 1'b0;
      smap_write <= 1'b0;
      smap_port  <= PORT_GLOBAL_FAULT;
      smap_dout  <= '0;
      init_done  <= 1'b0;
      repairs    <= '0;
    end else begin
      smap_cs <= 1'b0;
      d_v     <= rd_v;
      unique case (state)
        S_SET_COL: begin
          bus(1'b1, PORT_COLUMN_ADDRESS, 8'(col));
          state <= S_SET_FRAME;
        end
        S_SET_FRAME: begin
          bus(1'b1, PORT_FRAME_ADDRESS, 8'(frame));
          rd_cnt <= '0;
          wr_cnt <= '0;
          state  <= S_DATA;
        end
        S_DATA: begin
          // issue flash reads
          if (rd_cnt != BCW'(NBYTES)) begin
            flash_a <= AW'((32'(col) * NUM_FRAMES + 32'(frame)) * NBYTES + 32'(rd_cnt));
            rd_v    <= 1'b1;
            rd_cnt  <= rd_cnt + 1'b1;
          end else begin
            rd_v <= 1'b0;
          end
          // forward returned bytes
          if (d_v) begin
            bus(1'b1, PORT_GLOBAL_FAULT, flash_d);
            wr_cnt <= wr_cnt + 1'b1;
            if (wr_cnt == BCW'(NBYTES - 1)) state <= S_NEXT;
          end
        end
        S_NEXT: begin
          if (init_done) begin
            repairs <= repairs + 1'b1;
            state   <= S_RECOVER;
          end else if (frame != FAW'(NUM_FRAMES - 1)) begin
            frame <= frame + 1'b1;
            state <= S_SET_COL;
          end else if (col != CAW'(NUM_COLS - 1)) begin
            frame <= '0;
            col   <= col + 1'b1;
            state <= S_SET_COL;
          end else begin
            state <= S_RECOVER;
          end
        end
        S_RECOVER: begin
          bus(1'b1, PORT_RECOVERED, 8'h00);
          init_done <= 1'b1;
          state     <= S_POLL;
        end
        S_POLL: begin
          bus(1'b0, PORT_GLOBAL_FAULT, 8'h00);
          state <= S_POLL_WAIT;
        end
        S_POLL_WAIT: state <= smap_din[0] ? S_RD_COL : S_POLL;
        S_RD_COL: begin
          bus(1'b0, PORT_COLUMN_ADDRESS, 8'h00);
          state <= S_RD_COL_WAIT;
        end
        S_RD_COL_WAIT: begin
          col   <= CAW'(smap_din);
          state <= S_RD_FRAME;
        end
        S_RD_FRAME: begin
          bus(1'b0, PORT_FRAME_ADDRESS, 8'h00);
          state <= S_RD_FRAME_WAIT;
        end
        S_RD_FRAME_WAIT: begin
          frame <= FAW'(smap_din);
          state <= S_SET_COL;
        end
        default: state <= S_POLL;
      endcase
    end
  end

endmodule
