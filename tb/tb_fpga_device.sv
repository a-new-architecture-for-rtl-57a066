// tb_fpga_device: 4 columns x 8 frames x 64-bit frames, the testbench acting as the
// SelectMAP master. Configures every frame, checks readback and that the scan does
// not run before RECOVERED, then upsets bits and checks Global Fault, Column and
// Frame Address, the frozen scan, the repair by a frame rewrite and the restart.
module tb_fpga_device;
  import seu_pkg::*;
  localparam int NF = 8, NC = 4, FB = 64, NB = FB / 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  logic smap_cs, smap_write; smap_port_e smap_port; logic [7:0] smap_din, smap_dout;
  logic done, global_fault, scan_en, resolved;
  logic [1:0] column_addr, readback_col, seu_col;
  logic [2:0] frame_addr, readback_frame, seu_frame;
  logic [FB-1:0] readback_data;
  logic seu_flip; logic [5:0] seu_bit;
  logic [FB-1:0] golden [NC][NF];

  always #5 clk = ~clk;

  fpga_device #(.NUM_FRAMES(NF), .NUM_COLS(NC), .FRAME_BITS(FB)) dut (.*);

  task automatic wr(input smap_port_e p, input logic [7:0] d);
    smap_cs = 1; smap_write = 1; smap_port = p; smap_din = d;
    @(posedge clk); #1 smap_cs = 0; smap_write = 0;
  endtask

  task automatic rd(input smap_port_e p, output logic [7:0] d);
    smap_cs = 1; smap_write = 0; smap_port = p; #1 d = smap_dout;
    @(posedge clk); #1 smap_cs = 0;
  endtask

  task automatic write_frame(input int c, input int f);
    wr(PORT_COLUMN_ADDRESS, 8'(c));
    wr(PORT_FRAME_ADDRESS, 8'(f));
    for (int b = 0; b < NB; b++) wr(PORT_GLOBAL_FAULT, golden[c][f][8*b +: 8]);
    @(posedge clk); #1;
  endtask

  task automatic check_readback(input string what);
    for (int c = 0; c < NC; c++)
      for (int f = 0; f < NF; f++) begin
        readback_col = 2'(c); readback_frame = 3'(f); #1;
        checks++;
        if (readback_data !== golden[c][f]) begin failures++; $display("FAIL %s readback %0d/%0d", what, c, f); end
      end
  endtask

  logic [7:0] v;
  int cyc;

  initial begin
    rst = 1; smap_cs = 0; smap_write = 0; smap_port = PORT_GLOBAL_FAULT; smap_din = 0;
    readback_col = 0; readback_frame = 0; seu_flip = 0; seu_col = 0; seu_frame = 0; seu_bit = 0;
    foreach (golden[c, f]) golden[c][f] = {$urandom, $urandom};
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int c = 0; c < NC; c++) for (int f = 0; f < NF; f++) write_frame(c, f);
    checks += 2;
    if (scan_en || done) begin failures++; $display("FAIL scan before DONE"); end
    check_readback("configured");
    rd(PORT_GLOBAL_FAULT, v);
    if (v !== 0) begin failures++; $display("FAIL fault after configuration"); end
    wr(PORT_RECOVERED, 8'h00);
    repeat (3) @(posedge clk); #1;
    checks += 2;
    if (!done)    begin failures++; $display("FAIL no DONE"); end
    if (!scan_en) begin failures++; $display("FAIL scan not running"); end
    repeat (3 * NF) @(posedge clk); #1;
    for (int t = 0; t < 12; t++) begin
      int c = $urandom_range(0, NC - 1), f = $urandom_range(0, NF - 1), b = $urandom_range(0, FB - 1);
      seu_flip = 1; seu_col = 2'(c); seu_frame = 3'(f); seu_bit = 6'(b);
      @(posedge clk); #1 seu_flip = 0;
      cyc = 0;
      while (!global_fault && cyc < 10 * NF) begin @(posedge clk); #1 cyc++; end
      checks += 4;
      if (cyc > NF + 1) begin failures++; $display("FAIL detection after %0d clocks", cyc); end
      rd(PORT_GLOBAL_FAULT, v);
      if (v !== 8'h01) begin failures++; $display("FAIL fault port"); end
      rd(PORT_COLUMN_ADDRESS, v);
      if (v !== 8'(c)) begin failures++; $display("FAIL column %0d exp %0d", v, c); end
      rd(PORT_FRAME_ADDRESS, v);
      if (v !== 8'(f)) begin failures++; $display("FAIL frame %0d exp %0d", v, f); end
      repeat (5) @(posedge clk); #1;
      checks++;
      if (scan_en) begin failures++; $display("FAIL scan not frozen"); end
      write_frame(c, f);
      wr(PORT_RECOVERED, 8'h00);
      checks++;
      if (global_fault) begin failures++; $display("FAIL fault not cleared by repair"); end
      repeat (3) @(posedge clk); #1;
      checks++;
      if (!scan_en) begin failures++; $display("FAIL scan not restarted"); end
    end
    repeat (3 * NF) @(posedge clk); #1;
    checks++;
    if (global_fault) begin failures++; $display("FAIL false fault"); end
    check_readback("repaired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
