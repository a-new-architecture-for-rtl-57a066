// tb_selectmap_port: bus-level check of the device port with a 64-byte frame.
// Reads of ports 00/01/10/11 return the status inputs; writes to 01 and 10 set the
// frame address; 64 data writes to 00 produce one cfg_we clock with the assembled
// frame; a write to 11 gives a one-clock Resolved and sets DONE.
module tb_selectmap_port;
  import seu_pkg::*;
  int checks = 0, failures = 0, we_seen = 0;
  logic clk = 0, rst;
  logic cs, write; smap_port_e port_add; logic [7:0] d_in, d_out;
  logic global_fault; logic [7:0] column_addr; logic [5:0] frame_addr;
  logic done, resolved, cfg_we; logic [7:0] cfg_col; logic [5:0] cfg_frame; logic [511:0] cfg_data;
  logic [511:0] frame;

  always #5 clk = ~clk;

  selectmap_port dut (.*);

  task automatic bus_wr(input smap_port_e p, input logic [7:0] d);
    cs = 1; write = 1; port_add = p; d_in = d;
    @(posedge clk); #1 cs = 0; write = 0;
  endtask

  task automatic bus_rd(input smap_port_e p, input logic [7:0] exp, input string what);
    cs = 1; write = 0; port_add = p; #1;
    checks++;
    if (d_out !== exp) begin failures++; $display("FAIL read %s: %h exp %h", what, d_out, exp); end
    @(posedge clk); #1 cs = 0;
  endtask

  always @(posedge clk) if (!rst && cfg_we) we_seen++;

  initial begin
    rst = 1; cs = 0; write = 0; port_add = PORT_GLOBAL_FAULT; d_in = 0;
    global_fault = 0; column_addr = 0; frame_addr = 0;
    @(posedge clk); #1 rst = 0;
    checks++;
    if (done !== 0) begin failures++; $display("FAIL done after reset"); end
    for (int t = 0; t < 20; t++) begin
      global_fault = logic'($urandom_range(0, 1));
      column_addr = 8'($urandom); frame_addr = 6'($urandom);
      bus_rd(PORT_GLOBAL_FAULT, 8'(global_fault), "fault");
      bus_rd(PORT_COLUMN_ADDRESS, column_addr, "column");
      bus_rd(PORT_FRAME_ADDRESS, 8'(frame_addr), "frame");
    end
    for (int n = 0; n < 5; n++) begin
      logic [7:0] c; logic [5:0] f;
      c = 8'($urandom); f = 6'($urandom);
      for (int w = 0; w < 16; w++) frame[32*w +: 32] = $urandom;
      bus_wr(PORT_COLUMN_ADDRESS, c);
      bus_wr(PORT_FRAME_ADDRESS, 8'(f));
      for (int b = 0; b < 63; b++) begin
        bus_wr(PORT_GLOBAL_FAULT, frame[8*b +: 8]);
        checks++;
        if (cfg_we) begin failures++; $display("FAIL early frame write"); end
      end
      bus_wr(PORT_GLOBAL_FAULT, frame[8*63 +: 8]);
      checks += 4;
      if (cfg_we !== 1)        begin failures++; $display("FAIL no frame write"); end
      if (cfg_data !== frame)  begin failures++; $display("FAIL frame data"); end
      if (cfg_col !== c)       begin failures++; $display("FAIL frame column"); end
      if (cfg_frame !== f)     begin failures++; $display("FAIL frame index"); end
      @(posedge clk); #1;
    end
    checks++;
    if (we_seen != 5) begin failures++; $display("FAIL %0d frame writes", we_seen); end
    bus_rd(PORT_RECOVERED, 8'h00, "done before recovered");
    bus_wr(PORT_RECOVERED, 8'h00);
    checks += 2;
    if (resolved !== 1) begin failures++; $display("FAIL no resolved"); end
    if (done !== 1)     begin failures++; $display("FAIL no done"); end
    @(posedge clk); #1;
    checks++;
    if (resolved !== 0) begin failures++; $display("FAIL resolved longer than one clock"); end
    bus_rd(PORT_RECOVERED, 8'h01, "done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
