// tb_seu_detection_controller: 8 columns x 64 frames. A behavioural column model
// raises a column's fault the clock after the scan reads an upset frame and drops it
// when the tb "repairs" the frame. Checks the scan order, that the scan stops on the
// fault with the right Frame and Column Address, that simultaneous faults in two
// columns are reported lowest column first, and the two-clock restart after Resolved.
module tb_seu_detection_controller;
  localparam int NF = 64, NC = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst, resolved;
  logic [NC-1:0] col_fault;
  logic [NF-1:0] scan_sel;
  logic scan_en, global_fault;
  logic [5:0] frame_addr;
  logic [2:0] column_addr;
  logic upset [NC][NF];
  int steps = 0, expect_frame = 0;

  always #5 clk = ~clk;

  seu_detection_controller #(.NUM_FRAMES(NF), .NUM_COLS(NC)) dut (.*);

  // column model: the fault of an upset frame appears after its scan step
  always @(posedge clk) begin
    if (rst) col_fault <= '0;
    else if (scan_en)
      for (int c = 0; c < NC; c++)
        for (int f = 0; f < NF; f++)
          if (scan_sel[f] && upset[c][f]) col_fault[c] <= 1'b1;
  end

  // the scan visits frames in order
  always @(posedge clk) if (!rst && scan_en) begin
    checks++;
    if (scan_sel !== (NF'(1) << expect_frame)) begin failures++; $display("FAIL scan order"); end
    expect_frame = (expect_frame + 1) % NF;
    steps++;
  end

  task automatic repair(input int c, input int f);
    upset[c][f] = 0; col_fault[c] = 0;
  endtask

  task automatic pulse_resolved();
    resolved = 1; @(posedge clk); #1 resolved = 0;
  endtask

  task automatic wait_fault(output int cycles);
    cycles = 0;
    while (!global_fault && cycles < 500) begin @(posedge clk); #1 cycles++; end
  endtask

  int cyc;

  initial begin
    rst = 1; resolved = 0;
    foreach (upset[c, f]) upset[c][f] = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    repeat (2) @(posedge clk); #1;
    checks++;
    if (!scan_en) begin failures++; $display("FAIL scan not started two clocks after reset"); end
    repeat (150) @(posedge clk); #1;
    // single fault in column 5, frame 20
    upset[5][20] = 1;
    wait_fault(cyc);
    checks += 4;
    if (cyc > NF + 1) begin failures++; $display("FAIL detection took %0d clocks", cyc); end
    if (scan_en)            begin failures++; $display("FAIL scan not stopped"); end
    if (frame_addr != 20)   begin failures++; $display("FAIL frame_addr %0d", frame_addr); end
    if (column_addr != 5)   begin failures++; $display("FAIL column_addr %0d", column_addr); end
    repeat (10) @(posedge clk); #1;
    checks++;
    if (scan_en || frame_addr != 20) begin failures++; $display("FAIL scan moved while faulted"); end
    repair(5, 20);
    pulse_resolved();
    checks++;
    if (scan_en) begin failures++; $display("FAIL restarted too early"); end
    @(posedge clk); #1;
    checks++;
    if (scan_en) begin failures++; $display("FAIL restarted one clock after Resolved"); end
    @(posedge clk); #1;
    checks++;
    if (!scan_en) begin failures++; $display("FAIL not restarted two clocks after Resolved"); end
    // two columns at the same frame
    upset[6][41] = 1; upset[2][41] = 1;
    wait_fault(cyc);
    checks += 2;
    if (column_addr != 2 || frame_addr != 41) begin failures++; $display("FAIL first of two: col %0d frame %0d", column_addr, frame_addr); end
    repair(2, 41);
    pulse_resolved();
    repeat (2) @(posedge clk); #1;
    checks++;
    if (global_fault && !scan_en && column_addr == 6 && frame_addr == 41) ; else begin
      failures++; $display("FAIL second of two not reported: col %0d frame %0d en %b", column_addr, frame_addr, scan_en);
    end
    repair(6, 41);
    pulse_resolved();
    repeat (2) @(posedge clk); #1;
    checks++;
    if (!scan_en) begin failures++; $display("FAIL no restart after second repair"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
