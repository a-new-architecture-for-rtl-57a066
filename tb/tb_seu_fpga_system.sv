// tb_seu_fpga_system: end-to-end run of the FPGA and its partial-reconfiguration
// controller with a flash model, at 8 columns x 16 frames x 64-bit frames.
// After the controller's initial configuration it injects upsets: single bit flips
// in random frames, flips in two columns at the same frame index, and double flips
// in one frame (not detectable by parity, then exposed by a third flip). For every
// event it checks the detection latency (at most NUM_FRAMES+1 clocks), that the
// scan froze, that the controller repaired the frame, and finally that every frame
// reads back as the flash holds it. Each mechanism is counted and must occur.
module tb_seu_fpga_system;
  localparam int NF = 16, NC = 8, FB = 64, NB = FB / 8, AW = 10;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  logic [AW-1:0] flash_a; logic flash_ce_n, flash_oe_n; logic [7:0] flash_d;
  logic done, global_fault, scan_en, resolved, ctrl_busy;
  logic [2:0] column_addr, readback_col, seu_col;
  logic [3:0] frame_addr, readback_frame, seu_frame;
  logic [15:0] repairs;
  logic [FB-1:0] readback_data;
  logic seu_flip; logic [5:0] seu_bit;

  // mechanism counters
  int n_config = 0, n_sweeps = 0, n_detect = 0, n_freeze = 0, n_resolved = 0;
  int n_multi = 0, n_even_masked = 0;

  always #5 clk = ~clk;

  flash_model #(.AW(AW)) u_flash (.clk(clk), .a(flash_a), .ce_n(flash_ce_n), .oe_n(flash_oe_n), .d(flash_d));

  seu_fpga_system #(.NUM_FRAMES(NF), .NUM_COLS(NC), .FRAME_BITS(FB)) dut (.*);

  always @(posedge clk) if (!rst) begin
    if (dut.u_fpga.cfg_we) n_config++;
    if (scan_en && frame_addr == 4'(NF - 1) && dut.u_fpga.u_detect.u_counter.count == 0) n_sweeps++;
    if (resolved) n_resolved++;
  end

  function automatic logic [FB-1:0] flash_frame(input int c, input int f);
    logic [FB-1:0] v;
    for (int b = 0; b < NB; b++) v[8*b +: 8] = tb_flash_pkg::flash_byte(32'((c * NF + f) * NB + b));
    return v;
  endfunction

  task automatic flip(input int c, input int f, input int b);
    seu_flip = 1; seu_col = 3'(c); seu_frame = 4'(f); seu_bit = 6'(b);
    @(posedge clk); #1 seu_flip = 0;
  endtask

  // Wait for a fault, check latency and freeze, then wait for `n` repairs.
  task automatic expect_repair(input int n, input int exp_col, input int exp_frame);
    int cyc = 0, r0 = int'(repairs);
    while (!global_fault && cyc < 10 * NF) begin @(posedge clk); #1 cyc++; end
    checks += 3;
    if (!global_fault) begin failures++; $display("FAIL upset not detected"); return; end
    n_detect++;
    if (cyc > NF + 1) begin failures++; $display("FAIL detection after %0d clocks", cyc); end
    if (int'(column_addr) != exp_col || int'(frame_addr) != exp_frame) begin
      failures++; $display("FAIL reported %0d/%0d exp %0d/%0d", column_addr, frame_addr, exp_col, exp_frame);
    end
    @(posedge clk); #1;
    if (!scan_en) n_freeze++; else begin failures++; $display("FAIL scan not frozen"); end
    cyc = 0;
    while (int'(repairs) < r0 + n && cyc < 1000) begin @(posedge clk); #1 cyc++; end
    checks++;
    if (int'(repairs) != r0 + n) begin failures++; $display("FAIL repair not finished"); end
    repeat (8) @(posedge clk); #1;
    checks++;
    if (!scan_en || global_fault) begin failures++; $display("FAIL scan not resumed"); end
  endtask

  task automatic check_all(input string what);
    for (int c = 0; c < NC; c++)
      for (int f = 0; f < NF; f++) begin
        readback_col = 3'(c); readback_frame = 4'(f); #1;
        checks++;
        if (readback_data !== flash_frame(c, f)) begin failures++; $display("FAIL %s frame %0d/%0d", what, c, f); end
      end
  endtask

  initial begin
    rst = 1; seu_flip = 0; seu_col = 0; seu_frame = 0; seu_bit = 0; readback_col = 0; readback_frame = 0;
    repeat (3) @(posedge clk); #1 rst = 0;
    while (!done) @(posedge clk);
    #1;
    checks += 2;
    if (n_config != NC * NF) begin failures++; $display("FAIL %0d frames configured", n_config); end
    if (repairs != 0) begin failures++; $display("FAIL repairs during configuration"); end
    check_all("configured");
    repeat (3 * NF) @(posedge clk); #1;
    checks++;
    if (global_fault) begin failures++; $display("FAIL false fault after configuration"); end
    // single upsets
    for (int t = 0; t < 20; t++) begin
      int c = $urandom_range(0, NC - 1), f = $urandom_range(0, NF - 1);
      repeat ($urandom_range(0, NF)) @(posedge clk);
      #1 flip(c, f, $urandom_range(0, FB - 1));
      expect_repair(1, c, f);
    end
    // two columns upset at the same frame index: lowest column first, then the other
    for (int t = 0; t < 4; t++) begin
      int c1 = $urandom_range(0, NC / 2 - 1), c2 = $urandom_range(NC / 2, NC - 1), f = $urandom_range(0, NF - 1);
      flip(c2, f, $urandom_range(0, FB - 1));
      flip(c1, f, $urandom_range(0, FB - 1));
      expect_repair(2, c1, f);
      n_multi++;
    end
    // an even number of flips in one frame is invisible to parity
    for (int t = 0; t < 2; t++) begin
      int c = $urandom_range(0, NC - 1), f = $urandom_range(0, NF - 1);
      flip(c, f, 1);
      flip(c, f, 2);
      repeat (3 * NF) @(posedge clk); #1;
      checks++;
      if (!global_fault) n_even_masked++; else begin failures++; $display("FAIL even flips flagged"); end
      flip(c, f, 3);
      expect_repair(1, c, f);
    end
    check_all("after repairs");
    // every mechanism must have happened
    checks += 7;
    if (n_config == 0)      begin failures++; $display("FAIL no configuration"); end
    if (n_sweeps == 0)      begin failures++; $display("FAIL no full sweep"); end
    if (n_detect == 0)      begin failures++; $display("FAIL no detection"); end
    if (n_freeze == 0)      begin failures++; $display("FAIL no freeze"); end
    if (n_resolved == 0)    begin failures++; $display("FAIL no resolved"); end
    if (n_multi == 0)       begin failures++; $display("FAIL no multi-column fault"); end
    if (n_even_masked == 0) begin failures++; $display("FAIL no even-flip case"); end
    $display("mechanisms: frames_written=%0d sweeps=%0d detections=%0d freezes=%0d resolved=%0d multi_column=%0d even_masked=%0d repairs=%0d",
             n_config, n_sweeps, n_detect, n_freeze, n_resolved, n_multi, n_even_masked, repairs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
