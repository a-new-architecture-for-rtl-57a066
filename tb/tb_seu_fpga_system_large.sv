// tb_seu_fpga_system_large: the system with full-size columns (64 frames x 512-bit
// frames) but 64 instead of 256 columns, a 256 KiB bitstream; the default size takes
// about 16 minutes in Verilator. The controller configures all 4096 frames from
// the flash model; the testbench then checks a sample of frames by readback, injects
// a single upset and two upsets at one frame index, and checks detection within
// 65 clocks, the reported addresses, the repair and the restored contents.
module tb_seu_fpga_system_large;
  localparam int NF = 64, NC = 64, FB = 512, NB = FB / 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  logic [17:0] flash_a; logic flash_ce_n, flash_oe_n; logic [7:0] flash_d;
  logic done, global_fault, scan_en, resolved, ctrl_busy;
  logic [5:0] column_addr, readback_col, seu_col;
  logic [5:0] frame_addr, readback_frame, seu_frame;
  logic [15:0] repairs;
  logic [FB-1:0] readback_data;
  logic seu_flip; logic [8:0] seu_bit;
  longint cycles = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  flash_model #(.AW(18)) u_flash (.clk(clk), .a(flash_a), .ce_n(flash_ce_n), .oe_n(flash_oe_n), .d(flash_d));

  seu_fpga_system #(.NUM_COLS(NC)) dut (.*);

  function automatic logic [FB-1:0] flash_frame(input int c, input int f);
    logic [FB-1:0] v;
    for (int b = 0; b < NB; b++) v[8*b +: 8] = tb_flash_pkg::flash_byte(32'((c * NF + f) * NB + b));
    return v;
  endfunction

  task automatic check_frame(input int c, input int f, input string what);
    readback_col = 6'(c); readback_frame = 6'(f); #1;
    checks++;
    if (readback_data !== flash_frame(c, f)) begin failures++; $display("FAIL %s frame %0d/%0d", what, c, f); end
  endtask

  task automatic flip(input int c, input int f, input int b);
    seu_flip = 1; seu_col = 6'(c); seu_frame = 6'(f); seu_bit = 9'(b);
    @(posedge clk); #1 seu_flip = 0;
  endtask

  task automatic expect_repair(input int n, input int exp_col, input int exp_frame);
    int cyc = 0, r0 = int'(repairs);
    while (!global_fault && cyc < 1000) begin @(posedge clk); #1 cyc++; end
    checks += 3;
    if (!global_fault) begin failures++; $display("FAIL upset not detected"); return; end
    if (cyc > NF + 1) begin failures++; $display("FAIL detection after %0d clocks", cyc); end
    if (int'(column_addr) != exp_col || int'(frame_addr) != exp_frame) begin
      failures++; $display("FAIL reported %0d/%0d exp %0d/%0d", column_addr, frame_addr, exp_col, exp_frame);
    end
    cyc = 0;
    while (int'(repairs) < r0 + n && cyc < 2000) begin @(posedge clk); #1 cyc++; end
    $display("detected and repaired %0d frame(s), repair took %0d clocks", n, cyc);
    checks++;
    if (int'(repairs) != r0 + n) begin failures++; $display("FAIL repair not finished"); end
    repeat (8) @(posedge clk); #1;
    checks++;
    if (!scan_en || global_fault) begin failures++; $display("FAIL scan not resumed"); end
  endtask

  initial begin
    rst = 1; seu_flip = 0; seu_col = 0; seu_frame = 0; seu_bit = 0; readback_col = 0; readback_frame = 0;
    repeat (3) @(posedge clk); #1 rst = 0;
    while (!done) @(posedge clk);
    #1;
    $display("initial configuration done after %0d clocks", cycles);
    checks++;
    if (cycles > 64'(NC * NF * (NB + 6) + 100)) begin failures++; $display("FAIL configuration too slow"); end
    for (int i = 0; i < 200; i++) check_frame($urandom_range(0, NC - 1), $urandom_range(0, NF - 1), "configured");
    check_frame(0, 0, "configured");
    check_frame(NC - 1, NF - 1, "configured");
    repeat (2 * NF) @(posedge clk); #1;
    checks++;
    if (global_fault || !scan_en) begin failures++; $display("FAIL scan not running cleanly"); end
    flip(50, 37, 300);
    expect_repair(1, 50, 37);
    check_frame(50, 37, "repaired");
    flip(62, 5, 0);
    flip(17, 5, 511);
    expect_repair(2, 17, 5);
    check_frame(17, 5, "repaired");
    check_frame(62, 5, "repaired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
