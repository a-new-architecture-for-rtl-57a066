// tb_enable_controller: after reset the scan must start exactly two clocks later;
// a fault must drop Enable in the same clock; a Resolved pulse must hold it low for
// two more clocks; faults before settling are not genuine.
module tb_enable_controller;
  int checks = 0, failures = 0;
  logic clk = 0, rst, resolved, fault, enable, genuine_fault;

  always #5 clk = ~clk;

  enable_controller dut (.*);

  task automatic expect_en(input logic e, input logic g, input string what);
    #1;
    checks += 2;
    if (enable !== e)        begin failures++; $display("FAIL %s: enable=%b", what, enable); end
    if (genuine_fault !== g) begin failures++; $display("FAIL %s: genuine=%b", what, genuine_fault); end
  endtask

  initial begin
    rst = 1; resolved = 0; fault = 0;
    @(posedge clk); @(posedge clk); #1 rst = 0;
    expect_en(0, 0, "reset");
    @(posedge clk); expect_en(0, 0, "settle 1");
    fault = 1; #0 expect_en(0, 0, "fault while settling");
    fault = 0;
    @(posedge clk); expect_en(1, 0, "settled");
    repeat (5) begin @(posedge clk); expect_en(1, 0, "running"); end
    fault = 1; expect_en(0, 1, "fault stops scan");
    repeat (3) begin @(posedge clk); expect_en(0, 1, "fault held"); end
    fault = 0; resolved = 1; expect_en(0, 0, "resolved pulse");
    @(posedge clk); #1 resolved = 0; expect_en(0, 0, "after resolved 1");
    @(posedge clk); expect_en(0, 0, "after resolved 2");
    @(posedge clk); expect_en(1, 0, "restarted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
