// tb_scan_counter: random enable pattern against a reference count; checks the
// wrap from 63 to 0, holding while disabled, and that frame_addr is the count of
// the last enabled step.
module tb_scan_counter;
  int checks = 0, failures = 0, wraps = 0;
  logic clk = 0, rst, enable;
  logic [5:0] count, frame_addr;
  int m_count, m_frame;

  always #5 clk = ~clk;

  scan_counter dut (.*);

  initial begin
    rst = 1; enable = 0; m_count = 0; m_frame = 0;
    @(posedge clk); #1 rst = 0;
    for (int t = 0; t < 1000; t++) begin
      enable = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (enable) begin
        m_frame = m_count;
        if (m_count == 63) wraps++;
        m_count = (m_count + 1) % 64;
      end
      #1;
      checks += 2;
      if (int'(count) != m_count)      begin failures++; $display("FAIL count %0d exp %0d", count, m_count); end
      if (int'(frame_addr) != m_frame) begin failures++; $display("FAIL frame %0d exp %0d", frame_addr, m_frame); end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL no wrap"); end
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
