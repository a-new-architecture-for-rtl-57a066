// tb_detection_block: random scan/load/parity sequences against a reference model
// of the two parity stores; FAULT must equal (latest scan parity XOR the one
// before), be cleared by a load and be held between scans.
module tb_detection_block;
  int checks = 0, failures = 0;
  logic clk = 0, rst, parity, scan, load, load_parity, fault;
  logic m_cur, m_prev;
  int   n_fault = 0;

  always #5 clk = ~clk;

  detection_block dut (.*);

  initial begin
    rst = 1; parity = 0; scan = 0; load = 0; load_parity = 0;
    m_cur = 0; m_prev = 0;
    @(posedge clk); #1 rst = 0;
    for (int t = 0; t < 2000; t++) begin
      parity      = logic'($urandom_range(0, 1));
      load_parity = logic'($urandom_range(0, 1));
      scan        = ($urandom_range(0, 2) != 0);
      load        = ($urandom_range(0, 9) == 0);
      @(posedge clk);
      if (load)      begin m_cur = load_parity; m_prev = load_parity; end
      else if (scan) begin m_prev = m_cur; m_cur = parity; end
      #1;
      checks++;
      if (fault !== (m_cur ^ m_prev)) begin
        failures++; $display("FAIL t=%0d fault=%b expected %b", t, fault, m_cur ^ m_prev);
      end
      if (fault) n_fault++;
    end
    checks++;
    if (n_fault == 0) begin failures++; $display("FAIL no fault ever raised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
