// tb_column_encoder: one-hot and multi-fault vectors on 256 lines; the address must
// be the lowest faulting column and valid the OR of all lines.
module tb_column_encoder;
  int checks = 0, failures = 0;
  logic [255:0] fault;
  logic [7:0]   addr;
  logic         valid;

  column_encoder dut (.fault(fault), .addr(addr), .valid(valid));

  task automatic check();
    int lowest = 0;
    #1;
    for (int i = 255; i >= 0; i--) if (fault[i]) lowest = i;
    checks += 2;
    if (valid !== (fault != '0)) begin failures++; $display("FAIL valid"); end
    if (fault != '0 && int'(addr) != lowest) begin failures++; $display("FAIL addr %0d exp %0d", addr, lowest); end
  endtask

  initial begin
    fault = '0; check();
    for (int i = 0; i < 256; i++) begin fault = 256'(1) << i; check(); end
    for (int t = 0; t < 300; t++) begin
      fault = '0;
      repeat ($urandom_range(1, 4)) fault[$urandom_range(0, 255)] = 1'b1;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
