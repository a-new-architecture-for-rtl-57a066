// tb_frame_decoder: every address of the 6-to-64 decoder must raise exactly its own line.
module tb_frame_decoder;
  int checks = 0, failures = 0;
  logic [5:0]  addr;
  logic [63:0] sel;

  frame_decoder dut (.addr(addr), .sel(sel));

  initial begin
    for (int a = 0; a < 64; a++) begin
      addr = 6'(a);
      #1;
      checks++;
      if (sel !== (64'(1) << a)) begin failures++; $display("FAIL addr=%0d sel=%h", a, sel); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
