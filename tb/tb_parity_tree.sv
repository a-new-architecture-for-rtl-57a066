// tb_parity_tree: checks the XOR tree at the default 512-bit width and at an odd
// width (37) against a bit-by-bit count of ones, on random and corner vectors.
module tb_parity_tree;
  int checks = 0, failures = 0;
  logic [511:0] d512;
  logic [36:0]  d37;
  logic         p512, p37;

  parity_tree                u_512 (.data(d512), .parity(p512));
  parity_tree #(.WIDTH(37))  u_37  (.data(d37),  .parity(p37));

  function automatic logic ref_parity(input logic [511:0] v, input int n);
    int ones = 0;
    for (int i = 0; i < n; i++) ones += int'(v[i]);
    return logic'(ones % 2);
  endfunction

  task automatic check();
    #1;
    checks += 2;
    if (p512 !== ref_parity(d512, 512)) begin failures++; $display("FAIL 512-bit %h", d512); end
    if (p37  !== ref_parity(512'(d37), 37)) begin failures++; $display("FAIL 37-bit %h", d37); end
  endtask

  initial begin
    d512 = '0; d37 = '0; check();
    d512 = '1; d37 = '1; check();
    for (int i = 0; i < 512; i++) begin
      d512 = 512'(1) << i; d37 = 37'(1) << (i % 37); check();
    end
    for (int t = 0; t < 500; t++) begin
      for (int w = 0; w < 16; w++) d512[32*w +: 32] = $urandom;
      d37 = {5'($urandom), 32'($urandom)};
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
