// tb_config_column: 64 x 512 column. Writes random frames through port 1 and reads
// them back; scans every frame through port 2 (no fault); then upsets one bit,
// scans and expects the column fault one clock after the upset frame's scan step;
// a double upset in one frame must not raise it; a port-1 rewrite clears the fault.
module tb_config_column;
  localparam int NF = 64, FB = 512;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  logic p1_we; logic [5:0] p1_addr; logic [FB-1:0] p1_wdata, p1_rdata;
  logic [NF-1:0] scan_sel; logic scan_en;
  logic seu_flip; logic [5:0] seu_frame; logic [8:0] seu_bit;
  logic col_fault;
  logic [FB-1:0] shadow [NF];

  always #5 clk = ~clk;

  config_column dut (.*);

  function automatic logic [FB-1:0] rnd_frame();
    logic [FB-1:0] v;
    for (int w = 0; w < FB / 32; w++) v[32*w +: 32] = $urandom;
    return v;
  endfunction

  task automatic write_frame(input int f, input logic [FB-1:0] v);
    p1_we = 1; p1_addr = 6'(f); p1_wdata = v;
    @(posedge clk); #1 p1_we = 0;
    shadow[f] = v;
  endtask

  // One scan step of frame f; returns col_fault seen the clock after.
  task automatic scan_frame(input int f, output logic flt);
    scan_sel = NF'(1) << f; scan_en = 1;
    @(posedge clk); #1 scan_en = 0; scan_sel = '0;
    flt = col_fault;
  endtask

  logic flt;

  initial begin
    rst = 1; p1_we = 0; p1_addr = 0; p1_wdata = '0; scan_sel = '0; scan_en = 0;
    seu_flip = 0; seu_frame = 0; seu_bit = 0;
    @(posedge clk); #1 rst = 0;
    for (int f = 0; f < NF; f++) write_frame(f, rnd_frame());
    checks++;
    if (col_fault !== 1'b0) begin failures++; $display("FAIL fault after configuration"); end
    for (int f = 0; f < NF; f++) begin
      p1_addr = 6'(f); #1;
      checks++;
      if (p1_rdata !== shadow[f]) begin failures++; $display("FAIL readback frame %0d", f); end
    end
    // two clean sweeps
    for (int s = 0; s < 2; s++)
      for (int f = 0; f < NF; f++) begin
        scan_frame(f, flt);
        checks++;
        if (flt !== 1'b0) begin failures++; $display("FAIL clean scan frame %0d", f); end
      end
    // single upsets in random frames
    for (int t = 0; t < 20; t++) begin
      int f = $urandom_range(0, NF - 1);
      int b = $urandom_range(0, FB - 1);
      seu_flip = 1; seu_frame = 6'(f); seu_bit = 9'(b);
      @(posedge clk); #1 seu_flip = 0;
      shadow[f][b] = ~shadow[f][b];
      p1_addr = 6'(f); #1;
      checks++;
      if (p1_rdata !== shadow[f]) begin failures++; $display("FAIL upset not stored"); end
      if (f > 0) begin
        scan_frame(f - 1, flt);
        checks++;
        if (flt !== 1'b0) begin failures++; $display("FAIL neighbour frame flagged"); end
      end
      scan_frame(f, flt);
      checks++;
      if (flt !== 1'b1) begin failures++; $display("FAIL upset in frame %0d bit %0d not detected", f, b); end
      // fault holds until the frame is rewritten
      repeat (3) @(posedge clk);
      #1 checks++;
      if (col_fault !== 1'b1) begin failures++; $display("FAIL fault not held"); end
      write_frame(f, rnd_frame());
      checks++;
      if (col_fault !== 1'b0) begin failures++; $display("FAIL rewrite did not clear the fault"); end
      scan_frame(f, flt);
      checks++;
      if (flt !== 1'b0) begin failures++; $display("FAIL false fault after rewrite"); end
    end
    // an even number of flips in one frame leaves the parity unchanged
    seu_flip = 1; seu_frame = 6'd5; seu_bit = 9'd3;
    @(posedge clk); #1 seu_bit = 9'd400;
    @(posedge clk); #1 seu_flip = 0;
    scan_frame(5, flt);
    checks++;
    if (flt !== 1'b0) begin failures++; $display("FAIL double flip flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
