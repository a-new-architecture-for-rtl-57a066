// tb_pr_controller: 4 columns x 4 frames x 32-bit frames. A behavioural device model
// on the SelectMAP bus records frame writes and answers the status ports. Checks
// that start-up configures every frame with the flash contents, that RECOVERED
// follows, that an idle controller only polls, and that a reported fault leads to a
// copy of exactly that frame followed by RECOVERED.
module tb_pr_controller;
  import seu_pkg::*;
  localparam int NF = 4, NC = 4, FB = 32, NB = FB / 8, AW = 6;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  logic [AW-1:0] flash_a; logic flash_ce_n, flash_oe_n; logic [7:0] flash_d;
  logic smap_cs, smap_write; smap_port_e smap_port; logic [7:0] smap_dout, smap_din;
  logic busy, init_done; logic [15:0] repairs;

  // device model state
  logic [7:0] dev_col, dev_frame; int byte_i;
  logic [FB-1:0] dev_mem [NC][NF];
  int writes [NC][NF];
  int recovered = 0;
  logic dev_fault; logic [7:0] dev_fcol, dev_fframe;

  always #5 clk = ~clk;

  flash_model #(.AW(AW)) u_flash (.clk(clk), .a(flash_a), .ce_n(flash_ce_n), .oe_n(flash_oe_n), .d(flash_d));

  pr_controller #(.NUM_FRAMES(NF), .NUM_COLS(NC), .FRAME_BITS(FB)) dut (.*);

  always_comb begin
    smap_din = '0;
    if (smap_cs && !smap_write)
      case (smap_port)
        PORT_GLOBAL_FAULT:   smap_din = 8'(dev_fault);
        PORT_COLUMN_ADDRESS: smap_din = dev_fcol;
        PORT_FRAME_ADDRESS:  smap_din = dev_fframe;
        default:             smap_din = 8'(recovered != 0);
      endcase
  end

  always @(posedge clk) if (!rst && smap_cs && smap_write) begin
    case (smap_port)
      PORT_COLUMN_ADDRESS: dev_col = smap_dout;
      PORT_FRAME_ADDRESS: begin dev_frame = smap_dout; byte_i = 0; end
      PORT_GLOBAL_FAULT: begin
        dev_mem[dev_col][dev_frame][8*byte_i +: 8] = smap_dout;
        byte_i++;
        if (byte_i == NB) writes[dev_col][dev_frame]++;
      end
      PORT_RECOVERED: begin recovered++; dev_fault = 0; end
    endcase
  end

  function automatic logic [FB-1:0] flash_frame(input int c, input int f);
    logic [FB-1:0] v;
    for (int b = 0; b < NB; b++) v[8*b +: 8] = tb_flash_pkg::flash_byte(32'((c * NF + f) * NB + b));
    return v;
  endfunction

  int t0;

  initial begin
    rst = 1; dev_fault = 0; dev_fcol = 0; dev_fframe = 0; byte_i = 0; dev_col = 0; dev_frame = 0;
    foreach (writes[c, f]) begin writes[c][f] = 0; dev_mem[c][f] = '0; end
    repeat (2) @(posedge clk); #1 rst = 0;
    while (recovered == 0) @(posedge clk);
    #1;
    checks++;
    if (!init_done) begin failures++; $display("FAIL init_done"); end
    foreach (writes[c, f]) begin
      checks += 2;
      if (writes[c][f] != 1) begin failures++; $display("FAIL frame %0d/%0d written %0d times", c, f, writes[c][f]); end
      if (dev_mem[c][f] !== flash_frame(c, f)) begin failures++; $display("FAIL frame %0d/%0d contents", c, f); end
    end
    repeat (50) @(posedge clk); #1;
    checks += 2;
    if (busy) begin failures++; $display("FAIL busy while idle"); end
    if (recovered != 1) begin failures++; $display("FAIL extra RECOVERED"); end
    // corrupt frame 2/1 in the model and report it
    for (int r = 0; r < 3; r++) begin
      int c = (r == 0) ? 2 : $urandom_range(0, NC - 1);
      int f = (r == 0) ? 1 : $urandom_range(0, NF - 1);
      dev_mem[c][f] = ~dev_mem[c][f];
      dev_fcol = 8'(c); dev_fframe = 8'(f); dev_fault = 1;
      t0 = recovered;
      while (recovered == t0) @(posedge clk);
      #1;
      checks += 3;
      if (dev_mem[c][f] !== flash_frame(c, f)) begin failures++; $display("FAIL repair contents"); end
      if (writes[c][f] != 2 + (r != 0 && c == 2 && f == 1 ? 1 : 0) && r == 0) begin failures++; $display("FAIL repair count"); end
      if (repairs != 16'(r + 1)) begin failures++; $display("FAIL repairs counter %0d", repairs); end
    end
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
