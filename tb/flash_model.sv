// flash_model: behavioural model of the parallel flash/EPROM that holds the original
// configuration bitstream. With CE and OE low it returns, one clock after the
// address, the byte tb_flash_pkg::flash_byte(a); the contents are generated, not
// stored. For testbenches only.
module flash_model #(
  parameter int unsigned AW = 20
) (
  input  logic          clk,
  input  logic [AW-1:0] a,
  input  logic          ce_n,
  input  logic          oe_n,
  output logic [7:0]    d
);
  initial d = '0;
  always @(posedge clk) if (!ce_n && !oe_n) d <= tb_flash_pkg::flash_byte(32'(a));
endmodule
