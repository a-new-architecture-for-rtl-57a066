// tb_flash_pkg: contents of the simulated configuration flash. The byte at address a
// is a mix of its address bits, so that every frame of the bitstream differs;
// testbenches use the same function to predict what the device must hold.
package tb_flash_pkg;
  function automatic logic [7:0] flash_byte(input logic [31:0] addr);
    logic [31:0] h;
    h = addr * 32'h9E37_79B1;
    return h[31:24] ^ h[15:8] ^ addr[7:0];
  endfunction
endpackage
