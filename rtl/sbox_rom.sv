// sbox_rom: one 8x512 synchronous ROM holding both S-boxes, the way one
// Virtex Block SelectRAM+ is configured for the BYTE_SUB transformation.
//
// Address bit 8 selects the table: 0 gives the encryption S-box, 1 the
// decryption (inverse) S-box; bits 7:0 are the byte to substitute. The read
// is registered like a block RAM: the address presented before a rising
// clock edge appears on `dout` after that edge (one cycle of latency). The
// register is not reset; it holds whatever was last read.
//
// The contents are computed at elaboration from the S-box definition (see
// aes_pkg::sbox_table), so no initialisation file is needed.
module sbox_rom
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic [8:0] addr,
  output byte_t      dout
);

  localparam logic [511:0][7:0] TABLE = sbox_table();

  always_ff @(posedge clk) begin
    dout <= TABLE[addr];
  end

endmodule
