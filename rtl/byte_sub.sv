// byte_sub: the BYTE_SUB transformation on a whole 128-bit block.
//
// All 16 bytes are substituted in parallel by 16 copies of sbox_rom, one
// 8x512 block RAM per byte, each holding both S-boxes. `inv` selects the
// decryption S-box. Because the ROMs have a registered read, the result
// appears on `dout` one clock cycle after `din` and `inv` are presented;
// the S-box ROMs are therefore also the state register of the round loop.
module byte_sub
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   inv,
  input  block_t din,
  output block_t dout
);

  for (genvar i = 0; i < 16; i++) begin : g_sbox
    sbox_rom u_rom (
      .clk  (clk),
      .addr ({inv, din[127-8*i -: 8]}),
      .dout (dout[127-8*i -: 8])
    );
  end

endmodule
