// shift_row: forward and inverse SHIFT_ROW on a 128-bit block, followed by
// the multiplexer that picks one of them.
//
// Both transforms are pure wiring: row r of the 4x4 byte state is rotated
// by r positions, to the left for encryption (inv = 0) and to the right for
// decryption (inv = 1). With byte i in row i%4 and column i/4, forward
// output byte (r,c) takes input byte (r,(c+r)%4); inverse output byte (r,c)
// takes input byte (r,(c-r)%4). Purely combinational.
module shift_row
  import aes_pkg::*;
(
  input  logic   inv,
  input  block_t din,
  output block_t dout
);

  block_t fwd;
  block_t bwd;

  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      assign fwd[127-8*(4*c+r) -: 8] = din[127-8*(4*((c+r)%4)+r) -: 8];
      assign bwd[127-8*(4*c+r) -: 8] = din[127-8*(4*((c+4-r)%4)+r) -: 8];
    end
  end

  assign dout = inv ? bwd : fwd;

endmodule
