// mul_byte: the "Multiply-Byte" block of the MIX_COLUMN unit.
//
// It multiplies one state byte b by the four coefficients of the MixColumn
// polynomial in GF(2^8). First b*1, b*x, b*x^2 and b*x^3 are formed by
// repeated shift-and-reduce (shift left, AND the outgoing bit with 0x1B,
// XOR); the coefficient products are XORs of these. A multiplexer then
// picks the forward set {02,03,01,01} (inv = 0) or the inverse set
// {0E,0B,0D,09} (inv = 1). prod[k] is b times coefficient k, where
// coefficient k multiplies the byte k rows below the output row.
// Purely combinational.
module mul_byte
  import aes_pkg::*;
(
  input  logic           inv,
  input  byte_t          b,
  output logic [3:0][7:0] prod
);

  byte_t p1, p2, p4, p8;

  assign p1 = b;
  assign p2 = {p1[6:0], 1'b0} ^ (8'h1B & {8{p1[7]}});
  assign p4 = {p2[6:0], 1'b0} ^ (8'h1B & {8{p2[7]}});
  assign p8 = {p4[6:0], 1'b0} ^ (8'h1B & {8{p4[7]}});

  always_comb begin
    if (inv) begin
      prod[0] = p8 ^ p4 ^ p2;   // 0E
      prod[1] = p8 ^ p2 ^ p1;   // 0B
      prod[2] = p8 ^ p4 ^ p1;   // 0D
      prod[3] = p8 ^ p1;        // 09
    end else begin
      prod[0] = p2;             // 02
      prod[1] = p2 ^ p1;        // 03
      prod[2] = p1;             // 01
      prod[3] = p1;             // 01
    end
  end

endmodule
