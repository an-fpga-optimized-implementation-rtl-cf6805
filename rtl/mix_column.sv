// mix_column: forward and inverse MIX_COLUMN on a 128-bit block, with the
// bypass used in the round that omits it, and with the pipeline registers
// of the IMix_Reg_1/2/3 variants.
//
// Each of the 16 bytes goes through one mul_byte, which gives its products
// with the four coefficients of c(x) = 03x^3+01x^2+01x+02 (encryption) or
// d(x) = 0Bx^3+0Dx^2+09x+0E (decryption). Output byte (r,c) is the XOR of
// the products of the four bytes of column c, byte (j,c) contributing its
// product with coefficient (j-r) mod 4. When `en` is low the block is
// passed through unchanged (the MixColumn stage is skipped).
//
// IMIX_REGS sets the pipelining and hence the latency in clock cycles:
//   1  register on the output only                    (IMix_Reg_1)
//   2  registers on the input and the output          (IMix_Reg_2)
//   3  input, output, and a register between the
//      multipliers and the XOR trees                  (IMix_Reg_3, default)
// `inv` and `en` travel through the same registers as the data, so every
// block in the pipeline is processed with its own controls. Registers are
// not reset; they only carry data.
module mix_column
  import aes_pkg::*;
#(
  parameter int unsigned IMIX_REGS = 3
) (
  input  logic   clk,
  input  logic   inv,
  input  logic   en,
  input  block_t din,
  output block_t dout
);

  if (IMIX_REGS < 1 || IMIX_REGS > 3) begin : g_bad_param
    $error("mix_column: IMIX_REGS must be 1, 2 or 3");
  end

  // Stage A: optional input register.
  block_t a_d;
  logic   a_inv, a_en;

  if (IMIX_REGS >= 2) begin : g_in_reg
    always_ff @(posedge clk) begin
      a_d   <= din;
      a_inv <= inv;
      a_en  <= en;
    end
  end else begin : g_in_wire
    assign a_d   = din;
    assign a_inv = inv;
    assign a_en  = en;
  end

  // Multiply-Byte blocks, one per state byte.
  logic [15:0][3:0][7:0] prod;

  for (genvar i = 0; i < 16; i++) begin : g_mul
    mul_byte u_mul (
      .inv  (a_inv),
      .b    (a_d[127-8*i -: 8]),
      .prod (prod[i])
    );
  end

  // Stage B: optional internal register between multipliers and XOR trees.
  logic [15:0][3:0][7:0] b_prod;
  block_t b_d;
  logic   b_en;

  if (IMIX_REGS >= 3) begin : g_mid_reg
    always_ff @(posedge clk) begin
      b_prod <= prod;
      b_d    <= a_d;
      b_en   <= a_en;
    end
  end else begin : g_mid_wire
    assign b_prod = prod;
    assign b_d    = a_d;
    assign b_en   = a_en;
  end

  // XOR trees: output byte (r,c) = XOR over j of prod[(j,c)][(j-r) mod 4].
  block_t mixed;

  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      assign mixed[127-8*(4*c+r) -: 8] =
          b_prod[4*c+0][(0+4-r)%4] ^ b_prod[4*c+1][(1+4-r)%4] ^
          b_prod[4*c+2][(2+4-r)%4] ^ b_prod[4*c+3][(3+4-r)%4];
    end
  end

  // Output register (present in every variant), with the bypass mux.
  always_ff @(posedge clk) begin
    dout <= b_en ? mixed : b_d;
  end

endmodule
