// aes_pkg: types, constants and GF(2^8) helper functions shared by the
// AES-128 datapath, the key scheduling unit and the S-box ROMs.
//
// Byte order follows the AES standard: byte 0 of a 128-bit block is the
// most significant byte (bits 127:120), and the state is filled column by
// column, so byte i sits in row i%4, column i/4.
//
// The S-box table is not read from a file. It is computed at elaboration
// time from its definition: the multiplicative inverse in GF(2^8) modulo
// x^8+x^4+x^3+x+1 (0x11B), followed by the affine map
// s = b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63.
// Entries 0..255 of the table are the encryption S-box, entries 256..511
// the decryption (inverse) S-box, as in one 8x512 block RAM.
package aes_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [127:0] block_t;
  typedef logic [31:0]  word_t;

  // Number of rounds for a 128-bit key (there are NR+1 round keys).
  localparam int unsigned NR       = 10;
  localparam int unsigned KIDX_W   = 4;

  // Operation mode: '0' encryption, '1' decryption.
  typedef enum logic {
    MODE_ENC = 1'b0,
    MODE_DEC = 1'b1
  } mode_e;

  typedef logic [KIDX_W-1:0] kidx_t;

  // Multiplication by x: shift left, then reduce by AND-ing 0x1B with the
  // outgoing bit and XOR-ing it in.
  function automatic byte_t xtime(byte_t b);
    return {b[6:0], 1'b0} ^ (8'h1B & {8{b[7]}});
  endfunction

  function automatic byte_t gf_mul(byte_t a, byte_t b);
    byte_t p;
    byte_t x;
    p = '0;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ x;
      x = xtime(x);
    end
    return p;
  endfunction

  // Inverse as a^254 (square and multiply); maps 0 to 0.
  function automatic byte_t gf_inv(byte_t a);
    byte_t r;
    byte_t sq;
    r  = 8'h01;
    sq = a;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gf_mul(r, sq);   // 254 = 0b11111110
      sq = gf_mul(sq, sq);
    end
    return r;
  endfunction

  function automatic byte_t rotl8(byte_t b, int unsigned n);
    return byte_t'((b << n) | (b >> (8 - n)));
  endfunction

  function automatic byte_t sbox_fwd(byte_t a);
    byte_t b;
    b = gf_inv(a);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  // 512-entry table: [0..255] forward S-box, [256..511] inverse S-box.
  function automatic logic [511:0][7:0] sbox_table();
    logic [511:0][7:0] t;
    byte_t s;
    t = '0;
    for (int a = 0; a < 256; a++) begin
      s = sbox_fwd(byte_t'(a));
      t[a]       = s;
      t[256 + s] = byte_t'(a);
    end
    return t;
  endfunction

  // Byte i of a block (byte 0 is the most significant).
  function automatic byte_t get_byte(block_t b, int unsigned i);
    return b[127 - 8*i -: 8];
  endfunction

endpackage
