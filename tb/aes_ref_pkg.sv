// aes_ref_pkg: a plain behavioural AES-128 model used by the testbenches to
// work out expected values. It is written independently of the RTL: the
// S-box is found by searching for each byte's GF(2^8) inverse, MixColumn is
// a matrix product with a generic GF multiply, and encryption/decryption
// follow the cipher and inverse cipher of the AES standard step by step.
package aes_ref_pkg;

  typedef logic [7:0] rbyte_t;
  typedef rbyte_t state_t [16];
  typedef logic [10:0][127:0] rkeys_t;   // [i] = round key i

  function automatic rbyte_t ref_gmul(rbyte_t a, rbyte_t b);
    logic [15:0] acc;
    acc = '0;
    for (int i = 0; i < 8; i++) if (b[i]) acc ^= (16'(a) << i);
    for (int i = 15; i >= 8; i--) if (acc[i]) acc ^= (16'h11B << (i - 8));
    return acc[7:0];
  endfunction

  function automatic rbyte_t ref_sbox(rbyte_t a);
    rbyte_t inv, s;
    inv = 8'h00;
    for (int b = 1; b < 256; b++) if (ref_gmul(a, rbyte_t'(b)) == 8'h01) inv = rbyte_t'(b);
    for (int i = 0; i < 8; i++)
      s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8] ^ (8'h63 >> i);
    return s;
  endfunction

  function automatic rbyte_t ref_inv_sbox(rbyte_t a);
    for (int b = 0; b < 256; b++) if (ref_sbox(rbyte_t'(b)) == a) return rbyte_t'(b);
    return 8'h00;
  endfunction

  function automatic state_t to_state(logic [127:0] b);
    state_t s;
    for (int i = 0; i < 16; i++) s[i] = b[127-8*i -: 8];
    return s;
  endfunction

  function automatic logic [127:0] from_state(state_t s);
    logic [127:0] b;
    for (int i = 0; i < 16; i++) b[127-8*i -: 8] = s[i];
    return b;
  endfunction

  // Tables filled once by init(), so the searches above run only 512 times.
  rbyte_t SB  [256];
  rbyte_t ISB [256];
  bit     ready = 0;

  function automatic void init();
    if (ready) return;
    for (int a = 0; a < 256; a++) SB[a] = ref_sbox(rbyte_t'(a));
    for (int a = 0; a < 256; a++) ISB[SB[a]] = rbyte_t'(a);
    ready = 1;
  endfunction

  function automatic logic [127:0] sub_bytes(logic [127:0] b, bit inv);
    state_t s;
    s = to_state(b);
    for (int i = 0; i < 16; i++) s[i] = inv ? ISB[s[i]] : SB[s[i]];
    return from_state(s);
  endfunction

  function automatic logic [127:0] shift_rows(logic [127:0] b, bit inv);
    state_t s, o;
    s = to_state(b);
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        if (!inv) o[4*c+r] = s[4*((c+r)%4)+r];
        else      o[4*((c+r)%4)+r] = s[4*c+r];
    return from_state(o);
  endfunction

  function automatic logic [127:0] mix_columns(logic [127:0] b, bit inv);
    rbyte_t m [4][4];
    state_t s, o;
    rbyte_t fr [4] = '{8'h02, 8'h03, 8'h01, 8'h01};
    rbyte_t ir [4] = '{8'h0E, 8'h0B, 8'h0D, 8'h09};
    for (int r = 0; r < 4; r++)
      for (int j = 0; j < 4; j++) m[r][j] = inv ? ir[(j-r+4)%4] : fr[(j-r+4)%4];
    s = to_state(b);
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        o[4*c+r] = 8'h00;
        for (int j = 0; j < 4; j++) o[4*c+r] ^= ref_gmul(m[r][j], s[4*c+j]);
      end
    return from_state(o);
  endfunction

  function automatic rkeys_t key_expand(logic [127:0] key);
    logic [31:0] w [44];
    logic [31:0] t;
    rbyte_t rc;
    rkeys_t k;
    init();
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    rc = 8'h01;
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {SB[t[31:24]], SB[t[23:16]], SB[t[15:8]], SB[t[7:0]]} ^ {rc, 24'h0};
        rc = ref_gmul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) k[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return k;
  endfunction

  function automatic logic [127:0] encrypt(rkeys_t k, logic [127:0] pt);
    logic [127:0] s;
    init();
    s = pt ^ k[0];
    for (int r = 1; r <= 10; r++) begin
      s = shift_rows(sub_bytes(s, 0), 0);
      if (r != 10) s = mix_columns(s, 0);
      s = s ^ k[r];
    end
    return s;
  endfunction

  function automatic logic [127:0] decrypt(rkeys_t k, logic [127:0] ct);
    logic [127:0] s;
    init();
    s = ct ^ k[10];
    for (int r = 9; r >= 0; r--) begin
      s = sub_bytes(shift_rows(s, 1), 1);
      s = s ^ k[r];
      if (r != 0) s = mix_columns(s, 1);
    end
    return s;
  endfunction

endpackage
