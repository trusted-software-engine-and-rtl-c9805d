// aes_model_pkg: reference AES-128 (FIPS-197) for the testbenches.
//
// Plain behavioural functions, not hardware: aes128_encrypt and
// aes128_decrypt take and return 128-bit blocks with the first byte of the
// block in bits 127:120, as the standard writes them. The S-box is computed
// rather than tabulated: the multiplicative inverse in GF(2^8) (modulus
// x^8+x^4+x^3+x+1) followed by the affine map b ^ rotl(b,1) ^ rotl(b,2) ^
// rotl(b,3) ^ rotl(b,4) ^ 0x63.
package aes_model_pkg;

  function automatic logic [7:0] xtime(logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1B : 8'h00);
  endfunction

  function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p = 8'h00;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = xtime(a);
    end
    return p;
  endfunction

  function automatic logic [7:0] rotl8(logic [7:0] v, int n);
    return (v << n) | (v >> (8 - n));
  endfunction

  function automatic logic [7:0] sbox(logic [7:0] x);
    logic [7:0] inv = 8'h01;
    // x^254 = x^-1 (and 0 -> 0)
    for (int i = 0; i < 254; i++) inv = gmul(inv, x);
    if (x == 8'h00) inv = 8'h00;
    return inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
  endfunction

  logic [7:0] sb_t  [256];
  logic [7:0] isb_t [256];
  bit         tables_ready = 1'b0;

  function automatic void build_tables();
    if (tables_ready) return;
    for (int i = 0; i < 256; i++) begin
      sb_t[i] = sbox(8'(i));
      isb_t[sb_t[i]] = 8'(i);
    end
    tables_ready = 1'b1;
  endfunction

  typedef logic [7:0] state_t [16];
  typedef logic [31:0] words_t [44];

  function automatic words_t expand(logic [127:0] key);
    words_t w;
    logic [31:0] t;
    logic [7:0]  rcon = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sb_t[t[31:24]], sb_t[t[23:16]], sb_t[t[15:8]], sb_t[t[7:0]]} ^ {rcon, 24'h0};
        rcon = xtime(rcon);
      end
      w[i] = w[i-4] ^ t;
    end
    return w;
  endfunction

  function automatic void add_rk(ref state_t s, input words_t w, input int r);
    for (int c = 0; c < 4; c++)
      for (int b = 0; b < 4; b++) s[4*c + b] ^= w[4*r + c][31 - 8*b -: 8];
  endfunction

  function automatic logic [127:0] aes128_encrypt(logic [127:0] key, logic [127:0] pt);
    state_t s, t;
    words_t w;
    logic [127:0] out;
    build_tables();
    w = expand(key);
    for (int i = 0; i < 16; i++) s[i] = pt[127 - 8*i -: 8];
    add_rk(s, w, 0);
    for (int r = 1; r <= 10; r++) begin
      for (int i = 0; i < 16; i++) s[i] = sb_t[s[i]];
      for (int c = 0; c < 4; c++)
        for (int b = 0; b < 4; b++) t[b + 4*c] = s[b + 4*((c + b) % 4)];
      s = t;
      if (r != 10) begin
        for (int c = 0; c < 4; c++) begin
          logic [7:0] a0, a1, a2, a3;
          a0 = s[4*c]; a1 = s[4*c+1]; a2 = s[4*c+2]; a3 = s[4*c+3];
          s[4*c]   = gmul(a0,2) ^ gmul(a1,3) ^ a2 ^ a3;
          s[4*c+1] = a0 ^ gmul(a1,2) ^ gmul(a2,3) ^ a3;
          s[4*c+2] = a0 ^ a1 ^ gmul(a2,2) ^ gmul(a3,3);
          s[4*c+3] = gmul(a0,3) ^ a1 ^ a2 ^ gmul(a3,2);
        end
      end
      add_rk(s, w, r);
    end
    for (int i = 0; i < 16; i++) out[127 - 8*i -: 8] = s[i];
    return out;
  endfunction

  function automatic logic [127:0] aes128_decrypt(logic [127:0] key, logic [127:0] ct);
    state_t s, t;
    words_t w;
    logic [127:0] out;
    build_tables();
    w = expand(key);
    for (int i = 0; i < 16; i++) s[i] = ct[127 - 8*i -: 8];
    add_rk(s, w, 10);
    for (int r = 9; r >= 0; r--) begin
      for (int c = 0; c < 4; c++)
        for (int b = 0; b < 4; b++) t[b + 4*((c + b) % 4)] = s[b + 4*c];
      s = t;
      for (int i = 0; i < 16; i++) s[i] = isb_t[s[i]];
      add_rk(s, w, r);
      if (r != 0) begin
        for (int c = 0; c < 4; c++) begin
          logic [7:0] a0, a1, a2, a3;
          a0 = s[4*c]; a1 = s[4*c+1]; a2 = s[4*c+2]; a3 = s[4*c+3];
          s[4*c]   = gmul(a0,14) ^ gmul(a1,11) ^ gmul(a2,13) ^ gmul(a3,9);
          s[4*c+1] = gmul(a0,9)  ^ gmul(a1,14) ^ gmul(a2,11) ^ gmul(a3,13);
          s[4*c+2] = gmul(a0,13) ^ gmul(a1,9)  ^ gmul(a2,14) ^ gmul(a3,11);
          s[4*c+3] = gmul(a0,11) ^ gmul(a1,13) ^ gmul(a2,9)  ^ gmul(a3,14);
        end
      end
    end
    for (int i = 0; i < 16; i++) out[127 - 8*i -: 8] = s[i];
    return out;
  endfunction

endpackage
