// tb_ref_pkg: reference models used by the testbenches.
//
// Written independently of the RTL: the AES S-box is computed from the
// multiplicative inverse in GF(2^8) followed by the affine map (not read from
// a table), MixColumn uses a general GF(2^8) multiply, the full AES-128
// encryption works on a byte array in FIPS-197 order, and PRESENT uses the
// printed permutation table and a bit-by-bit key schedule.  Also holds a
// model of the OR1200 l.cust5 operations and SPARC V8 instruction encoders.
package tb_ref_pkg;

  typedef logic [7:0] byte_t;

  function automatic byte_t gmul(input byte_t a, input byte_t b);
    byte_t p = 0;
    byte_t x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = x[7] ? ((x << 1) ^ 8'h1b) : (x << 1);
    end
    return p;
  endfunction

  function automatic byte_t ginv(input byte_t a);
    if (a == 0) return 0;
    for (int y = 1; y < 256; y++) if (gmul(a, byte_t'(y)) == 8'h01) return byte_t'(y);
    return 0;
  endfunction

  function automatic byte_t sbox(input byte_t x);
    byte_t b = ginv(x);
    byte_t s = 8'h63;
    for (int i = 0; i < 8; i++)
      s[i] = s[i] ^ b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return s;
  endfunction

  // byte j (0 = most significant) of a 32-bit word
  function automatic byte_t wb(input logic [31:0] w, input int j);
    return w[31 - 8*j -: 8];
  endfunction

  function automatic logic [31:0] subword(input logic [31:0] w);
    return {sbox(wb(w,0)), sbox(wb(w,1)), sbox(wb(w,2)), sbox(wb(w,3))};
  endfunction

  function automatic logic [31:0] rotbytes(input logic [31:0] w, input int n);
    logic [31:0] r;
    for (int j = 0; j < 4; j++) r[31 - 8*j -: 8] = wb(w, (j + n) % 4);
    return r;
  endfunction

  function automatic logic [31:0] mixcol(input logic [31:0] c);
    byte_t m [4][4] = '{'{2,3,1,1}, '{1,2,3,1}, '{1,1,2,3}, '{3,1,1,2}};
    logic [31:0] r;
    for (int i = 0; i < 4; i++) begin
      byte_t acc = 0;
      for (int k = 0; k < 4; k++) acc ^= gmul(m[i][k], wb(c, k));
      r[31 - 8*i -: 8] = acc;
    end
    return r;
  endfunction

  function automatic byte_t rcon(input int round);
    byte_t r = 8'h01;
    for (int i = 1; i < round; i++) r = gmul(r, 8'h02);
    return r;
  endfunction

  function automatic logic [127:0] key_next(input logic [127:0] k, input int round);
    logic [31:0] w [8];
    for (int i = 0; i < 4; i++) w[i] = k[127 - 32*i -: 32];
    for (int i = 4; i < 8; i++) begin
      logic [31:0] t = w[i-1];
      if (i == 4) t = subword(rotbytes(t, 1)) ^ {rcon(round), 24'h0};
      w[i] = w[i-4] ^ t;
    end
    return {w[4], w[5], w[6], w[7]};
  endfunction

  // state byte array s[r][c], loaded in FIPS-197 order
  typedef byte_t state_t [4][4];

  function automatic state_t to_state(input logic [127:0] v);
    state_t s;
    for (int k = 0; k < 16; k++) s[k % 4][k / 4] = v[127 - 8*k -: 8];
    return s;
  endfunction

  function automatic logic [127:0] from_state(input state_t s);
    logic [127:0] v;
    for (int k = 0; k < 16; k++) v[127 - 8*k -: 8] = s[k % 4][k / 4];
    return v;
  endfunction

  // AES-128 encryption truncated after 'rounds' rounds (10 = full cipher)
  function automatic logic [127:0] aes128(input logic [127:0] pt, input logic [127:0] key,
                                          input int rounds);
    state_t s, t;
    logic [127:0] rk = key;
    s = to_state(pt ^ rk);
    for (int rnd = 1; rnd <= rounds; rnd++) begin
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) s[r][c] = sbox(s[r][c]);
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) t[r][c] = s[r][(c + r) % 4];
      s = t;
      if (rnd != 10) begin
        for (int c = 0; c < 4; c++) begin
          logic [31:0] col = {s[0][c], s[1][c], s[2][c], s[3][c]};
          col = mixcol(col);
          for (int r = 0; r < 4; r++) s[r][c] = wb(col, r);
        end
      end
      rk = key_next(rk, rnd);
      s  = to_state(from_state(s) ^ rk);
    end
    return from_state(s);
  endfunction

  // ---------------- PRESENT ----------------
  localparam logic [3:0] PSBOX [16] = '{4'hC, 4'h5, 4'h6, 4'hB, 4'h9, 4'h0, 4'hA, 4'hD,
                                        4'h3, 4'hE, 4'hF, 4'h8, 4'h4, 4'h7, 4'h1, 4'h2};
  localparam int PTAB [64] = '{
     0, 16, 32, 48,  1, 17, 33, 49,  2, 18, 34, 50,  3, 19, 35, 51,
     4, 20, 36, 52,  5, 21, 37, 53,  6, 22, 38, 54,  7, 23, 39, 55,
     8, 24, 40, 56,  9, 25, 41, 57, 10, 26, 42, 58, 11, 27, 43, 59,
    12, 28, 44, 60, 13, 29, 45, 61, 14, 30, 46, 62, 15, 31, 47, 63};

  function automatic logic [63:0] p_sboxlayer(input logic [63:0] s);
    logic [63:0] r;
    for (int i = 0; i < 16; i++) r[4*i +: 4] = PSBOX[s[4*i +: 4]];
    return r;
  endfunction

  function automatic logic [63:0] p_player(input logic [63:0] s);
    logic [63:0] r;
    for (int i = 0; i < 64; i++) r[PTAB[i]] = s[i];
    return r;
  endfunction

  function automatic logic [79:0] p_keyupd(input logic [79:0] k, input int rc);
    logic [79:0] r;
    logic [4:0]  c = 5'(rc);
    for (int i = 0; i < 80; i++) r[(i + 61) % 80] = k[i];
    r[79:76] = PSBOX[r[79:76]];
    for (int i = 0; i < 5; i++) r[15 + i] = r[15 + i] ^ c[i];
    return r;
  endfunction

  function automatic logic [63:0] present80(input logic [63:0] pt, input logic [79:0] key);
    logic [63:0] s = pt;
    logic [79:0] k = key;
    for (int i = 1; i <= 31; i++) begin
      s = s ^ k[79:16];
      s = p_sboxlayer(s);
      s = p_player(s);
      k = p_keyupd(k, i);
    end
    return s ^ k[79:16];
  endfunction

  // ---------------- OR1200 l.cust5 ----------------
  function automatic logic [31:0] cust5_enc(input int rd, input int ra, input int rb,
                                            input int l, input int k);
    return {6'h3C, 5'(rd), 5'(ra), 5'(rb), 6'(l), 5'(k)};
  endfunction

  function automatic logic [31:0] cust5_ref(input logic [31:0] a, input logic [31:0] b,
                                            input int l, input int k);
    logic [31:0] r = a;
    case (k)
      1: r[8*(l % 4) +: 8] = b[7:0];
      2: r[l % 32] = 1'b1;
      3: r[l % 32] = 1'b0;
      default: ;
    endcase
    return r;
  endfunction

  // ---------------- SPARC V8 encoders ----------------
  function automatic logic [31:0] sp_f3(input logic [5:0] op3, input int rd, input int rs1, input int rs2);
    return {2'b10, 5'(rd), op3, 5'(rs1), 1'b0, 8'h00, 5'(rs2)};
  endfunction

  function automatic logic [31:0] sp_f3i(input logic [5:0] op3, input int rd, input int rs1, input int simm);
    return {2'b10, 5'(rd), op3, 5'(rs1), 1'b1, 13'(simm)};
  endfunction

  function automatic logic [31:0] sp_sethi(input int rd, input logic [21:0] imm22);
    return {2'b00, 5'(rd), 3'b100, imm22};
  endfunction

endpackage
