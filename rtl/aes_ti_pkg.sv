// aes_ti_pkg -- constants, types and helper functions shared by the two-share
// threshold-implementation (TI) AES core.
//
// Contents:
//  * The sharing table of the S-box: 12 component functions, each of which sees
//    exactly one share of every input bit.  Row i, bit (7-j) gives the share
//    index fed to component function i for input bit j (column a = bit 7,
//    column h = bit 0).  Rows 0-5 take share 0 of the MSB and are compressed
//    into output share 0; rows 6-11 take share 1 and form output share 1.
//  * GF(2^8) arithmetic and the three cubic maps of the S-box decomposition
//      S(x)    = G(F(x)),  F(x) = x^26,  G(x) = A(x^49)
//      S^-1(y) = F(W(y)),  W(y) = (A^-1(y))^49
//    where A is the AES affine map.  (x^26)^49 = x^1274 = x^254 in GF(2^8).
//  * The contents of one component-function BRAM, computed from the algebraic
//    normal form (ANF) of F, W and G: every monomial of degree <= 3 of the
//    target function is expanded over the two shares, and each of the
//    resulting share patterns is given to the first table row that carries it.
//    The XOR of all 12 component functions therefore equals the target.
//  * AES-128 linear layers (ShiftRows, MixColumns and their inverses), Rcon,
//    and the byte layout of the 128-bit state (byte 0 = bits 127:120, column
//    major as in FIPS-197).
//
// The sharing table and the F/G/W decomposition follow the source design; the
// bit order of the table columns, the use of the re-masking bit and the
// memory layout of the 11-bit address are choices of this implementation.
package aes_ti_pkg;

  localparam int unsigned NCF      = 12;  // component functions per cubic map
  localparam int unsigned NHALF    = 6;   // component functions per output share
  localparam int unsigned BRAM_AW  = 11;  // {step, ed, r, z[7:0]}
  localparam int unsigned BRAM_DW  = 8;
  localparam int unsigned NROUNDS  = 10;  // AES-128
  localparam int unsigned NDATA_SB = 8;   // S-box units on the state
  localparam int unsigned NKEY_SB  = 2;   // S-box units in the key schedule
  localparam int unsigned NSB      = NDATA_SB + NKEY_SB;
  localparam int unsigned RND_PER_SB = 16; // 8 bits per BRAM port
  localparam int unsigned RND_W    = NSB * RND_PER_SB; // 160

  typedef logic [7:0] byte_t;
  typedef byte_t byte_tab_t [256];

  // Which of the four tables a BRAM address selects: address bits {step, ed}.
  typedef enum logic [1:0] {
    TBL_F_ENC = 2'b00,  // first step, encryption:  F
    TBL_W_DEC = 2'b01,  // first step, decryption:  W
    TBL_G_ENC = 2'b10,  // second step, encryption: G
    TBL_F_DEC = 2'b11   // second step, decryption: F
  } tbl_e;

  // Sharing table (Eq. 6 of the source, row 3 column f set to 1 so that every
  // three columns show all eight share patterns).
  localparam logic [7:0] SHARE_TABLE [NCF] = '{
    8'b0000_1100, 8'b0001_1011, 8'b0010_0001, 8'b0011_0110,
    8'b0101_0101, 8'b0110_1010, 8'b1000_0010, 8'b1011_1101,
    8'b1100_1111, 8'b1101_1000, 8'b1110_0100, 8'b1111_0011
  };

  // ---------------------------------------------------------------- GF(2^8)
  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t gf_mul(input byte_t a, input byte_t b);
    byte_t p = '0;
    byte_t x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = xtime(x);
    end
    return p;
  endfunction

  function automatic byte_t gf_pow(input byte_t x, input int unsigned n);
    byte_t r = 8'h01;
    byte_t s = x;
    for (int unsigned e = n; e != 0; e >>= 1) begin
      if (e[0]) r = gf_mul(r, s);
      s = gf_mul(s, s);
    end
    return r;
  endfunction

  function automatic byte_t affine(input byte_t x);
    byte_t y;
    for (int i = 0; i < 8; i++)
      y[i] = x[i] ^ x[(i+4)%8] ^ x[(i+5)%8] ^ x[(i+6)%8] ^ x[(i+7)%8];
    return y ^ 8'h63;
  endfunction

  function automatic byte_t inv_affine(input byte_t y);
    byte_t x;
    for (int i = 0; i < 8; i++)
      x[i] = y[(i+2)%8] ^ y[(i+5)%8] ^ y[(i+7)%8];
    return x ^ 8'h05;
  endfunction

  // The cubic map stored in table t.
  function automatic byte_t target_map(input tbl_e t, input byte_t x);
    case (t)
      TBL_F_ENC, TBL_F_DEC: return gf_pow(x, 26);
      TBL_W_DEC:            return gf_pow(inv_affine(x), 49);
      default:              return affine(gf_pow(x, 49));
    endcase
  endfunction

  // Moebius transform, its own inverse: ANF <-> truth table.
  function automatic byte_tab_t moebius(input byte_tab_t a);
    for (int i = 0; i < 8; i++)
      for (int m = 0; m < 256; m++)
        if (m[i]) a[m] ^= a[m ^ (1 << i)];
    return a;
  endfunction

  // ANF coefficients (per output bit) of the map stored in table t.
  function automatic byte_tab_t anf_of(input tbl_e t);
    byte_tab_t a;
    for (int x = 0; x < 256; x++) a[x] = target_map(t, byte_t'(x));
    return moebius(a);
  endfunction

  // 1 when row idx is the first row carrying its share pattern on monomial m.
  function automatic logic owns_term(input int unsigned idx, input byte_t m);
    for (int unsigned j = 0; j < idx; j++)
      if ((SHARE_TABLE[j] & m) == (SHARE_TABLE[idx] & m)) return 1'b0;
    return 1'b1;
  endfunction

  // Full 2K x 8 contents of the BRAM of component function idx.
  // Address {step, ed, r, z}: data = f_idx(z) of table {step, ed}, XOR r on
  // every output bit (re-masking; cancels between rows i and i+6).
  // f_idx keeps the ANF terms that row idx owns, so its truth table is the
  // Moebius transform of the target's ANF with all other terms cleared.
  typedef byte_t rom_t [2**BRAM_AW];
  function automatic rom_t component_rom(input int unsigned idx);
    rom_t rom;
    byte_tab_t a;
    logic [255:0] own;
    for (int m = 0; m < 256; m++) own[m] = owns_term(idx, byte_t'(m));
    for (int t = 0; t < 4; t++) begin
      a = anf_of(tbl_e'(t));
      for (int m = 0; m < 256; m++) if (!own[m]) a[m] = '0;
      a = moebius(a);
      for (int z = 0; z < 256; z++) begin
        rom[(t << 9) | z]       = a[z];
        rom[(t << 9) | 256 | z] = ~a[z];
      end
    end
    return rom;
  endfunction

  // ---------------------------------------------------------------- AES
  function automatic byte_t st_byte(input logic [127:0] s, input int k);
    return s[127 - 8*k -: 8];
  endfunction

  function automatic logic [127:0] shift_rows(input logic [127:0] s);
    logic [127:0] o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(4*c + r) -: 8] = st_byte(s, 4*((c + r) % 4) + r);
    return o;
  endfunction

  function automatic logic [127:0] inv_shift_rows(input logic [127:0] s);
    logic [127:0] o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(4*c + r) -: 8] = st_byte(s, 4*((c - r + 4) % 4) + r);
    return o;
  endfunction

  function automatic logic [31:0] mix_column(input logic [31:0] w);
    byte_t a0 = w[31:24], a1 = w[23:16], a2 = w[15:8], a3 = w[7:0];
    return {xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3,
            a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3,
            a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3,
            xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3)};
  endfunction

  function automatic logic [31:0] inv_mix_column(input logic [31:0] w);
    byte_t a0 = w[31:24], a1 = w[23:16], a2 = w[15:8], a3 = w[7:0];
    return {gf_mul(a0, 8'h0e) ^ gf_mul(a1, 8'h0b) ^ gf_mul(a2, 8'h0d) ^ gf_mul(a3, 8'h09),
            gf_mul(a0, 8'h09) ^ gf_mul(a1, 8'h0e) ^ gf_mul(a2, 8'h0b) ^ gf_mul(a3, 8'h0d),
            gf_mul(a0, 8'h0d) ^ gf_mul(a1, 8'h09) ^ gf_mul(a2, 8'h0e) ^ gf_mul(a3, 8'h0b),
            gf_mul(a0, 8'h0b) ^ gf_mul(a1, 8'h0d) ^ gf_mul(a2, 8'h09) ^ gf_mul(a3, 8'h0e)};
  endfunction

  function automatic logic [127:0] mix_columns(input logic [127:0] s);
    for (int c = 0; c < 4; c++) s[127 - 32*c -: 32] = mix_column(s[127 - 32*c -: 32]);
    return s;
  endfunction

  function automatic logic [127:0] inv_mix_columns(input logic [127:0] s);
    for (int c = 0; c < 4; c++) s[127 - 32*c -: 32] = inv_mix_column(s[127 - 32*c -: 32]);
    return s;
  endfunction

  // Round constant of key-expansion round r (1..10).
  function automatic byte_t rcon(input logic [3:0] r);
    byte_t v = 8'h01;
    for (int i = 1; i < 10; i++) if (i < r) v = xtime(v);
    return v;
  endfunction

endpackage
