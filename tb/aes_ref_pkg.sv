// aes_ref_pkg -- unmasked AES-128 reference model for the testbenches.
//
// Written independently of the RTL: the S-box is built once from an
// exhaustive search for multiplicative inverses and the FIPS-197 affine
// map, the state is kept as a 4x4 byte matrix, and the key schedule is
// computed in full.  Call init() once before using any AES function.
// The r_* functions give the cubic maps F, W, G of the S-box decomposition
// and the sharing table, for the S-box block testbenches.
package aes_ref_pkg;

  typedef logic [7:0] b8;
  typedef b8 mat_t [4][4];   // [row][column]

  b8 sbox [256];
  b8 isbox [256];

  function automatic b8 gmul(input b8 a, input b8 b);
    b8 p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
    end
    return p;
  endfunction

  function automatic void init();
    for (int x = 0; x < 256; x++) begin
      b8 inv = 0;
      b8 s;
      for (int c = 1; c < 256; c++) if (gmul(b8'(x), b8'(c)) == 8'h01) inv = b8'(c);
      for (int i = 0; i < 8; i++)
        s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
      s ^= 8'h63;
      sbox[x] = s;
      isbox[s] = b8'(x);
    end
  endfunction

  function automatic mat_t to_mat(input logic [127:0] v);
    mat_t m;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) m[r][c] = v[127 - 8*(4*c + r) -: 8];
    return m;
  endfunction

  function automatic logic [127:0] from_mat(input mat_t m);
    logic [127:0] v;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) v[127 - 8*(4*c + r) -: 8] = m[r][c];
    return v;
  endfunction

  // all eleven round keys, 0..10
  typedef logic [127:0] rks_t [11];
  function automatic rks_t expand(input logic [127:0] k);
    rks_t rk;
    logic [31:0] w [44];
    b8 rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = k[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {sbox[t[23:16]] ^ rc, sbox[t[15:8]], sbox[t[7:0]], sbox[t[31:24]]};
        rc = gmul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return rk;
  endfunction

  function automatic mat_t mix(input mat_t m, input logic inverse);
    mat_t o;
    b8 cf [4] = inverse ? '{8'h0e, 8'h0b, 8'h0d, 8'h09} : '{8'h02, 8'h03, 8'h01, 8'h01};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        o[r][c] = 0;
        for (int j = 0; j < 4; j++) o[r][c] ^= gmul(m[j][c], cf[(j - r + 4) % 4]);
      end
    return o;
  endfunction

  function automatic logic [127:0] encrypt(input logic [127:0] p, input logic [127:0] k);
    rks_t rk = expand(k);
    logic [127:0] s = p ^ rk[0];
    for (int r = 1; r <= 10; r++) begin
      mat_t m = to_mat(s), t;
      for (int i = 0; i < 4; i++)
        for (int c = 0; c < 4; c++) t[i][c] = sbox[m[i][(c + i) % 4]];
      if (r != 10) t = mix(t, 1'b0);
      s = from_mat(t) ^ rk[r];
    end
    return s;
  endfunction

  function automatic logic [127:0] decrypt(input logic [127:0] c, input logic [127:0] k);
    rks_t rk = expand(k);
    logic [127:0] s = c ^ rk[10];
    for (int r = 9; r >= 0; r--) begin
      mat_t m = to_mat(s), t;
      for (int i = 0; i < 4; i++)
        for (int cc = 0; cc < 4; cc++) t[i][(cc + i) % 4] = isbox[m[i][cc]];
      s = from_mat(t) ^ rk[r];
      if (r != 0) s = from_mat(mix(to_mat(s), 1'b1));
    end
    return s;
  endfunction

  // ---- maps of the two-step S-box decomposition
  function automatic logic [7:0] r_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
    end
    return p;
  endfunction

  function automatic logic [7:0] r_pow(input logic [7:0] x, input int n);
    logic [7:0] r = 8'h01;
    for (int i = 0; i < n; i++) r = r_mul(r, x);
    return r;
  endfunction

  function automatic logic [7:0] r_aff(input logic [7:0] x);
    logic [7:0] s;
    for (int i = 0; i < 8; i++)
      s[i] = x[i] ^ x[(i+4)%8] ^ x[(i+5)%8] ^ x[(i+6)%8] ^ x[(i+7)%8];
    return s ^ 8'h63;
  endfunction

  function automatic logic [7:0] r_aff_inv(input logic [7:0] y);
    for (int x = 0; x < 256; x++) if (r_aff(8'(x)) == y) return 8'(x);
    return 8'h00;
  endfunction

  // table t = {step, ed}: 0 F, 1 W, 2 G, 3 F
  function automatic logic [7:0] r_map(input int t, input logic [7:0] x);
    case (t)
      1:       return r_pow(r_aff_inv(x), 49);
      2:       return r_aff(r_pow(x, 49));
      default: return r_pow(x, 26);
    endcase
  endfunction

  // sharing table rows as printed in the source, a..h, with row 3 column f = 1
  localparam string R_TABLE [12] = '{
    "00001100", "00011011", "00100001", "00110110", "01010101", "01101010",
    "10000010", "10111101", "11001111", "11011000", "11100100", "11110011"};

  // one share of each bit of x for component function i (column a = bit 7)
  function automatic logic [7:0] r_pick(input int i, input logic [7:0] x0, input logic [7:0] x1);
    logic [7:0] z;
    for (int j = 0; j < 8; j++) z[7-j] = (R_TABLE[i][j] == "1") ? x1[7-j] : x0[7-j];
    return z;
  endfunction

endpackage
