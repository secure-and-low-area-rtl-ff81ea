// aes_ti_keysched -- masked on-the-fly AES-128 key expansion.
//
// Holds the current round key in two shares and derives the next one in step
// with the data rounds.  SubWord goes through two ti_sbox units (forward
// S-box only, port A), each evaluating two of the four bytes per round in the
// same five-phase schedule as the state: rotated bytes 0/1 in group 0, bytes
// 2/3 in group 1.  All other key-expansion operations are linear and act on
// each share separately; the round constant is added to share 0 only.
//
//   encryption (ed = 0): starts from the cipher key k0 and runs forward,
//     k_r = expand(k_{r-1}); SubWord input is RotWord(w3).
//   decryption (ed = 1): starts from the last round key k10 and runs
//     backward, k_{r-1} = unexpand(k_r); SubWord input is RotWord(w3 ^ w2),
//     which is w3 of k_{r-1}.
//
// Timing, with the controller's strobes: 'first' loads key_in, 'upd' writes
// the freshly derived key.  rk0/rk1 show the key to add in that same cycle
// (key_in when first, the derived key when upd, else the held key).
// The source design names the four key-expansion S-boxes; the on-the-fly
// schedule and taking k10 as the decryption key are this design's choices.
module aes_ti_keysched
  import aes_ti_pkg::*;
(
  input  logic         clk,
  input  logic         ed,         // direction, valid while first/busy
  input  logic         first,
  input  logic         upd,
  input  logic         store_g0,
  input  logic         sel,
  input  logic         grp,
  input  logic [3:0]   fin_round,  // round being closed while upd (1..10)
  input  logic [127:0] key_in0,    // k0 (encryption) or k10 (decryption), share 0
  input  logic [127:0] key_in1,    // share 1
  input  logic [2*RND_PER_SB-1:0] rnd,
  output logic [127:0] rk0,        // round key, share 0
  output logic [127:0] rk1         // round key, share 1
);

  logic [127:0] key_q [2];
  logic [127:0] key_in [2];
  logic [127:0] nxt [2];
  logic [127:0] cur [2];
  logic [7:0]   sub_q [2][NKEY_SB];
  logic [7:0]   sb_x [2][NKEY_SB];
  logic [7:0]   sb_y [2][NKEY_SB];
  logic [31:0]  rot [2];

  always_comb begin
    key_in[0] = key_in0;
    key_in[1] = key_in1;
  end

  // next key from the held key and the SubWord results
  always_comb begin
    for (int s = 0; s < 2; s++) begin
      logic [31:0] w0, w1, w2, w3, t;
      {w0, w1, w2, w3} = key_q[s];
      t = {sub_q[s][0], sub_q[s][1], sb_y[s][0], sb_y[s][1]};
      if (s == 0) t[31:24] ^= rcon(ed ? 4'(NROUNDS + 1) - fin_round : fin_round);
      if (!ed) begin
        w0 ^= t; w1 ^= w0; w2 ^= w1; w3 ^= w2;
      end else begin
        w3 ^= w2; w2 ^= w1; w1 ^= w0; w0 ^= t;
      end
      nxt[s] = {w0, w1, w2, w3};
      cur[s] = first ? key_in[s] : (upd ? nxt[s] : key_q[s]);
      rot[s] = ed ? (cur[s][31:0] ^ cur[s][63:32]) : cur[s][31:0];
      rot[s] = {rot[s][23:0], rot[s][31:24]};
      for (int k = 0; k < NKEY_SB; k++)
        sb_x[s][k] = grp ? rot[s][15 - 8*k -: 8] : rot[s][31 - 8*k -: 8];
    end
  end

  for (genvar k = 0; k < NKEY_SB; k++) begin : g_sb
    ti_sbox u_sbox (
      .clk   (clk),
      .sel   (sel),
      .ed    (1'b0),
      .x0    (sb_x[0][k]),
      .x1    (sb_x[1][k]),
      .rnd_a (rnd[RND_PER_SB*k +: 8]),
      .rnd_b (rnd[RND_PER_SB*k + 8 +: 8]),
      .y0    (sb_y[0][k]),
      .y1    (sb_y[1][k])
    );
  end

  always_ff @(posedge clk) begin
    if (first || upd) key_q <= cur;
    if (store_g0)
      for (int s = 0; s < 2; s++)
        for (int k = 0; k < NKEY_SB; k++) sub_q[s][k] <= sb_y[s][k];
  end

  always_comb begin
    rk0 = cur[0];
    rk1 = cur[1];
  end

endmodule
