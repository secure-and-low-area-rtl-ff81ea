// aes_ti_top -- first-order masked AES-128 encryption/decryption core with a
// two-share threshold-implementation S-box stored in block RAMs.
//
// Every value that depends on the key or the data lives in two Boolean
// shares (value = share0 ^ share1).  The nonlinear part, SubBytes, uses ten
// ti_sbox units of 12 dual-port BRAMs each (120 BRAMs): eight on the state,
// two in the key schedule (aes_ti_keysched).  ShiftRows, MixColumns,
// AddRoundKey and their inverses act on each share separately.
//
// Schedule (see aes_ti_ctrl): each S-box unit handles two state bytes per
// round, unit u bytes u (group 0, columns 0-1) and u+8 (group 1, columns
// 2-3), so a round takes five cycles and ten rounds take 50.  The cycle that
// closes round r applies the linear layer and the round key to the S-box
// results and, in the same cycle, issues group 0 of round r+1.
//   encryption: s = p ^ k0;  per round SubBytes, ShiftRows, MixColumns
//               (not in round 10), AddRoundKey(k_r)
//   decryption: s = c ^ k10; per round InvSubBytes, InvShiftRows,
//               AddRoundKey(k_{10-r}), InvMixColumns (not in round 10)
//
// Interface: hold start high for one cycle while idle, with ed, the data
// shares and the key shares valid in that cycle.  For decryption the key
// input is the last round key k10.  rnd must carry 160 fresh random bits
// every cycle (16 per S-box unit: 8 for each BRAM port).  done pulses 50
// cycles after start; dout0/dout1 then hold the result shares until the next
// result.  Synchronous active-low reset of the control state only.
//
// From the source design: the S-box structure and BRAM layout, 8 + 2 units
// of 12 BRAMs, 160 random bits, 50-cycle latency.  This design's own choices:
// the byte-to-unit assignment, the five-phase round, the interface and the
// decryption key convention.
module aes_ti_top
  import aes_ti_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,   // begin a block (accepted when !busy)
  input  logic             ed,      // 0: encrypt, 1: decrypt
  input  logic [127:0]     din0,    // plaintext / ciphertext, share 0
  input  logic [127:0]     din1,    // share 1
  input  logic [127:0]     key0,    // k0 (encrypt) or k10 (decrypt), share 0
  input  logic [127:0]     key1,    // share 1
  input  logic [RND_W-1:0] rnd,     // fresh randomness, every cycle
  output logic             busy,
  output logic             done,    // one-cycle pulse: dout valid
  output logic [127:0]     dout0,   // result, share 0
  output logic [127:0]     dout1    // result, share 1
);

  logic       first, sel, grp, store_g0, upd, last;
  logic [3:0] fin_round;
  logic       ed_q, ed_cur;

  logic [127:0] din [2];
  logic [127:0] rk [2];
  logic [127:0] state_q [2];
  logic [127:0] cur [2];
  logic [127:0] closed [2];
  logic [7:0]   sb_q [2][NDATA_SB];
  logic [7:0]   sb_x [2][NDATA_SB];
  logic [7:0]   sb_y [2][NDATA_SB];

  aes_ti_ctrl u_ctrl (
    .clk, .rst_n, .start, .busy, .first, .sel, .grp, .store_g0, .upd,
    .fin_round, .last, .done
  );

  always_comb ed_cur = first ? ed : ed_q;

  aes_ti_keysched u_key (
    .clk, .ed(ed_cur), .first, .upd, .store_g0, .sel, .grp, .fin_round,
    .key_in0 (key0),
    .key_in1 (key1),
    .rnd     (rnd[RND_PER_SB*NDATA_SB +: RND_PER_SB*NKEY_SB]),
    .rk0     (rk[0]),
    .rk1     (rk[1])
  );

  always_comb begin
    din[0] = din0;
    din[1] = din1;
    for (int s = 0; s < 2; s++) begin
      logic [127:0] sbo, t;
      for (int u = 0; u < NDATA_SB; u++) begin
        sbo[127 - 8*u       -: 8] = sb_q[s][u];
        sbo[127 - 8*(u + 8) -: 8] = sb_y[s][u];
      end
      if (!ed_q) begin
        t = shift_rows(sbo);
        if (!last) t = mix_columns(t);
        t ^= rk[s];
      end else begin
        t = inv_shift_rows(sbo) ^ rk[s];
        if (!last) t = inv_mix_columns(t);
      end
      closed[s] = t;
      cur[s] = first ? (din[s] ^ rk[s]) : (upd ? closed[s] : state_q[s]);
      for (int u = 0; u < NDATA_SB; u++)
        sb_x[s][u] = grp ? cur[s][127 - 8*(u + 8) -: 8] : cur[s][127 - 8*u -: 8];
    end
  end

  for (genvar u = 0; u < NDATA_SB; u++) begin : g_sb
    ti_sbox u_sbox (
      .clk   (clk),
      .sel   (sel),
      .ed    (ed_cur),
      .x0    (sb_x[0][u]),
      .x1    (sb_x[1][u]),
      .rnd_a (rnd[RND_PER_SB*u +: 8]),
      .rnd_b (rnd[RND_PER_SB*u + 8 +: 8]),
      .y0    (sb_y[0][u]),
      .y1    (sb_y[1][u])
    );
  end

  always_ff @(posedge clk) begin
    if (first) ed_q <= ed;
    if (first || upd) state_q <= cur;
    if (store_g0)
      for (int s = 0; s < 2; s++)
        for (int u = 0; u < NDATA_SB; u++) sb_q[s][u] <= sb_y[s][u];
    if (last) begin
      dout0 <= closed[0];
      dout1 <= closed[1];
    end
  end

endmodule
