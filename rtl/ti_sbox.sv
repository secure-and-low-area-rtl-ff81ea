// ti_sbox -- two-share threshold implementation of the AES S-box and its
// inverse, computed in two passes through one set of 12 BRAM blocks.
//
// Structure (input to output): a step multiplexer, the index selector, 12
// component-function blocks (one BRAM each) and the compression layer, whose
// output is fed back to the multiplexer.
//   encryption: S(x)    = G(F(x))   first step F, second step G
//   decryption: S^-1(x) = F(W(x))   first step W, second step F
// The step selector 'sel' does double duty: it picks the multiplexer input
// (0: external input x0/x1, 1: the fed-back compression output) and it is the
// MSB of every BRAM address, which selects the first-step or second-step
// table.  Multiplexer, index selector and compression are combinational, so
// the only registers on the way are the two inside each BRAM.
//
// Timing (one S-box evaluation):
//   cycle t   : sel = 0, x0/x1 valid          -> first-step read issued
//   cycle t+2 : sel = 1                       -> second-step read issued
//   cycle t+4 : y0/y1 hold S(x) or S^-1(x)
// Two evaluations can be interleaved (inputs at t and t+1, sel = 1 at t+2 and
// t+3, results at t+4 and t+5).  ed must stay constant while a result is in
// flight.
//
// Randomness: rnd_a feeds port A (encryption), rnd_b port B (decryption).
// Bits 0-5 are the re-masking address bits of blocks i and i+6 (i = 0..5),
// bits 7:6 of the port in use go to the compression layer.  All are expected
// fresh every cycle.
module ti_sbox
  import aes_ti_pkg::*;
(
  input  logic       clk,
  input  logic       sel,     // 0: first step (external input), 1: second step
  input  logic       ed,      // 0: S-box, 1: inverse S-box
  input  logic [7:0] x0,      // input share 0 (used when sel = 0)
  input  logic [7:0] x1,      // input share 1
  input  logic [7:0] rnd_a,   // fresh bits for port A
  input  logic [7:0] rnd_b,   // fresh bits for port B
  output logic [7:0] y0,      // output share 0
  output logic [7:0] y1       // output share 1
);

  logic [7:0] m0, m1;
  logic [7:0] z [NCF];
  logic [7:0] f [NCF];

  // step multiplexer
  always_comb begin
    m0 = sel ? y0 : x0;
    m1 = sel ? y1 : x1;
  end

  ti_indices_selector u_sel (.x0(m0), .x1(m1), .z(z));

  for (genvar i = 0; i < NCF; i++) begin : g_blk
    ti_block #(.IDX(i)) u_blk (
      .clk  (clk),
      .step (sel),
      .ed   (ed),
      .r_a  (rnd_a[i % NHALF]),
      .r_b  (rnd_b[i % NHALF]),
      .z    (z[i]),
      .y    (f[i])
    );
  end

  ti_compression u_cmp (
    .f   (f),
    .r67 (ed ? rnd_b[7:6] : rnd_a[7:6]),
    .y0  (y0),
    .y1  (y1)
  );

endmodule
