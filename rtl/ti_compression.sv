// ti_compression -- compression layer of the two-share S-box.
//
// XORs the outputs of component functions 0-5 into output share 0 and those
// of 6-11 into output share 1 (rows 0-5 of the sharing table use share 0 of
// the input MSB, rows 6-11 share 1).  The per-row re-masking bits of the
// BRAM contents cancel here, because rows i and i+6 receive the same bit.
// Two further fresh bits r6, r7 are spread over the byte as {r7,r6} x 4 and
// XORed into both shares, refreshing the sharing without changing the
// unmasked value.  Purely combinational, as in the source design.
// How r6 and r7 are spread, and the whole-word re-masking in the BRAMs, are
// this design's choices; together they do not make the output sharing
// uniform (for a fixed input, share 0 misses some byte values).
module ti_compression
  import aes_ti_pkg::*;
(
  input  logic [7:0] f [NCF],   // component function outputs
  input  logic [1:0] r67,       // fresh bits {r7, r6}
  output logic [7:0] y0,        // output share 0
  output logic [7:0] y1         // output share 1
);

  always_comb begin
    y0 = {4{r67}};
    y1 = {4{r67}};
    for (int i = 0; i < NHALF; i++) begin
      y0 ^= f[i];
      y1 ^= f[i + NHALF];
    end
  end

endmodule
