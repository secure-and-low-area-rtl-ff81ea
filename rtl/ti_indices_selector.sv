// ti_indices_selector -- index selection layer of the two-share S-box.
//
// Gives component function i one share of every input bit: bit j of z[i] is
// bit j of share SHARE_TABLE[i][j] (x0 where the table holds 0, x1 where it
// holds 1).  No component function ever sees both shares of the same bit,
// which is the non-completeness condition of a threshold implementation.
// Purely combinational; the sharing table is the one of aes_ti_pkg.
module ti_indices_selector
  import aes_ti_pkg::*;
(
  input  logic [7:0] x0,          // share 0 of the S-box input
  input  logic [7:0] x1,          // share 1 of the S-box input
  output logic [7:0] z [NCF]      // selected shares, one byte per component
);

  always_comb
    for (int i = 0; i < NCF; i++)
      z[i] = (x0 & ~SHARE_TABLE[i]) | (x1 & SHARE_TABLE[i]);

endmodule
