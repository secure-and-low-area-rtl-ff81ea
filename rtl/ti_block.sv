// ti_block -- component-function block i of the masked S-box (one BRAM).
//
// Builds the two port addresses of the block's BRAM from the selected input
// shares z, the step selector and one re-masking bit per port, and chooses
// the port that matches the current direction: port A (encryption tables,
// F_i / G_i) when ed = 0, port B (decryption tables, W_i / F_i) when ed = 1.
// The step selector is the address MSB, so the first-step and second-step
// tables of the block sit in the two halves of the same memory and no
// separate output multiplexer between them is needed.
//
// Timing: y is the word addressed two cycles earlier (BRAM read register plus
// output register).  ed must be held for the two cycles of a read; the E/D
// multiplexer sits after the output register, as in the source design.
module ti_block
  import aes_ti_pkg::*;
#(
  parameter int unsigned IDX = 0   // component function index, 0..11
) (
  input  logic        clk,
  input  logic        step,   // 0: first step, 1: second step
  input  logic        ed,     // 0: encryption, 1: decryption
  input  logic        r_a,    // re-masking bit, port A
  input  logic        r_b,    // re-masking bit, port B
  input  logic [7:0]  z,      // one share of each S-box input bit
  output logic [7:0]  y       // component function output share
);

  logic [BRAM_DW-1:0] dout_a, dout_b;

  ti_bram #(.IDX(IDX)) u_bram (
    .clk    (clk),
    .addr_a ({step, 1'b0, r_a, z}),
    .addr_b ({step, 1'b1, r_b, z}),
    .dout_a (dout_a),
    .dout_b (dout_b)
  );

  always_comb y = ed ? dout_b : dout_a;

endmodule
