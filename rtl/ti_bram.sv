// ti_bram -- one dual-port 2K x 8 block RAM holding the four tables of
// component function IDX of the masked S-box.
//
// The 11-bit address is {step, ed, r, z[7:0]}:
//   step = 0 : first step  (F_i for encryption, W_i for decryption)
//   step = 1 : second step (G_i for encryption, F_i for decryption)
//   ed       : table of the encryption (0) or the decryption (1) direction
//   r        : one fresh re-masking bit, XORed onto all eight output bits
//   z        : one share of each of the eight S-box input bits
// so that F_i and G_i (and W_i and F_i) share one memory, which is what halves
// the BRAM count.  Port A serves encryption and port B decryption; both are
// independent read ports of the same contents.
//
// Timing: like an FPGA block RAM with its output register enabled, a read
// takes two clock edges -- the first edge registers the array word, the second
// moves it to the output register.  dout_x is valid two cycles after addr_x.
// The contents, aes_ti_pkg::component_rom(IDX), are loaded by an initial
// block (the BRAM initial value); the memory is never written.
module ti_bram
  import aes_ti_pkg::*;
#(
  parameter int unsigned IDX = 0   // component function index, 0..11
) (
  input  logic               clk,
  input  logic [BRAM_AW-1:0] addr_a,
  input  logic [BRAM_AW-1:0] addr_b,
  output logic [BRAM_DW-1:0] dout_a,
  output logic [BRAM_DW-1:0] dout_b
);

  rom_t  mem;
  byte_t rd_a, rd_b;

  // ROM contents, loaded once at configuration like an FPGA BRAM init
  initial mem = component_rom(IDX);

  always_ff @(posedge clk) begin
    rd_a   <= mem[addr_a];
    rd_b   <= mem[addr_b];
    dout_a <= rd_a;
    dout_b <= rd_b;
  end

endmodule
