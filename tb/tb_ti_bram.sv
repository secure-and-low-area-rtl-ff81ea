// tb_ti_bram -- checks the twelve component-function BRAMs together.
//
// For random x, random sharings and random re-masking bits it addresses
// BRAM i with {step, ed, r_i, z_i}, z_i chosen from the two shares by the
// sharing table (aes_ref_pkg), with BRAMs i and i+6 getting the same r_i.
// The XOR of the twelve words read back must be the cubic map of the table
// (F, W, G, F), computed in aes_ref_pkg by repeated multiplication.  A new
// address is issued every cycle and each result is checked exactly two cycles
// later, which checks the read latency; a word read with r = 1 must be the
// complement of the word with r = 0 (port B checks that on the same address).
module tb_ti_bram;
  import aes_ref_pkg::*;

  logic        clk;
  logic [10:0] addr_a [12], addr_b [12];
  logic [7:0]  dout_a [12], dout_b [12];
  int checks, failures;

  for (genvar i = 0; i < 12; i++) begin : g_bram
    ti_bram #(.IDX(i)) dut (.clk(clk), .addr_a(addr_a[i]), .addr_b(addr_b[i]),
                            .dout_a(dout_a[i]), .dout_b(dout_b[i]));
  end

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] ref_map [4][256];
  logic [7:0] exp_q [3];
  logic       chk_q [3];

  initial begin
    checks = 0; failures = 0;
    for (int t = 0; t < 4; t++)
      for (int x = 0; x < 256; x++) ref_map[t][x] = r_map(t, 8'(x));
    for (int k = 0; k < 3; k++) chk_q[k] = 0;
    for (int n = 0; n < 4000; n++) begin
      int t;
      logic [7:0] x, m, zi;
      logic [5:0] r;
      t = n % 4;
      x = 8'($urandom); m = 8'($urandom); r = 6'($urandom);
      @(negedge clk);
      for (int i = 0; i < 12; i++) begin
        zi = r_pick(i, x ^ m, m);
        addr_a[i] = {t[1], t[0], r[i % 6], zi};
        addr_b[i] = {t[1], t[0], ~r[i % 6], zi};
      end
      // results of the address issued two cycles ago
      if (chk_q[2]) begin
        logic [7:0] acc;
        acc = 0;
        for (int i = 0; i < 12; i++) acc ^= dout_a[i];
        checks++;
        if (acc !== exp_q[2]) begin
          failures++;
          if (failures < 10) $display("FAIL got %02h expected %02h", acc, exp_q[2]);
        end
        checks++;
        if (dout_b[0] !== ~dout_a[0]) begin
          failures++;
          if (failures < 10) $display("FAIL re-masking bit");
        end
      end
      exp_q[2] = exp_q[1]; chk_q[2] = chk_q[1];
      exp_q[1] = ref_map[t][x]; chk_q[1] = 1;
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
