// tb_ti_block -- checks twelve component-function blocks together.
//
// Each block gets one share of every bit of a random x (sharing table of
// aes_ref_pkg), a random step bit every cycle, and per-port re-masking bits
// shared by blocks i and i+6.  Two cycles later the XOR of the twelve block
// outputs must equal F(x) / G(x) for encryption (ed = 0) and W(x) / F(x) for
// decryption (ed = 1), computed by the reference model.  ed is held for
// segments of 300 cycles and both directions are run; a block whose E/D
// multiplexer picked the wrong port would give the other direction's map.
module tb_ti_block;
  import aes_ref_pkg::*;

  logic       clk;
  logic       step, ed;
  logic [5:0] ra, rb;
  logic [7:0] z [12], y [12];
  int checks, failures;

  for (genvar i = 0; i < 12; i++) begin : g_blk
    ti_block #(.IDX(i)) dut (.clk(clk), .step(step), .ed(ed), .r_a(ra[i % 6]),
                             .r_b(rb[i % 6]), .z(z[i]), .y(y[i]));
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
  logic [7:0] exp1, exp2;
  int         valid;

  initial begin
    checks = 0; failures = 0; valid = 0;
    for (int t = 0; t < 4; t++)
      for (int x = 0; x < 256; x++) ref_map[t][x] = r_map(t, 8'(x));
    for (int n = 0; n < 2400; n++) begin
      logic [7:0] x, m;
      logic       s;
      x = 8'($urandom); m = 8'($urandom); s = 1'($urandom);
      @(negedge clk);
      if (n % 300 == 0) begin
        ed = 1'((n / 300) % 2);
        valid = 0;
      end
      if (valid >= 2) begin
        logic [7:0] acc;
        acc = 0;
        for (int i = 0; i < 12; i++) acc ^= y[i];
        checks++;
        if (acc !== exp2) begin
          failures++;
          if (failures < 10) $display("FAIL ed=%0d got %02h expected %02h", ed, acc, exp2);
        end
      end
      step = s; ra = 6'($urandom); rb = 6'($urandom);
      for (int i = 0; i < 12; i++) z[i] = r_pick(i, x ^ m, m);
      exp2 = exp1;
      exp1 = ref_map[{s, ed}][x];
      valid++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
