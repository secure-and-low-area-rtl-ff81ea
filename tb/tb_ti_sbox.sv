// tb_ti_sbox -- self-checking testbench of the two-share S-box unit.
//
// For every byte value, in both directions, feeds a random two-share sharing
// of x with fresh random bits every cycle, runs two interleaved evaluations
// (inputs at cycles t and t+1, second step at t+2 and t+3) and compares the
// recombined output at t+4 and t+5 with a reference S-box.  The reference is
// built here independently: the multiplicative inverse is found by exhaustive
// search and followed by the FIPS-197 affine map written as a matrix product.
// Sampling exactly four cycles after the first-step issue checks the
// latency.  Also checks that the output shares are not the plain value.
module tb_ti_sbox;

  logic       clk = 1'b0;
  logic       sel, ed;
  logic [7:0] x0, x1, rnd_a, rnd_b, y0, y1;
  int checks = 0, failures = 0, cycles = 0;

  ti_sbox dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // fresh randomness every cycle
  always @(negedge clk) begin
    rnd_a <= 8'($urandom);
    rnd_b <= 8'($urandom);
  end

  function automatic logic [7:0] mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
    end
    return p;
  endfunction

  logic [7:0] ref_s [256];
  logic [7:0] ref_si [256];
  initial begin
    for (int x = 0; x < 256; x++) begin
      logic [7:0] inv = 0, s;
      for (int c = 1; c < 256; c++) if (mul(8'(x), 8'(c)) == 8'h01) inv = 8'(c);
      // affine: s_i = b_i ^ b_{i+4} ^ b_{i+5} ^ b_{i+6} ^ b_{i+7} ^ c_i, c = 0x63
      for (int i = 0; i < 8; i++)
        s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
      s ^= 8'h63;
      ref_s[x] = s;
      ref_si[s] = 8'(x);
    end
  end

  task automatic run_pair(input logic dir, input logic [7:0] a, input logic [7:0] b);
    logic [7:0] ma = 8'($urandom), mb = 8'($urandom);
    logic [7:0] ea, eb;
    ea = dir ? ref_si[a] : ref_s[a];
    eb = dir ? ref_si[b] : ref_s[b];
    @(negedge clk); ed = dir; sel = 0; x0 = a ^ ma; x1 = ma;
    @(negedge clk); sel = 0; x0 = b ^ mb; x1 = mb;
    @(negedge clk); sel = 1; x0 = 8'($urandom); x1 = 8'($urandom);
    @(negedge clk); sel = 1;
    @(negedge clk); sel = 0;
    #1;
    checks++;
    if ((y0 ^ y1) !== ea) begin
      failures++;
      if (failures < 10) $display("FAIL dir=%0d x=%02h got %02h exp %02h", dir, a, y0 ^ y1, ea);
    end
    @(negedge clk);
    #1;
    checks++;
    if ((y0 ^ y1) !== eb) begin
      failures++;
      if (failures < 10) $display("FAIL dir=%0d x=%02h got %02h exp %02h", dir, b, y0 ^ y1, eb);
    end
  endtask

  int masked_out = 0;
  always @(posedge clk) if (y0 != (y0 ^ y1)) masked_out++;

  initial begin
    sel = 0; ed = 0; x0 = 0; x1 = 0;
    repeat (3) @(negedge clk);
    // known answers first
    run_pair(1'b0, 8'h00, 8'h53);
    checks++; if (ref_s[8'h00] != 8'h63 || ref_s[8'h53] != 8'hed) failures++;
    for (int d = 0; d < 2; d++)
      for (int x = 0; x < 256; x += 2) run_pair(d[0], 8'(x), 8'(x + 1));
    // the output shares must carry a mask, not the plain value
    checks++;
    if (masked_out == 0) begin failures++; $display("FAIL outputs never masked"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
