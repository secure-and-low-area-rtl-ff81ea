// tb_aes_ti_top -- end-to-end testbench of the masked AES-128 core.
//
// Runs the FIPS-197 known-answer vectors (Appendix B and C.1) in both
// directions, then random blocks, keys, sharings and directions (encryption or
// decryption chosen at random), against the unmasked reference model of aes_ref_pkg.
// Fresh randomness changes every cycle.  For every block it checks the
// recombined result, that start-to-done takes exactly 50 cycles, and that
// the output shares are masked.  It also counts the mechanisms of the design
// and fails if one never occurred: encryptions, decryptions, switches between
// the two, first-to-second-step switches of the S-box selector, and a start
// request ignored while busy.  The core has no parameters, so this is also
// the full-size test.
module tb_aes_ti_top;
  import aes_ref_pkg::*;

  localparam int LATENCY = 50;
  localparam int NRAND   = 40;

  logic         clk;
  logic         rst_n, start, ed, busy, done;
  logic [127:0] din0, din1, key0, key1, dout0, dout1;
  logic [159:0] rnd;
  int checks, failures;
  int n_enc, n_dec, n_switch, n_step, n_ignored;

  aes_ti_top dut (.*);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk)
    for (int i = 0; i < 5; i++) rnd[32*i +: 32] <= $urandom;

  logic sel_d;
  always @(posedge clk) begin
    sel_d <= dut.sel;
    if (dut.sel && !sel_d) n_step <= n_step + 1;
  end

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  logic last_ed;
  logic have_last;

  task automatic run(input logic dir, input logic [127:0] d, input logic [127:0] k,
                     input logic [127:0] expect_v);
    logic [127:0] md = rand128(), mk = rand128();
    logic [127:0] kk = dir ? expand(k)[10] : k;
    int lat = 0;
    @(negedge clk);
    start = 1; ed = dir;
    din0 = d ^ md; din1 = md; key0 = kk ^ mk; key1 = mk;
    @(negedge clk);
    start = 0; din0 = rand128(); din1 = rand128(); key0 = rand128(); key1 = rand128();
    lat = 1;
    // a second start while busy must be ignored
    if (dir) begin
      start = 1; ed = ~dir;
      @(negedge clk);
      start = 0; lat++;
      n_ignored++;
    end
    while (!done) begin
      @(negedge clk);
      lat++;
      if (lat > 200) break;
    end
    checks++;
    if (lat != LATENCY + 1) begin
      failures++;
      $display("FAIL latency %0d cycles, expected %0d", lat - 1, LATENCY);
    end
    checks++;
    if ((dout0 ^ dout1) !== expect_v) begin
      failures++;
      $display("FAIL ed=%0d got %032h expected %032h", dir, dout0 ^ dout1, expect_v);
    end
    checks++;
    if (dout0 == expect_v || dout1 == expect_v) begin
      failures++;
      $display("FAIL output share equals the unmasked result");
    end
    if (dir) n_dec++; else n_enc++;
    if (have_last && last_ed != dir) n_switch++;
    last_ed = dir; have_last = 1;
  endtask

  initial begin
    checks = 0; failures = 0;
    n_enc = 0; n_dec = 0; n_switch = 0; n_step = 0; n_ignored = 0;
    have_last = 0; last_ed = 0;
    init();
    rst_n = 0; start = 0; ed = 0;
    din0 = 0; din1 = 0; key0 = 0; key1 = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // reference model sanity: FIPS-197 vectors
    checks++;
    if (encrypt(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f)
        !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a) failures++;
    run(0, 128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c,
        128'h3925841d02dc09fbdc118597196a0b32);
    run(1, 128'h3925841d02dc09fbdc118597196a0b32, 128'h2b7e151628aed2a6abf7158809cf4f3c,
        128'h3243f6a8885a308d313198a2e0370734);
    run(0, 128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    run(1, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, 128'h000102030405060708090a0b0c0d0e0f,
        128'h00112233445566778899aabbccddeeff);
    for (int i = 0; i < NRAND; i++) begin
      logic [127:0] d, k;
      logic dir;
      d = rand128(); k = rand128(); dir = 1'($urandom);
      run(dir, d, k, dir ? decrypt(d, k) : encrypt(d, k));
    end
    $display("mechanisms: enc=%0d dec=%0d switch=%0d step=%0d ignored_start=%0d",
             n_enc, n_dec, n_switch, n_step, n_ignored);
    checks++; if (n_enc == 0)     begin failures++; $display("FAIL no encryption");     end
    checks++; if (n_dec == 0)     begin failures++; $display("FAIL no decryption");     end
    checks++; if (n_switch == 0)  begin failures++; $display("FAIL no E/D switch");     end
    checks++; if (n_step == 0)    begin failures++; $display("FAIL no second step");    end
    checks++; if (n_ignored == 0) begin failures++; $display("FAIL no busy start");     end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
