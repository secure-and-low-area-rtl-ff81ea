// tb_aes_ti_keysched -- checks the masked key expansion in both directions.
//
// The testbench produces the controller strobes itself (five-cycle rounds,
// group 0 issued in phase 0, group 1 in phase 1, second steps in phases 2-3,
// group-0 capture in phase 4, round close in the next phase 0) and feeds a
// random sharing of the key with fresh randomness every cycle.  At the start
// cycle the recombined round key must be the loaded key; at the close of
// round r it must be k_r for encryption (forward from k0) and k_{10-r} for
// decryption (backward from k10), as computed by the reference key schedule.
module tb_aes_ti_keysched;
  import aes_ref_pkg::*;

  logic         clk, ed, first, upd, store_g0, sel, grp;
  logic [3:0]   fin_round;
  logic [127:0] key_in0, key_in1, rk0, rk1;
  logic [31:0]  rnd;
  int checks, failures;

  aes_ti_keysched dut (.*);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) rnd <= $urandom;

  task automatic check_key(input string what, input logic [127:0] want);
    checks++;
    if ((rk0 ^ rk1) !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %032h expected %032h", what, rk0 ^ rk1, want);
    end
  endtask

  task automatic run(input logic dir, input logic [127:0] k);
    rks_t rk = expand(k);
    logic [127:0] m = {$urandom, $urandom, $urandom, $urandom};
    @(negedge clk);
    ed = dir;
    key_in0 = (dir ? rk[10] : rk[0]) ^ m; key_in1 = m;
    for (int c = 0; c <= 50; c++) begin
      int ph;
      ph = c % 5;
      first    = (c == 0);
      upd      = (c > 0 && ph == 0);
      fin_round = 4'(c / 5);
      sel      = (c < 50) && (ph == 2 || ph == 3);
      grp      = (c < 50) && (ph == 1);
      store_g0 = (c < 50) && (ph == 4);
      #1;
      if (first) check_key("loaded key", dir ? rk[10] : rk[0]);
      if (upd)   check_key($sformatf("round %0d", c / 5), dir ? rk[10 - c / 5] : rk[c / 5]);
      @(negedge clk);
      key_in0 = {$urandom, $urandom, $urandom, $urandom};
    end
    first = 0; upd = 0; sel = 0; grp = 0; store_g0 = 0;
  endtask

  initial begin
    checks = 0; failures = 0;
    first = 0; upd = 0; sel = 0; grp = 0; store_g0 = 0; ed = 0; fin_round = 0;
    key_in0 = 0; key_in1 = 0;
    init();
    repeat (2) @(negedge clk);
    run(0, 128'h2b7e151628aed2a6abf7158809cf4f3c);
    run(1, 128'h2b7e151628aed2a6abf7158809cf4f3c);
    for (int i = 0; i < 10; i++) begin
      logic [127:0] k;
      k = {$urandom, $urandom, $urandom, $urandom};
      run(1'(i), k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
