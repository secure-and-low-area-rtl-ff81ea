// tb_aes_ti_ctrl -- checks the round/phase sequencer cycle by cycle.
//
// After each accepted start the expected strobes are derived from the cycle
// count k since start (k = 0 is the start cycle): sel in phases 2 and 3 of
// each five-cycle round, grp in phase 1, store_g0 in phase 4, upd with
// fin_round = k/5 at k = 5, 10, ..., 50, last at k = 50, done at k = 51, busy
// from k = 1 to 50.  Starts while busy must be ignored; a reset in the middle
// of a block must return the sequencer to idle.
module tb_aes_ti_ctrl;

  logic       clk, rst_n, start;
  logic       busy, first, sel, grp, store_g0, upd, last, done;
  logic [3:0] fin_round;
  int checks, failures, n_blocks;

  aes_ti_ctrl dut (.*);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(input string name, input logic got, input logic want, input int k);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 15) $display("FAIL k=%0d %s=%0d expected %0d", k, name, got, want);
    end
  endtask

  task automatic run_block(input logic poke_busy);
    @(negedge clk);
    start = 1;
    for (int k = 0; k <= 52; k++) begin
      int ph;
      #1;
      ph = k % 5;
      expect_bit("first", first, k == 0, k);
      expect_bit("busy", busy, k >= 1 && k <= 50, k);
      expect_bit("sel", sel, k >= 1 && k < 50 && (ph == 2 || ph == 3), k);
      expect_bit("grp", grp, k >= 1 && k < 50 && ph == 1, k);
      expect_bit("store_g0", store_g0, k >= 1 && k < 50 && ph == 4, k);
      expect_bit("upd", upd, k >= 5 && k <= 50 && ph == 0, k);
      expect_bit("last", last, k == 50, k);
      expect_bit("done", done, k == 51, k);
      if (upd) begin
        checks++;
        if (fin_round != 4'(k / 5)) begin
          failures++;
          $display("FAIL k=%0d fin_round=%0d", k, fin_round);
        end
      end
      @(negedge clk);
      start = poke_busy && (k % 7 == 3);
    end
    start = 0;
    n_blocks++;
  endtask

  initial begin
    checks = 0; failures = 0; n_blocks = 0;
    rst_n = 0; start = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_block(1'b0);
    run_block(1'b1);
    // reset while busy
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    repeat (12) @(negedge clk);
    rst_n = 0;
    @(negedge clk); rst_n = 1;
    #1;
    expect_bit("busy after reset", busy, 1'b0, 0);
    run_block(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
