// tb_ti_compression -- random component outputs and fresh bits; checks each
// output share against its own XOR sum (rows 0-5 into share 0, rows 6-11 into
// share 1, {r7,r6} spread over both shares) and that the recombined output is
// the XOR of all twelve inputs, whatever the fresh bits.
module tb_ti_compression;

  logic [7:0] f [12];
  logic [1:0] r67;
  logic [7:0] y0, y1;
  int checks, failures;

  ti_compression dut (.f(f), .r67(r67), .y0(y0), .y1(y1));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks = 0; failures = 0;
    for (int n = 0; n < 3000; n++) begin
      logic [7:0] e0, e1, m;
      for (int i = 0; i < 12; i++) f[i] = 8'($urandom);
      r67 = 2'($urandom);
      m = {r67, r67, r67, r67};
      e0 = m; e1 = m;
      for (int i = 0; i < 6; i++) begin e0 ^= f[i]; e1 ^= f[i + 6]; end
      #1;
      checks++;
      if (y0 !== e0 || y1 !== e1) begin
        failures++;
        if (failures < 10) $display("FAIL y0=%02h/%02h y1=%02h/%02h", y0, e0, y1, e1);
      end
      checks++;
      if ((y0 ^ y1) !== (e0 ^ e1)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
