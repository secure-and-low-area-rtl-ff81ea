// tb_ti_indices_selector -- checks the index selection layer against the
// sharing table (kept separately in aes_ref_pkg) for random share pairs, and
// checks non-completeness directly: changing the share a component function
// does not use, for any bit, must leave its selected byte unchanged.
module tb_ti_indices_selector;
  import aes_ref_pkg::*;

  logic [7:0] x0, x1;
  logic [7:0] z [12];
  int checks, failures;

  ti_indices_selector dut (.x0(x0), .x1(x1), .z(z));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks = 0; failures = 0;
    for (int n = 0; n < 2000; n++) begin
      logic [7:0] a, b, zs [12], flip;
      a = 8'($urandom); b = 8'($urandom);
      x0 = a; x1 = b;
      #1;
      for (int i = 0; i < 12; i++) begin
        checks++;
        if (z[i] !== r_pick(i, a, b)) begin
          failures++;
          if (failures < 10) $display("FAIL row %0d x0=%02h x1=%02h z=%02h", i, a, b, z[i]);
        end
        zs[i] = z[i];
      end
      // flip only the shares that row i must not see
      for (int i = 0; i < 12; i++) begin
        flip = 8'($urandom) | 8'h01;
        x0 = a; x1 = b;
        for (int j = 0; j < 8; j++)
          if (R_TABLE[i][j] == "1") x0[7-j] = a[7-j] ^ flip[j];
          else                      x1[7-j] = b[7-j] ^ flip[j];
        #1;
        checks++;
        if (z[i] !== zs[i]) begin
          failures++;
          if (failures < 10) $display("FAIL non-completeness row %0d", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
