// tb_ti_gf4_mul: self-checking test of the (6,7)-shared GF(2^2) multiplier.
//
// Correctness: for random sharings of random x, y and of a linear term, the
// XOR of the 7 output shares must equal x*y XOR the linear term, with the
// product taken from the testbench's own tower arithmetic (tb_ref_pkg).
// Non-completeness: by changing one input share index at a time it records
// which input shares each output share depends on, then checks that every
// output share sees at most 3 of the 6 indices and that every pair of output
// shares together misses at least one index (second-order non-completeness).
module tb_ti_gf4_mul;
  import ti_sbox_pkg::*;
  import tb_ref_pkg::*;

  localparam int unsigned W = 2;

  logic [W-1:0] x_sh [NS], y_sh [NS], l_sh [NS];
  logic [W-1:0] z_sh [NO], z0_sh [NO];
  int unsigned checks = 0, failures = 0;
  bit dep [NO][NS];

  ti_gf4_mul dut (.x_sh(x_sh), .y_sh(y_sh), .lin_sh(l_sh), .z_sh(z_sh));

  function automatic logic [W-1:0] ref_mul(input logic [W-1:0] a, input logic [W-1:0] b);
    return g4_mul(a, b);
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] x, y, l, acc;
    int unsigned cnt;
    bit covers_all;
    foreach (dep[m, i]) dep[m][i] = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      x = '0; y = '0; l = '0;
      for (int i = 0; i < NS; i++) begin
        x_sh[i] = W'($urandom);
        y_sh[i] = W'($urandom);
        l_sh[i] = (n % 4 == 0) ? '0 : W'($urandom);
        x ^= x_sh[i]; y ^= y_sh[i]; l ^= l_sh[i];
      end
      #1;
      acc = '0;
      for (int m = 0; m < NO; m++) acc ^= z_sh[m];
      checks++;
      if (acc !== (ref_mul(x, y) ^ l)) begin
        failures++;
        $display("FAIL: x=%0h y=%0h l=%0h got %0h expected %0h", x, y, l, acc, ref_mul(x, y) ^ l);
      end
      // dependency probe on one share index
      z0_sh = z_sh;
      begin
        int unsigned j;
        j = n % NS;
        x_sh[j] ^= W'($urandom);
        y_sh[j] ^= W'($urandom);
        l_sh[j] ^= W'($urandom);
        #1;
        for (int m = 0; m < NO; m++) if (z_sh[m] !== z0_sh[m]) dep[m][j] = 1'b1;
      end
    end
    for (int m = 0; m < NO; m++) begin
      cnt = 0;
      for (int i = 0; i < NS; i++) cnt += dep[m][i];
      checks++;
      if (cnt > 3 || cnt == 0) begin
        failures++;
        $display("FAIL: output share %0d depends on %0d input shares", m, cnt);
      end
      for (int k = m + 1; k < NO; k++) begin
        covers_all = 1'b1;
        for (int i = 0; i < NS; i++) if (!dep[m][i] && !dep[k][i]) covers_all = 1'b0;
        checks++;
        if (covers_all) begin
          failures++;
          $display("FAIL: output shares %0d and %0d together see every input share", m, k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
