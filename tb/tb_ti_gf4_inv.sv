// tb_ti_gf4_inv: self-checking test of ti_gf4_inv (GF(2^2) inversion l3).
//
// Applies random 6-share sharings of every possible value and checks that
// the XOR of the output shares equals the reference function of the XOR of
// the input shares, computed with the testbench's own field arithmetic
// (tb_ref_pkg). Also checks that each output share is a function of the
// input share with the same index only.
module tb_ti_gf4_inv;
  import ti_sbox_pkg::*;
  import tb_ref_pkg::*;

  logic [1:0] x_sh [NS];
  logic [1:0] y_sh [NS];
  logic [1:0] y0_sh [NS];
  int unsigned checks = 0, failures = 0;

  ti_gf4_inv dut (.x_sh(x_sh), .y_sh(y_sh));

  function automatic logic [1:0] ref_f(input logic [1:0] x);
    return (x == 2'b00) ? 2'b00 : g4_exp(3 - g4_log(x));
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] x, acc;
    int unsigned j;
    for (int rep = 0; rep < 8; rep++) begin
      for (int xi = 0; xi < (1 << 2); xi++) begin
        x = 2'(xi);
        acc = '0;
        for (int i = 0; i < NS - 1; i++) begin
          x_sh[i] = 2'($urandom);
          acc ^= x_sh[i];
        end
        x_sh[NS-1] = x ^ acc;
        #1;
        acc = '0;
        for (int i = 0; i < NS; i++) acc ^= y_sh[i];
        checks++;
        if (acc !== ref_f(x)) begin
          failures++;
          $display("FAIL: x=%0h got %0h expected %0h", x, acc, ref_f(x));
        end
        // share locality: change one input share, only that output share may move
        y0_sh = y_sh;
        j = $urandom_range(NS - 1);
        x_sh[j] = x_sh[j] ^ 2'($urandom);
        #1;
        for (int i = 0; i < NS; i++) if (i != int'(j)) begin
          checks++;
          if (y_sh[i] !== y0_sh[i]) begin
            failures++;
            $display("FAIL: output share %0d depends on input share %0d", i, j);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
