// tb_ti_lin_map: self-checking test of ti_lin_map (input linear map).
//
// Applies random 6-share sharings of every possible value and checks that
// the XOR of the output shares equals the reference function of the XOR of
// the input shares, computed with the testbench's own field arithmetic
// (tb_ref_pkg). Also checks that each output share is a function of the
// input share with the same index only.
module tb_ti_lin_map;
  import ti_sbox_pkg::*;
  import tb_ref_pkg::*;

  logic [7:0] x_sh [NS];
  logic [7:0] y_sh [NS];
  logic [7:0] y0_sh [NS];
  int unsigned checks = 0, failures = 0;

  ti_lin_map dut (.x_sh(x_sh), .t_sh(y_sh));

  function automatic logic [7:0] ref_f(input logic [7:0] x);
    return to_tower(x);
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] x, acc;
    int unsigned j;
    // the basis change must be a field isomorphism
    for (int a = 0; a < 256; a += 7)
      for (int b = 0; b < 256; b++) begin
        checks++;
        if (to_tower(aes_mul(8'(a), 8'(b))) !== g256_mul(to_tower(8'(a)), to_tower(8'(b)))) begin
          failures++;
          $display("FAIL: reference basis change is not multiplicative");
        end
      end
    for (int rep = 0; rep < 8; rep++) begin
      for (int xi = 0; xi < (1 << 8); xi++) begin
        x = 8'(xi);
        acc = '0;
        for (int i = 0; i < NS - 1; i++) begin
          x_sh[i] = 8'($urandom);
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
        x_sh[j] = x_sh[j] ^ 8'($urandom);
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
