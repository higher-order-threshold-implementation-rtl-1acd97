// tb_ti_inv_lin_map: self-checking test of ti_inv_lin_map (output linear map with affine).
//
// Applies random 6-share sharings of every possible value and checks that
// the XOR of the output shares equals the reference function of the XOR of
// the input shares, computed with the testbench's own field arithmetic
// (tb_ref_pkg). Also checks that each output share is a function of the
// input share with the same index only, except that the constant 8'h63 goes into share 0.
module tb_ti_inv_lin_map;
  import ti_sbox_pkg::*;
  import tb_ref_pkg::*;

  logic [7:0] x_sh [NS];
  logic [7:0] y_sh [NS];
  logic [7:0] y0_sh [NS];
  int unsigned checks = 0, failures = 0;

  ti_inv_lin_map dut (.t_sh(x_sh), .y_sh(y_sh));

  // inverse of the basis change by table, then the AES affine map
  logic [7:0] from_tower [256];

  function automatic logic [7:0] ref_f(input logic [7:0] x);
    return aes_affine(from_tower[x]);
  endfunction

  initial begin
    for (int v = 0; v < 256; v++) from_tower[to_tower(8'(v))] = 8'(v);
  end

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
    #1;
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
