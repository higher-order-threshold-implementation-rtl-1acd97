// ti_gf16_sqscl: shared GF(2^4) square-scale, x -> nu * x^2 with nu = 4'h1.
//
// The operation is GF(2)-linear in the normal basis, so it is applied to each
// of the NS shares separately. In the S-box it is computed on the shares of
// a XOR b (the two nibbles of the stage-1 value) in parallel with the shared
// GF(2^4) product a*b, and merged into that product's output shares.
// Combinational.
module ti_gf16_sqscl
  import ti_sbox_pkg::*;
(
  input  logic [3:0] x_sh [NS],
  output logic [3:0] y_sh [NS]
);

  always_comb begin
    for (int i = 0; i < NS; i++) begin
      y_sh[i][3] = x_sh[i][0] ^ x_sh[i][2];
      y_sh[i][2] = x_sh[i][1] ^ x_sh[i][3];
      y_sh[i][1] = x_sh[i][0] ^ x_sh[i][1];
      y_sh[i][0] = x_sh[i][0];
    end
  end

endmodule
