// ti_gf4_sqscl: shared GF(2^2) square-scale l1, x -> N * x^2 with N = 2'b10.
//
// Linear in the normal basis, so applied to each of the NS shares separately.
// In the S-box it acts on the shares of dH XOR dL (the two halves of the
// GF(2^4) value being inverted) and is merged into the shared product dH*dL.
// Combinational.
module ti_gf4_sqscl
  import ti_sbox_pkg::*;
(
  input  logic [1:0] x_sh [NS],
  output logic [1:0] y_sh [NS]
);

  always_comb begin
    for (int i = 0; i < NS; i++) y_sh[i] = {x_sh[i][1], x_sh[i][1] ^ x_sh[i][0]};
  end

endmodule
