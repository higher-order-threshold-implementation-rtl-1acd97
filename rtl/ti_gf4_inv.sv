// ti_gf4_inv: shared GF(2^2) inversion l3.
//
// In GF(2^2) the inverse equals the square, and in a normal basis squaring is
// a swap of the two coordinates. The map is therefore linear and is applied to
// each of the NS shares separately; it costs no gates, only wiring.
// Combinational.
module ti_gf4_inv
  import ti_sbox_pkg::*;
(
  input  logic [1:0] x_sh [NS],
  output logic [1:0] y_sh [NS]
);

  always_comb begin
    for (int i = 0; i < NS; i++) y_sh[i] = {x_sh[i][0], x_sh[i][1]};
  end

endmodule
