// ti_gf4_mul: second-order (6,7) threshold sharing of a GF(2^2) product.
//
// Takes 6 shares of x and of y and returns 7 shares whose XOR is x*y XOR the
// XOR of the 6 shares of the linear term lin. Since the field product is
// bilinear, the published (6,7) sharing of a bit product xy carries over to
// the whole multiplier: output share m is the XOR of gf4_mul(x_k, y_l) over
// the share pairs (k,l) with SHARE_OUT[k][l] = m. Every output share depends
// on at most three input share indices, and any two output shares together
// miss at least one index (second-order non-completeness). Share i of the
// linear term is added to output share AFF_SLOT[i], which already depends on
// index i, so merging it keeps non-completeness and saves a register.
// Combinational; the 7 outputs must be refreshed and registered (ring_refresh)
// before any further nonlinear use.
module ti_gf4_mul
  import ti_sbox_pkg::*;
(
  input  logic [1:0] x_sh   [NS],
  input  logic [1:0] y_sh   [NS],
  input  logic [1:0] lin_sh [NS],  // linear term to merge, 0 if none
  output logic [1:0] z_sh   [NO]
);

  always_comb begin
    for (int m = 0; m < NO; m++) z_sh[m] = '0;
    for (int k = 0; k < NS; k++)
      for (int l = 0; l < NS; l++)
        z_sh[SHARE_OUT[k][l]] = z_sh[SHARE_OUT[k][l]] ^ gf4_mul(x_sh[k], y_sh[l]);
    for (int i = 0; i < NS; i++)
      z_sh[AFF_SLOT[i]] = z_sh[AFF_SLOT[i]] ^ lin_sh[i];
  end

endmodule
