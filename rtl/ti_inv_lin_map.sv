// ti_inv_lin_map: output linear map of the shared S-box (stage 6 logic).
//
// Maps each of the NS shares from the tower-field normal basis back to the
// AES polynomial basis and applies the linear part of the AES affine
// transformation in the same matrix. The affine constant 8'h63 is added to
// share 0 only, so that the XOR of the output shares carries it exactly once.
// The matrix is the design's own, derived from the basis chosen in ti_lin_map.
// Purely combinational; the output register is in the S-box top.
module ti_inv_lin_map
  import ti_sbox_pkg::*;
(
  input  logic [7:0] t_sh [NS],  // shares in tower normal basis
  output logic [7:0] y_sh [NS]   // shares of the S-box output
);

  function automatic logic [7:0] ilm(input logic [7:0] x);
    logic [7:0] y;
    y[7] = x[1] ^ x[7];
    y[6] = x[3] ^ x[7];
    y[5] = x[2] ^ x[4];
    y[4] = x[1] ^ x[3] ^ x[7];
    y[3] = x[0] ^ x[1] ^ x[2] ^ x[3] ^ x[7];
    y[2] = x[1] ^ x[2] ^ x[4] ^ x[6] ^ x[7];
    y[1] = x[0] ^ x[1] ^ x[5];
    y[0] = x[0] ^ x[2] ^ x[5];
    return y;
  endfunction

  always_comb begin
    for (int i = 0; i < NS; i++) y_sh[i] = ilm(t_sh[i]);
    y_sh[0] = y_sh[0] ^ 8'h63;
  end

endmodule
