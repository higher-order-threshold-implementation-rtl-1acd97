// ti_lin_map: input linear map of the shared S-box (stage 1 logic).
//
// Each of the NS shares of the S-box input byte is mapped independently from
// the AES polynomial basis (x^8 + x^4 + x^3 + x + 1) into the tower-field
// normal basis used by the rest of the S-box. Being GF(2)-linear, the map
// commutes with the Boolean sharing: the XOR of the outputs is the image of the
// XOR of the inputs. The matrix is the design's own: it sends the polynomial
// basis element x^k to r^k, with r = 8'h9A a root of the AES polynomial in the
// tower field (one of the eight possible roots, chosen for a low XOR count).
// Purely combinational; the stage register is in the S-box top.
module ti_lin_map
  import ti_sbox_pkg::*;
(
  input  logic [7:0] x_sh [NS],  // shares in AES polynomial basis
  output logic [7:0] t_sh [NS]   // shares in tower normal basis
);

  function automatic logic [7:0] lm(input logic [7:0] x);
    logic [7:0] t;
    t[7] = x[0] ^ x[1] ^ x[3] ^ x[4] ^ x[7];
    t[6] = x[0];
    t[5] = x[0] ^ x[5] ^ x[6];
    t[4] = x[0] ^ x[1] ^ x[2] ^ x[3] ^ x[6];
    t[3] = x[0] ^ x[1] ^ x[2] ^ x[5] ^ x[6] ^ x[7];
    t[2] = x[0] ^ x[4] ^ x[5] ^ x[6];
    t[1] = x[0] ^ x[1] ^ x[5] ^ x[6];
    t[0] = x[0] ^ x[5] ^ x[6] ^ x[7];
    return t;
  endfunction

  always_comb begin
    for (int i = 0; i < NS; i++) t_sh[i] = lm(x_sh[i]);
  end

endmodule
