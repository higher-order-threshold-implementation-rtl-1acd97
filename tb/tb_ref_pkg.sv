// tb_ref_pkg: reference arithmetic for the S-box testbenches, written
// independently of the RTL's formulas.
//
// GF(2^2) is built from its normal basis {W^2, W} with W^2 = W + 1; GF(2^4)
// and GF(2^8) are built as towers over it, (h, l) standing for h*Z^4 + l*Z
// with Z^2 + Z + N = 0 (N = 2'b10) and h*Y^16 + l*Y with Y^2 + Y + nu = 0
// (nu = 4'h1). The AES field is built directly from x^8 + x^4 + x^3 + x + 1,
// and the S-box is the inverse x^254 followed by the affine transformation
// b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6) ^ b_(i+7) ^ c_i, c = 8'h63.
package tb_ref_pkg;

  // GF(2^2) in normal basis: multiply by mapping to powers of W.
  // Element codes: 2'b00 = 0, 2'b11 = 1, 2'b01 = W, 2'b10 = W^2.
  function automatic int unsigned g4_log(input logic [1:0] x);
    case (x)
      2'b11:   return 0;
      2'b01:   return 1;
      default: return 2;
    endcase
  endfunction

  function automatic logic [1:0] g4_exp(input int unsigned e);
    case (e % 3)
      0:       return 2'b11;
      1:       return 2'b01;
      default: return 2'b10;
    endcase
  endfunction

  function automatic logic [1:0] g4_mul(input logic [1:0] x, input logic [1:0] y);
    if (x == 2'b00 || y == 2'b00) return 2'b00;
    return g4_exp(g4_log(x) + g4_log(y));
  endfunction

  // Normal-basis tower product: (ah, al)*(bh, bl) = (ah*bh ^ e, al*bl ^ e),
  // e = k*(ah^al)*(bh^bl), k the constant of the level.
  function automatic logic [3:0] g16_mul(input logic [3:0] x, input logic [3:0] y);
    logic [1:0] e;
    e = g4_mul(2'b10, g4_mul(x[3:2] ^ x[1:0], y[3:2] ^ y[1:0]));
    return {g4_mul(x[3:2], y[3:2]) ^ e, g4_mul(x[1:0], y[1:0]) ^ e};
  endfunction

  function automatic logic [7:0] g256_mul(input logic [7:0] x, input logic [7:0] y);
    logic [3:0] e;
    e = g16_mul(4'h1, g16_mul(x[7:4] ^ x[3:0], y[7:4] ^ y[3:0]));
    return {g16_mul(x[7:4], y[7:4]) ^ e, g16_mul(x[3:0], y[3:0]) ^ e};
  endfunction

  // AES polynomial-basis field.
  function automatic logic [7:0] aes_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = {a[6:0], 1'b0} ^ (a[7] ? 8'h1B : 8'h00);
    end
    return p;
  endfunction

  function automatic logic [7:0] aes_inv(input logic [7:0] x);
    logic [7:0] r;
    r = 8'h01;
    for (int i = 0; i < 254; i++) r = aes_mul(r, x);  // x^254 = x^-1, 0 -> 0
    return r;
  endfunction

  function automatic logic [7:0] aes_affine(input logic [7:0] b);
    logic [7:0] r;
    for (int i = 0; i < 8; i++)
      r[i] = b[i] ^ b[(i + 4) % 8] ^ b[(i + 5) % 8] ^ b[(i + 6) % 8] ^ b[(i + 7) % 8];
    return r ^ 8'h63;
  endfunction

  function automatic logic [7:0] aes_sbox(input logic [7:0] x);
    return aes_affine(aes_inv(x));
  endfunction

  // Basis change polynomial -> tower: x^k -> r^k, r a root of the AES
  // polynomial in the tower field.
  localparam logic [7:0] ROOT = 8'h9A;

  function automatic logic [7:0] to_tower(input logic [7:0] x);
    logic [7:0] p, t;
    p = 8'hFF;  // r^0 = 1
    t = '0;
    for (int k = 0; k < 8; k++) begin
      if (x[k]) t ^= p;
      p = g256_mul(p, ROOT);
    end
    return t;
  endfunction

endpackage
