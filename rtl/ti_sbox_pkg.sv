// ti_sbox_pkg: shared constants, types and field arithmetic of the second-order
// threshold-implemented AES S-box.
//
// Field representation. The S-box inverts in GF(2^8) built as a tower of normal
// bases GF(((2^2)^2)^2). A GF(2^2) element is 2 bits, GF(2^4) 4 bits (high pair,
// low pair) and GF(2^8) 8 bits (high nibble, low nibble); the most significant
// bit is on the left. In these bases the unit element is all ones (2'b11,
// 4'hF, 8'hFF). The GF(2^4) and GF(2^2) product formulas are the published
// ones; the tower constants N = 2'b10 (GF(2^2) level) and nu = 4'h1 (GF(2^4)
// level) follow from them (N) or were chosen so that the tower is a field (nu).
//
// Sharing. Nonlinear stages take 6 input shares and produce 7 output shares
// (the (6,7) sharing of a bit product). SHARE_OUT[k][l] names the output share
// that collects the cross product x_k * y_l. Linear terms merged into a
// multiplier output go to AFF_SLOT[i], an output share that already depends on
// input share i, so non-completeness is kept.
package ti_sbox_pkg;

  localparam int unsigned NS = 6;  // input shares of every stage
  localparam int unsigned NO = 7;  // output shares of a shared multiplier

  // Output share index (0..6) collecting x_k*y_l, k,l = 0..5.
  localparam int unsigned SHARE_OUT [NS][NS] = '{
    '{6, 0, 0, 3, 3, 6},
    '{0, 0, 0, 2, 4, 2},
    '{0, 0, 1, 1, 1, 5},
    '{3, 2, 1, 2, 4, 5},
    '{3, 4, 1, 4, 3, 6},
    '{6, 2, 5, 5, 6, 5}
  };

  // Output share that receives the linear term computed from input share i.
  localparam int unsigned AFF_SLOT [NS] = '{6, 0, 1, 2, 3, 5};

  // Random bits consumed by the four ring refreshes of one evaluation:
  // 7 masks of 4, 2, 4 and 8 bits = 126 bits.
  typedef struct packed {
    logic [NO-1:0][7:0] s5;  // stage 5: two GF(2^4) products
    logic [NO-1:0][3:0] s4;  // stage 4: two GF(2^2) products
    logic [NO-1:0][1:0] s3;  // stage 3: one GF(2^2) product
    logic [NO-1:0][3:0] s2;  // stage 2: one GF(2^4) product
  } rnd_t;

  // GF(2^2) product in normal basis.
  function automatic logic [1:0] gf4_mul(input logic [1:0] x, input logic [1:0] y);
    logic e;
    e = (x[1] ^ x[0]) & (y[1] ^ y[0]);
    return {e ^ (x[1] & y[1]), e ^ (x[0] & y[0])};
  endfunction

  // GF(2^4) product; bit 3 is the published x^1 (leftmost).
  function automatic logic [3:0] gf16_mul(input logic [3:0] x, input logic [3:0] y);
    logic x1, x2, x3, x4, y1, y2, y3, y4;
    logic [3:0] a;
    {x1, x2, x3, x4} = x;
    {y1, y2, y3, y4} = y;
    a[3] = (x1 & y1) ^ (x3 & y1) ^ (x4 & y1) ^ (x2 & y2) ^ (x3 & y2) ^ (x1 & y3)
         ^ (x2 & y3) ^ (x3 & y3) ^ (x4 & y3) ^ (x1 & y4) ^ (x3 & y4);
    a[2] = (x2 & y1) ^ (x3 & y1) ^ (x1 & y2) ^ (x2 & y2) ^ (x4 & y2) ^ (x1 & y3)
         ^ (x3 & y3) ^ (x2 & y4) ^ (x4 & y4);
    a[1] = (x1 & y1) ^ (x2 & y1) ^ (x3 & y1) ^ (x4 & y1) ^ (x1 & y2) ^ (x3 & y2)
         ^ (x1 & y3) ^ (x2 & y3) ^ (x3 & y3) ^ (x1 & y4) ^ (x4 & y4);
    a[0] = (x1 & y1) ^ (x3 & y1) ^ (x2 & y2) ^ (x4 & y2) ^ (x1 & y3) ^ (x4 & y3)
         ^ (x2 & y4) ^ (x3 & y4) ^ (x4 & y4);
    return a;
  endfunction

endpackage
