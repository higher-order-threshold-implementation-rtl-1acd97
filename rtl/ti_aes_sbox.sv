// ti_aes_sbox: second-order threshold implementation of the AES S-box.
//
// The S-box input byte arrives as 6 Boolean shares (any 5 of them uniformly
// random, their XOR the secret byte) and leaves as 6 shares of S(x). The
// inversion in GF(2^8) is decomposed into GF(2^4) and GF(2^2) arithmetic in a
// tower of normal bases and cut into six register-separated stages, so that no
// stage combines all shares of a value (non-completeness, which keeps the
// masking sound in the presence of glitches):
//
//   1  linear map into the tower basis, per share            -> 6 x 8 bits
//   2  d  = a*b ^ nu*(a^b)^2 over GF(2^4), a/b = high/low nibble,
//          (6,7)-shared product, ring refresh                 -> 7 x 4 bits
//   3  e  = dH*dL ^ N*(dH^dL)^2 over GF(2^2), ring refresh    -> 7 x 2 bits
//   4  d^-1 = (e^-1*dL, e^-1*dH), e^-1 = e^2 (bit swap),
//          two shared GF(2^2) products, ring refresh          -> 7 x 4 bits
//   5  x^-1 = (d^-1*b, d^-1*a), two shared GF(2^4) products,
//          ring refresh                                       -> 7 x 8 bits
//   6  inverse linear map with the AES affine transformation -> 6 x 8 bits
//
// Each 7-share stage register is compressed to 6 shares at its output. The
// operands a, b and d that later stages need again are carried along in
// 6-share pipeline registers. The four ring refreshes take 7*(4+2+4+8) = 126
// fresh random bits from rnd in every cycle in which the stages hold data.
//
// Timing: fully pipelined. An input presented with in_valid before clock edge
// t appears on y_sh with out_valid after edge t+6; a new input may be given
// every cycle. rnd must carry fresh bits every cycle. Active-low asynchronous
// reset clears all registers. The stage structure, sharing, refreshing and
// merging of linear terms follow the published design; the basis matrices,
// the compression pair, the port layout, the reset and the valid tracking are
// this design's own choices.
module ti_aes_sbox
  import ti_sbox_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [7:0] x_sh [NS],  // shares of the S-box input
  input  rnd_t       rnd,        // 126 fresh random bits per cycle
  output logic       out_valid,
  output logic       busy,       // some stage holds an evaluation
  output logic [5:0] stage_valid, // bit s: stage s+1 holds an evaluation
  output logic [7:0] y_sh [NS]   // shares of the S-box output
);

  // ---------------- stage 1: linear map ----------------
  logic [7:0] lm_sh [NS];
  logic [7:0] r1    [NS];        // a = r1[7:4], b = r1[3:0]

  ti_lin_map u_lm (.x_sh(x_sh), .t_sh(lm_sh));

  // ---------------- stage 2: GF(2^4) product and square-scale ----------------
  logic [3:0] s2_a [NS], s2_b [NS], s2_ab [NS], s2_sq [NS];
  logic [3:0] s2_z [NO];
  logic [3:0] s2_r [NO];
  logic [3:0] d_sh [NS];         // compressed stage-2 register
  logic [7:0] r2_ab [NS];        // a, b carried along

  always_comb begin
    for (int i = 0; i < NS; i++) begin
      s2_a[i]  = r1[i][7:4];
      s2_b[i]  = r1[i][3:0];
      s2_ab[i] = r1[i][7:4] ^ r1[i][3:0];
    end
    for (int m = 0; m < NO; m++) s2_r[m] = rnd.s2[m];
  end

  ti_gf16_sqscl u_sqscl (.x_sh(s2_ab), .y_sh(s2_sq));
  ti_gf16_mul   u_mul2  (.x_sh(s2_a), .y_sh(s2_b), .lin_sh(s2_sq), .z_sh(s2_z));
  ring_refresh #(.W(4)) u_rr2 (.clk(clk), .rst_n(rst_n), .a_sh(s2_z), .r(s2_r), .q_sh(d_sh));

  // ---------------- stage 3: GF(2^2) product and l1 ----------------
  logic [1:0] s3_h [NS], s3_l [NS], s3_hl [NS], s3_sq [NS];
  logic [1:0] s3_z [NO];
  logic [1:0] s3_r [NO];
  logic [1:0] e_sh [NS];         // compressed stage-3 register
  logic [3:0] r3_d  [NS];        // d carried along
  logic [7:0] r3_ab [NS];

  always_comb begin
    for (int i = 0; i < NS; i++) begin
      s3_h[i]  = d_sh[i][3:2];
      s3_l[i]  = d_sh[i][1:0];
      s3_hl[i] = d_sh[i][3:2] ^ d_sh[i][1:0];
    end
    for (int m = 0; m < NO; m++) s3_r[m] = rnd.s3[m];
  end

  ti_gf4_sqscl u_l1   (.x_sh(s3_hl), .y_sh(s3_sq));
  ti_gf4_mul   u_mul3 (.x_sh(s3_h), .y_sh(s3_l), .lin_sh(s3_sq), .z_sh(s3_z));
  ring_refresh #(.W(2)) u_rr3 (.clk(clk), .rst_n(rst_n), .a_sh(s3_z), .r(s3_r), .q_sh(e_sh));

  // ---------------- stage 4: l3 and two GF(2^2) products ----------------
  logic [1:0] einv_sh [NS];
  logic [1:0] s4_dh [NS], s4_dl [NS], s4_zero [NS];
  logic [1:0] s4_zh [NO], s4_zl [NO];
  logic [3:0] s4_z [NO];
  logic [3:0] s4_r [NO];
  logic [3:0] dinv_sh [NS];      // compressed stage-4 register
  logic [7:0] r4_ab [NS];

  always_comb begin
    for (int i = 0; i < NS; i++) begin
      s4_dh[i]   = r3_d[i][3:2];
      s4_dl[i]   = r3_d[i][1:0];
      s4_zero[i] = '0;
    end
    for (int m = 0; m < NO; m++) begin
      s4_z[m] = {s4_zh[m], s4_zl[m]};
      s4_r[m] = rnd.s4[m];
    end
  end

  ti_gf4_inv u_l3    (.x_sh(e_sh), .y_sh(einv_sh));
  ti_gf4_mul u_mul4h (.x_sh(einv_sh), .y_sh(s4_dl), .lin_sh(s4_zero), .z_sh(s4_zh));
  ti_gf4_mul u_mul4l (.x_sh(einv_sh), .y_sh(s4_dh), .lin_sh(s4_zero), .z_sh(s4_zl));
  ring_refresh #(.W(4)) u_rr4 (.clk(clk), .rst_n(rst_n), .a_sh(s4_z), .r(s4_r), .q_sh(dinv_sh));

  // ---------------- stage 5: two GF(2^4) products ----------------
  logic [3:0] s5_a [NS], s5_b [NS], s5_zero [NS];
  logic [3:0] s5_zh [NO], s5_zl [NO];
  logic [7:0] s5_z [NO];
  logic [7:0] s5_r [NO];
  logic [7:0] inv_sh [NS];       // compressed stage-5 register

  always_comb begin
    for (int i = 0; i < NS; i++) begin
      s5_a[i]    = r4_ab[i][7:4];
      s5_b[i]    = r4_ab[i][3:0];
      s5_zero[i] = '0;
    end
    for (int m = 0; m < NO; m++) begin
      s5_z[m] = {s5_zh[m], s5_zl[m]};
      s5_r[m] = rnd.s5[m];
    end
  end

  ti_gf16_mul u_mul5h (.x_sh(dinv_sh), .y_sh(s5_b), .lin_sh(s5_zero), .z_sh(s5_zh));
  ti_gf16_mul u_mul5l (.x_sh(dinv_sh), .y_sh(s5_a), .lin_sh(s5_zero), .z_sh(s5_zl));
  ring_refresh #(.W(8)) u_rr5 (.clk(clk), .rst_n(rst_n), .a_sh(s5_z), .r(s5_r), .q_sh(inv_sh));

  // ---------------- stage 6: inverse linear map and affine ----------------
  logic [7:0] ilm_sh [NS];

  ti_inv_lin_map u_ilm (.t_sh(inv_sh), .y_sh(ilm_sh));

  // ---------------- stage and carry registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NS; i++) begin
        r1[i]    <= '0;
        r2_ab[i] <= '0;
        r3_ab[i] <= '0;
        r3_d[i]  <= '0;
        r4_ab[i] <= '0;
        y_sh[i]  <= '0;
      end
    end else begin
      for (int i = 0; i < NS; i++) begin
        r1[i]    <= lm_sh[i];
        r2_ab[i] <= r1[i];
        r3_ab[i] <= r2_ab[i];
        r3_d[i]  <= d_sh[i];
        r4_ab[i] <= r3_ab[i];
        y_sh[i]  <= ilm_sh[i];
      end
    end
  end

  // ---------------- control ----------------

  sbox_ctrl #(.LATENCY(6)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .stage_valid(stage_valid), .out_valid(out_valid), .busy(busy)
  );

endmodule
