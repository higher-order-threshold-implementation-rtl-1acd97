// ring_refresh: ring refreshing of 7 shares, stage register, and compression
// to 6 shares.
//
// The 7 output shares of a shared multiplier are remasked before the stage
// register with 7 fresh W-bit masks r_0..r_6 in a ring: share i receives
// r_i XOR r_(i+1 mod 7). Each mask enters exactly two shares, so the masks
// cancel in the XOR of all shares and their sum need not be stored. After the
// register the 7 shares are compressed to the 6 that the next stage takes by
// XORing share 6 into share 5 (this choice of pair is the design's own).
// Timing: the register loads every clock; q_sh shows the refreshed, compressed
// value one cycle after a_sh and r are presented. Active-low asynchronous reset
// clears the register.
module ring_refresh
  import ti_sbox_pkg::*;
#(
  parameter int unsigned W = 4  // bits per share
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] a_sh [NO],  // unrefreshed multiplier output shares
  input  logic [W-1:0] r    [NO],  // fresh masks, new every cycle
  output logic [W-1:0] q_sh [NS]   // refreshed, registered, compressed shares
);

  logic [W-1:0] d_sh [NO];
  logic [W-1:0] b_sh [NO];

  always_comb begin
    for (int i = 0; i < NO; i++) d_sh[i] = a_sh[i] ^ r[i] ^ r[(i + 1) % NO];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NO; i++) b_sh[i] <= '0;
    end else begin
      for (int i = 0; i < NO; i++) b_sh[i] <= d_sh[i];
    end
  end

  always_comb begin
    for (int i = 0; i < NS; i++) q_sh[i] = b_sh[i];
    q_sh[NS-1] = b_sh[NS-1] ^ b_sh[NO-1];
  end

endmodule
