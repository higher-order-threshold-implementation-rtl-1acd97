// tb_leakage: fixed-versus-random leakage detection on simulated share values.
//
// Models the evaluation method used for masked hardware: lookups of a fixed
// input and of random inputs are interleaved at random, one per clock, and
// for each lookup the Hamming weights of the individual shares held in four
// registers (stage 1, stage 2, stage 5 and the output, 26 shares in all) are
// recorded. Welch's t-statistic then compares the two classes:
//   first order   the mean of each share's weight,
//   second order  the mean of each weight's centred square, and of the centred
//                 product of every pair of shares (bivariate, same or
//                 different stages of one lookup).
// With the masks on every |t| must stay below 5; with the masks off (input
// not split, refresh masks zero) at least one first-order and one
// second-order statistic must exceed 5, showing that the test can see
// leakage. This checks the sharing and the refresh at the value level only;
// glitches and power are outside what simulation shows. Every result is also
// checked against the AES S-box.
module tb_leakage;
  import ti_sbox_pkg::*;
  import tb_ref_pkg::*;

  localparam int unsigned LAT    = 6;
  localparam int unsigned N_ON   = 100000;  // lookups with masks on
  localparam int unsigned N_OFF  = 4000;   // lookups with masks off
  localparam int unsigned NF     = 26;     // recorded share weights per lookup
  localparam real         THRESH = 5.0;
  localparam logic [7:0]  FIXED  = 8'h3C;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       in_valid = 1'b0;
  logic [7:0] x_sh [NS];
  rnd_t       rnd = '0;
  logic       out_valid, busy;
  logic [5:0] stage_valid;
  logic [7:0] y_sh [NS];

  ti_aes_sbox dut (.*);

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  int unsigned n_first_off = 0, n_second_off = 0;

  bit          masks_on;
  int unsigned n_run;
  int          cyc;
  bit          cls  [N_ON];
  logic [7:0]  xin  [N_ON];
  byte         feat [N_ON][NF];

  function automatic int hw(input logic [7:0] v);
    return $countones(v);
  endfunction

  // record the shares that belong to lookup k (if it exists)
  task automatic record(input int k, input int base, input logic [7:0] v [], input int n);
    if (k >= 0 && k < int'(n_run))
      for (int i = 0; i < n; i++) feat[k][base + i] = byte'(hw(v[i]));
  endtask

  always @(posedge clk) begin
    logic [7:0] v [];
    if (rst_n) begin
      #1;
      v = new[NO];
      for (int i = 0; i < NS; i++) v[i] = dut.r1[i];
      record(cyc, 0, v, NS);
      for (int i = 0; i < NO; i++) v[i] = {4'd0, dut.u_rr2.b_sh[i]};
      record(cyc - 1, 6, v, NO);
      for (int i = 0; i < NO; i++) v[i] = dut.u_rr5.b_sh[i];
      record(cyc - 4, 13, v, NO);
      for (int i = 0; i < NS; i++) v[i] = y_sh[i];
      record(cyc - 5, 20, v, NS);
      if (cyc - 5 >= 0 && cyc - 5 < int'(n_run)) begin
        logic [7:0] acc;
        acc = '0;
        for (int i = 0; i < NS; i++) acc ^= y_sh[i];
        checks++;
        if (acc !== aes_sbox(xin[cyc-5]) || !out_valid) begin
          failures++;
          $display("FAIL: lookup %0d gave %02h, expected %02h", cyc - 5, acc, aes_sbox(xin[cyc-5]));
        end
      end
      cyc++;
    end
  end

  always @(negedge clk) begin
    logic [7:0] acc;
    if (rst_n) begin
      rnd <= masks_on ? rnd_t'({$urandom, $urandom, $urandom, $urandom}) : '0;
      if (cyc < int'(n_run)) begin
        cls[cyc] = 1'($urandom);
        xin[cyc] = cls[cyc] ? 8'($urandom) : FIXED;
        acc = '0;
        for (int i = 0; i < NS - 1; i++) begin
          x_sh[i] = masks_on ? 8'($urandom) : 8'h00;
          acc ^= x_sh[i];
        end
        x_sh[NS-1] = xin[cyc] ^ acc;
        in_valid = 1'b1;
      end else begin
        in_valid = 1'b0;
      end
    end
  end

  function automatic real welch(input real s0, input real q0, input int n0,
                                input real s1, input real q1, input int n1);
    real m0, m1, v0, v1;
    m0 = s0 / n0;  m1 = s1 / n1;
    v0 = q0 / n0 - m0 * m0;  v1 = q1 / n1 - m1 * m1;
    if (v0 / n0 + v1 / n1 <= 1.0e-12) return (m0 == m1) ? 0.0 : 1.0e9;
    return (m0 - m1) / $sqrt(v0 / n0 + v1 / n1);
  endfunction

  // run all statistics; returns the largest |t| of first and of second order
  task automatic analyse(output real t1max, output real t2max);
    real mean [2][NF];
    int  n [2];
    real s0, q0, s1, q1, c, t;
    n[0] = 0; n[1] = 0;
    for (int c2 = 0; c2 < 2; c2++) for (int f = 0; f < NF; f++) mean[c2][f] = 0.0;
    for (int k = 0; k < int'(n_run); k++) begin
      n[cls[k]]++;
      for (int f = 0; f < NF; f++) mean[cls[k]][f] += real'(feat[k][f]);
    end
    for (int c2 = 0; c2 < 2; c2++) for (int f = 0; f < NF; f++) mean[c2][f] /= n[c2];
    t1max = 0.0; t2max = 0.0;
    for (int f = 0; f < NF; f++) begin
      // first order
      s0 = 0; q0 = 0; s1 = 0; q1 = 0;
      for (int k = 0; k < int'(n_run); k++) begin
        c = real'(feat[k][f]);
        if (cls[k]) begin s1 += c; q1 += c * c; end else begin s0 += c; q0 += c * c; end
      end
      t = welch(s0, q0, n[0], s1, q1, n[1]);
      if (t < 0) t = -t;
      if (t > t1max) t1max = t;
      if (masks_on) begin
        checks++;
        if (t >= THRESH) begin
          failures++;
          $display("FAIL: first-order leak, feature %0d, |t| = %f", f, t);
        end
      end
      // second order, univariate (g == f) and bivariate (g > f)
      for (int g = f; g < NF; g++) begin
        s0 = 0; q0 = 0; s1 = 0; q1 = 0;
        for (int k = 0; k < int'(n_run); k++) begin
          c = (real'(feat[k][f]) - mean[cls[k]][f]) * (real'(feat[k][g]) - mean[cls[k]][g]);
          if (cls[k]) begin s1 += c; q1 += c * c; end else begin s0 += c; q0 += c * c; end
        end
        t = welch(s0, q0, n[0], s1, q1, n[1]);
        if (t < 0) t = -t;
        if (t > t2max) t2max = t;
        if (masks_on) begin
          checks++;
          if (t >= THRESH) begin
            failures++;
            $display("FAIL: second-order leak, features %0d,%0d, |t| = %f", f, g, t);
          end
        end
      end
    end
  endtask

  initial begin : watchdog
    repeat (N_ON + N_OFF + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real t1, t2;
    for (int i = 0; i < NS; i++) x_sh[i] = '0;
    // masks off: the test must see leakage
    masks_on = 1'b0;
    n_run = N_OFF;
    cyc = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (cyc == int'(n_run) + LAT + 1);
    analyse(t1, t2);
    $display("masks off: max |t| first order %0.1f, second order %0.1f", t1, t2);
    checks += 2;
    if (t1 >= THRESH) n_first_off++;  else begin failures++; $display("FAIL: no first-order leak with masks off"); end
    if (t2 >= THRESH) n_second_off++; else begin failures++; $display("FAIL: no second-order leak with masks off"); end

    // masks on: no statistic may cross the threshold
    @(negedge clk) rst_n = 1'b0;
    masks_on = 1'b1;
    n_run = N_ON;
    cyc = 0;
    @(negedge clk) rst_n = 1'b1;
    wait (cyc == int'(n_run) + LAT + 1);
    analyse(t1, t2);
    $display("masks on:  max |t| first order %0.1f, second order %0.1f (%0d lookups)", t1, t2, N_ON);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
