// tb_ti_aes_sbox: end-to-end test of the shared S-box at its default size.
//
// Drives the pipeline with freshly shared input bytes and fresh refresh
// randomness every cycle and checks, for every evaluation, that the XOR of
// the 6 output shares equals the AES S-box of the XOR of the input shares
// (reference in tb_ref_pkg, computed in the AES polynomial field) and that
// out_valid rises exactly 6 clocks after the input. Phases:
//   1 all 256 inputs back to back, masks on (1 evaluation per clock);
//   2 all 256 inputs with the randomness switched off (input not split, no
//     refresh masks), as in an unmasked sanity run of the hardware;
//   3 random inputs with random idle cycles between them;
//   4 one evaluation repeated with different masks: the output shares must
//     differ while their XOR stays the same.
// Each of these mechanisms is counted and must occur.
module tb_ti_aes_sbox;
  import ti_sbox_pkg::*;
  import tb_ref_pkg::*;

  localparam int unsigned LAT = 6;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       in_valid;
  logic [7:0] x_sh [NS];
  rnd_t       rnd;
  logic       out_valid;
  logic       busy;
  logic [5:0] stage_valid;
  logic [7:0] y_sh [NS];

  ti_aes_sbox dut (.*);

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  int unsigned cycle = 0;
  bit          masks_on = 1'b1;

  // expected outputs, indexed by the cycle they must appear in
  logic [7:0]  exp_q  [$];
  int unsigned when_q [$];
  logic [7:0]  last_out_sh [NS];
  logic [7:0]  prev_out_sh [NS];

  int unsigned n_back_to_back = 0, n_masks_off = 0, n_idle = 0, n_reshared = 0;

  function automatic logic [7:0] xor_sh(input logic [7:0] s [NS]);
    logic [7:0] r;
    r = '0;
    for (int i = 0; i < NS; i++) r ^= s[i];
    return r;
  endfunction

  task automatic drive(input bit v, input logic [7:0] x);
    logic [7:0] acc;
    in_valid = v;
    acc = '0;
    for (int i = 0; i < NS - 1; i++) begin
      x_sh[i] = masks_on ? 8'($urandom) : 8'h00;
      acc ^= x_sh[i];
    end
    x_sh[NS-1] = x ^ acc;
    if (v) begin
      exp_q.push_back(aes_sbox(x));
      when_q.push_back(cycle + LAT);
    end
  endtask

  // fresh randomness and output checking on every rising edge
  always @(negedge clk) begin
    rnd <= masks_on ? rnd_t'({$urandom, $urandom, $urandom, $urandom}) : '0;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      cycle <= cycle + 1;
      #1;
      if (when_q.size() > 0 && when_q[0] == cycle) begin
        checks++;
        if (!out_valid) begin
          failures++;
          $display("FAIL: no out_valid in cycle %0d", cycle);
        end
        checks++;
        if (xor_sh(y_sh) !== exp_q[0]) begin
          failures++;
          $display("FAIL: cycle %0d S-box output %02h, expected %02h", cycle, xor_sh(y_sh), exp_q[0]);
        end
        void'(exp_q.pop_front());
        void'(when_q.pop_front());
        for (int i = 0; i < NS; i++) last_out_sh[i] = y_sh[i];
      end else if (out_valid) begin
        checks++;
        failures++;
        $display("FAIL: unexpected out_valid in cycle %0d", cycle);
      end
    end
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] x;
    in_valid = 1'b0;
    for (int i = 0; i < NS; i++) x_sh[i] = '0;
    rnd = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // phase 1: every input, back to back, masks on
    for (int v = 0; v < 256; v++) begin
      @(negedge clk) drive(1'b1, 8'(v));
      if (v > 0) n_back_to_back++;
    end
    @(negedge clk) drive(1'b0, 8'h00);
    repeat (LAT + 2) @(negedge clk);

    // phase 2: randomness switched off
    masks_on = 1'b0;
    for (int v = 0; v < 256; v++) begin
      @(negedge clk) drive(1'b1, 8'(v));
      n_masks_off++;
    end
    @(negedge clk) drive(1'b0, 8'h00);
    repeat (LAT + 2) @(negedge clk);
    masks_on = 1'b1;

    // phase 3: random inputs with idle cycles between them
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      if ($urandom_range(2) == 0) begin
        drive(1'b0, 8'($urandom));
        n_idle++;
      end else begin
        drive(1'b1, 8'($urandom));
      end
    end
    @(negedge clk) drive(1'b0, 8'h00);
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (busy) begin
      failures++;
      $display("FAIL: pipeline still busy after draining");
    end

    // phase 4: same input twice, different masks
    x = 8'($urandom);
    @(negedge clk) drive(1'b1, x);
    @(negedge clk) drive(1'b0, 8'h00);
    repeat (LAT + 1) @(negedge clk);
    for (int i = 0; i < NS; i++) prev_out_sh[i] = last_out_sh[i];
    @(negedge clk) drive(1'b1, x);
    @(negedge clk) drive(1'b0, 8'h00);
    repeat (LAT + 1) @(negedge clk);
    checks++;
    if (prev_out_sh == last_out_sh) begin
      failures++;
      $display("FAIL: output shares did not change with new masks");
    end else begin
      n_reshared++;
    end

    foreach (exp_q[i]) begin
      failures++;
      $display("FAIL: evaluation never came out");
    end
    $display("mechanisms: back_to_back=%0d masks_off=%0d idle_cycles=%0d reshared=%0d",
             n_back_to_back, n_masks_off, n_idle, n_reshared);
    checks += 4;
    if (n_back_to_back == 0) begin failures++; $display("FAIL: no back-to-back evaluations"); end
    if (n_masks_off == 0)    begin failures++; $display("FAIL: masks never off"); end
    if (n_idle == 0)         begin failures++; $display("FAIL: no idle cycles"); end
    if (n_reshared == 0)     begin failures++; $display("FAIL: no re-sharing check"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
