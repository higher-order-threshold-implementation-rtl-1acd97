// tb_sbox_ctrl: self-checking test of the S-box pipeline control.
//
// Drives a random valid pattern and checks every cycle that out_valid equals
// in_valid of LATENCY (6) cycles earlier, that stage_valid holds the last
// LATENCY valid flags and that busy is their OR; checks that reset empties the
// pipeline.
module tb_sbox_ctrl;

  localparam int unsigned LAT = 6;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [LAT-1:0] stage_valid;
  logic out_valid, busy;
  logic [LAT-1:0] hist = '0;

  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  sbox_ctrl dut (.*);

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1;
    checks++;
    if (stage_valid !== '0 || out_valid || busy) begin
      failures++;
      $display("FAIL: pipeline not empty in reset");
    end
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      // long idle stretches now and then so that busy drops
      in_valid = ((n / 200) % 3 == 2) ? 1'b0 : 1'($urandom);
      @(posedge clk);
      hist = {hist[LAT-2:0], in_valid};
      #1;
      checks += 3;
      if (stage_valid !== hist) begin
        failures++;
        $display("FAIL: stage_valid %b expected %b", stage_valid, hist);
      end
      if (out_valid !== hist[LAT-1]) begin
        failures++;
        $display("FAIL: out_valid %b expected %b", out_valid, hist[LAT-1]);
      end
      if (busy !== (|hist)) begin
        failures++;
        $display("FAIL: busy %b expected %b", busy, |hist);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
