// tb_ring_refresh: self-checking test of ring refreshing and compression.
//
// Each cycle presents random 7-share inputs and random masks. One clock
// later the 6 output shares must be: shares 0..4 equal to a_i ^ r_i ^ r_(i+1),
// share 5 equal to the XOR of the refreshed shares 5 and 6, so that the XOR of
// all outputs equals the XOR of all inputs. The block is tested at the
// widths used in the S-box (2, 4 and 8 bits); reset must clear the outputs.
module tb_ring_refresh;
  import ti_sbox_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] a_sh [NO], r [NO];
  logic [1:0] a2 [NO], r2 [NO], q2 [NS];
  logic [3:0] a4 [NO], r4 [NO], q4 [NS];
  logic [7:0] q8 [NS];

  int unsigned checks = 0, failures = 0;

  always_comb begin
    for (int i = 0; i < NO; i++) begin
      a2[i] = a_sh[i][1:0]; r2[i] = r[i][1:0];
      a4[i] = a_sh[i][3:0]; r4[i] = r[i][3:0];
    end
  end

  ring_refresh #(.W(2)) dut2 (.clk(clk), .rst_n(rst_n), .a_sh(a2), .r(r2), .q_sh(q2));
  ring_refresh          dut4 (.clk(clk), .rst_n(rst_n), .a_sh(a4), .r(r4), .q_sh(q4));
  ring_refresh #(.W(8)) dut8 (.clk(clk), .rst_n(rst_n), .a_sh(a_sh), .r(r), .q_sh(q8));

  task automatic check8(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL: %s got %02h expected %02h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] e [NS];
    logic [7:0] sa, sq;
    for (int i = 0; i < NO; i++) begin a_sh[i] = 8'($urandom); r[i] = 8'($urandom); end
    @(posedge clk); #1;
    for (int i = 0; i < NS; i++) begin
      check8(q8[i], 8'h00, "reset q8");
      check8({6'd0, q2[i]}, 8'h00, "reset q2");
    end
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      for (int i = 0; i < NO; i++) begin a_sh[i] = 8'($urandom); r[i] = 8'($urandom); end
      for (int i = 0; i < NS - 1; i++) e[i] = a_sh[i] ^ r[i] ^ r[i+1];
      e[NS-1] = a_sh[5] ^ r[5] ^ r[6] ^ a_sh[6] ^ r[6] ^ r[0];
      sa = '0;
      for (int i = 0; i < NO; i++) sa ^= a_sh[i];
      @(posedge clk); #1;
      sq = '0;
      for (int i = 0; i < NS; i++) begin
        check8(q8[i], e[i], "share W=8");
        check8({4'd0, q4[i]}, {4'd0, e[i][3:0]}, "share W=4");
        check8({6'd0, q2[i]}, {6'd0, e[i][1:0]}, "share W=2");
        sq ^= q8[i];
      end
      check8(sq, sa, "XOR of shares");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
