// sbox_ctrl: pipeline control of the shared S-box.
//
// The S-box accepts a new evaluation every clock and returns it LATENCY clocks
// later. This block shifts the input's valid flag along the pipeline so that
// out_valid marks the cycle in which the output shares belong to an
// evaluation, and reports through stage_valid which stages are occupied (for
// example to know when the pipeline has drained and the randomness source may
// be paused). Active-low asynchronous reset empties the pipeline. An assertion
// checks that each accepted evaluation leaves exactly LATENCY clocks later.
module sbox_ctrl #(
  parameter int unsigned LATENCY = 6  // pipeline stages of the S-box
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic [LATENCY-1:0] stage_valid,  // bit s: stage s+1 holds an evaluation
  output logic               out_valid,
  output logic               busy          // some stage holds an evaluation
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) stage_valid <= '0;
    else        stage_valid <= {stage_valid[LATENCY-2:0], in_valid};
  end

  assign out_valid = stage_valid[LATENCY-1];
  assign busy      = |stage_valid;

  // every accepted evaluation leaves exactly LATENCY clocks later
  a_latency: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> ##LATENCY out_valid);

endmodule
