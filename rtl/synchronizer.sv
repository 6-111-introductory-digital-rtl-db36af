// Input synchronizer: every bit of d passes through a chain of STAGES
// flip-flops clocked by clk, so that a level changing at any time reaches
// the rest of the design as a clean signal of the clock domain, with the
// first flip-flop absorbing metastability.
// Interface: d (asynchronous), q (synchronous). Latency: STAGES cycles.
// That all inputs are synchronized follows the controller's block diagram;
// two stages and the absence of a reset (the reset itself is one of the
// synchronized inputs) are this design's choices.
module synchronizer #(
  parameter int unsigned WIDTH  = 1,
  parameter int unsigned STAGES = 2
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] chain [STAGES];

  always_ff @(posedge clk) begin
    chain[0] <= d;
    for (int i = 1; i < STAGES; i++) chain[i] <= chain[i-1];
  end

  assign q = chain[STAGES-1];

endmodule
