// synchronizer: brings the receiver's asynchronous RDY line into the
// clock domain of the digitizer.
//
// RDY is sampled on every rising clock edge; SRDY is the sampled value.
// The design description uses a single flip-flop, which is the default
// (STAGES = 1); a larger STAGES value chains more flip-flops for a lower
// chance of metastability, at one extra clock of latency per stage.
//
// Interface: clk, rst_n (synchronous, active low, clears SRDY), rdy in,
// srdy out. Timing: srdy follows rdy after STAGES rising edges.
// The reset input is this design's own addition.
module synchronizer #(
  parameter int unsigned STAGES = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic rdy,
  output logic srdy
);

  // chain[0] is the asynchronous input, chain[STAGES] the synchronized
  // output; each stage in between is one flip-flop.
  logic [STAGES:0] chain;

  assign chain[0] = rdy;

  always_ff @(posedge clk) begin
    if (!rst_n) chain[STAGES:1] <= '0;
    else        chain[STAGES:1] <= chain[STAGES-1:0];
  end

  assign srdy = chain[STAGES];

  initial assert (STAGES >= 1) else $error("synchronizer: STAGES must be at least 1");

endmodule
